// vga_board: the complete display path, from board clock and switches to
// the analog signals on the VGA connector.
//
// vga_top is the logic inside the FPGA. Its twelve colour outputs feed
// three 4-bit resistor DACs (vga_dac), one per colour, which turn each
// 4-bit value into a level between 0 V and about 0.7 V across the
// monitor's 75 ohm termination; HS and VS go to the connector as logic
// levels. The DACs are behavioural models, so this level simulates the
// board but is not itself synthesizable; vga_top is the synthesizable top.
//
// Ports: sw is the switch word {r1..r4, g1..g4, b1..b4} (bit 11 = r1_sw);
// red_v, green_v and blue_v are the colour voltages at the monitor input;
// h_sync and v_sync are the sync signals (active low in 640x480).
module vga_board (
  input  logic        fpga_clk,  // 100 MHz board clock
  input  logic        reset,     // active high
  input  logic [11:0] sw,        // colour switches, r1_sw is bit 11
  output real         red_v,
  output real         green_v,
  output real         blue_v,
  output logic        h_sync,
  output logic        v_sync
);

  logic [3:0] red, green, blue;

  vga_top u_fpga (
    .fpga_clk (fpga_clk),
    .reset    (reset),
    .r1_sw (sw[11]), .r2_sw (sw[10]), .r3_sw (sw[9]), .r4_sw (sw[8]),
    .g1_sw (sw[7]),  .g2_sw (sw[6]),  .g3_sw (sw[5]), .g4_sw (sw[4]),
    .b1_sw (sw[3]),  .b2_sw (sw[2]),  .b3_sw (sw[1]), .b4_sw (sw[0]),
    .r1 (red[3]),   .r2 (red[2]),   .r3 (red[1]),   .r4 (red[0]),
    .g1 (green[3]), .g2 (green[2]), .g3 (green[1]), .g4 (green[0]),
    .b1 (blue[3]),  .b2 (blue[2]),  .b3 (blue[1]),  .b4 (blue[0]),
    .h_sync   (h_sync),
    .v_sync   (v_sync)
  );

  vga_dac u_dac_red   (.code (red),   .v_out (red_v));
  vga_dac u_dac_green (.code (green), .v_out (green_v));
  vga_dac u_dac_blue  (.code (blue),  .v_out (blue_v));

endmodule
