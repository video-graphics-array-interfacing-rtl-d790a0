// tb_vga_top: end-to-end test of the FPGA design from its pins.
//
// A 100 MHz clock and the twelve switches drive vga_top. A monitor model
// (vga_sync_monitor) locks to HS/VS and says, for every board clock,
// whether the raster is in the visible 640x480 window. Every board clock
// the testbench then expects the twelve colour pins to equal the switches
// inside the window and to be 0 outside it. The switches are changed
// right after each VS pulse starts, so every frame shows one colour; the
// testbench also counts the lit board clocks per frame, which must be
// 640 x 480 pixels x 4 = 1,228,800 for any non-black colour. Halfway it
// pulses reset in the middle of a frame and requires black, idle syncs
// and a clean restart. Each mechanism (clock division seen as 3,200-clock
// lines, HS pulses, VS pulses, visible pixels, blanking, colour change,
// reset) must occur at least once.
`timescale 1ns/1ps
module tb_vga_top;

  logic fpga_clk = 1'b0, reset = 1'b0;
  logic [11:0] sw;  // {r1..r4, g1..g4, b1..b4}
  logic r1, r2, r3, r4, g1, g2, g3, g4, b1, b2, b3, b4, h_sync, v_sync;
  logic [11:0] pins;

  vga_top dut (
    .fpga_clk(fpga_clk), .reset(reset),
    .r1_sw(sw[11]), .r2_sw(sw[10]), .r3_sw(sw[9]), .r4_sw(sw[8]),
    .g1_sw(sw[7]),  .g2_sw(sw[6]),  .g3_sw(sw[5]), .g4_sw(sw[4]),
    .b1_sw(sw[3]),  .b2_sw(sw[2]),  .b3_sw(sw[1]), .b4_sw(sw[0]),
    .r1(r1), .r2(r2), .r3(r3), .r4(r4), .g1(g1), .g2(g2), .g3(g3), .g4(g4),
    .b1(b1), .b2(b2), .b3(b3), .b4(b4), .h_sync(h_sync), .v_sync(v_sync)
  );
  assign pins = {r1, r2, r3, r4, g1, g2, g3, g4, b1, b2, b3, b4};

  bit locked, exp_visible;
  int m_checks, m_failures, hs_pulses, vs_pulses, frames;

  vga_sync_monitor mon (
    .fpga_clk(fpga_clk), .reset(reset), .h_sync(h_sync), .v_sync(v_sync),
    .locked(locked), .exp_visible(exp_visible), .checks(m_checks),
    .failures(m_failures), .hs_pulses(hs_pulses), .vs_pulses(vs_pulses),
    .frames(frames)
  );

  always #5ns fpga_clk = ~fpga_clk;

  int checks = 0, failures = 0;
  int n_visible = 0, n_blank = 0, n_colour_changes = 0, n_resets = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: pins=%03h sw=%03h", what, $time, pins, sw);
    end
  endtask

  task automatic finish_test();
    $display("hs=%0d vs=%0d frames=%0d visible=%0d blank=%0d colour_changes=%0d resets=%0d",
             hs_pulses, vs_pulses, frames, n_visible, n_blank, n_colour_changes, n_resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  endtask

  initial begin
    #120ms;
    failures++;
    $display("FAIL watchdog");
    finish_test();
  end

  // Colour check on every board clock, after the monitor has sampled.
  int lit;
  int last_vs;
  bit frame_ok;   // the frame being counted started at a VS pulse (its colour is sw until the next one)
  always @(posedge fpga_clk) begin
    #2;
    if (reset && $time > 10ns) begin
      check(pins == 12'h000 && h_sync && v_sync, "outputs in reset");
      frame_ok = 1'b0;
    end else if (locked) begin
      if (vs_pulses != last_vs) begin
        if (frame_ok && sw != 12'h000) check(lit == 640 * 480 * 4, "lit clocks per frame");
        lit = 0;
        frame_ok = 1'b1;
      end
      if (exp_visible) begin
        check(pins == sw, "visible pixel shows the switches");
        n_visible++;
      end else begin
        check(pins == 12'h000, "blanking is black");
        if (sw != 12'h000) n_blank++;
      end
      if (pins != 12'h000) lit++;
    end
    last_vs = vs_pulses;
  end

  task automatic set_colour_at_next_vs(input logic [11:0] c);
    int v;
    v = vs_pulses;
    wait (vs_pulses != v);
    @(negedge fpga_clk);
    if (sw != c) n_colour_changes++;
    sw = c;
  endtask

  initial begin
    lit = 0; last_vs = 0; frame_ok = 1'b0;
    sw = 12'hFFF;
    #1 reset = 1'b1;  // a rising edge applies the asynchronous reset
    repeat (10) @(posedge fpga_clk);
    @(negedge fpga_clk) reset = 1'b0;
    set_colour_at_next_vs(12'hF00);
    set_colour_at_next_vs(12'h0F0);
    // Reset in the middle of the visible area of the next frame.
    wait (exp_visible);
    repeat (1000) @(posedge fpga_clk);
    @(negedge fpga_clk) reset = 1'b1;
    n_resets++;
    repeat (20) @(posedge fpga_clk);
    @(negedge fpga_clk) reset = 1'b0;
    set_colour_at_next_vs(12'h5A3);
    set_colour_at_next_vs(12'h000);
    set_colour_at_next_vs(12'h000);
    // Mechanism coverage.
    check(hs_pulses > 0,        "HS pulses seen");
    check(vs_pulses > 0,        "VS pulses seen");
    check(frames >= 3,          "whole frames measured");
    check(n_visible > 0,        "visible pixels seen");
    check(n_blank > 0,          "blanking with a colour set seen");
    check(n_colour_changes >= 4, "colour changes made");
    check(n_resets == 1,        "reset applied while running");
    finish_test();
  end

endmodule
