// tb_vga_board: end-to-end test of the whole display path at full size.
//
// The board top runs with all its defaults: 100 MHz clock, divide-by-four
// pixel clock, 640x480 at 60 Hz, and the three resistor DACs. The switch
// word steps through nine colours, one per frame, changed right after each
// VS pulse starts: white, red, green, blue, yellow, magenta, cyan, black
// and 0000_0001_1111 (a little green with full blue). A monitor model
// (vga_sync_monitor) locks to HS/VS and checks their periods and widths.
// On every board clock the testbench computes the voltage each colour wire
// should carry - the switch nibble through the resistor ladder inside the
// visible window, 0 V outside - and compares it with the DAC outputs. It
// also counts per frame the board clocks with light on screen (1,228,800
// for a non-black colour), and requires each mechanism (HS, VS, visible
// pixels, blanking, colour change) to have occurred.
`timescale 1ns/1ps
module tb_vga_board;

  logic fpga_clk = 1'b0, reset = 1'b0;
  logic [11:0] sw;  // {r1..r4, g1..g4, b1..b4}
  real  red_v, green_v, blue_v;
  logic h_sync, v_sync;

  vga_board dut (
    .fpga_clk(fpga_clk), .reset(reset), .sw(sw),
    .red_v(red_v), .green_v(green_v), .blue_v(blue_v),
    .h_sync(h_sync), .v_sync(v_sync)
  );

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
  int n_visible = 0, n_blank = 0, n_colour_changes = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at %0t: sw=%03h v=%f/%f/%f", what, $time, sw,
                 red_v, green_v, blue_v);
    end
  endtask

  // Expected wire voltage for a 4-bit value: 3.3 V drivers through
  // 4k/2k/1k/510 ohm (bit 0..3) into a 75 ohm load, node equation solved.
  function automatic real ladder(logic [3:0] n);
    real num, den;
    num = 0.0;
    den = 1.0 / 75.0 + 1.0 / 4000.0 + 1.0 / 2000.0 + 1.0 / 1000.0 + 1.0 / 510.0;
    if (n[0]) num += 3.3 / 4000.0;
    if (n[1]) num += 3.3 / 2000.0;
    if (n[2]) num += 3.3 / 1000.0;
    if (n[3]) num += 3.3 / 510.0;
    return num / den;
  endfunction

  function automatic bit near(real a, real b);
    return (a - b) < 1e-9 && (b - a) < 1e-9;
  endfunction

  task automatic finish_test();
    $display("hs=%0d vs=%0d frames=%0d visible=%0d blank=%0d colour_changes=%0d",
             hs_pulses, vs_pulses, frames, n_visible, n_blank, n_colour_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  endtask

  initial begin
    #250ms;
    failures++;
    $display("FAIL watchdog");
    finish_test();
  end

  int lit = 0, last_vs = 0;
  bit frame_ok = 1'b0;
  always @(posedge fpga_clk) begin
    #2;
    if (!reset && locked) begin
      if (vs_pulses != last_vs) begin
        if (frame_ok && sw != 12'h000) check(lit == 640 * 480 * 4, "lit clocks per frame");
        lit = 0;
        frame_ok = 1'b1;
      end
      if (exp_visible) begin
        check(near(red_v, ladder(sw[11:8])) && near(green_v, ladder(sw[7:4])) &&
              near(blue_v, ladder(sw[3:0])), "visible pixel voltage");
        n_visible++;
      end else begin
        check(red_v == 0.0 && green_v == 0.0 && blue_v == 0.0, "blanking at 0 V");
        if (sw != 12'h000) n_blank++;
      end
      if (red_v > 0.0 || green_v > 0.0 || blue_v > 0.0) lit++;
    end
    last_vs = vs_pulses;
  end

  logic [11:0] patterns [9] = '{
    12'b1111_1111_1111, 12'b1111_0000_0000, 12'b0000_1111_0000,
    12'b0000_0000_1111, 12'b1111_1111_0000, 12'b1111_0000_1111,
    12'b0000_1111_1111, 12'b0000_0000_0000, 12'b0000_0001_1111
  };

  initial begin
    int v;
    sw = patterns[0];
    #1 reset = 1'b1;  // a rising edge applies the asynchronous reset
    repeat (10) @(posedge fpga_clk);
    @(negedge fpga_clk) reset = 1'b0;
    for (int i = 1; i <= 9; i++) begin
      v = vs_pulses;
      wait (vs_pulses != v);
      @(negedge fpga_clk);
      if (i < 9) begin
        sw = patterns[i];
        n_colour_changes++;
      end
    end
    check(ladder(4'hF) > 0.71846 && ladder(4'hF) < 0.71847, "full-scale level 0.7185 V");
    check(hs_pulses > 0 && vs_pulses > 0, "HS and VS pulses seen");
    check(frames >= 8,             "whole frames measured");
    check(n_visible > 0,           "visible pixels seen");
    check(n_blank > 0,             "blanking with a colour set seen");
    check(n_colour_changes == 8,   "colour changes made");
    finish_test();
  end

endmodule
