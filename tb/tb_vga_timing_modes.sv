// tb_vga_timing_modes: runs the timing generator in the two higher modes,
// 800x600 at 40 MHz and 1280x1024 at 110 MHz, one frame each, and checks
// them against references built from their region lengths:
//   800x600:   800/40/128/88 pixels, 600/1/4/23 lines (1056 x 628 clocks)
//   1280x1024: 1280/52/120/256 pixels, 1024/3/5/42 lines (1708 x 1074)
// Both modes use positive sync pulses.
`timescale 1ns/1ps
module tb_vga_timing_modes;
  import vga_pkg::*;

  int checks_a, failures_a, lines_a, frames_a;
  int checks_b, failures_b, lines_b, frames_b;
  bit done_a, done_b;

  vga_timing_checker #(
    .TIMING(SVGA_800X600),
    .H_DISP(800), .H_FP(40), .H_PW(128), .H_BP(88),
    .V_DISP(600), .V_FP(1),  .V_PW(4),   .V_BP(23),
    .HS_LOW(1'b0), .VS_LOW(1'b0), .FRAMES(1), .CLK_PS(25000)
  ) u_svga (
    .checks(checks_a), .failures(failures_a), .lines_seen(lines_a),
    .frames_seen(frames_a), .done(done_a)
  );

  vga_timing_checker #(
    .TIMING(SXGA_1280X1024),
    .H_DISP(1280), .H_FP(52), .H_PW(120), .H_BP(256),
    .V_DISP(1024), .V_FP(3),  .V_PW(5),   .V_BP(42),
    .HS_LOW(1'b0), .VS_LOW(1'b0), .FRAMES(1), .CLK_PS(9090)
  ) u_sxga (
    .checks(checks_b), .failures(failures_b), .lines_seen(lines_b),
    .frames_seen(frames_b), .done(done_b)
  );

  initial begin
    #40ms;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b,
             failures_a + failures_b + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    wait (done_a && done_b);
    checks   = checks_a + checks_b + 2;
    failures = failures_a + failures_b;
    if (lines_a != 628)  begin failures++; $display("FAIL 800x600 lines %0d", lines_a); end
    if (lines_b != 1074) begin failures++; $display("FAIL 1280x1024 lines %0d", lines_b); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
