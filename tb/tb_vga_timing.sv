// tb_vga_timing: checks the raster timing generator in the 640x480, 60 Hz
// mode over two full frames against a reference built from the standard
// region lengths: 640/16/96/48 pixels per line and 480/10/2/29 lines per
// frame at a 25 MHz pixel clock. Besides the clock-by-clock comparison it
// requires an HS period of 800 clocks (32 us) with a 96-clock pulse, a
// VS period of 416,800 clocks (16.67 ms) with a 1,600-clock pulse, and
// 307,200 visible pixels per frame.
`timescale 1ns/1ps
module tb_vga_timing;
  import vga_pkg::*;

  int  checks, failures, lines, frames;
  bit  done;

  vga_timing_checker #(
    .TIMING(VGA_640X480),
    .H_DISP(640), .H_FP(16), .H_PW(96), .H_BP(48),
    .V_DISP(480), .V_FP(10), .V_PW(2),  .V_BP(29),
    .HS_LOW(1'b1), .VS_LOW(1'b1), .FRAMES(2), .CLK_PS(40000)
  ) u_chk (
    .checks(checks), .failures(failures), .lines_seen(lines),
    .frames_seen(frames), .done(done)
  );

  // Watchdog: two frames take 33.4 ms.
  initial begin
    #50ms;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    // Two frames are 1042 lines and end at 33.344 ms after reset release.
    if (lines != 1042) begin
      $display("FAIL line count %0d", lines);
      $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    end else begin
      $display("frames=%0d lines=%0d", frames, lines);
      $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures);
    end
    $finish;
  end

endmodule
