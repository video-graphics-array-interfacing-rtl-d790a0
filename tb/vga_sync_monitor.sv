// vga_sync_monitor: a model of the monitor side of a 640x480, 60 Hz VGA
// link, used by the end-to-end testbenches.
//
// It samples HS and VS (both active low) 1 ns after each rising edge of
// the 100 MHz board clock and knows nothing of the design's counters: it
// locates the raster from the sync edges alone. It checks that HS repeats
// every 800 pixels (3,200 board clocks) with a 96-pixel pulse, and that VS
// repeats every 521 lines (1,667,200 board clocks) with a 2-line pulse.
// Counting HS pulses from the start of a VS pulse, the visible rows are
// those that begin after the 31st to the 510th HS pulse (2 sync lines +
// 29 back-porch lines after the VS pulse starts, the VS edge coming before
// the HS edge of its line), and in each such row the visible pixels run
// from 144 pixels (HS pulse + back porch) after the HS pulse begins, for
// 640 pixels. exp_visible tells whether the current sample lies in that
// window; it is only meaningful while locked, i.e. after the first VS
// pulse following a reset.
`timescale 1ns/1ps
module vga_sync_monitor (
  input  logic fpga_clk,
  input  logic reset,
  input  logic h_sync,
  input  logic v_sync,
  output bit   locked,
  output bit   exp_visible,
  output int   checks,
  output int   failures,
  output int   hs_pulses,
  output int   vs_pulses,
  output int   frames      // complete VS periods measured
);

  localparam int CLK_PER_PIXEL = 4;
  localparam int H_TOTAL = 800 * CLK_PER_PIXEL;
  localparam int H_PW    = 96 * CLK_PER_PIXEL;
  localparam int V_TOTAL = 521 * H_TOTAL;
  localparam int V_PW    = 2 * H_TOTAL;
  localparam int X_FIRST = 144 * CLK_PER_PIXEL;
  localparam int X_LAST  = X_FIRST + 640 * CLK_PER_PIXEL - 1;
  localparam int Y_FIRST = 31;
  localparam int Y_LAST  = Y_FIRST + 480 - 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  longint t, hs_fall, vs_fall;
  int     lcnt;
  bit     hs_q, vs_q;

  initial begin
    locked = 1'b0; exp_visible = 1'b0;
    checks = 0; failures = 0; hs_pulses = 0; vs_pulses = 0; frames = 0;
    t = 0; hs_fall = -1; vs_fall = -1; lcnt = 0;
    hs_q = 1'b0; vs_q = 1'b0;
    forever begin
      @(posedge fpga_clk);
      #1;
      t++;
      if (reset) begin
        locked = 1'b0;
        hs_fall = -1;
        vs_fall = -1;
        hs_q = 1'b0;
        vs_q = 1'b0;
      end else begin
        if (!v_sync && !vs_q) begin
          if (vs_fall >= 0) begin
            check(t - vs_fall == V_TOTAL, "VS period 416,800 pixels");
            frames++;
          end
          vs_fall = t;
          vs_pulses++;
          lcnt = 0;
          locked = 1'b1;
        end
        if (v_sync && vs_q && vs_fall >= 0) check(t - vs_fall == V_PW, "VS pulse 2 lines");
        if (!h_sync && !hs_q) begin
          if (hs_fall >= 0) check(t - hs_fall == H_TOTAL, "HS period 800 pixels");
          hs_fall = t;
          hs_pulses++;
          lcnt++;
        end
        if (h_sync && hs_q && hs_fall >= 0) check(t - hs_fall == H_PW, "HS pulse 96 pixels");
        hs_q = !h_sync;
        vs_q = !v_sync;
        exp_visible = locked && hs_fall >= 0 &&
                      lcnt >= Y_FIRST && lcnt <= Y_LAST &&
                      (t - hs_fall) >= X_FIRST && (t - hs_fall) <= X_LAST;
      end
    end
  end

endmodule
