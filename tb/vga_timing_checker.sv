// vga_timing_checker: runs vga_timing in one video mode and compares it,
// clock by clock, with a reference model built from the region lengths
// (display, front porch, sync pulse, back porch) given as plain integers.
//
// The reference keeps its own column and row counters and predicts the
// counts, both syncs and the display enable for every pixel clock. It
// also measures, from the DUT's outputs alone, the HS period and pulse
// width, the VS period and pulse width (in pixel clocks) and the number
// of visible pixels in each complete frame, and compares them with the
// products of the region lengths. It runs FRAMES frames after reset and
// then raises done. The pixel clock period is CLK_PS picoseconds.
`timescale 1ns/1ps
module vga_timing_checker
  import vga_pkg::*;
#(
  parameter timing_t TIMING = VGA_640X480,
  parameter int H_DISP = 640, H_FP = 16, H_PW = 96, H_BP = 48,
  parameter int V_DISP = 480, V_FP = 10, V_PW = 2,  V_BP = 29,
  parameter bit HS_LOW = 1'b1,
  parameter bit VS_LOW = 1'b1,
  parameter int FRAMES = 2,
  parameter int CLK_PS = 40000
) (
  output int checks,
  output int failures,
  output int lines_seen,
  output int frames_seen,
  output bit done
);

  localparam int H_TOTAL = H_DISP + H_FP + H_PW + H_BP;
  localparam int V_TOTAL = V_DISP + V_FP + V_PW + V_BP;

  logic    clk = 1'b0;
  logic    reset = 1'b1;
  hcount_t h_count;
  vcount_t v_count;
  logic    hsync, vsync, video_on;

  vga_timing #(.TIMING(TIMING)) dut (
    .clk(clk), .reset(reset), .h_count(h_count), .v_count(v_count),
    .hsync(hsync), .vsync(vsync), .video_on(video_on)
  );

  always #(CLK_PS * 0.5ps) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: h=%0d v=%0d at %0t", what, h_count, v_count, $time);
    end
  endtask

  function automatic bit exp_hs(int x);
    return ((x >= H_DISP + H_FP) && (x < H_DISP + H_FP + H_PW)) ^ HS_LOW;
  endfunction
  function automatic bit exp_vs(int y);
    return ((y >= V_DISP + V_FP) && (y < V_DISP + V_FP + V_PW)) ^ VS_LOW;
  endfunction

  int  ex, ey;
  int  t;                       // pixel clocks since reset release
  int  hs_start, vs_start;      // start of the last pulse
  int  visible;                 // visible pixels in this frame
  bit  hs_act_q, vs_act_q;

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    lines_seen = 0; frames_seen = 0;
    repeat (3) @(posedge clk);
    #1;
    // Reset state: top-left visible pixel.
    check(h_count == 0 && v_count == 0, "reset counts");
    check(hsync == exp_hs(0) && vsync == exp_vs(0) && video_on, "reset outputs");
    @(negedge clk) reset = 1'b0;
    ex = 0; ey = 0; t = 0;
    hs_start = -1; vs_start = -1;
    visible = 1;  // pixel (0,0) is on screen from reset release
    hs_act_q = 1'b0; vs_act_q = 1'b0;
    while (frames_seen < FRAMES) begin
      @(posedge clk);
      #1;
      t++;
      ex++;
      if (ex == H_TOTAL) begin
        ex = 0;
        ey++;
        lines_seen++;
        if (ey == V_TOTAL) begin
          ey = 0;
          check(visible == H_DISP * V_DISP, "visible pixels per frame");
          visible = 0;
          frames_seen++;
        end
      end
      check(h_count == hcount_t'(ex), "h_count");
      check(v_count == vcount_t'(ey), "v_count");
      check(hsync == exp_hs(ex), "hsync");
      check(vsync == exp_vs(ey), "vsync");
      check(video_on == (ex < H_DISP && ey < V_DISP), "video_on");
      // Measurements from the DUT outputs only.
      if (video_on) visible++;
      if ((hsync ^ HS_LOW) && !hs_act_q) begin
        if (hs_start >= 0) check(t - hs_start == H_TOTAL, "HS period");
        hs_start = t;
      end
      if (!(hsync ^ HS_LOW) && hs_act_q) check(t - hs_start == H_PW, "HS pulse width");
      if ((vsync ^ VS_LOW) && !vs_act_q) begin
        if (vs_start >= 0) check(t - vs_start == H_TOTAL * V_TOTAL, "VS period");
        vs_start = t;
      end
      if (!(vsync ^ VS_LOW) && vs_act_q) check(t - vs_start == H_TOTAL * V_PW, "VS pulse width");
      hs_act_q = hsync ^ HS_LOW;
      vs_act_q = vsync ^ VS_LOW;
    end
    done = 1'b1;
  end

endmodule
