// tb_vga_pattern: checks the colour stage with random stimulus.
//
// Each pixel clock the testbench applies a random 12-bit colour, display
// enable and sync levels, and expects one clock later the colour when the
// enable was high, black when it was low, and the sync levels unchanged.
// It also checks the reset values (black, syncs at their idle level) and
// counts how many visible and blanked pixels were exercised.
`timescale 1ns/1ps
module tb_vga_pattern;
  import vga_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  rgb_t color_in, color_out;
  logic video_on, hsync_in, vsync_in, hsync_out, vsync_out;

  int checks = 0, failures = 0;
  int n_visible = 0, n_blank = 0;

  vga_pattern dut (
    .clk(clk), .reset(reset), .color_in(color_in), .video_on(video_on),
    .hsync_in(hsync_in), .vsync_in(vsync_in), .color_out(color_out),
    .hsync_out(hsync_out), .vsync_out(vsync_out)
  );

  always #20ns clk = ~clk;  // 25 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1ms;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [11:0] exp_c;
    logic        exp_h, exp_v;
    color_in = 12'hABC; video_on = 1'b1; hsync_in = 1'b0; vsync_in = 1'b0;
    repeat (2) @(posedge clk);
    #1 check(color_out == '0 && hsync_out && vsync_out, "reset values");
    @(negedge clk) reset = 1'b0;
    repeat (5000) begin
      @(negedge clk);
      color_in = rgb_t'($urandom_range(0, 4095));
      video_on = 1'($urandom);
      hsync_in = 1'($urandom);
      vsync_in = 1'($urandom);
      exp_c = video_on ? 12'(color_in) : 12'h000;
      exp_h = hsync_in;
      exp_v = vsync_in;
      if (video_on) n_visible++; else n_blank++;
      @(posedge clk);
      #1;
      check(12'(color_out) == exp_c, "colour");
      check(hsync_out == exp_h && vsync_out == exp_v, "sync");
    end
    // The eight colours of the 12-bit colour code table, shown and blanked.
    foreach (colors[i]) begin
      @(negedge clk);
      color_in = colors[i]; video_on = 1'b1;
      @(posedge clk) #1 check(color_out == colors[i], "table colour shown");
      @(negedge clk) video_on = 1'b0;
      @(posedge clk) #1 check(color_out == '0, "table colour blanked");
    end
    check(n_visible > 100 && n_blank > 100, "both cases exercised");
    $display("visible=%0d blank=%0d", n_visible, n_blank);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Black, blue, green, cyan, red, magenta, yellow, white.
  rgb_t colors [8] = '{12'h000, 12'h00F, 12'h0F0, 12'h0FF,
                       12'hF00, 12'hF0F, 12'hFF0, 12'hFFF};

endmodule
