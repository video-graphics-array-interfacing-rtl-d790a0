// tb_clk_divider: checks the divide-by-four pixel clock generator.
//
// A 100 MHz clock drives the divider. The testbench keeps its own count of
// input edges since reset and expects the output to be high for input
// edges 2 and 3 of every group of four (a 25 MHz, 50 % square wave). It
// also measures the output period in input cycles, checks that a reset in
// the middle of operation forces the output low at once, and that the
// output stays low while reset is held.
`timescale 1ns/1ps
module tb_clk_divider;

  logic fpga_clk = 1'b0;
  logic reset    = 1'b1;
  logic clk_out;

  int checks = 0, failures = 0;

  clk_divider dut (.fpga_clk(fpga_clk), .reset(reset), .clk_out(clk_out));

  always #5 fpga_clk = ~fpga_clk;  // 100 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Watchdog.
  initial begin
    #100us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  edges;
  int  last_rise, rises;
  bit  prev_out;

  initial begin
    repeat (3) @(posedge fpga_clk);
    #1 check(clk_out == 1'b0, "low during reset");
    reset = 1'b0;
    edges = 0;
    rises = 0;
    last_rise = -1;
    prev_out = 1'b0;
    repeat (400) begin
      @(posedge fpga_clk);
      edges++;
      #1;
      check(clk_out == ((edges % 4) >= 2), "output level");
      if (clk_out && !prev_out) begin
        if (last_rise >= 0) check(edges - last_rise == 4, "period of 4 input cycles");
        last_rise = edges;
        rises++;
      end
      prev_out = clk_out;
    end
    check(rises == 100, "100 output cycles in 400 input cycles");

    // Asynchronous reset while the output is high.
    while (!clk_out) @(posedge fpga_clk);
    #2 reset = 1'b1;
    #1 check(clk_out == 1'b0, "asynchronous clear");
    repeat (5) begin
      @(posedge fpga_clk);
      #1 check(clk_out == 1'b0, "held low in reset");
    end
    @(negedge fpga_clk) reset = 1'b0;
    edges = 0;
    repeat (8) begin
      @(posedge fpga_clk);
      edges++;
      #1 check(clk_out == ((edges % 4) >= 2), "restart after reset");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
