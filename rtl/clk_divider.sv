// clk_divider: divides the 100 MHz board clock by four to make the 25 MHz
// VGA pixel clock.
//
// A 2-bit counter (two flip-flops with asynchronous clear) counts up on
// every rising edge of fpga_clk; its most significant bit toggles every two
// input cycles, so it is a square wave at a quarter of the input frequency
// with a 50 % duty cycle. That bit is used directly as the pixel clock,
// as in the original design. While reset is high both flip-flops are
// cleared and clk_out stays low; after reset is released, clk_out first
// rises on the second rising edge of fpga_clk.
//
// The active-high asynchronous reset is this design's choice. On an FPGA
// the output should be routed through a global clock buffer before it
// clocks other logic.
module clk_divider (
  input  logic fpga_clk,  // 100 MHz board clock
  input  logic reset,     // asynchronous, active high
  output logic clk_out    // fpga_clk / 4 (25 MHz)
);

  logic [1:0] temp;

  always_ff @(posedge fpga_clk or posedge reset) begin
    if (reset) temp <= 2'd0;
    else       temp <= temp + 2'd1;
  end

  assign clk_out = temp[1];

endmodule
