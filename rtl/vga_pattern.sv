// vga_pattern: the colour stage of the VGA controller.
//
// It paints every visible pixel in the 12-bit colour set on the switches
// (4 bits each of red, green and blue) and drives black during the porches
// and sync pulses, when a monitor must see no video. The colour and the
// two sync signals are registered together, so the five VGA outputs leave
// this stage from flip-flops and stay aligned with each other: every
// output appears one pixel clock after the timing generator's outputs for
// the same pixel.
//
// Interface: color_in is sampled on each pixel clock; video_on, hsync_in
// and vsync_in come from vga_timing. Reset (asynchronous, active high)
// drives black and the inactive sync levels given by the two *_IDLE
// parameters. Registering the outputs and the reset values are this
// design's choices; painting the whole screen in the switch colour is the
// design's function.
module vga_pattern
  import vga_pkg::*;
#(
  parameter logic HSYNC_IDLE = 1'b1,  // HS level held in reset
  parameter logic VSYNC_IDLE = 1'b1   // VS level held in reset
) (
  input  logic clk,        // pixel clock
  input  logic reset,      // asynchronous, active high
  input  rgb_t color_in,   // colour to paint (from the switches)
  input  logic video_on,   // pixel is visible
  input  logic hsync_in,
  input  logic vsync_in,
  output rgb_t color_out,  // to the resistor DACs
  output logic hsync_out,
  output logic vsync_out
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      color_out <= '0;
      hsync_out <= HSYNC_IDLE;
      vsync_out <= VSYNC_IDLE;
    end else begin
      color_out <= video_on ? color_in : '0;
      hsync_out <= hsync_in;
      vsync_out <= vsync_in;
    end
  end

endmodule
