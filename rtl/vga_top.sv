// vga_top: FPGA top level of the switch-driven VGA controller.
//
// The whole 640x480 screen is painted in the colour set on twelve slide
// switches, 4 bits each of red, green and blue, giving 4096 colours. The
// 100 MHz board clock is divided by four in clk_divider to get the 25 MHz
// pixel clock; vga_timing counts pixels and lines and decodes the sync
// pulses and the display enable for 640x480 at 60 Hz; vga_pattern gates
// the switch colour with the display enable and registers it together
// with the two sync signals.
//
// Pins: fpga_clk (100 MHz), reset (active high, asynchronous), the
// switches r1_sw..r4_sw, g1_sw..g4_sw, b1_sw..b4_sw, and the VGA outputs
// r1..r4, g1..g4, b1..b4, h_sync, v_sync. Within each colour, index 1 is
// the most significant bit: the switch word reads r1r2r3r4_g1g2g3g4_b1b2b3b4
// and r1 drives the largest-current (510 ohm) resistor of the red DAC.
// Each output pin copies the switch of the same name during the display
// time and is 0 during blanking.
//
// Timing: outputs change on the rising edge of the 25 MHz pixel clock and
// run one pixel clock behind the counters. Both syncs are active low
// (negative polarity for 640x480). The switches are sampled directly
// by the pixel clock; they are expected to change slowly.
module vga_top
  import vga_pkg::*;
(
  input  logic fpga_clk,
  input  logic reset,
  input  logic r1_sw, r2_sw, r3_sw, r4_sw,
  input  logic g1_sw, g2_sw, g3_sw, g4_sw,
  input  logic b1_sw, b2_sw, b3_sw, b4_sw,
  output logic r1, r2, r3, r4,
  output logic g1, g2, g3, g4,
  output logic b1, b2, b3, b4,
  output logic h_sync,
  output logic v_sync
);

  localparam timing_t MODE = VGA_640X480;

  logic    pix_clk;
  hcount_t h_count;
  vcount_t v_count;
  logic    hsync, vsync, video_on;
  rgb_t    sw_color, color;

  clk_divider M1 (
    .fpga_clk (fpga_clk),
    .reset    (reset),
    .clk_out  (pix_clk)
  );

  vga_timing #(.TIMING(MODE)) u_timing (
    .clk      (pix_clk),
    .reset    (reset),
    .h_count  (h_count),
    .v_count  (v_count),
    .hsync    (hsync),
    .vsync    (vsync),
    .video_on (video_on)
  );

  assign sw_color = '{r: {r1_sw, r2_sw, r3_sw, r4_sw},
                      g: {g1_sw, g2_sw, g3_sw, g4_sw},
                      b: {b1_sw, b2_sw, b3_sw, b4_sw}};

  vga_pattern #(
    .HSYNC_IDLE (MODE.h_sync_low),
    .VSYNC_IDLE (MODE.v_sync_low)
  ) u_pattern (
    .clk       (pix_clk),
    .reset     (reset),
    .color_in  (sw_color),
    .video_on  (video_on),
    .hsync_in  (hsync),
    .vsync_in  (vsync),
    .color_out (color),
    .hsync_out (h_sync),
    .vsync_out (v_sync)
  );

  assign {r1, r2, r3, r4} = color.r;
  assign {g1, g2, g3, g4} = color.g;
  assign {b1, b2, b3, b4} = color.b;

  // The pixel address is not needed to paint a solid colour.
  logic unused_address;
  assign unused_address = ^{h_count, v_count};

endmodule
