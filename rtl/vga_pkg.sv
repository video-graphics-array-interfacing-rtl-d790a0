// vga_pkg: types and constants shared by the VGA controller.
//
// A video mode is described by where each region of a line (and of a frame)
// ends, counted from the first visible pixel (or line) at count 0. A line
// therefore runs: visible pixels 0..h_active_end, front porch up to
// h_fp_end, sync pulse up to h_sync_end, back porch up to h_bp_end, and
// then wraps to 0. The same holds for the lines of a frame. Storing the
// last count of each region, rather than region lengths, is how the
// 800x600 and 1280x1024 constants of this design are specified; the
// 640x480 numbers are derived from its standard region lengths
// (640/16/96/48 pixels and 480/10/2/29 lines at a 25 MHz pixel clock).
//
// Sync polarity is not part of the region constants: 640x480 uses
// negative (active-low) pulses, 800x600 and 1280x1024 positive ones, as
// in the common VESA definitions of these modes.
//
// Counter widths: 12 bits horizontally and 11 bits vertically, the widths
// of the 800x600 and 1280x1024 constants. All three modes fit.
package vga_pkg;

  localparam int unsigned H_W = 12;  // horizontal counter width
  localparam int unsigned V_W = 11;  // vertical counter width

  typedef logic [H_W-1:0] hcount_t;
  typedef logic [V_W-1:0] vcount_t;

  // Last count of each region of a line and of a frame, plus sync polarity.
  typedef struct packed {
    hcount_t h_active_end;  // last visible pixel
    hcount_t h_fp_end;      // last pixel of the front porch
    hcount_t h_sync_end;    // last pixel of the sync pulse
    hcount_t h_bp_end;      // last pixel of the back porch (line length - 1)
    vcount_t v_active_end;  // last visible line
    vcount_t v_fp_end;      // last line of the front porch
    vcount_t v_sync_end;    // last line of the sync pulse
    vcount_t v_bp_end;      // last line of the back porch (frame length - 1)
    logic    h_sync_low;    // 1: HS is driven low during its pulse
    logic    v_sync_low;    // 1: VS is driven low during its pulse
  } timing_t;

  // 640x480, 60 Hz, 25 MHz pixel clock: 800 clocks per line, 521 lines.
  localparam timing_t VGA_640X480 = '{
    h_active_end: 12'd639,  h_fp_end: 12'd655,
    h_sync_end:   12'd751,  h_bp_end: 12'd799,
    v_active_end: 11'd479,  v_fp_end: 11'd489,
    v_sync_end:   11'd491,  v_bp_end: 11'd520,
    h_sync_low:   1'b1,     v_sync_low: 1'b1
  };

  // 800x600 at a 40 MHz pixel clock: 1056 clocks per line, 628 lines.
  localparam timing_t SVGA_800X600 = '{
    h_active_end: 12'b001100011111, h_fp_end: 12'b001101000111,
    h_sync_end:   12'b001111000111, h_bp_end: 12'b010000011111,
    v_active_end: 11'b01001010111,  v_fp_end: 11'b01001011000,
    v_sync_end:   11'b01001011100,  v_bp_end: 11'b01001110011,
    h_sync_low:   1'b0,             v_sync_low: 1'b0
  };

  // 1280x1024 at a 110 MHz pixel clock: 1708 clocks per line, 1074 lines.
  localparam timing_t SXGA_1280X1024 = '{
    h_active_end: 12'b010011111111, h_fp_end: 12'b010100110011,
    h_sync_end:   12'b010110101011, h_bp_end: 12'b011010101011,
    v_active_end: 11'b01111111111,  v_fp_end: 11'b10000000010,
    v_sync_end:   11'b10000000111,  v_bp_end: 11'b10000110001,
    h_sync_low:   1'b0,             v_sync_low: 1'b0
  };

  // One pixel colour, 4 bits per channel (the 12-bit colour code).
  typedef struct packed {
    logic [3:0] r;
    logic [3:0] g;
    logic [3:0] b;
  } rgb_t;

endpackage
