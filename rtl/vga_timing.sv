// vga_timing: the raster timing generator of the VGA controller.
//
// Two counters run continuously on the pixel clock. The horizontal counter
// h_count steps once per pixel clock and wraps after the last pixel of the
// back porch; the vertical counter v_count steps once per line, when the
// horizontal counter wraps, and wraps after the last line of the vertical
// back porch. Comparing the counts with the region ends of the selected
// mode (vga_pkg::timing_t) gives the horizontal and vertical sync pulses
// and the display enable, which is high only while both counters are in
// their visible region. Together the two counts are the (column, row)
// address of the current pixel, usable as an address into a frame buffer.
//
// Counting starts at the first visible pixel, so a line is: display,
// front porch, sync pulse, back porch. The sync and enable outputs are
// registered and computed from the next counter values, so all outputs
// of one clock describe the same pixel: at the clock edge where h_count
// becomes N, hsync/vsync/video_on change to their values for pixel N.
// For the default 640x480 mode at 25 MHz, a line is 800 clocks (32 us)
// with a 96-clock sync pulse, and a frame is 521 lines = 416,800 clocks
// (16.67 ms, 59.98 Hz) with a 2-line sync pulse.
//
// Reset (asynchronous, active high) puts both counters at 0, i.e. the
// top-left visible pixel. Advancing the row at the end of each line, the
// region order and the reset state are this design's choices.
module vga_timing
  import vga_pkg::*;
#(
  parameter timing_t TIMING = VGA_640X480
) (
  input  logic    clk,       // pixel clock
  input  logic    reset,     // asynchronous, active high
  output hcount_t h_count,   // current column (0 = first visible pixel)
  output vcount_t v_count,   // current row (0 = first visible line)
  output logic    hsync,     // horizontal sync, polarity from TIMING
  output logic    vsync,     // vertical sync, polarity from TIMING
  output logic    video_on   // high while (h_count, v_count) is visible
);

  hcount_t h_next;
  vcount_t v_next;
  logic    line_end;

  // Region decoders, shared by the reset value and the running update.
  function automatic logic hsync_of(hcount_t h);
    logic pulse;
    pulse = (h > TIMING.h_fp_end) && (h <= TIMING.h_sync_end);
    return pulse ^ TIMING.h_sync_low;
  endfunction

  function automatic logic vsync_of(vcount_t v);
    logic pulse;
    pulse = (v > TIMING.v_fp_end) && (v <= TIMING.v_sync_end);
    return pulse ^ TIMING.v_sync_low;
  endfunction

  function automatic logic visible_of(hcount_t h, vcount_t v);
    return (h <= TIMING.h_active_end) && (v <= TIMING.v_active_end);
  endfunction

  always_comb begin
    line_end = (h_count == TIMING.h_bp_end);
    h_next   = line_end ? '0 : h_count + hcount_t'(1);
    if (!line_end)                       v_next = v_count;
    else if (v_count == TIMING.v_bp_end) v_next = '0;
    else                                 v_next = v_count + vcount_t'(1);
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      h_count  <= '0;
      v_count  <= '0;
      hsync    <= hsync_of('0);
      vsync    <= vsync_of('0);
      video_on <= visible_of('0, '0);
    end else begin
      h_count  <= h_next;
      v_count  <= v_next;
      hsync    <= hsync_of(h_next);
      vsync    <= vsync_of(v_next);
      video_on <= visible_of(h_next, v_next);
    end
  end

  // The counters never leave the frame.
  property p_in_frame;
    @(posedge clk) disable iff (reset)
      (h_count <= TIMING.h_bp_end) && (v_count <= TIMING.v_bp_end);
  endproperty
  a_in_frame: assert property (p_in_frame);

endmodule
