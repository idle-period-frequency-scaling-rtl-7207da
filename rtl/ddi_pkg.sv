// ddi_pkg: types and constants shared by the display driver core.
//
// The core refreshes a 1440 x 3200 panel from a 169.9 MHz internal clock and
// divides that clock by two during the vertical porch (idle) lines of frames
// that carry no new image. The resolution, the clock frequency and the divide
// ratio of two come from the published design; the pixel format, the number of
// pixels per internal bus word and the horizontal porch lengths are this
// design's own choices, picked so that one 60 Hz frame of 3216 lines fits the
// 169.9 MHz clock (880 clocks per line, 60.03 Hz).
package ddi_pkg;

  // Panel resolution (published).
  localparam int unsigned HSIZE_DEF   = 1440;
  localparam int unsigned VSIZE_DEF   = 3200;
  // Pixel and bus word format (own choice): 24-bit RGB, two pixels per word.
  localparam int unsigned PIX_W_DEF   = 24;
  localparam int unsigned PPW_DEF     = 2;
  // Horizontal back/front porch in source-clock periods (own choice).
  localparam int unsigned HBP_DEF     = 80;
  localparam int unsigned HFP_DEF     = 80;
  // Width of the vertical line counters: a 1 Hz frame has 192960 lines.
  localparam int unsigned V_W_DEF     = 18;
  // Largest dividing ratio used in the porch (published limit).
  localparam int unsigned PORCH_DIV   = 2;

  // Dividing ratio carried from the frequency scaling block to the clock
  // generator. Only 1 and 2 are legal.
  typedef logic [1:0] div_ratio_t;
  localparam div_ratio_t DIV1 = 2'd1;
  localparam div_ratio_t DIV2 = 2'd2;

  // Vertical timing of one frame, in lines. Frame rate is set by vfp.
  typedef struct packed {
    logic [V_W_DEF-1:0] vbp;   // vertical back porch lines
    logic [V_W_DEF-1:0] vact;  // active (image) lines, at most VSIZE
    logic [V_W_DEF-1:0] vfp;   // vertical front porch lines
  } vtiming_t;

endpackage
