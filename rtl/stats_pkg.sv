// Shared sizes of the two-dimensional mean / standard deviation module.
// A frame is N x N pixels arriving INPUT_W pixels per AXI4-Stream beat, row by
// row. The accumulator widths are those of the reference algorithm (30 bits
// for the intensity sum, 38 for the first moments, 45 for the second moments);
// they hold a 512 x 512 frame of 8-bit pixels. The pixel width is this
// design's choice.
package stats_pkg;
  localparam int N        = 512;
  localparam int INPUT_W  = 4;
  localparam int PIXEL_W  = 8;
  localparam int POS_W    = 10;
  localparam int SUM_W    = 30;
  localparam int SX_W     = 38;
  localparam int SX2_W    = 45;
  localparam int RES_W    = 16;
  localparam int VAR_W    = 18;

  // Totals of one frame, handed from the accumulator to the post-processing.
  typedef struct packed {
    logic [SUM_W-1:0] tot;
    logic [SX_W-1:0]  sx;
    logic [SX_W-1:0]  sy;
    logic [SX2_W-1:0] sx2;
    logic [SX2_W-1:0] sy2;
  } frame_totals_t;
endpackage
