// meh_pkg: constants and types shared by the motion estimation core.
//
// The core searches a 16x16 macroblock in two layers: a 2:1 x 2:1 decimated
// "upper layer" (8x8 block, +-64 x +-32 upper-layer pixels, i.e. +-128 x +-64
// full-resolution pixels) and the full-resolution "lower layer" (+-8 x +-8
// full search followed by a half-pel refinement). Pixels are 8-bit luma.
// Vectors are carried as a pair of signed 8-bit components.
package meh_pkg;

  localparam int PIX_W   = 8;    // luma sample width
  localparam int BUS_W   = 128;  // memory bus width (16 pixels)
  localparam int BUS_PIX = BUS_W / PIX_W;

  // Lower layer (MEH1 / MEHH)
  localparam int MB      = 16;            // macroblock size = PE array dimension N
  localparam int FS_R    = 8;             // full-search range +-8 x +-8
  localparam int WIN1    = MB + 2*FS_R;   // 32x32 search window in SW1
  localparam int SAD1_W  = 16;            // 256 * 255 < 2^16

  // Upper layer (MEH2)
  localparam int UB      = 8;             // 8x8 decimated block
  localparam int UR_X    = 64;            // +-64 upper-layer pixels = +-128 full-res
  localparam int UR_Y    = 32;            // +-32 upper-layer pixels = +-64 full-res
  localparam int SAD2_W  = 14;            // 64 * 255 < 2^14

  typedef logic [PIX_W-1:0] pix_t;

  typedef struct packed {
    logic signed [7:0] x;
    logic signed [7:0] y;
  } mv_t;

  // Targets of a memory-bus write
  typedef enum logic [1:0] {
    SEL_SW2 = 2'd0,   // upper-layer search window
    SEL_TB2 = 2'd1,   // upper-layer template
    SEL_SW1 = 2'd2,   // lower-layer search window (two buffers)
    SEL_TB1 = 2'd3    // lower-layer template (two buffers)
  } bus_sel_e;

  // Ring movement of the MEH1 systolic array
  typedef enum logic [1:0] {
    RING_HOLD  = 2'd0,
    RING_LEFT  = 2'd1,   // each cell takes its right neighbour: horizontal offset +1
    RING_RIGHT = 2'd2,   // each cell takes its left neighbour:  horizontal offset -1
    RING_UP    = 2'd3    // each row takes the row below, new row enters at the bottom
  } ring_op_e;

  // Phases of the MEH1 full search
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,   // waiting for start
    PH_INIT  = 3'd1,   // template and first 16 window rows shift in
    PH_CALC  = 3'd2,   // ring rotates, one candidate SAD per clock
    PH_INPUT = 3'd3,   // rows shift up, next window row enters at the bottom
    PH_DRAIN = 3'd4    // last sums leave the adder tree
  } fs_phase_e;

endpackage
