// tld_pkg: constants and types shared by the random-forest detector.
//
// The detector keeps a whole integral image of the frame on chip, split
// over TLD_NBLK memory blocks. Frame size, integral pixel depth (27 bits for a
// 640x480 frame of 8-bit pixels), the 32 blocks, the 16 parallel queries
// and the 2^14-entry leaf posterior table are the published configuration.
// The sideband tag that travels with each query batch and the coefficient
// and scale-table formats are choices of this design.
package tld_pkg;

  // Published configuration
  localparam int unsigned TLD_IMG_W      = 640;   // frame width  (pixels)
  localparam int unsigned TLD_IMG_H      = 480;   // frame height (pixels)
  localparam int unsigned TLD_PIX_W      = 27;    // integral image word width
  localparam int unsigned TLD_NBLK       = 32;    // distributed memory blocks
  localparam int unsigned TLD_NQ         = 16;    // parallel queries per iteration
  localparam int unsigned TLD_NRECT      = 4;     // rectangles per iteration (TLD_NQ/4 corners)
  localparam int unsigned TLD_LEAF_W     = 14;    // leaf index width (2^14 x 1 bit table)
  localparam int unsigned TLD_FEAT_BITS  = 2;     // bits produced per feature
  localparam int unsigned TLD_NFEAT      = TLD_LEAF_W / TLD_FEAT_BITS; // features per tree (7)
  localparam int unsigned TLD_MAX_TREES  = 15;    // largest forest supported

  // Design choices
  localparam int unsigned COEF_W     = 8;     // coefficient: unsigned Q0.8 fraction of window size
  localparam int unsigned TLD_MAX_SCALES = 16;    // scale table entries
  localparam int unsigned TLD_RES_W      = 32;    // result word returned to the host

  localparam int unsigned COORD_W    = 11;    // pixel coordinate / window size width

  // One scale of the sliding-window scan: window size and step.
  typedef struct packed {
    logic [COORD_W-1:0] ww;   // window width  (pixels)
    logic [COORD_W-1:0] wh;   // window height (pixels)
    logic [7:0]         sx;   // horizontal step (pixels, >= 1)
    logic [7:0]         sy;   // vertical step   (pixels, >= 1)
  } scale_t;

  // Position of a batch in the detection loop, carried with the batch from
  // the loop decoder to the computation module.
  typedef struct packed {
    logic last_feat;   // last feature of a tree: leaf index is complete
    logic last_tree;   // last tree of a window: window vote is complete
    logic last_win;    // last window of the frame: result is complete
  } batch_tag_t;

  // Sub-rectangles of one feature (OpenTLD 2-bit binary pattern):
  // left/right halves and top/bottom halves of the feature box.
  typedef enum logic [1:0] {
    R_LEFT   = 2'd0,
    R_RIGHT  = 2'd1,
    R_TOP    = 2'd2,
    R_BOTTOM = 2'd3
  } rect_e;

  // Corner order within a rectangle; sum = A - B - C + D
  //   A = I(x+w-1, y+h-1)  B = I(x-1, y+h-1)
  //   C = I(x+w-1, y-1)    D = I(x-1, y-1)
  localparam int unsigned CORNER_A = 0;
  localparam int unsigned CORNER_B = 1;
  localparam int unsigned CORNER_C = 2;
  localparam int unsigned CORNER_D = 3;

endpackage
