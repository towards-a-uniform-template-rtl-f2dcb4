// Shared types and constants of the template-based Winograd F(2x2,3x3) /
// F(2x2x2,3x3x3) CNN accelerator.
//
// Data and weights are 16-bit signed fixed point. The input transform (TX)
// grows a value by one bit per dimension, the filter transform (TW) by two
// bits per dimension (its halves are kept as an extra fractional bit, so no
// precision is lost), and the output transform (TM) by two bits per dimension.
// The widths below follow from that for the 3D case, which also covers 2D.
// Everything after the PE's output transform is carried at ACC_W bits.
package wino_pkg;
  localparam int unsigned DATA_W = 16;            // feature map / weight width
  localparam int unsigned XT_W   = DATA_W + 3;    // transformed input, 3D
  localparam int unsigned WT_W   = DATA_W + 6;    // transformed filter (x2 per dim), 3D
  localparam int unsigned P_W    = XT_W + WT_W;   // element-wise product
  localparam int unsigned ACC_W  = 48;            // PE output, accumulators

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [XT_W-1:0]   xt_t;
  typedef logic signed [WT_W-1:0]   wt_t;
  typedef logic signed [P_W-1:0]    prod_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Winograd tile geometry for m = 2, r = 3
  localparam int unsigned TILE_IN  = 4;  // input tile edge
  localparam int unsigned TILE_K   = 3;  // filter edge
  localparam int unsigned TILE_OUT = 2;  // output tile edge

  // One input window (4x4x4; a 2D tile uses plane 0) and one filter (3x3x3).
  typedef data_t in_tile_t  [TILE_IN][TILE_IN][TILE_IN];   // [z][row][col]
  typedef data_t w_tile_t   [TILE_K][TILE_K][TILE_K];      // [z][row][col]
  typedef acc_t  plane2_t   [TILE_OUT][TILE_OUT];          // [row][col]
  typedef acc_t  acc_tile_t [TILE_OUT][TILE_OUT][TILE_OUT]; // [z][row][col]
  typedef data_t out_tile_t [TILE_OUT][TILE_OUT][TILE_OUT]; // [z][row][col]

  // Per-layer configuration of one computation-engine pass.
  typedef struct packed {
    logic       mode3d;      // 1: 3D CNN (F(2^3,3^3)), 0: 2D CNN (F(2^2,3^2))
    logic       first_group; // first input-channel group: start accumulation
    logic       last_group;  // last input-channel group: produce final outputs
    logic       relu_en;     // apply ReLU
    logic       pool_en;     // max-pool the output tile (0: bypass)
    logic       pool_depth;  // 3D only: pool also across the two depth planes
    logic [5:0] out_shift;   // fixed-point rescale: arithmetic right shift
  } layer_cfg_t;
endpackage
