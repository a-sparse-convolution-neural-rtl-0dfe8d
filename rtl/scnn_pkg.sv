// scnn_pkg: types and constants shared by the sparse-convolution accelerator.
//
// The accelerator keeps a point cloud in sparse form: every occupied point has a
// coordinate (X, Y, Z, T) and a feature vector. Coordinates are 8-bit unsigned,
// features and weights 8-bit signed, as the 8-bit PE array implies. The rule book
// ("hopping-index rule book", HIRB) entry pairs an 8-bit kernel index with a
// 16-bit target output address; the 16-bit width of addresses into the index
// memory follows the 16-bit "end" address of the architecture. The coordinate
// width, the accumulator width and the target-address width are this design's
// own choices.
package scnn_pkg;

  localparam int unsigned PE_ROWS = 10;   // PE array rows  = input channels per pass
  localparam int unsigned PE_COLS = 10;   // PE array cols  = output channels per pass
  localparam int unsigned DATA_W  = 8;    // feature / weight width
  localparam int unsigned PROD_W  = 2 * DATA_W;
  localparam int unsigned PSUM_W  = PROD_W + $clog2(PE_ROWS);  // column sum of 10 products
  localparam int unsigned ACC_W   = 24;   // output accumulator width
  localparam int unsigned COORD_W = 8;    // one coordinate axis
  localparam int unsigned DIFF_W  = COORD_W + 1;  // signed coordinate difference
  localparam int unsigned NDIM    = 4;    // X, Y, Z, T
  localparam int unsigned END_W   = 16;   // index-memory address ("end" address)
  localparam int unsigned TGT_W   = 16;   // output point address in a rule
  localparam int unsigned KIDX_W  = 8;    // kernel index into the weight LUT

  typedef logic signed [DATA_W-1:0]  data_t;
  typedef logic signed [PSUM_W-1:0]  psum_t;
  typedef logic signed [ACC_W-1:0]   acc_t;
  typedef logic        [COORD_W-1:0] coord_t;
  typedef logic signed [DIFF_W-1:0]  diff_t;

  // Axis numbering used everywhere: 0 = X, 1 = Y, 2 = Z, 3 = T.
  localparam int unsigned AX_X = 0, AX_Y = 1, AX_Z = 2, AX_T = 3;
  typedef coord_t [NDIM-1:0] point_t;

  typedef data_t [PE_ROWS-1:0]              fvec_t;   // one input feature vector
  typedef data_t [PE_ROWS-1:0][PE_COLS-1:0] wmat_t;   // weights of one kernel offset
  typedef psum_t [PE_COLS-1:0]              psvec_t;  // column sums of the array
  typedef acc_t  [PE_COLS-1:0]              avec_t;   // accumulated output vector

  // One rule of the hopping-index rule book.
  typedef struct packed {
    logic [KIDX_W-1:0] kidx;    // which kernel offset (weight LUT row)
    logic [TGT_W-1:0]  target;  // which output point receives the product
  } rule_t;

  typedef enum logic {
    MODE_MAC  = 1'b0,   // sparse convolution: multiply-accumulate
    MODE_DIST = 1'b1    // coordinate management: coordinate differences
  } pe_mode_e;

endpackage
