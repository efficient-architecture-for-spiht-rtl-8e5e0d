// spiht_pkg - types and constants shared by the fixed-order SPIHT encoder.
//
// Coefficients are two's complement words of COEF_W bits; magnitudes are
// unsigned words of the same width (|-2^(COEF_W-1)| still fits). Every word
// the encoder writes to its two output memories carries a tag naming the
// bit plane, the coding unit and the stream (LIP, LIS or LSP) it belongs
// to, so that a decoder can pull the nine interleaved streams apart.
// The 16-bit output word follows the design description; the coefficient
// width, the tag and the limit of four coding units are this design's own
// choices.
package spiht_pkg;

  localparam int COEF_W = 16;   // coefficient width (assumed)
  localparam int WORD_W = 16;   // packed output word width
  localparam int PLANE_W = 4;   // bit-plane index, 0 .. COEF_W-1
  localparam int UNIT_W = 2;    // up to four coding units

  // Largest number of bits one coding unit emits for one 2x2 block in one
  // bit plane, per stream: LIP = significance + sign for 4 coefficients,
  // LIS = D-set and L-set bit for 4 nodes, LSP = one refinement bit each.
  localparam int LIP_MAX = 8;
  localparam int LIS_MAX = 8;
  localparam int LSP_MAX = 4;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic [COEF_W-1:0]        mag_t;
  typedef logic [PLANE_W-1:0]       plane_t;

  typedef enum logic [1:0] {
    STR_LIP = 2'd0,
    STR_LIS = 2'd1,
    STR_LSP = 2'd2
  } stream_e;

  // Per-node tree information written by the maximum magnitude calculator:
  // md = largest magnitude among all descendants D(node),
  // ml = largest magnitude among the descendants below the children L(node).
  typedef struct packed {
    mag_t md;
    mag_t ml;
  } tree_t;

  // Everything a coding unit needs about one 2x2 block (the four children
  // 4p..4p+3 of node p in 1-D order).
  typedef struct packed {
    logic              root;    // block 0: the four tree roots
    coef_t [3:0]       coef;    // the four coefficients
    mag_t  [3:0]       md;      // D-set maxima of the four nodes
    mag_t  [3:0]       ml;      // L-set maxima of the four nodes
    logic  [3:0]       has_d;   // node has children
    logic  [3:0]       has_l;   // node has grandchildren
    mag_t              par_md;  // D-set maximum of the parent p
    mag_t              par_ml;  // L-set maximum of the parent p
  } blk_t;

  typedef struct packed {
    plane_t           plane;
    logic [UNIT_W-1:0] unit;
    stream_e          stream;
  } tag_t;

  typedef struct packed {
    tag_t              tag;
    logic [WORD_W-1:0] data;
  } mem_word_t;

  function automatic mag_t magnitude(coef_t c);
    return c[COEF_W-1] ? mag_t'(-c) : mag_t'(c);
  endfunction

endpackage
