// intra_pkg: types and constants shared by the H.264/AVC High Profile intra
// predictor.
//
// Samples are 8 bits (High Profile, 8-bit video). A 4x4 block of predicted
// samples travels as one 128-bit word, sample (x,y) at index 4*y+x.
//
// Neighbour ("edge") samples of a block use one 33-entry layout everywhere:
//   index 15-y : p[-1,y]  (left column, y = 0..15)
//   index 16   : p[-1,-1] (corner)
//   index 17+x : p[x,-1]  (upper row and upper-right, x = 0..15)
// A 4x4 block uses indices 12..24, an 8x8 block 8..32 (the 25 LEFT/UPPER
// samples), a 16x16 block 1..32 and an 8x8 chroma block 8..24.
//
// RAM map (32-bit words, four samples each): picture line of component c at
// c*512 (luma word 4*mb_x+k, chroma word 2*mb_x+k), in-macroblock edges of
// each reconstructed 4x4 block at INNER_BASE, left column of the current
// macroblock at LEFT_BASE. The map is this design's own choice; the 6 KB line
// plus 2 KB split follows the original architecture.
package intra_pkg;

  typedef logic [7:0]        pix_t;
  typedef logic [15:0][7:0]  blk16_t;   // 4x4 block, sample (x,y) at 4*y+x
  typedef logic [32:0][7:0]  edge_t;    // neighbour layout described above
  typedef logic [3:0][7:0]   word_t;    // one RAM word, four samples

  // block kinds of the schedule
  typedef enum logic [1:0] {K_B4 = 2'd0, K_B8 = 2'd1, K_L16 = 2'd2, K_C = 2'd3} kind_e;

  // Prediction modes. 0..8 are the Intra4x4/Intra8x8 mode numbers of the
  // standard; V, H and DC are shared by 16x16 luma and chroma; M_PLANE is the
  // plane mode; M_FILT is the 8x8 reference prefilter pass of the core.
  typedef enum logic [3:0] {
    M_V = 4'd0, M_H = 4'd1, M_DC = 4'd2, M_DDL = 4'd3, M_DDR = 4'd4,
    M_VR = 4'd5, M_HD = 4'd6, M_VL = 4'd7, M_HU = 4'd8, M_PLANE = 4'd9,
    M_FILT = 4'd10
  } mode_e;

  // Description of each predicted 4x4 block leaving the predictor.
  typedef struct packed {
    kind_e       kind;
    mode_e       mode;
    logic [1:0]  comp;   // 0 Y, 1 Cb, 2 Cr
    logic [1:0]  bx;     // 4x4 column inside the macroblock (component grid)
    logic [1:0]  by;     // 4x4 row
    logic [2:0]  qp;     // QP index (4x4 and 8x8 only)
    logic        last;   // last 4x4 of this block for this QP and kind
  } pred_info_t;

  // Destination of a word read from the RAM into the reference registers:
  // register set (0 block LEFT/UPPER, in bank 0 or 1, 1 luma MB, 2 Cb MB,
  // 3 Cr MB), upper
  // word k (p[4k..4k+3,-1]), left word k (p[-1,4k..4k+3]) or the corner,
  // taken from sample byte_sel of the word.
  typedef enum logic [1:0] {W_UP = 2'd0, W_LEFT = 2'd1, W_CORNER = 2'd2} wkind_e;
  typedef struct packed {
    logic        valid;
    logic        bank;       // block set bank (set 0 only)
    logic [1:0]  set;
    wkind_e      wk;
    logic [1:0]  k;
    logic [1:0]  byte_sel;
  } cap_t;

  localparam int unsigned MAX_QP     = 7;      // QPs whose reconstructions are kept
  localparam int unsigned RAM_WORDS  = 2048;   // 8 KB
  localparam int unsigned LINE_WORDS = 512;    // 2 KB per colour component
  localparam int unsigned INNER_BASE = 1536;
  localparam int unsigned LEFT_BASE  = 1984;

  // luma4x4BlkIdx (zig-zag) of the 4x4 block at column bx, row by
  function automatic logic [3:0] zz(input logic [1:0] bx, input logic [1:0] by);
    return {by[1], bx[1], by[0], bx[0]};
  endfunction

  function automatic logic [1:0] zz_x(input logic [3:0] n);
    return {n[2], n[0]};
  endfunction

  function automatic logic [1:0] zz_y(input logic [3:0] n);
    return {n[3], n[1]};
  endfunction

  // word address of the bottom row (side=0) or right column (side=1) of a
  // reconstructed 4x4 block: size s (0: 4x4 chain, 1: 8x8 chain), QP index q
  function automatic logic [10:0] inner_addr(input logic s, input logic [2:0] q,
                                             input logic [3:0] blk, input logic side);
    return 11'(INNER_BASE + (((32'(s) * MAX_QP + 32'(q)) * 16 + 32'(blk)) * 2) + 32'(side));
  endfunction

  function automatic pix_t clip1(input logic signed [19:0] v);
    if (v < 0) return 8'd0;
    else if (v > 255) return 8'd255;
    else return v[7:0];
  endfunction

endpackage
