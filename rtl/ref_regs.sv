// ref_regs: the reference sample registers of the intra predictor.
//
//  * block set (the original architecture's LEFT and UPPER registers): 25 samples
//    p[-1,0..7], p[-1,-1], p[0..15,-1] of the 4x4 or 8x8 block being
//    predicted, loaded from the RAM four samples at a time. It has two
//    banks: one feeds the block being generated (blk_bank), the other is
//    loaded with the next block's neighbours in the meantime. The second
//    bank is this design's own addition;
//  * filtered set: the same 25 positions after the Intra8x8 prefilter,
//    written by the prediction core in two passes of 16 lanes;
//  * macroblock sets for Y, Cb and Cr: left column, corner and upper row of
//    the current macroblock, used by the 16x16, chroma and plane modes;
//  * one corner register per colour component. It keeps p[-1,-1] of the next
//    macroblock, which the picture-line RAM loses when the reconstructed
//    bottom row of the current macroblock overwrites it.
//
// Two capture ports (one per RAM port) write a RAM word into a set as an
// upper word, a left word (reversed into the edge layout of intra_pkg) or a
// single corner sample. When upper-right samples are unavailable
// (ur_sub=1) the block set output repeats p[N-1,-1] in their place, N = 4 or
// 8 (n8), as the standard's substitution rule requires. All writes take one
// clock; outputs are the register contents.
module ref_regs
  import intra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  cap_t        cap_a,
  input  word_t       data_a,
  input  cap_t        cap_b,
  input  word_t       data_b,
  input  logic        corner_ld_blk,  // luma corner register -> block set corner
  input  logic        corner_bank,    // block set bank of corner_ld_blk
  input  logic        blk_bank,       // block set bank shown on blk_edge
  input  logic        corner_ld_mb,   // corner registers -> corners of the MB sets
  input  logic        corner_we,      // save a sample into a corner register
  input  logic [1:0]  corner_comp,
  input  pix_t        corner_val,
  input  logic        filt_we,
  input  logic        filt_pass,
  input  blk16_t      filt_data,
  input  logic        ur_sub,
  input  logic        n8,
  output edge_t       blk_edge,
  output edge_t       filt_edge,
  output edge_t       mb_edge_y,
  output edge_t       mb_edge_cb,
  output edge_t       mb_edge_cr
);

  edge_t sets [5];   // 0..3 as above, 4 is the second block set bank
  edge_t filt;
  pix_t  corner_r [3];

  task automatic put(input cap_t c, input word_t w);
    logic [2:0] s;
    s = (c.set == 2'd0 && c.bank) ? 3'd4 : {1'b0, c.set};
    case (c.wk)
      W_UP:     for (int j = 0; j < 4; j++) sets[s][17 + 4 * int'(c.k) + j] <= w[j];
      W_LEFT:   for (int j = 0; j < 4; j++) sets[s][15 - 4 * int'(c.k) - j] <= w[j];
      W_CORNER: sets[s][16] <= w[c.byte_sel];
      default: ;
    endcase
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 5; s++) sets[s] <= '0;
      filt <= '0;
      for (int c = 0; c < 3; c++) corner_r[c] <= '0;
    end else begin
      if (cap_a.valid) put(cap_a, data_a);
      if (cap_b.valid) put(cap_b, data_b);
      if (corner_ld_blk) sets[corner_bank ? 4 : 0][16] <= corner_r[0];
      if (corner_ld_mb) for (int c = 0; c < 3; c++) sets[c + 1][16] <= corner_r[c];
      if (corner_we) corner_r[corner_comp] <= corner_val;
      if (filt_we) begin
        for (int l = 0; l < 16; l++)
          if (8 + 16 * int'(filt_pass) + l <= 32) filt[8 + 16 * int'(filt_pass) + l] <= filt_data[l];
      end
    end
  end

  edge_t blk_raw;
  assign blk_raw = blk_bank ? sets[4] : sets[0];

  always_comb begin
    blk_edge = blk_raw;
    if (ur_sub) begin
      if (n8) for (int x = 8; x < 16; x++) blk_edge[17 + x] = blk_raw[24];
      else    for (int x = 4; x < 8; x++)  blk_edge[17 + x] = blk_raw[20];
    end
  end

  assign filt_edge  = filt;
  assign mb_edge_y  = sets[1];
  assign mb_edge_cb = sets[2];
  assign mb_edge_cr = sets[3];

endmodule
