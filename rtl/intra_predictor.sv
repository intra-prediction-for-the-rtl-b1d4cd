// intra_predictor: H.264/AVC High Profile intra predictor for a hardware
// encoder, 4:2:0, 8-bit samples.
//
// For every macroblock it produces the predictions of all intra modes:
// nine Intra4x4 modes for the 16 4x4 blocks, nine Intra8x8 modes for the
// four 8x8 blocks (with reference prefiltering), V/H/DC/plane for 16x16
// luma and for both chroma components. 4x4 and 8x8 predictions are made
// once per QP index (up to 7), each from the reconstruction of the same QP,
// so the encoder can choose the best (mode, QP) pair by rate-distortion.
// One 4x4 block of 16 samples leaves per clock.
//
// Structure: intra_ctrl (main FSM and block schedule), ref_ram (8 KB
// dual-port RAM: picture line and reconstructed edges), ref_regs (LEFT/UPPER,
// filtered, macroblock and corner registers), pred_core (16-lane
// prediction core), dc_unit (DC sums) and plane_gen (plane parameters and
// seeds).
//
// Protocol, per macroblock:
//  1. while fin_ready, pulse mb_start with mb_x and the availability of the
//     left, upper, upper-left and upper-right macroblocks;
//  2. predictions appear on pred_valid/pred_info/pred_samples, one 4x4 per
//     cycle, registered; pred_info.last marks the last output of a block;
//  3. after the last prediction of a 4x4 (8x8) luma block for QP q, the
//     reconstruction loop returns its reconstructed 4x4 blocks on rec_*
//     (one beat for 4x4, four beats, one per quarter, for 8x8), at any time
//     and with any delay; later blocks wait for them;
//  4. after mb_done, the encoder sends the finally chosen reconstruction of
//     the macroblock: one fin_valid pulse per component with its bottom row
//     and right column (chroma uses the first 8 samples), each while
//     fin_ready, before the next mb_start.
module intra_predictor
  import intra_pkg::*;
#(
  parameter int unsigned PIC_WIDTH_MB = 120,     // 1920 samples, 1080p
  parameter int unsigned MBW = $clog2(PIC_WIDTH_MB + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mb_start,
  input  logic [MBW-1:0]   mb_x,
  input  logic             avail_left,
  input  logic             avail_top,
  input  logic             avail_topleft,
  input  logic             avail_topright,
  input  logic [2:0]       cfg_nqp,
  input  logic             cfg_en4,
  input  logic             cfg_en8,
  input  logic             cfg_en_plane,
  output logic             mb_busy,
  output logic             mb_done,
  output logic             pred_valid,
  output pred_info_t       pred_info,
  output blk16_t           pred_samples,
  input  logic             rec_valid,
  input  logic             rec_is8,
  input  logic [2:0]       rec_qp,
  input  logic [3:0]       rec_blk,
  input  blk16_t           rec_samples,
  input  logic             fin_valid,
  input  logic [1:0]       fin_comp,
  input  logic [15:0][7:0] fin_bottom,
  input  logic [15:0][7:0] fin_right,
  output logic             fin_ready
);

  initial begin
    assert (PIC_WIDTH_MB * 4 <= LINE_WORDS)
      else $fatal(1, "intra_predictor: picture line does not fit the RAM");
  end

  logic        ra_en, ra_we, rb_en, rb_we;
  logic [10:0] ra_addr, rb_addr;
  logic [31:0] ra_wdata, rb_wdata, ra_rdata, rb_rdata;
  cap_t        cap_a, cap_b;
  logic        corner_ld_blk, corner_bank, blk_bank, corner_ld_mb, corner_we, filt_we, ur_sub, blk_n8;
  logic [1:0]  corner_comp;
  mode_e       core_mode;
  logic        core_n8, core_pass, core_av_left, core_av_top, core_av_corner;
  logic [3:0]  core_ox, core_oy;
  logic [2:0]  core_src;
  logic [1:0]  core_dc_sel;
  logic        dc_add, dc_clr, dc_sel16, dc_use_top, dc_use_left;
  logic [1:0]  dc_gt, dc_gl;
  logic        pl_start, pl_done, seed_load, seed_step, seed_row_end;
  logic [1:0]  seed_comp;
  logic        out_valid;
  pred_info_t  out_info;

  edge_t       blk_edge, filt_edge, mb_edge_y, mb_edge_cb, mb_edge_cr, src_edge;
  word_t       top4, left4;
  pix_t        dc_now, dc_q, dc16_q, dc_val;
  logic signed [19:0] seed;
  logic signed [15:0] pb, pc;
  blk16_t      core_pred;

  intra_ctrl #(.PIC_WIDTH_MB(PIC_WIDTH_MB), .MBW(MBW)) u_ctrl (
    .clk, .rst_n, .mb_start, .mb_x, .avail_left, .avail_top, .avail_topleft,
    .avail_topright, .cfg_nqp, .cfg_en4, .cfg_en8, .cfg_en_plane, .mb_busy, .mb_done,
    .rec_valid, .rec_is8, .rec_qp, .rec_blk, .rec_samples,
    .fin_valid, .fin_comp, .fin_bottom, .fin_right, .fin_ready,
    .ra_en, .ra_we, .ra_addr, .ra_wdata, .rb_en, .rb_we, .rb_addr, .rb_wdata,
    .cap_a, .cap_b, .corner_ld_blk, .corner_bank, .blk_bank, .corner_ld_mb, .corner_we, .corner_comp,
    .filt_we, .ur_sub, .blk_n8,
    .core_mode, .core_n8, .core_ox, .core_oy, .core_src, .core_pass,
    .core_av_left, .core_av_top, .core_av_corner, .core_dc_sel,
    .dc_add, .dc_clr, .dc_sel16, .dc_use_top, .dc_use_left, .dc_gt, .dc_gl,
    .pl_start, .pl_done, .seed_load, .seed_comp, .seed_step, .seed_row_end,
    .out_valid, .out_info
  );

  ref_ram #(.WORDS(RAM_WORDS)) u_ram (
    .clk,
    .a_en(ra_en), .a_we(ra_we), .a_addr(ra_addr), .a_wdata(ra_wdata), .a_rdata(ra_rdata),
    .b_en(rb_en), .b_we(rb_we), .b_addr(rb_addr), .b_wdata(rb_wdata), .b_rdata(rb_rdata)
  );

  ref_regs u_regs (
    .clk, .rst_n,
    .cap_a, .data_a(word_t'(ra_rdata)), .cap_b, .data_b(word_t'(rb_rdata)),
    .corner_ld_blk, .corner_bank, .blk_bank, .corner_ld_mb, .corner_we, .corner_comp,
    .corner_val(ra_rdata[31:24]),
    .filt_we, .filt_pass(core_pass), .filt_data(core_pred),
    .ur_sub, .n8(blk_n8),
    .blk_edge, .filt_edge, .mb_edge_y, .mb_edge_cb, .mb_edge_cr
  );

  // edge feeding the core and the DC sums
  always_comb begin
    case (core_src)
      3'd0:    src_edge = blk_edge;
      3'd1:    src_edge = filt_edge;
      3'd2:    src_edge = mb_edge_y;
      3'd3:    src_edge = mb_edge_cb;
      default: src_edge = mb_edge_cr;
    endcase
    for (int j = 0; j < 4; j++) begin
      top4[j]  = src_edge[17 + 4 * int'(dc_gt) + j];
      left4[j] = src_edge[15 - 4 * int'(dc_gl) - j];
    end
    case (core_dc_sel)
      2'd0:    dc_val = dc_now;
      2'd1:    dc_val = dc_q;
      default: dc_val = dc16_q;
    endcase
  end

  dc_unit u_dc (
    .clk, .rst_n, .add(dc_add), .clr(dc_clr), .sel16(dc_sel16),
    .use_top(dc_use_top), .use_left(dc_use_left), .top4, .left4,
    .dc_now, .dc_q, .dc16_q
  );

  plane_gen u_plane (
    .clk, .rst_n, .start(pl_start),
    .edge_y(mb_edge_y), .edge_cb(mb_edge_cb), .edge_cr(mb_edge_cr),
    .done(pl_done), .seed_load, .seed_comp, .seed_step, .seed_row_end,
    .seed, .pb, .pc
  );

  pred_core u_core (
    .mode(core_mode), .n8(core_n8), .ox(core_ox), .oy(core_oy), .edge_s(src_edge),
    .dc(dc_val), .seed, .pb, .pc, .filt_pass(core_pass),
    .av_left(core_av_left), .av_top(core_av_top), .av_corner(core_av_corner),
    .pred(core_pred)
  );

  // output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pred_valid   <= 1'b0;
      pred_info    <= '0;
      pred_samples <= '0;
    end else begin
      pred_valid <= out_valid;
      if (out_valid) begin
        pred_info    <= out_info;
        pred_samples <= core_pred;
      end
    end
  end

endmodule
