// intra_ctrl: main FSM of the intra predictor.
//
// For each macroblock it walks a fixed, reordered and interleaved schedule
// of 28 steps (from the original architecture):
//   B4(0) B8(0) B4(1) L16(H) L16(V) B4(2) B4(4) B8(1) B4(3) B4(5) L16(DC)
//   B4(8) B4(6) L16(PL) B4(9) B4(7) C(H) C(V) B4(10) B4(12) B8(2) B4(11)
//   B4(13) C(DC) C(PL) B4(14) B8(3) B4(15)
// B4(n)/B8(n) are 4x4/8x8 luma blocks (n = luma4x4BlkIdx / luma8x8BlkIdx),
// L16(m) and C(m) one 16x16 luma or chroma mode. 4x4 and 8x8 steps are
// repeated for every QP index 0..cfg_nqp-1. Because 16x16 and chroma modes
// need nothing from the current macroblock, they fill the time in which a
// 4x4 or 8x8 block waits for the reconstruction of its neighbours.
//
// Per 4x4/8x8 block and QP: wait until every in-macroblock 4x4 block whose
// edge is read has been reconstructed (ready bits set by the rec_* port),
// then read the neighbour words, 2 per cycle over the two RAM ports, into
// the LEFT/UPPER registers (4x4: 4 words, 2 cycles; 8x8: 7 words, 4
// cycles). The first two reads leave in the cycle that selects the step
// (S_NEXT) or ends the wait (S_WAIT), so a 4x4 block whose neighbours are
// ready costs S_NEXT, one S_FETCH and one S_DRAIN cycle (the last capture)
// before its outputs. While a block or a 16x16/chroma mode is generated,
// the reads of the next 4x4/8x8 block of the schedule (or the same block at
// the next QP) are issued early, whenever its ready bits allow it, into the
// second bank of the block registers. If that prefetch is complete when the
// block's turn comes, it starts generating at once and the banks swap; if
// not, it fetches normally. The second bank is this design's addition.
// 8x8 blocks then spend two FILT cycles in which the core prefilters the
// 25 neighbours. GEN gives one 4x4 block of 16 samples
// per cycle, all available modes (8x8: four 4x4 quarters per mode).
// DC sums take 1 (4x4), 2 (8x8) and 4 (16x16) cycles in dc_unit, the last
// one overlapping the first output. Plane steps wait for plane_gen (started
// after the macroblock neighbours are loaded) and use one cycle per
// component to load the seed.
//
// Port use: reconstruction writes (rec_valid) take both RAM ports and have
// priority; reads stall for that cycle. The final reconstruction of a
// macroblock (fin_valid, one pulse per component, accepted while idle)
// saves the old line sample that becomes the next corner, then writes the
// bottom row into the picture line and the right column into the left
// column area. Modes whose neighbours are unavailable are skipped.
//
// Timing: out_valid/out_info and the core controls are combinational from
// the state; the top registers the core output together with out_info.
module intra_ctrl
  import intra_pkg::*;
#(
  parameter int unsigned PIC_WIDTH_MB = 120,
  parameter int unsigned MBW = $clog2(PIC_WIDTH_MB + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // macroblock command
  input  logic               mb_start,
  input  logic [MBW-1:0]     mb_x,
  input  logic               avail_left,
  input  logic               avail_top,
  input  logic               avail_topleft,
  input  logic               avail_topright,
  input  logic [2:0]         cfg_nqp,       // number of QPs, 1..7
  input  logic               cfg_en4,
  input  logic               cfg_en8,
  input  logic               cfg_en_plane,
  output logic               mb_busy,
  output logic               mb_done,
  // reconstructed 4x4 blocks from the reconstruction loop
  input  logic               rec_valid,
  input  logic               rec_is8,
  input  logic [2:0]         rec_qp,
  input  logic [3:0]         rec_blk,
  input  blk16_t             rec_samples,
  // final reconstruction of the macroblock, per component
  input  logic               fin_valid,
  input  logic [1:0]         fin_comp,
  input  logic [15:0][7:0]   fin_bottom,
  input  logic [15:0][7:0]   fin_right,
  output logic               fin_ready,
  // RAM
  output logic               ra_en, ra_we,
  output logic [10:0]        ra_addr,
  output logic [31:0]        ra_wdata,
  output logic               rb_en, rb_we,
  output logic [10:0]        rb_addr,
  output logic [31:0]        rb_wdata,
  // reference registers
  output cap_t               cap_a,
  output cap_t               cap_b,
  output logic               corner_ld_blk,
  output logic               corner_bank,   // bank that corner_ld_blk loads
  output logic               blk_bank,      // bank the block being generated uses
  output logic               corner_ld_mb,
  output logic               corner_we,
  output logic [1:0]         corner_comp,
  output logic               filt_we,
  output logic               ur_sub,
  output logic               blk_n8,
  // prediction core
  output mode_e              core_mode,
  output logic               core_n8,
  output logic [3:0]         core_ox,
  output logic [3:0]         core_oy,
  output logic [2:0]         core_src,      // 0 block, 1 filtered, 2 Y, 3 Cb, 4 Cr
  output logic               core_pass,
  output logic               core_av_left,
  output logic               core_av_top,
  output logic               core_av_corner,
  output logic [1:0]         core_dc_sel,   // 0 dc_now, 1 dc_q, 2 dc16_q
  // dc unit
  output logic               dc_add,
  output logic               dc_clr,
  output logic               dc_sel16,
  output logic               dc_use_top,
  output logic               dc_use_left,
  output logic [1:0]         dc_gt,
  output logic [1:0]         dc_gl,
  // plane generator
  output logic               pl_start,
  input  logic               pl_done,
  output logic               seed_load,
  output logic [1:0]         seed_comp,
  output logic               seed_step,
  output logic               seed_row_end,
  // prediction output description
  output logic               out_valid,
  output pred_info_t         out_info
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_LDRAIN, S_NEXT, S_WAIT, S_FETCH, S_DRAIN,
    S_FILT0, S_FILT1, S_GEN, S_DONE, S_WB
  } state_e;

  state_e state;

  localparam int NSTEP = 28;

  // schedule: kind and argument (block index or mode)
  function automatic logic [5:0] sched(input logic [4:0] i);
    case (i)
      5'd0:  return {K_B4, 4'd0};
      5'd1:  return {K_B8, 4'd0};
      5'd2:  return {K_B4, 4'd1};
      5'd3:  return {K_L16, M_H};
      5'd4:  return {K_L16, M_V};
      5'd5:  return {K_B4, 4'd2};
      5'd6:  return {K_B4, 4'd4};
      5'd7:  return {K_B8, 4'd1};
      5'd8:  return {K_B4, 4'd3};
      5'd9:  return {K_B4, 4'd5};
      5'd10: return {K_L16, M_DC};
      5'd11: return {K_B4, 4'd8};
      5'd12: return {K_B4, 4'd6};
      5'd13: return {K_L16, M_PLANE};
      5'd14: return {K_B4, 4'd9};
      5'd15: return {K_B4, 4'd7};
      5'd16: return {K_C, M_H};
      5'd17: return {K_C, M_V};
      5'd18: return {K_B4, 4'd10};
      5'd19: return {K_B4, 4'd12};
      5'd20: return {K_B8, 4'd2};
      5'd21: return {K_B4, 4'd11};
      5'd22: return {K_B4, 4'd13};
      5'd23: return {K_C, M_DC};
      5'd24: return {K_C, M_PLANE};
      5'd25: return {K_B4, 4'd14};
      5'd26: return {K_B8, 4'd3};
      default: return {K_B4, 4'd15};
    endcase
  endfunction

  // ---------------------------------------------------------------- context
  logic [MBW-1:0] mbx;
  logic           av_l, av_t, av_tl, av_tr;
  logic [2:0]     nqp;
  logic           en4, en8, enpl;
  logic [4:0]     step;
  logic [2:0]     q;
  logic [15:0]    ready [2][MAX_QP];
  logic [3:0]     rp;          // request pointer
  logic [3:0]     mi;          // current mode
  logic [3:0]     sub;         // 4x4 within the step
  logic [1:0]     pre;         // DC pre-accumulation cycles done
  logic           prep_done;   // plane seed loaded
  // writeback
  logic [1:0]     wb_comp;
  logic [15:0][7:0] wb_bottom, wb_right;
  logic [2:0]     wb_cnt;

  kind_e          kind;
  logic [3:0]     arg;
  assign {kind, arg} = sched(step);

  // position and availability of a 4x4/8x8 block of the schedule
  typedef struct packed {
    logic [1:0] bx, by;
    logic       s8, l, t, c, ur;
  } bdec_t;

  function automatic bdec_t bdec(input kind_e k, input logic [3:0] a, input logic al,
                                 input logic at, input logic atl, input logic atr);
    bdec_t d;
    d.s8 = (k == K_B8);
    if (d.s8) begin
      d.bx = {a[0], 1'b0};
      d.by = {a[1], 1'b0};
    end else begin
      d.bx = zz_x(a);
      d.by = zz_y(a);
    end
    d.l = (d.bx != 0) || al;
    d.t = (d.by != 0) || at;
    if (d.bx != 0 && d.by != 0)      d.c = 1'b1;
    else if (d.bx == 0 && d.by != 0) d.c = al;
    else if (d.bx != 0)              d.c = at;
    else                             d.c = atl;
    if (d.s8) begin
      case (a[1:0])
        2'd0:    d.ur = at;
        2'd1:    d.ur = atr;
        2'd2:    d.ur = 1'b1;
        default: d.ur = 1'b0;
      endcase
    end else if (d.by == 0) begin
      d.ur = (d.bx != 2'd3) ? at : atr;
    end else begin
      d.ur = (d.bx != 2'd3) && (zz(d.bx + 2'd1, d.by - 2'd1) < a);
    end
    return d;
  endfunction

  // the block being generated
  logic [1:0] bx, by;
  logic       s8;
  logic       l_av, t_av, c_av, ur_av;
  assign {bx, by, s8, l_av, t_av, c_av, ur_av} = bdec(kind, arg, av_l, av_t, av_tl, av_tr);

  // next block after (step, q): the same block at the next QP, else the
  // next enabled 4x4/8x8 step. Its reads may be issued during generation.
  logic [4:0] nx_step;
  logic [2:0] nx_q;
  logic       nx_valid;
  kind_e      sk;
  logic [3:0] sa;
  always_comb begin
    nx_step  = step;
    nx_q     = q + 3'd1;
    nx_valid = 1'b0;
    sk       = K_B4;
    sa       = '0;
    if ((kind == K_B4 || kind == K_B8) && (q + 3'd1 < nqp)) begin
      nx_valid = 1'b1;
    end else begin
      nx_q = '0;
      for (int i = NSTEP - 1; i >= 0; i--) begin
        {sk, sa} = sched(5'(i));
        if (5'(i) > step && ((sk == K_B4 && en4) || (sk == K_B8 && en8))) begin
          nx_step  = 5'(i);
          nx_valid = 1'b1;
        end
      end
    end
  end

  // the block whose reads are issued: the next one while generating
  logic       pf_mode;
  logic [4:0] f_step;
  logic [2:0] f_q;
  kind_e      f_kind;
  logic [3:0] f_arg;
  logic [1:0] fbx, fby;
  logic       fs8, fl_av, ft_av, fc_av, fur_av;
  assign pf_mode = (state == S_GEN);
  assign f_step  = pf_mode ? nx_step : step;
  assign f_q     = pf_mode ? nx_q : q;
  assign {f_kind, f_arg} = sched(f_step);
  assign {fbx, fby, fs8, fl_av, ft_av, fc_av, fur_av} = bdec(f_kind, f_arg, av_l, av_t, av_tl, av_tr);

  // is mode m usable for a 4x4/8x8 block with these neighbours
  function automatic logic mode_ok(input logic [3:0] m, input logic l, input logic t, input logic c);
    case (m)
      4'd0, 4'd3, 4'd7: return t;
      4'd1, 4'd8:       return l;
      4'd2:             return 1'b1;
      4'd4, 4'd5, 4'd6: return l & t & c;
      default:          return 1'b0;
    endcase
  endfunction

  // first usable mode after m (9 when none)
  logic [3:0] next_mode, first_mode;
  always_comb begin
    next_mode  = 4'd9;
    first_mode = 4'd9;
    for (int m = 8; m >= 0; m--) begin
      if (mode_ok(4'(m), l_av, t_av, c_av)) begin
        first_mode = 4'(m);
        if (4'(m) > mi) next_mode = 4'(m);
      end
    end
  end

  // is the current step performed at all
  logic step_on;
  always_comb begin
    case (kind)
      K_B4:  step_on = en4;
      K_B8:  step_on = en8;
      default: begin
        case (mode_e'(arg))
          M_V:     step_on = av_t;
          M_H:     step_on = av_l;
          M_PLANE: step_on = enpl && av_t && av_l && av_tl;
          default: step_on = 1'b1;
        endcase
      end
    endcase
  end

  // --------------------------------------------------------- read requests
  logic [10:0] req_addr [16];
  cap_t        req_cap  [16];
  logic [3:0]  req_n;
  logic [15:0] need;      // in-macroblock 4x4 blocks whose edges are read

  function automatic cap_t mkcap(input logic v, input logic [1:0] set, input wkind_e wk,
                                 input logic [1:0] k, input logic [1:0] bs);
    cap_t c;
    c.valid = v; c.set = set; c.wk = wk; c.k = k; c.byte_sel = bs;
    return c;
  endfunction

  always_comb begin
    logic [1:0] n4;
    logic [10:0] lbase;
    n4 = 2'd1;
    for (int i = 0; i < 16; i++) begin
      req_addr[i] = '0;
      req_cap[i]  = '0;
    end
    need  = '0;
    req_n = '0;
    lbase = 11'(32'(mbx) * 4);
    if (state == S_LOAD) begin
      req_n = 4'd15;
      for (int k = 0; k < 4; k++) begin
        req_addr[k]     = lbase + 11'(k);
        req_cap[k]      = mkcap(av_t, 2'd1, W_UP, 2'(k), 2'd0);
        req_addr[4 + k] = 11'(LEFT_BASE + k);
        req_cap[4 + k]  = mkcap(av_l, 2'd1, W_LEFT, 2'(k), 2'd0);
      end
      for (int c = 0; c < 2; c++) begin
        for (int k = 0; k < 2; k++) begin
          req_addr[8 + 4 * c + k]  = 11'(LINE_WORDS * (c + 1) + 32'(mbx) * 2 + k);
          req_cap[8 + 4 * c + k]   = mkcap(av_t, 2'(c + 2), W_UP, 2'(k), 2'd0);
          req_addr[10 + 4 * c + k] = 11'(LEFT_BASE + 4 + 2 * c + k);
          req_cap[10 + 4 * c + k]  = mkcap(av_l, 2'(c + 2), W_LEFT, 2'(k), 2'd0);
        end
      end
    end else begin
      n4 = fs8 ? 2'd2 : 2'd1;
      req_n = fs8 ? 4'd6 : 4'd3;
      for (int k = 0; k < 2; k++) begin
        if (k < int'(n4)) begin
          // left word k
          if (fbx != 0) begin
            req_addr[k] = inner_addr(fs8, f_q, zz(fbx - 2'd1, fby + 2'(k)), 1'b1);
            if (fl_av) need[zz(fbx - 2'd1, fby + 2'(k))] = 1'b1;
          end else begin
            req_addr[k] = 11'(LEFT_BASE + 32'(fby) + k);
          end
          req_cap[k] = mkcap(fl_av, 2'd0, W_LEFT, 2'(k), 2'd0);
          // upper word k
          if (fby != 0) begin
            req_addr[2 + k] = inner_addr(fs8, f_q, zz(fbx + 2'(k), fby - 2'd1), 1'b0);
            if (ft_av) need[zz(fbx + 2'(k), fby - 2'd1)] = 1'b1;
          end else begin
            req_addr[2 + k] = lbase + 11'(fbx) + 11'(k);
          end
          req_cap[2 + k] = mkcap(ft_av, 2'd0, W_UP, 2'(k), 2'd0);
          // upper-right word
          if (fby != 0) begin
            req_addr[4 + k] = inner_addr(fs8, f_q, zz(fbx + 2'(n4) + 2'(k), fby - 2'd1), 1'b0);
            if (fur_av) need[zz(fbx + 2'(n4) + 2'(k), fby - 2'd1)] = 1'b1;
          end else begin
            req_addr[4 + k] = lbase + 11'(fbx) + 11'(n4) + 11'(k);
          end
          req_cap[4 + k] = mkcap(fur_av, 2'd0, W_UP, 2'(n4) + 2'(k), 2'd0);
        end
      end
      // corner sample, last entry
      if (fbx != 0 && fby != 0) begin
        req_addr[6] = inner_addr(fs8, f_q, zz(fbx - 2'd1, fby - 2'd1), 1'b0);
        need[zz(fbx - 2'd1, fby - 2'd1)] = 1'b1;
      end else if (fbx != 0) begin
        req_addr[6] = lbase + 11'(fbx) - 11'd1;
      end else begin
        req_addr[6] = 11'(LEFT_BASE + 32'(fby) - 1);
      end
      req_cap[6] = mkcap(fc_av && (fbx != 0 || fby != 0), 2'd0, W_CORNER, 2'd0, 2'd3);
    end
  end

  // B4 uses entries 0,2,4,6 and B8 entries 0..6: map issue slot to entry
  function automatic logic [3:0] slot(input logic [3:0] p, input logic is8, input logic ld);
    if (ld || is8) return p;
    case (p)
      4'd0: return 4'd0;
      4'd1: return 4'd2;
      4'd2: return 4'd4;
      default: return 4'd6;
    endcase
  endfunction

  logic deps_ok;
  assign deps_ok = ((ready[fs8][f_q] & need) == need);

  // prefetch of the next block into the free bank of the block set
  logic       gbank;             // bank read by generation
  logic       pf_on;             // a prefetch target is set
  logic [4:0] pf_step;
  logic [2:0] pf_q;
  logic [3:0] pf_rp;             // prefetch request pointer
  logic [1:0] pf_ph;             // 0 issuing, 1 last capture pending, 2 complete
  logic       pf_match, pf_issue, pf_cur, pf_hit, pf_soon;
  assign pf_match = pf_on && (pf_step == nx_step) && (pf_q == nx_q);
  assign pf_issue = pf_mode && nx_valid && pf_match && (pf_ph == 2'd0) && deps_ok && !rec_valid;
  assign pf_cur   = pf_on && (pf_step == step) && (pf_q == q);
  assign pf_hit   = pf_cur && (pf_ph == 2'd2);
  assign pf_soon  = pf_cur && (pf_ph == 2'd1);
  assign blk_bank = gbank;

  // a 4x4/8x8 block may issue its first reads straight from S_NEXT or S_WAIT
  logic blk_go;
  assign blk_go = deps_ok && !pf_hit && !pf_soon && ((state == S_WAIT) ||
                  (state == S_NEXT && step_on && (kind == K_B4 || kind == K_B8)));
  logic issuing;
  assign issuing = ((state == S_LOAD || state == S_FETCH || blk_go) && !rec_valid) || pf_issue;

  logic [3:0] crp;               // request pointer in use
  logic [3:0] ia, ib;
  assign crp = pf_mode ? pf_rp : rp;
  assign ia  = slot(crp, fs8, state == S_LOAD);
  assign ib  = slot(crp + 4'd1, fs8, state == S_LOAD);

  // ------------------------------------------------------------- RAM ports
  always_comb begin
    int nw;
    nw = (wb_comp == 2'd0) ? 4 : 2;
    ra_en = 1'b0; ra_we = 1'b0; ra_addr = '0; ra_wdata = '0;
    rb_en = 1'b0; rb_we = 1'b0; rb_addr = '0; rb_wdata = '0;
    if (rec_valid) begin
      ra_en = 1'b1; ra_we = 1'b1;
      ra_addr  = inner_addr(rec_is8, rec_qp, rec_blk, 1'b0);
      ra_wdata = {rec_samples[15], rec_samples[14], rec_samples[13], rec_samples[12]};
      rb_en = 1'b1; rb_we = 1'b1;
      rb_addr  = inner_addr(rec_is8, rec_qp, rec_blk, 1'b1);
      rb_wdata = {rec_samples[15], rec_samples[11], rec_samples[7], rec_samples[3]};
    end else if (issuing) begin
      ra_en   = req_cap[ia].valid;
      ra_addr = req_addr[ia];
      rb_en   = ({1'b0, crp} + 5'd1 <= {1'b0, req_n}) && req_cap[ib].valid;
      rb_addr = req_addr[ib];
    end else if (state == S_WB) begin

      if (wb_cnt == 3'd0) begin
        // read the old last line word: its last sample is the next corner
        ra_en   = 1'b1;
        ra_addr = 11'(LINE_WORDS * wb_comp + 32'(mbx) * nw + nw - 1);
      end else begin
        // cycle n (1..nw) writes line word n-1 and left column word n-1
        ra_en = 1'b1; ra_we = 1'b1;
        ra_addr  = 11'(LINE_WORDS * wb_comp + 32'(mbx) * nw + 32'(wb_cnt) - 1);
        ra_wdata = wb_bottom[4 * (wb_cnt - 1) +: 4];
        rb_en = 1'b1; rb_we = 1'b1;
        rb_addr  = 11'(LEFT_BASE + ((wb_comp == 2'd0) ? 0 : 2 + 2 * 32'(wb_comp)) + 32'(wb_cnt) - 1);
        rb_wdata = wb_right[4 * (wb_cnt - 1) +: 4];
      end
    end
  end

  // captures follow the read by one cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_a <= '0;
      cap_b <= '0;
      corner_bank <= 1'b0;
    end else begin
      cap_a <= '0;
      cap_b <= '0;
      if (issuing) begin
        cap_a <= req_cap[ia];
        cap_a.bank <= !gbank;
        if ({1'b0, crp} + 5'd1 <= {1'b0, req_n}) begin
          cap_b <= req_cap[ib];
          cap_b.bank <= !gbank;
        end
      end
      corner_bank <= !gbank;
    end
  end

  // corner register save: data of the read issued in WB cycle 0
  logic wb_rd_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wb_rd_q <= 1'b0;
    else        wb_rd_q <= (state == S_WB) && (wb_cnt == 3'd0) && !rec_valid;
  end
  assign corner_we   = wb_rd_q;
  assign corner_comp = wb_comp;

  // ------------------------------------------------------------ generation
  logic gen_last;     // last output of this block/QP/step
  // fields of out_info, assembled below as a whole
  kind_e      oi_kind;
  mode_e      oi_mode;
  logic [1:0] oi_comp, oi_bx, oi_by;
  logic [2:0] oi_qp;
  logic       ov;
  logic [1:0] cx, cy;   // chroma block position
  logic       ut, ul;   // chroma DC neighbour use
  always_comb begin
    cx = '0; cy = '0; ut = 1'b0; ul = 1'b0;
    core_mode = M_DC; core_n8 = s8; core_ox = '0; core_oy = '0; core_src = '0;
    core_pass = 1'b0; core_av_left = l_av; core_av_top = t_av; core_av_corner = c_av;
    core_dc_sel = 2'd1;
    dc_add = 1'b0; dc_clr = 1'b0; dc_sel16 = 1'b0; dc_use_top = 1'b0; dc_use_left = 1'b0;
    dc_gt = '0; dc_gl = '0;
    seed_load = 1'b0; seed_comp = '0; seed_step = 1'b0; seed_row_end = 1'b0;
    filt_we = 1'b0;
    ov = 1'b0; oi_kind = K_B4; oi_mode = M_V; oi_comp = '0; oi_bx = '0; oi_by = '0; oi_qp = '0;
    gen_last = 1'b0;
    if (state == S_FILT0 || state == S_FILT1) begin
      core_mode = M_FILT;
      core_src  = 3'd0;
      core_pass = (state == S_FILT1);
      filt_we   = 1'b1;
    end else if (state == S_GEN) begin
      oi_qp = q;
      case (kind)
        K_B4: begin
          core_mode = mode_e'(mi);
          core_src  = 3'd0;
          gen_last  = (next_mode == 4'd9);
          ov = 1'b1;
          oi_kind = K_B4; oi_mode = mode_e'(mi);
          oi_bx = bx; oi_by = by; 
          if (mi == M_DC) begin
            dc_add = 1'b1; dc_clr = 1'b1; dc_use_top = t_av; dc_use_left = l_av;
            core_dc_sel = 2'd0;
          end
        end
        K_B8: begin
          core_mode = mode_e'(mi);
          core_src  = 3'd1;
          core_ox   = {1'b0, sub[0], 2'b00};
          core_oy   = {1'b0, sub[1], 2'b00};
          if (mi == M_DC && sub == 0) begin
            dc_add = 1'b1; dc_use_top = t_av; dc_use_left = l_av;
            if (pre == 0) begin
              dc_clr = 1'b1;              // first half of the 8x8 sums
            end else begin
              dc_gt = 2'd1; dc_gl = 2'd1; // second half, output with dc_now
              core_dc_sel = 2'd0;
            end
          end
          ov = !(mi == M_DC && sub == 0 && pre == 0);
          gen_last  = (next_mode == 4'd9) && (sub == 4'd3);
          oi_kind = K_B8; oi_mode = mode_e'(mi);
          oi_bx = bx + sub[0]; oi_by = by + sub[1]; 
        end
        K_L16: begin
          core_mode = mode_e'(arg);
          core_src  = 3'd2;
          core_ox   = {sub[1:0], 2'b00};
          core_oy   = {sub[3:2], 2'b00};
          core_dc_sel = 2'd2;
          ov = 1'b1;
          if (mode_e'(arg) == M_DC && sub == 0) begin
            dc_add = 1'b1; dc_clr = (pre == 0); dc_use_top = av_t; dc_use_left = av_l;
            dc_gt = pre; dc_gl = pre;
            if (pre != 2'd3) ov = 1'b0;
            else begin
              core_dc_sel = 2'd0;
              dc_sel16    = 1'b1;
            end
          end
          if (mode_e'(arg) == M_PLANE) begin
            if (!prep_done) begin
              ov = 1'b0;
              seed_load = pl_done;
              seed_comp = 2'd0;
            end else begin
              seed_step = 1'b1;
              seed_row_end = (sub[1:0] == 2'd3);
            end
          end
          gen_last = ov && (sub == 4'd15);
          oi_kind = K_L16; oi_mode = mode_e'(arg);
          oi_bx = sub[1:0]; oi_by = sub[3:2]; 
          oi_qp = '0;
        end
        default: begin  // chroma, 4:2:0, Cb then Cr
          cx = {1'b0, sub[0]};
          cy = {1'b0, sub[1]};
          core_mode = mode_e'(arg);
          core_src  = sub[2] ? 3'd4 : 3'd3;
          core_ox   = {1'b0, sub[0], 2'b00};
          core_oy   = {1'b0, sub[1], 2'b00};
          ov = 1'b1;
          if (mode_e'(arg) == M_DC) begin
            // chroma DC neighbour rules of the standard per 4x4 block
            if (sub[0] == sub[1])  begin ut = av_t; ul = av_l; end
            else if (sub[0])       begin ut = av_t; ul = !av_t && av_l; end
            else                   begin ul = av_l; ut = !av_l && av_t; end
            dc_add = 1'b1; dc_clr = 1'b1; dc_use_top = ut; dc_use_left = ul;
            dc_gt = cx; dc_gl = cy;
            core_dc_sel = 2'd0;
          end
          if (mode_e'(arg) == M_PLANE) begin
            if (!prep_done) begin
              ov = 1'b0;
              seed_load = pl_done;
              seed_comp = sub[2] ? 2'd2 : 2'd1;
            end else begin
              seed_step = 1'b1;
              seed_row_end = sub[0];
            end
          end
          gen_last = ov && (sub[1:0] == 2'd3);
          oi_kind = K_C; oi_mode = mode_e'(arg);
          oi_comp = sub[2] ? 2'd2 : 2'd1;
          oi_bx = cx; oi_by = cy; 
          oi_qp = '0;
        end
      endcase
    end
  end

  assign out_valid = ov;
  assign out_info  = '{kind: oi_kind, mode: oi_mode, comp: oi_comp, bx: oi_bx, by: oi_by,
                       qp: oi_qp, last: gen_last};

  assign blk_n8  = s8;
  assign ur_sub  = !ur_av;
  assign mb_busy = (state != S_IDLE) && (state != S_WB);
  assign fin_ready = (state == S_IDLE);

  // ------------------------------------------------------------------ FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      mbx <= '0; av_l <= 1'b0; av_t <= 1'b0; av_tl <= 1'b0; av_tr <= 1'b0;
      nqp <= 3'd1; en4 <= 1'b1; en8 <= 1'b1; enpl <= 1'b1;
      step <= '0; q <= '0; rp <= '0; mi <= '0; sub <= '0; pre <= '0; prep_done <= 1'b0;
      wb_comp <= '0; wb_bottom <= '0; wb_right <= '0; wb_cnt <= '0;
      mb_done <= 1'b0; pl_start <= 1'b0; corner_ld_blk <= 1'b0; corner_ld_mb <= 1'b0;
      gbank <= 1'b0; pf_on <= 1'b0; pf_step <= '0; pf_q <= '0; pf_rp <= '0; pf_ph <= '0;
      for (int s = 0; s < 2; s++)
        for (int i = 0; i < int'(MAX_QP); i++) ready[s][i] <= '0;
    end else begin
      mb_done <= 1'b0;
      pl_start <= 1'b0;
      corner_ld_blk <= 1'b0;
      corner_ld_mb <= 1'b0;
      if (rec_valid) ready[rec_is8][rec_qp][rec_blk] <= 1'b1;
      if (pf_ph == 2'd1) pf_ph <= 2'd2;
      case (state)
        S_IDLE: begin
          if (mb_start) begin
            mbx <= mb_x; av_l <= avail_left; av_t <= avail_top;
            av_tl <= avail_topleft; av_tr <= avail_topright;
            nqp <= (cfg_nqp == 0) ? 3'd1 : cfg_nqp;
            en4 <= cfg_en4; en8 <= cfg_en8; enpl <= cfg_en_plane;
            for (int s = 0; s < 2; s++)
              for (int i = 0; i < int'(MAX_QP); i++) ready[s][i] <= '0;
            rp <= '0;
            pf_on <= 1'b0;
            corner_ld_mb <= 1'b1;
            state <= S_LOAD;
          end else if (fin_valid) begin
            wb_comp <= fin_comp; wb_bottom <= fin_bottom; wb_right <= fin_right;
            wb_cnt <= '0;
            state <= S_WB;
          end
        end
        S_LOAD: if (!rec_valid) begin
          if ({1'b0, rp} + 5'd2 > {1'b0, req_n}) state <= S_LDRAIN;
          else rp <= rp + 4'd2;
        end
        S_LDRAIN: begin
          pl_start <= 1'b1;
          step <= '0; q <= '0; rp <= '0;
          state <= S_NEXT;
        end
        S_NEXT: begin
          q <= '0; mi <= first_mode; sub <= '0; pre <= '0; prep_done <= 1'b0;
          if (!step_on) begin
            if (step == 5'(NSTEP - 1)) state <= S_DONE;
            else step <= step + 5'd1;
          end else if (kind == K_B4 || kind == K_B8) begin
            if (pf_hit) begin
              // neighbours already prefetched: generate at once
              gbank <= !gbank;
              pf_on <= 1'b0;
              state <= s8 ? S_FILT0 : S_GEN;
            end else if (blk_go && !rec_valid) begin
              rp <= 4'd2;
              pf_on <= 1'b0;
              if (bx == 0 && by == 0) corner_ld_blk <= 1'b1;
              state <= S_FETCH;
            end else begin
              state <= S_WAIT;
            end
          end else begin
            state <= S_GEN;
          end
        end
        S_WAIT: if (pf_hit) begin
          gbank <= !gbank;
          pf_on <= 1'b0;
          state <= s8 ? S_FILT0 : S_GEN;
        end else if (blk_go && !rec_valid) begin
          // the first two reads are issued in this cycle
          rp <= 4'd2;
          pf_on <= 1'b0;
          if (bx == 0 && by == 0) corner_ld_blk <= 1'b1;
          state <= S_FETCH;
        end
        S_FETCH: if (!rec_valid) begin
          if ({1'b0, rp} + 5'd2 > {1'b0, req_n}) state <= S_DRAIN;
          else rp <= rp + 4'd2;
        end
        S_DRAIN: begin
          gbank <= !gbank;
          state <= s8 ? S_FILT0 : S_GEN;
        end
        S_FILT0: state <= S_FILT1;
        S_FILT1: state <= S_GEN;
        S_GEN: begin
          // bookkeeping of the DC pre-accumulation and plane seed cycles
          if (dc_add && !ov) pre <= pre + 2'd1;
          if (seed_load) prep_done <= 1'b1;
          // prefetch of the next block
          if (nx_valid) begin
            if (!pf_match) begin
              pf_on <= 1'b1; pf_step <= nx_step; pf_q <= nx_q; pf_rp <= '0; pf_ph <= 2'd0;
            end else if (pf_issue) begin
              if (pf_rp == 0 && fbx == 0 && fby == 0) corner_ld_blk <= 1'b1;
              if ({1'b0, pf_rp} + 5'd2 > {1'b0, req_n}) pf_ph <= 2'd1;
              else pf_rp <= pf_rp + 4'd2;
            end
          end
          if (ov) begin
            case (kind)
              K_B4: begin
                mi <= next_mode;
              end
              K_B8: begin
                if (mi == M_DC && sub == 0) pre <= pre + 2'd1;
                sub <= sub + 4'd1;
                if (sub == 4'd3) begin
                  sub <= '0;
                  mi <= next_mode;
                end
              end
              K_L16: sub <= sub + 4'd1;
              default: begin
                sub <= sub + 4'd1;
                if (sub == 4'd3) prep_done <= 1'b0;
              end
            endcase
            if (gen_last && (kind == K_B4 || kind == K_B8 || kind == K_L16 || sub == 4'd7)) begin
              if ((kind == K_B4 || kind == K_B8) && (q + 3'd1 < nqp)) begin
                q <= q + 3'd1;
                mi <= first_mode; sub <= '0; pre <= '0; rp <= '0;
                if (pf_on && pf_step == step && pf_q == q + 3'd1 && pf_ph == 2'd2) begin
                  gbank <= !gbank;
                  pf_on <= 1'b0;
                  state <= s8 ? S_FILT0 : S_GEN;
                end else begin
                  state <= S_WAIT;
                end
              end else if (step == 5'(NSTEP - 1)) begin
                state <= S_DONE;
              end else begin
                step <= step + 5'd1;
                q <= '0; rp <= '0;
                state <= S_NEXT;
              end
            end
          end
        end
        S_DONE: begin
          mb_done <= 1'b1;
          state <= S_IDLE;
        end
        S_WB: if (!rec_valid) begin
          if (wb_cnt == ((wb_comp == 2'd0) ? 3'd4 : 3'd2)) state <= S_IDLE;
          wb_cnt <= wb_cnt + 3'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // fin_valid is only accepted while idle (state is idle during reset)
  always_ff @(posedge clk) begin
    assert (!(fin_valid && state != S_IDLE))
      else $error("intra_ctrl: fin_valid while busy");
  end

endmodule
