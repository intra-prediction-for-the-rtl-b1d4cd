// Shared body of the end-to-end testbenches of intra_predictor.
//
// The including module defines W_MB and H_MB (picture size in macroblocks),
// and the functions cfg_nqp_of(), cfg_delay_of(), cfg_en4_of(),
// cfg_en8_of(), cfg_enpl_of() giving the setup of macroblock i, and
// REPORT_ALL (print the cycle count of every macroblock). The including
// module also holds the watchdog (WATCHDOG cycles).
//
// Every prediction leaving the design is compared with intra_ref_pkg. A
// model of the reconstruction loop returns each reconstructed 4x4/8x8 block
// a fixed number of cycles after its last prediction; after each macroblock
// the final reconstruction is written back. The testbench also checks the
// order of the schedule, the number of predictions per macroblock, and that
// the modes of one 4x4 block leave in consecutive cycles (16 samples per
// clock), and counts how often each mechanism of the design was used.

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             mb_start = 1'b0;
  logic [6:0]       mb_x = '0;
  logic             avail_left = 1'b0, avail_top = 1'b0, avail_topleft = 1'b0, avail_topright = 1'b0;
  logic [2:0]       cfg_nqp = 3'd1;
  logic             cfg_en4 = 1'b1, cfg_en8 = 1'b1, cfg_en_plane = 1'b1;
  logic             mb_busy, mb_done, pred_valid, fin_ready;
  pred_info_t       pred_info;
  blk16_t           pred_samples;
  logic             rec_valid = 1'b0, rec_is8 = 1'b0;
  logic [2:0]       rec_qp = '0;
  logic [3:0]       rec_blk = '0;
  blk16_t           rec_samples = '0;
  logic             fin_valid = 1'b0;
  logic [1:0]       fin_comp = '0;
  logic [15:0][7:0] fin_bottom = '0, fin_right = '0;

  intra_predictor dut (
    .clk, .rst_n, .mb_start, .mb_x, .avail_left, .avail_top, .avail_topleft, .avail_topright,
    .cfg_nqp, .cfg_en4, .cfg_en8, .cfg_en_plane, .mb_busy, .mb_done,
    .pred_valid, .pred_info, .pred_samples,
    .rec_valid, .rec_is8, .rec_qp, .rec_blk, .rec_samples,
    .fin_valid, .fin_comp, .fin_bottom, .fin_right, .fin_ready
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // current macroblock setup, seen by the monitor
  int cur_mx, cur_my, cur_delay, cur_nqp;
  bit cur_l, cur_t, cur_tl, cur_tr;

  // reconstruction loop model: pending 4x4 reconstructions
  longint ev_due[$];
  int     ev_is8[$], ev_qp[$], ev_blk[$];

  // observed schedule and counts
  int seq_obs[$];
  int n_out;
  int last_key;
  longint last_b4_cyc;
  int last_b4_key;

  // mechanism counters
  int n_dep_stall, n_port_conflict, n_multi_qp, n_filt, n_plane, n_corner, n_ursub,
      n_skip_mode, n_dc16, n_wb, n_b8_out, n_prefetch;

  function automatic string kname(input int k);
    case (k)
      0: return "B4"; 1: return "B8"; 2: return "L16"; default: return "C";
    endcase
  endfunction

  // monitor
  always @(posedge clk) begin
    if (rst_n && pred_valid) begin
      blk16_t exp_b;
      int k, key, bx, by;
      k  = int'(pred_info.kind);
      bx = int'(pred_info.bx);
      by = int'(pred_info.by);
      case (k)
        0: exp_b = pred_nxn(4, cur_mx, cur_my, int'(pred_info.qp), cur_l, cur_t, cur_tl, cur_tr,
                            bx, by, int'(pred_info.mode), bx, by);
        1: exp_b = pred_nxn(8, cur_mx, cur_my, int'(pred_info.qp), cur_l, cur_t, cur_tl, cur_tr,
                            bx & 2, by & 2, int'(pred_info.mode), bx, by);
        2: exp_b = pred_mb(0, cur_mx, cur_my, cur_l, cur_t, bx, by, int'(pred_info.mode));
        default: exp_b = pred_mb(int'(pred_info.comp), cur_mx, cur_my, cur_l, cur_t, bx, by,
                                 int'(pred_info.mode));
      endcase
      checks++;
      n_out++;
      if (exp_b !== pred_samples) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH mb(%0d,%0d) %s mode %0d comp %0d blk(%0d,%0d) qp %0d: got %h exp %h",
                   cur_mx, cur_my, kname(k), pred_info.mode, pred_info.comp, bx, by,
                   pred_info.qp, pred_samples, exp_b);
      end
      if (k == 1) n_b8_out++;
      if (pred_info.mode == M_PLANE) n_plane++;
      // schedule step key
      case (k)
        0: key = k * 16 + zzi(bx, by);
        1: key = k * 16 + (zzi(bx, by) >> 2);
        default: key = k * 16 + int'(pred_info.mode);
      endcase
      if (key != last_key) seq_obs.push_back(key);
      last_key = key;
      if (k <= 1 && pred_info.qp != 0) n_multi_qp++;
      // 16 samples per clock: the modes of a 4x4 block leave back to back
      if (k == 0) begin
        int kq;
        kq = key * 8 + int'(pred_info.qp);
        if (kq == last_b4_key) begin
          checks++;
          if (cyc != last_b4_cyc + 1) begin
            failures++;
            $display("RATE: gap of %0d cycles inside 4x4 block %0d", cyc - last_b4_cyc, key % 16);
          end
        end
        last_b4_key = kq;
        last_b4_cyc = cyc;
      end
      // reconstruction requests
      if (pred_info.last && k <= 1) begin
        if (k == 0) begin
          ev_due.push_back(cyc + cur_delay); ev_is8.push_back(0);
          ev_qp.push_back(int'(pred_info.qp)); ev_blk.push_back(zzi(bx, by));
        end else begin
          for (int j = 0; j < 4; j++) begin
            ev_due.push_back(cyc + cur_delay); ev_is8.push_back(1);
            ev_qp.push_back(int'(pred_info.qp)); ev_blk.push_back((zzi(bx, by) & 12) + j);
          end
        end
      end
    end
  end

  // reconstruction loop: one 4x4 per cycle, in order
  always @(negedge clk) begin
    rec_valid <= 1'b0;
    if (ev_due.size() > 0 && ev_due[0] <= cyc) begin
      int bx, by, q;
      q  = ev_qp[0];
      bx = (ev_blk[0] & 1) + ((ev_blk[0] >> 2) & 1) * 2;
      by = ((ev_blk[0] >> 1) & 1) + ((ev_blk[0] >> 3) & 1) * 2;
      rec_valid <= 1'b1;
      rec_is8   <= ev_is8[0][0];
      rec_qp    <= 3'(q);
      rec_blk   <= 4'(ev_blk[0]);
      for (int i = 0; i < 16; i++)
        rec_samples[i] <= 8'(rec(q, 0, cur_mx * 16 + bx * 4 + i % 4, cur_my * 16 + by * 4 + i / 4));
      void'(ev_due.pop_front()); void'(ev_is8.pop_front());
      void'(ev_qp.pop_front()); void'(ev_blk.pop_front());
    end
  end

  // mechanism probes
  always @(posedge clk) begin
    if (rst_n) begin
      if (4'(dut.u_ctrl.state) == 4'd4 && !dut.u_ctrl.deps_ok) n_dep_stall++;
      if (rec_valid && (4'(dut.u_ctrl.state) == 4'd5 || 4'(dut.u_ctrl.state) == 4'd1 || dut.u_ctrl.blk_go)) n_port_conflict++;
      if (dut.u_ctrl.filt_we) n_filt++;
      if (dut.u_ctrl.corner_ld_blk) n_corner++;
      if (4'(dut.u_ctrl.state) == 4'd9 && dut.u_ctrl.ur_sub && dut.u_ctrl.t_av && dut.u_ctrl.out_valid && dut.u_ctrl.out_info.kind != K_L16 && dut.u_ctrl.out_info.kind != K_C) n_ursub++;
      if (dut.u_ctrl.dc_sel16) n_dc16++;
      // a block starts from neighbours read during the previous outputs
      if ((4'(dut.u_ctrl.state) == 4'd3 || 4'(dut.u_ctrl.state) == 4'd4) && dut.u_ctrl.pf_hit) n_prefetch++;
    end
  end

  // expected schedule, as given for the design
  int sched_exp[28] = '{
    0*16+0, 1*16+0, 0*16+1, 2*16+1, 2*16+0, 0*16+2, 0*16+4, 1*16+1, 0*16+3, 0*16+5,
    2*16+2, 0*16+8, 0*16+6, 2*16+9, 0*16+9, 0*16+7, 3*16+1, 3*16+0, 0*16+10, 0*16+12,
    1*16+2, 0*16+11, 0*16+13, 3*16+2, 3*16+9, 0*16+14, 1*16+3, 0*16+15};

  function automatic int nmodes(input int n, input int bx, input int by, input bit l, input bit t, input bit tl);
    bit la, ta, ca;
    int m;
    la = (bx > 0) || l;
    ta = (by > 0) || t;
    if (bx > 0 && by > 0) ca = 1;
    else if (bx == 0 && by > 0) ca = l;
    else if (bx > 0) ca = t;
    else ca = tl;
    m = 1;                           // DC
    if (ta) m += 3;                  // V, DDL, VL
    if (la) m += 2;                  // H, HU
    if (la && ta && ca) m += 3;      // DDR, VR, HD
    return m;
  endfunction

  initial begin
    int total_cycles;
    int mbcycles[$];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    n_dep_stall = 0; n_port_conflict = 0; n_multi_qp = 0; n_filt = 0; n_plane = 0;
    n_corner = 0; n_ursub = 0; n_skip_mode = 0; n_dc16 = 0; n_wb = 0; n_b8_out = 0; n_prefetch = 0;
    total_cycles = 0;
    pic_w_mb = W_MB;
    flat_mb = FLAT_MB;
    repeat (2) @(posedge clk);
    for (int my = 0; my < H_MB; my++) begin
      for (int mx = 0; mx < W_MB; mx++) begin
        int mbi, exp_n;
        longint t0;
        int exp_seq[$];
        mbi = my * W_MB + mx;
        @(negedge clk);
        cur_mx = mx; cur_my = my;
        cur_l = (mx > 0); cur_t = (my > 0); cur_tl = (mx > 0 && my > 0); cur_tr = (my > 0 && mx < W_MB - 1);
        cur_delay = cfg_delay_of(mbi);
        cur_nqp = cfg_nqp_of(mbi);
        mb_x = 7'(mx);
        avail_left = cur_l; avail_top = cur_t; avail_topleft = cur_tl; avail_topright = cur_tr;
        cfg_nqp = 3'(cur_nqp);
        cfg_en4 = cfg_en4_of(mbi); cfg_en8 = cfg_en8_of(mbi); cfg_en_plane = cfg_enpl_of(mbi);
        seq_obs.delete();
        exp_seq.delete();
        n_out = 0; last_key = -1; last_b4_key = -1;
        // expected schedule and number of predictions
        exp_n = 0;
        foreach (sched_exp[i]) begin
          int k, a;
          bit on;
          k = sched_exp[i] / 16; a = sched_exp[i] % 16;
          case (k)
            0: begin
              on = cfg_en4;
              if (on) exp_n += cur_nqp * nmodes(4, (a & 1) + ((a >> 2) & 1) * 2,
                                                ((a >> 1) & 1) + ((a >> 3) & 1) * 2, cur_l, cur_t, cur_tl);
            end
            1: begin
              on = cfg_en8;
              if (on) exp_n += cur_nqp * 4 * nmodes(8, (a & 1) * 2, (a >> 1) * 2, cur_l, cur_t, cur_tl);
            end
            default: begin
              on = (a == 2) || (a == 0 && cur_t) || (a == 1 && cur_l) ||
                   (a == 9 && cfg_en_plane && cur_t && cur_l && cur_tl);
              if (on) exp_n += (k == 2) ? 16 : 8;
            end
          endcase
          if (on) exp_seq.push_back(sched_exp[i]);
          else n_skip_mode++;
        end
        if (!(cur_l && cur_t && cur_tl)) n_skip_mode++;
        while (!fin_ready) @(negedge clk);
        mb_start = 1'b1;
        t0 = cyc;
        @(negedge clk);
        mb_start = 1'b0;
        while (!mb_done) @(negedge clk);
        mbcycles.push_back(int'(cyc - t0));
        total_cycles += int'(cyc - t0);
        // schedule order and count
        checks++;
        if (seq_obs.size() != exp_seq.size()) begin
          failures++;
          $display("SCHEDULE: mb %0d has %0d steps, expected %0d", mbi, seq_obs.size(), exp_seq.size());
        end else begin
          foreach (exp_seq[i]) if (seq_obs[i] != exp_seq[i]) begin
            failures++;
            $display("SCHEDULE: mb %0d step %0d is %s(%0d), expected %s(%0d)", mbi, i,
                     kname(seq_obs[i] / 16), seq_obs[i] % 16, kname(exp_seq[i] / 16), exp_seq[i] % 16);
            break;
          end
        end
        checks++;
        if (n_out != exp_n) begin
          failures++;
          $display("COUNT: mb %0d produced %0d 4x4 predictions, expected %0d", mbi, n_out, exp_n);
        end
        // drain the reconstruction loop, then write back the final reconstruction
        while (ev_due.size() > 0) @(negedge clk);
        @(negedge clk);
        for (int c = 0; c < 3; c++) begin
          int s;
          s = (c == 0) ? 16 : 8;
          while (!fin_ready) @(negedge clk);
          fin_valid = 1'b1;
          fin_comp = 2'(c);
          for (int i = 0; i < 16; i++) begin
            fin_bottom[i] = (i < s) ? 8'(rec(0, c, mx * s + i, my * s + s - 1)) : 8'd0;
            fin_right[i]  = (i < s) ? 8'(rec(0, c, mx * s + s - 1, my * s + i)) : 8'd0;
          end
          @(negedge clk);
          fin_valid = 1'b0;
          n_wb++;
          @(negedge clk);
        end
        if (mbi < 8 || mbi % 20 == 0 || REPORT_ALL)
          $display("mb (%0d,%0d): nqp %0d delay %0d en4 %0d en8 %0d: %0d cycles, %0d predictions",
                   mx, my, cur_nqp, cur_delay, cfg_en4, cfg_en8, mbcycles[$], n_out);
      end
    end
    repeat (5) @(posedge clk);
    $display("mechanisms: dep_stall=%0d port_conflict=%0d multi_qp=%0d prefilter=%0d plane=%0d corner_reg=%0d ur_subst=%0d skipped_steps=%0d dc16=%0d writeback=%0d b8=%0d prefetch=%0d",
             n_dep_stall, n_port_conflict, n_multi_qp, n_filt, n_plane, n_corner, n_ursub,
             n_skip_mode, n_dc16, n_wb, n_b8_out, n_prefetch);
    begin
      int mech[12];
      mech = '{n_dep_stall, n_port_conflict, n_multi_qp, n_filt, n_plane, n_corner, n_ursub,
               n_skip_mode, n_dc16, n_wb, n_b8_out, n_prefetch};
      foreach (mech[i]) begin
        checks++;
        if (mech[i] == 0) begin
          failures++;
          $display("MECHANISM %0d never happened", i);
        end
      end
    end
    $display("total %0d cycles for %0d macroblocks", total_cycles, W_MB * H_MB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

