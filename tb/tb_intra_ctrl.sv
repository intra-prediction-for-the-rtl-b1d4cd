// tb_intra_ctrl: the controller alone, with a behavioural reconstruction
// loop (each finished 4x4/8x8 block returns its 4x4 blocks after a random
// delay, one per cycle) and a plane generator stand-in (done 32 cycles after
// pl_start). For random macroblock positions, neighbour availability,
// 1..7 QPs and enables it checks:
//  - the order of the 28 schedule steps and the number of predictions;
//  - that no 4x4/8x8 block is predicted before every in-macroblock
//    neighbour block it reads (same QP, same block size) was returned;
//  - the addresses and data of the reconstruction writes (bottom row on
//    port A, right column on port B);
//  - the line and left-column writes of the final writeback;
//  - that plane seeds are loaded only after the plane generator is done.
module tb_intra_ctrl;
  import intra_pkg::*;

  localparam int W = 120;
  logic clk = 0, rst_n = 0;
  logic mb_start = 0;
  logic [6:0] mb_x = '0;
  logic avail_left = 0, avail_top = 0, avail_topleft = 0, avail_topright = 0;
  logic [2:0] cfg_nqp = 3'd1;
  logic cfg_en4 = 1, cfg_en8 = 1, cfg_en_plane = 1;
  logic mb_busy, mb_done;
  logic rec_valid = 0, rec_is8 = 0;
  logic [2:0] rec_qp = '0;
  logic [3:0] rec_blk = '0;
  blk16_t rec_samples = '0;
  logic fin_valid = 0;
  logic [1:0] fin_comp = '0;
  logic [15:0][7:0] fin_bottom = '0, fin_right = '0;
  logic fin_ready;
  logic ra_en, ra_we, rb_en, rb_we;
  logic [10:0] ra_addr, rb_addr;
  logic [31:0] ra_wdata, rb_wdata;
  cap_t cap_a, cap_b;
  logic corner_ld_blk, corner_bank, blk_bank, corner_ld_mb, corner_we, filt_we, ur_sub, blk_n8;
  logic [1:0] corner_comp;
  mode_e core_mode;
  logic core_n8, core_pass, core_av_left, core_av_top, core_av_corner;
  logic [3:0] core_ox, core_oy;
  logic [2:0] core_src;
  logic [1:0] core_dc_sel;
  logic dc_add, dc_clr, dc_sel16, dc_use_top, dc_use_left;
  logic [1:0] dc_gt, dc_gl;
  logic pl_start, pl_done = 0, seed_load, seed_step, seed_row_end;
  logic [1:0] seed_comp;
  logic out_valid;
  pred_info_t out_info;

  intra_ctrl dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int zzi(input int bx, input int by);
    return (bx & 1) + ((by & 1) << 1) + ((bx & 2) << 1) + ((by & 2) << 2);
  endfunction

  // ---------------------------------------------------------- plane stand-in
  int pl_cnt = -1;
  always @(posedge clk) begin
    if (pl_start) begin pl_done <= 1'b0; pl_cnt <= 32; end
    else if (pl_cnt > 0) pl_cnt <= pl_cnt - 1;
    else if (pl_cnt == 0) begin pl_done <= 1'b1; pl_cnt <= -1; end
  end

  // --------------------------------------------- reconstruction loop model
  int  cur_delay, cur_nqp;
  bit  cur_l, cur_t, cur_tl;
  bit  done_blk [2][8][16];       // returned blocks of this macroblock
  longint ev_due[$];
  int  ev_is8[$], ev_qp[$], ev_blk[$];
  int  seq_obs[$];
  int  n_out, last_key;

  function automatic blk16_t rec_data(input int s, input int q, input int b);
    blk16_t r;
    for (int i = 0; i < 16; i++) r[i] = 8'((s * 97 + q * 31 + b * 17 + i * 7) % 256);
    return r;
  endfunction

  always @(negedge clk) begin
    rec_valid <= 1'b0;
    if (ev_due.size() > 0 && ev_due[0] <= cyc) begin
      rec_valid   <= 1'b1;
      rec_is8     <= ev_is8[0][0];
      rec_qp      <= 3'(ev_qp[0]);
      rec_blk     <= 4'(ev_blk[0]);
      rec_samples <= rec_data(ev_is8[0], ev_qp[0], ev_blk[0]);
      done_blk[ev_is8[0]][ev_qp[0]][ev_blk[0]] = 1'b1;
      void'(ev_due.pop_front()); void'(ev_is8.pop_front());
      void'(ev_qp.pop_front()); void'(ev_blk.pop_front());
    end
  end

  function automatic bit have(input int s, input int q, input int bx, input int by);
    if (bx < 0 || by < 0 || bx > 3) return 1'b1;   // outside: not this macroblock
    return done_blk[s][q][zzi(bx, by)];
  endfunction

  // ----------------------------------------------------------------- monitor
  int n_dep_fail = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int k, bx, by, q, key, s;
      bit ok;
      k = int'(out_info.kind); bx = int'(out_info.bx); by = int'(out_info.by); q = int'(out_info.qp);
      n_out++;
      case (k)
        0: key = zzi(bx, by);
        1: key = 16 + (zzi(bx, by) >> 2);
        default: key = k * 16 + int'(out_info.mode);
      endcase
      if (key != last_key) seq_obs.push_back(key);
      // dependencies, checked on every output of a block
      if (k <= 1) begin
        int ox, oy, n;
        s = k; n = (k == 0) ? 1 : 2;
        ox = (k == 0) ? bx : (bx & 2);
        oy = (k == 0) ? by : (by & 2);
        ok = 1'b1;
        for (int j = 0; j < n; j++) begin
          ok &= have(s, q, ox - 1, oy + j);
          ok &= have(s, q, ox + j, oy - 1);
        end
        ok &= have(s, q, ox - 1, oy - 1);
        // upper right, when inside the macroblock and coded earlier
        if (ox + n <= 3 && oy > 0 && zzi(ox + n, oy - 1) < zzi(ox, oy))
          for (int j = 0; j < n; j++) ok &= have(s, q, ox + n + j, oy - 1);
        checks++;
        if (!ok) begin
          failures++; n_dep_fail++;
          if (n_dep_fail < 5) $display("DEPENDENCY: %s block (%0d,%0d) qp %0d predicted before its neighbours",
                                       k ? "8x8" : "4x4", ox, oy, q);
        end
      end
      if (key != last_key && k <= 1) ; // nothing more
      last_key = key;
      if (out_info.last && k <= 1) begin
        if (k == 0) begin
          ev_due.push_back(cyc + cur_delay); ev_is8.push_back(0);
          ev_qp.push_back(q); ev_blk.push_back(zzi(bx, by));
        end else
          for (int j = 0; j < 4; j++) begin
            ev_due.push_back(cyc + cur_delay); ev_is8.push_back(1);
            ev_qp.push_back(q); ev_blk.push_back((zzi(bx, by) & 12) + j);
          end
      end
    end
    // reconstruction writes
    if (rst_n && rec_valid) begin
      blk16_t r;
      r = rec_samples;
      checks++;
      if (!(ra_en && ra_we && rb_en && rb_we &&
            ra_addr == inner_addr(rec_is8, rec_qp, rec_blk, 1'b0) &&
            rb_addr == inner_addr(rec_is8, rec_qp, rec_blk, 1'b1) &&
            ra_wdata == {r[15], r[14], r[13], r[12]} &&
            rb_wdata == {r[15], r[11], r[7], r[3]})) begin
        failures++;
        $display("REC WRITE wrong for block %0d qp %0d", rec_blk, rec_qp);
      end
    end
    if (rst_n && seed_load && !pl_done) begin
      failures++;
      $display("PLANE seed loaded before the plane generator finished");
    end
  end

  // expected schedule
  int sched_exp[28] = '{
    0*16+0, 1*16+0, 0*16+1, 2*16+1, 2*16+0, 0*16+2, 0*16+4, 1*16+1, 0*16+3, 0*16+5,
    2*16+2, 0*16+8, 0*16+6, 2*16+9, 0*16+9, 0*16+7, 3*16+1, 3*16+0, 0*16+10, 0*16+12,
    1*16+2, 0*16+11, 0*16+13, 3*16+2, 3*16+9, 0*16+14, 1*16+3, 0*16+15};

  function automatic int nmodes(input int bx, input int by, input bit l, input bit t, input bit tl);
    bit la, ta, ca;
    int m;
    la = (bx > 0) || l;
    ta = (by > 0) || t;
    if (bx > 0 && by > 0) ca = 1;
    else if (bx == 0 && by > 0) ca = l;
    else if (bx > 0) ca = t;
    else ca = tl;
    m = 1;
    if (ta) m += 3;
    if (la) m += 2;
    if (la && ta && ca) m += 3;
    return m;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int mb = 0; mb < 40; mb++) begin
      int exp_n, mx;
      int exp_seq[$];
      @(negedge clk);
      mx = $urandom_range(0, W - 1);
      cur_l = (mb % 5 != 0); cur_t = (mb % 7 != 1); cur_tl = cur_l && cur_t && (mb % 3 != 2);
      cur_delay = $urandom_range(0, 40);
      cur_nqp = 1 + (mb % 7);
      mb_x = 7'(mx);
      avail_left = cur_l; avail_top = cur_t; avail_topleft = cur_tl;
      avail_topright = cur_t && $urandom_range(0, 1);
      cfg_nqp = 3'(cur_nqp);
      cfg_en4 = (mb % 11 != 3); cfg_en8 = (mb % 13 != 4); cfg_en_plane = (mb % 9 != 5);
      foreach (done_blk[s, q, b]) done_blk[s][q][b] = 1'b0;
      seq_obs.delete(); exp_seq.delete();
      n_out = 0; last_key = -1;
      exp_n = 0;
      foreach (sched_exp[i]) begin
        int k, a;
        bit on;
        k = sched_exp[i] / 16; a = sched_exp[i] % 16;
        case (k)
          0: begin
            on = cfg_en4;
            if (on) exp_n += cur_nqp * nmodes((a & 1) + ((a >> 2) & 1) * 2,
                                              ((a >> 1) & 1) + ((a >> 3) & 1) * 2, cur_l, cur_t, cur_tl);
          end
          1: begin
            on = cfg_en8;
            if (on) exp_n += cur_nqp * 4 * nmodes((a & 1) * 2, (a >> 1) * 2, cur_l, cur_t, cur_tl);
          end
          default: begin
            on = (a == 2) || (a == 0 && cur_t) || (a == 1 && cur_l) ||
                 (a == 9 && cfg_en_plane && cur_t && cur_l && cur_tl);
            if (on) exp_n += (k == 2) ? 16 : 8;
          end
        endcase
        if (on) exp_seq.push_back(sched_exp[i]);
      end
      while (!fin_ready) @(negedge clk);
      mb_start = 1'b1;
      @(negedge clk);
      mb_start = 1'b0;
      while (!mb_done) @(negedge clk);
      checks += 2;
      if (n_out != exp_n) begin
        failures++;
        $display("COUNT: mb %0d gave %0d predictions, expected %0d", mb, n_out, exp_n);
      end
      if (seq_obs != exp_seq) begin
        failures++;
        $display("SCHEDULE: mb %0d order differs (%0d steps, expected %0d)", mb, seq_obs.size(), exp_seq.size());
      end
      // final writeback, checked write by write
      while (ev_due.size() > 0) @(negedge clk);
      for (int c = 0; c < 3; c++) begin
        int nw, lw, lftw;
        nw = (c == 0) ? 4 : 2;
        lw = 0; lftw = 0;
        for (int i = 0; i < 16; i++) begin
          fin_bottom[i] = 8'($urandom_range(0, 255));
          fin_right[i]  = 8'($urandom_range(0, 255));
        end
        while (!fin_ready) @(negedge clk);
        fin_valid = 1'b1; fin_comp = 2'(c);
        @(negedge clk);
        fin_valid = 1'b0;
        for (int t = 0; t < 12; t++) begin
          if (ra_en && ra_we) begin
            checks++;
            if (ra_addr != 11'(LINE_WORDS * c + mx * nw + lw) || ra_wdata != fin_bottom[4 * lw +: 4]) begin
              failures++;
              $display("WRITEBACK line word %0d comp %0d wrong (addr %0d)", lw, c, ra_addr);
            end
            lw++;
          end
          if (rb_en && rb_we) begin
            checks++;
            if (rb_addr != 11'(LEFT_BASE + ((c == 0) ? 0 : 2 + 2 * c) + lftw) ||
                rb_wdata != fin_right[4 * lftw +: 4]) begin
              failures++;
              $display("WRITEBACK left word %0d comp %0d wrong (addr %0d)", lftw, c, rb_addr);
            end
            lftw++;
          end
          @(negedge clk);
        end
        checks++;
        if (lw != nw || lftw != nw) begin
          failures++;
          $display("WRITEBACK comp %0d wrote %0d line and %0d left words", c, lw, lftw);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
