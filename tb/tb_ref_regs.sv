// tb_ref_regs: writes random RAM words into the register sets as upper
// words, left words (reversed into the edge layout) and corner samples on
// both capture ports, saves and loads corner registers, writes both
// prefilter passes, and checks every edge output against a model of the
// layout p[x,-1] -> 17+x, p[-1,-1] -> 16, p[-1,y] -> 15-y. Also checks the
// upper-right substitution for 4x4 and 8x8 blocks, on both banks of the
// block set.
module tb_ref_regs;
  import intra_pkg::*;

  logic   clk = 0, rst_n = 0;
  cap_t   cap_a = '0, cap_b = '0;
  word_t  data_a = '0, data_b = '0;
  logic   corner_ld_blk = 0, corner_bank = 0, blk_bank = 0, corner_ld_mb = 0, corner_we = 0;
  logic [1:0] corner_comp = '0;
  pix_t   corner_val = '0;
  logic   filt_we = 0, filt_pass = 0, ur_sub = 0, n8 = 0;
  blk16_t filt_data = '0;
  edge_t  blk_edge, filt_edge, mb_edge_y, mb_edge_cb, mb_edge_cr;

  ref_regs dut (.clk, .rst_n, .cap_a, .data_a, .cap_b, .data_b, .corner_ld_blk, .corner_bank, .blk_bank, .corner_ld_mb,
                .corner_we, .corner_comp, .corner_val, .filt_we, .filt_pass, .filt_data,
                .ur_sub, .n8, .blk_edge, .filt_edge, .mb_edge_y, .mb_edge_cb, .mb_edge_cr);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  int m_set [5][33];   // 4 is the second block set bank
  int m_filt [33];
  int m_corner [3];

  function automatic cap_t rcap();
    cap_t c;
    c.valid = 1'b1;
    c.set = 2'($urandom_range(0, 3));
    c.bank = 1'($urandom_range(0, 1));
    c.wk = wkind_e'($urandom_range(0, 2));
    c.k = 2'($urandom_range(0, 3));
    c.byte_sel = 2'($urandom_range(0, 3));
    return c;
  endfunction

  function automatic void mput(input cap_t c, input word_t w);
    int s;
    s = (c.set == 0 && c.bank) ? 4 : int'(c.set);
    case (c.wk)
      W_UP:   for (int j = 0; j < 4; j++) m_set[s][17 + 4 * c.k + j] = int'(w[j]);
      W_LEFT: for (int j = 0; j < 4; j++) m_set[s][15 - 4 * c.k - j] = int'(w[j]);
      default: m_set[s][16] = int'(w[c.byte_sel]);
    endcase
  endfunction

  task automatic compare();
    for (int i = 0; i < 33; i++) begin
      int eb, b;
      b = blk_bank ? 4 : 0;
      eb = m_set[b][i];
      if (ur_sub && !n8 && i >= 21 && i <= 24) eb = m_set[b][20];
      if (ur_sub && n8 && i >= 25) eb = m_set[b][24];
      checks += 5;
      if (int'(blk_edge[i]) != eb || int'(mb_edge_y[i]) != m_set[1][i] ||
          int'(mb_edge_cb[i]) != m_set[2][i] || int'(mb_edge_cr[i]) != m_set[3][i] ||
          (i >= 8 && int'(filt_edge[i]) != m_filt[i])) begin
        failures++;
        if (failures < 10) $display("MISMATCH edge index %0d", i);
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m_set[s, i]) m_set[s][i] = 0;
    foreach (m_filt[i]) m_filt[i] = 0;
    foreach (m_corner[i]) m_corner[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      cap_a = rcap(); cap_b = rcap();
      data_a = word_t'($urandom); data_b = word_t'($urandom);
      // the two ports target different sets in the design's use
      if (cap_b.set == cap_a.set) cap_b.valid = 1'b0;
      corner_we = $urandom_range(0, 7) == 0;
      corner_comp = 2'($urandom_range(0, 2));
      corner_val = 8'($urandom_range(0, 255));
      corner_bank = 1'($urandom_range(0, 1));
      blk_bank = 1'($urandom_range(0, 1));
      corner_ld_blk = $urandom_range(0, 9) == 0 &&
                      !(cap_a.set == 0 && cap_a.bank == corner_bank) &&
                      !(cap_b.valid && cap_b.set == 0 && cap_b.bank == corner_bank);
      corner_ld_mb = $urandom_range(0, 9) == 0 && cap_a.set == 0 && !cap_b.valid;
      filt_we = $urandom_range(0, 3) == 0;
      filt_pass = $urandom_range(0, 1);
      for (int l = 0; l < 16; l++) filt_data[l] = 8'($urandom_range(0, 255));
      ur_sub = $urandom_range(0, 1);
      n8 = $urandom_range(0, 1);
      // model, in the order of the design
      mput(cap_a, data_a);
      if (cap_b.valid) mput(cap_b, data_b);
      if (corner_ld_blk) m_set[corner_bank ? 4 : 0][16] = m_corner[0];
      if (corner_ld_mb) for (int c = 0; c < 3; c++) m_set[c + 1][16] = m_corner[c];
      if (corner_we) m_corner[corner_comp] = int'(corner_val);
      if (filt_we)
        for (int l = 0; l < 16; l++)
          if (8 + 16 * filt_pass + l <= 32) m_filt[8 + 16 * filt_pass + l] = int'(filt_data[l]);
      @(negedge clk);
      cap_a = '0; cap_b = '0; corner_we = 0; corner_ld_blk = 0; corner_ld_mb = 0; filt_we = 0;
      #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
