// tb_pred_core: checks the prediction core against the reference model of
// the standard (intra_ref_pkg) on random neighbour sets: all nine 4x4
// modes, all nine 8x8 modes on each quarter, DC, 16x16 V/H at every block
// position, plane lanes from random seeds, and both prefilter passes with
// every combination of neighbour availability. The core is combinational;
// each vector is checked 1 ns after it is applied.
module tb_pred_core;
  import intra_pkg::*;
  import intra_ref_pkg::tarr_t;
  import intra_ref_pkg::larr_t;
  import intra_ref_pkg::pred_edges;
  import intra_ref_pkg::filter8;

  mode_e              mode;
  logic               n8;
  logic [3:0]         ox, oy;
  edge_t              edge_s;
  pix_t               dc;
  logic signed [19:0] seed;
  logic signed [15:0] pb, pc;
  logic               filt_pass, av_left, av_top, av_corner;
  blk16_t             pred;

  pred_core dut (.mode, .n8, .ox, .oy, .edge_s, .dc, .seed, .pb, .pc, .filt_pass,
                 .av_left, .av_top, .av_corner, .pred);

  int checks = 0, failures = 0;

  task automatic check(input blk16_t exp_b, input string what);
    #1;
    checks++;
    if (pred !== exp_b) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s: got %h exp %h", what, pred, exp_b);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tarr_t T, Tf;
    larr_t L, Lf;
    blk16_t e;
    mode = M_DC; n8 = 0; ox = 0; oy = 0; edge_s = '0; dc = 0; seed = 0; pb = 0; pc = 0;
    filt_pass = 0; av_left = 1; av_top = 1; av_corner = 1;
    for (int it = 0; it < 300; it++) begin
      // random neighbours, with some extreme sets
      for (int i = 0; i < 33; i++) begin
        case (it % 10)
          0:       edge_s[i] = 8'd255;
          1:       edge_s[i] = (i % 2) ? 8'd255 : 8'd0;
          default: edge_s[i] = 8'($urandom_range(0, 255));
        endcase
      end
      for (int i = -1; i < 16; i++) T[i] = int'(edge_s[17 + i]);
      for (int i = -1; i < 8; i++)  L[i] = int'(edge_s[15 - i]);
      // 4x4
      n8 = 0; ox = 0; oy = 0;
      for (int m = 0; m < 9; m++) begin
        mode = mode_e'(m);
        dc = 8'($urandom_range(0, 255));
        e = pred_edges(4, T, L, 1, 1, m, 0, 0);
        if (m == 2) e = {16{dc}};
        check(e, $sformatf("4x4 mode %0d", m));
      end
      // 8x8 quarters
      n8 = 1;
      for (int m = 0; m < 9; m++) begin
        for (int qd = 0; qd < 4; qd++) begin
          mode = mode_e'(m);
          ox = 4'((qd % 2) * 4); oy = 4'((qd / 2) * 4);
          e = pred_edges(8, T, L, 1, 1, m, qd % 2, qd / 2);
          if (m == 2) e = {16{dc}};
          check(e, $sformatf("8x8 mode %0d quarter %0d", m, qd));
        end
      end
      // 16x16 V and H at every block
      n8 = 0;
      for (int b = 0; b < 16; b++) begin
        ox = 4'((b % 4) * 4); oy = 4'((b / 4) * 4);
        mode = M_V;
        for (int i = 0; i < 16; i++) e[i] = edge_s[17 + (b % 4) * 4 + i % 4];
        check(e, "16x16 V");
        mode = M_H;
        for (int i = 0; i < 16; i++) e[i] = edge_s[15 - (b / 4) * 4 - i / 4];
        check(e, "16x16 H");
      end
      // plane lanes
      mode = M_PLANE;
      seed = 20'($signed($urandom_range(0, 24000)) - 12000);
      pb = 16'($signed($urandom_range(0, 2800)) - 1400);
      pc = 16'($signed($urandom_range(0, 2800)) - 1400);
      for (int i = 0; i < 16; i++) begin
        int v;
        v = (int'(seed) + int'(pb) * (i % 4) + int'(pc) * (i / 4)) >>> 5;
        e[i] = (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
      end
      check(e, "plane");
      // prefilter, both passes, all availability combinations
      mode = M_FILT;
      for (int av = 0; av < 8; av++) begin
        bit ta, la, ca;
        la = av[0]; ta = av[1]; ca = av[2];
        if (!ta && !la) continue;
        av_left = la; av_top = ta; av_corner = ca;
        Tf = T; Lf = L;
        filter8(T, L, ta, la, ca, Tf, Lf);
        for (int p = 0; p < 2; p++) begin
          filt_pass = p[0];
          #1;
          for (int l = 0; l < 16; l++) begin
            int k, ev;
            bit cmp;
            k = 8 + 16 * p + l;
            cmp = 0; ev = 0;
            if (k > 32) continue;
            if (k >= 17 && ta) begin cmp = 1; ev = Tf[k - 17]; end
            if (k == 16 && ca) begin cmp = 1; ev = Tf[-1]; end
            if (k <= 15 && la) begin cmp = 1; ev = Lf[15 - k]; end
            if (cmp) begin
              checks++;
              if (int'(pred[l]) != ev) begin
                failures++;
                if (failures < 10) $display("MISMATCH filter idx %0d av %0d: got %0d exp %0d", k, av, pred[l], ev);
              end
            end
          end
        end
      end
      av_left = 1; av_top = 1; av_corner = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
