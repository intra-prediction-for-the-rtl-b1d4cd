// tb_plane_gen: random macroblock neighbours (and saturated ones); after
// start the generator must finish in 32 cycles (8+8 luma terms, 4+4 per
// chroma component, one term per cycle). Then, for each component, the
// seed of every 4x4 block in raster order and b, c are compared with
//   seed = a + b*(x0-ctr) + c*(y0-ctr) + 16
// with a, b, c from the plane equations of the standard (multiplications
// written out, luma factor 5, chroma 4:2:0 factor 34).
module tb_plane_gen;
  import intra_pkg::*;

  logic               clk = 0, rst_n = 0, start = 0;
  edge_t              edge_y, edge_cb, edge_cr;
  logic               done, seed_load = 0, seed_step = 0, seed_row_end = 0;
  logic [1:0]         seed_comp = '0;
  logic signed [19:0] seed;
  logic signed [15:0] pb, pc;

  plane_gen dut (.clk, .rst_n, .start, .edge_y, .edge_cb, .edge_cr, .done, .seed_load,
                 .seed_comp, .seed_step, .seed_row_end, .seed, .pb, .pc);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input int got, input int exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s: got %0d exp %0d", what, got, exp_v);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    edge_y = '0; edge_cb = '0; edge_cr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      int cyc;
      for (int i = 0; i < 33; i++) begin
        edge_y[i]  = 8'($urandom_range(0, 255));
        edge_cb[i] = 8'($urandom_range(0, 255));
        edge_cr[i] = 8'($urandom_range(0, 255));
        if (it % 10 == 1) begin   // steepest gradients
          edge_y[i]  = (i < 16) ? 8'd0 : 8'd255;
          edge_cb[i] = (i < 16) ? 8'd255 : 8'd0;
          edge_cr[i] = (i < 16) ? 8'd0 : 8'd255;
        end
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;
      while (!done) begin
        @(negedge clk);
        cyc++;
        if (cyc > 100) break;
      end
      chk(cyc, 32, "cycles to done");
      for (int c = 0; c < 3; c++) begin
        edge_t e;
        int k, s, hh, vv, a, b, cc, ctr;
        e = (c == 0) ? edge_y : (c == 1) ? edge_cb : edge_cr;
        k = (c == 0) ? 8 : 4;
        s = 2 * k;
        ctr = k - 1;
        hh = 0; vv = 0;
        for (int i = 0; i < k; i++) begin
          hh += (i + 1) * (int'(e[17 + k + i]) - int'(e[17 + k - 2 - i]));
          vv += (i + 1) * (int'(e[15 - k - i]) - int'(e[15 - k + 2 + i]));
        end
        a = 16 * (int'(e[15 - (s - 1)]) + int'(e[17 + s - 1]));
        if (c == 0) begin b = (5 * hh + 32) >>> 6; cc = (5 * vv + 32) >>> 6; end
        else        begin b = (34 * hh + 32) >>> 6; cc = (34 * vv + 32) >>> 6; end
        seed_load = 1; seed_comp = 2'(c);
        @(negedge clk);
        seed_load = 0;
        chk(int'(pb), b, $sformatf("b comp %0d", c));
        chk(int'(pc), cc, $sformatf("c comp %0d", c));
        for (int by = 0; by < s / 4; by++) begin
          for (int bx = 0; bx < s / 4; bx++) begin
            chk(int'(seed), a + b * (4 * bx - ctr) + cc * (4 * by - ctr) + 16,
                $sformatf("seed comp %0d block (%0d,%0d)", c, bx, by));
            seed_step = 1; seed_row_end = (bx == s / 4 - 1);
            @(negedge clk);
            seed_step = 0; seed_row_end = 0;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
