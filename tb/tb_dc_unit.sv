// tb_dc_unit: random 4x4 (1 cycle), 8x8 (2 cycles), 16x16 (4 cycles) and
// single-side DC sums with random availability. Checks dc_now in the last
// cycle of each sum, dc_q one cycle later, and that dc16_q keeps the 16x16
// result while later 4x4 sums run. Expected values are the DC equations of
// the standard: (sum + n/2) / n, or 128 with no neighbours.
module tb_dc_unit;
  import intra_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  add = 0, clr = 0, sel16 = 0, use_top = 0, use_left = 0;
  word_t top4 = '0, left4 = '0;
  pix_t  dc_now, dc_q, dc16_q;

  dc_unit dut (.clk, .rst_n, .add, .clr, .sel16, .use_top, .use_left, .top4, .left4,
               .dc_now, .dc_q, .dc16_q);

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last16;
    last16 = 128;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(int'(dc_q), 128, "reset dc_q");
    for (int it = 0; it < 600; it++) begin
      int ncyc, sum, n, ut, ul, exp_v;
      bit is16;
      ncyc = (it % 3 == 0) ? 1 : (it % 3 == 1) ? 2 : 4;
      is16 = (ncyc == 4);
      ut = $urandom_range(0, 3) != 0;
      ul = $urandom_range(0, 3) != 0;
      sum = 0; n = 0;
      for (int c = 0; c < ncyc; c++) begin
        @(negedge clk);
        add = 1; clr = (c == 0); sel16 = is16 && (c == ncyc - 1);
        use_top = ut[0]; use_left = ul[0];
        for (int j = 0; j < 4; j++) begin
          top4[j]  = 8'($urandom_range(0, 255));
          left4[j] = 8'($urandom_range(0, 255));
          if (it % 17 == 0) begin top4[j] = 8'd255; left4[j] = 8'd255; end
          if (ut) sum += int'(top4[j]);
          if (ul) sum += int'(left4[j]);
        end
        n += 4 * (ut + ul);
        #1;
        if (c == ncyc - 1) begin
          exp_v = (n == 0) ? 128 : (sum + n / 2) / n;
          chk(int'(dc_now), exp_v, $sformatf("dc_now (%0d cycles, top %0d left %0d)", ncyc, ut, ul));
        end
      end
      exp_v = (n == 0) ? 128 : (sum + n / 2) / n;
      @(negedge clk);
      add = 0; clr = 0; sel16 = 0;
      chk(int'(dc_q), exp_v, "dc_q");
      if (is16) last16 = exp_v;
      chk(int'(dc16_q), last16, "dc16_q held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
