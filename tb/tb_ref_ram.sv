// tb_ref_ram: fills the whole 8 KB RAM through both ports, then runs random
// mixed traffic (reads and writes on both ports in the same cycle, to
// different words) and compares every read, one cycle after its address,
// with a model array. Also checks read-before-write on one port.
module tb_ref_ram;
  logic        clk = 0;
  logic        a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [10:0] a_addr = '0, b_addr = '0;
  logic [31:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;

  ref_ram dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
               .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] model [2048];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i += 2) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 11'(i);     a_wdata = $urandom;
      b_en = 1; b_we = 1; b_addr = 11'(i + 1); b_wdata = $urandom;
      model[i] = a_wdata; model[i + 1] = b_wdata;
    end
    for (int it = 0; it < 5000; it++) begin
      logic [31:0] ea, eb;
      logic ra, rb;
      @(negedge clk);
      a_en = 1; b_en = $urandom_range(0, 3) != 0;
      a_addr = 11'($urandom_range(0, 2047));
      b_addr = 11'($urandom_range(0, 2047));
      if (b_addr == a_addr) b_addr = a_addr + 11'd1;
      a_we = $urandom_range(0, 2) == 0;
      b_we = $urandom_range(0, 2) == 0;
      a_wdata = $urandom; b_wdata = $urandom;
      ea = model[a_addr]; eb = model[b_addr];
      ra = !a_we; rb = b_en && !b_we;
      if (a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;
      @(negedge clk);
      a_en = 0; b_en = 0; a_we = 0; b_we = 0;
      if (ra) begin
        checks++;
        if (a_rdata !== ea) begin failures++; $display("MISMATCH port A word %0d", a_addr); end
      end else begin
        // a write returns the old contents
        checks++;
        if (a_rdata !== ea) begin failures++; $display("MISMATCH port A read-before-write"); end
      end
      if (rb) begin
        checks++;
        if (b_rdata !== eb) begin failures++; $display("MISMATCH port B word %0d", b_addr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
