// ref_ram: the on-chip dual-port RAM of the intra predictor.
//
// 2048 words of 32 bits (8 KB), each word four adjacent 8-bit samples, so
// each port moves four samples per cycle. It holds the picture line above
// the current macroblock row (2 KB per colour component) and the
// reconstructed edges of the blocks of the current macroblock for both
// block sizes and all QPs (2 KB); see intra_pkg for the map.
//
// Two identical synchronous ports: write when en&we, otherwise read when
// en; read data appears one cycle after the address (read-before-write on a
// port). The two ports must not write the same word in one cycle. Contents
// are not reset.
module ref_ram #(
  parameter int unsigned WORDS = 2048,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end

  // both ports writing one word in the same cycle is a usage error
  always_ff @(posedge clk) begin
    assert (!(a_en && a_we && b_en && b_we && a_addr == b_addr))
      else $error("ref_ram: both ports write word %0d", a_addr);
  end

endmodule
