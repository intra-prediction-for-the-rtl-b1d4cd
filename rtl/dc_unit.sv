// dc_unit: DC value of a 4x4, 8x8, 16x16 or chroma block.
//
// Each cycle with add=1 it sums one group of four upper samples and one
// group of four left samples (the two four-sample sums the original architecture's core
// forms in its DC configuration) and adds them to the running sum, or starts
// a new sum when clr=1. A 4x4 DC therefore takes one cycle, 8x8 two and
// 16x16 four, as in the original architecture. dc_now is the rounded mean of everything
// summed so far including this cycle's groups, (sum + n/2) >> log2(n), or 128
// when no neighbour is available, so the block that finishes a sum can be
// predicted in the same cycle. It is registered into dc_q (the DC_NxN
// register) and, when sel16=1, into dc16_q, the extra register that keeps the
// 16x16 result while other blocks use the accumulator.
//
// Timing: one cycle per add; dc_now is combinational, dc_q/dc16_q follow on
// the next edge. Reset clears the sum.
module dc_unit
  import intra_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          add,
  input  logic          clr,
  input  logic          sel16,
  input  logic          use_top,
  input  logic          use_left,
  input  word_t         top4,
  input  word_t         left4,
  output pix_t          dc_now,
  output pix_t          dc_q,
  output pix_t          dc16_q
);

  logic [12:0] acc, acc_nx;
  logic [5:0]  cnt, cnt_nx;
  logic [9:0]  st, sl;

  always_comb begin
    st = 10'(top4[0]) + 10'(top4[1]) + 10'(top4[2]) + 10'(top4[3]);
    sl = 10'(left4[0]) + 10'(left4[1]) + 10'(left4[2]) + 10'(left4[3]);
    acc_nx = (clr ? 13'd0 : acc) + (use_top ? 13'(st) : 13'd0) + (use_left ? 13'(sl) : 13'd0);
    cnt_nx = (clr ? 6'd0 : cnt) + (use_top ? 6'd4 : 6'd0) + (use_left ? 6'd4 : 6'd0);
    case (cnt_nx)
      6'd4:    dc_now = pix_t'((acc_nx + 13'd2)  >> 2);
      6'd8:    dc_now = pix_t'((acc_nx + 13'd4)  >> 3);
      6'd16:   dc_now = pix_t'((acc_nx + 13'd8)  >> 4);
      6'd32:   dc_now = pix_t'((acc_nx + 13'd16) >> 5);
      default: dc_now = 8'd128;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      cnt    <= '0;
      dc_q   <= 8'd128;
      dc16_q <= 8'd128;
    end else if (add) begin
      acc  <= acc_nx;
      cnt  <= cnt_nx;
      dc_q <= dc_now;
      if (sel16) dc16_q <= dc_now;
    end
  end

endmodule
