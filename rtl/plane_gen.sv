// plane_gen: plane parameter generator with its own small FSM.
//
// After start it computes, for luma and both chroma components (4:2:0), the
// plane gradients H and V, and from them a, b and c:
//   H = sum_{i=0}^{K-1} (i+1) * (p[K+i,-1] - p[K-2-i,-1])   (V likewise on
//   the left column), K = 8 for luma, 4 for chroma
//   a = 16 * (p[-1,2K-1] + p[2K-1,-1])
//   luma:   b = (5*H + 32) >> 6       chroma: b = (34*H + 32) >> 6
// The multiplication by (i+1) is done as in the original architecture: each cycle the
// difference of one sample pair is shifted by 0..3 places, the up to four
// shifted values selected by the bits of (i+1) are added, and the sum is
// accumulated. The factors 5 and 34 are shift-adds too. One term per cycle:
// 8+8 cycles for luma, 4+4 per chroma component, 32 cycles in all, then
// done goes high until the next start.
//
// Seeds (plane samples before the shift and clip) are kept per 4x4 block in
// raster order: seed_load sets the seed of the upper-left 4x4 block,
//   seed0 = a - ctr*b - ctr*c + 16, ctr = 7 (luma) or 3 (chroma),
// seed_step moves to the next block, adding 4b inside a row or 4c to the
// row seed at a row end (seed_row_end=1), as in the original architecture's seed update.
// The original architecture keeps eight seeds for two columns; one block seed plus a row
// seed give the same values here because pred_core adds b and c per lane.
//
// Inputs: the three macroblock edge arrays (intra_pkg layout). Outputs: the
// current seed, b and c of the component chosen by seed_comp at seed_load.
module plane_gen
  import intra_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  edge_t              edge_y,
  input  edge_t              edge_cb,
  input  edge_t              edge_cr,
  output logic               done,
  input  logic               seed_load,
  input  logic [1:0]         seed_comp,
  input  logic               seed_step,
  input  logic               seed_row_end,
  output logic signed [19:0] seed,
  output logic signed [15:0] pb,
  output logic signed [15:0] pc
);

  typedef enum logic [1:0] {P_IDLE, P_RUN, P_DONE} pstate_e;
  pstate_e st;

  logic [2:0]         phase;   // 0 YH, 1 YV, 2 CbH, 3 CbV, 4 CrH, 5 CrV
  logic [2:0]         term;
  logic signed [17:0] acc;
  logic signed [15:0] b_r [3];
  logic signed [15:0] c_r [3];
  logic signed [15:0] a_r [3];
  logic [1:0]         cur;
  logic signed [19:0] row_seed;

  edge_t              e;
  logic [3:0]         kk;
  logic signed [9:0]  d;
  logic signed [17:0] term_v, acc_nx, mul_v;
  logic signed [15:0] par_v;
  logic [3:0]         fac;

  // current component and the difference of the current sample pair
  always_comb begin
    case (phase[2:1])
      2'd0:    e = edge_y;
      2'd1:    e = edge_cb;
      default: e = edge_cr;
    endcase
    kk  = (phase[2:1] == 2'd0) ? 4'd8 : 4'd4;
    fac = 4'(term) + 4'd1;
    if (!phase[0])   // horizontal: p[K+i,-1] - p[K-2-i,-1]
      d = 10'(e[17 + int'(kk) + int'(term)]) - 10'(e[17 + int'(kk) - 2 - int'(term)]);
    else             // vertical:   p[-1,K+i] - p[-1,K-2-i]
      d = 10'(e[15 - int'(kk) - int'(term)]) - 10'(e[15 - int'(kk) + 2 + int'(term)]);
    term_v = (fac[0] ? 18'(d)        : 18'sd0) + (fac[1] ? 18'(d) <<< 1 : 18'sd0)
           + (fac[2] ? 18'(d) <<< 2  : 18'sd0) + (fac[3] ? 18'(d) <<< 3 : 18'sd0);
    acc_nx = ((term == 3'd0) ? 18'sd0 : acc) + term_v;
    // 5*X for luma, 34*X for chroma, then (.. + 32) >> 6
    if (phase[2:1] == 2'd0) mul_v = (acc_nx <<< 2) + acc_nx;
    else                    mul_v = (acc_nx <<< 5) + (acc_nx <<< 1);
    par_v = 16'((mul_v + 18'sd32) >>> 6);
  end

  function automatic logic signed [19:0] seed0(input int c);
    logic signed [19:0] bb, cc;
    bb = 20'(b_r[c]);
    cc = 20'(c_r[c]);
    if (c == 0) return 20'(a_r[c]) - ((bb <<< 3) - bb) - ((cc <<< 3) - cc) + 20'sd16;
    else        return 20'(a_r[c]) - ((bb <<< 1) + bb) - ((cc <<< 1) + cc) + 20'sd16;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= P_IDLE;
      phase <= '0;
      term  <= '0;
      acc   <= '0;
      for (int i = 0; i < 3; i++) begin
        a_r[i] <= '0;
        b_r[i] <= '0;
        c_r[i] <= '0;
      end
    end else begin
      case (st)
        P_IDLE, P_DONE: if (start) begin
          st    <= P_RUN;
          phase <= '0;
          term  <= '0;
          // the separate circuit for a: two samples, weight 16
          a_r[0] <= 16'((16'(edge_y[0])  + 16'(edge_y[32]))  << 4);
          a_r[1] <= 16'((16'(edge_cb[8]) + 16'(edge_cb[24])) << 4);
          a_r[2] <= 16'((16'(edge_cr[8]) + 16'(edge_cr[24])) << 4);
        end
        P_RUN: begin
          acc <= acc_nx;
          if (term == 3'(kk - 4'd1)) begin
            if (!phase[0]) b_r[phase[2:1]] <= par_v;
            else           c_r[phase[2:1]] <= par_v;
            term <= '0;
            if (phase == 3'd5) st <= P_DONE;
            else               phase <= phase + 3'd1;
          end else begin
            term <= term + 3'd1;
          end
        end
        default: st <= P_IDLE;
      endcase
    end
  end

  assign done = (st == P_DONE);

  // seed registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur      <= '0;
      seed     <= '0;
      row_seed <= '0;
    end else if (seed_load) begin
      cur      <= seed_comp;
      seed     <= seed0(int'(seed_comp));
      row_seed <= seed0(int'(seed_comp));
    end else if (seed_step) begin
      if (seed_row_end) begin
        row_seed <= row_seed + (20'(c_r[cur]) <<< 2);
        seed     <= row_seed + (20'(c_r[cur]) <<< 2);
      end else begin
        seed     <= seed + (20'(b_r[cur]) <<< 2);
      end
    end
  end

  assign pb = b_r[cur];
  assign pc = c_r[cur];

endmodule
