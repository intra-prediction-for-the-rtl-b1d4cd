// tb_intra_predictor_cycles: cycles per macroblock against the delay of
// the reconstruction loop, for the configurations the evaluation compares:
// 4x4 and 8x8 together, 4x4 only, 8x8 only (16x16 and chroma always on),
// and 1 to 7 QPs. A 22x2 macroblock picture is coded; the first row only
// sets up the picture line, and every macroblock of the second row (all
// neighbours available) runs one configuration and prints its cycle count.
// All predictions, the schedule and the output rate are checked as in
// tb_intra_predictor.
module tb_intra_predictor_cycles;
  import intra_pkg::*;
  import intra_ref_pkg::*;

  localparam int W_MB = 22;
  localparam int H_MB = 2;
  localparam int FLAT_MB = 100;
  localparam bit REPORT_ALL = 1'b1;
  localparam int WATCHDOG = 400000;

  // configuration of row-1 macroblock j = mx - 1
  function automatic int jj(input int i);
    return (i >= W_MB && i % W_MB >= 1 && i % W_MB <= 20) ? i % W_MB - 1 : -1;
  endfunction
  function automatic int cfg_nqp_of(input int i);
    int j;
    j = jj(i);
    if (j >= 12 && j <= 17) return j - 10;
    if (j == 18) return 3;
    if (j == 19) return 7;
    return 1;
  endfunction
  function automatic int cfg_delay_of(input int i);
    int d6[6] = '{0, 10, 20, 30, 40, 60};
    int d3[3] = '{10, 40, 60};
    int j;
    j = jj(i);
    if (j < 0) return 0;
    if (j < 6) return d6[j];
    if (j < 12) return d3[(j - 6) % 3];
    if (j < 18) return 40;
    return 10;
  endfunction
  function automatic bit cfg_en4_of(input int i);
    int j;
    j = jj(i);
    return !(j >= 9 && j <= 11);
  endfunction
  function automatic bit cfg_en8_of(input int i);
    int j;
    j = jj(i);
    return !(j >= 6 && j <= 8);
  endfunction
  function automatic bit cfg_enpl_of(input int i);
    return 1'b1;
  endfunction

  `include "intra_tb_body.svh"

  // watchdog
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
