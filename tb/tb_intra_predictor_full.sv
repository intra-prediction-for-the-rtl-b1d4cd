// tb_intra_predictor_full: end-to-end test at full picture width. The
// predictor keeps its default parameters (120 macroblocks per line, 1920
// samples); two macroblock rows are coded, so every column of the line
// buffer is written and read back as the upper neighbour. Macroblocks use
// 1 to 7 QPs (the maximum the inner reference area holds) and
// reconstruction delays of 0 to 40 cycles. Checks are the same as in
// tb_intra_predictor (see intra_tb_body.svh).
module tb_intra_predictor_full;
  import intra_pkg::*;
  import intra_ref_pkg::*;

  localparam int W_MB = 120;
  localparam int H_MB = 2;
  localparam int FLAT_MB = 130;
  localparam bit REPORT_ALL = 1'b0;
  localparam int WATCHDOG = 3000000;

  function automatic int cfg_nqp_of(input int i);
    return 1 + (i % 7);
  endfunction
  function automatic int cfg_delay_of(input int i);
    case (i % 5)
      0: return 10;
      1: return 40;
      2: return 0;
      3: return 5;
      default: return 25;
    endcase
  endfunction
  function automatic bit cfg_en4_of(input int i);
    return i % 23 != 9;
  endfunction
  function automatic bit cfg_en8_of(input int i);
    return i % 29 != 10;
  endfunction
  function automatic bit cfg_enpl_of(input int i);
    return i % 31 != 11;
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
