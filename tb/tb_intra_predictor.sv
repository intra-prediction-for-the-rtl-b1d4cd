// tb_intra_predictor: end-to-end test of the intra predictor on a 4x3
// macroblock picture with the design's default parameters. Macroblocks vary
// the number of QPs (1..3), the reconstruction loop delay (0, 10, 40
// cycles) and the enabled block sizes, so that dependency stalls, RAM port
// conflicts, skipped modes at picture edges, upper-right substitution,
// 8x8 prefiltering and the plane seeds all occur. One macroblock is
// saturated to exercise the plane clipping. See intra_tb_body.svh.
module tb_intra_predictor;
  import intra_pkg::*;
  import intra_ref_pkg::*;

  localparam int W_MB = 4;
  localparam int H_MB = 3;
  localparam int FLAT_MB = 6;
  localparam bit REPORT_ALL = 1'b0;
  localparam int WATCHDOG = 200000;

  function automatic int cfg_nqp_of(input int i);
    return 1 + (i % 3);
  endfunction
  function automatic int cfg_delay_of(input int i);
    case (i % 4)
      0: return 10;
      1: return 40;
      2: return 0;
      default: return 25;
    endcase
  endfunction
  function automatic bit cfg_en4_of(input int i);
    return i != 9;
  endfunction
  function automatic bit cfg_en8_of(input int i);
    return i != 10;
  endfunction
  function automatic bit cfg_enpl_of(input int i);
    return i != 11;
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
