// End-to-end testbench of eca_top at its default parameters (eight threads,
// six-stage pipeline, 2-cycle pipelined multiplier controller). It runs the
// programming wait and then a long random instruction mix through the whole
// control hierarchy; stimulus and checks are in eca_top_checks.svh.
module eca_top_tb;
  import eca_pkg::*;
  localparam mu_kind_e MU_KIND_USED = MU_PIPED2;

  `include "eca_top_checks.svh"

  eca_top dut (.*);

  initial begin
    run_all(20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
