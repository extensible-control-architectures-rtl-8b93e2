// End-to-end testbench of eca_top with the variable-length multiplier controller fitted
// in place of the default one, showing that the multiplier can be swapped
// without touching the rest of the control. Stimulus and checks are those of
// eca_top_checks.svh.
module eca_top_mu_var_tb;
  import eca_pkg::*;
  localparam mu_kind_e MU_KIND_USED = MU_VARIABLE;

  `include "eca_top_checks.svh"

  eca_top #(.MU_KIND(MU_KIND_USED)) dut (.*);

  initial begin
    run_all(20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
