// Controller for a variable-length multiplier.
//
// Only one multiply is in progress at a time. From the idle point (raising
// `idle` while `request_n` is high) a request raises `latch_operands`. From
// the next cycle the controller raises `stall` each cycle; it raises
// `latch_intermediate` while `mult_complete` (produced by the multiplier
// datapath) is low and `latch_result` in the first cycle it is high. The
// idle point is active again the cycle after that.
//
// The description writes the idle loop as one-or-more idle cycles, which
// would drop a request arriving in the first cycle after a multiply (or in
// the start cycle). This design takes the zero-or-more form used by the
// branch/jump and load/store controllers, so back-to-back multiplies work.
// Outputs are combinational from the inputs and the one-hot state bits.
module mu_ctrl_var (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic request_n,
  input  logic mult_complete,
  output logic idle,
  output logic stall,
  output logic latch_operands,
  output logic latch_intermediate,
  output logic latch_result
);

  logic idle_q, run_q, idle_act;

  always_comb begin
    idle_act           = start | idle_q;
    idle               = idle_act & request_n;
    latch_operands     = idle_act & ~request_n;
    latch_intermediate = run_q & ~mult_complete;
    latch_result       = run_q & mult_complete;
    stall              = run_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idle_q <= 1'b0;
      run_q  <= 1'b0;
    end else begin
      idle_q <= idle | latch_result;
      run_q  <= latch_operands | latch_intermediate;
    end
  end

endmodule
