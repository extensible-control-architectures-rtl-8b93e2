// Controller for a 4-cycle pipelined multiplier (operand latch plus three
// execution stages).
//
// A request may be accepted on every cycle. In the request cycle the
// controller raises `latch_operands`; in the next two cycles
// `latch_intermediate`, and in the fourth `latch_result`; `stall` is high in
// all three cycles after the request. With back-to-back requests the stages
// overlap and the outputs are the OR of the operations in flight.
// latch_operands is combinational from request_n, the rest registered.
// The step sequence is the description's (a two-fold repetition of the
// intermediate step); each repeated step raises the intermediate and stall
// outputs, which is how this design reads the repetition. start and reset are
// this design's.
module mu_ctrl_piped3 #(
  parameter int unsigned N_INTERMEDIATE = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic request_n,
  output logic stall,
  output logic latch_operands,
  output logic latch_intermediate,
  output logic latch_result
);

  logic                      gen_q, ctx;
  logic [N_INTERMEDIATE-1:0] mid_q;   // mid_q[i]: operation in intermediate step i
  logic                      res_q;

  always_comb begin
    ctx                = start | gen_q;
    latch_operands     = ctx & ~request_n;
    latch_intermediate = |mid_q;
    latch_result       = res_q;
    stall              = latch_intermediate | latch_result;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen_q <= 1'b0;
      mid_q <= '0;
      res_q <= 1'b0;
    end else begin
      gen_q <= ctx;
      mid_q <= (mid_q << 1) | N_INTERMEDIATE'(latch_operands);
      res_q <= mid_q[N_INTERMEDIATE-1];
    end
  end

endmodule
