// Controller for a 2-cycle pipelined multiplier.
//
// A context generator (started by `start`) lets the controller accept a
// request on every cycle, so multiplies may issue back to back. In the
// request cycle (`request_n` low) it raises `latch_intermediate`; in the next
// cycle it raises `latch_result` and `stall`, which holds the following
// instruction in the execute stage while the product completes.
// Outputs: latch_intermediate is combinational from request_n; stall and
// latch_result are registered. The behaviour is the description's; start and
// reset are this design's.
module mu_ctrl_piped2 (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic request_n,
  output logic stall,
  output logic latch_intermediate,
  output logic latch_result
);

  logic gen_q, res_q, ctx;

  always_comb begin
    ctx                = start | gen_q;
    latch_intermediate = ctx & ~request_n;
    latch_result       = res_q;
    stall              = res_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen_q <= 1'b0;
      res_q <= 1'b0;
    end else begin
      gen_q <= ctx;
      res_q <= latch_intermediate;
    end
  end

endmodule
