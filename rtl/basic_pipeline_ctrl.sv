// Basic tail-throttled interlocked pipeline controller.
//
// A context generator, started by a one-cycle `start` pulse, offers a new
// point of control to stage 1 on every cycle. Each stage k holds an accept
// bit (the context handed on from stage k-1) and a stall bit. The stage is
// active when either bit is set. Stalls run combinationally from the tail:
//   stall_stage[k] = active[k] & stall_stage[k+1]   (stall_stage[N+1] = stall)
//   stage[k]       = active[k] & ~stall_stage[k+1]
// so a stage stalls exactly when it has work and its successor is stalled,
// and it executes when it has work and its successor is not stalled. An
// executing stage passes its context to stage k+1 in the next cycle; a
// stalled stage keeps it in its stall bit.
//
// Interface: stage[k-1] is the stage-accept (latch enable) of stage k,
// stall_stage[k-1] its stall output, both combinational in the current
// cycle. The number of stages is a parameter; the default of six is the
// description's. Each stage, the last one included, carries its own stall bit
// as in the textual specification (the drawn circuit feeds the stall input
// straight into stage 5 and takes stage 6 from a register).
module basic_pipeline_ctrl #(
  parameter int unsigned N_STAGES = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                stall,
  output logic [N_STAGES-1:0] stage,
  output logic [N_STAGES-1:0] stall_stage
);

  logic                gen_q;
  logic [N_STAGES-1:0] acc_q;    // acc_q[k]: context handed from stage k to k+1
  logic [N_STAGES-1:0] stall_q;  // stall_q[k]: stage k holding a stalled context
  logic [N_STAGES-1:0] active;
  logic [N_STAGES:0]   chain;    // chain[k]: stall seen by stage k from its successor

  always_comb begin
    chain[N_STAGES] = stall;
    for (int k = N_STAGES - 1; k >= 0; k--) begin
      active[k]      = ((k == 0) ? (start | gen_q) : acc_q[k-1]) | stall_q[k];
      stall_stage[k] = active[k] & chain[k+1];
      chain[k]       = stall_stage[k];
      stage[k]       = active[k] & ~chain[k+1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen_q   <= 1'b0;
      acc_q   <= '0;
      stall_q <= '0;
    end else begin
      gen_q   <= start | gen_q;
      acc_q   <= stage;
      stall_q <= stall_stage;
    end
  end

endmodule
