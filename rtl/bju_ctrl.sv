// Branch/jump unit controller.
//
// Serves one PC-updating instruction at a time. An idle point of control
// waits for `request_n` low (raising `idle` while it is high). On a request
// exactly one of the operation flags selects a fragment:
//   jump, immediate branch, skip : one cycle (jump_accept, branch_accept1,
//                                  skip_accept1), no pipeline stall
//   delayed branch (branch_op with branch_wait_on_status): branch_latch in
//                                  the request cycle, branch_accept2 with a
//                                  pipeline stall in the next cycle
//   call / return : call_accept1 / return_accept1 in the request cycle, then
//                  call_wait / return_wait while `lsu_ready_n` is high and
//                  call_accept2 / return_accept2 in the first cycle it is low;
//                  every cycle after the request stalls the pipeline.
// The cycle after an operation finishes the idle point is active again; if
// no new request arrives then, `cleanup` is raised with `idle` (buses
// released). A back-to-back request skips the cleanup.
//
// All outputs are combinational from the inputs and the one-hot state
// registers. The fragments, their outputs and their timing follow the
// description's specification; the `start` pulse, reset and the assertion
// that a request selects exactly one operation are this design's additions.
module bju_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic request_n,
  input  logic lsu_ready_n,
  input  logic branch_wait_on_status,
  input  logic jump_op,
  input  logic branch_op,
  input  logic call_op,
  input  logic return_op,
  input  logic skip_op,
  output logic idle,
  output logic jump_accept,
  output logic branch_accept1,
  output logic branch_accept2,
  output logic branch_latch,
  output logic call_accept1,
  output logic call_accept2,
  output logic call_wait,
  output logic return_accept1,
  output logic return_accept2,
  output logic return_wait,
  output logic skip_accept1,
  output logic cleanup,
  output logic stall_pipeline
);

  logic idle_q;     // idle point of control (loop and return from an operation)
  logic clean_q;    // cleanup candidate, one cycle after an operation ends
  logic bdelay_q;   // second cycle of a delayed branch
  logic call_q;     // call waiting for the load/store unit
  logic ret_q;      // return waiting for the load/store unit

  logic idle_act, req, op_done, call_act, ret_act;

  always_comb begin
    idle_act = start | idle_q;
    req      = idle_act & ~request_n;
    idle     = idle_act & request_n;

    jump_accept    = req & jump_op;
    branch_accept1 = req & branch_op & ~branch_wait_on_status;
    branch_latch   = req & branch_op & branch_wait_on_status;
    call_accept1   = req & call_op;
    return_accept1 = req & return_op;
    skip_accept1   = req & skip_op;

    branch_accept2 = bdelay_q;

    call_act     = call_q;
    call_wait    = call_act & lsu_ready_n;
    call_accept2 = call_act & ~lsu_ready_n;

    ret_act        = ret_q;
    return_wait    = ret_act & lsu_ready_n;
    return_accept2 = ret_act & ~lsu_ready_n;

    op_done = jump_accept | branch_accept1 | branch_accept2 | skip_accept1
            | call_accept2 | return_accept2;

    stall_pipeline = branch_accept2 | call_wait | call_accept2
                   | return_wait | return_accept2;
    cleanup = clean_q & idle;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idle_q   <= 1'b0;
      clean_q  <= 1'b0;
      bdelay_q <= 1'b0;
      call_q   <= 1'b0;
      ret_q    <= 1'b0;
    end else begin
      idle_q   <= idle | op_done;
      clean_q  <= op_done;
      bdelay_q <= branch_latch;
      call_q   <= call_accept1 | call_wait;
      ret_q    <= return_accept1 | return_wait;
    end
  end

  // A request must name exactly one operation, or the point of control is lost.
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
    req |-> $onehot({jump_op, branch_op, call_op, return_op, skip_op}));

endmodule
