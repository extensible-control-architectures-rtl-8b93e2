// Load/store unit controller.
//
// Handles all data-memory operations other than instruction fetch, over a
// synchronous memory protocol: a store takes one cycle, load data is valid in
// the cycle after the address, and an active-low `memory_wait_n` adds wait
// states. An idle point of control (raising `idle` while `request_n` is high)
// starts one of four fragments:
//   load  : load_output_address in the request cycle; then memory_wait1 while
//           the memory waits and ld_input_data in the first cycle it does not.
//   store : store_output_address_data in the request cycle only.
//   push2 : (16-bit push for a call, requested by the branch/jump unit with
//           `bju_request_n` and `push2_op_n`) push2_accept1 then push2_accept2,
//           one 8-bit store each.
//   pop2  : (16-bit pop for a return) pop2_accept1 issues the first address,
//           pop2_accept2 takes the first byte and issues the second address,
//           pop2_accept3 takes the second byte; memory_wait2 / memory_wait3
//           stretch the two data cycles. The two reads overlap, so a pop
//           takes three cycles without waits.
// Every cycle of a load, push or pop after its first stalls the pipeline.
// The cycle after an operation ends, `cleanup` is raised together with
// `idle` if no new request is pending, so buses are released.
//
// The idle loop watches only the pipeline's `request_n`. A push or pop from
// the branch/jump unit arrives while the pipeline request is high, so the idle
// point stays active beside the operation, as the description's NFA
// semantics give; the stalled pipeline cannot issue a request meanwhile.
// Fragments, outputs and timing follow the description; `start`, reset and
// the assertions are this design's additions.
module lsu_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic request_n,
  input  logic memory_wait_n,
  input  logic load_op,
  input  logic store_op,
  input  logic bju_request_n,
  input  logic push2_op_n,
  input  logic pop2_op_n,
  output logic idle,
  output logic load_output_address,
  output logic ld_input_data,
  output logic store_output_address_data,
  output logic push2_accept1,
  output logic push2_accept2,
  output logic pop2_accept1,
  output logic pop2_accept2,
  output logic pop2_accept3,
  output logic memory_wait1,
  output logic memory_wait2,
  output logic memory_wait3,
  output logic cleanup,
  output logic stall_pipeline
);

  logic idle_q, clean_q;
  logic ld_q;     // load data phase (entry or waiting)
  logic push_q;   // second push byte
  logic pop1_q;   // first pop data phase
  logic pop2_q;   // second pop data phase

  logic idle_act, req, breq, op_done;

  always_comb begin
    idle_act = start | idle_q;
    idle     = idle_act & request_n;
    req      = idle_act & ~request_n;
    breq     = idle_act & ~bju_request_n;

    load_output_address       = req & load_op;
    store_output_address_data = req & store_op;
    push2_accept1             = breq & ~push2_op_n;
    pop2_accept1              = breq & ~pop2_op_n;

    memory_wait1  = ld_q & ~memory_wait_n;
    ld_input_data = ld_q & memory_wait_n;

    push2_accept2 = push_q;

    memory_wait2 = pop1_q & ~memory_wait_n;
    pop2_accept2 = pop1_q & memory_wait_n;
    memory_wait3 = pop2_q & ~memory_wait_n;
    pop2_accept3 = pop2_q & memory_wait_n;

    op_done = ld_input_data | store_output_address_data | push2_accept2 | pop2_accept3;

    stall_pipeline = memory_wait1 | ld_input_data | push2_accept2
                   | memory_wait2 | pop2_accept2 | memory_wait3 | pop2_accept3;
    cleanup = clean_q & idle;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idle_q  <= 1'b0;
      clean_q <= 1'b0;
      ld_q    <= 1'b0;
      push_q  <= 1'b0;
      pop1_q  <= 1'b0;
      pop2_q  <= 1'b0;
    end else begin
      idle_q  <= idle | op_done;
      clean_q <= op_done;
      ld_q    <= load_output_address | memory_wait1;
      push_q  <= push2_accept1;
      pop1_q  <= pop2_accept1 | memory_wait2;
      pop2_q  <= pop2_accept2 | memory_wait3;
    end
  end

  a_one_pipe_op: assert property (@(posedge clk) disable iff (!rst_n)
    req |-> (load_op ^ store_op));
  a_one_bju_op: assert property (@(posedge clk) disable iff (!rst_n)
    breq |-> (push2_op_n ^ pop2_op_n));
  a_no_double_request: assert property (@(posedge clk) disable iff (!rst_n)
    !(req && breq));

endmodule
