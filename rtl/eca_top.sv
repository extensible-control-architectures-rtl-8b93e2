// Top level: the JackKnife control hierarchy, with the two introductory
// controllers beside it.
//
// JackKnife is a six-stage, up to eight-way interleaved multi-threaded 8-bit
// microcontroller. Its control is split into small cooperating controllers
// that talk through two signals each, a request and a stall:
//   jk_pipeline_ctrl  schedule/fetch/decode/read/execute/commit acceptance,
//                     stalls and flushes, with a programming wait on reset;
//   bju_ctrl          branch/jump unit (jump, branch, call, return, skip);
//   lsu_ctrl          load/store unit, also serving the 16-bit push/pop of
//                     calls and returns for the branch/jump unit;
//   one multiplier controller, chosen by MU_KIND from the three
//                     interchangeable ones (2-cycle pipelined, 4-cycle
//                     pipelined, variable length).
// The scheduler picks a thread for every accepted schedule slot, and the tag
// pipeline carries the thread number of each instruction along the stages.
//
// Glue chosen by this design, where the description gives only the
// request/stall architecture:
//   * A unit's request is the execute-stage acceptance qualified by the
//     operation class `exec_op` of the instruction in execute (an input: the
//     decoder is part of the datapath).
//   * A call's first cycle requests a two-byte push, a return's a two-byte
//     pop, from the load/store unit; the unit's "ready" to the branch/jump
//     unit is the cycle that completes the push or pop.
//   * All controllers get the same one-cycle start pulse, the first clock
//     cycle after reset is released.
// The datapath (register files, ALU, memories, multiplier arithmetic) is
// outside this RTL; every signal that would connect to it is a port.
//
// The stand-alone examples, the basic interlocked pipeline controller and
// the memory write controller, have their own ports (prefixes bp_ and mw_)
// and share only clock, reset and start.
module eca_top
  import eca_pkg::*;
#(
  parameter mu_kind_e    MU_KIND     = MU_PIPED2,
  parameter int unsigned N_THREADS   = MAX_THREADS,
  parameter int unsigned BP_N_STAGES = NUM_STAGES,
  localparam int unsigned TW         = $clog2(N_THREADS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // JackKnife control inputs
  input  logic                   programming_n,
  input  logic                   stall_ibus,
  input  logic                   stall_dependency,
  input  logic                   flush_schedule_n,
  input  logic                   flush_fetch_n,
  input  logic                   flush_decode_n,
  input  logic                   flush_read_n,
  input  exec_op_e               exec_op,
  input  logic                   branch_wait_on_status,
  input  logic                   memory_wait_n,
  input  logic                   mult_complete,
  input  logic [N_THREADS-1:0]   thread_active,
  input  logic [N_THREADS-1:0]   irq,
  // JackKnife control outputs
  output logic [5:0]             stage_accept,  // 0 schedule .. 5 commit
  output logic [4:0]             stage_stall,   // 0 schedule .. 4 execute
  output logic                   sched_valid,
  output logic                   sched_is_ist,
  output logic [N_THREADS-1:0]   irq_pending,   // interrupts not yet served
  output logic [TW-1:0]          sched_tid,
  output logic [TW-1:0]          stage_tag [5], // 0 fetch .. 4 commit
  output logic [4:0]             stage_tag_valid,
  output bju_act_t               bju_act,
  output lsu_act_t               lsu_act,
  output mu_act_t                mu_act,
  // Basic interlocked pipeline example
  input  logic                   bp_stall,
  output logic [BP_N_STAGES-1:0] bp_stage,
  output logic [BP_N_STAGES-1:0] bp_stall_stage,
  // Memory write controller example
  input  logic                   mw_request,
  input  logic                   mw_bus_free,
  output logic                   mw_latch_operands,
  output logic                   mw_output_to_bus,
  output logic                   mw_release_bus
);

  logic started_q, start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) started_q <= 1'b0;
    else        started_q <= 1'b1;
  end
  assign start = ~started_q;

  // ---------------------------------------------------------------- pipeline
  logic schedule, fetch, decode, read, execute, commit;
  logic stall_lsu, stall_bju, stall_mu;

  jk_pipeline_ctrl u_pipe (
    .clk, .rst_n, .start,
    .programming_n, .stall_ibus, .stall_dependency,
    .stall_lsu, .stall_bju, .stall_mu,
    .flush_schedule_n, .flush_fetch_n, .flush_decode_n, .flush_read_n,
    .schedule, .fetch, .decode, .read, .execute, .commit,
    .stall_schedule (stage_stall[0]),
    .stall_fetch    (stage_stall[1]),
    .stall_decode   (stage_stall[2]),
    .stall_read     (stage_stall[3]),
    .stall_execute  (stage_stall[4])
  );

  assign stage_accept = {commit, execute, read, decode, fetch, schedule};

  // -------------------------------------------------------- unit requests
  logic bju_request_n, lsu_request_n, mu_request_n;
  logic lsu_bju_request_n, push2_op_n, pop2_op_n, lsu_ready_n;

  assign bju_request_n = ~(execute & is_bju_op(exec_op));
  assign lsu_request_n = ~(execute & is_lsu_op(exec_op));
  assign mu_request_n  = ~(execute & (exec_op == OP_MUL));

  assign push2_op_n        = ~bju_act.call_accept1;
  assign pop2_op_n         = ~bju_act.return_accept1;
  assign lsu_bju_request_n = push2_op_n & pop2_op_n;
  assign lsu_ready_n       = ~(lsu_act.push2_accept2 | lsu_act.pop2_accept3);

  // ---------------------------------------------------- branch/jump unit
  bju_ctrl u_bju (
    .clk, .rst_n, .start,
    .request_n             (bju_request_n),
    .lsu_ready_n,
    .branch_wait_on_status,
    .jump_op               (exec_op == OP_JUMP),
    .branch_op             (exec_op == OP_BRANCH),
    .call_op               (exec_op == OP_CALL),
    .return_op             (exec_op == OP_RETURN),
    .skip_op               (exec_op == OP_SKIP),
    .idle                  (bju_act.idle),
    .jump_accept           (bju_act.jump_accept),
    .branch_accept1        (bju_act.branch_accept1),
    .branch_accept2        (bju_act.branch_accept2),
    .branch_latch          (bju_act.branch_latch),
    .call_accept1          (bju_act.call_accept1),
    .call_accept2          (bju_act.call_accept2),
    .call_wait             (bju_act.call_wait),
    .return_accept1        (bju_act.return_accept1),
    .return_accept2        (bju_act.return_accept2),
    .return_wait           (bju_act.return_wait),
    .skip_accept1          (bju_act.skip_accept1),
    .cleanup               (bju_act.cleanup),
    .stall_pipeline        (bju_act.stall_pipeline)
  );
  assign stall_bju = bju_act.stall_pipeline;

  // ------------------------------------------------------ load/store unit
  lsu_ctrl u_lsu (
    .clk, .rst_n, .start,
    .request_n                 (lsu_request_n),
    .memory_wait_n,
    .load_op                   (exec_op == OP_LOAD),
    .store_op                  (exec_op == OP_STORE),
    .bju_request_n             (lsu_bju_request_n),
    .push2_op_n,
    .pop2_op_n,
    .idle                      (lsu_act.idle),
    .load_output_address       (lsu_act.load_output_address),
    .ld_input_data             (lsu_act.ld_input_data),
    .store_output_address_data (lsu_act.store_output_address_data),
    .push2_accept1             (lsu_act.push2_accept1),
    .push2_accept2             (lsu_act.push2_accept2),
    .pop2_accept1              (lsu_act.pop2_accept1),
    .pop2_accept2              (lsu_act.pop2_accept2),
    .pop2_accept3              (lsu_act.pop2_accept3),
    .memory_wait1              (lsu_act.memory_wait1),
    .memory_wait2              (lsu_act.memory_wait2),
    .memory_wait3              (lsu_act.memory_wait3),
    .cleanup                   (lsu_act.cleanup),
    .stall_pipeline            (lsu_act.stall_pipeline)
  );
  assign stall_lsu = lsu_act.stall_pipeline;

  // ----------------------------------------------------------- multiplier
  generate
    if (MU_KIND == MU_PIPED2) begin : g_mu
      mu_ctrl_piped2 u_mu (
        .clk, .rst_n, .start,
        .request_n          (mu_request_n),
        .stall              (mu_act.stall),
        .latch_intermediate (mu_act.latch_intermediate),
        .latch_result       (mu_act.latch_result)
      );
      assign mu_act.idle           = 1'b0;
      assign mu_act.latch_operands = 1'b0;
    end else if (MU_KIND == MU_PIPED3) begin : g_mu
      mu_ctrl_piped3 u_mu (
        .clk, .rst_n, .start,
        .request_n          (mu_request_n),
        .stall              (mu_act.stall),
        .latch_operands     (mu_act.latch_operands),
        .latch_intermediate (mu_act.latch_intermediate),
        .latch_result       (mu_act.latch_result)
      );
      assign mu_act.idle = 1'b0;
    end else begin : g_mu
      mu_ctrl_var u_mu (
        .clk, .rst_n, .start,
        .request_n          (mu_request_n),
        .mult_complete,
        .idle               (mu_act.idle),
        .stall              (mu_act.stall),
        .latch_operands     (mu_act.latch_operands),
        .latch_intermediate (mu_act.latch_intermediate),
        .latch_result       (mu_act.latch_result)
      );
    end
  endgenerate
  assign stall_mu = mu_act.stall;

  // ------------------------------------------------- threads and tagging
  thread_scheduler #(.N_THREADS(N_THREADS)) u_sched (
    .clk, .rst_n, .schedule, .thread_active, .irq,
    .sel_valid  (sched_valid),
    .sel_is_ist (sched_is_ist),
    .sel_tid    (sched_tid),
    .irq_pending
  );

  thread_tag_pipe #(.N_THREADS(N_THREADS)) u_tags (
    .clk, .rst_n, .schedule, .fetch, .decode, .read, .execute,
    .sched_valid, .sched_tid,
    .tag   (stage_tag),
    .valid (stage_tag_valid)
  );

  // ---------------------------------------------------- stand-alone examples
  basic_pipeline_ctrl #(.N_STAGES(BP_N_STAGES)) u_basic (
    .clk, .rst_n, .start,
    .stall       (bp_stall),
    .stage       (bp_stage),
    .stall_stage (bp_stall_stage)
  );

  mem_write_ctrl u_mw (
    .clk, .rst_n, .start,
    .request        (mw_request),
    .bus_free       (mw_bus_free),
    .latch_operands (mw_latch_operands),
    .output_to_bus  (mw_output_to_bus),
    .release_bus    (mw_release_bus)
  );

endmodule
