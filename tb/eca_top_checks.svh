// End-to-end stimulus and checks for eca_top, shared by the testbenches
// that fit the different multiplier controllers. The including module
// declares MU_KIND_USED, instantiates eca_top as `dut` on the signals
// declared here, runs `run_all` and then reports the result line.
//
// After reset the programming input is held low for a few cycles, then the
// pipeline runs a random stream: the operation class of the instruction in
// execute, memory wait states, multiplier completion, dependency and
// instruction-bus stalls, flushes, thread activity and interrupts all vary
// every cycle. The checks hold the controllers' cooperation to the rules of
// the request/stall architecture, and every mechanism is counted; one that
// never happens counts as a failure.

logic clk = 1'b0, rst_n = 1'b0;
logic programming_n = 1'b0, stall_ibus = 1'b0, stall_dependency = 1'b0;
logic flush_schedule_n = 1'b1, flush_fetch_n = 1'b1, flush_decode_n = 1'b1, flush_read_n = 1'b1;
exec_op_e exec_op = OP_ALU;
logic branch_wait_on_status = 1'b0, memory_wait_n = 1'b1, mult_complete = 1'b0;
logic [7:0] thread_active = '0, irq = '0;
logic [5:0] stage_accept;
logic [4:0] stage_stall;
logic sched_valid, sched_is_ist;
logic [7:0] irq_pending;
logic [2:0] sched_tid;
logic [2:0] stage_tag [5];
logic [4:0] stage_tag_valid;
bju_act_t bju_act;
lsu_act_t lsu_act;
mu_act_t  mu_act;
logic bp_stall = 1'b0;
logic [5:0] bp_stage, bp_stall_stage;
logic mw_request = 1'b0, mw_bus_free = 1'b0;
logic mw_latch_operands, mw_output_to_bus, mw_release_bus;

int checks = 0, failures = 0, cyc = 0;

always #5 clk = ~clk;

task automatic chk(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    if (failures < 25) $display("FAIL %s at cycle %0d", what, cyc);
  end
endtask

// mechanism counters
typedef enum int {
  M_PROG_WAIT, M_STALL_IBUS, M_STALL_DEP, M_STALL_LSU, M_STALL_BJU, M_STALL_MU,
  M_FLUSH_SCH, M_FLUSH_FET, M_FLUSH_DEC, M_FLUSH_RD,
  M_JUMP, M_BR_IMM, M_BR_DELAY, M_CALL, M_RETURN, M_SKIP, M_BJU_CLEANUP, M_BJU_B2B,
  M_LOAD, M_STORE, M_PUSH, M_POP, M_MEM_WAIT, M_LSU_CLEANUP,
  M_MUL, M_MUL_RESULT, M_IST, M_RR_SKIP, M_BUBBLE,
  M_BP_STALL, M_MW_BUS_WAIT, M_COUNT
} mech_e;
int mech [M_COUNT];
int commits_per_thread [8];

initial begin : watchdog
  repeat (60000) @(posedge clk);
  failures++;
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

task automatic drive_random(input int c);
  int r;
  r = $urandom_range(0, 99);
  if      (r < 30) exec_op = OP_ALU;
  else if (r < 40) exec_op = OP_LOAD;
  else if (r < 48) exec_op = OP_STORE;
  else if (r < 55) exec_op = OP_JUMP;
  else if (r < 65) exec_op = OP_BRANCH;
  else if (r < 72) exec_op = OP_CALL;
  else if (r < 79) exec_op = OP_RETURN;
  else if (r < 85) exec_op = OP_SKIP;
  else             exec_op = OP_MUL;
  branch_wait_on_status = $urandom_range(0, 1);
  memory_wait_n    = ($urandom_range(0, 9) < 7);
  mult_complete    = ($urandom_range(0, 1) == 1);
  stall_ibus       = ($urandom_range(0, 19) == 0);
  stall_dependency = ($urandom_range(0, 11) == 0);
  flush_schedule_n = ($urandom_range(0, 29) != 0);
  flush_fetch_n    = ($urandom_range(0, 29) != 0);
  flush_decode_n   = ($urandom_range(0, 29) != 0);
  flush_read_n     = ($urandom_range(0, 29) != 0);
  if (c % 64 == 0) thread_active = (c % 1024 == 512) ? 8'h00 : (8'($urandom) | 8'h01);
  irq = '0;
  if ($urandom_range(0, 39) == 0) irq[$urandom_range(0, 7)] = 1'b1;
  bp_stall    = ($urandom_range(0, 3) == 0);
  mw_request  = ($urandom_range(0, 2) == 0);
  mw_bus_free = ($urandom_range(0, 9) < 6);
endtask

// one-cycle history for latency checks
logic prev_execute = 0, prev_call1 = 0, prev_mw_out = 0, prev_sched_acc = 0;
logic prev_fetch = 0, prev_decode = 0, prev_read = 0, prev_bju_done = 0;
logic load_pending = 0;
logic [3:0] mul_hist = '0;

task automatic check_cycle();
  logic execute, any_unit_stall, bju_done;
  execute = stage_accept[4];
  any_unit_stall = bju_act.stall_pipeline | lsu_act.stall_pipeline | mu_act.stall;
  // pipeline rules
  chk(stage_accept[5] === prev_execute, "commit follows execute");
  chk(!(execute && any_unit_stall), "execute held while a unit stalls");
  chk(!(stage_accept[1] && stall_ibus), "fetch held on instruction-bus stall");
  chk(!(stage_accept[3] && stall_dependency), "read held on dependency stall");
  // request routing: an executing instruction reaches its unit at once
  if (execute) begin
    case (exec_op)
      OP_JUMP:   chk(bju_act.jump_accept, "jump accepted");
      OP_BRANCH: chk(branch_wait_on_status ? bju_act.branch_latch : bju_act.branch_accept1, "branch accepted");
      OP_CALL:   chk(bju_act.call_accept1 && lsu_act.push2_accept1, "call starts push");
      OP_RETURN: chk(bju_act.return_accept1 && lsu_act.pop2_accept1, "return starts pop");
      OP_SKIP:   chk(bju_act.skip_accept1, "skip accepted");
      OP_LOAD:   chk(lsu_act.load_output_address, "load address out");
      OP_STORE:  chk(lsu_act.store_output_address_data, "store out");
      OP_MUL:    chk(MU_KIND_USED == MU_PIPED2 ? mu_act.latch_intermediate : mu_act.latch_operands,
                     "multiply accepted");
      default:   chk(!bju_act.jump_accept && !lsu_act.load_output_address, "no unit for alu op");
    endcase
  end
  // call/return and the load/store unit
  chk(bju_act.call_accept2 === (prev_call1 | (bju_act.call_accept2 & lsu_act.push2_accept2)),
      "call completes one cycle after its push starts");
  chk(bju_act.call_accept2 === lsu_act.push2_accept2, "call ends with the second push byte");
  chk(bju_act.return_accept2 === lsu_act.pop2_accept3, "return ends with the second pop byte");
  chk(lsu_act.ld_input_data === (load_pending & memory_wait_n), "load data after address and waits");
  if (MU_KIND_USED == MU_PIPED2) chk(mu_act.latch_result === mul_hist[0], "2-cycle multiply result");
  if (MU_KIND_USED == MU_PIPED3) chk(mu_act.latch_result === mul_hist[2], "4-cycle multiply result");
  // examples
  chk(mw_release_bus === prev_mw_out, "memory write releases the bus one cycle after writing");
  chk(!(bp_stage[5] && bp_stall), "basic pipeline last stage held by stall");
  // scheduler: issued thread is active unless it is an interrupt service thread
  if (stage_accept[0] && sched_valid) chk(sched_is_ist || thread_active[sched_tid], "issued thread runnable");

  // mechanisms
  if (stage_stall[1] && stall_ibus) mech[M_STALL_IBUS]++;
  if (stage_stall[3] && stall_dependency) mech[M_STALL_DEP]++;
  if (stage_stall[4] && lsu_act.stall_pipeline) mech[M_STALL_LSU]++;
  if (stage_stall[4] && bju_act.stall_pipeline) mech[M_STALL_BJU]++;
  if (stage_stall[4] && mu_act.stall) mech[M_STALL_MU]++;
  if (prev_sched_acc && !flush_schedule_n) mech[M_FLUSH_SCH]++;
  if (prev_fetch && !flush_fetch_n) mech[M_FLUSH_FET]++;
  if (prev_decode && !flush_decode_n) mech[M_FLUSH_DEC]++;
  if (prev_read && !flush_read_n) mech[M_FLUSH_RD]++;
  if (bju_act.jump_accept) mech[M_JUMP]++;
  if (bju_act.branch_accept1) mech[M_BR_IMM]++;
  if (bju_act.branch_accept2) mech[M_BR_DELAY]++;
  if (bju_act.call_accept2) mech[M_CALL]++;
  if (bju_act.return_accept2) mech[M_RETURN]++;
  if (bju_act.skip_accept1) mech[M_SKIP]++;
  if (bju_act.cleanup) mech[M_BJU_CLEANUP]++;
  bju_done = bju_act.jump_accept | bju_act.branch_accept1 | bju_act.branch_accept2 |
             bju_act.call_accept2 | bju_act.return_accept2 | bju_act.skip_accept1;
  if (prev_bju_done && execute && is_bju_op(exec_op)) mech[M_BJU_B2B]++;
  if (lsu_act.ld_input_data) mech[M_LOAD]++;
  if (lsu_act.store_output_address_data) mech[M_STORE]++;
  if (lsu_act.push2_accept2) mech[M_PUSH]++;
  if (lsu_act.pop2_accept3) mech[M_POP]++;
  if (lsu_act.memory_wait1 | lsu_act.memory_wait2 | lsu_act.memory_wait3) mech[M_MEM_WAIT]++;
  if (lsu_act.cleanup) mech[M_LSU_CLEANUP]++;
  if (execute && exec_op == OP_MUL) mech[M_MUL]++;
  if (mu_act.latch_result) mech[M_MUL_RESULT]++;
  if (stage_accept[0] && sched_valid && sched_is_ist) begin
    mech[M_IST]++;
    chk(irq_pending[sched_tid], "interrupt service thread was pending");
  end
  if (stage_accept[0] && !sched_valid) mech[M_BUBBLE]++;
  if (stage_accept[0] && sched_valid && !sched_is_ist && thread_active != 8'hff) mech[M_RR_SKIP]++;
  if (bp_stall_stage[5]) mech[M_BP_STALL]++;
  if (prev_mw_out == 0 && mw_output_to_bus == 0 && dut.u_mw.wait_q) mech[M_MW_BUS_WAIT]++;
  if (stage_accept[5] && stage_tag_valid[4]) commits_per_thread[stage_tag[4]]++;

  // history for the next cycle
  prev_execute   = execute;
  prev_call1     = bju_act.call_accept1;
  prev_mw_out    = mw_output_to_bus;
  prev_sched_acc = stage_accept[0];
  prev_fetch     = stage_accept[1];
  prev_decode    = stage_accept[2];
  prev_read      = stage_accept[3];
  prev_bju_done  = bju_done;
  load_pending   = lsu_act.load_output_address | lsu_act.memory_wait1;
  mul_hist       = {mul_hist[2:0], execute && exec_op == OP_MUL};
endtask

task automatic run_all(input int n_cycles);
  int prog;
  repeat (2) @(negedge clk);
  rst_n = 1'b1;
  prog = $urandom_range(4, 10);
  // programming phase: nothing may run
  for (int c = 0; c < prog; c++) begin
    programming_n = 1'b0;
    exec_op = OP_LOAD;
    #1;
    chk(stage_accept == 6'b0, "no stage runs while programming");
    mech[M_PROG_WAIT]++;
    @(negedge clk); cyc++;
  end
  programming_n = 1'b1;
  #1 chk(stage_accept == 6'b0, "still idle in the cycle programming ends");
  @(negedge clk); cyc++;
  #1 chk(stage_accept[0] == 1'b1, "scheduling starts one cycle after programming");
  for (int c = 0; c < n_cycles; c++) begin
    drive_random(c);
    #1 check_cycle();
    @(negedge clk); cyc++;
  end
  // drain: only single-cycle work, memory and multiplier always ready
  for (int c = 0; c < 30; c++) begin
    drive_random(c);
    exec_op = OP_ALU; memory_wait_n = 1'b1; mult_complete = 1'b1;
    stall_ibus = 1'b0; stall_dependency = 1'b0;
    #1 check_cycle();
    @(negedge clk); cyc++;
  end
  #1;
  chk(bju_act.idle && lsu_act.idle && !mu_act.stall, "all units idle after draining");
  chk(stage_accept[4], "pipeline flowing after draining");
  for (int m = 0; m < M_COUNT; m++) begin
    checks++;
    if (mech[m] == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", mech_e'(m));
    end
  end
  begin
    int with_commits = 0;
    for (int t = 0; t < 8; t++) if (commits_per_thread[t] > 0) with_commits++;
    chk(with_commits == 8, "every thread committed instructions");
  end
  $display("mechanisms: stall ibus %0d dep %0d lsu %0d bju %0d mu %0d; calls %0d returns %0d loads %0d ist %0d",
           mech[M_STALL_IBUS], mech[M_STALL_DEP], mech[M_STALL_LSU], mech[M_STALL_BJU],
           mech[M_STALL_MU], mech[M_CALL], mech[M_RETURN], mech[M_LOAD], mech[M_IST]);
endtask
