// Self-checking testbench for jk_pipeline_ctrl.
// Checks: (1) the programming wait: nothing is scheduled while programming_n
// is low, and scheduling starts the cycle after it is first seen high;
// (2) cycle by cycle, all stage accept and stall outputs against a slot
// model in which a stall raised at a stage (ibus at fetch, dependency at
// read, lsu/bju/mu at execute) or seen from its successor holds every
// occupied stage back to the first empty one, and a low flush empties its
// stage; (3) commit follows an accepted execute by one cycle. Every stall
// source and every flush is counted and must occur.
module jk_pipeline_ctrl_tb;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, programming_n = 1'b0;
  logic stall_ibus = 0, stall_dependency = 0, stall_lsu = 0, stall_bju = 0, stall_mu = 0;
  logic flush_schedule_n = 1, flush_fetch_n = 1, flush_decode_n = 1, flush_read_n = 1;
  logic schedule, fetch, decode, read, execute, commit;
  logic stall_schedule, stall_fetch, stall_decode, stall_read, stall_execute;
  int checks = 0, failures = 0;
  int n_src [5];      // ibus, dependency, lsu, bju, mu stalls that held execute/read/fetch
  int n_flush [4];    // flushes that swept an occupied stage

  jk_pipeline_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what, input int c);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, c);
    end
  endtask

  // slot model, index 0 schedule .. 4 execute
  bit occ [5];
  bit gen, commit_exp;
  bit valid [5], src [5], stalled [5], acc [5];
  logic [4:0] got_acc, got_stl;
  int prog_cycles;

  initial begin
    for (int s = 0; s < 5; s++) occ[s] = 0;
    gen = 0; commit_exp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // programming phase: programming_n low for a random number of cycles
    prog_cycles = $urandom_range(3, 12);
    for (int c = 0; c < prog_cycles; c++) begin
      start = (c == 0);
      programming_n = 1'b0;
      #1 check({schedule, fetch, decode, read, execute, commit} == 6'b0, "idle while programming", c);
      @(negedge clk);
    end
    start = 1'b0;
    programming_n = 1'b1;
    #1 check(!schedule, "no schedule in the cycle programming ends", 0);
    @(negedge clk);
    gen = 1;
    for (int c = 0; c < 6000; c++) begin
      programming_n    = ($urandom_range(0, 1) == 0);  // ignored after programming
      stall_ibus       = ($urandom_range(0, 9) == 0);
      stall_dependency = ($urandom_range(0, 7) == 0);
      stall_lsu        = ($urandom_range(0, 7) == 0);
      stall_bju        = ($urandom_range(0, 7) == 0);
      stall_mu         = ($urandom_range(0, 9) == 0);
      if (c % 200 < 8) {stall_lsu, stall_bju} = 2'b11;   // long stalls fill stall bits
      flush_schedule_n = ($urandom_range(0, 15) != 0);
      flush_fetch_n    = ($urandom_range(0, 15) != 0);
      flush_decode_n   = ($urandom_range(0, 15) != 0);
      flush_read_n     = ($urandom_range(0, 15) != 0);
      // model
      valid[0] = occ[0] | gen;
      valid[1] = occ[1] & flush_schedule_n;
      valid[2] = occ[2] & flush_fetch_n;
      valid[3] = occ[3] & flush_decode_n;
      valid[4] = occ[4] & flush_read_n;
      src[0] = 0; src[1] = stall_ibus; src[2] = 0; src[3] = stall_dependency;
      src[4] = stall_lsu | stall_bju | stall_mu;
      for (int s = 4; s >= 0; s--) begin
        bit held;
        held = src[s] | ((s < 4) ? stalled[s+1] : 1'b0);
        stalled[s] = valid[s] & held;
        acc[s]     = valid[s] & !held;
      end
      if (occ[1] && !flush_schedule_n) n_flush[0]++;
      if (occ[2] && !flush_fetch_n)    n_flush[1]++;
      if (occ[3] && !flush_decode_n)   n_flush[2]++;
      if (occ[4] && !flush_read_n)     n_flush[3]++;
      if (valid[1] && stall_ibus)       n_src[0]++;
      if (valid[3] && stall_dependency) n_src[1]++;
      if (valid[4] && stall_lsu)        n_src[2]++;
      if (valid[4] && stall_bju)        n_src[3]++;
      if (valid[4] && stall_mu)         n_src[4]++;
      #1;
      got_acc = {execute, read, decode, fetch, schedule};
      got_stl = {stall_execute, stall_read, stall_decode, stall_fetch, stall_schedule};
      for (int s = 0; s < 5; s++) begin
        check(got_acc[s] === acc[s], $sformatf("accept of stage %0d", s), c);
        check(got_stl[s] === stalled[s], $sformatf("stall of stage %0d", s), c);
      end
      check(commit === commit_exp, "commit", c);
      commit_exp = acc[4];
      for (int s = 4; s >= 1; s--) occ[s] = acc[s-1] | stalled[s];
      occ[0] = stalled[0];
      @(negedge clk);
    end
    for (int i = 0; i < 5; i++) check(n_src[i] > 0, $sformatf("stall source %0d exercised", i), i);
    for (int i = 0; i < 4; i++) check(n_flush[i] > 0, $sformatf("flush %0d exercised", i), i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
