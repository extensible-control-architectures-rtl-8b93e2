// Self-checking testbench for thread_scheduler (8 threads).
// Random active-thread masks, schedule slots and interrupts. The reference
// keeps the set of pending interrupts and the last thread issued in round
// robin, and for every cycle predicts the valid flag, the thread and whether
// it is an interrupt service thread. It also checks directly that an
// interrupt raised alone is served in the next cycle, and that with a fixed
// set of active threads each is issued exactly once per round.
module thread_scheduler_tb;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0, schedule = 1'b0;
  logic [N-1:0] thread_active = '0, irq = '0, irq_pending;
  logic sel_valid, sel_is_ist;
  logic [2:0] sel_tid;
  int checks = 0, failures = 0, n_ist_next = 0, n_skip = 0;

  thread_scheduler #(.N_THREADS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what, input int c);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s cycle %0d", what, c); end
  endtask

  bit [N-1:0] pend;
  int last;

  initial begin
    bit ev, eist, prev_lone_irq;
    int et, prev_irq_tid;
    pend = '0; last = N - 1; prev_lone_irq = 0; prev_irq_tid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Part 1: random traffic against the reference.
    for (int c = 0; c < 6000; c++) begin
      schedule      = ($urandom_range(0, 4) != 0);
      thread_active = N'($urandom);
      if (c % 500 < 100) thread_active = 8'b0000_0000;
      irq = '0;
      if ($urandom_range(0, 9) == 0) irq[$urandom_range(0, N - 1)] = 1'b1;
      ev = 0; eist = 0; et = 0;
      for (int i = 0; i < N; i++) if (pend[i] && !ev) begin ev = 1; eist = 1; et = i; end
      if (!ev)
        for (int off = 1; off <= N; off++)
          if (thread_active[(last + off) % N]) begin ev = 1; et = (last + off) % N; break; end
      #1;
      chk(sel_valid === ev, "valid", c);
      chk(irq_pending === pend, "pending set", c);
      if (ev) begin
        chk(sel_tid === 3'(et), "thread", c);
        chk(sel_is_ist === eist, "ist flag", c);
      end
      if (prev_lone_irq && schedule) begin
        n_ist_next++;
        chk(sel_is_ist && sel_tid == 3'(prev_irq_tid), "interrupt served next cycle", c);
      end
      if (ev && !eist && et != (last + 1) % N) n_skip++;
      // update reference
      if (schedule && ev) begin
        if (eist) pend[et] = 0; else last = et;
      end
      pend |= irq;
      prev_lone_irq = (irq != 0) && (pend == irq);
      for (int i = 0; i < N; i++) if (irq[i]) prev_irq_tid = i;
      @(negedge clk);
    end
    chk(n_ist_next > 0 && n_skip > 0, "interrupt and inactive-thread skipping exercised", 0);
    // Part 2: fixed mask, full rounds.
    irq = '0; schedule = 1'b1; thread_active = 8'b1011_0110;
    repeat (N + 2) @(negedge clk);   // drain pending interrupts
    for (int r = 0; r < 20; r++) begin
      bit [N-1:0] seen;
      seen = '0;
      for (int k = 0; k < 5; k++) begin
        #1;
        chk(sel_valid && thread_active[sel_tid] && !seen[sel_tid], "round robin order", r);
        seen[sel_tid] = 1'b1;
        @(negedge clk);
      end
      chk(seen == thread_active, "each active thread once per round", r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
