// Self-checking testbench for bju_ctrl.
// A random script of jump, immediate branch, delayed branch, call, return
// and skip operations is issued, each after 0 to 2 idle cycles. The
// testbench plays the load/store unit, answering a call or return after a
// random number of wait cycles. For every cycle the full output vector is
// compared with the cycle-by-cycle timeline of the operation: one-cycle
// operations, the two-cycle delayed branch, and calls/returns of 2 + waits
// cycles that stall the pipeline in all but their first cycle. Cleanup must
// appear exactly in an idle cycle that directly follows an operation.
module bju_ctrl_tb;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic request_n = 1, lsu_ready_n = 1, branch_wait_on_status = 0;
  logic jump_op = 0, branch_op = 0, call_op = 0, return_op = 0, skip_op = 0;
  logic idle, jump_accept, branch_accept1, branch_accept2, branch_latch;
  logic call_accept1, call_accept2, call_wait, return_accept1, return_accept2, return_wait;
  logic skip_accept1, cleanup, stall_pipeline;
  int checks = 0, failures = 0, cyc = 0;
  int n_kind [6];
  int n_cleanup = 0, n_b2b = 0, n_wait = 0;

  bju_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected vector order
  typedef struct packed {
    logic idle, ja, ba1, ba2, bl, ca1, ca2, cw, ra1, ra2, rw, sa1, cl, st;
  } vec_t;

  task automatic cmp(input vec_t e);
    vec_t g;
    g = '{idle, jump_accept, branch_accept1, branch_accept2, branch_latch, call_accept1,
          call_accept2, call_wait, return_accept1, return_accept2, return_wait,
          skip_accept1, cleanup, stall_pipeline};
    checks++;
    if (g !== e) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: got %b want %b", cyc, g, e);
    end
  endtask

  task automatic step();
    @(negedge clk);
    cyc++;
    {request_n, jump_op, branch_op, call_op, return_op, skip_op} = 6'b100000;
    branch_wait_on_status = $urandom_range(0, 1);  // ignored unless a branch request
    lsu_ready_n = 1'b1;
  endtask

  bit after_op;
  vec_t e;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    start = 1'b1;
    after_op = 0;
    for (int n = 0; n < 1500; n++) begin
      int kind, gap, waits;
      kind  = $urandom_range(0, 5);   // 0 jump 1 branch-imm 2 branch-delay 3 call 4 return 5 skip
      gap   = $urandom_range(0, 2);
      waits = $urandom_range(0, 3);
      n_kind[kind]++;
      if (gap == 0 && after_op) n_b2b++;
      for (int g = 0; g < gap; g++) begin
        #1;
        e = '0; e.idle = 1; e.cl = after_op;
        if (after_op) n_cleanup++;
        cmp(e);
        after_op = 0;
        step();
        start = 1'b0;
      end
      // request cycle
      request_n = 1'b0;
      case (kind)
        0: jump_op = 1;
        1: begin branch_op = 1; branch_wait_on_status = 0; end
        2: begin branch_op = 1; branch_wait_on_status = 1; end
        3: call_op = 1;
        4: return_op = 1;
        default: skip_op = 1;
      endcase
      #1;
      e = '0;
      case (kind)
        0: e.ja = 1;
        1: e.ba1 = 1;
        2: e.bl = 1;
        3: e.ca1 = 1;
        4: e.ra1 = 1;
        default: e.sa1 = 1;
      endcase
      cmp(e);
      step();
      start = 1'b0;
      if (kind == 2) begin
        #1; e = '0; e.ba2 = 1; e.st = 1; cmp(e);
        step();
      end else if (kind == 3 || kind == 4) begin
        for (int w = 0; w < waits; w++) begin
          n_wait++;
          #1; e = '0; e.st = 1;
          if (kind == 3) e.cw = 1; else e.rw = 1;
          cmp(e);
          step();
        end
        lsu_ready_n = 1'b0;
        #1; e = '0; e.st = 1;
        if (kind == 3) e.ca2 = 1; else e.ra2 = 1;
        cmp(e);
        step();
      end
      after_op = 1;
    end
    for (int k = 0; k < 6; k++) begin checks++; if (n_kind[k] == 0) failures++; end
    checks++; if (n_cleanup == 0 || n_b2b == 0 || n_wait == 0) failures++;
    $display("ops: jump %0d bimm %0d bdelay %0d call %0d ret %0d skip %0d cleanup %0d back-to-back %0d",
             n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_kind[4], n_kind[5], n_cleanup, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
