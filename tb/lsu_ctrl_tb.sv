// Self-checking testbench for lsu_ctrl.
// A random script of loads, stores (pipeline requests) and two-byte pushes
// and pops (branch/jump unit requests) is issued with 0 to 2 idle cycles in
// between, and the memory inserts random wait states. Each cycle the whole
// output vector is compared with the operation's timeline: store 1 cycle,
// load 2 + waits, push 2, pop 3 + waits of both bytes, pipeline stall in all
// cycles after the first. Requests from the branch/jump unit arrive while
// the pipeline request is high, so `idle` stays high during a push or pop.
// Cleanup is expected in the first cycle after an operation that has `idle`.
module lsu_ctrl_tb;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic request_n = 1, memory_wait_n = 1, load_op = 0, store_op = 0;
  logic bju_request_n = 1, push2_op_n = 1, pop2_op_n = 1;
  logic idle, load_output_address, ld_input_data, store_output_address_data;
  logic push2_accept1, push2_accept2, pop2_accept1, pop2_accept2, pop2_accept3;
  logic memory_wait1, memory_wait2, memory_wait3, cleanup, stall_pipeline;
  int checks = 0, failures = 0, cyc = 0;
  int n_kind [4];
  int n_wait = 0, n_cleanup = 0;

  lsu_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct packed {
    logic idle, loa, ldi, sto, pa1, pa2, qa1, qa2, qa3, mw1, mw2, mw3, cl, st;
  } vec_t;

  task automatic cmp(input vec_t e);
    vec_t g;
    g = '{idle, load_output_address, ld_input_data, store_output_address_data,
          push2_accept1, push2_accept2, pop2_accept1, pop2_accept2, pop2_accept3,
          memory_wait1, memory_wait2, memory_wait3, cleanup, stall_pipeline};
    checks++;
    if (g !== e) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: got %b want %b", cyc, g, e);
    end
  endtask

  bit after_op;
  vec_t e;

  task automatic step();
    @(negedge clk);
    cyc++;
    start = 1'b0;
    {request_n, load_op, store_op, bju_request_n, push2_op_n, pop2_op_n} = 6'b100111;
    load_op  = $urandom_range(0, 1);   // don't-care while no request
    memory_wait_n = 1'b1;
  endtask

  // one memory data phase with `waits` wait cycles; ends on the accept cycle
  task automatic data_phase(input int waits, input int which, input bit idl);
    for (int w = 0; w < waits; w++) begin
      n_wait++;
      memory_wait_n = 1'b0;
      #1; e = '0; e.idle = idl; e.st = 1;
      case (which) 1: e.mw1 = 1; 2: e.mw2 = 1; default: e.mw3 = 1; endcase
      cmp(e); step();
    end
    #1; e = '0; e.idle = idl; e.st = 1;
    case (which) 1: e.ldi = 1; 2: e.qa2 = 1; default: e.qa3 = 1; endcase
    cmp(e);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    start = 1'b1;
    after_op = 0;
    for (int n = 0; n < 2000; n++) begin
      int kind, gap;
      kind = $urandom_range(0, 3);   // 0 load 1 store 2 push 3 pop
      gap  = $urandom_range(0, 2);
      n_kind[kind]++;
      for (int g = 0; g < gap; g++) begin
        memory_wait_n = $urandom_range(0, 1);
        #1; e = '0; e.idle = 1; e.cl = after_op;
        if (after_op) n_cleanup++;
        cmp(e); after_op = 0; step();
      end
      case (kind)
        0: begin request_n = 0; load_op = 1; store_op = 0; end
        1: begin request_n = 0; load_op = 0; store_op = 1; end
        2: begin bju_request_n = 0; push2_op_n = 0; end
        default: begin bju_request_n = 0; pop2_op_n = 0; end
      endcase
      #1; e = '0;
      case (kind)
        0: e.loa = 1;
        1: e.sto = 1;
        2: begin e.pa1 = 1; e.idle = 1; e.cl = after_op; end
        default: begin e.qa1 = 1; e.idle = 1; e.cl = after_op; end
      endcase
      cmp(e); step();
      case (kind)
        0: begin data_phase($urandom_range(0, 3), 1, 0); step(); end
        2: begin #1; e = '0; e.idle = 1; e.pa2 = 1; e.st = 1; cmp(e); step(); end
        3: begin
          data_phase($urandom_range(0, 3), 2, 1); step();
          data_phase($urandom_range(0, 3), 3, 1); step();
        end
        default: ;
      endcase
      after_op = 1;
    end
    for (int k = 0; k < 4; k++) begin checks++; if (n_kind[k] == 0) failures++; end
    checks++; if (n_wait == 0 || n_cleanup == 0) failures++;
    $display("ops: load %0d store %0d push %0d pop %0d waits %0d cleanup %0d",
             n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_wait, n_cleanup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
