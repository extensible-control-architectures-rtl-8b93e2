// Self-checking testbench for thread_tag_pipe.
// Random stage-acceptance patterns (as the pipeline controller would give
// under stalls) move instructions with random thread numbers. The reference
// keeps, per stage, the instruction record that last entered it; a record
// enters stage s+1 exactly when stage s is accepted. Each cycle all five tags
// and valid bits are compared, and stalled stages are checked to keep their
// tag.
module thread_tag_pipe_tb;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic schedule = 0, fetch = 0, decode = 0, read = 0, execute = 0, sched_valid = 0;
  logic [2:0] sched_tid = '0;
  logic [2:0] tag [5];
  logic [4:0] valid;
  int checks = 0, failures = 0, n_hold = 0;

  thread_tag_pipe #(.N_THREADS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit v; int t; } rec_t;
  rec_t st [5];

  initial begin
    bit [4:0] adv;
    rec_t nxt [5];
    for (int s = 0; s < 5; s++) st[s] = '{0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 6000; c++) begin
      adv = 5'($urandom);
      {execute, read, decode, fetch, schedule} = adv;
      sched_valid = ($urandom_range(0, 3) != 0);
      sched_tid   = 3'($urandom);
      @(posedge clk);
      nxt = st;
      if (adv[0]) nxt[0] = '{sched_valid, sched_tid};
      for (int s = 1; s < 5; s++) if (adv[s]) nxt[s] = st[s-1];
      for (int s = 0; s < 5; s++) if (!adv[s]) n_hold++;
      st = nxt;
      @(negedge clk);
      for (int s = 0; s < 5; s++) begin
        checks++;
        if (valid[s] !== st[s].v || (st[s].v && tag[s] !== 3'(st[s].t))) begin
          failures++;
          if (failures < 20) $display("FAIL stage %0d cycle %0d", s, c);
        end
      end
    end
    checks++; if (n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
