// Self-checking testbench for mu_ctrl_piped3.
// Random request streams, including back-to-back requests, drive the
// 4-cycle pipelined multiplier controller: latch_operands in the request cycle, latch_intermediate one and two cycles later, latch_result three cycles later, stall in those three cycles. The expected outputs are computed from a history of the last
// requests; the result latency is also counted directly.
module mu_ctrl_piped3_tb;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, request_n = 1'b1;
  logic stall, latch_intermediate, latch_result;
  logic latch_operands;
  int checks = 0, failures = 0, n_b2b = 0, n_req = 0, n_res = 0;
  bit [3:0] hist;   // hist[i]: request i+1 cycles ago

  mu_ctrl_piped3 dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what, input int c);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s cycle %0d", what, c); end
  endtask

  initial begin
    bit req;
    hist = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      start = (c == 0);
      req = ($urandom_range(0, 2) == 0);
      if (req && hist[0]) n_b2b++;
      if (req) n_req++;
      request_n = !req;
      #1;
      chk(latch_operands === req, "latch_operands", c);
      chk(latch_intermediate === (hist[0] | hist[1]), "latch_intermediate", c);
      chk(latch_result === hist[2], "latch_result 3 cycles after request", c);
      chk(stall === (hist[0] | hist[1] | hist[2]), "stall", c);
      if (latch_result) n_res++;
      hist = {hist[2:0], req};
      @(negedge clk);
    end
    chk(n_b2b > 0, "back-to-back requests exercised", 0);
    chk(n_res > 0 && n_res <= n_req, "results produced", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
