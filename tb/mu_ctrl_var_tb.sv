// Self-checking testbench for mu_ctrl_var.
// Multiplies are issued after 0 to 2 idle cycles (0 gives back-to-back
// operations) and the testbench plays the datapath, raising mult_complete
// after a random number of intermediate cycles. Each cycle the outputs are
// compared with the operation timeline: latch_operands in the request cycle,
// then stall with latch_intermediate until completion and stall with
// latch_result in the completion cycle; idle only while no operation runs.
module mu_ctrl_var_tb;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, request_n = 1'b1, mult_complete = 1'b0;
  logic idle, stall, latch_operands, latch_intermediate, latch_result;
  int checks = 0, failures = 0, cyc = 0, n_b2b = 0, n_long = 0;

  mu_ctrl_var dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input logic [4:0] e);
    checks++;
    if ({idle, stall, latch_operands, latch_intermediate, latch_result} !== e) begin
      failures++;
      if (failures < 20)
        $display("FAIL cycle %0d: got %b want %b", cyc,
                 {idle, stall, latch_operands, latch_intermediate, latch_result}, e);
    end
  endtask

  task automatic step();
    @(negedge clk);
    cyc++;
    start = 1'b0;
    request_n = 1'b1;
    mult_complete = $urandom_range(0, 1);  // ignored while idle
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    start = 1'b1;
    for (int n = 0; n < 1500; n++) begin
      int gap, len;
      gap = $urandom_range(0, 2);
      len = $urandom_range(0, 5);
      if (gap == 0 && n > 0) n_b2b++;
      if (len > 2) n_long++;
      for (int g = 0; g < gap; g++) begin
        #1 cmp(5'b10000);
        step();
      end
      request_n = 1'b0;
      #1 cmp(5'b00100);
      step();
      for (int k = 0; k < len; k++) begin
        mult_complete = 1'b0;
        #1 cmp(5'b01010);
        step();
      end
      mult_complete = 1'b1;
      #1 cmp(5'b01001);
      step();
    end
    checks++; if (n_b2b == 0 || n_long == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
