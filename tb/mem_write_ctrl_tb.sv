// Self-checking testbench for mem_write_ctrl.
// Part 1 replays the introductory waveform: a request while the bus is free
// (latch, write one cycle later, release one cycle after that), then a
// request while the bus is busy (the write waits for bus_free). Part 2 drives
// random request/bus_free and compares against a cycle model of the
// three-step protocol written as a list of pending writes.
module mem_write_ctrl_tb;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic request = 1'b0, bus_free = 1'b0;
  logic latch_operands, output_to_bus, release_bus;
  int checks = 0, failures = 0, cycle = 0;

  mem_write_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect3(input logic l, input logic o, input logic r, input string what);
    checks++;
    if ({latch_operands, output_to_bus, release_bus} !== {l, o, r}) begin
      failures++;
      $display("FAIL %s cycle %0d: got l=%b o=%b r=%b want %b %b %b", what, cycle,
               latch_operands, output_to_bus, release_bus, l, o, r);
    end
  endtask

  // Model: number of writes waiting for the bus and writes to release.
  bit waiting, entering, releasing;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // Part 1a: request with the bus free.
    request = 1'b1; bus_free = 1'b1; #1 expect3(1, 0, 0, "req");
    @(negedge clk); request = 1'b0; #1 expect3(0, 1, 0, "write");
    @(negedge clk); #1 expect3(0, 0, 1, "release");
    @(negedge clk); #1 expect3(0, 0, 0, "quiet");
    // Part 1b: request while the bus is busy for three cycles.
    bus_free = 1'b0; request = 1'b1; #1 expect3(1, 0, 0, "req busy");
    @(negedge clk); request = 1'b0; #1 expect3(0, 0, 0, "wait1");
    @(negedge clk); #1 expect3(0, 0, 0, "wait2");
    @(negedge clk); #1 expect3(0, 0, 0, "wait3");
    @(negedge clk); bus_free = 1'b1; #1 expect3(0, 1, 0, "write late");
    @(negedge clk); #1 expect3(0, 0, 1, "release late");
    @(negedge clk); #1 expect3(0, 0, 0, "quiet2");
    // Part 2: random traffic against the model.
    waiting = 0; entering = 0; releasing = 0;
    repeat (2000) begin
      @(negedge clk);
      request  = ($urandom_range(0, 2) == 0);
      bus_free = ($urandom_range(0, 2) != 0);
      #1;
      expect3(request, (waiting | entering) & bus_free, releasing, "random");
      releasing = (waiting | entering) & bus_free;
      waiting   = (waiting | entering) & !bus_free;
      entering  = request;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
