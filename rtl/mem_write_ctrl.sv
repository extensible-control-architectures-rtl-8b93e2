// Memory write controller: the introductory example of context-based
// (one-hot, NFA-style) control.
//
// Behaviour: after `start`, a context generator offers a point of control on
// every cycle. A cycle with `request` high raises `latch_operands` and moves
// the point of control to the write step. The write step waits while
// `bus_free` is low and raises `output_to_bus` in the first cycle it is high.
// One cycle later `release_bus` is raised. Several requests can be in flight
// at once (one per step); points of control that meet in the same step merge.
//
// Timing: latch_operands and output_to_bus are combinational from the inputs
// in the cycle they match; release_bus is registered, exactly one cycle after
// output_to_bus. `start` is a one-cycle pulse after reset.
//
// The four state bits (context generator, write-entry, bus wait, release)
// follow the generated circuit of the description; reset clears them all,
// which is this design's choice.
module mem_write_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic request,
  input  logic bus_free,
  output logic latch_operands,
  output logic output_to_bus,
  output logic release_bus
);

  logic gen_q;    // context generator loop (.*)
  logic write_q;  // point of control entering the write step
  logic wait_q;   // point of control held while the bus is busy
  logic rel_q;    // point of control in the cleanup step

  logic ctx, write_act;

  always_comb begin
    ctx            = start | gen_q;
    latch_operands = ctx & request;
    write_act      = write_q | wait_q;
    output_to_bus  = write_act & bus_free;
    release_bus    = rel_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen_q   <= 1'b0;
      write_q <= 1'b0;
      wait_q  <= 1'b0;
      rel_q   <= 1'b0;
    end else begin
      gen_q   <= ctx;
      write_q <= latch_operands;
      wait_q  <= write_act & ~bus_free;
      rel_q   <= output_to_bus;
    end
  end

endmodule
