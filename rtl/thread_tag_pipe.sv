// Thread tag pipeline.
//
// Every instruction carries the number of its thread through the pipeline so
// that operand access, write-back, stall and flush decisions and forwarding
// can be matched to the right instruction stream. This block holds one tag
// (thread number plus a valid bit that marks an issued instruction, as
// opposed to an empty schedule slot) per stage from fetch to commit. A
// stage's tag register loads the previous stage's tag in the cycle the
// pipeline controller accepts that previous stage, so a tag moves exactly
// with its instruction and stays put while the stage is stalled. The fetch
// tag loads the scheduler's choice when the schedule stage is accepted.
//
// The description states that instructions are tagged at all stages; the
// register layout and the valid bit are this design's choices. Index 0 of
// the output arrays is fetch, 4 is commit.
module thread_tag_pipe #(
  parameter int unsigned N_THREADS = 8,
  localparam int unsigned TW       = (N_THREADS > 1) ? $clog2(N_THREADS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          schedule,
  input  logic          fetch,
  input  logic          decode,
  input  logic          read,
  input  logic          execute,
  input  logic          sched_valid,
  input  logic [TW-1:0] sched_tid,
  output logic [TW-1:0] tag   [5],
  output logic [4:0]    valid
);

  logic [4:0] adv;

  assign adv = {execute, read, decode, fetch, schedule};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 5; s++) tag[s] <= '0;
      valid <= '0;
    end else begin
      for (int s = 0; s < 5; s++) begin
        if (adv[s]) begin
          tag[s]   <= (s == 0) ? sched_tid : tag[s-1];
          valid[s] <= (s == 0) ? sched_valid : valid[s-1];
        end
      end
    end
  end

endmodule
