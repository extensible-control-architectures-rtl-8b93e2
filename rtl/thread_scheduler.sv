// Thread scheduler for the schedule stage of the interleaved pipeline.
//
// In every cycle in which the pipeline controller accepts the schedule stage
// (`schedule` high) the scheduler names the thread whose next instruction is
// issued. An interrupt on `irq[i]` is remembered and its interrupt service
// thread i is issued at the next schedule slot, so with no stall it is
// issued in the cycle after the interrupt; pending interrupts go lowest index
// first. Otherwise the threads marked in `thread_active` are taken in round
// robin order, starting after the last thread issued, so inactive threads are
// skipped and a lone active thread is issued every cycle. When nothing is
// runnable `sel_valid` is low and the slot is a bubble.
//
// The description gives the policy (round robin over active threads,
// interrupt service threads on the next cycle, up to eight threads); the
// priority among several pending interrupts, the pending-interrupt register
// and the interface are this design's choices. sel_* are combinational from
// the registered state and thread_active; state updates on the clock edge
// of an accepted schedule slot.
module thread_scheduler #(
  parameter int unsigned N_THREADS = 8,
  localparam int unsigned TW       = (N_THREADS > 1) ? $clog2(N_THREADS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 schedule,
  input  logic [N_THREADS-1:0] thread_active,
  input  logic [N_THREADS-1:0] irq,
  output logic                 sel_valid,
  output logic                 sel_is_ist,
  output logic [TW-1:0]        sel_tid,
  output logic [N_THREADS-1:0] irq_pending
);

  logic [N_THREADS-1:0] pend_q;
  logic [TW-1:0]        last_q;
  logic                 found_irq, found_rr;
  logic [TW-1:0]        irq_tid, rr_tid;

  always_comb begin
    found_irq = 1'b0;
    irq_tid   = '0;
    for (int i = N_THREADS - 1; i >= 0; i--) begin
      if (pend_q[i]) begin
        found_irq = 1'b1;
        irq_tid   = TW'(i);
      end
    end
    found_rr = 1'b0;
    rr_tid   = '0;
    for (int off = N_THREADS; off >= 1; off--) begin
      int unsigned idx;
      idx = (int'(last_q) + off) % N_THREADS;
      if (thread_active[idx]) begin
        found_rr = 1'b1;
        rr_tid   = TW'(idx);
      end
    end
    sel_is_ist  = found_irq;
    sel_valid   = found_irq | found_rr;
    sel_tid     = found_irq ? irq_tid : rr_tid;
    irq_pending = pend_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q <= '0;
      last_q <= TW'(N_THREADS - 1);
    end else begin
      for (int i = 0; i < N_THREADS; i++) begin
        if (irq[i])
          pend_q[i] <= 1'b1;
        else if (schedule && found_irq && irq_tid == TW'(i))
          pend_q[i] <= 1'b0;
      end
      if (schedule && found_rr && !found_irq)
        last_q <= rr_tid;
    end
  end

endmodule
