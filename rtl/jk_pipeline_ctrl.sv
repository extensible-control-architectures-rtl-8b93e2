// JackKnife pipeline controller: the top of the control hierarchy.
//
// It is the basic tail-throttled interlocked pipeline of basic_pipeline_ctrl
// specialised to the six JackKnife stages (schedule, fetch, decode, read,
// execute, commit) and extended in three ways:
//  * Programming wait: after the `start` pulse the controller waits while
//    `programming_n` is low (program upload), and the context generator
//    starts in the cycle after the first cycle it is seen high.
//  * Extra stall sources, ORed into the stall a stage sees from its
//    successor: fetch also stalls on `stall_ibus`, read on
//    `stall_dependency`, execute on `stall_lsu | stall_bju | stall_mu`.
//  * Flush qualification: fetch, decode, read and execute are qualified by
//    the active-low `flush_schedule_n`, `flush_fetch_n`, `flush_decode_n`
//    and `flush_read_n`. While a flush is low the stage neither executes nor
//    keeps a stall context, so the instruction in it is swept away.
//
// For stage s with arriving context in_s and stall bit q_s:
//   active_s  = (in_s | q_s) & flush_n_s
//   stall_s   = active_s & (stall seen from the successor)
//   accept_s  = active_s & ~(stall seen from the successor)
// accept_s is the stage's single control output (pipeline-register latch
// enable), combinational in the current cycle; the context reaches the next
// stage one cycle later. Commit has no stall of its own and simply follows
// an accepted execute by one cycle.
//
// The stage structure, signal names and stall/flush wiring follow the
// description, including the multiplier stall input of its extended
// version. `stall_ibus` comes from the drawn circuit, where it enters the
// fetch stage; the textual specification omits it (tie it low to get the
// textual behaviour). The explicit `start` pulse and an asynchronous
// active-low reset are this design's choices.
module jk_pipeline_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic programming_n,
  input  logic stall_ibus,
  input  logic stall_dependency,
  input  logic stall_lsu,
  input  logic stall_bju,
  input  logic stall_mu,
  input  logic flush_schedule_n,
  input  logic flush_fetch_n,
  input  logic flush_decode_n,
  input  logic flush_read_n,
  output logic schedule,
  output logic fetch,
  output logic decode,
  output logic read,
  output logic execute,
  output logic commit,
  output logic stall_schedule,
  output logic stall_fetch,
  output logic stall_decode,
  output logic stall_read,
  output logic stall_execute
);

  // Programming wait and context generator.
  logic prog_wait_q, prog_done_q, gen_q;
  // Per-stage accept (context handed on) and stall bits.
  logic sch_acc_q, fet_acc_q, dec_acc_q, rd_acc_q, ex_acc_q;
  logic sch_stl_q, fet_stl_q, dec_stl_q, rd_stl_q, ex_stl_q;

  logic prog_act, ctx;
  logic sch_act, fet_act, dec_act, rd_act, ex_act;
  logic ex_hold, rd_hold, fet_hold;

  always_comb begin
    prog_act = start | prog_wait_q;
    ctx      = prog_done_q | gen_q;

    sch_act = ctx | sch_stl_q;
    fet_act = (sch_acc_q | fet_stl_q) & flush_schedule_n;
    dec_act = (fet_acc_q | dec_stl_q) & flush_fetch_n;
    rd_act  = (dec_acc_q | rd_stl_q)  & flush_decode_n;
    ex_act  = (rd_acc_q  | ex_stl_q)  & flush_read_n;

    // Stall chain, from the tail forwards.
    ex_hold        = stall_lsu | stall_bju | stall_mu;
    stall_execute  = ex_act & ex_hold;
    rd_hold        = stall_execute | stall_dependency;
    stall_read     = rd_act & rd_hold;
    stall_decode   = dec_act & stall_read;
    fet_hold       = stall_decode | stall_ibus;
    stall_fetch    = fet_act & fet_hold;
    stall_schedule = sch_act & stall_fetch;

    schedule = sch_act & ~stall_fetch;
    fetch    = fet_act & ~fet_hold;
    decode   = dec_act & ~stall_read;
    read     = rd_act  & ~rd_hold;
    execute  = ex_act  & ~ex_hold;
    commit   = ex_acc_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prog_wait_q <= 1'b0;
      prog_done_q <= 1'b0;
      gen_q       <= 1'b0;
      {sch_acc_q, fet_acc_q, dec_acc_q, rd_acc_q, ex_acc_q} <= '0;
      {sch_stl_q, fet_stl_q, dec_stl_q, rd_stl_q, ex_stl_q} <= '0;
    end else begin
      prog_wait_q <= prog_act & ~programming_n;
      prog_done_q <= prog_act & programming_n;
      gen_q       <= ctx;
      sch_acc_q   <= schedule;
      fet_acc_q   <= fetch;
      dec_acc_q   <= decode;
      rd_acc_q    <= read;
      ex_acc_q    <= execute;
      sch_stl_q   <= stall_schedule;
      fet_stl_q   <= stall_fetch;
      dec_stl_q   <= stall_decode;
      rd_stl_q    <= stall_read;
      ex_stl_q    <= stall_execute;
    end
  end

endmodule
