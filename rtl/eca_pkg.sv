// Shared types and constants of the JackKnife control hierarchy.
//
// The pipeline has six stages (schedule, fetch, decode, read, execute,
// commit) and up to eight hardware threads, both numbers taken from the
// design description. The operation class of the instruction currently in
// the execute stage selects which multi-cycle unit controller receives the
// request; the encoding of that class is this design's own choice, since the
// instruction decoder that produces it belongs to the datapath.
package eca_pkg;

  localparam int unsigned NUM_STAGES  = 6;
  localparam int unsigned MAX_THREADS = 8;

  // Operation class of the instruction in the execute stage.
  typedef enum logic [3:0] {
    OP_ALU    = 4'd0,  // single-cycle, no unit controller involved
    OP_LOAD   = 4'd1,  // load/store unit
    OP_STORE  = 4'd2,
    OP_JUMP   = 4'd3,  // branch/jump unit
    OP_BRANCH = 4'd4,
    OP_CALL   = 4'd5,
    OP_RETURN = 4'd6,
    OP_SKIP   = 4'd7,
    OP_MUL    = 4'd8   // multiplier
  } exec_op_e;

  // Which of the three interchangeable multiplier controllers is fitted.
  typedef enum logic [1:0] {
    MU_PIPED2   = 2'd0,  // 2-cycle pipelined multiplier
    MU_PIPED3   = 2'd1,  // 4-cycle pipelined multiplier
    MU_VARIABLE = 2'd2   // variable-length multiplier
  } mu_kind_e;

  // Action outputs of the unit controllers, bundled for the top level.
  typedef struct packed {
    logic idle;
    logic jump_accept;
    logic branch_accept1;
    logic branch_accept2;
    logic branch_latch;
    logic call_accept1;
    logic call_accept2;
    logic call_wait;
    logic return_accept1;
    logic return_accept2;
    logic return_wait;
    logic skip_accept1;
    logic cleanup;
    logic stall_pipeline;
  } bju_act_t;

  typedef struct packed {
    logic idle;
    logic load_output_address;
    logic ld_input_data;
    logic store_output_address_data;
    logic push2_accept1;
    logic push2_accept2;
    logic pop2_accept1;
    logic pop2_accept2;
    logic pop2_accept3;
    logic memory_wait1;
    logic memory_wait2;
    logic memory_wait3;
    logic cleanup;
    logic stall_pipeline;
  } lsu_act_t;

  typedef struct packed {
    logic idle;            // variable-length unit only
    logic latch_operands;  // 4-cycle and variable-length units
    logic latch_intermediate;
    logic latch_result;
    logic stall;
  } mu_act_t;

  function automatic logic is_bju_op(exec_op_e op);
    return op inside {OP_JUMP, OP_BRANCH, OP_CALL, OP_RETURN, OP_SKIP};
  endfunction

  function automatic logic is_lsu_op(exec_op_e op);
    return op inside {OP_LOAD, OP_STORE};
  endfunction

endpackage
