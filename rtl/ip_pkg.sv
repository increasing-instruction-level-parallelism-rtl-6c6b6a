// ip_pkg: types and constants shared by the instruction precomputation unit.
//
// A "unique computation" is an arithmetic opcode together with the values of
// its two input operands. The precomputation table (PT) stores unique
// computations with their results; the dispatch and issue stages of the core
// look an instruction up by opcode and operand values.
//
// Following the source design: a 4-way issue machine, a 2048-entry table, and a
// base machine with 2 integer ALUs, 2 floating-point ALUs, 1 integer
// multiply/divide unit, 1 floating-point multiply/divide unit and 2 memory
// ports. This design's own choices: an 8-bit opcode, 64-bit operand and result
// fields (wide enough for a double-precision value; 32-bit integer values are
// zero-extended), and the slot record layouts below.
package ip_pkg;

  localparam int unsigned OPC_W  = 8;   // opcode field width (assumed)
  localparam int unsigned DATA_W = 64;  // operand / result width (assumed)

  typedef logic [OPC_W-1:0]  opcode_t;
  typedef logic [DATA_W-1:0] data_t;

  // Functional-unit classes of the base machine.
  typedef enum logic [2:0] {
    FU_IALU   = 3'd0,  // integer ALU
    FU_IMULT  = 3'd1,  // integer multiply / divide
    FU_FPALU  = 3'd2,  // floating-point ALU
    FU_FPMULT = 3'd3,  // floating-point multiply / divide
    FU_MEM    = 3'd4   // memory port
  } fu_class_e;

  localparam int unsigned NUM_FU_CLASSES = 5;
  localparam int unsigned FU_CNT_W       = 3;  // width of a free-unit count

  // The key a lookup is made with: opcode and the values of both operands.
  typedef struct packed {
    opcode_t opcode;
    data_t   op1;
    data_t   op2;
  } uc_key_t;

  // One profiled unique computation as it is written into the PT.
  typedef struct packed {
    uc_key_t key;
    data_t   result;
  } pt_entry_t;

  // One lookup port of the PT.
  typedef struct packed {
    logic    valid;
    uc_key_t key;
  } pt_req_t;

  typedef struct packed {
    logic  hit;
    data_t result;
  } pt_rsp_t;

  // An instruction in a dispatch slot, as the core's decode stage delivers it.
  typedef struct packed {
    logic    valid;
    logic    is_arith;   // only arithmetic instructions may use the PT
    logic    op1_ready;  // operand value already available at dispatch
    logic    op2_ready;
    uc_key_t key;
  } disp_slot_t;

  // A ready instruction offered to the issue stage, oldest in slot 0.
  typedef struct packed {
    logic      valid;
    logic      is_arith;
    fu_class_e fu;
    uc_key_t   key;
  } issue_slot_t;

  // What the issue stage decided for one offered instruction.
  typedef enum logic [1:0] {
    ISSUE_WAIT = 2'd0,  // no functional unit and no PT hit: stays in the window
    ISSUE_FU   = 2'd1,  // sent to a free functional unit, executes normally
    ISSUE_PT   = 2'd2   // no free unit, result taken from the PT
  } issue_act_e;

endpackage
