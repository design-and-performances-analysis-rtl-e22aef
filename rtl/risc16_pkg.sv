// risc16_pkg: types and constants shared by the 16-bit RISC processor.
//
// The opcode values are those of the processor's instruction table (four-bit
// opcode in bits 15:12). The control signals alu_op, opB_sel and data_sel are
// one-hot, as the processor's control description prescribes; ADD = 8'b0000_0001
// and the "constant 1" operand select = 4'b0010 are the documented codes used
// for the PC increment, the other bit positions are this design's choice.
// The FSM has IDLE plus two FETCH and two EXECUTE phases, one clock each.
package risc16_pkg;

  typedef enum logic [3:0] {
    OP_ADD = 4'b0000,
    OP_SUB = 4'b0001,
    OP_AND = 4'b0010,
    OP_OR  = 4'b0011,
    OP_XOR = 4'b0100,
    OP_NOT = 4'b0101,
    OP_SLA = 4'b0110,
    OP_SRA = 4'b0111,
    OP_LI  = 4'b1000,
    OP_LW  = 4'b1001,
    OP_SW  = 4'b1010,
    OP_BIZ = 4'b1011,
    OP_BNZ = 4'b1100,
    OP_JAL = 4'b1101,
    OP_JMP = 4'b1110,
    OP_JR  = 4'b1111
  } opcode_e;

  // One-hot ALU operation (alu_op_s1). Bit i enables the i-th operation.
  typedef logic [7:0] alu_op_t;
  localparam alu_op_t ALU_ADD = 8'b0000_0001;
  localparam alu_op_t ALU_SUB = 8'b0000_0010;
  localparam alu_op_t ALU_AND = 8'b0000_0100;
  localparam alu_op_t ALU_OR  = 8'b0000_1000;
  localparam alu_op_t ALU_XOR = 8'b0001_0000;
  localparam alu_op_t ALU_NOT = 8'b0010_0000;
  localparam alu_op_t ALU_SLA = 8'b0100_0000;
  localparam alu_op_t ALU_SRA = 8'b1000_0000;

  // One-hot operand B select (opB_sel_s1).
  typedef logic [3:0] opb_sel_t;
  localparam opb_sel_t OPB_REG  = 4'b0001;  // operand latch B
  localparam opb_sel_t OPB_ONE  = 4'b0010;  // constant 1 (PC increment)
  localparam opb_sel_t OPB_OFFS = 4'b0100;  // sign-extended 4-bit offset
  localparam opb_sel_t OPB_ZERO = 4'b1000;  // constant 0 (pass operand A)

  // One-hot register-file write-data select (data_sel_s2).
  typedef logic [2:0] data_sel_t;
  localparam data_sel_t DSEL_ACC = 3'b001;  // ALU output latch
  localparam data_sel_t DSEL_MEM = 3'b010;  // memory data register
  localparam data_sel_t DSEL_IMM = 3'b100;  // 8-bit immediate, zero-extended

  // Operand A select (opA_sel_s1).
  typedef enum logic {
    OPA_REG = 1'b0,  // operand latch A
    OPA_PC  = 1'b1   // program counter
  } opa_sel_e;

  // Next-PC select (pc_sel_s2).
  typedef enum logic {
    PCSEL_ZERO = 1'b0,
    PCSEL_ACC  = 1'b1
  } pc_sel_e;

  typedef enum logic [2:0] {
    S_IDLE   = 3'd0,
    S_FETCH1 = 3'd1,  // fetch instruction, PC + 1 into the ALU output latch
    S_FETCH2 = 3'd2,  // write PC, fetch operands
    S_EXEC1  = 3'd3,  // ALU operation / memory access
    S_EXEC2  = 3'd4   // write back to register file or PC
  } state_e;

  // Decoded instruction, produced from the IR fields.
  typedef struct packed {
    opcode_e      op;
    logic [3:0]   rd;      // bits 11:8
    logic [3:0]   rs;      // bits 7:4
    logic [3:0]   rt;      // bits 3:0
    logic [7:0]   imm8;    // bits 7:0 (LI)
    logic [15:0]  offset;  // bits 3:0 sign-extended (branches and jumps)
    logic         is_alu;  // ADD..SRA
    logic         use_b;   // reads Rt into operand latch B
    logic         use_a;   // reads Rs into operand latch A
  } decoded_t;

  // Control word from the control unit to the datapath and memory interface.
  typedef struct packed {
    logic      pc_wrt;    // pc_wrt_s2
    pc_sel_e   pc_sel;    // pc_sel_s2
    logic      ir_wrt;    // ir_wrt_s1
    opa_sel_e  opa_sel;   // opA_sel_s1
    opb_sel_t  opb_sel;   // opB_sel_s1
    alu_op_t   alu_op;    // alu_op_s1
    logic      acc_ld;    // load ALU output latch
    logic      flag_ld;   // update flag register
    logic      a_ld;      // load operand latch A
    logic      b_ld;      // load operand latch B
    logic      mdr_ld;    // load memory data register
    logic      addr_alu;  // memory address from the ALU (1) or the PC (0)
    logic      mem_wr;    // mem_wr_s1
    logic      rf_we;     // register file write
    data_sel_t data_sel;  // data_sel_s2
  } ctrl_t;

endpackage
