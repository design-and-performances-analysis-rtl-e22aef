// risc16_cpu: 16-bit non-pipelined load/store RISC processor (top level).
//
// A multi-cycle machine with sixteen 16-bit registers and sixteen
// three-operand instructions (ADD, SUB, AND, OR, XOR, NOT, SLA, SRA, LI, LW,
// SW, BIZ, BNZ, JAL, JMP, JR). Each instruction takes four clocks: two fetch
// phases (read the instruction, increment the PC, read the operands) and two
// execute phases (compute or access memory, then write back). A single ALU
// serves the PC increment, address and branch-target arithmetic as well as
// the ALU instructions.
//
// Blocks: control_unit (FSM), program_counter, instruction_register,
// instr_decoder, datapath (register file, operand latches, ALU, barrel
// shifter, accumulator, flag register).
//
// Memory interface: one external SRAM holds program and data. mem_addr_s1 is
// the low ADDR_W bits of the PC in FETCH1 and of the computed address in the
// first execute phase of LW / SW; mem_wr_s1 writes mem_wdata at that address
// on the rising clock edge. mem_rdata must be valid combinationally in the
// same cycle as the address (asynchronous SRAM read). The SRAM's shared data
// bus is split into mem_wdata / mem_rdata here; a board-level tristate pad
// joins them. Reset: reset_s1 synchronous, active high; execution starts at
// address 0 two clocks after it falls (IDLE, then FETCH1).
//
// The instruction set, the register organisation, the controller phases and
// the 14-bit SRAM interface follow the processor's published description;
// the single shared memory bus, the split data bus, the asynchronous-read
// memory timing and the synchronous reset are this design's choices.
module risc16_cpu
  import risc16_pkg::*;
#(
  parameter  int unsigned ADDR_W = 14,
  localparam int unsigned DATA_W = 16   // fixed by the 16-bit instruction format
) (
  input  logic              clock,
  input  logic              reset_s1,
  output logic              mem_wr_s1,
  output logic [ADDR_W-1:0] mem_addr_s1,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata,
  output logic [DATA_W-1:0] pc,
  output logic [4:0]        flags,
  output state_e            state
);

  ctrl_t             ctrl;
  decoded_t          dec;
  logic [3:0]        f_op, f_rd, f_rs, f_rt;
  logic [DATA_W-1:0] pc_next, alu_out, acc;
  logic              opa_zero;

  control_unit u_ctrl (
    .clk(clock), .reset_s1, .dec, .opa_zero, .ctrl, .state
  );

  assign pc_next = (ctrl.pc_sel == PCSEL_ACC) ? acc : '0;

  program_counter #(.WIDTH(DATA_W)) u_pc (
    .clk(clock), .rst(reset_s1), .pc_wrt_s2(ctrl.pc_wrt), .indata(pc_next), .outdata(pc)
  );

  instruction_register u_ir (
    .clk(clock), .irwr(ctrl.ir_wrt), .inst_data(mem_rdata),
    .inst_15_12(f_op), .inst_11_8(f_rd), .inst_7_4(f_rs), .inst_3_0(f_rt)
  );

  instr_decoder u_dec (
    .op_f(f_op), .rd_f(f_rd), .rs_f(f_rs), .rt_f(f_rt), .dec
  );

  datapath #(.WIDTH(DATA_W)) u_dp (
    .clk(clock), .rst(reset_s1), .ctrl, .dec, .pc, .mem_rdata,
    .alu_out, .acc, .opa_zero, .store_data(mem_wdata), .flags
  );

  assign mem_addr_s1 = ctrl.addr_alu ? alu_out[ADDR_W-1:0] : pc[ADDR_W-1:0];
  assign mem_wr_s1   = ctrl.mem_wr;

  // Memory is written only in the first execute phase of a store.
  a_wr_phase: assert property (@(posedge clock) disable iff (reset_s1)
                               mem_wr_s1 |-> (state == S_EXEC1 && dec.op == OP_SW));

endmodule
