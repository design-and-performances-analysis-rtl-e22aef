// instruction_register: holds the instruction being executed.
//
// On a rising clock edge with irwr (ir_wrt_s1) high the register captures the
// 16-bit word read from memory. Its four 4-bit fields are brought out
// separately: bits 15:12 are the opcode for the control unit, 11:8 the
// destination register (Rd), 7:4 the source register (Rs), 3:0 the target
// register (Rt) or a branch offset. The port names follow the processor's IR
// diagram, which shows no reset: the IR is always written in the first fetch
// phase before it is decoded.
module instruction_register (
  input  logic        clk,
  input  logic        irwr,
  input  logic [15:0] inst_data,
  output logic [3:0]  inst_15_12,
  output logic [3:0]  inst_11_8,
  output logic [3:0]  inst_7_4,
  output logic [3:0]  inst_3_0
);

  logic [15:0] ir;

  always_ff @(posedge clk) begin
    if (irwr) ir <= inst_data;
  end

  assign inst_15_12 = ir[15:12];
  assign inst_11_8  = ir[11:8];
  assign inst_7_4   = ir[7:4];
  assign inst_3_0   = ir[3:0];

endmodule
