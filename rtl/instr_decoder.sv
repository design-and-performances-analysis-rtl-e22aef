// instr_decoder: combinational instruction decoder.
//
// Takes the four IR fields and produces a decoded_t: the opcode as an enum,
// the register numbers Rd (bits 11:8), Rs (7:4) and Rt (3:0), the 8-bit
// immediate of LI (bits 7:0, zero-extended later), the 4-bit branch/jump
// offset (bits 3:0) sign-extended to 16 bits, and three class bits telling
// the control unit which operand latches an instruction needs. The field
// layout is that of the processor's instruction table; the sign extension of
// the offset and the zero extension of the immediate are this design's choice.
module instr_decoder
  import risc16_pkg::*;
(
  input  logic [3:0] op_f,
  input  logic [3:0] rd_f,
  input  logic [3:0] rs_f,
  input  logic [3:0] rt_f,
  output decoded_t   dec
);

  always_comb begin
    dec.op     = opcode_e'(op_f);
    dec.rd     = rd_f;
    dec.rs     = rs_f;
    dec.rt     = rt_f;
    dec.imm8   = {rs_f, rt_f};
    dec.offset = {{12{rt_f[3]}}, rt_f};
    dec.is_alu = (op_f[3] == 1'b0);
    unique case (dec.op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SW: begin
        dec.use_a = 1'b1; dec.use_b = 1'b1;
      end
      OP_NOT, OP_SLA, OP_SRA, OP_LW, OP_BIZ, OP_BNZ, OP_JR: begin
        dec.use_a = 1'b1; dec.use_b = 1'b0;
      end
      default: begin  // LI, JAL, JMP
        dec.use_a = 1'b0; dec.use_b = 1'b0;
      end
    endcase
  end

endmodule
