// control_unit: the processor's control FSM.
//
// States: IDLE, FETCH1, FETCH2, EXEC1, EXEC2, one clock each, so every
// instruction takes four clocks (FETCH1 -> FETCH2 -> EXEC1 -> EXEC2 ->
// FETCH1). reset_s1 (synchronous, active high) forces IDLE from any state.
//   IDLE   : pc_wrt = 1 with pc_sel = zero, so the PC is 0.
//   FETCH1 : memory[PC] into the IR; ALU adds PC + 1 (opB_sel = 0010,
//            alu_op = ADD = 00000001) into the ALU output latch.
//   FETCH2 : PC <= ALU output latch; the decoded opcode loads the operand
//            latches it needs (A <= Rs, B <= Rt); JAL writes PC + 1 to Rd.
//   EXEC1  : ALU instructions apply their own alu_op to the latches and
//            update the flags; LW / SW add A + 0 and access memory at that
//            address; BIZ, BNZ, JAL, JMP add PC + offset; JR adds A + 0.
//   EXEC2  : write Rd (ALU result, loaded word or LI immediate), or write the
//            PC from the ALU output latch for jumps and for a branch whose
//            condition holds (BIZ: latch A = 0, BNZ: latch A != 0).
// The state sequence and the signals named above follow the processor's
// control description; the exact per-opcode assignments of the two phases are
// this design's reading of it. Outputs are a Moore/Mealy mix: a function of
// the state, the decoded IR and the zero check of operand A.
module control_unit
  import risc16_pkg::*;
(
  input  logic     clk,
  input  logic     reset_s1,
  input  decoded_t dec,
  input  logic     opa_zero,
  output ctrl_t    ctrl,
  output state_e   state
);

  state_e next;

  always_ff @(posedge clk) begin
    if (reset_s1) state <= S_IDLE;
    else          state <= next;
  end

  always_comb begin
    unique case (state)
      S_IDLE:   next = S_FETCH1;
      S_FETCH1: next = S_FETCH2;
      S_FETCH2: next = S_EXEC1;
      S_EXEC1:  next = S_EXEC2;
      S_EXEC2:  next = S_FETCH1;
      default:  next = S_IDLE;
    endcase
  end

  always_comb begin
    ctrl          = '0;
    ctrl.pc_sel   = PCSEL_ZERO;
    ctrl.opa_sel  = OPA_REG;
    ctrl.opb_sel  = OPB_ZERO;
    ctrl.alu_op   = ALU_ADD;
    ctrl.data_sel = DSEL_ACC;
    unique case (state)
      S_IDLE: begin
        ctrl.pc_wrt = 1'b1;
        ctrl.pc_sel = PCSEL_ZERO;
      end
      S_FETCH1: begin
        ctrl.ir_wrt  = 1'b1;
        ctrl.opa_sel = OPA_PC;
        ctrl.opb_sel = OPB_ONE;
        ctrl.alu_op  = ALU_ADD;
        ctrl.acc_ld  = 1'b1;
      end
      S_FETCH2: begin
        ctrl.pc_wrt = 1'b1;
        ctrl.pc_sel = PCSEL_ACC;
        ctrl.a_ld   = dec.use_a;
        ctrl.b_ld   = dec.use_b;
        if (dec.op == OP_JAL) begin
          ctrl.rf_we    = 1'b1;
          ctrl.data_sel = DSEL_ACC;
        end
      end
      S_EXEC1: begin
        if (dec.is_alu) begin
          ctrl.opa_sel = OPA_REG;
          ctrl.opb_sel = OPB_REG;
          ctrl.alu_op  = alu_op_t'(8'd1 << dec.op[2:0]);
          ctrl.acc_ld  = 1'b1;
          ctrl.flag_ld = 1'b1;
        end else begin
          unique case (dec.op)
            OP_LW: begin
              ctrl.addr_alu = 1'b1;
              ctrl.mdr_ld   = 1'b1;
            end
            OP_SW: begin
              ctrl.addr_alu = 1'b1;
              ctrl.mem_wr   = 1'b1;
            end
            OP_BIZ, OP_BNZ, OP_JAL, OP_JMP: begin
              ctrl.opa_sel = OPA_PC;
              ctrl.opb_sel = OPB_OFFS;
              ctrl.acc_ld  = 1'b1;
            end
            OP_JR: begin
              ctrl.acc_ld = 1'b1;
            end
            default: ;  // LI: nothing to compute
          endcase
        end
      end
      S_EXEC2: begin
        if (dec.is_alu) begin
          ctrl.rf_we    = 1'b1;
          ctrl.data_sel = DSEL_ACC;
        end else begin
          unique case (dec.op)
            OP_LW: begin
              ctrl.rf_we    = 1'b1;
              ctrl.data_sel = DSEL_MEM;
            end
            OP_LI: begin
              ctrl.rf_we    = 1'b1;
              ctrl.data_sel = DSEL_IMM;
            end
            OP_BIZ: begin
              ctrl.pc_wrt = opa_zero;
              ctrl.pc_sel = PCSEL_ACC;
            end
            OP_BNZ: begin
              ctrl.pc_wrt = ~opa_zero;
              ctrl.pc_sel = PCSEL_ACC;
            end
            OP_JAL, OP_JMP, OP_JR: begin
              ctrl.pc_wrt = 1'b1;
              ctrl.pc_sel = PCSEL_ACC;
            end
            default: ;  // SW: done in EXEC1
          endcase
        end
      end
      default: ;
    endcase
  end

  // The one-hot control fields must stay one-hot.
  a_onehot_alu: assert property (@(posedge clk) disable iff (reset_s1) $onehot(ctrl.alu_op));
  a_onehot_opb: assert property (@(posedge clk) disable iff (reset_s1) $onehot(ctrl.opb_sel));
  a_onehot_dsel: assert property (@(posedge clk) disable iff (reset_s1) $onehot(ctrl.data_sel));

endmodule
