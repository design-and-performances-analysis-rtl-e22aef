// tb_control_unit: self-checking test of the control FSM.
// Holds reset, then runs 600 random instructions (random decoded opcode and
// operand-A zero check) and checks, in every cycle, the state sequence
// IDLE -> FETCH1 -> FETCH2 -> EXEC1 -> EXEC2 -> FETCH1 (four clocks per
// instruction) and the main control signals of each phase against the
// expected behaviour written out here. Also checks that a reset in any state
// returns to IDLE and that IDLE selects a zero PC.
module tb_control_unit;
  import risc16_pkg::*;
  logic clk = 1'b0, rst, az;
  decoded_t dec;
  ctrl_t ctrl;
  state_e state;
  int checks = 0, failures = 0;
  int instrs = 0;

  control_unit dut (.clk, .reset_s1(rst), .dec, .opa_zero(az), .ctrl, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s op=%s state=%s: got %0d expected %0d", what, dec.op.name(), state.name(), got, exp); end
  endtask

  task automatic set_instr(input logic [3:0] op);
    dec = '0;
    dec.op = opcode_e'(op);
    dec.is_alu = (op < 8);
    dec.use_a = !(op == 8 || op == 13 || op == 14);
    dec.use_b = (op <= 4 || op == 10);
    dec.offset = 16'hfffe;
  endtask

  initial begin
    rst = 1; az = 0; set_instr(0);
    repeat (3) @(posedge clk);
    #1 checks++; if (state !== S_IDLE) begin failures++; $display("not IDLE in reset"); end
    expect_bit("idle pc_wrt", ctrl.pc_wrt, 1);
    expect_bit("idle pc_sel", ctrl.pc_sel, 0);
    rst = 0;
    @(posedge clk); #1;
    for (int n = 0; n < 600; n++) begin
      logic [3:0] op;
      logic alu, taken;
      op = 4'($urandom);
      // FETCH1
      checks++; if (state !== S_FETCH1) begin failures++; $display("instr %0d: state %s, expected FETCH1", n, state.name()); end
      expect_bit("f1 ir_wrt", ctrl.ir_wrt, 1);
      expect_bit("f1 opa pc", ctrl.opa_sel, 1);
      checks++; if (ctrl.opb_sel !== 4'b0010 || ctrl.alu_op !== 8'b0000_0001) begin failures++; $display("f1 opb/alu"); end
      expect_bit("f1 acc_ld", ctrl.acc_ld, 1);
      expect_bit("f1 pc_wrt", ctrl.pc_wrt, 0);
      expect_bit("f1 addr", ctrl.addr_alu, 0);
      @(posedge clk); #1;
      set_instr(op);
      az = $urandom_range(0, 1);
      alu = (op < 8);
      #1;
      // FETCH2
      checks++; if (state !== S_FETCH2) begin failures++; $display("state %s, expected FETCH2", state.name()); end
      expect_bit("f2 pc_wrt", ctrl.pc_wrt, 1);
      expect_bit("f2 pc_sel", ctrl.pc_sel, 1);
      expect_bit("f2 a_ld", ctrl.a_ld, dec.use_a);
      expect_bit("f2 b_ld", ctrl.b_ld, dec.use_b);
      expect_bit("f2 rf_we", ctrl.rf_we, op == 13);
      @(posedge clk); #1;
      // EXEC1
      checks++; if (state !== S_EXEC1) begin failures++; $display("state %s, expected EXEC1", state.name()); end
      if (alu) begin
        checks++; if (ctrl.alu_op !== alu_op_t'(8'd1 << op)) begin failures++; $display("e1 alu_op %b for op %0d", ctrl.alu_op, op); end
        expect_bit("e1 opa reg", ctrl.opa_sel, 0);
        checks++; if (ctrl.opb_sel !== OPB_REG) begin failures++; $display("e1 opb"); end
      end else if (op != 8) begin
        checks++; if (ctrl.alu_op !== ALU_ADD) begin failures++; $display("e1 add expected for op %0d", op); end
        expect_bit("e1 opa", ctrl.opa_sel, op inside {11, 12, 13, 14});
        checks++; if (ctrl.opb_sel !== ((op inside {11, 12, 13, 14}) ? OPB_OFFS : OPB_ZERO)) begin failures++; $display("e1 opb for op %0d", op); end
      end
      expect_bit("e1 flag_ld", ctrl.flag_ld, alu);
      expect_bit("e1 mem_wr", ctrl.mem_wr, op == 10);
      expect_bit("e1 addr", ctrl.addr_alu, op == 9 || op == 10);
      expect_bit("e1 mdr_ld", ctrl.mdr_ld, op == 9);
      expect_bit("e1 rf_we", ctrl.rf_we, 0);
      @(posedge clk); #1;
      // EXEC2
      checks++; if (state !== S_EXEC2) begin failures++; $display("state %s, expected EXEC2", state.name()); end
      taken = (op == 11 && az) || (op == 12 && !az) || op == 13 || op == 14 || op == 15;
      expect_bit("e2 pc_wrt", ctrl.pc_wrt, taken);
      if (taken) expect_bit("e2 pc_sel", ctrl.pc_sel, 1);
      expect_bit("e2 rf_we", ctrl.rf_we, alu || op == 8 || op == 9);
      if (alu || op == 8 || op == 9) begin
        checks++;
        if (ctrl.data_sel !== (alu ? DSEL_ACC : (op == 8) ? DSEL_IMM : DSEL_MEM)) begin failures++; $display("e2 data_sel op %0d", op); end
      end
      expect_bit("e2 mem_wr", ctrl.mem_wr, 0);
      @(posedge clk); #1;
      instrs++;
      // occasional reset in a random phase
      if (n % 97 == 50) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1 rst = 1; @(posedge clk); #1 rst = 0;
        checks++; if (state !== S_IDLE) begin failures++; $display("reset did not give IDLE"); end
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
