// tb_datapath: self-checking test of the datapath driven by hand-made
// control words, one micro-step per clock, as the control unit would issue
// them. Loads registers with LI-style writes, runs every ALU and shift
// operation through the operand latches and the accumulator, writes results
// back, loads words through the memory data register, and checks the
// combinational execution result (addresses, PC + 1, PC + offset), the
// accumulator, the flags, the operand-A zero check and the register contents
// (read back through latch B) against a register model kept here.
module tb_datapath;
  import risc16_pkg::*;
  logic clk = 1'b0, rst;
  ctrl_t ctrl;
  decoded_t dec;
  logic [15:0] pc, mem_rdata, alu_out, acc, store_data;
  logic opa_zero;
  logic [4:0] flags;
  logic [15:0] regs [16];
  int checks = 0, failures = 0;

  datapath #(.WIDTH(16)) dut (.clk, .rst, .ctrl, .dec, .pc, .mem_rdata, .alu_out, .acc,
                              .opa_zero, .store_data, .flags);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctrl_t idle_ctrl();
    ctrl_t c = '0;
    c.opb_sel = OPB_ZERO; c.alu_op = ALU_ADD; c.data_sel = DSEL_ACC;
    return c;
  endfunction

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  task automatic step(); @(posedge clk); #1; ctrl = idle_ctrl(); endtask

  task automatic li(input logic [3:0] rd, input logic [7:0] imm);
    dec.rd = rd; dec.imm8 = imm; ctrl.rf_we = 1; ctrl.data_sel = DSEL_IMM; step();
    regs[rd] = {8'h00, imm};
  endtask

  task automatic read_reg(input logic [3:0] r);
    dec.rt = r; ctrl.b_ld = 1; step();
    check($sformatf("r%0d", r), store_data, regs[r]);
  endtask

  task automatic alu_instr(input int k, input logic [3:0] rd, rs, rt);
    logic [15:0] x, y, e;
    logic ec, ev;
    int s, ones;
    x = regs[rs]; y = regs[rt]; ec = 0; ev = 0;
    case (k)
      0: begin e = x + y; ec = (int'(x) + int'(y)) > 65535; s = $signed(x) + $signed(y); ev = s > 32767 || s < -32768; end
      1: begin e = x - y; ec = x >= y; s = $signed(x) - $signed(y); ev = s > 32767 || s < -32768; end
      2: e = x & y;
      3: e = x | y;
      4: e = x ^ y;
      5: e = ~x;
      6: begin e = {x[14:0], 1'b0}; ec = x[15]; end
      default: begin e = {x[15], x[15:1]}; ec = x[0]; end
    endcase
    ones = 0; for (int i = 0; i < 16; i++) ones += e[i];
    // FETCH2: operand latches
    dec.rs = rs; dec.rt = rt; ctrl.a_ld = 1; ctrl.b_ld = 1; step();
    check("opa_zero", 16'(opa_zero), 16'(x == 0));
    // EXEC1: operation
    ctrl.opa_sel = OPA_REG; ctrl.opb_sel = OPB_REG; ctrl.alu_op = alu_op_t'(8'd1 << k);
    ctrl.acc_ld = 1; ctrl.flag_ld = 1;
    #1 check($sformatf("alu_out op%0d", k), alu_out, e);
    step();
    check("acc", acc, e);
    check("flags", 16'(flags), 16'({ev, ec, e[15], e == 0, 1'(ones % 2)}));
    // EXEC2: write back
    dec.rd = rd; ctrl.rf_we = 1; ctrl.data_sel = DSEL_ACC; step();
    regs[rd] = e;
  endtask

  initial begin
    rst = 1; ctrl = idle_ctrl(); dec = '0; pc = 16'h0100; mem_rdata = '0;
    foreach (regs[i]) regs[i] = 0;
    step(); step();
    rst = 0;
    for (int r = 0; r < 16; r++) li(4'(r), 8'($urandom));
    li(4'd0, 8'h00);
    for (int r = 0; r < 16; r++) read_reg(4'(r));
    for (int n = 0; n < 400; n++) begin
      alu_instr(n % 8, 4'($urandom), 4'($urandom), 4'($urandom));
      if (n % 16 == 0) li(4'($urandom), 8'($urandom));
    end
    for (int r = 0; r < 16; r++) read_reg(4'(r));
    // PC + 1 and PC + sign-extended offset
    for (int n = 0; n < 50; n++) begin
      pc = 16'($urandom);
      ctrl.opa_sel = OPA_PC; ctrl.opb_sel = OPB_ONE; ctrl.acc_ld = 1;
      #1 check("pc+1", alu_out, pc + 16'd1);
      step();
      check("acc pc+1", acc, pc + 16'd1);
      dec.offset = {{12{n[3]}}, 4'(n)};
      ctrl.opa_sel = OPA_PC; ctrl.opb_sel = OPB_OFFS; ctrl.acc_ld = 1;
      #1 check("pc+offs", alu_out, pc + dec.offset);
      step();
    end
    // LW through the memory data register: address = Rs + 0
    for (int n = 0; n < 50; n++) begin
      logic [3:0] rs, rd;
      logic [15:0] word;
      rs = 4'($urandom); rd = 4'($urandom); word = 16'($urandom);
      dec.rs = rs; ctrl.a_ld = 1; step();
      ctrl.opa_sel = OPA_REG; ctrl.opb_sel = OPB_ZERO; ctrl.mdr_ld = 1; mem_rdata = word;
      #1 check("lw address", alu_out, regs[rs]);
      step();
      mem_rdata = 16'($urandom);
      dec.rd = rd; ctrl.rf_we = 1; ctrl.data_sel = DSEL_MEM; step();
      regs[rd] = word;
      read_reg(rd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
