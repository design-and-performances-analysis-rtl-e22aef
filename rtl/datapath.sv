// datapath: register unit and execution unit of the 16-bit RISC processor.
//
// Holds the 16 x 16 register file, the operand latches A and B (loaded from
// read ports Rs and Rt in the second fetch phase), the operand multiplexers,
// the ALU, the barrel shifter, the accumulator (ALU output latch), the flag
// register and the memory data register (MDR). Every action is enabled by the
// control word ctrl from the control unit:
//   operand A  = latch A or the PC                      (ctrl.opa_sel)
//   operand B  = latch B, 1, sign-extended offset, or 0 (one-hot ctrl.opb_sel)
//   execution result = ALU, or barrel shifter by one place for SLA / SRA
//   register-file write data = accumulator, MDR or the LI immediate
//                              (one-hot ctrl.data_sel), written to Rd
// alu_out is the combinational execution result, used as the memory address
// of LW / SW in the first execute phase; store_data (latch B) is the SW data.
// opa_zero is the zero check of latch A used by BIZ / BNZ. All registers
// change on the rising clock edge. The unit list and the operand-latch /
// output-latch organisation follow the processor's description; the MDR, the
// select encodings other than the documented ones, the one-place shift and
// the zero-extension of the immediate are this design's choices.
module datapath
  import risc16_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  ctrl_t            ctrl,
  input  decoded_t         dec,
  input  logic [WIDTH-1:0] pc,
  input  logic [WIDTH-1:0] mem_rdata,
  output logic [WIDTH-1:0] alu_out,
  output logic [WIDTH-1:0] acc,
  output logic             opa_zero,
  output logic [WIDTH-1:0] store_data,
  output logic [4:0]       flags
);

  logic [WIDTH-1:0] rdata1, rdata2, wdata;
  logic [WIDTH-1:0] lat_a, lat_b, mdr;
  logic [WIDTH-1:0] opa, opb;
  logic [WIDTH-1:0] alu_res, sh_res;
  logic             alu_c, alu_v, sh_c, is_shift;

  register_file #(.NREGS(16), .WIDTH(WIDTH)) u_rf (
    .clk, .rst,
    .raddr1(dec.rs), .raddr2(dec.rt), .rdata1, .rdata2,
    .we(ctrl.rf_we), .waddr(dec.rd), .wdata
  );

  // Operand latches ("register 1" and "register 2") and memory data register.
  always_ff @(posedge clk) begin
    if (rst) begin
      lat_a <= '0;
      lat_b <= '0;
      mdr   <= '0;
    end else begin
      if (ctrl.a_ld)   lat_a <= rdata1;
      if (ctrl.b_ld)   lat_b <= rdata2;
      if (ctrl.mdr_ld) mdr   <= mem_rdata;
    end
  end

  assign opa = (ctrl.opa_sel == OPA_PC) ? pc : lat_a;

  always_comb begin
    opb = '0;
    if (ctrl.opb_sel[0]) opb |= lat_b;
    if (ctrl.opb_sel[1]) opb |= WIDTH'(1);
    if (ctrl.opb_sel[2]) opb |= dec.offset[WIDTH-1:0];
    // opb_sel[3] selects zero
  end

  alu #(.WIDTH(WIDTH)) u_alu (
    .alu_op(ctrl.alu_op), .a(opa), .b(opb), .result(alu_res), .cout(alu_c), .ovf(alu_v)
  );

  barrel_shifter #(.WIDTH(WIDTH)) u_shift (
    .din(opa), .amount($clog2(WIDTH)'(1)), .right(ctrl.alu_op[7]),
    .dout(sh_res), .shift_out(sh_c)
  );

  assign is_shift = ctrl.alu_op[6] | ctrl.alu_op[7];
  assign alu_out  = is_shift ? sh_res : alu_res;

  accumulator #(.WIDTH(WIDTH)) u_acc (
    .clk, .rst, .load(ctrl.acc_ld), .sel_shift(is_shift),
    .alu_in(alu_res), .shift_in(sh_res), .acc
  );

  flag_register #(.WIDTH(WIDTH)) u_flags (
    .clk, .rst, .load(ctrl.flag_ld), .result(alu_out),
    .c_in(is_shift ? sh_c : alu_c), .v_in(is_shift ? 1'b0 : alu_v), .flags
  );

  always_comb begin
    wdata = '0;
    if (ctrl.data_sel[0]) wdata |= acc;
    if (ctrl.data_sel[1]) wdata |= mdr;
    if (ctrl.data_sel[2]) wdata |= WIDTH'(dec.imm8);
  end

  assign opa_zero   = (lat_a == '0);
  assign store_data = lat_b;

endmodule
