// alu: combinational arithmetic and logic unit of the execution unit.
//
// The operation is chosen by the one-hot alu_op (risc16_pkg::ALU_*):
// ADD a+b, SUB a-b, AND, OR, XOR, NOT a. SUB is formed as a + ~b + 1, so cout
// is the carry of that sum (1 when no borrow). ovf is the two's-complement
// overflow of ADD and SUB and 0 otherwise. The shift operations SLA and SRA
// are done by the separate barrel shifter; with those codes, or with no bit
// set, the ALU result is 0. The same ALU also increments the PC and computes
// load/store addresses and branch targets (always with ALU_ADD); the one-hot
// ADD code is the documented one, the other bit positions are this design's.
module alu
  import risc16_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  alu_op_t          alu_op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] result,
  output logic             cout,
  output logic             ovf
);

  logic             sub;
  logic [WIDTH-1:0] b_eff;
  logic [WIDTH:0]   sum;

  assign sub   = alu_op[1];
  assign b_eff = sub ? ~b : b;
  assign sum   = {1'b0, a} + {1'b0, b_eff} + {{WIDTH{1'b0}}, sub};

  always_comb begin
    result = '0;
    cout   = 1'b0;
    ovf    = 1'b0;
    if (alu_op[0] || alu_op[1]) begin
      result = sum[WIDTH-1:0];
      cout   = sum[WIDTH];
      ovf    = (a[WIDTH-1] == b_eff[WIDTH-1]) && (sum[WIDTH-1] != a[WIDTH-1]);
    end
    else if (alu_op[2]) result = a & b;
    else if (alu_op[3]) result = a | b;
    else if (alu_op[4]) result = a ^ b;
    else if (alu_op[5]) result = ~a;
  end

endmodule
