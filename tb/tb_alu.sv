// tb_alu: self-checking test of the ALU.
// For each of the six ALU operations (one-hot alu_op) applies corner operands
// and 3000 random ones, and compares result, carry-out and overflow with
// values computed here from integer arithmetic. Also checks that the shift
// codes and an all-zero alu_op give 0, and the AND example 0011 & 0010 = 0010.
module tb_alu;
  import risc16_pkg::*;
  alu_op_t op;
  logic [15:0] a, b, r;
  logic c, v;
  int checks = 0, failures = 0;

  alu #(.WIDTH(16)) dut (.alu_op(op), .a, .b, .result(r), .cout(c), .ovf(v));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int k, input logic [15:0] x, input logic [15:0] y);
    logic [15:0] er;
    logic ec, ev;
    int sx, sy, s;
    op = alu_op_t'(8'd1 << k); a = x; b = y;
    #1;
    sx = $signed(x); sy = $signed(y);
    ec = 0; ev = 0;
    case (k)
      0: begin er = x + y; ec = (int'(x) + int'(y)) > 65535; s = sx + sy; ev = (s > 32767) || (s < -32768); end
      1: begin er = x - y; ec = (x >= y); s = sx - sy; ev = (s > 32767) || (s < -32768); end
      2: er = x & y;
      3: er = x | y;
      4: er = x ^ y;
      5: er = ~x;
      default: er = 16'h0;
    endcase
    checks++;
    if (r !== er || c !== ec || v !== ev) begin
      failures++;
      $display("op %0d a=%h b=%h: got %h c%0d v%0d expected %h c%0d v%0d", k, x, y, r, c, v, er, ec, ev);
    end
  endtask

  initial begin
    logic [15:0] corners [6] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h5555};
    for (int k = 0; k < 8; k++) begin
      foreach (corners[i]) foreach (corners[j]) check_one(k, corners[i], corners[j]);
      for (int n = 0; n < 3000; n++) check_one(k, 16'($urandom), 16'($urandom));
    end
    op = '0; a = 16'h1234; b = 16'h4321; #1;
    checks++; if (r !== 16'h0) begin failures++; $display("no-op result %h", r); end
    op = ALU_AND; a = 16'h0003; b = 16'h0002; #1;
    checks++; if (r !== 16'h0002) begin failures++; $display("AND example %h", r); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
