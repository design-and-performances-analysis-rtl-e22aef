// tb_instruction_register: self-checking test of the instruction register.
// Writes random words with random irwr and checks that the four 4-bit fields
// show the last word written, bit by bit.
module tb_instruction_register;
  logic clk = 1'b0, irwr;
  logic [15:0] inst_data, model;
  logic [3:0] f3, f2, f1, f0;
  int checks = 0, failures = 0;

  instruction_register dut (.clk, .irwr, .inst_data,
    .inst_15_12(f3), .inst_11_8(f2), .inst_7_4(f1), .inst_3_0(f0));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    irwr = 1'b1; inst_data = 16'h1234; model = 16'h1234;
    @(posedge clk); #1;
    for (int i = 0; i < 400; i++) begin
      irwr      = (i < 4) ? 1'b1 : 1'($urandom_range(0, 1));
      inst_data = 16'($urandom);
      @(posedge clk);
      if (irwr) model = inst_data;
      #1;
      checks++;
      if ({f3, f2, f1, f0} !== model || f3 !== model[15:12] || f0 !== model[3:0]) begin
        failures++;
        $display("cycle %0d: fields %h %h %h %h expected %h", i, f3, f2, f1, f0, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
