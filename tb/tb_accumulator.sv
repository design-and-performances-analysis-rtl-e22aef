// tb_accumulator: self-checking test of the accumulator (ALU output latch).
// Random load, source select, inputs and occasional reset for 1000 cycles,
// compared each cycle with a reference register.
module tb_accumulator;
  logic clk = 1'b0, rst, load, sel;
  logic [15:0] ai, si, acc, model;
  int checks = 0, failures = 0;

  accumulator #(.WIDTH(16)) dut (.clk, .rst, .load, .sel_shift(sel), .alu_in(ai), .shift_in(si), .acc);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; sel = 0; ai = 0; si = 0; model = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 1000; i++) begin
      rst  = ($urandom_range(0, 30) == 0);
      load = $urandom_range(0, 1);
      sel  = $urandom_range(0, 1);
      ai   = 16'($urandom);
      si   = 16'($urandom);
      @(posedge clk);
      if (rst) model = 0; else if (load) model = sel ? si : ai;
      #1;
      checks++;
      if (acc !== model) begin failures++; $display("cycle %0d: acc %h expected %h", i, acc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
