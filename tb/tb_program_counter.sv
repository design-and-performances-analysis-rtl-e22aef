// tb_program_counter: self-checking test of the program counter register.
// Drives random load enables and data for 400 cycles with periodic resets and
// compares the output each cycle with a reference register kept here.
module tb_program_counter;
  logic clk = 1'b0, rst, wrt;
  logic [15:0] indata, outdata, model;
  int checks = 0, failures = 0;

  program_counter #(.WIDTH(16)) dut (.clk, .rst, .pc_wrt_s2(wrt), .indata, .outdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; wrt = 1'b0; indata = '0; model = '0;
    @(posedge clk); #1;
    checks++; if (outdata !== 16'h0) begin failures++; $display("reset value %h", outdata); end
    for (int i = 0; i < 400; i++) begin
      rst    = ($urandom_range(0, 19) == 0);
      wrt    = $urandom_range(0, 1);
      indata = 16'($urandom);
      @(posedge clk);
      if (rst) model = '0; else if (wrt) model = indata;
      #1;
      checks++;
      if (outdata !== model) begin
        failures++;
        $display("cycle %0d: pc %h expected %h", i, outdata, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
