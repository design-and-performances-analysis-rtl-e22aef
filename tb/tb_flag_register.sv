// tb_flag_register: self-checking test of the flag register.
// Random results, carry and overflow inputs and load enables for 1000 cycles
// plus the directed values 0 and 8000h; the expected flags {v,c,n,z,parity}
// are computed here by counting bits.
module tb_flag_register;
  logic clk = 1'b0, rst, load, cin, vin;
  logic [15:0] res;
  logic [4:0] flags, model;
  int checks = 0, failures = 0;

  flag_register #(.WIDTH(16)) dut (.clk, .rst, .load, .result(res), .c_in(cin), .v_in(vin), .flags);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; cin = 0; vin = 0; res = 0; model = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      int ones;
      load = (i < 4) ? 1'b1 : 1'($urandom_range(0, 1));
      cin  = $urandom_range(0, 1);
      vin  = $urandom_range(0, 1);
      res  = (i == 0) ? 16'h0000 : (i == 1) ? 16'h8000 : (i == 2) ? 16'h0003 : 16'($urandom);
      @(posedge clk);
      ones = 0;
      for (int k = 0; k < 16; k++) ones += res[k];
      if (load) model = {vin, cin, res[15], (res == 0), 1'(ones % 2)};
      #1;
      checks++;
      if (flags !== model) begin failures++; $display("cycle %0d: flags %b expected %b (res %h)", i, flags, model, res); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
