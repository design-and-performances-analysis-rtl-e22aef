// tb_register_file: self-checking test of the 16 x 16 two-read, one-write
// register file. Random writes and random read addresses on both ports for
// 2000 cycles, compared with an array model; includes the read-old-value
// behaviour when reading the register being written.
module tb_register_file;
  logic clk = 1'b0, rst, we;
  logic [3:0] ra1, ra2, wa;
  logic [15:0] rd1, rd2, wd;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  register_file #(.NREGS(16), .WIDTH(16)) dut (.clk, .rst, .raddr1(ra1), .raddr2(ra2),
    .rdata1(rd1), .rdata2(rd2), .we, .waddr(wa), .wdata(wd));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; ra1 = '0; ra2 = '0; wa = '0; wd = '0;
    foreach (model[i]) model[i] = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      we  = $urandom_range(0, 1);
      wa  = 4'($urandom);
      wd  = 16'($urandom);
      ra1 = 4'($urandom);
      ra2 = (i % 5 == 0) ? wa : 4'($urandom);
      #1;
      checks += 2;
      if (rd1 !== model[ra1]) begin failures++; $display("port1 r%0d = %h expected %h", ra1, rd1, model[ra1]); end
      if (rd2 !== model[ra2]) begin failures++; $display("port2 r%0d = %h expected %h", ra2, rd2, model[ra2]); end
      @(posedge clk);
      if (we) model[wa] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
