// tb_programs: runs three small programs on the processor at its default
// size, one of each kind: arithmetic (sum of an 8-word array), logical (XOR,
// AND and OR reduction of the same array), and shifting (8 x 8-bit multiply
// by shift-and-add). Each program is run on 20 random data sets. The results
// it stores at 00F0h.. are compared with values computed here. The number of
// clocks until the program reaches its final JMP-to-self is compared with 4
// clocks times the number of instructions the program executes.
module tb_programs;
  import risc16_pkg::*;
  localparam int AW = 14;

  logic clk = 1'b0, rst;
  logic mem_wr;
  logic [AW-1:0] mem_addr;
  logic [15:0] mem_wdata, mem_rdata, pc;
  logic [4:0] flags;
  state_e state;
  int checks = 0, failures = 0;

  risc16_cpu dut (.clock(clk), .reset_s1(rst), .mem_wr_s1(mem_wr), .mem_addr_s1(mem_addr),
                  .mem_wdata, .mem_rdata, .pc, .flags, .state);
  sram_model #(.ADDR_W(AW), .DATA_W(16)) u_sram (.clk, .we(mem_wr), .addr(mem_addr),
                                                .wdata(mem_wdata), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] enc(input logic [3:0] op, input logic [3:0] a, input logic [3:0] b, input logic [3:0] c);
    return {op, a, b, c};
  endfunction

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  // Reset, run until the FETCH1 of the instruction at halt_pc, return clocks
  // counted from the first FETCH1.
  task automatic run_program(input logic [15:0] halt_pc, output int clocks);
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    while (state != S_FETCH1) begin @(posedge clk); #1; end
    clocks = 0;
    do begin @(posedge clk); #1; clocks++; end
    while (!(state == S_FETCH1 && pc == halt_pc) && clocks < 5000);
  endtask

  // Program A: sum of M[80h..87h] -> M[F0h]
  localparam int LEN_A = 12;
  localparam logic [15:0] PROG_A [LEN_A] = '{
    enc(8, 1, 4'h8, 4'h0),   //  0 LI  r1, 80h   pointer
    enc(8, 2, 4'h0, 4'h8),   //  1 LI  r2, 8     count
    enc(8, 3, 4'h0, 4'h1),   //  2 LI  r3, 1
    enc(8, 4, 4'h0, 4'h0),   //  3 LI  r4, 0     sum
    enc(9, 5, 1, 0),         //  4 LW  r5, [r1]
    enc(0, 4, 4, 5),         //  5 ADD r4, r4, r5
    enc(0, 1, 1, 3),         //  6 ADD r1, r1, r3
    enc(1, 2, 2, 3),         //  7 SUB r2, r2, r3
    enc(12, 0, 2, 4'hb),     //  8 BNZ r2, -5    -> 4
    enc(8, 6, 4'hf, 4'h0),   //  9 LI  r6, F0h
    enc(10, 0, 6, 4),        // 10 SW  [r6], r4
    enc(14, 0, 0, 4'hf)      // 11 JMP -1
  };

  // Program B: XOR, AND, OR of M[80h..87h] -> M[F0h], M[F1h], M[F2h]
  localparam int LEN_B = 20;
  localparam logic [15:0] PROG_B [LEN_B] = '{
    enc(8, 1, 4'h8, 4'h0),   //  0 LI  r1, 80h
    enc(8, 2, 4'h0, 4'h8),   //  1 LI  r2, 8
    enc(8, 3, 4'h0, 4'h1),   //  2 LI  r3, 1
    enc(8, 4, 4'h0, 4'h0),   //  3 LI  r4, 0     xor
    enc(5, 7, 4, 0),         //  4 NOT r7, r4    and = FFFFh
    enc(8, 8, 4'h0, 4'h0),   //  5 LI  r8, 0     or
    enc(9, 5, 1, 0),         //  6 LW  r5, [r1]
    enc(4, 4, 4, 5),         //  7 XOR r4, r4, r5
    enc(2, 7, 7, 5),         //  8 AND r7, r7, r5
    enc(3, 8, 8, 5),         //  9 OR  r8, r8, r5
    enc(0, 1, 1, 3),         // 10 ADD r1, r1, r3
    enc(1, 2, 2, 3),         // 11 SUB r2, r2, r3
    enc(12, 0, 2, 4'h9),     // 12 BNZ r2, -7    -> 6
    enc(8, 6, 4'hf, 4'h0),   // 13 LI  r6, F0h
    enc(10, 0, 6, 4),        // 14 SW  [r6], r4
    enc(0, 6, 6, 3),         // 15 ADD r6, r6, r3
    enc(10, 0, 6, 7),        // 16 SW  [r6], r7
    enc(0, 6, 6, 3),         // 17 ADD r6, r6, r3
    enc(10, 0, 6, 8),        // 18 SW  [r6], r8
    enc(14, 0, 0, 4'hf)      // 19 JMP -1
  };

  // Program C: M[80h] * M[81h] (8-bit values) by shift-and-add -> M[F0h]
  localparam int LEN_C = 17;
  localparam logic [15:0] PROG_C [LEN_C] = '{
    enc(8, 1, 4'h8, 4'h0),   //  0 LI  r1, 80h
    enc(9, 2, 1, 0),         //  1 LW  r2, [r1]  multiplicand
    enc(8, 3, 4'h0, 4'h1),   //  2 LI  r3, 1
    enc(0, 1, 1, 3),         //  3 ADD r1, r1, r3
    enc(9, 4, 1, 0),         //  4 LW  r4, [r1]  multiplier
    enc(8, 5, 4'h0, 4'h0),   //  5 LI  r5, 0     product
    enc(8, 6, 4'h0, 4'h8),   //  6 LI  r6, 8     count
    enc(2, 7, 4, 3),         //  7 AND r7, r4, r3
    enc(11, 0, 7, 4'h1),     //  8 BIZ r7, +1    -> 10
    enc(0, 5, 5, 2),         //  9 ADD r5, r5, r2
    enc(6, 2, 2, 0),         // 10 SLA r2, r2
    enc(7, 4, 4, 0),         // 11 SRA r4, r4
    enc(1, 6, 6, 3),         // 12 SUB r6, r6, r3
    enc(12, 0, 6, 4'h9),     // 13 BNZ r6, -7    -> 7
    enc(8, 1, 4'hf, 4'h0),   // 14 LI  r1, F0h
    enc(10, 0, 1, 5),        // 15 SW  [r1], r5
    enc(14, 0, 0, 4'hf)      // 16 JMP -1
  };

  initial begin
    rst = 1;
    for (int i = 0; i < (1 << AW); i++) u_sram.mem[i] = '0;
    for (int set = 0; set < 20; set++) begin
      logic [15:0] d [8];
      logic [15:0] sum, x, a, o;
      int clocks, ones;
      foreach (d[i]) d[i] = 16'($urandom);
      sum = 0; x = 0; a = 16'hffff; o = 0;
      foreach (d[i]) begin sum += d[i]; x ^= d[i]; a &= d[i]; o |= d[i]; end
      // A
      for (int i = 0; i < LEN_A; i++) u_sram.mem[i] = PROG_A[i];
      for (int i = 0; i < 8; i++) u_sram.mem[14'(8'h80 + i)] = d[i];
      run_program(16'd11, clocks);
      check("sum", u_sram.mem[14'hf0], sum);
      check("sum clocks", 16'(clocks), 16'(4 * (4 + 8 * 5 + 2)));
      // B
      for (int i = 0; i < LEN_B; i++) u_sram.mem[i] = PROG_B[i];
      run_program(16'd19, clocks);
      check("xor", u_sram.mem[14'hf0], x);
      check("and", u_sram.mem[14'hf1], a);
      check("or", u_sram.mem[14'hf2], o);
      check("logic clocks", 16'(clocks), 16'(4 * (6 + 8 * 7 + 6)));
      // C
      for (int i = 0; i < LEN_C; i++) u_sram.mem[i] = PROG_C[i];
      u_sram.mem[14'h80] = {8'h00, d[0][7:0]};
      u_sram.mem[14'h81] = {8'h00, d[1][7:0]};
      run_program(16'd16, clocks);
      check("product", u_sram.mem[14'hf0], 16'(d[0][7:0]) * 16'(d[1][7:0]));
      ones = 0; for (int i = 0; i < 8; i++) ones += d[1][i];
      check("multiply clocks", 16'(clocks), 16'(4 * (7 + 8 * 6 + ones + 2)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
