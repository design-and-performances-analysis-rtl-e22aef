// tb_risc16_cpu: end-to-end test of the processor with its default sizes
// (14-bit memory address, 16-bit data) and a model of the external SRAM.
//
// An instruction-set reference model written here runs in lock-step with the
// processor. At the start of every instruction (state FETCH1) the testbench
// compares the PC, the memory address, all sixteen registers and the flags
// with the model; it checks that every instruction takes exactly four clocks
// and that every memory write matches a store of the model.
//   Part 1: a directed program with arithmetic, logic and shift instructions,
//           a store and a load, a counted BNZ loop, taken and untaken BIZ, and
//           a JAL / JR subroutine call, ending in a JMP-to-self; final values
//           are also checked against numbers worked out by hand.
//   Part 2: thirty times, the whole memory filled with random words and
//           executed for 200 instructions after a reset that interrupts the
//           instruction in progress.
// Each mechanism (every opcode, branch taken / not taken, memory read and
// write, reset to IDLE, carry / overflow / zero / negative / parity flags)
// is counted; a mechanism that never happened counts as a failure.
module tb_risc16_cpu;
  import risc16_pkg::*;
  localparam int AW = 14;
  localparam int MW = 1 << AW;

  logic clk = 1'b0, rst;
  logic mem_wr;
  logic [AW-1:0] mem_addr;
  logic [15:0] mem_wdata, mem_rdata, pc;
  logic [4:0] flags;
  state_e state;

  int checks = 0, failures = 0;
  int op_count [16];
  int br_taken = 0, br_not_taken = 0, n_resets = 0, n_stores = 0, n_loads = 0;
  int n_carry = 0, n_ovf = 0, n_zero = 0, n_neg = 0, n_par = 0;

  // reference model state
  logic [15:0] r [16];
  logic [15:0] m [MW];
  logic [15:0] mpc;
  logic [4:0]  mflags;

  risc16_cpu dut (.clock(clk), .reset_s1(rst), .mem_wr_s1(mem_wr), .mem_addr_s1(mem_addr),
                  .mem_wdata, .mem_rdata, .pc, .flags, .state);

  sram_model #(.ADDR_W(AW), .DATA_W(16)) u_sram (.clk, .we(mem_wr), .addr(mem_addr),
                                                .wdata(mem_wdata), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] enc(input logic [3:0] op, input logic [3:0] a, input logic [3:0] b, input logic [3:0] c);
    return {op, a, b, c};
  endfunction

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL t=%0t: %s", $time, s);
  endtask

  // One instruction of the reference model. Returns the expected memory write.
  task automatic model_step(output logic wr, output logic [AW-1:0] waddr, output logic [15:0] wdat);
    logic [15:0] w, x, y, e, pc1, off;
    logic c, v;
    logic [3:0] op, rd;
    w = m[AW'(mpc)];
    op = w[15:12]; rd = w[11:8];
    x = r[w[7:4]]; y = r[w[3:0]];
    off = {{12{w[3]}}, w[3:0]};
    pc1 = mpc + 16'd1;
    wr = 0; waddr = '0; wdat = '0;
    op_count[op]++;
    mpc = pc1;
    c = 0; v = 0; e = '0;
    if (op < 8) begin
      case (op)
        0: begin {c, e} = {1'b0, x} + {1'b0, y}; v = (x[15] == y[15]) && (e[15] != x[15]); end
        1: begin {c, e} = {1'b0, x} + {1'b0, ~y} + 17'd1; v = (x[15] != y[15]) && (e[15] != x[15]); end
        2: e = x & y;
        3: e = x | y;
        4: e = x ^ y;
        5: e = ~x;
        6: begin e = {x[14:0], 1'b0}; c = x[15]; end
        default: begin e = {x[15], x[15:1]}; c = x[0]; end
      endcase
      r[rd] = e;
      mflags = {v, c, e[15], e == 16'h0, ^e};
      n_carry += c; n_ovf += v; n_zero += (e == 0); n_neg += e[15]; n_par += ^e;
    end else begin
      case (op)
        8:  r[rd] = {8'h00, w[7:0]};
        9:  begin r[rd] = m[x[AW-1:0]]; n_loads++; end
        10: begin wr = 1; waddr = x[AW-1:0]; wdat = y; m[waddr] = y; n_stores++; end
        11: if (x == 0) begin mpc = pc1 + off; br_taken++; end else br_not_taken++;
        12: if (x != 0) begin mpc = pc1 + off; br_taken++; end else br_not_taken++;
        13: begin r[rd] = pc1; mpc = pc1 + off; end
        14: mpc = pc1 + off;
        default: mpc = x;
      endcase
    end
  endtask

  task automatic model_reset();
    foreach (r[i]) r[i] = '0;
    mpc = '0;
    mflags = '0;
  endtask

  // Wait for the processor to reach FETCH1 (sampled 1 time unit after an edge).
  task automatic wait_fetch(input int limit);
    int k = 0;
    while (state != S_FETCH1 && k < limit) begin @(posedge clk); #1; k++; end
    checks++;
    if (state != S_FETCH1) fail("FETCH1 never reached");
  endtask

  // Run n instructions in lock-step with the model.
  task automatic run(input int n);
    for (int i = 0; i < n; i++) begin
      logic ewr, gwr;
      logic [AW-1:0] ea, ga;
      logic [15:0] ed, gd;
      int cyc;
      checks++;
      if (pc !== mpc || mem_addr !== mpc[AW-1:0]) fail($sformatf("pc %h / addr %h, model pc %h", pc, mem_addr, mpc));
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (dut.u_dp.u_rf.regs[k] !== r[k]) fail($sformatf("r%0d = %h, model %h (pc %h)", k, dut.u_dp.u_rf.regs[k], r[k], mpc));
      end
      checks++;
      if (flags !== mflags) fail($sformatf("flags %b, model %b", flags, mflags));
      model_step(ewr, ea, ed);
      gwr = 0; ga = '0; gd = '0; cyc = 0;
      do begin
        if (mem_wr) begin
          if (gwr) fail("two writes in one instruction");
          gwr = 1; ga = mem_addr; gd = mem_wdata;
        end
        @(posedge clk); #1; cyc++;
      end while (state != S_FETCH1 && cyc < 10);
      checks++;
      if (cyc != 4) fail($sformatf("instruction took %0d clocks", cyc));
      checks++;
      if (gwr !== ewr || (ewr && (ga !== ea || gd !== ed))) fail($sformatf("write %0d %h %h, model %0d %h %h", gwr, ga, gd, ewr, ea, ed));
    end
  endtask

  task automatic do_reset(input int cycles);
    rst = 1;
    repeat (cycles) @(posedge clk);
    #1;
    checks++;
    if (state != S_IDLE || pc != 16'h0) fail("reset did not give IDLE / PC 0");
    else n_resets++;
    rst = 0;
    model_reset();
    @(posedge clk); #1;
    wait_fetch(4);
  endtask

  initial begin
    static logic [15:0] prog [26];
    foreach (op_count[i]) op_count[i] = 0;
    rst = 1;
    // Part 1: directed program
    prog = '{
      enc(8, 1, 4'h0, 4'h5),    //  0 LI  r1, 5
      enc(8, 2, 4'h0, 4'h3),    //  1 LI  r2, 3
      enc(0, 3, 1, 2),          //  2 ADD r3, r1, r2   = 8
      enc(1, 4, 2, 1),          //  3 SUB r4, r2, r1   = fffe
      enc(2, 5, 1, 2),          //  4 AND r5 = 1
      enc(3, 6, 1, 2),          //  5 OR  r6 = 7
      enc(4, 7, 1, 2),          //  6 XOR r7 = 6
      enc(5, 8, 1, 0),          //  7 NOT r8 = fffa
      enc(6, 9, 4, 0),          //  8 SLA r9 = fffc
      enc(7, 10, 4, 0),         //  9 SRA r10 = ffff
      enc(8, 11, 4'h4, 4'h0),   // 10 LI  r11, 40h
      enc(10, 0, 11, 3),        // 11 SW  [r11] <= r3
      enc(9, 12, 11, 0),        // 12 LW  r12 <= [r11] = 8
      enc(8, 13, 4'h0, 4'h4),   // 13 LI  r13, 4
      enc(8, 14, 4'h0, 4'h1),   // 14 LI  r14, 1
      enc(1, 13, 13, 14),       // 15 SUB r13, r13, r14
      enc(12, 0, 13, 4'he),     // 16 BNZ r13, -2  -> 15
      enc(11, 0, 13, 4'h1),     // 17 BIZ r13, +1  -> 19 (taken)
      enc(8, 1, 4'hf, 4'hf),    // 18 LI  r1, ffh  (skipped)
      enc(11, 0, 14, 4'h7),     // 19 BIZ r14, +7  (not taken)
      enc(13, 15, 0, 4'h2),     // 20 JAL r15, +2  -> 23, r15 = 21
      enc(14, 0, 0, 4'h3),      // 21 JMP +3       -> 25
      enc(8, 1, 4'he, 4'he),    // 22 LI  r1, eeh  (skipped)
      enc(0, 1, 1, 1),          // 23 ADD r1, r1, r1 = 10
      enc(15, 0, 15, 0),        // 24 JR  r15      -> 21
      enc(14, 0, 0, 4'hf)       // 25 JMP -1       -> 25 (halt)
    };
    for (int i = 0; i < MW; i++) u_sram.mem[i] = (i < 26) ? prog[i] : 16'h0;
    foreach (m[i]) m[i] = u_sram.mem[i];
    do_reset(3);
    run(50);
    begin
      static logic [15:0] exp_r [16] = '{16'h0000, 16'h000a, 16'h0003, 16'h0008, 16'hfffe, 16'h0001, 16'h0007, 16'h0006,
                                  16'hfffa, 16'hfffc, 16'hffff, 16'h0040, 16'h0008, 16'h0000, 16'h0001, 16'h0015};
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (dut.u_dp.u_rf.regs[k] !== exp_r[k]) fail($sformatf("program: r%0d = %h expected %h", k, dut.u_dp.u_rf.regs[k], exp_r[k]));
      end
      checks++;
      if (u_sram.mem[14'h40] !== 16'h0008) fail("program: memory[40h] wrong");
      checks++;
      if (pc !== 16'd25) fail($sformatf("program did not halt at 25: pc %h", pc));
    end
    // Part 2: 30 random memory images, each run for 200 instructions from a
    // reset applied in a random phase of the instruction in progress
    for (int seg = 0; seg < 30; seg++) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
      for (int i = 0; i < MW; i++) u_sram.mem[i] = 16'($urandom);
      foreach (m[i]) m[i] = u_sram.mem[i];
      do_reset(1 + seg % 2);
      run(200);
    end
    // every mechanism must have happened
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (op_count[k] == 0) fail($sformatf("opcode %0d never executed", k));
    end
    checks += 10;
    if (br_taken == 0) fail("no branch taken");
    if (br_not_taken == 0) fail("no branch not taken");
    if (n_resets < 3) fail("reset not exercised");
    if (n_stores == 0) fail("no store");
    if (n_loads == 0) fail("no load");
    if (n_carry == 0) fail("no carry");
    if (n_ovf == 0) fail("no overflow");
    if (n_zero == 0) fail("no zero result");
    if (n_neg == 0) fail("no negative result");
    if (n_par == 0) fail("no odd parity");
    $display("opcodes executed: %p", op_count);
    $display("branches taken %0d not taken %0d, loads %0d, stores %0d, resets %0d", br_taken, br_not_taken, n_loads, n_stores, n_resets);
    $display("flags seen: carry %0d overflow %0d zero %0d negative %0d parity %0d", n_carry, n_ovf, n_zero, n_neg, n_par);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
