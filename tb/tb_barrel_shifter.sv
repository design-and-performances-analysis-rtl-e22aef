// tb_barrel_shifter: exhaustive-in-amount self-checking test of the barrel
// shifter. For every shift distance 0..15, both directions and 300 random
// words, compares the output and the last shifted-out bit with a shift
// computed here one place at a time.
module tb_barrel_shifter;
  logic [15:0] din, dout;
  logic [3:0] amount;
  logic right, sout;
  int checks = 0, failures = 0;

  barrel_shifter #(.WIDTH(16)) dut (.din, .amount, .right, .dout, .shift_out(sout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [15:0] w;
      w = (n == 0) ? 16'h8001 : 16'($urandom);
      for (int d = 0; d < 2; d++) begin
        for (int s = 0; s < 16; s++) begin
          logic [15:0] e;
          logic eo;
          din = w; amount = 4'(s); right = 1'(d);
          #1;
          e = w; eo = 0;
          for (int t = 0; t < s; t++) begin
            if (d) begin eo = e[0]; e = {e[15], e[15:1]}; end
            else   begin eo = e[15]; e = {e[14:0], 1'b0}; end
          end
          checks++;
          if (dout !== e || sout !== eo) begin
            failures++;
            if (failures < 10) $display("din=%h s=%0d right=%0d: %h/%0d expected %h/%0d", w, s, d, dout, sout, e, eo);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
