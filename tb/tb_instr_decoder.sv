// tb_instr_decoder: exhaustive self-checking test of the instruction decoder.
// Applies all 65536 instruction words and checks every field of the decoded
// instruction against the instruction-format table written out here.
module tb_instr_decoder;
  import risc16_pkg::*;
  logic [15:0] w;
  decoded_t dec;
  int checks = 0, failures = 0;

  instr_decoder dut (.op_f(w[15:12]), .rd_f(w[11:8]), .rs_f(w[7:4]), .rt_f(w[3:0]), .dec);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      logic ea, eb, ealu;
      logic [15:0] eoff;
      w = 16'(i);
      #1;
      ealu = (w[15:12] <= 4'd7);
      // operands needed: binary ALU ops and SW read Rs and Rt; unary ops,
      // LW, branches and JR read Rs only; LI, JAL, JMP read nothing.
      case (w[15:12])
        4'd0, 4'd1, 4'd2, 4'd3, 4'd4, 4'd10: begin ea = 1; eb = 1; end
        4'd5, 4'd6, 4'd7, 4'd9, 4'd11, 4'd12, 4'd15: begin ea = 1; eb = 0; end
        default: begin ea = 0; eb = 0; end
      endcase
      eoff = w[3] ? {12'hfff, w[3:0]} : {12'h000, w[3:0]};
      checks++;
      if (4'(dec.op) !== w[15:12] || dec.rd !== w[11:8] || dec.rs !== w[7:4] || dec.rt !== w[3:0] ||
          dec.imm8 !== w[7:0] || dec.offset !== eoff || dec.is_alu !== ealu ||
          dec.use_a !== ea || dec.use_b !== eb) begin
        failures++;
        if (failures < 10) $display("word %h decoded wrongly", w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
