// barrel_shifter: combinational arithmetic shifter for the SLA / SRA instructions.
//
// Shifts din by 0..WIDTH-1 places in log2(WIDTH) stages, each stage shifting
// by a power of two when the matching bit of amount is set. right = 0 is an
// arithmetic (= logical) left shift filling with zeros; right = 1 is an
// arithmetic right shift copying the sign bit. shift_out is the last bit
// pushed out of the word (0 when amount is 0). The processor uses it with
// amount = 1, since its SLA and SRA instructions carry no shift distance; the
// staged structure and the fill rules are this design's choice.
module barrel_shifter #(
  parameter int unsigned WIDTH = 16,
  localparam int unsigned SW   = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] din,
  input  logic [SW-1:0]    amount,
  input  logic             right,
  output logic [WIDTH-1:0] dout,
  output logic             shift_out
);

  // stage[k] holds the word after the shifts selected by amount[k-1:0];
  // sout[k] the last bit pushed out so far.
  logic [WIDTH-1:0] stage [SW+1];
  logic             sout  [SW+1];

  assign stage[0] = din;
  assign sout[0]  = 1'b0;

  for (genvar k = 0; k < SW; k++) begin : g_stage
    localparam int unsigned D = 1 << k;
    logic [WIDTH-1:0] shifted;
    logic             out_bit;
    always_comb begin
      if (right) begin
        shifted = {{D{stage[k][WIDTH-1]}}, stage[k][WIDTH-1:D]};
        out_bit = stage[k][D-1];
      end else begin
        shifted = {stage[k][WIDTH-1-D:0], {D{1'b0}}};
        out_bit = stage[k][WIDTH-D];
      end
    end
    assign stage[k+1] = amount[k] ? shifted : stage[k];
    assign sout[k+1]  = amount[k] ? out_bit : sout[k];
  end

  assign dout      = stage[SW];
  assign shift_out = sout[SW];

endmodule
