// flag_register: status flags of the last ALU or shift instruction.
//
// When load is high, the rising clock edge captures five flags of the result:
// z (result is zero), n (bit 15), c (carry from the ALU, or the bit shifted
// out by the barrel shifter), v (signed overflow) and parity (XOR of all
// result bits, 1 for an odd number of ones). flags = {v, c, n, z, parity}.
// The flag names are the processor's; the parity sense follows its ALU
// simulation (result 0 shows parity 0). No instruction reads the flags, so
// they are a status output.
module flag_register #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] result,
  input  logic             c_in,
  input  logic             v_in,
  output logic [4:0]       flags
);

  always_ff @(posedge clk) begin
    if (rst)       flags <= '0;
    else if (load) flags <= {v_in, c_in, result[WIDTH-1], (result == '0), ^result};
  end

endmodule
