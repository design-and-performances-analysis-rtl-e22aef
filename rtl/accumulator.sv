// accumulator: the execution unit's result register ("ALU output latch").
//
// On a rising clock edge with load high it captures either the ALU result
// (sel_shift = 0) or the barrel-shifter result (sel_shift = 1); synchronous
// rst clears it. Its output feeds the next-PC mux and the register-file write
// data. In the processor's block diagram the accumulator gathers the outputs
// of the ALU and the shifters; treating it as the ALU output latch of the
// control description, and the two-way select, are this design's reading.
module accumulator #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic             sel_shift,
  input  logic [WIDTH-1:0] alu_in,
  input  logic [WIDTH-1:0] shift_in,
  output logic [WIDTH-1:0] acc
);

  always_ff @(posedge clk) begin
    if (rst)       acc <= '0;
    else if (load) acc <= sel_shift ? shift_in : alu_in;
  end

endmodule
