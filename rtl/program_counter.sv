// program_counter: the processor's 16-bit program counter register.
//
// The PC output addresses the instruction memory. It is a plain loadable
// register: on a rising clock edge it is cleared when rst is high, loaded with
// indata when pc_wrt_s2 is high, and otherwise holds. The next value (zero,
// PC + 1, or a branch / jump target) is formed outside, by the ALU and the
// next-PC select of the control unit. Port names follow the processor's PC
// diagram; the synchronous, active-high reset is this design's choice.
module program_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             pc_wrt_s2,
  input  logic [WIDTH-1:0] indata,
  output logic [WIDTH-1:0] outdata
);

  always_ff @(posedge clk) begin
    if (rst)            outdata <= '0;
    else if (pc_wrt_s2) outdata <= indata;
  end

endmodule
