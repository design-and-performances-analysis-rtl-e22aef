// register_file: 16 general-purpose 16-bit registers, two reads and one write.
//
// Two independent combinational read ports (raddr1 -> rdata1, raddr2 ->
// rdata2) and one write port written on the rising clock edge when we is high.
// A read of the register being written in the same cycle returns the old
// value. All registers are general purpose (none is hard-wired to zero); they
// are cleared by the synchronous reset, which is this design's choice.
module register_file #(
  parameter int unsigned NREGS = 16,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    raddr1,
  input  logic [AW-1:0]    raddr2,
  output logic [WIDTH-1:0] rdata1,
  output logic [WIDTH-1:0] rdata2,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata1 = regs[raddr1];
  assign rdata2 = regs[raddr2];

endmodule
