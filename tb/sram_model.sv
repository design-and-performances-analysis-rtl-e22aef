// sram_model: behavioural model of the external asynchronous SRAM chip that
// holds the processor's program and data (2**ADDR_W words of DATA_W bits).
// Reads are combinational from addr; a write happens on the rising clock edge
// while we is high. The shared bidirectional data bus of the real chip is
// modelled as separate wdata / rdata. Testbench use only; the array mem is
// loaded by the testbench directly.
module sram_model #(
  parameter int unsigned ADDR_W = 14,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
