// l1_dmem_model: behavioural stand-in for the L1 data cache, for testbenches.
// A word-addressed memory of 2**ADDR_W words that is always ready: a write
// lands on the clock edge of its request, read data appear on rdata in the
// cycle after the request. Not synthesizable intent: testbench use only.
// Testbenches preload and inspect it through the mem array.
module l1_dmem_model #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              req,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata
);
  logic [31:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (req && we) mem[addr] <= wdata;
    if (req && !we) rdata <= mem[addr];
  end
endmodule
