// srf: scalar register file of the in-order core.
//
// NUM_SREGS registers of W bits with two combinational read ports (the two
// ALU operands, or base and data of a store) and two write ports: port 0 for ALU results, port 1 for load
// data. If both write the same register in one cycle, port 1 wins (the issue
// logic avoids this). Writes land on the rising edge; synchronous active-low
// reset clears every register. Port count and reset are this design's choice.
module srf #(
  parameter int unsigned W         = 32,
  parameter int unsigned NUM_SREGS = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(NUM_SREGS)-1:0] ra,
  output logic [W-1:0]                 da,
  input  logic [$clog2(NUM_SREGS)-1:0] rb,
  output logic [W-1:0]                 db,
  input  logic                         we0,
  input  logic [$clog2(NUM_SREGS)-1:0] wa0,
  input  logic [W-1:0]                 wd0,
  input  logic                         we1,
  input  logic [$clog2(NUM_SREGS)-1:0] wa1,
  input  logic [W-1:0]                 wd1
);

  logic [W-1:0] regs [NUM_SREGS];

  assign da = regs[ra];
  assign db = regs[rb];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_SREGS; i++) regs[i] <= '0;
    end else begin
      if (we0) regs[wa0] <= wd0;
      if (we1) regs[wa1] <= wd1;
    end
  end

endmodule
