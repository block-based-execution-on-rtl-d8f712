// complex_alu: the complex integer ALU of the execution unit.
//
// Shared by scalar and vector multiplies. Returns the low W bits of a*b for
// OP_MUL and 0 for any other op code. Combinational and single cycle here; a
// multi-cycle multiplier of a real core is not modelled. The operation set and
// timing are this design's choice.
module complex_alu
  import ivs_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  aluop_e         op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [W-1:0]   y
);

  logic [W-1:0] prod;   // low W bits of the product

  assign prod = a * b;
  assign y    = (op == OP_MUL) ? prod : '0;

endmodule
