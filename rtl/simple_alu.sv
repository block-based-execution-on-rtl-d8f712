// simple_alu: the simple integer ALU of the execution unit.
//
// Shared by scalar ALU instructions and by the element operations of vector
// computational instructions. Performs add, sub, and, or, xor on XLEN-bit
// operands; any other op code (the multiply, which belongs to the complex
// ALU) yields 0. Combinational, one result per cycle. The operation set is
// this design's choice.
module simple_alu
  import ivs_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  aluop_e         op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [W-1:0]   y
);

  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      default: y = '0;
    endcase
  end

endmodule
