// ccl: chaining control logic for vector element operations.
//
// An element operation reads its two operands (vector register rs1/rs2,
// element elem) from the vector register file in the cycle it issues; its
// result sits one cycle in the write-back register (wb_*) before it is written
// to the file. When the operation issued one cycle earlier wrote exactly the
// register and element that the current operation reads, the register file
// still holds the old value, so CCL substitutes the write-back value. In a
// block this is what lets a dependent instruction consume element e of its
// producer one cycle after it was computed, i.e. chaining on the scalar
// bypass path. byp_a/byp_b flag each forwarding.
//
// Purely combinational. Chaining through the bypass is the original design's; the
// one-cycle write-back distance is this design's pipeline.
module ccl
  import ivs_pkg::*;
#(
  parameter int unsigned VL        = 8,
  parameter int unsigned NUM_VREGS = 16
) (
  input  logic [$clog2(NUM_VREGS)-1:0] rs1,
  input  logic [$clog2(NUM_VREGS)-1:0] rs2,
  input  logic [$clog2(VL)-1:0]        elem,
  input  logic [XLEN-1:0]              rf_a,
  input  logic [XLEN-1:0]              rf_b,
  input  logic                         wb_valid,
  input  logic [$clog2(NUM_VREGS)-1:0] wb_vd,
  input  logic [$clog2(VL)-1:0]        wb_elem,
  input  logic [XLEN-1:0]              wb_data,
  output logic [XLEN-1:0]              opa,
  output logic [XLEN-1:0]              opb,
  output logic                         byp_a,
  output logic                         byp_b
);

  assign byp_a = wb_valid && wb_vd == rs1 && wb_elem == elem;
  assign byp_b = wb_valid && wb_vd == rs2 && wb_elem == elem;
  assign opa   = byp_a ? wb_data : rf_a;
  assign opb   = byp_b ? wb_data : rf_b;

endmodule
