// vrf: vector register file.
//
// NUM_VREGS registers of VL elements of W bits, addressed by (register,
// element). Two read ports (a, b) and one write port (a) serve the element
// operations of the ALUs; one read port (m) and one write port (m) serve the
// vector memory unit (store data, load data).
//
// Timing: reads are combinational; writes happen on the rising edge, so a
// value written in cycle t is read from cycle t+1 on (the chaining bypass
// covers the gap). The issue logic never lets the two write ports hit the same
// register in one cycle; an assertion checks this. Contents are not reset.
// Sizes and port count are this design's choice.
module vrf #(
  parameter int unsigned W         = 32,
  parameter int unsigned VL        = 8,
  parameter int unsigned NUM_VREGS = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(NUM_VREGS)-1:0] ra_reg,
  input  logic [$clog2(VL)-1:0]        ra_elem,
  output logic [W-1:0]                 ra_data,
  input  logic [$clog2(NUM_VREGS)-1:0] rb_reg,
  input  logic [$clog2(VL)-1:0]        rb_elem,
  output logic [W-1:0]                 rb_data,
  input  logic                         wa_en,
  input  logic [$clog2(NUM_VREGS)-1:0] wa_reg,
  input  logic [$clog2(VL)-1:0]        wa_elem,
  input  logic [W-1:0]                 wa_data,
  input  logic [$clog2(NUM_VREGS)-1:0] rm_reg,
  input  logic [$clog2(VL)-1:0]        rm_elem,
  output logic [W-1:0]                 rm_data,
  input  logic                         wm_en,
  input  logic [$clog2(NUM_VREGS)-1:0] wm_reg,
  input  logic [$clog2(VL)-1:0]        wm_elem,
  input  logic [W-1:0]                 wm_data
);

  logic [W-1:0] regs [NUM_VREGS][VL];

  assign ra_data = regs[ra_reg][ra_elem];
  assign rb_data = regs[rb_reg][rb_elem];
  assign rm_data = regs[rm_reg][rm_elem];

  always_ff @(posedge clk) begin
    if (wa_en) regs[wa_reg][wa_elem] <= wa_data;
    if (wm_en) regs[wm_reg][wm_elem] <= wm_data;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(wa_en && wm_en && wa_reg == wm_reg))
    else $error("vrf: ALU and memory unit write register %0d in the same cycle", wa_reg);

endmodule
