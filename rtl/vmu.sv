// vmu: vector memory unit.
//
// Executes one unit-stride vector load or store at a time over the single
// data-cache port. start (with is_load, vreg and the first word address base)
// is accepted when the unit is idle. The request for element e goes out on
// cycle start+1+e. For a store the element is read from the vector register
// file in the same cycle and sent as write data. For a load the data returns
// one cycle after its request and is written to element e of vreg in that
// cycle. busy stays high from the cycle after start until the last element is
// written (VL cycles for a store, VL+1 for a load); cur_vreg names the
// register in use so that the issue logic can keep conflicting work away.
//
// Store data (mwdata) and load data (rf_wdata) pass straight through the
// unit without a register.
//
// The unit's role is the original design's; stride, one
// instruction in flight and the timing are this design's choices.
module vmu
  import ivs_pkg::*;
#(
  parameter int unsigned VL        = 8,
  parameter int unsigned NUM_VREGS = 16,
  parameter int unsigned ADDR_W    = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic                         is_load,
  input  logic [$clog2(NUM_VREGS)-1:0] vreg,
  input  logic [ADDR_W-1:0]            base,
  output logic                         busy,
  output logic [$clog2(NUM_VREGS)-1:0] cur_vreg,
  // data cache port (through ACL)
  output logic                         mreq,
  output logic                         mwe,
  output logic [ADDR_W-1:0]            maddr,
  output logic [XLEN-1:0]              mwdata,
  input  logic [XLEN-1:0]              mrdata,
  // vector register file ports
  output logic [$clog2(NUM_VREGS)-1:0] rf_rreg,
  output logic [$clog2(VL)-1:0]        rf_relem,
  input  logic [XLEN-1:0]              rf_rdata,
  output logic                         rf_we,
  output logic [$clog2(NUM_VREGS)-1:0] rf_wreg,
  output logic [$clog2(VL)-1:0]        rf_welem,
  output logic [XLEN-1:0]              rf_wdata
);

  localparam int unsigned EW = $clog2(VL);

  logic              req_act;    // requests still to send
  logic [EW-1:0]     req_elem;
  logic [ADDR_W-1:0] base_q;
  logic              rsp_valid;  // load data arriving this cycle
  logic [EW-1:0]     rsp_elem;
  logic              cur_load;   // instruction in flight is a load

  assign busy     = req_act || rsp_valid;
  assign mreq     = req_act;
  assign mwe      = req_act && !cur_load;
  assign maddr    = base_q + ADDR_W'(req_elem);
  assign mwdata   = rf_rdata;
  assign rf_rreg  = cur_vreg;
  assign rf_relem = req_elem;
  assign rf_we    = rsp_valid;
  assign rf_wreg  = cur_vreg;
  assign rf_welem = rsp_elem;
  assign rf_wdata = mrdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_act   <= 1'b0;
      req_elem  <= '0;
      rsp_valid <= 1'b0;
      rsp_elem  <= '0;
      cur_vreg  <= '0;
      cur_load  <= 1'b0;
      base_q    <= '0;
    end else begin
      rsp_valid <= req_act && cur_load;
      rsp_elem  <= req_elem;
      if (start && !busy) begin
        req_act  <= 1'b1;
        req_elem <= '0;
        cur_vreg <= vreg;
        cur_load <= is_load;
        base_q   <= base;
      end else if (req_act) begin
        if (32'(req_elem) == VL - 1) req_act <= 1'b0;
        req_elem <= EW'(32'(req_elem) + 1);
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("vmu: start while busy");

endmodule
