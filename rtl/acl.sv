// acl: aliasing control logic between the scalar and vector memory paths.
//
// Scalar and vector memory instructions must reach memory in program order,
// or a scalar access could pass a vector access to the same words. The issue
// logic sends memory instructions in order; ACL holds a scalar memory
// instruction (smem_hold) while the vector memory unit still has one in
// flight, so the scalar access can never overtake it. It then merges the two
// request streams onto the one L1 data-cache port. By construction the two
// never request in the same cycle; an assertion checks it.
//
// Combinational. The in-order rule is that of the original design; enforcing it by draining
// the vector unit rather than comparing addresses is this design's choice.
module acl
  import ivs_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              vmu_busy,
  input  logic              smem_want,
  output logic              smem_hold,
  input  logic              s_req,
  input  logic              s_we,
  input  logic [ADDR_W-1:0] s_addr,
  input  logic [XLEN-1:0]   s_wdata,
  input  logic              v_req,
  input  logic              v_we,
  input  logic [ADDR_W-1:0] v_addr,
  input  logic [XLEN-1:0]   v_wdata,
  output logic              m_req,
  output logic              m_we,
  output logic [ADDR_W-1:0] m_addr,
  output logic [XLEN-1:0]   m_wdata
);

  assign smem_hold = smem_want && vmu_busy;

  always_comb begin
    if (v_req) begin
      m_req   = 1'b1;
      m_we    = v_we;
      m_addr  = v_addr;
      m_wdata = v_wdata;
    end else begin
      m_req   = s_req;
      m_we    = s_req && s_we;
      m_addr  = s_addr;
      m_wdata = s_wdata;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(s_req && v_req))
    else $error("acl: scalar and vector request in the same cycle");
  assert property (@(posedge clk) disable iff (!rst_n) !(s_req && vmu_busy))
    else $error("acl: scalar request while a vector memory instruction is in flight");

endmodule
