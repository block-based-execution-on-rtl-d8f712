// ivs_core: back-end of an in-order core that runs vector instructions on its
// scalar execution resources, with block-based execution of vector
// computational instructions.
//
// Decoded instructions enter the issue queue. Each cycle the issue logic looks
// at the queue head:
//  * a vector computational instruction starts a block: VECL (vecl) gathers it
//    and the consecutive vector computational instructions behind it (up to
//    BLOCK_SIZE, or 1 in obo_mode) into its block table, and then issues one
//    element operation per cycle, element 0 of every block instruction, then
//    element 1, and so on. The element operations run on the same simple and
//    complex integer ALUs as scalar instructions; their results pass one
//    cycle through a write-back register into the vector register file, and
//    CCL (ccl) forwards that register so that dependent block instructions
//    chain element by element;
//  * while a block runs, later instructions keep issuing in order if they can:
//    a scalar ALU instruction when the ALU it needs is not taken by this
//    cycle's element operation, a scalar or vector memory instruction when it
//    has no register conflict with the block. Only a second vector
//    computational instruction has to wait for the block to end;
//  * vector loads/stores go to the vector memory unit (vmu), one element per
//    cycle; scalar loads/stores go straight to the data-cache port. ACL (acl)
//    keeps the two in program order and merges them onto the single port.
//
// Interface: dec_valid/dec_instr/dec_ready push instructions (valid/ready
// handshake, transfer when both are high). dmem_* is one L1 data-cache port,
// word addressed, always ready, read data one cycle after the request.
// obo_mode=1 limits blocks to one instruction, the classic one-by-one vector
// execution. idle is high when nothing is queued or in flight. ev carries
// one-cycle event pulses. Synchronous active-low reset.
//
// The structure (issue queue, VECL with its block table, CCL, ACL, shared
// ALUs, vector register file, vector memory unit) follows the block diagram
// of the integrated design; the instruction set, the single-issue in-order
// pipeline, the sizes and the hazard rules are this design's own choices.
module ivs_core
  import ivs_pkg::*;
#(
  parameter int unsigned IQ_DEPTH   = 8,
  parameter int unsigned BLOCK_SIZE = 4,
  parameter int unsigned VL         = 8,
  parameter int unsigned NUM_VREGS  = 16,
  parameter int unsigned NUM_SREGS  = 16,
  parameter int unsigned ADDR_W     = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              obo_mode,
  input  logic              dec_valid,
  input  instr_t            dec_instr,
  output logic              dec_ready,
  output logic              dmem_req,
  output logic              dmem_we,
  output logic [ADDR_W-1:0] dmem_addr,
  output logic [XLEN-1:0]   dmem_wdata,
  input  logic [XLEN-1:0]   dmem_rdata,
  output logic              idle,
  output ivs_events_t       ev
);

  localparam int unsigned NW = $clog2(BLOCK_SIZE + 1);
  localparam int unsigned VW = $clog2(NUM_VREGS);
  localparam int unsigned SW = $clog2(NUM_SREGS);
  localparam int unsigned EW = $clog2(VL);

  // ---------------------------------------------------------------- queue
  instr_t               win [BLOCK_SIZE];
  logic [BLOCK_SIZE-1:0] win_valid;
  logic [NW-1:0]        pop_n, vecl_pop;
  instr_t               head;
  logic                 hv;

  issue_queue #(.DEPTH(IQ_DEPTH), .WIN(BLOCK_SIZE)) u_iq (
    .clk, .rst_n,
    .push_valid (dec_valid),
    .push_data  (dec_instr),
    .push_ready (dec_ready),
    .win, .win_valid,
    .pop_n
  );

  assign head = win[0];
  assign hv   = win_valid[0];

  // ---------------------------------------------------------------- VECL
  logic                 vmu_busy;
  logic [VW-1:0]        vmu_vreg;
  logic                 blk_busy, op_valid, blk_form, blk_full, blk_other, blk_blocked;
  instr_t               op;
  logic [EW-1:0]        op_elem;
  logic [NUM_VREGS-1:0] blk_src, blk_dst;

  vecl #(.BLOCK_SIZE(BLOCK_SIZE), .VL(VL), .NUM_VREGS(NUM_VREGS)) u_vecl (
    .clk, .rst_n, .obo_mode,
    .win, .win_valid,
    .vmu_busy, .vmu_vreg,
    .pop_n         (vecl_pop),
    .busy          (blk_busy),
    .op_valid,
    .op_instr      (op),
    .op_elem,
    .blk_src_mask  (blk_src),
    .blk_dst_mask  (blk_dst),
    .form          (blk_form),
    .end_full      (blk_full),
    .end_other     (blk_other),
    .start_blocked (blk_blocked)
  );

  // ------------------------------------------------- vector register file
  logic [XLEN-1:0] vra, vrb, vrm, opa, opb, vmu_wdata;
  logic            wb_valid;
  logic [VW-1:0]   wb_vd;
  logic [EW-1:0]   wb_elem;
  logic [XLEN-1:0] wb_data;
  logic [VW-1:0]   vmu_rreg, vmu_wreg;
  logic [EW-1:0]   vmu_relem, vmu_welem;
  logic            vmu_we;
  logic            byp_a, byp_b;

  vrf #(.W(XLEN), .VL(VL), .NUM_VREGS(NUM_VREGS)) u_vrf (
    .clk, .rst_n,
    .ra_reg (VW'(op.rs1)), .ra_elem (op_elem), .ra_data (vra),
    .rb_reg (VW'(op.rs2)), .rb_elem (op_elem), .rb_data (vrb),
    .wa_en  (wb_valid), .wa_reg (wb_vd), .wa_elem (wb_elem), .wa_data (wb_data),
    .rm_reg (vmu_rreg), .rm_elem (vmu_relem), .rm_data (vrm),
    .wm_en  (vmu_we), .wm_reg (vmu_wreg), .wm_elem (vmu_welem), .wm_data (vmu_wdata)
  );

  ccl #(.VL(VL), .NUM_VREGS(NUM_VREGS)) u_ccl (
    .rs1 (VW'(op.rs1)), .rs2 (VW'(op.rs2)), .elem (op_elem),
    .rf_a (vra), .rf_b (vrb),
    .wb_valid, .wb_vd, .wb_elem, .wb_data,
    .opa, .opb, .byp_a, .byp_b
  );

  // ------------------------------------------------- scalar register file
  logic [XLEN-1:0] sra, srb, salu_y;
  logic            s_we;
  logic            sld_v;
  logic [SW-1:0]   sld_rd;

  srf #(.W(XLEN), .NUM_SREGS(NUM_SREGS)) u_srf (
    .clk, .rst_n,
    .ra  (SW'(head.rs1)), .da (sra),
    .rb  (SW'(head.rs2)), .db (srb),
    .we0 (s_we),  .wa0 (SW'(head.rd)), .wd0 (salu_y),
    .we1 (sld_v), .wa1 (sld_rd),       .wd1 (dmem_rdata)
  );

  // ------------------------------------------------- shared integer ALUs
  logic            blk_cplx, blk_smpl;
  logic [XLEN-1:0] s_opb, sa_a, sa_b, ca_a, ca_b, sa_y, ca_y;
  aluop_e          sa_op, ca_op;

  assign blk_cplx = op_valid &&  uses_complex(op.op);
  assign blk_smpl = op_valid && !uses_complex(op.op);
  assign s_opb    = head.use_imm ? XLEN'($signed(head.imm)) : srb;

  // The element operation of the block has priority on its ALU.
  assign sa_op = blk_smpl ? op.op : head.op;
  assign sa_a  = blk_smpl ? opa   : sra;
  assign sa_b  = blk_smpl ? opb   : s_opb;
  assign ca_op = blk_cplx ? op.op : head.op;
  assign ca_a  = blk_cplx ? opa   : sra;
  assign ca_b  = blk_cplx ? opb   : s_opb;

  simple_alu  #(.W(XLEN)) u_salu (.op (sa_op), .a (sa_a), .b (sa_b), .y (sa_y));
  complex_alu #(.W(XLEN)) u_calu (.op (ca_op), .a (ca_a), .b (ca_b), .y (ca_y));

  assign salu_y = uses_complex(head.op) ? ca_y : sa_y;

  // Write-back register of the element operations (read by CCL).
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wb_valid <= 1'b0;
      wb_vd    <= '0;
      wb_elem  <= '0;
      wb_data  <= '0;
    end else begin
      wb_valid <= op_valid;
      wb_vd    <= VW'(op.rd);
      wb_elem  <= op_elem;
      wb_data  <= blk_cplx ? ca_y : sa_y;
    end
  end

  // ------------------------------------------------------------ issue
  logic is_salu, is_sld, is_sst, is_smem, is_vld, is_vst, is_vmem, is_valu;
  logic sregs_ready, fu_free, vreg_conflict, smem_hold;
  logic salu_go, smem_go, vmem_go, issue_one;
  logic [XLEN-1:0] s_addr_full;

  assign is_salu = hv && head.cls == C_S_ALU;
  assign is_sld  = hv && head.cls == C_S_LD;
  assign is_sst  = hv && head.cls == C_S_ST;
  assign is_vld  = hv && head.cls == C_V_LD;
  assign is_vst  = hv && head.cls == C_V_ST;
  assign is_valu = hv && head.cls == C_V_ALU;
  assign is_smem = is_sld || is_sst;
  assign is_vmem = is_vld || is_vst;

  // One-cycle scoreboard of the scalar load whose data returns this cycle.
  always_comb begin
    sregs_ready = 1'b1;
    if (sld_v) begin
      if (is_salu && (SW'(head.rs1) == sld_rd || SW'(head.rd) == sld_rd ||
                      (!head.use_imm && SW'(head.rs2) == sld_rd)))
        sregs_ready = 1'b0;
      if ((is_smem || is_vmem) && SW'(head.rs1) == sld_rd)
        sregs_ready = 1'b0;
      if (is_sst && SW'(head.rs2) == sld_rd)
        sregs_ready = 1'b0;
    end
  end

  assign fu_free = uses_complex(head.op) ? !blk_cplx : !blk_smpl;

  // A vector memory instruction may not touch a register of the running
  // block, nor the register the write-back register is about to update.
  always_comb begin
    vreg_conflict = 1'b0;
    if (is_vld)
      vreg_conflict = blk_src[VW'(head.rd)] || blk_dst[VW'(head.rd)] ||
                      (wb_valid && wb_vd == VW'(head.rd));
    if (is_vst)
      vreg_conflict = blk_dst[VW'(head.rs2)] || (wb_valid && wb_vd == VW'(head.rs2));
  end

  assign salu_go   = is_salu && sregs_ready && fu_free;
  assign smem_go   = is_smem && sregs_ready && !smem_hold;
  assign vmem_go   = is_vmem && sregs_ready && !vmu_busy && !vreg_conflict;
  assign issue_one = salu_go || smem_go || vmem_go;
  assign pop_n     = blk_form ? vecl_pop : (issue_one ? NW'(1) : '0);
  assign s_we      = salu_go;

  assign s_addr_full = sra + XLEN'($signed(head.imm));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sld_v  <= 1'b0;
      sld_rd <= '0;
    end else begin
      sld_v  <= smem_go && is_sld;
      sld_rd <= SW'(head.rd);
    end
  end

  // ------------------------------------------- vector memory unit and ACL
  logic              v_req, v_we;
  logic [ADDR_W-1:0] v_addr;
  logic [XLEN-1:0]   v_wdata;

  vmu #(.VL(VL), .NUM_VREGS(NUM_VREGS), .ADDR_W(ADDR_W)) u_vmu (
    .clk, .rst_n,
    .start    (vmem_go),
    .is_load  (is_vld),
    .vreg     (is_vld ? VW'(head.rd) : VW'(head.rs2)),
    .base     (ADDR_W'(s_addr_full)),
    .busy     (vmu_busy),
    .cur_vreg (vmu_vreg),
    .mreq     (v_req), .mwe (v_we), .maddr (v_addr), .mwdata (v_wdata),
    .mrdata   (dmem_rdata),
    .rf_rreg  (vmu_rreg), .rf_relem (vmu_relem), .rf_rdata (vrm),
    .rf_we    (vmu_we), .rf_wreg (vmu_wreg), .rf_welem (vmu_welem), .rf_wdata (vmu_wdata)
  );

  acl #(.ADDR_W(ADDR_W)) u_acl (
    .clk, .rst_n,
    .vmu_busy,
    .smem_want (is_smem && sregs_ready),
    .smem_hold,
    .s_req     (smem_go), .s_we (is_sst), .s_addr (ADDR_W'(s_addr_full)), .s_wdata (srb),
    .v_req, .v_we, .v_addr, .v_wdata,
    .m_req     (dmem_req), .m_we (dmem_we), .m_addr (dmem_addr), .m_wdata (dmem_wdata)
  );

  // ------------------------------------------------------- status, events
  assign idle = !hv && !blk_busy && !wb_valid && !vmu_busy && !sld_v;

  always_comb begin
    ev                 = '0;
    ev.blk_form        = blk_form;
    ev.blk_size        = blk_form ? 3'(vecl_pop) : 3'd0;
    ev.blk_end_other   = blk_other;
    ev.blk_end_full    = blk_full;
    ev.chain_byp       = op_valid && (byp_a || byp_b);
    ev.mem_during_blk  = (smem_go || vmem_go) && blk_busy;
    ev.salu_during_blk = salu_go && blk_busy;
    ev.salu_fu_stall   = is_salu && sregs_ready && !fu_free;
    ev.acl_hold        = smem_hold;
    ev.vmem_conflict   = blk_blocked || (is_vmem && sregs_ready && !vmu_busy && vreg_conflict);
    ev.blk_busy_stall  = is_valu && blk_busy;
    ev.load_use_stall  = hv && !sregs_ready;
  end

endmodule
