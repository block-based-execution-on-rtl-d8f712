// vecl: vector execution control logic (block former and block sequencer).
//
// Block formation: when no block is running and the head of the issue queue is
// a vector computational instruction, VECL looks at the queue window and takes
// the head together with the consecutive vector computational instructions
// that follow it, stopping at the first other instruction (scalar, or vector
// memory), at the end of what is queued, or when the block is full. The taken
// instructions are popped from the queue (pop_n) and written into the block
// table. With obo_mode set a block holds one instruction only, which gives the
// classic one-by-one vector execution.
//
// Block execution: from the next cycle on, one element operation is issued
// per cycle, element-major: element 0 of every block instruction in program
// order, then element 1, and so on. A block of k instructions therefore takes
// k*VL cycles. Dependent instructions in the block chain element by element
// through the bypass in the chaining control logic.
//
// A block is not started while the vector memory unit is using a register the
// block would read or write (vmu_busy/vmu_vreg); start_blocked reports that
// wait. blk_src_mask/blk_dst_mask describe the running block for the issue
// checks of later memory instructions.
//
// The formation rule and the element-major order are the original design's; the one-cycle capture, the queue-end rule and
// the memory-unit check are this design's choices.
module vecl
  import ivs_pkg::*;
#(
  parameter int unsigned BLOCK_SIZE = 4,
  parameter int unsigned VL         = 8,
  parameter int unsigned NUM_VREGS  = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              obo_mode,
  input  instr_t                            win       [BLOCK_SIZE],
  input  logic   [BLOCK_SIZE-1:0]           win_valid,
  input  logic                              vmu_busy,
  input  logic   [$clog2(NUM_VREGS)-1:0]    vmu_vreg,
  output logic   [$clog2(BLOCK_SIZE+1)-1:0] pop_n,
  output logic                              busy,
  output logic                              op_valid,
  output instr_t                            op_instr,
  output logic   [$clog2(VL)-1:0]           op_elem,
  output logic   [NUM_VREGS-1:0]            blk_src_mask,
  output logic   [NUM_VREGS-1:0]            blk_dst_mask,
  output logic                              form,
  output logic                              end_full,
  output logic                              end_other,
  output logic                              start_blocked
);

  localparam int unsigned NW = $clog2(BLOCK_SIZE + 1);
  localparam int unsigned IW = (BLOCK_SIZE > 1) ? $clog2(BLOCK_SIZE) : 1;
  localparam int unsigned EW = $clog2(VL);
  localparam int unsigned VW = $clog2(NUM_VREGS);

  logic [NW-1:0]        cand_n, max_n, tbl_n;
  logic [NUM_VREGS-1:0] cand_mask;
  logic                 head_vc, conflict, last_op, stop;
  logic [IW-1:0]        idx;
  logic [EW-1:0]        elem;

  // ---- block formation ---------------------------------------------------
  assign max_n   = obo_mode ? NW'(1) : NW'(BLOCK_SIZE);
  assign head_vc = win_valid[0] && win[0].cls == C_V_ALU;

  always_comb begin
    cand_n    = '0;
    cand_mask = '0;
    stop      = 1'b0;
    for (int i = 0; i < BLOCK_SIZE; i++) begin
      if (!stop && win_valid[i] && win[i].cls == C_V_ALU && cand_n < max_n) begin
        cand_n = cand_n + 1'b1;
        cand_mask[VW'(win[i].rs1)] = 1'b1;
        cand_mask[VW'(win[i].rs2)] = 1'b1;
        cand_mask[VW'(win[i].rd)]  = 1'b1;
      end else begin
        stop = 1'b1;
      end
    end
  end

  assign conflict      = vmu_busy && cand_mask[vmu_vreg];
  assign form          = !busy && head_vc && !conflict;
  assign start_blocked = !busy && head_vc && conflict;
  assign pop_n         = form ? cand_n : '0;
  assign end_full      = form && cand_n == max_n;
  assign end_other     = form && cand_n != max_n && 32'(cand_n) < BLOCK_SIZE && win_valid[IW'(cand_n)];

  // ---- block table -------------------------------------------------------
  block_table #(.BLOCK_SIZE(BLOCK_SIZE), .NUM_VREGS(NUM_VREGS)) u_tbl (
    .clk, .rst_n,
    .load       (form),
    .load_n     (cand_n),
    .load_instr (win),
    .clear      (busy && last_op),
    .rd_idx     (IW'(idx)),
    .rd_entry   (op_instr),
    .n          (tbl_n),
    .src_mask   (blk_src_mask),
    .dst_mask   (blk_dst_mask)
  );

  // ---- element-major sequencer ------------------------------------------
  assign last_op  = (32'(idx) == 32'(tbl_n) - 1) && (32'(elem) == VL - 1);
  assign op_valid = busy;
  assign op_elem  = elem;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= '0;
      elem <= '0;
    end else if (form) begin
      busy <= 1'b1;
      idx  <= '0;
      elem <= '0;
    end else if (busy) begin
      if (32'(idx) == 32'(tbl_n) - 1) begin
        idx  <= '0;
        elem <= EW'(32'(elem) + 1);
        if (last_op) busy <= 1'b0;
      end else begin
        idx <= IW'(32'(idx) + 1);
      end
    end
  end

endmodule
