// block_table: the small table that holds the instructions of the block of
// vector computational instructions under execution.
//
// load captures up to BLOCK_SIZE instructions (load_instr[0] is the oldest)
// and load_n, the number that belong to the block. The sequencer reads one
// entry per cycle through rd_idx. The table also summarises which vector
// registers the block reads (src_mask) and writes (dst_mask); the issue logic
// uses these to decide whether a memory instruction may start while the block
// runs. clear empties the table (n = 0, masks 0) when the block is done.
//
// Timing: load/clear act on the rising edge; rd_entry, n and the masks are
// combinational from the stored state. Synchronous active-low reset empties
// the table. The table itself is part of the original design; its size and the masks are
// this design's choice.
module block_table
  import ivs_pkg::*;
#(
  parameter int unsigned BLOCK_SIZE = 4,
  parameter int unsigned NUM_VREGS  = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              load,
  input  logic   [$clog2(BLOCK_SIZE+1)-1:0] load_n,
  input  instr_t                            load_instr [BLOCK_SIZE],
  input  logic                              clear,
  input  logic   [$clog2(BLOCK_SIZE)-1:0]   rd_idx,
  output instr_t                            rd_entry,
  output logic   [$clog2(BLOCK_SIZE+1)-1:0] n,
  output logic   [NUM_VREGS-1:0]            src_mask,
  output logic   [NUM_VREGS-1:0]            dst_mask
);

  localparam int unsigned VW = $clog2(NUM_VREGS);

  instr_t ent [BLOCK_SIZE];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n <= '0;
    end else if (load) begin
      n <= load_n;
      for (int i = 0; i < BLOCK_SIZE; i++) ent[i] <= load_instr[i];
    end else if (clear) begin
      n <= '0;
    end
  end

  assign rd_entry = ent[rd_idx];

  always_comb begin
    src_mask = '0;
    dst_mask = '0;
    for (int i = 0; i < BLOCK_SIZE; i++) begin
      if (32'(n) > i) begin
        src_mask[VW'(ent[i].rs1)] = 1'b1;
        src_mask[VW'(ent[i].rs2)] = 1'b1;
        dst_mask[VW'(ent[i].rd)]  = 1'b1;
      end
    end
  end

endmodule
