// issue_queue: in-order queue of decoded instructions between decode and issue.
//
// A circular buffer of DEPTH entries. Besides the usual push side it shows its
// WIN oldest entries at once (win[0] is the head), because the vector
// execution control logic looks past the head to gather consecutive vector
// computational instructions into a block. pop_n removes 0..WIN entries from
// the head in one cycle: 1 for an ordinary issue, up to WIN when a block is
// captured. A push and a pop may happen in the same cycle.
//
// Timing: push and pop take effect on the rising clock edge; win/win_valid are
// combinational from the stored state. Synchronous active-low reset empties
// the queue. Queue depth and window width are this design's choice.
module issue_queue
  import ivs_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIN   = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push_valid,
  input  instr_t                     push_data,
  output logic                       push_ready,
  output instr_t                     win       [WIN],
  output logic   [WIN-1:0]           win_valid,
  input  logic   [$clog2(WIN+1)-1:0] pop_n
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  instr_t          mem [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;
  logic [CW-1:0]   count;
  logic            do_push;

  assign push_ready = (count < CW'(DEPTH));
  assign do_push    = push_valid && push_ready;

  always_comb begin
    for (int i = 0; i < WIN; i++) begin
      win[i]       = mem[PW'((32'(rd_ptr) + i) % DEPTH)];
      win_valid[i] = (32'(count) > i);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) begin
        mem[wr_ptr] <= push_data;
        wr_ptr      <= PW'((32'(wr_ptr) + 1) % DEPTH);
      end
      rd_ptr <= PW'((32'(rd_ptr) + 32'(pop_n)) % DEPTH);
      count  <= CW'(32'(count) + 32'(do_push) - 32'(pop_n));
    end
  end

  // Popping more entries than are held is an issue-logic error.
  assert property (@(posedge clk) disable iff (!rst_n) 32'(pop_n) <= 32'(count))
    else $error("issue_queue: pop of %0d with %0d entries", pop_n, count);

endmodule
