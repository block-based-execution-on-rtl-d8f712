// tb_block_table: loads random blocks of 1..4 instructions, reads every entry
// back and checks the source/destination register masks against masks built
// in the testbench; checks that clear empties the table.
module tb_block_table;
  import ivs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load, clear;
  logic [2:0] load_n, n;
  instr_t load_instr [4];
  logic [1:0] rd_idx;
  instr_t rd_entry;
  logic [15:0] src_mask, dst_mask, es, ed;
  instr_t saved [4];
  int checks = 0, failures = 0;

  block_table #(.BLOCK_SIZE(4), .NUM_VREGS(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; clear = 0; load_n = 0; rd_idx = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    #1 checks++;
    if (n !== 0 || src_mask !== 0 || dst_mask !== 0) begin failures++; $display("FAIL reset"); end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      load = 1; load_n = 3'(1 + $urandom % 4);
      es = '0; ed = '0;
      for (int i = 0; i < 4; i++) begin
        load_instr[i] = instr_t'({$urandom, $urandom});
        load_instr[i].cls = C_V_ALU;
        saved[i] = load_instr[i];
        if (i < load_n) begin
          es[load_instr[i].rs1] = 1; es[load_instr[i].rs2] = 1; ed[load_instr[i].rd] = 1;
        end
      end
      @(negedge clk);
      load = 0;
      for (int i = 0; i < 4; i++) load_instr[i] = '0;   // table must hold its copy
      for (int i = 0; i < load_n; i++) begin
        rd_idx = 2'(i); #1;
        checks++;
        if (rd_entry !== saved[i]) begin failures++; $display("FAIL entry %0d", i); end
      end
      checks++;
      if (n !== load_n || src_mask !== es || dst_mask !== ed) begin
        failures++; $display("FAIL n=%0d/%0d masks %h/%h exp %h/%h", n, load_n, src_mask, dst_mask, es, ed);
      end
      if (t % 3 == 0) begin
        clear = 1; @(negedge clk); clear = 0; #1;
        checks++;
        if (n !== 0 || src_mask !== 0 || dst_mask !== 0) begin failures++; $display("FAIL clear"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
