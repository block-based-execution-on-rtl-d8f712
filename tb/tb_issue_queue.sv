// tb_issue_queue: random pushes and multi-entry pops against a queue model;
// checks the window contents and valid bits every cycle, the full flag, and
// that pops of several entries at once happen.
module tb_issue_queue;
  import ivs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic push_valid, push_ready;
  instr_t push_data;
  instr_t win [4];
  logic [3:0] win_valid;
  logic [2:0] pop_n;
  instr_t model [$];
  int checks = 0, failures = 0, multi = 0, fulls = 0;

  issue_queue #(.DEPTH(8), .WIN(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_valid = 0; pop_n = 0; push_data = '0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // check the window
      checks++;
      for (int k = 0; k < 4; k++) begin
        if (win_valid[k] !== (k < model.size())) begin
          failures++; $display("FAIL valid[%0d] size=%0d", k, model.size());
        end else if (k < model.size() && win[k] !== model[k]) begin
          failures++; $display("FAIL win[%0d]", k);
        end
      end
      checks++;
      if (push_ready !== (model.size() < 8)) begin failures++; $display("FAIL ready"); end
      if (!push_ready) fulls++;
      push_valid = (($urandom % 3) != 0);
      push_data  = instr_t'({$urandom, $urandom});
      pop_n = 3'($urandom % 5);
      if (i % 400 < 60) pop_n = 0;       // let it fill up
      if (32'(pop_n) > model.size()) pop_n = 3'(model.size());
      if (pop_n > 1) multi++;
      @(posedge clk);
      // model update: pops see the old contents, push appends
      for (int k = 0; k < pop_n; k++) void'(model.pop_front());
      if (push_valid && push_ready) model.push_back(push_data);
    end
    checks++;
    if (multi == 0 || fulls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
