// tb_vecl: feeds VECL a random instruction stream through a queue model. The
// testbench pops non-computational heads itself, as the issue logic would.
// Checks, against a model of the block-formation rule, the size of every block,
// why it closed (full / other instruction), the element-major order of the
// element operations (element 0 of each block instruction, then element 1,
// ...), the block length of k*VL cycles, the register masks, the one-by-one
// mode, and that no block starts on a register conflict with the vector
// memory unit.
module tb_vecl;
  import ivs_pkg::*;
  localparam int B = 4, VL = 8;
  logic clk = 0, rst_n = 0, obo_mode = 0;
  instr_t win [B];
  logic [B-1:0] win_valid;
  logic vmu_busy;
  logic [3:0] vmu_vreg;
  logic [2:0] pop_n;
  logic busy, op_valid, form, end_full, end_other, start_blocked;
  instr_t op_instr;
  logic [2:0] op_elem;
  logic [15:0] blk_src_mask, blk_dst_mask;

  instr_t q [$];
  instr_t exp_i [$];
  int     exp_e [$];
  instr_t blk [$];
  int checks = 0, failures = 0;
  int n_form = 0, n_full = 0, n_other = 0, n_blocked = 0, n_multi = 0, n_obo = 0;
  int blk_start, blk_len;
  logic [15:0] m_s, m_d;

  vecl #(.BLOCK_SIZE(B), .VL(VL), .NUM_VREGS(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t rnd_instr();
    instr_t t = instr_t'({$urandom, $urandom});
    t.cls = ($urandom % 4 == 0) ? iclass_e'($urandom % 3) :
            (($urandom % 6 == 0) ? C_V_LD : C_V_ALU);
    t.op = aluop_e'($urandom % 6);
    return t;
  endfunction

  int cyc = 0;
  initial begin
    int k, maxk;
    logic exp_form, cflt;
    vmu_busy = 0; vmu_vreg = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (cyc = 0; cyc < 6000; cyc++) begin
      while (q.size() < 8) q.push_back(rnd_instr());
      obo_mode = ((cyc / 1500) % 2) != 0;
      for (int i = 0; i < B; i++) begin win[i] = q[i]; win_valid[i] = 1'b1; end
      if (cyc % 97 < 3) win_valid = 4'b0001;   // nearly empty queue now and then
      // expected block
      maxk = obo_mode ? 1 : B;
      k = 0;
      m_s = 0; m_d = 0;
      for (int i = 0; i < B; i++) begin
        if (k == i && win_valid[i] && win[i].cls == C_V_ALU && k < maxk) begin
          k++; m_s[win[i].rs1] = 1; m_s[win[i].rs2] = 1; m_d[win[i].rd] = 1;
        end
      end
      vmu_busy = ($urandom % 3 == 0);
      vmu_vreg = ($urandom % 2 != 0) ? win[0].rd : 4'($urandom);
      cflt = vmu_busy && ((m_s | m_d) & (16'd1 << vmu_vreg)) != 0;
      exp_form = (exp_i.size() == 0) && k > 0 && !cflt;
      #1;
      // block formation
      checks++;
      if (form !== exp_form || (form && pop_n !== 3'(k)) || (!form && pop_n !== 0)) begin
        failures++; $display("FAIL cyc %0d form=%b exp %b pop=%0d exp %0d", cyc, form, exp_form, pop_n, k);
      end
      if (k > 0 && exp_i.size() == 0 && cflt) begin
        n_blocked++;
        checks++;
        if (!start_blocked) begin failures++; $display("FAIL start_blocked"); end
      end
      if (form) begin
        checks++;
        if (end_full !== (k == maxk) || end_other !== (k < maxk && k < B && win_valid[k])) begin
          failures++; $display("FAIL end reason k=%0d full=%b other=%b", k, end_full, end_other);
        end
        n_form++; n_full += int'(end_full); n_other += int'(end_other);
        n_multi += int'(k > 1); n_obo += int'(obo_mode);
        blk.delete();
        for (int i = 0; i < k; i++) blk.push_back(win[i]);
        for (int e = 0; e < VL; e++)
          for (int i = 0; i < k; i++) begin exp_i.push_back(win[i]); exp_e.push_back(e); end
        blk_start = cyc + 1; blk_len = k * VL;
      end
      // element operation of this cycle (a block formed this cycle starts next)
      checks++;
      if (!form && exp_i.size() > 0 && cyc >= blk_start) begin
        if (!op_valid || op_instr !== exp_i[0] || 32'(op_elem) !== exp_e[0]) begin
          failures++; $display("FAIL cyc %0d op valid=%b elem=%0d exp %0d", cyc, op_valid, op_elem, exp_e[0]);
        end
        if (exp_i.size() == 1 && cyc - blk_start + 1 != blk_len) begin
          failures++; $display("FAIL block took %0d cycles, exp %0d", cyc - blk_start + 1, blk_len);
        end
        m_s = 0; m_d = 0;
        foreach (blk[i]) begin m_s[blk[i].rs1] = 1; m_s[blk[i].rs2] = 1; m_d[blk[i].rd] = 1; end
        if (blk_src_mask !== m_s || blk_dst_mask !== m_d) begin
          failures++; $display("FAIL masks");
        end
        void'(exp_i.pop_front()); void'(exp_e.pop_front());
      end else if (!form && op_valid !== (exp_i.size() > 0 && cyc >= blk_start)) begin
        failures++; $display("FAIL cyc %0d stray op_valid=%b", cyc, op_valid);
      end
      // the issue logic pops one non-computational head per cycle
      @(posedge clk);
      if (form) for (int i = 0; i < k; i++) void'(q.pop_front());
      else if (win_valid[0] && win[0].cls != C_V_ALU && ($urandom % 2 != 0)) void'(q.pop_front());
      @(negedge clk);
    end
    checks++;
    if (n_form < 20 || n_full == 0 || n_other == 0 || n_blocked == 0 || n_multi == 0 || n_obo == 0) begin
      failures++;
      $display("FAIL coverage form=%0d full=%0d other=%0d blocked=%0d multi=%0d obo=%0d",
               n_form, n_full, n_other, n_blocked, n_multi, n_obo);
    end
    $display("blocks=%0d full=%0d other=%0d blocked=%0d", n_form, n_full, n_other, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
