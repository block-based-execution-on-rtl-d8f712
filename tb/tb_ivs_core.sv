// tb_ivs_core: end-to-end test of the integrated vector-scalar core at its
// default sizes.
//
// Part 1, the example of the two execution models: the sequence
//   vload v1; vadd v2=v1+v1; vsub v3=v2-v1; vload v4; vload v5; vadd v6=v4+v5
// runs once in one-by-one mode and once in block-based mode. Both must give
// the right memory contents. In block-based mode vadd and vsub form one block
// whose element operations alternate (vadd e0, vsub e0, vadd e1, ...), and
// the second vload must send its first request in the cycle of the first vsub
// element operation, while in one-by-one mode it waits for the whole vadd. The
// block-based run must therefore end earlier.
//
// Part 2, random programs: each program loads all vector registers, then runs
// a random mix of scalar ALU, scalar load/store, vector ALU (in runs, so that
// blocks form) and vector load/store instructions on a small, heavily aliased
// memory area, and finally stores every vector and scalar register. The memory
// after the run must equal that of an instruction-by-instruction reference
// interpreter in this testbench. Programs alternate between the two modes.
// Every mechanism of the core (blocks of several instructions, blocks closed
// when full and by another instruction, chaining bypass, memory and scalar
// instructions issued during a block, ALU conflicts, ACL holds, register
// conflicts with the vector memory unit, load-use stalls, one-by-one mode) is
// counted; one that never happened counts as a failure.
module tb_ivs_core;
  import ivs_pkg::*;
  localparam int VL = 8, NV = 16, NS = 16, AW = 16;

  logic clk = 0, rst_n = 0, obo_mode = 0;
  logic dec_valid, dec_ready, dmem_req, dmem_we, idle;
  instr_t dec_instr;
  logic [AW-1:0] dmem_addr;
  logic [31:0] dmem_wdata, dmem_rdata;
  ivs_events_t ev;

  ivs_core dut (.*);
  l1_dmem_model #(.ADDR_W(AW)) mem (.clk, .req(dmem_req), .we(dmem_we), .addr(dmem_addr),
                                   .wdata(dmem_wdata), .rdata(dmem_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- event counts
  int n_multi, n_full, n_other, n_byp, n_memblk, n_salublk, n_fustall, n_acl,
      n_conf, n_busy, n_lu, n_obo_blk, n_bbe_blk;
  always @(posedge clk) if (rst_n) begin
    if (ev.blk_form && ev.blk_size > 1) n_multi++;
    if (ev.blk_form && obo_mode) n_obo_blk++;
    if (ev.blk_form && !obo_mode) n_bbe_blk++;
    n_full    += int'(ev.blk_end_full);
    n_other   += int'(ev.blk_end_other);
    n_byp     += int'(ev.chain_byp);
    n_memblk  += int'(ev.mem_during_blk);
    n_salublk += int'(ev.salu_during_blk);
    n_fustall += int'(ev.salu_fu_stall);
    n_acl     += int'(ev.acl_hold);
    n_conf    += int'(ev.vmem_conflict);
    n_busy    += int'(ev.blk_busy_stall);
    n_lu      += int'(ev.load_use_stall);
  end

  // ------------------------------------------------- reference interpreter
  logic [31:0] r_s [NS];
  logic [31:0] r_v [NV][VL];
  logic [31:0] r_m [2**AW];

  function automatic logic [31:0] alu(aluop_e op, logic [31:0] a, logic [31:0] b);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_MUL: return a * b;
      default: return 32'd0;
    endcase
  endfunction

  function automatic void ref_exec(instr_t t);
    logic [AW-1:0] a = AW'(r_s[t.rs1] + {{16{t.imm[15]}}, t.imm});
    case (t.cls)
      C_S_ALU: r_s[t.rd] = alu(t.op, r_s[t.rs1], t.use_imm ? {{16{t.imm[15]}}, t.imm} : r_s[t.rs2]);
      C_S_LD:  r_s[t.rd] = r_m[a];
      C_S_ST:  r_m[a] = r_s[t.rs2];
      C_V_ALU: for (int e = 0; e < VL; e++) r_v[t.rd][e] = alu(t.op, r_v[t.rs1][e], r_v[t.rs2][e]);
      C_V_LD:  for (int e = 0; e < VL; e++) r_v[t.rd][e] = r_m[AW'(a + AW'(e))];
      C_V_ST:  for (int e = 0; e < VL; e++) r_m[AW'(a + AW'(e))] = r_v[t.rs2][e];
      default: ;
    endcase
  endfunction

  // --------------------------------------------------------- program build
  instr_t prog [$];

  function automatic instr_t mk(iclass_e c, aluop_e op, int rd, int rs1, int rs2, int imm, bit ui = 0);
    instr_t t;
    t.cls = c; t.op = op; t.rd = 4'(rd); t.rs1 = 4'(rs1); t.rs2 = 4'(rs2);
    t.use_imm = ui; t.imm = 16'(imm);
    return t;
  endfunction

  // Runs prog on the core (pushing through the handshake) and on the
  // reference; returns the cycles from the first push to idle.
  task automatic run_prog(output longint cycles);
    longint t0;
    int i;
    rst_n = 0; dec_valid = 0;
    foreach (r_s[k]) r_s[k] = 0;
    repeat (2) @(negedge clk);
    init_mem();   // after reset: random power-up state may have written memory
    rst_n = 1;
    t0 = cyc;
    i = 0;
    while (i < prog.size()) begin
      dec_valid = 1; dec_instr = prog[i];
      @(posedge clk);
      if (dec_ready) i++;
      @(negedge clk);
    end
    dec_valid = 0;
    @(negedge clk);
    while (!idle) @(negedge clk);
    cycles = cyc - t0;
    foreach (prog[k]) ref_exec(prog[k]);
  endtask

  task automatic init_mem();
    for (int a = 0; a < 2**AW; a++) begin
      r_m[a] = (a < 4096) ? $urandom : 32'd0;
      mem.mem[a] = r_m[a];
    end
  endtask

  task automatic cmp_mem(string tag);
    int bad = 0;
    for (int a = 0; a < 2**AW; a++) if (mem.mem[a] !== r_m[a]) begin
      if (bad < 5) $display("FAIL %s mem[%0d]=%h exp %h", tag, a, mem.mem[a], r_m[a]);
      bad++;
    end
    checks++;
    if (bad != 0) failures++;
  endtask

  // epilogue: store every vector register at 1024+8v and scalar register at 2048+r
  task automatic add_epilogue();
    for (int v = 0; v < NV; v++) prog.push_back(mk(C_V_ST, OP_ADD, 0, 0, v, 1024 + VL * v));
    for (int r = 0; r < NS; r++) prog.push_back(mk(C_S_ST, OP_ADD, 0, 0, r, 2048 + r));
  endtask

  // ------------------------------------------- part 1: the two models
  longint fig_cycles [2];
  longint first_vsub_op, second_vld_req;
  int vld_seen;
  logic in_fig = 0;
  always @(posedge clk) if (in_fig) begin
    if (dut.op_valid && dut.op.cls == C_V_ALU && dut.op.op == OP_SUB && dut.op_elem == 0)
      first_vsub_op <= cyc;
    if (dut.u_vmu.mreq && dut.u_vmu.req_elem == 0 && dut.u_vmu.cur_load) begin
      vld_seen <= vld_seen + 1;
      if (vld_seen == 1) second_vld_req <= cyc;
    end
  end

  task automatic fig_prog();
    prog.delete();
    prog.push_back(mk(C_V_LD,  OP_ADD, 1, 0, 0, 0));
    prog.push_back(mk(C_V_ALU, OP_ADD, 2, 1, 1, 0));
    prog.push_back(mk(C_V_ALU, OP_SUB, 3, 2, 1, 0));
    prog.push_back(mk(C_V_LD,  OP_ADD, 4, 0, 0, 64));
    prog.push_back(mk(C_V_LD,  OP_ADD, 5, 0, 0, 128));
    prog.push_back(mk(C_V_ALU, OP_ADD, 6, 4, 5, 0));
    for (int v = 1; v <= 6; v++) prog.push_back(mk(C_V_ST, OP_ADD, 0, 0, v, 1024 + VL * v));
  endtask

  // --------------------------------------------- part 2: random programs
  task automatic rand_prog(int len);
    prog.delete();
    for (int v = 0; v < NV; v++) prog.push_back(mk(C_V_LD, OP_ADD, v, 0, 0, VL * v));
    while (prog.size() < len) begin
      int kind = $urandom % 100;
      if (kind < 35) begin
        // a run of vector computational instructions on a few registers
        int n = 1 + $urandom % 6;
        for (int j = 0; j < n; j++)
          prog.push_back(mk(C_V_ALU, aluop_e'($urandom % 6), $urandom % 6, $urandom % 6, $urandom % 6, 0));
      end else if (kind < 55) begin
        prog.push_back(mk(C_S_ALU, aluop_e'($urandom % 6), 1 + $urandom % 6, $urandom % 7,
                          $urandom % 7, $urandom % 64, 1'($urandom % 2)));
      end else if (kind < 68) begin
        prog.push_back(mk(C_S_LD, OP_ADD, 1 + $urandom % 6, 0, 0, $urandom % 200));
      end else if (kind < 76) begin
        prog.push_back(mk(C_S_ST, OP_ADD, 0, 0, $urandom % 7, $urandom % 200));
      end else if (kind < 90) begin
        prog.push_back(mk(C_V_LD, OP_ADD, $urandom % 8, 0, 0, $urandom % 192));
      end else begin
        prog.push_back(mk(C_V_ST, OP_ADD, 0, 0, $urandom % 8, $urandom % 192));
      end
    end
    add_epilogue();
  endtask

  initial begin
    longint c;
    dec_valid = 0; dec_instr = '0;
    {n_multi, n_full, n_other, n_byp, n_memblk, n_salublk, n_fustall, n_acl,
     n_conf, n_busy, n_lu, n_obo_blk, n_bbe_blk} = '0;

    // part 1
    for (int m = 0; m < 2; m++) begin
      obo_mode = (m == 0);
      fig_prog();
      vld_seen = 0; in_fig = 1;
      run_prog(c);
      in_fig = 0;
      fig_cycles[m] = c;
      cmp_mem(m == 0 ? "obo example" : "bbe example");
      checks++;
      if (m == 1 && second_vld_req != first_vsub_op) begin
        failures++;
        $display("FAIL bbe: second vload first request at %0d, first vsub op at %0d",
                 second_vld_req, first_vsub_op);
      end
      if (m == 0 && second_vld_req <= first_vsub_op) begin
        failures++;
        $display("FAIL obo: second vload started before vsub");
      end
    end
    checks++;
    $display("example sequence: %0d cycles one-by-one, %0d cycles block-based", fig_cycles[0], fig_cycles[1]);
    if (fig_cycles[1] >= fig_cycles[0]) begin
      failures++; $display("FAIL block-based run not faster");
    end

    // part 2
    for (int p = 0; p < 40; p++) begin
      obo_mode = (p % 4 == 3);
      rand_prog(150 + $urandom % 150);
      run_prog(c);
      cmp_mem($sformatf("program %0d", p));
    end

    $display("multi-instr blocks=%0d closed-full=%0d closed-other=%0d chain bypasses=%0d",
             n_multi, n_full, n_other, n_byp);
    $display("mem during block=%0d scalar ALU during block=%0d ALU-busy stalls=%0d ACL holds=%0d",
             n_memblk, n_salublk, n_fustall, n_acl);
    $display("register conflicts=%0d block-busy stalls=%0d load-use stalls=%0d obo blocks=%0d bbe blocks=%0d",
             n_conf, n_busy, n_lu, n_obo_blk, n_bbe_blk);
    checks++;
    if (n_multi == 0 || n_full == 0 || n_other == 0 || n_byp == 0 || n_memblk == 0 ||
        n_salublk == 0 || n_fustall == 0 || n_acl == 0 || n_conf == 0 || n_busy == 0 ||
        n_lu == 0 || n_obo_blk == 0 || n_bbe_blk == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
