// tb_vmu: runs random vector loads and stores through the vector memory unit
// with a memory model and a register-file model. Checks that a load writes
// the VL words from base on into the right register elements, that a store
// writes the register's elements to memory, the request timing (element e on
// cycle start+1+e) and the busy time: VL+1 cycles for a load, VL for a store.
module tb_vmu;
  import ivs_pkg::*;
  localparam int VL = 8;
  logic clk = 0, rst_n = 0;
  logic start, is_load, busy, cur_load;
  logic [3:0] vreg, cur_vreg, rf_rreg, rf_wreg;
  logic [15:0] base, maddr;
  logic mreq, mwe, rf_we;
  logic [31:0] mwdata, mrdata, rf_rdata, rf_wdata;
  logic [2:0] rf_relem, rf_welem;
  logic [31:0] rf [16][VL];
  logic [31:0] mref [2**16];
  int checks = 0, failures = 0, n_ld = 0, n_st = 0;

  vmu #(.VL(VL), .NUM_VREGS(16), .ADDR_W(16)) dut (.*);
  l1_dmem_model #(.ADDR_W(16)) mem (.clk, .req(mreq), .we(mwe), .addr(maddr), .wdata(mwdata), .rdata(mrdata));

  assign rf_rdata = rf[rf_rreg][rf_relem];
  always_ff @(posedge clk) if (rf_we) rf[rf_wreg][rf_welem] <= rf_wdata;

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int busy_cyc;
    start = 0; is_load = 0; vreg = 0; base = 0;
    for (int a = 0; a < 1024; a++) begin mref[a] = $urandom; mem.mem[a] = mref[a]; end
    for (int r = 0; r < 16; r++) for (int e = 0; e < VL; e++) rf[r][e] = $urandom;
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      start = 1; is_load = 1'($urandom % 2); vreg = 4'($urandom); base = 16'($urandom % 1000);
      @(negedge clk);
      start = 0;
      // request timing and busy length
      busy_cyc = 0;
      for (int e = 0; e < VL; e++) begin
        checks++;
        if (!mreq || mwe !== !is_load || maddr !== base + 16'(e)) begin
          failures++; $display("FAIL t=%0d e=%0d req=%b we=%b addr=%h", t, e, mreq, mwe, maddr);
        end
        if (!is_load) begin
          checks++;
          if (mwdata !== rf[vreg][e]) begin failures++; $display("FAIL store data e=%0d", e); end
          mref[base + 16'(e)] = rf[vreg][e];
        end
        busy_cyc += int'(busy);
        @(negedge clk);
      end
      while (busy) begin busy_cyc++; @(negedge clk); end
      checks++;
      if (busy_cyc != (is_load ? VL + 1 : VL)) begin
        failures++; $display("FAIL busy %0d cycles (load=%b)", busy_cyc, is_load);
      end
      if (is_load) begin
        n_ld++;
        for (int e = 0; e < VL; e++) begin
          checks++;
          if (rf[vreg][e] !== mref[base + 16'(e)]) begin failures++; $display("FAIL load e=%0d", e); end
        end
      end else n_st++;
    end
    for (int a = 0; a < 1024; a++) begin
      checks++;
      if (mem.mem[a] !== mref[a]) begin failures++; $display("FAIL mem[%0d]", a); end
    end
    checks++;
    if (n_ld == 0 || n_st == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
