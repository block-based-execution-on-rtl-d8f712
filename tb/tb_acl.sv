// tb_acl: random request combinations within the rules (never two requests in
// one cycle, no scalar request while the vector unit is busy); checks the
// hold rule and the port merge against a model.
module tb_acl;
  logic clk = 0, rst_n = 0;
  logic vmu_busy, smem_want, smem_hold;
  logic s_req, s_we, v_req, v_we, m_req, m_we;
  logic [15:0] s_addr, v_addr, m_addr;
  logic [31:0] s_wdata, v_wdata, m_wdata;
  int checks = 0, failures = 0, holds = 0;

  acl #(.ADDR_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      vmu_busy  = 1'($urandom % 2);
      smem_want = 1'($urandom % 2);
      v_req     = vmu_busy && ($urandom % 4 != 0);
      s_req     = !vmu_busy && smem_want;
      s_we = 1'($urandom % 2); v_we = 1'($urandom % 2);
      s_addr = 16'($urandom); v_addr = 16'($urandom);
      s_wdata = $urandom; v_wdata = $urandom;
      #1;
      checks++;
      if (smem_hold !== (smem_want && vmu_busy)) begin
        failures++; $display("FAIL hold busy=%b want=%b", vmu_busy, smem_want);
      end
      holds += int'(smem_hold);
      checks++;
      if (v_req) begin
        if (!m_req || m_we !== v_we || m_addr !== v_addr || m_wdata !== v_wdata) begin
          failures++; $display("FAIL vector pass");
        end
      end else if (s_req) begin
        if (!m_req || m_we !== s_we || m_addr !== s_addr || m_wdata !== s_wdata) begin
          failures++; $display("FAIL scalar pass");
        end
      end else if (m_req || m_we) begin
        failures++; $display("FAIL spurious request");
      end
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
