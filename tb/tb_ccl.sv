// tb_ccl: random operand/write-back combinations, with forced matches, checked
// against the forwarding rule: take the write-back value exactly when it is
// valid and its register and element equal the operand's.
module tb_ccl;
  logic [3:0]  rs1, rs2, wb_vd;
  logic [2:0]  elem, wb_elem;
  logic [31:0] rf_a, rf_b, wb_data, opa, opb;
  logic        wb_valid, byp_a, byp_b, ea, eb;
  int checks = 0, failures = 0, n_byp = 0;

  ccl #(.VL(8), .NUM_VREGS(16)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      rs1 = 4'($urandom); rs2 = 4'($urandom); elem = 3'($urandom);
      rf_a = $urandom; rf_b = $urandom; wb_data = $urandom;
      wb_valid = ($urandom % 4) != 0;
      wb_vd   = (i % 3 == 0) ? rs1 : (i % 3 == 1) ? rs2 : 4'($urandom);
      wb_elem = (i % 5 != 0) ? elem : 3'($urandom);
      #1;
      ea = wb_valid && wb_vd == rs1 && wb_elem == elem;
      eb = wb_valid && wb_vd == rs2 && wb_elem == elem;
      n_byp += int'(ea);
      checks++;
      if (opa !== (ea ? wb_data : rf_a) || opb !== (eb ? wb_data : rf_b) ||
          byp_a !== ea || byp_b !== eb) begin
        failures++;
        $display("FAIL rs1=%0d rs2=%0d e=%0d wb=%b/%0d/%0d", rs1, rs2, elem, wb_valid, wb_vd, wb_elem);
      end
    end
    checks++;
    if (n_byp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
