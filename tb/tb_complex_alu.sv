// tb_complex_alu: random multiplies (and non-multiply op codes, which must
// give 0) against a 64-bit product computed in the testbench.
module tb_complex_alu;
  import ivs_pkg::*;
  logic [31:0] a, b, y, exp;
  logic [63:0] p;
  aluop_e op;
  int checks = 0, failures = 0;

  complex_alu #(.W(32)) dut (.op, .a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      a  = (i % 5 == 0) ? 32'hFFFF_FFFF : $urandom;
      b  = $urandom;
      op = (i % 4 == 0) ? aluop_e'(i % 5) : OP_MUL;
      #1;
      p   = {32'd0, a} * {32'd0, b};
      exp = (op == OP_MUL) ? p[31:0] : 32'd0;
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
