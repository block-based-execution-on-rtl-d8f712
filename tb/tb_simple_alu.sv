// tb_simple_alu: random operands for every simple-ALU operation, compared
// with results computed in the testbench.
module tb_simple_alu;
  import ivs_pkg::*;
  logic [31:0] a, b, y, exp;
  aluop_e op;
  int checks = 0, failures = 0;

  simple_alu #(.W(32)) dut (.op, .a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      a  = $urandom;
      b  = (i % 7 == 0) ? a : $urandom;
      op = aluop_e'(i % 6);
      #1;
      case (op)
        OP_ADD:  exp = a + b;
        OP_SUB:  exp = a - b;
        OP_AND:  exp = a & b;
        OP_OR:   exp = a | b;
        OP_XOR:  exp = a ^ b;
        default: exp = 32'd0;
      endcase
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
