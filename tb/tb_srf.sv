// tb_srf: random writes on both ports and reads on both ports against an array
// model; checks reset to zero and that port 1 wins a same-register clash.
module tb_srf;
  logic clk = 0, rst_n = 0;
  logic [3:0] ra, rb, wa0, wa1;
  logic [31:0] da, db, wd0, wd1;
  logic we0, we1;
  logic [31:0] model [16];
  int checks = 0, failures = 0, clashes = 0;

  srf #(.W(32), .NUM_SREGS(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we0 = 0; we1 = 0; ra = 0; rb = 0; wa0 = 0; wa1 = 0; wd0 = 0; wd1 = 0;
    foreach (model[i]) model[i] = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      ra = 4'(i); #1; checks++;
      if (da !== 0) begin failures++; $display("FAIL reset r%0d=%h", i, da); end
    end
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      ra  = 4'($urandom); rb = 4'($urandom);
      #1;
      checks++;
      if (da !== model[ra] || db !== model[rb]) begin
        failures++; $display("FAIL read r%0d=%h exp %h", ra, da, model[ra]);
      end
      we0 = 1'($urandom % 2); we1 = 1'($urandom % 2);
      wa0 = 4'($urandom); wa1 = (i % 9 == 0) ? wa0 : 4'($urandom);
      wd0 = $urandom; wd1 = $urandom;
      if (we0 && we1 && wa0 == wa1) clashes++;
      @(posedge clk);
      if (we0) model[wa0] = wd0;
      if (we1) model[wa1] = wd1;
    end
    checks++;
    if (clashes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
