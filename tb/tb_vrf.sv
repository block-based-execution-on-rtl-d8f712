// tb_vrf: random element writes on both write ports (never the same register
// in one cycle) and reads on all three read ports against an array model;
// a value written in one cycle must be readable in the next.
module tb_vrf;
  logic clk = 0, rst_n = 0;
  logic [3:0] ra_reg, rb_reg, wa_reg, rm_reg, wm_reg;
  logic [2:0] ra_elem, rb_elem, wa_elem, rm_elem, wm_elem;
  logic [31:0] ra_data, rb_data, rm_data, wa_data, wm_data;
  logic wa_en, wm_en;
  logic [31:0] model [16][8];
  int checks = 0, failures = 0;

  vrf #(.W(32), .VL(8), .NUM_VREGS(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wa_en = 0; wm_en = 0;
    @(negedge clk);
    // fill every element through alternating ports
    for (int r = 0; r < 16; r++)
      for (int e = 0; e < 8; e++) begin
        wa_en = (e % 2 == 0); wm_en = (e % 2 == 1);
        wa_reg = 4'(r); wa_elem = 3'(e); wm_reg = 4'(r); wm_elem = 3'(e);
        wa_data = $urandom; wm_data = $urandom;
        model[r][e] = wa_en ? wa_data : wm_data;
        @(negedge clk);
      end
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      ra_reg = 4'($urandom); ra_elem = 3'($urandom);
      rb_reg = 4'($urandom); rb_elem = 3'($urandom);
      rm_reg = 4'($urandom); rm_elem = 3'($urandom);
      #1;
      checks++;
      if (ra_data !== model[ra_reg][ra_elem] || rb_data !== model[rb_reg][rb_elem] ||
          rm_data !== model[rm_reg][rm_elem]) begin
        failures++; $display("FAIL read %0d/%0d", ra_reg, ra_elem);
      end
      wa_en = 1'($urandom % 2); wm_en = 1'($urandom % 2);
      wa_reg = 4'($urandom); wm_reg = 4'(32'(wa_reg) + 1 + ($urandom % 15));
      wa_elem = 3'($urandom); wm_elem = 3'($urandom);
      wa_data = $urandom; wm_data = $urandom;
      // read back what is written this cycle in the next one
      @(posedge clk);
      if (wa_en) model[wa_reg][wa_elem] = wa_data;
      if (wm_en) model[wm_reg][wm_elem] = wm_data;
      @(negedge clk);
      ra_reg = wa_reg; ra_elem = wa_elem; #1;
      checks++;
      if (ra_data !== model[ra_reg][ra_elem]) begin
        failures++; $display("FAIL write-read %0d/%0d", ra_reg, ra_elem);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
