// tb_linc_cpm: self-checking test of the two-bank control pattern memory.
// Fills the loading bank, swaps banks, fills the other, and checks that the
// working-bank port returns the patterns of the working bank at every CA and
// that the loading-bank port reads back what was written there; writes never
// disturb the working bank.
module tb_linc_cpm;
  localparam int CPW = 64, NPAT = 32;
  logic clk = 0, bank, ld_we;
  logic [4:0] ca, ld_addr;
  logic [CPW-1:0] wk_rdata, ld_wdata, ld_rdata;
  logic [CPW-1:0] model [2][NPAT];
  int checks = 0, failures = 0;

  linc_cpm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    ld_we = 0; bank = 0; ca = 0; ld_addr = 0; ld_wdata = 0;
    for (int pass = 0; pass < 4; pass++) begin
      for (int a = 0; a < NPAT; a++) begin
        @(negedge clk);
        ld_we = 1; ld_addr = 5'(a); ld_wdata = {$urandom, $urandom};
        model[~bank][a] = ld_wdata;
        ca = 5'($urandom);
        #1;
        if (pass > 0) chk(wk_rdata == model[bank][ca], "working read during load");
      end
      @(negedge clk);
      ld_we = 0;
      for (int a = 0; a < NPAT; a++) begin
        ld_addr = 5'(a); ca = 5'(a); #1;
        chk(ld_rdata == model[~bank][a], "loading read back");
        if (pass > 0) chk(wk_rdata == model[bank][a], "working read");
      end
      bank = ~bank;
      #1;
      for (int a = 0; a < NPAT; a++) begin
        ca = 5'(a); #1;
        chk(wk_rdata == model[bank][a], "working read after swap");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
