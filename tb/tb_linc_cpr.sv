// tb_linc_cpr: self-checking test of the control pattern register and its pipeline.
// Feeds random memory words while the chip runs and halts at random, and a
// random direct load now and then. Checks that the register holds the word
// offered in the previous running cycle (or the loaded word), that the
// crossbar field follows one running cycle later and the PRF fields two, and
// that reset leaves "all outputs off, no shift".
module tb_linc_cpr;
  import linc_pkg::*;
  logic clk = 0, rst, run, load;
  cpat_t mem_pat, load_pat, cpr;
  logic [NPORT-1:0][2:0] xsel_q;
  prfctl_t prf_q;
  cpat_t m_cpr, m_cpr1, m_cpr2;   // model: register, and the values that fed the pipeline
  int checks = 0, failures = 0;

  linc_cpr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    rst = 1; run = 0; load = 0; mem_pat = '0; load_pat = '0;
    @(negedge clk); @(negedge clk);
    chk(prf_q.osel == {NPORT{OSEL_OFF}} && prf_q.shift == '0 && cpr.osel == {NPORT{OSEL_OFF}}, "reset state");
    rst = 0;
    m_cpr = cpr; m_cpr1 = cpr; m_cpr2 = cpr;
    for (int t = 0; t < 1000; t++) begin
      run = ($urandom % 4) != 0;
      load = ($urandom % 16) == 0;
      mem_pat = cpat_t'({$urandom, $urandom});
      load_pat = cpat_t'({$urandom, $urandom});
      @(posedge clk);
      if (run) begin m_cpr2 = m_cpr1; m_cpr1 = m_cpr; end
      if (load) m_cpr = load_pat; else if (run) m_cpr = mem_pat;
      @(negedge clk);
      chk(cpr == m_cpr, "cpr");
      chk(xsel_q == m_cpr1.xsel, "xsel one cycle later");
      chk(prf_q.osel == m_cpr2.osel && prf_q.shift == m_cpr2.shift, "prf fields two cycles later");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
