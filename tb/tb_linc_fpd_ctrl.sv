// tb_linc_fpd_ctrl: self-checking test of the FIFO/delay controller.
// Loads a d-code with FPDs 0-1 in the A-FIFO, 2 in the B-FIFO and the rest as
// delays of various lengths, then issues random FIFO requests (including runs
// that fill and drain the FIFOs) while halting now and then. Checks against a
// model: FIFO lengths, write/read addresses of FIFO members, delay addresses
// and bypass, write enables, and that almost-full/almost-empty appear exactly
// two cycles after the request that causes them.
module tb_linc_fpd_ctrl;
  import linc_pkg::*;
  localparam int NPORT = 8, AW = 5;
  logic clk = 0, rst, run, dc_load, waf, wbf, raf, rbf;
  dfield_t [NPORT-1:0] dcode, dc_new;
  logic [NPORT-1:0] we, bypass;
  logic [NPORT-1:0][AW-1:0] waddr, raddr;
  logic aff, afe, bff, bfe;
  logic [AW-1:0] len_a, len_b;
  int checks = 0, failures = 0;
  int m_len_a, m_len_b, m_head_a, m_head_b, m_dptr;
  int la_hist [$], lb_hist [$];
  int n_aff = 0, n_afe_low = 0;

  linc_fpd_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    rst = 1; run = 0; dc_load = 0; waf = 0; wbf = 0; raf = 0; rbf = 0;
    dcode = '0; dc_new = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    // New d-code: 0,1 -> A; 2 -> B; 3..7 delays 0,1,5,17,31.
    dc_new[0] = '{rsvd: 0, mode: FPD_FIFO_A, count: 0};
    dc_new[1] = '{rsvd: 0, mode: FPD_FIFO_A, count: 0};
    dc_new[2] = '{rsvd: 0, mode: FPD_FIFO_B, count: 0};
    dc_new[3] = '{rsvd: 0, mode: FPD_DELAY,  count: 0};
    dc_new[4] = '{rsvd: 0, mode: FPD_DELAY,  count: 1};
    dc_new[5] = '{rsvd: 0, mode: FPD_DELAY2, count: 5};
    dc_new[6] = '{rsvd: 0, mode: FPD_DELAY,  count: 17};
    dc_new[7] = '{rsvd: 0, mode: FPD_DELAY,  count: 31};
    dc_load = 1;
    @(negedge clk);
    dc_load = 0; dcode = dc_new;
    m_len_a = 0; m_len_b = 0; m_head_a = 0; m_head_b = 0; m_dptr = 0;
    // dptr ran 0 cycles so far (run was 0)
    for (int t = 0; t < 3000; t++) begin
      int phase;
      logic wa, ra, wb, rb;
      phase = (t / 100) % 4;   // 0: fill, 1: random, 2: drain, 3: random
      run = ($urandom % 5) != 0;
      waf = (phase == 0) ? ($urandom % 4 != 0) : (phase == 2) ? ($urandom % 4 == 0) : $urandom % 2;
      raf = (phase == 2) ? ($urandom % 4 != 0) : (phase == 0) ? ($urandom % 4 == 0) : $urandom % 2;
      wbf = (phase == 0) ? ($urandom % 3 != 0) : (phase == 2) ? 1'b0 : $urandom % 2;
      rbf = (phase == 2) ? 1'b1 : (phase == 0) ? 1'b0 : $urandom % 2;
      #1;
      wa = waf && m_len_a < 31; ra = raf && m_len_a > 0;
      wb = wbf && m_len_b < 31; rb = rbf && m_len_b > 0;
      chk(len_a == AW'(m_len_a) && len_b == AW'(m_len_b), "lengths");
      for (int i = 0; i < 2; i++) begin
        chk(we[i] == wa, "A we");
        chk(waddr[i] == AW'(m_head_a + m_len_a) && raddr[i] == AW'(m_head_a) && !bypass[i], "A addr");
      end
      chk(we[2] == wb && waddr[2] == AW'(m_head_b + m_len_b) && raddr[2] == AW'(m_head_b) && !bypass[2], "B ctl");
      for (int i = 3; i < 8; i++) begin
        chk(we[i] == run && waddr[i] == AW'(m_dptr) && raddr[i] == AW'(m_dptr - int'(dcode[i].count))
            && bypass[i] == (dcode[i].count == 0), $sformatf("delay %0d", i));
      end
      // status two cycles after request: flags now reflect the length two edges ago
      if (la_hist.size() >= 2) begin
        chk(aff == (la_hist[$-1] >= 29) && afe == (la_hist[$-1] <= 2), "A status timing");
        chk(bff == (lb_hist[$-1] >= 29) && bfe == (lb_hist[$-1] <= 2), "B status timing");
        if (aff) n_aff++;
        if (!afe) n_afe_low++;
      end
      @(posedge clk);
      m_len_a += int'(wa) - int'(ra); m_head_a += int'(ra);
      m_len_b += int'(wb) - int'(rb); m_head_b += int'(rb);
      if (run) m_dptr++;
      la_hist.push_back(m_len_a); lb_hist.push_back(m_len_b);
      @(negedge clk);
    end
    chk(n_aff > 0 && n_afe_low > 0, "almost full and not almost empty both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
