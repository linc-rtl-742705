// tb_linc: end-to-end self-checking test of the LINC chip at its full size.
//
// A reference model written from the programmer's view of LINC runs beside the
// chip: no internal delay through FPDs, crossbar and PRFs, a two-cycle delay
// at the outputs, a control pattern taken from the working bank at the CA of
// the previous running cycle, FIFOs that keep working while the chip is
// halted, and the loading modes of the CC bus. Values the model cannot know
// (a delay reaching back before it was filled, an empty FIFO, an unfilled PRF
// stage) are not compared.
//
// The test drives only the chip's pins:
//   1. two-cycle reset, which must turn every output off;
//   2. through the CC bus, 32 random patterns into the loading bank and a
//      random d-code, then a bank swap and d-code load;
//   3. a long running phase with random CA, data and FIFO requests (with fill
//      and drain periods), random halts, one-cycle reset pulses (which must do
//      nothing), and, in the background while running, new patterns loaded
//      into the loading bank followed by a swap, and new d-codes loaded alone
//      or together with a swap (mode 1110);
//   4. halted test modes: scan-out of the 64-bit crossbar scan path (checked
//      against the model and resumed afterwards), read-back of the loading
//      bank, unload of the control pattern register, load of it from the
//      shift register, unload of the d-code with live FIFO lengths, and
//      finally scan-in of a known word and its scan-out.
// It counts how often each mechanism happened and fails any that never did.
module tb_linc;
  import linc_pkg::*;

  logic clk = 0;
  logic reset, run, cs;
  logic [3:0] mc;
  logic [4:0] ca;
  logic [7:0] cc_in, cc_out;
  logic cc_oe;
  logic [7:0][3:0] di, dout;
  logic [7:0] dout_oe;
  logic waf, wbf, raf, rbf, aff, afe, bff, bfe;

  linc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ model
  localparam int UNK = -1, OFF = -2;
  logic [63:0] m_mem [2][32];
  logic        m_bank;
  int          m_addr;
  logic [63:0] m_csr;
  cpat_t       m_cpr;
  dcode_t      m_dcode, m_dsr;
  int          m_step;                 // running cycles since reset
  int          hist [8][$];            // delay input history, indexed by step
  int          dsince [8];             // step from which FPD i has been a delay
  logic [31:0] qa [$], qb [$];         // FIFO contents (whole input vectors)
  int          prf [8][14];
  int          expq [$][8];            // expected outputs, one entry per step
  int          m_xin [8], m_xout [8], m_xbar_prev [8];
  int          lena_hist [$], lenb_hist [$];
  int          edges;

  // mechanism counters
  int n_halt = 0, n_reset_pulse = 0, n_fifo_wr = 0, n_fifo_rd = 0, n_full_drop = 0, n_empty_read = 0;
  int n_aff = 0, n_afe = 0, n_bff = 0, n_bfe = 0, n_swap_run = 0, n_dload_run = 0, n_load_swap = 0;
  int n_delay = 0, n_bypass = 0, n_stage_out = 0, n_xbar_out = 0, n_off_out = 0, n_broadcast = 0;
  int n_reset_off = 0, n_scan_out = 0, n_scan_in = 0, n_cc_read = 0, n_cpr_unload = 0, n_cpr_load = 0;
  int n_dc_unload = 0, n_cs_low = 0;

  function automatic logic is_delay(fpd_mode_e m);
    return m == FPD_DELAY || m == FPD_DELAY2;
  endfunction

  function automatic int first_len(dcode_t d, fpd_mode_e m);
    for (int i = 0; i < 8; i++) if (d[i].mode == m) return int'(d[i].count);
    return 0;
  endfunction

  task automatic model_reset();
    m_bank = 0; m_addr = 0; m_csr = '0; m_dcode = '0; m_dsr = '0;
    m_cpr = '{osel: {8{OSEL_OFF}}, shift: '0, xsel: '0};
    m_step = 0;
    for (int i = 0; i < 8; i++) begin
      hist[i].delete(); dsince[i] = 0;
      for (int k = 0; k < 14; k++) prf[i][k] = UNK;
      m_xin[i] = UNK; m_xout[i] = UNK; m_xbar_prev[i] = UNK;
    end
    qa.delete(); qb.delete();
    expq.delete();
    begin
      int offv [8];
      for (int j = 0; j < 8; j++) offv[j] = OFF;
      expq.push_back(offv); expq.push_back(offv);
    end
    lena_hist.delete(); lenb_hist.delete();
    edges = 0;
  endtask

  // Model of one clock edge, from the pins as they are just before it.
  task automatic model_edge();
    modeop_t op;
    logic wa, ra, wb, rb;
    int fo [8], xb [8], ov [8];
    logic [63:0] n_csr;
    dcode_t n_dsr, live;
    op = '0;
    if (cs) begin
      unique case (mc)
        4'd0: op.cc_shift_in = 1;   4'd1: op.cc_shift_out = 1;
        4'd2: op.cc_to_reg = 1;     4'd3: op.cc_from_reg = 1;
        4'd4: op.cc_store = 1;      4'd5: op.cc_read = 1;
        4'd6: op.swap = 1;          4'd7: op.addr_reset = 1;
        4'd8: op.dc_shift_in = 1;   4'd9: op.dc_shift_out = 1;
        4'd10: op.dc_load = 1;      4'd11: op.dc_unload = 1;
        4'd12: op.scan_in = 1;      4'd13: op.scan_out = 1;
        4'd14: begin op.dc_load = 1; op.swap = 1; end
        default: ;
      endcase
    end
    // FPD outputs
    for (int i = 0; i < 8; i++) begin
      fpd_mode_e md = m_dcode[i].mode;
      int d = int'(m_dcode[i].count);
      if (md == FPD_FIFO_A)      fo[i] = qa.size() > 0 ? int'(qa[0][4*i +: 4]) : UNK;
      else if (md == FPD_FIFO_B) fo[i] = qb.size() > 0 ? int'(qb[0][4*i +: 4]) : UNK;
      else if (d == 0)           fo[i] = int'(di[i]);
      else if (m_step - d >= dsince[i]) fo[i] = hist[i][m_step - d];
      else                       fo[i] = UNK;
    end
    // running step
    if (run) begin
      for (int j = 0; j < 8; j++) xb[j] = fo[m_cpr.xsel[j]];
      for (int j = 0; j < 8; j++) begin
        int s = int'(m_cpr.osel[j]);
        if (s == 15)      begin ov[j] = OFF; n_off_out++; end
        else if (s == 14) begin ov[j] = xb[j]; n_xbar_out++; end
        else              begin ov[j] = prf[j][s]; n_stage_out++; end
        if (m_cpr.shift[j]) begin
          for (int k = 13; k > 0; k--) prf[j][k] = prf[j][k-1];
          prf[j][0] = xb[j];
        end
      end
      for (int j = 1; j < 8; j++) if (m_cpr.xsel[j] == m_cpr.xsel[0]) begin n_broadcast++; break; end
      for (int i = 0; i < 8; i++) begin
        if (is_delay(m_dcode[i].mode)) begin
          if (m_dcode[i].count == 0) n_bypass++; else n_delay++;
        end
      end
      expq.push_back(ov);
      for (int i = 0; i < 8; i++) hist[i].push_back(int'(di[i]));
      m_xout = m_xbar_prev;
      m_xin = fo;
      m_xbar_prev = xb;
      m_step++;
    end else n_halt++;
    // FIFOs
    wa = waf && qa.size() < 31; ra = raf && qa.size() > 0;
    wb = wbf && qb.size() < 31; rb = rbf && qb.size() > 0;
    if ((waf && !wa) || (wbf && !wb)) n_full_drop++;
    if ((raf && !ra) || (rbf && !rb)) n_empty_read++;
    n_fifo_wr += int'(wa) + int'(wb); n_fifo_rd += int'(ra) + int'(rb);
    if (ra) void'(qa.pop_front());
    if (rb) void'(qb.pop_front());
    if (wa) qa.push_back(di);
    if (wb) qb.push_back(di);
    // loading and testing
    live = m_dcode;
    for (int i = 0; i < 8; i++) begin
      if (m_dcode[i].mode == FPD_FIFO_A) live[i].count = 5'(qa.size() - int'(wa) + int'(ra));
      if (m_dcode[i].mode == FPD_FIFO_B) live[i].count = 5'(qb.size() - int'(wb) + int'(rb));
    end
    n_csr = m_csr;
    if (op.cc_shift_in)       n_csr = {cc_in, m_csr[63:8]};
    else if (op.cc_shift_out) n_csr = {m_csr[7:0], m_csr[63:8]};
    else if (op.cc_from_reg)  n_csr = m_cpr;
    else if (op.cc_read)      n_csr = m_mem[~m_bank][m_addr];
    if (op.cc_store) m_mem[~m_bank][m_addr] = m_csr;
    if (op.addr_reset) m_addr = 0;
    else if (op.cc_store || op.cc_read) m_addr = (m_addr + 1) % 32;
    if (op.cc_to_reg) m_cpr = cpat_t'(m_csr);
    else if (run)     m_cpr = cpat_t'(m_mem[m_bank][ca]);
    if (op.swap) begin m_bank = ~m_bank; if (run) n_swap_run++; end
    n_dsr = m_dsr;
    if (op.dc_shift_in)       n_dsr = {cc_in, m_dsr[7:1]};
    else if (op.dc_shift_out) n_dsr = {m_dsr[0], m_dsr[7:1]};
    else if (op.dc_unload)    n_dsr = live;
    if (op.dc_load) begin
      for (int i = 0; i < 8; i++)
        if (is_delay(m_dsr[i].mode) && !is_delay(m_dcode[i].mode)) dsince[i] = m_step;
      m_dcode = m_dsr;
      qa.delete(); qb.delete();
      if (first_len(m_dsr, FPD_FIFO_A) != 0 || first_len(m_dsr, FPD_FIFO_B) != 0)
        $display("note: test only loads empty FIFOs");
      if (run) n_dload_run++;
      if (op.swap) n_load_swap++;
    end
    if (op.cc_read) n_cc_read++;
    if (op.cc_from_reg) n_cpr_unload++;
    if (op.cc_to_reg) n_cpr_load++;
    if (op.dc_unload) n_dc_unload++;
    m_csr = n_csr; m_dsr = n_dsr;
    lena_hist.push_back(qa.size()); lenb_hist.push_back(qb.size());
    edges++;
  endtask

  // Compare the chip's outputs in the current cycle with the model.
  task automatic check_outputs();
    int e [8];
    e = expq[m_step];
    for (int j = 0; j < 8; j++) begin
      if (e[j] == OFF) chk(dout_oe[j] == 0 && dout[j] == 0, $sformatf("port %0d should be off", j));
      else begin
        chk(dout_oe[j] == 1, $sformatf("port %0d should be on", j));
        if (e[j] != UNK) chk(dout[j] == 4'(e[j]), $sformatf("port %0d data %h want %h", j, dout[j], e[j]));
      end
    end
    if (edges >= 2) begin
      int la = lena_hist[edges-2], lb = lenb_hist[edges-2];
      chk(aff == (la >= 29) && afe == (la <= 2), $sformatf("A status len %0d aff %0d afe %0d", la, aff, afe));
      chk(bff == (lb >= 29) && bfe == (lb <= 2), "B status");
      if (aff) n_aff++;
      if (afe) n_afe++;
      if (bff) n_bff++;
      if (bfe) n_bfe++;
    end
  endtask

  // ---------------------------------------------------------- pin driving
  // One cycle: inputs are set after the falling edge, outputs checked, then
  // the rising edge is taken and the model follows it.
  task automatic cycle_end(logic check = 1);
    #1;
    if (check) check_outputs();
    @(posedge clk);
    if (reset && dut.reset_q) model_reset();
    else model_edge();
    cycle++;
    @(negedge clk);
  endtask

  task automatic set_idle();
    cs = 0; mc = 4'($urandom); cc_in = 8'($urandom);
    waf = 0; wbf = 0; raf = 0; rbf = 0;
  endtask

  // Command queue for the CC bus: {mode, byte}.
  logic [11:0] cmdq [$];

  task automatic queue_pattern_load(int n);
    cmdq.push_back({4'd7, 8'h00});
    for (int w = 0; w < n; w++) begin
      cpat_t p = cpat_t'({$urandom, $urandom});
      logic [63:0] pb = p;
      for (int k = 0; k < 8; k++) cmdq.push_back({4'd0, pb[8*k +: 8]});
      cmdq.push_back({4'd4, 8'h00});
    end
  endtask

  task automatic queue_dcode(logic with_swap);
    dcode_t d;
    logic [63:0] db;
    for (int i = 0; i < 8; i++) begin
      int r = $urandom % 8;
      d[i].rsvd = 0;
      d[i].mode = (r < 2) ? FPD_FIFO_A : (r < 3) ? FPD_FIFO_B : (r == 7) ? FPD_DELAY2 : FPD_DELAY;
      d[i].count = is_delay(d[i].mode) ? ((r == 3) ? 5'd0 : 5'($urandom)) : 5'd0;
    end
    db = d;
    for (int k = 0; k < 8; k++) cmdq.push_back({4'd8, db[8*k +: 8]});
    cmdq.push_back({with_swap ? 4'd14 : 4'd10, 8'h00});
  endtask

  // Run the queued commands with the chip halted, no checks on CC.
  task automatic drain_cmds_halted();
    while (cmdq.size() > 0) begin
      logic [11:0] c = cmdq.pop_front();
      set_idle(); run = 0; reset = 0;
      cs = 1; mc = c[11:8]; cc_in = c[7:0];
      cycle_end();
    end
  endtask

  // Directed CC read-out of 8 bytes with mode m, checked against want.
  task automatic read_bytes(logic [3:0] m, logic [63:0] want, string what);
    for (int k = 0; k < 8; k++) begin
      set_idle(); run = 0; cs = 1; mc = m;
      #1;
      chk(cc_oe == 1 && cc_out == want[8*k +: 8], $sformatf("%s byte %0d: %h want %h", what, k, cc_out, want[8*k +: 8]));
      cycle_end();
    end
  endtask

  task automatic one_op(logic [3:0] m, logic [7:0] b = 0, logic check = 1);
    set_idle(); run = 0; cs = 1; mc = m; cc_in = b;
    cycle_end(check);
  endtask

  initial begin
    int phase_len;
    reset = 1; run = 0; ca = 0; di = '0; set_idle();
    @(negedge clk);
    // 1. reset: hold three cycles
    for (int k = 0; k < 3; k++) cycle_end(0);
    reset = 0;
    #1;
    chk(dout_oe == 8'h00, "outputs off after reset");
    if (dout_oe == 8'h00) n_reset_off++;
    // 2. initial load, halted
    queue_pattern_load(32);
    cmdq.push_back({4'd6, 8'h00});
    queue_dcode(0);
    drain_cmds_halted();
    queue_pattern_load(32);   // the other bank too, so every CA is known
    drain_cmds_halted();
    // 3. running
    for (int t = 0; t < 60000; t++) begin
      int ph;
      ph = (t / 150) % 6;
      set_idle();
      reset = (($urandom % 2000) == 0);
      if (reset) n_reset_pulse++;
      run = ($urandom % 6) != 0;
      ca = 5'($urandom);
      for (int i = 0; i < 8; i++) di[i] = 4'($urandom);
      case (ph)
        0, 1: begin waf = $urandom % 4 != 0; raf = $urandom % 4 == 0; wbf = $urandom % 3 != 0; rbf = $urandom % 5 == 0; end
        3:    begin waf = $urandom % 4 == 0; raf = $urandom % 4 != 0; wbf = $urandom % 5 == 0; rbf = $urandom % 3 != 0; end
        default: begin waf = $urandom % 2; raf = $urandom % 2; wbf = $urandom % 2; rbf = $urandom % 2; end
      endcase
      if (cmdq.size() == 0 && ($urandom % 200) == 0) begin
        case ($urandom % 3)
          0: begin queue_pattern_load(1 + $urandom % 6); cmdq.push_back({4'd6, 8'h00}); end
          1: queue_dcode(0);
          2: begin queue_pattern_load(1 + $urandom % 4); queue_dcode(1); end
        endcase
      end
      if (cmdq.size() > 0 && ($urandom % 3) != 0) begin
        logic [11:0] c;
        c = cmdq.pop_front();
        cs = 1; mc = c[11:8]; cc_in = c[7:0];
      end else if (!cs) n_cs_low++;
      cycle_end();
      if (t == 30000) begin
        // 4a. halted scan-out of the crossbar scan path, then resume
        logic [63:0] chain;
        logic [63:0] known;
        reset = 0;
        drain_cmds_halted();
        for (int b = 0; b < 64; b++) begin
          int v;
          v = (b < 32) ? m_xin[b / 4] : m_xout[(b - 32) / 4];
          known[b] = (v != UNK);
          chain[b] = (v == UNK) ? 1'b0 : v[b % 4];
        end
        for (int b = 0; b < 64; b++) begin
          set_idle(); run = 0; cs = 1; mc = 4'd13;
          #1;
          chk(cc_oe == 1, "cc driven in scan out");
          if (known[b]) chk(cc_out[0] == chain[b], $sformatf("scan bit %0d", b));
          cycle_end(0);
        end
        n_scan_out++;
      end
    end
    // 4b. halted test modes
    set_idle(); reset = 0; run = 0;
    drain_cmds_halted();
    one_op(4'd7);                                    // address reset
    one_op(4'd5);                                    // read loading bank word 0
    read_bytes(4'd1, m_mem[~m_bank][0], "loading bank word 0");
    one_op(4'd5);
    read_bytes(4'd1, m_mem[~m_bank][1], "loading bank word 1");
    one_op(4'd3);                                    // unload control pattern register
    read_bytes(4'd1, m_cpr, "control pattern register");
    begin
      logic [63:0] p;
      p = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) one_op(4'd0, p[8*k +: 8]);
      one_op(4'd2);                                  // load control pattern register
      one_op(4'd3);
      read_bytes(4'd1, p, "control pattern register after load");
    end
    // d-code unload with live FIFO lengths: make sure a FIFO is non-empty
    cmdq.push_back({4'd8, 8'b0_01_00000});
    for (int k = 1; k < 8; k++) cmdq.push_back({4'd8, 8'b0_10_00000});
    cmdq.push_back({4'd10, 8'h00});
    drain_cmds_halted();
    for (int k = 0; k < 5; k++) begin
      set_idle(); run = 0; waf = 1; wbf = (k < 3); di = 32'($urandom);
      cycle_end();
    end
    one_op(4'd11);
    read_bytes(4'd9, {{7{8'b0_10_00011}}, 8'b0_01_00101}, "d-code with live lengths");
    // scan in a known word, then scan it out
    begin
      logic [63:0] w;
      w = {$urandom, $urandom};
      for (int b = 0; b < 64; b++) one_op(4'd12, {7'b0, w[b]}, 0);
      n_scan_in++;
      for (int b = 0; b < 64; b++) begin
        set_idle(); run = 0; cs = 1; mc = 4'd13;
        #1;
        chk(cc_out[0] == w[b], $sformatf("scan-in word bit %0d", b));
        @(posedge clk); cycle++; @(negedge clk);
      end
      chk({dut.xout_q, dut.xin_q} == w, "scan path restored after scan-out");
    end
    // mechanism coverage
    $display("halt=%0d reset_pulse=%0d fifo_wr=%0d fifo_rd=%0d full_drop=%0d empty_read=%0d",
             n_halt, n_reset_pulse, n_fifo_wr, n_fifo_rd, n_full_drop, n_empty_read);
    $display("aff=%0d afe=%0d bff=%0d bfe=%0d swap_run=%0d dload_run=%0d load_swap=%0d",
             n_aff, n_afe, n_bff, n_bfe, n_swap_run, n_dload_run, n_load_swap);
    $display("delay=%0d bypass=%0d stage_out=%0d xbar_out=%0d off_out=%0d broadcast=%0d cs_low=%0d",
             n_delay, n_bypass, n_stage_out, n_xbar_out, n_off_out, n_broadcast, n_cs_low);
    $display("reset_off=%0d scan_out=%0d scan_in=%0d cc_read=%0d cpr_unload=%0d cpr_load=%0d dc_unload=%0d",
             n_reset_off, n_scan_out, n_scan_in, n_cc_read, n_cpr_unload, n_cpr_load, n_dc_unload);
    chk(n_halt > 0, "halt seen");              chk(n_reset_pulse > 0, "short reset seen");
    chk(n_fifo_wr > 0 && n_fifo_rd > 0, "FIFO traffic");
    chk(n_full_drop > 0, "write to full FIFO"); chk(n_empty_read > 0, "read of empty FIFO");
    chk(n_aff > 0 && n_afe > 0 && n_bff > 0 && n_bfe > 0, "all status flags seen");
    chk(n_swap_run > 0, "bank swap while running"); chk(n_dload_run > 0, "d-code load while running");
    chk(n_load_swap > 0, "load and swap");
    chk(n_delay > 0 && n_bypass > 0, "delays and bypass");
    chk(n_stage_out > 0 && n_xbar_out > 0 && n_off_out > 0, "all PRF output kinds");
    chk(n_broadcast > 0, "crossbar broadcast");  chk(n_cs_low > 0, "chip select low");
    chk(n_reset_off > 0, "reset turns outputs off");
    chk(n_scan_out > 0 && n_scan_in > 0, "scan");
    chk(n_cc_read > 0 && n_cpr_unload > 0 && n_cpr_load > 0 && n_dc_unload > 0, "test modes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
