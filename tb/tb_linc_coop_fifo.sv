// tb_linc_coop_fifo: cooperating systems linked by LINC FIFOs.
//
// Three systems in a row each pass data to the system on their right. The
// data are 16-bit items, carried by an A-FIFO made of FPDs 0-3.
//   producer   Makes bursts of 0, 1 or 2 items every four cycles, the output
//              pattern of a clipping cell. It writes them into LINC 1's
//              FIFO (WAF1) while LINC 1 does not report almost full (AFF1).
//   system 1   Reads LINC 1's FIFO (RAF1) while it is not almost empty
//              (AFE1) and LINC 2 is not almost full (AFF2). It reads at most
//              every other cycle, to cover its own loop of four cycles. The
//              FIFO head crosses LINC 1's crossbar to output ports 0-3.
//              Two cycles later the controller writes it into LINC 2's FIFO
//              (WAF2).
//   system 2   Reads LINC 2's FIFO while it is not almost empty. It is slow
//              at times, so the back-pressure reaches the producer. It takes
//              the items from LINC 2's output ports two cycles later.
// At the end, up to two items wait in each FIFO that already reports almost
// empty. The termination method then runs on each chip in turn: halt, write
// two dummy items, resume, and read while not almost empty. This pushes out
// exactly the real items, provided the reader leaves one cycle between reads
// so that the two-cycle-late almost-empty flag is current when it decides
// (system 1 always does; system 2 does so during termination). The test checks that every item arrives once, in
// order, with no dummy among them. It also checks that no FIFO was ever read
// empty or written full, and that each flow-control stall happened.
module tb_linc_coop_fifo;
  import linc_pkg::*;

  logic clk = 0;
  logic reset, run1, run2, cs;
  logic [3:0] mc;
  logic [7:0] cc_in;
  logic [7:0][3:0] di1, di2, do1, do2;
  logic [7:0] oe1, oe2, cco1, cco2;
  logic ccoe1, ccoe2;
  logic waf1, raf1, waf2, raf2;
  logic aff1, afe1, bff1, bfe1, aff2, afe2, bff2, bfe2;
  int checks = 0, failures = 0;

  linc u1 (.clk, .reset, .run(run1), .cs, .mc, .ca(5'd0), .cc_in, .cc_out(cco1), .cc_oe(ccoe1),
           .di(di1), .dout(do1), .dout_oe(oe1), .waf(waf1), .wbf(1'b0), .raf(raf1), .rbf(1'b0),
           .aff(aff1), .afe(afe1), .bff(bff1), .bfe(bfe1));
  linc u2 (.clk, .reset, .run(run2), .cs, .mc, .ca(5'd0), .cc_in, .cc_out(cco2), .cc_oe(ccoe2),
           .di(di2), .dout(do2), .dout_oe(oe2), .waf(waf2), .wbf(1'b0), .raf(raf2), .rbf(1'b0),
           .aff(aff2), .afe(afe2), .bff(bff2), .bfe(bfe2));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(logic [3:0] m, logic [7:0] b = 0);
    cs = 1; mc = m; cc_in = b;
    @(negedge clk);
    cs = 0;
  endtask

  localparam int NITEMS = 1500;
  localparam logic [15:0] DUMMY = 16'hdead;
  logic [15:0] pending [$], received [$], sent [$];
  logic [2:0] rd1_pipe, rd2_pipe;   // reads in flight, bit 0 = two cycles ago
  int n_stall_aff1 = 0, n_stall_aff2 = 0, n_stall_afe1 = 0, n_stall_afe2 = 0;
  int produced = 0;
  int slow;

  // One cycle of both controllers. paced: system 2 leaves a cycle between
  // reads, so that the almost-empty flag it sees is never stale.
  task automatic tick(logic allow_produce, logic sys2_fast, logic paced = 0, logic noread = 0);
    logic r1, r2;
    // producer
    if (allow_produce && produced < NITEMS && ($urandom % 4) == 0) begin
      int k;
      k = $urandom % 3;
      for (int i = 0; i < k && produced < NITEMS; i++) begin
        pending.push_back(16'(produced * 7 + 1));
        produced++;
      end
    end
    waf1 = 0; di1 = '0;
    if (pending.size() > 0) begin
      if (!aff1) begin
        waf1 = 1;
        di1[3:0] = pending.pop_front();
      end else n_stall_aff1++;
    end
    // system 1: forward LINC 1 output read two cycles ago into LINC 2
    waf2 = rd1_pipe[1];
    di2 = '0;
    di2[3:0] = do1[3:0];
    if (rd1_pipe[1]) sent.push_back(do1[3:0]);
    r1 = !afe1 && !aff2 && !rd1_pipe[0] && !noread;
    if (afe1) n_stall_afe1++;
    else if (aff2) n_stall_aff2++;
    raf1 = r1;
    // system 2
    if (rd2_pipe[1]) received.push_back(do2[3:0]);
    r2 = !afe2 && (sys2_fast || ($urandom % 8) == 0) && !(paced && rd2_pipe[0]) && !noread;
    if (afe2) n_stall_afe2++;
    raf2 = r2;
    #1;
    checks++;
    if ((raf1 && u1.len_a == 0) || (raf2 && u2.len_a == 0) ||
        (waf1 && u1.len_a == 31) || (waf2 && u2.len_a == 31)) begin
      failures++;
      $display("FAIL FIFO read empty or written full at %0t", $time);
    end
    @(negedge clk);
    rd1_pipe = {1'b0, rd1_pipe[0], r1};
    rd2_pipe = {1'b0, rd2_pipe[0], r2};
  endtask

  // Push the last real items out of one chip's FIFO with two dummies.
  task automatic terminate(int chip);
    repeat (3) tick(0, 1, 1, 1);   // let the reads in flight land
    if (chip == 1) run1 = 0; else run2 = 0;
    waf1 = 0; waf2 = 0; raf1 = 0; raf2 = 0;
    for (int k = 0; k < 2; k++) begin
      if (chip == 1) begin waf1 = 1; di1 = '0; di1[3:0] = DUMMY; end
      else begin waf2 = 1; di2 = '0; di2[3:0] = DUMMY; end
      @(negedge clk);
    end
    waf1 = 0; waf2 = 0;
    if (chip == 1) run1 = 1; else run2 = 1;
    repeat (2) @(negedge clk);   // status catches up
  endtask

  initial begin
    cpat_t p;
    dcode_t d;
    logic [63:0] w;
    reset = 1; run1 = 0; run2 = 0; cs = 0; mc = 0; cc_in = 0;
    di1 = '0; di2 = '0; waf1 = 0; raf1 = 0; waf2 = 0; raf2 = 0;
    rd1_pipe = 0; rd2_pipe = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    // both chips: pattern 0 routes FPD j to output j (j < 4), crossbar value out
    p = '{osel: {8{OSEL_OFF}}, shift: '0, xsel: '0};
    for (int j = 0; j < 4; j++) begin p.xsel[j] = 3'(j); p.osel[j] = OSEL_XBAR; end
    w = p;
    op(4'd7);
    for (int k = 0; k < 8; k++) op(4'd0, w[8*k +: 8]);
    op(4'd4);
    d = '0;
    for (int i = 0; i < 4; i++) d[i] = '{rsvd: 0, mode: FPD_FIFO_A, count: 0};
    w = d;
    for (int k = 0; k < 8; k++) op(4'd8, w[8*k +: 8]);
    op(4'd14);   // d-code load and swap in the pattern bank
    run1 = 1; run2 = 1;
    repeat (2) @(negedge clk);
    // streaming with slow and fast periods of the last system
    for (int t = 0; produced < NITEMS || pending.size() > 0 || t < 200; t++) begin
      tick(1, ((t / 400) % 2) == 1);
      if (t > 30000) break;
    end
    repeat (300) tick(0, 1);
    checks++;
    if (!(afe1 && afe2)) begin failures++; $display("FAIL FIFOs not almost empty before termination"); end
    $display("before termination: %0d of %0d items delivered, LINC1 holds %0d, LINC2 holds %0d",
             received.size(), NITEMS, u1.len_a, u2.len_a);
    terminate(1);
    repeat (20) tick(0, 1, 1);
    terminate(2);
    repeat (20) tick(0, 1, 1);
    checks++;
    if (received.size() != NITEMS) begin
      failures++;
      $display("FAIL delivered %0d items, want %0d", received.size(), NITEMS);
    end
    for (int i = 0; i < received.size() && i < NITEMS; i++) begin
      checks++;
      if (received[i] !== 16'(i * 7 + 1)) begin
        failures++;
        if (failures < 10) $display("FAIL item %0d = %h want %h", i, received[i], 16'(i * 7 + 1));
      end
    end
    $display("stalls: producer on AFF1 %0d, system 1 on AFE1 %0d / AFF2 %0d, system 2 on AFE2 %0d",
             n_stall_aff1, n_stall_afe1, n_stall_aff2, n_stall_afe2);
    checks++;
    if (n_stall_aff1 == 0 || n_stall_afe1 == 0 || n_stall_aff2 == 0 || n_stall_afe2 == 0) begin
      failures++;
      $display("FAIL a flow-control stall never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
