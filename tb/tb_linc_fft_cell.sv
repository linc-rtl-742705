// tb_linc_fft_cell: a constant-geometry FFT butterfly cell built around LINC.
//
// Two LINC chips are bit-sliced into an 8-bit datapath (chip 0 carries bits
// 3:0 of every word, chip 1 bits 7:4; both get the same control). Around them
// the testbench models the rest of the cell: a data memory stream, a weight
// stream, a multiplier and an adder/subtractor (ALU), each with one cycle of
// latency and arithmetic modulo 256 in place of floating point.
//
// One butterfly takes (a_r + j a_i), (b_r + j b_i) and weight (w_r + j w_i) to
//   X0 = a + b*w,  X1 = a - b*w
// with four multiplies and six ALU operations. LINC issues one butterfly every
// six cycles, keeping the ALU busy every cycle; the multiplier is used four
// cycles out of six. Products and ALU results return to LINC and are buffered
// in the PRFs until their partner operand is due, so three butterflies are in
// flight at once.
//
// Ports. Inputs: 0 data memory (b_r, b_i, a_r, a_i in cycles 0-3 of the
// six-cycle frame), 1 weights (w_r, w_i in cycles 0-1 when new), 2 multiplier
// product, 3 ALU result. Outputs: 0/1 multiplier operands, 2/3 ALU operands,
// 4/5 the weight and memory streams passed on to the next cell two cycles
// later, 6/7 off. All FPDs are zero-length delays.
//
// Program (six-cycle frame, view cycles B = 6n for butterfly n):
//   multiplies  B+1 b_i*w_i, B+2 b_r*w_r, B+3 b_r*w_i, B+4 b_i*w_r
//   ALU         B+5 t' = b_i*w_i - b_r*w_r,  B+7 t_i = b_r*w_i + b_i*w_r,
//               B+8 a_r - t', B+9 a_r + t', B+10 a_i + t_i, B+12 a_i - t_i
// PRF 1 holds the weights: it shifts only in frames that bring new weights,
// so a weight pair is reused by later butterflies for free. Slots 0 and 1
// therefore exist in two versions, with and without that shift: eight
// patterns in all, six for the steady loop and two for taking new weights,
// the count the LINC description gives for its FFT cell. The exact schedule
// and port assignment are this testbench's own.
//
// Checked: every product and ALU result against a reference computed from
// the streams, the four butterfly outputs, the 2-cycle pass-through of ports
// 4 and 5, the output enables, and that both weight cases happened.
module tb_linc_fft_cell;
  import linc_pkg::*;

  localparam int NB = 200;              // butterflies

  logic clk = 0;
  logic reset, run, cs;
  logic [3:0] mc;
  logic [4:0] ca;
  logic [7:0] cc_in;
  logic [1:0][7:0] cc_out;
  logic [1:0] cc_oe;
  logic [1:0][7:0][3:0] di, dout;
  logic [1:0][7:0] dout_oe;
  logic [1:0] aff, afe, bff, bfe;
  int checks = 0, failures = 0;
  int n_new = 0, n_reuse = 0, n_bfly = 0;

  for (genvar s = 0; s < 2; s++) begin : g_slice
    linc u_linc (
      .clk, .reset, .run, .cs, .mc, .ca, .cc_in,
      .cc_out(cc_out[s]), .cc_oe(cc_oe[s]),
      .di(di[s]), .dout(dout[s]), .dout_oe(dout_oe[s]),
      .waf(1'b0), .wbf(1'b0), .raf(1'b0), .rbf(1'b0),
      .aff(aff[s]), .afe(afe[s]), .bff(bff[s]), .bfe(bfe[s])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(logic [3:0] m, logic [7:0] b = 0);
    cs = 1; mc = m; cc_in = b;
    @(negedge clk);
    cs = 0;
  endtask

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // Pattern for frame slot k (0..5); neww selects the new-weight version of slots 0 and 1.
  function automatic cpat_t fft_pattern(int k, logic neww);
    cpat_t p;
    p = '{osel: {8{OSEL_OFF}}, shift: 8'h0d, xsel: '0};
    // PRF 0: b values from the memory stream
    p.xsel[0] = 3'd0;
    case (k)
      1: p.osel[0] = OSEL_XBAR;
      2: p.osel[0] = 4'd1;
      3: p.osel[0] = 4'd2;
      4: p.osel[0] = 4'd2;
      default: ;
    endcase
    // PRF 1: weights, shifted in only in new-weight frames
    p.xsel[1] = 3'd1;
    p.shift[1] = neww && k < 2;
    case (k)
      1: p.osel[1] = neww ? OSEL_XBAR : 4'd0;
      2: p.osel[1] = 4'd1;
      3: p.osel[1] = 4'd0;
      4: p.osel[1] = 4'd1;
      default: ;
    endcase
    // PRF 2: ALU operand A (products, then a_r / a_i)
    case (k)
      0: begin p.xsel[2] = 3'd2; p.osel[2] = 4'd8; end
      1: begin p.xsel[2] = 3'd2; p.osel[2] = 4'd0; end
      2: begin p.xsel[2] = 3'd0; p.osel[2] = 4'd5; end
      3: begin p.xsel[2] = 3'd0; p.osel[2] = 4'd6; end
      4: begin p.xsel[2] = 3'd2; p.osel[2] = 4'd6; end
      default: begin p.xsel[2] = 3'd2; p.osel[2] = 4'd0; end
    endcase
    // PRF 3: ALU operand B (products, then t' / t_i)
    case (k)
      0: begin p.xsel[3] = 3'd3; p.osel[3] = 4'd1; end
      1: begin p.xsel[3] = 3'd2; p.osel[3] = OSEL_XBAR; end
      2: begin p.xsel[3] = 3'd3; p.osel[3] = OSEL_XBAR; end
      3: begin p.xsel[3] = 3'd3; p.osel[3] = 4'd0; end
      4: begin p.xsel[3] = 3'd3; p.osel[3] = OSEL_XBAR; end
      default: begin p.xsel[3] = 3'd2; p.osel[3] = OSEL_XBAR; end
    endcase
    // ports 4 and 5 pass the weight and memory streams on
    p.xsel[4] = 3'd1; p.osel[4] = OSEL_XBAR;
    p.xsel[5] = 3'd0; p.osel[5] = OSEL_XBAR;
    return p;
  endfunction

  // Streams and reference values, all 8-bit.
  logic [7:0] ar [NB], ai [NB], br [NB], bi [NB], wr [NB], wi [NB];
  logic       neww [NB];
  logic [7:0] in0 [6*NB+32], in1 [6*NB+32];

  function automatic int pat_addr(int v);
    int k;
    k = v % 6;
    if (k < 2 && v / 6 < NB && neww[v / 6]) return 6 + k;
    return k;
  endfunction

  // ALU operation for operands issued in view cycle v: 1 = subtract A - B
  function automatic logic alu_sub(int v);
    int k;
    k = v % 6;
    return k == 5 || k == 2 || k == 0;
  endfunction

  initial begin
    cpat_t p;
    logic [63:0] w;
    logic [7:0] prod, alu, pnext, anext;
    logic [7:0] opa, opb, ma, mb, tr_n, ti_n, expect_v;
    logic [7:0] cur_wr, cur_wi;
    int v, k, f, n;
    reset = 1; run = 0; cs = 0; mc = 0; ca = 0; cc_in = 0; di = '0;
    repeat (3) @(negedge clk);
    reset = 0;

    // eight patterns into the loading bank, then all-zero delays with the swap
    op(4'd7);
    for (int a = 0; a < 8; a++) begin
      p = (a < 6) ? fft_pattern(a, 1'b0) : fft_pattern(a - 6, 1'b1);
      w = p;
      for (int b = 0; b < 8; b++) op(4'd0, w[8*b +: 8]);
      op(4'd4);
    end
    w = '0;
    for (int b = 0; b < 8; b++) op(4'd8, w[8*b +: 8]);
    op(4'd14);

    // butterflies; new weights in the first frame and then at random
    for (int i = 0; i < NB; i++) begin
      neww[i] = (i == 0) || ($urandom_range(2) == 0);
      if (neww[i]) begin
        cur_wr = 8'($urandom);
        cur_wi = 8'($urandom);
      end
      wr[i] = cur_wr; wi[i] = cur_wi;
      ar[i] = 8'($urandom); ai[i] = 8'($urandom);
      br[i] = 8'($urandom); bi[i] = 8'($urandom);
    end
    for (int t = 0; t < 6 * NB + 32; t++) begin
      in0[t] = 8'($urandom);
      in1[t] = 8'($urandom);
    end
    for (int i = 0; i < NB; i++) begin
      in0[6*i] = br[i]; in0[6*i+1] = bi[i]; in0[6*i+2] = ar[i]; in0[6*i+3] = ai[i];
      if (neww[i]) begin
        in1[6*i] = wr[i]; in1[6*i+1] = wi[i];
        n_new++;
      end else n_reuse++;
    end

    prod = '0; alu = '0;
    run = 1; ca = 5'(pat_addr(0));
    @(negedge clk);
    for (int c = 0; c < 6 * NB + 20; c++) begin
      ca = 5'(pat_addr(c + 1));
      for (int i = 0; i < 8; i++) begin
        logic [7:0] word;
        case (i)
          0: word = in0[c];
          1: word = in1[c];
          2: word = prod;
          3: word = alu;
          default: word = 8'($urandom);
        endcase
        di[0][i] = word[3:0];
        di[1][i] = word[7:4];
      end
      #1;
      chk(dout_oe[0] == dout_oe[1], "slices disagree on output enables");
      ma = {dout[1][0], dout[0][0]};
      mb = {dout[1][1], dout[0][1]};
      opa = {dout[1][2], dout[0][2]};
      opb = {dout[1][3], dout[0][3]};
      pnext = 8'(ma * mb);
      anext = alu_sub(c + 4) ? 8'(opa - opb) : 8'(opa + opb);  // slot of view cycle c - 2
      // outputs seen now were issued in view cycle v
      v = c - 2;
      if (v >= 0) begin
        k = v % 6;
        f = v / 6;
        chk(dout_oe[0][7:6] == 2'b00, "ports 6 and 7 must be off");
        chk(dout_oe[0][5:4] == 2'b11 && {dout[1][4], dout[0][4]} == in1[v]
            && {dout[1][5], dout[0][5]} == in0[v], "two-cycle pass-through");
        // multiplier operands and product
        if (k >= 1 && k <= 4 && f < NB) begin
          case (k)
            1: expect_v = 8'(bi[f] * wi[f]);
            2: expect_v = 8'(br[f] * wr[f]);
            3: expect_v = 8'(br[f] * wi[f]);
            default: expect_v = 8'(bi[f] * wr[f]);
          endcase
          chk(dout_oe[0][1:0] == 2'b11 && pnext == expect_v,
              $sformatf("product, view %0d slot %0d: %h want %h", v, k, pnext, expect_v));
        end else if (k == 0 || k == 5)
          chk(dout_oe[0][1:0] == 2'b00, "multiplier operands off in idle slots");
        // ALU operation: which butterfly and which step
        case (k)
          5: n = f;
          0: n = f - 2;
          default: n = f - 1;
        endcase
        if (n >= 0 && n < NB) begin
          tr_n = 8'(bi[n] * wi[n] - br[n] * wr[n]);   // minus the real part of b*w
          ti_n = 8'(br[n] * wi[n] + bi[n] * wr[n]);
          case (k)
            5: expect_v = tr_n;
            1: expect_v = ti_n;
            2: expect_v = 8'(ar[n] - tr_n);           // X0 real
            3: expect_v = 8'(ar[n] + tr_n);           // X1 real
            4: expect_v = 8'(ai[n] + ti_n);           // X0 imaginary
            default: expect_v = 8'(ai[n] - ti_n);     // X1 imaginary
          endcase
          chk(dout_oe[0][3:2] == 2'b11 && anext == expect_v,
              $sformatf("ALU, view %0d slot %0d butterfly %0d: %h want %h", v, k, n, anext, expect_v));
          if (k == 0) n_bfly++;
        end
      end
      prod = pnext;
      alu = anext;
      @(negedge clk);
    end
    $display("butterflies completed=%0d, frames with new weights=%0d, reusing weights=%0d",
             n_bfly, n_new, n_reuse);
    chk(n_bfly == NB, "every butterfly completed");
    chk(n_new > 1 && n_reuse > 0, "both weight cases used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
