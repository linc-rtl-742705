// tb_linc_corner_turn: corner turning (matrix transposition) on one LINC.
//
// Rows of a 4x4 matrix arrive in parallel, one column per cycle: in cycle c
// input port i carries A[i][c mod 4]. Output port j must deliver column j
// serially, A[0][j], A[1][j], A[2][j], A[3][j] on consecutive cycles.
// The program buffers data on both sides of the crossbar:
//   - FPD i is a programmable delay of i cycles, so in cycle c FPD i shows
//     A[i][(c - i) mod 4];
//   - four control patterns, used cyclically, route FPD (c - j) mod 4 to
//     crossbar output j in cycle c (a different permutation each cycle);
//   - every PRF shifts every cycle; output j taps stage 2 - j (port 3 takes
//     the crossbar value directly), which evens out the remaining skew.
// Element A[i][j] of the matrix that starts in cycle 4m then leaves port j in
// cycle 4m + 3 + i of the programmer's view, i.e. on the pins two cycles
// later. Matrices stream back to back, one every four cycles; pairs of them
// form an 8x4 matrix transposed by using the chip twice over. Everything is
// loaded through the CC bus as a user would.
module tb_linc_corner_turn;
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
  int checks = 0, failures = 0, elements = 0;

  linc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(logic [3:0] m, logic [7:0] b = 0);
    cs = 1; mc = m; cc_in = b;
    @(negedge clk);
    cs = 0;
  endtask

  localparam int NMAT = 40;
  logic [3:0] A [NMAT][4][4];

  initial begin
    cpat_t p;
    dcode_t d;
    logic [63:0] w;
    reset = 1; run = 0; cs = 0; mc = 0; ca = 0; cc_in = 0; di = '0;
    waf = 0; wbf = 0; raf = 0; rbf = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    // four patterns into the loading bank
    op(4'd7);
    for (int c = 0; c < 4; c++) begin
      p = '{osel: {8{OSEL_OFF}}, shift: 8'h0f, xsel: '0};
      for (int j = 0; j < 4; j++) p.xsel[j] = 3'((c - j + 4) % 4);
      p.osel[0] = 4'd2; p.osel[1] = 4'd1; p.osel[2] = 4'd0; p.osel[3] = OSEL_XBAR;
      w = p;
      for (int k = 0; k < 8; k++) op(4'd0, w[8*k +: 8]);
      op(4'd4);
    end
    // d-code: delays 0,1,2,3 on ports 0-3, zero elsewhere; load with the swap
    d = '0;
    for (int i = 0; i < 4; i++) d[i] = '{rsvd: 0, mode: FPD_DELAY, count: 5'(i)};
    w = d;
    for (int k = 0; k < 8; k++) op(4'd8, w[8*k +: 8]);
    op(4'd14);
    for (int m = 0; m < NMAT; m++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) A[m][i][j] = 4'($urandom);
    // prime: pattern 0 in the register for cycle 0
    run = 1; ca = 0;
    @(negedge clk);
    for (int c = 0; c < 4 * NMAT + 8; c++) begin
      ca = 5'((c + 1) % 4);
      for (int i = 0; i < 8; i++) di[i] = (i < 4 && c < 4 * NMAT) ? A[c / 4][i][c % 4] : 4'($urandom);
      #1;
      if (c >= 5 && (c - 5) / 4 < NMAT) begin
        int m, i;
        m = (c - 5) / 4;
        i = (c - 5) % 4;
        for (int j = 0; j < 4; j++) begin
          checks++;
          elements++;
          if (dout_oe[j] !== 1'b1 || dout[j] !== A[m][i][j]) begin
            failures++;
            if (failures < 10) $display("FAIL cycle %0d port %0d: %h want A[%0d][%0d][%0d]=%h", c, j, dout[j], m, i, j, A[m][i][j]);
          end
        end
        checks++;
        if (dout_oe[7:4] !== 4'h0) failures++;
      end
      @(negedge clk);
    end
    $display("transposed %0d matrices (%0d 8x4 matrices), %0d elements checked", NMAT, NMAT / 2, elements);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
