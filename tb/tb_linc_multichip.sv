// tb_linc_multichip: a 16x16 crossbar, 8 bits wide, built from eight LINC chips.
//
// Two arrangements are combined:
//   - bit slicing: slice s (0, 1) carries bits 4s+3:4s of every 8-bit stream,
//     and both slices run the same patterns at the same CA;
//   - a larger crossbar: chip (r, c) of a slice takes input group r
//     (inputs 8r..8r+7) and drives output group c (outputs 8c..8c+7). The
//     outputs of chips (0, c) and (1, c) are wired together; for each output
//     the pattern turns on (crossbar value, select 14) only the chip whose
//     input group holds the wanted source, the other turns it off (select 15).
// 32 random 16x16 routings (broadcasts included) are loaded into every chip
// through a shared CC bus, one chip select per chip, into the loading bank,
// which is then swapped in. During the run CA picks a random routing every
// cycle; the test checks each of the 16 outputs two cycles later, and that
// exactly one chip drives each shared output wire.
module tb_linc_multichip;
  import linc_pkg::*;

  localparam int NS = 2, NG = 2, NIN = 16, NRUN = 3000;

  logic clk = 0;
  logic reset, run;
  logic [3:0] mc;
  logic [4:0] ca;
  logic [7:0] cc_in;
  logic [NS-1:0][NG-1:0][NG-1:0] cs;
  logic [NIN-1:0][7:0] din;
  logic [7:0][3:0] dout [NS][NG][NG];
  logic [7:0]      doe  [NS][NG][NG];
  logic [7:0]      cco  [NS][NG][NG];
  logic            ccoe [NS][NG][NG];
  logic            st   [NS][NG][NG][4];
  int checks = 0, failures = 0;
  int src [32][NIN];

  for (genvar s = 0; s < NS; s++) begin : g_s
    for (genvar r = 0; r < NG; r++) begin : g_r
      for (genvar c = 0; c < NG; c++) begin : g_c
        logic [7:0][3:0] dchip;
        for (genvar i = 0; i < 8; i++) begin : g_i
          assign dchip[i] = din[8*r + i][4*s +: 4];
        end
        linc u (
          .clk, .reset, .run, .cs(cs[s][r][c]), .mc, .ca, .cc_in,
          .cc_out(cco[s][r][c]), .cc_oe(ccoe[s][r][c]),
          .di(dchip), .dout(dout[s][r][c]), .dout_oe(doe[s][r][c]),
          .waf(1'b0), .wbf(1'b0), .raf(1'b0), .rbf(1'b0),
          .aff(st[s][r][c][0]), .afe(st[s][r][c][1]), .bff(st[s][r][c][2]), .bfe(st[s][r][c][3]));
      end
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Shared output wires: value and number of drivers.
  function automatic logic [7:0] wire_val(int q, output int drivers);
    logic [7:0] v = '0;
    int c = q / 8, j = q % 8;
    drivers = 0;
    for (int r = 0; r < NG; r++) begin
      if (doe[0][r][c][j]) begin
        drivers++;
        for (int s = 0; s < NS; s++) v[4*s +: 4] = dout[s][r][c][j];
      end
    end
    return v;
  endfunction

  task automatic op(int s, int r, int c, logic [3:0] m, logic [7:0] b = 0);
    cs = '0; cs[s][r][c] = 1'b1; mc = m; cc_in = b;
    @(negedge clk);
    cs = '0;
  endtask

  initial begin
    logic [7:0] hist_in [$][NIN];
    int hist_pat [$];
    int cur, nxt;
    reset = 1; run = 0; cs = '0; mc = 0; ca = 0; cc_in = 0; din = '0;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int n = 0; n < 32; n++)
      for (int q = 0; q < NIN; q++) src[n][q] = (n == 0) ? (q + 5) % NIN : $urandom % NIN;
    for (int s = 0; s < NS; s++)
      for (int r = 0; r < NG; r++)
        for (int c = 0; c < NG; c++) begin
          op(s, r, c, 4'd7);
          for (int n = 0; n < 32; n++) begin
            cpat_t p;
            logic [63:0] w;
            p = '{osel: {8{OSEL_OFF}}, shift: '0, xsel: '0};
            for (int j = 0; j < 8; j++) begin
              int sq;
              sq = src[n][8*c + j];
              if (sq / 8 == r) begin
                p.xsel[j] = 3'(sq % 8);
                p.osel[j] = OSEL_XBAR;
              end
            end
            w = p;
            for (int k = 0; k < 8; k++) op(s, r, c, 4'd0, w[8*k +: 8]);
            op(s, r, c, 4'd4);
          end
          op(s, r, c, 4'd6);
        end
    // run: the pattern in use in cycle t is the CA of cycle t-1
    run = 1; cur = 0; ca = 0;
    @(negedge clk);
    for (int t = 0; t < NRUN; t++) begin
      logic [7:0] ins [NIN];
      nxt = $urandom % 32;
      ca = 5'(nxt);
      for (int q = 0; q < NIN; q++) begin din[q] = 8'($urandom); ins[q] = din[q]; end
      hist_in.push_back(ins);
      hist_pat.push_back(cur);
      #1;
      if (t >= 2) begin
        for (int q = 0; q < NIN; q++) begin
          int drv;
          logic [7:0] v;
          logic [7:0] want;
          v = wire_val(q, drv);
          want = hist_in[t - 2][src[hist_pat[t - 2]][q]];
          checks++;
          if (drv != 1 || v !== want) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d out %0d drivers %0d got %h want %h", t, q, drv, v, want);
          end
        end
      end
      cur = nxt;
      @(negedge clk);
    end
    $display("16x16 8-bit crossbar from %0d chips: %0d routed values checked", NS * NG * NG, checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
