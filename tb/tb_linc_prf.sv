// tb_linc_prf: self-checking test of one 14-stage pipeline register file.
// Drives random crossbar values, shift bits, enables and output selects and
// compares dout/oe with a shift-register model: stage k is the k-th most
// recent shifted-in value before this cycle's shift, select 14 passes the
// crossbar value, select 15 turns the output off.
module tb_linc_prf;
  localparam int DW = 4, NSTAGE = 14;
  logic clk = 0;
  logic en, shift, oe;
  logic [3:0] osel;
  logic [DW-1:0] din, dout;
  logic [DW-1:0] model [NSTAGE];
  int filled = 0;
  int checks = 0, failures = 0;

  linc_prf dut (.clk, .en, .shift, .osel, .din, .dout, .oe);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en    = ($urandom % 8) != 0;
      shift = ($urandom % 3) != 0;
      osel  = 4'($urandom);
      din   = DW'($urandom);
      #1;
      checks++;
      if (osel == 4'd15) begin
        if (oe !== 1'b0 || dout !== '0) begin failures++; $display("FAIL off t=%0d", t); end
      end else if (osel == 4'd14) begin
        if (oe !== 1'b1 || dout !== din) begin failures++; $display("FAIL xbar t=%0d", t); end
      end else if (int'(osel) < filled) begin
        if (oe !== 1'b1 || dout !== model[osel]) begin
          failures++;
          if (failures < 10) $display("FAIL stage %0d t=%0d got %h want %h", osel, t, dout, model[osel]);
        end
      end else begin
        if (oe !== 1'b1) begin failures++; $display("FAIL oe t=%0d", t); end
      end
      if (en && shift) begin
        for (int k = NSTAGE - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = din;
        if (filled < NSTAGE) filled++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
