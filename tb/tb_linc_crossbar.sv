// tb_linc_crossbar: self-checking test of the 8x8 4-bit crossbar.
// Applies random inputs and random selects (including broadcasts of one input
// to every output) and compares every output with the selected input.
module tb_linc_crossbar;
  localparam int NPORT = 8, DW = 4;
  logic [NPORT-1:0][DW-1:0] din, dout;
  logic [NPORT-1:0][2:0]    xsel;
  int checks = 0, failures = 0;

  linc_crossbar dut (.din, .xsel, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < NPORT; i++) begin
        din[i]  = DW'($urandom);
        xsel[i] = (n % 10 == 0) ? 3'(n / 10) : 3'($urandom);
      end
      #1;
      for (int j = 0; j < NPORT; j++) begin
        checks++;
        if (dout[j] !== din[xsel[j]]) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d sel %0d got %h want %h", j, xsel[j], dout[j], din[xsel[j]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
