// tb_linc_mode_decode: self-checking test of the LINC mode-control decoder.
// For every mode code, with chip select low and high, checks that exactly the
// expected operation bits are raised (two for the load-and-swap code, none for
// the unused code or without chip select) and that the CC bus is driven only
// for the three read-out codes.
module tb_linc_mode_decode;
  import linc_pkg::*;
  logic cs;
  logic [3:0] mc;
  modeop_t op;
  logic cc_oe;
  int checks = 0, failures = 0;

  linc_mode_decode dut (.cs, .mc, .op, .cc_oe);

  // Expected bit of op for each code: op is packed with cc_shift_in as the MSB (bit 13).
  function automatic logic [13:0] expect_op(logic c, logic [3:0] m);
    logic [13:0] e = '0;
    if (!c) return e;
    if (m <= 4'd13) e[13 - m] = 1'b1;
    if (m == 4'd14) begin
      e[13 - 10] = 1'b1;  // d-code load
      e[13 - 6]  = 1'b1;  // swap
    end
    return e;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int m = 0; m < 16; m++) begin
        cs = 1'(c);
        mc = 4'(m);
        #1;
        checks++;
        if (op !== expect_op(cs, mc)) begin
          failures++;
          $display("FAIL cs=%0d mc=%b op=%b want %b", cs, mc, op, expect_op(cs, mc));
        end
        checks++;
        if (cc_oe !== (cs && (m == 1 || m == 9 || m == 13))) begin
          failures++;
          $display("FAIL cc_oe cs=%0d mc=%b", cs, mc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
