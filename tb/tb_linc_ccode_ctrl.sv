// tb_linc_ccode_ctrl: self-checking test of the c-code loading/testing logic.
// Connected to a control pattern memory, it follows the loading sequence of
// LINC: reset the address counter, shift in a pattern byte by byte, store with
// post-increment, skip words with read-and-increment, swap banks. It checks the
// shift register after each byte, the address counter, the memory contents of
// the loading bank, read-back into the shift register, byte-wise shift-out with
// rotation, unload from the control pattern register, and the bank flip-flop.
module tb_linc_ccode_ctrl;
  import linc_pkg::*;
  logic clk = 0, rst;
  modeop_t op;
  logic [7:0] cc_in, cc_byte;
  logic [63:0] cpr, ld_rdata, csr, wk_rdata;
  logic [4:0] ld_addr, ca;
  logic ld_we, bank;
  logic [63:0] model [2][32];
  int checks = 0, failures = 0;

  linc_ccode_ctrl dut (.*);
  linc_cpm u_mem (.clk, .bank, .ca, .wk_rdata, .ld_addr, .ld_we, .ld_wdata(csr), .ld_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic step(modeop_t o, logic [7:0] b = 8'h00);
    @(negedge clk); op = o; cc_in = b;
    @(posedge clk); #1; op = '0;
  endtask

  modeop_t SHIN, SHOUT, FROMREG, STORE, READ, SWAP, ARST;

  initial begin
    logic [63:0] pat;
    logic exp_bank;
    int addr;
    SHIN = '0; SHIN.cc_shift_in = 1;
    SHOUT = '0; SHOUT.cc_shift_out = 1;
    FROMREG = '0; FROMREG.cc_from_reg = 1;
    STORE = '0; STORE.cc_store = 1;
    READ = '0; READ.cc_read = 1;
    SWAP = '0; SWAP.swap = 1;
    ARST = '0; ARST.addr_reset = 1;
    op = '0; cc_in = 0; cpr = '0; ca = 0;
    rst = 1; @(negedge clk); @(negedge clk); rst = 0;
    chk(bank == 0 && ld_addr == 0, "reset");
    exp_bank = 0;
    for (int round = 0; round < 3; round++) begin
      step(ARST); addr = 0;
      chk(ld_addr == 0, "address reset");
      for (int w = 0; w < 12; w++) begin
        if (w % 5 == 3) begin
          step(READ); addr++;
          chk(ld_addr == 5'(addr), "read post-increment");
          continue;
        end
        pat = {$urandom, $urandom};
        for (int k = 0; k < 8; k++) begin
          step(SHIN, pat[8*k +: 8]);
          chk(csr[63 -: 8] == pat[8*k +: 8], "byte enters at the top");
        end
        chk(csr == pat, "eight bytes make the pattern");
        step(STORE);
        model[~exp_bank][addr] = pat; addr++;
        chk(ld_addr == 5'(addr), "store post-increment");
      end
      // read back through shift register
      step(ARST);
      for (int w = 0; w < 12; w++) begin
        step(READ);
        if (w % 5 != 3) begin
          chk(csr == model[~exp_bank][w], "read into shift register");
          for (int k = 0; k < 8; k++) begin
            #1; chk(cc_byte == model[~exp_bank][w][8*k +: 8], "shift out byte");
            step(SHOUT);
          end
          chk(csr == model[~exp_bank][w], "rotation restores the register");
        end
      end
      // working bank untouched: after swap the loaded bank becomes working
      step(SWAP); exp_bank = ~exp_bank;
      chk(bank == exp_bank, "swap");
      ca = 5'd0; #1; chk(wk_rdata == model[exp_bank][0], "swapped bank is working");
      // unload from control pattern register
      cpr = {$urandom, $urandom};
      step(FROMREG);
      chk(csr == cpr, "unload control pattern register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
