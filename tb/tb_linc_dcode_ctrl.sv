// tb_linc_dcode_ctrl: self-checking test of the d-code loading/testing logic.
// Shifts a random d-code in over eight cycles, checks the shift register and
// that the d-code register changes only on load, unloads it back with live
// FIFO lengths substituted into the FIFO members' count fields, and shifts it
// out byte by byte, checking the bytes and the restoring rotation.
module tb_linc_dcode_ctrl;
  import linc_pkg::*;
  logic clk = 0, rst;
  modeop_t op;
  logic [7:0] cc_in, cc_byte;
  logic [FAW-1:0] len_a, len_b;
  dcode_t dcode, dsr;
  int checks = 0, failures = 0;

  linc_dcode_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  modeop_t SHIN, SHOUT, LOAD, UNLOAD;

  initial begin
    logic [63:0] d, old, live;
    SHIN = '0; SHIN.dc_shift_in = 1;
    SHOUT = '0; SHOUT.dc_shift_out = 1;
    LOAD = '0; LOAD.dc_load = 1;
    UNLOAD = '0; UNLOAD.dc_unload = 1;
    op = '0; cc_in = 0; len_a = 0; len_b = 0;
    rst = 1; @(negedge clk); @(negedge clk); rst = 0;
    chk(dcode == '0, "reset");
    for (int r = 0; r < 20; r++) begin
      d = {$urandom, $urandom};
      old = dcode;
      for (int k = 0; k < 8; k++) step(SHIN, d[8*k +: 8]);
      chk(dsr == d, "shift in");
      chk(dcode == old, "register holds until load");
      step(LOAD);
      chk(dcode == d, "load");
      len_a = FAW'($urandom); len_b = FAW'($urandom);
      live = d;
      for (int i = 0; i < 8; i++) begin
        if (d[8*i + 5 +: 2] == 2'b01) live[8*i +: 5] = len_a;
        if (d[8*i + 5 +: 2] == 2'b10) live[8*i +: 5] = len_b;
      end
      step(UNLOAD);
      chk(dsr == live, "unload with live FIFO lengths");
      for (int k = 0; k < 8; k++) begin
        #1; chk(cc_byte == live[8*k +: 8], "shift out byte");
        step(SHOUT);
      end
      chk(dsr == live, "rotation restores");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
