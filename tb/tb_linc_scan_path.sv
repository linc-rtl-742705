// tb_linc_scan_path: self-checking test of the crossbar registers and scan path.
// Checks normal capture while running and holding while halted, then scans 64
// random bits in on sdi and checks the register contents, then scans out 64
// cycles, checking each bit on sdo and that the contents are back unchanged.
module tb_linc_scan_path;
  localparam int NPORT = 8, DW = 4;
  logic clk = 0, run, scan_in, scan_out, sdi, sdo;
  logic [NPORT-1:0][DW-1:0] xin_d, xin_q, xout_d, xout_q;
  int checks = 0, failures = 0;

  linc_scan_path dut (.*);

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

  initial begin
    logic [63:0] bits, saved;
    run = 0; scan_in = 0; scan_out = 0; sdi = 0;
    for (int t = 0; t < 100; t++) begin
      logic [31:0] pi, po;
      @(negedge clk);
      pi = {xin_q}; po = {xout_q};
      run = $urandom % 2;
      xin_d = $urandom; xout_d = $urandom;
      @(posedge clk); #1;
      if (run) chk(xin_q == xin_d && xout_q == xout_d, "capture");
      else     chk(xin_q == pi && xout_q == po, "hold while halted");
    end
    for (int r = 0; r < 4; r++) begin
      bits = {$urandom, $urandom};
      @(negedge clk); run = 0;
      for (int k = 0; k < 64; k++) begin
        @(negedge clk); scan_in = 1; sdi = bits[k];
      end
      @(negedge clk); scan_in = 0;
      chk({xout_q, xin_q} == bits, "scan in");
      saved = {xout_q, xin_q};
      for (int k = 0; k < 64; k++) begin
        @(negedge clk); scan_out = 1; #1;
        chk(sdo == bits[k], "scan out bit");
      end
      @(negedge clk); scan_out = 0;
      chk({xout_q, xin_q} == saved, "rotation restores");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
