// tb_linc_fpd: self-checking test of one FPD register file.
// Uses it first as a programmable delay (write every cycle at a running
// pointer, read d entries back, checking rdata equals the input of d cycles
// earlier for d = 1..31 and the bypass for d = 0), then as a FIFO column with
// random pushes and pops against a queue model.
module tb_linc_fpd;
  localparam int DW = 4, AW = 5;
  logic clk = 0;
  logic we, bypass;
  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [DW-1:0] hist [int];
  logic [DW-1:0] q [$];

  linc_fpd dut (.clk, .we, .waddr, .wdata, .raddr, .bypass, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [DW-1:0] want, string what);
    checks++;
    if (rdata !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h want %h", what, rdata, want);
    end
  endtask

  initial begin
    int head, tail;
    we = 0; bypass = 0; waddr = 0; raddr = 0; wdata = 0;
    // Delay use: cycle t writes x(t) at t mod 32.
    for (int t = 0; t < 400; t++) begin
      int d;
      d = (t / 12) % 32;
      @(negedge clk);
      we = 1; waddr = AW'(t); wdata = DW'($urandom); hist[t] = wdata;
      raddr = AW'(t - d); bypass = (d == 0);
      #1;
      if (t >= 32) check(hist[t - d], $sformatf("delay %0d at t=%0d", d, t));
    end
    // FIFO use.
    head = 0; tail = 0;
    for (int t = 0; t < 600; t++) begin
      logic push, pop;
      @(negedge clk);
      push = ($urandom % 2) && (q.size() < 31);
      pop  = ($urandom % 2) && (q.size() > 0);
      bypass = 0;
      raddr = AW'(head);
      we = push; waddr = AW'(tail); wdata = DW'($urandom);
      #1;
      if (q.size() > 0) check(q[0], "fifo head");
      if (push) begin q.push_back(wdata); tail++; end
      if (pop)  begin void'(q.pop_front()); head++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
