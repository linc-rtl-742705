// linc_cpm: the control pattern memory of LINC.
//
// 2 x NPAT words of CPW bits (64 x 64 in LINC), seen as two banks. One bank,
// the working bank, supplies a pattern every cycle at the address given on the
// CA pins; the other, the loading bank, is written and read back through the
// c-code shift register at the loading address counter. Which bank is which is
// set by the bank flip-flop in linc_ccode_ctrl, so a swap is one bit flip.
//
// Both read ports are asynchronous; their users register the data (the
// control pattern register, the c-code shift register). The write happens at
// the clock edge. Sizes follow the specification; the specification's static
// RAM is written here as an array.
module linc_cpm #(
  parameter int unsigned CPW  = 64,
  parameter int unsigned NPAT = 32,
  localparam int unsigned AW  = $clog2(NPAT)
) (
  input  logic           clk,
  input  logic           bank,      // working bank; the loading bank is ~bank
  input  logic [AW-1:0]  ca,        // working-bank read address
  output logic [CPW-1:0] wk_rdata,
  input  logic [AW-1:0]  ld_addr,   // loading-bank address
  input  logic           ld_we,
  input  logic [CPW-1:0] ld_wdata,
  output logic [CPW-1:0] ld_rdata
);

  logic [CPW-1:0] mem [2*NPAT];

  always_ff @(posedge clk) begin
    if (ld_we) mem[{~bank, ld_addr}] <= ld_wdata;
  end

  assign wk_rdata = mem[{bank, ca}];
  assign ld_rdata = mem[{~bank, ld_addr}];

endmodule
