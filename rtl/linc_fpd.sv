// linc_fpd: one FIFO-or-programmable-delay (FPD) slice of LINC.
//
// Each LINC input port passes through an FPD before it reaches the crossbar.
// The slice is a 2**AW-entry, DW-bit register file with one write port and one
// asynchronous read port, plus a bypass that hands the write data straight to
// the output. The controller (linc_fpd_ctrl) decides what the slice is:
//   - programmable delay of d cycles: written every running cycle at a
//     free-running pointer p, read at p - d; d = 0 uses the bypass;
//   - one 4-bit column of the A- or B-FIFO: written at the FIFO's tail on a
//     write request, read at its head.
// Delays of 0..31 cycles and a FIFO depth of 31 follow the specification; the
// register-file organisation is this design's own.
//
// Timing: the write happens at the clock edge; rdata is combinational in
// raddr, so the selected entry reaches the crossbar-input register in the same
// cycle.
module linc_fpd #(
  parameter int unsigned DW = 4,
  parameter int unsigned AW = 5
) (
  input  logic          clk,
  input  logic          we,      // write wdata at waddr at the clock edge
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,   // the input port
  input  logic [AW-1:0] raddr,
  input  logic          bypass,  // zero delay: rdata = wdata
  output logic [DW-1:0] rdata    // to the crossbar
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = bypass ? wdata : mem[raddr];

endmodule
