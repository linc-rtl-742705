// linc: the Link and Interconnection Chip.
//
// LINC joins the functional units of a system (arithmetic chips, register
// files, I/O ports) with eight 4-bit data paths. Each input port DI[i] feeds a
// FIFO-or-programmable-delay (FPD); the FPD outputs cross an 8x8 crossbar; each
// crossbar output feeds a 14-stage pipeline register file (PRF) whose selected
// stage is output port DO[j]. The crossbar and the PRFs take a new 64-bit
// control pattern every cycle from one bank of a 2 x 32-word control pattern
// memory, addressed by CA one cycle ahead; the FPDs are set by a 64-bit d-code
// register. Two FPD groups can form the A- and B-FIFO, driven by off-chip
// requests (WAF/RAF, WBF/RBF) and reporting almost full/empty (AFF/AFE,
// BFF/BFE). Patterns, d-codes and the datapath are loaded and tested through
// the 8-bit CC bus under chip select and a 4-bit mode (see linc_pkg).
//
// Timing (single clock, all registers on the rising edge):
//   cycle t-1  CA = a            -> control pattern register holds word a in t
//   cycle t    DI, WAF/RAF...    -> FPDs, captured by the crossbar-input register
//   cycle t+1  crossbar          -> captured by the crossbar-output register
//   cycle t+2  PRF stage / crossbar value on DO; PRF shift at the end of t+2
// The pattern of cycle t controls the whole transfer, so the programmer sees a
// chip with no internal delay and a two-cycle delay at the outputs; FIFO status
// appears two cycles after a request. With run low everything but the FIFOs
// and the loading/testing logic stops. Reset is synchronous and acts once it
// has been high for two consecutive cycles: all outputs turn off (high
// impedance) and the control state is cleared.
//
// The structure, sizes, mode codes, timing and reset behaviour follow the
// LINC specification. This design's own choices: a single-phase clock instead
// of the two-phase clock, output enables (do_oe, cc_oe) instead of tri-state
// pins, and the field layouts in linc_pkg. Scan data use CC[0] only, the
// other CC bits read 0 during scan out.
module linc
  import linc_pkg::*;
(
  input  logic                     clk,
  input  logic                     reset,
  input  logic                     run,      // run / ~halt
  input  logic                     cs,       // chip select
  input  logic [3:0]               mc,       // mode control
  input  logic [PAW-1:0]           ca,       // control pattern address
  input  logic [7:0]               cc_in,    // CC bus, in
  output logic [7:0]               cc_out,   // CC bus, out
  output logic                     cc_oe,    // CC bus drive enable
  input  logic [NPORT-1:0][DW-1:0] di,       // data in, ports A..H = 0..7
  output logic [NPORT-1:0][DW-1:0] dout,     // data out (0 when off)
  output logic [NPORT-1:0]         dout_oe,  // data out drive enable
  input  logic                     waf, wbf, // FIFO write requests
  input  logic                     raf, rbf, // FIFO read requests
  output logic                     aff, afe, // A-FIFO almost full / almost empty
  output logic                     bff, bfe  // B-FIFO almost full / almost empty
);

  // Reset acts after two consecutive cycles.
  logic reset_q, rst;
  always_ff @(posedge clk) reset_q <= reset;
  assign rst = reset && reset_q;

  // Loading and testing control.
  modeop_t op;
  linc_mode_decode u_mode (.cs, .mc, .op, .cc_oe);

  // Control pattern memory, c-code logic, control pattern register.
  logic [CPW-1:0] csr, wk_rdata, ld_rdata;
  logic [PAW-1:0] ld_addr;
  logic           ld_we, bank;
  logic [7:0]     cc_byte;
  cpat_t          cpr;
  logic [NPORT-1:0][2:0] xsel_q;
  prfctl_t        prf_q;

  linc_cpm #(.CPW(CPW), .NPAT(NPAT)) u_cpm (
    .clk, .bank, .ca, .wk_rdata, .ld_addr, .ld_we, .ld_wdata(csr), .ld_rdata);

  linc_ccode_ctrl #(.CPW(CPW), .NPAT(NPAT)) u_ccode (
    .clk, .rst, .op, .cc_in, .cpr(cpr), .ld_rdata, .csr, .cc_byte, .ld_addr, .ld_we, .bank);

  linc_cpr u_cpr (
    .clk, .rst, .run, .mem_pat(cpat_t'(wk_rdata)), .load(op.cc_to_reg),
    .load_pat(cpat_t'(csr)), .cpr, .xsel_q, .prf_q);

  // D-code logic and FIFO/delay control.
  dcode_t         dcode, dsr;
  logic [7:0]     dc_byte;
  logic [FAW-1:0] len_a, len_b;
  logic [NPORT-1:0]          fpd_we, fpd_bypass;
  logic [NPORT-1:0][FAW-1:0] fpd_waddr, fpd_raddr;

  linc_dcode_ctrl u_dcode (
    .clk, .rst, .op, .cc_in, .len_a, .len_b, .dcode, .dsr, .cc_byte(dc_byte));

  linc_fpd_ctrl #(.NPORT(NPORT), .AW(FAW)) u_fpdc (
    .clk, .rst, .run, .dcode, .dc_load(op.dc_load), .dc_new(dsr),
    .waf, .wbf, .raf, .rbf,
    .we(fpd_we), .waddr(fpd_waddr), .raddr(fpd_raddr), .bypass(fpd_bypass),
    .aff, .afe, .bff, .bfe, .len_a, .len_b);

  // Datapath: FPDs, crossbar-input register, crossbar, crossbar-output
  // register, PRFs.
  logic [NPORT-1:0][DW-1:0] fpd_out, xin_q, xbar_out, xout_q;
  logic                     sdo;

  for (genvar i = 0; i < NPORT; i++) begin : g_fpd
    linc_fpd #(.DW(DW), .AW(FAW)) u_fpd (
      .clk, .we(fpd_we[i]), .waddr(fpd_waddr[i]), .wdata(di[i]),
      .raddr(fpd_raddr[i]), .bypass(fpd_bypass[i]), .rdata(fpd_out[i]));
  end

  linc_scan_path #(.NPORT(NPORT), .DW(DW)) u_scan (
    .clk, .run, .scan_in(op.scan_in), .scan_out(op.scan_out), .sdi(cc_in[0]), .sdo,
    .xin_d(fpd_out), .xin_q, .xout_d(xbar_out), .xout_q);

  linc_crossbar #(.NPORT(NPORT), .DW(DW)) u_xbar (.din(xin_q), .xsel(xsel_q), .dout(xbar_out));

  for (genvar j = 0; j < NPORT; j++) begin : g_prf
    linc_prf #(.DW(DW), .NSTAGE(NSTAGE)) u_prf (
      .clk, .en(run), .shift(prf_q.shift[j]), .osel(prf_q.osel[j]),
      .din(xout_q[j]), .dout(dout[j]), .oe(dout_oe[j]));
  end

  // CC bus read-out.
  always_comb begin
    cc_out = '0;
    if (op.cc_shift_out)      cc_out = cc_byte;
    else if (op.dc_shift_out) cc_out = dc_byte;
    else if (op.scan_out)     cc_out = {7'b0, sdo};
  end

endmodule
