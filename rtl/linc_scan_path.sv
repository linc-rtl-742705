// linc_scan_path: crossbar input and output registers of LINC, with their scan path.
//
// In normal running the register xin_q captures the FPD outputs (the 32-bit
// crossbar input) and xout_q the crossbar outputs (the 32-bit crossbar output)
// every cycle; both hold while the chip is halted. For testing, the 64 bits
// form a one-bit scan chain on CC[0]: chain bit 0 is xin_q[0][0], bits 0-31 are
// xin_q and bits 32-63 xout_q. Scan in (mode 1100) shifts sdi into bit 63 and
// moves the chain one place toward bit 0. Scan out (mode 1101) shows bit 0 on
// sdo and rotates it into bit 63, so 64 scan-out cycles read the chain and
// return it to its original state. A scan operation overrides the normal
// capture; the chip should not be running during one.
//
// The 64-bit path around the crossbar, the single-bit CC[0] port, the 64-cycle
// access and the rotation follow the specification; the chain order is this
// design's choice.
module linc_scan_path #(
  parameter int unsigned NPORT = 8,
  parameter int unsigned DW    = 4
) (
  input  logic                     clk,
  input  logic                     run,
  input  logic                     scan_in,
  input  logic                     scan_out,
  input  logic                     sdi,
  output logic                     sdo,
  input  logic [NPORT-1:0][DW-1:0] xin_d,   // FPD outputs
  output logic [NPORT-1:0][DW-1:0] xin_q,   // to the crossbar
  input  logic [NPORT-1:0][DW-1:0] xout_d,  // crossbar outputs
  output logic [NPORT-1:0][DW-1:0] xout_q   // to the PRFs
);

  localparam int unsigned N = NPORT * DW;

  logic [2*N-1:0] chain;
  assign chain = {xout_q, xin_q};
  assign sdo   = chain[0];

  always_ff @(posedge clk) begin
    if (scan_in)       {xout_q, xin_q} <= {sdi, chain[2*N-1:1]};
    else if (scan_out) {xout_q, xin_q} <= {chain[0], chain[2*N-1:1]};
    else if (run) begin
      xin_q  <= xin_d;
      xout_q <= xout_d;
    end
  end

endmodule
