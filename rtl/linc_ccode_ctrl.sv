// linc_ccode_ctrl: control-pattern (c-code) loading and testing logic of LINC.
//
// Holds the 64-bit c-code shift register, the loading address counter and the
// bank flip-flop, and carries out the c-code modes decoded by linc_mode_decode:
//   shift in   csr <= {cc_in, csr[63:8]}: eight cycles fill the register, the
//              first byte ending in bits [7:0];
//   shift out  cc_byte = csr[7:0] and the register rotates a byte down, so eight
//              cycles read it out and leave it as it was;
//   to/from register   csr -> control pattern register (done in linc_cpr) /
//              control pattern register -> csr;
//   store / read       csr -> loading bank[addr] / loading bank[addr] -> csr,
//              each followed by addr + 1;
//   addr reset addr <= 0;   swap   bank <= ~bank.
// Everything takes effect at the clock edge ending the cycle in which the mode
// is presented, whether the chip is running or halted. The mode set and the
// eight-cycle byte-wide transfer follow the specification; the shift direction
// is this design's choice. rst (synchronous) clears the counter, the shift
// register and the bank flip-flop (bank 0 working).
module linc_ccode_ctrl #(
  parameter int unsigned CPW  = 64,
  parameter int unsigned NPAT = 32,
  localparam int unsigned AW  = $clog2(NPAT)
) (
  input  logic           clk,
  input  logic           rst,
  input  linc_pkg::modeop_t        op,
  input  logic [7:0]     cc_in,
  input  logic [CPW-1:0] cpr,        // control pattern register, for unload
  input  logic [CPW-1:0] ld_rdata,   // loading bank read data
  output logic [CPW-1:0] csr,        // shift register (write data, CPR load data)
  output logic [7:0]     cc_byte,    // byte presented on CC for shift out
  output logic [AW-1:0]  ld_addr,
  output logic           ld_we,
  output logic           bank        // working bank
);

  always_ff @(posedge clk) begin
    if (rst) begin
      csr     <= '0;
      ld_addr <= '0;
      bank    <= 1'b0;
    end else begin
      if (op.cc_shift_in)       csr <= {cc_in, csr[CPW-1:8]};
      else if (op.cc_shift_out) csr <= {csr[7:0], csr[CPW-1:8]};
      else if (op.cc_from_reg)  csr <= cpr;
      else if (op.cc_read)      csr <= ld_rdata;

      if (op.addr_reset)                    ld_addr <= '0;
      else if (op.cc_store || op.cc_read)   ld_addr <= ld_addr + 1'b1;

      if (op.swap) bank <= ~bank;
    end
  end

  assign ld_we   = op.cc_store && !rst;
  assign cc_byte = csr[7:0];

endmodule
