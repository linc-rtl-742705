// linc_mode_decode: mode-control decoder of LINC.
//
// With chip select (cs) high, the 4-bit mode-control code mc selects one
// loading or testing operation per cycle; with cs low nothing happens and the
// CC bus is not driven. The decoding is combinational, so the selected
// operation takes effect at the clock edge that ends the cycle in which the
// code is presented.
//
// The codes and their meanings follow the LINC mode table (see linc_pkg).
// Code 1110 raises both the d-code load and the bank swap; code 1111 is unused
// and does nothing. The CC bus is driven (cc_oe) only for the three read-out
// codes 0001, 1001 and 1101, as the specification requires.
module linc_mode_decode
  import linc_pkg::*;
(
  input  logic       cs,     // chip select
  input  logic [3:0] mc,     // mode control
  output modeop_t    op,     // decoded operation, all zero when cs is low
  output logic       cc_oe   // CC[7:0] drive enable
);

  always_comb begin
    op = '0;
    if (cs) begin
      unique case (mode_e'(mc))
        MC_CC_SHIFT_IN:  op.cc_shift_in  = 1'b1;
        MC_CC_SHIFT_OUT: op.cc_shift_out = 1'b1;
        MC_CC_TO_REG:    op.cc_to_reg    = 1'b1;
        MC_CC_FROM_REG:  op.cc_from_reg  = 1'b1;
        MC_CC_STORE:     op.cc_store     = 1'b1;
        MC_CC_READ:      op.cc_read      = 1'b1;
        MC_SWAP:         op.swap         = 1'b1;
        MC_ADDR_RESET:   op.addr_reset   = 1'b1;
        MC_DC_SHIFT_IN:  op.dc_shift_in  = 1'b1;
        MC_DC_SHIFT_OUT: op.dc_shift_out = 1'b1;
        MC_DC_LOAD:      op.dc_load      = 1'b1;
        MC_DC_UNLOAD:    op.dc_unload    = 1'b1;
        MC_SCAN_IN:      op.scan_in      = 1'b1;
        MC_SCAN_OUT:     op.scan_out     = 1'b1;
        MC_DC_LOAD_SWAP: begin
          op.dc_load = 1'b1;
          op.swap    = 1'b1;
        end
        MC_NOP:          ;
      endcase
    end
  end

  assign cc_oe = op.cc_shift_out | op.dc_shift_out | op.scan_out;

endmodule
