// linc_dcode_ctrl: delay-code (d-code) loading and testing logic of LINC.
//
// The d-code register holds one byte per FPD (role and count, see linc_pkg).
// A new d-code is shifted into a separate byte-wide shift register over the
// CC bus in eight cycles (mode 1000), then copied into the d-code register in
// one cycle (mode 1010, or 1110 together with a bank swap). Shifting in may go
// on while the chip runs. For testing, mode 1011 copies the d-code register
// back into the shift register, with the live FIFO length in the count field
// of every FIFO member, and mode 1001 presents dsr[7:0] on CC while rotating
// the shift register a byte down (eight cycles read it all and restore it).
//
// The separate shift register, the eight-cycle load, the one-cycle transfer
// and the live count of a FIFO follow the specification; the shift direction
// is this design's choice. rst (synchronous) clears both registers, which
// makes every FPD a zero-length delay.
module linc_dcode_ctrl
  import linc_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  modeop_t        op,
  input  logic [7:0]     cc_in,
  input  logic [FAW-1:0] len_a,    // live FIFO lengths
  input  logic [FAW-1:0] len_b,
  output dcode_t         dcode,    // d-code register
  output dcode_t         dsr,      // d-code shift register
  output logic [7:0]     cc_byte   // byte presented on CC for shift out
);

  dcode_t live;

  always_comb begin
    live = dcode;
    for (int i = 0; i < NPORT; i++) begin
      if (dcode[i].mode == FPD_FIFO_A) live[i].count = len_a;
      if (dcode[i].mode == FPD_FIFO_B) live[i].count = len_b;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dcode <= '0;
      dsr   <= '0;
    end else begin
      if (op.dc_shift_in)       dsr <= {cc_in, dsr[NPORT-1:1]};
      else if (op.dc_shift_out) dsr <= {dsr[0], dsr[NPORT-1:1]};
      else if (op.dc_unload)    dsr <= live;
      if (op.dc_load) dcode <= dsr;
    end
  end

  assign cc_byte = dsr[0];

endmodule
