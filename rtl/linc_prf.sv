// linc_prf: one pipeline register file (PRF) of LINC.
//
// A PRF is a shift register whose input is one crossbar output and whose
// output, one LINC output port, may tap any stage. When en and shift are high
// the crossbar value enters stage 0 and every stage moves one place on
// (stage NSTAGE-1 is dropped). The output select picks
//   0 .. NSTAGE-1  stage osel (the contents before this cycle's shift),
//   OSEL_XBAR      the crossbar value itself (no buffering),
//   OSEL_OFF       nothing: oe is low and dout is 0 (high impedance at the pin).
// 14 stages, one shift bit and a 4-bit select follow the specification; the
// numeric codes of the select are this design's choice. Any other code above
// NSTAGE-1 also turns the output off.
//
// Timing: dout/oe are combinational in osel, din and the stages; the shift
// happens at the clock edge.
module linc_prf #(
  parameter int unsigned DW     = 4,
  parameter int unsigned NSTAGE = 14
) (
  input  logic          clk,
  input  logic          en,      // chip running
  input  logic          shift,   // shift din in this cycle
  input  logic [3:0]    osel,    // output select
  input  logic [DW-1:0] din,     // crossbar output
  output logic [DW-1:0] dout,
  output logic          oe
);

  logic [DW-1:0] stage [NSTAGE];

  always_ff @(posedge clk) begin
    if (en && shift) begin
      stage[0] <= din;
      for (int k = 1; k < NSTAGE; k++) stage[k] <= stage[k-1];
    end
  end

  always_comb begin
    dout = '0;
    oe   = 1'b0;
    if (osel == linc_pkg::OSEL_XBAR) begin
      dout = din;
      oe   = 1'b1;
    end else if (32'(osel) < NSTAGE) begin
      dout = stage[osel];
      oe   = 1'b1;
    end
  end

endmodule
