// linc_crossbar: the uni-directional NPORT x NPORT crossbar of LINC.
//
// Output j carries input xsel[j]; any input may feed any number of outputs
// (broadcast). The crossbar sits between the FPDs and the pipeline register
// files and is purely combinational: in LINC its inputs come from the
// crossbar-input register and its outputs go to the crossbar-output register,
// so it takes the middle cycle of the two-cycle transfer. Width, port count and
// 3-bit selects follow the specification.
module linc_crossbar #(
  parameter int unsigned NPORT = 8,
  parameter int unsigned DW    = 4,
  localparam int unsigned SW   = $clog2(NPORT)
) (
  input  logic [NPORT-1:0][DW-1:0] din,
  input  logic [NPORT-1:0][SW-1:0] xsel,
  output logic [NPORT-1:0][DW-1:0] dout
);

  always_comb begin
    for (int j = 0; j < NPORT; j++) dout[j] = din[xsel[j]];
  end

endmodule
