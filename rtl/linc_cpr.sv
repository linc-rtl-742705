// linc_cpr: the control pattern register of LINC and its control pipeline.
//
// While the chip runs, the register takes the working-bank word addressed by
// CA in the previous cycle, so a pattern address is given one cycle before the
// data it controls. A data item entering LINC in cycle t crosses the
// crossbar in cycle t+1 and leaves a PRF in cycle t+2; to let the pattern held
// in cycle t control the whole transfer, its crossbar field is delayed one
// cycle (xsel_q) and its PRF fields two cycles (prf_q). To the programmer the
// chip then has no internal delay, only a two-cycle delay at the outputs.
// Mode 0010 (load) writes the register from the c-code shift register, running
// or halted. When the chip is halted nothing else moves.
//
// The one-cycle-early address, the two-cycle transfer and the matching of the
// control flow to the data flow follow the specification; the pipeline
// registers are this design's way of doing it. rst (synchronous) clears the
// register and the pipeline to "no shift, all outputs off".
module linc_cpr
  import linc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  run,
  input  cpat_t                 mem_pat,   // working bank word at CA
  input  logic                  load,      // mode 0010
  input  cpat_t                 load_pat,  // c-code shift register
  output cpat_t                 cpr,       // control pattern register
  output logic [NPORT-1:0][2:0] xsel_q,    // for the crossbar, one cycle later
  output prfctl_t               prf_q      // for the PRFs, two cycles later
);

  localparam cpat_t   IDLE_PAT = '{osel: {NPORT{OSEL_OFF}}, shift: '0, xsel: '0};
  localparam prfctl_t IDLE_PRF = '{osel: {NPORT{OSEL_OFF}}, shift: '0};

  prfctl_t prf_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      cpr    <= IDLE_PAT;
      xsel_q <= '0;
      prf_d  <= IDLE_PRF;
      prf_q  <= IDLE_PRF;
    end else begin
      if (load)     cpr <= load_pat;
      else if (run) cpr <= mem_pat;
      if (run) begin
        xsel_q <= cpr.xsel;
        prf_d  <= '{osel: cpr.osel, shift: cpr.shift};
        prf_q  <= prf_d;
      end
    end
  end

endmodule
