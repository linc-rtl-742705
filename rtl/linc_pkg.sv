// linc_pkg: types and constants shared by the LINC link and interconnection chip.
//
// LINC moves eight 4-bit data streams from its input ports, through a
// FIFO-or-programmable-delay (FPD) per input, an 8x8 crossbar and a pipeline
// register file (PRF) per output, to its output ports. A 64-bit control pattern,
// fetched every cycle from an on-chip memory, sets the crossbar and the PRFs; a
// 64-bit delay code (d-code) sets the FPDs.
//
// The port counts, widths, the 14-stage PRF, the 64-bit pattern with its 24-bit
// crossbar field, one shift bit and one 4-bit output select per PRF, the 32-word
// banks and the mode-control codes follow the LINC specification. The order of
// the fields inside the pattern and the d-code, and the numeric codes of the
// PRF output select, are this design's choice.
package linc_pkg;

  localparam int unsigned NPORT  = 8;   // data ports, FPDs, PRFs
  localparam int unsigned DW     = 4;   // width of one data port
  localparam int unsigned NSTAGE = 14;  // stages of one PRF
  localparam int unsigned CPW    = 64;  // control pattern / d-code width
  localparam int unsigned NPAT   = 32;  // patterns per memory bank
  localparam int unsigned PAW    = 5;   // pattern address width (CA[0-4])
  localparam int unsigned FAW    = 5;   // FPD address width: delays 0..31, FIFO depth 31

  // PRF output select: 0..13 read a stage, then the crossbar output, then off.
  localparam logic [3:0] OSEL_XBAR = 4'd14;
  localparam logic [3:0] OSEL_OFF  = 4'd15;

  typedef logic [DW-1:0] data_t;

  // One control pattern. Packed: osel in [63:32], shift in [31:24], xsel in [23:0].
  typedef struct packed {
    logic [NPORT-1:0][3:0] osel;   // PRF j output select
    logic [NPORT-1:0]      shift;  // PRF j shifts in its crossbar output
    logic [NPORT-1:0][2:0] xsel;   // crossbar output j takes input xsel[j]
  } cpat_t;

  // PRF part of a pattern, which travels one cycle further down the pipeline.
  typedef struct packed {
    logic [NPORT-1:0][3:0] osel;
    logic [NPORT-1:0]      shift;
  } prfctl_t;

  // FPD role, two bits of each d-code byte.
  typedef enum logic [1:0] {
    FPD_DELAY  = 2'b00,
    FPD_FIFO_A = 2'b01,
    FPD_FIFO_B = 2'b10,
    FPD_DELAY2 = 2'b11   // also a programmable delay
  } fpd_mode_e;

  // One d-code byte: bit 7 unused, [6:5] role, [4:0] delay length or FIFO length.
  typedef struct packed {
    logic          rsvd;
    fpd_mode_e     mode;
    logic [FAW-1:0] count;
  } dfield_t;

  typedef dfield_t [NPORT-1:0] dcode_t;

  // Mode-control codes on MC[3:0], active only with chip select.
  typedef enum logic [3:0] {
    MC_CC_SHIFT_IN  = 4'b0000,  // c-code in
    MC_CC_SHIFT_OUT = 4'b0001,  // c-code out
    MC_CC_TO_REG    = 4'b0010,  // shift register -> control pattern register
    MC_CC_FROM_REG  = 4'b0011,  // control pattern register -> shift register
    MC_CC_STORE     = 4'b0100,  // shift register -> loading bank, address post-increment
    MC_CC_READ      = 4'b0101,  // loading bank -> shift register, address post-increment
    MC_SWAP         = 4'b0110,  // swap working and loading bank
    MC_ADDR_RESET   = 4'b0111,  // loading address counter := 0
    MC_DC_SHIFT_IN  = 4'b1000,  // d-code in
    MC_DC_SHIFT_OUT = 4'b1001,  // d-code out
    MC_DC_LOAD      = 4'b1010,  // d-code shift register -> d-code register
    MC_DC_UNLOAD    = 4'b1011,  // d-code register -> d-code shift register
    MC_SCAN_IN      = 4'b1100,  // scan path shift in on CC[0]
    MC_SCAN_OUT     = 4'b1101,  // scan path rotate out on CC[0]
    MC_DC_LOAD_SWAP = 4'b1110,  // d-code load and bank swap together
    MC_NOP          = 4'b1111
  } mode_e;

  // Decoded loading/testing operations.
  typedef struct packed {
    logic cc_shift_in;
    logic cc_shift_out;
    logic cc_to_reg;
    logic cc_from_reg;
    logic cc_store;
    logic cc_read;
    logic swap;
    logic addr_reset;
    logic dc_shift_in;
    logic dc_shift_out;
    logic dc_load;
    logic dc_unload;
    logic scan_in;
    logic scan_out;
  } modeop_t;

  function automatic logic fpd_is_a(fpd_mode_e m);
    return m == FPD_FIFO_A;
  endfunction

  function automatic logic fpd_is_b(fpd_mode_e m);
    return m == FPD_FIFO_B;
  endfunction

endpackage
