// linc_fpd_ctrl: the FIFO / programmable-delay controller of LINC.
//
// Every FPD is set by its byte of the d-code register to be a programmable
// delay or one 4-bit column of the A- or B-FIFO. This controller holds the
// shared state and drives each FPD's write enable, addresses and bypass:
//   - delay pointer dptr, advanced every running cycle; a delay FPD with count
//     d writes at dptr and reads at dptr - d (d = 0: bypass). While the chip is
//     halted the delays freeze.
//   - for each FIFO a head pointer and a length (0..31). A write request
//     (waf/wbf) stores the FIFO's columns at head + length; a read request
//     (raf/rbf) advances the head, the head entry being what the FIFO's FPDs
//     show the crossbar in that cycle. FIFOs keep working while the chip is
//     halted. A write to a full or a read from an empty FIFO is ignored.
//   - status: almost full (at most two free slots, length >= 29) and almost
//     empty (at most two items, length <= 2), valid two cycles after the
//     request cycle: the length updates at the end of the request cycle and
//     the flags are registered once more.
// When a new d-code is loaded (dc_load), each FIFO's head is cleared and its
// length taken from the count field of its lowest-numbered member in the new
// d-code (software writes zero there to create an empty FIFO). The live
// lengths are given out for reading back the d-code.
//
// The roles, delay range, FIFO depth, almost-full/empty thresholds and
// two-cycle status timing follow the specification; the pointer scheme is
// this design's own. rst is synchronous.
module linc_fpd_ctrl #(
  parameter int unsigned NPORT  = 8,
  parameter int unsigned AW     = 5,
  parameter int unsigned ALMOST = 2
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     run,
  input  linc_pkg::dfield_t [NPORT-1:0]      dcode,     // current d-code register
  input  logic                     dc_load,   // d-code register loads dc_new now
  input  linc_pkg::dfield_t [NPORT-1:0]      dc_new,
  input  logic                     waf, wbf,  // write requests
  input  logic                     raf, rbf,  // read requests
  output logic [NPORT-1:0]         we,
  output logic [NPORT-1:0][AW-1:0] waddr,
  output logic [NPORT-1:0][AW-1:0] raddr,
  output logic [NPORT-1:0]         bypass,
  output logic                     aff, afe,  // A-FIFO almost full / almost empty
  output logic                     bff, bfe,
  output logic [AW-1:0]            len_a,     // live FIFO lengths
  output logic [AW-1:0]            len_b
);

  localparam int unsigned DEPTH = 2**AW - 1;

  logic [AW-1:0] dptr;
  logic [AW-1:0] head_a, head_b;
  logic          wa_ok, ra_ok, wb_ok, rb_ok;

  assign wa_ok = waf && (32'(len_a) < DEPTH);
  assign ra_ok = raf && (len_a != '0);
  assign wb_ok = wbf && (32'(len_b) < DEPTH);
  assign rb_ok = rbf && (len_b != '0);

  // Length of each FIFO in a freshly loaded d-code.
  function automatic logic [AW-1:0] first_count(linc_pkg::dfield_t [NPORT-1:0] d, linc_pkg::fpd_mode_e m);
    logic [AW-1:0] c = '0;
    for (int i = NPORT - 1; i >= 0; i--) begin
      if (d[i].mode == m) c = AW'(d[i].count);
    end
    return c;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      dptr   <= '0;
      head_a <= '0;
      head_b <= '0;
      len_a  <= '0;
      len_b  <= '0;
    end else begin
      if (run) dptr <= dptr + 1'b1;
      if (dc_load) begin
        head_a <= '0;
        head_b <= '0;
        len_a  <= first_count(dc_new, linc_pkg::FPD_FIFO_A);
        len_b  <= first_count(dc_new, linc_pkg::FPD_FIFO_B);
      end else begin
        head_a <= head_a + AW'(ra_ok);
        head_b <= head_b + AW'(rb_ok);
        len_a  <= len_a + AW'(wa_ok) - AW'(ra_ok);
        len_b  <= len_b + AW'(wb_ok) - AW'(rb_ok);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      aff <= 1'b0;
      afe <= 1'b1;
      bff <= 1'b0;
      bfe <= 1'b1;
    end else begin
      aff <= 32'(len_a) >= DEPTH - ALMOST;
      afe <= 32'(len_a) <= ALMOST;
      bff <= 32'(len_b) >= DEPTH - ALMOST;
      bfe <= 32'(len_b) <= ALMOST;
    end
  end

  always_comb begin
    for (int i = 0; i < NPORT; i++) begin
      unique case (dcode[i].mode)
        linc_pkg::FPD_FIFO_A: begin
          we[i]     = wa_ok;
          waddr[i]  = head_a + len_a;
          raddr[i]  = head_a;
          bypass[i] = 1'b0;
        end
        linc_pkg::FPD_FIFO_B: begin
          we[i]     = wb_ok;
          waddr[i]  = head_b + len_b;
          raddr[i]  = head_b;
          bypass[i] = 1'b0;
        end
        default: begin
          we[i]     = run;
          waddr[i]  = dptr;
          raddr[i]  = dptr - AW'(dcode[i].count);
          bypass[i] = dcode[i].count == '0;
        end
      endcase
    end
  end

endmodule
