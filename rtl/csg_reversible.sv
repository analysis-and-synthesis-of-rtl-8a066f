// csg_reversible: reversible code sequence generator.
//
// A 6-bit nonlinear-feedback shift register that steps through the 7-state
// code cycle 27 -> 55 -> 46 -> 29 -> 59 -> 54 -> 45 -> 27 (decimal, Q5 the
// MSB) when s = 01 and through the same cycle backwards when s = 10. The
// cycle comes from the polynomial x^5 + x^4 + x^2 + x + 1 of the source
// design; six bits are the fewest for which no code repeats in it.
//
// How it works. The state sits in an 8-bit bidirectional shift register
// (shift_reg_74198). Shifting right, the new bit enters QA and the state is
// the window QA..QF; shifting left, the new bit enters QH and the state is
// the window QC..QH. Two quad 2-to-1 multiplexers (mux_74157) steered by s[1]
// present the window of the current direction as q = Q[5:0]. The feedback
// bits are computed from q: SRSI (srsi_excitation) feeds the right shift and
// SLSI (slsi_excitation) the left shift, so forward N+ = 2N + SRSI (mod 64)
// and backward N+ = N/2 + 32*SLSI.
//
// Interface and timing. c is the clock; the register acts on its rising
// edge. s = 01 steps forward, s = 10 steps backward, s = 11 loads d[7:0]
// into QA..QH, s = 00 holds. load is the active-low asynchronous clear of
// the register (the source schematic names this pin Load). q follows the
// register one clock after an edge and follows s[1] combinationally: when
// s changes from 01 to 10 the output at once shows the left window, which
// holds the state two forward steps back; one left step later the output
// is the predecessor of that state, and so on backwards.
//
// The register, multiplexers, NAND feedback gates and their wiring follow
// the source schematic. The 74157 enables are tied active, and the output
// port is q (Q[5..0] there). The feedback functions as given do not make
// every state lead into the main cycle: the 11 states 21, 23, 31, 42, 43,
// 47, 53, 58, 61, 62, 63 form a second closed cycle in either direction.
module csg_reversible
  import csg_pkg::*;
(
  input  logic       c,
  input  logic       load,
  input  logic [1:0] s,
  input  logic [7:0] d,
  output logic [5:0] q
);

  logic [REG_WIDTH-1:0] rg_q;  // QA..QH
  logic                 srsi;
  logic                 slsi;
  logic [3:0]           y_lo;  // Q[3:0]
  logic [3:0]           y_hi;  // Y1, Y2 = Q[5:4]; Y3, Y4 unused

  shift_reg_74198 #(.WIDTH(REG_WIDTH)) u_rg (
    .clk   (c),
    .clr_n (load),
    .mode  (mode_e'(s)),
    .srsi  (srsi),
    .slsi  (slsi),
    .d     (d),
    .q     (rg_q)
  );

  // First multiplexer: A = QA..QD, B = QC..QF.
  mux_74157 #(.WIDTH(4)) u_mux_lo (
    .sel (s[1]),
    .g_n (1'b0),
    .a   (rg_q[3:0]),
    .b   (rg_q[5:2]),
    .y   (y_lo)
  );

  // Second multiplexer: A1,A2 = QE,QF, B1,B2 = QG,QH; channels 3 and 4 idle.
  mux_74157 #(.WIDTH(4)) u_mux_hi (
    .sel (s[1]),
    .g_n (1'b0),
    .a   ({2'b00, rg_q[5:4]}),
    .b   ({2'b00, rg_q[7:6]}),
    .y   (y_hi)
  );

  assign q = {y_hi[1:0], y_lo};

  srsi_excitation u_srsi (
    .q    (q),
    .srsi (srsi)
  );

  slsi_excitation u_slsi (
    .q    (q),
    .slsi (slsi)
  );

endmodule
