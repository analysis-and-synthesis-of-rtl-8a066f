// srsi_excitation: feedback function of the forward (shift right) direction.
//
// SRSI = ~Q5 | ~Q4 | (Q1 & ~Q0), the bit that enters Q0 on a right shift, so
// that the next state is N+ = 2N + SRSI (mod 64). It is found from a
// Karnaugh map in which each state of the 7-state cycle 27, 55, 46, 29, 59,
// 54, 45 carries the low bit of its successor, all other states being don't
// cares. Built as the source design draws it, in NAND logic only:
//   n0   = NOT Q0
//   n1   = NAND(Q1, n0)
//   SRSI = NAND(Q5, Q4, n1)
// Combinational; the input is the 6-bit generator state Q[5:0].
module srsi_excitation (
  input  logic [5:0] q,
  output logic       srsi
);

  logic q0_n;   // inverter
  logic nand2;  // two-input NAND

  always_comb begin
    q0_n  = ~q[0];
    nand2 = ~(q[1] & q0_n);
    srsi  = ~(q[5] & q[4] & nand2);
  end

endmodule
