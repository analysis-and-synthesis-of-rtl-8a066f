// slsi_excitation: feedback function of the backward (shift left) direction.
//
// SLSI = ~Q0 | ~Q1 | (Q4 & ~Q5), the bit that enters Q5 on a left shift, so
// that the next state is (N >> 1) + 32*SLSI. It is the forward function
// SRSI with bit i replaced by bit 5-i: reading the state mirrored turns the
// backward step into the forward one, which is why the generator runs the
// same cycle both ways. Built, as in the source design, from NAND logic:
//   n5   = NOT Q5
//   n4   = NAND(Q4, n5)
//   SLSI = NAND(Q0, Q1, n4)
// Combinational; the input is the 6-bit generator state Q[5:0].
module slsi_excitation (
  input  logic [5:0] q,
  output logic       slsi
);

  logic q5_n;   // inverter
  logic nand2;  // two-input NAND

  always_comb begin
    q5_n  = ~q[5];
    nand2 = ~(q[4] & q5_n);
    slsi  = ~(q[0] & q[1] & nand2);
  end

endmodule
