// shift_reg_74198: bidirectional ("reversible") shift register with parallel
// load and asynchronous clear, the function of the TTL 74198 that holds the
// generator state.
//
// Bit q[0] is output QA and q[WIDTH-1] is QH. On each rising clk edge the
// register does what mode = {S1,S0} asks:
//   00  hold
//   01  shift right: q[0] <= srsi, q[i] <= q[i-1]   (QA -> QB -> ... -> QH)
//   10  shift left:  q[WIDTH-1] <= slsi, q[i] <= q[i+1]
//   11  parallel load: q <= d
// clr_n low clears q at once, whatever the clock does. The outputs are the
// flip-flops, so q changes only at a clock edge or on clear.
//
// The length of eight and the use of the 74198 follow the source design; the
// mode table is the standard one of that part, since the design takes the
// part as given.
module shift_reg_74198
  import csg_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             clr_n,
  input  mode_e            mode,
  input  logic             srsi,
  input  logic             slsi,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) begin
      q <= '0;
    end else begin
      unique case (mode)
        MODE_HOLD:  q <= q;
        MODE_RIGHT: q <= {q[WIDTH-2:0], srsi};
        MODE_LEFT:  q <= {slsi, q[WIDTH-1:1]};
        MODE_LOAD:  q <= d;
      endcase
    end
  end

endmodule
