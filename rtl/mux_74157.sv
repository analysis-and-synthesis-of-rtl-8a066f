// mux_74157: quad 2-to-1 multiplexer with common select and active-low
// enable, the function of the TTL 74157.
//
// y = b when sel is 1, y = a when sel is 0, and y = 0 while g_n is high.
// Purely combinational. In the generator two of these pick the six state
// bits out of the eight register bits: sel = S1 chooses between the window
// that forward shifting fills (QA..QF) and the one that backward shifting
// fills (QC..QH). The use of the 74157 follows the source design; its
// behaviour is the standard one of that part.
module mux_74157 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             sel,
  input  logic             g_n,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    if (g_n) y = '0;
    else     y = sel ? b : a;
  end

endmodule
