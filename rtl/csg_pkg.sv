// csg_pkg: shared types and constants of the reversible code sequence
// generator.
//
// The generator is a nonlinear-feedback shift register whose 6-bit state runs
// through the 7-state cycle 27 -> 55 -> 46 -> 29 -> 59 -> 54 -> 45 -> 27 in the
// forward direction and through the same cycle in reverse in the backward
// direction. The mode encoding below is the S[1..0] control of the register
// (the standard 74198 mode table: 01 shift right, 10 shift left, 11 parallel
// load, 00 hold). The cycle states are the source design's; the names are this
// design's own.
package csg_pkg;

  // {S1,S0} of the bidirectional shift register.
  typedef enum logic [1:0] {
    MODE_HOLD  = 2'b00,
    MODE_RIGHT = 2'b01,  // forward: new bit enters Q0, N+ = 2N + x (mod 64)
    MODE_LEFT  = 2'b10,  // backward: new bit enters the top of the window
    MODE_LOAD  = 2'b11
  } mode_e;

  localparam int unsigned REG_WIDTH   = 8;  // length of the shift register
  localparam int unsigned STATE_WIDTH = 6;  // generator state bits
  localparam int unsigned CYCLE_LEN   = 7;  // length of the main cycle

  // Main cycle in forward order, as decimal state values (Q5 is the MSB).
  localparam logic [STATE_WIDTH-1:0] MAIN_CYCLE [CYCLE_LEN] =
    '{6'd27, 6'd55, 6'd46, 6'd29, 6'd59, 6'd54, 6'd45};

endpackage
