// mplus1_gen - 4-bit (M+1)-sequence generator: an M-sequence generator
// extended so that its state graph is a single cycle through all 16 states.
//
// The M-sequence register (x^4 + x + 1, q1* = q4, q2* = q1 + q4, q3* = q2,
// q4* = q3) never enters the all-zeros state. A NOR gate watches q2, q3 and
// q4; its output z is added into the q2 stage:
//   q1* = q4, q2* = q1 + q4 + z, q3* = q2, q4* = q3,
//   z = 1 when q2q3q4 = 000, else 0.
// From 1000 the extra term steers the register into 0000 instead of 0100;
// in 0000 z is still 1, so the next state is 0100 and the main cycle
// continues. The equations follow the generator's schematic (the last
// equation is q4* = q3, with no gate in front of q4).
//
// Interface and timing (this design's own choices):
//   rst_n  asynchronous active-low reset to RESET_STATE
//   load   synchronous load of seed (priority over en)
//   en     advance one state per rising clock edge
//   q      state, q[1] = q1 (leftmost)
//   z      the NOR output, high in the two states 1000 and 0000
module mplus1_gen
  import prng_pkg::*;
#(
  parameter state_t RESET_STATE = 4'b1000
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   load,
  input  state_t seed,
  output state_t q,
  output logic   z
);

  assign z = ~(q[2] | q[3] | q[4]);

  galois_core #(.N(N), .RESET_STATE(RESET_STATE)) u_core (
    .clk, .rst_n, .en, .load, .seed,
    .a ({1'b1, 1'b0, 1'b0}),
    .c ({1'b0, z, 1'b0, 1'b0}),
    .q
  );

endmodule
