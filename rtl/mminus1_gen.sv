// mminus1_gen - 4-bit (M-1)-sequence generator.
//
// Galois register for x^4 + x^2 + x + 1 = (x + 1)(x^3 + x^2 + 1) with the
// constant 1 added to the first three stages:
//   q1* = q4 + 1, q2* = q1 + q4 + 1, q3* = q2 + q4 + 1, q4* = q3.
// The state graph is a 14-cycle and a 2-cycle (14-2). On the long cycle the
// modulo-2 sum of the four bits inverts on every clock.
//
// Built on galois_core with fixed coefficients a1a2a3 = 3'b110 and fixed
// constants c1c2c3c4 = 4'b1110. The equations, the polynomial and the cycle
// structure are those of the source generator; the ports around it are this
// design's own.
//
// Interface and timing:
//   rst_n  asynchronous active-low reset to RESET_STATE (default 1000, a
//          state on the long cycle)
//   load   synchronous load of seed (priority over en)
//   en     advance one state per rising clock edge
//   q      state, q[1] = q1 (leftmost)
module mminus1_gen
  import prng_pkg::*;
#(
  parameter state_t RESET_STATE = 4'b1000
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   load,
  input  state_t seed,
  output state_t q
);

  galois_core #(.N(N), .RESET_STATE(RESET_STATE)) u_core (
    .clk, .rst_n, .en, .load, .seed,
    .a (3'b110),
    .c (4'b1110),
    .q
  );

endmodule
