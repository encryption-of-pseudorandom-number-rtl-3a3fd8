// mseq_gen - 4-bit M-sequence generator (Galois form, x^4 + x + 1).
//
// Next state: q1* = q4, q2* = q1 + q4, q3* = q2, q4* = q3. The polynomial is
// primitive, so the state graph is one cycle of the 15 nonzero states plus
// the all-zeros state, which maps to itself (graph 15-1).
//
// Built on galois_core with fixed coefficients a1a2a3 = 3'b100 and fixed
// constants c1c2c3c4 = 4'b0000. The equations, the polynomial and the cycle
// structure are those of the source generator; the ports around it are this
// design's own.
//
// Interface and timing:
//   rst_n  asynchronous active-low reset to RESET_STATE (default 1000, a
//          state on the long cycle)
//   load   synchronous load of seed (priority over en)
//   en     advance one state per rising clock edge
//   q      state, q[1] = q1 (leftmost)
module mseq_gen
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
    .a (3'b100),
    .c (4'b0000),
    .q
  );

endmodule
