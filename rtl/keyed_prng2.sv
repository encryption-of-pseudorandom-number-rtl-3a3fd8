// keyed_prng2 - 4-bit generator locked by a two-bit key k1k0.
//
// One circuit holds four generators; the key selects which one runs:
//   k1k0 = 00  M-sequence, x^4 + x + 1           cycles 15, 1
//   k1k0 = 01  x^4 + x^2 + x + 1, no constants   cycles 7, 7, 1, 1
//   k1k0 = 10  (M+1)-sequence                    one cycle of 16
//   k1k0 = 11  (M-1)-sequence                    cycles 14, 2
// Gate structure, read from the generator's schematic:
//   f   = q4 + k0*k1           feedback line (XOR after q4, AND of both keys)
//   z   = NOR(q2, q3, q4)      zero detector
//   q1* = f
//   q2* = q1 + f + k1*~k0*z    (three-input AND with k0 inverted)
//   q3* = q2 + k0*f
//   q4* = q3
// With 11 the feedback is inverted, which adds the constant 1 to stages 1..3
// and the k0*f term adds the q4 tap into stage 3: the (M-1) generator.
// With 10 the z term turns the M-sequence register into the (M+1) one.
//
// Interface and timing (this design's own choices):
//   k      key k1k0, static while the generator runs
//   rst_n  asynchronous active-low reset to RESET_STATE
//   load   synchronous load of seed (priority over en)
//   en     advance one state per rising clock edge
//   q      state, q[1] = q1 (leftmost)
module keyed_prng2
  import prng_pkg::*;
#(
  parameter state_t RESET_STATE = 4'b1000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       load,
  input  state_t     seed,
  input  logic [1:0] k,
  output state_t     q
);

  logic   f, z;
  state_t q_next;

  always_comb begin
    f         = q[4] ^ (k[0] & k[1]);
    z         = ~(q[2] | q[3] | q[4]);
    q_next[1] = f;
    q_next[2] = q[1] ^ f ^ (k[1] & ~k[0] & z);
    q_next[3] = q[2] ^ (k[0] & f);
    q_next[4] = q[3];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= RESET_STATE;
    else if (load)  q <= seed;
    else if (en)    q <= q_next;
  end

endmodule
