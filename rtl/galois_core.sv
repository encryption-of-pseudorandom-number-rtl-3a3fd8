// galois_core - programmable N-bit Galois shift register, the basic
// generator on which every other generator of this design is built.
//
// Next-state equations (addition modulo 2):
//   q1* = qN + c1
//   qj* = q(j-1) + a(j-1)*qN + cj,    j = 2..N
// The coefficients a1..a(N-1) select the characteristic polynomial
// x^N + a(N-1)x^(N-1) + ... + a1 x + 1, and the control inputs c1..cN add
// constants (or, in the locked generators, nonlinear terms) to each stage.
// These equations are taken from the generator description; the width N is a
// parameter (4 in every generator of the design).
//
// Interface and timing (this design's own choices, the source describes only
// the combinational next-state function):
//   rst_n  asynchronous active-low reset to RESET_STATE
//   load   synchronous load of seed, takes priority over en
//   en     advance one state per rising clock edge
//   q      current state, q[1] = q1 (leftmost)
module galois_core #(
  parameter int unsigned  N           = 4,
  parameter logic [1:N]   RESET_STATE = {1'b1, {(N-1){1'b0}}}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [1:N]   seed,
  input  logic [1:N-1] a,
  input  logic [1:N]   c,
  output logic [1:N]   q
);

  logic [1:N] q_next;

  always_comb begin
    q_next[1] = q[N] ^ c[1];
    for (int j = 2; j <= N; j++)
      q_next[j] = q[j-1] ^ (a[j-1] & q[N]) ^ c[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= RESET_STATE;
    else if (load)  q <= seed;
    else if (en)    q <= q_next;
  end

endmodule
