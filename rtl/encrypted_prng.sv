// encrypted_prng - 4-bit generator locked by a 9-bit key k8..k0.
//
// A Galois register whose every coefficient and constant is a key bit:
//   q1* = q4 + k5
//   q2* = q1 + k0*q4 + k6 + k3*za
//   q3* = q2 + k1*q4 + k7
//   q4* = q3 + k2*q4 + k8 + k4*zb
//   za  = NOR(q2, q3, q4),  zb = NOR(q1, q2, q4)
// k0..k2 pick the characteristic polynomial x^4 + a3x^3 + a2x^2 + a1x + 1,
// k5..k8 are the control inputs c1..c4, and k3, k4 switch in two zero
// detectors that make the register nonlinear. Of the 512 keys, 32 give an
// M-sequence generator (graph 15-1), 16 an (M-1)-sequence generator (14-2)
// and 8 an (M-3)-sequence generator (12-4); 32 keys give a single cycle of
// all 16 states. Key 010001101 gives the (M+1)-sequence
// 0000 0110 0001 1111 1000 0010 0011 1110 0101 1101 1001 1011 1010 0111
// 1100 0100, in which za fires twice (in 0000 and in 1000).
// The equations and gate structure follow the generator's schematic; which
// NOR output drives which key gate is this design's reading of it (see
// prng_pkg). The linear part is galois_core.
//
// Interface and timing (this design's own choices):
//   key    k[8:0], static while the generator runs
//   rst_n  asynchronous active-low reset to RESET_STATE
//   load   synchronous load of seed (priority over en)
//   en     advance one state per rising clock edge
//   q      state, q[1] = q1 (leftmost)
//   za,zb  zero-detector outputs (before key gating)
module encrypted_prng
  import prng_pkg::*;
#(
  parameter state_t RESET_STATE = 4'b1000
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   load,
  input  state_t seed,
  input  key_t   key,
  output state_t q,
  output logic   za,
  output logic   zb
);

  obf_ctrl_t ctl;
  logic [1:N] c_eff;

  always_comb begin
    ctl      = decode_key(key);
    za       = ~(q[2] | q[3] | q[4]);
    zb       = ~(q[1] | q[2] | q[4]);
    c_eff    = ctl.c;
    c_eff[2] = ctl.c[2] ^ (ctl.za_en & za);
    c_eff[4] = ctl.c[4] ^ (ctl.zb_en & zb);
  end

  galois_core #(.N(N), .RESET_STATE(RESET_STATE)) u_core (
    .clk, .rst_n, .en, .load, .seed,
    .a (ctl.a),
    .c (c_eff),
    .q
  );

endmodule
