// prng_pkg - shared types and constants of the key-locked shift-register
// generators.
//
// Every generator in this design is a 4-bit Galois shift register whose state
// bits are numbered q1..q4. The state is carried as a packed vector with
// range [1:N], so q[1] is the leftmost (most significant) bit and a state
// printed with %b reads q1 q2 q3 q4, the order used in the state-transition
// listings of the generators.
//
// The 9-bit key of the encrypted generator is k[8:0] (k8 leftmost). Its bit
// assignment follows the encrypted-generator schematic:
//   k0,k1,k2 -> feedback coefficients a1,a2,a3 (AND gates on the q4 tap)
//   k5,k6,k7,k8 -> constant inputs c1..c4 of the four XOR stages
//   k3 -> gates the zero-detect z_a = NOR(q2,q3,q4) into the q2 stage
//   k4 -> gates the zero-detect z_b = NOR(q1,q2,q4) into the q4 stage
// The routing of the two NOR outputs to the k3 and k4 gates is this design's
// reading of the schematic; it reproduces the published state graph for key
// 010001101 and the published count of generator variants.
package prng_pkg;

  localparam int unsigned N     = 4;  // generator width (bits)
  localparam int unsigned KEY_W = 9;  // key inputs of the encrypted generator

  typedef logic [1:N]       state_t;
  typedef logic [KEY_W-1:0] key_t;

  // Modes of the two-key locked generator, indexed by k1k0.
  typedef enum logic [1:0] {
    MODE_M_SEQ      = 2'b00,  // 15 + 1     : M-sequence, x^4+x+1
    MODE_TWO_SEVENS = 2'b01,  // 7,7,1,1    : x^4+x^2+x+1 without constants
    MODE_M_PLUS_1   = 2'b10,  // 16         : (M+1)-sequence
    MODE_M_MINUS_1  = 2'b11   // 14 + 2     : (M-1)-sequence
  } mode2_e;

  // Control signals of the programmable Galois generator, decoded from a key.
  typedef struct packed {
    logic [1:N-1] a;     // feedback coefficients a1..a(N-1)
    logic [1:N]   c;     // constant (control) inputs c1..cN
    logic         za_en; // inject NOR(q2,q3,q4) into stage 2
    logic         zb_en; // inject NOR(q1,q2,q4) into stage 4
  } obf_ctrl_t;

  function automatic obf_ctrl_t decode_key(input key_t k);
    obf_ctrl_t d;
    d.a     = {k[0], k[1], k[2]};
    d.c     = {k[5], k[6], k[7], k[8]};
    d.za_en = k[3];
    d.zb_en = k[4];
    return d;
  endfunction

endpackage
