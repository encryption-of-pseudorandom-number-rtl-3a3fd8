// prng_lock_top - key-locked pseudorandom number generators.
//
// Main design: a key transformation table in front of the 9-key locked
// generator. The chip's primary key indexes the table; the word it selects
// is the generator's 9-bit key. With the correct primary key the generator
// runs the intended sequence, with any other key it silently becomes one of
// the other 511 generators the circuit can form. Until the table is locked
// the transformed key is all-zeros, and the generator then only rotates its
// state (q1* = q4, qj* = q(j-1)).
//
// Beside it, with their own ports, stand the smaller generators the locked
// circuits are made from: the two-key locked generator and the four fixed
// generators (M, M-1, M-3 and M+1 sequences). They share clock and reset,
// and the four fixed ones share one enable, load and seed.
//
// Timing: after lock_req, locked rises on the next clock edge; the
// transformed key follows the primary key one clock later, so the locked
// generator's key is valid two clocks after the primary key is applied to a
// freshly locked table. All generators advance once per clock while their
// enable is high; load has priority over enable.
module prng_lock_top
  import prng_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,

  // key transformation table
  input  logic   kt_prog_we,
  input  key_t   kt_prog_addr,
  input  key_t   kt_prog_data,
  input  logic   kt_lock_req,
  output logic   kt_locked,
  input  key_t   primary_key,

  // 9-key locked generator
  input  logic   enc_en,
  input  logic   enc_load,
  input  state_t enc_seed,
  output state_t enc_q,
  output logic   enc_za,
  output logic   enc_zb,

  // 2-key locked generator
  input  logic [1:0] k2_key,
  input  logic   k2_en,
  input  logic   k2_load,
  input  state_t k2_seed,
  output state_t k2_q,

  // fixed generators
  input  logic   fx_en,
  input  logic   fx_load,
  input  state_t fx_seed,
  output state_t mseq_q,
  output state_t mminus1_q,
  output state_t mminus3_q,
  output state_t mplus1_q,
  output logic   mplus1_z
);

  key_t gen_key;

  key_transform #(.PK_W(KEY_W), .TK_W(KEY_W)) u_key_transform (
    .clk, .rst_n,
    .prog_we         (kt_prog_we),
    .prog_addr       (kt_prog_addr),
    .prog_data       (kt_prog_data),
    .lock_req        (kt_lock_req),
    .locked          (kt_locked),
    .primary_key,
    .transformed_key (gen_key)
  );

  encrypted_prng u_encrypted_prng (
    .clk, .rst_n,
    .en   (enc_en),
    .load (enc_load),
    .seed (enc_seed),
    .key  (gen_key),
    .q    (enc_q),
    .za   (enc_za),
    .zb   (enc_zb)
  );

  keyed_prng2 u_keyed_prng2 (
    .clk, .rst_n,
    .en   (k2_en),
    .load (k2_load),
    .seed (k2_seed),
    .k    (k2_key),
    .q    (k2_q)
  );

  mseq_gen u_mseq_gen (
    .clk, .rst_n, .en(fx_en), .load(fx_load), .seed(fx_seed), .q(mseq_q)
  );

  mminus1_gen u_mminus1_gen (
    .clk, .rst_n, .en(fx_en), .load(fx_load), .seed(fx_seed), .q(mminus1_q)
  );

  mminus3_gen u_mminus3_gen (
    .clk, .rst_n, .en(fx_en), .load(fx_load), .seed(fx_seed), .q(mminus3_q)
  );

  mplus1_gen u_mplus1_gen (
    .clk, .rst_n, .en(fx_en), .load(fx_load), .seed(fx_seed), .q(mplus1_q), .z(mplus1_z)
  );

endmodule
