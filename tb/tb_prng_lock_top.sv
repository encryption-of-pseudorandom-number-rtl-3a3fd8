// tb_prng_lock_top - end-to-end testbench of the whole design at its default
// parameters.
//
// Scenario:
//  1. Before the key table is locked the locked generator sees the all-zeros
//     key and only rotates its state; checked against a rotation.
//  2. The table is filled: the correct primary key 0x0A5 maps to generator
//     key 010001101 (the (M+1)-sequence), 31 other primary keys map to
//     random generator keys. The table is locked; a later overwrite of the
//     correct entry must be ignored.
//  3. With the correct primary key the generator must run the published
//     16-state (M+1) sequence from 0000; with every other programmed primary
//     key the generator is compared, clock by clock, with a reference model
//     of the 9-key circuit written here, and the run counts how often a wrong
//     key gives a sequence different from the correct one.
//  4. The 2-key generator is switched through all four modes and the return
//     period from 1000 is measured (15, 7, 16, 14) while every step is
//     compared with the generator the mode selects.
//  5. The four fixed generators run together from 1000 for 48 clocks,
//     checked every clock, and their periods (15, 14, 12, 16) are measured.
// Mechanisms counted (each must occur): table writes, lock, a write refused
// after lock, unlocked rotation, correct-key sequence, wrong-key divergence,
// za injection, zb injection, each of the four 2-key modes, load, hold.
module tb_prng_lock_top;
  import prng_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       kt_prog_we = 1'b0;
  key_t       kt_prog_addr = '0;
  key_t       kt_prog_data = '0;
  logic       kt_lock_req = 1'b0;
  logic       kt_locked;
  key_t       primary_key = '0;
  logic       enc_en = 1'b0;
  logic       enc_load = 1'b0;
  state_t     enc_seed = '0;
  state_t     enc_q;
  logic       enc_za, enc_zb;
  logic [1:0] k2_key = 2'b00;
  logic       k2_en = 1'b0;
  logic       k2_load = 1'b0;
  state_t     k2_seed = '0;
  state_t     k2_q;
  logic       fx_en = 1'b0;
  logic       fx_load = 1'b0;
  state_t     fx_seed = '0;
  state_t     mseq_q, mminus1_q, mminus3_q, mplus1_q;
  logic       mplus1_z;

  int checks = 0;
  int failures = 0;

  localparam key_t GOOD_PK  = 9'h0A5;
  localparam key_t GOOD_KEY = 9'b010001101;
  localparam int   NWRONG   = 31;

  state_t fig_seq [16] = '{4'b0000, 4'b0110, 4'b0001, 4'b1111, 4'b1000, 4'b0010,
                           4'b0011, 4'b1110, 4'b0101, 4'b1101, 4'b1001, 4'b1011,
                           4'b1010, 4'b0111, 4'b1100, 4'b0100};

  // mechanism counters
  int n_write, n_lock, n_refused, n_rotate, n_good_seq, n_diverge;
  int n_za_inj, n_zb_inj, n_load, n_hold;
  int n_mode [4];

  prng_lock_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // ---- reference models ----
  function automatic state_t enc_ref(input key_t k, input state_t s);
    logic na, nb;
    na = ~(s[2] | s[3] | s[4]);
    nb = ~(s[1] | s[2] | s[4]);
    return {s[4] ^ k[5],
            s[1] ^ (k[0] & s[4]) ^ k[6] ^ (k[3] & na),
            s[2] ^ (k[1] & s[4]) ^ k[7],
            s[3] ^ (k[2] & s[4]) ^ k[8] ^ (k[4] & nb)};
  endfunction

  function automatic state_t k2_ref(input logic [1:0] k, input state_t s);
    logic z;
    z = ~(s[2] | s[3] | s[4]);
    case (k)
      2'b00:   return {s[4], s[1] ^ s[4], s[2], s[3]};
      2'b01:   return {s[4], s[1] ^ s[4], s[2] ^ s[4], s[3]};
      2'b10:   return {s[4], s[1] ^ s[4] ^ z, s[2], s[3]};
      default: return {~s[4], ~(s[1] ^ s[4]), ~(s[2] ^ s[4]), s[3]};
    endcase
  endfunction

  function automatic state_t mseq_ref(input state_t s);
    return {s[4], s[1] ^ s[4], s[2], s[3]};
  endfunction
  function automatic state_t mm1_ref(input state_t s);
    return {~s[4], ~(s[1] ^ s[4]), ~(s[2] ^ s[4]), s[3]};
  endfunction
  function automatic state_t mm3_ref(input state_t s);
    return {~s[4], ~(s[1] ^ s[4]), s[2], ~(s[3] ^ s[4])};
  endfunction
  function automatic state_t mp1_ref(input state_t s);
    return {s[4], s[1] ^ s[4] ^ ~(s[2] | s[3] | s[4]), s[2], s[3]};
  endfunction

  // ---- drivers ----
  task automatic kt_write(input key_t a, input key_t d);
    kt_prog_we = 1'b1; kt_prog_addr = a; kt_prog_data = d;
    @(negedge clk);
    kt_prog_we = 1'b0;
  endtask

  task automatic enc_load_state(input state_t s);
    enc_seed = s; enc_load = 1'b1;
    @(negedge clk);
    enc_load = 1'b0;
    n_load++;
  endtask

  // Step the locked generator once and compare with the model for key k.
  task automatic enc_step(input key_t k);
    state_t s, e;
    s = enc_q;
    e = enc_ref(k, s);
    if (k[3] && enc_za) n_za_inj++;
    if (k[4] && enc_zb) n_zb_inj++;
    enc_en = 1'b1;
    @(negedge clk);
    enc_en = 1'b0;
    check(enc_q == e, $sformatf("locked gen key %b: %b -> %b, expected %b", k, s, enc_q, e));
  endtask

  initial begin
    key_t   wrong_pk [NWRONG];
    key_t   wrong_key [NWRONG];
    state_t s, s0, fx_start;
    int     period;
    bit     differs;
    int     per [4];
    bit     ok;
    bit     used [key_t];

    n_write = 0; n_lock = 0; n_refused = 0; n_rotate = 0; n_good_seq = 0;
    n_diverge = 0; n_za_inj = 0; n_zb_inj = 0; n_load = 0; n_hold = 0;
    foreach (n_mode[i]) n_mode[i] = 0;

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!kt_locked, "table locked after reset");
    check(enc_q == 4'b1000 && k2_q == 4'b1000 && mseq_q == 4'b1000, "reset states");

    // 1. unlocked: all-zeros key, pure rotation
    primary_key = GOOD_PK;
    enc_load_state(4'b1101);
    for (int i = 0; i < 8; i++) begin
      s = enc_q;
      enc_en = 1'b1;
      @(negedge clk);
      enc_en = 1'b0;
      check(enc_q == {s[4], s[1], s[2], s[3]}, $sformatf("unlocked: %b -> %b, expected rotation", s, enc_q));
      n_rotate++;
    end

    // 2. fill and lock the key table
    kt_write(GOOD_PK, GOOD_KEY);
    n_write++;
    for (int i = 0; i < NWRONG; i++) begin
      do wrong_pk[i] = 9'($urandom); while (wrong_pk[i] == GOOD_PK || used.exists(wrong_pk[i]));
      used[wrong_pk[i]] = 1'b1;
      do wrong_key[i] = 9'($urandom); while (wrong_key[i] == GOOD_KEY);
      kt_write(wrong_pk[i], wrong_key[i]);
      n_write++;
    end
    kt_lock_req = 1'b1;
    @(negedge clk);
    kt_lock_req = 1'b0;
    check(kt_locked, "lock not taken");
    if (kt_locked) n_lock++;
    kt_write(GOOD_PK, ~GOOD_KEY);         // must be refused
    @(negedge clk);                        // key register follows the table

    // 3. correct primary key: the (M+1)-sequence
    enc_load_state(4'b0000);
    check(dut.gen_key == GOOD_KEY, $sformatf("transformed key %b, expected %b", dut.gen_key, GOOD_KEY));
    if (dut.gen_key == GOOD_KEY) n_refused++;
    begin
      ok = 1'b1;
      for (int i = 0; i < 16; i++) begin
        if (enc_q != fig_seq[i]) ok = 1'b0;
        check(enc_q == fig_seq[i], $sformatf("correct key, step %0d: %b, expected %b", i, enc_q, fig_seq[i]));
        enc_step(GOOD_KEY);
      end
      check(enc_q == 4'b0000, "correct key: sequence did not close after 16 clocks");
      if (ok) n_good_seq++;
    end

    // hold with enable low
    s = enc_q;
    repeat (3) @(negedge clk);
    check(enc_q == s, "locked generator moved with en low");
    n_hold++;

    // wrong primary keys
    for (int w = 0; w < NWRONG; w++) begin
      primary_key = wrong_pk[w];
      @(negedge clk);
      check(dut.gen_key == wrong_key[w], $sformatf("pk %h: transformed key %b, expected %b",
                                                   wrong_pk[w], dut.gen_key, wrong_key[w]));
      differs = 1'b0;
      for (int st = 0; st < 16; st++) begin
        enc_load_state(4'(st));
        enc_step(wrong_key[w]);
        if (enc_q != enc_ref(GOOD_KEY, 4'(st))) differs = 1'b1;
      end
      if (differs) n_diverge++;
    end
    // a second overwrite attempt, on a wrong-key entry
    primary_key = wrong_pk[0];
    kt_write(wrong_pk[0], ~wrong_key[0]);
    @(negedge clk);
    check(dut.gen_key == wrong_key[0], "entry changed after lock");
    if (dut.gen_key == wrong_key[0]) n_refused++;

    // 4. 2-key generator: all four modes
    for (int m = 0; m < 4; m++) begin
      k2_key = 2'(m);
      k2_seed = 4'b1000; k2_load = 1'b1;
      @(negedge clk);
      k2_load = 1'b0;
      n_load++;
      s0 = k2_q;
      period = 0;
      do begin
        s = k2_q;
        k2_en = 1'b1;
        @(negedge clk);
        k2_en = 1'b0;
        period++;
        check(k2_q == k2_ref(k2_key, s), $sformatf("2-key gen mode %0d: %b -> %b", m, s, k2_q));
      end while (k2_q != s0 && period < 20);
      per[m] = period;
      n_mode[m]++;
    end
    check(per[0] == 15 && per[1] == 7 && per[2] == 16 && per[3] == 14,
          $sformatf("2-key gen periods %0d %0d %0d %0d, expected 15 7 16 14",
                    per[0], per[1], per[2], per[3]));

    // 5. fixed generators
    fx_seed = 4'b1000; fx_load = 1'b1;
    @(negedge clk);
    fx_load = 1'b0;
    n_load++;
    fx_start = mseq_q;
    foreach (per[i]) per[i] = 0;
    for (int t = 1; t <= 48; t++) begin
      state_t a, b, c, d;
      a = mseq_q; b = mminus1_q; c = mminus3_q; d = mplus1_q;
      fx_en = 1'b1;
      @(negedge clk);
      fx_en = 1'b0;
      check(mseq_q == mseq_ref(a) && mminus1_q == mm1_ref(b) &&
            mminus3_q == mm3_ref(c) && mplus1_q == mp1_ref(d), $sformatf("fixed generators, clock %0d", t));
      if (per[0] == 0 && mseq_q    == fx_start) per[0] = t;
      if (per[1] == 0 && mminus1_q == fx_start) per[1] = t;
      if (per[2] == 0 && mminus3_q == fx_start) per[2] = t;
      if (per[3] == 0 && mplus1_q  == fx_start) per[3] = t;
    end
    check(per[0] == 15 && per[1] == 14 && per[2] == 12 && per[3] == 16,
          $sformatf("fixed generator periods %0d %0d %0d %0d, expected 15 14 12 16",
                    per[0], per[1], per[2], per[3]));

    // zb injection: run a key from the table that switches k4 in, if any;
    // otherwise drive a fresh table after reset.
    if (n_zb_inj == 0) begin
      rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      kt_write(9'h001, 9'b000010000);    // k4 only: zb into stage 4
      n_write++;
      kt_lock_req = 1'b1;
      @(negedge clk);
      kt_lock_req = 1'b0;
      primary_key = 9'h001;
      @(negedge clk);
      enc_load_state(4'b0010);             // q1 = q2 = q4 = 0: zb high
      for (int i = 0; i < 4; i++) enc_step(9'b000010000);
    end

    $display("mechanisms: writes %0d lock %0d refused %0d rotate %0d good_seq %0d diverge %0d/%0d",
             n_write, n_lock, n_refused, n_rotate, n_good_seq, n_diverge, NWRONG);
    $display("            za_inj %0d zb_inj %0d modes %0d %0d %0d %0d load %0d hold %0d",
             n_za_inj, n_zb_inj, n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_load, n_hold);
    check(n_write > 0,   "no table write");
    check(n_lock > 0,    "no lock");
    check(n_refused > 0, "no refused write");
    check(n_rotate > 0,  "no unlocked rotation");
    check(n_good_seq > 0, "correct-key sequence never matched");
    check(n_diverge == NWRONG, "a wrong key reproduced the correct generator");
    check(n_za_inj > 0,  "za never injected");
    check(n_zb_inj > 0,  "zb never injected");
    foreach (n_mode[i]) check(n_mode[i] > 0, $sformatf("2-key mode %0d never ran", i));
    check(n_load > 0,    "no load");
    check(n_hold > 0,    "no hold");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
