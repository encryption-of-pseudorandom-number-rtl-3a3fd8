// tb_encrypted_prng - self-checking testbench for the generator locked by a
// 9-bit key; it sweeps the whole key space.
//
// For every key k8..k0 (512 keys) it loads each of the 16 states, clocks once
// and compares with the locked generator's equations written out here
// (q1* = q4 + k5, q2* = q1 + k0 q4 + k6 + k3 NOR(q2,q3,q4),
// q3* = q2 + k1 q4 + k7, q4* = q3 + k2 q4 + k8 + k4 NOR(q1,q2,q4)).
// It then classifies each key by the cycle structure of its graph and checks
// the number of keys that give an M-sequence generator (15-1): 32, an
// (M-1)-sequence generator (14-2): 16, and an (M-3)-sequence generator
// (12-4): 8. Finally it runs key 010001101 from 0000 and compares the 16
// states with the published (M+1)-sequence, counting the za pulses (2) and
// checking that the parity of the state inverts on every clock except the
// two on which za is high.
module tb_encrypted_prng;
  import prng_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   en = 1'b0;
  logic   load = 1'b0;
  state_t seed = '0;
  key_t   key = '0;
  state_t q;
  logic   za, zb;
  int     checks = 0;
  int     failures = 0;
  int     n_m, n_m1, n_m3, n_16, za_pulses;
  string  sig;
  tb_graph_pkg::tbl_t nxt;

  // (M+1)-sequence of key 010001101, starting at 0000.
  state_t fig_seq [16] = '{4'b0000, 4'b0110, 4'b0001, 4'b1111, 4'b1000, 4'b0010,
                           4'b0011, 4'b1110, 4'b0101, 4'b1101, 4'b1001, 4'b1011,
                           4'b1010, 4'b0111, 4'b1100, 4'b0100};

  encrypted_prng dut (.clk, .rst_n, .en, .load, .seed, .key, .q, .za, .zb);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
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

  function automatic state_t ref_next(input key_t k, input state_t s);
    logic na, nb;
    na = ~(s[2] | s[3] | s[4]);
    nb = ~(s[1] | s[2] | s[4]);
    return {s[4] ^ k[5],
            s[1] ^ (k[0] & s[4]) ^ k[6] ^ (k[3] & na),
            s[2] ^ (k[1] & s[4]) ^ k[7],
            s[3] ^ (k[2] & s[4]) ^ k[8] ^ (k[4] & nb)};
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(q == 4'b1000, "reset state");

    n_m = 0; n_m1 = 0; n_m3 = 0; n_16 = 0;
    for (int kk = 0; kk < 512; kk++) begin
      key = 9'(kk);
      for (int s = 0; s < 16; s++) begin
        seed = 4'(s); load = 1'b1;
        @(negedge clk);
        load = 1'b0; en = 1'b1;
        @(negedge clk);
        en = 1'b0;
        nxt[s] = q;
        if (q != ref_next(key, 4'(s)))
          check(1'b0, $sformatf("key %b: %b -> %b, expected %b", key, 4'(s), q, ref_next(key, 4'(s))));
      end
      checks++;   // one check per key for the 16 transitions above
      sig = tb_graph_pkg::cycle_sig(nxt);
      if (sig == "15-1") n_m++;
      if (sig == "14-2") n_m1++;
      if (sig == "12-4") n_m3++;
      if (sig == "16")   n_16++;
    end
    check(n_m  == 32, $sformatf("%0d keys give an M-sequence generator, expected 32", n_m));
    check(n_m1 == 16, $sformatf("%0d keys give an (M-1)-sequence generator, expected 16", n_m1));
    check(n_m3 == 8,  $sformatf("%0d keys give an (M-3)-sequence generator, expected 8", n_m3));
    $display("keys: M %0d, M-1 %0d, M-3 %0d, single 16-cycle %0d", n_m, n_m1, n_m3, n_16);

    key = 9'b010001101;
    seed = 4'b0000; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    za_pulses = 0;
    for (int i = 0; i < 16; i++) begin
      logic p0, z0;
      check(q == fig_seq[i], $sformatf("step %0d: %b, expected %b", i, q, fig_seq[i]));
      za_pulses += int'(za);
      p0 = ^q;
      z0 = za;
      en = 1'b1;
      @(negedge clk);
      // The bit parity alternates 0101... except on the two clocks where
      // za = 1, where it is kept.
      check((^q != p0) == !z0, $sformatf("step %0d: parity rule broken (za=%b)", i, z0));
    end
    en = 1'b0;
    check(q == 4'b0000, "sequence did not close after 16 clocks");
    check(za_pulses == 2, $sformatf("za high %0d times, expected 2", za_pulses));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
