// tb_keyed_prng2 - self-checking testbench for the generator locked by the
// two-bit key k1k0.
//
// For each of the four keys it loads all 16 states, clocks once, compares the
// next state with the generator that key should select (written out here
// from the four generators' equations, not from the locked circuit) and
// checks the cycle structure of the resulting graph against the mode table:
// 00 -> 15-1, 01 -> 7-7-1-1, 10 -> 16, 11 -> 14-2. For key 11 it also checks
// that the state parity inverts on every clock of the 14-cycle.
module tb_keyed_prng2;
  import prng_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       en = 1'b0;
  logic       load = 1'b0;
  state_t     seed = '0;
  logic [1:0] k = 2'b00;
  state_t     q;
  int         checks = 0;
  int         failures = 0;
  tb_graph_pkg::tbl_t nxt;
  string      expect_sig [4] = '{"15-1", "7-7-1-1", "16", "14-2"};

  keyed_prng2 dut (.clk, .rst_n, .en, .load, .seed, .k, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
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

  function automatic state_t ref_next(input mode2_e m, input state_t s);
    logic z;
    z = ~(s[2] | s[3] | s[4]);
    case (m)
      MODE_M_SEQ:      return {s[4], s[1] ^ s[4], s[2], s[3]};
      MODE_TWO_SEVENS: return {s[4], s[1] ^ s[4], s[2] ^ s[4], s[3]};
      MODE_M_PLUS_1:   return {s[4], s[1] ^ s[4] ^ z, s[2], s[3]};
      default:         return {~s[4], ~(s[1] ^ s[4]), ~(s[2] ^ s[4]), s[3]};
    endcase
  endfunction

  initial begin
    mode2_e m;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(q == 4'b1000, "reset state");
    for (int kk = 0; kk < 4; kk++) begin
      k = 2'(kk);
      m = mode2_e'(k);
      for (int s = 0; s < 16; s++) begin
        seed = 4'(s); load = 1'b1;
        @(negedge clk);
        load = 1'b0; en = 1'b1;
        @(negedge clk);
        en = 1'b0;
        nxt[s] = q;
        check(q == ref_next(m, 4'(s)),
              $sformatf("k=%b: %b -> %b, expected %b", k, 4'(s), q, ref_next(m, 4'(s))));
      end
      check(tb_graph_pkg::cycle_sig(nxt) == expect_sig[kk],
            $sformatf("k=%b: cycles %s, expected %s", k, tb_graph_pkg::cycle_sig(nxt), expect_sig[kk]));
    end
    // Mode 11 is the (M-1) generator: on its 14-cycle the parity of the
    // state inverts every clock.
    k = 2'b11;
    seed = 4'b1000; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    for (int i = 0; i < 14; i++) begin
      logic p0;
      p0 = ^q;
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      check(^q != p0, $sformatf("k=11: parity kept at %b", q));
    end
    check(q == 4'b1000, "k=11: 14-cycle did not close");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
