// tb_mplus1_gen - self-checking testbench for the 4-bit (M+1)-sequence generator.
//
// Loads every one of the 16 states, clocks once and compares the next state
// with the generator equations written out here independently of the RTL.
// From the 16 observed transitions it builds the state graph and checks its
// cycle structure (16). It also checks the reset state, that a full
// trip round the long cycle returns to its start after exactly 16 clocks,
// and that en = 0 holds the state.
module tb_mplus1_gen;
  import prng_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   en = 1'b0;
  logic   load = 1'b0;
  state_t seed = '0;
  state_t q;
  logic   z;
  int     checks = 0;
  int     failures = 0;
  int     zcount;
  logic   p;
  tb_graph_pkg::tbl_t nxt;

  mplus1_gen dut (.clk, .rst_n, .en, .load, .seed, .q, .z(z));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic state_t ref_next(input state_t s);
    return {s[4], s[1] ^ s[4] ^ ~(s[2] | s[3] | s[4]), s[2], s[3]};
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic load_state(input state_t s);
    @(negedge clk);
    seed = s; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
  endtask

  task automatic step();
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(q == 4'b1000, $sformatf("reset state %b", q));

    for (int s = 0; s < 16; s++) begin
      load_state(4'(s));
      check(q == 4'(s), $sformatf("load %b gave %b", 4'(s), q));
      step();
      nxt[s] = q;
      check(q == ref_next(4'(s)), $sformatf("%b -> %b, expected %b", 4'(s), q, ref_next(4'(s))));
    end
    check(tb_graph_pkg::cycle_sig(nxt) == "16",
          $sformatf("cycle structure %s, expected 16", tb_graph_pkg::cycle_sig(nxt)));

    // Hold, then one trip round the long cycle.
    load_state(4'b1000);
    repeat (3) @(negedge clk);
    check(q == 4'b1000, "state changed with en low");
    for (int i = 1; i <= 16; i++) begin
      step();
      if (i < 16) check(q != 4'b1000, $sformatf("returned to 1000 after %0d clocks", i));
    end
    check(q == 4'b1000, "long cycle did not close after 16 clocks");

    // The NOR output is high exactly in 1000 and 0000, and 1000 -> 0000 -> 0100.
    load_state(4'b1000);
    check(z == 1'b1, "z low in 1000");
    step();
    check(q == 4'b0000, $sformatf("1000 went to %b, expected 0000", q));
    check(z == 1'b1, "z low in 0000");
    step();
    check(q == 4'b0100, $sformatf("0000 went to %b, expected 0100", q));
    zcount = 0;
    for (int i = 0; i < 16; i++) begin
      zcount += int'(z);
      step();
    end
    check(zcount == 2, $sformatf("z high in %0d of 16 states, expected 2", zcount));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
