// tb_mseq_gen - self-checking testbench for the 4-bit M-sequence generator (x^4 + x + 1).
//
// Loads every one of the 16 states, clocks once and compares the next state
// with the generator equations written out here independently of the RTL.
// From the 16 observed transitions it builds the state graph and checks its
// cycle structure (15-1). It also checks the reset state, that a full
// trip round the long cycle returns to its start after exactly 15 clocks,
// and that en = 0 holds the state.
module tb_mseq_gen;
  import prng_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   en = 1'b0;
  logic   load = 1'b0;
  state_t seed = '0;
  state_t q;
  int     checks = 0;
  int     failures = 0;
  int     zcount;
  logic   p;
  tb_graph_pkg::tbl_t nxt;

  mseq_gen dut (.clk, .rst_n, .en, .load, .seed, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic state_t ref_next(input state_t s);
    return {s[4], s[1] ^ s[4], s[2], s[3]};
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
    check(tb_graph_pkg::cycle_sig(nxt) == "15-1",
          $sformatf("cycle structure %s, expected 15-1", tb_graph_pkg::cycle_sig(nxt)));

    // Hold, then one trip round the long cycle.
    load_state(4'b1000);
    repeat (3) @(negedge clk);
    check(q == 4'b1000, "state changed with en low");
    for (int i = 1; i <= 15; i++) begin
      step();
      if (i < 15) check(q != 4'b1000, $sformatf("returned to 1000 after %0d clocks", i));
    end
    check(q == 4'b1000, "long cycle did not close after 15 clocks");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
