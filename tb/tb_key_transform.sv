// tb_key_transform - self-checking testbench for the key transformation
// table.
//
// It writes random words at 64 random addresses, checks that the transformed
// key stays all-zeros while the table is open, locks it, reads every written
// entry back (one clock of latency), tries to overwrite entries after the
// lock and checks that they kept their values, and checks that reset leaves
// the table unlocked.
module tb_key_transform;

  localparam int unsigned PK_W = 9;
  localparam int unsigned TK_W = 9;
  localparam int unsigned NW   = 64;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            prog_we = 1'b0;
  logic [PK_W-1:0] prog_addr = '0;
  logic [TK_W-1:0] prog_data = '0;
  logic            lock_req = 1'b0;
  logic            locked;
  logic [PK_W-1:0] primary_key = '0;
  logic [TK_W-1:0] transformed_key;
  int              checks = 0;
  int              failures = 0;
  logic [TK_W-1:0] model [logic [PK_W-1:0]];
  logic [PK_W-1:0] addrs [NW];

  key_transform dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
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

  task automatic write_word(input logic [PK_W-1:0] a, input logic [TK_W-1:0] d);
    prog_we = 1'b1; prog_addr = a; prog_data = d;
    @(negedge clk);
    prog_we = 1'b0;
  endtask

  task automatic read_word(input logic [PK_W-1:0] a, output logic [TK_W-1:0] d);
    primary_key = a;
    @(negedge clk);
    d = transformed_key;
  endtask

  initial begin
    logic [TK_W-1:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!locked, "locked after reset");

    for (int i = 0; i < NW; i++) begin
      do addrs[i] = PK_W'($urandom); while (model.exists(addrs[i]));
      model[addrs[i]] = TK_W'($urandom);
      write_word(addrs[i], model[addrs[i]]);
    end
    for (int i = 0; i < 8; i++) begin
      read_word(addrs[i], d);
      check(d == '0, "key visible before lock");
    end

    lock_req = 1'b1;
    @(negedge clk);
    lock_req = 1'b0;
    check(locked, "lock not taken");

    foreach (addrs[i]) begin
      read_word(addrs[i], d);
      check(d == model[addrs[i]],
            $sformatf("entry %0d reads %0h, expected %0h", addrs[i], d, model[addrs[i]]));
    end

    for (int i = 0; i < 16; i++) write_word(addrs[i], ~model[addrs[i]]);
    for (int i = 0; i < 16; i++) begin
      read_word(addrs[i], d);
      check(d == model[addrs[i]], $sformatf("entry %0d overwritten after lock", addrs[i]));
    end

    // One clock of latency: the output follows the key pins a clock later.
    primary_key = addrs[0];
    @(negedge clk);
    primary_key = addrs[1];
    check(transformed_key == model[addrs[0]], "latency: old entry before the edge");
    @(negedge clk);
    check(transformed_key == model[addrs[1]], "latency: new entry one clock later");

    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    check(!locked && transformed_key == '0, "reset did not clear the lock");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
