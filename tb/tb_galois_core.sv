// tb_galois_core - self-checking testbench for the programmable Galois
// register, at N = 4 and at N = 8.
//
// For random coefficients a, control inputs c and states, it loads the state,
// clocks once and compares with the general next-state equations
// q1* = qN + c1, qj* = q(j-1) + a(j-1) qN + cj, evaluated here bit by bit.
// It also checks the reset value, that load has priority over en, that en = 0
// holds the state, and (N = 8) that the coefficients of the primitive
// polynomial x^8 + x^4 + x^3 + x^2 + 1 give a period of exactly 255.
module tb_galois_core;

  localparam int unsigned N4 = 4;
  localparam int unsigned N8 = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic load = 1'b0;
  logic [1:N4]   seed4 = '0, c4 = '0, q4;
  logic [1:N4-1] a4 = '0;
  logic [1:N8]   seed8 = '0, c8 = '0, q8, start8;
  logic [1:N8-1] a8 = '0;
  int checks = 0;
  int failures = 0;
  int period;

  galois_core #(.N(N4)) dut4 (.clk, .rst_n, .en, .load, .seed(seed4), .a(a4), .c(c4), .q(q4));
  galois_core #(.N(N8)) dut8 (.clk, .rst_n, .en, .load, .seed(seed8), .a(a8), .c(c8), .q(q8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  function automatic logic [1:N4] ref4(input logic [1:N4] s, input logic [1:N4-1] a,
                                       input logic [1:N4] c);
    logic [1:N4] r;
    r[1] = s[N4] ^ c[1];
    for (int j = 2; j <= N4; j++) r[j] = s[j-1] ^ (a[j-1] & s[N4]) ^ c[j];
    return r;
  endfunction

  function automatic logic [1:N8] ref8(input logic [1:N8] s, input logic [1:N8-1] a,
                                       input logic [1:N8] c);
    logic [1:N8] r;
    r[1] = s[N8] ^ c[1];
    for (int j = 2; j <= N8; j++) r[j] = s[j-1] ^ (a[j-1] & s[N8]) ^ c[j];
    return r;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(q4 == 4'b1000, "N=4 reset value");
    check(q8 == 8'b1000_0000, "N=8 reset value");

    for (int t = 0; t < 300; t++) begin
      seed4 = 4'($urandom); seed8 = 8'($urandom);
      load = 1'b1; en = 1'($urandom);        // load wins over en
      @(negedge clk);
      load = 1'b0;
      check(q4 == seed4 && q8 == seed8, "load");
      a4 = 3'($urandom); c4 = 4'($urandom);
      a8 = 7'($urandom); c8 = 8'($urandom);
      en = 1'($urandom);
      @(negedge clk);
      if (en) begin
        check(q4 == ref4(seed4, a4, c4), $sformatf("N=4 %b a=%b c=%b -> %b", seed4, a4, c4, q4));
        check(q8 == ref8(seed8, a8, c8), $sformatf("N=8 %b a=%b c=%b -> %b", seed8, a8, c8, q8));
      end else begin
        check(q4 == seed4 && q8 == seed8, "hold with en low");
      end
      en = 1'b0;
    end

    // x^8 + x^4 + x^3 + x^2 + 1: a2 = a3 = a4 = 1, period 255.
    a8 = 7'b0111000; c8 = '0;
    seed8 = 8'b0000_0001;
    load = 1'b1; @(negedge clk); load = 1'b0;
    start8 = q8;
    en = 1'b1;
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (q8 != start8 && period < 300);
    en = 1'b0;
    check(period == 255, $sformatf("N=8 period %0d, expected 255", period));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
