// tb_galois_variants - counts how many generators of each kind one
// programmable Galois register can form, for widths N = 4, 5, 6 and 7.
//
// Every coefficient vector a and constant vector c of galois_core is tried
// (galois_sweep). The number of configurations giving an M-sequence, an
// (M-1)-sequence and an (M-3)-sequence generator is compared with
//   sigma_M(N)   = 2^N     phi(2^N - 1)     / N
//   sigma_M-1(N) = 2^(N-1) phi(2^(N-1) - 1) / (N - 1)
//   sigma_M-3(N) = 2^(N-1) phi(2^(N-2) - 1) / (N - 2)
// where phi is Euler's totient, computed here by trial division. At N = 4
// these are 32, 16 and 8, the counts of the 9-key locked generator.
module tb_galois_variants;

  logic clk = 1'b0;
  logic start = 1'b0;
  logic done4, done5, done6, done7;
  int   m4, m14, m34, m5, m15, m35, m6, m16, m36, m7, m17, m37;
  int   checks = 0;
  int   failures = 0;

  galois_sweep #(.N(4)) u4 (.clk, .start, .done(done4), .n_m(m4), .n_m1(m14), .n_m3(m34));
  galois_sweep #(.N(5)) u5 (.clk, .start, .done(done5), .n_m(m5), .n_m1(m15), .n_m3(m35));
  galois_sweep #(.N(6)) u6 (.clk, .start, .done(done6), .n_m(m6), .n_m1(m16), .n_m3(m36));
  galois_sweep #(.N(7)) u7 (.clk, .start, .done(done7), .n_m(m7), .n_m1(m17), .n_m3(m37));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int phi(input int n);
    int r = n;
    int m = n;
    for (int p = 2; p * p <= m; p++) begin
      if (m % p == 0) begin
        while (m % p == 0) m = m / p;
        r = r / p * (p - 1);
      end
    end
    if (m > 1) r = r / m * (m - 1);
    return r;
  endfunction

  task automatic check_n(input int n, input int got_m, input int got_m1, input int got_m3);
    int e_m, e_m1, e_m3;
    e_m  = (2**n)     * phi(2**n - 1)     / n;
    e_m1 = (2**(n-1)) * phi(2**(n-1) - 1) / (n - 1);
    e_m3 = (2**(n-1)) * phi(2**(n-2) - 1) / (n - 2);
    $display("N=%0d: M %0d (%0d), M-1 %0d (%0d), M-3 %0d (%0d)",
             n, got_m, e_m, got_m1, e_m1, got_m3, e_m3);
    checks += 3;
    if (got_m  != e_m)  begin failures++; $display("FAIL: N=%0d M count",   n); end
    if (got_m1 != e_m1) begin failures++; $display("FAIL: N=%0d M-1 count", n); end
    if (got_m3 != e_m3) begin failures++; $display("FAIL: N=%0d M-3 count", n); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    start = 1'b1;
    wait (done4 && done5 && done6 && done7);
    check_n(4, m4, m14, m34);
    check_n(5, m5, m15, m35);
    check_n(6, m6, m16, m36);
    check_n(7, m7, m17, m37);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
