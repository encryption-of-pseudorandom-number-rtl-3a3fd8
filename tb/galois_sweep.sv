// galois_sweep - testbench helper: classifies every configuration of an
// N-bit galois_core.
//
// On start it walks all 2^(N-1) coefficient vectors a and all 2^N constant
// vectors c. For each pair it loads every state, clocks once and records the
// next state, then finds the cycles of that state graph. It counts the
// configurations whose graph is (2^N - 1) + 1 (M-sequence), (2^N - 2) + 2
// ((M-1)-sequence) and (2^N - 4) + 4 ((M-3)-sequence), and raises done.
module galois_sweep #(
  parameter int unsigned N = 5
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   n_m,
  output int   n_m1,
  output int   n_m3
);

  localparam int unsigned S = 2**N;

  logic         rst_n = 1'b0;
  logic         en = 1'b0;
  logic         load = 1'b0;
  logic [1:N]   seed = '0;
  logic [1:N-1] a = '0;
  logic [1:N]   c = '0;
  logic [1:N]   q;

  galois_core #(.N(N)) dut (.clk, .rst_n, .en, .load, .seed, .a, .c, .q);

  // Cycle lengths of the graph nxt, longest first.
  function automatic void cycles(input int nxt[S], output int lens[$]);
    bit on[S];
    int x, n;
    lens.delete();
    for (int i = 0; i < S; i++) on[i] = 1'b0;
    for (int st = 0; st < S; st++) begin
      x = st;
      for (int i = 0; i < S; i++) x = nxt[x];
      if (!on[x]) begin
        n = 0;
        do begin
          on[x] = 1'b1;
          x = nxt[x];
          n++;
        end while (!on[x]);
        lens.push_back(n);
      end
    end
    lens.rsort();
  endfunction

  initial begin
    int nxt[S];
    int lens[$];
    done = 1'b0;
    n_m = 0; n_m1 = 0; n_m3 = 0;
    wait (start);
    @(negedge clk);
    rst_n = 1'b1;
    for (int ai = 0; ai < 2**(N-1); ai++) begin
      for (int ci = 0; ci < S; ci++) begin
        a = (N-1)'(ai);
        c = N'(ci);
        for (int st = 0; st < S; st++) begin
          seed = N'(st); load = 1'b1;
          @(negedge clk);
          load = 1'b0; en = 1'b1;
          @(negedge clk);
          en = 1'b0;
          nxt[st] = int'(q);
        end
        cycles(nxt, lens);
        if (lens.size() == 2) begin
          if (lens[0] == S - 1 && lens[1] == 1) n_m++;
          if (lens[0] == S - 2 && lens[1] == 2) n_m1++;
          if (lens[0] == S - 4 && lens[1] == 4) n_m3++;
        end
      end
    end
    done = 1'b1;
  end

endmodule
