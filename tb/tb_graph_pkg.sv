// tb_graph_pkg - testbench helpers for 4-bit state-transition graphs.
//
// A generator's graph is captured as a table nxt[s] = state after s, for all
// 16 states s (index bit 3 = q1 ... bit 0 = q4). cycle_sig() walks the
// table, finds every cycle and returns the cycle lengths in descending order
// joined by '-', e.g. "15-1" for an M-sequence generator. States that lie on
// a tail leading into a cycle are not counted. parity() is the modulo-2 sum
// of a state's bits.
package tb_graph_pkg;

  typedef logic [3:0] tbl_t [16];

  function automatic string cycle_sig(input tbl_t nxt);
    int          lens[$];
    bit          on_known[16];
    logic [3:0]  x;
    int          n;
    string       s;
    for (int i = 0; i < 16; i++) on_known[i] = 1'b0;
    for (int st = 0; st < 16; st++) begin
      x = 4'(st);
      for (int i = 0; i < 16; i++) x = nxt[x];   // now on a cycle
      if (!on_known[x]) begin
        n = 0;
        do begin
          on_known[x] = 1'b1;
          x = nxt[x];
          n++;
        end while (!on_known[x]);
        lens.push_back(n);
      end
    end
    lens.rsort();
    s = "";
    foreach (lens[i]) s = (i == 0) ? $sformatf("%0d", lens[i])
                                   : $sformatf("%s-%0d", s, lens[i]);
    return s;
  endfunction

  function automatic logic parity(input logic [3:0] v);
    return ^v;
  endfunction

endpackage
