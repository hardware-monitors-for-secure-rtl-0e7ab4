// tb_graph_pkg: test program and monitoring-graph generator for the
// testbenches.
//
// A program is a set of instruction states 0..n-1. State i falls through
// to i+1 (the last one loops back to 0) and some states branch to one or
// two more targets. The hash of state i is i mod 16; branch targets are
// chosen so the successors of a state have distinct hashes (a deterministic
// graph). The graph image is laid out the way the monitor reads it:
//   word 0..7  group base addresses, word i = {base(2i+1), base(2i+2)},
//              0xFFFF for an empty group
//   word 8     start row: one next state, the first instruction
//   word 9..   the successor blocks, grouped by fan-out g = 1..16; the
//              block of a state with g successors is g rows long, row r is
//              the entry of the successor with the r-th smallest hash
// and an entry is {nnext[31:27], offset[26:16], valid[15:0]}.
// The model also gives the row a transition lands on, so a testbench can
// predict the monitor's address pointer without using its logic.
package tb_graph_pkg;

  localparam int MAXS = 256;
  localparam int MAXW = 1024;

  class graph_gen;
    int            n;
    int            nsucc [MAXS+1];
    int            succ  [MAXS+1][3];
    int            blk   [MAXS+1];     // block index within its group
    int            gbase [17];         // base row of group g (1..16)
    int            gcount[17];         // blocks per group
    logic [31:0]   img   [MAXW];
    int            size;

    function int hash_of(int s);
      return s % 16;
    endfunction

    function bit has_hash(int s, int h);
      for (int j = 0; j < nsucc[s]; j++)
        if (hash_of(succ[s][j]) == h) return 1;
      return 0;
    endfunction

    // successors of state s sorted by hash value
    function void sort_succ(int s);
      for (int a = 0; a < nsucc[s]; a++)
        for (int b = a + 1; b < nsucc[s]; b++)
          if (hash_of(succ[s][b]) < hash_of(succ[s][a])) begin
            automatic int t = succ[s][a];
            succ[s][a] = succ[s][b];
            succ[s][b] = t;
          end
    endfunction

    function logic [31:0] entry_of(int s);
      logic [15:0] v = '0;
      for (int j = 0; j < nsucc[s]; j++) v[hash_of(succ[s][j])] = 1'b1;
      return {5'(nsucc[s]), 11'(blk[s]), v};
    endfunction

    // Build a program of n_states instructions (state n_states is the
    // virtual start state whose only successor is state 0).
    function void build(int n_states);
      n = n_states;
      for (int s = 0; s < n; s++) begin
        nsucc[s] = 1;
        succ[s][0] = (s == n - 1) ? 0 : s + 1;
        for (int extra = 0; extra < 2; extra++) begin
          if ($urandom_range(0, 3) == 0) begin
            int t;
            t = $urandom_range(0, n - 1);
            for (int tries = 0; tries < 20 && has_hash(s, hash_of(t)); tries++)
              t = $urandom_range(0, n - 1);
            if (!has_hash(s, hash_of(t))) begin
              succ[s][nsucc[s]] = t;
              nsucc[s]++;
            end
          end
        end
        sort_succ(s);
      end
      nsucc[n] = 1;
      succ[n][0] = 0;
      // group layout
      for (int g = 0; g <= 16; g++) gcount[g] = 0;
      for (int s = 0; s <= n; s++) begin
        blk[s] = gcount[nsucc[s]];
        gcount[nsucc[s]]++;
      end
      size = 9;
      for (int g = 1; g <= 16; g++) begin
        gbase[g] = (gcount[g] == 0) ? 'hFFFF : size;
        size += g * gcount[g];
      end
      for (int w = 0; w < MAXW; w++) img[w] = '0;
      for (int i = 0; i < 8; i++)
        img[i] = {16'(gbase[2*i+1]), 16'(gbase[2*i+2])};
      img[8] = entry_of(n);
      for (int s = 0; s <= n; s++)
        for (int r = 0; r < nsucc[s]; r++)
          img[gbase[nsucc[s]] + nsucc[s] * blk[s] + r] = entry_of(succ[s][r]);
    endfunction

    // row reached when state s (whose own row is any copy) is followed by
    // its r-th successor
    function int row_after(int s, int r);
      return gbase[nsucc[s]] + nsucc[s] * blk[s] + r;
    endfunction

    // a random instruction word whose number of ones is h or h + 16
    function logic [31:0] instr_for_hash(int h);
      logic [31:0] w = '0;
      automatic int ones = (h + 16 <= 32 && $urandom_range(0, 1) == 1) ? h + 16 : h;
      while ($countones(w) < ones) w[$urandom_range(0, 31)] = 1'b1;
      return w;
    endfunction

    function logic [31:0] instr_of(int s);
      return instr_for_hash(hash_of(s));
    endfunction

    // an instruction whose hash is not among the successors of s
    function logic [31:0] bad_instr(int s);
      int h0 = $urandom_range(0, 15);
      for (int i = 0; i < 16; i++)
        if (!has_hash(s, (h0 + i) % 16)) return instr_for_hash((h0 + i) % 16);
      return '0;
    endfunction
  endclass

endpackage
