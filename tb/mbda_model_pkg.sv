// mbda_model_pkg: bit-exact behavioural reference of the MBDA filter, written
// directly from the algorithm (no pipeline): for each block it forms the L
// outputs by distributed arithmetic over the M partial-product tables, the
// errors, and the priority update of every table element. It also counts how
// often the mechanisms of the algorithm occur, so testbenches can show that
// each was exercised.
package mbda_model_pkg;

  class mbda_model #(
    int P = 128, int L = 128, int M = 64, int B = 16,
    int PW = 24, int FRAC = 20, int MU_SHIFT = 10
  );
    localparam int R  = P / M;
    localparam int NE = 1 << R;

    longint hist [P+L-1];          // hist[s] = x(k-s), raw B-bit two's complement
    longint tbl  [M][NE];          // partial products
    longint y    [L];
    longint e    [L];
    // mechanism counters
    int n_blocks, n_priority, n_nohit, n_hit, n_sat, n_neg_phase;

    function new();
      foreach (hist[s]) hist[s] = 0;
      foreach (tbl[m, k]) tbl[m][k] = 0;
      n_blocks = 0; n_priority = 0; n_nohit = 0; n_hit = 0; n_sat = 0; n_neg_phase = 0;
    endfunction

    static function longint sx(longint v, int w);   // sign-extend w bits
      longint m1 = longint'(1) << (w - 1);
      v = v & ((longint'(1) << w) - 1);
      return (v ^ m1) - m1;
    endfunction

    function longint sat(longint v, int w);
      longint hi = (longint'(1) << (w - 1)) - 1;
      longint lo = -(longint'(1) << (w - 1));
      if (v > hi) begin n_sat++; return hi; end
      if (v < lo) begin n_sat++; return lo; end
      return v;
    endfunction

    function int bitof(int s, int l);        // bit l (0 = sign) of x(k-s)
      return int'((hist[s] >> (B - 1 - l)) & 1);
    endfunction

    function int addr(int n, int m, int l);
      int a = 0;
      for (int r = 0; r < R; r++) a = (a << 1) | bitof(n + m*R + r, l);
      return a;
    endfunction

    // x[n], d[n]: B-bit raw values, n = 0 newest
    function void run_block(longint x[], longint d[]);
      for (int s = P + L - 2; s >= L; s--) hist[s] = hist[s-L];
      for (int s = 0; s < L; s++) hist[s] = x[s] & ((longint'(1) << B) - 1);
      // outputs and errors
      for (int n = 0; n < L; n++) begin
        longint acc = 0;
        for (int l = 0; l < B; l++) begin
          longint S = 0;
          for (int m = 0; m < M; m++) S += tbl[m][addr(n, m, l)];
          if (l == 0) begin acc = -S; if (S != 0) n_neg_phase++; end
          else acc = 2*acc + S;
        end
        y[n] = sat(acc >>> (B - 1), PW);
        e[n] = sat((sx(d[n], B) <<< (FRAC - (B - 1))) - y[n], PW);
      end
      // priority update of every element
      for (int m = 0; m < M; m++)
        for (int k = 0; k < NE; k++) begin
          longint tot = tbl[m][k];
          for (int n = 0; n < L; n++) begin
            int hits = 0, best = -1;
            for (int l = 0; l < B; l++)
              if (addr(n, m, l) == k) begin
                hits++;
                if (best < 0) best = l;
              end
            if (hits == 0) n_nohit++; else n_hit++;
            if (hits > 1) n_priority++;
            if (best == 0) tot += -(e[n] >>> MU_SHIFT);
            else if (best > 0) tot += e[n] >>> (MU_SHIFT + best);
          end
          tbl[m][k] = sat(tot, PW);
        end
      n_blocks++;
    endfunction
  endclass

endpackage
