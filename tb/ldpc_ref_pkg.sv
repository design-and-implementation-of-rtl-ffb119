// ldpc_ref_pkg: cycle-level reference model of the VSS min-sum decoder, for
// testbenches.
//
// The model addresses check rows by their logical index (row block i, row r)
// and looks every edge up in the parity-check matrix directly: bit
// n = j*P + t of sub-matrix column j meets row r = (t - S(i,j)) mod P of row
// block i, with S(i,j) = (j + (j+1)*i) mod P. It therefore does not share the
// fixed wiring and state rotation of the hardware, so a wiring or rotation
// error shows up as a mismatch. One call of step() models one decoder cycle
// that serves group g and returns the hard decisions of that group. The
// model also counts how often a check row had to replace a stale global
// minimum (the group being served was the one that set it).
package ldpc_ref_pkg;

  class ldpc_ref;
    int p, dc, dv, g_n, cpg, ng, n;
    int gmin[], gidx[], lmin[], lidx[];
    bit sgn[][];          // [row][column block]
    bit [1:0] ch[];       // [bit]
    int stale_replacements;

    function new(int p_, int dc_, int dv_, int g_);
      p = p_; dc = dc_; dv = dv_; g_n = g_;
      cpg = dc / g_n; ng = cpg * p; n = dc * p;
      gmin = new[dv * p]; gidx = new[dv * p];
      lmin = new[dv * p]; lidx = new[dv * p];
      sgn  = new[dv * p];
      foreach (sgn[k]) sgn[k] = new[dc];
      ch = new[n];
      stale_replacements = 0;
      clear();
    endfunction

    function void clear();
      for (int k = 0; k < dv * p; k++) begin
        gmin[k] = 7; gidx[k] = -1; lmin[k] = 7; lidx[k] = -1;
        for (int j = 0; j < dc; j++) sgn[k][j] = 0;
      end
    endfunction

    function int shift(int i, int j);
      return (j + (j + 1) * i) % p;
    endfunction

    function int row_of(int i, int j, int t);
      return i * p + ((t - shift(i, j)) % p + p) % p;
    endfunction

    function int sat7(int v);
      return v > 7 ? 7 : (v < -7 ? -7 : v);
    endfunction

    function int llr(bit [1:0] c);
      int v;
      v = c[0] ? 7 : 2;
      return c[1] ? -v : v;
    endfunction

    // Minimum of the groups other than g for row k (no side effects).
    function void base_of(int k, int g, output int bm, output int bi);
      if (gidx[k] == g && lidx[k] != g) begin bm = lmin[k]; bi = lidx[k]; end
      else if (gidx[k] == g)           begin bm = 7;       bi = -1;      end
      else                             begin bm = gmin[k]; bi = gidx[k]; end
    endfunction

    // One decoder cycle on group g; chin holds the NG channel values of the
    // group (used when init). Returns the hard decisions of the group.
    function void step(int g, bit init, bit [1:0] chin[], output bit hard[]);
      int eps[][];   // [vnu k][row block i], two's complement
      int z[][];
      int bm, bi;
      hard = new[ng];
      eps = new[ng]; z = new[ng];
      if (init && g == 0) clear();
      for (int k = 0; k < ng; k++) begin
        int c, t, j, tot;
        bit [1:0] cv;
        c = k / p; t = k % p; j = g * cpg + c;
        eps[k] = new[dv]; z[k] = new[dv];
        if (init) ch[j * p + t] = chin[k];
        cv = ch[j * p + t];
        tot = llr(cv);
        for (int i = 0; i < dv; i++) begin
          int r, par, mag;
          r = row_of(i, j, t);
          base_of(r, g, bm, bi);
          par = 0;
          for (int jj = 0; jj < dc; jj++) if (jj != j) par ^= sgn[r][jj];
          mag = bm / 2;
          eps[k][i] = init ? 0 : (par ? -mag : mag);
          tot += eps[k][i];
        end
        for (int i = 0; i < dv; i++) z[k][i] = sat7(tot - eps[k][i]);
        hard[k] = (tot < 0);
      end
      // Check rows absorb the new messages of group g.
      for (int k = 0; k < dv * p; k++) begin
        int i, r, newm, km, ki, hm, hi;
        i = k / p; r = k % p;
        newm = 7;
        for (int c = 0; c < cpg; c++) begin
          int j, t, v;
          j = g * cpg + c;
          t = (r + shift(i, j)) % p;
          v = z[c * p + t][i];
          if ((v < 0 ? -v : v) < newm) newm = (v < 0 ? -v : v);
          sgn[k][j] = (v < 0);
        end
        if (gidx[k] == g) stale_replacements++;
        base_of(k, g, bm, bi);
        if (gidx[k] == g || lidx[k] == g) begin km = 7; ki = -1; end
        else begin km = lmin[k]; ki = lidx[k]; end
        if (newm < bm) begin gmin[k] = newm; gidx[k] = g; hm = bm; hi = bi; end
        else begin gmin[k] = bm; gidx[k] = bi; hm = newm; hi = g; end
        if (hm < km) begin lmin[k] = hm; lidx[k] = hi; end
        else begin lmin[k] = km; lidx[k] = ki; end
      end
    endfunction
  endclass

endpackage
