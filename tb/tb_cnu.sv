// tb_cnu: self-checking test of one check node unit at its default size
// (row degree 81, 27 groups of 3 edges).
//
// The register is looped back (nxt = upd), so the unit serves one check row.
// Groups are visited in order 0..26 over several iterations, starting each
// codeword with clr, with random hold cycles (en = 0). Random magnitudes are
// drawn mostly from the upper range with occasional small values so that the
// global minimum moves between groups and goes stale. Expected outputs come
// from a model kept in the testbench:
//   - sign of a message = XOR of the latest signs of all other 80 edges,
//     kept as an array of 81 signs;
//   - magnitude = half of the minimum over the other groups, computed with
//     the sorter rules (global/local minimum with group indices).
// Counted mechanisms: stale global minimum replaced by the local one, new
// global minimum from the served group, hold cycles.
module tb_cnu;
  import ldpc_pkg::*;

  localparam int DC = ROW_DEG, G = N_GROUPS, CPG = DC / G;
  localparam int IDX_W = $clog2(G + 1);
  localparam int W = DC + 2 * IDX_W + 2 * MAG_W;

  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic [IDX_W-1:0] grp = '0;
  msg_t z_in [CPG];
  msg_t eps_out [CPG];
  logic [W-1:0] upd, nxt;

  assign nxt = upd;

  cnu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stale = 0, n_newmin = 0, n_hold = 0;

  // Model state.
  int gmin, gidx, lmin, lidx;
  bit sgn [DC];

  task automatic model_clear();
    gmin = 7; gidx = -1; lmin = 7; lidx = -1;
    foreach (sgn[k]) sgn[k] = 0;
  endtask

  initial begin
    foreach (z_in[c]) z_in[c] = '0;
    model_clear();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Worked example of the sorter without second minimum: three groups get
    // magnitudes {1,2,3}, {4,5,6}, {7,7,7}, then group 0 comes back with
    // {5,6,7}. Registers (global/local) go (7,7) -> (1,7) -> (1,4) -> (1,4);
    // on the return of group 0 its global minimum is stale and the local 4
    // replaces it, so the messages carry 4/2 = 2, and afterwards the global
    // minimum is 4 (group 1) and the local one 5 (group 0).
    begin
      int dmag [4][3] = '{'{1, 2, 3}, '{4, 5, 6}, '{7, 7, 7}, '{5, 6, 7}};
      int dgrp [4]    = '{0, 1, 2, 0};
      int dexp [4]    = '{3, 0, 0, 2};
      for (int s = 0; s < 4; s++) begin
        @(negedge clk);
        en = 1; clr = (s == 0); grp = IDX_W'(dgrp[s]);
        foreach (z_in[c]) begin z_in[c].sgn = 0; z_in[c].mag = MAG_W'(dmag[s][c]); end
        #1;
        checks++;
        if (int'(eps_out[0].mag) != dexp[s]) begin
          failures++;
          $display("worked example step %0d: magnitude %0d, expected %0d", s, eps_out[0].mag, dexp[s]);
        end
      end
      // Group 1 now holds the global minimum 4 -> it is stale for group 1,
      // which must receive the local minimum 5 / 2 = 2; group 2 gets 4 / 2.
      @(negedge clk);
      grp = IDX_W'(2);
      foreach (z_in[c]) z_in[c].mag = 7;
      #1;
      checks++;
      if (eps_out[0].mag != 2) begin failures++; $display("worked example: group 2 got %0d", eps_out[0].mag); end
      @(negedge clk);
      grp = IDX_W'(1);
      #1;
      checks++;
      if (eps_out[0].mag != 2) begin failures++; $display("worked example: group 1 got %0d", eps_out[0].mag); end
      @(negedge clk);
      en = 0;
    end
    for (int word = 0; word < 6; word++) begin
      for (int it = 0; it < 5; it++) begin
        for (int g = 0; g < G; g++) begin
          int bm, bi, km, ki, newm, hm, hi, exp_mag;
          @(negedge clk);
          if ($urandom_range(0, 7) == 0) begin
            // Hold cycle: random inputs must not change the state.
            en = 0; grp = IDX_W'($urandom_range(0, G - 1));
            foreach (z_in[c]) z_in[c] = msg_t'($urandom);
            n_hold++;
            @(negedge clk);
          end
          en  = 1;
          clr = (it == 0 && g == 0);
          if (clr) model_clear();
          grp = IDX_W'(g);
          foreach (z_in[c]) begin
            z_in[c].sgn = $urandom_range(0, 1);
            z_in[c].mag = ($urandom_range(0, 40) == 0) ? MAG_W'($urandom_range(0, 7))
                          : MAG_W'($urandom_range(2 + word % 3 * 2, 7));
          end
          // Expected outgoing messages.
          if (gidx == g && lidx != g) begin bm = lmin; bi = lidx; end
          else if (gidx == g)         begin bm = 7;    bi = -1;   end
          else                        begin bm = gmin; bi = gidx; end
          exp_mag = bm / 2;
          #1;
          for (int c = 0; c < CPG; c++) begin
            bit ps;
            ps = 0;
            for (int k = 0; k < DC; k++) if (k != g * CPG + c) ps ^= sgn[k];
            checks++;
            if (eps_out[c].mag != MAG_W'(exp_mag) || eps_out[c].sgn != ps) begin
              failures++;
              $display("word %0d it %0d g %0d edge %0d: got %0d/%0d expected %0d/%0d",
                       word, it, g, c, eps_out[c].sgn, eps_out[c].mag, ps, exp_mag);
            end
          end
          // Model update.
          if (gidx == g) n_stale++;
          if (gidx == g || lidx == g) begin km = 7; ki = -1; end
          else begin km = lmin; ki = lidx; end
          newm = 7;
          for (int c = 0; c < CPG; c++) begin
            if (int'(z_in[c].mag) < newm) newm = z_in[c].mag;
            sgn[g * CPG + c] = z_in[c].sgn;
          end
          if (newm < bm) begin gmin = newm; gidx = g; hm = bm; hi = bi; n_newmin++; end
          else begin gmin = bm; gidx = bi; hm = newm; hi = g; end
          if (hm < km) begin lmin = hm; lidx = hi; end
          else begin lmin = km; lidx = ki; end
        end
      end
    end
    @(negedge clk);
    en = 0;
    $display("mechanisms: stale=%0d new_global_min=%0d hold=%0d", n_stale, n_newmin, n_hold);
    checks += 3;
    if (n_stale == 0) failures++;
    if (n_newmin == 0) failures++;
    if (n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
