// tb_code_construction: checks the parity-check matrix the decoder is wired
// for, built from ldpc_pkg::circ_shift at the default size (8 x 81
// circulants of size 113).
//
// A 4-cycle exists when two block rows i1, i2 and two block columns j1, j2
// satisfy S(i1,j1) - S(i1,j2) = S(i2,j1) - S(i2,j2) (mod P). Every such
// quadruple is tested. It also checks the property the shifting network
// relies on: S(i, j+3) - S(i, j) is the same constant 3*(i+1) mod P for every
// j, and that the first block row holds the shifts 0..80.
module tb_code_construction;
  import ldpc_pkg::*;

  localparam int P = SUB_P, DC = ROW_DEG, DV = COL_DEG;
  localparam int CPG = ROW_DEG / N_GROUPS;

  int checks = 0, failures = 0;
  int s [DV][DC];

  initial begin
    for (int i = 0; i < DV; i++)
      for (int j = 0; j < DC; j++) s[i][j] = int'(circ_shift(i, j, P));
    for (int j = 0; j < DC; j++) begin
      checks++;
      if (s[0][j] != j) failures++;
    end
    for (int i1 = 0; i1 < DV; i1++)
      for (int i2 = i1 + 1; i2 < DV; i2++)
        for (int j1 = 0; j1 < DC; j1++)
          for (int j2 = j1 + 1; j2 < DC; j2++) begin
            checks++;
            if (((s[i1][j1] - s[i1][j2] - s[i2][j1] + s[i2][j2]) % P + 2 * P) % P == 0) begin
              failures++;
              $display("4-cycle: rows %0d,%0d columns %0d,%0d", i1, i2, j1, j2);
            end
          end
    for (int i = 0; i < DV; i++)
      for (int j = 0; j + CPG < DC; j++) begin
        checks++;
        if (((s[i][j + CPG] - s[i][j]) % P + P) % P != (CPG * (i + 1)) % P) begin
          failures++;
          $display("shift step not constant at row %0d column %0d", i, j);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
