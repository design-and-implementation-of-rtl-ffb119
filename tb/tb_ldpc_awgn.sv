// tb_ldpc_awgn: the decoder at its default size on an AWGN channel.
//
// Each codeword (ones filling an even number of whole block columns) is sent
// as BPSK (data '0' -> +1, data '1' -> -1) with Gaussian noise (Box-Muller),
// sigma^2 = 1 / (2 * R * Eb/N0) with R = 8256/9153. The received value y is
// quantized to 2 bits with the non-linear thresholds -f, 0, +f (f = 0.35):
// hard bit = (y < 0), reliable = (|y| > f). Words are decoded at three
// operating points and the bit errors before and after decoding are counted.
// Checks: every word takes G*(ITERS+1) = 297 cycles from its first group to
// done, and at 5.5 dB every word decodes without error. At 4.0 dB, below
// the waterfall of a rate-0.9 code with 2-bit input, words usually fail (and
// may even gain errors); there and at 5.0 dB only the rates are printed. This is
// a short run, not a BER curve.
module tb_ldpc_awgn;
  import ldpc_pkg::*;

  localparam int P = SUB_P, DC = ROW_DEG, G = N_GROUPS, ITERS = N_ITERS;
  localparam int CPG = DC / G, NG = CPG * P, N = DC * P;
  localparam int IDX_W = $clog2(G + 1);
  localparam int WORDS_PER_POINT = 4;
  localparam real RATE = 8256.0 / 9153.0;
  localparam real F_THR = 0.35;

  logic clk = 0, rst_n = 0;
  logic ch_valid = 0;
  logic [CH_W-1:0] ch_in [NG];
  logic in_ready, out_valid, done, busy;
  logic [IDX_W-1:0] out_grp;
  logic [NG-1:0] out_bits;
  logic [$clog2(ITERS + 1)-1:0] iter;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit cw [N];
  bit [1:0] chv [N];
  bit dec [N];

  int cyc = 0, t0 = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic real uni();
    return (real'($urandom) + 1.0) / 4294967297.0;
  endfunction

  function automatic real gauss();
    return $sqrt(-2.0 * $ln(uni())) * $cos(6.283185307179586 * uni());
  endfunction

  always @(posedge clk)
    if (out_valid)
      for (int k = 0; k < NG; k++) dec[int'(out_grp) * NG + k] = out_bits[k];

  initial begin
    real ebn0_db [3] = '{4.0, 5.0, 5.5};
    foreach (ch_in[k]) ch_in[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (ebn0_db[pt]) begin
      real sigma;
      int raw_tot, dec_tot;
      sigma = $sqrt(1.0 / (2.0 * RATE * (10.0 ** (ebn0_db[pt] / 10.0))));
      raw_tot = 0; dec_tot = 0;
      for (int w = 0; w < WORDS_PER_POINT; w++) begin
        bit blk [DC];
        int cnt, raw, derr;
        cnt = 0; raw = 0; derr = 0;
        for (int j = 0; j < DC; j++) begin blk[j] = $urandom_range(0, 1); cnt += blk[j]; end
        if (cnt % 2) blk[0] = ~blk[0];
        for (int k = 0; k < N; k++) begin
          real y;
          cw[k] = blk[k / P];
          y = (cw[k] ? -1.0 : 1.0) + sigma * gauss();
          chv[k] = {y < 0.0, (y > F_THR) || (y < -F_THR)};
          if (chv[k][1] != cw[k]) raw++;
        end
        for (int g = 0; g < G; g++) begin
          @(negedge clk);
          for (int k = 0; k < NG; k++) ch_in[k] = chv[g * NG + k];
          ch_valid = 1;
          if (g == 0) t0 = cyc;
        end
        @(negedge clk);
        ch_valid = 0;
        while (!done) @(negedge clk);
        checks++;
        if (cyc - t0 != G * (ITERS + 1) - 1) begin
          failures++;
          $display("word took %0d cycles", cyc - t0 + 1);
        end
        @(negedge clk);
        for (int k = 0; k < N; k++) if (dec[k] != cw[k]) derr++;
        raw_tot += raw; dec_tot += derr;
        if (ebn0_db[pt] >= 5.5) begin
          checks++;
          if (derr != 0) begin
            failures++;
            $display("Eb/N0 %.1f dB word %0d: %0d residual errors", ebn0_db[pt], w, derr);
          end
        end
      end
      $display("Eb/N0 %.1f dB: raw BER %.2e, decoded BER %.2e over %0d words",
               ebn0_db[pt], real'(raw_tot) / (N * WORDS_PER_POINT),
               real'(dec_tot) / (N * WORDS_PER_POINT), WORDS_PER_POINT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * WORDS_PER_POINT * (G * (ITERS + 1) + 10) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
