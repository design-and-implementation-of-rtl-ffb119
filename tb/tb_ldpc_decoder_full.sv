// tb_ldpc_decoder_full: end-to-end test of the decoder at its default size,
// the (9153,8256) code with 27 groups and 10 iterations, on four codewords.
//
// Codewords: in this code a word whose ones fill an even number of whole
// sub-matrix columns is a codeword (each row has exactly one one in every
// sub-matrix column), so non-zero codewords are drawn that way. The channel
// flips a few bits with low reliability, some with high reliability, and
// marks some correct bits as unreliable. Checks:
//   - every output group matches the reference model (ldpc_ref_pkg) bit for
//     bit, which addresses H directly instead of using the rotating CNUs;
//   - words with only weak errors decode to the transmitted codeword;
//   - the time from the first accepted group to done is G*(ITERS+1)-1 cycles
//     plus the stall cycles.
// Mechanisms that must occur: an input stall, back-to-back codewords, a
// stale global minimum replaced by the local one, corrected channel errors.
module tb_ldpc_decoder_full;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int P = SUB_P, DC = ROW_DEG, DV = COL_DEG, G = N_GROUPS, ITERS = N_ITERS;
  localparam int CPG = DC / G, NG = CPG * P, N = DC * P;
  localparam int IDX_W = $clog2(G + 1);
  localparam int N_WORDS = 4;

  logic clk = 0, rst_n = 0;
  logic ch_valid = 0;
  logic [CH_W-1:0] ch_in [NG];
  logic in_ready, out_valid, done, busy;
  logic [$clog2(ITERS + 1)-1:0] iter;
  logic [IDX_W-1:0] out_grp;
  logic [NG-1:0] out_bits;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_b2b = 0, n_corrected = 0;
  ldpc_ref model;

  bit       cw   [N_WORDS][N];
  bit [1:0] chv  [N_WORDS][N];
  bit       weak_only [N_WORDS];
  int       hard_err  [N_WORDS];

  task automatic make_word(int w);
    bit blk [DC];
    int cnt = 0, nerr = 0;
    bit has_strong = 0;
    for (int j = 0; j < DC; j++) begin blk[j] = $urandom_range(0, 1); cnt += blk[j]; end
    if (cnt % 2) blk[0] = ~blk[0];
    for (int k = 0; k < N; k++) begin
      int r;
      bit b;
      b = blk[k / P];
      cw[w][k] = b;
      r = $urandom_range(0, 9999);
      if (r < 20)      begin chv[w][k] = {~b, 1'b0}; nerr++; end
      else if (w % 2 == 1 && r < 23) begin chv[w][k] = {~b, 1'b1}; nerr++; has_strong = 1; end
      else if (r < 800)       chv[w][k] = {b, 1'b0};
      else                    chv[w][k] = {b, 1'b1};
    end
    // About 0.2% weak errors are well within reach of the code.
    weak_only[w] = !has_strong;
    hard_err[w]  = nerr;
  endtask

  // Driver: one group per accepted cycle, random stalls, sometimes the next
  // word right after done.
  int accept_cycle [N_WORDS];
  int stalls_of [N_WORDS];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    model = new(P, DC, DV, G);
    foreach (ch_in[k]) ch_in[k] = '0;
    for (int w = 0; w < N_WORDS; w++) make_word(w);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < N_WORDS; w++) begin
      stalls_of[w] = 0;
      for (int g = 0; g < G; g++) begin
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        if (g > 0 && $urandom_range(0, 3) == 0) begin
          ch_valid = 0;
          stalls_of[w]++;
          n_stall++;
          @(negedge clk);
        end
        for (int k = 0; k < NG; k++) ch_in[k] = chv[w][g * NG + k];
        ch_valid = 1;
        if (g == 0) accept_cycle[w] = cyc;
      end
      @(negedge clk);
      ch_valid = 0;
      if (w % 3 != 2) begin
        // Next word immediately after done.
        wait (done);
      end else begin
        wait (done);
        repeat ($urandom_range(1, 4)) @(negedge clk);
      end
    end
    wait (done);
    @(negedge clk);
    @(negedge clk);
    finish_test();
  end

  // Monitor: mirrors every decoder cycle in the model.
  int w_out = 0;
  int prev_done_cyc = -10;
  bit dec [N];
  always @(posedge clk) if (rst_n) begin
    bit advance, init;
    bit h [];
    bit [1:0] grp_ch [];
    advance = (ch_valid && in_ready) || (busy && !in_ready);
    init    = in_ready;
    if (advance) begin
      grp_ch = new[NG];
      foreach (grp_ch[k]) grp_ch[k] = ch_in[k];
      if (init && out_grp == 0 && cyc == prev_done_cyc + 1) n_b2b++;
      model.step(int'(out_grp), init, grp_ch, h);
      if (out_valid) begin
        bit ok;
        ok = 1;
        for (int k = 0; k < NG; k++) begin
          if (out_bits[k] !== h[k]) ok = 0;
          dec[int'(out_grp) * NG + k] = out_bits[k];
        end
        checks++;
        if (!ok) begin
          failures++;
          $display("MISMATCH word %0d group %0d", w_out, out_grp);
        end
        checks++;
        if (int'(iter) != ITERS - 1) begin
          failures++;
          $display("output during iteration %0d", iter);
        end
      end
      if (done) begin
        int exp_cyc, errs;
        errs = 0;
        for (int k = 0; k < N; k++) if (dec[k] != cw[w_out][k]) errs++;
        if (weak_only[w_out]) begin
          checks++;
          if (errs != 0) begin
            failures++;
            $display("word %0d: %0d residual errors", w_out, errs);
          end
        end
        if (errs == 0 && hard_err[w_out] > 0) n_corrected++;
        exp_cyc = accept_cycle[w_out] + G * (ITERS + 1) - 1 + stalls_of[w_out];
        checks++;
        if (cyc != exp_cyc) begin
          failures++;
          $display("word %0d: done at cycle %0d, expected %0d", w_out, cyc, exp_cyc);
        end
        prev_done_cyc = cyc;
        w_out++;
      end
    end
  end

  task automatic finish_test();
    checks++;
    if (w_out != N_WORDS) begin failures++; $display("only %0d words decoded", w_out); end
    $display("mechanisms: stalls=%0d back_to_back=%0d stale_min_replacements=%0d corrected_words=%0d",
             n_stall, n_b2b, model.stale_replacements, n_corrected);
    checks += 4;
    if (n_stall == 0) failures++;
    if (n_b2b == 0) failures++;
    if (model.stale_replacements == 0) failures++;
    if (n_corrected == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (N_WORDS * (G * (ITERS + 1) + 30) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
