// tb_decoder_ctrl: self-checking test of the decoder schedule with G = 4
// groups and 3 iterations.
//
// Codewords are fed with random stalls (ch_valid low during initialization)
// and sometimes back to back. A cycle counter in the testbench predicts
// every output: initialization cycles carry init/in_ready and the group in
// order, the first of them clr; decoding cycles run groups 0..G-1 ITERS
// times without stalls; out_valid is high in the last iteration only; done
// and wrap on the last group; the whole codeword takes G*(ITERS+1) advancing
// cycles.
module tb_decoder_ctrl;

  localparam int G = 4, ITERS = 3;
  localparam int IDX_W = $clog2(G + 1), IT_W = $clog2(ITERS + 1);

  logic clk = 0, rst_n = 0, ch_valid = 0;
  logic in_ready, en, init, clr, wrap, out_valid, done, busy;
  logic [IDX_W-1:0] grp;
  logic [IT_W-1:0] iter;

  decoder_ctrl #(.G(G), .ITERS(ITERS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_stall = 0, n_b2b = 0, words = 0;
  int step = 0;      // advancing cycles within the current codeword
  bit active = 0;

  task automatic expect_bit(string name, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("step %0d: %s = %0b, expected %0b", step, name, got, exp);
    end
  endtask

  // Driver.
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 12; w++) begin
      if (w % 2 == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
      else n_b2b++;
      for (int g = 0; g < G; g++) begin
        @(negedge clk);
        if ($urandom_range(0, 2) == 0) begin
          ch_valid = 0; n_stall++;
          @(negedge clk);
        end
        ch_valid = 1;
      end
      @(negedge clk);
      ch_valid = 0;
      while (!done) @(negedge clk);
    end
    @(negedge clk);
    $display("mechanisms: stalls=%0d back_to_back=%0d words=%0d", n_stall, n_b2b, words);
    checks += 3;
    if (n_stall == 0) failures++;
    if (n_b2b == 0) failures++;
    if (words != 12) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker.
  always @(posedge clk) if (rst_n) begin
    int g_exp, it_exp;
    bit in_init;
    if (!active) begin
      expect_bit("busy", busy, 0);
      expect_bit("in_ready", in_ready, 1);
      expect_bit("en", en, ch_valid);
      if (ch_valid) begin
        active = 1; step = 0;
      end
    end
    if (active) begin
      in_init = (step < G);
      g_exp   = step % G;
      it_exp  = step / G - 1;
      expect_bit("init", init, in_init);
      expect_bit("in_ready", in_ready, in_init);
      expect_bit("clr", clr, step == 0);
      expect_bit("en", en, in_init ? ch_valid : 1'b1);
      checks++;
      if (int'(grp) != g_exp) begin
        failures++; $display("step %0d: grp %0d expected %0d", step, grp, g_exp);
      end
      if (!in_init) begin
        checks++;
        if (int'(iter) != it_exp) begin
          failures++; $display("step %0d: iter %0d expected %0d", step, iter, it_exp);
        end
      end
      expect_bit("wrap", wrap, g_exp == G - 1);
      expect_bit("out_valid", out_valid, !in_init && it_exp == ITERS - 1);
      expect_bit("done", done, step == G * (ITERS + 1) - 1);
      if (en) begin
        if (step == G * (ITERS + 1) - 1) begin
          active = 0; words++;
        end else step++;
      end
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
