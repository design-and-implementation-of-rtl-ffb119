// tb_vnu: self-checking test of one variable node unit at its default size
// (27 channel registers, column degree 8).
//
// An initialization pass writes a random 2-bit channel value per group
// (init = 1, check messages must be ignored), with some hold cycles whose
// writes must be dropped. Then random check messages are applied for random
// groups. The expected results are computed in integers: LLR = +/-7 for a
// reliable and +/-2 for an unreliable bit (negative when ch[1] = 1), total =
// LLR + sum of the messages, outgoing message = total - own message clipped
// to +/-7, hard decision = total < 0. Counted: saturated messages, negative
// hard decisions.
module tb_vnu;
  import ldpc_pkg::*;

  localparam int G = N_GROUPS, DV = COL_DEG;
  localparam int IDX_W = $clog2(G + 1);

  logic clk = 0, rst_n = 0, en = 0, init = 0;
  logic [IDX_W-1:0] grp = '0;
  logic [CH_W-1:0] ch_in = '0;
  msg_t eps_in [DV];
  msg_t z_out [DV];
  logic hard;

  vnu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0, n_neg = 0;
  bit [1:0] chm [G];

  function automatic int mval(msg_t m);
    return m.sgn ? -int'(m.mag) : int'(m.mag);
  endfunction

  task automatic check_outputs(bit [1:0] ch, bit use_eps);
    int llr, tot, v, e;
    llr = ch[0] ? 7 : 2;
    if (ch[1]) llr = -llr;
    tot = llr;
    for (int i = 0; i < DV; i++) tot += use_eps ? mval(eps_in[i]) : 0;
    for (int i = 0; i < DV; i++) begin
      e = use_eps ? mval(eps_in[i]) : 0;
      v = tot - e;
      if (v > 7 || v < -7) n_sat++;
      v = v > 7 ? 7 : (v < -7 ? -7 : v);
      checks++;
      if (mval(z_out[i]) != v || (v == 0 && z_out[i].sgn)) begin
        failures++;
        $display("grp %0d edge %0d: got %0d expected %0d", grp, i, mval(z_out[i]), v);
      end
    end
    checks++;
    if (hard != (tot < 0)) begin failures++; $display("hard decision wrong, total %0d", tot); end
    if (tot < 0) n_neg++;
  endtask

  initial begin
    foreach (eps_in[i]) eps_in[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Initialization: store one channel value per group.
    for (int g = 0; g < G; g++) begin
      @(negedge clk);
      init = 1; grp = IDX_W'(g);
      foreach (eps_in[i]) eps_in[i] = msg_t'($urandom);
      if ($urandom_range(0, 4) == 0) begin
        en = 0; ch_in = ~chm[g];  // must not be stored
        #1;
        @(negedge clk);
      end
      en = 1;
      chm[g] = 2'($urandom);
      ch_in  = chm[g];
      #1 check_outputs(chm[g], 0);
    end
    // Decoding cycles.
    for (int n = 0; n < 600; n++) begin
      int g;
      @(negedge clk);
      g = $urandom_range(0, G - 1);
      init = 0; en = 1; grp = IDX_W'(g);
      ch_in = 2'($urandom);  // ignored outside initialization
      foreach (eps_in[i]) begin
        eps_in[i].sgn = $urandom_range(0, 1);
        eps_in[i].mag = MAG_W'($urandom_range(0, (n % 2) ? 3 : 7));
      end
      #1 check_outputs(chm[g], 1);
    end
    $display("mechanisms: saturated=%0d negative=%0d", n_sat, n_neg);
    checks += 2;
    if (n_sat == 0) failures++;
    if (n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
