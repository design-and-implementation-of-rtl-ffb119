// tb_shift_network: self-checking test of the CNU-state rotation for row
// block 7 of the default code (P = 113, D = 3*8 = 24, wrap rotation
// -(26*24) mod 113).
//
// Random states are applied; output q must equal input (q - amount) mod P,
// with the amount chosen by wrap. A second part follows one logical row
// through a full iteration of 27 rotations (26 regular, 1 wrap) and checks
// it returns to its home position, which is what the fixed VNU wiring needs.
module tb_shift_network;
  import ldpc_pkg::*;

  localparam int P = SUB_P, W = 16;
  localparam int D  = (3 * 8) % P;
  localparam int WR = (P - ((N_GROUPS - 1) * D) % P) % P;

  logic wrap = 0;
  logic [W-1:0] upd [P];
  logic [W-1:0] nxt [P];

  shift_network #(.P(P), .W(W), .D(D), .WR(WR)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 40; n++) begin
      int amt;
      wrap = n[0];
      amt  = wrap ? WR : D;
      foreach (upd[q]) upd[q] = W'($urandom);
      #1;
      foreach (nxt[q]) begin
        checks++;
        if (nxt[q] !== upd[(q - amt + P) % P]) begin
          failures++;
          $display("wrap %0d position %0d wrong", wrap, q);
        end
      end
    end
    // Track where every row is after a whole iteration: tag rows by index.
    foreach (upd[q]) upd[q] = W'(q);
    for (int g = 0; g < N_GROUPS; g++) begin
      wrap = (g == N_GROUPS - 1);
      #1;
      begin
        logic [W-1:0] tmp [P];
        tmp = nxt;
        upd = tmp;
      end
    end
    #1;
    foreach (upd[q]) begin
      checks++;
      if (upd[q] != W'(q)) begin failures++; $display("row %0d not home", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
