// decoder_ctrl: schedule of the VSS decoder.
//
// A codeword takes G initialization cycles followed by ITERS iterations of G
// cycles each, one group per cycle: 27 + 27*10 = 297 cycles with the default
// parameters. During initialization the decoder accepts one group of soft
// channel values per cycle on ch_valid (in_ready is high); a cycle without
// ch_valid stalls the schedule and freezes every register. The first
// initialization cycle (taken straight from IDLE) clears the CNUs. Decoding
// cycles never stall. In the last iteration out_valid marks the hard
// decisions of group grp; done marks the last group. The next codeword can be
// accepted in the cycle after done, so codewords follow each other every
// G*(ITERS+1) cycles.
// Outputs:
//   en    advance: registers of CNUs, VNUs and the shifting network load
//   init  initialization cycle (VNUs ignore check messages)
//   clr   first initialization cycle of a codeword
//   wrap  last group: the shifting network returns rows to home position
// The initialization/iteration timing follows the document; the handshake
// (ch_valid/in_ready, stall, out_valid/done) is this design's own.
module decoder_ctrl #(
  parameter int unsigned G     = ldpc_pkg::N_GROUPS,
  parameter int unsigned ITERS = ldpc_pkg::N_ITERS,
  parameter int unsigned IDX_W = $clog2(G + 1),
  parameter int unsigned IT_W  = $clog2(ITERS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ch_valid,
  output logic             in_ready,
  output logic             en,
  output logic             init,
  output logic             clr,
  output logic             wrap,
  output logic [IDX_W-1:0] grp,
  output logic [IT_W-1:0]  iter,
  output logic             out_valid,
  output logic             done,
  output logic             busy
);

  typedef enum logic [1:0] {IDLE, INIT, ITER} state_e;

  state_e           st;
  logic [IDX_W-1:0] g_q;
  logic [IT_W-1:0]  it_q;

  assign in_ready  = (st != ITER);
  assign init      = (st != ITER);
  assign clr       = (st == IDLE);
  assign grp       = (st == IDLE) ? '0 : g_q;
  assign iter      = it_q;
  assign en        = (st == ITER) || ch_valid;
  assign wrap      = (grp == IDX_W'(G - 1));
  assign out_valid = (st == ITER) && (it_q == IT_W'(ITERS - 1));
  assign done      = out_valid && wrap;
  assign busy      = (st != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= IDLE;
      g_q  <= '0;
      it_q <= '0;
    end else if (en) begin
      if (wrap) g_q <= '0;
      else      g_q <= grp + 1'b1;
      unique case (st)
        IDLE, INIT: if (wrap) begin
          st   <= ITER;
          it_q <= '0;
        end else begin
          st   <= INIT;
        end
        ITER: if (wrap) begin
          if (it_q == IT_W'(ITERS - 1)) st <= IDLE;
          it_q <= it_q + 1'b1;
        end
        default: st <= IDLE;
      endcase
    end
  end

  // done always closes an output burst.
  a_done_in_burst: assert property (@(posedge clk) disable iff (!rst_n)
                                    done |-> out_valid);
  // No input is taken while decoding.
  a_no_input_in_iter: assert property (@(posedge clk) disable iff (!rst_n)
                                       (st == ITER) |-> !in_ready);

endmodule
