// ldpc_decoder: 2-bit soft-input decoder for the (9153,8256) quasi-cyclic
// LDPC code (P = 113, row degree 81, column degree 8, rate 0.9), using
// normalized min-sum with variable-node-centric sequential scheduling (VSS).
//
// The 9153 bits are split into G = 27 groups of CPG = 3 sub-matrix columns
// (NG = 339 bits). Each clock serves one group: the 904 CNUs (fully
// parallel, one per row of H) send check messages to the 339 VNUs (partially
// parallel, one per bit of a group); the VNUs add them to the channel LLR and
// send fresh variable messages straight back, which the CNUs absorb in the
// same cycle. No variable-to-check message is stored. After each cycle the
// shifting network rotates the CNU states inside each row block, so every
// VNU-to-CNU wire is fixed: VNU (c,t) (sub-matrix column c of the group,
// position t) talks to CNU (i, (t - S(i,c)) mod P) of row block i.
//
// Interface and timing (see decoder_ctrl): a codeword enters as G groups of
// NG 2-bit values on ch_in while ch_valid and in_ready are high (group g
// carries code bits g*NG .. g*NG+NG-1, element k = c*P + t); a low ch_valid
// stalls. Then ITERS iterations of G cycles follow. During the last one
// out_valid is high and out_bits holds the hard decisions of group out_grp
// (same bit order as ch_in); done marks the last group; iter counts the
// iterations. With the defaults a
// codeword takes 27 + 270 = 297 cycles, i.e. 8256 information bits per 297
// cycles (2.78 Gb/s at 100 MHz). The code, the group split, the unit counts,
// 10 iterations and the single-cycle CNU+VNU loop follow the document; the
// interface and the fixed iteration count without early stop are this
// design's own.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned P     = SUB_P,
  parameter int unsigned DC    = ROW_DEG,
  parameter int unsigned DV    = COL_DEG,
  parameter int unsigned G     = N_GROUPS,
  parameter int unsigned ITERS = N_ITERS,
  parameter int unsigned CPG   = DC / G,
  parameter int unsigned NG    = CPG * P,
  parameter int unsigned IDX_W = $clog2(G + 1),
  parameter int unsigned IT_W  = $clog2(ITERS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ch_valid,
  input  logic [CH_W-1:0]  ch_in [NG],
  output logic             in_ready,
  output logic             out_valid,
  output logic [IDX_W-1:0] out_grp,
  output logic [NG-1:0]    out_bits,
  output logic             done,
  output logic             busy,
  output logic [IT_W-1:0]  iter
);

  localparam int unsigned W = DC + 2 * IDX_W + 2 * MAG_W;

  logic             en, init, clr, wrap;
  logic [IDX_W-1:0] grp;

  decoder_ctrl #(.G(G), .ITERS(ITERS), .IDX_W(IDX_W), .IT_W(IT_W)) u_ctrl (
    .clk, .rst_n, .ch_valid, .in_ready, .en, .init, .clr, .wrap,
    .grp, .iter, .out_valid, .done, .busy
  );

  assign out_grp = grp;

  // Messages, indexed [row block i][CNU position q][edge c] on the CNU side
  // and [column c][position t][row block i] on the VNU side.
  msg_t eps_c [DV][P][CPG];
  msg_t z_c   [DV][P][CPG];
  msg_t eps_v [CPG][P][DV];
  msg_t z_v   [CPG][P][DV];

  // Variable node units.
  for (genvar c = 0; c < CPG; c++) begin : g_vc
    for (genvar t = 0; t < P; t++) begin : g_vt
      vnu #(.G(G), .DV(DV), .IDX_W(IDX_W)) u_vnu (
        .clk, .rst_n, .en, .init, .grp,
        .ch_in (ch_in[c * P + t]),
        .eps_in(eps_v[c][t]),
        .z_out (z_v[c][t]),
        .hard  (out_bits[c * P + t])
      );
    end
  end

  // Check node units, one row block at a time, with its shifting network.
  for (genvar i = 0; i < DV; i++) begin : g_ci
    localparam int unsigned D  = (CPG * (i + 1)) % P;
    localparam int unsigned WR = (P - (((G - 1) * D) % P)) % P;

    logic [W-1:0] upd [P];
    logic [W-1:0] nxt [P];

    for (genvar q = 0; q < P; q++) begin : g_cq
      cnu #(.DC(DC), .G(G), .CPG(CPG), .IDX_W(IDX_W), .W(W)) u_cnu (
        .clk, .rst_n, .en, .clr, .grp,
        .z_in   (z_c[i][q]),
        .eps_out(eps_c[i][q]),
        .upd    (upd[q]),
        .nxt    (nxt[q])
      );
      // Fixed wiring between CNU (i,q) edge c and VNU (c, q + S(i,c)).
      for (genvar c = 0; c < CPG; c++) begin : g_edge
        localparam int unsigned T = (q + circ_shift(i, c, P)) % P;
        assign z_c[i][q][c]   = z_v[c][T][i];
        assign eps_v[c][T][i] = eps_c[i][q][c];
      end
    end

    shift_network #(.P(P), .W(W), .D(D), .WR(WR)) u_shift (
      .wrap, .upd, .nxt
    );
  end

endmodule
