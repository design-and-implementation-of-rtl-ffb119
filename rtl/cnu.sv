// cnu: check node unit for variable-node-centric sequential scheduling (VSS)
// with the accumulative sorter that keeps no second minimum.
//
// A check row of degree DC is visited in G groups of CPG = DC/G edges, one
// group per clock. The unit keeps, for its row:
//   gmin/gidx  global first minimum over the latest magnitudes and the group
//              it came from,
//   lmin/lidx  "local" first minimum: the best value seen from a group other
//              than gidx, used instead of a true second minimum,
//   sgn[DC]    the latest sign of every edge.
// In the cycle that serves group g the unit
//   1. sends the check-to-variable message for the CPG edges of group g:
//      magnitude = (gidx == g ? lmin : gmin) * 0.5 (normalized min-sum,
//      beta = 0.5, rounded down), sign = XOR of all stored signs except the
//      edge's own;
//   2. absorbs the CPG new variable-to-check messages of group g: their
//      minimum and the surviving old minimum are sorted (a 2-input global
//      sorter); the smaller becomes gmin, the larger competes with lmin.
//      A stored minimum that came from group g is stale and is dropped first.
// The updated state (upd) is combinational; the register loads nxt, which the
// shifting network takes from a neighbouring CNU of the same row block, so a
// row's state moves from CNU to CNU. clr makes the unit treat its register
// as empty (start of a new codeword); en = 0 holds the register.
// Following the document: the sorter without 2nd minimum, the local minimum
// used as 2nd minimum and the replacement of a stale global minimum, beta =
// 0.5, 4-bit messages, 81 stored signs and two 5-bit group indices. This
// design's own choices: the rounding of beta, keeping the larger of the two
// sorted values as the new local minimum, and dropping a stale local minimum.
// Because of the halving, the top bit of eps_out[].mag is always zero; the
// 4-bit message format is kept on the wires as in the document.
module cnu
  import ldpc_pkg::*;
#(
  parameter int unsigned DC    = ROW_DEG,
  parameter int unsigned G     = N_GROUPS,
  parameter int unsigned CPG   = DC / G,
  parameter int unsigned IDX_W = $clog2(G + 1),
  parameter int unsigned W     = DC + 2 * IDX_W + 2 * MAG_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clr,
  input  logic [IDX_W-1:0] grp,
  input  msg_t             z_in  [CPG], // variable-to-check, group grp
  output msg_t             eps_out[CPG], // check-to-variable, group grp
  output logic [W-1:0]     upd,          // state after this cycle
  input  logic [W-1:0]     nxt           // state to load (from the network)
);

  localparam logic [IDX_W-1:0] NONE = '1; // no group

  typedef struct packed {
    logic [DC-1:0]    sgn;
    logic [IDX_W-1:0] lidx;
    logic [MAG_W-1:0] lmin;
    logic [IDX_W-1:0] gidx;
    logic [MAG_W-1:0] gmin;
  } state_t;

  localparam state_t EMPTY = '{sgn: '0, lidx: NONE, lmin: MAG_MAX,
                               gidx: NONE, gmin: MAG_MAX};

  state_t q, cur, nx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= EMPTY;
    else if (en) q <= state_t'(nxt);
  end

  // Current view of the state.
  assign cur = clr ? EMPTY : q;

  logic             stale_g, stale_l;
  logic [MAG_W-1:0] base_m, keep_m, new_m, hi_m;
  logic [IDX_W-1:0] base_i, keep_i, hi_i;
  logic             parity;

  always_comb begin
    stale_g = (cur.gidx == grp);
    stale_l = (cur.lidx == grp);
    // Minimum of the other groups, as the document's sorter sees it.
    if (stale_g && !stale_l) begin
      base_m = cur.lmin;  base_i = cur.lidx;
    end else if (stale_g) begin
      base_m = MAG_MAX;   base_i = NONE;
    end else begin
      base_m = cur.gmin;  base_i = cur.gidx;
    end
    // Local register after removing stale content.
    if (stale_g || stale_l) begin
      keep_m = MAG_MAX;   keep_i = NONE;
    end else begin
      keep_m = cur.lmin;  keep_i = cur.lidx;
    end

  end

  // Outgoing messages: they depend on the stored state only.
  always_comb begin
    parity = ^cur.sgn;
    for (int c = 0; c < CPG; c++) begin
      eps_out[c].mag = base_m >> 1;
      eps_out[c].sgn = parity ^ cur.sgn[int'(grp) * CPG + c];
    end
  end

  always_comb begin
    // Local sorter over the new group.
    new_m = MAG_MAX;
    for (int c = 0; c < CPG; c++)
      if (z_in[c].mag < new_m) new_m = z_in[c].mag;

    // Global sorter (2 inputs) and local update.
    nx = cur;
    if (new_m < base_m) begin
      nx.gmin = new_m;  nx.gidx = grp;
      hi_m    = base_m; hi_i    = base_i;
    end else begin
      nx.gmin = base_m; nx.gidx = base_i;
      hi_m    = new_m;  hi_i    = grp;
    end
    if (hi_m < keep_m) begin
      nx.lmin = hi_m;   nx.lidx = hi_i;
    end else begin
      nx.lmin = keep_m; nx.lidx = keep_i;
    end
    for (int c = 0; c < CPG; c++)
      nx.sgn[int'(grp) * CPG + c] = z_in[c].sgn;
  end

  assign upd = W'(nx);

endmodule
