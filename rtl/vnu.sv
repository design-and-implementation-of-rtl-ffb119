// vnu: variable node unit of the VSS decoder.
//
// One VNU serves one bit position of every group: it holds G 2-bit soft
// channel values (one per group) and, in the cycle that serves group grp,
// works on the bit of that group:
//   P      = non-linear LLR of the 2-bit channel value (+/-1.75 or +/-0.5,
//            i.e. +/-7 or +/-2 in 0.25 units),
//   total  = P + sum of the DV check-to-variable messages (a DV+1 input
//            adder, sign-magnitude converted to two's complement first),
//   z[i]   = total - eps[i], saturated to 4 bits and converted back to
//            sign-magnitude for CNU i,
//   hard   = 1 when total < 0.
// When init is high the check messages are ignored (z[i] = P), the channel
// value comes straight from ch_in and is written into the register of group
// grp. The unit is combinational apart from the channel registers, which
// load only when en is high. Following the document: G channel registers of
// 2 bits, 4-bit messages, the DV+1 input adder, SM/TC conversions and the
// non-linear 2-bit to 4-bit mapping. This design's own choices: the 2-bit
// code (hard bit, reliability bit) and saturation of the outgoing messages.
module vnu
  import ldpc_pkg::*;
#(
  parameter int unsigned G     = N_GROUPS,
  parameter int unsigned DV    = COL_DEG,
  parameter int unsigned IDX_W = $clog2(G + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            init,
  input  logic [IDX_W-1:0] grp,
  input  logic [CH_W-1:0] ch_in,
  input  msg_t            eps_in [DV],
  output msg_t            z_out  [DV],
  output logic            hard
);

  logic [CH_W-1:0] ch_q [G];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < G; k++) ch_q[k] <= '0;
    end else if (en && init) begin
      ch_q[grp] <= ch_in;
    end
  end

  sum_t llr, total;
  sum_t eps_tc [DV];

  always_comb begin
    llr   = llr_map(init ? ch_in : ch_q[grp]);
    total = llr;
    for (int i = 0; i < DV; i++) begin
      eps_tc[i] = init ? sum_t'(0) : sm2tc(eps_in[i]);
      total     = total + eps_tc[i];
    end
    for (int i = 0; i < DV; i++)
      z_out[i] = tc2sm(total - eps_tc[i]);
  end

  assign hard = total[SUM_W-1];

endmodule
