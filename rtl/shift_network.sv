// shift_network: moves check-node states between the P CNUs of one row block.
//
// Because every circulant shift of the code is S(i,j) = (j + (j+1)*i) mod P,
// the shift of sub-matrix row i grows by a constant D = CPG*(i+1) mod P from
// one group of CPG sub-matrix columns to the next. If the CNU states of row
// block i are rotated by D positions after each decoding cycle, every VNU can
// stay wired to a fixed CNU position and no routing network is needed between
// them. After the last group the states are rotated by WR = -(G-1)*D mod P
// instead, which brings every row back to its home position for group 0.
// Output q takes input (q - amount) mod P. Purely combinational: the CNU
// registers sit on the output side. The constant per-group rotation follows
// the document; the wrap-around rotation is this design's completion of it.
module shift_network #(
  parameter int unsigned P  = ldpc_pkg::SUB_P,
  parameter int unsigned W  = 8,
  parameter int unsigned D  = 1,
  parameter int unsigned WR = 0
) (
  input  logic         wrap,
  input  logic [W-1:0] upd [P],
  output logic [W-1:0] nxt [P]
);

  for (genvar q = 0; q < P; q++) begin : g_pos
    localparam int unsigned SRC_D  = (q + P - (D % P)) % P;
    localparam int unsigned SRC_WR = (q + P - (WR % P)) % P;
    assign nxt[q] = wrap ? upd[SRC_WR] : upd[SRC_D];
  end

endmodule
