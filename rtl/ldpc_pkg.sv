// ldpc_pkg: types, constants and helper functions shared by the (9153,8256)
// QC-LDPC decoder.
//
// Code: the parity-check matrix H is an array of DV x DC circulant
// sub-matrices of size P x P (P prime). Sub-matrix (i,j) is the identity
// cyclically shifted by S(i,j) = (j + (j+1)*i) mod P, the permutation-matrix
// construction, which has no 4-cycles. With P = 113, DC = 81 and DV = 8 the
// code length is 81*113 = 9153 and H has 8*113 = 904 rows. Circulant
// convention (this design's choice): row r of a sub-matrix with shift s has
// its single one in column (r + s) mod P.
//
// Messages between CNUs and VNUs are 4 bits. The VNU works in two's
// complement (2 integer, 2 fraction bits, i.e. units of 0.25); the CNU works
// in sign-magnitude: a sign bit and a 3-bit magnitude 0..7.
package ldpc_pkg;

  // Default code and decoder dimensions.
  localparam int unsigned SUB_P     = 113; // circulant size (prime)
  localparam int unsigned ROW_DEG   = 81;  // DC, sub-matrix columns
  localparam int unsigned COL_DEG   = 8;   // DV, sub-matrix rows
  localparam int unsigned N_GROUPS  = 27;  // G, VSS groups
  localparam int unsigned N_ITERS   = 10;  // decoding iterations

  localparam int unsigned MAG_W     = 3;   // CNU magnitude width
  localparam int unsigned CH_W      = 2;   // soft channel input width
  localparam int unsigned SUM_W     = 8;   // VNU adder width (signed)

  // 2-bit soft read: ch[1] is the hard decision (1 = data '1', negative LLR),
  // ch[0] is the reliability (1 = outside the +/-f band around zero).
  // Non-linear levels V_max = 1.75 and V_min = 0.5 in units of 0.25.
  localparam int LLR_STRONG = 7;
  localparam int LLR_WEAK   = 2;

  localparam logic [MAG_W-1:0] MAG_MAX = '1; // "infinity" of the sorter

  typedef struct packed {
    logic             sgn; // 1 = negative
    logic [MAG_W-1:0] mag;
  } msg_t;

  typedef logic signed [SUM_W-1:0] sum_t;

  // Shift of circulant (i,j) for circulant size p.
  function automatic int unsigned circ_shift(int unsigned i, int unsigned j,
                                             int unsigned p);
    return (j + (j + 1) * i) % p;
  endfunction

  // Sign-magnitude message to two's complement.
  function automatic sum_t sm2tc(msg_t m);
    sum_t v;
    v = sum_t'({1'b0, m.mag});
    return m.sgn ? -v : v;
  endfunction

  // Two's complement to 4-bit sign-magnitude with saturation to +/-7.
  function automatic msg_t tc2sm(sum_t v);
    msg_t m;
    sum_t a;
    m.sgn = v[SUM_W-1];
    a     = m.sgn ? -v : v;
    m.mag = (a > sum_t'(MAG_MAX)) ? MAG_MAX : a[MAG_W-1:0];
    return m;
  endfunction

  // Non-linear mapping of the 2-bit soft input to a channel LLR.
  function automatic sum_t llr_map(logic [CH_W-1:0] ch);
    sum_t v;
    v = ch[0] ? sum_t'(LLR_STRONG) : sum_t'(LLR_WEAK);
    return ch[1] ? -v : v;
  endfunction

endpackage
