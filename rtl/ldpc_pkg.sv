// ldpc_pkg -- shared constants, types and code tables of the rate-3/4,
// length-960 LDPC decoder.
//
// The parity-check matrix has two block rows (A and B) and eight block
// columns of 120x120 circulants:
//     H = [ A3 A4 A5 A6 A7 A8 A9 0   ]
//         [ B3 B4 B5 B6 B7 B8 B9 B10 ]
// A circulant a(x) = sum x^d has, in row r, a one in column (r + d) mod 120.
// Every single term x^d of a circulant is one "edge set": 120 edges, one per
// row, whose messages live in one extrinsic message register-set.  Each block
// row has 16 terms, so there are 32 register-sets (R_A,1..16, R_B,1..16) and
// both block rows have row weight 16.
//
// Messages are 6-bit [6:2] fixed point (4 integer, 2 fraction bits), kept in
// sign-magnitude form in the register-sets.  The polynomials, the circulant
// size, the parallel factor and the word length follow the document; the
// order of the edge sets inside a block row is this design's own choice.
package ldpc_pkg;

  parameter int V      = 120;       // circulant size
  parameter int P      = 10;        // parallel factor
  parameter int NSTEP  = V / P;     // cycles per check or variable phase (12)
  parameter int NCB    = 8;         // block columns
  parameter int NRB    = 2;         // block rows (A, B)
  parameter int N      = V * NCB;   // code length 960
  parameter int K      = V * (NCB - 2); // data bits 720
  parameter int NE     = 32;        // register-sets (circulant terms)
  parameter int NE_ROW = 16;        // terms per block row = CNFU inputs
  parameter int MAXDEG = 5;         // largest column weight
  parameter int QW     = 6;         // message word length [6:2]
  parameter int MW     = QW - 1;    // magnitude bits
  parameter int NIN    = 40;        // symbols per input beat (240 bits)
  parameter int NBEAT  = N / NIN;   // input beats per frame (24)
  parameter int NOUT   = 10;        // decoded bits per output beat
  parameter int NOBEAT = K / NOUT;  // output beats per frame (72)
  parameter int PIPE   = 2;         // CNFU / VNFU latency in cycles

  // Sign-magnitude message: sgn = 1 means negative (bit 1 more likely).
  typedef struct packed {
    logic          sgn;
    logic [MW-1:0] mag;
  } msg_t;

  typedef logic signed [QW-1:0] llr_t;  // channel LLR, two's complement [6:2]

  // Edge set e: block column and exponent d (Table 4.1, rate-3/4 code).
  // e = 0..15 belong to block row A, e = 16..31 to block row B.
  parameter int EDGE_CB [NE] = '{
    0, 0, 1, 1, 2, 2, 3, 3, 4, 4, 5, 5, 5, 6, 6, 6,      // A3..A9
    0, 0, 1, 1, 2, 2, 3, 3, 4, 4, 5, 5, 6, 7, 7, 7       // B3..B10
  };
  parameter int EDGE_OFF [NE] = '{
    6, 21,  7, 20,  3, 14, 11, 13,  1,  7,  2,  5, 34,  0, 10, 30,
   35, 53,  6, 31,  7, 24, 20, 31,  4, 13,  3,  7, 43,  0, 10, 30
  };

  // Column weight of block column j.
  function automatic int col_deg(input int j);
    int c = 0;
    for (int e = 0; e < NE; e++) if (EDGE_CB[e] == j) c++;
    return c;
  endfunction

  // Index of the k-th edge set of block column j.
  function automatic int col_edge(input int j, input int k);
    int c = 0;
    for (int e = 0; e < NE; e++)
      if (EDGE_CB[e] == j) begin
        if (c == k) return e;
        c++;
      end
    return 0;
  endfunction

  // Position of edge set e among the edge sets of its block column.
  function automatic int edge_rank(input int e);
    int c = 0;
    for (int i = 0; i < e; i++) if (EDGE_CB[i] == EDGE_CB[e]) c++;
    return c;
  endfunction

  // Two's complement LLR to sign-magnitude with saturation to +-31 (7.75).
  function automatic msg_t llr_to_msg(input llr_t l);
    msg_t m;
    m.sgn = l[QW-1];
    if (l == llr_t'(-(1 << (QW-1))))  m.mag = '1;
    else if (l[QW-1])                 m.mag = MW'(-l);
    else                              m.mag = MW'(l);
    return m;
  endfunction

endpackage
