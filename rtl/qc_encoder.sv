// qc_encoder -- two-step systematic encoder for the rate-3/4, length-960
// code.  The codeword is [d, p1, p2]: 720 data bits d (block columns 0..5),
// then parity p1 (block column 6) and p2 (block column 7), 120 bits each.
//
// With C = A9 = B10 = the circulant of 1 + x^10 + x^30 (invertible):
//   step 1:  p1 = C^-1 * sum_{j<6} A_j d_j
//   step 2:  p2 = C^-1 * (sum_{j<6} B_j d_j + B9 p1)
// For circulants these products are polynomial products mod x^120 - 1, so
// data bit k of block column j adds the generator column g_j, cyclically
// shifted by k, to the parity accumulator.  The generator columns are
//   g1_j = C^-1 a_j  (step 1),   g2_j = C^-1 b_j  (step 2),
// where a_j, b_j are column 0 of the circulants.  They are computed at
// elaboration: column 0 of C^-1 by Gaussian elimination over GF(2), then a
// cyclic convolution.  Each generator column sits in a shift register that
// advances W positions per beat, so the hardware is two 120-bit shift
// registers, two 120-bit accumulators and XOR gates: encoding effort grows
// linearly with the code length, as the document describes.
//
// Interface: W = 10 data bits per beat (bit w of beat b is data bit W*b + w)
// with a valid/ready handshake, 72 beats.  Both accumulators run during the
// data beats; afterwards p1 itself is fed through the step-2 shift register in
// V/W = 12 more cycles.  `done` pulses for one cycle with `parity` = {p2, p1}
// valid (p1 in bits 0..119) until the next frame starts.  Reset is
// asynchronous, active low.
// The encoding equations follow the document; the beat width, the handshake
// and the way the generator columns are produced are this design's own.
module qc_encoder
  import ldpc_pkg::*;
#(
  parameter int W = NOUT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [W-1:0]   in_data,
  output logic           done,
  output logic [2*V-1:0] parity
);
  typedef logic [V-1:0] vec_t;
  localparam int BPB   = V / W;            // beats per block column (12)
  localparam int NDATA = K / W;            // data beats (72)

  // column 0 of the circulant with first row sum of x^d over the terms of
  // block row rb in block column j
  function automatic vec_t col0(input int rb, input int j);
    vec_t v = '0;
    for (int e = 0; e < NE; e++)
      if (e / NE_ROW == rb && EDGE_CB[e] == j) v[(V - EDGE_OFF[e]) % V] ^= 1'b1;
    return v;
  endfunction

  function automatic vec_t rotl(input vec_t v, input int k);
    vec_t r;
    for (int i = 0; i < V; i++) r[(i + k) % V] = v[i];
    return r;
  endfunction

  // product of two circulants given by their column 0
  function automatic vec_t cmul(input vec_t a, input vec_t b);
    vec_t r = '0;
    for (int k = 0; k < V; k++) if (b[k]) r ^= rotl(a, k);
    return r;
  endfunction

  // column 0 of the inverse of the circulant with column 0 c:
  // solve C y = e0 by Gauss-Jordan elimination
  function automatic vec_t cinv(input vec_t c);
    logic [V:0] m [V];
    logic [V:0] t;
    vec_t y;
    vec_t rowv;
    for (int r = 0; r < V; r++) begin
      // row r of C: C[r][k] = c[(r - k) mod V]
      for (int k = 0; k < V; k++) rowv[k] = c[(r - k + V) % V];
      m[r] = {(r == 0), rowv};
    end
    for (int k = 0; k < V; k++) begin
      int piv = k;
      while (piv < V - 1 && !m[piv][k]) piv++;
      t = m[k]; m[k] = m[piv]; m[piv] = t;
      for (int r = 0; r < V; r++) if (r != k && m[r][k]) m[r] ^= m[k];
    end
    for (int k = 0; k < V; k++) y[k] = m[k][V];
    return y;
  endfunction

  localparam vec_t CINV = cinv(col0(0, NCB - 2));

  function automatic vec_t gen(input int rb, input int j);
    return cmul(CINV, col0(rb, j));
  endfunction

  // ------------------------------------------------------------- datapath
  typedef enum logic [1:0] {S_DATA, S_P1, S_DONE} state_t;
  state_t                    state;
  logic [$clog2(NDATA)-1:0]  beat;     // beat within the current pass
  vec_t                      sh1, sh2; // generator columns, shifted
  vec_t                      acc1, acc2;
  vec_t                      p1_sr;    // p1 bits fed to step 2

  wire  data_fire = in_valid & in_ready;
  wire  [W-1:0] bits2 = (state != S_P1) ? in_data :
                        (beat == '0)     ? acc1[W-1:0] : p1_sr[W-1:0];
  wire  last_in_blk = (int'(beat) % BPB) == BPB - 1;
  wire  [$clog2(NCB)-1:0] blk = ($clog2(NCB))'(int'(beat) / BPB);

  vec_t add1, add2;
  always_comb begin
    add1 = '0;
    add2 = '0;
    for (int w = 0; w < W; w++) begin
      if (in_data[w]) add1 ^= rotl(sh1, w);
      if (bits2[w])   add2 ^= rotl(sh2, w);
    end
  end

  // generator columns of every block column (constants)
  vec_t G1 [NCB-2];
  vec_t G2 [NCB-1];
  for (genvar j = 0; j < NCB - 2; j++) begin : g_g1
    assign G1[j] = gen(0, j);
  end
  for (genvar j = 0; j < NCB - 1; j++) begin : g_g2
    assign G2[j] = gen(1, j);
  end

  assign in_ready = (state == S_DATA) || (state == S_DONE);
  assign parity   = {acc2, acc1};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_DONE;
      beat  <= '0;
      sh1   <= G1[0];
      sh2   <= G2[0];
      acc1  <= '0;
      acc2  <= '0;
      p1_sr <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_DONE, S_DATA: if (data_fire) begin
          if (state == S_DONE) begin
            // first beat of a frame: start from empty accumulators
            acc1 <= add1;
            acc2 <= add2;
          end else begin
            acc1 <= acc1 ^ add1;
            acc2 <= acc2 ^ add2;
          end
          if (state == S_DONE) state <= S_DATA;
          if (int'(beat) == NDATA - 1) begin
            state <= S_P1;
            beat  <= '0;
            sh2   <= G2[NCB-2];
            sh1   <= G1[0];
          end else begin
            beat <= beat + 1'b1;
            if (last_in_blk) begin
              sh1 <= G1[int'(blk) + 1];
              sh2 <= G2[int'(blk) + 1];
            end else begin
              sh1 <= rotl(sh1, W);
              sh2 <= rotl(sh2, W);
            end
          end
        end
        S_P1: begin
          if (beat == '0) p1_sr <= acc1 >> W;
          else            p1_sr <= p1_sr >> W;
          acc2 <= acc2 ^ add2;
          sh2  <= rotl(sh2, W);
          if (int'(beat) == BPB - 1) begin
            state <= S_DONE;
            beat  <= '0;
            sh1   <= G1[0];
            sh2   <= G2[0];
            done  <= 1'b1;
          end else beat <= beat + 1'b1;
        end
        default: state <= S_DONE;
      endcase
    end
  end
endmodule
