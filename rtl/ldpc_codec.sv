// ldpc_codec -- encoder and decoder of the rate-3/4, length-960 LDPC code
// built from 2 x 8 circulants of size 120, side by side.
//
// The two halves share no signals: the encoder (qc_encoder) turns 720 data
// bits, 10 per beat, into the 240 parity bits of the systematic codeword
// [d, p1, p2]; the decoder (ldpc_decoder) takes 960 channel LLRs, 40 per
// beat, and returns the 720 decoded data bits, 10 per beat, after at most
// 10 sum-product iterations.  The channel between them (modulation, noise,
// quantisation to [6:2] LLRs) is outside this design.  See the two modules
// for their protocols and timing.
module ldpc_codec
  import ldpc_pkg::*;
#(
  parameter int MAX_ITER = 10
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // encoder
  input  logic                          enc_valid,
  output logic                          enc_ready,
  input  logic [NOUT-1:0]               enc_data,
  output logic                          enc_done,
  output logic [2*V-1:0]                enc_parity,
  // decoder
  input  logic                          dec_in_valid,
  output logic                          dec_in_ready,
  input  llr_t                          dec_in_llr [NIN],
  output logic                          dec_out_valid,
  output logic [NOUT-1:0]               dec_out_data,
  output logic                          dec_done,
  output logic                          dec_converged,
  output logic [$clog2(MAX_ITER+1)-1:0] dec_iters
);
  qc_encoder #(.W(NOUT)) u_enc (
    .clk, .rst_n,
    .in_valid(enc_valid), .in_ready(enc_ready), .in_data(enc_data),
    .done(enc_done), .parity(enc_parity)
  );

  ldpc_decoder #(.MAX_ITER(MAX_ITER)) u_dec (
    .clk, .rst_n,
    .in_valid(dec_in_valid), .in_ready(dec_in_ready), .in_llr(dec_in_llr),
    .out_valid(dec_out_valid), .out_data(dec_out_data),
    .done(dec_done), .converged(dec_converged), .iters(dec_iters)
  );
endmodule
