// llr_regs -- receiving buffer ("L registers") of the channel LLRs.
//
// Holds the N = 960 received [6:2] two's-complement LLRs of one frame.  The
// input side writes NIN = 40 symbols per beat (240 bits), beat b filling
// symbols NIN*b .. NIN*b+NIN-1, so a frame takes NBEAT = 24 beats.  The read
// side serves the variable phase: for row group `step` it returns, for each
// of the NCB block columns, the P symbols V*j + P*step + p.  Reads are
// combinational; writes take effect at the clock edge.  No reset: a frame
// overwrites every entry before it is read.  The widths and rates follow the
// document; the storage order is this design's own.
module llr_regs
  import ldpc_pkg::*;
(
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(NBEAT)-1:0] beat,
  input  llr_t                     wdata [NIN],
  input  logic [$clog2(NSTEP)-1:0] step,
  output llr_t                     rdata [NCB][P]
);
  llr_t mem [N];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < NIN; i++) mem[NIN * int'(beat) + i] <= wdata[i];
    end
  end

  always_comb begin
    for (int j = 0; j < NCB; j++)
      for (int p = 0; p < P; p++)
        rdata[j][p] = mem[V * j + P * int'(step) + p];
  end
endmodule
