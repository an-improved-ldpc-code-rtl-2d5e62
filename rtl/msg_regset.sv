// msg_regset -- one extrinsic message register-set R of the decoder.
//
// It holds the V = 120 messages of one circulant term x^OFF: entry c belongs
// to the edge between code bit c of its block column and parity row
// (c - OFF) mod V.  The set is stored in column order, so
//   * the variable phase (rot = 0) reads and writes entries P*step + p,
//   * the check phase   (rot = 1) reads and writes entries
//     (P*step + p + OFF) mod V, i.e. rows P*step + p,
//   * the initial flush writes NIN consecutive entries NIN*blk + i.
// The step counter drives the read multiplexer and the write de-multiplexer,
// as the document describes; the column-order storage is this design's own.
// Reads are combinational from the registers; a write takes effect at the
// clock edge.  The flush has priority over a message write.  Entries are not
// reset: the flush of a frame overwrites all of them.
module msg_regset
  import ldpc_pkg::*;
#(
  parameter int OFF = 0
) (
  input  logic                     clk,
  // initial flush of the channel LLRs
  input  logic                     init_we,
  input  logic [1:0]               init_blk,
  input  msg_t                     init_data [NIN],
  // read port (to a CNFU or a VNFU)
  input  logic                     rd_rot,
  input  logic [$clog2(NSTEP)-1:0] rd_step,
  output msg_t                     rd_data [P],
  // write-back port (from a CNFU or a VNFU)
  input  logic                     wr_en,
  input  logic                     wr_rot,
  input  logic [$clog2(NSTEP)-1:0] wr_step,
  input  msg_t                     wr_data [P]
);
  localparam int AW = $clog2(2 * V);
  localparam int IW = $clog2(V);

  msg_t mem [V];

  function automatic logic [IW-1:0] addr(input logic rot,
                                         input logic [$clog2(NSTEP)-1:0] step,
                                         input logic [AW-1:0] p);
    logic [AW-1:0] a;
    a = AW'(P) * AW'(step) + p + (rot ? AW'(OFF) : '0);
    if (a >= AW'(V)) a -= AW'(V);
    return a[IW-1:0];
  endfunction

  always_comb begin
    for (int p = 0; p < P; p++) rd_data[p] = mem[addr(rd_rot, rd_step, AW'(p))];
  end

  always_ff @(posedge clk) begin
    if (init_we) begin
      for (int i = 0; i < NIN; i++) mem[NIN * int'(init_blk) + i] <= init_data[i];
    end else if (wr_en) begin
      for (int p = 0; p < P; p++) mem[addr(wr_rot, wr_step, AW'(p))] <= wr_data[p];
    end
  end
endmodule
