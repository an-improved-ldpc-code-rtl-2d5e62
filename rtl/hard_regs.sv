// hard_regs -- hard decision registers ("x registers") of the decoder.
//
// Holds the N = 960 hard decisions.  During the variable phase the 80 VNFUs
// write P = 10 bits per block column per cycle: bit V*j + P*step + p.  The
// whole vector is visible to the parity check unit.  For the output the
// first K = 720 bits (the data part of the systematic codeword [d, p1, p2])
// are read NOUT = 10 per beat: beat k returns bits NOUT*k .. NOUT*k+9, bit 0
// of the word being the lowest index.  Writes take effect at the clock edge;
// the output word is combinational from the registers.  Widths and rates
// follow the document; the bit order is this design's own.
module hard_regs
  import ldpc_pkg::*;
(
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(NSTEP)-1:0]  wstep,
  input  logic [NCB-1:0][P-1:0]     wdata,
  output logic [N-1:0]              x,
  input  logic [$clog2(NOBEAT)-1:0] obeat,
  output logic [NOUT-1:0]           odata
);
  always_ff @(posedge clk) begin
    if (we) begin
      for (int j = 0; j < NCB; j++)
        for (int p = 0; p < P; p++)
          x[V * j + P * int'(wstep) + p] <= wdata[j][p];
    end
  end

  assign odata = x[NOUT * int'(obeat) +: NOUT];
endmodule
