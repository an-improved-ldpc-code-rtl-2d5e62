// pcfu -- parity check function unit.
//
// Checks the hard decisions x against all 240 rows of H, 2*P = 20 rows per
// cycle (rows P*step .. P*step+P-1 of block row A and of block row B), so a
// full check takes NSTEP = 12 cycles.  Row r of block row A (or B) is the XOR
// of x[V*j + (r + d) mod V] over the 16 circulant terms x^d of that block row.
//
// Interface: while `en` is high the unit evaluates row group `step`; the
// controller steps 0..NSTEP-1 on consecutive cycles.  A failing row found at
// step 0 starts a new accumulation.  `all_ok` is combinational and valid in
// the cycle of step NSTEP-1: it is high when none of the 240 rows failed.
// The rate of 20 equations per cycle
// follows the document; the interface is this design's own.
module pcfu
  import ldpc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [$clog2(NSTEP)-1:0] step,
  input  logic [N-1:0]             x,
  output logic                     all_ok
);
  logic [NRB*P-1:0] syn;        // syndrome bits of the current row group
  logic             fail_acc;   // a failing row in steps 0..step-1

  always_comb begin
    syn = '0;
    for (int p = 0; p < P; p++) begin
      int r;
      r = P * int'(step) + p;
      for (int e = 0; e < NE; e++) begin
        int c;
        c = r + EDGE_OFF[e];
        if (c >= V) c -= V;
        syn[(e / NE_ROW) * P + p] ^= x[V * EDGE_CB[e] + c];
      end
    end
  end

  wire fail_now = |syn;
  wire fail_all = fail_now | ((step != '0) & fail_acc);

  assign all_ok = ~fail_all;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fail_acc <= 1'b0;
    end else if (en) begin
      fail_acc <= fail_all;
    end
  end
endmodule
