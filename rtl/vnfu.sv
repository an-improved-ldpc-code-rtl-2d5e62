// vnfu -- variable node function unit of the reformulated sum-product decoder.
//
// For one code bit with NI incoming check-to-variable messages r_i (sign and
// the phi-domain magnitude in steps of 1/16, before the final phi) and the
// channel LLR L (steps of 1/4) it computes
//     t_i  = sign(r_i) * phi(|r_i|)               (the phi moved from the CNFU)
//     q    = L + sum_i t_i                        (a-posteriori LLR)
//     q_i  = sat( q - t_i )                       (extrinsic messages)
//     xhat = (q < 0)                              (hard decision)
// t_i, q and q_i are in two's complement; the q_i are converted back to
// sign-magnitude and saturated to +-31 (7.75) for the register-sets.
// NI is the column weight: 3, 4 or 5 in this code.
//
// Timing: two pipeline stages, outputs valid PIPE = 2 cycles after the
// inputs.  Stage 1 registers the t_i and q, stage 2 the q_i and xhat.  `en`
// freezes both stages (clock gating).  No reset on the datapath.
// The equations follow the document; the two's-complement widths and the
// saturation are this design's own.
module vnfu
  import ldpc_pkg::*;
#(
  parameter int NI = 4
) (
  input  logic clk,
  input  logic en,
  input  msg_t r   [NI],
  input  llr_t llr,
  output msg_t q   [NI],
  output logic xhat
);
  localparam int TW = MW + 1;                 // signed phi value
  localparam int SW = TW + $clog2(NI + 1) + 1;
  localparam logic signed [SW-1:0] QPOS = SW'((1 << MW) - 1);
  localparam logic signed [SW-1:0] QNEG = -QPOS;

  logic [MW-1:0]        phi_c [NI];
  logic signed [TW-1:0] t_c   [NI];
  logic signed [TW-1:0] t_q   [NI];
  logic signed [SW-1:0] sum_c, sum_q;

  for (genvar i = 0; i < NI; i++) begin : g_lut
    phi_lut #(.TO_LLR(1'b1)) u_phi (.x(r[i].mag), .y(phi_c[i]));
    assign t_c[i] = r[i].sgn ? -$signed({1'b0, phi_c[i]}) : $signed({1'b0, phi_c[i]});
  end

  always_comb begin
    sum_c = SW'(llr);
    for (int i = 0; i < NI; i++) sum_c += SW'(t_c[i]);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      t_q   <= t_c;
      sum_q <= sum_c;
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      xhat <= sum_q[SW-1];
      for (int i = 0; i < NI; i++) begin
        logic signed [SW-1:0] d;
        d = sum_q - SW'(t_q[i]);
        q[i].sgn <= d[SW-1];
        if (d > QPOS || d < QNEG) q[i].mag <= '1;
        else if (d[SW-1])                       q[i].mag <= MW'(-d);
        else                                    q[i].mag <= MW'(d);
      end
    end
  end
endmodule
