// cnfu -- check node function unit of the reformulated sum-product decoder.
//
// For one parity-check row with NI incoming variable-to-check messages
// q_i (sign-magnitude, LLR magnitude in steps of 1/4) it produces the NI
// check-to-variable messages
//     sign(r_i) = XOR of all signs except sign(q_i)
//     |r_i|     = sat31( sum_k phi(|q_k|) - phi(|q_i|) )
// in the phi domain (steps of 1/16).  The second phi of the sum-product
// check update is not applied here: it is moved into the variable node unit,
// so each unit has one LUT level on its critical path (the reformulation the
// document adopts).  The sum needs 9 bits for 16 inputs; the result
// saturates to the 5-bit magnitude of the 6-bit message.
//
// Timing: two pipeline stages, result NI outputs valid PIPE = 2 cycles after
// the inputs.  Stage 1 registers the phi values, the signs, their sum and
// their parity; stage 2 registers the outputs.  `en` freezes both stages and
// stands for the gated clock the document uses to switch a unit off while
// the other phase runs.  The datapath has no reset: the controller only
// writes results back when they are valid.
module cnfu
  import ldpc_pkg::*;
#(
  parameter int NI = NE_ROW
) (
  input  logic clk,
  input  logic en,
  input  msg_t q [NI],
  output msg_t r [NI]
);
  localparam int SW = MW + $clog2(NI) + 1;

  logic [MW-1:0] phi_c [NI];
  logic [MW-1:0] phi_q [NI];
  logic [NI-1:0] sgn_q;
  logic [SW-1:0] sum_c, sum_q;
  logic           par_q;

  for (genvar i = 0; i < NI; i++) begin : g_lut
    phi_lut #(.TO_LLR(1'b0)) u_phi (.x(q[i].mag), .y(phi_c[i]));
  end

  logic [NI-1:0] sgn_c;

  always_comb begin
    sum_c = '0;
    for (int i = 0; i < NI; i++) sgn_c[i] = q[i].sgn;
    for (int i = 0; i < NI; i++) sum_c += SW'(phi_c[i]);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      phi_q <= phi_c;
      sgn_q <= sgn_c;
      sum_q <= sum_c;
      par_q <= ^sgn_c;
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      for (int i = 0; i < NI; i++) begin
        logic [SW-1:0] d;
        d = sum_q - SW'(phi_q[i]);
        r[i].sgn <= par_q ^ sgn_q[i];
        r[i].mag <= (d > SW'((1 << MW) - 1)) ? '1 : d[MW-1:0];
      end
    end
  end
endmodule
