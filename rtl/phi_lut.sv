// phi_lut -- look-up table of phi(x) = -ln(tanh(x/2)) for the reformulated
// sum-product decoder.
//
// phi is applied to magnitudes only (signs travel separately in
// sign-magnitude form), so each table covers x >= 0: half the size a
// two's-complement table would need.  phi is its own inverse, and the
// decoder uses it once per unit:
//   * TO_LLR = 0 (in the CNFU): x is an LLR magnitude in steps of 1/4 (the
//     [6:2] message format), y = phi(x) in steps of 1/16:
//         y[k] = min(31, round(16 * phi(k/4))),  y[0] = 31;
//   * TO_LLR = 1 (in the VNFU): x is a phi-domain magnitude in steps of 1/16,
//     y = phi(x) as an LLR magnitude in steps of 1/4:
//         y[k] = min(31, round(4 * phi(k/16))),  y[0] = 31.
// The phi-domain values thus keep 4 fraction bits in the same 5-bit
// magnitude (saturating at 31/16), which the [6:2] resolution would lose.
// Purely combinational.  The function and the sign-magnitude halving follow
// the document; the two resolutions and the rounding are this design's own.
module phi_lut #(
  parameter bit TO_LLR = 1'b0
) (
  input  logic [4:0] x,
  output logic [4:0] y
);
  if (TO_LLR) begin : g_to_llr
    always_comb begin
      unique case (x)
        5'd0:  y = 5'd31;
        5'd1:  y = 5'd14;
        5'd2:  y = 5'd11;
        5'd3:  y = 5'd9;
        5'd4:  y = 5'd8;
        5'd5:  y = 5'd7;
        5'd6:  y = 5'd7;
        5'd7:  y = 5'd6;
        5'd8:  y = 5'd6;
        5'd9:  y = 5'd5;
        5'd10: y = 5'd5;
        5'd11: y = 5'd4;
        5'd12: y = 5'd4;
        5'd13: y = 5'd4;
        5'd14: y = 5'd4;
        5'd15: y = 5'd3;
        5'd16: y = 5'd3;
        5'd17: y = 5'd3;
        5'd18: y = 5'd3;
        5'd19: y = 5'd3;
        5'd20: y = 5'd2;
        5'd21: y = 5'd2;
        5'd22: y = 5'd2;
        5'd23: y = 5'd2;
        5'd24: y = 5'd2;
        5'd25: y = 5'd2;
        5'd26: y = 5'd2;
        default: y = 5'd1;
      endcase
    end
  end else begin : g_to_phi
    always_comb begin
      unique case (x)
        5'd0:  y = 5'd31;
        5'd1:  y = 5'd31;
        5'd2:  y = 5'd23;
        5'd3:  y = 5'd16;
        5'd4:  y = 5'd12;
        5'd5:  y = 5'd9;
        5'd6:  y = 5'd7;
        5'd7:  y = 5'd6;
        5'd8:  y = 5'd4;
        5'd9:  y = 5'd3;
        5'd10: y = 5'd3;
        5'd11: y = 5'd2;
        5'd12: y = 5'd2;
        5'd13: y = 5'd1;
        5'd14: y = 5'd1;
        5'd15: y = 5'd1;
        5'd16: y = 5'd1;
        default: y = 5'd0;
      endcase
    end
  end
endmodule
