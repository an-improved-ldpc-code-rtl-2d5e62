// tb_phi_lut -- checks both phi tables against phi(x) = -ln(tanh(x/2))
// computed with real arithmetic, for all 32 inputs.
module tb_phi_lut;
  logic [4:0] x;
  logic [4:0] y_phi, y_llr;
  int checks = 0, failures = 0;

  phi_lut #(.TO_LLR(1'b0)) u_to_phi (.x(x), .y(y_phi));
  phi_lut #(.TO_LLR(1'b1)) u_to_llr (.x(x), .y(y_llr));

  function automatic int phi_ref(int k, real in_step, real out_step);
    real v, t;
    if (k == 0) return 31;
    t = k * in_step;
    v = -$ln((1.0 - $exp(-t)) / (1.0 + $exp(-t)));
    v = $floor(v / out_step + 0.5);
    return (v > 31.0) ? 31 : int'(v);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 32; k++) begin
      x = 5'(k);
      #1;
      checks++;
      if (int'(y_phi) != phi_ref(k, 0.25, 0.0625)) begin
        failures++; $display("FAIL to-phi x=%0d y=%0d exp=%0d", k, y_phi, phi_ref(k, 0.25, 0.0625));
      end
      checks++;
      if (int'(y_llr) != phi_ref(k, 0.0625, 0.25)) begin
        failures++; $display("FAIL to-llr x=%0d y=%0d exp=%0d", k, y_llr, phi_ref(k, 0.0625, 0.25));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
