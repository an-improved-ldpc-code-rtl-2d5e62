// tb_cnfu -- random test of the 16-input check node function unit.
// Each cycle a random set of messages enters; two cycles later the outputs
// are compared with a model written from the check-node equation (phi from
// real arithmetic).  A cycle with en = 0 must freeze the pipeline.
module tb_cnfu;
  import ldpc_pkg::*;
  localparam int NI = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic en;
  msg_t q [NI];
  msg_t r [NI];
  int checks = 0, failures = 0;

  cnfu #(.NI(NI)) dut (.clk, .en, .q, .r);

  function automatic int phi_ref(int k);
    real v, t;
    if (k == 0) return 31;
    t = k * 0.25;
    v = -$ln((1.0 - $exp(-t)) / (1.0 + $exp(-t)));
    v = $floor(v / 0.0625 + 0.5);
    return (v > 31.0) ? 31 : int'(v);
  endfunction

  msg_t exp_q [$][NI];

  task automatic model(input msg_t in [NI], output msg_t out [NI]);
    int S = 0;
    bit par = 0;
    for (int i = 0; i < NI; i++) begin S += phi_ref(int'(in[i].mag)); par ^= in[i].sgn; end
    for (int i = 0; i < NI; i++) begin
      int m = S - phi_ref(int'(in[i].mag));
      out[i].sgn = par ^ in[i].sgn;
      out[i].mag = (m > 31) ? 5'd31 : 5'(m);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t hist [3][NI];
    msg_t e [NI];
    en = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        q[i].sgn = 1'($urandom_range(1));
        // mostly reliable messages, sometimes weak ones
        q[i].mag = ($urandom_range(3) == 0) ? 5'($urandom_range(4)) : 5'($urandom_range(31));
      end
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = q;
      en = 1'b1;
      if (t >= 2) begin
        model(hist[2], e);
        // outputs at this negedge belong to the inputs of two cycles ago
        for (int i = 0; i < NI; i++) begin
          checks++;
          if (r[i] != e[i]) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d out %0d: %0d/%0d exp %0d/%0d",
                                        t, i, r[i].sgn, r[i].mag, e[i].sgn, e[i].mag);
          end
        end
      end
    end
    // en = 0 holds the outputs
    @(negedge clk);
    e = r;
    en = 1'b0;
    for (int i = 0; i < NI; i++) q[i] = '0;
    repeat (3) @(negedge clk);
    checks++;
    if (r != e) begin failures++; $display("FAIL outputs changed with en = 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
