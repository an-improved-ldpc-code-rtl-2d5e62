// tb_vnfu -- random test of the variable node function units with 3, 4 and
// 5 inputs (the three column weights of the code).  Inputs change every
// cycle; two cycles later the extrinsic outputs and the hard decision are
// compared with a model of the variable-node equations (phi from real
// arithmetic, saturation to +-31).
module tb_vnfu;
  import ldpc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  msg_t r [5];
  llr_t llr;
  msg_t q3 [3];
  msg_t q4 [4];
  msg_t q5 [5];
  logic x3, x4, x5;

  vnfu #(.NI(3)) u3 (.clk, .en(1'b1), .r(r[0:2]), .llr, .q(q3), .xhat(x3));
  vnfu #(.NI(4)) u4 (.clk, .en(1'b1), .r(r[0:3]), .llr, .q(q4), .xhat(x4));
  vnfu #(.NI(5)) u5 (.clk, .en(1'b1), .r(r),      .llr, .q(q5), .xhat(x5));

  function automatic int phi_ref(int k);
    real v, t;
    if (k == 0) return 31;
    t = k * 0.0625;
    v = -$ln((1.0 - $exp(-t)) / (1.0 + $exp(-t)));
    v = $floor(v / 0.25 + 0.5);
    return (v > 31.0) ? 31 : int'(v);
  endfunction

  task automatic model(input msg_t in [5], input int l, input int n,
                       output msg_t out [5], output bit xh);
    int t [5];
    int s = l;
    for (int i = 0; i < n; i++) begin
      t[i] = in[i].sgn ? -phi_ref(int'(in[i].mag)) : phi_ref(int'(in[i].mag));
      s += t[i];
    end
    xh = (s < 0);
    for (int i = 0; i < n; i++) begin
      int e = s - t[i];
      if (e > 31) e = 31;
      if (e < -31) e = -31;
      out[i].sgn = (e < 0);
      out[i].mag = 5'((e < 0) ? -e : e);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t hr [3][5];
    int   hl [3];
    msg_t e [5];
    bit   xe;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int i = 0; i < 5; i++) begin
        r[i].sgn = 1'($urandom_range(1));
        r[i].mag = 5'($urandom_range(31));
      end
      llr = llr_t'($urandom_range(63));
      hr[2] = hr[1]; hr[1] = hr[0]; hr[0] = r;
      hl[2] = hl[1]; hl[1] = hl[0]; hl[0] = int'(llr);
      if (t >= 2) begin
        model(hr[2], hl[2], 3, e, xe);
        checks++; if (x3 != xe) begin failures++; $display("FAIL t=%0d x3", t); end
        for (int i = 0; i < 3; i++) begin
          checks++; if (q3[i] != e[i]) begin failures++; if (failures < 10) $display("FAIL t=%0d q3[%0d]", t, i); end
        end
        model(hr[2], hl[2], 4, e, xe);
        checks++; if (x4 != xe) begin failures++; $display("FAIL t=%0d x4", t); end
        for (int i = 0; i < 4; i++) begin
          checks++; if (q4[i] != e[i]) begin failures++; if (failures < 10) $display("FAIL t=%0d q4[%0d]", t, i); end
        end
        model(hr[2], hl[2], 5, e, xe);
        checks++; if (x5 != xe) begin failures++; $display("FAIL t=%0d x5", t); end
        for (int i = 0; i < 5; i++) begin
          checks++; if (q5[i] != e[i]) begin failures++; if (failures < 10) $display("FAIL t=%0d q5[%0d]", t, i); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
