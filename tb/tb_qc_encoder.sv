// tb_qc_encoder -- test of the two-step encoder.  For random data words the
// parity is compared with an independent encoder (Gaussian elimination of
// A9 p1 = sum A_j d_j and B10 p2 = sum B_j d_j + B9 p1 on the explicit
// matrix H built from the code polynomials) and the whole codeword is
// checked against H.  The encoding time (72 data beats + 12 cycles) and
// back-to-back frames with input gaps are checked too.
module tb_qc_encoder;
  import ldpc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, done;
  logic [NOUT-1:0] in_data = '0;
  logic [2*V-1:0] parity;
  int checks = 0, failures = 0;

  qc_encoder dut (.*);

  int T_RB [32] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0, 1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1};
  int T_CB [32] = '{0,0,1,1,2,2,3,3,4,4,5,5,5,6,6,6, 0,0,1,1,2,2,3,3,4,4,5,5,6,7,7,7};
  int T_D  [32] = '{6,21,7,20,3,14,11,13,1,7,2,5,34,0,10,30,
                    35,53,6,31,7,24,20,31,4,13,3,7,43,0,10,30};

  function automatic int ecol(int t, int r);
    return V * T_CB[t] + (r + T_D[t]) % V;
  endfunction

  function automatic void solve_circ(input bit s [V], output bit y [V]);
    bit [V:0] m [V];
    bit [V:0] tmp;
    for (int r = 0; r < V; r++) begin
      m[r] = '0;
      m[r][r] = 1; m[r][(r + 10) % V] = 1; m[r][(r + 30) % V] = 1;
      m[r][V] = s[r];
    end
    for (int c = 0; c < V; c++) begin
      int piv = -1;
      for (int r = c; r < V; r++) if (m[r][c] && piv < 0) piv = r;
      tmp = m[c]; m[c] = m[piv]; m[piv] = tmp;
      for (int r = 0; r < V; r++) if (r != c && m[r][c]) m[r] ^= m[c];
    end
    for (int c = 0; c < V; c++) y[c] = m[c][V];
  endfunction

  function automatic void encode(input bit d [K], output bit cw [N]);
    bit s [V];
    bit p [V];
    for (int i = 0; i < K; i++) cw[i] = d[i];
    for (int r = 0; r < V; r++) begin
      s[r] = 0;
      for (int t = 0; t < 32; t++) if (T_RB[t] == 0 && T_CB[t] < 6) s[r] ^= cw[ecol(t, r)];
    end
    solve_circ(s, p);
    for (int i = 0; i < V; i++) cw[6 * V + i] = p[i];
    for (int r = 0; r < V; r++) begin
      s[r] = 0;
      for (int t = 0; t < 32; t++) if (T_RB[t] == 1 && T_CB[t] < 7) s[r] ^= cw[ecol(t, r)];
    end
    solve_circ(s, p);
    for (int i = 0; i < V; i++) cw[7 * V + i] = p[i];
  endfunction

  function automatic bit parity_ok(bit x [N]);
    for (int rb = 0; rb < 2; rb++)
      for (int r = 0; r < V; r++) begin
        bit s = 0;
        for (int t = 0; t < 32; t++) if (T_RB[t] == rb) s ^= x[ecol(t, r)];
        if (s) return 0;
      end
    return 1;
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit d [K];
    bit cw [N];
    bit hw [N];
    int b, first, gaps, bad;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 8; f++) begin
      for (int i = 0; i < K; i++) d[i] = (f == 0) ? 1'b0 : (f == 1) ? (i == 5) : bit'($urandom_range(1));
      encode(d, cw);
      b = 0; first = -1; gaps = 0;
      while (b < K / NOUT) begin
        @(negedge clk);
        in_valid = !(f >= 5 && b > 0 && $urandom_range(3) == 0);
        if (!in_valid) gaps++;
        for (int w = 0; w < NOUT; w++) in_data[w] = d[NOUT * b + w];
        #1;
        if (in_valid && in_ready) begin
          if (first < 0) first = cyc;
          b++;
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
      while (!done) @(negedge clk);
      checks++;
      if (cyc - first != K / NOUT + V / NOUT + gaps) begin
        failures++; $display("FAIL frame %0d: done after %0d cycles", f, cyc - first);
      end
      bad = 0;
      for (int i = 0; i < 2 * V; i++) if (parity[i] != cw[K + i]) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("FAIL frame %0d: %0d parity bits differ", f, bad); end
      for (int i = 0; i < K; i++) hw[i] = d[i];
      for (int i = 0; i < 2 * V; i++) hw[K + i] = parity[i];
      checks++;
      if (!parity_ok(hw)) begin failures++; $display("FAIL frame %0d: H c != 0", f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
