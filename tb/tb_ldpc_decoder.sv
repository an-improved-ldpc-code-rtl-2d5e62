// tb_ldpc_decoder -- end-to-end test of the LDPC decoder at its default size
// (N = 960, rate 3/4, P = 10, MAX_ITER = 10).
//
// The testbench encodes random data with the two-step encoding of the code
// structure (solve A9 p1 = sum A_j d_j, then B10 p2 = sum B_j d_j + B9 p1,
// by Gaussian elimination over GF(2)), sends the codeword through a channel
// (clean, a few hard bit errors, or BPSK over Gaussian noise with the
// [6:2] LLR quantisation), and compares the decoder with a frame-level
// flooding model of the fixed-point sum-product algorithm written from the
// equations (phi computed with real arithmetic).  It checks every output
// bit, the converged flag, the iteration count and the cycle count
// 24 + stalls + 28*iters + 12 + 72 (388 with all 10 iterations), and counts
// the mechanisms: early termination, termination at the iteration limit,
// input stalls and corrected channel errors.
module tb_ldpc_decoder;
  import ldpc_pkg::*;

  localparam int MAXIT = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            in_valid = 1'b0;
  logic            in_ready;
  llr_t            in_llr [NIN];
  logic            out_valid;
  logic [NOUT-1:0] out_data;
  logic            done, converged;
  logic [3:0]      iters;

  ldpc_decoder dut (.*);

  int checks = 0, failures = 0;
  int n_early = 0, n_maxit = 0, n_stall = 0, n_corrected = 0;

  // ------------------------------------------------------------ code tables
  // (block row, block column, exponent) of every circulant term, Table 4.1.
  int T_RB [32] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0, 1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1};
  int T_CB [32] = '{0,0,1,1,2,2,3,3,4,4,5,5,5,6,6,6, 0,0,1,1,2,2,3,3,4,4,5,5,6,7,7,7};
  int T_D  [32] = '{6,21,7,20,3,14,11,13,1,7,2,5,34,0,10,30,
                    35,53,6,31,7,24,20,31,4,13,3,7,43,0,10,30};

  function automatic int ecol(int t, int r);
    return V * T_CB[t] + (r + T_D[t]) % V;
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

  // Solve C y = s for the circulant C = 1 + x^10 + x^30 (A9 and B10).
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
      if (piv < 0) $fatal(1, "singular circulant");
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

  // ------------------------------------------------------- reference model
  // phi(k * in_step) rounded to steps of out_step, saturated to 31.
  function automatic int phi_ref(int k, real in_step, real out_step);
    real x, v;
    if (k == 0) return 31;
    x = k * in_step;
    v = -$ln((1.0 - $exp(-x)) / (1.0 + $exp(-x)));   // -ln tanh(x/2)
    v = $floor(v / out_step + 0.5);
    return (v > 31.0) ? 31 : int'(v);
  endfunction

  int phi_c [32];   // LLR (1/4) -> phi domain (1/16)
  int phi_v [32];   // phi domain (1/16) -> LLR (1/4)

  function automatic int sat31(int v);
    return (v > 31) ? 31 : (v < -31) ? -31 : v;
  endfunction

  // Messages as signed integers in units of 0.25; the sign of 0 is kept
  // separately because a magnitude-0 message may carry either sign.
  function automatic void ref_decode(input int L [N], output bit x [N],
                                     output bit conv, output int its);
    int  mg [32][V];
    bit  sg [32][V];
    for (int t = 0; t < 32; t++)
      for (int r = 0; r < V; r++) begin
        int l = L[ecol(t, r)];
        sg[t][r] = (l < 0);
        mg[t][r] = (l < 0) ? ((-l > 31) ? 31 : -l) : l;
      end
    for (int i = 0; i < N; i++) x[i] = 0;
    for (int it = 1; it <= MAXIT; it++) begin
      if (it > 1 && parity_ok(x)) begin conv = 1; its = it - 1; return; end
      // check nodes
      for (int rb = 0; rb < 2; rb++)
        for (int r = 0; r < V; r++) begin
          int S = 0; bit par = 0;
          int ph [32];
          for (int t = 0; t < 32; t++) if (T_RB[t] == rb) begin
            ph[t] = phi_c[mg[t][r]]; S += ph[t]; par ^= sg[t][r];
          end
          for (int t = 0; t < 32; t++) if (T_RB[t] == rb) begin
            sg[t][r] = par ^ sg[t][r];
            mg[t][r] = (S - ph[t] > 31) ? 31 : S - ph[t];
          end
        end
      // variable nodes
      for (int c = 0; c < N; c++) begin
        int q = L[c];
        int tv [32];
        for (int t = 0; t < 32; t++) if (T_CB[t] == c / V) begin
          int r = ((c % V) - T_D[t] + V) % V;
          tv[t] = sg[t][r] ? -phi_v[mg[t][r]] : phi_v[mg[t][r]];
          q += tv[t];
        end
        x[c] = (q < 0);
        for (int t = 0; t < 32; t++) if (T_CB[t] == c / V) begin
          int r = ((c % V) - T_D[t] + V) % V;
          int e = sat31(q - tv[t]);
          sg[t][r] = (e < 0);
          mg[t][r] = (e < 0) ? -e : e;
        end
      end
    end
    conv = parity_ok(x);
    its = MAXIT;
  endfunction

  // ---------------------------------------------------------------- driver
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  bit [NOUT-1:0] obuf [NOBEAT];
  int obeats = 0;
  int last_out_cyc = 0;
  always @(negedge clk) begin
    if (out_valid) begin
      if (obeats < NOBEAT) obuf[obeats] = out_data;
      obeats++;
      last_out_cyc = cyc;
    end
  end

  task automatic run_frame(input int L [N], input bit d [K], input int stall_pct,
                           input int nerr, input string name);
    int b = 0, first_cyc = -1, stalls = 0;
    bit xr [N];
    bit rconv;
    int rits, exp_cyc, bad;
    obeats = 0;
    while (b < NBEAT) begin
      @(negedge clk);
      if (stall_pct > 0 && b > 0 && int'($urandom_range(99)) < stall_pct) begin
        in_valid = 1'b0;
        stalls++;
      end else begin
        in_valid = 1'b1;
        for (int i = 0; i < NIN; i++) in_llr[i] = llr_t'(L[NIN * b + i]);
      end
      #1;
      if (in_valid && in_ready) begin
        if (first_cyc < 0) first_cyc = cyc;
        b++;
      end else if (in_valid) stalls++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    while (!done) @(negedge clk);

    ref_decode(L, xr, rconv, rits);
    bad = 0;
    for (int k = 0; k < NOBEAT; k++)
      for (int i = 0; i < NOUT; i++) if (obuf[k][i] != xr[NOUT * k + i]) bad++;
    checks++; if (bad != 0 || obeats != NOBEAT) begin
      failures++; $display("FAIL %s: %0d output bits differ from model, %0d beats", name, bad, obeats);
    end
    checks++; if (converged != rconv || int'(iters) != rits) begin
      failures++; $display("FAIL %s: converged %0d iters %0d, model %0d %0d", name, converged, iters, rconv, rits);
    end
    exp_cyc = NBEAT + stalls + 2 * (NSTEP + PIPE) * rits + NSTEP + NOBEAT;
    checks++; if (last_out_cyc - first_cyc + 1 != exp_cyc) begin
      failures++; $display("FAIL %s: %0d cycles, expected %0d", name, last_out_cyc - first_cyc + 1, exp_cyc);
    end
    if (rconv) begin
      bad = 0;
      for (int i = 0; i < K; i++) if (xr[i] != d[i]) bad++;
      checks++; if (bad != 0) begin failures++; $display("FAIL %s: converged to a wrong codeword", name); end
      else if (nerr > 0) n_corrected++;
    end
    if (stalls > 0) n_stall++;
    if (converged && int'(iters) < MAXIT) n_early++;
    if (int'(iters) == MAXIT) n_maxit++;
    $display("%s: converged=%0d iters=%0d cycles=%0d stalls=%0d channel errors=%0d",
             name, converged, iters, last_out_cyc - first_cyc + 1, stalls, nerr);
  endtask

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += $urandom_range(1000000) / 1000000.0;
    return s - 6.0;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit d [K];
    bit cw [N];
    int L [N];
    for (int k = 0; k < 32; k++) begin
      phi_c[k] = phi_ref(k, 0.25, 0.0625);
      phi_v[k] = phi_ref(k, 0.0625, 0.25);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int f = 0; f < 14; f++) begin
      int nerr;
      real sigma, y, l;
      int ei;
      string name;
      nerr = 0;
      for (int i = 0; i < K; i++) d[i] = bit'($urandom_range(1));
      encode(d, cw);
      checks++; if (!parity_ok(cw)) begin failures++; $display("FAIL encoder model"); end
      if (f < 2) begin                       // clean channel
        for (int i = 0; i < N; i++) L[i] = cw[i] ? -16 : 16;
        name = $sformatf("frame %0d clean", f);
      end else if (f < 6) begin              // hard errors
        for (int i = 0; i < N; i++) L[i] = (cw[i] ? -1 : 1) * int'($urandom_range(20, 6));
        for (int k = 0; k < 4 * (f - 1); k++) begin
          ei = $urandom_range(N - 1);
          L[ei] = -L[ei];
        end
        name = $sformatf("frame %0d bit errors", f);
      end else if (f < 13) begin             // BPSK + AWGN
        sigma = 0.45 + 0.03 * (f - 6);
        for (int i = 0; i < N; i++) begin
          y = (cw[i] ? -1.0 : 1.0) + sigma * gauss();
          l = $floor(4.0 * 2.0 * y / (sigma * sigma) + 0.5);
          L[i] = (l > 31.0) ? 31 : (l < -32.0) ? -32 : int'(l);
        end
        name = $sformatf("frame %0d awgn sigma=%0.2f", f, sigma);
      end else begin                         // no signal: runs to the limit
        for (int i = 0; i < N; i++) L[i] = int'($urandom_range(12)) - 6;
        name = $sformatf("frame %0d noise only", f);
      end
      for (int i = 0; i < N; i++) if ((L[i] < 0) != cw[i]) nerr++;
      run_frame(L, d, (f % 3 == 1) ? 20 : 0, nerr, name);
    end

    checks++; if (n_early == 0)     begin failures++; $display("FAIL no early termination seen"); end
    checks++; if (n_maxit == 0)     begin failures++; $display("FAIL iteration limit never reached"); end
    checks++; if (n_stall == 0)     begin failures++; $display("FAIL no input stall seen"); end
    checks++; if (n_corrected == 0) begin failures++; $display("FAIL no channel error corrected"); end
    $display("mechanisms: early=%0d limit=%0d stalled=%0d corrected=%0d",
             n_early, n_maxit, n_stall, n_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
