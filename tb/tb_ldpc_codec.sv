// tb_ldpc_codec -- end-to-end test of the codec at its default parameters:
// random data -> encoder -> BPSK channel with [6:2] LLR quantisation ->
// decoder -> compare with the data.
//
// Frames: clean channel, a few flipped bits, Gaussian noise at several
// levels, and pure noise.  Checked per frame: the encoder time (72 beats +
// 12 cycles), the codeword against H, the decoded data whenever the decoder
// reports convergence (clean and lightly damaged frames must converge), the
// decoder cycle count 24 + stalls + 28*iters + 12 + 72 (388 when all 10
// iterations run).  Counted mechanisms, each of which must occur: early
// termination, the iteration limit, input stalls on both sides, corrected
// channel errors.
module tb_ldpc_codec;
  import ldpc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic            enc_valid = 1'b0, enc_ready, enc_done;
  logic [NOUT-1:0] enc_data = '0;
  logic [2*V-1:0]  enc_parity;
  logic            dec_in_valid = 1'b0, dec_in_ready;
  llr_t            dec_in_llr [NIN];
  logic            dec_out_valid, dec_done, dec_converged;
  logic [NOUT-1:0] dec_out_data;
  logic [3:0]      dec_iters;

  ldpc_codec dut (.*);

  int checks = 0, failures = 0;
  int n_early = 0, n_limit = 0, n_stall_enc = 0, n_stall_dec = 0, n_corrected = 0;

  int T_RB [32] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0, 1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1};
  int T_CB [32] = '{0,0,1,1,2,2,3,3,4,4,5,5,5,6,6,6, 0,0,1,1,2,2,3,3,4,4,5,5,6,7,7,7};
  int T_D  [32] = '{6,21,7,20,3,14,11,13,1,7,2,5,34,0,10,30,
                    35,53,6,31,7,24,20,31,4,13,3,7,43,0,10,30};

  function automatic bit parity_ok(bit x [N]);
    for (int rb = 0; rb < 2; rb++)
      for (int r = 0; r < V; r++) begin
        bit s = 0;
        for (int t = 0; t < 32; t++)
          if (T_RB[t] == rb) s ^= x[V * T_CB[t] + (r + T_D[t]) % V];
        if (s) return 0;
      end
    return 1;
  endfunction

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += $urandom_range(1000000) / 1000000.0;
    return s - 6.0;
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  bit [NOUT-1:0] obuf [NOBEAT];
  int obeats = 0, last_out = 0;
  always @(negedge clk) begin
    if (dec_out_valid) begin
      if (obeats < NOBEAT) obuf[obeats] = dec_out_data;
      obeats++;
      last_out = cyc;
    end
  end

  task automatic encode(input bit d [K], input bit gaps_on, output bit cw [N]);
    int b = 0, first = -1, gaps = 0;
    while (b < K / NOUT) begin
      @(negedge clk);
      enc_valid = !(gaps_on && b > 0 && $urandom_range(4) == 0);
      if (!enc_valid) gaps++;
      for (int w = 0; w < NOUT; w++) enc_data[w] = d[NOUT * b + w];
      #1;
      if (enc_valid && enc_ready) begin
        if (first < 0) first = cyc;
        b++;
      end
    end
    @(negedge clk);
    enc_valid = 1'b0;
    while (!enc_done) @(negedge clk);
    if (gaps > 0) n_stall_enc++;
    checks++;
    if (cyc - first != K / NOUT + V / NOUT + gaps) begin
      failures++; $display("FAIL encoder took %0d cycles", cyc - first);
    end
    for (int i = 0; i < K; i++) cw[i] = d[i];
    for (int i = 0; i < 2 * V; i++) cw[K + i] = enc_parity[i];
    checks++;
    if (!parity_ok(cw)) begin failures++; $display("FAIL encoder output is not a codeword"); end
  endtask

  task automatic decode(input int L [N], input bit d [K], input bit gaps_on,
                        input bit must_converge, input int nerr, input string name);
    int b = 0, first = -1, stalls = 0, bad = 0, its;
    obeats = 0;
    while (b < NBEAT) begin
      @(negedge clk);
      dec_in_valid = !(gaps_on && b > 0 && $urandom_range(4) == 0);
      if (!dec_in_valid) stalls++;
      for (int i = 0; i < NIN; i++) dec_in_llr[i] = llr_t'(L[NIN * b + i]);
      #1;
      if (dec_in_valid && dec_in_ready) begin
        if (first < 0) first = cyc;
        b++;
      end
    end
    @(negedge clk);
    dec_in_valid = 1'b0;
    while (!dec_done) @(negedge clk);
    its = int'(dec_iters);
    if (stalls > 0) n_stall_dec++;
    checks++;
    if (last_out - first + 1 != NBEAT + stalls + 28 * its + NSTEP + NOBEAT || obeats != NOBEAT) begin
      failures++; $display("FAIL %s: %0d cycles, %0d beats", name, last_out - first + 1, obeats);
    end
    for (int k = 0; k < NOBEAT; k++)
      for (int i = 0; i < NOUT; i++) if (obuf[k][i] != d[NOUT * k + i]) bad++;
    if (must_converge) begin
      checks++;
      if (!dec_converged) begin failures++; $display("FAIL %s: did not converge", name); end
    end
    if (dec_converged) begin
      checks++;
      if (bad != 0) begin failures++; $display("FAIL %s: %0d data bits wrong", name, bad); end
      else if (nerr > 0) n_corrected++;
    end
    if (dec_converged && its < 10) n_early++;
    if (its == 10) n_limit++;
    $display("%s: channel errors %0d, converged %0d after %0d iterations, %0d cycles, %0d data bits wrong",
             name, nerr, dec_converged, its, last_out - first + 1, bad);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit d [K];
    bit cw [N];
    int L [N];
    int nerr, ei;
    real sigma, y, l;
    string name;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 12; f++) begin
      for (int i = 0; i < K; i++) d[i] = bit'($urandom_range(1));
      encode(d, f % 4 == 1, cw);
      nerr = 0;
      if (f < 2) begin
        for (int i = 0; i < N; i++) L[i] = cw[i] ? -20 : 20;
        name = $sformatf("frame %0d clean", f);
      end else if (f < 5) begin
        for (int i = 0; i < N; i++) L[i] = cw[i] ? -12 : 12;
        for (int k = 0; k < 2 * (f - 1); k++) begin
          ei = $urandom_range(N - 1);
          L[ei] = -L[ei];
        end
        name = $sformatf("frame %0d bit errors", f);
      end else if (f < 11) begin
        sigma = 0.40 + 0.03 * (f - 5);
        for (int i = 0; i < N; i++) begin
          y = (cw[i] ? -1.0 : 1.0) + sigma * gauss();
          l = $floor(8.0 * y / (sigma * sigma) + 0.5);
          L[i] = (l > 31.0) ? 31 : (l < -32.0) ? -32 : int'(l);
        end
        name = $sformatf("frame %0d awgn sigma=%0.2f", f, sigma);
      end else begin
        for (int i = 0; i < N; i++) L[i] = int'($urandom_range(16)) - 8;
        name = $sformatf("frame %0d noise only", f);
      end
      for (int i = 0; i < N; i++) if ((L[i] < 0) != cw[i]) nerr++;
      decode(L, d, f % 3 == 2, f < 5, nerr, name);
      if (f == 11) begin
        checks++;
        if (dec_converged || int'(dec_iters) != 10) begin
          failures++; $display("FAIL pure noise frame did not run to the iteration limit");
        end
      end
    end
    checks++; if (n_early == 0)     begin failures++; $display("FAIL no early termination"); end
    checks++; if (n_limit == 0)     begin failures++; $display("FAIL iteration limit never reached"); end
    checks++; if (n_stall_enc == 0) begin failures++; $display("FAIL no encoder input gap"); end
    checks++; if (n_stall_dec == 0) begin failures++; $display("FAIL no decoder input stall"); end
    checks++; if (n_corrected == 0) begin failures++; $display("FAIL no channel error corrected"); end
    $display("mechanisms: early=%0d limit=%0d enc_gaps=%0d dec_stalls=%0d corrected=%0d",
             n_early, n_limit, n_stall_enc, n_stall_dec, n_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
