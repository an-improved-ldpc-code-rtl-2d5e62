// tb_ldpc_ber -- error-rate sweep of the codec over an AWGN channel.
//
// For each Eb/N0 point, FRAMES random data words go through the encoder,
// BPSK (0 -> +1, 1 -> -1) with Gaussian noise of variance
// sigma^2 = 1 / (2 * R * Eb/N0), R = 3/4, the channel LLR 2y/sigma^2
// quantised to [6:2] (steps of 1/4, saturating at -8 / +7.75), and the
// decoder with at most 10 iterations.  The testbench prints the bit and
// frame error rates and the mean number of iterations per point, and checks:
//   * each decoder frame takes 24 + 28*iters + 12 + 72 cycles;
//   * a frame reported as converged carries the transmitted data (no
//     undetected errors at these noise levels);
//   * the frame error rate does not rise with Eb/N0 (allowing one frame of
//     statistical slack) and is below 10% at the highest point;
//   * the mean iteration count falls from the lowest to the highest point.
// Noise comes from the sum of 12 uniform variables (a close approximation of
// a Gaussian), so the figures are estimates, not exact reference curves.
module tb_ldpc_ber;
  import ldpc_pkg::*;

  localparam int NPT    = 4;
  localparam int FRAMES = 60;
  localparam real EBN0_DB [NPT] = '{2.5, 3.0, 3.5, 4.0};

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

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += $urandom_range(1000000) / 1000000.0;
    return s - 6.0;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit d [K];
    bit cw [N];
    int L [N];
    int b, first, bad, its;
    int bit_err [NPT], frm_err [NPT], it_sum [NPT];
    real sigma, y, l;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int pt = 0; pt < NPT; pt++) begin
      sigma = $sqrt(1.0 / (2.0 * 0.75 * (10.0 ** (EBN0_DB[pt] / 10.0))));
      bit_err[pt] = 0; frm_err[pt] = 0; it_sum[pt] = 0;
      for (int f = 0; f < FRAMES; f++) begin
        // encode
        for (int i = 0; i < K; i++) d[i] = bit'($urandom_range(1));
        for (int k = 0; k < K / NOUT; k++) begin
          @(negedge clk);
          enc_valid = 1'b1;
          for (int w = 0; w < NOUT; w++) enc_data[w] = d[NOUT * k + w];
          #1;
          while (!enc_ready) begin @(negedge clk); #1; end
        end
        @(negedge clk);
        enc_valid = 1'b0;
        while (!enc_done) @(negedge clk);
        for (int i = 0; i < K; i++) cw[i] = d[i];
        for (int i = 0; i < 2 * V; i++) cw[K + i] = enc_parity[i];
        // channel
        for (int i = 0; i < N; i++) begin
          y = (cw[i] ? -1.0 : 1.0) + sigma * gauss();
          l = $floor(8.0 * y / (sigma * sigma) + 0.5);
          L[i] = (l > 31.0) ? 31 : (l < -32.0) ? -32 : int'(l);
        end
        // decode
        obeats = 0;
        first = -1;
        b = 0;
        while (b < NBEAT) begin
          @(negedge clk);
          dec_in_valid = 1'b1;
          for (int i = 0; i < NIN; i++) dec_in_llr[i] = llr_t'(L[NIN * b + i]);
          #1;
          if (dec_in_ready) begin
            if (first < 0) first = cyc;
            b++;
          end
        end
        @(negedge clk);
        dec_in_valid = 1'b0;
        while (!dec_done) @(negedge clk);
        its = int'(dec_iters);
        bad = 0;
        for (int k = 0; k < NOBEAT; k++)
          for (int i = 0; i < NOUT; i++) if (obuf[k][i] != d[NOUT * k + i]) bad++;
        checks++;
        if (last_out - first + 1 != NBEAT + 28 * its + NSTEP + NOBEAT) begin
          failures++; $display("FAIL frame took %0d cycles after %0d iterations", last_out - first + 1, its);
        end
        checks++;
        if (dec_converged && bad != 0) begin
          failures++; $display("FAIL undetected error: %0d bits wrong", bad);
        end
        bit_err[pt] += bad;
        if (bad != 0) frm_err[pt]++;
        it_sum[pt] += its;
      end
      $display("Eb/N0 %0.1f dB (sigma %0.3f): BER %e  FER %0d/%0d  mean iterations %0.2f",
               EBN0_DB[pt], sigma, real'(bit_err[pt]) / (FRAMES * K), frm_err[pt], FRAMES,
               real'(it_sum[pt]) / FRAMES);
    end
    for (int pt = 1; pt < NPT; pt++) begin
      checks++;
      if (frm_err[pt] > frm_err[pt - 1] + 1) begin
        failures++; $display("FAIL frame error count rises from %0.1f to %0.1f dB", EBN0_DB[pt - 1], EBN0_DB[pt]);
      end
    end
    checks++;
    if (frm_err[NPT - 1] * 10 >= FRAMES) begin
      failures++; $display("FAIL FER at %0.1f dB is %0d/%0d", EBN0_DB[NPT - 1], frm_err[NPT - 1], FRAMES);
    end
    checks++;
    if (it_sum[NPT - 1] >= it_sum[0]) begin
      failures++; $display("FAIL iterations do not fall with Eb/N0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
