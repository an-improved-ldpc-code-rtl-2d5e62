// tb_ldpc_ctrl -- test of the decoder controller on its own.  The parity
// check result is driven by the testbench.  Three frames are run: one whose
// parity check never passes (all 10 iterations, 388 cycles), one that passes
// the first overlapped check (1 iteration, 136 cycles), one that passes at
// the check after iteration 4 and has input stalls.  Per frame the testbench
// counts the cycles with each enable and write strobe and checks the
// step sequences of the phases.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, ld_we;
  logic [4:0] ld_beat;
  logic chk_phase, cn_en, vn_en, wr_en, wr_chk, pc_en, pc_all_ok;
  logic [3:0] rd_step, wr_step, pc_step;
  logic out_valid, done, converged;
  logic [6:0] out_beat;
  logic [3:0] iters;
  int checks = 0, failures = 0;

  ldpc_ctrl #(.MAX_ITER(10)) dut (.*);

  int pass_after;     // parity passes at the check following this iteration
  int n_chk, n_var, n_wr_c, n_wr_v, n_pc, n_out, n_ld, cyc, first, last, pcs_run;
  bit seq_err;
  int exp_rd, exp_wr;

  always_comb pc_all_ok = (pass_after > 0) && (pcs_run == pass_after);

  always @(negedge clk) begin
    if (rst_n) begin
      cyc++;
      if (ld_we) begin
        if (first < 0) first = cyc;
        if (int'(ld_beat) != n_ld) seq_err = 1;
        n_ld++;
      end
      if (cn_en) n_chk++;
      if (vn_en) n_var++;
      if (wr_en && wr_chk) n_wr_c++;
      if (wr_en && !wr_chk) n_wr_v++;
      if (pc_en) begin
        n_pc++;
        if (int'(pc_step) == NSTEP - 1) pcs_run++;
      end
      if (out_valid) begin
        if (int'(out_beat) != n_out) seq_err = 1;
        n_out++;
        last = cyc;
      end
      if (wr_en && int'(wr_step) >= NSTEP) seq_err = 1;
    end
  end

  task automatic frame(input int pa, input int stall_pct, input int exp_it, input string name);
    int stalls = 0, b = 0;
    pass_after = pa;
    n_chk = 0; n_var = 0; n_wr_c = 0; n_wr_v = 0; n_pc = 0; n_out = 0; n_ld = 0;
    first = -1; last = 0; pcs_run = 0; seq_err = 0;
    while (b < NBEAT) begin
      @(negedge clk);
      in_valid = !(stall_pct > 0 && b > 0 && int'($urandom_range(99)) < stall_pct);
      if (!in_valid) stalls++;
      #1;
      if (in_valid && in_ready) b++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    while (!done) @(negedge clk);
    checks++; if (last - first + 1 != NBEAT + stalls + 28 * exp_it + NSTEP + NOBEAT) begin
      failures++; $display("FAIL %s: %0d cycles", name, last - first + 1);
    end
    checks++; if (int'(iters) != exp_it || converged != (pa > 0)) begin
      failures++; $display("FAIL %s: iters %0d converged %0d", name, iters, converged);
    end
    checks++; if (n_var != 14 * exp_it || n_wr_v != 12 * exp_it) begin
      failures++; $display("FAIL %s: variable phase cycles %0d writes %0d", name, n_var, n_wr_v);
    end
    // the check phase that ends the frame early is cut after its 12th cycle
    checks++; if ((pa == 0 && (n_chk != 140 || n_wr_c != 120)) ||
                  (pa > 0 && (n_chk != 14 * exp_it + 12 || n_wr_c != 12 * exp_it + 10))) begin
      failures++; $display("FAIL %s: check phase cycles %0d writes %0d", name, n_chk, n_wr_c);
    end
    checks++; if (n_pc != 12 * (pa > 0 ? exp_it : 10)) begin
      failures++; $display("FAIL %s: parity check cycles %0d", name, n_pc);
    end
    checks++; if (n_out != NOBEAT || n_ld != NBEAT || seq_err) begin
      failures++; $display("FAIL %s: out %0d in %0d seq %0d", name, n_out, n_ld, seq_err);
    end
    $display("%s: %0d cycles, iters %0d", name, last - first + 1, iters);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pass_after = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    frame(0, 0, 10, "never passes");
    frame(1, 0, 1, "passes after iteration 1");
    frame(4, 25, 4, "passes after iteration 4, stalls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
