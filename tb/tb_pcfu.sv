// tb_pcfu -- test of the parity check function unit.  The expected result
// comes from H built from the circulant polynomials of the code: the
// all-zero and all-one words are codewords (every row has even weight 16),
// a single flipped bit or a random word is not.  The unit is stepped
// through its 12 row groups per word, and a failing word followed by a
// passing one shows that the accumulation restarts.
module tb_pcfu;
  import ldpc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic [3:0] step = '0;
  logic [N-1:0] x;
  logic all_ok;
  int checks = 0, failures = 0;

  pcfu dut (.*);

  int T_RB [32] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0, 1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1};
  int T_CB [32] = '{0,0,1,1,2,2,3,3,4,4,5,5,5,6,6,6, 0,0,1,1,2,2,3,3,4,4,5,5,6,7,7,7};
  int T_D  [32] = '{6,21,7,20,3,14,11,13,1,7,2,5,34,0,10,30,
                    35,53,6,31,7,24,20,31,4,13,3,7,43,0,10,30};

  function automatic bit ref_ok(logic [N-1:0] w);
    for (int rb = 0; rb < 2; rb++)
      for (int r = 0; r < V; r++) begin
        bit s = 0;
        for (int t = 0; t < 32; t++) if (T_RB[t] == rb) s ^= w[V * T_CB[t] + (r + T_D[t]) % V];
        if (s) return 0;
      end
    return 1;
  endfunction

  task automatic run(input logic [N-1:0] w, input string name);
    bit ok_seen;
    x = w;
    for (int s = 0; s < NSTEP; s++) begin
      @(negedge clk);
      en = 1'b1; step = 4'(s);
      #1;
      if (s == NSTEP - 1) ok_seen = all_ok;
    end
    @(negedge clk);
    en = 1'b0;
    checks++;
    if (ok_seen != ref_ok(w)) begin
      failures++; $display("FAIL %s: all_ok=%0d expected %0d", name, ok_seen, ref_ok(w));
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] w;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run('0, "zero word");
    run('1, "all-one word");
    for (int k = 0; k < 40; k++) begin
      w = '1;
      w[$urandom_range(N - 1)] ^= 1'b1;
      run(w, "one flipped bit");
      run('1, "all-one word after a failure");
    end
    for (int k = 0; k < 20; k++) begin
      for (int i = 0; i < N; i++) w[i] = 1'($urandom_range(1));
      run(w, "random word");
    end
    // two bits that cancel in row 119 of block row A but fail elsewhere
    w = '0;
    w[V * 0 + (119 + 6) % V] = 1'b1;
    w[V * 0 + (119 + 21) % V] = 1'b1;
    run(w, "two bits sharing row 119");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
