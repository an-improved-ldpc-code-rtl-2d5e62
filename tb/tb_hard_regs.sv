// tb_hard_regs -- test of the hard decision registers: random decisions are
// written step by step as the VNFUs would, the full vector and the 72 output
// words are compared with the model.
module tb_hard_regs;
  import ldpc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0;
  logic [3:0] wstep = '0;
  logic [NCB-1:0][P-1:0] wdata;
  logic [N-1:0] x;
  logic [6:0] obeat = '0;
  logic [NOUT-1:0] odata;
  logic [N-1:0] model;
  int checks = 0, failures = 0;

  hard_regs dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 3; f++) begin
      for (int s = 0; s < NSTEP; s++) begin
        @(negedge clk);
        we = 1'b1; wstep = 4'(s);
        for (int j = 0; j < NCB; j++)
          for (int p = 0; p < P; p++) begin
            wdata[j][p] = 1'($urandom_range(1));
            model[V * j + P * s + p] = wdata[j][p];
          end
      end
      @(negedge clk);
      we = 1'b0;
      #1;
      checks++;
      if (x != model) begin failures++; $display("FAIL frame %0d: x differs", f); end
      for (int k = 0; k < NOBEAT; k++) begin
        obeat = 7'(k);
        #1;
        checks++;
        if (odata != model[NOUT * k +: NOUT]) begin
          failures++;
          if (failures < 10) $display("FAIL output beat %0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
