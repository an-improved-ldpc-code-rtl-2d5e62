// tb_llr_regs -- test of the receiving buffer: a random frame is written in
// 24 beats of 40 symbols, then every row group is read and compared, for all
// eight block columns, with the model.
module tb_llr_regs;
  import ldpc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0;
  logic [4:0] beat = '0;
  llr_t wdata [NIN];
  logic [3:0] step = '0;
  llr_t rdata [NCB][P];
  llr_t model [N];
  int checks = 0, failures = 0;

  llr_regs dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 2; f++) begin
      for (int b = 0; b < NBEAT; b++) begin
        @(negedge clk);
        we = 1'b1; beat = 5'(b);
        for (int i = 0; i < NIN; i++) begin
          wdata[i] = llr_t'($urandom_range(63));
          model[NIN * b + i] = wdata[i];
        end
      end
      @(negedge clk);
      we = 1'b0;
      for (int s = 0; s < NSTEP; s++) begin
        step = 4'(s);
        #1;
        for (int j = 0; j < NCB; j++)
          for (int p = 0; p < P; p++) begin
            checks++;
            if (rdata[j][p] != model[V * j + P * s + p]) begin
              failures++;
              if (failures < 10) $display("FAIL step=%0d col=%0d p=%0d", s, j, p);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
