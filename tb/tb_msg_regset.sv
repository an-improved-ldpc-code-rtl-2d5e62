// tb_msg_regset -- test of one extrinsic message register-set (offset 34).
// A frame is flushed through the 40-wide initial port; then every row group
// is read in both addressing modes and compared with a model array, random
// write-backs in both modes are applied and read back, and a flush is shown
// to win over a simultaneous message write.
module tb_msg_regset;
  import ldpc_pkg::*;
  localparam int OFF = 34;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic init_we = 1'b0, wr_en = 1'b0, rd_rot = 1'b0, wr_rot = 1'b0;
  logic [1:0] init_blk = '0;
  logic [3:0] rd_step = '0, wr_step = '0;
  msg_t init_data [NIN];
  msg_t rd_data [P];
  msg_t wr_data [P];
  msg_t model [V];

  msg_regset #(.OFF(OFF)) dut (.*);

  task automatic check_all();
    for (int rot = 0; rot < 2; rot++)
      for (int s = 0; s < NSTEP; s++) begin
        rd_rot = 1'(rot); rd_step = 4'(s);
        #1;
        for (int p = 0; p < P; p++) begin
          int c = (P * s + p + (rot ? OFF : 0)) % V;
          checks++;
          if (rd_data[p] != model[c]) begin
            failures++;
            if (failures < 10) $display("FAIL rot=%0d step=%0d p=%0d", rot, s, p);
          end
        end
      end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < V / NIN; b++) begin
      @(negedge clk);
      init_we = 1'b1; init_blk = 2'(b);
      for (int i = 0; i < NIN; i++) begin
        init_data[i] = msg_t'($urandom_range(63));
        model[NIN * b + i] = init_data[i];
      end
    end
    @(negedge clk);
    init_we = 1'b0;
    check_all();
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_rot = 1'($urandom_range(1)); wr_step = 4'($urandom_range(NSTEP - 1));
      for (int p = 0; p < P; p++) begin
        wr_data[p] = msg_t'($urandom_range(63));
        model[(P * int'(wr_step) + p + (wr_rot ? OFF : 0)) % V] = wr_data[p];
      end
    end
    @(negedge clk);
    wr_en = 1'b0;
    check_all();
    // flush and write in the same cycle: the flush wins
    @(negedge clk);
    init_we = 1'b1; init_blk = 2'd0; wr_en = 1'b1; wr_rot = 1'b0; wr_step = 4'd0;
    for (int i = 0; i < NIN; i++) begin
      init_data[i] = msg_t'($urandom_range(63));
      model[i] = init_data[i];
    end
    for (int p = 0; p < P; p++) wr_data[p] = ~init_data[p];
    @(negedge clk);
    init_we = 1'b0; wr_en = 1'b0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
