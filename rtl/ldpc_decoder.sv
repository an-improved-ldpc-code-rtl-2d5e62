// ldpc_decoder -- semi-parallel sum-product decoder for the rate-3/4,
// length-960 irregular LDPC code built from 2 x 8 circulants of size 120.
//
// Structure (parallel factor P = 10):
//   * 32 extrinsic message register-sets (msg_regset), one per circulant
//     term, 120 six-bit messages each; they hold variable-to-check messages
//     after a variable phase and check-to-variable messages after a check
//     phase, always at the same position.
//   * 2 x 10 sixteen-input CNFUs (cnfu): in the check phase they process 10
//     rows of block row A and 10 rows of block row B per cycle.
//   * 8 x 10 VNFUs (vnfu), with 4, 4, 4, 4, 4, 5, 4 and 3 inputs for the
//     eight block columns: in the variable phase they process 80 code bits
//     per cycle and write the hard decisions.
//   * the receiving buffer (llr_regs), the hard decision registers
//     (hard_regs), the parity check unit (pcfu, 20 rows per cycle) and the
//     controller (ldpc_ctrl).
// The received LLRs are written to the receiving buffer and, converted to
// sign-magnitude, into every register-set of their block column (the
// initialisation q = L).  Each iteration is a 14-cycle check phase and a
// 14-cycle variable phase; the parity check of iteration i overlaps the check
// phase of iteration i+1 and stops decoding as soon as H x = 0.
//
// Interface:
//   in_llr   NIN = 40 two's-complement [6:2] LLRs per beat (positive means
//            bit 0 more likely), code bit order, 24 beats per frame, accepted
//            when in_valid && in_ready.
//   out_data 10 decoded data bits per beat while out_valid, 72 beats, bit i
//            of beat k is code bit 10k+i.  No back-pressure.
//   done     one-cycle pulse after the last output beat; converged and iters
//            (iterations run) describe the frame from the first output beat.
// Timing: 388 cycles from the first input beat to the last output beat when
// all 10 iterations run (200 MHz in the document's 0.18 um implementation,
// i.e. about 370 Mbit/s of data), less when decoding stops early.
// The architecture, sizes and schedule follow the document; port protocols,
// the storage order and the bit order are this design's own.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int MAX_ITER = 10
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  llr_t                          in_llr [NIN],
  output logic                          out_valid,
  output logic [NOUT-1:0]               out_data,
  output logic                          done,
  output logic                          converged,
  output logic [$clog2(MAX_ITER+1)-1:0] iters
);
  localparam int BPB = V / NIN;             // input beats per block column
  localparam int SBW = $clog2(NSTEP);

  // ---------------------------------------------------------------- control
  logic                      ld_we;
  logic [$clog2(NBEAT)-1:0]  ld_beat;
  logic                      chk_phase, cn_en, vn_en, wr_en, wr_chk;
  logic [SBW-1:0]            rd_step, wr_step, pc_step;
  logic                      pc_en, pc_all_ok;
  logic [$clog2(NOBEAT)-1:0] out_beat;

  ldpc_ctrl #(.MAX_ITER(MAX_ITER)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .ld_we, .ld_beat,
    .chk_phase, .rd_step, .cn_en, .vn_en, .wr_en, .wr_chk, .wr_step,
    .pc_en, .pc_step, .pc_all_ok,
    .out_valid, .out_beat, .done, .converged, .iters
  );

  // ------------------------------------------------------- receiving buffer
  llr_t llr_rd [NCB][P];

  llr_regs u_llr (
    .clk, .we(ld_we), .beat(ld_beat), .wdata(in_llr),
    .step(rd_step), .rdata(llr_rd)
  );

  msg_t init_msg [NIN];
  always_comb begin
    for (int i = 0; i < NIN; i++) init_msg[i] = llr_to_msg(in_llr[i]);
  end

  // ----------------------------------------------- extrinsic register-sets
  msg_t rs_rd [NE][P];
  msg_t rs_wr [NE][P];
  msg_t cn_q  [NRB][P][NE_ROW];
  msg_t cn_r  [NRB][P][NE_ROW];
  msg_t vn_q  [NCB][P][MAXDEG];

  for (genvar e = 0; e < NE; e++) begin : g_rs
    localparam int RB = e / NE_ROW;
    localparam int RK = e % NE_ROW;
    localparam int CB = EDGE_CB[e];
    localparam int CK = edge_rank(e);

    msg_regset #(.OFF(EDGE_OFF[e])) u_rs (
      .clk,
      .init_we  (ld_we && (int'(ld_beat) / BPB == CB)),
      .init_blk (2'(int'(ld_beat) % BPB)),
      .init_data(init_msg),
      .rd_rot   (chk_phase),
      .rd_step  (rd_step),
      .rd_data  (rs_rd[e]),
      .wr_en    (wr_en),
      .wr_rot   (wr_chk),
      .wr_step  (wr_step),
      .wr_data  (rs_wr[e])
    );

    for (genvar p = 0; p < P; p++) begin : g_p
      assign cn_q[RB][p][RK] = rs_rd[e][p];
      assign rs_wr[e][p]     = wr_chk ? cn_r[RB][p][RK] : vn_q[CB][p][CK];
    end
  end

  // ------------------------------------------------------------------ CNFUs
  for (genvar b = 0; b < NRB; b++) begin : g_cn_rb
    for (genvar p = 0; p < P; p++) begin : g_cn
      cnfu #(.NI(NE_ROW)) u_cnfu (
        .clk, .en(cn_en), .q(cn_q[b][p]), .r(cn_r[b][p])
      );
    end
  end

  // ------------------------------------------------------------------ VNFUs
  logic [NCB-1:0][P-1:0] xhat;

  for (genvar j = 0; j < NCB; j++) begin : g_vn_cb
    localparam int D = col_deg(j);
    for (genvar p = 0; p < P; p++) begin : g_vn
      msg_t vr [D];
      msg_t vq [D];
      for (genvar k = 0; k < MAXDEG; k++) begin : g_k
        if (k < D) begin : g_used
          assign vr[k]          = rs_rd[col_edge(j, k)][p];
          assign vn_q[j][p][k]  = vq[k];
        end else begin : g_unused
          assign vn_q[j][p][k]  = '0;
        end
      end
      vnfu #(.NI(D)) u_vnfu (
        .clk, .en(vn_en), .r(vr), .llr(llr_rd[j][p]), .q(vq), .xhat(xhat[j][p])
      );
    end
  end

  // ------------------------------------------------ hard decisions, output
  logic [N-1:0] x;

  hard_regs u_hard (
    .clk, .we(wr_en && !wr_chk), .wstep(wr_step), .wdata(xhat),
    .x, .obeat(out_beat), .odata(out_data)
  );

  // ----------------------------------------------------------- parity check
  pcfu u_pcfu (
    .clk, .rst_n, .en(pc_en), .step(pc_step), .x,
    .all_ok(pc_all_ok)
  );
endmodule
