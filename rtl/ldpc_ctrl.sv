// ldpc_ctrl -- controller of the semi-parallel LDPC decoder.
//
// A frame goes through these states (cycle counts at the default sizes):
//   LOAD  accept NBEAT = 24 input beats (in_valid/in_ready handshake; gaps in
//         in_valid simply stretch the phase),
//   CHK   check phase: read row group 0..11 on cycles 0..11, write the CNFU
//         results back PIPE = 2 cycles later, 14 cycles in all,
//   VAR   variable phase, same 14-cycle schedule through the VNFUs, which
//         also write the hard decisions,
//   FPC   parity check alone after the last allowed iteration (12 cycles),
//   OUT   NOBEAT = 72 output beats of NOUT = 10 data bits.
// From the second check phase on, the parity check of the previous
// iteration's hard decisions runs during cycles 0..11 of the check phase
// (overlapped decoding).  If it passes, decoding stops and OUT follows at
// once.  A frame that needs all MAX_ITER iterations takes
// 24 + MAX_ITER*(12+2)*2 + 12 + 72 = 388 cycles from its first input beat to
// its last output beat, the document's figure; a frame that converges after
// i iterations takes 24 + i*28 + 12 + 72.
// The phase order, the overlap and the cycle budget follow the document; the
// handshake, the status outputs and the exact state encoding are this
// design's own.  Reset is asynchronous, active low.  Lint tools may report
// rst_n as used both asynchronously and synchronously: the second use is
// the `disable iff` of the two assertions at the end, not logic.
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int MAX_ITER = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // input side
  input  logic                      in_valid,
  output logic                      in_ready,
  output logic                      ld_we,
  output logic [$clog2(NBEAT)-1:0]  ld_beat,
  // message passing
  output logic                      chk_phase,   // read side is in the check phase
  output logic [$clog2(NSTEP)-1:0]  rd_step,
  output logic                      cn_en,
  output logic                      vn_en,
  output logic                      wr_en,
  output logic                      wr_chk,      // the write-back comes from the CNFUs
  output logic [$clog2(NSTEP)-1:0]  wr_step,
  // parity check
  output logic                      pc_en,
  output logic [$clog2(NSTEP)-1:0]  pc_step,
  input  logic                      pc_all_ok,
  // output side
  output logic                      out_valid,
  output logic [$clog2(NOBEAT)-1:0] out_beat,
  output logic                      done,
  output logic                      converged,
  output logic [$clog2(MAX_ITER+1)-1:0] iters
);
  typedef enum logic [2:0] {S_LOAD, S_CHK, S_VAR, S_FPC, S_OUT} state_t;

  localparam int PH_LEN = NSTEP + PIPE;   // 14 cycles per phase
  localparam int CW = $clog2(NOBEAT);      // counter wide enough for every state

  state_t                         state;
  logic [CW-1:0]                  cnt;
  logic [$clog2(MAX_ITER+1)-1:0]  iter;    // completed iterations

  wire in_fire = in_valid & in_ready;
  wire phase   = (state == S_CHK) || (state == S_VAR);
  wire pc_last = pc_en && (int'(cnt) == NSTEP - 1);

  assign in_ready  = (state == S_LOAD);
  assign ld_we     = in_fire;
  assign ld_beat   = ($clog2(NBEAT))'(cnt);
  assign chk_phase = (state == S_CHK);
  assign rd_step   = ($clog2(NSTEP))'(cnt);
  assign cn_en     = (state == S_CHK);
  assign vn_en     = (state == S_VAR);
  assign wr_en     = phase && (int'(cnt) >= PIPE);
  assign wr_chk    = (state == S_CHK);
  assign wr_step   = ($clog2(NSTEP))'(int'(cnt) - PIPE);
  assign pc_en     = ((state == S_CHK) && (iter != '0) && (int'(cnt) < NSTEP)) ||
                     (state == S_FPC);
  assign pc_step   = ($clog2(NSTEP))'(cnt);
  assign out_valid = (state == S_OUT);
  assign out_beat  = ($clog2(NOBEAT))'(cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      cnt       <= '0;
      iter      <= '0;
      done      <= 1'b0;
      converged <= 1'b0;
      iters     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_LOAD: if (in_fire) begin
          if (int'(cnt) == NBEAT - 1) begin
            state <= S_CHK;
            cnt   <= '0;
            iter  <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_CHK: begin
          if (pc_last && pc_all_ok) begin        // early termination
            state     <= S_OUT;
            cnt       <= '0;
            converged <= 1'b1;
            iters     <= iter;
          end else if (int'(cnt) == PH_LEN - 1) begin
            state <= S_VAR;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_VAR: begin
          if (int'(cnt) == PH_LEN - 1) begin
            cnt  <= '0;
            iter <= iter + 1'b1;
            state <= (int'(iter) + 1 == MAX_ITER) ? S_FPC : S_CHK;
          end else cnt <= cnt + 1'b1;
        end
        S_FPC: begin
          if (pc_last) begin
            state     <= S_OUT;
            cnt       <= '0;
            converged <= pc_all_ok;
            iters     <= iter;
          end else cnt <= cnt + 1'b1;
        end
        S_OUT: begin
          if (int'(cnt) == NOBEAT - 1) begin
            state <= S_LOAD;
            cnt   <= '0;
            done  <= 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // The write-back of a phase never overlaps the reads of the next one.
  assert property (@(posedge clk) disable iff (!rst_n)
                   wr_en |-> int'(wr_step) < NSTEP);
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_fire |-> state == S_LOAD);
endmodule
