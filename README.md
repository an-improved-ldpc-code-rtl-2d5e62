# Rate-3/4 quasi-cyclic LDPC codec with a semi-parallel sum-product decoder

This design encodes and decodes an irregular LDPC code of length 960 and rate 3/4.
Its parity-check matrix is built from 120 x 120 circulant matrices. The code comes from the
"improved LDPC code structure" of the thesis *An Improved LDPC Code Structure and Its VLSI
Decoder Realization*, and the architecture follows its decoder. The idea is simple. The parity
part of H is lower block-triangular and its diagonal circulants are invertible. That lets the
encoder run in two short shift-register passes instead of a dense generator-matrix multiply.
The decoder keeps the code's row/column regularity, so ten copies of each node processor, fed
by counter-addressed register files, decode a frame in at most 388 clock cycles.

Everything is synthesizable SystemVerilog: an encoder (`qc_encoder`), a decoder
(`ldpc_decoder`), and a top (`ldpc_codec`) that puts the two side by side.

## The code

    H = [ A3 A4 A5 A6 A7 A8 A9  0  ]      2 block rows    x 120 = 240 checks
        [ B3 B4 B5 B6 B7 B8 B9 B10 ]      8 block columns x 120 = 960 bits

Each block is a circulant, given by a polynomial in x. A term x^d puts a one in row r,
column (r + d) mod 120.

| column j | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| block row A | x^6+x^21 | x^7+x^20 | x^3+x^14 | x^11+x^13 | x+x^7 | x^2+x^5+x^34 | 1+x^10+x^30 | 0 |
| block row B | x^35+x^53 | x^6+x^31 | x^7+x^24 | x^20+x^31 | x^4+x^13 | x^3+x^7 | x^43 | 1+x^10+x^30 |
| column weight | 4 | 4 | 4 | 4 | 4 | 5 | 4 | 3 |

The polynomial exponents are differences from a difference family with lambda = 1, so H
has no 4-cycles. Every row has weight 16.

The codeword is `[d, p1, p2]`:

- **d:** 720 data bits, block columns 0–5.
- **p1:** 120 parity bits, block column 6.
- **p2:** 120 parity bits, block column 7.

These polynomials are in `ldpc_pkg` as two tables, one entry per circulant term (an "edge
set"). There are 32 edge sets, 16 per block row:

- `EDGE_CB`: the block column of each edge set.
- `EDGE_OFF`: its exponent d.

The other modules derive their connectivity from these two tables.

## Encoder (`qc_encoder`)

Let C = A9 = B10 = circ(1 + x^10 + x^30). C is invertible modulo x^120 − 1, so:

    p1 = C^-1 · Σ_{j<6} A_j d_j
    p2 = C^-1 · (Σ_{j<6} B_j d_j + B9 p1)

Multiplying by a circulant is a cyclic convolution. So data bit k of block column j adds a
fixed 120-bit column, cyclically shifted by k, to the parity accumulator. There are two such
columns, g1_j = C^-1 a_j and g2_j = C^-1 b_j. They are constants, and they are computed at
elaboration by SystemVerilog functions:

1. Gauss–Jordan elimination over GF(2) gives the first column of C^-1.
2. A cyclic convolution with each a_j or b_j gives g1_j and g2_j.

No table is stored in a file.

The hardware has two 120-bit shift registers, two 120-bit accumulators and XOR trees. Each
beat shifts 10 data bits in.

Timing:

- 72 data beats, under a valid/ready handshake.
- 12 more cycles, in which the finished p1 is fed through the step-2 path.
- `done` then pulses, with `parity = {p2, p1}` (p1 in bits 0–119).

A frame takes 84 cycles when the source never stalls.

## Decoder (`ldpc_decoder`)

### Resources

The parallel factor is P = 10.

- **Message storage:** 32 register-sets (`msg_regset`), one per edge set. Each holds 120
  six-bit messages, one per one in its circulant.
- **Check node units:** 20 sixteen-input CNFUs (`cnfu`). Ten process rows of block row A and
  ten process rows of block row B, at the same time.
- **Variable node units:** 80 VNFUs (`vnfu`), ten per block column. Their degrees are 4, 4,
  4, 4, 4, 5, 4 and 3.
- **Other blocks:**
  - `llr_regs`: the receiving buffer for the channel values L.
  - `hard_regs`: the hard decisions x.
  - `pcfu`: the parity-check unit, which evaluates 20 rows per cycle.
  - `ldpc_ctrl`: the controller, which drives every address and enable from a few counters.

### Schedule

| Stage | Cycles | What happens |
|---|---|---|
| Load | 24 | 40 LLRs per beat go into `llr_regs`. They also go into every register-set of their block column, as the first variable-to-check messages (q = L). |
| Check phase | 12 + 2 | Each cycle, each register-set delivers 10 messages to the CNFUs. The results are written back to the same positions 2 cycles later, because the CNFUs have a 2-stage pipeline. |
| Variable phase | 12 + 2 | The same, for the VNFUs. They also write 80 hard decisions per cycle. |
| Parity check | 12 | `pcfu` checks 20 rows per cycle against the hard decisions. |
| Output | 72 | 10 decoded data bits per beat. |

The parity check of iteration i does not cost extra time. It runs during the first 12 cycles
of the check phase of iteration i+1. If all 240 checks hold, the decoder abandons that check
phase and starts the output. This is safe because its write-backs only touch messages that
will never be read again. After the last allowed iteration, the check runs alone.

Frame time, from the first input beat to the last output beat:

    24 + 28·i + 12 + 72 cycles      (i = iterations run, at most MAX_ITER = 10)

With all 10 iterations this is 388 cycles. At the 200 MHz reported for a 0.18 µm
implementation, that is 720 / 388 × 200 MHz ≈ 370 Mbit/s of decoded data. A clean frame
stops after one iteration, in 136 cycles.

### Register-set addressing

This is the part that makes the decoder small. It is also the part that is hardest to see
from the code.

Take edge set e, with block column c and offset d. Its 120 messages are stored in **column
order**: entry k belongs to code bit 120c + k. The ones of a circulant x^d sit at
(row r, column (r + d) mod 120), so row r's message is at entry (r + d) mod 120.

- **Variable phase, step s (0–11):** every set reads and writes entries 10s … 10s+9. These
  are the same columns for all sets of a block column, so the ten VNFUs of column c see
  exactly the messages of their ten code bits.
- **Check phase, step s:** set e reads entries (10s + p + d) mod 120, for p = 0–9. These are
  the messages of rows 10s … 10s+9. So CNFU p of block row A gets one message from each of
  the 16 A sets for row 10s+p: the row's full set of edges. Block row B works the same way.

The rotation is a 10-out-of-120 multiplexer with a constant offset. The write-back uses the
same address, delayed by the pipeline depth. Only the step counter and a one-bit
"rotate" select change at run time.

### Arithmetic: reformulated sum-product

The units use the reformulated form of the sum-product algorithm. It puts one φ look-up in
each unit, instead of two in the check node. Here φ(x) = −ln tanh(x/2), and φ is its own
inverse.

**Check node unit** (16 inputs q, sign-magnitude):

    S    = Σ φ(|q_i|)                        one LUT per input, then an adder tree
    r_i  = sign: XOR of all signs ^ sign(q_i)
           magnitude: S − φ(|q_i|)           left in the φ domain

**Variable node unit** (channel value L, inputs r in the φ domain):

    t_i  = ±φ(|r_i|)                         back to the LLR domain
    Q    = L + Σ t_i                         x̂ = 1 when Q < 0
    q_i  = Q − t_i                           saturated to ±31/4

Both units have a two-stage pipeline: one register after the LUTs and adders, one at the
output. Each has an enable input that stops its registers while the other phase runs. This
stands for the gated clock used to save power.

### Number formats

| Quantity | Format | Step | Range |
|---|---|---|---|
| Channel LLR L | [6:2] two's complement | 1/4 | −8 … +7.75 |
| Message q (variable → check) | 6-bit sign-magnitude | 1/4 | ±7.75 |
| Message r (check → variable), φ domain | 6-bit sign-magnitude | 1/16 | ±1.9375 |
| Register-set symbol | 6 bits | — | holds q or r |

The [6:2] format for channel values and messages, and the 6-bit symbols, follow the source.
The finer step of the φ-domain values is this design's own choice.

It matters. φ is steep near 0 and flat above 2, so useful φ-domain values are small
numbers. With steps of 1/4, almost every strong message would collapse onto 0 or 0.25, and a
fixed-point model would not converge even on mildly noisy frames. With steps of 1/16, the
decoder corrects frames with dozens of channel errors (see below).

`phi_lut` holds both tables, each indexed by a 5-bit magnitude:

| Setting | Direction | Entry k |
|---|---|---|
| `TO_LLR = 0` | LLR → φ | y = min(31, round(16·φ(k/4))) |
| `TO_LLR = 1` | φ → LLR | y = min(31, round(4·φ(k/16))) |

φ(0) is infinite, so entry 0 saturates to 31 in both tables.

## Interfaces and timing

### `ldpc_codec` (top)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock; active-low asynchronous reset of the control state |
| `enc_valid` / `enc_ready` | in/out | 1 | Encoder data handshake |
| `enc_data` | in | 10 | Data bits 10b … 10b+9 of beat b |
| `enc_done` | out | 1 | One-cycle pulse: `enc_parity` is valid |
| `enc_parity` | out | 240 | `{p2, p1}`; bit j is code bit 720+j |
| `dec_in_valid` / `dec_in_ready` | in/out | 1 | Decoder input handshake; ready while loading |
| `dec_in_llr` | in | 40 × 6 | LLRs of code bits 40b … 40b+39. Positive means "0 more likely" |
| `dec_out_valid` | out | 1 | Output beat valid (72 consecutive cycles, no back-pressure) |
| `dec_out_data` | out | 10 | Decoded data bits 10b … 10b+9 |
| `dec_done` | out | 1 | One-cycle pulse after the last output beat |
| `dec_converged` | out | 1 | 1 if the output satisfies every parity check |
| `dec_iters` | out | 4 | Iterations run |

The decoder accepts a new frame once `dec_done` has pulsed. Load stalls (`dec_in_valid` low)
only hold the load counter, so each stall cycle adds one cycle to the frame time.

`MAX_ITER` (default 10) is the only parameter of the top. The code itself is fixed by the
tables in `ldpc_pkg`. Changing it means rewriting those tables, the VNFU degrees and the
encoder's choice of C.

## Where this design departs from, or goes beyond, the source

- **Column weights.** The source's text gives the degree distribution of this code as
  [4,4,4,4,4,4,5,3]. Its table of polynomials gives [4,4,4,4,4,5,4,3]. The polynomials
  define the code, so they were followed.
  - The weight-5 column is block column 5.
  - The unit count is the same either way: six 4-input, one 5-input and one 3-input VNFU per
    group.
- **φ-domain resolution.** Messages are 6-bit everywhere, as in the source. But the φ-domain
  check-to-variable values use steps of 1/16, not 1/4. The reason is given above.
- **Storage order, address rotation, handshakes, bit order, reset.** These are this design's
  own choices. The source describes the register-sets as counter-controlled
  multiplexers/de-multiplexers and gives the beat widths (40 symbols in, 10 bits out), but
  not these details.
- **Clock gating.** Clock gating is modelled by enables (`cn_en`, `vn_en`) on the unit
  pipelines. Clock-gating cells belong to the synthesis flow.
- **Early-termination timing.** The check result is used at the end of the overlapped check.
  The check phase that was running is discarded.
- **Encoder.** The two-step equations are from the source. The 10-bit data width, the
  handshake and computing the generator columns at elaboration are this design's own.

The source also studies other parts, which are not built here:

- codes of rate 2/3 (length 720) and rate 4/5 (length 1200);
- min-sum and "re-mapped" node processors.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_phi_lut` | Both tables against φ computed in real arithmetic. |
| `tb_cnfu`, `tb_vnfu` | Random messages every cycle against a model of the node equations, with φ in real arithmetic. Also the 2-cycle latency, the saturation and (CNFU) the enable. VNFUs of all three degrees are tested. |
| `tb_msg_regset` | Flush, rotated and unrotated reads and writes, against an array model. |
| `tb_pcfu` | Codewords, single-bit errors and random words, against H built from the tables. |
| `tb_llr_regs`, `tb_hard_regs` | Buffer ordering and the output word. |
| `tb_ldpc_ctrl` | Phase sequence, write-back delay, overlapped check, early stop and cycle counts (388 at the limit). |
| `tb_qc_encoder` | Parity against an independent Gaussian-elimination encoder. Codewords against H. Cycle count with and without input gaps. |
| `tb_ldpc_decoder` | 14 frames through the full decoder against a flooding sum-product model with the same quantisation: clean, bit errors, AWGN and pure noise, with input stalls. Every output bit, the convergence flag, the iteration count and the cycle count are compared. |
| `tb_ldpc_codec` | End to end at default parameters: random data, then the RTL encoder, then BPSK with AWGN or bit flips, quantised to [6:2], then the RTL decoder. It checks the decoded data, the codeword and both cycle formulas. It counts early termination, the iteration limit, encoder gaps, decoder stalls and corrected channel errors, and fails if any of them never happens. |

In the end-to-end run:

- Frames with up to 39 channel errors (noise σ up to 0.55) decode correctly in 1–8
  iterations.
- Pure-noise frames run all 10 iterations, in 388 cycles plus stalls.

`tb_ldpc_ber` sweeps Eb/N0 over 2.5, 3.0, 3.5 and 4.0 dB, with 60 frames per point. It prints
the bit error rate, the frame error rate and the mean number of iterations. It checks:

- the cycle count of every frame;
- that no converged frame carries wrong data;
- that the frame error rate falls with Eb/N0 and is below 10 % at 4.0 dB;
- that the mean iteration count falls.

One run gave these results:

| Eb/N0 | FER | BER | Mean iterations |
|---|---|---|---|
| 3.0 dB | 29/60 | 2.2e-2 | 7.6 |
| 3.5 dB | 16/60 | 1.1e-2 | 6.0 |
| 4.0 dB | 1/60 | 2.3e-5 | 3.5 |

### Known limitation: quantisation loss

This decoder gives up roughly 0.5 dB against floating-point sum-product decoding of the same
code. The source reports about 0.1 dB for its [6:2] decoder. The comparison was made with a
bit-accurate software model of this datapath, on the same 40 noisy frames at 3.0 dB:

| Decoder model | Frames failed |
|---|---|
| Floating point, 10 iterations | 10 of 40 |
| This design: φ domain in steps of 1/16, 5-bit magnitude | 22 of 40 |
| φ domain in steps of 1/32, 7-bit magnitude | 13 of 40 |

Most of the loss comes from the φ-domain check-to-variable values. A wider register-set
symbol would recover most of it. The change touches `ldpc_pkg` (`MW`) and the two `phi_lut`
tables. The testbench models are written the same way, so they would change with them.

## Simulating

The testbenches run with plain Verilator 5 (two-state, `--timing`). From the repository
root:

    verilator --binary --timing -Irtl rtl/ldpc_pkg.sv tb/tb_ldpc_codec.sv \
              -y rtl --top-module tb_ldpc_codec -Mdir obj_codec
    ./obj_codec/Vtb_ldpc_codec

Replace `tb_ldpc_codec` with any other testbench name. Each one finishes in well under a
second of simulation time. The build of the full decoder takes about 20 s.

## Files

| Area | Files |
|---|---|
| Shared definitions | `rtl/ldpc_pkg.sv`: sizes, message types, the edge-set tables and helper functions. |
| Top | `rtl/ldpc_codec.sv` |
| Encoder | `rtl/qc_encoder.sv` |
| Decoder | `rtl/ldpc_decoder.sv`, `ldpc_ctrl.sv`, `msg_regset.sv`, `cnfu.sv`, `vnfu.sv`, `phi_lut.sv`, `pcfu.sv`, `llr_regs.sv`, `hard_regs.sv` |
| Testbenches | `tb/tb_<module>.sv`, one per module, plus `tb/tb_ldpc_ber.sv` (error-rate sweep) |
