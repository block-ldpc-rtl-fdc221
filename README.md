# Block-LDPC encoder and decoder in SystemVerilog

LDPC codes decode well. They are awkward to build in hardware when the parity check matrix
is unstructured: a decoder then needs a huge routing network, and an encoder has to multiply
by a dense generator matrix. Block-LDPC avoids both problems by putting two rules on the
matrix when the code is constructed:

* **Block structure (for the decoder).** H is an `m x n` array of `p x p` blocks. Each block is
  either zero or a cyclically shifted identity matrix. One check node unit can then serve a
  whole block row, and one variable node unit a whole block column. Every connection is a
  counter that starts at the block's shift value.
* **Lower macro-block triangular part (for the encoder).** H is written as
  `[A B T; C D E]`, with `g = p` rows in `[C D E]`. `T` is lower triangular, with `k` identity
  "macro-blocks" `I_1..I_k` on its diagonal. Their sizes shrink roughly by half. Inside each
  band of `T` every block column holds at most one non-zero block. The encoder then only needs
  sparse products and one small dense `g x g` product. It computes

      z2 = inv(Phi) * (E * inv(T) * (A*z1) + C*z1),   Phi = E*inv(T)*B + D
      z3 = inv(T) * (A*z1 + B*z2)

  Each multiplication by `inv(T)` is a `k`-stage back substitution. Stage `i` takes one pass of
  `p` clock cycles.

This RTL implements both halves for one code: a pipelined, partially parallel encoder and a
partially parallel decoder. The code has the dimensions of a rate-1/2, 4096-bit example:
`m = 64`, `n = 128`, `p = 32`, `g = 32`, `k = 5`.

## The code (`rtl/bldpc_code_pkg.sv`)

Everything is generated from one package. It lists the non-zero blocks of H (row, column,
shift) in row order, and holds a column-order index, the encoder time slot of every block,
and the `32 x 32` matrix `inv(Phi)`.

* Block columns 0..63 hold the information bits `z1`. Column 64 holds `z2`. Columns 65..127
  hold `z3`.
* Block rows 0..62 form `[A B T]`. `T` has macro bands of 32, 16, 8, 4 and 3 block rows. Block
  row 63 is `[C D E]`.
* There are 404 non-zero blocks. Column degrees are 2, 3, 4 and 5 for 34, 58, 18 and 18 block
  columns. Most rows have degree 6 or 7. The `[C D E]` row has degree 11, because the
  short last bands of `T` can put their second block nowhere else. There are no 4-cycles.
  `Phi` is invertible.
* The code was drawn by random block flipping and shifting. The construction starts from the
  identity macro-blocks. It then turns zero blocks into shifted identities at random places,
  rejects any choice that closes a 4-cycle, and follows the target degree distribution. The
  selection rules based on cycle degree and "loopiness" were not applied.
* A block with shift `d` has its 1 in row `r` at column `(r+d) mod p`. Multiplying a
  sub-vector `x` by that block gives `y[r] = x[(r+d) mod p]`, which is a cyclic rotation.
* `H_SLOT` is each block's time slot in the encoder. For `A` and `C` it is the block row's
  colour in a conflict graph: two rows conflict when they share a block column. A greedy
  colouring of `A` uses 8 colours. `B`, `D` and `E` use slot 0. A lower block of `T` in band
  `b` uses slot `b-1`, where bands are numbered from 0.

To use a different code, replace the package. It must keep the same names and the same
layout. All other modules size themselves from it.

## Encoder

### Sparse block products, bit-serially (`bs_mvm`)

A product `y = U x` with a block-structured `U` is a set of XORs of rotated sub-vectors. The
unit computes every output sub-vector of one time slot in parallel, one bit per clock, so a
slot takes `p` cycles:

* Each input sub-vector `x_j` sits in one `p`-bit single-port register file.
* Each register file has its own read counter `RAG_j`. At the start of a slot the counter is
  loaded with the shift of the block that uses `x_j` in that slot. A register file not used in
  the slot is gated off.
* A hard-wired network takes bit `RAG_j` of every `x_j` to an XOR tree for each row.
* The output address is a common counter that restarts at 0 every slot.

A single-port register file can feed only one output per cycle. Two rows that share an input
therefore go in different slots, and that is the colouring above. The product takes
`slots x p` cycles. The unit covers any rectangle of H. It can also XOR an addend vector
into its outputs, which gives `E*w + C*z1` and `B*z2 + A*z1`.

### Back substitution (`tri_solve`)

The unit computes band `i` of `y = inv(T) x` in slot `i-2` as
`y_i = x_i + sum_{j<i} T_ij y_j`. Every earlier `y_j` is read through its own counter. This is
conflict-free because each block column has at most one block inside a band. `y_1 = x_1` is
read straight from the input bank, so the whole solve takes `(k-1) * p = 128` cycles. The
results of bands 2..k are kept in an internal register file, because later bands read them.

### `inv(Phi)` (`phi_mul`)

A fully parallel XOR array of 32 inputs and 32 outputs. Its result is ready as soon as the
input bank is swapped, and it is streamed out in slot 0.

### Pipeline (`bldpc_encoder`, `enc_timer`, `vec_delay`)

All stages advance together once per **epoch** of `max(l_max, k-1) * p = 8 * 32 = 256`
cycles. `enc_timer` counts bits, slots and epochs. Every stage's input register files have
two banks. The producing stage writes its output stream bit by bit into the receiving bank.
At the end of the epoch the banks swap.

| epoch | work |
|---|---|
| 0 | `z1` enters the input banks of `A` and `C` (slot 0, one bit of each of the 64 sub-vectors per cycle) |
| 1 | `u = A z1`, `v = C z1` |
| 2 | `w = inv(T) u` (T1) |
| 3 | `e = E w + v` |
| 4 | `z2 = inv(Phi) e` |
| 5 | `b = B z2 + u` |
| 6 | `z3 = inv(T) b` (T2) |
| 7 | `[z2 z3]` streamed out (64 bits per cycle for 32 cycles) |

`u`, `v` and `z2` are needed several epochs after they are made. Chains of double-banked
`vec_delay` register files carry them forward. A new frame can enter every epoch:

* Throughput is 2048 information bits per 256 cycles, 8 bits per clock. This equals
  `(n-m)/max(l_max, k-1)`.
* Latency is 7 epochs (1792 cycles) from the first input bit to the first parity bit.

Interface: wait for `in_ready` with the bit counter at 0, then hold `in_valid` for 32 cycles.
In cycle `t`, `z1_bits[j]` is bit `t` of information sub-vector `j`. The output has the same
shape: while `out_valid` is high, `par_bits[i]` is bit `out_addr` of parity sub-vector `i`.
Index 0 is `z2`, indices 1..63 are `z3`. The encoder does not echo `z1`: the codeword is
`[z1 z2 z3]`, and the user already holds `z1`.

## Decoder (`bldpc_decoder`)

The decoder has one unit or memory per block, row or column of H, all hard-wired from the
package:

* one `bldpc_cnu` per block row (64);
* one `bldpc_vnu` per block column (128);
* one decoding message memory `bldpc_dmmb` (32 x 6 bits) per non-zero block (404);
* per block column, a double-banked channel memory `bldpc_cmmb` and a 32-bit hard-decision
  memory `bldpc_hdmb`.

Each memory has its own address counter.

1. **Initialization, `p` cycles.** Every `CMMB_j` is copied into all `DMMB_ij` of its column.
2. **Check phase, `p` cycles.** Each DMMB counter starts at its block's shift. In cycle `r`,
   `CNU_i` reads the message of check row `r` from each of its DMMBs and writes the
   check-to-variable results back to the same addresses.
3. **Variable phase, `p` cycles.** All counters start at 0. In cycle `c`, `VNU_j` reads
   variable node `c` of every DMMB in its column and the channel message. It writes back
   `total - own message` and stores the sign of the total as the hard decision.

Steps 2 and 3 repeat `ITER` times (default 8). A frame takes `1 + p*(1 + 2*ITER) = 545`
cycles from `start` to `done`.

* The CNU uses the min-sum rule.
* Messages are 6-bit two's complement, saturated to ±31. A positive value means bit 0.
* The VNU sums at 10 bits.
* There is no early stopping.

Interface:

* `llr_we`, `llr_addr` and `llr_in[j]` write bit `llr_addr` of every block column into the
  receiving channel bank. The next frame can be written while the current one decodes.
* `start` is accepted while `busy` is low. It swaps the banks.
* After `done`, `hd_out[j]` is bit `hd_addr` of block column `j`. It stays valid until the next
  `start`.

## Top (`bldpc_top`)

The top holds the encoder and the decoder of the same code side by side, as transmitter and
receiver. Their ports are brought out unchanged, with the prefixes `enc_` and `dec_`. The
channel between them is not part of the design.

## Error-rate run

`tb_bldpc_ber` sends random codewords as BPSK symbols over an AWGN channel and decodes them with
the full-size decoder. The received values are scaled by 8 and saturated to 6 bits. With 12
frames of 4096 bits at each point, it measured:

| Eb/N0 | channel BER | decoded BER | frames in error |
|---|---|---|---|
| 1 dB | 1.3e-1 | 1.2e-1 | 12 of 12 |
| 2 dB | 1.0e-1 | 1.5e-2 | 12 of 12 |
| 3 dB | 7.8e-2 | 4.1e-5 | 1 of 12 |

Twelve frames per point show where decoding starts to work. They are far too few to draw the
low-error part of a BER curve. No published values are reproduced here, so these numbers only
describe this matrix with 6-bit min-sum decoding and 8 iterations. They say nothing about how it
compares with any other code.

## Sizes against the published estimates

For this code, `|P| = 404` non-zero blocks and `q = 6`.

* **Decoder memory.** The published estimate is `(2n + |P|) * p * q + n * p` bits. Here that
  is `(256 + 404) * 32 * 6 + 128 * 32 = 130816` bits. The decoder holds exactly that: 126720
  bits of message memory plus 4096 hard-decision bits.
* **Encoder counter start values.** These take `|P| * log2(p) = 2020` bits of constants. They
  are wired into the read-counter load logic instead of being held in a separate ROM.
* **Rates.** The encoder takes one frame per 256 cycles. The decoder takes one frame per
  545 cycles with 8 iterations.

## Where this departs from the published architecture

* **The parity check matrix is this design's own.** Only the dimensions, the structural rules
  and the degree distribution come from the Block-LDPC description. The loopiness selection
  and the cycle-degree rule were not used. The `[C D E]` row is heavier than the other rows.
* **Band rule for `T`.** The rule "column weight at most one in each `T_i`" is taken to apply to
  each band of block rows of `T`. This is what makes each back-substitution stage fit in one
  slot.
* **Pipeline stages and storage.** The published register count gives five stages and about
  `14mp - 2g = 28608` bits. This pipeline has seven compute epochs plus an output epoch.
  `A` and `C` each keep their own copy of `z1`. `A z1` is carried through four epochs. The
  register storage is therefore larger, about 45k bits of register files.
* **Decoder throughput.** The published bound `(n-m) f / (2D)` leaves out initialization. Here
  the `p` initialization cycles are not overlapped with the previous frame. That gives 3.76
  instead of 4 information bits per clock at `D = 8`.
* **Not given, so chosen here:** message width `q = 6`, min-sum check nodes, `D = 8`, every port
  and handshake, reset behaviour (asynchronous, active-low), and the greedy colouring.
* The gate-count estimates (about `320q` gates per CNU and `250q` per VNU) were not compared
  with synthesis.
* Only the rate-1/2, `p = 32` configuration is built. The other example codes (rate 1/2 with
  `p = 64`, rate 7/8 with `p = 16` and `p = 32`) need another package. The modules are written
  against the package names and do not assume these sizes, but only the default code has
  been simulated.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. Each has a
watchdog. For example, for the end-to-end test at full size:

    verilator --binary -Irtl -Itb rtl/bldpc_code_pkg.sv tb/bldpc_ref_pkg.sv \
        tb/tb_bldpc_top.sv --top-module tb_bldpc_top -o sim && ./obj_dir/sim

Verilator finds the other modules through `-Irtl`. Building the full decoder takes a minute
or two. The run itself is quick.

The reference package `tb/bldpc_ref_pkg.sv` evaluates the matrix formulas directly: rotations,
region products, forward substitution, a direct encoder and the syndrome.

| testbench | what it checks |
|---|---|
| `tb_bldpc_code_pkg` | structural rules of H, no 4-cycles, degree distribution, `inv(Phi)` really inverts `Phi` |
| `tb_enc_timer` | counters, slot-load strobe, epoch length |
| `tb_bs_mvm` | `A` and `B`+addend products against the reference, one slot per row |
| `tb_tri_solve` | `inv(T)` against forward substitution, band `i` in slot `i-2` |
| `tb_phi_mul` | `Phi * z2 = e`, with `Phi` applied through `E`, `inv(T)`, `B` and `D`, so the check does not use the `inv(Phi)` table |
| `tb_vec_delay` | one-epoch carry |
| `tb_bldpc_encoder` | back-to-back frames: zero syndrome, equal to the reference encoder, latency 7 epochs |
| `tb_bldpc_cnu`, `tb_bldpc_vnu` | node arithmetic against brute-force min-sum and sums |
| `tb_bldpc_dmmb`, `tb_bldpc_cmmb`, `tb_bldpc_hdmb` | counter addressing, bank swapping, write enables |
| `tb_bldpc_decoder` | 4 frames with 12 weak wrong decisions each, all corrected; latency 545 cycles; the next frame loaded during decoding |
| `tb_bldpc_top` | encoder into decoder at full size. It counts encoder pipeline overlap, loading during decoding, and corrected frames, and requires each to happen. |
| `tb_bldpc_ber` | AWGN error-rate run at 1, 2 and 3 dB (see above). Decoding must lower the error rate at 2 and 3 dB, and the decoded BER at 3 dB must be below 1e-3. |
