# LDPC transceiver with unequal error protection, optimized scaling and failed-check-node selection

This RTL implements an IEEE 802.11n LDPC link over 16-QAM or 64-QAM. It
combines three cheap ways of lowering the bit error rate without changing the
code:

1. **Unequal error protection (UEP) by bit placement.** In a Gray-mapped QAM
   symbol some bit positions are safer than others. They only select the
   quadrant, or the minor quadrant, of the point. The transmitter reorders the
   code-word so that systematic (message) bits occupy those positions and
   parity bits take the rest. The receiver undoes the reordering on the soft
   bits.
2. **Optimized scaling factor (OSF) Min-Sum decoding.** A scaling factor α in
   0..1 multiplies the check-node output and the extrinsic term that the
   bit-node update removes. The best α depends on the signal-to-noise ratio.
   It was found off-line for each Eb/N0 and is read from a lookup table at run
   time.
3. **Failed-check-node (FCN) selection.** If decoding does not converge
   within the iteration limit, the output is not the last iteration's word.
   It is the word of the iteration that left the fewest parity checks
   unsatisfied.

```
 message ─► ldpc_encoder ─► uep_reorder ─► qam_mapper ─► tx_i/tx_q
                                                            │  (channel, outside)
 dec_msg ◄─ ldpc_msa_decoder ◄─ uep_restore ◄─ qam_demapper ◄─ rx_i/rx_q
                 ▲ alpha
              osf_lut ◄─ code length, rate, modulation, Eb/N0
```

`ldpc_uep_system` is the top. Its transmit and receive chains are independent
and share only the modulation select. The channel sits between `tx_*` and
`rx_*`.

## The code

The code is the IEEE 802.11n LDPC code of length 648 and rate 1/2. Its
parity-check matrix is a 12 × 24 array of 27 × 27 blocks. The array is stored
as `H_BASE` in `rtl/ldpc_pkg.sv`:

- −1 is a zero block.
- h ≥ 0 is the identity matrix cyclically shifted by h. Row z of that block
  has its 1 in column (z + h) mod 27.

The last 12 base columns have the standard's encoding structure: one
weight-3 column followed by a dual diagonal.

Code-word bit order is systematic first. Bits 0..323 are the message and bits
324..647 the parity.

The encoder (`ldpc_encoder`) does not store a generator matrix:

1. For each base row i it forms λᵢ, the XOR of that row's shifted message
   blocks.
2. The sum of all λᵢ gives the first parity block. In that sum the three
   entries of the weight-3 column reduce to a plain identity.
3. The remaining parity blocks follow row by row down the dual diagonal.

The encoder is combinational with a registered output, so it produces one
code-word per cycle with one cycle of latency.

Only the 648-bit rate-1/2 matrix is built in. The other 802.11n codes (rates
2/3 and 3/4, length 1296) need their base matrices in `H_BASE`, with `MB`, `NB`
and the lifting size changed to match. The encoder needs no other change,
provided the matrix keeps the 802.11n parity structure. The decoder needs no
other change either. The UEP blocks, the demapper and the OSF table already
handle every rate and length.

## UEP bit placement

Let Nₛ be the number of systematic bits and Nₚ the number of parity bits, with
Nₛ ≥ Nₚ for every rate used.

- The first Nₛ − Nₚ systematic bits are sent first, in order, filling whole
  symbols.
- The last Nₚ systematic bits and the Nₚ parity bits are then interleaved, as
  in the table below.

For the rate-1/2 code Nₛ = Nₚ, so every bit takes part in the interleaving.

| modulation | systematic positions | parity positions | why |
|---|---|---|---|
| 16-QAM | b0, b2 | b1, b3 | b0 and b2 fix the quadrant |
| 64-QAM | b0, b1, b3 | b2, b4, b5 | b0 and b3 fix the major quadrant; b1 (with b4) the minor quadrant |

Symbol t of the interleaved part carries systematic bits
`U + 2t, U + 2t + 1` (16-QAM) or `U + 3t .. U + 3t + 2` (64-QAM), where
U = Nₛ − Nₚ. It carries parity bits `Nₛ + 2t, ..` or `Nₛ + 3t, ..`. Within
each class the bits keep their code-word order; that order is a choice of this
design. `uep_reorder` sends one symbol per cycle with a valid/ready handshake.
`uep_restore` writes each soft bit back to its code-word position. When the
last symbol arrives, it presents the whole code-word of LLRs to the decoder.

## Constellation, mapping and soft demapping

`qam_mapper` uses the 802.11n Gray axes. b0b1 (b0b1b2) give I and b2b3
(b3b4b5) give Q:

- 16-QAM axis: 00 → −3, 01 → −1, 11 → +1, 10 → +3
- 64-QAM axis: 000 → −7, 001 → −5, 011 → −3, 010 → −1, 110 → +1, 111 → +3,
  101 → +5, 100 → +7

The outputs are the integer levels. Scaling to unit power (1/√10, 1/√42) is
left to the analog stage.

`qam_demapper` takes samples in the same units, with `RX_FRAC` = 3 fractional
bits. For each bit it computes the max-log soft value y, which is positive
when the bit is more likely 1:

- 16-QAM: y(b0) = I, y(b1) = 2 − |I|
- 64-QAM: y(b0) = I, y(b1) = 4 − |I|, y(b2) = 2 − ||I| − 4|

Q gives the remaining bits in the same way. The demapper outputs LLR = −y, so a
positive LLR means 0. It applies no noise-variance scaling, because a scaled
Min-Sum decoder does not need it. LLRs are 8 bits, saturated to ±127 (±15.9
levels).

## The decoder (`ldpc_msa_decoder`, `fcn_select`)

The decoder uses a flooding schedule. Each iteration takes two clock cycles:

| step | cycle | operation |
|---|---|---|
| load | start | r = channel LLRs; M(j,i) = rᵢ on every edge |
| check node | CN | E(j,i) = α · Π_{i'≠i} sign M(j,i') · min_{i'≠i} \|M(j,i')\| (two-minimum form) |
| bit node | VN | Lᵢ = rᵢ + Σⱼ E(j,i); zᵢ = (Lᵢ < 0); s = H zᵀ; M(j,i) = Lᵢ − α·E(j,i) |
| stop | VN | if s = 0, or after `IMAX` = 20 iterations |

Note that α appears twice on the path from one check-node output to the next
bit-node message. E already contains α, and the bit-node update subtracts α·E
rather than E. This follows the OSF scheme, which scales both updates. It is
not the usual normalized Min-Sum, which subtracts E.

**FCN selection.** Every VN cycle, `fcn_select` counts the ones in the
syndrome. These are the failed check nodes. If the count is strictly below the
smallest count so far, the block stores that iteration's hard decision in
memory X. FCN_min starts at the number of check nodes, 324. X starts with the
channel hard decision; this preload is a choice of this design. The decoder
always delivers X:

- On convergence, X holds the zero-syndrome word.
- Otherwise, X holds the word with the fewest failed checks.

**Architecture and fixed point.** The decoder is fully parallel. Each of the
2376 edges has an 8-bit M register and an 8-bit E register, stored as
`[base row][base column][row in block]`. Every check node and every bit node
has its own logic.

- α is carried in tenths, because every tabulated value is a multiple of 0.1.
- α·x = sign(x)·⌊|x|·a/10⌋, so scaling truncates toward zero.
- Messages saturate symmetrically to ±127.
- Lᵢ is kept at full width.
- sign(0) counts as positive.

**Timing.** `start` is accepted when `ready` is high. `done` is a one-cycle
pulse from the clock edge 2·iters + 1 edges after the start edge. A
synchronous reader sees it at edge 2·iters + 2. A clean frame therefore takes
3 edges, and a frame that runs all 20 iterations takes 41. The outputs are
`cw_out`, `msg_out`, `success`, `iters` and `fcn_min`. They hold until the next
start.

## OSF lookup (`osf_lut`)

The table holds α for code lengths 648 and 1296, rates 1/2, 2/3 and 3/4, and
16-QAM and 64-QAM. It stores only the values measured for the combined
UEP + OSF + FCN scheme. The input `ebn0_hdb` is Eb/N0 in half-dB steps. The
breakpoints are:

- 16-QAM: 0, 1, 2, 3, 3.5, 4, 4.5, 5, 5.5, 6, 6.5, 7 dB
- 64-QAM: 0, 2, 4, 6, 8, 10, 11, 11.5, 12, 12.5, 13, 13.5, 14 dB

The block uses the entry of the largest breakpoint not above the input.
Below 0 dB it uses the first column. Above the highest Eb/N0 measured for a
rate, it keeps the last measured value. The top selects the table row that
matches the code in `ldpc_pkg`. How the receiver estimates Eb/N0 is outside
this design; the estimate is an input.

## Top-level interface (`ldpc_uep_system`)

| port | meaning |
|---|---|
| `mode` | `MOD_16QAM` / `MOD_64QAM` for both chains; change only between code-words |
| `ebn0_hdb` | Eb/N0 estimate (half dB), sampled when a code-word goes to the decoder |
| `msg_valid/msg_ready/msg` | 324 message bits per code-word |
| `tx_valid/tx_ready/tx_i/tx_q` | one symbol per cycle, integer levels |
| `rx_valid/rx_ready/rx_i/rx_q` | one received sample per cycle, 10-bit, 3 fractional bits |
| `dec_valid` | one-cycle pulse with `dec_msg`, `dec_success`, `dec_iters`, `dec_fcn_min`, `dec_alpha` |

`rx_ready` drops only while a complete code-word of LLRs waits for a busy
decoder. At one symbol per cycle that cannot happen: a frame takes 108 or 162
cycles to arrive, and decoding takes at most 41.

All handshakes are valid/ready. A transfer happens on a rising edge where both
are high. Resets are asynchronous and active low.

## How far it has been checked

Each block has a self-checking testbench in `tb/` whose expected values are
computed independently:

- **Decoder and top.** They are compared against a bit-exact software model in
  `tb/tb_ldpc_ref_pkg.sv`, which works over an explicit edge list of H. The
  comparison covers the decoded word, success flag, iteration count, FCN
  minimum and latency. Cases range from clean to heavily noisy channels.
- **Encoder.** Every output code-word must satisfy all 324 parity checks.
- **Mapper and demapper.** Tested exhaustively over all constellation points.
- **UEP blocks.** Tested at rate 1/2 and rate 3/4 (Nₛ = 486), in both
  modulations.
- **Top.** `tb_ldpc_uep_system` loops the transmitter to the receiver through
  a pseudo-Gaussian noise model at the default size. It checks every
  transmitted symbol and the decoder outcome of each frame. It requires that
  both modulations, early stop, the iteration limit with FCN output, and
  several α values all occur.

- **Eb/N0 sweep.** `tb_ebn0_sweep` runs the 648-bit rate-1/2 workload
  through the top over a complex AWGN channel (Box-Muller noise set from
  Eb/N0). It sends 25 frames per point. In one run:
  - 16-QAM: frames start decoding error-free around 3-4 dB; all 25 are clean
    at 7 dB.
  - 64-QAM: all 25 frames are clean from 8 dB up.

What is not established:

- **Error-rate performance.** The testbenches run tens of frames, not BER
  curves down to 10⁻⁵, so the gains claimed for the scheme are not
  reproduced here.
- **The stored matrix.** `H_BASE` is the standard's 648-bit rate-1/2 base
  matrix. The tests show that encoder and decoder agree on it, but they cannot
  detect a wrong entry in it.

Departures and choices to be aware of:

- Only one code is built in; see "The code".
- The word widths, the parallel architecture, the demapper metric and the
  handling of untabulated Eb/N0 values are choices of this design.
- The two 64-QAM OSF tables are taken in the same order as the 16-QAM ones:
  648 first, then 1296.
- Synthesis of the fully parallel decoder is large. It has about 38 k
  flip-flops for the message registers, plus 324 check-node and 648 bit-node
  units.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/ldpc_pkg.sv tb/tb_ldpc_ref_pkg.sv tb/tb_ldpc_uep_system.sv \
    --top-module tb_ldpc_uep_system -o sim
./obj_dir/sim
```

Replace the testbench name to run another block's test. Each test ends with a
line `TB_RESULT checks=N failures=F`. Building the decoder and top testbenches
takes about half a minute, and running them takes well under a second.

## Files

| file | content |
|---|---|
| `rtl/ldpc_pkg.sv` | base matrix, modulation type, UEP position rules, saturation helper |
| `rtl/ldpc_encoder.sv` | systematic 802.11n encoder |
| `rtl/uep_reorder.sv`, `rtl/uep_restore.sv` | UEP interleaving and its inverse on soft bits |
| `rtl/qam_mapper.sv`, `rtl/qam_demapper.sv` | Gray mapping and max-log soft demapping |
| `rtl/osf_lut.sv` | scaling-factor tables |
| `rtl/fcn_select.sv` | failed-check-node counter, minimum and code-word memory |
| `rtl/ldpc_msa_decoder.sv` | scaled Min-Sum decoder |
| `rtl/ldpc_uep_system.sv` | top level |
| `tb/tb_ldpc_ref_pkg.sv` | reference encoder, syndrome counter and bit-exact decoder model |
| `tb/tb_ebn0_sweep.sv` | Eb/N0 sweep of the whole link over an AWGN channel |
| `tb/tb_*.sv` (others) | one self-checking testbench per block |
