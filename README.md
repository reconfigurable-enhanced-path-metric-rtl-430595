# Traceback-free Viterbi decoder for a 4-state space-time trellis code

A space-time trellis code (STTC) sends each pair of data bits as one 4-PSK
symbol per transmit antenna. The symbols depend on the current bits and on the
previous pair, so the receiver decodes them with a Viterbi decoder. Most Viterbi
decoders keep a history of survivor decisions and trace back through it
before releasing a bit. That history is the largest memory in the decoder, and
the traceback adds latency.

This design removes the history altogether. Its key block is the **path metric
updater (PMU)**. In the 4-state, 4-PSK code the trellis state *is* the last
input symbol. So once add-compare-select has found the state with the smallest
path metric, that state's index already is the decoded symbol. The PMU receives
the best state as a one-hot vector. It turns the vector into a 2-bit index with
two OR gates and stores the index in a single 2-bit register. That is one cycle
of latency, compared with the eight of a seven-deep traceback register chain.

The RTL covers both digital ends of the link:

| module | role |
|---|---|
| `sttc_pkg` | shared constants, types, generator-coefficient packing, width functions |
| `sttc_encoder` | STTC encoder, 2 bits in, one 4-PSK symbol index per transmit antenna out |
| `sttc_bmc` | branch metric computation for all 16 trellis branches |
| `sttc_acs` | add-compare-select, normalised path metrics, one-hot best state |
| `sttc_pmu` | the improved path metric updater: one-hot → 2-bit decision, registered |
| `sttc_viterbi_decoder` | BMC → ACS → PMU |
| `sttc_system` | top level: encoder and decoder side by side |

The modulators, antennas, radio channel and channel estimator sit between the
encoder and the decoder and are not part of the RTL. Their signals are ports of
`sttc_system`, and the end-to-end testbench models them.

## The code and its trellis

The state is the previous input symbol, `S = {C1(t-1), C2(t-1)}`, with
`S0=00 … S3=11`. Each new input symbol `u = {C1(t), C2(t)}` becomes the next
state. Every state therefore reaches every state: the trellis is fully
connected, with 4 × 4 = 16 branches per step.

Antenna `i` sends symbol index

    x_i = Σ_k Σ_j g^k_{j,i} · C^k(t−j)  mod 4,   k ∈ {1,2}, j ∈ {0,1}

which is mapped onto the constellation as `j^x_i` (0 → +1, 1 → +j, 2 → −1,
3 → −j).

The coefficients are the `GEN` parameter, one byte per antenna. Bits
`[(2k+j)*2 +: 2]` hold `g^{k+1}_j`, where k = 0 is C1, the MSB of the symbol.
The default code for three transmit antennas is:

| antenna | g¹ (j=0, j=1) | g² (j=0, j=1) | symbol sent |
|---|---|---|---|
| 1 | (0, 2) | (0, 1) | previous symbol `S` |
| 2 | (2, 0) | (1, 0) | current symbol `u` |
| 3 | (2, 2) | (1, 1) | `u + S mod 4` |

The first two rows are the usual 4-state 4-PSK code for two antennas. The third
row is this design's choice for the third antenna. Any code with this trellis
(two bits per symbol, one symbol of memory) can be loaded through `GEN`. The
decoder and its traceback-free decision stay valid for any such code, because
the next state is still the input symbol.

## The decoder pipeline

Three register stages, one received vector per clock, `valid` carried
alongside:

1. **BMC** (`sttc_bmc`). For branch `p → n` it forms the candidate symbols
   `x_i(p,n)`. It fades them with the channel estimates `h[r][i]` and sums them
   per receive antenna. The branch metric is the squared Euclidean distance to
   the received samples, summed over the `NR` receive antennas:
   `bm[p][n] = Σ_r |r_r − Σ_i h_{r,i}·j^{x_i}|²`.
   Multiplying by `j^x` only swaps and negates I and Q, so the only
   multipliers are the 2·NR squarers per branch. All widths are exact, with no
   rounding and no saturation. For W = 8, NT = 3 and NR = 2, a difference is
   12 bits and a branch metric is 26 bits (`bm_width()` in `sttc_pkg`).

2. **ACS** (`sttc_acs`). For each next state it computes
   `s_n = min_p (s_p + bm[p][n])`. The state with the smallest `s_n` is flagged
   in the one-hot `acs_out`; on a tie the lower index wins. All metrics are then
   reduced by that minimum, so the best state holds 0. The stored metrics
   therefore never exceed the largest branch metric, and the path-metric
   registers need no more bits than a branch metric. `pm_min` shows the amount
   subtracted in the last step.

3. **PMU** (`sttc_pmu`). `co[0] = acs[1] | acs[3]`, `co[1] = acs[2] | acs[3]`.
   A multiplexer replaces the result with `00` when the input is not one-hot,
   so `0000` after reset decodes to `00`. The 2-bit register holds the decision.

   | acs | co |
   |---|---|
   | 0001 | 00 |
   | 0010 | 01 |
   | 0100 | 10 |
   | 1000 | 11 |
   | anything else | 00 |

Latency is three clocks from a received vector to its decision: one in the
BMC, one in the ACS and one in the PMU. The PMU alone adds one clock. There are
no bubbles: a new vector can enter every clock. When `in_valid` is low, every
stage holds its data and drops its valid.

### What the traceback-free decision costs

With no survivor history, the decision at step t uses only the received
vectors up to t. It never revises a decision when later vectors would have
pointed to another path. On a clean channel this changes nothing: the
transmitted path has metric 0, and its end state is the data symbol. Under
noise it decides more like a symbol-by-symbol detector than a full Viterbi
decoder. The end-to-end test shows this: with noise of ±20 and ±60 on 8-bit
samples, a visible fraction of decisions differ from the data sent. The test
confirms that the hardware matches the decoding rule exactly. It does not
measure error rates against a decoder with traceback.

## Interfaces

All modules use `clk` and an asynchronous, active-high `rst` that clears every
register. Metrics reset to 0, which favours no start state. The encoder starts
in S0.

`sttc_system` (top), parameters `NT = 3`, `NR = 2`, `W = 8`, `GEN`:

| port | dir | width | meaning |
|---|---|---|---|
| `tx_in_valid`, `tx_c` | in | 1, 2 | data bits `{C1, C2}` to encode |
| `tx_valid`, `tx_x[NT]` | out | 1, 2 each | symbol index per transmit antenna, one clock later |
| `rx_valid` | in | 1 | received vector valid |
| `rx_re[NR]`, `rx_im[NR]` | in | W signed | received baseband samples |
| `h_re[NR][NT]`, `h_im[NR][NT]` | in | W signed | channel estimate, receive antenna × transmit antenna |
| `dec_valid`, `dec_c` | out | 1, 2 | decoded `{C1, C2}`, three clocks after the vector |
| `dec_acs_out` | out | 4 | one-hot best state, one clock ahead of `dec_c` |

The channel estimate is sampled together with each received vector, so it may
change from symbol to symbol.

## Where the design rests on its own choices

The parts that define the design are fixed:

- the trellis (4 states, state = last symbol);
- the generator form of the encoder;
- the Euclidean branch metric;
- the min-over-predecessors ACS;
- the PMU's one-hot table and its gate structure (two ORs, a multiplexer, one
  register).

These were chosen here:

- **Number of receive antennas.** Two (parameter `NR`). The three transmit
  antennas (parameter `NT`) follow the reference design.
- **Generator coefficients.** The table above.
- **Number formats.** Signed 8-bit I/Q. The 4-PSK mapping `j^x`.
- **What the ACS hands the PMU.** A one-hot flag of the best state. Ties go to
  the lowest index.
- **Metrics.** Normalisation by the minimum, reset to all-zero.
- **Pipeline.** The valid handshake and the register stage in the BMC.
- **PMU latency.** One register: the decision appears on the first clock edge
  after the ACS result. The reference design quotes its output as ready
  "after two clock cycles"; that count is read here as starting from the cycle
  in which the input is applied.

The traceback-based PMU that this design replaces is a seven-deep register
chain followed by a look-up table. It is not included.

The source targets a 50 MHz clock on a small CPLD. Timing on a particular
device has not been checked. The longest path is in the BMC: three
sign-controlled adds, a subtract, a squarer and an adder tree, all in one
stage. Registering after the squarers is the natural first cut if timing needs
it.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and ends with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sttc_pmu` | the sequence 0000, 0001, 0010, 0100, 1000, 0001 decodes to 00, 00, 01, 10, 11, 00 one clock later; all 16 patterns; hold with `en` low; asynchronous reset |
| `tb_sttc_encoder` | 1000 random symbols with gaps, against the generator sum written out as a table |
| `tb_sttc_bmc` | 500 random vectors, including full-scale extremes, against complex arithmetic in integers; hold |
| `tb_sttc_acs` | 1000 random metric sets (small values to force ties, full-range values for the widths) against an integer ACS model |
| `tb_sttc_viterbi_decoder` | 2000 slots on a noise-free random channel: every symbol comes back, always three clocks later |
| `tb_sttc_system` | end to end at the default size; details below |

`tb_sttc_system` runs five phases of 3000 slots, with a reset and a new channel
between phases. The noise levels are 0, ±6, ±20 and ±60, followed by a deep
fade in which every gain is zero. Each decision is compared with a bit-exact
integer model of the decoder. In the noise-free phase each decision is also
compared with the data sent.

The test also counts how often each mechanism occurs, and fails if any count
is zero:

- each one-hot pattern / decoded value;
- a non-zero normalisation;
- best-state ties;
- valid bubbles;
- a reset clearing the output;
- decisions that differ from the data.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/sttc_pkg.sv tb/tb_sttc_system.sv \
        --top-module tb_sttc_system -o sim
    ./obj_dir/sim

`-Irtl` lets Verilator find each module in `rtl/<name>.sv`. Replace
`tb_sttc_system` with any other testbench name to run that one. The whole
suite runs in seconds.

## Changing the design

- **More receive antennas, or a different sample width.** Set `NR` or `W` on
  `sttc_system`. `BM_W` follows from `bm_width()`, and nothing else changes.
- **Another code with the same trellis.** Pass a different `GEN` (one byte per
  antenna, packed as described above) and `NT`. Encoder and decoder share the
  same `sttc_symbol()` function, so they stay consistent.
- **The testbenches assume the default code.** `tb_sttc_system` hard-codes it
  in its model (x1 = S, x2 = u, x3 = u + S); the other testbenches carry it as a
  coefficient table. Update them together with `GEN`.
- **A code with more states.** This would break the traceback-free decision:
  once the state is more than the last symbol, the best state no longer names
  the decoded bits.
