# A true random number generator from two FPGA clock managers

This is a true random number generator (TRNG) that needs almost no logic.
It uses coherent sampling. Two clocks with a slightly different frequency,
Clk_A and Clk_B, come from the two mixed-mode clock managers (MMCMs) of a
Xilinx 7-series FPGA, both fed by one 100 MHz reference. One flip-flop
samples Clk_A on each edge of Clk_B. Counting the '1's it captures gives a
number whose lowest bit is random, because clock jitter blurs the Clk_A edges.
The logic is one sampling flip-flop, a window counter and a toggle flip-flop,
about 15 flip-flops in all. Everything else is the clock managers, which most
FPGA designs leave unused.

The RTL follows the MMCM-based design published as *"Enhanced use of
mixed-mode clock manager for coherent sampling-based true random number
generator"*. It adds a serial output path of its own design, so the generator
can be simulated and measured end to end.

## How coherent sampling makes a random bit

Suppose the frequencies are in the ratio f_A : f_B = (N+1) : N. Then Clk_B
slips back by t_d = t_A / N against Clk_A on every sample. After N samples
the two clocks line up again. So N consecutive samples sweep exactly one
period of Clk_A at a resolution of t_d. With a duty cycle of 1/2, about N/2 of
the samples are '1'.

Only the samples near a Clk_A edge are uncertain. There, clock jitter (and, in
silicon, flip-flop metastability) decides between 0 and 1. So the count
spreads around N/2, and the spread grows with σ_jitter / t_d. The least
significant bit of the count is the random output, one bit per N samples.

This design counts the '1's over a fixed window of samples. It does not
measure the length of a run of '1's. The run-length variant breaks down when
noise splits a run near an edge, which gives very small counts with little
entropy. A fixed window needs an exact frequency ratio, and a clock manager
provides one.

## Choosing the clock-manager settings

An MMCM divides the reference by D, multiplies by M in its VCO loop and
divides by Q:

    f_OUT = M / (D * Q) * f_IN

- D is an integer from 1 to 106.
- M runs from 2 to 64 and Q from 1 to 128, both in steps of 1/8.
- For speed grade -1 parts, f_PFD = f_IN/D must be 10-450 MHz, f_VCO must be
  600-1200 MHz, and f_OUT must be 4.68-800 MHz.

With f_IN = 100 MHz, D can be at most 10 and M/D must lie between 6 and 12.

The parameter sets come from an earlier DCM-based generator (a DCM is the
clock manager of older Xilinx FPGAs). Each set is a pair of DCM settings,
(M_A, D_A) and (M_B, D_B). `trng_pkg` turns them into MMCM settings in two
ways.

**Normal (NM).** Q takes the role of the DCM divisor and D = 1. Then M and Q
are both halved (if M ≤ 24) or quartered (if M > 24), so that M/D fits the
VCO range. For example, set J23 becomes M = 7.75, Q = 8.00 for Clk_A and
M = 7.5, Q = 7.75 for Clk_B. That is 96.875 MHz and 96.774 MHz, a ratio of
961 : 960, so N = 960.

**Jittery (JT).** This is the key idea. With the normal settings the MMCM
output is too clean. Most counts then come out the same, so the LSB carries
almost no entropy. Multiplying both M and D by D_max = floor(64 / M) leaves
every frequency, and therefore N, unchanged. But the larger dividers make the
loop noisier.

For J23 the factor is 8 (M = 62, D = 8). The peak-to-peak output jitter rises
from 141.8 ps to 427.4 ps. The table behind this is in `j23_jitter_pp_ps`:
141.837, 184.566, 229.787, 273.577, 305.392, 343.210, 383.515 and 427.425 ps
for factors 1 to 8.

The package holds the DCM pairs of four sets: J01 (N = 434), J02 (N = 440),
J22 (N = 899) and J23 (N = 960). Other sets are added to `dcm_set`.
`ratio_n` computes N from the six MMCM numbers, so the window always
matches the clocks.

**Shorter windows.** If the window covers N/K samples instead of N, bits come
K times faster. With the J23 clocks, K = 8 gives 96.774 MHz / 120 =
0.806 Mbit/s. The top's `SAMPLES_DIV` parameter sets K. This RTL does not
derive the MMCM settings for such a configuration (see *Limits*). With the
J23 clocks a window of N/8 covers only an eighth of the Clk_A period. Most
such windows then hold no edge, and their LSB is not random.

## Blocks

| file | what it is |
|---|---|
| `rtl/trng_pkg.sv` | types, reference parameter sets, NM/JT selection, N, jitter table |
| `rtl/mmcm_model.sv` | behavioural MMCM: period from M, D, Q, with random edge jitter, lock and power-down |
| `rtl/cs_counter.sv` | sampling flip-flop, window counter, ones counter or T flip-flop |
| `rtl/cdc_handshake.sv` | two-phase handshake that carries each result from Clk_B into the reference domain |
| `rtl/tx_formatter.sv` | results to bytes: whole counts or packed LSBs, 8-byte FIFO, overflow counter |
| `rtl/uart_tx.sv` | 8N1 transmitter, 3 Mbit/s from 100 MHz with a fractional accumulator |
| `rtl/trng_top.sv` | everything wired together |

Data flows as follows:

    clk_in ─┬─ MMCM A ── Clk_A ──► D  ┐
            └─ MMCM B ── Clk_B ──► clk┘ cs_counter ──► cdc_handshake ──► rnd_valid / rnd_count
                                                                      └► tx_formatter ─► uart_tx ─► uart_txd

### cs_counter

Each Clk_B edge does the following:

- The sampling flop takes Clk_A.
- The window index advances.
- The sample from the previous edge is added to the ones counter.

On the last index of the window, `count` is loaded with the sum of the WINDOW
samples taken at the WINDOW edges before the current one. `valid` pulses in
the same cycle, and the counter restarts.

With `FULL_COUNT = 0` the ones counter becomes one toggle flip-flop (a flop and
an XOR), which is all the random bit needs. `count` is then the LSB alone. At
N = 960 this build has 14 flip-flops: sampler, 10-bit window index, toggle,
output and valid. The published figure for a T flip-flop build without the
serial link is 18 flip-flops and 17-19 LUTs, with no itemization.

### Clock domains and reset

The sampler runs on Clk_B and the output path on the 100 MHz reference.
`cdc_handshake` copies each result into a holding register and toggles a
request. The request passes a two-flop synchronizer. The acknowledge comes
back the same way. A transfer takes about three reference cycles plus three
Clk_B cycles, far less than any usable window. A result that arrives while a
transfer is pending is dropped and counted on `drop_cnt`.

`rst` resets both MMCMs and the reference-domain logic. The Clk_B logic stays
in reset, through a two-flop synchronizer of `!locked`, until both MMCMs report
lock. The synchronizer's flip-flops power up set, so the Clk_B logic is in
reset from the very first Clk_B edge. Verilator's lint points out this
initial value, and it is intended.

Two assertions guard the handshakes:

- The crossing's holding register stays still while a transfer is pending.
- The formatter keeps offering the same byte until the UART takes it.

### Serial output

`send_count = 1` sends every count as two bytes, low byte first, for
recording the count distribution. `send_count = 0` packs eight LSBs per byte,
the first bit in bit 0, which is the raw bit string for statistical tests.

A 3 Mbit/s 8N1 line carries 300 kbyte/s. At the default N = 960 that is
enough for every count: 100.8 k counts/s × 20 line bits = 2.02 Mbit/s. For
windows shorter than about 645 samples it is not, and among the built-in
sets that includes J02 (N = 440 at 95.2 MHz, 4.3 Mbit/s of counts). The formatter then drops
whole results and counts them on `overflow_cnt`. In LSB mode even 1.5 Mbit/s
of random bits fits.

## Top-level interface (`trng_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk_in` | in | 1 | 100 MHz reference |
| `rst` | in | 1 | synchronous reset, active high; also resets the MMCMs |
| `send_count` | in | 1 | serial format: 1 counts, 0 packed LSBs |
| `uart_txd` | out | 1 | serial line, idle high |
| `locked` | out | 1 | both MMCMs locked |
| `rnd_valid` | out | 1 | one reference cycle per result |
| `rnd_count` | out | 16 | number of '1's in the window (LSB only if `FULL_COUNT = 0`) |
| `rnd_bit` | out | 1 | the random bit, `rnd_count[0]` |
| `overflow_cnt` | out | 16 | results dropped because the serial line was busy |
| `drop_cnt` | out | 16 | results lost in the clock crossing (Clk_B domain) |

| parameter | default | meaning |
|---|---|---|
| `PARAM_SET` | `SET_J23` | reference set (J01, J02, J22, J23) |
| `METHOD` | `METHOD_JT` | `METHOD_NM` or `METHOD_JT` |
| `SAMPLES_DIV` | 1 | window = N / SAMPLES_DIV |
| `FULL_COUNT` | 1 | full counter (1) or T flip-flop only (0) |
| `CLKIN_PERIOD_PS` | 10000.0 | reference period for the MMCM models |
| `CLK_HZ`, `BAUD` | 100 000 000, 3 000 000 | serial timing |
| `FIFO_DEPTH` | 8 | formatter FIFO, bytes |
| `LOCK_CYCLES` | 64 | model lock time, reference cycles |
| `JITTER_A_PS`, `JITTER_B_PS` | 427.425 | peak-to-peak jitter of the models |

At the defaults, a result arrives every 960 Clk_B periods (9.92 µs), which is
about 0.1 Mbit/s of raw random bits.

## The MMCM model and what simulation can show

`mmcm_model` is behavioural. On an FPGA, the vendor primitive (MMCME2) takes
its place, with the same M, D and Q. The model computes its period from the
declared reference period and places every edge on an absolute grid, so
rounding never accumulates and the ratio of two instances is exact. It then
moves each edge by a random amount with a triangular distribution bounded by
±½ of the peak-to-peak jitter. At elaboration it checks the MMCM limits listed
above.

Simulation therefore shows the mechanism, not the quality of the randomness:

- Metastability is absent.
- The jitter shape is assumed.
- Only the Clk_A jitter of J23 is a published number. Clk_B uses the same
  value.

`tb_trng_sets` prints what the model gives for 999 counts of each built-in
set:

| set | N | stdev NM | stdev JT | LSB min-entropy NM | LSB min-entropy JT |
|---|---|---|---|---|---|
| J01 | 434 | 0.96 | 1.72 | 0.94 | 0.97 |
| J02 | 440 | 1.40 | 2.12 | 0.97 | 0.96 |
| J22 | 899 | 2.02 | 3.58 | 0.96 | 1.00 |
| J23 | 960 | 2.10 | 3.57 | 0.99 | 1.00 |

The JT settings always widen the spread, as they should. But the factor is
only 1.5 to 1.8, and the NM settings already look random. On silicon the
published factors are about 10 (J01) and 4 (J23). There, 98 % of the J01 NM
counts were one value, and the LSB min-entropy was 0.03. The model assigns the
J23 Clk_A jitter table to every set and both clocks, with an assumed
triangular shape. It therefore overstates the jitter of the NM settings.
Judge entropy only on hardware.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops on its
own. A watchdog fails a testbench that hangs. Run with Verilator 5, for
example:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/trng_pkg.sv tb/tb_trng_top.sv --top-module tb_trng_top
    ./obj_dir/Vtb_trng_top

| testbench | covers |
|---|---|
| `tb_trng_pkg` | NM and JT settings of all four sets, D_max, N, periods, jitter table |
| `tb_mmcm_model` | lock timing, mean periods of the J23 and J01 clocks, jitter bounds, 961:960 ratio, power-down |
| `tb_cs_counter` | counts against an independent sampler for the 7:6 example and N = 48, window timing, T flip-flop build, short windows, reset |
| `tb_cdc_handshake` | ordered delivery and latency; drop accounting under a burst |
| `tb_tx_formatter` | both byte formats, overflow dropping and counting, mode change |
| `tb_uart_tx` | frames decoded by an independent receiver, 333-335 cycles per frame |
| `tb_trng_top` | four complete generators side by side (JT, NM, JT with N/8 windows, JT with only the T flip-flop): every count, result spacing and serial byte is checked. It also requires lock, both formats, a mode switch, serial overflow, a faster rate for the short window, a wider spread for JT than for NM, and packed bytes from the T flip-flop build |
| `tb_trng_sets` | J01, J02, J22 and J23 with NM and JT, 999 counts each: counts near N/2, result spacing of N Clk_B periods, wider spread for JT than NM, LSB min-entropy, serial overflow exactly for J02 |
| `tb_trng_top_full` | the top at its defaults: ten counts, then sixteen bits as two packed bytes |

`tb/trng_checker.sv` is the shared scoreboard of the last two. It samples
Clk_A at every Clk_B edge itself, so it does not rely on the design's
counter.

## Limits and departures

- **Shorter-window method.** Windows of N/K samples raise the published bit
  rate to 1.18 Mbit/s on average. They need MMCM settings chosen for that
  purpose, and neither the selection rule nor K is derived here. The window
  length is available (`SAMPLES_DIV`); the matching clock settings must be
  supplied. K = 8 is suggested by the 0.808 Mbit/s reported for a set close
  to J23, but is not confirmed.
- **Parameter sets.** Only J01, J02, J22 and J23 are built in. The generator
  accepts any set, but the other sets' numbers must be added to `trng_pkg`.
- **Own additions.** The clock-domain crossing, the byte formats, the FIFO
  and the UART framing are this implementation's. The published design sends
  its counts over a 3 Mbit/s UART without specifying how.
- **Not included.** MMCM power-down control (the model has the pin; the top
  ties it low), dynamic reconfiguration of the MMCM settings, and the 4-bit
  LFSR whitening applied in software before the NIST tests. The older DCM
  design's three-LSB extraction and von Neumann correction are also left out:
  this generator outputs one raw LSB per count.
- **Synthesis.** `trng_top` instantiates the behavioural model. For an FPGA
  build, replace `mmcm_model` with the vendor primitive, using the M, D and Q
  from `trng_pkg::select_set`. Both clocks then need proper constraints, and
  the sampling flip-flop's D input must be allowed to take a clock net.
