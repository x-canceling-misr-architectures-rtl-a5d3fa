# X-canceling MISR output-response compactors

A multiple-input signature register (MISR) is the densest way to compact scan
test responses: thousands of scan-chain outputs fold into a few tens of
signature bits. It has one weakness. A single unknown value (an *X*, from an
uninitialised memory, a non-scan flop, an analog block, a floating bus) that
enters the MISR spreads through the feedback, and the whole signature becomes
unknown.

An *X-canceling* MISR does not try to keep the Xs out. It lets them in and
removes them afterwards, by algebra. Every MISR bit is a linear (XOR)
function of the scan cells that were shifted in. If *k* of those cells are
X, each signature bit is some known value XORed with some subset of the *k*
unknowns. An *m*-bit signature therefore gives *m* linear equations in *k*
unknowns. When *m > k*, at least *m - k* combinations of signature bits have
every X cancel out. Their values are deterministic and can be compared with
the fault-free simulation. Test software finds those combinations by
symbolic simulation followed by Gauss-Jordan elimination over GF(2). On chip,
the only extra hardware is a *selective XOR*: it XORs together the signature
bits named by a mask that the tester supplies.

Checking *q* such combinations misses an error with probability about
2^-q. The reason is that each combination depends on roughly half of the
known scan cells. So:

| q (combinations checked) | 1  | 2  | 3    | 4     | 5     | 6     | 7    | 8    |
|--------------------------|----|----|------|-------|-------|-------|------|------|
| error coverage 1 - 2^-q  | 50 | 75 | 87.5 | 93.75 | 96.88 | 98.44 | 99.2 | 99.6 |

An *m*-bit MISR can absorb up to *m - q* Xs and still give *q* checks. The
tester decides when the MISR is "full" and its signature must be processed.
The hardware never needs to know where the Xs are.

This repository holds synthesizable SystemVerilog for both ways of running
such a compactor on a tester, and the testbenches that act as tester and test
software for them.

## Datapath shared by both schemes

```
 scan chains (N) --> phase shifter --> M-bit MISR --> [shadow register] --> selective XOR(s) --> tester output(s)
                     (N*F XORs)                                              ^ masks from tester channels
```

* **`phase_shifter`**: each scan-chain output fans out to *F* XOR gates,
  so it reaches *F* distinct MISR inputs. This removes the shift
  correlation between neighbouring chains and compacts *N* chains into *M*
  inputs. The chain-to-input pattern comes from `xc_pkg::ps_mask`, which
  draws *F* distinct inputs per chain with an integer hash of the chain
  index. The subsets have to look random. A regular pattern, such as an
  arithmetic progression of taps, turns into another chain's pattern after
  one MISR shift. An error on one chain can then be cancelled by an X on
  another chain one slice later. With such a pattern, about 9% of
  single-bit errors were invisible in simulation.
* **`misr`**: an internal-feedback (Galois) MISR with a primitive
  polynomial. `xc_pkg::primitive_poly(M)` supplies one from the standard
  maximal-length tap table. For example, x^32+x^22+x^2+x+1 for 32 bits and
  x^12+x^6+x^4+x+1 for 12 bits. The MISR has three controls:
  * `en` compacts the input word.
  * `clear` restarts the signature at the same edge. If `en` is also high,
    that cycle's word goes into the emptied register, so a restart loses no
    slice.
  * With both low, the register holds.
* **`selective_xor`**: computes `^(sig & mask)`, an AND per bit and an
  (M-1)-gate XOR tree.
* **`shadow_register`**: an M-bit register with a load enable. Only the
  shadow-register scheme uses it.

`xc_pkg` limits *M* to 64 (`MAX_M`). Polynomials are tabulated for 2-32, 48
and 64 bits. For any other width, pass `POLY` explicitly.

## Time-multiplexing scheme (`tm_xcancel_misr`)

This scheme needs no extra tester inputs and uses one tester output. It pays
for that in test time. The decompressor input channels do double duty,
switched by one control channel, `stop`:

1. **Test-vector application phase** (`stop = 0`). The channels drive the
   scan-vector decompressor (`decomp_ch`, an external block). On every shift
   cycle (`scan_shift = 1`), the slice leaving the scan chains is compacted
   into the MISR. This can span many shift cycles and many test vectors.
2. **Signature processing phase** (`stop = 1`). The tester raises `stop`
   just before the next slice would push the MISR past *M - q* Xs.
   `scan_hold` (equal to `stop`) tells the scan clocking to pause, and the
   MISR holds. The channels now carry masks. A mask of *M* bits takes
   BEATS = ceil(M/CH) cycles, lowest bits first. After the last beat,
   `xc_out` carries the X-canceled bit and `xc_valid` pulses for one cycle.
   *q* checks cost *q*·BEATS cycles.
3. On the first cycle with `stop` low again, the MISR is cleared. A slice
   shifted in that cycle enters the empty register.

```
clk        _|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_
stop       ______|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|_____
scan_shift ‾‾‾‾‾‾|_________________|‾‾‾‾‾
tester_in   data | m0b0| m0b1| m1b0| data      (BEATS = 2 shown)
xc_valid   ____________|‾‾‾|_____|‾‾‾|__
                          bit m0    bit m1     MISR cleared on the edge where stop is first seen low
```

The test-time cost follows from this: with *n* chains and X density *x*, the
MISR fills every (m-q)/(n·x) shift cycles, and each fill costs q·BEATS
cycles. The normalised test time is therefore 1 + n·x·q·BEATS/(m-q).
`tb/table4_workload_tb.sv` measures it on six block configurations. Three
have 1050, 203 and 75 chains on a 32-bit MISR with 133 channels (one beat
per mask). Three have 64 chains on a 64-bit MISR with 16 channels (four
beats per mask). The measured values agree with the formula, for example
1.24 for 1050 chains at 0.07% X with q = 8. Where each slice carries many
Xs, the measured time is higher than the formula. The cause is that the MISR
is processed one whole slice early whenever the next slice would overflow
it.

The same testbench injects a single-bit error into half of the signatures.
A few errors land in the span of the X columns, and no X-free combination
can see them. The measured coverage of the remaining errors matches
1 - 2^-q within sampling error, for example 96.2%, 98.0%, 99.5% and 99.5%
for 203 chains at 3.35% X with q = 5 to 8.

Defaults: N = 1050, M = 32, F = 7, CH = 133. That makes 7·1050 + 31 =
7381 two-input XORs and 134 tester inputs (133 + `stop`).

## Shadow-register scheme (`sr_xcancel_misr`)

This scheme never stops the scan. It spends tester channels instead of test
time.

* When the tester raises **`transfer`**, the MISR signature is copied into
  the shadow register and the MISR is cleared, both at that same edge. The
  slice of that cycle enters the emptied MISR.
* While the next signature builds up, **K selective XOR gates** work on the
  shadow register. Each gate has its own *M* mask channels (`mask_in[k]`),
  so every cycle yields K X-canceled bits on K outputs, registered with one
  cycle of latency.
* The number of checks per signature is K × (the number of cycles until
  the next transfer). Coverage after *s* cycles is
  Cov_s = Cov_(s-1) + (1 - Cov_(s-1))·(1 - 2^-K).
  That is 1 - 2^-(K·s). With transfers every 2 cycles, for example, one
  gate gives 75% and two gates 93.75%. `tb/table3_workload_tb.sv` measures
  all 16 combinations of 1 to 4 gates and periods of 1 to 4 cycles.

The tester cost is M·K + 1 extra input channels and K output channels. The
hardware is N·F + K·(M-1) XORs plus a second M-bit register. Defaults:
N = 1050, M = 12, F = 5, K = 4, which need 48 mask channels + 1.

`tb/table5_workload_tb.sv` runs six block configurations with 1 to 4 checks
per cycle: 1050 chains on 12 bits, 203 on 19 bits, 75 on 14 bits, and
64 chains on 16 bits at three X densities. Its tester transfers when fewer
than four X-free combinations would remain. The coverage is set by how many
cycles that leaves. With 203 chains at 3.35% X, a transfer is needed about
every two cycles, and coverage is 70%, 90%, 96% and 98% for 1 to 4 checks
per cycle. With 1050 chains at 0.07% X, a transfer is needed about every
11 cycles, and over 99% of the errors that are not hidden by the Xs are
caught even with one check per cycle. When to transfer is the tester's choice. Transferring
earlier leaves fewer Xs in each signature, so fewer errors are hidden.

MISR size matters more here than in the time-multiplexing scheme. A small
MISR fills after few slices, so each signature spends few cycles in the
shadow register and gets few checks. On the 203-chain block with two checks
per cycle, going from 16 to 24 bits stretches the transfer period from 1.4
to 2.7 cycles and raises coverage from about 84% to 96%
(`tb/fig10_workload_tb.sv`). In the time-multiplexing scheme with 133
channels, a mask of up to 133 bits takes one beat, so a larger MISR simply
needs processing less often. On the 1050-chain block with q = 7, test time
falls from 1.35 at 21 bits to 1.20 at 32 bits (`tb/fig9_workload_tb.sv`).
Once masks need several beats, the extra beats offset that gain.

## Top level (`xcancel_top`)

The two schemes are alternatives for different tester set-ups. The top
places one of each side by side, with separate ports (`tm_*` and `sr_*`) and
a shared clock and reset. Both are sized for a 1050-chain block. A chip
with several scan blocks gives each block its own compactor, sized by
parameters; the workload testbenches build them at the other blocks' sizes.
The scan-vector decompressor and the circuit under test are outside the design:
the scan-chain outputs and decompressor channels are ports.

## What the tester / test software must do

The RTL contains no X detection and no mask computation. Those are offline
work, and the tester program carries their results:

* **Symbolic simulation.** Give every X in the response its own symbol.
  Simulate the phase shifter and MISR, keeping for each signature bit its
  known value and the set of X symbols it depends on.
* **Fill rule.** Process (or transfer) before a slice would take the MISR
  past *M - q* Xs. No single slice may carry more than *M - q* Xs.
* **Gauss-Jordan elimination.** Reduce the bit-by-symbol dependence matrix,
  carrying an identity matrix alongside. The rows whose dependence part
  becomes zero are the X-free masks, and any XOR of them is X-free too. The
  expected response bit is the parity of the known values under the mask.

`tb/xc_tb_pkg.sv` (class `xc_model`) is a compact, readable reference
implementation of all three steps.

## Verification

Every testbench is self-checking. Each one ends with
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it shows |
|---|---|
| `misr_tb` | 8- and 32-bit MISRs match a bit-serial model under random data, enable and clear; the 8-bit polynomial gives the full period of 255 |
| `phase_shifter_tb` | each chain reaches exactly F inputs (the published pattern); random slices match XOR sums, at 40×8 and at the default 1050×32 |
| `selective_xor_tb`, `shadow_register_tb` | basic function |
| `tm_xcancel_misr_tb` | 64 chains, 16-bit MISR, 6 channels (3 beats per mask), about 3% X, capture cycles; every X-canceled bit equals the fault-free value while the X positions carry random values; processing lasts exactly q·BEATS cycles; injected single-bit errors are caught |
| `sr_xcancel_misr_tb` | 64 chains, 12-bit MISR, 2 checks/cycle; transfers, shadow contents, per-cycle X-free checks, error detection |
| `xcancel_top_tb` | both compactors at the default sizes, concurrently, with all of the above; also the measured test time against the estimate |
| `table4_workload_tb` (with helper `tm_workload_driver`) | six evaluated block configurations at their X densities for q = 5..8; test time against the formula, error coverage against 1 - 2^-q |
| `table3_workload_tb` (helper `sr_workload_driver`) | default shadow-register compactor with transfers every s = 1..4 cycles and k = 1..4 checks per cycle: measured coverage against 1 - 2^-(k·s) for all 16 pairs |
| `fig9_workload_tb` (helper `tm_workload_driver`) | time-multiplexing compactor on the 1050- and 75-chain blocks with 21- to 32-bit MISRs: test time for q = 7 against the formula, and error coverage for q = 1 to 8 |
| `fig10_workload_tb` (helper `sr_workload_driver`) | shadow-register compactor on the 203- and 75-chain blocks with 12- to 24-bit MISRs and 2 or 3 checks per cycle: coverage rises with MISR size and follows the predicted value |
| `table5_workload_tb` (with helper `sr_workload_driver`) | six shadow-register configurations with 1 to 4 checks per cycle; every X-canceled bit against the fault-free value, error coverage against the coverage predicted from the number of checks per signature |

To run one with plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/xc_pkg.sv tb/xc_tb_pkg.sv tb/xcancel_top_tb.sv --top-module xcancel_top_tb -o sim
./obj_dir/sim
```

The testbenches use only `$urandom`, so they run on a two-state simulator
with no constraint solver.

## Choices made here, and where this departs from the source design

The source description fixes the architecture, the sizes and the
tester-channel budget. These points are this implementation's own:

* **MISR structure and polynomials.** The design only requires a primitive
  polynomial. The Galois form and the specific polynomials are choices made
  here.
* **Phase-shifter wiring.** Only the fan-out count is specified. The tap
  pattern is a hash-based choice. With a different pattern, the masks that
  the test software computes change, but nothing else does.
* **Multi-beat masks in the time-multiplexing scheme.** The description
  assumes one mask per cycle. With fewer channels than MISR bits, masks are
  loaded over several cycles. The published test times of the 16-channel,
  64-bit configuration imply this: they fit 1 + n·x·q·4/(m-q).
* **Handshake details.**
  * The `scan_shift` qualifier means capture cycles are not compacted.
  * The level-sensitive `stop` and `transfer` controls are choices made
    here.
  * Outputs are registered.
  * The MISR clear coincides with the first cycle of the new signature.
  * A partly loaded mask is dropped if `stop` falls.
  * Asynchronous active-low reset of all registers.
* **Fan-out values.** The default fan-out of the shadow-register compactor
  (5) is derived from its published XOR count, 5261 = 1050·5 + 11. For the
  64-chain, 64-bit configuration, the stated fan-out (five) and the
  published XOR count (447 = 64·6 + 63) disagree. The workload test uses 6.
  That configuration is not a default. For the 75-chain shadow-register
  configuration, the published XOR count does not give a whole fan-out. The
  workload test uses 7, the value of the same block's time-multiplexing
  configuration.
* **X density of one workload.** For the 64-chain block with a stated X
  density of 0.67%, the published test-time estimates fit a density near
  1.0% instead. The workload test uses 0.67%, so its times (1.14 to 1.24)
  are lower than the published 1.22 to 1.38.
* **Width limit.** *M* is limited to 64 bits. A 256-bit MISR, used in a
  theoretical compression study, is not supported without widening
  `xc_pkg::MAX_M` and adding a polynomial.
* **Omitted parts.** X-compact, the baseline compactor used for
  comparison, is not implemented. The decompressor is not implemented
  either.
