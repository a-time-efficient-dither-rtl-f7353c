# Post-dither code selection for a pipelined SAR ADC stage

A pipelined SAR ADC chains several small SAR converters. Each stage does its
own successive-approximation search. An amplifier then passes the stage's
residue (input minus DAC level) to the next stage. Digital background
calibration of those amplifiers often needs a known *dither* in the
residue. For a one-LSB dither, that means the DAC must end up switched by
`code + 1` or `code − 1` rather than `code`.

The obvious way to do that is an adder between the SAR bit registers and the
DAC drivers. The adder then sits inside the SAR loop. Every trial step goes
through it, and after the last decision a full n-bit carry chain must settle
before the residue is valid.

This RTL uses a different arrangement, a *delay-reduced post-dither code
selection network* (DPCSN):

* While the SAR searches, the DAC sees the raw bit-register code (path one),
  so the first n−1 decisions are not disturbed at all.
* On the side, the dithered code is prepared slice by slice as the bits come
  in.
* Once the n-th bit is decided, a single select signal `S1` switches the DAC
  to the dithered code (path two).

After the last decision, only one gate, one multiplexer level and the LSB
inverter lie between the comparator and the DAC.

## Adding one LSB without a carry chain

Number the stage code `Code<1:n>` from MSB (`Code<1>`, decided first) to LSB
(`Code<n>`, decided last). The RTL keeps this numbering: vectors are
declared `[1:N]`.

Adding ±1 LSB always flips the LSB. So `Code_New<n> = ~Code<n>`.

Split the other n−1 bits into M slices of K bits each, so `n = M·K + 1`.
Take slice i, which is `Code<iK−K+1 : iK>`. The dither can change it in
only three ways:

| dither | lower bits `Code<iK+1:n>` | slice becomes |
|--------|---------------------------|---------------|
| +1 LSB | all ones (a carry ripples up) | slice + 0…01 |
| −1 LSB | all zeros (a borrow ripples up) | slice + 1…1 (= slice − 1) |
| either | anything else | slice unchanged |

The last two columns do not depend on each other. Each slice has its own
two K-bit adders (`+0…01` and `+1…1`, carry out dropped). They start as
soon as the slice's own bits are locked, which is K or more decisions
before the LSB. A mux group then picks one of the three candidates:

* the dither polarity picks the pair;
* a select chain over the lower bits picks the member of the pair.

The select chain (`dpcsn_xor_tree`) asks one question: does every lower
bit equal the dither polarity? It is built in the order the SAR decides
the bits. The first stage joins `Code<iK+1>` and `Code<iK+2>`. Each later
stage adds the next bit, and `Code<n>` enters the last stage. All earlier
stages have settled by the time the LSB arrives.

Each stage compares one bit with the polarity using an XNOR, then ANDs the
result into the chain. A plain XOR (parity) of the lower bits would be
simpler, but it cannot tell "all ones" or "all zeros" from other patterns.
The comparison against the polarity is what makes the selection exact.

The result wraps modulo 2^n. A full-scale code with +1 LSB becomes 0, and 0
with −1 LSB becomes all ones. This follows from the K-bit adders dropping
their carry. A system that must not wrap has to keep the stage input away
from the ends of the range.

### Choosing K, and the two-group arrangement

K is a timing choice. The K-bit adders of the *last* slice start when bit
n−1 is locked. They must settle within one SAR bit period, before the LSB
decision arrives:

    K · T_adder  <  T_bit − (T_comparator + T_lock)

Here `T_bit` is the time between comparator strobes and `T_lock` is the
time the bit registers need to capture a decision. Higher slices have more
bit periods to settle in.

With `TWO_GROUP = 1` (and M > 2), only two sub-blocks are used:

* a final K-bit slice just above the LSB;
* one wide first group of n−K−1 bits.

This is valid when the wide group's adders settle within the K decisions
of the final slice:

    (n − K − 1) · T_adder  <  K · (T_bit − (T_comparator + T_lock))

The logic result is identical; only the number of sub-blocks changes. The
RTL does not model delays, so checking either condition is left to timing
analysis of the implemented cells.

### What the scheme buys

After the last decision, the delay is as follows:

* A conventional adder chain takes `n · T_adder`.
* The DPCSN path takes `T_mux + T_XOR + T_inv`.

With 65 nm post-layout gate delays (adder / mux / XOR / inverter: 115 / 17 /
40 / 14 ps at FF, 150 / 24 / 50 / 20 ps at TT, 185 / 30 / 60 / 25 ps at SS),
the speed-up is about 1.6 × n:

| n | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|
| T_TRA / T_DPCSN (TT) | 1.60 | 3.19 | 4.79 | 6.38 | 7.98 | 9.57 |

FF gives 8.10 at n = 5. These numbers are properties of a circuit
implementation. They are not measured by the RTL here.
`dither_sar_resolution_tb` prints the TT row.

## The SAR loop around it

`dither_sar_logic` is the digital part of one stage:

| block | module | role |
|---|---|---|
| pulse generator | `sar_pulse_gen` | fires the comparator strobe `phi_sar`, once per bit, after `phi_msb` and after each comparator answer |
| shift register | `sar_shift_reg` | one-hot token marking the bit under decision; gives the bit clocks CLK1..CLKn as lock enables |
| bit registers | `sar_bit_regs` | lock each decision on its bit clock; raise `S1` with the last bit |
| DPCSN | `dpcsn` → `dpcsn_core` → `dpcsn_sub_block` → `dpcsn_xor_tree` | path-one / path-two multiplexers and the dithered-code generator |
| (shared) | `dpcsn_pkg` | `dither_t`: `DITHER_POS` (1) = +1 LSB, `DITHER_NEG` (0) = −1 LSB |

The comparator, the capacitive sub-DAC, the DAC buffers and the residue
amplifier are analog. They are outside this module, and their signals are
ports. There is no RTL for two other parts:

* the digital encoder that merges the stage codes of a whole pipeline;
* the dither source, which is normally a pseudo-random bit from the
  calibration engine.

The stage takes the dither polarity as an input.

### Interface (`dither_sar_logic`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `phi_msb` | in | 1 | start a conversion (ignored while `busy`) |
| `dither` | in | `dither_t` | dither polarity, sampled when the conversion starts |
| `phi_sar` | out | 1 | comparator strobe, one-cycle pulse |
| `comp_out` | in | 1 | comparator decision: 1 = input above the DAC level, keep the bit |
| `comp_ready` | in | 1 | decision valid, one-cycle pulse, at least one cycle after the strobe |
| `code` | out | N | raw bit-register code |
| `dout` | out | N | code to the DAC buffers |
| `s1` | out | 1 | 1 = `dout` carries the dithered code |
| `busy` | out | 1 | conversion in progress |

Parameters are `K` (default 2) and `M` (default 2), which give N = 5. There
is also `TWO_GROUP` (default 0).

### Timing

In silicon the loop is asynchronous: each comparator answer triggers the
next strobe. Here one clock stands in for it, with a ready handshake from
the comparator.

    edge E0           phi_msb sampled, dither sampled, bits cleared
    after E0          phi_sar high (bit 1)
    L cycles later    comp_ready + comp_out     (L = comparator latency >= 1)
    at that edge      bit 1 locked; phi_sar for bit 2 follows
    ...
    E0 + sum(L_k + 1) bit N locked, S1 set: dout = code ± 1 from here on

A conversion with constant latency L therefore takes N·(L+1) cycles. Until
the last bit locks, `dout` equals `code`, and undecided bits read 0. From
the edge that locks the last bit until the next start, `dout` holds
`code + dither`. Two assertions check the comparator handshake:

* no `comp_ready` without an outstanding strobe;
* no strobe while a decision is outstanding.

## Where this RTL makes its own choices

* **Select chain gates.** Each chain stage is an equality compare with the
  dither polarity plus an AND, not a bare XOR, for the reason given above.
  The chain shape is the described one: n−iK inputs, `Code<n>` last.
* **Clocked self-timing.** The asynchronous strobe loop becomes a clocked
  pulse generator with a `comp_ready` handshake. The bit "clocks" are
  enables.
* **S1.** `S1` is a flag set together with the N-th bit and cleared at the
  next start. It switches all N multiplexers at once.
* **Dither timing.** The dither is registered at `phi_msb`, so it is stable
  for the whole conversion.
* **Reset and start.** There is an asynchronous reset. A start clears the
  bit registers. A start during a conversion is ignored.
* **Defaults.** There is no single reference resolution, so the defaults
  K = 2, M = 2 (n = 5) are a choice. Any n = M·K + 1 works, including
  n = 1 (M = 0, the LSB inverter alone).
* **Trial bit.** The comparator interface carries only the decision. The
  bit under test is the analog side's business. The testbench model adds
  the trial weight of bit k to the partial code on `dout`.

## Files and simulation

`rtl/` holds one module or package per file. `tb/` holds one self-checking
testbench per module (`<module>_tb.sv`) and two more:

* `dither_sar_logic_tb`: end-to-end test at the default size. It uses a
  behavioural sub-DAC and comparator with random 1..4-cycle decision time.
  Each input code is converted with both polarities several times, plus
  random conversions. It checks the raw code, the path-one output during
  the search, the dithered code, the residue and the cycle count. It also
  counts carries and borrows into every sub-block, wrap at both range ends,
  slow comparator answers, back-to-back starts and starts ignored while
  busy, and fails if any of these never happens.
* `dither_sar_resolution_tb` (with helper `sar_stage_checker`): runs the
  stage exhaustively for every n from 1 to 6. That includes both K/M splits
  of n = 4 and n = 6 and the two-group arrangement.

To run a testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/dpcsn_pkg.sv tb/dither_sar_logic_tb.sv --top-module dither_sar_logic_tb
    ./obj_dir/Vdither_sar_logic_tb

Each testbench ends with one line, `TB_RESULT checks=<n> failures=<n>`, and
has a watchdog that fails it if it hangs. Every testbench passes. Each also
fails when its module is deliberately broken, for example with the S1
multiplexer polarity swapped or the LSB not inverted.

Lint notes:

* Verilator reports ascending bit ranges (`[1:N]`). This is deliberate: it
  keeps MSB-first numbering, and arithmetic on the vectors is unaffected.
* Verilator notes that `rst_n` is used both asynchronously and in the
  assertions' `disable iff`. The second use is for the assertions only.
