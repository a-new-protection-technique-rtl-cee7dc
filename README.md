# Soft-error-protected FIR filter with two-dimensional parity

A single event upset (SEU) flips one bit of one flip-flop. The usual protections
are triple modular redundancy (three copies of every register and a voter) and
a Hamming code per register. Both cost a lot of area, and a Hamming decoder also
sits in the critical path. This design protects a FIR filter more cheaply. It
uses one property of the filter: the samples in a FIR delay line never change
while they move along it. Each sample only shifts from one register to the next.
That makes a two-dimensional parity over the whole delay line cheap to keep up
to date. The parity can locate any single flipped bit and repair it.

The main configuration is an 8-bit, 6-tap, linear-phase low-pass filter with
coefficients `{-1, 24, 50, 50, 24, -1}`. A 10-tap set,
`{-1, 3, 50, 64, 96, 96, 64, 50, 3, -1}`, is available through parameters.

## The two parities

The delay line is a grid. There are N words (columns j = 0..N-1, newest first),
each W bits wide (rows k = 0..W-1).

* **Pv (vertical parity), one bit per word.** It is the XOR of the word's bits.
  It is computed once, as the sample enters the line. It then shifts along with
  its word. This costs N extra flip-flops.
* **Ph (horizontal parity), one bit per bit position.** It is the XOR of bit k
  across all N words. It is stored in a separate bank of W flip-flops that does
  not shift. Each clock one word enters and one word leaves. So Ph_k is updated
  by XORing in bit k of the entering sample and bit k of the leaving word:
  `Ph_k <= Ph_k ^ x_k ^ B'_k,N-1`.

Every cycle both parities are recomputed from the registers and compared with
the stored ones. This gives `Errv_j` (word j disagrees with its Pv) and `Errh_k`
(row k disagrees with its Ph). `Errv` is the OR of all `Errv_j`. Parity is even
throughout: a parity bit is the plain XOR of the bits it covers. An all-zero
line therefore has all-zero parities, which is what reset loads.

### What a mismatch means and what the hardware does

| Errv_j set | Errh_k set | Meaning | Action (at the next clock edge) | `class_o` |
|---|---|---|---|---|
| none | none | no error | none | `ERR_NONE` |
| one (j) | one (k) | data bit (k, j) flipped | bit inverted as the word moves to register j+1 | `ERR_DATA` |
| none | one (k) | Ph_k flipped | Ph_k inverted | `ERR_PH` |
| one (j) | none | Pv_j flipped | **not** repaired; it leaves the line with its word within N clocks | `ERR_PV` |
| any other pattern | | several upsets | see below | `ERR_MULTI` |

The two correction rules are one gate per bit each:

* data: `B'_kj = B_kj ^ (Errv_j & Errh_k)`. The corrected word `B'_j` is loaded
  into the next register. It is also what the filter arithmetic reads, so the
  output is already right in the cycle the upset is visible.
* Ph: `Ph_k` is also inverted when `Errh_k & ~Errv`.

The bit leaving the line is taken after correction. This keeps Ph consistent
when the upset sits in the last word.

**Multiple upsets.** The rules above act on every (j, k) crossing. Some cases
therefore come out right:

* An odd number of flips inside one word gives one Errv and several Errh. All of
  those bits are repaired.

Other cases cannot be located and may be repaired wrongly:

* two flips in different words and rows;
* any pattern with two or more Errv and two or more Errh;
* a Pv upset that is still in the line when a Ph upset arrives. Together they
  look exactly like a single data upset. One good data bit is inverted, and the
  parities then agree again, so the corruption goes unnoticed.

Making these cases right would need more logic. This design accepts the cost
because two upsets within N clocks are rare. `class_o` reports all of these
patterns as `ERR_MULTI` (or as `ERR_DATA` in the Pv-then-Ph case).

The output register is not protected. It is rewritten every clock, so an upset
there lasts one sample.

## Filter arithmetic

`y[n] = sum_i h[i] * x[n-i]`. The coefficients are symmetric
(`h[i] = h[N-1-i]`), so the datapath is folded. Taps i and N-1-i are added first
(the pre-adders). There is one constant multiplier per coefficient pair: -1, 24
and 50 for 6 taps. The sum is kept at full precision, shifted right
arithmetically by `SHIFT` and saturated to 8 bits. `sat_o` marks clipped samples.

Samples are signed two's complement. `SHIFT = 7` for 6 taps. The coefficient sum
is 146, so the DC gain is 146/128 ≈ 1.14 and large inputs saturate. For the
10-tap set use `SHIFT = 9`: the sum is 424, so the gain is 0.83.

## Timing and interface (`ft_fir_top`)

| Port | Dir | Width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | rising-edge clock; synchronous active-low reset |
| `x_i` | in | W | input sample, taken on every rising edge |
| `y_o` | out | W | filtered, scaled, saturated output (registered) |
| `sat_o` | out | 1 | `y_o` was clipped |
| `seu_data_i` | in | N×W | upset injection into the data registers (simulation) |
| `seu_pv_i` | in | N | upset injection into the Pv registers |
| `seu_ph_i` | in | W | upset injection into the Ph registers |
| `errv_o`, `errh_o` | out | N, W | current parity mismatches |
| `class_o` | out | 3 | current scenario (`ft_fir_pkg::err_class_e`) |

* There is one new sample per clock. There is no handshake or enable.
* A sample presented before edge t is in word 0 after t. It first shows in
  `y_o` after edge t+1, so the latency is two clocks.
* An upset that takes effect at edge t is flagged on `errv_o`/`errh_o`/`class_o`
  during the following cycle and repaired at edge t+1.
* The injection masks are XORed into the registers as they are written. In
  normal use tie them to zero; synthesis then removes the XORs.

Parameters: `W` (8), `N` (6), `COEF` (`ft_fir_pkg::COEF6`), `SHIFT` (7). For the
10-tap filter:

```systemverilog
ft_fir_top #(.N(ft_fir_pkg::NTAPS10), .COEF(ft_fir_pkg::COEF10), .SHIFT(9)) u_fir (...);
```

With the defaults the design holds 48 data flip-flops, 6 Pv, 8 Ph, an 8-bit
output register and the `sat_o` flag: 71 flip-flops. The same filter without
protection needs 56. The 10-tap version needs 80 + 10 + 8 + 8 + 1 = 107.

## Module hierarchy

```
ft_fir_top
├── ft_delay_line        data + Pv registers, shift, assertion
│   ├── parity_syndrome  Errv_j, Errh_k, Errv, class_o
│   ├── data_corrector   B' = B ^ (Errv_j & Errh_k)
│   └── ph_bank          Ph registers: update and self-correction
└── fir_sym_datapath     pre-adders, constant multipliers, scale, saturate, output register
ft_fir_pkg               widths, coefficient sets, err_class_e
```

`ft_delay_line` carries an assertion. It fires when a single data or Ph upset is
not repaired one clock after it is seen, as long as no new upset arrives.

## Choices not fixed by the scheme

These are this design's own decisions. Change them freely:

* even parity;
* synchronous reset to an all-zero line;
* signed samples, `SHIFT` and saturation;
* two-clock latency with a registered input word and output;
* the arithmetic reads the corrected taps, not the raw registers;
* `Errv` formed as an OR of the per-word mismatches;
* the `class_o` status output and the injection ports;
* the `sat_o` flag (one flip-flop more than the bare filter).

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_parity_syndrome` uses consistent grids with one data, Pv or Ph flip, or
  two flips. It checks Errv/Errh bit by bit and the scenario code.
* `tb_data_corrector` drives random words and mismatch patterns and checks
  every bit.
* `tb_ph_bank` checks the bank against a reference model under random
  enter/leave words, mismatches and upsets.
* `tb_ft_delay_line` runs 300 single upsets, spread over data, Pv and Ph. The
  taps must match an ideal shift register every cycle. The test then covers an
  odd number of flips in one word (repaired), a double upset (reported) and the
  Pv-then-Ph case (shown to mis-correct, as described above).
* `tb_fir_sym_datapath` checks the 6-tap and 10-tap arithmetic against an
  unfolded reference, including saturation in both directions.
* `tb_ft_fir_top` is end to end at the default size. It feeds 15000 samples of
  pulses plus noise and injects 100 single upsets at random instants. There is
  at most one upset per clock, and they are at least N+2 clocks apart. Every
  output must equal the output of an unprotected reference filter fed the same
  input. The test requires data correction, Ph correction, a Pv upset and
  saturation to each occur.
* `tb_ft_fir_top10` runs the same experiment on the 10-tap configuration.

Upsets closer together than N+2 clocks are not covered by the end-to-end tests.
They fall under the multiple-upset limits described above.

Not modelled: timing. The correction logic lengthens the register-to-register
path. An upset that arrives late in a clock period may not be corrected before
the next edge and can then propagate. The share of the period where this
happens depends on the cell library and the clock period, and only static
timing analysis of a synthesized netlist can measure it.

## Simulating

Each testbench is a standalone top. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ft_fir_pkg.sv tb/tb_ft_fir_top.sv --top-module tb_ft_fir_top -o sim
./obj_dir/sim
```

Replace `tb_ft_fir_top` with any other testbench name. All testbenches finish in
well under a second.
