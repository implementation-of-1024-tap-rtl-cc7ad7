# 1024-tap FIR filter by distributed arithmetic

This is a 1024-tap finite impulse response (FIR) filter:

    y(n) = sum_{k=0}^{1023} h(k) * x(n-k)

It computes the sum without a single multiplier. Instead it uses
**distributed arithmetic (DA)**. The inputs are 8-bit two's complement
samples. The output is a 16-bit word, and the exact full-precision result is
also available. The filter processes the input samples one bit position per
clock, so one output takes 8 clocks, whatever the number of taps. Every
product `h(k) * x` is replaced by lookups into small constant tables that
hold precomputed sums of coefficients.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). Each module is in
its own file under `rtl/`, and the self-checking testbenches are in `tb/`.

## How distributed arithmetic removes the multipliers

Write each B-bit two's complement sample in terms of its bits
x(n-k) = -x_{k,B-1} 2^{B-1} + sum_{b<B-1} x_{k,b} 2^b. Swap the two sums, and
the filter output becomes

    y(n) = -2^{B-1} S_{B-1} + sum_{b<B-1} 2^b S_b,   S_b = sum_k h(k) * x_{k,b}

`S_b` is a sum of coefficients selected by one bit of every sample, so it
needs no multiplication. The taps are split into groups of four. For each
group, all 16 possible sums of its four coefficients are precomputed and
stored in a 16-entry table. The four sample bits of the group form the
4-bit table address.

| address | entry          | address | entry          |
|---------|----------------|---------|----------------|
| 0000    | 0              | 1000    | b0             |
| 0001    | b3             | 1001    | b0+b3          |
| 0010    | b2             | 1010    | b0+b2          |
| 0011    | b2+b3          | 1011    | b0+b2+b3       |
| 0100    | b1             | 1100    | b0+b1          |
| 0101    | b1+b3          | 1101    | b0+b1+b3       |
| 0110    | b1+b2          | 1110    | b0+b1+b2       |
| 0111    | b1+b2+b3       | 1111    | b0+b1+b2+b3    |

Here b0..b3 are the group's coefficients h(4p)..h(4p+3). Address bit 3 (the
MSB) carries the bit of the sample that multiplies b0, and address bit 0
carries the bit of the sample that multiplies b3. A 1024-tap filter has 256
such tables. On each clock, one bit of every stored sample addresses all 256
tables at once. An adder tree sums their outputs into `S_b`, and a
shift-accumulator applies the weights 2^b. It processes the most significant
bit first: `acc = -S` for the sign bit, then `acc = 2*acc + S` for each lower
bit. After B clocks, `acc` is y(n), exactly.

The cost grows with the number of taps only through the tables and the adder
tree; the number of clocks per output depends only on the sample width. The
price is the table storage, which doubles with every extra address bit. That
is why the tables are kept at four inputs and partitioned.

## Datapath

```
 x_in ──► da_tap_line ── bits[1023:0] ──► 256 × rom_rtl ──► da_adder_tree ──► pipo_acc ──► y, q
          (1024 × piso)   one bit per       16-entry         255 ripple-       shift-
                          sample, MSB       coefficient-sum  carry adders      accumulate,
                          first             ROMs                               output register
                               ▲                                                   ▲
                               └──────────── da_control (load/shift/first/last) ──┘
```

| module          | role |
|-----------------|------|
| `da_fir_pkg`    | widths (`DATA_W`=8, `COEF_W`=8, `LUT_K`=4, `MAX_TAPS`=1024, `OUT_W`=16), coefficient array type, default coefficients |
| `piso`          | parallel-in serial-out register for one sample; rotates left and outputs its MSB |
| `da_tap_line`   | chain of `TAPS` `piso` registers forming the delay line; outputs one bit per tap |
| `rom_rtl`       | one 16-entry table of coefficient sums, computed at elaboration from its `COEF` parameter |
| `full_adder`    | one-bit full adder cell |
| `rca_adder`     | ripple carry adder built from `full_adder` cells, with carry in and carry out |
| `da_adder_tree` | balanced tree of `rca_adder`s summing the table outputs; inputs are sign-extended |
| `pipo_acc`      | shift-accumulator, parallel output register, saturation to 16 bits |
| `da_control`    | bit counter and sequencing; clock enable; input handshake |
| `da_fir_top`    | the filter |

### The delay line is also the bit-serial shifter

Each tap register is a `piso` that *rotates* rather than shifts out. After
a sample is loaded, the register shows its MSB. Each following `shift`
rotates it left by one bit, so the bits come out MSB first. Because nothing
is lost, the same registers also serve as the delay line. When the next
sample arrives, every word moves one tap down the chain.

The timing is the subtle part. A sample is presented over 8 clocks, but only
7 rotations happen. The clock that presents bit 0 (the LSB) does not
rotate. Instead, if a new sample is waiting, that same clock loads it. So
when words move to the next tap, they are one rotation short of their
original form. The load path between taps (`d[k] = rotl(word[k-1])` in
`da_tap_line`) makes that last rotation as the word moves. Without a waiting
sample, the line simply holds in that state until the next load. This lets a
new sample load on the last bit clock of the previous one, so samples can
follow each other with no idle clock.

### Arithmetic widths

All internal words are wide enough never to overflow:

| word                     | width                          | default |
|--------------------------|--------------------------------|---------|
| table entry (4 coefs)    | `COEF_W + 2`                   | 10      |
| sum of all tables `S_b`  | `COEF_W + log2(TAPS)`          | 18      |
| accumulator, output `y`  | `COEF_W + log2(TAPS) + DATA_W` | 26      |
| output `q`               | `OUT_W`                        | 16      |

`q` is `y` saturated to the 16-bit range, and `q_sat` flags a clipped
value. Use `y` if you need the exact result or want to choose your own
scaling. The sign bit's subtraction reuses the accumulator's ripple carry
adder, computing `0 + ~S + 1` with its carry input.

## Interface and timing (`da_fir_top`)

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1     | clock |
| `rst_n`   | in  | 1     | asynchronous active-low reset; clears the delay line (all past samples become 0), the accumulator and the outputs |
| `clken`   | in  | 1     | clock enable; while low the filter is frozen and `x_ready` is low |
| `x_in`    | in  | 8     | input sample, two's complement |
| `x_valid` | in  | 1     | a sample is offered |
| `x_ready` | out | 1     | the filter takes `x_in` on this clock edge if `x_valid` is high |
| `y`       | out | 26    | exact output, two's complement |
| `y_valid` | out | 1     | one-clock pulse when `y`, `q` and `q_sat` are new |
| `q`       | out | 16    | output saturated to 16 bits |
| `q_sat`   | out | 1     | `q` was clipped |

- **Latency:** `y` is updated, and `y_valid` pulses, `DATA_W` = 8 enabled
  clocks after the clock edge that took the sample.
- **Throughput:** one sample every `DATA_W` clocks. `x_ready` is high when
  the filter is idle, and on the clock that processes a sample's last bit.
  With `x_valid` held high, samples are taken back to back every 8 clocks.
- **Stall:** any clock with `clken` low is skipped by the whole filter.
  `y_valid` is a single-clock pulse, even if `clken` drops right after it.

Parameters:

- `TAPS` (default 1024): must be a multiple of 4 and at most 1024.
- `DATA_W` (default 8): at least 2.
- `COEFS`: a `da_fir_pkg::coef_array_t` of 1024 signed 8-bit values. Only
  the first `TAPS` entries are used.

The default coefficients form a triangular low-pass window,
`h(k) = floor((2*min(k, TAPS-1-k) + 1) * 127 / TAPS)`. Replace them with
your own filter design. The tables are built from `COEFS` at elaboration, so
changing the coefficients needs no other edit.

Assertions in `da_control` and `da_fir_top` check that a sample is loaded
only when the filter is ready, that the bit counter stays in range, and that
every result follows a busy period.

## Design choices and departures

The following follow the source design:

- 1024 taps and 4-input lookup tables, with the address-bit order of the
  table above.
- Ripple carry adders built of full-adder cells.
- PISO registers that send the samples bit by bit.
- A PIPO accumulator and output register.
- A clock-enable input.
- 8-bit two's complement input and a 16-bit two's complement output.
- One output per N clocks for N-bit samples.

The following are this implementation's own choices:

- **Coefficient width of 8 bits.** The reference specification pairs an
  8-bit sample with a 16-bit product, which implies 8-bit coefficients. A
  16-bit coefficient width also appears there, but it is inconsistent with
  the 16-bit product. `COEF_W` in the package can be raised, at the cost of
  wider tables and adders.
- **Full internal precision, with saturation only at the 16-bit output.** A
  16-bit accumulator would wrap for most inputs of a 1024-tap filter. The
  exact result is exported as `y`.
- **Adder widths of 18 and 26 bits.** The source design names a 16-bit
  ripple carry adder. Here `rca_adder` is used at 18 bits in the adder tree
  and 26 bits in the accumulator, because 16 bits would overflow.
- **MSB-first bit order, the rotating delay line, and the valid/ready
  handshake.**
- **Asynchronous active-low reset** that clears the delay line.
- **A balanced, combinational adder tree.** The tree is not pipelined, so
  the critical path runs through the table read, eight levels of 18-bit
  ripple carry adders and a 26-bit ripple carry accumulator. For a high clock
  rate, add pipeline registers after the tables or inside the tree. If you
  do, delay `first`, `last` and `acc_en` by the same number of stages.
- **Coefficients as an elaboration-time parameter.** The tables are constant
  ROMs. There is no coefficient-loading port.

The four-input partitioning keeps the tables small: 256 tables × 16 entries
× 10 bits = 40,960 ROM bits.

The multiply-accumulate (MAC) filter that this design is usually compared
with is not included. That filter multiplies each sample by its coefficient
with a Vedic multiplier, then accumulates through a ripple carry adder and a
PIPO register.

## Verification

Each module has a self-checking testbench. It compares the outputs with
values computed independently in the testbench, and ends by printing
`TB_RESULT checks=<n> failures=<n>`.

| testbench           | what it checks |
|---------------------|----------------|
| `tb_rom_rtl`        | all 16 entries of two tables (one with every coefficient at -128) against subset sums; address-bit order |
| `tb_rca_adder`      | a 5-bit adder exhaustively, with and without carry in; a 26-bit adder with corner and random operands |
| `tb_piso`           | load, MSB-first serial output, word restored after W rotations, load over shift, hold |
| `tb_da_tap_line`    | 12 taps: every tap's bit on every bit clock against a sample history, for streamed and idle-gapped loads |
| `tb_da_adder_tree`  | the 256 × 10-bit tree and a 5-input tree against integer sums, including all-minimum and all-maximum inputs |
| `tb_pipo_acc`       | random per-bit sums, with pauses in the enable; exact result, one-clock valid, saturation both ways |
| `tb_da_control`     | cycle-by-cycle comparison with a reference sequencer under random `clken` and `x_valid`; 10 samples in 80 clocks when streaming |
| `tb_da_fir_top`     | **the full default filter** (1024 taps, default coefficients); see below |
| `tb_da_fir_4tap`    | a 4-tap filter, which is a single table: impulse, negative impulse and step responses written out by hand, and 500 random samples |
| `tb_da_fir_small`   | 16 taps with signed coefficients including -128 and 127; 3000 full-range samples; a reset in mid-run |

`tb_da_fir_top` drives the default configuration with 1300 samples, which
fills the whole delay line and runs past it. The samples are small random
values, bursts of +127 and -128, and full-range noise. They are sent back to
back or after idle gaps, and `clken` drops for about one clock in twenty.

A scoreboard, `tb_fir_checker`, keeps its own sample history and computes
every output directly from the coefficients. For each output it checks `y`,
`q` and `q_sat`, and that the latency is 8 enabled clocks. The testbench
checks that 9 sample periods of streaming take 72 clocks. It fails if any
mechanism was never exercised: streaming, loading from idle, clock-enable
stalls, or positive and negative saturation.

Running the tests with Verilator, for example the full-size test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/da_fir_pkg.sv tb/tb_da_fir_top.sv --top-module tb_da_fir_top
./obj_dir/Vtb_da_fir_top
```

Replace the testbench name for the other tests. `-Wno-fatal` lets the build
go on past Verilator's lint warnings; the testbenches mix integer and
narrow operands freely, which draws width warnings. The full-size test builds
in a few seconds and runs in under a second.
