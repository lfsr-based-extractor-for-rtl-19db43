# LFSR randomness extractor

Raw bits from a physical random number generator are biased and correlated
with each other, so they cannot be used directly where uniform, independent
bits are needed. A randomness extractor turns such a weak stream into a strong
one. The usual way is a cryptographic hash, which is slow and large. This
design uses a plain linear feedback shift register instead. Every raw bit is
XORed into the LFSR feedback. The generated bits are the output, except for a
fixed share that is thrown away, so that the output never carries more bits
than the input holds entropy.

Two versions are given. Both use the same 63-bit register:

* a **serial extractor**: one raw bit in and one generated bit per clock, with
  a framer that keeps 12 of every 16 generated bits;
* a **parallel extractor**: 63 raw bits in per clock. It computes the same
  sequence 63 steps at a time and keeps 47 of the 63 new bits.

`lfsr_extractor_top` holds both side by side. Each has its own input and output
ports.

## The generated sequence

Number the LFSR cells 1..63. In the RTL, cell *j* is bit *j-1* of the state
vector. Each serial step does this:

```
new      = X[1] ^ X[2] ^ in          // taps at cells 1 and 2
X[j]    <= X[j+1]   for j = 1..62    // everything moves one place up
X[63]   <= new                       // the new bit enters at the bottom and is output
```

The generated bits therefore obey

```
x[n+63] = x[n] ^ x[n+1] ^ raw[n]
```

With no input, this is the LFSR of the trinomial x^63 + x + 1. That polynomial
is primitive, so the register alone runs through all 2^63 - 1 non-zero states.
The raw bits are mixed into that long, well-spread sequence. The testbenches
use the recurrence above as their reference. It never models a register, which
keeps it independent of the RTL.

## Dropping bits

The extractor is a bijection between input and output, so on its own it adds
no entropy. The raw source in the reference measurement delivers about 12 bits
of Shannon entropy per 16 raw bits. For that reason only 12 of every 16
generated bits leave the serial version. The parallel version keeps 47 of 63,
which is the nearest whole-bit share (47/63 ≈ 0.746). Dropping bits also makes
the mapping from input to output irreversible.

* `drop_framer` counts generated bits in groups of 16, starting from reset.
  The first 12 bits of each group form one 12-bit word, with the first bit on
  bit 0. The last 4 bits are discarded. Which four bits to drop is this
  design's own choice.
* `parallel_extractor` outputs cells 1..47 and never outputs cells 48..63.

## Parallel version: 63 steps per clock

The parallel extractor keeps only the 63 state cells as flip-flops. The XOR
module (`parallel_xor_module`) produces the next 63 cells, 64..126, as
combinational outputs:

```
X[64]  = X[1]  ^ X[2]  ^ in1
X[65]  = X[2]  ^ X[3]  ^ in2
...
X[125] = X[62] ^ X[63] ^ in62
X[126] = X[63] ^ X[64] ^ in63      // uses X[64], generated in the same clock
```

On the clock edge, cells 64..126 move into cells 1..63 (64→1, 65→2, …). This
equals 63 serial steps. With the same seed and the same raw bits, the parallel
output words are exactly the serial generated sequence, cut into 63-bit pieces.
The top-level testbench checks this.

62 of the 63 new bits are one 3-input XOR each. The last one, X[126], depends
on X[64], so it is two XOR levels deep. This is the critical path of the
parallel version. It stays constant whatever the register length.

The module is parameterised for an N-bit LFSR with K bits per clock, K ≤ N. It
needs N flip-flops and K XOR outputs, N + K cells in all. For K < N the
register shifts K places per clock (cell *j* takes cell *j+K*). The K newest
cells are then the output, and the first KEEP of them are kept. The second tap
is a parameter (`TAP`, taps at cells 1 and 1+TAP), so other trinomials
x^N + x^TAP + 1 can be used. Choosing a primitive one is up to the user. Only
N = K = 63, TAP = 1 comes from the reference design.

## Modules

| module | what it is |
|---|---|
| `lfsr_extractor_pkg` | shared constants: lengths, taps, group sizes, seed |
| `serial_extractor` | 63-cell LFSR with the raw bit in its feedback; one generated bit per clock |
| `drop_framer` | keeps 12 of every 16 generated bits as a 12-bit word |
| `parallel_xor_module` | combinational network giving the next 63 LFSR bits at once |
| `parallel_extractor` | 63 state flip-flops and the XOR module; 47-bit output word per clock |
| `lfsr_extractor_top` | serial chain (`serial_extractor` → `drop_framer`) and parallel extractor side by side |

### Interfaces and timing

All flip-flops use `clk` and a synchronous, active-low `rst_n`. Reset loads
the LFSR cells with `LFSR_SEED`, a non-zero constant chosen for this design.
Any value works, because the raw input keeps entering the feedback.

Both inputs carry a valid qualifier (`ser_in_valid`, `par_in_valid`). When it
is low, the register holds. There is no back-pressure: the consumer must take
every output word in the clock it appears.

| path | throughput | latency |
|---|---|---|
| serial: `ser_in_bit` → `ser_word` | 1 raw bit per clock; one 12-bit word per 16 bits read | `ser_word_valid` pulses 2 clocks after the 16th raw bit of a group is read (one clock in the LFSR, one in the framer) |
| parallel: `par_in_word` → `par_out_word` | 63 raw bits and 47 output bits per clock | `par_out_valid` pulses 1 clock after the raw word is read; the word comes straight from cells 1..47 |

Bit order: the raw bit that is read first (`in1` of the parallel word) is on
bit 0. The bit generated first is on bit 0 of each output word.

## Where this design makes its own choices

The reference structure fixes these points:

* the 63-bit register and its taps at cells 1 and 2;
* the feedback equation and the shift direction;
* the parallel XOR equations, including the reuse of X[64] for X[126];
* the 16/12/4 and 63/47/16 splits.

The following are this design's own choices:

* the valid handshake, with no back-pressure;
* synchronous active-low reset and the seed value;
* dropping the *last* 4 bits of each 16-bit group, and counting groups from
  reset;
* the bit order inside words;
* emitting the serial word only when its 16-bit group is complete;
* putting both versions in one top;
* the generalisation to N, K, TAP and KEEP.

One point of interpretation: the bit-dropping rate is described once as "drop
4 for every 16 output" and elsewhere as 12 kept out of a 16-bit group. This
design follows the second reading. It agrees with the 12-bits-per-16 entropy
figure and with the 47/63 split of the parallel version.

The physical random source is not part of the design. The testbenches stand in
for it in two ways: a bit source with about 70 % ones, and the bits of 16-bit
samples from a narrow bell-shaped distribution. `tb_workload_gaussian_source`
gives a simple statistical sanity check of the output: bias and
neighbouring-bit correlation. It is no substitute for a full randomness test
suite, which is how the reference evaluation judged the output. Such a suite
runs in software on a captured stream.

## Simulation

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/lfsr_extractor_pkg.sv tb/tb_lfsr_extractor_top.sv \
    --top-module tb_lfsr_extractor_top -y rtl -y tb +libext+.sv -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_lfsr_extractor_top` | both halves at default size, fed the same biased stream with random idle cycles. Every serial and parallel word is checked against the recurrence. Also checks both latencies and counts stalls, dropped bits and back-to-back words; a mechanism that never occurred counts as a failure |
| `tb_serial_extractor` | every generated bit against the recurrence; one-clock latency; idle cycles hold the register |
| `tb_drop_framer` | words hold the first 12 bits of each 16-bit group; a word appears one clock after the group's 16th bit and at no other time; 4 of 16 bits are dropped |
| `tb_parallel_xor_module` | the 63 new bits against 63 single serial steps, for corner and random states and inputs |
| `tb_parallel_extractor` | every 47-bit word against the recurrence; one-clock latency; back-to-back words and stalls |
| `tb_parallel_extractor_narrow` | a 63-cell register producing 21 bits per clock and keeping 16 (K < N), against the recurrence |
| `tb_lfsr_period` | 7-cell instances (x^7 + x + 1) with zero input. The serial version returns to its seed after exactly 127 steps and visits 127 distinct states; the parallel version repeats after 127 words; the two versions agree word for word |
| `tb_workload_gaussian_source` | the whole design at default size, fed at full rate with the bits of 16-bit samples of a narrow bell-shaped distribution, a stand-in for a physical noise source. Checks every word, and checks that the raw stream is biased and correlated while both outputs have a fraction of ones and of equal neighbours within 0.5 ± 0.015 |

Replace the `-y`/top names to run another testbench. The testbenches loop
over bits with bounds held in variables. This keeps Verilator from unrolling
the reference models into very large C++.
