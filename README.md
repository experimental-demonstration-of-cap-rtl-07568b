# 2D CAP transmitter in SystemVerilog

Carrierless amplitude/phase (CAP) modulation sends two data streams at
once, like QAM, but it uses no carrier. Each symbol is a point (a_k, b_k) on a
two-dimensional constellation. The in-phase value a_k drives one shaping filter
and the quadrature value b_k drives a second filter whose impulse response is
orthogonal to the first. The transmit signal is the difference of the two
filter outputs. Dropping the carrier is what makes CAP
cheap to build in digital logic.

This repository holds a complete digital 2D CAP transmitter in four stages:

1. a **random generator**, which makes the test bit stream;
2. a **constellation mapper**, which turns groups of 4 bits into one of 16 points;
3. a **shaping modulator**, which makes the real-valued CAP signal;
4. an **8-point inverse FFT**, which makes the same symbols into a time-domain signal
   block by block. It runs three radix-2 stages on a single butterfly, applies its
   twiddle factors with a CORDIC rotator and keeps its data in four small RAMs.

```
            bits        4-bit idx       (a_k,b_k)    +--> cap_shaping --> shape_sample  (23 b, 1/cycle)
prbs_lfsr -------> sipo ---------> cap_mapper ------+
                                                     +--> ifft8 -------> ifft_re/ifft_im (16 b, 8 per block)
```

Everything is in `rtl/` (one module or package per file), with a
self-checking testbench per module in `tb/`.

## Data path and flow control (`cap_tx_top`)

All links are valid/ready streams on a single clock, with an active-low
asynchronous reset.

* `prbs_lfsr` is a PRBS7 generator (x^7 + x^6 + 1, seed all ones). It offers
  one bit per cycle while `run` is high.
* `sipo` collects 4 bits, with the first bit as the MSB, into an index.
* `cap_mapper` is combinational. Index bit 3 gives the sign of a and bit 2 the
  sign of b (1 means negative). Bit 1 gives the magnitude of a and bit 0 the
  magnitude of b (1 means 3, 0 means 1). So 0000 → 1+1j, 0010 → 3+1j,
  0101 → 1−3j and 1111 → −3−3j. The levels are 8-bit two's-complement
  words.
* The mapper output is **forked**: a symbol is taken only when the shaping
  modulator *and* the IFFT can both take it. The shaper wants one symbol every
  4 cycles. The IFFT takes symbols only while it is loading a block. While it
  computes and unloads (at least 20 cycles), the whole chain stalls back to
  the LFSR, and the shaped output pauses. No symbol is ever dropped.
* The IFFT input is the symbol scaled by 2^11 (`IFFT_SHIFT`). The largest point,
  3+3j, then has modulus about 8700, well below the 2^15 limit given below.

Throughput in steady state is limited by the IFFT. It takes 8 symbols per
block, and a block needs at least 8 load + 12 compute + 8 unload cycles. The
load itself stretches to 8 × 4 cycles at the shaper's pace.

## Shaping modulator (`cap_shaping`)

With 4 samples per symbol (`SPS`) and a span of 4 symbols, each filter has 16
taps:

```
f_I[n] = round(2047 · w[n] · cos(2π t / 4))      t = n − 7.5
f_Q[n] = round(2047 · w[n] · sin(2π t / 4))      w[n] = sin²(π (n + 0.5) / 16)
s[n]   = Σ_k a_k f_I[n − 4k] − b_k f_Q[n − 4k]
```

f_I is even about its centre and f_Q is odd, so the two are orthogonal: a
Hilbert pair centred at a quarter of the sample rate. The taps are
computed at elaboration in `cap_pkg::shape_table` from this formula. The
upsampled input is zero between symbols, so the filter runs in polyphase form.
The module keeps the last 4 symbols, and output sample p of the newest symbol
needs only taps p, p+4, p+8 and p+12 of each filter. The sum is exact: 23 bits
for 8-bit symbols and 12-bit taps.

Timing: a symbol accepted on one clock edge gives its first sample one edge
later. The next samples follow on consecutive cycles. `sym_ready` is high
while at most one sample of the current symbol is left. So if a symbol is
offered every cycle, one is taken every 4 cycles and the output has no gaps.

## The IFFT (`ifft8`, `ifft_butterfly`, `cordic_rotator`, `ifft_ram`)

This is the hardest part to follow, so here it is in detail.

**Transform.** It is a radix-2 decimation-in-time transform with
`N = 8` points, so it has log2 N = 3 stages. It computes

    out[n] = (1/N) Σ_k in[k] · e^{+j2πkn/N}

The 1/N comes from halving the results of every butterfly. Halving also keeps
every value in range: if all input moduli are below 2^15, every intermediate
value and every output is too.

**Schedule.** The FSM has three states:

| state  | cycles | what happens |
|--------|--------|--------------|
| LOAD   | 8 handshakes | input k is written to element bitrev(k) |
| CALC   | 12 (3 stages × 4) | one butterfly per cycle, in place |
| UNLOAD | 8 handshakes | element n is output in natural order |

In stage s, butterfly number b works on elements i and j = i + 2^s. i is b
with a 0 inserted at bit s, and the twiddle angle is +2π·pos/2^(s+1), where
pos = i mod 2^s. With both sides always ready a block takes 28 cycles.
`out_valid` rises 12 edges after the edge that takes the last input. A new
block is accepted only after the previous one has been fully unloaded.

**Four RAMs.** Element e is stored in bank parity(e), the XOR of its index
bits, at address e >> 1. The two operands of a radix-2 butterfly differ in
exactly one index bit, so they always lie in different banks. Each bank
therefore needs only one read port and one write port. A bank is two RAMs,
one for the real part and one for the imaginary part, each 4 words × 16 bits.
The RAMs have asynchronous reads. A butterfly therefore reads both operands,
computes, and writes both results back within a single cycle. Multiplexers
on parity(i) route each bank to the butterfly's a or b input, and route the
x and y results back to the right bank.

**Twiddles by CORDIC.** `ifft_butterfly` rotates b by the twiddle angle
with `cordic_rotator`, then forms (a ± t)/2, rounded half up and saturated.
The rotator works as follows:

* the angle is a 16-bit binary angle, where 2^16 is a full turn;
* an angle beyond ±90° is folded back by negating the vector;
* 18 unrolled micro-rotations follow, with 5 guard bits on the vector and
  6 extra bits on the residual angle;
* a final multiplication by round(2^16/K) removes the CORDIC gain
  K ≈ 1.6468.

The arctangent table and 1/K are computed at elaboration. The measured error
is under 1 LSB, and the testbench allows 2.

Accuracy of the whole IFFT: outputs are within 4 LSB of a floating-point
inverse DFT. This was checked on random full-scale blocks, on an impulse and
on a single tone.

## Parameters

| where | parameter | default | meaning |
|-------|-----------|---------|---------|
| `cap_pkg` | `BITS_PER_SYM` | 4 | bits per symbol (16 points) |
| | `SYM_W` | 8 | width of a_k and b_k |
| | `SPS`, `SPAN`, `COEF_W` | 4, 4, 12 | shaping: samples per symbol, span in symbols, tap width |
| | `N_FFT`, `DATA_W` | 8, 16 | IFFT points, sample width |
| | `ANG_W`, `CORDIC_ITER` | 16, 18 | CORDIC angle width, iterations |
| `cap_tx_top` | `IFFT_SHIFT` | 11 | symbol-to-IFFT scaling |
| `prbs_lfsr` | `WIDTH`, `TAPS`, `SEED` | 7, 7'b1100000, all ones | generator polynomial |
| `ifft8` | `N`, `W` | `N_FFT`, `DATA_W` | any power of two ≥ 4 (the IFFT testbench also passes at N = 4 and 16 when its `N` is changed) |

The mapper is written for 4-bit indices. Changing `BITS_PER_SYM` also needs a
new mapper.

## What follows the original design and what does not

These parts follow the original design:

* the transmitter's four functions: random generator, constellation mapper,
  modulation and IFFT;
* the 16-point square constellation and its bit assignment, with 8-bit words;
* the CAP modulator as two orthogonal shaping filters whose outputs are
  subtracted;
* an IFFT of three stages on one radix butterfly, with four RAMs, CORDIC
  twiddles and multiplexers between the stages.

The following are choices made for this implementation:

* the PRBS7 polynomial, and using the LFSR as the data source and scrambler
  at once;
* the bit order within a symbol;
* the filter shape, 4 samples per symbol and 12-bit taps;
* 16-bit IFFT samples and the 1/2-per-stage scaling;
* the parity-bank memory map and the asynchronous-read RAMs;
* the CORDIC precision;
* all handshakes;
* feeding the IFFT with 8 consecutive symbols as a frequency-domain block,
  in parallel with the shaping filters.

Points where this RTL departs from, or does not cover, the original:

* The original design counts 23 multiplexers between its IFFT stages. The
  steering here is this implementation's own, and its multiplexer count
  differs.
* The IFFT size is read as 8 points from its three radix-2 stages.
* The DAC and low-pass filter after the modulator are analog, and no receiver
  is included. The top brings the digital samples out as ports.
* The IFFT cannot load a new block while it computes or unloads, so the
  transmitter stalls regularly. A double-buffered IFFT would remove this; it
  is not part of this design.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. With plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cap_tx_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/cap_pkg.sv tb/cap_ref_pkg.sv \
  tb/tb_cap_tx_top.sv -o sim && obj_dir/sim
```

Replace `tb_cap_tx_top` with any other testbench in `tb/`:

| testbench | what it checks |
|-----------|----------------|
| `tb_prbs_lfsr` | PRBS7 recurrence, back-pressure, the run gate, and a period of 127 with 64 ones |
| `tb_sipo` | symbol contents under random valid/ready, and the rate of one symbol per 4 cycles |
| `tb_cap_mapper` | all 16 indices |
| `tb_cap_shaping` | exact convolution, 1-cycle latency, and one symbol every 4 cycles with no output gaps |
| `tb_cordic_rotator` | random and quadrant-edge angles against floating point |
| `tb_ifft_butterfly` | butterfly against floating point |
| `tb_ifft_ram` | reads and writes against a model, including read-during-write |
| `tb_ifft8` | 50 blocks against an inverse DFT; 12-cycle latency, 28-cycle block period, output held under back-pressure |
| `tb_cap_tx_top` | 60 IFFT blocks and about 1900 shaped samples against a model, at default parameters |

`tb_cap_tx_top` also counts the chain stalls caused by the busy IFFT, the
pauses in the shaped output, the IFFT output back-pressure and the pause of
`run`. It fails if any of them never happens.

`tb/cap_ref_pkg.sv` holds the reference models: the constellation as a
literal table, the filter taps from their formula, and a floating-point
inverse DFT.
