# Combined ring-oscillator TRNG with a Galois ring oscillator as auxiliary randomness source

A single ring oscillator (RO) sampled by a clock yields very little true
randomness: its jitter is small and the sampled bits are strongly correlated.
This generator gets usable random bits out of plain FPGA logic in three steps:

1. **Many sources, XORed together.** K independent ROs run freely. Each is
   sampled by a D flip-flop on a slow reference clock f_L (100 MHz), and the K
   sampled bits are XORed into one. The small amount of jitter-driven
   randomness in each RO accumulates in the XOR.
2. **An auxiliary source of randomness (ASR).** Before sampling, every RO
   output is XORed with the output of a *Galois ring oscillator* (GARO). A
   GARO is a Galois LFSR whose flip-flops are replaced by inverters. It
   oscillates fast and irregularly and mixes pseudo-randomness with true
   randomness. Perturbing the ROs with it lets the generator reach a given
   quality with fewer ROs or with less decimation.
3. **Restart and decimation.** Each inverter in every ring is a NAND gate
   driven by one enable, so the whole generator can be stopped and restarted
   from the same initial state. Restarting shows how many bits after a restart
   are still predictable. Only every j-th bit is then used, with j ≥ m_min.
   m_min is the smallest spacing that passes a chi-square test across
   thousands of restarts. It is measured on the device (for example m_min = 3
   for K = 20 on a Virtex-5), and it sets the usable output rate, f_L / j.

The RTL implements the digital part of the generator for synthesis: sampling,
the XOR-combining tree, the restart sequencer, the decimator and the output
buffer. It also provides behavioural simulation models of the analog parts:
the ROs, the GARO, and the routing of the GARO signal.

## Block diagram

```
             osc_en (NAND enable of every ring)
   restart_ctrl ─────────────┬──────────────────────────────┐
      ▲ start                │                              │
      │                 ┌────┴─────┐   asr   ┌────────────┐ │
      │                 │  garo    ├────────►│ asr_fanout │ │ (routing skew)
      │                 └──────────┘         └─────┬──────┘ │
      │                                   asr_k[K] │        │
      │  ┌───────────────────┐  ro[K]   ┌──────────▼──────┐ │
      │  │ ring_oscillator×K ├─────────►│ perturb_sampler │◄┘ valid tag
      │  └───────────────────┘          │ ro^asr → DFF    │
      │                                 └────────┬────────┘
      │                                 sample[K]│          clk = f_L
      │                                 ┌────────▼────────┐
      │                                 │  xor_combiner   │ groups of 6,
      │                                 │ 20 → 4 → 1      │ registered per level
      │                                 └────────┬────────┘
      │                                          │ 1 bit / clock
      │                                 ┌────────▼────────┐
      │            decim_j ────────────►│   decimator     ├──► rnd_bit / rnd_valid
      │                                 └────────┬────────┘
      │                        flush on done ┌───▼────────┐
      └──────────────────────────────────────┤ out_buffer ├──► usb_data/valid/ready
                                             └────────────┘    (to a USB 2.0 link)
```

## The combining tree and its timing

An FPGA LUT has a limited number of inputs, so the K sampled bits cannot be
XORed in one gate. `xor_combiner` splits them into groups of `GROUP` bits.
The default of 6 matches a 6-input LUT; 4 models a 4-input LUT family. Each
group is XORed and the result is registered on f_L. The same is then done to
the group results, until one bit remains. For the default K = 20:

| register level | bits | what it holds                     |
|----------------|------|-----------------------------------|
| 1              | 20   | `ro[k] ^ asr_k[k]` (perturb_sampler) |
| 2              | 4    | XOR of groups 6+6+6+2              |
| 3              | 1    | XOR of the 4 group results         |

The first combined bit therefore appears **three clock periods** after the
oscillators are enabled. After that, one bit appears per clock (100 Mbit/s
raw). The number of levels is `1 + ceil(log_GROUP(K))`, computed by
`trng_pkg::xor_levels`. K = 9 to 36 gives three levels, K = 37 to 216 gives
four, and K = 2 to 6 gives two. A left-over group smaller than GROUP is simply
a smaller XOR.

A valid tag runs alongside the data through every register, starting from the
oscillator enable. Downstream logic therefore sees exactly `BITS_PER_RESTART`
valid bits per restart, with no counting of pipeline depth.

## Why the ASR needs routing skew to do anything

This is the least obvious point of the design. Every sampled bit is
`ro[k] ^ asr`, and the output is the XOR of all of them. If all K flip-flops
saw the *same* ASR level, the output would be `(^ro) ^ (K odd ? asr : 0)`. For
an even K, such as the default 20, the ASR would cancel completely. In
silicon, the GARO output is one net routed to K XOR gates scattered by the
placer. Each copy arrives at a different time, and the GARO toggles every few
hundred picoseconds, so at a sampling edge different flip-flops see different
ASR levels. The perturbation then does not cancel.

The top therefore routes the GARO output through `asr_fanout`. This
behavioural model gives copy k a transport delay of `100 + 38·k` ps by
default. With those values, the K copies disagree at more than half of the
sampling edges (the end-to-end test counts this). The delays are an
assumption, since placement and routing are left to the vendor tools. To see
the cancellation, set `ASR_ROUTE_STEP_PS = 0` and compare with
`ASR_JITTER_PS = 0`: the output of an even-K generator no longer depends on
the GARO.

## Restart sequencing

`restart_ctrl` is the enable source for the NAND gates:

* A `start` pulse raises `osc_en` for exactly `BITS_PER_RESTART` cycles
  (20000 by default, one bit per cycle). `run_start` pulses in the first of
  those cycles.
* `osc_en` then falls, and every ring freezes at all-ones. After
  `OFF_CYCLES` (default 16) the controller pulses `done`. The off time must
  cover the sampling, combining and decimator registers; the top checks this
  at elaboration. `done` also flushes the last partial byte of the buffer.
* A trigger while `busy` is ignored. An immediate assertion checks that every
  enable pulse lasts exactly `BITS_PER_RESTART` cycles.

The statistical evaluation uses 2048 such restarts of 20000 bits. It tests
bit m of all restarts together, for each m, and looks for the largest m at
which three successive positions fail. That analysis runs on a host computer
and is not part of this RTL. The hardware only has to make every restart
start from the same state and deliver every bit in order.

## Decimation

`decimator` counts valid bits from `run_start` and passes bits number j, 2j,
3j, … of each restart, one cycle later. `decim_j` is a run-time input:

| configuration                   | m_min | decim_j | output rate at 100 MHz |
|---------------------------------|-------|---------|------------------------|
| raw sequence (for measurement)  | –     | 1       | 100 Mbit/s             |
| Virtex-5, K = 20, with GARO     | 3     | 3       | 33.33 Mbit/s           |
| Virtex-4, K = 20, with GARO     | 5     | 5       | 20 Mbit/s              |
| Spartan-3/6, K = 20, with GARO  | 10    | 10      | 10 Mbit/s              |
| K = 9 with GARO                 | 10    | 10      | 10 Mbit/s              |

m_min belongs to a particular device and placement. Measure it before
choosing j; the values above are reported measurements, not properties of
this RTL. `decim_j = 0` is treated as 1.

## Output buffer

`out_buffer` packs kept bits into bytes, first bit in bit 0. It queues them in
a first-word-fall-through FIFO (`byte_fifo`, 4096 bytes by default, enough for
a whole 20000-bit restart). It hands them to the host link with a valid/ready
handshake. A byte that arrives while the FIFO is full is dropped, and the
sticky `overflow` flag is set; the next `start` clears it. The USB 2.0
interface itself is not part of this RTL: connect `usb_data`, `usb_valid`
and `usb_ready` to your USB core or FIFO bridge chip. `rnd_bit`/`rnd_valid`
carry the same decimated bits for use on chip.

## Files

| file (rtl/)           | kind        | content |
|-----------------------|-------------|---------|
| `trng_pkg.sv`         | package     | feedback polynomials (1)–(6) as 32-bit coefficient vectors, default sizes, XOR-level functions |
| `ring_oscillator.sv`  | model       | one source RO: NAND + delay element, jittered half period |
| `garo.sv`             | model       | Galois ring oscillator, degree 31 by default, NAND-gated |
| `asr_fanout.sv`       | model       | per-copy transport delay of the GARO net |
| `perturb_sampler.sv`  | RTL         | `ro ^ asr` into K flip-flops, valid tag |
| `xor_combiner.sv`     | RTL         | LUT-sized, registered XOR reduction tree |
| `restart_ctrl.sv`     | RTL         | restart sequencer |
| `decimator.sv`        | RTL         | keep every j-th bit |
| `byte_fifo.sv`        | RTL         | FWFT FIFO used by the buffer |
| `out_buffer.sv`       | RTL         | bit-to-byte packing, FIFO, overflow flag |
| `trng_top.sv`         | top         | the complete generator |

The feedback polynomials in `trng_pkg` are the six that were examined as
GARO and Fibonacci ring oscillator (FIRO) candidates. The generator uses the degree-31 polynomial

f(x) = x³¹ + x²⁷ + x²³ + x²¹ + x²⁰ + x¹⁷ + x¹⁶ + x¹⁵ + x¹³ + x¹⁰ + x⁹ + x⁸ + x⁶ + x⁵ + x⁴ + x³ + x + 1

(`POLY6 = 32'h88B3_A77B`). In the GARO, stage 0 is `NAND(en, stage[30])` and
stage i is `NAND(en, stage[i-1] ^ (c_i & stage[30]))`. The output is stage
30.

## Top-level parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `K` | 20 | number of source ROs |
| `GROUP` | 6 | XOR inputs per LUT |
| `ASR_DEG`, `ASR_POLY` | 31, `POLY6` | GARO feedback polynomial |
| `BITS_PER_RESTART` | 20000 | samples per restart |
| `OFF_CYCLES` | 16 | off time between restarts |
| `FIFO_DEPTH` | 4096 | buffer size in bytes (power of two) |
| `J_W` | 16 | width of `decim_j` |
| `RO_HALF_BASE_PS`, `RO_HALF_STEP_PS` | 1400, 52 | RO k has half period 1400 + 52·k ps (357 MHz down to 125 MHz at K = 50) |
| `RO_JITTER_PS` | 10 | RO jitter, ± per half period |
| `ASR_STEP_PS`, `ASR_JITTER_PS` | 400, 4 | GARO stage delay and its jitter |
| `ASR_ROUTE_BASE_PS`, `ASR_ROUTE_STEP_PS` | 100, 38 | GARO routing delay to XOR k |

All timing parameters are model parameters. They do not exist in hardware and
are not taken from measurements: they only have to keep every RO frequency
above f_L and give plausible jitter. The timing parameters must be even
numbers of picoseconds. The models put every oscillator edge on an *odd*
picosecond, so that no edge ever coincides with a 100 MHz clock edge on whole
nanoseconds, and sampling in simulation is free of races.

## How far the simulation can be trusted

* The digital path (sampling, combining, decimation, buffering, restart
  timing) is checked bit for bit. A reference model (`tb/trng_ref_monitor.sv`)
  samples the oscillator and routed ASR nets on the same edges, computes the
  expected XOR, decimates and packs it, and compares every byte that leaves
  the design.
* The randomness is **not** modelled faithfully. The behavioural oscillators
  have independent, uniformly distributed jitter and ideal sampling with no
  metastability. Statistical results such as m_min, and the difference
  between FPGA families, come from silicon and cannot be reproduced here. With
  all jitter parameters at 0 the generator is fully deterministic, and
  repeated restarts give identical output. The end-to-end test checks both
  this and that jittered restarts differ.
* The models are not synthesizable. For an FPGA build, replace
  `ring_oscillator`, `garo` and `asr_fanout` with structural instances of
  LUT-based NAND gates and a latch (with keep/dont-touch attributes and
  combinational-loop waivers). `asr_fanout` then disappears: it stands for
  wiring.

## Departures and choices beyond the published description

* The delay element τ of each RO is a single latch in the original. Here it
  is folded into the model's half period.
* The last XOR level is registered inside `xor_combiner`. The original draws
  the final XOR feeding the (clocked) buffer directly. Both give the stated
  three-period latency.
* The restart sequencer, the valid tag, the decimator as a hardware block,
  the byte packing, the FIFO depth and the overflow policy are this design's
  own. The original names only "a buffer" and an external restart signal, and
  it performs the bit selection in analysis.
* The generator without an ASR, used as a comparison baseline, is not
  provided: the GARO is always in the path.
* Reported resource counts (a few dozen slice registers and LUTs for K = 20)
  include implementation details that are not described. They are not
  comparable with a generic synthesis of this RTL.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/trng_pkg.sv tb/tb_trng_top_full.sv \
  --top-module tb_trng_top_full -o sim
./obj_dir/sim
```

| testbench | what it runs |
|-----------|--------------|
| `tb_trng_top_full` | defaults (K = 20, 20000-bit restarts): one restart with j = 1 (2500 bytes) and one with j = 3, every byte against the reference model, latency and run length |
| `tb_trng_top` | 400-bit restarts: random back-pressure, overflow, j = 3 with flush, jittered and jitter-free generators side by side; counts each mechanism |
| `tb_trng_workloads` | K = 2, 9, 20, 35, 50 with j = 1, 2, 3, 10, and K = 20 in 4-input groups with j = 5: byte check, output spacing exactly j cycles, first-bit latency per tree depth |
| `tb_ring_oscillator`, `tb_garo`, `tb_asr_fanout` | model timing; GARO sequence against an independent tap-list reference |
| `tb_perturb_sampler`, `tb_xor_combiner`, `tb_restart_ctrl`, `tb_decimator`, `tb_out_buffer` | block tests |

The full-size test simulates 400 µs of generator time in about a second.
`tb_trng_workloads` takes about ten seconds.
