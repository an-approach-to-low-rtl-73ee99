# Spiffee: a cached-FFT processor for 1024-point complex transforms

This is synthesizable SystemVerilog for a single-chip FFT processor. It computes
1024-point complex FFTs at one radix-2 butterfly per clock cycle. The design aims
at energy efficiency. The butterfly datapath almost never touches the large main
memory. It works out of a small two-set cache instead, using the **cached FFT**
algorithm:

- The 1024-word transform is split into two *epochs*.
- In each epoch the data is handled as 32 *groups* of 32 words.
- A group is copied into the cache. All five radix-2 passes that involve only
  those 32 words then run inside the cache, and the group is copied back.

So each word crosses the main-memory interface only twice per transform, not ten
times. The main memory could therefore run slowly, at a higher threshold voltage
with low leakage. Only the small cache and the datapath do high-activity work.

The architecture follows a published low-power FFT processor ("Spiffee"). That
includes:

- the sizes of every memory;
- the multiplier and adder widths;
- the 9-stage pipeline, with its stage names;
- the one-stall-in-80-cycles behaviour;
- the clocking options.

Where the original leaves something open, the choice made here is listed in the
last section: number formats, scaling, butterfly order, host interface.

## The cached FFT as implemented

The processor does a radix-2 **decimation-in-time** FFT. The input is kept in
main memory in bit-reversed order, so stage `s` (s = 0..9) pairs word `j` with
word `j + 2^s` (bit `s` of `j` is 0). The butterfly is

    X = (A + B*W) / 2        Y = (A - B*W) / 2        W = exp(-j*2*pi*e/1024)

with twiddle exponent `e = (j mod 2^s) << (9 - s)`.

Stages 0-4 only pair words whose addresses differ in the low five bits. Stages
5-9 only pair words whose addresses differ in the high five bits. That split
gives the two epochs:

| epoch | stages | group g (g = 0..31) holds main-memory words | cache word c is |
|-------|--------|---------------------------------------------|-----------------|
| 0     | 0-4    | 32g .. 32g+31 (contiguous)                  | 32g + c         |
| 1     | 5-9    | g, g+32, g+64, ..., g+992 (stride 32)       | g + 32c         |

Inside the cache, pass `p` (0..4) of a group pairs cache words `c` and `c + 2^p`.
It does that as 16 butterflies, numbered `k = 0..15`:

- A is `k` with a 0 inserted at bit `p`.
- B is A + 2^p.

The whole transform is 2 × 32 × 5 × 16 = 5120 butterflies. The result ends up in
natural order.

Every butterfly halves its results, so the output is `DFT(x) / 1024`. Any input
whose complex samples have magnitude below 1 goes through every stage without
overflow: a butterfly with inputs below magnitude 1 produces outputs below
magnitude 1. The last stage still saturates in case this is violated.

## The 9-stage butterfly pipeline

One butterfly enters per cycle. Butterfly `t` is issued in cycle `t` and moves
through these stages:

| cycle | stage          | what happens                                                  | module |
|-------|----------------|---------------------------------------------------------------|--------|
| t     | MEM RD         | read A's and B's cache banks, read the twiddle ROM            | `cache_array`, `twiddle_rom` |
| t+1   | CROSSB RD      | steer the two bank outputs onto A and B                       | `crossbar_rd` |
| t+2   | MULT1          | partial products of Bre·Wre, Bim·Wim, Bre·Wim, Bim·Wre        | `mult20x20` ×4 |
| t+3   | MULT2          | partial products summed                                       | `mult20x20` |
| t+4   | MULT3          | products rounded to 24 bits                                   | `mult20x20` |
| t+5   | ADD/SUB CMULT  | BWre = Bre·Wre − Bim·Wim, BWim = Bre·Wim + Bim·Wre            | `addsub24` ×2 |
| t+6   | ADD/SUB XY     | X = A + BW, Y = A − BW, halved, rounded, saturated            | `addsub24` ×4 |
| t+7   | CROSSB WR      | steer X and Y to their banks                                  | `crossbar_wr` |
| t+8   | MEM WR         | write X and Y back over A and B                               | `cache_array` |

That makes four 20×20 multipliers and six 24-bit adder/subtractors in all.

### Why the cache has banks, and why no butterfly ever waits for a bank

Each cache set is two 16-word banks. Cache word `c` lives in bank `parity(c)`
(the XOR of its five bits), at row `c[3:0]`. The two words of a butterfly differ
in exactly one address bit, so they are always in different banks. As a result:

- A and B are read in the same cycle.
- X and Y are written in the same cycle.
- The crossbars only have to swap or not swap.

### The read-after-write hazard (one bubble per 80 butterflies)

A butterfly reads its operands in MEM RD. It writes its results eight cycles
later, in MEM WR. A write becomes visible to reads in the following cycle; there
is no bypass. So a butterfly must not read a word that any of the 8 butterflies
issued just before it will still write.

The controller keeps the addresses of those 8 butterflies. If the next butterfly
reads one of them, it issues a bubble instead ("stall") and tries again in the
next cycle.

With the butterfly order above, exactly one pass boundary per group collides:
the boundary from pass 3 to pass 4.

- Butterfly 0 of pass 4 reads words 0 and 16.
- Word 16 is written by butterfly 8 of pass 3, which was issued only 8 cycles
  earlier.

Every other pass boundary leaves at least 12 cycles of distance. After the single
bubble, the rest of pass 4 runs without a stall. So the pipeline needs 81 cycles
per group: one stall in every 80 cycles, as in the original chip.

The testbenches check this exactly:

- There are 64 stalls per transform.
- No butterfly ever reads a word that is still in flight.

## Cache sets and the transfer engine

The four 16 × 40-bit banks form **two sets of 32 words**. The datapath computes
group `k` in set `k mod 2`. Meanwhile the transfer engine in `fft_controller`
works on the other set:

1. It writes the finished group back to main memory (flush).
2. It fills the set with the next group (load).

Each of these steps takes 33 cycles, one word per cycle plus the one-cycle memory
latency. Together they fit in the 81 cycles a group spends in the datapath, so
within an epoch the datapath never waits.

A flush starts only once no butterfly of that set is left in the pipeline.

Words are converted on the way:

- On a load, 18-bit memory components get two guard bits appended.
- On a flush, 20-bit cache components are rounded to nearest and saturated back
  to 18 bits.

The epoch boundary is the one place the datapath idles. Group 0 of epoch 1 takes
one word from every group of epoch 0, so it can only be loaded once the last
epoch-0 group has been flushed. The datapath waits about 76 cycles there: the
pipeline drains, then the group is flushed and the next one loaded. It also
waits 34 cycles at the very start, while group 0 is loaded.

One transform takes **5337 cycles** from `start` to `done`:

- 64 × 81 butterfly slots;
- the first load;
- the epoch-boundary drain, flush and reload;
- the final drain and flush.

The original chip's published figures imply 5190-5301 cycles per transform.
They give 30 µs at 173 MHz, 330 µs at 16 MHz, and a projected 93 µs at 57 MHz.

## Number formats

| where          | width per component | format | note |
|----------------|---------------------|--------|------|
| main memory    | 18 bits (36-bit word) | Q1.17 | host data is in this format |
| cache          | 20 bits (40-bit word) | Q1.19 | memory word with 2 guard bits |
| twiddle ROMs   | 20 bits (40-bit word) | Q2.18 | so that W = 1 is exact |
| products, sums | 24 bits             | Q3.21 | 20×20 product rounded at bit 16 |

Two ROMs of 256 × 40 bits hold `W^k` for k = 0..511. ROM 0 holds k < 256 and
ROM 1 holds the rest. Each entry is

    re = round(2^18 * cos(2*pi*k/1024)),   im = round(-2^18 * sin(2*pi*k/1024))

stored as `{re, im}` in ten hex digits per line. The files are
`rtl/twiddle_rom0.hex` and `rtl/twiddle_rom1.hex`. They are read with
`$readmemh` using paths relative to the directory the simulator runs in (the
folder that holds `rtl/`).

Accuracy: the full-size test compares all 1024 bins against a floating-point DFT
and finds a largest error of 1 LSB of the 18-bit output.

## Using the processor (`spiffee`)

- **Clock.** With `osc_sel = 0`, the chip runs from `ext_clk`. With
  `osc_sel = 1`, it runs from the on-chip programmable oscillator, whose half
  period is set by `osc_ctrl`. The selected clock comes out on `clk_mon`, and
  everything else is synchronous to it. Change `osc_sel` only while the chip is
  idle. The clock switch is a plain multiplexer.
- **Load.** While `busy` is low, drive `host_en = 1`, `host_we = 1`,
  `host_addr = n` and `host_wdata = x[n]`, one sample per cycle, in natural
  order. The sample is stored at the bit-reversed address.
- **Run.** Pulse `start` for one cycle. `busy` goes high in the next cycle, and
  `done` pulses once when the last group is back in memory.
- **Read.** While `busy` is low, `host_en = 1` with `host_we = 0` and
  `host_addr = k` returns bin `k` of `DFT(x)/1024` on `host_rdata` one cycle
  later.
- **Reset.** `rst_n` is asynchronous and active low. It clears the control and
  pipeline registers but not the memories.

Internal status signals `u_ctrl.ev_stall`, `ev_wait_load` and `ev_group_end` can
be watched in simulation.

## Modules

| file | what it is |
|------|------------|
| `spiffee_pkg.sv` | sizes, word structs, format conversions, bit reversal |
| `spiffee.sv` | top: wires everything below, host port, clock select |
| `fft_controller.sv` | issue engine (addresses, twiddle exponents, hazard bubbles) and transfer engine (load/flush, epoch ordering) |
| `bfly_datapath.sv` | the butterfly: 4 multipliers, 6 adder/subtractors, scaling |
| `mult20x20.sv` | 3-stage 20×20 → 24-bit multiplier |
| `addsub24.sv` | 24-bit adder/subtractor, 4-bit carry-lookahead groups with ripple carry between them |
| `cache_array.sv` | 4 banks as 2 sets, datapath and transfer ports |
| `cache_bank.sv` | 16 × 40-bit bank, one read and one write port |
| `main_memory.sv` | 1024 × 36-bit memory of 8 arrays |
| `sram_bank.sv` | 128 × 36-bit single-port array |
| `twiddle_rom.sv` | 256 × 40-bit ROM |
| `crossbar_rd.sv`, `crossbar_wr.sv` | the CROSSB RD and CROSSB WR stages |
| `prog_oscillator.sv` | **behavioural model** (timed loop) of the programmable oscillator; not synthesizable |
| `ulpacc.sv` | separate accumulator test core (below) |

Each file begins with a description of its interface and timing.

## The accumulator test core (`ulpacc`)

`ulpacc` is a small, separate design that comes from the same low-voltage work: a
16-word × 24-bit dual-ported memory feeding a 24-bit accumulator. It has no
connection to the FFT processor. The top instantiates it beside the processor,
with its own `ua_*` ports, clock and reset.

In one cycle you can:

- write the memory, with either an external word or the accumulator;
- read a word, which is added to the accumulator in the next cycle;
- clear the accumulator.

The original test chip's own controller and oscillator are not described, so they
are not modelled.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/spiffee_pkg.sv \
        tb/tb_spiffee.sv --top-module tb_spiffee -Mdir obj_spiffee
    ./obj_spiffee/Vtb_spiffee

Run from the folder that contains `rtl/`, so the ROM files are found. Swap in
another `tb_<module>` to test one block.

`tb_spiffee` runs the full-size design twice:

1. On the external clock, it does a transform of a four-tone test signal (0.25 ×
   [cos(2π·23n/N) + sin(2π·83n/N) + cos(2π·211n/N) − j·sin(2π·211n/N)]). It
   checks every bin, the cycle count, the stall count, the epoch-boundary wait
   and the tone bins.
2. On the on-chip oscillator, it does a transform of an impulse.

It also exercises `ulpacc`. It runs in well under a second.

Other testbenches:

- `tb_fft_controller` checks the whole schedule against an independent model:
  addresses, twiddle exponents, hazard safety, write-back timing and memory
  traffic order.

## What is modelled and what is not

Not modelled, because they are circuit techniques with no logic function:

- the hierarchical-bitline SRAM and ROM circuits;
- the 6T and 10T memory cells;
- the well/substrate biasing;
- the per-flip-flop local clock buffers.

The memories here are ordinary synchronous arrays with the right sizes and ports.

Not built, because only their existence is known:

- the 650-element scan chain;
- the controllers of the SRAM and multiplier test chips.

Choices made here, where the original design is not specific:

- **Number formats and scaling.** Only the widths are fixed. The binary-point
  positions, the halving in every stage, round-to-nearest and saturation are
  this design's.
- **Butterfly order inside a pass.** The natural order is used. It reproduces
  the one-stall-per-group rate, but it is not known to be the original order.
- **Cache organisation.** Two double-buffered sets with the parity bank mapping,
  and a one-word-per-cycle transfer engine. This is why the cycle count is 5337
  rather than about 5200-5300.
- **The array select in main memory.** It uses the high address bits, with a
  single shared port.
- **Interfaces.** The host interface (bit-reversed write addressing), the
  start/busy/done handshake and the reset behaviour are this design's.
- **Oscillator control.** The control encoding is this design's: the half period
  is (`osc_ctrl` + 1) delay units.
