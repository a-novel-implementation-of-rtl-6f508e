# QPSK modulator with a table-lookup carrier

A conventional QPSK modulator splits each two-bit symbol into an in-phase bit
and a quadrature bit, multiplies each onto one of two carriers 90 degrees
apart, and sums the products. This design needs neither multiplier nor mixer.
It stores one period of a sine wave in a table. It reads that table with a
free-running sample counter, so the output is a carrier. To change the
carrier's phase it adds a constant to the table address: a quarter of the
table length shifts the carrier by 90 degrees. A 4:1 multiplexer picks one of
four such constants, the *phase numbers*, with the current symbol. QPSK then
costs one adder, one small multiplexer and one ROM.

The RTL is synthesizable SystemVerilog with one clock. It produces one 10-bit
carrier sample per clock for an external DAC.

## Data path

```
 clk_counter ─bit_en─► drbg ─► [reg] ─► sipo ─► [reg] ─► phase_mux ─► [reg] ─┐
                                                  ▲                          │ phase number
                                       PHASE_NUMBERS (4 constants)           ▼
 sample_counter ─────────────────────────────────────────────► [reg] ─► phase_adder (+, mod 1024)
                                                                             │ qpsk_phase
                                                                             ▼
                                                                carrier_gen (1024 x 10 sine ROM)
                                                                             │ qpsk_sample
                                                                             ▼
                                                                   external DAC → QPSK wave
```

| Stage | Module | What it does |
|---|---|---|
| Bit-rate divider | `clk_counter` | Emits a one-cycle `bit_en` every `BIT_DIV` clocks. |
| Data source | `drbg` | A 7-bit LFSR, x^7 + x^6 + 1 (PRBS7, period 127). It shifts once per `bit_en`. |
| Serial to parallel | `sipo` | Collects two bits into a dibit `{I, Q}`, with the first bit in the MSB. It holds the dibit until the next pair is complete. |
| Phase select | `phase_mux` | A 4:1 multiplexer that picks the phase number of the current dibit. |
| Sample numbers | `sample_counter` | A 10-bit counter that advances every clock. One wrap is one carrier period. |
| Phase shift | `phase_adder` | A registered adder that forms `(sample + phase) mod 1024`. The dropped carry is the carrier's phase wrap. |
| Carrier | `carrier_gen` | A registered sine ROM holding one period. |
| Pipeline | `pipe_reg` | The `[reg]` boxes: one register stage each. |
| Shared constants | `qpsk_pkg` | Widths, types and `PHASE_NUMBERS`. |

The `[reg]` stages are pipeline registers between the blocks. They keep every
register-to-register path down to one adder, one multiplexer or one ROM read,
which raises the clock rate.

## Phase numbers and the symbol map

One carrier period is `PHASE_N = 2**PHASE_W = 1024` samples, so a phase number
of `p` shifts the carrier by `p * 360 / 1024` degrees. The design places the
four phases at 45, 135, 225 and 315 degrees. It Gray-codes them, so adjacent
phases differ in one bit:

| dibit {I,Q} | phase | phase number |
|---|---|---|
| 00 | 45°  | 128 |
| 01 | 135° | 384 |
| 11 | 225° | 640 |
| 10 | 315° | 896 |

In general the phase number is `(2k+1) * PHASE_N / 8` for k = 0, 1, 2, 3 in
Gray order; `qpsk_pkg::phase_number()` computes it. To use a different
constellation rotation or bit mapping, change that function. No other module
depends on it.

## The carrier table

`carrier_gen` holds

    TABLE[i] = round((2**(DW-1) - 1) * sin(2*pi*i / 2**AW)) + 2**(DW-1)

At AW = DW = 10 that is `round(511 * sin(2*pi*i/1024)) + 512`. The format is
offset binary: 512 is zero amplitude, 1023 the positive peak and 1 the
negative peak. That suits a unipolar DAC. The table is computed by a constant
function at elaboration, so there is no data file and AW and DW can be changed
freely. Synthesis tools turn it into a ROM; 1024 x 10 bits fits one 18-Kbit
FPGA block RAM.

## Timing

Everything runs on `clk`. One output sample is produced per clock, so the
sample rate Fs is the clock rate. `rst` is synchronous and active high. Count
the clock edges after `rst` falls as t = 1, 2, … and let `b1, b2, …` be the
data bits in the order the LFSR produces them. With `SYM = 2*BIT_DIV`:

    qpsk_phase(t)  = (t - 2 + PHASE_NUMBERS[sym(t)]) mod 1024        for t >= 2
    sym(t)         = {b(2k+1), b(2k+2)}   for SYM*(k+1) + 6 <= t < SYM*(k+2) + 6
                   = 00                   before the first symbol
    qpsk_sample(t) = TABLE[qpsk_phase(t-1)]

Where the 6 comes from: `bit_en` for a symbol's second bit is high after edge
`SYM*(k+1)`. Six registers follow, one clock each: the `drbg` output, the bit
register, the `sipo` output, the symbol register, the phase register and the
adder. A symbol's second bit leaves `drbg` 5 clocks before the symbol's phase
reaches `qpsk_phase`. The sample count reaches the adder output 2 clocks late, hence
`t - 2`.

The sample counter never stops. A symbol change therefore moves the output
straight to the new phase of a continuous carrier, as `cos(wt + theta_k)`
prescribes, and needs no alignment to the carrier period. With the default
`BIT_DIV = 512` a symbol lasts 1024 clocks, exactly one carrier period. The
carrier frequency is `Fclk / 1024` and the symbol rate is `Fclk / (2*BIT_DIV)`.

`qpsk_top` holds an assertion that `sipo` never delivers two symbols within
`2*BIT_DIV` clocks.

## Parameters

| Where | Parameter | Default | Meaning |
|---|---|---|---|
| `qpsk_top` | `BIT_DIV` | 512 | clocks per data bit; a symbol is `2*BIT_DIV` clocks |
| `qpsk_top` | `SEED` | 7'h7F | start state of the LFSR (must be non-zero) |
| `qpsk_pkg` | `PHASE_W` | 10 | table address width; a carrier period is `2**PHASE_W` samples |
| `qpsk_pkg` | `SAMPLE_W` | 10 | width of a carrier sample |

Each sub-module also takes its own width parameters (`W`, `AW`, `DW`,
`DEPTH`, `DIV`), and the top passes the package values down.

## Ports of `qpsk_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | sample clock |
| `rst` | in | 1 | synchronous, active-high reset |
| `qpsk_phase` | out | 10 | phase-shifted sample number (the ROM address) |
| `qpsk_sample` | out | 10 | carrier sample for the DAC, offset binary |

## Provenance and departures

The block structure follows a published multiplier-free QPSK modulator for a
Spartan-3E FPGA: DRBG data source, SIPO, phase numbers with a 4:1
multiplexer, sample counter, adder, digitized carrier generator, DAC, and
pipeline registers in the improved version. That description names the blocks
and shows how they connect. It gives almost no internal details. The
following are choices of this implementation:

- the LFSR as the bit source, with its polynomial and seed;
- the bit order in the SIPO (first bit is I, in the MSB);
- the phase-number values and the Gray mapping;
- the sine-table contents, 1024 x 10 bits, in offset binary;
- the symbol length (`BIT_DIV`);
- one clock domain with clock enables, instead of a divided clock;
- synchronous active-high reset;
- where exactly the pipeline registers sit.

Known differences from the published implementation:

- **I/O count.** The published design has 12 I/Os: clock, reset and one
  10-bit output, which is the adder output. This design brings out the adder
  output and also the sine-table sample, so it has 22 I/Os.
- **Size.** At default parameters the design synthesizes to 43 flip-flops,
  about 45 word-level cells and a 10,240-bit ROM. The published design
  reports 52 flip-flops and 34 LUTs. Its internal widths are not known, so
  the counts are not expected to match.
- **Timing.** The published design reports about 227 MHz on a Spartan-3E.
  This RTL has not been timed on any FPGA.
- **Not included.** The DAC is analog and off-chip; `qpsk_sample` is its
  input. The conventional I/Q modulator with two multipliers is only a
  baseline for comparison, so it is not part of this design.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the module
with a reference model written independently in the testbench, prints
`TB_RESULT checks=N failures=M`, and stops itself through a watchdog if it
hangs.

| Testbench | What it checks |
|---|---|
| `tb_qpsk_top` | End to end at default sizes, 260 symbols (two periods of the bit sequence). Checks every `qpsk_phase` and `qpsk_sample` value against the timing formulas above. Counts that all four phases occur, that phase jumps and carrier wraps occur, and that exactly one symbol arrives per 1024 clocks. |
| `tb_qpsk_short_symbols` | Same checks with 16-clock symbols and another seed. Many phase jumps fall in the middle of a carrier period. |
| `tb_clk_counter` | Pulse spacing and width; restart after reset. |
| `tb_drbg` | The bit sequence against the PRBS7 recurrence, with random enable gaps; period exactly 127. |
| `tb_sipo` | Random bits and gaps; symbol content, strobe and hold. |
| `tb_phase_mux` | The design's phase numbers and random tables. |
| `tb_sample_counter` | Random strobe; wrap-around. |
| `tb_phase_adder` | Random operands, including overflow. |
| `tb_carrier_gen` | All 1024 table entries against `$sin`; the quadrant points 512, 1023, 512, 1. |
| `tb_pipe_reg` | Delay and reset value at depth 3. |

The simulator used here has no X or Z values, so every register is reset.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl -Irtl rtl/qpsk_pkg.sv \
        tb/tb_qpsk_top.sv --top-module tb_qpsk_top
    ./obj_dir/Vtb_qpsk_top

For the other testbenches, replace `tb_qpsk_top` with their names.
`tb_qpsk_top` takes about a minute to build and half a minute to run; most of
the build time goes into elaborating the sine table. The others finish in
seconds.
