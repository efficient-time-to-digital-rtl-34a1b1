# Wave-union tapped-delay-line TDC with sub-TDL encoding (FPGA, 20 nm)

This design is a single-channel time-to-digital converter (TDC). It measures when a hit edge
arrives with a resolution of about 1.2 ps, using only a 500 MHz clock and the carry chain of an
FPGA. It combines three ideas:

- **Tapped delay line (TDL).** The hit travels along 60 chained CARRY8 carry primitives, about
  2.4 ns of delay. On every clock edge, flip-flops on all taps record how far the edge has got.
- **Sub-TDL encoding.** Neighbouring carry taps are only a few picoseconds apart, so the sampled
  thermometer code is full of bubbles. The taps are therefore regrouped: sub-TDL *k* holds tap *k*
  of every CARRY8. Within one sub-TDL the bits are a whole CARRY8 apart (about 40 ps), so each
  sub-TDL code is clean. The ones of all sub-TDLs are counted and added.
- **Dual sampling (DS) and wave union (WU).** Both the carry (C) and the sum (S) output of every
  stage are sampled (16 sub-TDLs instead of 8). A LUT launcher turns the hit into a short negative
  pulse, so two edges run down the line. Their positions are measured separately and added.
  Together these give 8 × 2 × 2 = 32 equivalent taps per CARRY8.

The raw fine code of such a line is very nonlinear. A calibration memory therefore maps every raw
code to one main corrected bin and, when needed, a compensation bin. An on-chip histogram counts
these bins for code-density tests. With one table this gives the *compensated* TDC. With a table
built on ideal bins merged two by two, the same hardware gives the *binned* TDC (about 2.5 ps bins,
much better linearity).

## Signal path

```
hit ─► wu_launcher ─► carry8_tdl (60 × CARRY8) ─► tap_register (480 C + 480 S flip-flops)
                                                   │
                         ┌─────────────────────────┼──────────────────────────┐
                  sub_tdl (Rising)           hit_detect                 sub_tdl (Falling)
                         │                         │                          │
                  encoder (16 tm2bin + Sum)        │              encoder (16 tm2bin + Sum)
                         └──────────── + ──────────┼──────────────────────────┘
                                       │ fine code │ valid          coarse_counter
                                   calib_bram (BCF_m, BCF_c) ─────► ts_* timestamp outputs
                                       │
                                   histogram (port A: +1 at BCF_m, port B: +1 at BCF_c)
                                       │
                                   host readout (rd_*)
```

`ring_oscillator` sits beside the TDC with its own ports (`ro_en`, `ro_out`). It is the jitter
test structure: a LUT inverter followed by *m* carry delay elements in a loop.

## How the wave union is measured

The launcher is one LUT with `Out = A | ~B`. The hit drives B directly and A through a buffer. The
line idles at 1. A rising hit edge first pulls `Out` low and then, one buffer delay later, high
again. So a falling edge leads and a rising edge follows it down the line. At the sampling instant
the sampled line reads `1…1 0…0 1…1`, counting from the line input.

- **Sub-TDL Rising** keeps, in each sub-TDL, the leading run of ones (a prefix AND). Its popcount is
  how far the trailing rising edge has got.
- **Sub-TDL Falling** keeps every bit up to the last zero (a suffix OR of the inverted bits). Its
  popcount is how far the leading falling edge has got.

Sum taps switch to the inverse of the carry into their stage. They are inverted back before
grouping, so S and C sub-TDLs look alike.

The two edges travel at different speeds: about 4.79 ps per stage for the fast edge and 5.08 ps
for the slow edge. The measurement still works because each edge is encoded on its own and only
the two positions are added. The sum grows by one code for every ~1.23 ps by which the hit
precedes the sampling edge.

`hit_detect` chooses the sample to use. That is the first sample in which the trailing edge has
passed the first carry tap while the pulse is still inside the line, so both edges are in the
line. Without WU it is the first sample in which the first carry tap is high.

## Compensation and binning tables

The table is computed off-chip from a code-density test. Uniformly random hits are counted per raw
code, and the counts give the bin widths W[k]. The cumulative sum T[k] = Σ_{n<k} W[n] gives the
boundaries of the actual bins. The ideal bins have width L: the mean width of the populated codes,
or twice that for binning. For each raw code k:

- `BCF_m` = the ideal bin that holds the start T[k] of the actual bin.
- `BCF_c` = `BCF_m + 1` if the actual bin reaches past the upper boundary of that ideal bin.
  Otherwise it is void (`c_valid = 0`).
- Codes that never occurred get `m_valid = 0`.

Every hit adds one at `BCF_m` and, unless void, one at `BCF_c`. An actual bin wider than two ideal
bins leaves the ideal bins beyond the second one empty (missing codes). This is inherent to the
method. `tb/tb_tdc_top.sv` contains this table computation (task `make_table`) and shows how a host
would drive the calibration port.

The histogram is two simple-dual-port RAM banks, one for each port. They never collide, and the
host readout returns their sum. Each bank does a read-modify-write. The value written last is
forwarded, so increments to the same bin in consecutive cycles are all counted.

## Interface of `tdc_top`

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst` | in | 500 MHz clock; synchronous active-high reset |
| `hit` | in | hit signal. It must stay high and low for longer than the line (2.4 ns) plus the WU pulse, about 3 ns. |
| `cal_we, cal_addr, cal_m_valid, cal_bcf_m, cal_c_valid, cal_bcf_c` | in | write one calibration word |
| `hist_clear` → `hist_busy` | in/out | zero both histogram banks. Takes 2^11 + 1 cycles; hits are dropped meanwhile. |
| `rd_req, rd_addr` → `rd_ack`, then `rd_valid, rd_data` one cycle later | in/out | read one bin (33-bit sum of both banks). A hit in the same cycle has priority, so hold `rd_req` until `rd_ack`. |
| `ts_valid, ts_coarse, ts_fine, ts_m_valid, ts_bin, ts_c_valid, ts_bin_c` | out | per-hit timestamp: coarse cycle count, raw fine code and its two calibration factors |
| `ro_en` → `ro_out` | in/out | ring oscillator |

**Timing.** Count rising clock edges from the sampling edge. The sub-TDL codes and the valid flag
are ready at +1, the edge codes at +3 and the fine code at +4. The calibration factors and the
`ts_*` outputs come at +5, and the histogram is written two cycles later. The time of a hit is
`ts_coarse × 2 ns − ts_fine × LSB` plus a constant offset, where the fine code counts how long
before the sampling edge the hit came. A new hit can be measured every three clock cycles at most.

**Parameters.** The defaults give the DSWU/binned TDC:

- `N_CY8` (60): CARRY8s in the line.
- `DS` (1): sample the sum taps too.
- `WU` (1): use the launcher and the falling path.
- `COUNT_W` (32): histogram counter width.
- `COARSE_W` (16): coarse counter width.

Two other settings give the published single-technique variants:

- `DS=0` gives the WU TDC: 8 sub-TDLs and an 810-bin range.
- `WU=0` gives the DS TDC, with the hit fed straight into the line.

The code width follows from these parameters (`tdc_pkg::code_w`): 11 bits at the defaults.

## What is a model and what is RTL

Everything from `tap_register` onwards is synthesizable SystemVerilog: `tap_register`, `sub_tdl`,
`tm2bin`, `encoder`, `hit_detect`, `calib_bram`, `hist_bank`, `histogram`, `coarse_counter` and the
glue in `tdc_top`. Three files are timing models that exist only for simulation:

- `carry8_tdl`: transport delays per tap. The mean stage delay is 4.79 ps for rising edges and
  5.08 ps for falling edges. The stage delays vary unevenly inside a CARRY8 (0.35 to 1.65 × the
  mean, a made-up but realistic pattern) and by ±4 % between CARRY8s. Which edge is the slow one is
  this model's choice.
- `wu_launcher`: LUT function with a 300 ps input buffer. The pulse width is a choice; it must
  exceed the drift between the two edges along the line.
- `ring_oscillator`: a half period of (LUT delay + m element delays), with Gaussian jitter of
  variance σ_LUT² + m·σ_CY². It uses σ_LUT = 1.45 ps and σ_CY = 0.16 ps. The mean delays and m = 64
  are this model's choices.

On an FPGA, replace `carry8_tdl` and `wu_launcher` with CARRY8 and LUT primitives. Place the line
inside one clock region to avoid clock skew. Synthesis reports the two processes per tap in
`carry8_tdl` as multiple drivers; that is expected for this model.

## Departures and own choices

These are not specified by the design being reproduced and were chosen here:

- the Rising/Falling edge-extraction rule;
- the hit-detect rule;
- all pipeline registers;
- the calibration word layout and its valid flags;
- one RAM bank per histogram port, with the readout summing them;
- the clear sweep and readout arbitration;
- the coarse counter width and how it is used: it stamps each hit on the `ts_*` outputs, and the
  histogram is filled from calibrated fine codes only;
- the table rule for actual bins that start inside an ideal bin (the published rule is written
  only for actual bins near their ideal counterpart).

The host link and the table computation are not part of the RTL. There is no multi-channel
arrangement. Clock skew is not modelled, and neither are its remedies (bin-by-bin calibration,
double-phase sampling). That includes the shorter 390-bin DS configuration. Setting `DS=0, WU=0` gives the
plain sub-TDL TDC with 8 equivalent taps per CARRY8.

## Simulating

Every file starts with `` `timescale 1ps/1fs ``. The package must be compiled first. Examples
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tdc_pkg.sv tb/tb_tdc_top.sv --top-module tb_tdc_top
obj_dir/Vtb_tdc_top
```

Each testbench prints `TB_RESULT checks=N failures=M` at the end and has a cycle watchdog.

- **Unit testbenches.** `tb_tm2bin`, `tb_encoder`, `tb_tap_register`, `tb_sub_tdl`, `tb_hit_detect`,
  `tb_calib_bram`, `tb_histogram`, `tb_coarse_counter`, `tb_wu_launcher`, `tb_carry8_tdl` and
  `tb_ring_oscillator` each compare their block against values computed independently in the
  testbench.
- **`tb_tdc_top`.** The whole DSWU TDC at default parameters, about 2.5 minutes. It runs three
  code-density tests on one build:
  - 10,000 hits with an identity table;
  - 5,000 hits with the compensation table derived from the first run;
  - 5,000 hits with the binning table.

  It compares the full histogram with its own count, checks that the timestamps are linear in the
  true hit time, and checks that every mechanism (both WU edges, sum taps, compensation and void
  factors, binning, clear, deferred readout, ring oscillator) occurred. Typical output: fine codes
  120 to 1742 (1622 codes per 2 ns), 1.233 ps per code, residual 1.0 ps rms against the hit time.
- **`tb_tdc_variants`.** The WU TDC (`DS=0`: 2.47 ps per code, codes 60 to 870) and the DS TDC
  (`WU=0`: 2.40 ps per code) on the same hits.

With a few thousand hits spread over ~1600 codes, the simulated DNL figures are dominated by count
noise. They are printed but not judged. Linearity as such can only be judged with far longer runs.
