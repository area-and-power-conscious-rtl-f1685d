# WCDMA downlink rake receiver (4 fingers)

This is a synthesizable rake receiver for the WCDMA (UMTS FDD) downlink. It
turns a stream of 6-bit I/Q ADC samples into despread, phase-corrected DPCH
data symbols. Four *fingers* each lock onto one propagation path of the same
cell signal. Each finger:

- despreads the data channel (DPCH) and the pilot channel (CPICH);
- estimates the path's phase, frequency offset and power from the pilot;
- removes that phase and frequency offset from the data symbols;
- tracks the path's timing to 1/8 chip.

A *deskew-combiner* then lines up the symbol streams of all fingers, which
arrive at different times because the paths have different delays. It adds
them (maximal-ratio combining) and writes one combined symbol per DPCH
symbol into a two-bank symbol SRAM. An upper layer (channel decoder, DSP)
reads that SRAM.

The design's main goal is small area and low power. It uses:

- narrow, truncated datapaths (9-bit despread symbols, 15-bit compensated
  symbols);
- shifts instead of multipliers wherever a coefficient is a power of two;
- a combiner that deskews with a small 8-entry register block per frame
  instead of one large FIFO per finger.

Everything runs on one clock, CHIPX8 (8 × 3.84 MHz = 30.72 MHz). The chip
rate appears only as a one-cycle enable, CHIPX1.

## Signal conventions

| item | value |
|---|---|
| frame | 10 ms = 38 400 chips = 307 200 CHIPX8 cycles |
| ADC sample | 6-bit two's complement, I and Q (`sample_t`) |
| code bits | 0 = +1, 1 = −1 (OVSF and scrambling) |
| DPCH spreading factor | 4 … 512, a power of two, 10-bit binary (`SF_W`) |
| CPICH | SF 256, OVSF code C(256,0), pilot symbol 1 + j |
| time offsets | in 1/8 chip, 0 … 307 199 (19 bits) |
| resets | active low, asynchronous |

Shared types and widths are in `rtl/rake_pkg.sv`:

| type | contents |
|---|---|
| `sym_t` | 9-bit I/Q |
| `comp_sym_t` | 15-bit I/Q |
| `comb_sym_t` | 17-bit I/Q |
| `eol_t` | early, on-time and late samples |
| `lead_lag_e` | NONE, LEAD or LAG |

## Block structure

```
ADC ─► input_buffer ─► early/on-time/late ─┬─► finger 0 ─► data_load ─┐
                                           ├─► finger 1 ─► data_load ─┤
                                           ├─► finger 2 ─► data_load ─┼─► deskew_combiner ─► sym_sram ─► upper layer
                                           └─► finger 3 ─► data_load ─┘

finger = clk_gen ─► ctrl_gen
         ovsf_gen ×2, scrambling_gen ×2 (DPCH, CPICH)
         demod ×4 (DPCH on-time; CPICH early, on-time, late)
         mv_avg ─► cf_est ─► comp (DPCH symbols)
                └► freq_est, pow_est ─► finger_decision
         time_trk (early/late CPICH) ─► clk_gen
```

| file | role |
|---|---|
| `rake_receiver.sv` | top: the input buffer, `N_FINGERS` fingers, the deskew-combiner with one `data_load` per finger, and the symbol SRAM |
| `input_buffer.sv` | 3-stage shift register per rail; gives the early, on-time and late samples, 1/8 chip apart |
| `finger.sv` | one finger (listed in the sections below) |
| `clk_gen.sv` | frame counter, frame-start calculation, CHIPX1 generation, finger reset |
| `ctrl_gen.sv` | symbol strobes and start enables |
| `ovsf_gen.sv`, `scrambling_gen.sv` | code generators |
| `demod.sv` | despreader with 9-bit output |
| `mv_avg.sv` | 4-symbol moving average of the pilot |
| `cf_est.sv` | channel/frequency estimate |
| `comp.sv` | complex compensation of the DPCH symbols |
| `freq_est.sv` | per-frame frequency-offset sums for the DSP |
| `pow_est.sv` | per-symbol magnitude and per-frame power |
| `time_trk.sv` | early/late tracking loop |
| `finger_decision.sv` | on/off hysteresis |
| `data_load.sv` | per-finger hand-over stage that numbers the symbols |
| `deskew_combiner.sv` | register blocks, dump modes, SRAM writer |
| `sym_sram.sv` | two banks of 9600 words of 2 × 17 bits |

Each file starts with a comment giving its interface, its cycle timing, and
which parts are specific to this implementation.

## Frame timing: clock generator and chip enable

This is the hardest part to follow, and everything else hangs off it.

**Finding the frame start.** A free-running counter `F_CNT` counts CHIPX8
cycles from each falling edge of `SYNC_10M`, the 10 ms sync. Fifteen cycles
before the next sync is expected (`F_CNT` = 307 185), the clock generator
does four things:

1. It asks the time tracker for its verdict (`TIME_REQ`).
2. It loads the cell searcher's offset `TIMEOFF_SC`.
3. It computes the new frame offset D:
   - If `TIMEOFF_SC` has changed, D is the new value.
   - Otherwise D is the previous offset, moved by −1 for LEAD or +1 for LAG.
   - If D falls outside the frame, `TIMEOFF_FAIL` pulses. D then becomes
     either `TIMEOFF_SC` or the old value, depending on
     `TIMEOFF_FAIL_RECOVER`.
4. It counts D out.

**The first CHIPX1 of a frame** fires 8 cycles before the frame's first data
chip, at `F_CNT` = 307 192 + D (mod 307 200). At the same time
`FRAME_EDGE_CODE` reloads the code generators. That pulse has two roles:

- It is the code-initialisation chip of the new frame.
- It is also the *last data chip of the ending frame*. The despreaders use
  it with the old codes to close the frame's last symbol.

So every frame has exactly 38 400 data chips. After 38 399 counted chips the
chip counter goes to HOLD and waits for the next frame start.

**How tracking moves a frame.** A LEAD or LAG moves that single shared chip
by one CHIPX8 cycle. The whole next frame then shifts by 1/8 chip.

**Reset and start.** When `START_USER & FINGER_LOCK` rises, the finger is
reset for one cycle (`RESET_SYS`). It then starts with the next frame.

**Control generator.** `ctrl_gen` counts data chips and produces:

| strobe | when |
|---|---|
| `CLK_SYM` (DPCH), `CLK_SYM_PL` (CPICH) | one cycle after the last chip of each symbol, when the despreader output is new |
| `CHIPX_PL` | one cycle later, when the moving average has updated; it loads the pilot estimators |
| `START_COMP`, `START_AVG` | raised at the first data chip of a frame |

A new DPCH spreading factor is taken at the frame edge and is used from the
first data chip of the next frame.

## Despreading

`demod` multiplies each sample by the conjugate scrambling code and the OVSF
code, and sums over SF chips. The full sum has 7 + log2(SF) bits: 9 bits at
SF 4, 15 at SF 256, 16 at SF 512. It is cut to its top 9 bits. The one value
that would overflow (all samples −32) saturates.

A finger has four despreaders:

- DPCH on-time;
- CPICH early, on-time and late.

The code generators work as follows:

- **Scrambling codes:** two 18-bit LFSRs, x^18 + x^7 + 1 and
  y^18 + y^10 + y^7 + y^5 + 1. The I chip is x0 ⊕ y0. The Q chip uses the
  taps of the 131 072-chip shifted sequence. The generator restarts every
  frame from a seed input, which is the code number's x state.
- **OVSF codes:** `ovsf_gen` builds the tree code directly. Chip n of
  C(SF,k) is the parity of (k bit-reversed over log2(SF) bits) AND n.

## Pilot-based estimation and compensation

The on-time pilot symbols feed a chain of estimators:

1. **`mv_avg`** averages the last 4 pilot symbols: an 11-bit sum, then a
   right shift by 2.
2. **`cf_est`** forms the channel/frequency estimate from the average. The
   transmitted pilot is 1 + j, so cos = I + Q and −sin = I − Q. These are
   10 bits, cut to 9.
3. **`comp`** multiplies each DPCH symbol by the conjugate estimate. This
   removes phase and frequency offset and weights the symbol by path
   amplitude, which is what maximal-ratio combining needs. The 19-bit
   products are cut to 15 bits, and `DATA_AV` strobes each result. The
   first symbols of the very first frame, before any estimate exists, leave
   uncompensated.

Three more blocks run alongside:

- **`freq_est`** multiplies each averaged pilot by the conjugate of the
  previous one. It sums the real and imaginary parts over the 150 pilot
  symbols of a frame into 27-bit totals, which are handed to the DSP once
  per frame with `FREQ_EST_AV`.
- **`pow_est`** approximates each averaged pilot's magnitude as
  max(|I|,|Q|) + min(|I|,|Q|)/2 (`MAG`, 10 bits), and sums it per frame
  (`POWER`, 18 bits).
- **`finger_decision`** switches the finger off as soon as `MAG` < `OFF_TH`.
  It switches the finger on again only after `MAG` > `ON_TH`, and then only
  at a frame edge, so a finger never joins in the middle of a frame.

## Time tracking

`time_trk` estimates the early and the late pilot magnitudes in the same way
as `pow_est`. Their difference e = |early| − |late| drives a second-order
loop filter:

- a proportional path, K1 = 2^-2;
- an integral path, K2 = 2^-13.

Both coefficients are shifts. The arithmetic carries 13 extra fraction bits,
and the integrator saturates. The filter output is summed over a frame. At
`TIME_REQ` the sum is compared with `TIME_TRK_TH`:

| sum | verdict |
|---|---|
| above +TH | LEAD (sample 1/8 chip earlier) |
| below −TH | LAG |
| otherwise | NONE |

A stronger early sample means the chip peak lies before the on-time sample.
This direction keeps the loop stable with the buffer order, where the newest
sample is "late".

## Deskew and combining

**Numbering the symbols.** Each finger's `data_load` numbers its symbols
1 … 38400/SF within the frame. It holds each symbol until the combiner
accepts it (`DESK_DATA_AV` / `COMB_DONE`). At symbol 1 of a frame, or when
SF changes, it takes the current target register block from the combiner
(`MAIN_BLK_FLAG`). A finger that has just switched on starts handing over
symbols at the next symbol 1, so only whole frames reach the combiner.

**Accepting symbols.** `deskew_combiner` accepts one symbol per cycle,
lowest finger number first. There are two register blocks, EVEN and ODD, one
per frame. Each has:

- 8 entries of I/Q sums;
- a 3-bit tag per entry (the symbol number's LSBs);
- the next expected symbol number (`REG_SYM_CNT`, starts at 1).

**Deskewing and adding happen in one step:**

- A symbol numbered at or beyond `REG_SYM_CNT` comes from the leading
  finger. The block shifts, and the symbol becomes entry 0.
- Any other symbol is added to the entry with the matching tag.

So the block holds at most 8 symbols of skew between the earliest and the
latest finger. That is 32 chips at SF 4 and more at larger SF. A finger that
lags by more than that loses its symbols.

**Dump modes.** The oldest entry (entry 7) goes to the SRAM once all
fingers have had time to add to it.

| mode | what happens |
|---|---|
| NORMAL | one block is in use; entry 7 is written when its tag is the next one due |
| NORMAL_FAST | the first symbol of the next frame has reached the other block; both blocks are in use and the old one keeps dumping entry 7 |
| FAST | the new block already holds 6 symbols; the old block is closed and flushed one entry per access, then cleared, and the SRAM bank flips |

**SRAM writes.** An access takes four CHIPX8 cycles:
SEND_DATA (write enable low) → WRITE_DONE → WRITE_COMPLETE, or
CHANGE_SRAM_ADDR to flip the bank → INITIAL.

The SRAM address is 1 bank bit plus 14 bits, because a frame holds up to
9600 symbols at SF 4. The two banks let the upper layer read one frame while
the next is written.

## Top-level interface (`rake_receiver`)

**Inputs:**

- `clk` (CHIPX8), `rst_n`, `adc` (I/Q);
- `sync_10m`, `start_user`, `timeoff_fail_recover`;
- per finger: `finger_lock[N]`, `timeoff_sc[N]`;
- channel setup: `sf_ref`, `dpch_code_k`, and the DPCH and CPICH scrambling
  seeds `x_seed_d` and `x_seed_p`;
- thresholds: `time_trk_th`, `off_th`, `on_th`;
- SRAM read port: `rd_bank`, `rd_addr`.

**Outputs:**

- per finger: `finger_on`, `timeoff_fail`, frequency sums with
  `freq_est_av`, `power` with `power_av`, `mag`, `lead_lag`, `chipx1_hold`,
  `f_cnt`;
- `dump_mode`;
- an SRAM write monitor: `sym_wr`, `sym_wr_bank`, `sym_wr_addr`,
  `sym_wr_data`;
- SRAM read data: `rd_data`, one cycle after the address.

The cell searcher, the DSP, the interrupt logic and the upper-layer
interface are outside this design. Their signals are the ports above.

**Parameters:**

| parameter | default |
|---|---|
| `N_FINGERS` | 4 |
| `CHIPS_PER_FRAME` | 38400 |
| `OSR` | 8 |
| `BANK_WORDS` | 9600 |

Smaller `CHIPS_PER_FRAME` values are used in some unit tests to shorten
frames.

## Where this implementation makes its own choices

These points are either not fixed by the underlying design description, or
this implementation resolves them in a particular way:

- **Time-tracker direction.** The tracker advances sampling when early power
  exceeds late power, which is a positive accumulator. One description of
  the rule says the opposite. The chosen direction is the one that
  converges with this input buffer's sample order; the end-to-end test
  checks that it does.
- **Frame-edge chip.** The frame-edge CHIPX1 doubles as the last data chip
  of the ending frame. This keeps exactly 38 400 chips per frame.
- **New-symbol rule.** The combiner treats a symbol as new when its number
  is *at or above* the expected number, not only when it is equal. A
  finger's first symbol after an SF change therefore cannot stall a block.
- **End of a FAST flush.** A FAST flush writes every remaining entry down
  to entry 0 before the block is cleared, so the last symbol of a frame is
  never lost.
- **Switch-on timing.** Fingers that switch on wait for the next symbol 1.
  Symbols are numbered even while a finger is off.
- **Spreading-factor width.** The spreading factor is a plain 10-bit
  binary number everywhere (`SF_W`), because 512 does not fit in 8 bits.
- **Unspecified details chosen here:**
  - K1 = 2^-2, one of the tabulated loop-bandwidth choices;
  - which bits are kept by every truncation (always the MSBs);
  - the 17-bit combiner width;
  - a single clock with enables instead of a divided chip clock;
  - one scrambling seed input per channel.
- **Truncation warnings.** Dropped LSBs in `cf_est` and `comp` show up as
  unused-bit lint warnings. They are intentional.
- **Not built:** the upper-layer interface unit, the deskewer reset
  generator, the cell searcher and the DSP. They are outside the receiver's
  logic, or their function is not specified.

## Verification

Every block has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each compares the block against an independent model and ends with
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| input_buffer, mv_avg, cf_est, comp, pow_est, freq_est | arithmetic against reference formulas on random data |
| demod | despreading at SF 4, 16, 256 and 512 |
| ovsf_gen | against a tree model |
| scrambling_gen | against a direct recurrence model |
| time_trk | against an integer model of the loop filter |
| ctrl_gen | strobe positions for several spreading factors |
| clk_gen | runs at full frame size: frame-start positions for new offsets, LEAD, LAG, `TIMEOFF_FAIL` with and without recovery, and the 38 400 chips per frame |
| data_load | numbering and hand-over, on short frames |
| deskew_combiner | four data_loads with skewed fingers, an SF change and a finger switched off, on short frames; the SRAM contents are compared with the exact sums |
| finger | full size: a two-path channel with phase rotation, SF 32; bit errors on compensated symbols, tracking and power reports |
| rake_receiver | end to end at full default size (see below) |
| rake_sf_range | the same end-to-end harness at SF 4 (9600 symbols per frame, a full SRAM bank) and at SF 512, run side by side |

**End-to-end test** (`tb/tb_rake_receiver.sv`). The top runs with every
parameter at its default. The test generates the transmit signal itself:

- DPCH at SF 16 and CPICH, with real scrambling and OVSF codes;
- a 4-path channel with different delays and phases;
- one path that disappears for a frame.

It runs 7 frames, reads the SRAM and checks the hard decisions of the
combined symbols against the transmitted data, with a symbol-error limit of
0.5 %. It also counts the mechanisms and fails if any never occurs:

- NORMAL_FAST and FAST dump modes;
- chip-counter HOLD;
- LEAD and LAG;
- `TIMEOFF_FAIL`;
- finger off and finger on;
- bank flips.

It takes under a minute to build and about 5 s to run. Typical result:
about 12 000 symbols with 1 error.

The stimulus and checks live in `tb/rake_e2e.sv`, a harness parameterized
by spreading factor, code, frame count and error limit.
`tb_rake_sf_range` uses the same harness at the ends of the SF range:

| SF | result | limit |
|---|---|---|
| 512 | 0 errors in 368 symbols | 0.5 % |
| 4 | about 6 % symbol errors | 10 % |

At SF 4 the four equal-strength paths interfere with little spreading gain,
so errors are expected. They are spread evenly over the frame, and they
double in the frame where a returning path's finger is still off.

**Running a testbench** with Verilator 5 (here for the top):

```
verilator --binary --timing -Wno-fatal --top-module tb_rake_receiver \
    -Irtl -y rtl rtl/rake_pkg.sv tb/tb_rake_receiver.sv --Mdir obj -o sim
./obj/sim
```

Replace the top module and testbench file for any other block.
