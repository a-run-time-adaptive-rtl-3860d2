# Run-time adaptive DVB demultiplexer with switchable redundancy

A satellite's on-board processor receives a wide band that holds many DVB
carriers of different symbol rates. The demultiplexer (DEMUX) splits the band
into five sub-bands and then into single carriers, which it delivers to five
demodulator-decoders (DEMDECs). On an SRAM FPGA in orbit, radiation flips
configuration bits. This design lets the sub-band branches be rebuilt at run
time by partial reconfiguration. That gives two knobs:

* **Performance.** Each sub-band branch holds only the filter stages needed
  for the carrier rate demanded from it now: 8, 4, 2, 1 or 0.5 MHz.
* **Fault tolerance.** The same sub-band can be placed in two or three of the
  four reconfiguration zones, forming a duplex or TMR structure.
  - The other sub-bands are dropped to make room.
  - A voter finds the faulty replica.
  - The zone is rewritten, which removes the upset.
  - Instead of the hardware voter, the zone outputs can be captured, read back
    and compared by software.

The RTL models the whole datapath and its control. It is SystemVerilog-2017,
synthesizable, and simulates with plain Verilator. Partial reconfiguration
is modelled behaviourally (see *Reconfiguration model*).

## Signal path

```
ADC 10 bit ─► STR10 ─┬─ bin 1..4 (SB1..SB4) ─► zone selector ─► zone 1..4 ─► selector/voter ─┐
                     └─ bin 5   (SB5) ─► static branch ──────────────────────────────────────┤
                                                                                 output_if ◄─┘
                                                                   5 × 19-bit words to the DEMDECs
```

* **`str10`: 10-bin polyphase filter bank, decimation by 5.** This is the
  static front end. It turns the real ADC stream into ten complex bins at one
  fifth of the sample rate. Bins 1..4 are the four 24Rs-wide sub-bands
  (Rs = symbol rate unit). The upper half of bin 5 carries the half-width
  fifth sub-band (SB5).
* **SB5 branch.** This is a fixed copy of the zone branch (described below)
  in the static part. It keeps the upper half of its carriers: 1, 2, 4 or 8
  carriers of 4, 2, 1 or 0.5 MHz, chosen by CONFIG bits 14:12. It cannot be
  replicated. Changing its rate clears it for one clock.
* **`rzone`: one reconfiguration zone.** It holds the branch that splits one
  sub-band into carriers.
* **`output_if`: output interface.** It sends each sub-band's carriers one
  after another to its DEMDEC. It sends one word every `OUT_DIV` = 5 input
  clocks. A word is 19 bits: a valid bit, then the top 9 bits of I, then the
  top 9 bits of Q.

### The polyphase filter banks (`pfb_core`)

`str10` and `str4` are thin wrappers around `pfb_core`. It is a
weighted-overlap-add polyphase DFT filter bank with `NBINS` bins and
decimation by `DECIM`.

* Each input stream has a delay line of `NBINS*TAPS` samples.
* Every `DECIM`-th sample of a stream triggers one output frame, in three
  steps:
  1. The delay line is multiplied by a low-pass prototype.
  2. It is folded into `NBINS` polyphase sums.
  3. The sums are DFT'd in a single clock.
* The frame appears two clocks after the sample that completed it.
* The prototype is a Hann-windowed sinc with its cut-off at half a bin
  spacing, in Q15 format.
* The twiddles are in Q14 format.
* Both coefficient tables are computed at elaboration by package functions,
  so changing `TAPS` or the bin count needs no tables.
* The core is time-multiplexed. One instance serves `NSTREAMS` independent
  streams, each with its own delay line and decimation counter.

Arithmetic:
* Samples are 16+16-bit complex.
* The ADC word enters as `adc_data << 6`.
* Products are truncated after each fixed-point stage.
* Results are saturated to 16 bits.

## Inside a zone: the carrier tree

A zone's configuration decides how many 4-bin STR4 stages it chains:

| cfg code | partial configuration | stages | carriers | carrier spacing |
|---|---|---|---|---|
| 1 `CFG_8M`  | cover | 0 | 1  | the sub-band itself |
| 2 `CFG_4M`  | PBS1  | 1 | 2  | 12Rs |
| 3 `CFG_2M`  | PBS2  | 2 | 4  | 6Rs |
| 4 `CFG_1M`  | PBS3  | 3 | 8  | 3Rs |
| 5 `CFG_05M` | PBS4  | 4 | 16 | 1.5Rs |
| 0 `CFG_EMPTY` | none | – | 0 | – |

How the stages connect:
* Stage *s* serves 2^(s-1) streams with one shared engine.
* From every stream it keeps two bins:
  - bin 3 is the lower half of the stream's band;
  - bin 1 is the upper half.
* These become two streams of the next stage. A small `pair_fifo` queues the
  pair, because the next stage takes one sample per clock.
* Bins 0 and 2 fall on the transition bands and are dropped.
* Stages the configuration does not use receive nothing. This stands for the
  logic a partial bitstream leaves out.

Output bundle:
* A zone's output is a bundle `carriers_t {valid, count, c[16]}`.
* The carriers are in ascending frequency.
* The bundle is emitted when the last stage has produced all its streams for
  one time index.

## Placement and redundancy: the SBO register and the selector

The SBO (sub-band order) register has a 3-bit field per zone. Each field holds
0 (empty) or the number 1..4 of the sub-band the zone runs. `zone_selector`
uses it in both directions:

* **Input side.** Every zone whose field names SB*j* gets SB*j*'s STR10
  stream.
* **Output side.** For each sub-band it picks the first zone that holds it,
  or the second one if the SBO *spare bit* is set.

Any mapping is allowed. Examples:

* `2,3,1,4`: every sub-band once, in permuted zones.
* `3,3,2,3`: SB3 in TMR and SB2 single. SB1 and SB4 are dropped; their
  DEMDEC channels then carry only zeros.
* `3,3,2,0`: SB3 in duplex.

This trade (fewer sub-bands, more protection) can be made at any time by
rewriting CONFIG and SBO.

## Detecting and removing upsets

### Hardware voting (`adaptive_voter`, SBO bit 13 = 1)

For every sub-band the voter collects the zones that hold it. It takes only
zones that are in service (`zone_ok`), and at most three. It compares whole
carrier bundles.

| replicas | forwarded | flagged |
|---|---|---|
| 3 | the majority bundle | the odd zone |
| 3, all different | replica 1 | all three zones |
| 2 | replica 1 | both zones, on any mismatch |
| 1 | that zone | nothing |

A flagged zone sets its bit in the 4-bit FLAG register. The voter is a single
instance and is not triplicated.

### Repair (`reconfig_engine`)

The engine rewrites a zone in three cases:
* its demanded configuration differs from the loaded one;
* its sub-band differs from the loaded one;
* its flag bit is set, once the zone is in service (repair).

It writes one zone at a time. A rewrite follows these steps:
1. `zone_loading` goes high, which clears the zone's state.
2. It stays high for the partial configuration's write time, counted in
   clocks of `CLK_MHZ`:

   | configuration | write time |
   |---|---|
   | cover or empty | 29.52 µs |
   | PBS1 | 103.3 µs |
   | PBS2 | 191.9 µs |
   | PBS3 | 280.44 µs |
   | PBS4 | 280.44 µs |

3. It then waits for the next `sync`.
4. The zone's flag is cleared.
5. The zone stays out of service for `SETTLE_SYNCS` more sync periods while
   its filters fill.

The `sync` pulse comes every 256 STR10 frames. At that point the decimators
of all four stages are back at phase 0. A rewritten replica therefore
restarts in step with the replicas that kept running, and after settling it
produces bit-identical bundles again. Without this alignment a repaired TMR
replica would disagree forever.

### Voting by readback (`capture_regs`, SBO bit 13 = 0)

In this mode no hardware compares the replicas; software does. Each zone
has two registers:

* **Output register:** a 32-bit signature of the zone's latest bundle. The
  signature is the XOR of its carriers' `{re, im}` words, with carrier *i*
  rotated left by *i* bits, so that the same error in an even number of
  carriers does not cancel.
* **Feedback register:** the previous signature.

A `gcapture` pulse freezes both registers of every zone, as the FPGA's
capture-and-readback would. Software then reads them and applies two rules:

* Replicas with different captured outputs point to a permanent fault in
  the odd one.
* Equal outputs with one differing feedback value point to a transient
  fault.

On a fault, the processor takes two actions:
* It sets the SBO spare bit, so the output comes from the next replica.
* It writes 1 to FLAG bit 4+*z*, which sets flag *z* and starts the repair.

## Registers (`ctrl_regs`)

| addr | name | bits |
|---|---|---|
| 0 | CONFIG | `3j+2:3j`: demanded configuration of SB*j+1* (cfg codes above); `14:12`: SB5 (8 MHz counts as empty) |
| 1 | SBO | `3z+2:3z`: sub-band in zone *z* (0 = none); bit 12: spare; bit 13: voter enable |
| 2 | FLAG | bits 3:0 one per zone (write 1 = clear); writing 1 to bit 4+*z* sets bit *z* |

Reset values:
* every sub-band is empty;
* zone *z* holds SB*z+1*;
* the voter is on;
* SBO reads 0x28D1.

A hardware flag set wins over a clear in the same clock. Reads are
combinational.

## Top level (`demux_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | input clock, asynchronous active-low reset |
| `adc_valid`, `adc_data[9:0]` | in | ADC samples, signed |
| `reg_wr`, `reg_addr`, `reg_wdata`, `reg_rdata` | in/out | register port standing for the processor bus |
| `seu_inject[3:0]` | in | test input: upset in zone *z* |
| `gcapture`, `cap_out[4]`, `cap_fb[4]` | in/out | capture command and captured registers |
| `demdec_ce`, `demdec_out[5]` | out | output slot strobe; words for SB1..SB4 and SB5 (valid the clock after `demdec_ce`) |
| `flags`, `flag_events` | out | FLAG register; voter detections |
| `zone_cfg`, `zone_loading`, `zone_ok`, `reconfig_busy`, `n_reconfig`, `n_repair` | out | engine state and counters |

Parameters:

| parameter | default | meaning |
|---|---|---|
| `CLK_MHZ` | 90 | clock rate used to turn write times into clocks |
| `TAPS` | 4 | prototype taps per polyphase branch |
| `SETTLE_SYNCS` | 6 | sync periods a rewritten zone stays out of service |
| `OUT_DIV` | 5 | input clocks per output word |

## Reconfiguration model

There is no FPGA configuration port in the RTL.

* A zone's *configuration* is its `cfg` input.
* *Writing* it means holding the zone in reset for the write time.
* An *upset* is modelled by `seu_inject`. It is sticky, as a configuration
  upset is: it inverts bits 7:0 of every carrier's real part until the zone
  is rewritten.

Two parts are outside the RTL:
* Moving bitstreams from memory into the device, and relocating them. This
  is device-specific.
* The processor that decides CONFIG and SBO and runs the software voting.
  The top testbench models it through the register port.

## Where this design departs from, or adds to, its source

* **Rates.** The source states that a carrier comes out at 3·k·Rs (k = 16 … 1)
  against a 48Rs output clock. That implies decimation by 2 per stage. The
  source also states decimation by 4 in every STR4, and this design follows
  that: a stage-*s* carrier comes at 48Rs/4^s, and output slots are only
  partly used.
* **Stage count of the 2 MHz carriers.** The source's text puts them after
  the third STR4. Its carrier table and block-diagram labels give 4 carriers
  per sub-band after two stages. The table is followed.
* **Write times.** The scalable methodology builds a branch from per-stage
  bitstreams. Its shorter write times are not selectable; only the
  conventional times are used.
* **Design's own choices.** None of the following is given by the source:
  - filter prototype, tap count and number formats;
  - sub-band to bin mapping, and SB5 as the upper half of a zone branch;
  - register map;
  - signature registers;
  - sync period and settling period.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb_pfb_ref_pkg` holds
an independent model of the filter bank, both a real-valued version and a
bit-exact integer version.

| testbench | what it checks |
|---|---|
| `tb_str10` | every frame against the real-valued filter-bank formula (12 LSB tolerance), frame timing, a bin-centre tone landing in its bin |
| `tb_str4` | four interleaved streams against the real-valued formula (6 LSB), stream tags, frame timing, `clear` |
| `tb_rzone` | every configuration bit-exact against an integer model of the stage tree; upset, then rewrite |
| `tb_zone_selector`, `tb_adaptive_voter` | random SBO settings against a reference model |
| `tb_ctrl_regs` | reset values, read-back, flag set/clear priority |
| `tb_reconfig_engine` | triggers, write times in clocks, sync alignment, settling, repair count |
| `tb_capture_regs` | capture against a model; a transient fault visible in the feedback |
| `tb_output_if` | output slot period, word order and contents, nothing lost |
| `tb_demux_top` | end to end at default parameters (about 3.4 ms of device time at 90 MHz) |

`tb_demux_top` runs these phases in order:
1. A demand of 0.5, 8, 4 and 2 MHz from SB1..SB4 with sub-band order 2,3,1,4.
   - The 8 MHz words are checked against the model.
   - The carrier count per period is checked on each channel, including
     SB5 at 4 MHz.
2. A switch to TMR, with SB5 switched to 0.5 MHz. It checks:
   - the dropped sub-bands fall silent;
   - SB5 delivers 8 carriers per frame period;
   - an upset is masked and flagged;
   - the upset shows in the captured registers;
   - the zone is repaired.
3. Duplex detection and repair.
4. Readback voting: capture, software compare, spare-bit switch, repair by
   software flag.

It counts every mechanism and fails if any never occurred.

To run a testbench with Verilator:

```
verilator --binary --timing --assert rtl/demux_pkg.sv tb/tb_pfb_ref_pkg.sv \
  -y rtl -y tb tb/tb_demux_top.sv --top-module tb_demux_top -o sim
./obj_dir/sim
```

## Files

* `rtl/demux_pkg.sv`: shared types (`cplx_t`, `carriers_t`, `rate_cfg_t`),
  constants, and the coefficient functions.
* `rtl/pfb_core.sv`, `str10.sv`, `str4.sv`: filter banks.
* `rtl/pair_fifo.sv`, `rzone.sv`: zone branch.
* `rtl/zone_selector.sv`, `adaptive_voter.sv`, `capture_regs.sv`: placement
  and voting.
* `rtl/ctrl_regs.sv`, `reconfig_engine.sv`: control.
* `rtl/output_if.sv`: DEMDEC outputs.
* `rtl/demux_top.sv`: top.
* `tb/`: one testbench per block, plus the shared reference package.
