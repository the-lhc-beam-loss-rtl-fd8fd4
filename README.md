# BLMTC: real-time loss analysis for the LHC beam loss monitors

This is the data-analysis logic of one surface card of a beam loss
monitoring system. Ionisation chambers along the accelerator measure beam
losses. Tunnel electronics digitise each chamber's current every 40 µs and
send the readings to the surface over two redundant optical links. One
surface card serves two tunnel cards, so 16 chambers. For every chamber it
must decide, every 40 µs, whether the losses over any time scale from 40 µs
to about 84 s are above the limit for the present beam energy. If they are,
it requests a beam dump.

Two ideas make this fit in one mid-size FPGA:

* **Successive running sums.** Keeping 84 s of 40 µs samples would take
  about two million values per chamber. Instead, five short shift registers
  are chained. Each later register stores, at a lower rate, sums already
  formed by the one before it. Twelve sums per chamber cost 400 stored
  values.
* **Redundant links checked by their CRCs.** Each tunnel frame arrives
  twice. The CRC of each copy shows whether that copy is intact. Comparing
  the two CRC fields shows whether the copies agree. One decision table
  turns these results into "use the primary", "use the redundant" or
  "dump".

## Data path

```
 primary A ─┐                                      ┌─ unmaskable
 redundant A┴ blm_rcc ─ 8 x blm_data_combining ─ 8 x blm_successive_running_sums ─┐
 primary B ─┐                                                                      ├ blm_tc ─┤
 redundant B┴ blm_rcc ─ 8 x blm_data_combining ─ 8 x blm_successive_running_sums ─┘         └─ maskable
                │                                                      beam energy ─┘ (tables)
                └── blm_error_report ── flags, counters, live error signals
```

| module | role |
|---|---|
| `blmtc_top` | the whole card: 2 link checkers, 16 combiners, 16 running-sum units, comparator, error report |
| `blm_rcc` | pairs, decodes and checks the two frames of a tunnel card, selects one, splits it into 8 channels |
| `blm_8b10b_decoder` | 8b/10b decoding of a 32-symbol frame, with code and disparity errors |
| `blm_crc_check` | recomputes a frame's CRC and compares it with the received CRC |
| `blm_signal_select` | the decision table |
| `blm_data_combining` | counter + ADC difference → one 20-bit loss value |
| `blm_successive_running_sums` | RS0..RS11 of one channel |
| `blm_running_sum_stage` | one multi-tap shift register with its sums (helper) |
| `blm_threshold_table` | thresholds and warning levels per energy level, channel and sum |
| `blm_tc` | scans all 192 sums against the table after each new sample |
| `blm_masking` | holds the requests and sorts them into maskable and unmaskable |
| `blm_error_report` | sticky flags and counters of all link errors |
| `blm_pkg` | sizes, frame layout, types, CRC function |

## The link frame

Each tunnel card sends 32 bytes every 40 µs. They are 8b/10b coded into 320
bits. The byte layout is this design's own definition; it is in `blm_pkg`:

| bytes | content |
|---|---|
| 0–1 | frame number (not checked) |
| 2–9 | 8-bit counter of channels 0..7 |
| 10–21 | 12-bit ADC value of channels 0..7, packed MSB first |
| 22–23 | tunnel card status; any set bit is an error |
| 24–27 | card identifier (not checked) |
| 28–31 | CRC-32 over bytes 0–27 |

The CRC uses polynomial 0x04C11DB7, starts at all ones, runs MSB first, has
no reflection and no final inversion (CRC-32/MPEG-2). Each frame is taken
to start at negative running disparity. Frames are delivered already
deserialised and aligned, one 320-bit word with a one-cycle valid strobe
per link.

## Link checking (`blm_rcc`)

The first frame of a pair opens a window of `TIMEOUT` cycles (256 by
default). The pair is processed when both frames are in, or when the window
closes. Both frames are decoded and CRC-checked. A missing frame, or one
with an 8b/10b error, counts as a failed CRC. Then the signal selection
applies this table:

| row | CRC A | CRC B | CRC fields equal | result |
|---|---|---|---|---|
| 1 | error | error | no | dump |
| 2 | error | error | yes | dump |
| 3 | error | ok | no | B (A damaged in its CRC part) |
| 4 | error | ok | yes | B (A damaged in its data part) |
| 5 | ok | error | no | A |
| 6 | ok | error | yes | A |
| 7 | ok | ok | no | dump: both pass their CRC yet differ, so a tunnel counter is wrong |
| 8 | ok | ok | yes | A |

If a frame is missing, the comparison counts as failed, so a lost primary
gives row 3. The status word of the chosen frame is checked. Then the
frame number, card identifier and CRC are dropped, and the eight counter
and ADC values go out. `out_valid_o` comes 2 cycles after the pair is
complete.

A "dump" result produces no sample: the running sums of that card's
channels skip this 40 µs. It also sets a held link-failure flag, which
drives the unmaskable output.

## Combining counter and ADC (`blm_data_combining`)

The tunnel card measures the chamber current with a current-to-frequency
converter. The **counter** gives the number of integrator resets in the
last 40 µs. The **ADC** gives the integrator voltage at readout, which is
the part of a count that is still inside the integrator. The change of
that voltage between two readouts belongs to the last 40 µs:

    data = counter · 4096 + (adc_now − adc_previous)

One count equals 4096 ADC steps: the counter is shifted up by 12 bits. The
difference is signed and formed with 13 bits, so no pair of readings can
wrap. Negative results, which come from ADC noise at zero counts, are
clamped to 0. The output is therefore an unsigned 20-bit value, and the
largest possible result, 255·4096 + 4095, is exactly 2^20 − 1. The first
sample after reset takes a difference of 0. The result is ready one cycle
after the input.

## Successive running sums (`blm_successive_running_sums`)

A running sum over the last L samples is kept without re-adding:

    S ← S + x_new − x_(new−L)

`x_(new−L)` is read from a shift register. One register can feed several
sums through several taps. Here each register is a circular buffer with
one read port per tap.

Longer time scales come from feeding a later stage with the sums of an
earlier one, at a reduced rate. Stage SR2, for example, stores RS1 (the
sum of 2 samples), but only every second sample. So 32 of its entries
cover 64 samples, and 128 cover 256 samples. In units of 40 µs:

| sum | window | refresh | shift register | fed by | tap |
|---|---|---|---|---|---|
| RS0 | 1 | 1 | SR1 (16 × 20 bit) | samples | 1 |
| RS1 | 2 | 1 | SR1 | | 2 |
| RS2 | 8 | 1 | SR1 | | 8 |
| RS3 | 16 | 1 | SR1 | | 16 |
| RS4 | 64 | 2 | SR2 (128 × 21 bit) | RS1, every 2 samples | 32 |
| RS5 | 256 | 2 | SR2 | | 128 |
| RS6 | 2048 | 64 | SR3 (128 × 26 bit) | RS4, every 64 samples | 32 |
| RS7 | 8192 | 64 | SR3 | | 128 |
| RS8 | 32768 | 2048 | SR4 (64 × 31 bit) | RS6, every 2048 samples | 16 |
| RS9 | 131072 | 2048 | SR4 | | 64 |
| RS10 | 524288 | 32768 | SR5 (64 × 35 bit) | RS8, every 32768 samples | 16 |
| RS11 | 2097152 | 32768 | SR5 | | 64 |

The windows run from 40 µs (RS0) to 83.9 s (RS11). The sums are exact. A
sum refreshed every P samples covers the W samples that end at the last
multiple of P since reset. The long sums therefore lag the present by up to
P − 1 samples, which is 1.31 s for RS10 and RS11. The stored values take
10,560 bits per channel.

Points that are easy to get wrong:

* **Decimation phase.** Each stage counts the strobes it receives and takes
  every DECIM-th one (2, 32, 32 and 16 for SR2..SR5). SR2 therefore stores
  RS1 at samples 2, 4, 6, …, which are non-overlapping pairs. SR3 stores
  RS4 at samples 64, 128, …, and so on.
* **Empty history.** The buffers are never cleared. Each stage instead
  counts how many values it holds; a tap that reaches back further than
  that reads 0.
* **Widths.** Internally each sum has 20 + log2(window) bits (up to 41).
  At the output every sum is clamped to 32 bits, the width of the
  comparators.
* **Timing.** A sample moves through one stage per cycle. `rs_o` and
  `done_o` follow `valid_i` by 6 cycles. A new sample may arrive every
  cycle.

## Threshold comparator (`blm_tc`, `blm_threshold_table`, `blm_masking`)

The threshold table has 32 beam-energy levels. Each level holds a
threshold and a warning level for each of the 16 × 12 sums: 6144 entries
per table, 32 bits each. The entry address is
`(level · 16 + channel) · 12 + sum`. The tables are not reset. They must be
loaded through the write port before use; where the data come from
(non-volatile memory, front panel or VME host) is decided outside.

After every new set of sums, the comparator samples the 5-bit beam energy.
It then scans all 192 sums, one per cycle, through one shared comparator.
The scan takes 193 cycles. A start that arrives during a scan is served
right after it. A sum strictly greater than its threshold sets that
channel's dump request. A sum greater than its warning level sets the
channel's warning.

The masking table has one bit per channel (1 = maskable) and resets to
"all unmaskable". Requests, warnings and the link-failure flag stay set
until `clear_i`. The outputs, both active high, are:

* `unmaskable_o` = any request of an unmaskable channel, or a link failure
* `maskable_o` = any request of a maskable channel

They follow the comparison by two cycles.

## Error reporting (`blm_error_report`)

Each processed frame pair gives nine flags per tunnel card (`rcc_err_t`):

* missing frame (A, B)
* 8b/10b error (A, B)
* CRC error (A, B)
* CRC mismatch
* selection outside row 8
* tunnel status error

`live_o` holds the flags of the last pair, for front-panel signals. A
sticky copy and a 16-bit saturating counter per flag can be read through
`rd_addr_i = {card, sel, kind}`:

* `sel = 0` reads the sticky word.
* `sel = 1` reads the counter of bit `kind`.

Read data appear one cycle after the address. `clear_i` clears flags,
counters and held dump requests together.

## Top-level interface (`blmtc_top`)

Inputs:

* `pri_valid_i`/`pri_frame_i` and `red_valid_i`/`red_frame_i`, per tunnel
  card
* `energy_i`
* the table load port: `tbl_we_i`, `tbl_wsel_i` (0 = threshold,
  1 = warning), `tbl_level_i`, `tbl_ch_i`, `tbl_rs_i`, `tbl_data_i`
* `mask_we_i`/`mask_i`
* `clear_i`

Outputs:

* the two dump outputs
* per-channel requests and warnings
* the held link failure
* the error report
* all running sums with a per-channel update strobe (`rs_o`, `rs_done_o`),
  for logging to external memory

The only parameter is `LINK_TIMEOUT`. Sizes are in `blm_pkg`.

From the second frame of a pair: the sample reaches the running sums after
3 cycles, the sums are final 6 cycles later, and the comparator scan then
takes 193 cycles. About 210 cycles are used per 40 µs. At an assumed
40 MHz clock, 40 µs is 1600 cycles.

## Resources

After coarse synthesis, the top has:

* about 29,500 word-level cells
* 16,559 flip-flop bits
* 562,176 memory bits: 16 × 10,560 for the running sums, and 2 × 196,608
  for the threshold and warning tables

That is about 69 KB of memory. The intended FPGA has 400 KB.

The two 8b/10b decoders and the CRC trees are fully parallel. They are the
largest logic; one frame per 40 µs would also allow a serial version.

## What is this design's own choice

These parts follow the system description:

* the structure (link checker, combiner, running sums, comparator with
  tables and masking, error report)
* the decision table
* the counter/ADC combination
* the windows and refresh periods of the running sums
* the 32 energy levels with thresholds and warnings
* 16 channels, a 320-bit coded frame with a 4-byte CRC, 32-bit sums

These were chosen here, and are worth checking before use:

* the frame byte layout and the CRC polynomial
* the frame start disparity
* pairing with a timeout
* treating missing or mis-coded frames as CRC errors
* the clamp at zero and the 13-bit ADC difference
* clamping the sums to 32 bits
* the time-shared comparator
* latched, active-high requests
* the reset state of the mask
* link failure as unmaskable
* the error counters and register map

Departures:

* There are twelve sums per channel (RS0..RS11), 192 per card. Some views
  of the system count eleven.
* The masking table covers all 16 channels, not 8.
* Only the two dump outputs are built. The physical card has three dump
  lines towards the combiner card.
* The optical receivers, the VME interface, the non-volatile table memory
  and the external SRAMs are not included. Their connections are ports.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`. `tb/blm_tb_pkg.sv` holds the
reference models:

* an 8b/10b encoder with both disparity columns written out
* a byte-wise CRC
* a frame builder

For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/blm_pkg.sv tb/blm_tb_pkg.sv \
    tb/tb_blmtc_top.sv --top-module tb_blmtc_top -Wno-fatal
./obj_dir/Vtb_blmtc_top
```

`tb_blmtc_top` runs the whole card at its default sizes for 220
acquisitions. It checks all 192 sums, all dump and warning flags and both
outputs against a reference model after every acquisition. Along the way
it triggers and counts:

* primary and redundant selection
* a missing primary
* an 8b/10b error
* a status error
* links that disagree
* a double link failure
* clamped negative data
* a warning
* an unmaskable and a maskable crossing
* a loss that is harmless at low beam energy but dumps at high energy
* an error-counter read

`tb_blm_successive_running_sums` feeds 2^21 + 70,000 samples, enough to
fill and roll over even the 84 s window. It compares all twelve sums with
sums computed from a prefix-sum array, including the 32-bit clamp. Both
run in a few seconds.
