# PCIe 4.0 transmit bit width converter

A PCIe PHY receives transmit data from the MAC on a parallel interface whose
width the MAC chooses: 32, 16 or 8 bits per clock. The PHY's internal data
channel is a fixed 32 bits on its own clock, `pclk`. At PCIe 4.0 (16 Gb/s per
lane) `pclk` is 500 MHz, so the MAC clock `sys_clk` must run at 500 MHz,
1 GHz or 2 GHz for the three widths. This converter sits between the two. It
packs one, two or four MAC beats into each 32-bit word and moves the words,
with their block-start and data-valid flags, from `sys_clk` to `pclk`.

The width is chosen by `bus_width`:

| `bus_width` | MAC beat | `sys_clk` at Gen4 | beats per 32-bit word |
|---|---|---|---|
| 00 | 32 bit | 500 MHz | 1 |
| 01 | 16 bit | 1 GHz | 2 |
| 10 | 8 bit | 2 GHz | 4 |
| 11 | reserved | – | nothing is transferred |

## Structure

```
 MAC (sys_clk)                                                  internal channel (pclk)
 tx_data ──────┐   ┌──────────────────┐  hold_data   ┌──────────────────┐
 tx_datavalid ─┼──►│ bwc_width_packer │─────────────►│ bwc_pclk_capture │──► data_2ififo
 tx_startblock ┤   │  lane counter,   │  hold_flags  │  capture reg,    │──► tx_datavalid_mac
 bus_width ────┘   │  accumulator,    │─────────────►│  toggle detect,  │──► txstartblock_mac
                   │  hold register   │              │  output reg      │──► ss_mode_sync
                   └──────────────────┘              └──────────────────┘──► bus_width_pclk
 bus_width ──► bwc_sync_2ff (pclk) ──────────────────────► bus_width_sync
 sclk_rst_n ─► bwc_reset_sync (pclk) ────────────────────► prst_n
```

| file | what it is |
|---|---|
| `rtl/bit_width_converter.sv` | top level |
| `rtl/bwc_width_packer.sv` | `sys_clk` side: packing and level-extended hold register |
| `rtl/bwc_pclk_capture.sv` | `pclk` side: sampling, new-word detection, outputs |
| `rtl/bwc_sync_2ff.sv` | two-flop synchroniser for `bus_width` |
| `rtl/bwc_reset_sync.sv` | `pclk` reset from `sclk_rst_n` |
| `rtl/bwc_pkg.sv` | `bus_width_e` enum, `xflags_t` struct, `beats_per_word()` |

## Packing (sys_clk side)

A two-bit lane counter tells where the next beat goes. The first beat of a word
lands in the least significant bits. A 16-bit beat fills half 0 or half 1, and
an 8-bit beat fills byte 0 to 3. The lanes gathered so far wait in an
accumulator. The beat that fills the last lane is merged combinationally with
the accumulator, and the finished word goes straight into the **hold
register**. So a word is in the hold register right after the `sys_clk` edge
that sampled its last beat.

Three rules keep the words aligned with the 128b/130b blocks:

* **Invalid beats are skipped.** A beat with `tx_datavalid` low neither fills a
  lane nor advances the counter.
* **A block start begins a word.** A beat with `tx_startblock` high always goes
  to lane 0. If a partial word is in progress, it is dropped; that only happens
  if the MAC breaks block alignment. The start flag stays with the word until
  the word is finished.
* **A width change restarts packing** at lane 0. The reserved code packs nothing.

## Crossing to pclk: level extension

The crossing has no FIFO. It rests on one property of the clocks: `sys_clk`
runs exactly 1, 2 or 4 times as fast as `pclk`, and both come from one source
with aligned edges. Every word takes N valid beats, and N is also the number of
`sys_clk` cycles in one `pclk` period. So the hold register changes at most
once per `pclk` period. Each value is **held for at least one full `pclk`
period**, and every `pclk` edge sees each word exactly once. This is the "level
extension" of the fast-domain signals.

The `pclk` side must also tell a new word from a repeat of the old one. The
hold register carries a toggle bit for that, which flips on every new word.
`bwc_pclk_capture` samples the whole hold register into a capture register with
no logic in front of it. It then compares the captured toggle with the one from
the previous cycle:

* If the toggle changed, the word goes to `data_2ififo` with
  `tx_datavalid_mac = 1`, and `txstartblock_mac` is set from the word's flag.
* If it did not, `tx_datavalid_mac` and `txstartblock_mac` are 0 and
  `data_2ififo` keeps its value.

### How DataValid gaps reach the 32-bit channel

Each 128b/130b block adds 2 sync-header bits. The PHY interface convention is
that the MAC absorbs them by dropping `tx_datavalid` for one beat each time the
headers add up to one beat:

* 8-bit width: every 4 blocks
* 16-bit width: every 8 blocks
* 32-bit width: every 16 blocks

A skipped beat delays the next word by one `sys_clk` cycle. After four skipped
8-bit beats, or two 16-bit beats, the delays add up to one `pclk` period. In
that `pclk` cycle no new word arrives, so `tx_datavalid_mac` is low. On the
32-bit channel this happens once every 16 blocks, whatever width the MAC used.
No counter is needed for it: it follows from skipping invalid beats.

### Status outputs

* `bus_width_pclk` is the width under which the current output word was
  packed. It travels with the word.
* `ss_mode_sync` means "locked to the current width". It is high once a word
  packed under the current `bus_width` has come through. For this check,
  `bus_width` is brought to `pclk` by a two-flop synchroniser. `ss_mode_sync`
  is low in three cases:
  * after reset
  * after a width change, until the first word in the new width arrives
  * for the reserved code

## Timing

* **Latency.** Take the `sys_clk` edge that samples a word's last beat. The
  word is captured on the first `pclk` edge strictly after it, and is on the
  outputs after the next `pclk` edge. In the testbenches' terms: an output seen
  at `pclk` edge T had its last beat sampled in [T − 3P, T − 2P).
* **Throughput.** One word per `pclk` cycle, minus the DataValid gaps above.
* **Reset.** `sclk_rst_n` is active low and asynchronous. The `pclk` domain
  leaves reset two `pclk` edges after it is released.

## Parameters

`INT_W` (default 32) is the internal channel width. The MAC beats are `INT_W`,
`INT_W/2` and `INT_W/4` bits wide, and `tx_data` is `INT_W` bits wide with the
narrower beats on its low bits. `INT_W = 64` is the widened channel: at the
same line rate `pclk` drops to 250 MHz, and the MAC beats become 64, 32 and 16
bits. `INT_W` must be a multiple of 4. Block alignment needs the word to divide
the 16-byte block, so use 32 or 64.

## Limits and choices

Some behaviour is this design's own choice, not given by the converter's
original description:

* byte order
* lane-0 alignment on a block start
* dropping a partial word on a width change
* the toggle used for new-word detection
* the extra output register stage
* `ss_mode_sync` read as a mode-lock flag
* the `pclk` reset derived from `sclk_rst_n`

The limits to keep in mind:

* **Related clocks are required.** The multi-bit word is sampled directly, so
  the crossing is only correct when `pclk` edges line up with every 1st, 2nd or
  4th `sys_clk` edge, as when both come from the PHY's PLL. It is not a crossing
  for unrelated clocks. Those would need an asynchronous FIFO, which is not
  part of this design.
* **Width changes** are meant to be made while the MAC is idle, with the clock
  changing at the same time. A word in progress is lost.
* **8b/10b (Gen1/Gen2).** The same packing works with `tx_datavalid` held high
  and no block starts. However, the per-byte K-character flags of 8b/10b and
  the 128b/130b sync-header bits have no ports here.
* **Not included:** the PLL that makes the clocks, the MAC, and the FIFO that
  receives `data_2ififo`.
* **Lint.** Verilator reports `SYNCASYNCNET` on the two resets. This is because
  the assertions use them in `disable iff` while the flops use them as
  asynchronous resets. The warning is harmless.

Two assertions are built in:

* the packer's lane counter never passes the last lane of the current width
* `txstartblock_mac` is never high without `tx_datavalid_mac`

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. They
all use edge-aligned clocks and `$urandom` data. The commands are the same for
each; for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/bwc_pkg.sv \
    tb/tb_bit_width_converter.sv --top-module tb_bit_width_converter -Mdir obj
./obj/Vtb_bit_width_converter
```

| testbench | what it checks |
|---|---|
| `tb_bwc_width_packer` | Checks the packer cycle by cycle against a model that concatenates beats. Covers all widths, block-aligned traffic with the DataValid gaps above, random gaps, block starts mid-word, width changes mid-word, the reserved code and random traffic. It also checks that hold-register loads are at least N cycles apart. |
| `tb_bwc_pclk_capture` | Loads the hold register at the packer's rates, with random extra spacing. Checks every output word, its exact latency, that no word is lost, and the `ss_mode_sync` rule. |
| `tb_bit_width_converter` | End to end at the default 32-bit size and real Gen4 clocks, switching between all three widths and the reserved code. Checks every word, its latency, the number of `pclk` cycles each stream occupies, and `ss_mode_sync`. It also counts that each mechanism occurred: each width, DataValid gaps on the internal channel, block starts, realignment, width switches and `ss_mode_sync` drops. |
| `tb_bit_width_converter_w64` | The same end-to-end test with `INT_W = 64` and `pclk` at 250 MHz. |
