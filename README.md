# DSS data-FPGA firmware: programmable replay, BUSY on the start net, masked comparison

The DSS is a VME test board for a trigger read-out system. It has two
daughter-card slots. Each slot is served by four data FPGAs, and each data FPGA
has a 32K-word dual-port memory (DPRAM). As a **source**, the board replays DPRAM
contents through a daughter card, one word every 25 ns (40 MHz). As a **sink**,
it receives words from a daughter card and compares them with the DPRAM contents.

This RTL covers one round of changes to that firmware:

* **Programmable replay depth (GIO source).** Replay no longer wraps at a fixed
  32K. Two 16-bit limits can wrap it earlier. `short_mem` marks the end of
  one orbit's data. `long_mem` marks the end of a multi-orbit data set. A 32-bit
  `orbit` count sets how many short passes are played before the long one.
* **BUSY delivered on the start net.** The front-panel BUSY input reaches only a
  CPLD, which has no spare pin towards the data FPGAs. BUSY is therefore encoded
  as the width of low pulses on the existing `start` net.
* **Masked automatic comparison (GIO sink).** The comparator was built for four
  20-bit channels (80 bits). The general-purpose I/O (GIO) card carries only 32
  bits. A 20-bit compare mask per FPGA removes the unused bits from the check.
* **ROD Test source.** The DPRAM acts as a test source for read-out driver (ROD)
  firmware. It is read out under a DAV ("data available") strobe whose length is
  programmable.
* **Register decoding** for two extra registers in every data FPGA.
* **A divide-by-two clock** (40 to 20 MHz) for a separate chip (the "CP chip").

## Programmable wraparound (GIO source)

This part is the easiest to misread, so it gets the most detail.

The DPRAM chips step their own address counter on every clock. The FPGA cannot
set the chips' address. It can only clear their counters, through the
synchronous counter-reset pin `nCNTRST`. So the FPGA runs its own copy of the
counter (`dpram_addr`) and clears it on the same clock edge as the chips. The
two counters must never drift apart. Every testbench that drives a source FPGA
checks this on every clock against a model of the chip (`tb/dpram_model.sv`).

Per FPGA, the rules are:

| event | address counter | `orbit_countdown` |
|---|---|---|
| power-up | cleared | 0 (the `orbit` register also powers up to 0) |
| Address Counter Reset (`rs_count_n` low) | cleared | loaded from `orbit` |
| address = `long_mem` (limit non-zero) | cleared | reloaded from `orbit` |
| address = `short_mem` (limit non-zero), countdown ≠ 0 | cleared | decremented if BUSY is high, else unchanged |
| address = `short_mem`, countdown = 0 | runs on | unchanged |

If both limits match on the same clock, `long_mem` wins. A limit of 0 turns its
comparator off. With both limits at 0 the counter simply rolls over at 32K.

**Two-location latency.** A limit does not stop replay at the limit address.
Stop-and-clear takes three clock edges:

```
clock      t        t+1        t+2          t+3
address    L        L+1        L+2          0
neq_*      low (combinational compare)
n_reset             low (orbit_counter register)
nCNTRST                        low (counter-reset flop)
                                            counters cleared on this edge
```

So limit `L` replays addresses `0 .. L+2`. To replay locations 0 to 15, set the
limit to 13. Always set a limit to two less than the last location you want.

**Writing `orbit`** does not touch the running countdown. You must apply an
Address Counter Reset afterwards to copy the new value into `orbit_countdown`.

**Counter reset.** The counter-reset signal is active low. It combines two
sources:

```
counter_reset = rs_count_n AND n_reset
```

`rs_count_n` is the Address Counter Reset and `n_reset` is the wrap request. The
result is registered once, and that register drives both the chips' `nCNTRST`
and the clear of the FPGA's own counter.

Example: `short_mem = 13`, `long_mem = 40`, `orbit = 2`, BUSY high. The counter
wraps after 15, 15, 42, 15, 15, 42, and so on. With BUSY low the countdown never
falls, so only short passes of 0..15 are played.

## BUSY on the start net

BUSY is encoded by the width of a low pulse on the start net:

| low pulse on `start` | meaning |
|---|---|
| 1 clock (25 ns) | BUSY |
| 2 clocks (50 ns) | NOT BUSY |
| 3 clocks or more | the net's original start function (ignored by the decoder) |

**Encoder (`busy_encode`).** It synchronises the front-panel level with two
flops. When the level differs from the last code it sent, it sends a new code,
then keeps the net high for at least one clock. The net's original active-low
start is ANDed in. An original start pulse must therefore last at least 3
clocks, or it would be read as a code. From a BUSY change to the first low clock
takes 3 clocks.

**Decoder (`busy_decode`).** It has three copies of the net (`start_1..3`) and
takes a two-of-three majority of the low level. It counts low clocks, saturating
at 3. On the return to high, a count of 1 sets `busy`, a count of 2 clears it,
and anything longer is ignored. `busy` changes 2 clocks after a BUSY code starts
and 3 clocks after a NOT BUSY code starts. It is 0 after reset.

## Automatic comparison (GIO sink)

Each sink FPGA handles one channel, `WIDTH` = 20 bits wide. Per clock:

1. The received word and the DPRAM word are registered. `dc_valid` is delayed
   alongside them.
2. The reference word is chosen: the DPRAM word, or an external pseudo-random
   word when `pseudo_en` is high.
3. Both operands are ORed with `compare_mask` and tested for equality. A mask
   bit at 1 removes that bit from the check. `pattern_match_n` is low when the
   words agree.
4. On a valid mismatch, the 16-bit error counter counts up and the received word
   is latched into `data_in_error`. The counter stops at `ERR_TERMINAL`
   (0xFFFF). `err_ovf_n` is the registered flag "count below terminal".
   `err_clr` clears the counter.

On the GIO card the 32-bit word is split across the slot's FPGAs:

* The first FPGA gets 20 bits, channel A (bits 19:0 here).
* The second FPGA gets 12 bits, channel B (bits 31:20 here). Its mask must have
  bits 19:12 set.
* The third and fourth FPGAs have no GIO channel. Mask them fully (0xFFFFF).

## ROD Test source

`dav_gen` drives `dav_n` low for `dav_len` clocks per slice. With several
slices, the slices follow each other with no gap, so DAV stays low for
`n_slices × dav_len` clocks.

* An event starts on a `trigger` pulse. DAV falls on the next clock edge.
* `dpram_cnten` is high over the same clocks, so the memory steps through the
  event's words.
* A trigger during an event is ignored.
* The DAV length register is 8 bits wide and powers up to 84, the length of one
  slice of data.

## Register map

Every data FPGA `i` (0..7) has two registers. FPGAs 0–3 sit on daughter card 1
and FPGAs 4–7 on card 2.

| byte offset | FPGA | GIO source | GIO sink | ROD Test |
|---|---|---|---|---|
| `0x108 + 4·i` (card 1: 108, 10C, 110, 114; card 2: 118, 11C, 120, 124) | i | `orbit[31:0]` | `compare_mask[19:0]` | `dav_len[7:0]` (reset 84) |
| `0x130 + 4·i` (card 1: 130, 134, 138, 13C; card 2: 140, 144, 148, 14C) | i | `{long_mem[15:0], short_mem[15:0]}` (reset 0) | — | — |

Version/type codes: ROD Test `0x0216`, GIO source `0x0612`, GIO sink `0x0A13`.
Each FPGA presents its code on a `type_code` output. No register address is
given for the codes.

The register bus between the decoder and the FPGAs belongs to this design. It
is the struct `reg_req_t` = `{sel_a, sel_b, we, wdata}`, and the FPGA returns
`rdata` combinationally. A write takes effect on the next clock edge. Real VME
cycle timing (address strobe, data strobe, DTACK) is not modelled.

## Top level (`dss_top`)

The top contains two independent systems and the clock divider:

* **GIO system.** One register decoder, the BUSY encoder, four GIO source FPGAs
  on slot 1 (each drives its own DPRAM counter reset), and four GIO sink FPGAs
  on slot 2 (fed from the 32-bit `gio_rx_data`).
* **ROD Test system.** Its own register bus (`rod_vme_*`) and eight ROD Test
  FPGAs sharing one trigger. ROD Test is a different firmware load of the same
  FPGAs, so it has its own ports rather than sharing the GIO system's.
* **`cp_clk`.** The 20 MHz output of the divide-by-two.

Three things are not in the RTL: the DPRAM chips, the daughter cards, and the
pseudo-random reference generator. Their signals are top-level ports.

## Files

| file | contents |
|---|---|
| `rtl/dss_pkg.sv` | offsets, type codes, DAV reset value, `reg_req_t` |
| `rtl/vme_reg_decode.sv` | offset → FPGA register select, read-data return |
| `rtl/busy_encode.sv`, `rtl/busy_decode.sv` | BUSY pulse-width code on the start net |
| `rtl/comparator_en.sv` | equality compare with enable, active-low result |
| `rtl/add_cnt.sv` | counter with synchronous clear (address copy, error counter) |
| `rtl/orbit_counter.sv` | orbit countdown and wrap request |
| `rtl/gio_source_fpga.sv` | GIO source data FPGA |
| `rtl/gio_sink_fpga.sv` | GIO sink data FPGA |
| `rtl/dav_gen.sv`, `rtl/rod_test_fpga.sv` | ROD Test data FPGA |
| `rtl/clk_div2.sv` | 40 → 20 MHz divider |
| `rtl/dss_top.sv` | everything together |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_gio_loopback.sv` | ramp data looped from the slot-1 sources to the slot-2 sinks |
| `tb/dpram_model.sv` | behavioural DPRAM with address counter and synchronous counter reset (testbench only) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
has a watchdog that counts a failure if the test hangs. Build and run one with
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb rtl/dss_pkg.sv tb/tb_dss_top.sv --top-module tb_dss_top
./obj_dir/Vtb_dss_top
```

Two testbenches run the whole top at its default sizes:

* `tb_dss_top` includes a full 32K rollover. It counts every mechanism: BUSY
  and NOT BUSY codes, short wrap, long wrap, decrement, reload, rollover, masked
  compare, error, pseudo reference, single- and multi-slice DAV, and the CP
  clock. A mechanism that never occurs counts as a failure.
* `tb_gio_loopback` plays 5000 ramp words through the wraparound with no errors,
  then flips 40 random bits on the loopback and checks that each is counted once
  by the right sink.

The whole suite runs in seconds.

## What to trust, and where this departs from the published design

These points follow the published description:

* the wraparound rules and the two-location latency;
* the BUSY pulse widths;
* the register offsets, field layouts, widths and reset values (DAV length 84,
  source limits 0);
* the type codes;
* the OR-with-mask comparison;
* the multi-slice DAV shape.

These are this design's own choices:

* When a BUSY code is sent, the gap after it, and the synchroniser.
* The majority vote over `start_1..3`.
* Long limit winning over short when both match on the same clock.
* Power-up value 0 for `orbit` and for the compare mask.
* The sink's `dc_valid` qualifier, `err_clr`, the stop at `ERR_TERMINAL`, and
  latching `data_in_error` on every counted error.
* The register bus, the trigger and slice-count inputs of the DAV generator, and
  DAV length counted in 25 ns clocks.
* Slot 1 as source, slot 2 as sink, and GIO bits 19:0 as channel A.
* The 15-bit address counter (from the 32K depth). The address is zero-extended
  to the 16-bit limits, so a limit above 0x7FFF never matches.

Not included:

* The two extra registers of the S-LINK FPGAs. Their existence is known, but not
  their offsets.
* A readable address for the type codes.
* The pseudo-random reference generator. Its sequence is unknown, so its input
  is a port.
* The data path from DPRAM to daughter card. No logic is described for it.
* Write control of the sink DPRAM.
* VME access to the DPRAMs as 32-bit words. It spans the 20-bit and 12-bit
  memories of two FPGAs, and its address map is not known.
* The "dummy" registers planned for later firmware.
