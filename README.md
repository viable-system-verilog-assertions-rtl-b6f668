# AHB-Lite bus system with an assertion monitor

This is a small single-master AMBA AHB-Lite system. One bus master drives
three RAM slaves through a memory-map decoder and a response multiplexer. A
protocol monitor sits on the same bus. It checks every transfer against
fifteen protocol and response rules and keeps a pass/fail scoreboard in
hardware counters. The main purpose is verification: the slaves give a
well-defined target, and the monitor turns the AHB-Lite rules into counted
checks, stated once as synthesizable logic and once as SVA properties.

```
            HADDR, HWRITE, HSIZE, HBURST, HTRANS, HWDATA (to every slave)
 master ───────────────────────────────┬────────────┬────────────┬──────────┐
   ▲                                   │            │            │          │
   │          ┌──────────────┐ HSEL[0] ▼   HSEL[1]  ▼   HSEL[2]  ▼ HSEL_DEF ▼
   │  HADDR ─►│ ahb_decoder  ├──────► slave 0     slave 1     slave 2   default
   │          └──────┬───────┘          │            │            │     slave
   │          MUX_SEL│                  │ HRDATA, HREADYOUT, HRESP │        │
   │          ┌──────▼───────┐◄─────────┴────────────┴────────────┴────────┘
   └──────────┤   ahb_mux    │  HRDATA, HREADY, HRESP  (HREADY also back to all slaves)
              └──────────────┘
 ahb_monitor watches the master side: address, control, data and response
```

## Files

| File | Contents |
|---|---|
| `rtl/ahb_pkg.sv` | HTRANS/HBURST/HSIZE encodings, scoreboard check numbers, burst-address helpers |
| `rtl/ahb_if.sv` | the bus as an interface with `master`, `slave` and `monitor` modports |
| `rtl/ahb_lite_top.sv` | the system: decoder, three slaves, default slave, mux, monitor |
| `rtl/ahb_slave.sv` | RAM slave with wait states and read-only words |
| `rtl/ahb_decoder.sv` | memory-map decoder |
| `rtl/ahb_mux.sv` | slave-to-master response multiplexer |
| `rtl/ahb_default_slave.sv` | ERROR responder for unmapped addresses |
| `rtl/ahb_monitor.sv` | protocol checker, scoreboard counters and SVA |
| `tb/ahb_master_bfm.sv` | behavioural master (bus functional model), not synthesizable |
| `tb/tb_*.sv` | self-checking testbenches: one per module, plus a replay of a fixed test sequence and a four-slave build |

## Address map

Addresses count **32-bit words**, not bytes, and each burst beat advances the
address by one. Each slave owns a window of `2**SLAVE_ADDR_BITS` = 1024 words:

| Word address (hex) | Target |
|---|---|
| `000`–`3FF` | slave 0 |
| `400`–`7FF` | slave 1 |
| `800`–`BFF` | slave 2 |
| `C00` and above | default slave (always ERROR) |

Inside every slave, words 0 to `RO_WORDS-1` (0–3) are **read-only**. A write
to one of them is refused with ERROR and does not change the word. Reads from
them return 0. All other words are plain RAM. The RAM is not reset, so its
contents start undefined.

`HSIZE` is carried through the bus but not acted on: every transfer moves a
whole 32-bit word. Byte and halfword writes therefore write the full word.

## Transfer timing

The bus follows the AHB-Lite pipeline. A transfer's **address phase** is
accepted at a rising `HCLK` edge where `HREADY` is high and `HTRANS` is NONSEQ
or SEQ. Its **data phase** follows, and it overlaps the next transfer's address
phase.

* **OKAY to a RAM slave:** by default the slave completes the transfer in one
  data-phase cycle. A write's `HREADY` is high in the cycle right after its
  address phase. Setting `WAIT_STATES` to N makes the slave hold `HREADYOUT`
  low for N cycles before it raises it. The transfer then takes
  `1 + WAIT_STATES` cycles of data phase. A write stores `HWDATA` at the
  completing edge. For a read, the word is taken from the RAM at the
  address-phase edge and held in a register for the whole data phase.
* **Read right after a write to the same word:** the read's address-phase
  edge is also the edge where the write completes. The slave forwards
  `HWDATA` into the read register, so the read returns the new value.
* **ERROR:** responses take two cycles, as AHB-Lite requires. The first cycle
  has `HREADY` low and `HRESP` high. The second has both high. This applies
  to read-only words and to unmapped addresses. Wait states are not added to
  an ERROR.
* **IDLE and BUSY:** both get a zero-wait OKAY.

The decoder works only on `HADDR`, so its selects are valid in the address
phase. The multiplexer registers `MUX_SEL` at every edge where `HREADY` is high.
During the data phase, including its wait states, it therefore keeps returning
the slave that was addressed. After reset it points at the default slave,
which is idle and ready.

## The monitor and its scoreboard

`ahb_monitor` sees only the master side of the bus: address, control, write
data, read data, `HREADY` and `HRESP`. It knows the address map through the
same parameters as the system. On every clock edge it raises an *evaluate*
bit, and possibly a *fail* bit, for each of the fifteen checks.
`chk_total[i]` counts evaluations and `chk_fail[i]` counts failures, so the
pass count is `total - fail`. The counters are `CNT_W` = 16 bits wide and
wrap.

| # | Check | Evaluated when | Fails if |
|---|---|---|---|
| 0 | error | a data phase to an address ≥ `NUM_SLAVES·2**SLAVE_ADDR_BITS` completes | `HRESP` is OKAY |
| 1 | read-only error | a write data phase to word offset < `RO_WORDS` completes | `HRESP` is OKAY |
| 2 / 3 | basic write / read | a SINGLE write / read to an allowed word completes | `HRESP` is ERROR |
| 4 / 5 | burst write / read | a burst beat to an allowed word completes | `HRESP` is ERROR |
| 6 | HREADY | `HRESP` and `HREADY` are both high (an ERROR completes) | the previous cycle was not `HRESP` high with `HREADY` low |
| 7 | BUSY to sequential | the previous cycle was BUSY inside a 4/8/16-beat burst | this cycle is neither BUSY nor SEQ |
| 8 | sequential wait | the previous cycle held a NONSEQ/SEQ with `HREADY` low | address, direction, size, burst or `HTRANS` changed |
| 9–11 | burst count 4/8/16 | a NONSEQ or IDLE is accepted after a 4/8/16-beat burst | the burst did not have exactly 4/8/16 beats |
| 12–14 | address change 4/8/16 | a SEQ beat of a 4/8/16-beat burst is accepted | the address is not previous+1 (INCRx), or previous+1 wrapped inside the x-word aligned block (WRAPx) |

Three exceptions keep legal traffic from failing. An ERROR lets the master
cancel a burst, so after an ERROR the beat count of that burst is not judged.
A waited transfer whose slave signals ERROR may change. A BUSY followed by an
ERROR is not judged.

With `ASSERT_ON = 1` (the default), the monitor also states the same rules as
concurrent SVA properties. A violation is reported as a warning at the cycle
where it happens. The run continues, and the counters keep the record.
With `ZERO_WAIT_WRITES = 1`, one more property requires `HREADY` to be high
in the cycle after `HWRITE` rises, unless an ERROR is starting. This is the
zero-wait write rule of the design.
`ahb_slave` asserts the two-cycle ERROR shape on its own outputs, and
`ahb_decoder` asserts that exactly one target is selected. Both of these are
hard errors. Set `ASSERT_ON = 0` to count deliberate violations quietly, as
`tb_ahb_monitor` does.

The counters let a run end with a scoreboard rather than a log of messages.
The end-to-end testbench prints one, for example:

```
scoreboard check  0: total 5 pass 5 fail 0
scoreboard check  4: total 201 pass 201 fail 0
...
```

## The master

No synthesizable master is part of this system: the top's master-side
signals are its ports. `tb/ahb_master_bfm.sv` is a behavioural master that
drives an `ahb_if.master` modport from tasks:

* `write(addr, data, nerr)` and `read(addr, data, nerr)` issue one SINGLE transfer.
* `burst(addr, len, busy, wrap, write, wdata, rdata, nerr)` issues one burst.
  `len` = 1 gives SINGLE; 4, 8 and 16 give INCRx or WRAPx; any other length
  gives an undefined-length INCR. The model inserts `busy` BUSY cycles before
  every SEQ beat.
* `burst_write(addr, len, busy, data, nerr)` and
  `burst_read(addr, len, busy, data, nerr)` are incrementing shorthands.

The model changes its outputs on the falling clock edge. All response outputs
of the system are registered, so what the model sees at the falling edge is
what the next rising edge will sample. The model counts completed beats,
wait cycles, accepted BUSY transfers and ERROR beats (`n_beats`, `n_wait`,
`n_busy`, `n_err`). The testbenches use these counts to check cycle timing.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_SLAVES` | 3 | RAM slaves on the bus |
| `SLAVE_ADDR_BITS` | 10 | log2 of the words per slave (1024) |
| `RO_WORDS` | 4 | read-only words at the bottom of each slave |
| `WAIT_STATES` | 0 | `HREADY`-low cycles per OKAY transfer (all slaves) |
| `CNT_W` | 16 | scoreboard counter width |
| `ASSERT_ON` (monitor) | 1 | enable the SVA properties |
| `ZERO_WAIT_WRITES` (monitor) | 1 | also assert that writes are not waited; the top sets it to `WAIT_STATES == 0` |

The slave count, window size, read-only size and zero-wait writes are part of
the design. The wait-state option and the counter width are choices made
here. Changing
`NUM_SLAVES` or `SLAVE_ADDR_BITS` moves the address map, and the decoder,
default slave and monitor follow automatically.

## Choices made here, and where to be careful

The following are choices made here, not fixed by the design. Check them
before reuse:

* **Word addressing.** Addresses count words, and `HSIZE` has no effect. A
  standard AHB system uses byte addresses and increments bursts by the
  transfer size. To use byte addresses, take `HADDR[SLAVE_ADDR_BITS+1:2]` as
  the word index, add byte lanes in the slave, and change `next_beat_addr` in
  the package.
* **Default slave.** Unmapped addresses must get ERROR. A separate default
  slave gives it.
* **Read-only words read as 0.** Their contents are not defined otherwise.
* **Checks evaluated in the data phase.** The monitor evaluates its error
  checks in the data phase, where AHB-Lite places the response. Checks 2–14
  are this design's reading of the scoreboard's row names. No formal
  definition was available for them.
* **Wait states as an option.** Writes have no wait states in this design,
  and reads are given the same timing. The slaves can also insert wait states
  through `HREADY`; `WAIT_STATES` enables them. When set, the same number
  applies to every OKAY transfer on every slave.

The RAM is an unreset array with a registered read. It maps onto a
synchronous-read memory after adding the forwarding path.

## Simulating

Every module has a self-checking testbench. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if the bus
hangs. Each one finishes in well under a second:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/ahb_pkg.sv tb/tb_ahb_lite_top.sv --top-module tb_ahb_lite_top -o sim
./obj_dir/sim
```

Replace `tb_ahb_lite_top` with `tb_ahb_lite_replay`, `tb_ahb_lite_four`,
`tb_ahb_slave`, `tb_ahb_decoder`, `tb_ahb_mux`,
`tb_ahb_default_slave`, `tb_ahb_monitor` or `tb_ahb_if` to run a block's own
test. The simulator used has two signal states, so the testbenches reset or
initialise everything they read.

What the tests cover:

* **`tb_ahb_lite_replay`** builds the system with every parameter at its
  default. It replays a fixed qualification sequence:
  * ten write/read-back pairs at fixed addresses and data on each of slaves 1
    and 2;
  * a four-beat burst of 0x3b, 0x3d, 0x3f, 0x41 at word 6 and at word 0x706.

  All data must match, no transfer may be waited, and the monitor must stay
  clean.
* **`tb_ahb_lite_four`** builds the system with four slaves and checks that
  the address map, the read-only words and the monitor follow.
* **`tb_ahb_lite_top`** is the end-to-end test, with one wait state per
  transfer so that waited transfers also occur. It runs:
  * ten random single writes and read-backs per slave;
  * INCR4 at offset 5, INCR8 at 10 and INCR16 at 25 on every slave, with 0 and
    2 BUSY cycles per beat;
  * WRAP4/8/16 bursts and an undefined-length burst;
  * writes to read-only words, accesses past the last slave, and a burst
    running into unmapped space.

  All read data is checked against a reference array. The number of wait
  cycles is checked for every transfer. The monitor's evaluation counts must
  match the transfers issued, with no failures. The test also fails unless
  every mechanism occurred at least once: wait states, BUSY, wrapping, both
  kinds of ERROR and each slave.
* **`tb_ahb_slave`** runs the same slave test twice: with no wait states and
  with two. It covers every word, the wait counts, the ERROR shape, bursts
  with BUSY, and write-to-read forwarding. The test body is in
  `tb/ahb_slave_check.sv`.
* **`tb_ahb_monitor`** has two parts:
  * legal traffic, where the exact evaluation counts must match and no check
    may fail;
  * a scripted bus with one deliberate violation of each breakable rule,
    where the exact pass and fail counts must match.
* **`tb_ahb_decoder`, `tb_ahb_mux`, `tb_ahb_default_slave`** compare the
  block with an independent reference every cycle.
* **`tb_ahb_if`** connects master, interface, slave and monitor and runs the
  three incrementing burst cases.
