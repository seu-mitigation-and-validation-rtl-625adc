# Triple-modular-redundant dual LEON3 test system

A soft processor in an SRAM-based FPGA is exposed to single-event upsets
(SEUs): radiation flips configuration bits, flip-flops and block-RAM words.
This design hardens a LEON3 (SPARC V8) processor system and checks it from
inside the chip. It does this in three ways:

1. **Triple modular redundancy (TMR).** Every register and memory exists
   three times, once per *TMR domain*. Majority voters sit after the copies,
   so one wrong copy is outvoted.
2. **Self-scrubbing memories.** The boot ROM and the RAM are triplicated.
   In the background they are repaired word by word, so upsets cannot pile
   up until two copies of the same word are wrong.
3. **Lock-step comparison.** Two complete processor systems run the same
   program. A comparator that is itself triplicated checks 104 of their bus
   signals every clock. When they disagree, it sets a failure flag that stays
   set. A monitor reads the flag from pins or over JTAG, with no golden
   reference outside the chip.

The SystemVerilog here covers everything of that system except the
processors themselves and the standard bus peripherals. Those are reused IP
and attach through ports (see *What is not in this RTL*). The structure,
the 200 MHz to 50 MHz clocking, the 104 compared bits and the scrubbing
scheme follow the published mitigation of the LEON3 on a Kintex-7 FPGA.
Memory sizes, encodings, handshakes and timing details are this design's own
choices. They are listed at the end.

## TMR domains and voters

Each domain `d` (0, 1, 2) has its own 50 MHz clock `clk_dom[d]` and its own
reset `rst_n_dom[d]`. Every triplicated register of domain `d` runs on that
clock. Where a register feeds back into itself (a counter, a state machine,
a sticky flag), domain `d` does not use its own copy. It reads
`tmr_voter(copy0, copy1, copy2)`, computes the next value from that, and
stores it. So if one copy is upset, it takes the majority value again on the
next clock. The three copies resynchronise by themselves, and a repaired
domain needs no restart. There is one voter per domain, so a voter is no
single point of failure either.

`tmr_voter` is the bitwise majority `(a&b)|(a&c)|(b&c)`. It is used in:

| where | what is voted |
|---|---|
| `clk_rst_mgr` | the clock-divider counters |
| `mem_scrubber` / `tmr_scrub_mem` | scrubber address and phase; the word that is written back; the processor read data |
| `bus_vote_compare`, `activity_mon` | the three copies of each core's bus |
| `bus_vote_reduce` | the mismatch vectors; the disagreement and failure flags |

## Self-scrubbing memories

`ahbrom_tmr` (boot ROM) and `ahbram_tmr` (RAM) have the same build:

```
            AHB slave, domain d ──► port 1 ┐
                                           BRAM copy d  (x3)
   scrubber d ◄── voted state ───► port 0 ┘
       ▲  writes back vote(port-0 words of copies 0,1,2)

   processor read data, domain d = vote(port-1 words of copies 0,1,2)
```

* `scrub_bram`: one copy. It is an inferred true dual-port block RAM with
  read-first behaviour and one clock of read latency. Port 1 has byte
  enables.
* `mem_scrubber`: one per domain. It walks through the addresses and spends
  two clocks on each:
  * **read slot:** it puts address `A` on port 0.
  * **write slot:** the three copies' words at `A` are now out of their port
    0 and are voted. The scrubber writes the majority word back into its own
    copy at `A`.

  A full pass therefore takes `2*DEPTH` clocks. At the default 8192 words
  and 50 MHz that is 327.7 µs. `pass_done` pulses in the write slot of the
  last address.
* **Pause rule (RAM only).** A processor write and a scrub write-back must
  never race. Suppose the scrubber read word `A`, and the processor then
  wrote `A` before the write-back. The write-back would undo the processor's
  write. So in any clock where domain `d`'s processor port writes, scrubber
  `d` is paused:
  * a paused read slot is repeated;
  * a paused write slot drops its write and goes back to reading the same
    address.

  A word read before a processor write is thus never written back. A pass
  gets longer by one or two clocks per processor write. The ROM ignores
  writes and never pauses.
* **Processor side (`ahb_mem_slave`).** There is one per domain, with AMBA 2.0
  AHB slave timing:
  * The address goes to port 1 in the address phase, and the voted word is
    returned in the data phase. Reads and writes have zero wait states.
  * A write is registered in its address phase. It is written in the first
    cycle of its data phase, when HWDATA is valid.
  * Port 1 cannot read and write in the same clock. So a read whose address
    phase overlaps a write's data phase gets exactly one wait state. After
    it, the read returns the newly written data.
  * Byte lanes are big-endian, as on SPARC: byte offset 0 is `HWDATA[31:24]`.
  * Only OKAY responses are given.

What this buys: if an upset hits one copy of a word, reads still return the
right value (the read voter masks it). The next scrub pass rewrites the
word, at most 2·DEPTH clocks later. Only two upsets in the same word, in two
different copies, within one pass can corrupt data.

## Detecting a processor failure

```
core 1 bus x3 ─┐                                    ┌─ disagree[3]
               ├─ bus_vote_compare ─ mis[3][104] ─ bus_vote_reduce ─┤
core 2 bus x3 ─┘    (vote, XOR, reg)      (vote, OR, reg; catch)    └─ fail[3] (sticky)
core c bus x3 ─── activity_mon ─── act_core{1,2}[3]
```

* **The 104 compared bits** (`leon3_tmr_pkg::cmp_bus_t`) are each core's
  AHB master signals plus the read data returned to it:

  | signal | bits |
  |---|---|
  | `hbusreq` | 1 |
  | `hlock` | 1 |
  | `htrans` | 2 |
  | `haddr` | 32 |
  | `hwrite` | 1 |
  | `hsize` | 3 |
  | `hwdata` | 32 |
  | `hrdata` | 32 |

* **`bus_vote_compare`**: in each domain, vote core 1's three copies and
  core 2's three copies, XOR them, and register the result. This gives 104
  mismatch bits per domain.
* **`bus_vote_reduce`**:
  * In each domain, vote the three mismatch vectors, OR the 104 bits
    together, and register the result as `disagree[d]`.
  * If two or more of the three `disagree` bits are high, `fail` is set.
    `fail` is a triplicated register with voted feedback, and it stays set
    until reset.

  Latency from a differing bus cycle: `disagree` 2 clocks, `fail` 3 clocks.
  A wrong bit in one copy of a core's bus, or in one copy of the comparator,
  cannot raise `fail`.
* **`activity_mon`**: per core and domain. The flag is high when the voted
  bus changed within the last `ACT_WIN` (256) clocks. This shows the two
  cores agree because they both run, not because both have stopped.

## Status word, pins and JTAG

`status_t` (16 bits, LSB first):

| bits | field | copies |
|---|---|---|
| 0 | `hb_global`: heartbeat of the 200 MHz clock | 1 |
| 3:1 | `hb_dom`: heartbeat of each domain clock | 3 |
| 6:4 | `disagree` | 3 |
| 9:7 | `fail` | 3 |
| 12:10 | `act_core1` | 3 |
| 15:13 | `act_core2` | 3 |

Every heartbeat toggles once every 2^(HB_BITS-1) system clocks, which is
0.17 s at the defaults. The copies are not voted on chip. The reader votes
them, so a single upset status bit is not taken for a failure.

`status_if` drives the word on `pio` and also acts as a JTAG user data
register. It connects to the TCK, SEL, CAPTURE, SHIFT, TDI and TDO signals of
the FPGA's boundary-scan primitive. Each bit passes through a two-flop
synchroniser into TCK. CAPTURE loads the word, and SHIFT moves it out LSB
first on TDO while TDI fills in from the top. This lets a configuration
scrubber or fault injector on the JTAG port poll for failures between
injections.

## Clocks and reset

`clk_rst_mgr` divides the 200 MHz input by `CLK_DIV` = 4 once per domain.
Each divider is a 2-bit counter whose state is voted before it is
incremented. The domain clock is taken directly from the counter's top
flip-flop. In an FPGA each domain clock would then drive its own global
buffer. The external active-low reset is synchronised into each domain by
two flip-flops, which takes two domain clocks to assert and to release. All
resets in the design are synchronous and active low.

All three domain clocks come from one input clock and rise together, so
voting across domains is ordinary synchronous logic. A divider upset shifts
one domain's clock for one period; the vote pulls it back in step.

## What is not in this RTL

These parts are reused IP or vendor primitives, so this RTL does not
implement them. Their connection points are ports of `leon3_dual_tmr_top`:

* **LEON3 integer unit, register file, MUL/DIV and AHB master.**
  * The cores get `clk_dom` and `rst_n_dom`.
  * Each TMR copy of each core reports its bus on `core_bus[core][domain]`.
* **AHB controller.** Per core and per domain, it drives the memory slave
  ports `rom_slv_i`/`ram_slv_i` and takes `rom_slv_o`/`ram_slv_o` back. That
  covers slave select, HREADY and the HRDATA multiplexing.
* **AHB/APB bridge, timer, UART.**
* **Boundary-scan primitive.** It connects to the `jtag_*` ports.
* **Global clock buffers.**
* **The external configuration scrubber.**

The boot image, a boot loader plus the compressed benchmark, is not
supplied either. `ROM_INIT` names a hex file with one 32-bit word per line,
and that file is loaded into all three ROM copies.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| top | `CLK_DIV` | 4 | input clock / domain clock |
| top | `HB_BITS` | 24 | heartbeat counter width |
| top | `ROM_DEPTH`, `RAM_DEPTH` | 8192 | 32-bit words per memory |
| top | `ROM_INIT` | "" | ROM image file |
| top | `ACT_WIN` | 256 | activity hold time, clocks |
| package | `CMP_BITS` | 104 | compared bits per core |
| package | `NDOM`, `NCORE` | 3, 2 | TMR domains, processors |

## Choices made here, beyond the published design

* **Memory size.** The memory size is not published. 8192 × 32 bits was
  picked so that a full scrub pass takes 327.7 µs, within the quoted
  400 µs. For larger memories the pass time grows at 2 clocks per word.
* **Which 104 signals are compared.** Only the count of 104 is published.
* **Port roles.** The scrubber uses port 0 and the processor port 1.
* **Scrubber timing.** The read and write-back slots, the pause rule, and
  the voting of the scrubber's address and phase are this design's own.
* **AHB slave timing.** The read-after-write wait state, big-endian lanes
  and OKAY-only responses are this design's own.
* **AHB slave registers are not voted.** Each one is reloaded from the bus
  on every transfer, so an upset in it lasts at most one transfer.
* **Monitors and status.** The activity window, heartbeat rate, status word
  layout, JTAG bit order and reset synchroniser are this design's own.
* **Clearing the failure flag.** It is cleared only by reset.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. Run them from the repository root, because
the ROM test image path `tb/rom_test.hex` is relative to it:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/leon3_tmr_pkg.sv tb/leon3_dual_tmr_top_tb.sv \
    --top-module leon3_dual_tmr_top_tb -o sim
./obj_dir/sim
```

`tb/ahb_master_bfm.sv` stands in for a core and its AHB controller. It
issues pipelined byte, halfword and word transfers, decodes the ROM
(address `0x0xxxxxxx`) and the RAM (`0x4xxxxxxx`), and checks every read
against a reference model. It also presents the 104-bit bus for comparison.

`leon3_dual_tmr_top_tb` runs the whole system at its default parameters in
about 40 seconds. Two lock-stepped master models boot, copying 256 words
from ROM to RAM, and then run a read/modify/write loop. During the run the
testbench does the following:

* It flips words in single ROM and RAM copies. No read may go wrong, and the
  next scrub pass must repair each copy.
* It corrupts one copy of a core's bus. No disagreement may be reported.
* It makes core 2 wrong in two of its copies for one clock. `disagree` and
  a sticky `fail` must follow, on the pins and over JTAG.
* It waits for a heartbeat to toggle.
* It counts each mechanism: wait states, scrubber pauses, masked upsets,
  repairs, activity high and low, disagreement, failure, JTAG readouts and
  heartbeats. Each must occur at least once.

The block testbenches do something similar on a smaller scale. They upset a
single copy with `force` or a direct memory write, then check that the
voters mask it and that the feedback voting or scrubbing undoes it.
