# PRMU: a partial re-configuration manager for a reconfigurable processor

An FPGA such as the Virtex-II Pro can rewrite part of its own configuration
while the rest keeps running. It does this through its internal configuration
access port (ICAP). A processor that swaps hardware accelerators in and out this
way needs a unit that does the following on request:

1. find the partial bitstream of the wanted accelerator;
2. stream it into the ICAP as fast as the ICAP accepts data;
3. report when it is done.

The PRMU (Partial Re-configuration Management Unit) is that unit. It has a
small control interface for the processor's arbiter. The bitstream can come
from either of two places:

* on-chip block RAM, for small and frequently used bitstreams;
* off-chip memory on the processor local bus (PLB), for everything else.

With the ICAP clocked at 50 MHz and taking a byte per clock, the unit writes
one byte per clock. That is the ICAP's full 50 MB/s. No processor moves data
on the way.

The RTL is generic in its widths. Setting `ICAP_W = 32` gives the 32-bit ICAP
of Virtex-4 devices.

There are two levels of top module:

* `prmu_top` is the unit with its memories, ready to connect to a processor
  system.
* `xup_test_top` places it in a small board test system. That system has two
  swappable test modules, push buttons and LEDs, and is the outermost top.

## How a re-configuration runs

```
arbiter --start_op,set,mc_address--> PRMU --> selector --> [hs_reg] x CHAIN_STAGES --> reconfig unit --> ICAP
                                       |          ^  ^
                                       |   on-chip   off-chip
                                       |   repo if   repo if <-- FIFO <-- bus master port (PLB)
                                       |      ^
                                       |     BRAM
```

1. The arbiter raises `start_op` and `set` for one clock, with the bitstream
   address on `mc_address`. `set` low means "execute", not "configure", and the
   request is ignored. A request that arrives while a run is in progress is
   also ignored.
2. The repository selector decodes the top address bit:
   * 0 means on-chip; the lower bits are a 32-bit word address in the block RAM.
   * 1 means off-chip; the lower bits are a 64-bit bus word address.

   The selector then pulses that repository's `select`.
3. The repository reads the bitstream's length header and reports it on its
   length port. This is its initialisation phase. It then offers the bitstream
   words on a handshaking port, like a FIFO that is only read.
4. The re-configuration controller stores the length. It then writes byte after
   byte into the ICAP until it has written `4 x length` bytes. Then it pulses
   `end_op`.

With the on-chip repository, the ICAP never busy and one chain stage, the run
takes `bytes + 5` clocks from `start_op` to `end_op`:

* 3 clocks of header read;
* 1 clock through the handshaking register;
* 1 clock to register `end_op`.

The end-to-end testbench measures a 19136-byte bitstream at 19141 clocks. The
reference implementation reported 19134 bytes in 19143 clocks.

## Bitstream storage format

Each stored bitstream starts with a 64-bit length: the number of 32-bit
bitstream words that follow. The bitstream words follow it in the order the
vendor tools produce them.

| repository | address unit | header | data |
|---|---|---|---|
| block RAM (32-bit) | 32-bit word | two words: upper half, then lower half | one bitstream word per RAM word |
| off-chip (64-bit bus) | 64-bit word | one bus word | two bitstream words per bus word, the earlier one in bits 63:32 |

Within each 32-bit word the byte in bits 31:24 goes to the ICAP first. Within
each byte the bit order is reversed on the ICAP pins: bitstream bit 7 drives
pin 0. The Virtex-II Pro ICAP expects this.

## The handshaking chain

Everything between a repository and the ICAP uses one protocol. `valid` says
the data is present. `ack` says the receiver takes it in this clock. The
transfer happens on a clock edge where both are high. A source may not change
its data while `valid` is high and `ack` is low. The receiver may hold `ack` low
to pause the stream, for example while the ICAP is busy.

* **`hs_reg`** is one pipeline stage of this protocol. It loads when it is
  empty or when its content is being taken downstream
  (`enable = !valid_next || ack_next`), and `enable` is its `ack` upstream. So a
  chain of these registers moves one word per clock. The only cost is one clock
  of latency per stage. `prmu` puts `CHAIN_STAGES` of them (default 1) between
  the selector and the re-configuration unit. This is where a unit that edits
  bitstreams on the fly would go, for example one that relocates a module by
  rewriting frame addresses.
* **`width_adapter`** turns one wide word into `IN_W/OUT_W` narrow sub-words.
  It has a sub-word counter and a multiplexer, and no data register. The
  sub-word on the output is selected from the input word by the counter. Each
  narrow `ack` advances the counter. The `ack` of the last sub-word is passed
  upstream in the same clock, so the next wide word is consumed without a
  bubble.

Because no stage adds a bubble, the chain's throughput is set only by the ICAP
and by the repository.

## Re-configuration unit

`reconfig_unit` is a width adapter (32 to 8 bits) followed by
`reconfig_controller`.

The controller has four states:

| state | what happens |
|---|---|
| Idle | waits for `start` |
| Init | waits for the repository's `length_valid` and stores the length |
| Normal | writes bytes to the ICAP |
| Abort | lets the abort sequence generator drive the ICAP |

In Normal, a byte is acknowledged upstream and written to the ICAP in the same
clock when all of these hold:

* it is valid;
* `BUSY` is low;
* the byte counter has not reached `4 x length`.

The ICAP's active-low `CE` is the inverse of that acknowledge. `WRITE` stays low.
So the ICAP sees CE only in clocks where it really takes a byte. BUSY stalls the
whole chain for exactly as long as it lasts.

When the counter equals `4 x length`, the controller goes back to Idle and
pulses `end_op`. A length of 0 finishes at once.

`abort_req` during Normal switches the ICAP multiplexer to **`abort_seq_gen`**.
That block does the following:

1. keeps CE low with WRITE low for one clock;
2. raises WRITE while CE stays low (this is the abort condition);
3. reads `STATUS_BYTES` status bytes from the ICAP output, one per clock in
   which BUSY is low;
4. releases CE.

The controller then returns to Idle and pulses `end_op` with `aborted` high.
The status word is on `status`.

The ICAP records the byte on its pins in the clock of step 1 as a write. That
byte is zero.

## Off-chip repository

`offchip_repo_if` is a bus master with one request outstanding at a time. Its
port is `m_req`, `m_addr`, `m_len`, `m_gnt`, `m_rdata` and `m_rvalid`. The
request is held until the grant. The transfer is taken on the edge where
`m_req` and `m_gnt` are both high. Then `m_len` data beats arrive on
`m_rvalid`. A small adapter to the PLB IP interface or another bus belongs
outside.

On `select` the interface does the following:

1. clears the FIFO;
2. reads the length word with a one-beat transfer and writes it into the FIFO;
3. computes from the length the number of 16-beat bursts,
   `ceil(length / 32)`;
4. fetches those bursts from the following addresses.

A burst is requested only when the FIFO has room for all 16 beats. The default
FIFO holds 32 bus words, two bursts, so one burst can be in flight while the
other drains. The bus can then never overrun the FIFO, and the FIFO needs no
flow control towards the bus.

The output side works as follows:

* It takes the first FIFO word as the length.
* It splits the following words into 32-bit words, upper half first, through
  an internal `width_adapter`.
* It stops offering words after `length` of them. Padding at the end of the
  last burst is read and thrown away.

A `select` while beats are still due lets them arrive and drops them. It then
starts again cleanly. This handles a new request right after an abort.

## Top level and ports

`prmu_top` is the PRMU together with the memories it works with:

* `bram_sp`: 16K x 32 bits, 64 KB, the on-chip repository;
* `sync_fifo`: 32 x 64 bits, the off-chip buffer.

| group | ports |
|---|---|
| arbiter | `start_op`, `set`, `mc_address[23:0]` in; `end_op` out (one-clock pulse) |
| abort and status | `abort_req` in; `aborted`, `status[31:0]`, `status_valid` out |
| block RAM load | `load_en`, `load_addr[13:0]`, `load_data[31:0]`: writes one word per clock and has priority over PRMU reads; use it only while no on-chip run is active |
| bus master | `m_req`, `m_addr[23:0]`, `m_len[4:0]` out; `m_gnt`, `m_rdata[63:0]`, `m_rvalid` in |
| ICAP | `icap_ce_n`, `icap_write_n`, `icap_i[7:0]` out; `icap_busy`, `icap_o[7:0]` in |

All logic runs on `clk`. `rst` is synchronous and active high.

## Parameters

Defaults are in `prmu_pkg`.

| parameter | default | meaning |
|---|---|---|
| `ADDR_W` | 24 | bitstream address from the arbiter; the top bit selects the repository |
| `WORD_W` | 32 | bitstream word |
| `ICAP_W` | 8 | ICAP data width (32 for Virtex-4) |
| `LEN_W` | 64 | length header |
| `BRAM_AW` | 14 | block RAM address bits (16K words) |
| `BUS_W` | 64 | bus data width |
| `BURST` | 16 | beats per burst |
| `FIFO_DEPTH` | 32 | FIFO entries (two bursts) |
| `CHAIN_STAGES` | 1 | handshaking registers between selector and re-configuration unit |
| `STATUS_BYTES` | 4 | status bytes read during an abort |

## Board test system

`xup_test_top` wraps `prmu_top` in a small system for a development board with
four push buttons, a DIP switch and four LEDs. The FPGA is split into two
parts.

**The fixed part** holds these blocks:

* the PRMU, with both test bitstreams in its block RAM;
* `stimuli_gen`: a 4-bit test vector that steps on each press of `btn_next`;
* `reconfig_initiator`: plays the arbiter. A press of `btn_rm1` or `btn_rm2`
  sends one re-configuration request, for the bitstream at `BS1_ADDR` (0) or
  at `BS2_ADDR` (0x2000). The initiator then ignores the buttons until
  `end_op`. `reconfig_busy` shows that wait.
* `led_mux`: shows the result of the slot (`dip_show_result = 1`) or the
  stimuli (`dip_show_result = 0`).

**The re-configurable slot** holds one of two test modules:

* `prm_logic`, combinational. On stimuli `{a,b,c,d}` it returns:
  * `a&b&c&d`;
  * the same AND written with De Morgan's law;
  * `a|b|c|d`;
  * the same OR written with De Morgan's law.

  A correctly loaded module therefore always shows LED pairs 3/2 and 1/0 equal.
* `prm_counter`: a 4-bit counter that advances once per press of `btn_count`.

On the chip, whichever module's bitstream was written last is the slot
content. No logic selects it. In RTL both modules exist. The input
`slot_module` plays the part of the configuration memory (0 = logic module,
1 = counter), and a testbench drives it from what reached the ICAP.

Other simplifications in this system:

* The slot boundary crossings, which are fixed routing macros on the device,
  are plain wires here.
* Buttons are expected to be debounced already.
* The off-chip bus port of the PRMU is tied idle.
* There is no abort source.

## Sizes and rates

* **Block RAM size.** A 64 KB block RAM holds two typical slot bitstreams of
  19 kB and 23 kB together, with their headers.
* **Full-slot bitstreams.** A bitstream for a quarter of an XC2VP30 can reach
  about 366 KB. That is more than the device's entire block RAM, so such
  bitstreams belong in the off-chip repository.
* **Off-chip address space.** The top address bit selects the repository, which
  leaves 2^23 bus words (64 MB) of address space off chip.
* **Throughput.** One byte per clock: 50 MB/s at 50 MHz. With `ICAP_W = 32` it
  is one 32-bit word per clock, 400 MB/s at 100 MHz. The logic was reported to
  close at about 100 MHz on a Virtex-II Pro. Timing is not checked here.

## Choices this RTL makes

These points are not fixed by the original description of the unit. They are
choices of this RTL:

* Bit 23 of the address selects the repository.
* The two-word header in block RAM stores its upper half first.
* The bus master port is simplified.
* Bursts are always 16 beats, with the tail padding dropped.
* The exact abort waveform, and the 4-byte status read-back.
* `end_op` also pulses after an abort.
* Reset is synchronous. The surrounding processor framework names an
  asynchronous global reset, so an external reset synchroniser is expected.
* Requests that arrive during a run are ignored.
* The sub-word order is most significant first.
* The block RAM has a load port.
* The original state diagram has a separate Reset state that leads to Idle. In
  this RTL the synchronous reset puts the controller straight into Idle.
* An abort is honoured only during Normal re-configuration. A request during
  Init is ignored; at that point nothing has been written to the ICAP yet.
* The start request goes to the re-configuration controller as well as to the
  repository selector. The controller then enters Init in the same clock in
  which the repository starts reading its header.

Every module's header comment lists its own choices.

Not included:

* the processor and its arbiter;
* the PLB, its IP interface and DDR memory;
* the ICAP hard block itself.

`tb/icap_model.sv` and `tb/plb_mem_model.sv` model the ICAP and the bus memory
for simulation.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it does |
|---|---|
| `tb_hs_reg`, `tb_width_adapter` | random valid and ack patterns against a reference queue; checks full rate when nothing stalls |
| `tb_reconfig_controller`, `tb_reconfig_unit` | byte stream, bit swap, CE and BUSY behaviour, cycle counts, abort and status |
| `tb_abort_seq_gen` | the abort waveform and the status read under BUSY |
| `tb_repository_selector`, `tb_onchip_repo_if`, `tb_bram_sp`, `tb_sync_fifo`, `tb_offchip_repo_if` | selection, header handling, end pointer, FIFO order and flags, burst rules (never a burst without room, padding dropped, restart) |
| `tb_prmu` | the core in a reduced configuration (1K-word RAM, two chain stages); 56 runs alternating repositories, with edge lengths (1, 2, 31, 32, 33, 64 words), random ICAP busy, bus gaps, late requests and aborts |
| `tb_prmu_top` | the full-size top at default parameters; details below |
| `tb_prmu_virtex4` | `prmu_top` with a 32-bit ICAP at 100 MHz: 4784 words in 4789 clocks on chip, 3000 words in 3012 clocks off chip, i.e. 400 MB/s |
| `tb_prm_logic`, `tb_prm_counter`, `tb_stimuli_gen`, `tb_led_mux`, `tb_reconfig_initiator` | test-system parts: the full truth table, one step per press, mux select, one request per press and none while busy |
| `tb_xup_test_top` | the board system at default parameters, driven only through its board pins; details below |

`tb_prmu_top` takes the full-size top through these runs:

1. a 19136-byte bitstream at full speed, with an exact cycle count;
2. a 23552-byte bitstream stored directly after it;
3. a bitstream after a gap, with the ICAP busy and a second request during the run;
4. an execute request;
5. an off-chip bitstream with bus gaps and ICAP busy;
6. an abort of an off-chip run, followed by a clean run.

It counts ICAP stalls, burst hold-backs, aborts, ignored requests and use of
both repositories. If any of them never happened, it counts a failure.

`tb_xup_test_top` drives the board system through its board pins only. It
loads the two bitstreams (19136 and 23552 bytes) and runs this sequence:

1. Press "module 1". The testbench checks every byte at the ICAP and the clock
   count: 19142 clocks from the press to the end.
2. Step through all 16 stimuli. The LEDs are checked in both DIP positions,
   against the truth table.
3. Load module 2 while pressing "module 1" during the run. That press must be
   ignored.
4. Count 20 presses on the counter module.

Each mechanism must have happened at least once.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/prmu_pkg.sv tb/tb_prmu_top.sv --top-module tb_prmu_top -o sim
./obj_dir/sim
```
