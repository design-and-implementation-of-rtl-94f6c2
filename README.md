# AHB-MC: an AMBA AHB controller for external SRAM and ROM

Processors have become fast much more quickly than memories, so the path from
the system bus to external memory limits the whole system. AHB-MC is an
AMBA 2 AHB slave that connects a processor to static memory: up to four banks
of SRAM or ROM that share one 32-bit address/data bus. Three ideas make it
more than a bus-to-pin adapter:

* **Bursts instead of wait states.** An AHB burst is turned into one memory
  command. The memory side fetches every beat of the burst at once into a
  FIFO. Only the first beat pays the memory latency; later beats come from the
  FIFO.
* **RETRY while data is being fetched.** The first beat of a read is answered
  with RETRY, which frees the bus for other masters. When the master repeats
  the transfer, the data is already waiting.
* **Two clock domains.** The memory interface runs on its own clock. The AHB
  side can then change speed (to save power, say) while the memory timing
  stays fixed. Asynchronous FIFOs carry commands, write data and read data
  between the two domains.

Per-chip timing registers, reached over APB through a second AHB port, set
how many wait states each bank needs.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It is checked with
Verilator and with Yosys' slang front end.

## Block structure

```
              AHB clock (hclk)                 |   memory clock (mclk)
                                               |
 AHB  ──► ahb_slave_if ──► cmd FIFO ─────────────────► ext_mem_if ──► XA, XD,
 memory   (mem_decode,  ──► write-data FIFO ─────────►  (state machine,    XCSN[3:0],
 port      wen_gen)     ◄── read-data FIFO  ◄─────────   wait counters)    XOEN, XWEN[3:0]
                                               |            ▲
 AHB  ──► ahb2apb_bridge ──APB──► cfg_if ──toggle + copy────┘
 config                         (SETCYCLE, SETOPMODE,       per-chip CYCLE/OPMODE
 port                            CHIPn CYCLE/OPMODE)
```

| file | role |
|---|---|
| `rtl/ahb_mc_pkg.sv` | AHB encodings, command word, write-data entry, CYCLE/OPMODE layouts, burst helper functions |
| `rtl/ahb_mc_top.sv` | the controller: wires the blocks below together |
| `rtl/ahb_slave_if.sv` | AHB memory port: burst translation, RETRY and prefetch, write posting, ERROR |
| `rtl/mem_decode.sv` | bank select and boot remap |
| `rtl/wen_gen.sv` | byte strobes from HSIZE and the address |
| `rtl/async_fifo.sv` | dual-clock FIFO, used three times |
| `rtl/sync_2ff.sv` | two-flip-flop synchronizer |
| `rtl/ext_mem_if.sv` | external bus state machine and per-chip timing |
| `rtl/ahb2apb_bridge.sv` | AHB configuration port to APB |
| `rtl/cfg_if.sv` | APB registers and their copy into the memory clock domain |

The top has two parameters:

* `FIFO_DEPTH` (16) is the depth of all three FIFOs. It is enough for the
  longest AHB burst.
* `RETRY_EN` (1) selects RETRY for reads. With 0, a read waits with HREADYOUT
  low instead.

## Memory map and remap

The bank comes from HADDR[29:28], so banks start every 256 MiB:

| bank | base | default contents |
|---|---|---|
| 0 | 0x0000_0000 | SRAM |
| 1 | 0x1000_0000 | SRAM |
| 2 | 0x2000_0000 | SRAM |
| 3 | 0x3000_0000 | boot ROM |

A processor fetches its first instruction at address 0. While the `remap`
input is low, region 0 therefore goes to the boot ROM in bank 3. Once
software raises `remap`, region 0 is SRAM bank 0. The `ROM_BANKS` parameter
of `mem_decode` says which banks are ROM.

A write to a ROM bank gets the two-cycle ERROR response and reaches no pin.

XA carries the byte address: HADDR[30:0] with the bank bits set to the
selected bank. Each bank is built from four byte-wide chips, one per byte
lane of XD. The chips take their address from XA[n+2:2], and XWEN[k] enables
lane k, so byte and half-word writes touch only their own chips. Lanes are
little-endian: address offset 0 is on XD[7:0].

## AHB slave interface: bursts, RETRY and prefetch

This is the hardest part of the design. `ahb_slave_if` makes one command per
memory burst:

* SINGLE is one beat.
* INCR4/8/16 and WRAP4/8/16 keep their length and wrapping.
* An undefined-length INCR becomes an INCR4. If the master goes on past four
  beats, the next SEQ beat issues another INCR4 from that address.

The command word is defined in `ahb_mc_pkg`. It holds write, bank, rom,
address, size, beat count and wrap.

**Reads.** When a read's first beat (NONSEQ) finds nothing prefetched, the
slave:

1. pushes the command;
2. answers with a two-cycle RETRY;
3. remembers the address, size and burst type.

The memory side then fills the read-data FIFO with every beat. When the
master repeats the same transfer, each beat is served from the FIFO. Wait
states appear only while a beat has not yet arrived. Later beats of a burst
never get RETRY, which the AHB rules forbid.

Two cases leave stale beats behind:

* a different transfer arrives first;
* an INCR read stops before its four beats are used.

The stale beats are drained from the FIFO before the next transfer is served,
with that transfer held in wait states meanwhile.

**Writes.** Writes are posted. Each beat's data and byte strobes go into the
write-data FIFO with no wait state while the FIFO has room; the command goes
into the command FIFO. If a write burst ends before the beats its command
announced, the slave adds padding entries with all strobes zero. The memory
side runs through them without asserting XWEN. Padding runs in the
background: it holds up only the next transfer that needs a new command.

IDLE and BUSY transfers get a zero-wait OKAY. HSIZE up to a word is
supported. Read data is always the full word; the master picks its lanes.

States, in the data phase:

* IDLE;
* CMD_GEN: the first beat;
* WR_RAM_WAIT, RD_RAM_WAIT, RD_ROM_WAIT: waiting for FIFO room or data;
* WR_SEQ, RD_SEQ: later beats;
* RETRY2, ERROR2: the second response cycle.

## Clock crossing

`async_fifo` is a FIFO with Gray-coded read and write pointers, each one bit
wider than the address. Each pointer crosses to the other clock through
`sync_2ff`, a pair of flip-flops that gives a metastable first stage a whole
period to settle. Full and empty are pessimistic: a slot freed on the far
side shows up two to three clocks later. The read port is first-word
fall-through.

The three instances have these widths:

* commands: 43 bits;
* write data: 36 bits (32 data + 4 strobes);
* read data: 32 bits.

The timing registers cross by a different method. Each register load flips a
toggle bit. The toggle passes through `sync_2ff`, and when the memory side
sees it change, it copies all chip registers, which have been stable for two
memory clocks by then. Two loads must therefore be a few memory clocks apart.
Any APB write sequence at similar clock rates meets this.

Resets: `hresetn` and `mresetn` are active-low and asynchronous, one for each
domain. Assert both together.

## Configuration registers

The configuration port is a second AHB slave on the same bus. It shares the
address, control and write-data inputs and has its own HSEL, HREADYOUT, HRESP
and HRDATA. `ahb2apb_bridge` turns each transfer into an APB setup cycle and
access cycle, with PCLK = HCLK, so each access costs one AHB wait state.
`cfg_if` decodes PADDR[4:2]:

| offset | name | access | fields |
|---|---|---|---|
| 0x00 | SETCYCLE | RW | [3:0] rd_wait, [7:4] wr_wait, [11:8] seq_wait |
| 0x04 | SETOPMODE | RW | [0] burst_en, [5:4] chip; a write loads that chip |
| 0x10 + 4n | CHIPn_CFG | RO | [11:0] CYCLE, [16] burst_en of chip n |

To program a chip:

1. write its timing into SETCYCLE;
2. write SETOPMODE with burst_en and the chip number.

One PCLK later, that chip's CYCLE and OPMODE take the two values.

All chips reset to two read and two write wait states and seq_wait 2, with
burst_en off (CYCLE = 0x222).

## External bus timing

`ext_mem_if` takes one command at a time:

* IDLE pops the command.
* CMD_RECV1 loads the bank's timing.
* CMD_RECV2 loads the counters.
* Then comes one data state per beat: WR_DATA, RD_RAM_DATA or RD_ROM_DATA.
* Each data state is followed by one LAST_ADDR cycle.

All times are in memory clocks.

* **Read beat.** XCSN[bank] and XOEN are low for `wait+1` clocks with XA
  valid. XD is sampled into the read-data FIFO at the last of them. XOEN then
  goes high for the LAST_ADDR clock, while XCSN stays low. `wait` is rd_wait
  for the first beat. For later beats it is seq_wait when the bank's burst_en
  is set, else rd_wait.
* **Write beat.** XD is driven (xd_oe high). XWEN is low on the strobed lanes
  for `wr_wait+1` clocks. Address and data are held for one more clock after
  XWEN rises.

So a beat takes `wait+2` clocks. At reset (two wait states), XOEN is low for
3 clocks per beat. At zero wait states, it is low for 1. Burst addresses step
by HSIZE and wrap for WRAP bursts.

The data bus is split into `xd_out`, `xd_oe` and `xd_in`, for a pad cell or a
board-level tristate to combine. XOEN is high whenever no read is in progress.

## Where this RTL departs from its source description

The original description of AHB-MC gives the block partition, the state names
of the two state machines, the burst translation rule, RETRY during
prefetch, the 16-beat FIFOs, the two clock domains with two-flop
synchronizers, the boot ROM at 0x3000_0000 with remap, XCSN bank selection,
byte write enables, and the SETCYCLE/SETOPMODE/CYCLE/OPMODE registers. The
following points are this design's own or differ:

* **Read latency.** The original shows a zero-wait ROM read completing within
  one HCLK cycle. A design with FIFOs between two clock domains cannot do
  that. Here a zero-wait single read is RETRYed once and completes in about
  13 HCLK cycles at HCLK 100 MHz and memory clock about 71 MHz. The win comes
  from bursts: later beats arrive one per `seq_wait+2` memory clocks.
  Zero-wait writes are posted with no AHB wait state, as described.
* **Configuration clock.** The original places the configuration interface
  in the memory clock domain. Here its APB registers run on HCLK, and only a
  copy of the per-chip registers lives on the memory clock.
* **Register layout.** The register names come from the original. The
  fields, offsets and the chip field in SETOPMODE are assumed.
* **Additions of this design:** seq_wait and burst_en as the meaning of
  "sequential access" timing; cycle-level timing inside each external-bus
  state; repeat matching and draining of prefetched data; write padding;
  ERROR on ROM writes; the 256 MiB bank spacing; little-endian byte lanes.
* **Not included:** the external SRAM and ROM chips, the on-chip SRAM and
  the processor of the surrounding system. The testbenches model the memories
  and the bus master. Data width is 32 bits only.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops through a watchdog if it hangs.

Shared models:

* `ahb_master_bfm.sv` is a pipelined AHB master. It obeys RETRY and ERROR
  and can insert a BUSY cycle.
* `ext_mem_model.sv` models four banks of SRAM and ROM. It counts bus rule
  violations: XOEN and XWEN low together, a write while the controller does
  not drive XD, and two chip selects low at once. ROM banks ignore writes.
  ROM word w of bank b reads `0xA000_0000 | b<<24 | w*0x0001_0003`.

`tb_ahb_mc_top` runs the whole controller at its default parameters, with
HCLK at 10 ns and the memory clock at 14 ns. It covers:

* boot from ROM, then remap;
* every burst type, narrow writes, INCR continuation, BUSY, and INCR bursts
  cut short;
* stale prefetches, a long RETRY gap that fills the read-data FIFO, and
  back-to-back writes that fill the command and write-data FIFOs;
* random single transfers;
* reprogramming a chip's timing, including XOEN pulse lengths and read-back.

Read data is compared against a reference image of the memories. The test
counts each mechanism and fails if one never happens: RETRY, drain, padding,
ERROR, INCR continuation, wrapping command, each FIFO full, configuration
copy, burst timing, narrow write, BUSY, and ROM and SRAM reads.

`tb_ahb_mc_noretry` builds the controller with `RETRY_EN = 0` and a memory
clock five times faster than HCLK. It checks three things:

* no transfer is ever RETRYed;
* the first beat of every read is held with wait states;
* later beats already in the FIFO come back with no wait state.

Stale prefetches must also be drained. Read data is checked as in the main
test.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ahb_mc_pkg.sv tb/tb_ahb_mc_top.sv --top-module tb_ahb_mc_top
./obj_dir/Vtb_ahb_mc_top
```

The other testbenches are `tb_ahb_mc_noretry`, `tb_ahb_slave_if`, `tb_ext_mem_if`, `tb_cfg_if`,
`tb_ahb2apb_bridge`, `tb_async_fifo`, `tb_sync_2ff`, `tb_mem_decode` and
`tb_wen_gen`. Build them the same way. Include `rtl/ahb_mc_pkg.sv` first
wherever a design file imports it. Verilator finds the other modules through
`-Irtl -Itb`.
