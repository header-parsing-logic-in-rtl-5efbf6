# Reconfigurable header-parser chains

A switch port has to take every incoming packet apart before it can decide
where to send it. It does this with a chain of parser stages. Each stage
handles one level of encapsulation, such as Ethernet, then VLAN, then IP.
A stage reads its header, reports the fields it found, strips the header
and hands the rest of the packet to the next stage.

A chain built for a fixed set of protocols cannot handle a new one. The
hardware here lets the chain rebuild itself while it runs. A stage reports
the type field (EtherType) of every packet it sees. If the next stage is not
set up for that type, but a parser for it exists in external memory, the
next stage is reprogrammed from that memory. Packets keep flowing during
the change.

Two ways of reprogramming a stage are built side by side, behind one host
interface:

* **Fine-grained chain.** Each parser is plain logic inside a region of the
  FPGA. The region is rewritten with a partial bitstream through the
  device's internal configuration port (ICAP). While a region is empty or
  being rewritten, its wrapper routes packets around it.
* **Coarse-grained chain.** Each stage is a fixed *parser processor*. A
  small programmable compare-and-extract core does the parsing. Changing
  the protocol means loading a new 128-bit image into the core, plus a
  12-bit setting for the interconnect between the processors. Both take
  tens of clock cycles. A partial bitstream takes tens of thousands.

The design targets a Virtex-5 board. The host is a PC that talks over the
board's 32-bit "MainBus", and partial bitstreams and core images are kept in
DDR2 memory. Two pieces are vendor parts and are not in this RTL: the DDR2
controller core and the ICAP primitive. Their signals are ports of the top
level, `hp_top`.

## Block map

```
 MainBus (mb_clk)         parser clock (clk), DDR2 side on ddr_clk        icap_clk
 ───────────────    ──────────────────────────────────────────────────    ────────
 mainbus_if ──FIFO──> chain_entry ──┬─> parser_wrapper(l2_parser) ─> parser_wrapper(l2_parser) ─┐
     │  ▲                           │        │ trigger                      ▲ cfg_start/cfg_set   │
     │  │                           │        └──────> icap_ctrl ──lane FIFOs──> ICAP port          ├─> out
     │  │                           │                   │  cam                                   │
     │  │                           └─> pnet ─> parser_proc(small) ─┐                            │
     │  │                                  └─> parser_proc(large) ──┴─> pnet output ─────────────┘
     │  │                                       ▲ images/net cfg
     │  │                         coarse_cfg_ctrl(cam) ─> coarse_prog
     │  │                                │               │
     │  └── info read ── mmu <── info buses of the two stages of the selected chain
     └── DDR2 commands ──> ddr2_bridge <── ddr2_client_cdc <── reads from icap_ctrl, coarse_cfg_ctrl
                                 │
                         DDR2 controller core (ports)
```

`chain_sel`, a static input, chooses which chain gets the packets. The same
input chooses whose info the MMU records. In the original work the two chains
were two separate FPGA images; here they share one framework so that both
can be simulated from one top level.

There are four clock domains:

* `mb_clk` for the MainBus;
* `clk` for the parser chains and the two configuration controllers;
* `ddr_clk` for `ddr2_bridge` and the DDR2 controller core's application
  port;
* `icap_clk` for the configuration port.

Every crossing uses `async_fifo`, a dual-clock FIFO with Gray-coded
pointers. The controllers reach the bridge through `ddr2_client_cdc`. This
helper carries a read address across in one FIFO and the two returned
128-bit halves back in another.

## The parser bus

All stages, wrappers and the interconnect use one bus. Its type is
`pbeat_t` in `hp_pkg`:

| field  | width | meaning |
|--------|-------|---------|
| `data` | 64    | packet bytes, first byte in bits 63:56 |
| `sop`  | 1     | first beat of a packet |
| `eop`  | 1     | last beat of a packet |
| `sz`   | 3     | valid bytes in the `eop` beat, 0 = 8 |

A sender raises `srdy` (SR) and a receiver raises `drdy` (DR). A beat moves on
every rising edge where both are high. A stage *strips* whole beats: the
beats it consumed never reach its output. The first beat it passes gets a
fresh `sop`, so every stage sees its own header starting at beat 0. A
stage's results leave on a 256-bit info bus with a length in bits
(`info_vld`, `info`, `info_len`). The type field it checked leaves on
`etype_vld`/`etype`.

`pb_skid` is a one-entry register slice. It is used at the sinks of the
interconnect.

## Fine-grained chain

### Wrapper (`parser_wrapper`)

A reconfigurable region can only be connected through a fixed set of ports,
so each one sits inside a wrapper. The wrapper has three jobs:

1. **Bypass.** While the region is unconfigured, or being written, the
   wrapper connects `rx` straight to `tx` in both directions (data and
   `srdy` forwards, `drdy` backwards). It also masks the region's info
   outputs. The switch only happens between packets, so a packet is never
   split between the two paths.
2. **Type register.** This register holds the EtherType the region is
   configured for, and is zero while the region is empty. `cfg_start`
   clears it and turns the bypass on. `cfg_set` loads the new type.
3. **Trigger.** A small pre-parser takes bits 31:16 of beat 1 of every
   packet entering the wrapper, which is the Ethernet type field. It then
   pulses `trig_v`.

The region holds `l2_parser`, the Ethernet parser. It consumes beat 0, reports
the destination and source MAC addresses (96 bits) and the EtherType, and
passes the rest of the packet from beat 1 on. The first wrapper is built
configured, with `RESET_TYPE` set. The second starts empty.

The description this design follows does not give the logic of any parser
other than the level 2 one. So the second region, once "configured", holds
another `l2_parser`; only its type register changes. This is where the
model stands in for real partial reconfiguration: the bytes go to the ICAP
port, and the region behaves as if they had been loaded.

### Configuration-port controller (`icap_ctrl`)

This is the hardest block to follow, because it spans two clock domains.

*Memory side (`clk`).* A trigger from stage 0 is compared with stage 1's type
register. If they differ and the type is non-zero, it is looked up in an
EtherType `cam` of `CAM_DEPTH` entries. On a miss the type is unsupported and
nothing happens. On a hit, with CAM index *k*, the controller does three
things:

* it pulses `cfg_start` to stage 1;
* it reads the bitstream starting at 256-bit word *k*·2^`SLOT_LOG2`;
* it reads one 256-bit word at a time, and each word arrives as two 128-bit
  beats, low half first.

Each beat is spread over four 32-bit lane FIFOs, with bits 31:0 going to
lane 0. The next word is read only once the port side has drained
everything read so far. No more words are read once the end of the
bitstream has been seen, or after `MAX_READS` words.

*Port side (`icap_clk`).* A six-state machine runs it:

| state | leaves to | condition |
|-------|-----------|-----------|
| Idle | DataWait | a CAM hit was signalled |
| DataWait | Write1 | lane FIFOs not empty |
| DataWait | Idle | end of bitstream seen, or `TOUT` cycles without data |
| Write1..Write4 | next Write | writes lane 0..3, one word per cycle |
| Write4 | Write1 / DataWait | more data / none yet |

`icap_wr_n` is tied low, so the port always writes. `icap_ce_n` is low only
in a cycle that writes a word. Each word is bit-reversed within each byte,
which is the order the Virtex-5 configuration port expects. The end of a
bitstream is recognised by the DESYNC command: the word `0x30008001`
followed by `0x0000000D`, as stored in memory, before the swap. Words after
it are dropped.

When the port side is back in Idle, the memory side ends the
configuration. If DESYNC was seen, it pulses `cfg_set` with the new type and
counts `n_ok`. On a timeout it counts `n_fail`, and the region stays in
bypass. The port's status output is registered and brought out as
`icap_status`.

## Coarse-grained chain

### Parser processor (`parser_proc`)

A processor wraps a core in a fixed state machine:

| state | what happens |
|-------|--------------|
| OFF   | unconfigured or switched off; `rx_drdy` low |
| PROG  | collects 128-bit images as two 64-bit chunks, low half first; keeps the one whose PID field matches its own `PID` |
| INIT  | one cycle; derives the strip count, then goes to IDLE or OFF as `sup_on` says |
| IDLE  | waits for a `sop` beat |
| PARSE | consumes the first *strip* beats of the packet |
| PASS  | sends the rest on with a fresh `sop` |

`sup_prog` and `sup_on` are supervisor pins and override everything else.
When the core's check fails, the processor stops stripping. The failing beat
and everything after it go out unchanged, so an unsupported packet is
forwarded, not lost. In `hp_top`, processor 0 (PID 1) holds a small core and
processor 1 (PID 2) a large core.

### Small core (`small_core`, image `small_cfg_t`)

A field is given as *(count, shift, width)*:

* *count* is the beat index from the start of the packet;
* *shift* is the bit offset above the beat's low end;
* *width* is the width in bits, with 0 meaning 64.

The core compares one type field with the stored EtherType. It returns up to
two groups R1 and R2, each running from a start field to an end field. When
the end lies in a later beat, the whole beats in between are returned too.
The groups are packed into `info`, right-aligned. With `IG = 1` the
extraction is unconditional. With `IG = 0` a type mismatch raises the
error, and nothing is returned.

`TotalCount` sets how many beats the processor strips. `ENState` and
`EPState` set the state the processor enters after parsing, when the
packet continues or when it ends early. IDLE, PASS and OFF are honoured;
other codes mean IDLE.

| bits | field | bits | field |
|------|-------|------|-------|
| 127:124 | EPState | 103:96 | TotalCount |
| 123:120 | ENState | 95:80 / 79:64 | RE2 / RS2 |
| 111:108 | PID | 63:48 / 47:32 | RE1 / RS1 |
| 104 | IG | 31:16 | type field (count 4, shift 6, width 6) |
| | | 15:0 | EtherType |

### Large core (`large_core`, image `large_cfg_t`, with `clu`)

The large core adds a second check. It pulls two values V1 and V2 from the
packet. The comparator logic unit (`clu`) compares V1 against V2, SetValue1
and SetValue2. Each comparison is masked off or made "<", "=" or ">" by two
bits of the 6-bit `CLUOp`, and the three results are ANDed. For IPv4 this
checks that the header length lies within bounds and below the total length.

The core returns one group R. It strips the beats up to and including the
last one it reads a field from, and the processor always passes the rest.
Layout: PID 127:124, IG 123, CLUOp 122:117, SetValue2 116:106, SetValue1
105:90, V2 89:75, V1 74:60, RE 59:45, RS 44:30, type-field beat 29:28,
shift 27:22, width 21:16, EtherType 15:0. Field counts are 3 bits wide here.

### Interconnect (`pnet`)

`pnet` holds 12 configuration bits, four per sink:

* `[3:0]` selects the input of processor 0;
* `[7:4]` selects the input of processor 1;
* `[11:8]` selects the chain output.

Source code 0 is the chain input. Code 1+*k* is processor *k*. Any other code
connects nothing. The ready signal flows back to the selected source. At
reset the output takes the input, so both processors are skipped. Each sink
has a `pb_skid` register slice.

### Programmer (`coarse_prog`) and configuration controller (`coarse_cfg_ctrl`)

`coarse_cfg_ctrl` works like the memory side of `icap_ctrl`: a trigger, a
type check against the next processor, then its own CAM. Stage 0's type
triggers a reload of processor 1. The host can also trigger a load by type
(`cfg_trig_v`), which is how processor 0 gets its first image. A hit
selects a slot of 2^`SLOT_LOG2` words. The controller cuts each 256-bit word
into four 64-bit chunks and reads the next word only while the programmer
still wants data.

The programmer reads the stream as packets. A *utility packet* is one
64-bit chunk; its low 32 bits hold the following fields:

| bits  | content |
|-------|---------|
| 15:0  | `0xFFFF` |
| 19:16 | op: 1 = interconnect, 0 = images follow |
| 31:20 | op 1: the 12-bit interconnect setting |
| 27:20 | op 0: number of 64-bit image chunks that follow |

Two flows are accepted:

* op 1, then op 0, then the images;
* op 0, then the images.

Anything else cancels the flow, and the rest of the stream is ignored. During
op 0 the programmer holds `sup_prog` high and broadcasts the image chunks to
all processors. The interconnect setting is written only when the flow
completes, so a cancelled flow leaves the switches alone.

A full load of the chain used here has six chunks (384 bits):

* the interconnect packet;
* the length packet;
* two images of two chunks each.

That is two 256-bit reads.

## Host interface (`mainbus_if`, `chain_entry`, `mmu`, `ddr2_bridge`)

Address bit 31 (PS) of a MainBus transaction chooses the path:

* **write, PS = 0: packet data.** The 32-bit data word and the flags in the
  address go through a FIFO to `chain_entry`. The flags are SR 27, DR 26,
  SP 25, EP 24 and SZ 23:21. `chain_entry` packs two words into a beat, first
  word high, and offers it to the chain as if it were a stage.
* **write, PS = 1: DDR2 data.** The data is written at 32-bit word address
  30:0. The bridge uses the controller's two-cycle write with a mask chosen
  by `addr[2]`. The 256-bit word address is `addr[30:3]`.
* **read, PS = 1: DDR2 read-back.** An ordinary address starts a read.
  Addresses `FFFFFFFC`..`FFFFFFFF` then return bits 31:0 .. 127:96 of each
  returned 128-bit half, low half first.
* **read, PS = 0: system functions.** Bits 4:0 select the function:

  | code | function |
  |------|----------|
  | 00 | status |
  | 01 | last packet word |
  | 02 | version |
  | 03 | request info word; PR = bit 21 picks the stage, bits 20:12 the address |
  | 04 | upper half of that 64-bit word |
  | 05 | lower half of that 64-bit word |
  | 06 | last word written to the configuration port |

The status word is one of the following:

| status | meaning |
|--------|---------|
| `DA7A2EC1` | word passed to the chain |
| `DA7AFA2F` | word dropped, chain blocked |
| `DA7AB10C` | word dropped for another reason |
| `9E7AD2E5` | info request made |
| `ABADC0DE` | unknown operation |

`mmu` runs an Idle/Write/Read machine for each stage. On `irdy` it latches
the info and turns its length into a count of 64-bit words. It writes the
lowest 64 bits per cycle, shifting right, into that stage's block RAM of
`INFO_DEPTH` words. Writes take priority over host reads, and a read answers
one cycle later.

`ddr2_bridge` serves three clients, one command at a time: the fine
controller, then the coarse controller, then MainBus commands. Slot layout
in DDR2, in 256-bit words:

* fine-grained slot *k* starts at *k*·4096;
* coarse-grained slot *k* starts at *k*·16.

The host must therefore keep the two kinds of images in separate slots.

## Sizes

These are the defaults of `hp_top`:

| parameter | default | notes |
|-----------|---------|-------|
| `CAM_DEPTH` | 16 | EtherType entries per CAM |
| `FINE_SLOT_LOG2`, `FINE_MAX_READS` | 12, 4096 | 128 KB per partial bitstream |
| `COARSE_SLOT_LOG2`, `COARSE_MAX_READS` | 4, 16 | 512 B per coarse load |
| `INFO_DEPTH` | 512 | 64-bit words of info RAM per stage |
| `ADDR_W` | 30 | width of the DDR2 controller address |

A partial bitstream for one parser region is about 88 KB. That is about
2750 reads, derived from the reported configuration time of 55·10³
cycles at about 20 cycles per 256-bit read. The smallest reconfigurable
frame is 5904 B, or 185 reads. Both fit a slot. A full-device bitstream is
about 9.6 MB and does not fit; it is not a partial configuration anyway.

A coarse load of the two-processor chain needs two reads. The closed form
for *P* processors uses a read width of 256 bits and an image size of 128
bits:

* the switch settings take ⌈log₂(P+1)⌉ + P·⌈log₂P⌉ bits, which is 4 bits
  for P = 2 and 28 bits for P = 8;
* the images take ⌈P/2⌉ reads;
* the initial utility packet with its first image takes one more read.

A chain of eight processors is discussed as an extension. It cannot be
built with this `pnet`, which is fixed at two processors with 4-bit source
codes.

The clock rates of the original simulations were:

* coarse chain: programmer 210 MHz, DDR2 controller 250 MHz;
* fine chain: configuration port 157 MHz, controller 315 MHz.

They belong to the implementation and have not been checked for this RTL.

The two workload testbenches report what this RTL achieves:

* `tb_fine_workload` uses a 200 MHz memory side with an 8-cycle read
  latency and a 100 MHz port. Under those conditions it measures about
  188 MB/s, or 34 memory cycles per 256-bit read. The original reports
  about 250 MB/s in its own environment.
* `tb_coarse_workload` measures a coarse load in memory cycles:

  | load | switches | cycles |
  |------|----------|--------|
  | one core | without | 19 |
  | one core | with | 20 |
  | two cores | without | 35 |
  | two cores | with | 36 |

  The original reports 27 cycles for one core and 56 for a core with its
  interconnect setting.

## Where this RTL departs from the original description

* Both chains are in one top level, selected by `chain_sel`. The original
  built them as two separate FPGA images.
* The second fine-grained region always holds the level 2 parser. The
  description gives no other parser's logic. Reconfiguration changes only
  the region's type register and sends the bitstream to the ICAP port.
* The ICAP side detects the end of a bitstream by DESYNC, and gives up after
  `TOUT` idle cycles. How the original detected the end is not described.
* The field bit positions of the two core images, the end-state encodings,
  the chunk framing of utility packets and the `pnet` source codes are this
  design's choices. The description gives the fields and their sizes.
* The original names two DDR2 clocks, one for the interface logic and one
  inside the controller core. Here there is only `ddr_clk`, which runs the
  bridge and the core's application port.
* The MainBus SZ field of a packet word counts its valid bytes, with 0
  meaning all 4. In a 64-bit beat, 0 means all 8.
* The bus error signal, which the original left unused, is not built.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M` and has a watchdog.
The clock-crossing helper `ddr2_client_cdc` has its own testbench as
well. `tb/ddr2_model.sv` is a behavioural model of the DDR2 controller's
application port, with a fixed read latency. `tb_ddr2_bridge` and `tb_hp_top`
use it.

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps -Irtl \
  --top-module tb_hp_top rtl/hp_pkg.sv rtl/*.sv tb/ddr2_model.sv tb/tb_hp_top.sv
./obj_dir/Vtb_hp_top
```

(`rtl/hp_pkg.sv` must come first; listing it twice is harmless.) For a single
block, replace the top module and list the blocks it uses.

`tb_hp_top` runs the whole design at its default parameters. In the
fine-grained chain it goes through these steps:

* loads the CAMs;
* writes a partial bitstream and two coarse streams into the DDR2 model
  through the MainBus, and reads one word back through the four read-back
  addresses;
* sends packets through the MainBus;
* checks that the second region is bypassed until a trigger configures it;
* counts the words written to the configuration port, which stop at the
  DESYNC command;
* checks that an unknown type (a CAM miss) starts nothing.

It then switches to the coarse-grained chain:

* loads both processors and the interconnect;
* checks stripped output and info words;
* checks that an IPv4 packet with a bad header length is rejected by the
  CLU and forwarded;
* reads info words back through the MMU.

It counts each mechanism it exercises (bypass, stalls, configuration, CAM
miss, switch setting, processor programming, CLU reject, mode change, info
read-back, DDR2 read-back, blocked MainBus write) and fails if any count is
zero.

Two more testbenches run the configuration paths at their full sizes.

`tb_fine_workload` drives `icap_ctrl` at its defaults with three streams:

* a 5904-byte frame;
* an 88000-byte parser-region bitstream;
* a stream with no end, which must stop at 4096 reads.

It checks every port word and the read counts, and prints the throughput.

`tb_coarse_workload` drives the coarse controller, the programmer and both
processors through the four flows of the read-count model, one core or two,
each with and without switch settings. It checks the reads against the
model, the configured types and the switch value.
