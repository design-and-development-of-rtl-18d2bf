# Multi-channel interrupt controller with an AXI4-Lite port

A processor has only a few interrupt pins, but a system-on-chip can have dozens of
peripherals that want attention. This controller sits between them. It takes
**60 interrupt lines** and drives **12 interrupt outputs**. Software decides, through
registers on a 32-bit AXI4-Lite slave port, which event reaches which output.

Two features set it apart from a plain OR-tree or a fixed-priority encoder:

* **Configurable priority.** Each of the 12 output channels can be fed from any of
  the interrupt sources. The channel number is the interrupt's priority at the
  processor, so rewriting a map register changes an interrupt's priority at run time.
* **Combination interrupts.** The 60 lines form 4 groups of 15. Each group also
  produces one combined interrupt: the OR of its unmasked members. A single service
  routine can then handle a whole group. With the 60 lines plus the 4 combined
  interrupts, there are **64 sources** to map.

## Data path

```
 intr_in[59:0] ──► EVTFLAG[59:0] ──► mask ──┬──────────────────────► MEVTFLAG[59:0] ─┐
 (level, sets)     set: input or SW write    │ EVTMASK[59:0]                          │
                   clear: SW write           └► OR per group of 15 ─► mask ─► MEVTFLAG[63:60]
                                                 (EVTFLAG[63:60])    EVTMASK[63:60]   │
                                                                                      ▼
                          CHMAP1..3: one source number per channel ─► 12 × 64:1 select = RAWINT[11:0]
                                                                                      │
                                              INTENA[11:0] ─► AND ─► INTFLAG register ─► irq[11:0]
```

| Module | Role |
|---|---|
| `axi_slave_if` | AXI4-Lite slave. Its write state machine turns a bus write into one register-write strobe; its read side returns register values. |
| `intc_regs` | All software-visible registers, the event flags, and the read-back multiplexer. |
| `evt_combine` | Masks the flags and ORs each group into its combination interrupt. |
| `chan_map` | Twelve 64-to-1 selectors, each steered by one byte of CHMAP. |
| `int_ctrl` | Gates each channel with INTENA and registers the result as INTFLAG, which drives `irq`. |
| `intc_top` | Wires the five together. Its ports are the interrupt lines, the IRQs and the AXI4-Lite signals. |
| `intc_pkg` | Sizes, register offsets, the register-write struct and helper functions. |

### Event flags

Each of the 60 inputs owns a flag. A flag is set in every cycle its input is high:
the inputs are level-sensitive and must be synchronous to `clk`. Software can also
set a flag by writing a 1 to its bit in EVTFLAG, which lets it raise an interrupt
itself. Software clears a flag by writing a 1 to its bit in EVTCLR.

If a set and a clear hit the same flag in the same cycle, the set wins. A flag whose
input is still high therefore stays set. Clear the source in the peripheral first,
then clear the flag.

Flag bits 63:60 are not stored. They show the four combination interrupts live, and
writes to them are ignored.

### Masking and combination

EVTMASK holds one bit per source; a 1 blocks that source. The grouping is fixed:

| Group | Inputs | Combination source |
|---|---|---|
| 0 | 0–14 | 60 |
| 1 | 15–29 | 61 |
| 2 | 30–44 | 62 |
| 3 | 45–59 | 63 |

A masked input is left out of its group's OR as well as its own source.
EVTMASK[60+g] masks the combination interrupt of group g without touching its members.

### Channel mapping and priority

Channel *c* takes source number `CHMAP[c]` — byte *c mod 4* of register CHMAP(1 + c/4).
Only bits 5:0 of each byte count. CHMAP1 holds channels 3..0, CHMAP2 channels 7..4,
and CHMAP3 channels 11..8, lowest channel in the lowest byte. For example:

* CHMAP1 = `0x04030201` routes sources 1, 2, 3 and 4 to channels 0..3.
* CHMAP2 = `0x090a0b0c` routes sources 12, 11, 10 and 9 to channels 4..7.

Any source may go to any channel, and several channels may take the same source. The
controller itself ranks nothing: all 12 channels are driven in parallel. "Priority"
means the processor's fixed ranking of its interrupt inputs. Moving a source to a
different channel moves it up or down that ranking. After reset every map byte is 0,
so all channels watch source 0, but INTENA is 0 as well, so nothing fires.

### Channel enable and INTFLAG

`INTFLAG[c]` is a register loaded each clock with `RAWINT[c] & INTENA[c]`, and `irq`
is INTFLAG. It is not sticky: it drops one clock after its source is cleared or
masked, or after its channel is disabled. Software acknowledges an interrupt by
clearing the event flag, not INTFLAG. INTFLAG is read-only over the bus.

## Register map

32-bit registers, byte addresses. Write strobes are honoured on every register.

| Offset | Name | Access | Contents |
|---|---|---|---|
| 0x00 | EVTFLAG_LO | R / W1S | event flags 31:0; writing 1 sets |
| 0x04 | EVTFLAG_HI | R / W1S | flags 63:32 (63:60 = combination interrupts, read-only) |
| 0x08 | EVTCLR_LO | R / W1C | reads flags 31:0; writing 1 clears |
| 0x0C | EVTCLR_HI | R / W1C | reads flags 63:32; writing 1 clears 59:32 |
| 0x10 | EVTMASK_LO | RW | mask of sources 31:0 (1 = masked) |
| 0x14 | EVTMASK_HI | RW | mask of sources 63:32 |
| 0x18 | CHMAP1 | RW | source numbers of channels 3..0 |
| 0x1C | CHMAP2 | RW | source numbers of channels 7..4 |
| 0x20 | CHMAP3 | RW | source numbers of channels 11..8 |
| 0x24 | INTENA | RW | channel enable, bits 11:0 |
| 0x28 | INTFLAG | R | channel interrupt flags = `irq`, bits 11:0 |

Any other address, or one not word-aligned, gets an SLVERR response. Such a write
changes nothing, and such a read returns 0. All registers reset to 0.

Bring-up sequence: write CHMAP1..3, clear EVTMASK, then write INTENA. In the
interrupt handler, read INTFLAG and the event flags, service the source, then write
its bit to EVTCLR.

## The AXI4-Lite write state machine

The write side is a five-state machine:

| State | AWREADY | WREADY | BVALID | Leaves when |
|---|---|---|---|---|
| IDLE | 1 | 1 | 0 | AWVALID & WVALID → WRITING; AWVALID only → WRITE_ADDRESS; WVALID only → WRITE_VALID |
| WRITE_ADDRESS (address held) | 0 | 1 | 0 | WVALID → WRITING |
| WRITE_VALID (data held) | 1 | 0 | 0 | AWVALID → WRITING |
| WRITING | 0 | 0 | 0 | always → RESPONSE; the register write is issued here |
| RESPONSE | 0 | 0 | 1 | BREADY → IDLE |

Address and data may therefore arrive together or in either order. The READY
outputs are decoded from the state alone, never from the VALID inputs, so the port
has no combinational path from input to output.

Reads use a separate two-state machine. In R_IDLE, ARREADY is high. On the address
handshake, the register value is captured and shown in R_DATA with RVALID until
RREADY. Reads and writes are independent and can overlap. Reads have no side effects.

AWPROT and ARPROT are ignored. Only one transaction is outstanding per direction,
which AXI4-Lite allows.

## Timing

Everything runs on one clock, `clk`. Reset `rst` is synchronous and active high.

* **Input to IRQ: 2 edges.** An input sampled high at edge *k* sets its flag at *k*.
  The mapped and enabled channel's `irq` rises at edge *k+1*. The path from flag to
  INTFLAG is combinational: mask, group OR, 64:1 select and AND.
* **Register write: 1 edge after the handshakes.** If the later of the AW and W
  handshakes completes at edge *k*, the register takes its new value at edge *k+1*.
  BVALID rises at the same edge. The effect on `irq` appears at *k+2*.
* **Register read:** with an AR handshake at edge *k*, RVALID and the data are
  present from edge *k+1*.

The design is small: about 370 flip-flops, most of them the 60 flags and the 64-bit
mask and 96-bit map registers.

## Where this departs from, or goes beyond, the source description

The source description sets the counts (60 inputs, 4 groups, 64 sources,
12 channels), the register names and widths (EVTFLAG and EVTMASK 64 bits, CHMAP1..3
32 bits, INTENA and INTFLAG 12 bits), the order of the data path, and the states of
the write machine. This implementation had to choose the following:

* **Register offsets** and the use of write-1-to-set and write-1-to-clear registers for
  the flags. The source names only "event flag set" and "event flag clear"; in its
  example these may be held registers rather than pulses.
* **Group size.** Four groups over 60 inputs give 15 per group. One passage mentions
  combining "up to 16" interrupts; that number is not used here.
* **Mask polarity** (1 = masked), and masking a flag before its group's OR. The
  combination interrupts can be masked separately.
* **Level-sensitive inputs**, with set winning over clear.
* **Channel-map layout**: one byte per channel, 6 significant bits.
* **Priority.** Priority comes only from the channel mapping, with 12 parallel
  outputs. No circuit sorts pending interrupts or encodes the highest one. The source
  speaks of interrupts being "sorted by priority" but describes no such unit; its
  block diagram ends in the 12-bit INTFLAG/INT outputs.
* **Read side and error responses** of the AXI port, and the exit conditions of the
  WRITE_ADDRESS and WRITE_VALID states.
* **A registered IRQ output**, INTFLAG, that follows its inputs rather than latching.

Outside the controller, and not modelled: the processors, the AXI interconnect and
the peripherals of the surrounding system.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of cycles if it
hangs.

| Testbench | What it checks |
|---|---|
| `tb_evt_combine` | every single flag, masked and unmasked, lands in the right group; combination masks; 2000 random flag/mask pairs against a bit-level reference |
| `tb_chan_map` | every source through every channel; bits 7:6 ignored; the example map; 3000 random maps |
| `tb_int_ctrl` | enable gating, one-edge latency, reset, 2000 random cycles |
| `tb_intc_regs` | reset values, read/write with byte strobes, W1S/W1C, hardware set one edge after sampling, set-over-clear, read-only bits, 3000 random writes against a register model |
| `tb_axi_slave_if` | all three write orderings with random gaps, READY signals in every state, BVALID/RVALID latency and hold under back-pressure, exactly one correct register strobe per write, SLVERR with no write for bad addresses, 400 random transactions |
| `tb_intc_example` | a worked configuration at full size: the example map above with CHMAP3 = 0, inputs 0–13 pulsed, then INTENA = 0xfff, 0xffc, and flags cleared in three steps; irq must read 0xfff, 0xffc, 0x018, 0x008, 0x000 in turn, change exactly one edge after BVALID, and match INTFLAG read back |
| `tb_intc_top` | whole controller at full size: a directed bring-up (the example map; all channels enabled, then channels 0–1 disabled; masking; remap; clear), the 2-edge input-to-IRQ latency, then 3000 random steps (input pulses, writes in all orderings, reads) checked against a model of the whole data path |

`tb_intc_top` counts each mechanism and fails if any never happened. The mechanisms
are: hardware set, software set, clear, masking, combination interrupt, combination
mask, remap, channel disable, error response, and each write ordering.

The port assertions in `axi_slave_if` require the following:

* BVALID and BRESP are held until BREADY.
* RVALID and RDATA are held until RREADY.
* Each register write lasts one cycle.

The assertions are checked in every simulation built with `--assert`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Irtl -y rtl rtl/intc_pkg.sv \
          tb/tb_intc_top.sv --top-module tb_intc_top -o sim
./obj_dir/sim
```

Replace `tb_intc_top` with any other testbench name to run it. The package must come
first on the command line; `-y rtl` finds the remaining modules by name. Each run
takes well under a second.

## Changing sizes

The counts live in `intc_pkg` (`N_IN`, `N_GRP`, `N_CHAN`), and the modules take them
as parameters. Constraints:

* `N_IN` must be divisible by `N_GRP`.
* The register map has room for at most 64 sources (`N_IN + N_GRP`) and 32 channels.
  Each group of four channels needs one more CHMAP register, placed after CHMAP3's
  offset, which moves INTENA and INTFLAG. Extend `reg_addr_e` and the read-back
  decode together.
* Source numbers are 6 bits wide. More than 64 sources needs wider map entries and a
  different CHMAP layout.
