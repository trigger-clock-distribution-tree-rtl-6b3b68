# STAR Trigger/Clock distribution tree

At each bunch crossing (RHIC strobe, about 110 ns), STAR's trigger decides what every detector's front end should do. Each decision is a 4-bit trigger command, a 4-bit DAQ command and a 12-bit token. It has to reach about a thousand readout boards without adding dead time. It travels with the strobe itself and with two clocks that differ from detector to detector.

The Trigger/Clock distribution tree does this. Per detector there is a VME driver board. It takes the trigger decision off a backplane and decides whether it concerns its detector. It queues the decision and sends it down cables as five 4-bit words within a single strobe period. The words run on a data clock at five times the strobe rate. At the other end a small receiver on each readout board reassembles the words.

This repository holds synthesizable SystemVerilog for the logic of one branch of that tree:

- the driver board: backplane register, detector select, command FIFO, pulser-sequencing mezzanine, serializer and VME slave
- the strobe phase shifter, as a behavioural delay model
- the readout-board receiver and its redundancy strobe counter
- a top level that wires a driver to four cables, with a receiver on each

## Words on the cable

Each cable carries:

- the RHIC strobe
- four data lines D3..D0
- the data clock (5 × strobe rate)
- two detector clocks
- BUSY and STATUS, going back to the driver

Every strobe period is split into five data-clock slots:

| slot | word |
|------|------|
| 0 | trigger command (starts with the strobe's rising edge) |
| 1 | DAQ command |
| 2 | token [11:8] |
| 3 | token [7:4] |
| 4 | token [3:0] |

The driver changes D on the rising data-clock edge, and the receiver samples on the falling edge, in the middle of the bit. Only the strobe's rising edge carries timing. The driver makes its strobe high for slots 0 and 1 (about 44 ns). Any pulse from 10 to 90 ns would be accepted by the receiver, because it looks only for the edge.

A command takes one strobe period on the cable, so the path has no dead time. From the backplane latch to a complete trigger at the receiver takes 2 to 3 strobe periods. The end-to-end test measures this, and the limit is 5.

## Trigger commands

`tcd_pkg` defines the 16 commands and the three ways they are handled:

| codes | class | treatment |
|-------|-------|-----------|
| 0 | no trigger | never sent as a command; the cable idles with zeros |
| 1–3 | clear, master reset, (reserved) | broadcast: every detector takes them whatever its select bit; DAQ command and token are forced to zero |
| 4–7 | triggers | need the detector's select bit |
| 8–11 | pulsers | need the select bit; may be intercepted by the mezzanine |
| 12 | config | needs the select bit |
| 13–15 | abort, L1 accept, L2 accept | need the select bit |

The receiver keeps the last non-zero command on its 4-bit `trg_cmd_o`. The other 16 bits are read as two bytes over an 8-bit bus with its own output enable (`oe_n`). The first byte is {DAQ, token[11:8]}, the second is token[7:0], and each falling edge of `rd_stb_n` steps to the other byte. A new command resets the bus to the first byte. Several receivers can therefore share one data bus.

## The driver board (`tcd_driver`)

```
backplane ─► trigger_register ─► select ─► cmd_fifo ─► serializer ─► 4 cables
   (raw strobe edge)              │   ▲         ▲           ▲
                                  ▼   │busy     │level/pop  │control, command
                                 mezzanine ─────┴───────────┘
                                      ▲ config bus
VME ─────────────────────────► vme_slave
raw strobe ─► phase_set ─► delayed strobe ─► frame_timer (slots) ; clock multiplier ─► dclk
```

### Two clock domains

The backplane is valid for only 10 ns before and 5 ns after the raw strobe edge. `tcd_trigger_register` therefore latches it with the raw strobe itself and flips a toggle bit. The toggle passes a three-flop synchronizer into the data-clock domain. There the copy is taken and `stb_o` is pulsed. The copy stays stable for a whole strobe period, so it is safe to read once the toggle has crossed.

Everything else runs on `dclk`, which is phase locked to the *delayed* strobe. `tcd_frame_timer` finds that strobe's edge and numbers the slots 0..4. It re-aligns at every edge and raises a sticky `sync_err` if an edge arrives anywhere but slot 0.

### Selection and busy

`tcd_select` takes the detector number from bits [5:3] of the 6-bit detector ID. The default is TPC, which is detector 3. Bits [2:0] are the sub-detector and play no part here.

A command is taken when either:

- it is a broadcast, or
- its command is non-zero and the detector's select bit is set.

A taken command is pushed into the FIFO and offered to the mezzanine. The detector's backplane busy line is an open-collector, low-active line. It is driven by the OR of the mezzanine busy and the DAQ busy. The mezzanine busy itself includes the BUSY lines coming back from the cables. The seven other busy lines stay released.

### Command FIFO

`tcd_cmd_fifo` is a first-word-fall-through FIFO of 20-bit entries, 16 deep by default. The serializer takes one entry per strobe period. If a push arrives while the FIFO is full, the entry is dropped and a sticky overflow flag is set, which can be read and cleared over VME. If a pop happens in the same cycle, the push is kept.

### Serializer and control codes

In slot 4 `tcd_serializer` loads the word for the next period. It then shifts out one nibble per slot. What it loads depends on the mezzanine's 3-bit control code:

| control | command | DAQ + token | FIFO |
|---------|---------|-------------|------|
| 0 | FIFO head (0 if empty) | FIFO head | popped |
| 1 | mezzanine | FIFO head | popped |
| 2 | mezzanine | last non-zero command's DAQ + token | held |
| 3 | mezzanine | zero | held |

Bit 2 of the control code is reserved. All cable outputs stay low until the slot timer has locked.

### The pulser sequence (`tcd_mezzanine`)

This is the most involved part of the board. Some detectors do not want one test pulse but several, and the readout should come only after the last one. The mezzanine has an intercept mask with one bit per pulser command 8..11. When a masked pulser is taken for the detector, the mezzanine runs this sequence:

1. It raises detector busy straight away. The trigger control unit then sends nothing more that needs this detector.
2. *Drain.* Commands already waiting in the FIFO ahead of the pulser go out unchanged (control 0). The mezzanine knows how many there are from the FIFO fill level at intercept time, and counts pops until they are gone.
3. *Fire* (control 3). It sends (sequence length − 1) copies of the pulser command with zero DAQ command and token, one every *spacing* strobe periods. The periods in between carry command 0 and hold the FIFO.
4. *Final* (control 1). It sends the pulser command once more, with the DAQ command and token of the intercepted FIFO entry. Only this copy asks the front end to read out.
5. It drops busy and counts the sequence as completed.

The sequence length defaults to 4 and the spacing to 5 strobe periods. The spacing never goes below 2. Both live in registers. The state machine moves only at slot 0, so the serializer sees a stable control code in slot 4. Accepts and aborts that arrive during the sequence wait in the FIFO and go out after the final pulse.

The drain step is not in the original mezzanine interface. Without it, an entry queued ahead of the pulser would be consumed by the final pulse's control 1. That pulse would then carry the wrong token, so `fifo_level_i` and `fifo_pop_i` were added to the mezzanine.

### Detector clocks

The two detector clocks come from `tcd_clk_div`, a divider of the data clock. Each clock has an 8-bit period and an 8-bit high time, and period 0 stops it. At the 45.5 MHz data clock (5 × 9.09 MHz):

- 1/3 of the RHIC clock is period 15.
- About 10 MHz is period 4 or 5.

Clocks at 3×, 4× or 4–5× the RHIC clock cannot be made by division. They need an analogue multiplier, which this design does not contain.

### Mezzanine configuration registers

The configuration bus is 19-bit address, 8-bit data, with CE#, OE#, WE# and RESET#. RESET# also resets the mezzanine. The registers are:

| addr | register |
|------|----------|
| 0x00 | pulser intercept mask [3:0] (reset 0: no intercept) |
| 0x01 | sequence length (reset 4; 0 is stored as 1) |
| 0x02 | spacing in strobe periods (reset 5; values below 2 become 2) |
| 0x03 / 0x04 | clock 1 period / high time |
| 0x0A / 0x0B | clock 2 period / high time |
| 0x05 | detector ID (ro) |
| 0x06 | {STATUS[3:0], BUSY[3:0]} returned on the cables (ro) |
| 0x07 | completed sequences (ro) |
| 0x08 / 0x09 | trigger word [7:0] / [15:8] of the last taken command (ro) |

### VME access (`tcd_vme_slave`)

The slave takes A32 data cycles with address modifier 0x09 or 0x0D. It answers only when address bits 31:26 equal the detector ID, so each board is addressed by its detector. Data is D8. When address bit 20 is set, the cycle goes through to the mezzanine bus at address bits 18:0. The slave then holds CE# for two wait cycles and asserts DTACK* until DS* is released.

With address bit 20 clear, the board registers answer at address bits 3:0:

| addr | register |
|------|----------|
| 0x0 | phase jumper setting (ro) |
| 0x1 | detector ID (ro) |
| 0x2 | status {fifo_full, 0, 0, overflow, empty, sync_err, locked, busy} (ro) |
| 0x3 | FIFO level (ro) |
| 0x4 | write: bit 0 clears overflow, bit 1 resets the mezzanine |

AS* and DS* are synchronized with two flops. Address and data are sampled after DS* falls.

### Strobe phase

`tcd_phase_set` delays the raw strobe by jumpers × 12 ns, from 0 up to 36 steps (432 ns, about four strobe periods). Larger settings are clamped. The setting is read back over VME. The model is behavioural: a transport delay standing in for a delay-line chip. The data clock and every cable signal follow the delayed strobe.

## Readout-board side

`tcr_receiver` samples on the falling data-clock edge. When it sees the strobe's rising edge it takes the command nibble, then shifts in the next four nibbles. In slot 4 it presents the complete trigger with a one-cycle `cmd_valid_o`.

`rhic_strobe_counter` is the readout board's redundancy counter. It counts strobe edges, and a received clear or master reset restarts it. Master reset also pulses `fe_reset_o` for the front-end logic.

## Top level (`tcd_tree_top`)

The top holds one phase shifter and one driver. Each of the driver's four cables carries a receiver and a counter.

The data clock is an input port. The delayed strobe leaves the top on `rhic_stb_dly_o` to feed the external clock multiplier that produces it. Cables are plain wires. Line drivers, fan-out boards, repeaters and multi-drop wiring are electrical and are not modelled.

The parameters are:

| parameter | default |
|-----------|---------|
| `DETECTOR_ID` | `6'o30` (TPC) |
| `FIFO_DEPTH` | 16 |
| `N_CABLES` | 4 |

## Departures and choices

These follow the original requirements:

- the word format and order
- edge and sampling rules
- command classes and the broadcast zeroing of token and DAQ command
- selection by detector bit and the busy OR
- the FIFO's purpose
- the mezzanine control codes
- the 12 ns phase steps over four strobes

These are this design's own choices:

- FIFO depth
- all register maps and the VME address scheme
- sequence length and spacing defaults
- the drain step
- the two-byte receiver bus protocol
- the strobe pulse length on the cable
- divider-based detector clocks
- the counter width

Mezzanine control codes 0 and 1 have been read as "everything from the FIFO" and "mezzanine command with the FIFO's DAQ command and token". That is the reading that makes the two codes differ.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_tcd_tree_top \
  rtl/tcd_pkg.sv rtl/*.sv tb/tb_tcd_tree_top.sv
./obj_dir/Vtb_tcd_tree_top
```

Put `rtl/tcd_pkg.sv` first. `--assert` turns on the handshake assertions in the FIFO, serializer and VME slave. To run a block testbench, swap in its name, e.g. `tb_tcd_mezzanine`. Only `tb_tcd_cmd_fifo` overrides a parameter (depth 8).

`tb_tcd_tree_top` runs the whole branch at default parameters for about 1500 strobe periods. A trigger-control-unit model respects detector busy and writes the mezzanine over VME. The test checks every receiver against the commands the model issued, and the counters against a reference count. It counts and requires each mechanism at least once:

- pulser sequences
- commands held in the FIFO
- broadcasts
- busy
- clear and master reset
- triggers, accepts and aborts
- VME accesses
- latency

The async resets must see a falling edge to initialise. The testbenches therefore start with reset released, assert it after 1 ns and release it later.
