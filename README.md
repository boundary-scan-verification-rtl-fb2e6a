# xyz_ip boundary scan logic (IEEE 1149.1 with 1149.6 AC EXTEST)

Once a chip sits on a circuit board, nobody can probe its pins any more.
Boundary scan solves this. A shift register of cells sits between each pin and
the chip's logic. A tester reaches this register through four wires
(TCK, TMS, TDI, TDO, plus an optional TRST\*). Through it the tester can read
what the pins carry, or force values onto them. Two chips on the same board
can then test the wires between them: one chip drives a pattern and the other
captures it.

This RTL is the test logic of a small IP with four differential receive lanes
(RX0..RX3, P and N) and four differential transmit lanes (TX0..TX3). High-speed
lanes like these are often AC-coupled through series capacitors. A static level
driven across such a capacitor decays before the receiving chip captures it,
so plain EXTEST cannot test these lanes. For that reason the design also has
the IEEE 1149.6 additions:

- output cells that can invert their data on command (EXTEST_PULSE, EXTEST_TRAIN);
- test receivers that capture edges rather than levels.

## Block diagram

```
            TCK TMS TRST_N
               |   |   |
           +---v---v---v----+      state      +---------------------+
           | tap_controller |---------------->| instruction_register|<-- TDI
           +----------------+   (to all)      +----------+----------+
                                                         | instr
                                              +----------v----------+
                                              | instruction_decoder |
                                              +--+-----+-----+---+--+
                                    dr_sel       |     |     |   | ac_mode/ac_train
     TDI --+--> bypass_register (1) -------------+     |     |   v
           +--> idcode_register (32) ------------------+     |  ac_signal_gen --> ac_signal
           +--> boundary_scan_register (16) -----------------+
                  cells 0..7 : bsc_cell     <- test_receiver <- rx_pad[i]
                               (rx_pad[i] also goes straight to core_rx[i])
                  cells 8..15: ac_bsc_cell  -> tx_pad[j]
                                         |
                   TDO mux (IR while Shift-IR, else selected DR)
                   -> flop on falling TCK -> tdo, tdo_en
```

| File | What it is |
|---|---|
| `rtl/jtag_pkg.sv` | TAP state enum, opcodes, IR length, IDCODE, data-register select enum |
| `rtl/tap_controller.sv` | 16-state TAP state machine |
| `rtl/instruction_register.sv` | 8-bit IR: shift stage plus hold stage |
| `rtl/instruction_decoder.sv` | opcode to register select and boundary controls |
| `rtl/bypass_register.sv` | 1-bit bypass register |
| `rtl/idcode_register.sv` | 32-bit device identification register |
| `rtl/bsc_cell.sv` | standard boundary cell (used on receive pins) |
| `rtl/ac_bsc_cell.sv` | AC-capable boundary cell (used on transmit pins) |
| `rtl/ac_signal_gen.sv` | AC test signal for EXTEST_PULSE / EXTEST_TRAIN |
| `rtl/rx_comparator.sv` | behavioural model of the receiver's analog front end (not synthesizable) |
| `rtl/hyst_memory.sv` | receiver memory: flip-flop with async set/clear and clocked init |
| `rtl/test_receiver.sv` | one test receiver: `rx_comparator` followed by `hyst_memory` |
| `rtl/boundary_scan_register.sv` | the 16-cell chain |
| `rtl/xyz_ip.sv` | top: wires everything, TDO multiplexer |

## Pins of the top

| Port | Width | Meaning |
|---|---|---|
| `tck`, `tms`, `tdi` | 1 | test clock, mode select, data in |
| `trst_n` | 1 | asynchronous test reset, active low |
| `tdo`, `tdo_en` | 1 | test data out; `tdo_en` is high only while shifting (a pad tri-states TDO otherwise) |
| `rx_pad` | 8 | receive pins: index 2k = RXk_N, 2k+1 = RXk_P |
| `core_rx` | 8 | receive pins as seen by the system logic |
| `core_tx` | 8 | transmit data from the system logic |
| `tx_pad` | 8 | transmit pins: index 2k = TXk_P, 2k+1 = TXk_N |
| `tx_oe` | 8 | transmit driver enable (low under HIGHZ) |

The system logic itself is not part of this RTL. Its pin-side signals are the
`core_*` ports. The pad drivers and receivers are outside it too: the top
delivers a pin level and an enable, and a pad ring would turn them into
high-impedance or differential signals.

Parameters of `xyz_ip`: `N_RX = 8`, `N_TX = 8`, `IDCODE = 32'h84108013`.

## TAP controller and timing

The state machine is the standard one. It has Test-Logic-Reset and
Run-Test/Idle, plus two identical seven-state columns. One column scans a data
register (DR) and the other the instruction register (IR): Select, Capture,
Shift, Exit1, Pause, Exit2, Update. Every transition depends only on TMS at the
rising TCK edge. Two things reset it:

- `trst_n` low forces Test-Logic-Reset at once (hard reset);
- five TCK cycles with TMS high reach Test-Logic-Reset from any state (soft
  reset).

Everything runs from TCK, on both edges:

| Edge | What happens |
|---|---|
| rising | TAP state advances; Capture-IR/DR loads; Shift-IR/DR shifts |
| falling | Update-IR loads the new instruction; Update-DR loads the boundary update flops; TDO and `tdo_en` change; the AC test signal changes; test receivers are initialised (Exit1-DR, Exit2-DR) |

A tester changes TMS and TDI after a falling edge and samples TDO at the next
rising edge. The first bit of a scan therefore appears on TDO during the first
Shift cycle. Data goes in and out least significant bit first.

## Instructions

The instruction register is 8 bits. In Capture-IR it loads `00000001`, so
every IR scan first shifts out that fixed pattern. Test-Logic-Reset selects
IDCODE.

| Instruction | Opcode | Register between TDI and TDO | Transmit pins |
|---|---|---|---|
| SAMPLE / PRELOAD | `01` | boundary (16) | mission data (`core_tx`) |
| CLAMP | `04` | bypass (1) | boundary update flops |
| HIGHZ | `08` | bypass (1) | drivers disabled (`tx_oe = 0`) |
| EXTEST | `09` | boundary (16) | boundary update flops |
| IDCODE | `0C` | IDCODE (32) | mission data |
| EXTEST_PULSE | `0E` | boundary (16) | update flops, inverted while in Run-Test/Idle |
| EXTEST_TRAIN | `0F` | boundary (16) | update flops, toggled on every falling TCK edge in Run-Test/Idle |
| BYPASS | `FF` | bypass (1) | mission data |
| any other | | bypass (1) | mission data |

The IDCODE register reads `32'h84108013`. Bit 0 is 1, so the first bit out of
an IDCODE read is 1. The bypass register captures 0.

SAMPLE and PRELOAD are one opcode. PRELOAD loads the update flops while the
pins stay in mission mode, so EXTEST or CLAMP start driving known data the
moment they take effect (at Update-IR).

## Boundary register

Cell 0 is closest to TDO and cell 15 takes TDI:

| Cells | Pin | Cell type | Captures | Drives |
|---|---|---|---|---|
| 0..7 | `rx_pad[0..7]` | `bsc_cell`, mode held at 0 | test receiver output | nothing; `core_rx` is the pin |
| 8..15 | `tx_pad[0..7]` | `ac_bsc_cell` | `core_tx` from the system logic | `tx_pad` |

A 16-bit DR scan therefore shifts out the receive captures in bits 0..7 and
the transmit captures in bits 8..15. Bits 8..15 of the data shifted in become
the transmit pin values at Update-DR.

Each cell has two flops:

- a capture/shift flop, which loads the parallel input in Capture-DR and the
  previous cell in Shift-DR;
- an update flop, which copies the capture flop on the falling edge in
  Update-DR.

A mode multiplexer picks either the parallel input (transparent) or the update
flop. Receive cells never use their update flop for the core, because the
instruction set has no INTEST.

## AC EXTEST: the part to read carefully

Two mechanisms together let the lanes be tested through coupling capacitors.

**Driver side.** In `ac_bsc_cell` the pin value, when the cell drives the pin,
is `update_flop XOR ac_signal` if AC test mode is on, else `update_flop`.
`ac_signal_gen` creates `ac_signal` on falling TCK edges:

- EXTEST_TRAIN: toggles on every falling edge spent in Run-Test/Idle. Holding
  the TAP there for N cycles gives N transitions on every transmit pin.
- EXTEST_PULSE: goes high on the first falling edge in Run-Test/Idle and stays
  high as long as the TAP stays there. This gives one inverted pulse.
- Any other state (first of all Select-DR-Scan, on leaving Run-Test/Idle):
  low, so the pins return to the updated data.

If the TAP never enters Run-Test/Idle, both AC instructions behave exactly
like EXTEST. The whole transmit group is modulated together, so the P and N
legs of a pair stay complementary when they are loaded complementary.

**Receiver side.** Each receive pin has a `test_receiver`:

- With AC test mode off, it is a level detector: its output is the pin.
- With AC test mode on, it is a hysteretic memory. A rising edge on the pin
  sets it, a falling edge clears it, and its output is the memory.
- On the falling edge in Exit1-DR or Exit2-DR the memory is loaded with the
  capture flop of its cell, which holds the bit just shifted in.

A typical sequence:

1. Shift the complement of the expected value into the receive cells; it
   initialises the receivers.
2. Update, so the driver shows its data.
3. Spend some cycles in Run-Test/Idle; the driver pulses.
4. Capture. A receiver that saw the edges now holds the driven value. A
   receiver on an open line still holds the complement it was given.

The real receiver is analog: an RC filter, two comparators with a hysteresis
offset, and a switch that picks either a fixed bias or the filtered pin as the
comparators' reference. It is split in two here:

- `rx_comparator.sv` models the front end. In DC mode the set output is the
  pin and the clear output its complement. In AC mode the pin is compared with
  a copy of itself delayed by `FILTER_DELAY` (1 ns by default), so set pulses
  on a rising edge and clear on a falling edge. It treats every change as a
  valid edge and does not model thresholds or a line decaying to its bias
  level. It is a behavioural model, not a circuit: synthesis drops the delay.
  Replace it with the pad library's receiver for a real chip.
- `hyst_memory.sv` is ordinary logic: a flip-flop with asynchronous set and
  clear, initialised on the falling TCK edge. Set wins if both are high.
  Some synthesis front ends accept only one asynchronous input per flop;
  with those, map it to a set/reset flop of the cell library.

## Design choices and departures

These points are not fixed by the specification this logic was built from.
Each was chosen here.

- **IDCODE.** The specification gives two values: `32'hAAAAAAAB` in its device
  description and `32'h84108013` in its test vectors and read-out. This design
  uses `32'h84108013`. Change the `IDCODE` parameter for a real part; bit 0
  must stay 1.
- **EXTEST_TRAIN opcode.** One passage gives `09`, which is EXTEST's opcode.
  The opcode table and the test logs give `0F`, which is used here.
- **Pin order in the chain.** The chain has 16 cells, one per pin, with
  receive pins in the low cells and transmit pins in the high ones. The order
  within each group is this design's choice. Test vectors written for a
  different cell order will expect different TDO bits.
- **One cell per pin.** The two legs of a differential pair have separate
  cells; no cell drives both legs as complements.
- **HIGHZ** is given as `tx_oe = 0` for the whole transmit group. The pins have
  no control cells. Outside HIGHZ `tx_oe` is 1.
- **Undefined opcodes** act as BYPASS.
- **Reset.** `trst_n` clears every flop: the IR shift stage, the bypass
  register, the cells and the TDO flop. The IDCODE register is set to its
  value and the instruction to IDCODE. Test-Logic-Reset also sets the
  instruction to IDCODE, so mode drops to 0 and the pins return to the system
  logic.
- **Core path of receive pins.** The receive cells' mode is held at 0, so
  their mode multiplexer always passes the pin: `core_rx` is `rx_pad`
  directly. Only the capture path goes through the test receiver. The update
  flops of the receive cells therefore drive nothing; they are kept so that
  every cell in the chain is the same standard cell.
- **Clock DR and Update DR** are enables on TCK rather than gated clocks.
- **TDI and TMS pull-ups.** Undriven, TDI and TMS should read 1. That is a pad
  feature and is not in this RTL.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. To build
and run one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/jtag_pkg.sv tb/tb_xyz_ip.sv --top-module tb_xyz_ip -Mdir obj -o sim
obj/sim
```

| Testbench | What it checks |
|---|---|
| `tb_tap_controller` | 3000 random TMS steps against a transition table; soft reset from all 16 states; asynchronous TRST |
| `tb_instruction_register` | capture pattern, 40 random opcodes, update only on the falling edge of Update-IR, reset to IDCODE |
| `tb_instruction_decoder` | all 256 opcodes |
| `tb_bypass_register` | capture 0, one-cycle delay, hold when not selected |
| `tb_idcode_register` | 32-bit read-out, shift-through, ignores capture when not selected |
| `tb_bsc_cell`, `tb_ac_bsc_cell` | random stimulus against a two-flop reference model (plus XOR path) |
| `tb_ac_signal_gen` | transitions per Run-Test/Idle cycle for TRAIN, one pulse for PULSE, clearing in Select-DR-Scan |
| `tb_rx_comparator` | DC levels; one set pulse per rising edge and one clear pulse per falling edge in AC mode |
| `tb_hyst_memory` | random set/clear/init against a reference model; set over clear |
| `tb_test_receiver` | level mode, edge set/clear, initialisation, open line |
| `tb_boundary_scan_register` | capture, 16-bit shift, update, mode, AC inversion, not-selected hold |
| `tb_xyz_ip` | full design at its default parameters, driven only through its pins at 40 MHz TCK |

`tb_xyz_ip` has a small driver for the usual serial-vector operations: test
reset, moves between stable TAP states, IR and DR scans ending in Run-Test/Idle
or a pause state, and Run-Test/Idle cycles. It runs these tests:

- hard and soft reset with IDCODE reads;
- the IR walking-pattern test (scans resumed from Pause-IR shift out the
  previous pattern rather than a new capture);
- the one-bit bypass test through Pause-DR;
- SAMPLE with parallel receive patterns;
- PRELOAD followed by EXTEST, with a board loop from TX to RX;
- EXTEST_TRAIN, checked on each falling edge;
- EXTEST_PULSE;
- the AC receiver on a connected line and on an open line;
- HIGHZ, CLAMP, IDCODE and an undefined opcode.
- an identification read with a wrong opcode (02): the scan goes through
  the bypass register and returns a 0 followed by ones, not the ID.

It counts how often each mechanism occurs and fails if one never does.

`tb_board_interconnect` puts two chips on one board. It chains their TDI and
TDO and cross-wires their lanes; the second chip has a different IDCODE. It
then runs these tests:

- reads both IDCODEs through the 64-bit chain;
- reads one IDCODE with the other chip in BYPASS;
- runs a counting-pattern wire test under EXTEST, and finds a stuck-at-0 wire
  and a bridged pair;
- under EXTEST_PULSE, tells a connected wire from an open one that floats
  high.

## How far to trust it

Every block is checked against expected values worked out independently in its
testbench. Each testbench has been shown to fail when a single fault is put
into its block. Three sequences replay published test vectors bit for bit:
the reset, instruction-register and bypass tests. The boundary-register tests
use this design's own cell order, so their vectors are this design's. Not
covered:

- timing closure and gate-level behaviour;
- the analog side of the 1149.6 receiver;
- anything about the system logic behind the pins.
