# Multi-purpose VME I/O module (TRIUMF design), in SystemVerilog

This is a 6U VME slave card for experiment data acquisition. It does the
job of two older CAMAC modules, a pattern unit (inputs) and an output
register:

* **24 outputs.** Each output can be a level (latch mode) or a short pulse
  (pulse mode). The NIM and ECL versions of each output are driven at the
  same time.
* **24 inputs.** They can be captured by an external STROBE or read "live"
  at any moment.
* **One interrupt line.** The first 8 inputs can raise a prioritised VME
  interrupt on IRQ7*. It releases when the interrupt is acknowledged (ROAK),
  and returns a vector byte that names the channel.

The original board places all its logic in six small CPLDs. This RTL is that
logic, written as one synthesizable design split by function. It leaves out
the analog parts: NIM/ECL level translation, jumpers, power supply and LED
one-shots. Their logic-level signals are ports of the top module.

## Register map

The card decodes only A4..A2 inside a 64 KiB window, so the eight registers
repeat through the whole window. All accesses are D32. This means DS0*, DS1*
and LWORD* are all low.

| Offset | Dir | Name     | Effect |
|--------|-----|----------|--------|
| 0x00   | W   | IRQENBL  | bits 7..0: interrupt enable for input channels 1..8 |
| 0x04   | W   | INTSRC   | bit 0: 1 = synchronous, 0 = asynchronous interrupt source; also re-enables interrupts and clears captured input edges |
| 0x08   | W   | OUTSET   | bits 23..0: output mode, 1 = pulse, 0 = latch |
| 0x0C   | W   | OUTPULSE | pulse every pulse-mode channel whose bit is 1 |
| 0x10   | W   | OUTLATCH | set (1) or clear (0) the latch of every latch-mode channel |
| 0x14   | R   | RDSYNC   | `0xFF` + the 24 strobed input bits |
| 0x18   | R   | RDASYNC  | `0xFF` + the 24 inputs sampled at the time of the read |
| 0x1C   | R   | RDCNTL   | `0xFFFFFF` + `AB`: A = F for the sync source, 0 for async; B = F once a STROBE has been taken, 0 while armed |
| 0x1C   | W   | CLSTB    | re-arm the STROBE (the data is ignored) |

Addressing is chosen by jumper JP9 (`jp9_a24`):

* **A24 mode:** AM 0x39. Switch S3 must match A23..A16.
* **A32 mode:** AM 0x09. Switches S4:S3 must match A31..A16.

The card gives no DTACK* for any cycle that is not a valid function: a
read of a write-only register, a write of a read-only one, a non-D32 cycle,
or another address or AM. Such a cycle ends in the master's bus error.

## How a bus cycle runs

The VME handshake is asynchronous. This design runs it on `clk`, which is
taken to be the 16 MHz backplane SYSCLK.

AS*, DS0*, DS1* and IACKIN* pass through two-flop synchronizers. Address, AM,
WRITE*, LWORD* and write data are used directly, because VME has them stable
before the data strobes.

When `vme_slave_ctrl` sees AS* and a data strobe, it takes the verdict of
`vme_addr_decode` and acts on it:

* **Write:** one clock of the `wr` struct (`en`, function code, 32 data bits)
  goes to every register block, then DTACK* is asserted.
  *Latency:* 2 synchronizer clocks + 2 clocks.
* **Read:** for RDASYNC, `rd_sample` fires in the same clock, and
  `async_input` copies the synchronized inputs. One clock later the word from
  `read_mux` is latched, then it is driven together with DTACK*.
  *Latency:* 2 + 3 clocks.
* **End of cycle:** DTACK* is released after both data strobes rise. The
  controller then waits for AS* to go high.

## Inputs: two ways to read, two clock domains

This is the subtle part of the design. The input timing requirements are:

* STROBE pulses as short as 10 ns;
* zero setup time for data before STROBE;
* 10 ns pulses on the interrupting inputs must still cause an interrupt.

A 16 MHz sampler cannot meet these. So the fast events are captured by flops
that use the signal itself as their clock, and only the results cross into
`clk`.

### Strobed input (`strobe_input`)

* **Capture.** The rising edge of STROBE clocks the 24-bit register, but only
  while the strobe is *armed*. The same edge sets the *triggered* flag, so
  later strobes are ignored until software re-arms with CLSTB.
* **Re-arm.** CLSTB is registered in `clk` and clears the triggered flag
  asynchronously. Re-arming does not clear the data: RDSYNC always returns the
  last strobed word.
* **Crossing into `clk`.** The triggered flag is synchronized (two clocks).
  For three clocks after a CLSTB the synchronized flag is forced low, so the
  synchronizer's stale copy cannot look like a new strobe. The data register
  is read without a synchronizer. This is safe because the data changes only
  at the single edge that sets the flag, and the interrupt logic reads it
  only after the synchronized flag is seen.

### Asynchronous input (`async_input`)

* **RDASYNC.** The inputs pass through a two-flop synchronizer and are latched
  when an RDASYNC read is decoded. Strobed data is not touched, so both kinds
  of acquisition can run together.
* **Interrupt edges.** Each of inputs 1..8 clocks its own edge flag, so a
  short low-to-high pulse is remembered. A falling edge alone sets nothing.
  The flags are cleared by an INTSRC write and by reset. They cross into
  `clk` through a synchronizer, with the same three-clock mask after the
  clear.

## Interrupts (`vme_interrupter`, IACK in `vme_slave_ctrl`)

**Sources.** INTSRC bit 0 picks one of two sources:

* **Synchronous:** the channels that were high when the STROBE was taken,
  while the strobe is in the triggered state.
* **Asynchronous:** the channels whose rising edge has been captured.

An active channel counts only if its IRQENBL bit is 1. IRQ7* is driven low
while an enabled channel of the selected kind is active and the interrupter
has not been *served*.

**Acknowledge.** The handler's IACK cycle for level 7 (A3..A1 = 111) must
reach the card on the IACKIN* daisy chain. The card then does three things:

1. It drives `0xFFFFFF` and the status byte `1 SSSS VVV`.
   * SSSS is switch S1.
   * VVV is the highest active enabled channel, counted from 0, so channel #1
     is 0 and #8 is 7.
2. It asserts DTACK*.
3. It drops IRQ7* on the next clock. This is ROAK.

An IACK cycle for another level, or one that arrives while the card is not
requesting, is passed on: IACKOUT* stays low until AS* rises.

**Re-enabling.** After an acknowledge the interrupter stays served. The same
event therefore cannot interrupt twice. It is re-enabled by:

* any **INTSRC** write; this also clears the captured edges, so old edges do
  not fire again;
* a **CLSTB** write, only when the synchronous source is selected; this also
  re-arms the strobe.

CLSTB does not re-enable the asynchronous source. It is good practice to clear
IRQENBL before changing the source.

## Outputs (`output_unit`)

Each channel has a mode bit, a latch bit and a pulse bit:

* **Output value:** the pulse bit in pulse mode, the latch bit in latch mode.
* **OUTLATCH** writes only the latches of latch-mode channels.
* **OUTPULSE** starts a pulse only on pulse-mode channels.

A latch that was set therefore survives a spell in pulse mode. It reappears
when the channel returns to latch mode.

All channels share one pulse timer. A pulse is `PULSE_CYCLES` clocks long,
and a new OUTPULSE restarts the timer. The nominal pulse is 60 ns, so the
default is one 62.5 ns clock. If you run `clk` faster, raise `PULSE_CYCLES`.

## Power-up state

On `sysreset_n` low:

* interrupt source synchronous, all interrupts disabled;
* strobed and sampled input registers cleared;
* STROBE armed;
* all outputs in latch mode with cleared latches.

RDCNTL reads `0xFFFFFFF0`.

## Files

| File | Contents |
|------|----------|
| `rtl/vmeio_pkg.sv` | register codes (`func_e`), AM codes, `reg_wr_t` write struct |
| `rtl/vmeio_top.sv` | top level: wiring of the blocks, board-level ports |
| `rtl/vme_addr_decode.sv` | AM/base-address match, register select, direction check |
| `rtl/vme_slave_ctrl.sv` | handshake FSM, DTACK*, IACK daisy chain |
| `rtl/vme_interrupter.sv` | IRQENBL/INTSRC registers, ROAK request, status byte |
| `rtl/strobe_input.sv` | STROBE-clocked register, arm/trigger flag |
| `rtl/async_input.sv` | RDASYNC sampling, rising-edge capture on inputs 1..8 |
| `rtl/output_unit.sv` | mode, latch and pulse registers |
| `rtl/read_mux.sv` | read-word formats |
| `rtl/sync2.sv` | two-flop synchronizer |
| `tb/tb_<module>.sv` | a self-checking testbench for each module |

### Top-level ports

* **Bus signals.** The bidirectional data bus is split into `d_in`, `d_out`
  and `d_oe`. DTACK*, IRQ7* and IACKOUT* are active-low outputs, to be driven
  through open-collector buffers.
* **Switches and jumpers.** `sw_s1`, `sw_s3`, `sw_s4` and `jp9_a24` are
  static inputs.
* **Front panel.** `strobe`, `in_ch` and `out_ch` are logic levels, after the
  NIM/ECL receivers and before the drivers.
* **LED.** `led_access` is high while a valid access is acknowledged. It is
  meant to trigger the access-LED one-shot.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog counts a failure if a testbench hangs. Example, the end-to-end test
of the full-size design:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/vmeio_pkg.sv tb/tb_vmeio_top.sv --top-module tb_vmeio_top
./obj_dir/Vtb_vmeio_top
```

The other testbenches build the same way with their own top module.

`tb_vmeio_top` acts as a VME master with a bus-error timeout and works
through these scenarios:

* power-up values;
* A32 and A24 addressing, register images and bus errors;
* latch and pulse outputs, including the pulse width in clocks;
* strobe capture, an ignored second strobe, re-arming, RDSYNC and RDASYNC;
* synchronous and asynchronous interrupts with the status byte, ROAK release,
  re-enable rules and the daisy-chain pass-through.

It counts each of these mechanisms and fails if any never happened. The
block testbenches add random sequences checked against reference models.

## What is assumed rather than specified

The register-level behaviour above follows the original module's
specification. These points are this design's own choices:

* **Clocking.** A 16 MHz `clk`, taken to be the VME SYSCLK, with two-flop
  synchronizers. The original's internal timing is not published. The
  STROBE-clocked register and the edge flags keep its 10 ns input figures.
* **Pulse length.** `PULSE_CYCLES = 1`, the nearest whole clock to the
  nominal 60 ns.
* **D32 only.** Cycles that are not D32 are never acknowledged.
* **IACK handling.** The IACKIN*/IACKOUT* daisy chain and the level-7 check
  follow normal VME interrupter practice.
* **Re-enable rules.** An INTSRC write re-enables either source. A CLSTB
  write re-enables only the synchronous source. INTSRC clears the captured
  edges.
* **Status vector.** Worked out from the channels active at the time of the
  IACK cycle.
* **Unused read bits.** Bits that a read does not define read as 1, including
  the upper byte of RDASYNC.
* **STROBE edge.** The rising edge of STROBE is the active one.
* **Layout.** The logic is one netlist. How the original split it across its
  six CPLDs is not reproduced.

### Not in the RTL

* NIM/ECL input receivers, with their jumper selection per group of 8
  channels.
* NIM/ECL output drivers, with their power-saving enable jumpers.
* The -5 V switching regulator.
* The capacitor-timed LED one-shots.
* The front-panel NIM daughter card.
