# 8-bit GPIO controller for a 32-bit microcontroller (AXI4-Lite and APB)

This is the digital controller of an eight-pin general-purpose I/O port that
sits on the bus of a 32-bit RISC-V microcontroller. Each pin is a pad
cell that can be an output or an input. The controller drives the cell's
digital pins directly, with no extra buffering. Software does not program a
direction register. **The direction of a pin follows the last access to
it:**

* a **write** to a pin makes it an output, with a given level and drive strength;
* a **read** from a pin makes it an input and returns the level on it.

There are two controllers with the same behaviour. One serves an AXI4-Lite
bus (`axi_gpio`) and the other an APB bus (`apb_gpio`). They differ only in
their state machine. Both share one register datapath (`gpio_datapath`).
`gpio_top` puts the two side by side, each with its own ports. That way
either one can be used, or both can be simulated together.

## Programming model

The pin number is the low three bits of the bus address. The controller
ignores all higher address bits. Your interconnect must decode the
controller's base address.

| access | address | data | effect on pin `A[2:0]` |
|---|---|---|---|
| write | `A` | `D[0]` = level, `D[1]` = drive strength, `D[31:2]` ignored | becomes an output: `I=D[0]`, `DS=D[1]`, `OEN=0`, `IE=0` |
| read  | `A` | returns `{31'b0, level}` | becomes an input: `IE=1`, `OEN=1`; the last `I`/`DS` values are kept |

* Every response is OKAY. There are no error responses, and `WSTRB` and the
  protection signals are not used.
* After reset every pin is undriven with its input buffer off (`OEN=1`,
  `IE=0`, `I=0`, `DS=0`).
* A pin can be read only as an input. Reading an output pin turns it around:
  the controller stops driving it and returns whatever the outside world
  (or the cell's pull-down) puts on it.

## Pad-cell interface

Each controller has five 8-bit buses. Bit *i* belongs to pin *i*.

| port | cell pin | meaning |
|---|---|---|
| `pad_i`   | I   | level to drive when the pin is an output |
| `pad_ds`  | DS  | drive-strength select |
| `pad_oen` | OEN | output enable, **active low** |
| `pad_ie`  | IE  | input enable, active high; C is valid only while IE is high |
| `pad_c`   | C   | pad level seen through the input path (input to the controller) |

The pad cell itself is analog and is not part of this RTL. It contains
ESD protection, a Schmitt trigger, level shifters between the 1.2 V core and
the 2.5 V pad supply, a pull-down, a tri-state control that keeps the P and N
drivers from conducting together, and power-on control. The cell's
pull-down enable (PE) is not driven by the controller; tie it as your pad
ring requires. For simulation, `tb/gpio_pad_model.sv` models the cell's
logic. The pad carries `I` while `OEN` is low. Otherwise it carries the
external drive, or 0 through the pull-down. `C = IE ? pad : 0`.

## The fast path and the DELAY state (`vel`)

This is the least obvious part of the design. Each state machine has a
write loop and a read loop, and each loop has an optional **DELAY** state.
The `vel` input chooses between them:

* `vel = 1` (fast): the loop goes straight to its END state.
* `vel = 0`: the loop spends one extra cycle in DELAY.

On a write the extra cycle changes only the latency. On a read it changes
the result. The read decoder pulses `R[pin]` in the READ state, and the
IE/OEN register turns the input buffer on at the end of that cycle.

* With `vel = 0`, the read-data register samples the pin at the end of
  DELAY, one full cycle after IE came on. The value is the true pin level.
* With `vel = 1`, the register samples at the end of READ, in the same edge
  that turns IE on.
  * If the pin was already an input (IE already high), the value is correct.
  * Otherwise the read returns 0, because the input path is still off.

Use `vel = 1` only for repeated reads of a pin that is already an input.
For the first read after reset, or after a write to that pin, use `vel = 0`,
or read twice. The testbenches check exactly this rule.

`vel` is an input port, so a system can strap it or drive it from a
configuration bit. Sample it as static during a transfer.

## AXI4-Lite state machine (`axi_gpio_fsm`)

```
START --AWVALID--> WRITE --(WVALID, vel)--> END_WRITE --BREADY--> START
                         \-(WVALID,!vel)--> DELAY --> END_WRITE
START --ARVALID--> READ  --vel--> END_READ --RREADY--> START
                         \-!vel-> DELAY --> END_READ
```

| state | outputs |
|---|---|
| START | loads the address register of the request it accepts; write wins if AWVALID and ARVALID arrive together |
| WRITE | waits for WVALID, then raises AWREADY and WREADY in the same cycle and pulses the write decoder (W) |
| END_WRITE | holds BVALID until BREADY |
| READ | raises ARREADY and pulses the read decoder (R) |
| END_READ | holds RVALID, with RDATA stable, until RREADY |

The controller handles one transaction at a time. Latency, counted from
AWVALID/ARVALID with a master that answers at once: BVALID or RVALID
arrives 2 cycles later with `vel=1` and 3 with `vel=0`.

The controller asserts these AXI handshake rules:

* BVALID and RVALID stay high until accepted;
* RDATA is stable while RVALID waits;
* AWREADY and WREADY rise together.

## APB state machine (`apb_gpio_fsm`)

```
reset -> START -> SELECT --(PSEL&PENABLE, PWRITE)--> WRITE --vel--> END_WRITE -> START
                        \                                  \-!vel-> DELAY -> END_WRITE
                         \-(PSEL&PENABLE,!PWRITE)-> READ  --vel--> END_READ  -> START
                                                          \-!vel-> DELAY -> END_READ
```

The steps of a transfer:

1. SELECT waits for the access phase. It loads PADDR into the address
   registers (PENABLE is the load enable) and branches on PWRITE.
2. WRITE or READ pulses its decoder while PSEL is high.
3. The END states raise PREADY for one cycle.

The access phase lasts 3 cycles with `vel=1` and 4 with `vel=0`. The START
cycle after each transfer overlaps the next setup phase, so back-to-back
transfers cost no idle cycle. PSLVERR is not provided. The controller
asserts that PREADY only rises during an access phase.

## Datapath (`gpio_datapath`)

The two controllers use the same datapath. Each state machine drives it
through five strobes (`dp_ctrl_t` in `gpio_pkg`):

* `wa_load`: the write-address register keeps the address bits [2:0].
* `wdec_en`: the 3-to-8 write decoder produces the one-hot `W`. `W[i]` loads
  write-data bits [1:0] into pin *i*'s `I`/`DS` flops and makes the pin an
  output.
* `ra_load`: the read-address register keeps the address bits [2:0]. They
  select one of the eight `C` inputs through an 8:1 mux.
* `rdec_en`: the read decoder produces `R`. `R[i]` makes pin *i* an input.
* `rdata_load`: the mux output, zero-extended, is captured in the 32-bit
  read-data register.

All flops except the read-data register reset asynchronously on the active-low
reset. The read-data register has no reset; it is only read after a load.
`PINS` (default 8) sets the port width; the package holds the bus widths.

## What follows the original design and what is this implementation's choice

Taken from the original design description:

* the two controllers;
* the states and the transitions labelled AWVALID, ARVALID, PWRITE, VEL,
  BREADY and RREADY;
* the datapath blocks and their enables (AWVALID/ARVALID/Penable for the
  address registers, AWREADY/ARREADY/PSEL for the decoders);
* the 3-bit pin select;
* the two write-data bits that feed data out and DS;
* the IE/OEN register fed by R and W;
* the 32-bit read register behind an 8:1 input mux.

Choices made here, where the description is silent:

* what `vel` means, and that it is an input port;
* which write-data bit is level and which is drive strength;
* that OEN is active low;
* that the IE/OEN register holds a per-pin direction, set by W and cleared
  by R;
* the reset values;
* that the AXI write waits for WVALID and accepts address and data
  together;
* that writes have priority over reads;
* that the APB machine waits for the access phase in SELECT;
* the load enable on the read-data register, which keeps RDATA stable while
  the response waits;
* OKAY-only responses;
* that the upper address bits are ignored.

Not covered by this RTL: the analog pad cell, and the published synthesis
figures, which depend on the cell library. At 100 MHz in 130 nm CMOS the
AXI4-Lite controller took 3024 µm² and 6.52 µW/MHz with 7.9 ns of slack, and
the APB controller 2846 µm² and 2.80 µW/MHz with 8.6 ns of slack. The AXI4-Lite version
was reported working on silicon with a 200 MHz bus clock.

## Files

| file | contents |
|---|---|
| `rtl/gpio_pkg.sv` | widths, state enums, datapath strobe struct |
| `rtl/gpio_datapath.sv` | shared register datapath |
| `rtl/axi_gpio_fsm.sv`, `rtl/axi_gpio.sv` | AXI4-Lite state machine and controller |
| `rtl/apb_gpio_fsm.sv`, `rtl/apb_gpio.sv` | APB state machine and controller |
| `rtl/gpio_top.sv` | both controllers side by side |
| `tb/gpio_pad_model.sv` | logic-only model of one pad cell |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For
example, to run the end-to-end test of both controllers at full size:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_gpio_top \
    rtl/gpio_pkg.sv rtl/gpio_datapath.sv rtl/axi_gpio_fsm.sv rtl/axi_gpio.sv \
    rtl/apb_gpio_fsm.sv rtl/apb_gpio.sv rtl/gpio_top.sv \
    tb/gpio_pad_model.sv tb/tb_gpio_top.sv
./obj_dir/Vtb_gpio_top
```

What each testbench checks:

* `tb_gpio_datapath`: drives the strobes directly. It checks the decode of
  every pin, hold behaviour and reset.
* `tb_axi_gpio_fsm` and `tb_apb_gpio_fsm`: compare every output and the state
  cycle by cycle for hand-written scenarios, including latencies.
* `tb_axi_gpio` and `tb_apb_gpio`: run random transfers against eight pad
  models. The masters add random delays and external devices drive the pins.
  A reference model predicts pad outputs and read values.
* `tb_gpio_top`: runs both controllers at once on unrelated clocks, at the
  default size. It counts every mechanism and fails if any of them never
  occurs. The mechanisms are:
  * fast and delayed reads and writes;
  * output-to-input turnaround;
  * drive strength set;
  * a late WVALID;
  * BREADY and RREADY held off;
  * AWVALID and ARVALID raised together;
  * back-to-back APB transfers.
