# A button-driven NAND flash command sequencer with an on-chip page buffer

This is a small FPGA flash controller. It produces the pin-level timing of a
NAND flash interface in the ONFI style: chip enable, command and address latch
enables, a write strobe and a data strobe. The bus is cut down to two bits.
A press of a board button starts a **Reset** or a **Page Program** command.
The 8 board switches give the address. The 32 two-bit data beats of a page come
from an on-chip 32x2 static RAM.

Apart from the bus width and the command codes, the controller behaves like a
real flash controller. It tracks where it is in a multi-cycle command
sequence. It puts commands, addresses and data on one shared bus. It strobes
commands and addresses with WE# and data with DQS. It streams a page out of a
RAM buffer.

```
            +------------------------- flash_controller --------------------------+
 btn[3:0] ->| button_input --press/level--> flash_ctrl_fsm --pins--> ceb cle ale   |--> to the
 sw[7:0]  ->|                                 |   ^                web dq dqs     |    flash
            |                        ram_raddr|   |ram_rdata       dq_oe dqs_oe   |    device
 ram_we   ->|                                 v   |                               |
 ram_addr ->|---------------------------->  ram32x2s (32 x 2 page buffer)          |
 ram_wdata->|                                                                     |
            +---------------------------------------------------------------------+
```

## The 2-bit flash bus

| wire       | meaning                                                          |
|------------|------------------------------------------------------------------|
| `ceb`      | CE#, chip enable, active low; low for the whole command           |
| `cle`      | command latch enable: the device latches DQ as a command          |
| `ale`      | address latch enable: the device latches DQ as an address chunk   |
| `web`      | WE#, active low; its **rising** edge latches commands and addresses |
| `dq[1:0]`  | shared command/address/data bus, with enable `dq_oe`              |
| `dqs`      | data strobe; its **rising** edge marks each data beat; enable `dqs_oe` |

Everything is single data rate. Because the bus has only two bits:

* commands use 2-bit codes: **Reset = `11`**, **Page Program = `01`**;
* the 8-bit switch address is sent as four 2-bit chunks, least significant
  first: C1 = `sw[1:0]`, C2 = `sw[3:2]` (column nibble), then
  R1 = `sw[5:4]`, R2 = `sw[7:6]` (row nibble);
* a page is 32 beats of 2 bits (64 bits).

`dq` and `dqs` leave the controller as a value plus an output enable. The
FPGA pad's tri-state buffer turns that pair into a high-Z wire (`*_oe = 0`
means high-Z). Undriven, the value lines hold `dq = 00` and `dqs = 1`. No
tri-state logic is inside the RTL, so it simulates the same in two-state
simulators. The port names match the board pin names `ceb`, `cle`, `ale`,
`web`, `dq[0]`, `dq[1]` and `dqs`.

## Clocking: two clocks per bus cycle

This is the part most worth understanding before changing the code.

In the command timing, every step of a sequence lasts one *bus cycle*. The
strobes WE# and DQS are low for the first half of their bus cycle and high for
the second half. Their rising edge therefore falls in the middle of the cycle,
where DQ is stable. With one clock edge per bus cycle, that half-cycle pulse
would need the other clock edge or a gated clock.

Instead, the controller clock `clk` runs at **twice the bus-cycle rate**. A
phase bit splits each bus cycle into phase 0 and phase 1:

```
clk        _|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_
phase        0 | 1 | 0 | 1 | 0 | 1
bus cycle  |  PRG_B  |  PRG_C  |  PRG_D  ...
web        ‾‾|_____|‾‾‾‾|_____|‾‾‾‾|_____|‾‾‾‾   (low in phase 0, high in phase 1)
dq         ==|   C1     |   C2     |   R1  ...
```

Every flip-flop is clocked on the rising edge of `clk`. All pins come straight
from flip-flops (`pins_q` in `flash_ctrl_fsm`), so the strobes have no
combinational glitches. The pins lag the state register by one `clk`.

## Command sequences

States and the pins they drive. Each state lasts one bus cycle, which is two
`clk`. The exception is DATA_OUTPUT, which lasts one bus cycle per beat.

| state        | ceb | cle | ale | web pulse | dq            | dqs pulse |
|--------------|-----|-----|-----|-----------|---------------|-----------|
| IDLE         | 1   | 0   | 0   | –         | high-Z        | –         |
| RES / PRG    | 1   | 0   | 0   | –         | high-Z        | –         |
| RES_A        | 0   | 1   | 0   | yes       | `11`          | –         |
| PRG_A        | 0   | 1   | 0   | yes       | `01`          | –         |
| PRG_B..PRG_E | 0   | 0   | 1   | yes       | C1, C2, R1, R2 | –        |
| PRG_F, PRG_G | 0   | 0   | 0   | –         | high-Z        | –         |
| DATA_OUTPUT  | 0   | 0   | 0   | –         | D0 .. D31     | yes, one per beat |

* **Reset:** IDLE → RES → RES_A → IDLE. CE# is low for one bus cycle and WE#
  pulses once.
* **Page Program:** IDLE → PRG → PRG_A → PRG_B → PRG_C → PRG_D → PRG_E →
  PRG_F → PRG_G → DATA_OUTPUT (32 bus cycles) → IDLE. There are five WE#
  pulses, a two-cycle gap with the bus released before the data, and 32 DQS
  pulses. CE# stays low for 39 bus cycles.

RES and PRG keep the bus inactive for one cycle after a command is accepted.
PRG_F and PRG_G give the device its command-to-data turnaround time. In
DATA_OUTPUT a 5-bit counter is loaded with `0x1F` and counts down to zero.
Beat Di is read from RAM word i (read address = 31 − counter).

### Cycle counts (at `clk`)

| event                                     | clocks |
|-------------------------------------------|--------|
| button rises → CE# falls                  | 6 (2 synchroniser, 1 accept, 1 pin register, 2 for RES/PRG) |
| CE# low, Reset                            | 2      |
| CE# low, Page Program                     | 78     |
| DQS driven, Page Program                  | 64     |
| busy, Reset / Page Program                | 4 / 80 |

## Buttons, switches and initialisation

| button         | action |
|----------------|--------|
| 1 (`btn[0]`)   | Reset command |
| 2 (`btn[1]`)   | Page Program, address taken from `sw` |
| 3 (`btn[2]`)   | unused |
| 4 (`btn[3]`)   | initialise: while held, every register returns to its start value and DQ/DQS are high-Z |

`button_input` passes each button through a two-flop synchroniser and makes a
one-cycle pulse on each rising edge. A held button therefore starts one
command only. The switch address is latched when the command is accepted, so
moving the switches during a command has no effect. Presses that arrive while
a command runs are ignored. If buttons 1 and 2 rise together, Reset wins.
There is no debouncing: use debounced buttons, or release the button before
the command ends.

The registers also power up in the initialised state, through FPGA
configuration values given as declaration initialisers. Button 4 is needed
only to abort a command.

## The page buffer (`ram32x2s`)

The page buffer is a 32-word by 2-bit RAM. It has the port names of the FPGA
library primitive RAM32X2S (`A0`..`A4`, `D0`, `D1`, `O0`, `O1`, `WCLK`, `WE`).
Writes happen on the rising edge of `WCLK`. Reads are asynchronous. Its
power-up contents are set by two 32-bit parameters. `INIT_00` holds bit 0 of
every word and `INIT_01` holds bit 1, so word k = `{INIT_01[k], INIT_00[k]}`.
The defaults are `CAFEF00D` and `005EABED`. With no load, a Page Program
therefore sends

```
D0..D31 = 3 0 3 3 0 2 2 2  2 2 0 2 1 3 1 3  0 3 3 3 3 1 3 1  0 1 0 1 0 0 1 1
```

The module is written as a plain array, so any synthesis tool can map it to
distributed or block RAM. It does not instantiate the vendor primitive.

The controller's top level adds a load port (`ram_we`, `ram_addr`,
`ram_wdata`) so that other pages can be sent. The load port writes only while
`busy` is 0. During a command, the RAM address belongs to the sequencer.

## Where this design makes its own choices

The command sequences, codes, chunk order, page size, 0x1F down-counter,
button meanings and RAM contents follow the lab exercise this controller
implements. The following are choices of this design:

* **Clocking.** The state machine runs at twice the bus-cycle rate and uses a
  phase bit, as described above. The exercise also allows a state machine at
  the bus-cycle rate that runs on the falling clock edge. Both give the same
  external timing. Only the rising-edge form is built.
* **Registered pins** and their one-clock lag behind the state.
* **Beat order.** D0 comes from RAM word 0.
* **Asynchronous RAM read**, and the bit order of the INIT words, copied from
  the vendor primitive.
* **Load port**, request handling (ignore while busy, Reset first) and
  **button 3 unused**.
* **No DDR and no Page Read.** DQ and DQS are output-only. DDR data transfer
  and the Page Read command belong to a later stage of the design and are not
  here.

The NAND device itself is not part of this RTL. Neither are the FPGA pads
and pin constraints.

## Files

| file | contents |
|------|----------|
| `rtl/flash_pkg.sv` | bus width, command codes, state enum, `flash_pins_t` pin bundle |
| `rtl/flash_controller.sv` | top level: buttons + sequencer + page RAM |
| `rtl/flash_ctrl_fsm.sv` | command sequencer, pin decode and register, bus-rule assertions |
| `rtl/button_input.sv` | synchroniser and press detector |
| `rtl/ram32x2s.sv` | 32x2 page RAM |
| `tb/tb_flash_controller.sv` | end-to-end test at default parameters |
| `tb/flash_device_model.sv` | simulation-only receiver that records what the device would latch |
| `tb/tb_flash_ctrl_fsm.sv`, `tb/tb_ram32x2s.sv`, `tb/tb_button_input.sv` | unit tests |

`flash_ctrl_fsm` carries three concurrent assertions:

* CLE and ALE are never high together;
* DQ and DQS are driven, and WE# is pulsed, only while CE# is low;
* WE# is pulsed only with CLE or ALE high.

## Simulating

Every testbench checks itself. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/flash_pkg.sv tb/tb_flash_controller.sv --top-module tb_flash_controller
./obj_dir/Vtb_flash_controller
```

To run the unit tests, substitute their names. The end-to-end test does the
following:

* initialises the controller;
* sends Reset twice;
* sends Page Program four times: first the power-up page, then pages loaded
  at random through the load port;
* during each Page Program, presses another button and attempts a RAM load,
  and checks that both are refused;
* aborts a command with button 4 in the middle of its data phase.

The device model records the commands, address chunks and data beats it sees.
The test compares them with values it predicts itself, and checks the cycle
counts in the table above. It finishes in well under a second.
`tb_flash_ctrl_fsm` compares every pin on every clock with a reference table.

## Changing it

* **Page length:** `DATA_BEATS` (on `flash_controller` and `flash_ctrl_fsm`)
  sets the number of beats. It can be at most 32, because the RAM is 32 deep.
* **Page contents at power-up:** `INIT_00` and `INIT_01`.
* **New commands:** add states to `state_t` in `flash_pkg`, a transition in
  the next-state `case`, and a pin decode entry. Every non-IDLE state
  automatically lasts one bus cycle with a WE#/DQS pulse available in phase 0.
