# FPGA controller for the TLC5615 serial DAC

The TI TLC5615 is a 10-bit voltage-output DAC with a three-wire serial input:
chip select (CS, active low), serial clock (SCLK) and data in (DIN). Rather
than bit-banging those pins from a microcontroller, this controller generates
the whole transfer in FPGA logic with a small state machine. The controller
sends two 10-bit codes in turn, without stopping, so the DAC output steps between two
voltages (a square wave whose levels are set by the codes). Changing the
waveform or the timing means changing the HDL. The board stays as it is.

## What the DAC expects

While CS is low, the TLC5615 shifts DIN into a 16-bit shift register on every
SCLK rising edge, most significant bit first. The rising edge of CS copies the
10 data bits into the DAC register, and the output changes. CS must only
change while SCLK is low. When the daisy chain output (DOUT) is not used, a
12-bit word is enough. It holds the 10-bit code, MSB first, and then two zero
bits:

```
frame[11:2] = code[9:0]     frame[1:0] = 2'b00
```

## How the controller works

Everything runs on the system clock `clk`. A divide-by-four counter
(`clk_div4`) produces `clkdiv4` and a one-cycle *step* enable at each rising
edge of `clkdiv4`. The state machine (`dac_ctrl_fsm`) advances at most once per
step. It has nine states:

| state   | next                              | action in this step                         | CS   | SCLK |
|---------|-----------------------------------|---------------------------------------------|------|------|
| Idle    | Load                              | (entered only by reset)                     | high | low  |
| Load    | Csdac                             | frame <- {code, 00}, bit count <- 0         | high | low  |
| Csdac   | Txd0                              |                                             | low  | low  |
| Txd0    | Txd1                              | bit count + 1                               | low  | low  |
| Txd1    | Shift                             | DAC samples DIN (frame MSB) on SCLK rise    | low  | high |
| Shift   | Txd2                              | frame <<= 1, zero shifted in                | low  | high |
| Txd2    | Spiend1 if bit count = 12, else Txd0 |                                          | low  | low  |
| Spiend1 | Spiend2                           | CS rises: DAC latches; start wait counter   | high | low  |
| Spiend2 | Load when wait count = 7          | then select the other code                  | high | low  |

The code alternates between frames. `code_high` is loaded first after
reset, then `code_low`, and so on. A flag toggles each time the wait in
Spiend2 ends. The wait counter is 3 bits. It is held at zero outside the
wait and counts one per step during it, so Spiend2 lasts 8 steps.

DIN is the MSB of the frame register. SCLK is high for two steps (Txd1,
Shift) and low for two (Txd2, Txd0), so DIN changes only on SCLK falling
edges. The DAC therefore sees a full step of setup and hold around each
rising edge. CS falls two steps before the first SCLK rise and rises one step
after the last SCLK fall, so it never moves while SCLK is high. Assertions in
`dac_ctrl_fsm` check both rules in simulation.

### Timing at the default parameters

| quantity                    | steps | `clk` cycles |
|-----------------------------|-------|--------------|
| one step                    | 1     | 4            |
| one bit (SCLK period)       | 4     | 16           |
| CS low (Csdac + 12 bits)    | 49    | 196          |
| CS high (Spiend1, 8 wait, Load) | 10 | 40           |
| one frame, CS edge to CS edge | 59  | 236          |
| reset release to first CS fall | 2 | 6 |

At a system clock of f, SCLK runs at f/16, and the DAC output is updated
f/236 times per second. For the TLC5615's limits, check SCLK and the CS
pulse widths against its datasheet for your clock.

### Reset

`rst_n` is asynchronous and active low (high = run). It sends the machine to
Idle from any state, including in the middle of a frame. It raises CS, lowers
SCLK, clears the counters and selects `code_high` for the next frame. A frame
cut off by reset is incomplete, but the DAC will still latch it on that CS rise.
Drive reset only when an incomplete update is acceptable, or hold CS off
the pin at board level. Any unused state encoding also returns to Idle.

## Modules

| file                    | role |
|-------------------------|------|
| `rtl/dac_ctrl_pkg.sv`   | state enum, code/frame types, `make_frame()` |
| `rtl/clk_div4.sv`       | divide-by-`DIV` counter: `clkdiv4` and the step enable |
| `rtl/dac_ctrl_fsm.sv`   | nine-state controller, frame shift register, bit and wait counters, pin decoding |
| `rtl/serial_dac_ctrl.sv`| top: divider + controller |

Top-level ports of `serial_dac_ctrl`:

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1  | system clock |
| `rst_n`      | in  | 1  | asynchronous reset, active low |
| `code_high`  | in  | 10 | code of the first and every other frame |
| `code_low`   | in  | 10 | code of the remaining frames |
| `clkdiv4`    | out | 1  | `clk`/4, for observation or as a pin |
| `dac_ncs`    | out | 1  | to TLC5615 CS |
| `dac_sclk`   | out | 1  | to TLC5615 SCLK |
| `dac_din`    | out | 1  | to TLC5615 DIN |
| `state`      | out | 4  | current state (`dac_ctrl_pkg::state_t`) |
| `frame_done` | out | 1  | one `clk` pulse per frame, in the Spiend1 step |

Parameters: `DIV` (default 4, even, at least 2) sets the clocks per step.
`WAIT_LAST` (default 7) sets the end value of the wait counter, so the wait
lasts `WAIT_LAST+1` steps. The codes are read in the Load step, so they may
change at any time and take effect from the next frame.

## Where this design adds to its source

The state sequence, the 12-bit frame, the bit count, the left shift, the
3-bit wait ending at 7, the alternation of two codes, the divide-by-four step
clock and the active-low reset all come from the published controller. The
following are this design's own choices:

- **Output decoding.** The states in which CS is low and SCLK is high were
  not specified. They were chosen to meet the TLC5615 rules listed above.
- **Wait counter.** Only its end value was given. Here it clears outside the
  wait and counts once per step inside it.
- **Clocking.** The original clocks the state machine with the divided clock.
  Here one clock domain carries a step enable, and the update points are the
  same. `clkdiv4` is still produced.
- **Registered pins.** CS and SCLK are flip-flop outputs, decoded from the
  next state, so they cannot glitch.
- **Codes as ports.** The two DAC codes were constants in the original, with
  no values given. Here they are inputs.
- **No DOUT.** The DAC's daisy-chain output is not used.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`:

- `tb/tb_clk_div4.sv` checks the period, duty cycle and tick position of the
  divider, and a reset in the middle of a period.
- `tb/tb_dac_ctrl_fsm.sv` drives the step enable with random gaps. It decodes the pins
  by protocol and checks each frame's 12 bits against the expected code.
  It also checks the step counts (2 to the first CS fall, 49 with CS low,
  59 per frame, 2+2 per SCLK period), that each state change is legal, that DIN is stable
  while SCLK is high, and that a reset in the middle of a frame acts correctly.
- `tb/tb_serial_dac_ctrl.sv` runs the top at its default parameters against
  `tb/tlc5615_model.sv`, a behavioural model of the DAC's serial interface. It
  checks what the DAC register latches frame by frame, the 12 SCLK edges and
  zero fill bits, the `clk`-cycle periods above, and that no CS edge falls
  while SCLK is high. It also counts each mechanism (bit loop, shift, wait,
  both codes, a code change, a reset in the middle of a frame) and fails
  if one never happens.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/dac_ctrl_pkg.sv tb/tb_serial_dac_ctrl.sv --top-module tb_serial_dac_ctrl
./obj_dir/Vtb_serial_dac_ctrl
```

Change the top-level testbench name to run the others. Each run takes well
under a second.

## Limits

- The analog part of the system (the DAC's resistor string, reference buffer
  and x2 output amplifier) lies outside the FPGA and is not modelled. The
  test model reports only the latched code.
- No clock frequency is given, so no output rate was verified against a
  target. All timing is stated in `clk` cycles.
