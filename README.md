# IV infusion controller: FPGA step-and-sense hardware

A gravity drip infusion slows down as the bag empties, so somebody has to keep
adjusting the roller clamp. This design automates that adjustment. A stepper
motor squeezes the drip-feed hose, an optical sensor sees each drop fall, and a
host PC closes the loop: it measures the time between drops, compares it with
the target rate (4 to 80 drops/min) and decides how many steps, and in which
direction, the motor must turn.

The FPGA hardware described here is the part of that loop between the PC's
parallel port and the field. It does two jobs:

* **sense** – latch each drop seen by the sensor until the PC has read it, and
  pass on the patient button ("patient ready");
* **act** – take one 8-bit instruction from the PC (direction + 0..127 steps)
  and turn it into that many phase changes on the four motor lines, then tell
  the PC it is finished.

The control algorithms themselves (bang-bang correction, pre-/post-control,
range control, time-outs, error messages) run as software on the PC and are
not part of this RTL.

## Block structure

```
            data_in[7:0] ─┐
 host    en, clr_drop,  ──┤  comm_block  ── instr.dir ─────────────┐
 PC      rst_cont       ──┤  (instr. register,                      │
 (par.   drop_out,      ◄─┤   DROP_FF, status      instr.steps,     ▼
 port)   buttom_out,      │   buffers, input       en_pulse,   motor_ctrl ──► motor[3:0]
         done, a_rd_cont◄─┤   synchronisers)       rst_cont_s      ▲
 sensor  drop_in ─────────┤                           │            │ step
 button  buttom_in ───────┘                           ▼            │
                                                  exec_unit ───────┘
                                                  (EN_I, 7-bit counter,
                                                   RD_CONT)
```

| File | Role |
|---|---|
| `rtl/ivics_pkg.sv` | instruction type `instr_t` (`dir`, `steps`), `STEP_BITS = 7`, the motor phase table and step function |
| `rtl/sync_ff.sv` | two-flip-flop synchroniser for each asynchronous input |
| `rtl/comm_block.sv` | instruction register, DROP_FF drop flag, status buffers |
| `rtl/exec_unit.sv` | EN_I enable register, step counter, RD_CONT register |
| `rtl/motor_ctrl.sv` | phase sequence generator |
| `rtl/ivics_hw.sv` | top level |

## The host handshake

The part that needs the most care is the three-signal handshake between the
PC and the execution unit. The PC software is slow and runs at its own pace,
so the hardware does not start stepping the moment an instruction arrives.
Instead:

1. The PC waits for `done = 1`, writes the instruction to `data_in`, then
   raises `en`.
2. The rising edge of `en` loads the instruction register and sets **EN_I**.
   While EN_I is high the step counter is reloaded with the step count on
   every clock and no steps are made.
3. One clock after the counter is loaded, **RD_CONT** sets and `a_rd_cont`
   tells the PC "I have your count".
4. The PC answers with `rst_cont`, which clears both EN_I and RD_CONT.
5. From the next clock the counter counts down by one per clock. Each clock
   with a non-zero count is one motor step. When the counter reaches zero,
   `done` returns to 1 and the PC may send the next instruction.

So the PC decides when the move begins, and however long it waits before
step 4, the count it loaded is what gets executed. An instruction of N steps
gives exactly N phase changes; N = 0 is legal and moves nothing. If `en` and
`rst_cont` arrive in the same clock, `rst_cont` wins.

Cycle counts at the default `SYNC_STAGES = 2` (rising edges of `clk`):

| from | to | edges |
|---|---|---|
| `en` rises | instruction register loaded | 3 |
| `en` rises | `a_rd_cont` high | 4 |
| `rst_cont` rises | first motor step | 4 |
| `rst_cont` rises | `done` high | 3 + N |
| `drop_in` rises | `drop_out` high | 3 |

`clk` is the step clock: one motor step per clock, so the clock frequency is
the motor speed.

## Instruction format

| bit | meaning |
|---|---|
| 7 | direction: 0 = forward, 1 = reverse |
| 6..0 | number of steps, 0..127 |

## Drop flag and button

`drop_out` (DROP_FF) goes high on the rising edge of the synchronised sensor
signal and stays high after the drop has passed, until the PC pulses
`clr_drop`. Because it is set by the edge, a drop still in the beam when the
PC clears the flag is not counted a second time. If a new drop and a clear
arrive in the same clock, the drop wins. At 80 drops/min there are at least
750 ms between drops, so the PC has plenty of time to poll and clear.

`buttom_out` is the synchronised level of the patient button: 1 means the
patient is ready and the PC may start the infusion.

## Motor sequence

`motor_ctrl` keeps the motor position as a 2-bit index into four phase
patterns:

| index | `motor[3:0]` |
|---|---|
| 0 | 0110 |
| 1 | 1100 |
| 2 | 1001 |
| 3 | 0011 |

Forward steps go 0 → 1 → 2 → 3 → 0, reverse steps go the other way. Between
steps the lines hold their pattern, so the motor keeps its holding torque.
Reset gives pattern 0110.

## How this RTL differs from the original hardware

The original was built on a small Xilinx XC3020 FPGA, with some flip-flops wired by
hand. This version is a single-clock synchronous rewrite of the same
registers and behaviour, with these deliberate differences:

* **One clock edge.** The original loaded the counter on the falling clock
  edge and drove the motor from a gated clock (CK while the counter is
  non-zero). Here everything is on the rising edge and the gated clock is a
  `step` enable.
* **Synchronous handshake resets.** EN_I and RD_CONT were cleared through
  the flip-flops' direct (asynchronous) reset by RST_CONT; here `rst_cont` is
  synchronised and clears them on the clock. `rst_n` is a separate
  asynchronous power-on reset for all registers.
* **Input synchronisers.** `en`, `clr_drop`, `rst_cont`, `drop_in` and
  `buttom_in` each pass through `SYNC_STAGES` flip-flops. This adds the few
  clocks of latency in the table above. `data_in` is not synchronised: the
  PC writes it before raising `en`.
* **Edge-triggered EN and drop.** One `en` pulse starts exactly one
  instruction, and one drop sets the flag once, however long either signal
  stays high.
* **Direction register folded in.** The original copied the direction bit
  into its own register when EN_I rose. Here the motor reads bit 7 of the
  instruction register directly. That register changes only on `en`, before
  any step of the new instruction, so the behaviour is the same.
* **No illegal motor state.** The position is an index, so the original's
  fall-back to an initial pattern for an unknown pattern is not needed.
* **`done` held low while an instruction is pending.** From the moment EN_I
  sets until the count has run out, `done` is 0, even if the old counter
  value was zero.

The design needs 32 flip-flops: 20 for the original registers and 12 for
synchronisers and edge detection. That is well within the 64 two-flip-flop
CLBs of the original device.

Not covered: the PC software, the sensor, the motor driver and the
parallel-port electronics. The closed-loop results of the original system
(steady-state error of ±1 drop/min, setup times of 12 to 24 s) depend on
them and cannot be reproduced from the RTL alone.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `SYNC_STAGES` | `ivics_hw`, `comm_block`, `sync_ff` | 2 | synchroniser depth, at least 2 |
| `STEP_BITS` | `ivics_pkg` (constant), `exec_unit` | 7 | width of the step count |

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops. Build and run one with plain
Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module ivics_hw_tb rtl/ivics_pkg.sv tb/ivics_hw_tb.sv
./obj_dir/Vivics_hw_tb
```

| testbench | what it checks |
|---|---|
| `motor_ctrl_tb` | both phase orders, holding without `step`, random step/direction |
| `exec_unit_tb` | handshake timing, counter held while EN_I is high, exactly N steps on consecutive clocks, `rst_cont` priority, counts 0/1/127 and random |
| `comm_block_tb` | instruction load and latency, one load per `en`, drop flag set/hold/clear, no double count, drop-over-clear priority, button, buffers |
| `ivics_hw_tb` | the full design at default parameters, driven by a model of the PC's protocol. It checks every motor move against a reference, the step counts and the handshake cycle counts. It also counts forward, reverse, zero-step and 127-step instructions, slow acknowledges, drops, clears and the button, and fails if any of them never happened |

The testbenches use only `$urandom` for random stimulus and need no files.
