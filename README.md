# FPGA speed controller for a DC motor, with a Linux co-processor link

This is the hardware half of a hardware/software co-designed speed controller
for a DC motor. An FPGA closes a PI speed loop entirely in logic: it reads an
incremental encoder, computes the speed, runs an anti-windup PI controller and
drives a PWM bridge, once per sampling period. A small Linux board (the
"software half", not part of this RTL) sits next to it on an SPI link. It sets
the gains and the speed reference, reads the measured speed back for display,
and can take over the motor itself ("software mode"), in which case the FPGA
only measures speed and generates the PWM.

The main idea of the hardware is a strictly sequential control cycle built
from independent modules, each with a Start/End handshake and a fixed latency,
chained by a global control unit so that the cycle time is exactly the sum of
the module latencies:

| stage | module | latency (cycles) | at 50 MHz |
|---|---|---|---|
| speed capture | `speed_capture` | 15 | 0.30 us |
| SPI parameter stage | `spi_interface` | 16 | 0.32 us |
| PI controller | `pi_controller` | 14 | 0.28 us |
| PWM duty stage | `pwm_gen` | 4 | 0.08 us |
| **whole cycle** | `global_ctrl` | **49** | **0.98 us** |

The sampling period defaults to 1 ms (50,000 cycles), so the loop computation
uses about 0.1 % of it. Those latencies are the targets the design was built
to; every module hits its own exactly, and the testbenches check it cycle by
cycle.

## Block diagram

```
             enable                              +-------------------+
               |                                 |   global_ctrl     |
               v                                 | Ts timer + FSM    |
   Start every Ts ------------------------------>| speed->spi->pi->pwm|
                                                 +---+----+----+----+-+
                                       start/done    |    |    |    |
 enc_a,enc_b --> [speed_capture] --speed-----------+ |    |    |    |
                  quad_decoder, serial_mult        | |    |    |    |
                                                   v v    |    |    |
 SPI pins <----> [spi_interface] --params (kp, ki_ts, ref, sw_cmd, sw_mode)
                  SPI slave, shadow regs,          |      |    |    |
                  Ki*Ts on serial_mult             v      v    |    |
                                              [pi_controller]--vref-+
                                                one mult, one adder |
                                                                    v
                                                 [pwm_gen] --> pwm_out, dir_out
```

`motor_ctrl_top` wires these together and brings status out as ports.

## The control cycle

`global_ctrl` counts `TS_CYCLES` clock cycles and, while `enable` is high,
gives one Start pulse per period. Its FSM then:

1. starts `speed_capture`;
2. when speed capture's End arrives, starts the SPI parameter stage *in the
   same cycle*;
3. likewise the PI controller on the SPI stage's End;
4. and the PWM duty stage on the PI controller's End;
5. PWM's End closes the cycle (`cycle_done`), and `exec_cycles` reports how
   long it took (49).

Because the next Start is the previous End, combinationally, there are no
hand-over cycles. If a sampling instant falls while a cycle is still running
(which can only happen if `TS_CYCLES` is set below the execution time or a
module is modified), that Start is skipped and the sticky `overrun` output
goes high. An assertion at time zero of simulation flags `TS_CYCLES <= 49`.

## Number formats

All loop signals are 12-bit fixed point (defined in `mc_pkg`):

* speed, speed reference, speed error, vref and the software command:
  signed 12-bit integers. Speed is in encoder counts (x4 decoded) per sampling
  period, times the `KSPEED` scale;
* Kp, Ki and `KSPEED`: unsigned Q4.8 (0 to 15.996, 1.0 = 256);
* the PI integrator: 26-bit signed, 8 fractional bits;
* full-scale voltage: vref = +-2047 means 100 % duty.

## The PI controller: shared operators under a control unit

This is the part of the design with the most structure. Instead of a
dedicated circuit per operation, `pi_controller` has one 13x12-bit
multiplier with registered operands and product (like an FPGA hard
multiplier), one 26-bit adder, and a set of registers. A 4-bit step
counter acts as the control unit. For each step it selects the adder's
operands and enables the registers to load. The control law is

```
e    = sat12(speed_ref - speed)
up   = (Kp * e) >>> 8
acc' = clamp(acc + Ki_ts * e, +-VMAX*256)
v    = up + (acc' >>> 8)
vref = clamp(v, VMIN, VMAX)
acc  = acc'   unless v is saturated in the direction e would push it
```

Its schedule (Start is cycle 0, and it latches the inputs):

| step | operator | operation |
|---|---|---|
| 1 | adder | e = ref - meas, saturated to 12 bits |
| 2 | – | load multiplier operands (Kp, e) |
| 3 | multiplier | p = Kp * e |
| 4 | – | up = p >>> 8 |
| 5 | – | load multiplier operands (Ki_ts, e) |
| 6 | multiplier | p = Ki_ts * e |
| 7 | adder | acc' = acc + p |
| 8 | – | clamp acc' to +-VMAX in integrator units |
| 9 | adder | v = up + acc'/256 |
| 10 | comparators | saturated high / low? |
| 11 | – | anti-windup: commit acc' only if allowed |
| 12 | – | vsat = clamp(v) |
| 13 | – | drive vref and `saturated`, raise End |

End and the new `vref` show up in cycle 14. The anti-windup scheme uses
conditional integration (clamping). When the output is saturated and the
error would drive it further into saturation, the integrator holds its value.
The integrator is also bounded to the output range. As a result, once the
error reverses, the output leaves saturation as soon as the proportional term
allows, instead of first having to unwind an integrator that grew during
saturation. `tb_pi_controller` checks this on the first sample after a
reversed error, and the closed-loop test checks it within eight samples.

A Start pulse that arrives during a computation is ignored.

## Speed capture

`quad_decoder` brings A and B in through two flip-flops each and decodes all
four edges of each encoder cycle into a 16-bit wrapping position counter. A
step in which both lines change at once cannot be decoded. It sets
`enc_err`, which is sticky at the top. At each Start, `speed_capture` takes the
position difference since the previous Start (the counts in one sampling
period) and saturates it to 12 bits. It then multiplies the magnitude by
`KSPEED` on a 12-step shift-and-add multiplier (`serial_mult`), divides by
256, saturates to 2047 and restores the sign. The timing is: latch in cycle
0, multiply in cycles 1–13, scale in cycle 14, End in cycle 15. The encoder may
step at most once every two clock cycles.

## SPI link and parameter stage

The Linux board is the SPI master. The FPGA is a mode-0 slave
(CPOL = 0, CPHA = 0). Frames are 16 bits, MSB first, `{addr[3:0], data[11:0]}`:

| addr | register | format | reset |
|---|---|---|---|
| 0 | Kp | unsigned Q4.8 | 256 (1.0) |
| 1 | Ki | unsigned Q4.8 | 0 |
| 2 | speed reference | signed | 0 |
| 3 | software voltage command | signed, +-2047 = full scale | 0 |
| 4 | control: bit 0 = software mode | | 0 |
| other | ignored (use for read-only frames) | | |

While a frame is being shifted in, MISO returns the status word
`{sw_mode, saturated, overrun, enc_err, speed[11:0]}`, sampled when CS_n
falls. That is how the computer reads speed for plotting, or for its own
control loop in software mode. SCLK, CS_n and MOSI are synchronised into the
system clock with two flip-flops each. Keep SCLK at or below clk/8, and let
four clk cycles pass between CS_n falling and the first SCLK edge. A frame cut
short by CS_n rising is dropped.

A complete frame writes a *shadow* register only. The loop sees new values at
the SPI stage of the next control cycle. That stage snapshots all shadow
registers and computes the discrete integral gain
`Ki_ts = Ki * TS_SCALE / 4096` on a serial multiplier, truncating the result.
It then publishes Kp, Ki_ts, reference, command and mode together, so the PI
controller never works with a half-updated set. The stage takes 1 + 13 + 1 + 1 = 16 cycles.
`TS_SCALE` (Q0.12, default 410, about 0.1) is the ratio of the sampling period
to the time unit in which the computer expresses Ki. With the defaults, Ki = 1.0
gives Ki_ts = 25/256.

## PWM and the two operating modes

`pwm_gen` first picks its voltage command. In hardware mode that is vref from
the PI controller. In software mode it is the command written by the computer.
The sign sets `dir_out` (1 = reverse) and the magnitude sets the compare value
`min(|cmd| * PERIOD / 2048, PERIOD)`. Timing: latch in cycle 0, select and
take sign and magnitude in cycle 1, multiply in cycle 2, scale and write the
shadow in cycle 3, End in cycle 4. The carrier is a free-running counter from
0 to `PERIOD`-1 (default 2500, 20 kHz). It takes over the shadow duty and
direction only when it wraps, so a period is never cut short. `pwm_out` is
edge-aligned and high while the counter is below the duty, and the outputs are
registered. No dead time is inserted: the bridge driver is expected to handle
it.

Software mode is the mixed hardware/software configuration: the controller
runs as a program on the computer, while speed measurement and PWM stay in
the FPGA. (A purely software configuration, in which the computer reads the
encoder and drives the bridge through its own pins, does not involve this
logic.) In software mode the FPGA goes on measuring speed and running the PI
controller, whose output is then unused. The computer closes the loop from the
speeds it reads over SPI. Switching modes is a single register write, and it
takes effect at the next control cycle.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `motor_ctrl_top`, `global_ctrl` | `TS_CYCLES` | 50000 | sampling period in clock cycles (1 ms at 50 MHz) |
| `motor_ctrl_top`, `pwm_gen` | `PWM_PERIOD` / `PERIOD` | 2500 | PWM carrier period in clock cycles |
| `motor_ctrl_top`, `speed_capture` | `KSPEED` | 256 | speed scale, Q4.8 |
| `motor_ctrl_top`, `spi_interface` | `TS_SCALE` | 410 | Ki-to-Ki_ts factor, Q0.12 |
| `pi_controller` | `VMAX`, `VMIN` | 2047, -2047 | output limits |
| `spi_interface` | `KP_RESET` | 256 | Kp after reset |

The 12-bit word width is fixed in `mc_pkg` (`DW`), and the latencies are
constants there. Changing the width means revisiting the saturation logic in
each module.

## What is taken from the original design and what is not

Taken from it:

* the partitioning into speed capture, SPI interface, PI controller and PWM
  under a global FSM;
* the order of the stages;
* the Start/End handshake;
* the per-module latencies (15/16/14/4, 0.98 us total at 50 MHz);
* the 12-bit fixed-point format;
* an anti-windup PI controller built from shared adder/multiplier/register
  operators under a control unit;
* the FPGA being parameterised from the Linux board, which also chooses
  between hardware and software control.

Choices made here, because the original gives only each module's function:

* the speed measurement method (counting encoder edges per period);
* what the SPI stage computes (Ki·Ts) and the whole SPI protocol;
* the exact PI step schedule, the fixed-point formats and the anti-windup
  method;
* the PWM carrier frequency and the sign/magnitude drive;
* the default sampling period;
* the `enable` input, the overrun and encoder-error flags and the status
  read-back;
* reset values.

The latencies in the table were targets. How each module fills its cycles
(for example serial multipliers in speed capture and in the SPI stage) was
chosen to meet them.

Not in the RTL: reconfiguring the FPGA from the Linux board over JTAG (a
vendor-supplied software player), the Linux board itself with its web server
and GUI, and the motor and encoder.

## Files

* `rtl/mc_pkg.sv`: widths, latencies, SPI register map, parameter struct.
* `rtl/motor_ctrl_top.sv`: top level.
* `rtl/global_ctrl.sv`: sampling timer and sequencing FSM.
* `rtl/speed_capture.sv`, `rtl/quad_decoder.sv`: speed measurement.
* `rtl/spi_interface.sv`: SPI slave, shadow registers, parameter stage.
* `rtl/serial_mult.sv`: shift-and-add multiplier used by the two modules above.
* `rtl/pi_controller.sv`: PI data path and control unit.
* `rtl/pwm_gen.sv`: duty stage and carrier.
* `tb/tb_*.sv`: one self-checking testbench per module, plus
  `tb_motor_ctrl_top`, a closed-loop test with `tb/dc_motor_model.sv`
  (behavioural first-order motor with encoder).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_motor_ctrl_top rtl/mc_pkg.sv tb/tb_motor_ctrl_top.sv
./obj_dir/Vtb_motor_ctrl_top
```

Replace the top-module name to run `tb_speed_capture`, `tb_spi_interface`,
`tb_pi_controller`, `tb_pwm_gen` or `tb_global_ctrl`. The module testbenches
each run in well under a second.

`tb_motor_ctrl_top` runs the top at its default parameters: 1 ms sampling,
20 kHz PWM and 50 MHz clock. It simulates 840 sampling periods (42 M clock
cycles), about 20 s of wall time. The simulated Linux board sets Kp = 2.0,
Ki = 1.0 and a reference of 600 counts per period. It then asks for an
unreachable speed, which saturates the output, and drops back to 300, where
the output must leave saturation within a few samples. It reverses to -500,
switches to software mode with a half-scale command and reads the speed back
over SPI, then returns to hardware mode at 200. Each control cycle is checked
for its 49-cycle execution time and for a measured speed matching the motor
model's encoder count to within one count. At the end the test requires that
each mechanism has happened: control cycles, SPI frames and read-backs,
saturation, recovery from it, reverse rotation, PWM periods and mode switches.

## Verification status and limits

All module testbenches compare against values computed independently in the
testbench, and check each module's latency. The closed-loop test only shows
that the loop is stable for one first-order motor model, with a gain of 1200
counts per period at full voltage and a time constant of 10 periods. Gains for
a real motor must be tuned.

The SPI slave has been simulated only at SCLK = clk/10. Its timing margins at
faster clocks have not been analysed. No FPGA timing closure has been run. All
arithmetic is shallow (12-bit operands, one multiplier per cycle), so 50 MHz
should not be demanding.
