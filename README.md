# Load-response tamper detection for FPGA SoCs: programmable-logic side

An attacker who wants to run a power-analysis (PA) or electromagnetic-analysis
(EMA) side-channel attack on an FPGA SoC first has to modify the board. For PA
that means a shunt resistor in the core supply. For EMA it means removing the
fan, heat sink and heat spreader so that a probe can sit on the package. Neither
change can be seen directly from inside the chip, and off-chip sensors cannot be
trusted because the attacker controls the board. But both changes alter how the
chip *responds to a burst of load*:

* the shunt deepens the load-dependent drop of the core supply voltage;
* the missing cooling makes the die temperature climb higher and faster.

The detection scheme therefore switches on a large block of ring oscillators
inside the FPGA fabric for a while, records the chip's own supply-voltage and
temperature sensors before, during and after, and lets a small trained
classifier (a decision tree in the reference system) decide whether the board
has been tampered with. The hard part is not seeing a difference. It is telling
tampering apart from benign causes such as a hot room, a slow fan or a busy
application. That is why training data is collected over many ambient
temperatures, fan speeds and background activity levels.

This repository holds the synthesizable hardware of that scheme: the
oscillator loads, the training-only background load and fan PWM, and the AXI4-Lite
register block through which processor software drives them. The sensors
(the vendor's on-chip system monitor), the measurement sequencing, the feature
extraction and the classifier are software on the SoC's processors and are not
part of this RTL.

## Block structure

```
                 AXI4-Lite (from the processor's AXI master port)
                        |
               +--------v---------+   0x010..0xFFF
               |  axi_lite_split  |-----------------> m_axi_usr_* (application logic)
               +--------+---------+
                        | 0x000..0x00F
               +--------v---------+
               | axi_pl_interface |  control registers
               +--+-----+------+--+
     ema/pa enable|     |      |fan duty %          (training build only)
      +-----------v--+  | +----v------------+
      |measurement_  |  | | pwm_fan_control |--> fan_pwm (I/O pin, off-chip driver)
      |load          |  | +-----------------+
      | 2500 EMA ROs |  | bg block enables                (training build only)
      |+22500 PA ROs |  +---------v---------+
      +--------------+  | background_load   |
                        | 15 x 1000 ROs     |
                        +-------------------+
```

`sca_pl_top` is the top. `ro_array` is the oscillator bank that both loads are
built from. `sca_pkg` holds the register map and the default sizes.
`axi_lite_split` lets the detection hardware and the application's own logic
share the processor's single AXI link. The application's logic is not part of
this design. It is reached through the `m_axi_usr_*` master port, which carries
every address outside the 16-byte register window unchanged. A write's data
passes the split only after its address. Otherwise the split adds no latency.

### Two builds from one top

The system needs two FPGA configurations:

| `TRAINING_BUILD` | contents | used for |
|---|---|---|
| 1 (default) | registers, measurement load, background load, fan PWM | collecting training data under controlled conditions |
| 0 | registers and measurement load only | the deployed system; `fan_pwm` is tied low |

The split follows the original system. Folding both into one parameter is a
choice made here.

## The ring-oscillator loads

This is the part that needs the most care, both in hardware and in simulation.

**Cell.** Each oscillator is one LUT computing `NAND(en, own output)`, with its
output wired back to its input. With `en = 0` the output rests at 1. With
`en = 1` the single inverting loop oscillates at whatever rate the LUT and
routing delay allow. The oscillators compute nothing. They exist only to draw
current and produce heat. The signal carrying them has the `DONT_TOUCH` and
`ALLOW_COMBINATORIAL_LOOPS` attributes so that implementation tools neither
remove the loops nor refuse them. Tools report these combinational loops, and
that is intended. The NAND form of the enable is this design's choice. The
single-LUT cell and the two attributes come from the original system.

**Sizes.**

| load | oscillators | enable |
|---|---|---|
| EMA measurement load | 2500 (`N_RO_EMA`) | `CTRL[0]` or `CTRL[1]` |
| PA measurement load | 25000 (`N_RO_PA`), the EMA load included | `CTRL[1]` |
| background load | 15 blocks x 1000 (`N_BG_BLOCKS`, `N_RO_PER_BG_BLOCK`) | `BG_EN[b]` per block |

The EMA load is not a separate circuit. It is the lowest 2500 oscillators of the
PA load, so a system that detects both attacks pays only for the PA load. Which
2500 oscillators form the subset is this design's choice. The background load
exists only in the training build. It imitates unknown application activity, so
that the classifier learns not to confuse a busy chip with a tampered one.

**Simulation model.** A real oscillator has no period a simulator could know,
and an undelayed inverting loop never settles in a simulator. `ro_array`
therefore gives the loop a delay, `HALF_PERIOD_PS` (500 ps by default). Synthesis
ignores this delay. In simulation an enabled oscillator toggles exactly every
500 ps, starting one delay after its enable changes. The whole bank is written as
a single vector assignment. A synthesis tool splits it into independent one-LUT
loops, and the simulator handles it as one wide signal. This keeps the full
40000-oscillator design quick to build and run. The testbenches count running
oscillators by sampling the outputs 500 ps apart, starting 250 ps after a clock
edge. In that window every running oscillator toggles exactly once.

## Control registers

All registers are 32 bits wide. Byte strobes are honoured. The map is this
design's own.

| offset | name | fields | reset |
|---|---|---|---|
| 0x00 | CTRL | [0] EMA load on, [1] PA load on (includes the EMA part) | 0 |
| 0x04 | BG_EN | [14:0] background block enables | 0 |
| 0x08 | FAN_DUTY | [6:0] fan duty in percent; writes above 100 store 100 | 0 |
| 0x0C | CAPS | read-only: [7:0] number of background blocks, [8] training build | - |
| other | - | at the top: forwarded to `m_axi_usr_*`; on `axi_pl_interface` alone: reads return 0, SLVERR | - |

In the detection build, BG_EN and FAN_DUTY read 0 and ignore writes, which still
get an OKAY response.

**AXI4-Lite behaviour.** Write address and write data may arrive in either order
or together. The slave takes each one as soon as it is free, and the register
updates on the edge after both halves are held. `BVALID` rises on that same edge
and stays up until `BREADY`. `RVALID` follows the read-address handshake by one
clock. Only one read and one write can be in flight at a time. The block asserts
that every `VALID` stays high until its `READY`, and that a response stays stable
while it waits. Reset is synchronous and active low. It turns every load off and
the fan off.

**Software sequence.** This is how the original system uses the registers, in
order:

1. Set the scenario: write BG_EN and FAN_DUTY (training build only).
2. Idle phase: wait 10 s with the load off.
3. Load phase: write CTRL = 1 for EMA or 2 for PA, and leave it for 30 s while
   sampling the sensors.
4. Recovery phase: write CTRL = 0 and wait 10 s.

In the original system the sensor readings go to feature extraction (an
aggregated linear trend for PA, a Welch spectral density for EMA) and then to a
decision tree. All of that is software.

## Fan PWM

During training, fan speed is a scenario variable: 0 % to 100 % in 20 % steps.
`pwm_fan_control` provides 1 % resolution. A prescaler divides the clock by
`DIV = CLK_HZ / (PWM_HZ * 100)` (40 at the defaults of 100 MHz and 25 kHz). A
step counter then runs from 0 to 99, and the output is high while the step is
below the duty value. That gives a period of exactly `100 * DIV` clocks, with
`duty * DIV` of them high. 0 % holds the pin low and 100 % holds it high. A new
duty value is taken only at the start of a period, so a change never produces a
short pulse. The output is registered and high means the fan is driven. The
25 kHz rate, the polarity and the resolution are choices made here. 25 kHz is
the usual rate for 4-wire fans.

## Parameters of the top

| parameter | default | origin |
|---|---|---|
| `TRAINING_BUILD` | 1 | choice made here |
| `N_RO_PA` | 25000 | original system |
| `N_RO_EMA` | 2500 | original system |
| `N_BG_BLOCKS` | 15 | original system (at most 32) |
| `N_RO_PER_BG_BLOCK` | 1000 | original system |
| `CLK_HZ` | 100 000 000 | assumed |
| `FAN_PWM_HZ` | 25 000 | assumed |
| `RO_HALF_PERIOD_PS` | 500 | simulation only |

## How far to trust it, and where it departs from the original

* The loads, their sizes, the EMA-as-subset-of-PA arrangement, the
  separately switchable background blocks and the software-controlled fan PWM
  all follow the original system.
* The register map, the AXI4-Lite slave, reset values, clock rate, PWM
  frequency, polarity and resolution are this design's own.
* The original system's AXI interface was vendor-generated and much larger:
  it includes the interconnect. The one here is a single small slave.
* Oscillator counts map one-to-one to LUTs here. The original reports fewer
  LUTs than oscillators for the large loads, which suggests that two
  oscillators shared one dual-output LUT after mapping. No attempt was made to
  reproduce that packing.
* The oscillator frequency in simulation is arbitrary. Nothing here models the
  resulting current, voltage drop or temperature. The hardware's correctness
  can be checked only as "the right oscillators run when asked".
* The application's own logic sits beside these blocks in a real system. It is
  application-specific and is not included. Only its AXI4-Lite port is
  provided.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sca_pkg.sv tb/tb_sca_pl_top.sv \
          --top tb_sca_pl_top -Mdir obj_top -o sim && obj_top/sim
```

| testbench | what it covers |
|---|---|
| `tb_ro_array` | rest value, toggle rate and stop of a small oscillator bank |
| `tb_measurement_load` | all four enable combinations at 40/4 oscillators |
| `tb_background_load` | 15 blocks of 3 oscillators: all off, all on, one-hot and random masks |
| `tb_pwm_fan_control` | duty 0..100 in 20 % steps and other values, period, pulse width, reset, change mid-period |
| `tb_axi_pl_interface` | both write orders, back-pressure, byte strobes, saturation, SLVERR, read and write latency, random traffic |
| `tb_sca_pl_top` | the full-size training build end to end (see below) |
| `tb_sca_pl_top_detect` | the detection build: training registers absent, fan pin quiet, loads still switch |

`tb_sca_pl_top` runs every parameter at its default. It plays the training
software through AXI:

* It steps the background load through all 16 levels.
* At each level it runs the idle, EMA, PA and recovery phases and counts the
  running oscillators: 0, 2500, 25000 and 0 of the measurement load, plus
  n x 1000 of the background load.
* It measures one full 4000-clock PWM period at each of the six fan speeds.
* It writes and reads back words in a behavioural model of the application
  logic behind `m_axi_usr_*`, and checks that the control registers stay
  unchanged.

It reports how often each mechanism occurred, and it fails if any of them never
occurred. It builds in about 20 s and runs in about 5 s.

To change sizes, override the top's parameters. `N_RO_EMA` must be smaller than
`N_RO_PA`. For another clock, set `CLK_HZ` so that the fan period stays right.
