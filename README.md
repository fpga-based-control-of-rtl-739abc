# Production cell controller: six motion controllers in a ring, with a safety layer

A small demonstration factory has six robots arranged in a loop. Metal blocks
travel around it: feeder belt → feeder → molder door → extraction robot →
extraction belt → rotation robot, and from the rotation robot back to the
feeder belt. Each robot is driven by one DC motor with an incremental
encoder. Each one has end switches, an infrared block sensor and, on the two
lifting robots, an electromagnet.

The usual approach runs all six position loops on one PC. Under load that PC
misses deadlines. This design puts the whole control stack in one FPGA
instead. Every robot has its own hardware controller, called a *Production
Cell Unit* or PCU. Each PCU contains:

- a sequencer;
- a motion-profile generator;
- an integer PID loop;
- a safety layer;
- a host register port;
- the encoder and PWM interfaces.

No central supervisor exists. A PCU talks only to its two neighbours:

- to hand a block on (a rendezvous);
- to warn them when it has failed (error channels).

Because the six PCUs run in parallel and each has dedicated arithmetic, load
cannot push any loop past its deadline. One PID update takes 5 clocks
(100 ns at 50 MHz). The sample period is 1 ms.

## The ring

```
          blocks →
  ┌─► PCU0 ──► PCU1 ──► PCU2 ──► PCU3 ──► PCU4 ──► PCU5 ─┐
  │ feeder   feeder   molder   extract- extract-  rotation│
  │  belt              door     or      ion belt   robot  │
  └───────────────────────────────────────────────────────┘
  each arrow: req / ack / 8-bit block tag   (block direction only)
  each pair also has two error channels, one in each direction
```

**Rendezvous channel.**
- The unit holding a block raises `req` and drives the block's tag.
- The receiver raises `ack` only when it is idle at its rest position and in
  normal flow (ST_RUN).
- The transfer happens in the one clock where both are high. The offerer
  holds `req` and the tag until then; an assertion checks this.
- So `ack` also answers the question "are you free and at home?", and a unit
  never pushes a block into a neighbour that is busy.

**Error channel.**
- The message is `{active, state}`.
- It is held for as long as the sending unit is in error.
- `state` is the state the receiving neighbour must take.

Per-unit data comes from tables in `pcu_pkg`, indexed by position in the
ring. The table values below are this design's choice:

| unit | rest / work position (counts) | magnet | block can enter from its sensor | state asked of previous / next unit on failure |
|---|---|---|---|---|
| 0 feeder belt | 200 / 1200 | – | yes (block inserter) | HOLD / HOLD |
| 1 feeder | 200 / 900 | – | – | HOLD / **PARK** |
| 2 molder door | 200 / 700 | – | – | HOLD / HOLD |
| 3 extractor | 200 / 1000 | yes | – | HOLD / HOLD |
| 4 extraction belt | 200 / 1200 | – | – | HOLD / HOLD |
| 5 rotation robot | 200 / 1100 | yes | – | HOLD / HOLD |

Where a unit's failure lands:

- A stuck feeder stops the feeder belt, which gets HOLD.
- It opens the molder door: PARK drives the door to its work position, which
  is "open".

### How many blocks fit: the eight-block deadlock

Each robot holds one block. Each belt holds two: the one it is carrying and
one waiting behind it (`BUF_DEPTH_TAB = {2,1,1,1,2,1}`). The ring therefore
has eight places.

- **Seven blocks or fewer.** At least one place is free. The free place
  travels backwards round the ring, and every block keeps moving.
- **Eight blocks.** Every unit holds a block and offers it to a neighbour
  that has no room. All hand-overs stop for good.

The real cell has this same limit. It is deliberate here and makes a good
teaching case. `tb_production_cell_blocks` shows both sides of it.

A belt with room takes a new block while still busy with the previous one,
and keeps the tags in arrival order. When it comes back from a hand-over, it
starts straight away on the oldest waiting block.

On the feeder belt, a block placed at the input sensor goes before one
offered by the rotation robot. Without this rule the returning blocks would
take every free place, and the inserter could never add a block once a few
were circulating. A block counts once at the sensor, on the rising edge, and
waits there until the belt has room.

## Inside one PCU

```
            host port
               │
           command ──setState──┐
                               ▼
 plant ◄─► low_level_hw ◄─► safety ◄─► controller ◄─► neighbours
 (enc, PWM,  (decoder, PWM,  (catcher,   (sequence,    (rendezvous)
  switches,   synchronisers)  handler,    setpoint,
  magnet)                     state hdl)  loop/PID)
          error channels ◄──► safety
```

Every signal between the controller and the plant passes through the safety
block. That includes position, switches, sensor, PWM and magnet.

### Controller (`controller`)

- **Sample divider.** It emits `tick` every `SAMPLE_DIV` clocks. The default
  is 50 000, which gives 1 kHz at 50 MHz.
- **`sequence_controller`.** It runs one generic sequence for every unit:
  1. home;
  2. go to rest (POS0) and report ST_RUN;
  3. wait for a block;
  4. magnet on, then move to work (POS1);
  5. offer the block to the next unit;
  6. magnet off, then return.

  A block arrives from the previous unit's rendezvous. On the feeder belt it
  can also come from the input sensor.
- **`setpoint_generator`.** It serves movement requests through a held
  request and a one-clock `ready`:
  - The profile is a constant-velocity ramp of `VMAX` counts per tick.
  - It picks the loop mode: servo while ramping, regulator at rest, homing
    for the homing request.
- **`loop_controller`.**
  - Homing drives towards the home switch at a fixed PWM. When the switch
    closes, it clears the encoder.
  - Regulator and servo mode use the same `pid_int`, each with its own gain
    set. The PID is cleared when the mode changes.

### The integer PID (`pid_int`)

The floating-point PID with a filtered derivative becomes integer arithmetic
with coefficients scaled by 2^8. With `e` the position error:

```
uD = (a·uD' + b·(e − e') + c·e) >>> 8          proportional + filtered derivative
UI = UI' + d·uD                                 integral, stored ×2^8
u  = sat12((UI >>> 8) + uD)
```

Here `a = τD·β/(T+τD·β)`, `b = τD·kp/(T+τD·β)`, `c = T·kp/(T+τD·β)` and
`d = T/τI`, all times 256.

- **Why the integral is stored at 2^8 scale.** If it were stored at unit
  scale, a small steady error would truncate to zero and never accumulate.
- **Clamps.** The error is clamped to 20 bits and `uD` to ±2^20. The integral
  is clamped to ±2047 (anti-windup). The output saturates to ±2047, which
  matches the 12-bit PWM.
- **Timing.** A `start` pulse samples setpoint and position. The result
  appears 5 clocks later with `done`.
- **Gains.** The sets in `pcu_pkg` are tuned for the testbench motor model,
  not for a real plant:
  - servo {a, b, c, d} = {64, 128, 384, 2};
  - regulator {64, 128, 256, 4}.

### Safety (`safety`)

- **`exception_catcher`.** It watches both directions and reports an
  exception code.
  - Plant to controller:
    - far-limit switch closed;
    - home switch closed outside homing;
    - position outside [−100, 1500];
    - an encoder glitch (both channels changed in one clock, so a count was
      lost);
    - stall: |PWM| ≥ 1500 for 50 ticks with no movement.
  - Controller to plant: a PWM command over the limit of 2000. The command is
    also clamped.
  - In SAFE it forces the motor command to 0 but keeps the magnet, so a
    carried block is not dropped.
- **`exception_handler`.**
  - It latches the first exception and turns it into three messages:
    - SAFE for its own unit;
    - the previous unit's safe state;
    - the next unit's safe state.
  - It also receives the neighbours' messages. A local error beats a
    neighbour's, and PARK beats HOLD.
  - A latched fault is released only when two things hold:
    - the exception has gone;
    - the user has written RUN.
- **`state_handler`.**
  - It picks the state sent to the controller, in this priority:
    1. error state;
    2. user `setState` (refused while homing);
    3. the controller's own state.
  - It raises **override** whenever that state is not HOMING or RUN.

How the controller reacts to an override:

| state | effect |
|---|---|
| HOLD | The setpoint freezes where it is (regulator mode). No blocks are taken or given. |
| PARK | The setpoint ramps to the work position and stays there. |
| SAFE | The loop is switched off: mode OFF, PID history cleared. The motor command is 0. |

When the override ends, the sequence first returns the unit to its rest
position and then resumes.

### Command port (`command`) and top-level host port

The top multiplexes the six register ports through `host_sel`, `host_pcu`,
`host_wr`, `host_addr` and `host_wdata`. A read returns `host_rdata` one clock
later, with `host_rvalid`.

| addr | read | write |
|---|---|---|
| 0 | state sent to the controller | setState (RUN or HOLD) in `wdata[2:0]` |
| 1 | encoder position | – |
| 2 | setpoint | – |
| 3 | `{override, mode[1:0], exception[2:0]}` | – |
| 4 | blocks passed on | – |
| 5 | PWM command, sign-extended | – |

State codes: HOMING 0, RUN 1, HOLD 2, PARK 3, SAFE 4.

### Low-level hardware (`low_level_hw`, `quad_decoder`, `pwm_gen`)

- **Encoder inputs.** Synchronised with two flops and decoded ×4 into a
  32-bit count. A glitch flag is raised if both channels change in one clock;
  the catcher treats it as an exception. For three clocks after reset the
  decoder only loads its reference, so the jump from the reset value is not
  counted.
- **PWM.** Sign-magnitude output: a direction pin plus PWM. It uses an 11-bit
  counter, so the period is 2048 clocks (24.4 kHz at 50 MHz). A new command
  is taken only at the start of a period.
- **Switches and block sensor.** Synchronised with two flops.
- **`hw_en` low.** The motor and magnet are forced off.

### Start and stop (`init_terminate`)

1. Raising `run` starts Init. The PCUs are held in reset with outputs off for
   `INIT_CYCLES`.
2. Then `active` rises and every unit homes.
3. Dropping `run` starts Terminate. Outputs go off for `TERM_CYCLES`, then the
   PCUs are reset again.

## Top-level interface (`production_cell_top`)

| parameter | default | meaning |
|---|---|---|
| `SAMPLE_DIV` | 50000 | clocks per control sample (1 kHz at 50 MHz) |
| `INIT_CYCLES` | 1000 | length of Init and Terminate |
| `VMAX` | 20 | profile speed, counts per sample |

Ports:

- `clk`, `rst_n`, `run`, `active`;
- per unit `[N_PCU]`: `enc_a`, `enc_b`, `endsw[i][1:0]` (bit 0 home, bit 1
  far), `blk_sensor`, `pwm`, `pwm_dir`, `magnet`;
- the host port described above.

## Where this departs from the original system

- **Sequence.** All six units run one generic four-step sequence. The
  original had unit-specific sequences, for example the feeder pushing a
  block against the closed door while the molding happens. Message ordering
  between neighbours is therefore simpler than in the original.
- **Belts.** A belt is modelled as a unit that holds two blocks. It is not a
  continuous conveyor with a sensor at each place. The depth of two is chosen
  so that the ring's capacity matches the original's eight-block deadlock.
- **Motion profile.** Constant velocity, with no acceleration limits.
- **Host link.** A plain synchronous register port replaces the PCI bus
  interface and the host GUI.
- **Error channels.** They are level signals, not message-passing channels.
  Neighbour errors are not forwarded beyond the direct neighbours.
- **Numbers chosen here.** The original does not give them:
  - the clock frequency;
  - positions and limits;
  - PID gains and the scaling factor;
  - encoder width;
  - PWM period;
  - Init/Terminate length.

The 12-bit PWM command, six units and a 1 kHz sample rate are the original
system's.

## Verification and how far to trust it

Every module has a self-checking testbench in `tb/`. Each testbench ends by
printing `TB_RESULT checks=N failures=M`. The plant is modelled by
`tb_motor_model`, a behavioural motor whose speed follows its PWM command.
It has an encoder and end switches, and can be made to stick.

- **`tb_pid_int`.** Compares each PID output with a reference model across
  random setpoints, and checks the 5-clock latency.
- **`tb_production_cell_top`.** Runs with `SAMPLE_DIV=5000` so it finishes in
  seconds. It runs Init, homing of all units and sensor insertion of two
  blocks, then blocks going round with magnet pick-ups. Then it:
  1. jams the feeder, which must go SAFE while the belt HOLDs and the molder
     door PARKs open;
  2. recovers with a host RUN write;
  3. applies a user HOLD;
  4. runs Terminate.

  It counts every one of these mechanisms and fails if any never happened.
- **`tb_production_cell_blocks`.** Inserts blocks one by one at the feeder
  belt. With seven blocks it checks that every channel keeps carrying blocks.
  After the eighth it checks three things:
  - all hand-overs stop;
  - every unit is waiting to hand on a block;
  - both belts are full.

  Every hand-over is checked against per-unit tag queues, so no block is
  lost, duplicated or reordered.
- **`tb_sequence_belt`.** Tests the belt buffer on its own, at depth 3.
  It fills the buffer and checks that a further block waits. It then checks
  that the blocks leave in arrival order, including a block taken in the
  same clock as one leaves the buffer.
- **`tb_production_cell_full`.** Uses the top with all defaults: 50 MHz and a
  1 ms sample period. It checks the sample period and PID completion time,
  and lets one block make a full round, about 430 ms of simulated time.

Limits of that evidence:

- The motor model is first-order and ideal. The gains and limits have not met
  real mechanics.
- Synthesis results and timing on a real device have not been measured.

## Simulating

Everything is plain SystemVerilog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_production_cell_top rtl/pcu_pkg.sv tb/tb_production_cell_top.sv
./obj_dir/Vtb_production_cell_top
```

Replace the top module with any `tb_<module>` to test one block. The
simulator is two-state, so every testbench resets or drives all state it
reads.

To change the cell:

- For per-unit positions, magnets and failure states, edit the tables in
  `rtl/pcu_pkg.sv`.
- For the sample rate, profile speed and start-up length, edit the top-level
  parameters.
- For the safety limits, edit the parameters of `exception_catcher`.
