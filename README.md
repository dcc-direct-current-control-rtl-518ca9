# Direct current control (DCC) for a two-switch bridge

A current controller that does no sampling and no arithmetic on the
current. Two analog comparators watch the load current against an upper and
a lower reference, the *hysteresis band*. When the current crosses the
reference it is moving towards, the controller changes the voltage vector
across the inductive load so that the current turns back. The ripple is
therefore fixed by the band, and the switching frequency follows from the
load. The only analog parts are two reference DACs and two comparators. The
logic decides which comparator matters, which vector to apply, and when each
reference may be changed.

This repository holds synthesizable SystemVerilog for that controller. It
also holds the serial packet handler that sets the controller's parameters
from a host computer, and the CRC-8 coprocessor that protects each packet.
Self-checking testbenches come with it. The system-level ones close the loop
through a behavioural model of the bridge, the load and the comparators.

## Voltage vectors

The bridge has two switches, S_A and S_B. Each connects one load terminal to
the supply or to ground. The vector `{S_A, S_B}` gives:

| vector | load voltage | name in the RTL |
|--------|--------------|-----------------|
| [1,0]  | +Udc         | `VEC_POS`       |
| [0,1]  | -Udc         | `VEC_NEG`       |
| [0,0], [1,1] | 0      | `VEC_ZERO` (only [0,0] is used) |

With an inductive load that has a back-EMF, two vectors can move the current
in the same direction at different speeds. Take a positive current as an
example. [1,0] raises it. To lower it, the zero vector lets it decay slowly
and [0,1] drives it down fast. The slow vector is preferred because it
switches less and gives less ripple per switching. The fast one is used only
when the slow one has taken longer than a timeout. For a negative current
the roles are mirrored.

## Signal path and timing

```
comp_upper, comp_lower
   -> dcc_logic: synchroniser -> edge_trigger x2 -> comparator_logic
        -> intr, action                       (ack goes back)
   -> vector_selector  <- timeout_timer (restarted by each vector change)
        -> vec_req
   -> hsf_protection (S_A), hsf_protection (S_B)
        -> s_a, s_b = applied vector
applied vector -> reference_mover -> upper_dac, lower_dac
applied vector -> period_counter  -> switch_period, switching_stopped
crc8: word stream, used by packet_engine in dcc_system
host bytes -> packet_engine -> mode, references, timeout -> dcc_top
```

From a comparator edge to a changed switch output takes `SYNC_STAGES + 4`
clocks, which is 6 at the defaults: 2 for the synchroniser, 1 for the edge
trigger, 1 for the comparator logic, 1 for the vector selector and 1 for
the protection. The closed-loop testbench measures this delay. A turn-on
that the protection holds back comes later.

## DCC logic: which comparator matters

This is the core of the design and the part that is least obvious.

The upper comparator output is high while the current is above the upper
reference. The lower comparator output is high while the current is below
the lower reference. So a crossing out of the band is always a rising edge.

**edge_trigger** (one per comparator) is a three-state Moore machine:

| state | waits for | req |
|-------|-----------|-----|
| WAIT_EDGE | comparator high | 0 |
| WAIT_ACK  | ack high | 1 |
| WAIT_LOW  | comparator **and** ack low | 0 |

It returns to WAIT_EDGE only after the comparator has been low. A high
comparator seen in WAIT_EDGE is therefore always a new edge. A comparator
that chatters near its threshold, which the sensor noise causes, gives only
one request.

**comparator_logic** follows the direction of the current:

| state | meaning | interrupt | action | next |
|-------|---------|-----------|--------|------|
| S4 | start, direction unknown | 0 | INC | S1 on upper request (has priority), S3 on lower |
| S0 | rising, watch the upper trigger | 0 | INC | S1 on upper request |
| S1 | upper crossed | 1 | DEC | S2 on `ack_cpu` |
| S2 | falling, watch the lower trigger | 0 | DEC | S3 on lower request |
| S3 | lower crossed | 1 | INC | S0 on `ack_cpu` |

The trigger that does not matter is held acknowledged: `ack_up` is high in
S1–S3 and `ack_lo` in S3, S0 and S1. Its edges are dropped, and it re-arms
only once its own phase begins and its comparator is low. `ack_cpu` must be
a one-clock pulse given only while the interrupt is high. An assertion
checks this in simulation.

A consequence to keep in mind: if the watched comparator is **already high**
when its phase starts, it never gives an edge, and the applied vector stays
on. The reference mover is built so that it never causes this (see below).

## Vector selector, timeout and switching protection

**vector_selector** acts on each interrupt. It applies the slow vector for
the action: `INC` gives [1,0] and `DEC` gives [0,0] for a positive
reference; `DEC` gives [0,1] and `INC` gives [0,0] for a negative one. It
then acknowledges the interrupt. The sign of the reference is the mean of
the two DAC targets compared with `zero_code`. If `timeout_timer` expires
while a zero vector is applied, the selector switches to the fast vector for
the last action and raises `fast_vector`. In IDLE the vector is [0,0], and
interrupts are still acknowledged so that the DCC logic keeps tracking. On
entering a running mode, the vector for the action the DCC logic holds is
applied at once.

**timeout_timer** restarts on every change of the applied vector, and
whenever the slow vector is not selected. It gives one pulse `limit` clocks
later. `timeout_cycles = 0` turns it off.

**hsf_protection** (one per switch) passes a turn-off at once. After a
turn-off it lets the switch on again only once `min_off_cycles` clocks have
passed. The vector selector never drives a switch directly, so no
transistor can switch faster than this allows. `sw_blocked` shows a held
turn-on.

## Reference mover and band shrink

The DACs need time to settle. For that reason only one reference changes at
a time, and only the one whose comparator is not being watched. The
applied vector tells which one that is. While the current rises ([1,0], or
the zero vector with a negative reference), the lower reference may move.
While it falls, the upper one may move. The allowed reference is written
straight to its target. A new band therefore takes effect over two vector
changes.

A moving reference is also kept on its own side of the other one. The upper
reference is at least one code above the lower, and the lower at least one
code below the upper. Without this rule, a band lowered in one step could
put the upper reference below the current just before the current starts to
rise. That is the stuck case described above. A large band change instead
walks over a few periods.

**Band shrink.** If the vector has not changed for `shrink_timeout` clocks,
the reference being watched steps one code towards the other every
`shrink_period` clocks. This forces a crossing. It stops one code short of
the other reference. After the next vector change the shrunk reference is
the allowed one and returns to its target. No target write happens while
the band shrinks. `shrink_timeout = 0` turns the shrink off.

**Modes.** `MODE_FIXED_HYST` uses `upper_target` and `lower_target`.
`MODE_STOP` keeps the width of the band but centres it on `zero_code`, so
the current is controlled to zero and the motor loses its torque.
`MODE_IDLE` applies the zero vector, and both references may move freely.
Enter IDLE only once the load is at rest (use STOP first). Going to IDLE from a running motor
turns its kinetic energy into heat in the bridge.

**period_counter** counts clocks from one application of the vector that
drives the current away from zero to the next. That vector is [1,0] for a
positive reference and [0,1] for a negative one. `switching_stopped` rises
when no period completes within `2^TW - 1` clocks.

## CRC-8 coprocessor

`crc8` computes the standard CRC-8 (divisor 263, x^8 + x^2 + x + 1, zero
start value, MSB first), one bit per clock in an 8-bit register:
`r = {r[6:0], bit} ^ (r[7] ? 8'h07 : 0)`. To get the remainder, it shifts
in the dataword followed by eight zeros. To get the syndrome, it shifts in
the dataword followed by the received CRC; a zero syndrome means the
codeword is intact. A 4-byte dataword takes 40 shift clocks.

It sits on an FSL-style stream: `s_data / s_ctrl / s_exists / s_read` in,
and `m_data / m_write / m_full` out.

| word | contents |
|------|----------|
| control (`s_ctrl=1`) | `[2:0]` length in bytes (1, 2, 4; anything else is 4), `[8]` 1 = check, `[23:16]` received CRC; kept for later datawords |
| data (`s_ctrl=0`) | dataword, right aligned |
| result | `[7:0]` remainder or syndrome, `[8]` syndrome is zero, `[9]` check mode |

A data word accepted at clock t gives its result at clock t + 8·len + 9. The
result is held while `m_full` is high. After reset the length is 4 bytes and
the mode is encode.

## Serial packets (`packet_engine`)

The host is the master and the controller only answers. Every packet is a
byte sequence:

```
[ID] [CRC of ID] [dataword: 1, 2 or 4 bytes, MSB first] [CRC of dataword]
```

The ID has its own CRC, so the receiver knows the length of the rest before
it reads it. Each CRC is checked as a syndrome by `crc8`, and each CRC sent
is a remainder computed by `crc8`.

| ID | name | dataword | effect |
|----|------|----------|--------|
| 0 | MODE | 1 byte | 0 IDLE, 1 FIXED_HYST, 2 STOP |
| 1 | REQUEST | 1 byte | 0 asks for the switching period; any other code is a ping |
| 2 | MAXCURR | 2 bytes | stored |
| 3 | REFCURR | 2 bytes | stored |
| 4 | REFSWITCHFREQ | 4 bytes | stored |
| 5 | TIMEOUTSWITCH | 4 bytes | vector selector timeout, in clocks |
| 6 | UPPERREF | 1 byte | upper reference target, DAC code |
| 7 | LOWERREF | 1 byte | lower reference target, DAC code |

Replies:

| ID | name | bytes |
|----|------|-------|
| 255 | ACK | `[255][CRC][ID of the packet][CRC]` |
| 254 | NACK | `[254][CRC]`, the only two-byte packet: a syndrome was not zero, or the ID is unknown |
| 253 | REQUESTEDFREQ | `[253][CRC][period, 4 bytes][CRC]` |

A packet whose next byte takes longer than `BYTE_TIMEOUT` (20 ms) is
dropped without a reply. The link timer starts with the first valid packet
and restarts with each one. If `LINK_TIMEOUT` (1 s) passes without a valid
packet, the mode is forced to STOP and `link_lost` rises until the next
valid packet. The STOP band is centred on zero current, so a lost cable
removes the torque. Received bytes pass through an 8-byte queue, so they may
keep arriving while a CRC check runs. The reply starts some 40 to 60 clocks
after the last byte of the packet. The port side is a byte stream
(`rx_valid`/`rx_data` in, `tx_data`/`tx_valid`/`tx_ready` out), to be
connected to a UART.

## Top level (`dcc_system`)

`dcc_system` holds `packet_engine` and `dcc_top`. It connects the packet
handler to the CRC coprocessor inside `dcc_top`, and connects the mode,
reference and timeout registers to the controller.

| parameter | default | meaning |
|-----------|---------|---------|
| `DAC_BITS` | 8 | resolution of each reference DAC |
| `TW` | 32 | width of every timer and time input, in clocks |
| `SYNC_STAGES` | 2 | comparator synchroniser depth |
| `CLK_HZ` | 50 000 000 | clock frequency |
| `BYTE_TIMEOUT` | `CLK_HZ/50` | 20 ms between the bytes of a packet |
| `LINK_TIMEOUT` | `CLK_HZ` | 1 s without a valid packet forces STOP |

No packet ID carries `zero_code`, `min_off_cycles`, `shrink_timeout` or
`shrink_period`, so they stay ports. The register values and the status of
`dcc_top` are brought out for display.

## Controller core (`dcc_top`)

| parameter | default | meaning |
|-----------|---------|---------|
| `DAC_BITS` | 8 | resolution of each reference DAC |
| `TW` | 32 | width of every timer and time input, in clocks |
| `SYNC_STAGES` | 2 | comparator synchroniser depth (at least 2) |

The inputs `mode`, `upper_target`, `lower_target`, `zero_code`,
`timeout_cycles`, `min_off_cycles`, `shrink_timeout` and `shrink_period` are
parameter registers, meant to be written by the host over the serial link.
`zero_code` is the DAC code that corresponds to zero current, which comes
from calibration. The outputs are `s_a` and `s_b`, the two DAC codes, and
the status `switch_period`, `period_valid`, `switching_stopped`,
`fast_vector`, `band_shrinking`, `sw_blocked` and `dcc_state`. The
`crc_*` ports are the coprocessor stream. Shared types (`vvec_t`,
`action_t`, `mode_t`) are in `rtl/dcc_pkg.sv`.

## What is built, and where it departs from the original system

- In the original system the vector selector, timeout, switching
  protection, reference mover and period measurement were software tasks
  and hardware timers on a soft processor. Only the DCC logic and the CRC
  were custom hardware. Here all of them are logic. The reaction time drops
  from interrupt latency to six clocks, and no processor is needed for the
  control loop.
- The serial packet protocol is logic too (`packet_engine`). Its dataword
  length per ID, the mode codes, the ACK contents and the REQUEST code are
  choices of this design. CALACK is never sent, because there is no
  calibration.
- The processor, its buses and memory, the UART, the thread kernel, the
  calibration routine and the host user interface are not included. The
  calibration result `zero_code` is a port.
- The vector table (zero vector as the slow vector, [0,0] rather than
  [1,1]), the reference-side clamp, the shrink step size, the STOP-mode
  band, the synchroniser, the comparator polarity and all widths are
  choices of this design. Each module's header says which parts follow the
  original and which do not.
- The band shrink is active only while `shrink_timeout` is non-zero. Set
  it to 0 for a plain fixed band.
- There is no dead time between the two transistors of a leg. The bridge
  driver is expected to add it.

## Verification and simulation

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- `tb_edge_trigger` and `tb_comparator_logic`: directed sequences and
  thousands of random steps against a reference model of each state
  machine.
- `tb_dcc_logic`: comparator waveforms. It checks the 4-clock interrupt
  latency, the action, and that chatter and the comparator not being
  watched are both ignored.
- `tb_crc8`: compares with a byte-wise CRC-8 in the testbench. It checks a
  zero syndrome for intact codewords, a non-zero one for single-bit errors,
  the latency, and back-pressure.
- `tb_vector_selector`, `tb_timeout_timer`, `tb_period_counter`,
  `tb_hsf_protection` and `tb_reference_mover`: the rules above, including
  exact cycle counts.
- `tb_dcc_top`: closed loop with `tb/load_model.sv`, a behavioural bridge
  with an RL load, back-EMF, a noisy current sensor, DACs and comparators.
  It uses 16-bit timers so that the stalled flag can be reached. It runs
  IDLE, a positive band, a band change, band shrink, a long protection
  time, a negative band, STOP and IDLE again, plus CRC operations. It
  checks that the current stays in the band, the 6-clock delay, the
  measured periods, and that no [1,1] vector occurs. It counts every
  mechanism (slow and fast vector, held turn-on, shrink, reference moves,
  absorbed chatter, stalled flag) and fails if one never happened.
- `tb_dcc_top_full`: one complete operation with `dcc_top` at its default
  parameters.
- `tb_packet_engine`: a host model sends every packet type. It checks the
  ACK, NACK and REQUESTEDFREQ bytes and their CRCs, corrupted ID and
  dataword CRCs, unknown IDs, a packet cut short, and link loss. The
  transmitter's ready signal is random.
- `tb_dcc_system`: the end-to-end test. Packets set the references, the
  timeout and the mode, and `load_model` closes the loop. It runs a
  positive band, a period request, a corrupted packet, the fast vector,
  held turn-ons, band shrink, a negative band, link loss into STOP, and
  IDLE. It counts every mechanism and fails if one never happened.
- `tb_dcc_system_full`: the same sequence with `dcc_system` at its default
  parameters. Its link-loss step waits the full 50 million clocks.

With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
  --top-module tb_dcc_top rtl/dcc_pkg.sv tb/tb_dcc_top.sv -o sim
./obj_dir/sim
```

To run a block testbench, replace the top module and file, for example
`tb_crc8` and `tb/tb_crc8.sv`. `dcc_pkg.sv` must come first on the command
line. The load model's constants (`k_u`, `k_r`, `k_e`, `noise`) set the
current slopes. With the values in the testbenches the current rises about
a quarter of a DAC code per clock and decays slowly with the zero vector.
