# I4C: rise-time sensing and modulation on an I2C bus

I2C has no wire that tells a controller who is on the bus, whether the
pull-up resistors suit the current load, or which target wants attention. I4C
takes all three from one analog quantity the bus already has: the rise time of
its open-drain edges. A released line charges through the pull-up resistor R
into the bus capacitance C, so the 30 %–70 % rise time is

    T_rise = ln(7/3) · R · C ≈ 0.85 · R · C

From it:

* the **controller** measures every SCL and SDA rising edge with two
  comparators and a fast counter, and picks the largest pull-up resistor
  (lowest static power) that still meets the 1000 ns standard-mode limit;
* a change of the measured rise time between transactions means a device
  **joined or left** (each device adds capacitance);
* a **target** can make one chosen SCL edge rise faster by switching an extra
  pull-up onto SCL for that edge. A faster edge 2..10 is an **interrupt flag**
  whose position identifies the target. Faster edges in a later byte carry
  **data from the target to the controller**, while the controller writes on
  SDA at the same time (full duplex).

This repository holds the digital logic of both ends as synthesizable
SystemVerilog. It also includes an RC model of the bus so that the whole
system can be simulated. The bus, comparators, resistor multiplexers and
switches are analog and stay outside the RTL as ports.

## Structure

```
i4c_system                       top: one controller + NUM_TARGETS targets
├── i4c_controller               controller side, 125 MHz clock
│   ├── sync2                    2-flop synchronizer for the 4 comparators
│   ├── rise_time_meter  [SCL]   30%→70% cycle counter + warnings
│   ├── rt_fifo          [SCL]   8-entry result FIFO, half-full interrupt
│   ├── rise_time_meter  [SDA]
│   ├── rt_fifo          [SDA]
│   ├── i2c_bus_monitor          start/stop, SCL edge numbering
│   ├── edge_decoder             calibration edge, interrupt vector, FD bytes
│   ├── pullup_ctrl              4-state resistor-selection FSM
│   ├── stuck_bus_detector ×2    timeout on SCL / SDA held low
│   └── churn_detector           device joined / left
└── i4c_target ×NUM_TARGETS      target side, own clock
    ├── sync2
    └── target_mod_fsm           5-state FSM with a shift register
i4c_pkg                          shared types and constants
```

Every file starts with a comment that gives its interface, timing and the
choices made in it.

## Measuring a rise time

Each line has two comparators: `above_lo` (V ≥ 0.3 Vdd) and `above_hi`
(V ≥ 0.7 Vdd). Both are asynchronous and pass a two-flop synchronizer.
`rise_time_meter` is a four-state FSM:

| state | meaning | leaves when |
|---|---|---|
| RESET | wait for the line to go low | below 0.3 Vdd → LOW |
| LOW | line is low | above 0.3 → RISE with count = 0; above 0.7 in the same cycle → HIGH with a *resolution warning* |
| RISE | count one per clock | above 0.7 → HIGH; back below 0.3 → RESET with a *capacitance warning*, no result |
| HIGH | report the result for one cycle | → RESET |

At 125 MHz one count is 8 ns. The count includes the cycle in which 0.7 Vdd is
first seen, so comparator crossings D cycles apart report D. The counter has 16
bits and saturates, which is 524 µs full scale. A resolution warning still
produces a result (count 0, flag bit set). A capacitance warning produces none:
the line dropped during its rise, which on a correctly loaded bus should not
happen.

The clock rate follows from the smallest change to be resolved. One device
adds about 10 pF. With the strongest legal pull-up (1.1 kΩ) that changes the
rise time by about 9.3 ns, so the clock must be above about 107 MHz. 125 MHz
is used.

Results go into `rt_fifo`. It has 8 entries of 17 bits and a show-ahead read
port. Its interrupt is raised when it is half full and stays set until
`irq_clr`. A push into a full FIFO is dropped and sets a sticky `overflow`
flag, which `irq_clr` also clears. At 100 kHz the host has four edges, about
40 µs, to react before results are lost.

## Choosing the pull-up

`pullup_ctrl` holds the resistor select `rsel`: 0 = 2.21 kΩ, 1 = 4.7 kΩ,
2 = 10 kΩ, 3 = 22 kΩ. One select drives both the SCL and the SDA
multiplexers. Once per transaction it gets the rise time of the unmodulated
first SCL edge and applies these rules:

| state | entered when | action |
|---|---|---|
| S0 | reset, or `block` (bus stuck) | R = smallest |
| S1 | T_rise < GMIN | one step larger R, limited to the largest |
| S2 | GMIN ≤ T_rise ≤ GMAX | keep R |
| S3 | T_rise > GMAX | one step smaller R, limited to the smallest |

GMAX is 1000 ns (125 cycles), the I2C limit. **GMIN is 450 ns (56 cycles).**
This is a choice of this design, and the one most worth knowing about. Sizing
the window from the resistor ratios (R_i/R_{i+1} = a^{1/(n-1)}, with
a = 2.21/22) would give a 100 ns lower bound, and the bus would then often sit
on a resistor far stronger than needed. 450 ns keeps the rise time close to
the limit. It is also the largest bound that cannot make the FSM oscillate:
one step down multiplies the rise time by at least 10/22 = 0.455, so a rise
just above 1000 ns cannot land below 450 ns. With this bound one device on
about 100 pF settles on 10 kΩ.

**The decision is applied at the stop condition** of the transaction whose
first edge was measured, not right after that edge. Otherwise the edges that
follow in the same transaction would rise at a new speed and would be decoded
as modulated.

`red_zone` is set when the rise time is above GMAX while the smallest resistor
is already selected. The bus is then loaded beyond what the pull-ups can
drive. The flag clears on the next transaction that meets GMAX.

`stuck_bus_detector` raises `block` when SCL or SDA has stayed below
0.3 Vdd for TIMEOUT cycles (25 ms, the SMBus clock-low timeout). This forces
the smallest resistor to help release the bus.

`churn_detector` compares each calibration rise time with the previous one.
If they differ by more than CHURN_DELTA cycles (default 1) and both were
measured with the same resistor, it pulses `churn`. The host should then run
address resolution and service discovery. Pairs measured with different
resistors are not compared.

## Edges as a side channel

`i2c_bus_monitor` finds start and stop conditions and numbers the SCL rising
edges of a transaction from 1. It also gives each edge's byte frame (0 = the
address byte) and its position in the frame (0..7 data, 8 = ACK). A repeated
start does not restart the numbering. The controller and the targets must
agree on numbering, and the target FSM below has no repeated-start state.

`edge_decoder` uses edge 1 as the reference. No target may touch edge 1. An
edge counts as modulated when

    ref − rt > ref >> MOD_SHIFT        (MOD_SHIFT = 2: at least 25 % faster)

* Edges 2..10 form `int_vec[8:0]`. Bit k set means that interrupt index k+1 is
  pending. The vector is reported after edge 10, and only when edge 1 was
  measured. Every I2C transaction has at least ten SCL rising edges: nine for
  the address byte and its ACK, plus one more before the stop or in the next
  byte. So even an address-only transaction carries the full vector.
* The eight data edges of byte frames FD_FIRST_FRAME (2) and later each carry
  one bit, MSB first. A full byte is reported on `fd_valid`/`fd_byte`. Frame 2
  is the first byte after the address and a command byte. This keeps data
  edges apart from interrupt edges.

An edge with a capacitance warning has no measurement and reads as
unmodulated.

## The target

`i4c_target` builds a pattern of edges to speed up in the next transaction.
`target_mod_fsm` plays it out:

* **Interrupt.** The index is `addr mod 9 + 1` (1..9). The target modulates
  edge index+1, i.e. one of edges 2..10, for as long as `int_req` is high.
  Targets whose addresses agree modulo 9 share an index. The controller then
  has to poll them.
* **Full duplex.** A pulse on `fd_arm` queues `fd_data`. The target's I2C
  engine gives this pulse after it has received the full-duplex command. The
  next transaction carries the byte on frame FD_FRAME (edges 19..26 by
  default). `fd_sent` pulses at its stop.

`target_mod_fsm` has five states: STOP, PRE_START, SCL_HIGH, PRE_STOP and
SCL_LOW. It loads its 27-bit shift register while the bus is idle. On every
SCL falling edge inside a transaction it shifts out one bit. That bit is
`modulate` until the next falling edge, so it covers exactly the rising edge
that follows. The stop condition turns modulation off.

The output `mod_n` is active low. It drives the gate of a PMOS switch that
connects a 2.2 kΩ resistor from Vdd to SCL. Against a 2.21 kΩ bus pull-up
this halves the rise time; against 22 kΩ it cuts it by about 90 %.

## Clocks and timing

* The controller runs on `clk` (125 MHz, 8 ns). The targets run on `tgt_clk`,
  which can be anything fast enough to see SCL edges: 100 MHz in the
  testbenches.
* Comparator inputs take two cycles through the synchronizer. `ev_valid` and
  the edge number of the same edge meet in the decoder in the same cycle.
  Decoder outputs follow one cycle later.
* `rsel` changes about two cycles after the stop condition is detected.
* `int_vec` is known about 105 µs after the start condition of a 100 kHz
  transaction. Polling nine devices over plain I2C costs 9 × 27 bit periods,
  2.43 ms.

## Parameters (top `i4c_system`)

| parameter | default | meaning |
|---|---|---|
| NUM_TARGETS | 3 | targets in the top (e.g. sensor, storage, radio) |
| GMIN_CYC | 56 | lower rise-time bound, cycles (450 ns) |
| GMAX_CYC | 125 | upper bound, cycles (1000 ns) |
| FIFO_DEPTH | 8 | result FIFO entries per line; interrupt at half |
| TIMEOUT | 3 125 000 | stuck-bus timeout, cycles (25 ms) |
| MOD_SHIFT | 2 | modulation threshold = reference >> MOD_SHIFT |
| CHURN_DELTA | 1 | churn threshold, cycles |
| FD_FRAME | 2 | byte frame used for full-duplex data |

`i4c_pkg` fixes the 16-bit count width, the four resistor levels and the
ten interrupt edges.

## Choices of this design

The document this design follows leaves these points open. They were decided
here:

* GMIN = 450 ns, and the decision is applied at the stop condition (see
  above).
* The modulation threshold of 25 % of the reference, and the churn threshold
  of one count.
* The 25 ms stuck-bus timeout.
* The FIFO drops new results when full and flags it.
* Full-duplex data goes in byte frame 2. The target is told to send by an
  `fd_arm` pulse from its I2C engine.
* Edge numbering runs on across a repeated start.
* Rise time resolution is one clock (8 ns). A software loop on a
  microcontroller typically needs several instructions per count and
  resolves 40 ns or so.
* In the state diagram the resistor step up is printed as bounded by the
  *smallest* resistor. It is implemented as bounded by the largest, since the
  other reading could never raise R.

## What is not in the RTL

* The comparators (0.3/0.7 Vdd dividers), the resistor multiplexers
  (2.21k/4.7k/10k/22k per line) and the PMOS modulation switches. They are
  analog. Their signals are the top's ports, and `tb/i2c_bus_model.sv` models
  them for simulation.
* The I2C protocol engines of the controller and the targets.
  `tb/i2c_master_model.sv` is a behavioural 100 kHz controller for the
  testbenches.
* Host software: address resolution (devices start at address 0x55 and are
  given addresses one by one), the service registry, the command set
  (discover, assign address, get/clear interrupt, read sensor, send radio,
  store data, request device type), retransmission after a stuck bus, and
  estimating C_bus from T_rise and R. The hardware provides the events these
  act on: `churn`, `int_vec`, `fd_byte`, `bus_stuck`, `red_zone` and the
  FIFOs.
* A shared INT wire, which targets can use to start a transaction early.
* Alternatives to the main design: a discrete flip-flop plus 4-bit counter
  that replaces the target FSM for interrupts only, and ramp-generator
  circuits (with an ADC or three comparators) that replace the fast counter.

## Simulation

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wall -Wno-fatal --top-module tb_i4c_system \
    rtl/i4c_pkg.sv $(ls rtl/*.sv | grep -v i4c_pkg) \
    tb/i2c_bus_model.sv tb/i2c_master_model.sv tb/tb_i4c_system.sv
./obj_dir/Vtb_i4c_system
```

For a block testbench, list `rtl/i4c_pkg.sv`, the block's files and
`tb/tb_<block>.sv`.

| testbench | what it shows |
|---|---|
| tb_i4c_system | whole system at its default parameters, against the RC bus model. Covers resistor steps up, down and hold; churn; interrupts from two targets; a full-duplex byte (0x32); red zone; a 25 ms stuck bus and Block; capacitance warning (glitch); resolution warning; FIFO interrupt and overflow. It counts each of these and fails if one never happened. About 4 s. |
| tb_workloads | nine targets. Part 1 sweeps 1..17 devices, with an assumed load of 90 pF + 15 pF per device: 10k for one device, 4.7k from the second, 2.21k from the eleventh; churn on every change; settled rise times 470–950 ns. Every SCL result measured on the way, at 2.21k, 4.7k and 10k, matches ln(7/3)·R·C within one count. Part 2 sends random interrupt sets from nine distinct indices. |
| tb_i4c_controller | controller alone; the testbench plays the target and drives the comparators with exact cycle timing |
| tb_i4c_target, tb_target_mod_fsm | modulation patterns against bit-level I2C waveforms |
| tb_rise_time_meter, tb_rt_fifo, tb_pullup_ctrl, tb_stuck_bus_detector, tb_i2c_bus_monitor, tb_edge_decoder, tb_churn_detector | block tests against reference models |

The bus model steps in 1 ns. A released line follows
v ← 1 − (1 − v)·e^(−1 ns/RC), where R is the selected pull-up in parallel with
every active 2.2 kΩ modulation resistor. Setting `c_pf = 0` makes edges
instantaneous.

## Trust and limits

* Verified only in simulation, against an ideal RC bus. Comparator offset,
  noise, ringing and clock stretching by slow rises are not modelled.
  Two of these have effects worth knowing. Noise near the 25 % modulation
  threshold could produce false interrupt bits. Noise of two counts on the
  reference edge triggers `churn` with the default CHURN_DELTA of 1. On a
  real bus, raise CHURN_DELTA to the measured noise.
* The FIFO's 8 entries at 100 kHz assume the host reacts within about 40 µs.
* At most nine interrupt sources can be told apart on one bus.
