# Event-driven OOK backscatter transmitter for a Body Dust sensing tag

A Body Dust tag is a free-floating sensor chip that must be smaller than
about 10 µm. It has no battery: an external array of ultrasound transmitters
powers it, and it talks back by changing how much of that ultrasound its
piezoelectric (PZT) receiver reflects. Only a few µW can be harvested, so the
transmitter has to be tiny and almost idle.

The transmitter here does not digitise the sensor reading at all. The sensor
front-end already turns the sensed current into a pulse train whose
frequency carries the measurement (a current-to-frequency converter, about
7 kHz per nA). On **every rising edge** of that pulse train, called FE, the
tag sends one short packet:

| bit (in time order) | 1st    | 2nd | 3rd | 4th |
|---------------------|--------|-----|-----|-----|
| meaning             | header, always 1 | A2 | A1 | A0 |

`A2..A0` is the address of the sensor currently selected by the on-chip
multiplexer (five sensors, so three bits). The packet says *which* sensor;
*when* packets arrive says *how much*. The base station recovers each
sensor's value by measuring the rate at which packets with that address
arrive. With addresses `101` and `001`, for example, the packets are `1101`
and `1001`, and the two packet rates give two metabolite concentrations
(glucose and lactate in the original example).

## Signal chain

```
            por_n                                    addr[2:0]
              |                                          |
              v                                          v  {1, A2, A1, A0}
   +-----+  clk  +-----------+  le   +-----------------------------+
   | sro |------>| mono_sync |--+--->| piso  (4 latches)            |-- sdata --> ook_switch --> PZT
   +-----+ 1 MHz +-----------+  |    |   load=1: write word         |             (R_m shorted
                                |    |   load=0: shift, fill 0      |              when sdata=1)
            fe ---------+       |    +-----------------------------+
                        v       v              ^
                  +---------------+    load    |
                  | fe_monostable |------------+
                  +---------------+
```

| module | what it is | kind |
|---|---|---|
| `bodydust_tx` | top: wires the chain above | RTL (contains models) |
| `sro` | 3-stage current-starved ring oscillator, 1 MHz | behavioural model |
| `mono_sync` | turns each rising oscillator edge into a ~1 ns latch-enable (LE) pulse | behavioural model |
| `fe_monostable` | rising-edge detector on FE, output LOAD | synthesizable RTL |
| `piso` | 4-stage parallel-in serial-out register | synthesizable RTL |
| `ook_switch` | NMOS switch across the modulator resistor R_m | behavioural model |
| `bodydust_pkg` | address width, packet type `packet_t`, `make_packet()` | package |

The oscillator, the pulse generator and the switch are analog circuits. They
are given as behavioural models with delays so that the whole chain can be
simulated. The two latch-based blocks are the only real logic.

## How a packet is triggered: LOAD and LE

This is the part that is easy to misread, because there is no system clock
in the usual sense and the input is asynchronous.

* The ring oscillator runs freely at 1 MHz. `mono_sync` turns each of its
  rising edges into a pulse of about 1 ns, LE. LE is the only trigger of all
  five latches: the four of the PISO and the one in the FE monostable.
* `fe_monostable` keeps, in its latch, the value FE had at the last LE pulse.
  LOAD is "FE is high now, but was low at the last LE pulse". LOAD therefore
  rises with FE, at any moment. It falls at the next LE pulse, because that
  pulse copies FE = 1 into the latch. So LOAD lasts at most one oscillator
  period (≤ 1 µs) and always contains exactly one LE pulse. A long FE high
  level gives no second LOAD.
* At that LE pulse the PISO sees LOAD high and writes `{1, A2, A1, A0}`. Its
  serial output is the most significant stage, so the header bit drives the
  switch immediately. The next three LE pulses shift out A2, A1 and A0. The
  fourth shifts in the last zero, and the switch stays open until the next FE
  edge.

Timing that follows from this:

* latency from the FE rising edge to the header bit: 0 to 1 µs;
* bit time: one oscillator period, 1 µs (1 Mb/s);
* packet: 4 µs. The fastest FE quoted for this system is about 100 kHz,
  a 10 µs period. So a packet always ends before the next FE edge, and no
  buffering or arbitration is needed.

The hardware latches are transparent only during the ~1 ns LE pulse, which
is much shorter than their propagation through the chain. Each one therefore
takes exactly one new value per pulse. In the RTL, each latch is written as a
register triggered by the rising edge of LE. This behaves the same way
per pulse, and it keeps a zero-delay simulator out of the race that a chain
of transparent latches would create.

## The modulator

`sdata = 1` closes the NMOS switch across R_m. R_m equals the receiver's
lumped resistance R_p (3552 Ω), so with the switch open the receiver is
matched and reflects little. With it closed, R_m is shorted, the receiver is
mismatched and it reflects strongly. This is on-off keying (OOK) by
backscatter. `ook_switch` reports the resistance the receiver sees
(`r_load_ohm`: 3552 or 0) and the reflection coefficient
(R − R_p)/(R + R_p) as signed Q1.15 (`reflection`: 0 or −32768 = −1.0). It
does not simulate the transducer itself (R_p with C_p = 62.75 pF).

## The oscillator model

The ring's frequency is f = I / (N · C · V_dd). With N = 3 stages,
C = 200 fF per stage and V_dd = 1.8 V, a ring current of 1.08 µA gives
1 MHz. That current is a derived value: only the other quantities and the
1 MHz target are specified. `sro` computes f from its parameters and closes a
ring of N inverting stages, each with delay 1/(2·N·f). Its first stage is a
NAND with `en`, so the ring rests with `clk` low while disabled. When `en`
rises, the first rising edge of `clk` comes N stage delays later (500 ns).
Changing `I_BIAS_A`, `C_TOT_F` or `VDD_V` moves the bit rate in the way the
formula predicts. Temperature drift is not modelled.

`mono_sync` ANDs the trigger with a copy of itself that has passed through
an odd chain of inverters (5 × 0.2 ns). This gives a 1 ns pulse on each
rising edge and nothing on falling edges.

## Top-level ports (`bodydust_tx`)

| port | dir | width | meaning |
|---|---|---|---|
| `por_n` | in | 1 | power-on reset, active low: stops the ring, clears the latches |
| `fe` | in | 1 | frequency-coded sensor signal, asynchronous |
| `addr` | in | 3 | address of the sensor selected by the multiplexer |
| `sdata` | out | 1 | serial packet bit = switch gate |
| `r_load_ohm` | out | 16 | resistance in parallel with the receiver (Ω) |
| `mismatched` | out | 1 | switch closed |
| `reflection` | out | 16 | reflection coefficient, signed Q1.15 |
| `le`, `load` | out | 1 | internal LE and LOAD, for observation |

Parameters: `SRO_I_BIAS_A` (default 1.08e-6 A, giving 1 MHz) and `R_M_OHM`
(default 3552). The sub-blocks have parameters of their own: `piso.W`
(4 stages) and `piso.SHIFT_FILL` (0), `sro.N_STAGES`, `C_TOT_F` and `VDD_V`,
`mono_sync.N_INV` and `T_INV_NS`, and `ook_switch.T_SW_NS`.

## Parts of the tag that are not here

Several parts of the tag lie outside this RTL: the sensors with their
potentiostat and current-to-frequency converter, the sub-Hz sensor
multiplexer, the power-management unit and the PZT transducer. They are
analog, or come from elsewhere. Their signals are the ports above: `fe` and
`addr` come in, and the switch state goes out. The end-to-end testbench
contains a simple current-to-frequency model (7 kHz/nA) and steps `addr`
through the sensors itself.

## Departures and choices of this design

* **Reset.** The circuit as specified has no reset. `por_n` is added so that
  simulation and power-up start from a known state.
* **Latches as edge-triggered registers**, for the reason given above.
* **Bit order and fill.** The header goes first, then A2, A1 and A0; this
  matches the example packets `1101` and `1001`. Zeros are shifted in behind
  the packet, so the switch is open between packets.
* **Pulse generator and oscillator insides.** `mono_sync` is specified only
  as "an inverter-based delay block giving a ~1 ns pulse"; the AND-with-
  delayed-inverse form is this design's choice. The ring current is derived
  from the frequency formula.
* **One RTL for both process nodes.** The circuit was laid out in 0.18 µm
  and in 28 nm FD-SOI. The 28 nm version uses parasitic instead of explicit
  ring capacitors and 8-transistor transmission-gate latches. The logic is
  identical, so the RTL does not distinguish the two. Area and power
  (≈2000 µm² and 9.7 µW against < 50 µm² and < 200 nW) are layout results
  that RTL cannot reproduce.
* **FE rate.** The converter's 7 kHz/nA over 1–5 nA gives 7–35 kHz, but
  about 100 kHz is quoted as the maximum FE rate. The design works the same
  at either rate, and the testbench runs both.
* **Metastability.** FE is asynchronous and feeds the PISO's load
  multiplexer directly, as in the original circuit. If an FE edge falls
  inside the 1 ns LE pulse, the packet may start one period later. The
  testbenches keep FE edges away from LE edges.

## Simulating

Every file has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5 (delays need `--timing`;
`-Wno-fatal` keeps lint warnings about testbench delays from stopping the build):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/bodydust_pkg.sv rtl/sro.sv rtl/mono_sync.sv rtl/fe_monostable.sv \
    rtl/piso.sv rtl/ook_switch.sv rtl/bodydust_tx.sv tb/tb_bodydust_tx.sv \
    --top-module tb_bodydust_tx -o sim && ./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_bodydust_tx` | whole chain at default parameters. Five sensors at 7–35 kHz (including packets `1101` and `1001`), then 20 packets at 100 kHz. Every bit is compared with a reference model. Also checked: header latency ≤ 1 µs, bit period 1 µs ± 1%, packet decoding by a base-station model, FE frequency recovered from packet spacing within 2%. Counts LOAD, shift, switch closure, FE held high and complete packets; each must occur. |
| `tb_piso` | load/shift against a queue model, over 400 random cycles, plus reload mid-packet and asynchronous clear |
| `tb_fe_monostable` | LOAD = FE ∧ ¬FE(last LE) at random instants; one LOAD per FE edge; no LOAD for FE held high |
| `tb_sro` | rests low when disabled, 500 ns start-up, 1 µs ± 1% period, 50% duty, stops on disable |
| `tb_mono_sync` | one 1 ns pulse per rising edge and none on falling edges |
| `tb_ook_switch` | resistance, mismatch flag and reflection for both switch states |

The full end-to-end run simulates about 2.2 ms of tag time and finishes in
seconds.

Synthesis: `fe_monostable` and `piso` (and `bodydust_pkg`) are plain
synthesizable logic. `sro`, `mono_sync` and `ook_switch` stand for
transistor-level circuits. A synthesis tool ignores their delays, so the
synthesized top is not meaningful beyond those two blocks.
