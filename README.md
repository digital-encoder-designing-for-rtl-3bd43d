# Quadrature decoder/counter interface

An incremental optical encoder on a motor shaft delivers two square waves, A
and B, a quarter period apart. Which one leads gives the direction of
rotation, and each of their four edges per line is a step of position. This
design turns the two raw channels into a 16-bit signed position that a
microprocessor reads over an 8-bit bus. It does the same job as classic
encoder interface chips (the HCTL-2000 family) and is built entirely from small
finite state machines and registers:

```
 cha ─► dfilter ─┬─► fourx_rate ── x4 ──► updown_counter ──► position_latch ──► bus_interface ─► rout[7:0]
 chb ─► dfilter ─┴─► dir_decoder ─ dir ─►      (16 bit)  │        ▲  (16 bit)        ▲   ▲        rout_oe
                                                  cntout ◄┘        │ inh         sel ──┘   │
                                     oe_n, sel ──► inhibit_logic ──┘            oe_n ──────┘
```

Everything runs from one clock `clk`, which must be much faster than the
encoder signals: each encoder edge must stay put for at least four clock
periods (see *Speed limit*). The filters and the inhibit controller use the
falling clock edge; everything else uses the rising edge.

## Noise filter: a three-in-a-row recognizer

Motor drives are electrically noisy, so each channel first passes a filter
(`dfilter`). It is a control unit plus a one-bit datapath:

* The control unit (`recognizer`) is a seven-state Mealy machine. It samples
  the channel on every rising edge and keeps track of how many equal samples
  came in a row:

  | state | code y2y1y0 | meaning                   | next, x=0 | next, x=1 | z                |
  |-------|-------------|---------------------------|-----------|-----------|------------------|
  | S0    | 000         | nothing sampled yet       | S1        | S2        | 0                |
  | S1    | 001         | one 0                     | S3        | S2        | 0                |
  | S2    | 010         | one 1                     | S1        | S4        | 0                |
  | S3    | 011         | two 0s                    | S5        | S2        | 0                |
  | S4    | 100         | two 1s                    | S1        | S6        | 0                |
  | S5    | 101         | three or more 0s          | S5        | S2        | 1 if x=0         |
  | S6    | 110         | three or more 1s          | S1        | S6        | 1 if x=1         |

  The same machine can be written as D2 = y1y0'x + y2y0'x + y1y0x' + y2y0x',
  D1 = y2x + y1'x + y0x + y2'y1'y0, D0 = x', z = y2y1x + y2y0x'. The
  testbench uses these equations as its reference.
* The datapath is a 2:1 multiplexer and a falling-edge flip-flop. With z high
  the flip-flop takes the channel input; otherwise it keeps its value.

A level therefore gets through only after three rising-edge samples in a row
agree and the input still holds it. The output then changes 2.5 clock
periods after the first of those samples. Any pulse shorter than three
samples is dropped.

## Direction from four-bit edge codes

`fourx_rate` and `dir_decoder` each delay the two filtered channels by one
rising-edge flip-flop (each block has its own pair, as in the original
schematic). While an edge passes through that delay, the channel and its
delayed copy differ for one clock, and the 4-bit code {A, dA, B, dB} takes a
value that identifies both the edge and the direction:

| edge     | clockwise (A leads) | counter-clockwise (B leads) |
|----------|---------------------|-----------------------------|
| A rises  | 8  (1000)           | 11 (1011)                   |
| B rises  | 14 (1110)           | 2  (0010)                   |
| A falls  | 7  (0111)           | 4  (0100)                   |
| B falls  | 1  (0001)           | 13 (1101)                   |

A 4-to-16 one-hot decoder turns the code into sixteen lines. The OR of the
four clockwise lines (`upset`) clears `dir`, and the OR of the four
counter-clockwise lines (`downset`) sets it. Every other code keeps `dir`
unchanged: no edge in flight (0, 3, 12, 15), or an illegal step where both
channels changed between two samples (5, 6, 9, 10). In the original, `dir`
is a cross-coupled NOR latch. Here it is a register with a combinational
bypass, so `dir` already shows the new direction in the same clock period as
the count pulse of that edge.

`dir = 0` means clockwise (A leading B) and counting up. `dir = 1` means
counter-clockwise, counting down.

`fourx_rate` makes the count pulse x4 = (A xor dA) or (B xor dB). That is one
pulse per edge of either channel, or four per encoder line. Since the
filtered channels change on the falling edge, the pulse is half a clock wide
and the counter samples it on the next rising edge.

## Counter, latch and the two-byte read

`updown_counter` is a 16-bit binary counter. It steps on every rising edge
where x4 is high, in the direction given by `dir`, and wraps modulo 2^16.
Positions below zero therefore read as two's complement (-10 is FFF6).

`position_latch` copies the counter on every rising edge unless `inh` is
high. `bus_interface` puts one byte of the latch on the bus while `oe_n` is
low: the high byte for `sel = 0`, the low byte for `sel = 1`.

A 16-bit read takes two bus cycles, high byte first. The counter keeps
running during the read, so the latch has to be frozen in between.
Otherwise the two bytes could come from different counts, for example FF
from FFFF and 00 from 0000. `inhibit_logic` does this. It samples `oe_n` and
`sel` on the falling clock edge:

| state   | code | inh | oe_n=0,sel=0 | oe_n=0,sel=1 | oe_n=1  |
|---------|------|-----|--------------|--------------|---------|
| IDLE    | 00   | 0   | HIGH_RD      | IDLE         | IDLE    |
| HIGH_RD | 01   | 1   | HIGH_RD      | LOW_RD       | HIGH_RD |
| LOW_RD  | 11   | 1   | LOW_RD       | LOW_RD       | IDLE    |

Reading the high byte raises `inh`. It stays high while the strobe is
released between the two bytes and through the low-byte read, and drops when
`oe_n` goes high after that. A processor with an 8-bit bus reads only the
low byte (`sel = 1`). From IDLE this never raises `inh`, so the latch keeps
following the counter: that is the simple 8-bit mode.

Bus protocol in short (each step held for at least one clock period):

1. `oe_n=0, sel=0`: read the high byte (the latch freezes from the next rising edge).
2. Optionally `oe_n=1` between the bytes.
3. `oe_n=0, sel=1`: read the low byte.
4. `oe_n=1`: the latch is released.

## Timing

For a raw edge first sampled on rising edge 1:

| event                                   | when                          |
|-----------------------------------------|-------------------------------|
| filter output changes, x4 and dir valid | falling edge after rising edge 3 |
| counter `cntout` steps                  | rising edge 4                 |
| latch (and thus the bus) shows it       | rising edge 5                 |

### Speed limit

The filter needs a level to be sampled three times, so an encoder edge must
hold for at least three clock periods, and four to have some margin. The
testbenches use four clock periods per edge. For a 2000-line encoder
(8000 edges per revolution) at 3000 rpm, that means a clock of at least
4 x 8000 x 50 = 1.6 MHz.

## Top level: `quad_decoder_ic`

| port      | dir | width | meaning                                          |
|-----------|-----|-------|--------------------------------------------------|
| clk       | in  | 1     | sampling clock                                   |
| rst_n     | in  | 1     | asynchronous reset, active low; all registers to 0 |
| cha, chb  | in  | 1     | raw encoder channels                             |
| oe_n      | in  | 1     | bus output enable, active low                    |
| sel       | in  | 1     | 0 = high byte, 1 = low byte                      |
| x4        | out | 1     | 4x count pulse                                   |
| dir       | out | 1     | 0 = clockwise / up, 1 = counter-clockwise / down |
| cntout    | out | 16    | live counter value                               |
| inh       | out | 1     | latch inhibited (two-byte read in progress)      |
| rout      | out | 8     | bus data (0 while not driven)                    |
| rout_oe   | out | 1     | bus driver enable (= not oe_n)                   |

Shared widths (`COUNT_W = 16`, `BUS_W = 8`) and the two state enums are in
`rtl/qd_pkg.sv`. The counter and latch have a `WIDTH` parameter (default
16). The bus interface is fixed at two bytes.

The design has about 47 flip-flops (3 + 1 per filter, 2 in the 4x circuit,
3 in the direction decoder, 16 + 16 in counter and latch, 2 in the inhibit
controller). The original FPGA implementation reported 70.

## Where this design makes its own choices

The original describes the filter, the direction decoder, the 4x circuit and
the inhibit controller down to the gate or state-table level. This RTL
follows those. It gives only the function of the counter, the latch and the
bus interface. Choices made here:

* **Direction polarity.** `dir` is low when A leads B, and the counter then
  counts up. This agrees with the original's logic (clockwise codes clear
  the latch), with its simulation trace, and with its measurements, where
  clockwise turns read as positive counts. One sentence in the original's
  description says instead that the counter counts up while `dir` is high.
* **Byte order.** The high byte is read first with `sel = 0`, as the
  inhibit state table and the original simulation trace show. One passage
  of the original speaks of reading the low byte first; that order would not
  fit the state table.
* **Synchronous counter.** In the original the 4x signal clocks the counter.
  Here the counter runs on `clk` with x4 as its enable.
* **Direction latch** built as a register plus bypass instead of
  cross-coupled NOR gates (see above).
* **Tri-state bus** modelled as data plus the enable `rout_oe`; a pad or the
  enclosing design builds the tri-state driver.
* **Reset.** Every register clears asynchronously on `rst_n`; the original
  shows clear pins but does not discuss reset.
* **Filter delay.** The original quotes a delay of about three clocks for
  the filter. Here a clean level needs three samples and appears on the
  next falling edge, 2.5 periods after the first sample.
* **Unused state codes** (111 in the recognizer, 10 in the inhibit
  controller) return to a defined state; the original tables leave them
  open.

### Counter-clockwise readings

In the original bench test, a 2000-line encoder turned by whole revolutions
gave 1F40, 3E80, 5DC0, 7D00, 9C40 clockwise (8000 per revolution). This
design reproduces these exactly. For the counter-clockwise turns the
original lists E0BF, C17F, A23F, 82FF, 63BF. Those are the bitwise
complements of the clockwise values, one count short of the two's
complement. A 16-bit up/down counter starting at zero reads E0C0, C180,
A240, 8300, 63C0, and so does this design. The difference presumably lies
in how the test program read or showed the value; this design keeps the
plain two's-complement count.

## Simulation

Every testbench is self-checking. Each prints one line
`TB_RESULT checks=N failures=M`, has a watchdog, and needs no files.

| testbench              | what it checks                                                                 |
|------------------------|--------------------------------------------------------------------------------|
| `tb_recognizer`        | state machine against its sum-of-products equations and against the three-in-a-row rule |
| `tb_dfilter`           | random runs of 1 to 7 clocks; output against the filter rule; 2.5-period step latency |
| `tb_fourx_rate`        | pulse on every channel change; four pulses per quadrature cycle                 |
| `tb_dir_decoder`       | random direction changes and illegal double steps against the Gray-code rule   |
| `tb_updown_counter`    | random up/down/hold, wrap at 0000 and FFFF                                     |
| `tb_position_latch`    | follow and hold                                                                |
| `tb_inhibit_logic`     | against the excitation equations; two-byte and 8-bit reads                      |
| `tb_bus_interface`     | byte selection and enable                                                      |
| `tb_quad_decoder_ic`   | whole design at its defaults: noise spikes, clockwise and counter-clockwise counting through zero, direction reversals, a two-byte read while the shaft turns, an 8-bit read, 2000 random steps; each mechanism is counted and must occur |
| `tb_fig10_sequence`    | reference scenario: count 0 to 9 forward, back to 0; two-byte read at count 6 returns 00 then 06 while the latch holds and the counter moves on |
| `tb_table1_rotations`  | 1 to 5 whole revolutions of a 2000-line encoder in each direction, read over the bus (about a million clock cycles, under a second) |

`tb/quad_encoder_model.sv` is a behavioural encoder (quadrature stepping
plus injectable noise) used by the last three.

Running one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/qd_pkg.sv \
    tb/tb_quad_decoder_ic.sv --top-module tb_quad_decoder_ic -o sim
./obj_dir/sim
```

Replace the testbench name for the others. The package has to come first
on the command line; Verilator finds the other modules through `-Irtl -Itb`.
Lint with `verilator --lint-only -Wall -Irtl rtl/qd_pkg.sv rtl/quad_decoder_ic.sv`.
The only warnings are unused package constants in the smaller modules and
the unused lines of the 4-to-16 decoder.
