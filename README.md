# FM0 / Manchester encoder with one flip-flop and fully shared logic

Short-range vehicle radio links (DSRC: toll collection, car-to-car
warnings) send their baseband data DC-balanced, using either the **FM0** or
the **Manchester** line code, depending on the regional standard. A
transmitter that supports both normally has two separate encoders plus an
output multiplexer, and whichever encoder is idle is wasted silicon.

This RTL is a single encoder in which **every gate is used by both codes**.
It has one flip-flop, two 2:1 multiplexers, one XNOR and one output
inverter. A second inverter feeds the flop in this RTL; the reason is
given under "Datapath".
Two observations make this possible:

1. **FM0 needs only one bit of state.** FM0's first half-symbol is
   determined by the last half-symbol of the previous bit. So one flop that
   stores that half-symbol is enough, instead of one flop per half.
2. **Both codes are "pick one of two legs with the clock".** Manchester is
   `X xor CLK`, which means "not X while CLK is high, X while CLK is low".
   FM0 is "not B(t-1) while CLK is high, X xor B(t-1) while CLK is low". The
   high-phase leg is an inversion in both codes, so it shares one inverter
   and only the operand (B(t-1) or X) is switched. The low-phase leg is an
   XOR in both codes if Manchester is read as `X xor 0`. The `0` comes free
   by holding the state flop cleared in Manchester mode.

## The two codes

Each data bit X lasts one CLK cycle and is sent as two half-symbols: **A**
while CLK is high (the first half), then **B** while CLK is low.

| code       | A (CLK high)   | B (CLK low)        | property |
|------------|----------------|--------------------|----------|
| FM0        | `not B(t-1)`   | `X xor B(t-1)`     | the level always changes at a bit boundary; it changes again mid-bit only when X = 0 |
| Manchester | `not X`        | `X`                | the level always changes mid-bit; half the time is high, half low |

The FM0 equations follow from its three rules:
- The level changes at every bit boundary, so A(t) = not B(t-1).
- X = 0 gives a mid-bit change, so B = not A.
- X = 1 gives no mid-bit change, so B = A.

Example: the bits 0, 1, 1, 0, 1, with FM0 starting from a cleared state (B(t-1) = 0):

```
bit          0     1     1     0     1
FM0   A B   1 0   1 1   0 0   1 0   1 1
Manch A B   1 0   0 1   0 1   1 0   0 1
```

## Datapath

```
           +------------------------------- q = B(t-1) <---------------+
           |                                                           |
           |   MUX-2 (sols_logic_a)                                    |
           +-->| 0                                                     |
   x ---+----->| 1 |---- a_pre --->| 1                                 |
        |      sel = mode          |  MUX-1 |--> INV --> code          |
        |                          |        |    (sel = clk)           |
        +--> XNOR(x, q) - b_pre -->| 0                                 |
             (sols_logic_b)    |                                       |
                               +--> INV --> b_cur = B(t) --> DFFB (sols_dffb)
                                                             posedge clk,
                                                             async clr_n
```

- **MUX-2** (`sols_logic_a`) selects the operand of the A leg. It passes
  B(t-1) in FM0 mode and X in Manchester mode.
- **XNOR** (`sols_logic_b`) forms the B leg from X and B(t-1). In Manchester
  mode B(t-1) is 0, so the leg carries X.
- **MUX-1** selects the A leg while `clk` is high and the B leg while it is
  low.
- **The inverter** after MUX-1 finishes both legs. Putting it after MUX-1
  gives both legs one gate of depth: a mux in the A leg, the XNOR in the B
  leg. This is why the B leg is an XNOR rather than an XOR. If the inverter
  sat in the A leg only, that leg would arrive at MUX-1 one gate later than
  the B leg, and MUX-1 could glitch when it switches. Both placements compute
  the same function. This RTL builds the balanced one.
- **DFFB** (`sols_dffb`) stores B(t) at the rising edge that ends the bit.
  Its active-low clear does two jobs. It initialises FM0, and it replaces the
  operand multiplexer that would otherwise be needed to feed 0 into the XOR
  in Manchester mode.

### Why the clock is used as data, and where the flop takes its input

`clk` is the select of MUX-1. This is deliberate: it is what makes one bit
per cycle come out as two half-symbols per cycle. As a result, `code` is
combinational in `clk`, and its rate is twice the clock frequency. On an
FPGA this routes the clock into a LUT; in an ASIC flow, MUX-1 should be a
glitch-free clock-mux cell, or constrained like one.

In the reference architecture, DFFB's D input is wired to the inverter
output. During the low phase that precedes each rising edge, that output is
the inverted B leg, so the flop stores B(t). An RTL model wired that way
would make the flop sample a signal that itself switches on the same clock
edge, which is a simulation race. `sols_encoder` therefore takes D from the
inverted B leg directly (`b_cur = ~b_pre`). The stored value and its timing
are identical; only the tap point differs. The cost is one extra
inverter, which synthesis may merge with the XNOR into an XOR.

## Control: `mode` and `clr_n`

| operation  | `mode`            | `clr_n` |
|------------|-------------------|---------|
| FM0        | `MODE_FM0` (0)    | 1       |
| Manchester | `MODE_MANCHESTER` (1) | 0   |

These are two separate inputs, driven by a system controller, and not one
derived from the other. FM0 also uses the clear: a low pulse on `clr_n`
resets B(t-1) to 0 before a new FM0 frame. Tying `clr_n` to `not mode` would
remove that initialisation.

The clear is **asynchronous**. Whether it should be synchronous was not
specified, so this is a design choice. Because of it, Q is 0 for the whole
time `clr_n` is low. Change `mode` and `clr_n` together, just after a rising
edge. An assertion in `sols_encoder` (`a_manchester_needs_clear`) flags
Manchester mode with the clear released.

## Interface and timing (`sols_encoder`)

| port    | dir | meaning |
|---------|-----|---------|
| `clk`   | in  | bit clock; high half = A, low half = B |
| `clr_n` | in  | active-low asynchronous clear of the state flop |
| `mode`  | in  | `sols_pkg::mode_e`: `MODE_FM0` or `MODE_MANCHESTER` |
| `x`     | in  | data bit; change it just after a rising edge and hold it for the whole cycle |
| `code`  | out | the encoded line signal |
| `q`     | out | the state flop, B(t-1): the B half of the previous bit, or 0 in Manchester mode |

- Throughput is one data bit per clock cycle.
- There is no pipeline latency on `code`.
- `q` shows a bit's B half-symbol from the rising edge that ends that bit,
  one cycle after the bit was applied.
- The encoder has no parameters: the design is 1 bit wide by nature.

Generic synthesis gives one flip-flop bit and seven word-level cells: two
muxes, an XOR, inverters and the flop. This is in line with a one-flip-flop,
two-LUT FPGA mapping.

## Files

| file | contents |
|------|----------|
| `rtl/sols_pkg.sv` | `mode_e` enum shared by the design and testbenches |
| `rtl/sols_logic_a.sv` | MUX-2, operand select of the A leg |
| `rtl/sols_logic_b.sv` | shared XNOR of the B leg |
| `rtl/sols_dffb.sv` | the state flop with asynchronous active-low clear |
| `rtl/sols_encoder.sv` | top: the legs, MUX-1, the shared inverter and the flop |
| `tb/tb_sols_logic_a.sv`, `tb/tb_sols_logic_b.sv` | exhaustive truth-table checks |
| `tb/tb_sols_dffb.sv` | capture, one-cycle latency, asynchronous clear held over edges |
| `tb/tb_sols_encoder.sv` | end-to-end check of both codes |

## Simulating

Each testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M`, and it has a watchdog. Example with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sols_pkg.sv rtl/sols_logic_a.sv rtl/sols_logic_b.sv rtl/sols_dffb.sv \
    rtl/sols_encoder.sv tb/tb_sols_encoder.sv --top-module tb_sols_encoder
./obj_dir/Vtb_sols_encoder
```

The other testbenches build the same way: name their module with
`--top-module`.

`tb_sols_encoder` runs the design as built; there are no parameters to
reduce. The test works as follows:

- It applies one bit per cycle, just after each rising edge.
- It samples `code` in the middle of each half, and again just before the
  next edge.
- It compares the samples with a reference model written from the coding
  rules, not from the gates.
- Independently of that model, it checks the measured waveform against the
  rules themselves: FM0's boundary and mid-bit transitions, Manchester's
  mid-bit transition, and Manchester's equal high/low time.
- It checks `q`'s one-cycle latency, and one bit per cycle.

It covers:
- the bit pattern 0, 1, 1, 0, 1 in both codes
- long random streams: about 560 FM0 bits and 320 Manchester bits
- nine switches into FM0 and eight into Manchester
- one FM0 re-initialisation by a clear pulse in the middle of a stream

It counts each FM0 rule, each switch and each re-initialisation, and fails
if any of them never occurred.

## How far to trust it, and what is not here

- The behaviour matches the two codes' rules exactly. This was checked by
  simulation, as listed above.
- The gate arrangement is the balanced one described above. What RTL cannot
  show is the timing balance between the two legs: that depends on the cell
  mapping.
- The flop's D tap point differs from the reference wiring. The reason is
  explained above; the behaviour is equivalent.
- Two points are this design's own choices: the clear is asynchronous, and X
  changes right after the rising edge.
- **Not built:**
  - The *unbalanced* variant: an inverter in the A leg and an XOR in the B
    leg. It computes the same function.
  - A proposed extension that merges flip-flops into a multi-bit flip-flop
    for clock power; this encoder has a single flip-flop.
  - The rest of a DSRC transceiver: the controller that drives `mode` and
    `clr_n`, the other baseband functions, the receive-side decoder and the
    RF front-ends. The encoder's controls are plain ports so such a
    controller can drive them.
- Rates: one bit per clock cycle. At DSRC line rates, roughly 0.25 to
  4 Mbit/s, the clock is at most a few MHz. The only limit on speed is one
  mux-plus-inverter delay per half cycle.
