# DIMxS: a return-to-one AND gate for glitch-hardened QDI logic

Quasi-delay-insensitive (QDI) asynchronous logic is built from C-elements,
gates that hold state whenever their inputs disagree. A C-element in such a
memorising state is exposed: a glitch on the input that holds the "other"
value can drive both inputs equal for a moment, and if the glitch is wide
enough the output flips and stays flipped (a single-event upset). Transistor
level characterisation of 65 nm C-elements shows that this is much easier
when the C-element is holding a **0** than when it is holding a **1**: for the
Martin topology the narrowest upsetting full-swing glitch is 22 ps in the
first case and 42 ps in the second.

The usual way to build combinational QDI logic, delay-insensitive *minterm*
synthesis (DIMS) with return-to-zero (RTZ) handshaking, parks its C-elements
in memorising states that hold 0. This design uses the dual style,
delay-insensitive *maxterm* synthesis (DIMxS) with **return-to-one (RTO)**
handshaking: every wire is the inverse of its RTZ counterpart, so the same
C-elements now hold 1 while their inputs disagree on the way from spacer to
data. No cell changes; only the protocol and the output gate (AND instead of
OR) differ.

The RTL provides the DIMxS two-input AND, the C-elements it is built from, the
RTZ/RTO domain interface, an RTO island that puts the three together inside
an RTZ system, and a behavioural glitch model of the C-element for
simulating upsets.

## Codes and handshake

Every bit travels on a 1-of-2 channel, wires `D.1` and `D.0`
(`dual_rail_pkg::dr_t`, packed `{d1, d0}`).

| protocol | spacer | bit '0' | bit '1' | invalid |
|----------|--------|---------|---------|---------|
| RTZ      | `00`   | `01`    | `10`    | `11`    |
| RTO      | `11`   | `10`    | `01`    | `00`    |

A 4-phase RTO transfer starts from the all-1s spacer. The sender lowers one
wire, the receiver sees valid data and lowers its acknowledge, the sender
returns the wires to all-1s, and the receiver raises the acknowledge on seeing
the spacer. Because the RTO value of each wire is exactly the inverse of its
RTZ value, a domain crossing is one inverter per wire (`rtz_rto_conv`), in
either direction.

## The DIMxS AND (`dimxs_and2`)

```
A.0, B.0 ──► C0 ── Mx00 ──┐
A.0, B.1 ──► C1 ── Mx01 ──┼── AND ──► Q.0
A.1, B.0 ──► C2 ── Mx10 ──┘
A.1, B.1 ──► C3 ── Mx11 ────────────► Q.1
```

One C-element per pair of input wires generates a maxterm: `C0 = C(A.0,B.0)`,
`C1 = C(A.0,B.1)`, `C2 = C(A.1,B.0)`, `C3 = C(A.1,B.1)`. RTO data wires are
active low, so once both operands carry data exactly one maxterm falls. `Q.1`
(result '1', active low) is `Mx11`; `Q.0` (result '0') is the AND of the
other three, which falls when any combination whose AND is 0 is present.
When both operands return to all-1s, every maxterm and both outputs return to
1. The output never shows the invalid codeword `00`, since that would need
two maxterms low at once.

The gate asserts (in simulation) that neither operand ever carries the
invalid codeword.

While only one operand carries data, or only one has returned to the spacer,
the gate holds its previous output: that is the C-elements' memory at work,
and it is what makes the gate delay-insensitive.

### C-element states over one cycle

Each C-element state is written `ABQ`. Going from the double spacer to data
the states are:

| A \ B | SP                  | 0                   | 1                   |
|-------|---------------------|---------------------|---------------------|
| SP    | 111 111 111 111     | 101 111 101 111     | 111 101 111 101     |
| 0     | 011 011 111 111     | 000 011 101 111     | 011 000 111 101     |
| 1     | 111 111 011 011     | 101 111 000 011     | 111 101 011 000     |

(each cell lists C0 C1 C2 C3). Apart from the double spacer, every state has
exactly two C-elements with differing inputs, and all of them hold 1. In the
RTZ minterm version every one of these would hold 0.

On the way back to the spacer the picture changes for one C-element: the one
that fired (holding 0) sees one input return to 1 before the other, and for
that phase it is in a memorising state holding 0. `tb_dimxs_glitch_sweep`
counts these: over one full cycle of every operand pair and order there are
32 memorising C-element states holding 1 and 8 holding 0. The RTZ minterm
gate has the mirror-image distribution, so the maxterm form is still the
more robust one, but it is not free of 0-holding states.

### Options

* `RTZ_INPUTS = 1` takes RTZ operands and builds the maxterm generators from
  inverted C-elements (`inv_c_element`). An inverted C-element on two RTZ
  wires yields the RTO maxterm directly, so the input border and the first
  logic level merge. The maxterms and output are identical to the default
  gate fed through inverters; only the inputs' protocol differs.
* `TRANSIENT_MODEL = 1` builds the gate from `c_element_martin_model`
  (simulation only, RTO inputs only), for glitch experiments.

## Modelling C-elements in RTL

`c_element` is written as a set/reset latch: set when both inputs are 1,
reset when both are 0, hold otherwise. Synthesis reports one latch bit per
C-element; that is the cell's state and is intended. In silicon each instance
would be mapped onto a C-element library cell. `inv_c_element` is the same
with the output inverted.

Neither cell has a reset pin. As in any delay-insensitive template, the
circuit is initialised by putting a spacer on every channel: agreeing inputs
force every C-element. A testbench must therefore apply spacers before the
first data (a two-state simulator otherwise starts the latches at arbitrary
values).

Verilator's lint may print `NOLATCH` for these `always_latch` blocks when
they are instantiated inside a generate loop; the block does infer a latch
(synthesis reports it), and the message is harmless.

## The RTO island (`dimxs_and_top`)

RTO can be adopted for a whole design or locally. The top shows the local
case: operands arrive as RTZ channels `a_rtz`, `b_rtz`; `rtz_rto_conv`
inverts them into RTO; `dimxs_and2` computes the AND; a second
`rtz_rto_conv` turns the result back into RTZ on `q_rtz`. The RTO result is
also available on `q_rto`. With `BORDER_INV_C = 1` the input inverters are
dropped and the gate uses inverted C-elements on the RTZ wires instead.

The island is pure handshake-free logic. The acknowledge wire of the 4-phase
protocol belongs to the sender and receiver around it and is not part of the
RTL; the testbenches provide it.

## Glitch model (`c_element_martin_model`)

A behavioural, non-synthesizable C-element that adds an inertial filter:
the output takes the common value of the inputs only after they have agreed
for a critical width, `MIN_W_UP_PS` (default 22 ps) for a rising output and
`MIN_W_DOWN_PS` (default 42 ps) for a falling one. A glitch narrower than the
width is absorbed; a wider one is latched. The defaults are the reported
critical widths of the Martin C-element at full glitch height. The model has
no notion of voltage, so glitch height, partial-swing glitches, output-node
strikes and process corners are outside it. The critical width also serves
as the model's propagation delay.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|-----------|---------------|
| `tb_c_element`, `tb_inv_c_element` | 2000-step random walk against the truth table; all six static (A,B,Q) states visited |
| `tb_rtz_rto_conv` | all 16 wire combinations on two channels; inversion, spacer and value mapping, round trip |
| `tb_dimxs_and2` | every bit pair and arrival/departure order plus a 500-cycle random walk; output against the protocol reference and the AND; all four C-element states against the table above on the way to data, against a reference C-element always; RTZ-input variant identical |
| `tb_c_element_martin_model` | glitches 1 ps either side of each critical width in all four memorising states; latencies of regular transitions |
| `tb_dimxs_and_top` | end-to-end at default parameters with a 4-phase RTZ sender/receiver: 400 handshakes, both results, all eight non-spacer operand states, memorising states holding 1 |
| `tb_dimxs_and_top_invc` | the same with `BORDER_INV_C = 1` |
| `tb_dimxs_glitch_sweep` | glitch widths 1 to 200 ps on every memorising C-element state of a full cycle of the DIMxS AND built from the glitch model |

Run any of them with Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/dual_rail_pkg.sv tb/tb_dimxs_and_top.sv --top tb_dimxs_and_top -Mdir obj -o sim
./obj/sim
```

Each finishes in well under a second. To lint a module on its own:
`verilator --lint-only -Wall -y rtl rtl/dual_rail_pkg.sv rtl/dimxs_and2.sv`.

## What is and is not modelled

* The DIMxS AND, the C-element function, the inverted C-element and the RTZ/RTO
  interface are complete at logic level.
* The three transistor topologies of the C-element (Sutherland, Martin, van
  Berkel) are circuit-level designs and have no RTL; only their logic function
  is used, plus the behavioural glitch model with Martin widths.
* The glitch-height dimension of the characterisation and the
  process/voltage/temperature corners cannot be represented at logic level.
* Choices made here that the underlying description leaves open: the struct
  layout of a channel, the channel count of the interface (`N`, default 2),
  the absence of reset pins, the `RTZ_INPUTS` and `BORDER_INV_C` options, the
  port list of the top, and the model's use of the critical width as delay.

## Files

| file | content |
|------|---------|
| `rtl/dual_rail_pkg.sv` | channel type, spacer constants, encode/decode helpers |
| `rtl/c_element.sv` | two-input C-element |
| `rtl/inv_c_element.sv` | inverted C-element |
| `rtl/rtz_rto_conv.sv` | RTZ/RTO domain interface, one inverter per wire |
| `rtl/dimxs_and2.sv` | DIMxS two-input AND |
| `rtl/dimxs_and_top.sv` | RTO island in an RTZ system (top) |
| `rtl/c_element_martin_model.sv` | behavioural glitch model (simulation only) |
| `tb/*.sv` | the testbenches listed above |
