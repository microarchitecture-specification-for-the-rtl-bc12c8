# Back-propagation State Machine (BSM)

The BSM is a small digital chip that trains one neuron. It sits beside an
analog processing node (PN) that computes `Oj = f(sum Oi*Wi)` over four
inputs. After each forward pass, the BSM does two things:

- It computes the back-propagation correction for the PN's four weights and
  writes the new weights back into the PN.
- It computes one error term per input and sends each one to the node of the
  level below that feeds that input.

Groups of BSM+PN units share one 4-bit system bus and form a layered network
of up to three levels of four units.

This RTL is a synthesizable SystemVerilog model of the chip, based on a 1987
microarchitecture specification. It keeps that specification's modules,
signals, register map and computation sequence. Where the specification is
silent or unclear, the choices made here are listed under
[Departures and choices](#departures-and-choices).

## What is computed

All stored values are 4 bits wide. Oj, Oi and eta are unsigned fractions.
X, the error term that comes from the level above, is used only for its
sign. With `L = Oj*(15-Oj)`, the 6-bit value of `Oj(1-Oj)`:

```
R1   = (L * eta) >> 4                       6 bits
for i = 1..4:
  R2 = (R1 * Oi) >> 4                       6 bits
  Wi = Wi + (X < 0 ? -R2 : R2)   mod 16     written back
for i = 1..4:
  R2 = (L * Wi) >> 4                        uses the new Wi
  Ei = (X < 0 ? -R2 : R2)        mod 16     error term for lower node i
```

The textbook update is `dWi = eta * Oj(1-Oj) * X * Oi`. The hardware replaces
X by its sign, which sets the direction of the correction. Error terms leave
out eta, as in the original design. Weights and errors wrap modulo 16: there
is no saturation.

## Chip organisation

| Module | Original name | Role |
|---|---|---|
| `bsm_top` | BSM | Wires the blocks below together. It brings out the bus pins as separate in/out/enable signals. |
| `bsm_regmod` | RegMOD | Sixteen 4-bit registers. Each has a one-hot select and its own parallel output, and all share a common read bus. |
| `bsm_decmod` | DecMOD | Decides who gets the register file this cycle. It decodes that requester's address into the selects and steers the write data. |
| `bsm_seqmod` | SeqMOD | The computation sequencer: a 7-state sequence machine plus a 2-bit weight counter. |
| `bsm_oj_lut` | SeqMOD table | Combinational table giving `Oj*(15-Oj)`. |
| `bsm_seq_encode` | SeqMOD encode | Turns the sequencer's read and write requests into register addresses. |
| `bsm_ammod` | AmMOD | Shift-and-add unit: an 8-bit adder, a 13-bit accumulator and a 3-state controller. |
| `bsm_resmod` | ResMOD | Makes the eight result writes on the bus and drives `done`. |
| `bsm_bimod` | BiMOD | Arbitrates for the shared bus (daisy-chained request plus a wired busy line) and runs the 3-cycle write cycle. |
| `bsm_pkg` | — | Register map, the sequencer state type and address helper functions. |

The pads (PinMOD) are not modelled. The top exposes each bidirectional bus as
`*_i`, `*_o` and `*_oe`. The open-drain busy line appears as two signals: its
level after the pad inverter (`busy_in`) and this chip's pull (`busy_drive`).

### Register map

| Address | Register | Written by |
|---|---|---|
| 0, 2, 4, 6 | O1..O4, the PN's inputs | the lower-level FPNs (`avalwren`, unit address on `a_caddr`, register on `a_raddr`), or the host |
| 1, 3, 5, 7 | W1..W4, the weights | the host (initial values) and the sequencer |
| 8 | unit address (ID) | the host |
| 9 | eta | the host |
| 10 | Oj, the PN output | the local FPN on the "b" interface (`bwren`, unit address on `b_caddr`) |
| 11 | Xin | the upper-level BPN (`axwren`; addresses ignored) |
| 12..15 | E1..E4, the error terms | the sequencer |

## The computation sequence

The sequencer runs six steps, each a single add or multiply in `bsm_ammod`:

| Step | xbus (6 bits) | ybus (4 bits) | Operation | Result goes to |
|---|---|---|---|---|
| OJETA | L | eta | multiply | R1 = product[9:4] |
| OI | R1 | Oi (read over the common bus) | multiply | R2 = product[9:4] |
| XI | ~R2 if X<0, else R2 | 1 if X<0, else 0 | add | R3 = sum[5:0] |
| WI | R3 | Wi | add | Wi = sum[3:0] |
| OJWI | L | Wi | multiply | R2 = product[9:4] |
| EI | ~R2 if X<0, else R2 | 1 if X<0, else 0 | add | Ei = sum[3:0] |

The order is OJETA, then (OI, XI, WI) four times, then (OJWI, EI) four times.
That is 9 multiplies and 12 adds per update. The XI and EI steps negate by
two's complement: invert, then add 1.

Handshake with the adder/multiplier:

- A command is a one-cycle `mult` or `add` pulse. The operands on xbus and
  ybus are valid in that same cycle.
- The unit raises `done` when the result is ready and holds it until the next
  command.
- The sequencer turns the rising edge of `done` into `dpulse`. On `dpulse` it
  stores the result and moves to the next step. In the following cycle it
  issues the next command (`PULSE = (GO + DONE) delayed one clock`).

Oj, eta and Xin reach the sequencer straight from the register file's
parallel outputs. Oi and Wi are read over the common read bus. These reads
are asserted only in the cycle a command is issued. The rest of the time the
register file is free, so a BPN can deliver X while a computation runs. The
sign of X is latched at the end of OJETA and of each OJWI step, so X may
arrive up to about ten cycles after `go`.

When the last EI step finishes, the sequencer pulses `compdone`.

## The adder/multiplier

`bsm_ammod` has one 8-bit adder and a 13-bit accumulator `areg` that shifts
right.

- **Add:** x goes into `areg[11:4]`. One parallel add puts x+y into
  `areg[12:4]`, and four right shifts bring the 9-bit sum down to `areg[8:0]`.
- **Multiply (6 x 6):** x goes into `areg[5:0]` and y into `yreg[7:2]`, which
  is bit 6 of `areg` once the adder's offset of 4 is counted. Six times over:
  if `areg[0]` is 1, add; then shift. The 12-bit product ends in
  `areg[11:0]`.

A Mealy controller with three states performs one action per cycle: `pa`
(add), `ps` (shift and count) or `d` (done).

```
S0: (add or lsb) -> pa, S1        else -> ps, S2
S1:               -> ps, S2
S2: k            -> d, S0
    mult, lsb    -> pa, S1        else -> ps, S2
```

`k` rises after 4 shifts for an add and after 6 for a multiply.

Latency from the command cycle to `done`:

- add: 7 cycles
- multiply: 8 cycles plus the number of 1 bits in x[5:0]

In the chip only 6 bits of xbus and 4 bits of ybus are used. The top ties the
remaining bits to zero.

## Writing the results

After `compdone`, `bsm_resmod` makes eight writes:

1. W1..W4 go to the local FPN with `awtwr`. Unit address = own ID; register
   address = 0..3.
2. E1..E4 go to the lower-level BPNs with `adelwr`. Unit address = 0..3;
   register address = own ID.

For each write, ResMOD reads the source register, which puts the value on
`a_data_o`. It then holds `outreq` until `bsm_bimod` grants the bus, and waits
for `outenab` to fall before the next write. `done` rises after the eighth
write. The next `go` clears it.

Bus arbitration in `bsm_bimod`:

- **IDLE:** when `outreq` is high and both `busy` and `reqin` are low, go to
  ARB and raise `reqout`. `reqout` also pulls the busy line.
- **ARB:** if `reqin` is now high, a higher-priority chip requested in the
  same cycle. Drop `reqout` and go back to IDLE. `outreq` is still high, so
  the chip tries again once the bus is free.
- **W1, W2, W3:** `outenab` is high, so the address and data buffers drive the
  bus. The strobe (`wstrb`, routed to `awtwr` or `adelwr`) is high in W2.

Outside the chip, the daisy chain is an OR gate per chip:
`reqin(next) = reqout(this) | reqin(this)`.

An uncontended write takes 5 cycles from `outreq` to the fall of `outenab`. A
full update (computation plus eight writes) took 226 to 266 cycles in the
testbench. The variation comes from the operand values and from bus waits.

## Interfaces and timing

- One rising-edge clock `clk` stands for the original two-phase
  non-overlapping clock. `rst` is synchronous and active high; it clears all
  state, including the register file.
- All control signals are active high.
- **Host:** `cs` with `wr` writes `a_data_i` into register `a_raddr_i`. `cs`
  with `rd` puts that register on `a_data_o`, with `a_data_oe` high.
- **Start:** a rising edge on `go` starts a computation. `go` also clears
  `done`.
- **Bus writes into the BSM:** a write of an input value (`avalwren`) or of Oj
  (`bwren`) is accepted only when its unit address matches register 8. An X
  write (`axwren`) is always accepted. All three are ignored while this chip
  is strobing its own results.
- **Access priority:** the register file is shared with this order of
  priority: result module, sequencer, host, X write, input-value write, Oj
  write. Accesses that lose are dropped, not queued. In normal use they do
  not overlap.

## Departures and choices

These come from the original specification:

- the module split
- the register map and the encode table
- the control equations of the sequencer (which step reads and writes what)
- the adder/multiplier datapath and its S0/S1/S2 controller
- the bus protocol, including the 3-cycle write with the strobe in cycle 2
  and the abort one cycle after a request

These are this design's own choices:

- **Clocking:** flip-flops on a single clock replace two-phase latches and
  dynamic PLAs. Any timing below one clock cycle is not modelled.
- **Product bits kept:** the bits kept from each product ([9:4]) and the
  modulo-16 write-back of weights and errors. The original fixes neither.
- **Lookup table:** it computes `Oj*(15-Oj)`. The original printed table has
  28 for Oj = 2 and Oj = 13, where the product is 26.
- **Adder/multiplier registers:** the accumulator is loaded straight from
  xbus. The original first copies xbus into a separate x register, which
  holds nothing the accumulator does not.
- **Eta and the error terms:** one passage has eta on ybus for the
  error-term steps too. This design follows the update equations, which
  leave eta out of the error terms.
- **Reads only in the issue cycle:** sequencer reads are limited to the cycle
  a command is issued, so that bus writes are not blocked during a
  computation.
- **X timing:** X's sign is latched during the computation rather than at
  `go`.
- **Register-file priority:** the access priority order above. The original
  states that it makes no provision for simultaneous accesses.
- **Unit-address match:** input-value and Oj writes require a matching unit
  address.
- **Write-strobe routing:** Wi writes use a write strobe. The original encode
  table marks those rows as reads, which contradicts its own control
  equations.
- **Signal polarity:** all signals are active high. The original is not
  consistent here: one passage has a low `reqin` enable a request, and
  another says an asserted `reqin` keeps the chip off the bus. This design
  follows the second.
- **State encoding:** the sequencer's state codes are this design's own.

Not modelled: the pads, the analog processing nodes, the host, and any
multi-chip network beyond the two-chip testbench.

## Simulating

Every testbench checks its own results and ends by printing
`TB_RESULT checks=N failures=M`. To run one with Verilator:

```
verilator --binary --timing -y rtl rtl/bsm_pkg.sv tb/tb_bsm_top.sv --top-module tb_bsm_top
./obj_dir/Vtb_bsm_top
```

| Testbench | What it checks |
|---|---|
| `tb_bsm_top` | Whole chip at its default sizes, over 40 updates, against a reference model. Plays the host, FPNs and BPNs, and forces one abort and one busy wait on the bus. Checks every bus write, the 3-cycle write timing, read-back of all results, rejection of writes addressed to other units, and that each update uses 9 multiplies and 12 adds. |
| `tb_bsm_pair` | Two chips on one bus with a daisy chain. Checks that they never drive the bus at the same time, that both deliver correct results, and that the lower-priority chip both aborts and waits. |
| `tb_bsm_ammod` | Random adds and multiplies, including exact latency. Also checks that a command given while the unit is busy is ignored. |
| `tb_bsm_seqmod` | The sequencer against an arithmetic model of the adder/multiplier with random latency. Checks the order of operations, the written results, and that reads happen only in issue cycles. |
| `tb_bsm_regmod` | The register file against a shadow array. |
| `tb_bsm_decmod` | The decoder against an independent priority model. |
| `tb_bsm_resmod` | The result writer against a model of the bus interface. |
| `tb_bsm_bimod` | Bus timing, waiting while busy, waiting on `reqin`, and abort. |
| `tb_bsm_oj_lut` | Every table entry. |
| `tb_bsm_seq_encode` | Every address in the encode table. |

The modules also contain concurrent assertions for the handshake rules:

- at most one register is selected per access
- one action per busy cycle in the adder/multiplier
- a write cycle is exactly three cycles long
- the sequencer never issues a command while the adder/multiplier is busy

To change the arithmetic, edit the step table in `bsm_seqmod` (the operand
multiplexers and `res6`). Register addresses live in `bsm_pkg`.
