# Serial (7,4) cyclic Hamming encoder from reversible gates

This is a bit-serial encoder for the systematic (7,4) cyclic Hamming code with
generator polynomial G(p) = 1 + p + p³. Its flip-flops and modulo-2 adders
are built from reversible logic gates. A reversible gate has as many outputs
as inputs and maps inputs to outputs one-to-one, so no information is thrown
away. The outputs a circuit does not need are called *garbage outputs*. The
fixed inputs needed to make a function reversible are called *constant
inputs*.

The encoder is a classic shift-register divider. Each code word is the 4
message bits followed by 3 parity bits. The parity bits are the remainder of
p³·m(p) divided by G(p). The reversible form uses these parts:

- The three register stages are SAM + Double Feynman flip-flops.
- The modulo-2 adders are Feynman (controlled-NOT) gates.
- The structure has 8 gates, 6 constant inputs and a quantum cost of 20.

The RTL is synthesizable SystemVerilog. It keeps each reversible gate as a
module of its own, so the gate structure stays visible in the netlist. The
encoder is parameterised for any (N,K) code with a generator polynomial of
degree N−K. The defaults are the (7,4) code.

## The reversible gates

| Gate | Module | Mapping | Quantum cost |
|---|---|---|---|
| Feynman (CNOT), 2×2 | `feynman_gate` | (A,B) → (A, A⊕B) | 1 |
| Double Feynman (DFG), 3×3 | `double_feynman_gate` | (A,B,C) → (A, A⊕B, A⊕C) | 2 |
| SAM, 3×3 | `sam_gate` | (A,B,C) → (A', A'B ⊕ AC', A'C ⊕ AB) | 4 |

Quantum cost counts the 1×1 and 2×2 quantum primitives that make up a gate:
NOT, CNOT, controlled-V and controlled-V⁺. V is the square root of NOT. Those
primitives have no two-valued logic function, so they are not modelled. Only
the composite gates are.

The SAM gate is the one to understand. With A = 0 it passes B and C through.
With A = 1 it outputs (0, C', B). This is why it is one-to-one. With C tied
to 0 it gives NOT A, A OR B and A AND B at once. With A = CLK, B = D and C = Q,
its third output is CLK'·Q + CLK·D: the next state of a D flip-flop.

## The reversible D flip-flop (`rev_dff`)

One SAM gate and one DFG make a flip-flop:

```
load ─► SAM.A   SAM.P ─► load_n (CLK')
d    ─► SAM.B   SAM.Q ─► g      (garbage)
q_fb ─► SAM.C   SAM.R ─► [register] ─► DFG.A   DFG.P ─► q
                                 1 ─► DFG.B    DFG.Q ─► q_n (garbage in the encoder)
                                 0 ─► DFG.C    DFG.R ─► q_fb (back to SAM.C)
```

In a purely reversible circuit the SAM/DFG loop itself would hold the bit,
as a level-sensitive latch. A synchronous design needs an edge-triggered
element. So a register on the system clock sits between SAM.R and DFG.A. The
SAM's clock input becomes a load qualifier (`load`, driven by the encoder's
`shift`). The flip-flop therefore takes `d` on a rising edge of `clk` when
`load = 1`, and holds its value otherwise. `rst_n` is an asynchronous,
active-low reset to 0. The register and the reset are choices of this RTL.
The gate structure and the next-state equation are not.

## The encoder datapath (`cyclic_encoder`)

Let R = N−K, and let g_i be bit i of `GEN_POLY` (g_0 = g_R = 1). Stage 0 is
next to the feedback input. Each `shift` does:

```
fb        = feedback_closed ? (state[R-1] ⊕ msg_bit) : 0     output Feynman gate + feedback switch
state[0] <= fb
state[i] <= state[i-1] ⊕ fb   if g_i = 1                     Feynman gate: A = fb, B = state[i-1]
state[i] <= state[i-1]        if g_i = 0                     plain wire, no gate
code_bit  = output_on_parity ? state[R-1] : msg_bit          output switch
```

For G(p) = 1 + p + p³ (g1 = 1, g2 = 0) the parts are:

- SAM-DFG flip-flop 1 takes the feedback line.
- A Feynman gate adds the feedback to flip-flop 1's output and drives flip-flop 2.
- Flip-flop 2 drives flip-flop 3 directly.
- Flip-flop 3's output goes to the parity position of the output switch.
- It also goes to the output Feynman gate, which adds the message bit and
  drives the feedback switch.

Cost, computed by the module as localparams (`NUM_GATES`, `CONST_INPUTS`,
`QUANTUM_COST`, `NUM_GARBAGE`):

| | Count for (7,4) |
|---|---|
| Gates | 3 SAM + 3 DFG + 2 Feynman = 8 |
| Constant inputs | 2 per DFG = 6 |
| Quantum cost | 3·4 + 3·2 + 2·1 = 20 |
| Garbage outputs | 3 SAM + 3 DFG Q' + 2 Feynman P = 8 |

Some published tallies of this encoder give 7 garbage outputs. The eight
listed here are the unused gate outputs the structure actually has. The SAM
clock-complement outputs are not counted. Garbage outputs are left
unconnected in the RTL.

The two switches are not made of reversible gates:

- An open feedback switch feeds 0 into the register.
- The output switch is a 2-to-1 select.

## Switch sequencing and code-word timing

`switch_sequencer` counts shifts modulo N:

| Shift in the word | Feedback switch | Output switch | `code_bit` |
|---|---|---|---|
| 0 … K−1 | closed | message | the message bit, highest order first |
| K … N−1 | open | parity | the register's last stage, highest-order parity bit first |

After the K-th shift the register holds the remainder. The parity shifts move
zeros in behind it, so the register is empty after the last one. The next word
can then start in the very next cycle, with no clear. The position counter
wraps to 0 at the same moment.

`cyclic_encoder_top` interface:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (register and counter to 0) |
| `shift` | in | 1 | move one bit this cycle |
| `msg_bit` | in | 1 | message bit, taken when `shift && msg_ready` |
| `msg_ready` | out | 1 | encoder is in the message phase |
| `code_bit` | out | 1 | code-word bit, valid whenever `shift` = 1, same cycle (no latency) |
| `code_first`, `code_last` | out | 1 | the current bit is the first / last of a word |
| `parity` | out | N−K | the register; holds the parity bits right after the K-th message shift |

Throughput is one bit per cycle with `shift` high: one 7-bit word every 7
cycles. `shift` low is an idle cycle and changes nothing.

## Where this RTL makes its own choices

- **Synchronous storage.** The flip-flop's state sits in an edge-triggered
  register, and the gate-level "CLK" is a load enable (see above).
- **Message bit order.** The highest-order message bit goes first, so the
  register computes p^(N−K)·m(p) mod G(p). The word is sent as c6 … c0 with
  c6..c3 = m3..m0.
- **Switch control.** A modulo-N counter drives the switches. It is ordinary
  logic.
- **Reset.** Everything resets to zero.
- **Generalisation.** Any generator polynomial works: g_i = 1 becomes a
  Feynman gate, g_i = 0 a wire. A polynomial whose degree is not N−K, or
  whose constant term is 0, is rejected at elaboration.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_feynman_gate`, `tb_double_feynman_gate`, `tb_sam_gate` | exhaustive truth tables against hand-written tables, the one-to-one property, the DFG fan-out use (B=1, C=0) and the SAM NOT/OR/AND use (C=0) |
| `tb_rev_dff` | random load/d against a reference bit; all four outputs; asynchronous reset |
| `tb_switch_sequencer` | random shift pattern against a position counter |
| `tb_cyclic_encoder` | datapath with directly driven switches for (7,4) with 1+p+p³ (all messages) and 1+p²+p³, and for (15,11) with 1+p+p⁴; compares against bitwise long division; registers hold during idle cycles and are empty after each word; gate count 8, constants 6, quantum cost 20 |
| `tb_cyclic_encoder_top` | the complete encoder at its default parameters; see below |

`tb_cyclic_encoder_top` does not model the encoder. It checks each word on
its own terms:

- The first 4 bits are the message.
- The 7-bit word is divisible by G(p).
- The first/last flags are right.
- `parity` matches the parity bits sent.

It also checks that the 16 code words form a cyclic code with minimum
distance 3, and that all 16 words take exactly 112 cycles back to back. It
runs 218 words, with random idle cycles and two resets in the middle of a
word.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rev_pkg.sv tb/tb_cyclic_encoder_top.sv \
          --top-module tb_cyclic_encoder_top -o sim
./obj_dir/sim
```

## Files

- `rtl/rev_pkg.sv`: gate quantum costs and the default code (N=7, K=4, `GEN_POLY = 4'b1011`).
- `rtl/feynman_gate.sv`, `rtl/double_feynman_gate.sv`, `rtl/sam_gate.sv`: the reversible gates.
- `rtl/rev_dff.sv`: SAM + DFG D flip-flop.
- `rtl/cyclic_encoder.sv`: the divider, the adders and the switches.
- `rtl/switch_sequencer.sv`: the switch timing.
- `rtl/cyclic_encoder_top.sv`: the complete encoder.
- `tb/enc_poly_check.sv`: parameterised driver and checker used by `tb_cyclic_encoder`.
