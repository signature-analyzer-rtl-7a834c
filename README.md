# 4-bit signature analyzer

A signature analyzer checks a serial bit stream without storing it. The stream
is pushed through a short shift register with XOR feedback. What is left in the
register at the end is the stream's *signature*. A good stream always leaves
the same signature. A stream with an error almost always leaves a different one.
A test can then compare one 4-bit word with a known value instead of comparing
every bit.

This design builds the analyzer on a general-purpose 4-bit shift register. The
register can load four bits in parallel, shift left or shift right. The
signature comes from shifting right with feedback:

    Qd+ = (Qa XOR Qb) XOR PROBE
    Qc+ = Qd
    Qb+ = Qc
    Qa+ = Qb

Qd is the most significant bit and Qa the least. PROBE is the stream under
test, one bit per clock. A signature is taken over 10 clocks, starting from
0000.

## Using it

All inputs are sampled on the rising edge of `CLK`, and `Qa..Qd` change right
after that edge.

| LOAD | DIR | next state                                   |
|------|-----|----------------------------------------------|
| 0    | x   | `Qd Qc Qb Qa <= Pd Pc Pb Pa` (parallel load) |
| 1    | 1   | signature step: shift towards Qa, feedback into Qd |
| 1    | 0   | shift towards Qd, `dummy` enters Qa          |

To take a signature:

1. Set `LOAD = 0` and `Pa..Pd = 0`, then clock once. The register now holds 0000.
2. Set `LOAD = 1` and `DIR = 1`. Apply the 10 stream bits on `PROBE`, one per clock.
3. Read `Qd Qc Qb Qa`.

The register has no reset. Its first defined state comes from a parallel load.

Reference streams and signatures (first bit applied first):

| PROBE stream | signature Qd Qc Qb Qa |
|--------------|-----------------------|
| 1010101010   | 0011 |
| 1100110011   | 0001 |
| 1111000011   | 0101 |
| 1111111100   | 1000 |

## Why a single wrong bit is always caught

The feedback polynomial is x^4 + x + 1, which is primitive. Started from a
non-zero state, the register runs through all 15 non-zero states before
repeating. The register is linear. So the signature of a stream with errors is
the good signature XOR the signature of the error pattern alone.

A single flipped bit loads 1000 into the error register at that clock. A
non-zero state never becomes zero, because each step can be inverted. The error
signature is therefore never zero, and every single-bit error changes the
signature. Errors affecting several bits can cancel. For random errors this
happens with a probability of about 1 in 16.

The end-to-end testbench checks this directly. It flips each bit of ten random
streams in turn and requires a different signature each time.

## Structure

```
signature_analyzer
├── sig_feedback    two XOR gates: fb = (Qa ^ Qb) ^ PROBE
└── shift_register  WIDTH = 4
    └── per bit: mux2 (direction) -> mux2 (load) -> dff
```

- **`shift_register`** is the universal register. Each bit has two 2:1 muxes
  in front of its flip-flop, eight muxes in all. The first mux, steered by
  `dir`, picks a neighbour: the bit above when shifting right, or the bit
  below when shifting left. The second mux, steered by `load`, picks either
  that neighbour or the parallel input. The flip-flop outputs are the parallel
  output.
- **Serial inputs.** The two end bits have no neighbour on one side and take a
  serial input instead. `ser_right` enters the top bit. `ser_left` enters
  bit 0.
- **Signature wiring.** `signature_analyzer` ties `ser_right` to the feedback
  bit and `ser_left` to `dummy`. That turns the right shift into the signature
  step.
- **`dff`** is a rising-edge D flip-flop. It has asynchronous active-low clear
  and preset pins (`clrn`, `prn`). If both are low, clear wins. The register
  ties both pins inactive.
- **`sig_pkg`** holds the width (4) and the signature length (10). It also
  holds enums naming the `DIR` and `LOAD` encodings.
- **Assertion.** `signature_analyzer` has a concurrent assertion. In signature
  mode, the next state must equal the feedback bit followed by the old Qd..Qb.

## What follows the original design and what does not

These parts come from the original design:

- the feedback equation
- the 10-cycle signature starting from 0000
- the 4-bit width
- two muxes per flip-flop, with the flip-flops as the parallel outputs
- two XOR gates
- the port names
- the four reference streams with their full next-state sequences

Choices made here:

- **`DIR` and `LOAD` polarity.** In the original waveforms, both inputs are
  high while the analyzer runs. So here `DIR = 1` means signature mode and
  `LOAD = 1` means shift.
- **Left-shift serial input.** The original diagram shows an input named
  `dummy` at the mux next to Qa. Here it is the serial input for left shifts.
- **Mux select.** `s = 0` selects input `a`.
- **Flip-flops.** They trigger on the rising edge. Their clear and preset pins
  are asynchronous and active low, and are tied off.
- **No reset.** None is added.
- **Parameters.** `shift_register` has a `WIDTH` parameter, and `mux2` has a
  data width parameter `W`. The feedback taps in `signature_analyzer` are fixed
  for 4 bits.

The original design has no timing figures beyond one shift or load per clock.
None are imposed here.

## Simulation

Every file starts with a comment on what it does. The testbenches in `tb/` check
themselves. Each prints `TB_RESULT checks=N failures=M`, and `failures=0` means
pass. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/sig_pkg.sv tb/tb_signature_analyzer.sv --top-module tb_signature_analyzer
./obj_dir/Vtb_signature_analyzer
```

| testbench | what it checks |
|-----------|----------------|
| `tb_signature_analyzer` | The four reference streams, state by state after every clock, with the signature after exactly 10 clocks. Also 50 random streams against a reference model, single-bit error detection, and random parallel loads and left shifts with switches into signature mode. It counts each mechanism and fails if one never ran. It uses the top at its default size. |
| `tb_shift_register` | 400 random load and shift cycles on a 4-bit and an 8-bit register, against a reference model |
| `tb_sig_feedback`  | all 8 input combinations |
| `tb_mux2`          | all combinations at 1 bit, plus random vectors at 5 bits |
| `tb_dff`           | capture and hold over 100 cycles; asynchronous clear, preset and their priority |

Yosys cannot synthesize `dff`, and so none of the modules above it. Its
front end does not support a flip-flop with both an asynchronous clear and an
asynchronous preset. Verilator and the slang front end accept it. The whole
design is eight 2:1 muxes, two XOR gates and four flip-flops.
