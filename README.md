# NS-gate multiply-accumulate unit

This is an 8-bit multiply-accumulate (MAC) unit. All of its arithmetic is
built from one kind of cell, the 4-input, 4-output **NS gate** (NSG), which
comes from reversible logic. On every enabled clock edge the unit multiplies
two 8-bit unsigned operands and adds the 16-bit product to a 16-bit running
sum. That sum is held in a parallel-in, parallel-out (PIPO) register. Each
partial-product AND and each full-adder cell in the multiplier and the
adders is one NS gate with some of its inputs tied to constants.

```
  A[7:0] B[7:0]
     \    /
    ns_mult8 ----16---> ns_rca (16 bit) --16--> pipo_reg --16--> acc (final output)
                           ^                        |
                           +----------- acc --------+
```

## The NS gate

`ns_gate` has inputs d, c, b, a (terminals 1 to 4) and outputs o1 to o4:

| output | function |
|---|---|
| o1 | b ⊕ c ⊕ d |
| o2 | ((a ⊕ b) ⊕ d)·c + b·(a ⊕ d) |
| o3 | (a'b'd' + abd) + (abc' + a'b'c) + (ac'd + a'cd') |
| o4 | a' |

Only two ways of using the gate are needed:

* **Full adder (a = 0).** o1 = b ⊕ c ⊕ d is the sum. o2 reduces to
  b·d + c·(b ⊕ d), which is the majority of b, c, d: the carry. So one gate
  with one constant input is a full adder, and o3 and o4 are garbage outputs.
* **AND (a = 0, d = 0).** o2 = b·c, and o1 = b ⊕ c. The same setting also
  serves as an XOR.

Reversible-logic cost measures count these constant inputs and garbage
outputs. In this RTL the garbage outputs are wired to local `*_unused`
vectors that drive nothing.

Note: taken literally, these four equations are not a bijection. They give
12 distinct output patterns over the 16 input patterns, whether `+` is read
as OR or as XOR. The RTL implements the equations exactly as listed. The
arithmetic uses only o1 and o2 with a = 0, and those are exact either way.

## The 8×8 multiplier (`ns_mult8`)

Split each operand into nibbles, A = {AH, AL} and B = {BH, BL}:

    A·B = (AH·BH)<<8 + (AH·BL + AL·BH)<<4 + AL·BL

Four 4×4 NS multipliers (`ns_mult4`) form q3 = AH·BH, q1 = AL·BH,
q2 = AH·BL and q0 = AL·BL, each 8 bits wide. Three 8-bit NS-gate
ripple-carry adders then assemble the product:

1. **Middle adder:** q1 + q2 gives s1 and carry c1.
2. **Low adder:** s1 + q0[7:4] gives s2 and carry c2. Product bits 7:4 are
   s2[3:0]. Product bits 3:0 are q0[3:0], which need no addition.
3. **High adder:** q3 + {c1/c2 at bit 4, s2[7:4]} gives product bits 15:8.

The one subtle point is the carry c2 of the low adder. A drawing of this
structure with only c1 going to the high adder would be wrong for 524 of the
65536 operand pairs, for example whenever s1 is close to 255 and q0's upper
nibble is large. c1 and c2 are never both 1: c1 = 1 means s1 ≤ 194, so
s1 + 15 < 256. One extra NS gate used as an XOR therefore merges them into
a single bit of weight 2^12. The exhaustive testbench counts these cases, and
it fails if that merge is removed.

`ns_mult4` is a plain array multiplier. Sixteen NS gates set up as AND gates
form the partial products. Three 4-bit NS ripple-carry adders sum them row
by row. After each row, the lowest sum bit is a product bit, and the rest of
the sum, with the carry on top, moves down to meet the next row.

## Accumulation, register and timing (`ns_mac`, `pipo_reg`)

The 16-bit adder is the same `ns_rca` at `WIDTH=16`. Its second operand is
the register output. The register (`pipo_reg`) loads all 16 bits in
parallel.

* The multiply and the add are combinational. The new sum is in `acc` one
  rising clock edge after `a`, `b` and `en` are presented. The critical path
  is the multiplier's carry chains followed by the 16-bit ripple carry.
* `en` high: accumulate. `en` low: hold.
* `clr` (synchronous, has priority over `en`) and `rst_n` (asynchronous,
  active low) both set the sum to zero.
* The sum wraps modulo 2^16. The adder's carry-out is not brought out.
* Operands are unsigned.

Ports of `ns_mac`: `clk`, `rst_n`, `clr`, `en`, `a[7:0]`, `b[7:0]`,
`product[15:0]` (the current a·b) and `acc[15:0]` (the running sum).

Example: start from reset and apply a = 51, b = 30 with `en` high for two
edges. `acc` reads 1530 after the first edge and 3060 after the second.

## Where this RTL makes its own choices

These points are this design's own choices, not part of the architecture it
implements:

* **Operand source.** The operands are meant to come from a memory, but that
  memory's size and addressing are not specified. So `a` and `b` are plain
  input ports.
* **Inside of the 4×4 multiplier.** It is only specified as a 4-bit
  multiplier made of NS gates. The array structure above is one simple way
  to build it.
* **Controls.** The clear, enable and reset, and their priorities, are
  chosen here.
* **The 16-bit adder.** It is specified as a 16-bit ripple-carry adder. This
  RTL builds it from NS gates like the other adders.
* **The c1/c2 carry merge** in `ns_mult8`, described above.
* **The register.** It is a PIPO register, not a shift register.
* **Signedness.** Unsigned arithmetic is assumed.

The widths of the RTL are those of the architecture: 8-bit operands, 16-bit
product, adder and register, and 8-bit adders inside the multiplier. Nothing
is scaled down. Only `ns_rca` and `pipo_reg` take a width parameter. The
shared widths are in `ns_pkg` (`OPERAND_W = 8`, `ACC_W = 16`). Changing
`OPERAND_W` alone is not enough, because `ns_mult8` is built for 8-bit
operands.

## Files

| file | contents |
|---|---|
| `rtl/ns_pkg.sv` | shared widths |
| `rtl/ns_gate.sv` | the NS gate |
| `rtl/ns_rca.sv` | WIDTH-bit ripple-carry adder, one NS gate per bit |
| `rtl/ns_mult4.sv` | 4×4 array multiplier of NS gates |
| `rtl/ns_mult8.sv` | 8×8 multiplier from four `ns_mult4` and three `ns_rca` |
| `rtl/pipo_reg.sv` | PIPO register with load, clear and reset |
| `rtl/ns_mac.sv` | top: multiplier, 16-bit adder, register with feedback |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs:

* `tb_ns_gate`: all 16 input patterns against a truth table worked out by
  hand, plus the full-adder and AND uses.
* `tb_ns_rca`: exhaustive at 8 bits (both operands and the carry-in), plus
  random and full-ripple cases at 16 bits.
* `tb_ns_mult4`: exhaustive, 256 pairs.
* `tb_ns_mult8`: exhaustive, 65536 pairs. It also counts the pairs that need
  the low adder's carry.
* `tb_pipo_reg`: random load and clear against a model, with asynchronous
  resets between clock edges.
* `tb_ns_mac`: the 51 × 30 example (1530, then 3060), then 6000 random
  cycles against a model accumulator. It checks the one-edge latency and
  the product output. It requires that accumulate, hold, clear, reset and
  16-bit wrap-around each happen at least once.

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wall -Wno-fatal rtl/ns_pkg.sv rtl/*.sv \
    tb/tb_ns_mac.sv --top-module tb_ns_mac -Mdir obj_tb_ns_mac
./obj_tb_ns_mac/Vtb_ns_mac
```

Each testbench finishes in well under a second.
