# Multiplexer-chain carry save adder

This is a 32-bit binary adder organised in two steps. First every bit
position forms the carry-save pair of the two operands at once: a half sum
`a ^ b` and a half carry `a & b`. Then a single carry travels from the least
significant bit upward, and at each position the half sum alone decides
what happens to it:

| half sum `a ^ b` | final sum bit | carry out        | meaning                        |
|------------------|---------------|------------------|--------------------------------|
| 0                | `cin`         | `a` (equal to `b`) | generate (a = b = 1) or kill (a = b = 0) |
| 1                | `!cin`        | `cin`            | propagate                      |

So each stage is one XOR followed by two 2:1 multiplexers, one choosing
between `cin` and `!cin` for the sum and one choosing between operand bit `a`
and the incoming carry for the carry out. That is the same function as a full
adder (sum = `a ^ b ^ cin`, carry = majority), reached with fewer gates per
bit than the usual sum-of-products carry.

## Worked example

`a = 1010`, `b = 1101`, carry in 0:

1. half sum: start from `b = 1101`, invert where `a` is 1 → `0111`
2. half carry: start from `b`, clear where `a` is 0 → `1000`
3. bit 0: half sum 1, carry in 0 → sum 1, carry out = carry in = 0
4. bits 1 and 2: half sum 1, carry 0 → sum 1, carry 0
5. bit 3: half sum 0, carry 0 → sum 0, carry out = `a[3]` = 1
6. result `1_0111` = 23 = 10 + 13

## Modules

| file                  | what it is |
|-----------------------|------------|
| `rtl/csa_pkg.sv`      | package; `CSA_WIDTH = 32`, the default operand width |
| `rtl/csa_bit_cell.sv` | one bit position: carry-save pair, then the two multiplexers |
| `rtl/csa_adder.sv`    | the top: `WIDTH` bit cells chained through their carries |

`csa_adder` ports (all combinational, no clock or reset):

| port       | dir | width   | meaning |
|------------|-----|---------|---------|
| `a`, `b`   | in  | `WIDTH` | operands |
| `cin`      | in  | 1       | carry into bit 0; tie to 0 for plain two-operand addition |
| `sum`      | out | `WIDTH` | sum bits |
| `cout`     | out | 1       | carry out of the top bit; `{cout, sum}` is the full result |
| `cs_sum`   | out | `WIDTH` | half sums `a ^ b` (carry-save sum) |
| `cs_carry` | out | `WIDTH` | half carries `a & b` (carry-save carry) |

`WIDTH` defaults to 32 and may be set to any positive value.

## Timing and size

The critical path runs from any operand bit through its XOR and then through
the carry multiplexer of every higher bit: one gate level plus `WIDTH`
multiplexer levels. There is no pipelining; register the inputs and outputs
around `csa_adder` if it sits in a clocked path. Coarse synthesis of the
32-bit adder gives 128 2:1 multiplexers and 64 inverters (the XORs fold into
multiplexers). On a Cyclone II FPGA a design of this form has been reported
at 75 logic elements and 8.17 ns, about 16 % smaller and 8.6 % faster than a
NAND/NOR-based carry save adder; those figures come from that FPGA flow and
are not reproduced here.

## Choices made in this RTL

- **Carry out when the carry in is 1.** The algorithm this adder follows
  starts its carry chain at 0, and one of its descriptions inverts the final
  carry out when the carry in is 1. That inversion gives wrong results
  (0 + 0 + 1 would carry out), so `cout` here is always the top bit's carry
  out, which is correct for both carry-in values and identical when `cin = 0`.
- **Carry-in port.** Offered so the adder can be chained or used for
  subtraction (`a + ~b + 1`); the basic configuration ties it to 0.
- **Carry source on the generate/kill branch.** The carry out there is taken
  from operand bit `a`. Since `a == b` on that branch it equals the half carry
  `a & b`; the half carry is still computed and brought out as `cs_carry`.
- **No registers.** The adder is a combinational block.

## Testbenches

| testbench                  | what it checks |
|----------------------------|----------------|
| `tb/tb_csa_bit_cell.sv`    | all 8 input combinations of one cell against the full adder truth table, plus the carry-save pair |
| `tb/tb_csa_adder.sv`       | the 32-bit default adder: worked example, corner cases (all ones, a carry rippling through all 32 bits), 20,000 random vectors with random carry in, against 64-bit arithmetic; counts generate, kill, propagate, carry-out, full-ripple and carry-in events and fails if any never occurs |
| `tb/tb_csa_adder_example.sv` | the adder at `WIDTH = 4`: the worked example step by step, then all 512 operand/carry combinations |

Each prints `TB_RESULT checks=N failures=M`. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_csa_adder rtl/csa_pkg.sv tb/tb_csa_adder.sv
./obj_dir/Vtb_csa_adder
```
