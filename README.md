# 15:4 compressor

A compressor reduces one column of partial-product bits in a multiplier.
It takes many bits of equal weight and returns a few bits of increasing
weight. This design takes fifteen bits and reduces them in three stages:

1. **Five full adders** each take three of the inputs. Together they turn
   the fifteen bits into five *sums*, each of weight 1, and five *carries*,
   each of weight 2.
2. **Two 5:3 compressors** each reduce five bits to three. One reduces the
   five sums, giving `a[2:0]`. The other reduces the five carries, giving
   `b[2:0]`, which keeps the weight of 2.
3. **A 4-bit parallel adder** lines the two results up by weight and adds
   them. The carry-in of this adder is tied to 1:

```
        0   a2  a1  a0         (sum side, weight 1)
   +   b2   b1  b0   0         (carry side, weight 2)
   +                 1         (carry-in tied high)
   ---------------------
 carry  s3  s2  s1  s0
```

All of it is combinational. There is no clock, reset or handshake. The
longest path runs through one full adder, one 5:3 compressor and the four
ripple cells of the final adder.

## What the circuit actually computes

The result is **not** the number of ones on the fifteen inputs. There are
two reasons. They come from the specified circuit and are kept deliberately,
so read this section before using the block as a counter.

### The 5:3 compressor's gate network

`compressor_5_3` implements this gate network:

```
o0 = x0 ^ x1 ^ x2 ^ x3 ^ x4          five-input XOR
p  = x0 ^ x1
m  = (x0 & ~p) | (x2 & p)            mux: x0 if x0 == x1, else x2
o1 = x4 ^ m
o2 = x4 & m
```

`m` is the majority of `x0, x1, x2`, which is the carry of a full adder,
written as a 2:1 multiplexer. `o1` and `o2` form a half adder of that carry
with `x4`.

- `o0` is always correct: it is the parity of the five inputs.
- `x3` reaches only `o0`.
- The sum bit of `x0..x2` is dropped from the upper outputs.

So `{o2,o1,o0}` equals the true count of ones for only 24 of the 32 input
patterns. For example, `x0 = x3 = 1` gives `000` instead of `010`. The
largest value the block can produce is 5 (`101`). `o1` and `o2` are never
both 1.

The assignment of outputs to weights is a reading of the original design.
The XOR drives `o1` (weight 2) and the AND drives `o2` (weight 4), as in a
half adder. Swapping them gives a worse counter: the swapped network matches the true count on only 9 of the 32 patterns.

### The carry-in tied to 1

The schematic ties the final adder's carry-in to the supply. The output is
therefore

```
{carry, s} = a + 2*b + 1
```

Consequences:

- An all-zero input gives 1.
- An all-ones input gives 16 (`carry = 1`, `s = 0000`). In general the
  carry output is set only when both 5:3 compressors return 5, so that
  the sum reaches 16. This happens on 112 of the 32768 input patterns.
- `s[0]` is always the complement of the parity of the fifteen inputs.

Over all 2^15 inputs, the output minus the true count of ones is distributed
like this:

| output − popcount | −5  | −3   | −1   | +1    | +3   | +5   | +7  |
|-------------------|-----|------|------|-------|------|------|-----|
| input patterns    | 112 | 2688 | 3984 | 19200 | 3984 | 2688 | 112 |

If the carry-in were tied to 0, 19200 of the 32768 patterns (58.6 %) would
give the exact count. The other inputs would still be off by the error of
the 5:3 network. To get an exact 15:4 counter, both of these would need to
change:

- replace the upper outputs of `compressor_5_3` with a true 5:3 count
  (`o1`/`o2` from the carries of two chained full adders);
- tie `cin` to 0 in `compressor_15_4`.

## Wiring chosen where the schematic is not explicit

- **First stage.** Full adder *k* takes `i[3k]`, `i[3k+1]` and `i[3k+2]`.
- **Second stage.** Full adder *k* drives input `x[k]` of its 5:3
  compressor, on both the sum side and the carry side. The 5:3 network is
  not symmetric, so this routing affects the result:
  - inputs 0–2 go through the majority mux;
  - input 3 goes to parity only;
  - input 4 goes to the half adder.
- **Sums and carries.** The sums feed the unshifted operand and the carries
  feed the shifted operand. This follows their weights.
- **Unused adder bits.** The two free adder bits (`a3`, `b0`) are tied to 0.

## Modules

| module             | role | interface |
|--------------------|------|-----------|
| `full_adder`       | 3:2 counter, `sum = a^b^c`, `carry = maj(a,b,c)` | `a, b, c` → `sum, carry` |
| `compressor_5_3`   | the 5:3 network above | `x[4:0]` → `o0, o1, o2` |
| `parallel_adder_4` | ripple-carry adder of `full_adder` cells, `WIDTH` bits (default 4) | `a, b [WIDTH-1:0], cin` → `s [WIDTH-1:0], carry` |
| `compressor_15_4`  | top: five `full_adder`, two `compressor_5_3`, one `parallel_adder_4` | `i[14:0]` → `s[3:0], carry` |

The top has no parameters. `parallel_adder_4` has a `WIDTH` parameter; the
top uses 4 bits.

The original design was evaluated against conventional 8:4 and 9:4
compressors. Those reference circuits are not part of this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench compares
its module against values computed independently: integer arithmetic and
`$countones`, not a copy of the gates. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench             | coverage |
|-----------------------|----------|
| `tb_full_adder`       | all 8 input patterns |
| `tb_compressor_5_3`   | all 32 patterns against the equations above, plus hand-worked vectors; also reports how many patterns match the true count (24) |
| `tb_parallel_adder_4` | all 512 patterns of the 4-bit adder; 500 random patterns of an 8-bit instance |
| `tb_compressor_15_4`  | end to end, all 32768 input patterns (see below) |

`tb_compressor_15_4` checks that `{carry, s} = a + 2b + 1` for every input.
The reference rebuilds each stage arithmetically. The testbench also checks
that `s[0]` is the inverted parity and that all ones give `1_0000`. It
requires each of these to occur at least once:

- a carry out of the final adder;
- the weight-4 output of each 5:3 compressor;
- an odd input count.

It prints how often the output equals the popcount, which is 0 with the
carry-in tied high.

Simulate any of them with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_compressor_15_4 \
    tb/tb_compressor_15_4.sv -Mdir obj_tb
./obj_tb/Vtb_compressor_15_4
```

Replace the name to run another testbench. Each run takes well under a
second. Lint a module with `verilator --lint-only -Wall -Irtl rtl/<module>.sv`.

## Limits of trust

- The gate network of the 5:3 compressor, the stage structure and the
  tied-off adder inputs follow the original design. Everything listed under
  "Wiring chosen where the schematic is not explicit" is a reading of it.
- The full-adder and parallel-adder internals are standard textbook forms
  (XOR/majority and ripple carry). The original gives their function only.
- The original design was characterised at transistor level: power and delay
  in 130 nm static CMOS at supplies of 1–5 V. None of that carries over to
  this RTL, which models logic only.
