# NAT bus codec: crosstalk avoidance without a codebook

On a long on-chip bus, the slowest transition happens when two neighbouring
wires switch in opposite directions in the same cycle: the coupling
capacitance between them is then charged twice over (the Miller effect). A
crosstalk-avoidance code removes that case by spending a few extra wires. This
RTL implements the **NAT code**, in which neighbouring lines never switch
together. It carries 14 data bits on 20 wires, where 14 wires would be needed
without the code.

Codecs for codes like this are usually built from an enumerated codebook, a
truth table that maps every data word to its codeword. That table grows
exponentially with the bus width and becomes impossible to synthesize for wide
buses. This design never lists a codeword. It computes the codeword one bit at
a time with a chain of small compare-and-subtract blocks, one per bus line. The
decoder is a matching chain of adders. Hardware grows about linearly with the
bus width. The codec is fully pipelined and takes one word per clock in each
direction.

## The code

NAT is a *transition* code. Code bit `C(k) = 1` means "bus line k toggles this
cycle" and `C(k) = 0` means "line k keeps its level". A codeword is valid when
it has **no two adjacent 1s**, so no two neighbouring lines ever switch in the
same cycle. Opposite transitions on neighbours therefore cannot happen.

The valid n-bit words can be counted recursively:

- Prefixing a 0 to any valid (n-1)-bit word gives a valid word.
- Prefixing a 1 is allowed only when the (n-1)-bit word starts with 0.

Group the n-bit words by their top bit. The class `(0,n)` holds the words
starting with 0 and `(1,n)` the words starting with 1. Their sizes are
Fibonacci numbers, with `Fb(1) = Fb(2) = 1`, `Fb(3) = 2`, `Fb(4) = 3`,
`Fb(5) = 5`:

| set | size |
|---|---|
| all valid n-bit words | `Fb(n+2)` |
| `(0,n)`: top bit 0 | `Fb(n+1)` |
| `(1,n)`: top bit 1 | `Fb(n)` |

The codewords are listed in order, class `(0,n)` first and then `(1,n)`, and
data word `x` is mapped to the x-th codeword. The 4-bit case shows the order:

| data | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| codeword `C4..C1` | 0000 | 0001 | 0010 | 0100 | 0101 | 1000 | 1001 | 1010 |

Under this order, code bit `C(k)` has the weight `Fb(k+1)` and the data word is
the sum of the weights of the set bits. For example `6 = 5 + 1` gives `1001`.
In other words, the codeword is the Zeckendorf representation of the data: the
unique way of writing a number as a sum of distinct Fibonacci numbers, no two
of them consecutive.

A D-bit data word needs the smallest n with `Fb(n+2) >= 2^D` lines.
`nat_pkg::nat_code_bits(D)` computes this n, and it is the default for `N`:

| D (data bits) | 3 | 4 | 8 | 10 | 12 | **14** | 16 | 20 | 24 | 32 | 48 | 56 | 64 | 72 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| N (bus lines) | 4 | 6 | 12 | 15 | 17 | **20** | 23 | 29 | 35 | 46 | 69 | 81 | 92 | 104 |

Some codewords in `(1,n)` may be left over, because `Fb(n+2)` is usually
larger than `2^D`. The encoder never produces them.

## How the encoder finds the codeword

The encoder decides the bits from the top down. Consider the residual data
`Di` that reaches the block for bit k:

- If `Di < Fb(k+1)`, the word lies in class `(0,k)`. That class starts at
  offset 0, so `C(k) = 0` and the residual passes on unchanged.
- Otherwise the word lies in `(1,k)`, which starts at offset `Fb(k+1)`. Then
  `C(k) = 1`, and `Fb(k+1)` is subtracted to rebase the residual onto the
  parent class `(0,k-1)`, which starts at 0.

This is block `E(k)`, `rtl/nat_enc_stage.sv`:

```
if (Di >= Fb(k+1))  C(k) = 1, Do = Di - Fb(k+1)
else                C(k) = 0, Do = Di
```

`nat_encoder` chains `E(N), E(N-1), ..., E(2)`. After `E(2)` the residual is
always 0 or 1, and it *is* `C(1)`, so there is no `E(1)` block. All the
constants `Fb(k+1)` are computed at elaboration by `nat_pkg::fib`, using
128-bit arithmetic so that data widths up to 127 bits work.

Worked example, 3 data bits on 4 lines, data 6:

1. `E(4)`: 6 ≥ 5, so `C4 = 1` and the residual becomes 1.
2. `E(3)`: 1 < 3, so `C3 = 0`.
3. `E(2)`: 1 < 2, so `C2 = 0`.
4. The residual 1 is `C1`.

The codeword is `1001`: only the two outer lines toggle.

## How the decoder recovers the data

The data word is `sum over k of C(k) * Fb(k+1)`. `C(1)` has weight 1 and starts
the sum. Blocks `D(2) ... D(N)` (`rtl/nat_dec_stage.sv`) then each add
`Fb(k+1)` when their bit is set. The order of the additions does not matter.
This design adds from the lowest bit upward. Sums are kept to D bits. A
leftover codeword that the encoder never sends would wrap silently, and there
is no error flag.

## Transition layer

`transition_encoder` keeps the present level of every line in a register. For
each codeword it drives `levels ^ code`.

`transition_decoder` keeps the last levels it received. For each new word it
outputs `received ^ last` and then stores `received`.

Both registers start at `INIT_STATE` after reset. The default is all zeros, and
both ends of a link must use the same value. The worked example uses `1100`:
codeword `1001` takes the lines from `1100` to `0101`.

Data 0 encodes to codeword `0000`, which moves no wire. The receiver therefore
cannot see from the wires alone that a word was sent. For this reason the link
carries a one-bit strobe next to the data lines:

- `bus_out_strobe` is high for one clock whenever `bus_out` takes a new word.
- `bus_in_strobe` tells the receiver that `bus_in` holds a new word.

The strobe is an addition of this design. A link that sends a word in every
cycle could tie it high.

## Pipeline and timing

Every function block (each `E(k)`, each `D(k)`, and both transition registers)
ends in a register. There is no stall and no back-pressure. One word can enter
every clock, and idle cycles are marked by the valid bits that travel with the
data.

- **Encoder alignment.** Code bits decided early travel down the encoder next
  to the residual, so all N bits of a word leave in the same cycle.
- **Decoder alignment.** The codeword travels down the decoder next to the
  running sum.

These alignment registers make up about half of the flip-flops; the other
half hold the D-bit residuals and sums. At the default size the whole codec has 1148 flip-flop bits. The
arithmetic is one comparator and one subtractor per encoder block and one
adder per decoder block, all D bits wide.

| path | latency (clocks) |
|---|---|
| `tx_data` → `nat_encoder` → codeword | N − 1 |
| codeword → `bus_out` | 1 |
| `bus_in` → codeword | 1 |
| codeword → `nat_decoder` → `rx_data` | N − 1 |
| `tx_data` → `rx_data`, looped back | 2N (40 at the default) |

All registers use a synchronous, active-low reset (`rst_n`). Reset clears
every valid bit and sets the line registers to `INIT_STATE`.

## Modules

| file | role |
|---|---|
| `rtl/nat_pkg.sv` | `fib(k)` and `nat_code_bits(D)` at elaboration time |
| `rtl/nat_enc_stage.sv` | `E(k)`: compare with `Fb(k+1)`, subtract, register |
| `rtl/nat_encoder.sv` | chain `E(N)..E(2)` plus bit alignment; D bits in, N-bit codeword out |
| `rtl/transition_encoder.sv` | line-level register, XOR with the codeword, strobe |
| `rtl/transition_decoder.sv` | last-level register, XOR with the received lines |
| `rtl/nat_dec_stage.sv` | `D(k)`: add `Fb(k+1)` when `C(k)` is set, register |
| `rtl/nat_decoder.sv` | chain `D(2)..D(N)` plus codeword delay; N bits in, D bits out |
| `rtl/nat_codec_top.sv` | transmit and receive sides; the wires are outside |

`nat_codec_top` has the parameters `D` (default 14), `N` (default
`nat_code_bits(D)`, which is 20) and `INIT_STATE` (default 0). Its ports:

- `clk`, `rst_n`
- transmit side: `tx_valid`, `tx_data[D-1:0]` in; `bus_out[N-1:0]`,
  `bus_out_strobe` out
- receive side: `bus_in[N-1:0]`, `bus_in_strobe` in; `rx_valid`,
  `rx_data[D-1:0]` out

Transmit and receive are independent, so one instance can serve each end of a
link. An assertion in the top checks that no two adjacent lines of `bus_out`
switch in the same cycle. `nat_encoder` also asserts at start-up that `N`
lines can carry `D` bits.

To change the width, set `D` alone and `N` follows. A larger `N` also works: it
just leaves more codewords unused.

## Verification

Each testbench checks itself, prints `TB_RESULT checks=<n> failures=<n>`, and
has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_nat_enc_stage`, `tb_nat_dec_stage` | one block at k = 20 (weight 10946) and at the small example's k, random and boundary inputs |
| `tb_nat_encoder` | 3 bits: the full 8-word mapping above. 14 bits: thousands of random words, each codeword checked by its defining properties (no adjacent 1s; the weights add up to the data). Latency N − 1. |
| `tb_nat_decoder` | random valid codewords built by the testbench, the 8 example codewords, latency N − 1 |
| `tb_transition_encoder`, `tb_transition_decoder` | the `1100` / `1001` / `0101` example; a reference model of the line levels; idle cycles |
| `tb_nat_codec_top` | default size (14 bits on 20 lines), looped back. Checks the wires and the received data, 2N latency, and counts the cases exercised: top code bit set, all-zero codeword, largest word, back-to-back words, idle cycles |
| `tb_nat_codec_widths` | the looped-back codec at D = 3, 4, 8, 10, 12, 14, 16, 20, 24, 32, 48, 56, 64, 72, each at the N from the table above |

Weights in the testbenches are computed or written out independently of
`nat_pkg`.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/nat_pkg.sv \
    tb/tb_nat_codec_top.sv --top-module tb_nat_codec_top
./obj_dir/Vtb_nat_codec_top
```

Replace the testbench name to run another. `tb_nat_codec_widths` needs the
helper `tb/nat_link_check.sv`, which `-y tb` finds. Every testbench finishes in
well under a second.

## What follows the published scheme and what is this design's own

These parts follow the published scheme:

- the code
- the order of the codewords
- the class-based compare-and-subtract encoder
- the dropped `E(1)` block
- the adder decoder
- the XOR transition layer with an initial-state register
- one register per function block
- the 14-bit / 20-line main configuration

These parts are this design's own choices:

- the valid bits and the bus strobe
- the registers that align code bits along the pipelines
- the synchronous active-low reset
- `INIT_STATE = 0` as the default
- D-bit wrap-around for codewords that are never sent
- the assertions

Not included:

- **Wires.** The wires and their electrical behaviour are not modelled.
- **Weight-limited variant.** No version caps the number of 1s in a codeword
  below ⌈n/2⌉.
- **Other codes.** No codec is given for other crosstalk-avoidance codes, such
  as the OTEE and SEE codes, that the same method can handle.
