# Booth multiplier with parallel prefix adders

This is a 32 x 32 -> 64-bit two's complement multiplier. Its speed comes from two ideas:

- **Radix-4 modified Booth recoding.** The multiplier is recoded into 16 digits from
  {0, +1, -1, +2, -2}, so only 16 partial products are needed, not 32. Each one is a
  shifted or negated copy of the multiplicand, picked by a 5-to-1 multiplexer.
- **Parallel prefix adders.** The partial products are summed with adders whose carries
  come from a logarithmic-depth prefix tree rather than a ripple chain.

The module is `finite_field_mul_ppa`. Despite the name, it does ordinary integer
multiplication, not GF(2^m) arithmetic: 3 x 3 gives 9. The digit-serial GF(2^m)
polynomial-basis multiplier is the conventional design this one is usually compared with.
It is not included here.

## Datapath

```
 b ──► mbe_encoder ──► digit[0..15] (neg/two/one)
                            │
 a ──► pp_gen x16 ◄─────────┘      row i = sign-extend(pp_i) << 2i     (64 bits)
            │
            ▼
 s1 = row0 + row1 ──► s2 = s1 + row2 ──► ... ──► s15 = s14 + row15
        (ppa_adder, 64-bit, 15 in a chain)                 │
                                                           ▼
                                               output register ──► c[63:0]
```

| Module | Role |
|---|---|
| `ffm_pkg` | `booth_ctrl_t` (neg, two, one) and the multiplexer select enum |
| `mbe_encoder` | Cuts `b` into overlapping triplets and recodes each into a Booth digit |
| `pp_gen` | Product generator (0, M, -M, 2M, -2M) and the 5-to-1 multiplexer |
| `ppa_adder` | Kogge-Stone parallel prefix adder, `WIDTH` bits |
| `black_cell`, `gray_cell` | Prefix operators used inside `ppa_adder` |
| `finite_field_mul_ppa` | Top: encoder, 16 generators, 15 adders, output register |

### Booth recoding

Triplet *i* is `{b[2i+1], b[2i], b[2i-1]}`, with `b[-1] = 0`. Its digit is
`d_i = -2·b[2i+1] + b[2i] + b[2i-1]`, so `b = Σ d_i·4^i` when `b` is read as a signed
32-bit number. The 16 digits therefore cover the full signed range of `b`. There is no
seventeenth row, so `b` cannot be treated as unsigned.

Each digit is sent to its row as three control bits:

- `one`: select M.
- `two`: select 2M.
- `neg`: negate the selected multiple.

The triplet `111` (digit 0) is encoded with `neg` clear, so a zero digit always has an
all-zero control word.

### Partial products

`pp_gen` works at N+2 = 34 bits. This is the smallest width that holds ±2M for any signed
32-bit M.

- -M is formed as `~M + 1`.
- +2M is M shifted left one place.
- -2M is -M shifted left one place.

The top sign-extends each row to 64 bits and weights row *i* by 4^i (a left shift by 2i).
No sign-extension tricks are used. Every row is simply a full 64-bit signed value, and
the final sum modulo 2^64 is the exact product.

### Parallel prefix adder

`ppa_adder` has three stages:

1. **Pre-processing:** `p_i = a_i ^ b_i` and `g_i = a_i & b_i`.
2. **Carry generation:** `ceil(log2 WIDTH)` levels; 6 levels for 64 bits. At level *l*,
   bit *i* merges its group with the group ending at bit *i − 2^l*. Two cell types do this:
   - A **black cell** forms `G = G_hi | P_hi & G_lo` and `P = P_hi & P_lo`.
   - A **gray cell** forms only G. It is used where the merged group reaches bit 0, so G
     is already the final carry out of bit *i*.

   Bits below 2^l pass through unchanged.
3. **Post-processing:** `s_i = p_i ^ c_(i-1)`.

The adder has no carry input. `cout` is brought out, but the top does not use it, because
the product is taken modulo 2^64.

### Summation order and timing

The rows are added one after another. The running sums `s1 … s15` are internal signals of
the top (`s[1] … s[15]`), so they can be watched in a waveform. For 3 x 3:

- the two rows are −3 and +12;
- `s1` is already 9;
- every later running sum stays 9.

The whole datapath is combinational, followed by one 64-bit register clocked by `clk`.
Operands applied before a rising edge produce their product on `c` after that edge. The
latency is one cycle, and a new pair can be applied every cycle. There is no reset, valid
or handshake. Until the first clock edge, `c` holds whatever the register powers up with.

## Departures and choices to be aware of

These points are this design's own choices:

- **Signed arithmetic.** The operands and the product are two's complement.
- **Prefix topology.** Only a prefix tree is specified. Kogge-Stone was chosen: fastest,
  and the largest in area.
- **Sum equation.** The sum is `p_i XOR c_(i-1)`.
- **Adder chain.** The partial products go through a linear chain of 15 adders. The
  critical path therefore crosses 15 prefix adders in series, each of logarithmic depth. This
  matches the way the running sums are defined, but it is not the fastest arrangement: a
  Wallace or Dadda tree of carry-save adders followed by one prefix adder would be much
  shorter. To make that change, replace the `g_sum` loop in the top.
- **No carry output.** The RTL symbol this design follows also shows a 64-bit output
  `outputcout`. That output carried no defined value, so it is not provided.
- **One output register.** The register stage is a minimal reading of the `clk` port.

## Parameters

| Module | Parameter | Default | Constraint |
|---|---|---|---|
| `finite_field_mul_ppa` | `N` | 32 | even, ≥ 4; product is 2N bits |
| `mbe_encoder`, `pp_gen` | `N` | 32 | even |
| `ppa_adder` | `WIDTH` | 64 | any ≥ 1, powers of two not required |

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

- `tb_mbe_encoder`: checks every digit against the triplet formula, and checks that the
  digits rebuild the signed multiplier. Runs with random and corner values at N = 32, and
  exhaustively at N = 8.
- `tb_pp_gen`: checks all five multiples against 64-bit reference arithmetic, for random
  and corner multiplicands.
- `tb_ppa_adder`: runs a 64-bit adder with corner cases (full carry ripple, one carry per
  bit position) and random operands. Also sweeps a 13-bit instance so the ragged top of a
  non-power-of-two tree gets exercised.
- `tb_finite_field_mul_ppa`: end to end at the default size:
  - starts with 3 x 3 = 9;
  - runs all pairs of 8 corner operands, including −2^31 x −2^31;
  - then 3000 random pairs and 500 small signed pairs, one new pair per clock;
  - checks the product and the one-cycle latency for each pair;
  - checks that the product does not appear before the clock edge;
  - counts how often each Booth digit value, negative and positive products, and
    back-to-back issue occur, and fails if any never occurs.

To run one with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ffm_pkg.sv \
    tb/tb_finite_field_mul_ppa.sv --top-module tb_finite_field_mul_ppa
./obj_dir/Vtb_finite_field_mul_ppa
```

The other testbenches are built the same way. Verilator finds the sub-modules in `rtl/` by
file name. All four testbenches pass. For each one, a copy of its module was broken in one
specific way to confirm the testbench catches it; all four faults were caught:

| Testbench | Fault introduced |
|---|---|
| `tb_mbe_encoder` | a lost −2 digit |
| `tb_pp_gen` | −2M missing its +1 |
| `tb_ppa_adder` | a miswired black cell |
| `tb_finite_field_mul_ppa` | zero- instead of sign-extended rows |

Timing and area have not been measured on any target.
