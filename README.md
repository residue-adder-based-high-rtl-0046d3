# Nikhilam multiplier with a residue-number-system adder

This design is an unsigned 8 × 8 → 16-bit combinational multiplier built on the Nikhilam
rule of Vedic arithmetic. Each operand is replaced by its distance from the base 2^8. The
product of these two small complements gives the low byte of the result directly. The high
byte comes from a three-operand addition, which is done in a residue number system (RNS)
so that no carry has to ripple across a wide binary adder. The moduli are 5, 11 and 14.

## The arithmetic

Let B = 2^N = 256, with complements a = B − x and b = B − y. Then

    x·y = (B − a)(B − b) = B·(B − a − b) + a·b
        = B·(x + y + ⌊a·b / B⌋ − B) + (a·b mod B)

In words:

- **Right part (low byte)** = `a·b mod 256`, the low byte of the complement product.
- **Left part (high byte)** = `x − b` plus the carry `⌊a·b/256⌋`. Written with the three
  operands the hardware adds, this is `S − 256` with `S = x + y + ⌊a·b/256⌋`.

`S` is always `256 + ⌊x·y/256⌋`, so it lies in 256..510. Removing the base is therefore the
same as keeping `S[7:0]`. The result is `res = {S[7:0], (a·b)[7:0]}`.

Worked example, 200 × 150:

- a = 56, b = 106, and a·b = 5936 = 23·256 + 48, so the carry is 23 and the right part is 48.
- S = 200 + 150 + 23 = 373, so the left part is 373 − 256 = 117.
- The result is 117·256 + 48 = 30000.

## Datapath

```
 x ──┬──────────────► bin2res (W=8) ──────────────┐
     └─► complementer ─┐                          │
 y ──┬──────────────► bin2res (W=8) ────────────┐ │
     └─► complementer ─┤                        ▼ ▼
                       ▼                    residue_adder ─► res2bin ─► S[7:0] = left part
               comp_multiplier ─ hi ─► bin2res (W=9) ─┘
                       └────────────── lo ─────────────────────────────► right part
```

| module            | role |
|-------------------|------|
| `vedicmul`        | Top level. Ports are `x[7:0]`, `y[7:0]` and `res[15:0]`. |
| `complementer`    | Computes `c = 2^N − x`. It is N+1 bits wide, so that x = 0 gives 256. |
| `comp_multiplier` | Computes `a·b`. Output `lo` holds the low N bits and `hi` holds `a·b >> N` (N+1 bits). |
| `bin2res`         | Converts binary to the residues (r5, r11, r14). |
| `residue_adder`   | Computes `(a+b+c) mod m` in each channel. Channels are independent. |
| `res2bin`         | Converts residues back to binary by the Chinese Remainder Theorem (CRT). |
| `mod_reduce`      | Helper that reduces a bounded value by repeated conditional subtraction of a constant modulus. |
| `rns_pkg`         | Holds the moduli, the `rns_t` struct and the constant functions that fill the tables. |

There is no clock and no reset anywhere. The design is one combinational path from `x`, `y`
to `res`.

## The residue number system

The moduli 5, 11 and 14 are pairwise coprime. Their product M = 770 is the dynamic range:
every integer 0..769 has a unique residue triple. The residue adder's largest possible
input sum is 255 + 255 + 256 = 766, which fits. A residue takes 3, 4 and 4 bits, carried
together as the packed struct `rns_pkg::rns_t {r5, r11, r14}`.

**Binary to residue.** For each modulus, a table holds `2^k mod m` for every input bit k.
The table entries selected by the set bits of the input are added. The sum, at most
W·(m−1), is then reduced by subtracting m until it is below m. The tables are computed at
elaboration by `rns_pkg::pow2_mod`. The converter for the carry part of the complement
product is 9 bits wide, because that value reaches 256 when x = y = 0.

**Residue adder.** Each channel adds three residues, giving at most 3(m−1). It brings the
sum back into range with two conditional subtractions. No signal crosses between channels.

**Residue to binary (CRT).** The position weights are s_i = M/m_i = 154, 70 and 55. Their
inverses are 4 (mod 5), 3 (mod 11) and 13 (mod 14). For residue r of modulus m_i, a table
of m_i entries (30 in all) holds the complete term `s_i·((r·s_i⁻¹) mod m_i)`. The three
selected terms are added and reduced modulo 770 with two conditional subtractions. The
tables come from `rns_pkg::crt_term`. Yosys keeps them as small ROMs of 400 bits in total.

For the example above, S = 373 has residues (3, 10, 9). The CRT terms are 308 + 560 + 275
= 1143, and 1143 − 770 = 373.

## Departures and choices

- **Complement width.** The complements are described as 8 bits wide. Here they are 9 bits,
  because the complement of 0 is the full base 256. With an 8-bit complement, 0 × y would
  come out as 256·y. The ninth bit is set only for a zero operand. As a result, the
  complement multiplier is 9 × 9 and its carry part is 9 bits.
- **Modulus reduction.** The described implementation computes each remainder with a small
  state machine that subtracts the modulus until the remainder is reached. This multiplier
  is specified by a single combinational delay and has no clock. The repeated subtraction is
  therefore unrolled into a chain of compare-and-subtract stages (`mod_reduce`). No clocked
  variant is provided.
- **Left part.** The three-operand sum `S` is built as described. The base 256 is removed by
  taking `S[7:0]`. An immediate assertion in `vedicmul` checks that the bits above are
  exactly `01`.
- **Inner structure not specified.** The complement multiplier and the residue adder are
  specified by function only. The multiplier is the `*` operator; the adder is one small
  adder and reducer per channel.
- **Size.** `N` defaults to 8. The moduli are fixed in `rns_pkg` and only cover N = 8: a
  larger `N` stops elaboration with an error. Widening the multiplier (for example to 16
  bits) needs a new moduli set with M > 3·(2^N − 1) + 1, placed in `rns_pkg` together with
  the struct field widths.
- **Timing.** The reference implementation reported a delay of about 15.9 ns on a
  Spartan-3 XC3S50, against 19.9 ns for a carry-save-adder version. This RTL has not been
  timed on that part.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench            | what it covers |
|----------------------|----------------|
| `tb_complementer`    | All 256 operands. |
| `tb_comp_multiplier` | All 256 × 256 complement pairs (1..256). |
| `tb_bin2res`         | All inputs of the 8-bit and the 9-bit converter, checked against `%`. |
| `tb_residue_adder`   | All 2744 channel triples, plus 20 000 random sums. |
| `tb_res2bin`         | Every value 0..769. |
| `tb_vedicmul`        | All 65 536 operand pairs at the default size, checked against `x*y`. |

`tb_vedicmul` also counts how often each mechanism is exercised, and fails if one never
occurs. The mechanisms are:

- a zero operand, where the complement equals the base;
- a nonzero carry part;
- a wrap-around in each residue channel;
- the final mod-770 reduction in the CRT converter.

It runs in well under a second.

## Simulating

Run from the directory that holds `rtl/` and `tb/`; the package must come first:

```
verilator --binary --timing --assert -Irtl rtl/rns_pkg.sv tb/tb_vedicmul.sv \
          --top-module tb_vedicmul -Mdir obj && ./obj/Vtb_vedicmul
```

Replace `tb_vedicmul` with any other testbench to run it. For a lint run, use
`verilator --lint-only -Wall -Irtl rtl/rns_pkg.sv rtl/vedicmul.sv`.
