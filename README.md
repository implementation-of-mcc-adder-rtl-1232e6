# Two-chain Manchester carry chain adder with spurious-power suppression

This RTL describes two related low-power / high-speed adder ideas:

1. **A two-chain 8-bit Manchester carry chain (MCC) adder.** A classic
   Manchester chain is limited to four stages (four series devices in the
   dynamic circuit), so an 8-bit adder normally needs two 4-bit chains in
   series. Here the eight carries come from **two independent 4-stage
   chains working in parallel**, one for the even bit positions and one for
   the odd ones. The longest chain is still four stages, but it covers eight
   bits. Wider adders (16, 32, 64 bits) are built from this 8-bit module.
2. **Spurious-power suppression (SPST).** A 16-bit adder/subtractor is split
   into a low half (LSP) and a high half (MSP). When both high operand halves
   are only sign extensions (all zeros or all ones), the high result can be
   predicted. The high adder is then frozen behind latches, so it does not
   toggle, and its result is produced by a small sign-extension circuit.

Everything is combinational. There is no clock. Results follow the operands.

## The two-chain carry scheme (`mcc_adder8`)

Per-bit signals (`mcc_pg`): generate `g = a&b`, XOR propagate `p = a^b` and
OR propagate `t = a|b`. A plain Manchester chain evaluates
`c_i = g_i | t_i & c_(i-1)` one bit after the other.

The two-chain module uses *pseudo-carries* `h_i`, defined by
`h_i = g_i | c_(i-1)`. The real carry is then `c_i = t_i & h_i`, because
`g_i` implies `t_i`. Expanding one more bit gives a recursion that skips a
position:

```
h_i = G_i | P_i & h_(i-2)
G_i = g_i | g_(i-1)          (two-bit group generate)
P_i = t_(i-1) & t_(i-2)      (two-bit group propagate)
```

So the even pseudo-carries depend only on even ones, and the odd ones only on
odd ones:

| chain | stage inputs (G, P) | chain input | nodes |
|-------|---------------------|-------------|-------|
| even  | G0, (P2,G2), (P4,G4), (P6,G6) | none: `G0 = g0 | cin` | h0 h2 h4 h6 |
| odd   | (P1,G1), (P3,G3), (P5,G5), (P7,G7), with `P1 = t0` | `cin` | h1 h3 h5 h7 |

Each chain is one `mcc_chain4` instance, a 4-stage `h_k = G_k | P_k & h_(k-1)`
chain. The carry-out is `c7 = t7 & h7`. The sum bits are
`s_i = p_i ^ c_(i-1)`, with `s_0 = p_0 ^ cin`. In a dynamic (domino)
implementation the sum XORs are static gates placed after the chain.

The layout of the two chains and the names G, P and h are from the design.
The exact group terms are the standard pseudo-carry ones that make that
layout add correctly. They are checked exhaustively: all 2^17 input
combinations give `a + b + cin`.

`mcc_wide_adder` chains `WIDTH/8` of these modules. Each module's carry-out
feeds the next module's carry-in. The default width is 64. The design names
8, 16, 32 and 64 bits as its sizes, and all four are tested. The source does
not say how the modules are joined. The plain module-to-module ripple is
this implementation's choice.

## Spurious-power suppression (`spst_addsub`, `spst_detect`)

For a 16-bit operation the split is at bit 8 (`WIDTH/2`). The datapath:

```
            a[7:0]  b'[7:0]   cin=sub
               \      /
              LSP adder (MCC) ───────────────► sum[7:0]
                   │ c_lsp
   a[15:8] ─┬──────┼───────────────────────┐
  b'[15:8] ─┤      │                       │
            │  ┌───▼──────────┐      Latch-A / Latch-B (hold while close)
            └─►│ detection    │            │
               │ close, sign, │      c_lsp & ~close ──► MSP adder (MCC)
               │ carr_ctrl    │                        │ pseudo-sum
               └──────┬───────┘                        │
                      └────────► sign extension / mux ◄┘──► sum[15:8], cout
```

`b' = sub ? ~b : b`. The carry-in of the LSP adder is `sub`, so
subtraction is `a + ~b + 1`. The inversion happens before the split, so the
detection logic sees the operand that is actually added.

**Detection.** `a_and = &a_msp` and `a_nor = ~|a_msp`, and the same for `b`.

- `close = (a_and|a_nor) & (b_and|b_nor)`.
- When `close` is high, each high operand half is 0 or −1. The LSP carry is
  0 or 1. So the high result is one of −2, −1, 0 or +1. In bits that is
  always `{sign, sign, ..., sign, carr_ctrl}`, where:
  - `sign = a_and&b_and | (a_and^b_and) & ~c_lsp`
  - `carr_ctrl = a_and ^ b_and ^ c_lsp`

This covers every combination:

| high halves | LSP carry | high result |
|-------------|-----------|-------------|
| 0 + 0       | 0 / 1     | `00000000` / `00000001` |
| −1 + 0      | 0 / 1     | `11111111` / `00000000` |
| −1 + −1     | 0 / 1     | `11111110` / `11111111` |

**Freezing the high adder.** While `close` is high:

- Latch-A and Latch-B hold the high operands. They are transparent while
  `close` is low.
- The LSP carry into the high adder is blocked.
- The output multiplexer takes the sign-extension pattern instead of the
  high adder's sum.

The carry-out is then `a_and&b_and | (a_and^b_and)&c_lsp`. In both modes,
`{cout,sum}` is exactly `a + b' + sub`. `cout` is the unsigned carry out of
bit 15. `close` is brought out as a status signal.

**Glitch diminishing (`det_en`).** The three detection outputs
(`spst_pkg::det_t`: close, sign, carr_ctrl) pass through a level-sensitive
latch that is transparent while `det_en` is high. Holding `det_en` low while
the operands settle, and raising it afterwards, keeps detection glitches
away from the operand latches and the output multiplexer. With `det_en`
held low, the outputs keep the old detection result, and the sum may be
wrong for new operands until `det_en` rises. **Tie `det_en` high for plain
combinational use.** The source describes this only as "controlling the
three-bit output" of the detection logic after the transient. The port and
its latch are this implementation's way of doing it.

The 19 latch bits (8 + 8 operand bits and 3 detection bits) are intended.
They are the suppression mechanism, not inferred by mistake. Their power-up
content is never visible: while they hold, the result comes from sign
extension.

## Top level (`mcc_spst_top`)

The top contains the 16-bit SPST adder/subtractor (`SPST_WIDTH = 16`; both
halves use MCC modules) and, beside it, the 64-bit MCC adder
(`WIDE_WIDTH = 64`). The two have independent ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`, `b` | in | 16 | SPST operands |
| `sub` | in | 1 | 1: `a - b` |
| `det_en` | in | 1 | detection-output strobe (tie 1) |
| `sum`, `cout` | out | 16, 1 | result and carry out |
| `close` | out | 1 | high half suppressed |
| `wa`, `wb`, `wcin` | in | 64, 64, 1 | wide adder operands and carry in |
| `wsum`, `wcout` | out | 64, 1 | wide adder sum and carry out |

`SPST_WIDTH` must be a multiple of 16. `WIDE_WIDTH` must be a multiple of 8.

## Files

| file | content |
|------|---------|
| `rtl/mcc_pg.sv` | g / p / t per bit |
| `rtl/mcc_chain4.sv` | one 4-stage Manchester chain |
| `rtl/mcc_adder8.sv` | 8-bit two-chain adder |
| `rtl/mcc_wide_adder.sv` | WIDTH-bit adder from 8-bit modules |
| `rtl/spst_pkg.sv` | `det_t` type |
| `rtl/spst_detect.sv` | detection logic and its output latch |
| `rtl/spst_addsub.sv` | SPST adder/subtractor |
| `rtl/mcc_spst_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. For
example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/spst_pkg.sv \
    tb/tb_mcc_spst_top.sv --top-module tb_mcc_spst_top -Mdir obj_top
./obj_top/Vtb_mcc_spst_top
```

The testbenches and what they cover:

- **`tb_mcc_adder8`, `tb_mcc_chain4`, `tb_spst_detect`**: exhaustive.
- **`tb_mcc_wide_adder`**: 8, 16, 32 and 64 bits, with directed full-length
  carries and random operands.
- **`tb_spst_addsub`**: each suppression case, random operands, and checks
  that the latched high operands do not move while `close` stays high.
- **`tb_mcc_spst_top`**: the whole design at default sizes. It counts
  suppressed and normal operations, subtractions, `det_en` strobes,
  full-length 64-bit carries and carry-outs, and fails if any of them never
  occurs.

All references are computed with integer arithmetic in the testbench.

## What is modelled and what is not

- **Domino circuit style.** The source implements the chains and the g/p/t
  gates as clocked domino (precharge/evaluate) CMOS. This RTL models only
  the evaluated logic values. There is no precharge phase and no clock, and
  the speed advantage of the short chains exists only in a transistor-level
  implementation. The RTL shows the structure: two 4-stage chains per 8 bits.
- **Inverted nodes.** The dynamic nodes are active-low in the circuit (h̄,
  c̄). The RTL uses true polarity throughout.
- **Not included.** These are evaluation vehicles mentioned for SPST, but
  without enough detail to build:
  - the H.264 multi-transform unit;
  - the multimedia functional unit (add, subtract, multiply, MAC,
    interpolation, SAD).

  The conventional single-chain 4-bit MCC is a comparison baseline only and
  is not part of this design.
- **Power figures.** The SPST power savings depend on operand statistics and
  on the circuit. RTL simulation cannot reproduce them. The testbenches check
  only that the suppression path is taken and that it is exact.
- **Choices of this implementation.** These are not from the source:
  - the equations for `sign`, `carr_ctrl` and the suppressed `cout`, derived
    from the case analysis above;
  - passing the LSP carry into the detection block;
  - the way subtraction is folded in;
  - the ripple joining of 8-bit modules;
  - the `det_en` strobe.
