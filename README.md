# Low-power ECC point multiplier for Koblitz curves over GF(2^m)

This core computes the elliptic-curve scalar multiplication Q = k·P, the basic
operation of ECC key exchange and signatures. It targets wireless sensor nodes
and IoT devices, where energy per operation matters more than speed. It is small:
one bit-serial field multiplier, one combinational squarer, an XOR adder and a
bank of twelve m-bit registers. Its power comes down because most of its clocks
are gated. While the core is idle the datapath receives no clock edges. The
multiplier is clocked only during a multiplication, and each register only in the
cycle it is written.

The default build uses the NIST K-163 curve: y² + xy = x³ + x² + 1 over GF(2^163)
with f(x) = x^163 + x^7 + x^6 + x^3 + 1. One parameter change builds the core for
K-233, K-283, K-409 or K-571.

## Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk_ecc` | in | 1 | clock |
| `reset` | in | 1 | asynchronous reset, active high |
| `start` | in | 1 | one-cycle pulse while idle; `k`, `xp`, `yp` are captured in that cycle |
| `k` | in | M | scalar |
| `xp`, `yp` | in | M | affine input point P (must be on the curve, x ≠ 0) |
| `done` | out | 1 | falls after `start`; rises when the result is valid and stays high until the next `start` |
| `xq`, `yq` | out | M | affine result Q = k·P. The point at infinity is returned as (0, 0), which is not a curve point because b ≠ 0 |

The inputs need to be valid only in the `start` cycle. One 163-bit
multiplication takes about 1.4·10^5 cycles with a full-length scalar. The
scalar of the K-163 test vector below takes 115,667 cycles (about 2 ms at 59 MHz).

## How Q = k·P is computed

The controller (`ecc_ctrl`) never performs arithmetic itself. It runs the
algorithm below as a sequence of *micro-operations*. Each one names an operation
(MUL, SQR, ADD, MOV or ONE), a destination register and two source registers
(`ecc_pkg::uop_t`). The register map is in `ecc_pkg`.

1. **Scan.** Leading zero bits of k are skipped, one per cycle.
2. **Init.** The two ladder points start as P1 = P = (x : 1) and
   P2 = 2P = (x⁴ + 1 : x²). The Montgomery ladder keeps P2 − P1 = P throughout.
3. **Ladder.** Each remaining key bit k_i does one point addition and one
   point doubling, in López–Dahab projective x-only coordinates (X : Z), x = X/Z.
   If k_i = 1 the sum goes to P1 and P2 is doubled; if k_i = 0 the sum goes to
   P2 and P1 is doubled. The controller does not move data to choose between
   the two cases. It swaps register addresses instead (u/v in `ecc_ctrl`).
   - addition: Z_u ← (X_u Z_v + X_v Z_u)², X_u ← x·Z_u + (X_u Z_v)(X_v Z_u)
   - doubling (b = 1): Z_v ← X_v² Z_v², X_v ← (X_v² + Z_v²)²

   Each bit costs 5 multiplications, 4 squarings and 3 additions. That is
   5·(m+1) + 7 cycles per bit with the bit-serial multiplier.
4. **Special cases.** Z1 = 0 means Q is the point at infinity, returned as
   (0, 0). Z2 = 0 means (k+1)P is the point at infinity, so Q = −P = (x, x + y).
   k = 0 also returns (0, 0).
5. **Back to affine.** With D = (x·Z1·Z2)⁻¹:
   - x_Q = X1·x·Z2·D
   - y_Q = (x + x_Q)·[(X1 + xZ1)(X2 + xZ2) + (x² + y)Z1Z2]·D + y

   This is one inversion and 10 multiplications.
6. **Inversion** (Itoh–Tsujii): a⁻¹ = (a^(2^(m−1)−1))². Write β_j = a^(2^j−1).
   The rules β_2j = β_j^(2^j)·β_j and β_(j+1) = β_j²·a build β_(m−1) along the
   binary digits of m−1. No extra hardware is needed: for m = 163 this takes
   9 multiplications and 162 squarings on the same units.

The controller handshake is `req`/`ack`. `req` stays high with a stable
micro-operation until `ack` is seen at a clock edge, and the register bank is
written at that same edge. One-cycle operations are acknowledged in the cycle
they are issued. A multiplication is acknowledged when the multiplier's `done`
strobe arrives, ⌈m/DIGIT⌉ + 1 cycles after issue.

## Datapath

- `gf2m_mul`: shift-and-add multiplier, most significant bit of b first.
  Each cycle it processes DIGIT bits as c ← c·x mod f + b_j·a. DIGIT = 1 gives
  a bit-serial multiplier taking m cycles. Larger DIGIT values trade area for
  speed; b is zero-padded at the top when DIGIT does not divide m.
- `gf2m_sqr`: squaring is linear in GF(2^m), so the squarer spreads the input
  bits to the even positions and reduces modulo f. It is combinational.
- `gf2m_add`: XOR.
- `ecc_regfile`: twelve m-bit registers, two combinational read ports and one
  write port, plus a load port for the input point. Each register holds its
  value through an enable multiplexer and also has its own clock gate.
- `ecc_core`: the result multiplexer that picks what is written back, and the
  clock gates.

## Clock gating

`clock_gate` is the standard glitch-free gate. A latch that is transparent while
the clock is low holds the enable, and that value is ANDed with the clock. The
latch is intended, and a synthesis flow maps it to a library clock-gating cell.
The gates are nested:

| gate | enable | what it stops |
|---|---|---|
| global (`u_cg_dp`) | `busy \| start` | the whole datapath while idle |
| multiplier (`u_cg_mul`) | start, busy or done of the multiplier | ~3m multiplier flip-flops during one-cycle operations |
| per register (`ecc_regfile`) | that register's write enable | every register not written in this cycle |

The controller itself runs on the free-running clock so that it can see `start`.
`CLOCK_GATING = 0` replaces every gate with a plain wire. The enable
multiplexers then hold the state, so both builds are cycle-for-cycle identical.
This is the "no clock gating" reference point for power comparisons. The enable
multiplexers are redundant in the gated build, but they keep its behaviour
exactly equal to the ungated one.

## Parameters (`ecc_core`)

| parameter | default | meaning |
|---|---|---|
| `M` | 163 | field degree |
| `RPOLY` | `koblitz_rpoly(M)` | f(x) − x^m; the package knows 163, 233, 283, 409, 571 (NIST), plus 7 and 17 for quick tests |
| `DIGIT` | 1 | multiplier digit size |
| `CLOCK_GATING` | 1 | 1: clock gates present; 0: enable multiplexers only |

The doubling formula is hard-wired for b = 1, the value shared by all Koblitz
curves. The curve coefficient a is never used: the x-only ladder and the
y-recovery formula do not depend on it. So the same core serves K-163 (a = 1)
and K-233…K-571 (a = 0). Supporting curves with b ≠ 1 would need one more
multiplication by b per doubling.

## Design choices and limits

- The overall structure is fixed: an FSM control unit, field multiplication,
  squaring and addition units, a multiplexer-based register bank, and clock
  gating applied globally and per register. Several details are choices made
  for this design:
  - the algorithm (López–Dahab ladder, Itoh–Tsujii inversion)
  - the micro-operation schedule
  - the register count
  - the bit-serial multiplier
  - the start/done protocol and asynchronous reset
  - the (0, 0) encoding of the point at infinity
- The ladder does the same work for every key bit, so its timing does not depend
  on the bit values. The leading-zero scan does leak the bit length of k, and
  nothing in the core protects against power analysis.
- P is not checked for being on the curve. A point with x = 0 (the point of
  order 2) is not supported.
- A 163-bit core has about 2,700 flip-flops. Of those, 1,956 are the register
  bank and 489 the multiplier.

## Verification

All testbenches check themselves and print `TB_RESULT checks=N failures=M`.
The reference model (`tb/ecc_ref_pkg.sv`) is independent of the RTL. It uses
bit-by-bit field multiplication, Fermat inversion and affine double-and-add,
so it shares neither algorithm nor code with the core.

| testbench | what it covers |
|---|---|
| `tb_ecc_core` | default build. The K-163 test vector (P = generator, k = 0xFFF030001F0000FFFFF000003800000000, expected xq = 0x1C14DDAB12BC0D98BF83CE0022F305039F64FC205, yq = 0x06F9B20200EB3CEA80D1DB6C0FB8E6DED4A3C665C). Also k = 0, k = n, k = n−1, k = 1, a short k and random k, against the reference. Counts each mechanism (leading-zero skip, both ladder branches, inversion, infinity and −P exits, each clock gate closing) and fails if one never happens |
| `tb_ecc_workloads` | one random full-length multiplication on each of K-163, K-233, K-283, K-409, K-571, plus an ungated K-163 build. Takes about 3 minutes |
| `tb_ecc_ctrl` | the controller against a behavioural datapath with random multiplier latency. Checks results and the multiplication count |
| `tb_gf2m_mul` | DIGIT = 1 and 4. Checks products, latency (163 and 41 cycles) and the done strobe |
| `tb_gf2m_sqr`, `tb_gf2m_add` | random operands against the reference |
| `tb_ecc_regfile` | gated and ungated banks against a shadow model |
| `tb_clock_gate` | pulses only when enabled, no glitch when the enable changes while the clock is high, bypass mode |

Measured cycle counts for a random full-length scalar: K-163 138,103;
K-233 279,178; K-283 410,114; K-409 850,358; K-571 1,650,813.

To simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert --top-module tb_ecc_core \
  -y rtl -y tb +libext+.sv rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv tb/tb_ecc_core.sv
./obj_dir/Vtb_ecc_core
```

Verilator has only two states and can start flip-flops at random values. The
testbenches therefore give `reset` a rising edge after time zero, and the core
resets all of its state.
