# A JTAG port that opens only after an elliptic-curve Schnorr proof

A JTAG port gives whoever holds the probe full access to a chip's scan
chains, debug registers and pins. This design puts a lock in front of it.
After reset, every data-register scan passes through a single flip-flop,
so no chip register can be read or written. To open the port, the tester
loads a new instruction, `UNLOCK`, and runs a public-key protocol through
the port itself. The protocol is a Schnorr identification or an ECDSA
signature check on the NIST P-192 curve. The device computes its side in
hardware and releases the lock only when the check succeeds. Only public
keys are stored on the device, plus its own private key when the device is
the one that must prove itself. No secret is shared between the device and
the tester.

The RTL is IEEE 1800-2017 SystemVerilog. It is written to synthesize and is
parameterised by the field width `W`, which defaults to 192. There are two
clock domains: the test clock `tck` runs the JTAG side, and a functional
clock `clk` runs the cryptography.

## Block structure

```
 TDI ─┬─> instruction register ──> instruction decoder ── request_unlock ──┐
      │                                │  (lock gating)                    │
      ├─> Schnorr shift register (W) ─> MUX2 ─> sync flip-flop ─┐          │
      ├─> boundary scan register ──────────────────────────────┤ MUX1 ─> TDO
      └─> DUT register ────────────────────────────────────────┘   (negedge)
                                                                           │
 functional clock:                                                         v
   Schnorr controller <── word handshake ──> Schnorr shift register    (sync)
        │   │      └── ECDSA controller
        │   └────── ECMULT controller ── ECC datapath (add, sub, Blakley mult,
        │                                 binary division, 5 registers)
        ├── 192-bit LFSR PRNG
        └── external non-volatile memory port (curve and keys)
```

| File (`rtl/`) | Part |
|---|---|
| `secure_jtag_top.sv` | top level: wires everything, MUX1, TDO register, clock-domain crossings |
| `secjtag_pkg.sv` | P-192 constants, example keys, instruction codes, enums |
| `tap_fsm.sv` | IEEE 1149.1 TAP controller (16 states) |
| `jtag_ir.sv` | 4-bit instruction register |
| `instr_decoder.sv` | decoder with the lock: `UNLOCK`, selects, MUX1 control |
| `schnorr_dr.sv` | Schnorr shift register, MUX2, synchronisation flip-flop, word handshake |
| `boundary_scan.sv`, `dut_reg.sv` | protected test data registers |
| `sync2.sv` | two-flip-flop synchroniser |
| `schnorr_ctrl.sv` | protocol controller (four modes) |
| `ecdsa_ctrl.sv` | ECDSA signature verification |
| `ecmult_ctrl.sv` | PointMult by double-and-add, passes other instructions through |
| `ecc_datapath.sv` | affine field and point operations, micro-programmed |
| `modaddsub.sv` | modular or plain adder/subtractor |
| `blakley_mult.sv` | bit-serial modular multiplier |
| `binv_div.sv` | binary-Euclidean modular division |
| `prng_lfsr.sv` | 192-bit Galois LFSR |
| `ecc_ctrl_design1.sv` | point multiplier of the alternative projective design (stands beside the lock) |
| `mont_mult.sv` | its bit-serial Montgomery multiplier |

## The lock in the instruction decoder

Instructions are 4 bits wide:

| Code | Instruction | Register | Locked | Unlocked |
|---|---|---|---|---|
| `0000` | EXTEST | boundary scan, pins driven from it | one-bit path | yes |
| `0001` | SAMPLE | boundary scan | one-bit path | yes |
| `0010` | DUTREG | 32-bit DUT register (status in, control out) | one-bit path | yes |
| `1010` | UNLOCK | Schnorr register | yes | yes |
| `1111` | BYPASS (reset value) | one-bit path | yes | yes |

While the lock is closed, the decoder holds MUX1 on the Schnorr/MUX2 path
for every data scan. As a result, EXTEST cannot drive the pins and DUTREG
can neither read nor write the core. Loading `UNLOCK` raises
`request_unlock`, which starts the protocol.

When the protocol succeeds, `release_lock` rises and stays high until the
functional reset. The IR capture value is `{unlocked, busy, 0, 1}`, so a
plain IR scan shows the lock state. A failed attempt sets `auth_fail`. The
tester may then load `UNLOCK` again.

## Talking through one scan register: the synchronisation bit

This is the least obvious part of the design. The tester controls every
shift, but the device decides when its next word is ready, which can take
hundreds of thousands of functional cycles. The two sides stay in step
through one extra flip-flop between the Schnorr shift register and TDO.

On Capture-DR with `UNLOCK` selected:

* **Word pending.** The W-bit shift register loads the device's outgoing
  word, and the flip-flop loads 1. MUX2 routes the shift register into the
  flip-flop, giving a W+1 bit chain.
* **Nothing pending.** The flip-flop loads 0 and MUX2 routes TDI straight
  into it. The chain is one bit long, like BYPASS.

The first bit of every scan is therefore a ready flag. The tester enters
Shift-DR and looks at TDO:

* **TDO is 0.** The tester leaves after that one bit (TMS=1), waits, and
  polls again.
* **TDO is 1.** The tester shifts W more bits. It reads the device's word,
  least significant bit first. At the same time it shifts in one filler bit
  followed by its own word, least significant bit first, then passes
  through Update-DR.

On Update-DR the received word is handed to the controller. A scan of
exactly W+1 bits transfers one word each way.

The exchange between the TCK domain and the functional domain is a
four-phase handshake:

1. The controller puts `xout` on the bus and raises `xreq`.
2. The register's synchronised copy of `xreq` makes the next capture
   valid.
3. Update-DR copies the shift register to `xin` and raises `xack`.
4. The controller takes `xin` and drops `xreq`.
5. The register then drops `xack`.

`xin` holds its value until the next exchange.

If the tester leaves `UNLOCK` while the controller is waiting for a word,
the protocol is aborted and `auth_fail` is set.

## The four authentication modes

The `auth_mode` input is a strap. It is sampled when `UNLOCK` is requested
and picks one of four scenarios. In the formulas:

* `G` is the base point and `n` is its order.
* `k_a` and `P_a = k_a·G` are the device's key pair.
* `P_b` is the tester's public key.
* `Q` is the public key of a signing authority.

Every protocol uses four (ECDSA: three) word exchanges X1..X4. Each
exchange carries one 192-bit word in each direction. A zero word is sent
where a direction is unused.

| Mode | X1 out / in | X2 out / in | X3 out / in | X4 out / in | Device arithmetic | Accepts when |
|---|---|---|---|---|---|---|
| PROVER | `T_a.x` / – | `T_a.y` / – | – / `n_b` | `s` / – | `T_a = n_a·G`, `s = n_a + k_a·n_b mod n` | proof sent (the tester checks `s·G = T_a + n_b·P_a`) |
| VERIFIER | – / `T_b.x` | – / `T_b.y` | `n_a'` / – | – / `s_1` | `s_1·G`, `n_a'·P_b`, one PointAdd | `s_1·G = T_b + n_a'·P_b` |
| MUTUAL | `T_a.x` / `T_b.x` | `T_a.y` / `T_b.y` | `n_a'` / `n_b` | `s` / `s_1` | both of the above | tester's proof holds |
| ECDSA | `C` / `m` | – / `r` | – / `s` | – | see below | `(r, s)` valid on `e = m xor C` under `Q` |

The nonces `n_a` and `n_a'` are two LFSR words taken W clocks apart and
reduced modulo `n`. The LFSR is reseeded from the `seed` input whenever a
protocol starts.

In ECDSA mode the device sends a fresh challenge `C`. The tester answers
with `m` (intended to be the prover's public key XOR its identity), then `r`
and `s`. The signature is checked on `e = m xor C`, so a recorded signature
cannot be replayed. No hash function is used, since all values already fit
in 192 bits.

The ECDSA controller runs the standard check:

1. Require `1 ≤ r, s < n`.
2. `w = s⁻¹ mod n`, computed with the division unit.
3. `u1 = e·w` and `u2 = r·w`.
4. `X = u1·G + u2·Q`.
5. Accept when `X.x mod n = r`.

## ECC engine (affine coordinates)

All arithmetic is sent as instructions to the ECMULT controller. The
instructions are FieldAdd, FieldSub, FieldMult, FieldDiv, PointAdd,
PointDbl and PointMult; the modulus and the curve coefficient travel with
each instruction. Field instructions, PointAdd and PointDbl go straight to
the datapath. PointMult is expanded into a sequence:

* It scans the scalar from its most significant one bit.
* It starts from `Q = P`.
* For each remaining bit it does PointDbl, plus a PointAdd when the bit
  is 1.

The point at infinity is not represented. A zero scalar, or an addition or
doubling that would produce infinity, returns `err`. With random 192-bit
scalars this never happens in practice.

The datapath is a small micro-program sequencer. It drives four units
through five W-bit temporary registers (`t1`, `t2`, `t3`, `x3`, `y3`):

* **Modular adder/subtractor** (`modaddsub`). Two cascaded adders compute
  `a ± b` and its correction by `m`. The carries pick the right result: for
  addition, the corrected sum when either stage carries; for subtraction,
  the corrected sum when the first stage borrows. A mode input turns the
  correction off, making it a plain W-bit adder. The Montgomery multiplier
  uses it that way.
* **Blakley multiplier.** The multiplier is scanned most significant bit
  first. Each clock computes `R = 2R mod m` and adds `y` when the bit is 1,
  using two modular adders. One product takes W clocks, plus one clock for
  the result.
* **Binary Euclidean divider.** It computes `y/x mod m` (with `y = 1`,
  this is the inverse). Each clock halves an even operand or subtracts the
  smaller odd one, updating the companion values modulo `m`. It takes at
  most 2W clocks; the longest seen in testing is 288 clocks at W = 192.
* **Result selection.**

PointAdd uses `λ = (y1−y2)/(x1−x2)`, and PointDbl uses
`λ = (3x1²+a)/(2y1)`. In both, `x3 = λ² − x1 − x2` and
`y3 = λ(x1 − x3) − y1`.

Cycle counts measured at W = 192:

* PointAdd: about 670 cycles.
* PointDbl: about 870 cycles.
* One 192-bit PointMult: about 228,000 cycles.

## Stored values: external memory map

The curve and the keys are read from an external non-volatile memory
through `nvm_addr` (output) and `nvm_rdata` (input, one clock read
latency). The controller copies the words it needs at the start of every
protocol. The map is:

| Address | Word | Address | Word |
|---|---|---|---|
| 0 | p | 7, 8 | P_a x, y |
| 1 | a | 9, 10 | P_b x, y (trusted tester) |
| 2 | b | 11, 12 | Q x, y (signing authority) |
| 3 | n | | |
| 4, 5 | G x, y | | |
| 6 | k_a (device private key) | | |

`tb/nvm.sv` is a simulation model of this memory. It is filled with the
P-192 parameters and the example keys from `secjtag_pkg`.

## Clock domains

`tck` and `clk` are independent. They may also be the same clock. Only a
few signals cross between them:

* `request_unlock` goes to the controller.
* `release_lock` and `busy` go to the IR capture value and the decoder.
* `xreq` and `xack` form the word handshake.

Each crossing goes through a two-flip-flop synchroniser (`sync2`). The wide
words `xout` and `xin` are held stable while the handshake guarding them is
active, so they need no synchroniser. TDO is registered on the falling edge
of TCK.

## The projective-coordinate point multiplier (Design I)

The alternative ECC engine trades speed for area. It has no divider. Instead
it works in projective coordinates, where `x = X/Z` and `y = Y/Z`, and
performs every multiplication in Montgomery form (`v·2ᵂ mod p`) on one
bit-serial Montgomery multiplier. `ecc_ctrl_design1` is built that way, and
the top instantiates it next to the secure JTAG with its own `d1_*` ports.
The lock does not use it.

**Inputs.** It takes `k`, the point `(px, py)`, `p` and `rr = 2^(2W) mod p`.

**Montgomery multiplier (`mont_mult`).** It uses the radix-2 algorithm. A
single `modaddsub` in plain-add mode first adds `x_i·y`, then adds `m` if
the sum is odd, then halves. A final conditional subtraction completes the
product. A product takes 2W+2 cycles.

**Sequencer.** A micro-program sequencer runs MUL, ADD, SUB and CPY steps
on a register file of 23 W-bit words. Its programs are:

* conversion into Montgomery form;
* point addition: 12 multiplications and 2 squarings;
* doubling for `a = −3`: `w = 3(X−Z)(X+Z)`, 7 multiplications and 3
  squarings;
* the final division by `Z`.

**Scalar.** The scalar is processed with a Montgomery ladder. It starts
with `R0 = P` and `R1 = 2P`. For each further bit `b`, `R(1−b)` becomes
`R0 + R1` and `R(b)` becomes `2·R(b)`. Every bit therefore costs exactly
one addition and one doubling.

**Back to affine.** `1/Z` is computed as `Z^(p−2)` by square-and-multiply
on the same multiplier. The results are then multiplied by plain 1 to
leave Montgomery form.

**Cost.** A 192-bit scalar takes about 1.93 million cycles (about 24
products per bit plus the inversion). The description gives 3,068,150
cycles per scalar multiplication for this design.

## How closely this follows the original description

Taken from the description:

* the locked instruction decoder and MUX1;
* the `UNLOCK` instruction and the `request_unlock` / release signals;
* the 192-bit Schnorr register, with MUX2 and the ready flip-flop;
* the 192-bit LFSR, reseeded when `request_unlock` rises;
* the affine engine:
  * the ECMULT controller expanding PointMult;
  * five temporary registers;
  * the Blakley multiplier;
  * the binary-Euclidean division of at most 2·log2 p steps;
  * the carry-selected adder/subtractor;
* the P-192 curve;
* the Schnorr and ECDSA equations;
* signing `PK xor C xor ID` without a hash.

Choices made here, not in the description:

* instruction width and codes, and the IR capture value;
* the four-phase handshake, word order, filler bit and exchange sequence;
* the mode strap;
* nonce handling;
* the memory map;
* register lengths of the boundary scan (8) and DUT register (32);
* TDO on the falling edge;
* sharing one ECMULT controller between the Schnorr and ECDSA controllers.

Known differences:

* **PROVER mode releases the lock once the proof has been sent.** The
  tester, not the device, checks the proof. This follows the cycle budget
  of one scalar multiplication for that scenario. The step-by-step
  walk-through instead has the device recompute and compare its own proof
  before unlocking.
* **Mutual authentication uses 4 word exchanges (772 shift clocks)** instead
  of 5 words (960 clocks), because each exchange carries a word in both
  directions.
* **Cycle counts differ:**
  * PointAdd: about 3.5·W here, against 5·log2 p + 6 in the description.
  * PointDbl: about 4.5·W here, against 4·log2 p + 8.
  * Totals measured at 192 bits (functional cycles, against the
    description's budgets):

    | Mode | Measured | Budget |
    |---|---|---|
    | PROVER | 189,501 | 240,762 |
    | VERIFIER | 471,270 | 482,130 |
    | MUTUAL | 660,771 | 722,892 |
    | ECDSA | 457,243 | 482,324 |

  * Timing closure at the quoted 123 MHz functional clock has not been
    checked.
* **No point at infinity.** Inputs that lead to it are refused.
* **The lock stays open until functional reset.** A new `UNLOCK` is
  ignored while open.
* **The projective design is only partly implemented.** Its point
  multiplier exists, but its own Schnorr/ECDSA controller does not. In the
  description, that design's adder is shared between the controller and
  the Montgomery multiplier. Here each has its own.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`. The reference arithmetic (wide-integer
modular operations and P-192 point operations) is in `tb/ec_ref_pkg.sv`.
With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/secjtag_pkg.sv \
    tb/ec_ref_pkg.sv tb/tb_secure_jtag_top.sv --top-module tb_secure_jtag_top -Mdir obj -o sim
obj/sim
```

Replace the testbench name to run another one. `tb_secure_jtag_top` runs
the whole device at full size (W = 192, no parameter overrides). It
includes:

* a 100 MHz tester model driving TMS/TDI;
* all four modes, including a refused VERIFIER response and a refused
  ECDSA signature;
* locked and unlocked register accesses;
* one Design I point multiplication.

It counts not-ready polls, word exchanges, refused accesses, failures,
unlocks and PointMults, and fails if any of them never happened. The C++
build takes about two minutes; the run takes a few seconds.

Other testbenches:

* `tb_ecdsa_ctrl` and `tb_ecmult_ctrl` run the real engine at 192 bits.
* `tb_ecc_ctrl_design1` runs the projective point multiplier at 192 bits.
  It checks small scalars, `n − 1`, random scalars and `k = 0`.
* `tb_schnorr_ctrl` answers the controller's instructions with the
  reference package, so every value it checks is computed independently.
* `tb_schnorr_dr` uses W = 16.

To change the stored keys, edit the `DEF_*` constants in `secjtag_pkg`, or
the parameters of the `nvm` model, and make the tester's keys match.
