# Montgomery-ladder elliptic curve coprocessor for GF(2^191)

This is a point multiplication coprocessor for binary elliptic curves
`y^2 + xy = x^3 + a x^2 + b` over GF(2^191). Given an affine point P = (x, y),
the curve coefficient b and a scalar m of up to 191 bits, it returns the
affine point mP. It is built around two ideas.

* **The Montgomery ladder, with x-only projective coordinates.** The ladder
  keeps two points, P1 = kP and P2 = (k+1)P. Their difference is always P, so
  each point needs only its X and Z coordinates. Every key bit costs exactly one
  point addition and one point doubling, whatever the bit's value:

  | operation | formula | cost |
  |---|---|---|
  | addition (result overwrites Pa) | `Z3 = (Xa*Zb + Xb*Za)^2`, `X3 = x*Z3 + (Xa*Zb)*(Xb*Za)` | 4 mult, 1 square, 2 add |
  | doubling (in place) | `X' = X^4 + b*Z^4`, `Z' = X^2*Z^2` | 2 mult, 4 square, 1 add |

  The coefficient a is never used. At most two multiplications can run in
  parallel, so the datapath has two multipliers.
* **Word-serial LFSR field multipliers sharing one datapath.** Each
  multiplier takes 50 bits of one operand per clock cycle. A 191-bit
  multiplication therefore takes 4 cycles. Squaring and addition are
  combinational and cost little. Several state machines take turns driving
  this one datapath.

A word-serial Massey-Omura multiplier for a normal basis sits beside the
coprocessor at the top level. It is the other field multiplier for this
field, and it is not connected to the coprocessor.

## Block structure

```
ecc_top
 ├─ ecc_coprocessor
 │   ├─ main_fsm        ladder control, parameter addresses, set-up
 │   ├─ madd_fsm        point addition
 │   ├─ mdbl_fsm        point doubling
 │   ├─ conv_fsm        inversion and recovery of affine x3, y3
 │   ├─ param_addr_mux  picks the active machine, resolves indirect addresses
 │   └─ ecc_datapath
 │       ├─ gf2m_lfsr_mult  x2   (50-bit words, 4 cycles)
 │       ├─ gf2m_squarer    x2   (combinational)
 │       ├─ gf2m_adder      x2   (XOR)
 │       └─ operand_dpram        (16 x 191 bit, two ports)
 └─ gf2m_mo_mult        Massey-Omura multiplier, stand-alone
```

`ecc_pkg` holds the field size, the reduction polynomial, the memory map
and the control-word types.

## Control words and indirect addressing

This part of the design takes the most care to follow.

Each state machine produces a complete control word, `ecc_pkg::ctrl_t`, in
every cycle. Only one machine is active at a time: the main machine during
set-up, or one of the three sub-machines. `param_addr_mux` passes the active
machine's word on to the datapath. With no machine active it passes an idle
word. An assertion in `ecc_coprocessor` checks that at most one machine is
active.

The control word has these parts:

* **One request per memory port** (`port_req_t`). A request can read, write
  or do nothing.
  * A read returns data in the next cycle. The read data stays on the port
    until that port reads again.
  * A write takes its data from a named source (`src_e`).
  * The address is either a direct address, or `use_param` plus an index
    0-3 into the main machine's **parameter address port**.
* **A source select for every input of every unit.** To keep the datapath
  free of loops, the combinational units are chained in a fixed order:
  adder 0, then squarer 0, then squarer 1, then adder 1. A unit can take
  its input from a unit earlier in the chain, so `x^2` and `x^4` come out
  of one read in a single cycle. The multiplier operands, the memory write
  data and the squaring register can take any source.
* **Multiplier controls:** `start`, `la` and `lb`. With `la` or `lb`, a
  multiplier can load one operand in an earlier cycle and then start with
  only the other operand.

The indirect addresses are what let a single addition machine and a single
doubling machine serve both values of the key bit. The main machine sets its
four parameter addresses in the cycle before it triggers a sub-machine:

| key bit | addition parameters 0,1,2,3 | doubling parameters 0,1 |
|---|---|---|
| 1 | X1, Z1, X2, Z2 (P1 <- P1 + P2) | X2, Z2 (P2 <- 2 P2) |
| 0 | X2, Z2, X1, Z1 (P2 <- P1 + P2) | X1, Z1 (P1 <- 2 P1) |

The sub-machines read and write "parameter 0" and so on, and never name P1
or P2. The points stay in their fixed memory locations, and no copies are
made. The addition runs first, and the doubling after it. This order is
safe because the doubling only touches the point the addition did not
write.

### Ladder step schedule

Point addition takes 11 cycles. A cycle number is counted from the cycle
after `go`.

| cycle | action |
|---|---|
| 1 | read Xa, Zb |
| 2 | mul0 <- Xa*Zb; read Xb, Za |
| 3 | mul1 <- Xb*Za |
| 4-7 | read x; in cycle 7, when both products are ready: Za <- (mul0+mul1)^2 = Z3, mul0 <- x*Z3, mul1 <- mul0*mul1 |
| 8-11 | in cycle 11: Xa <- mul0 + mul1, done |

Point doubling takes 7 cycles.

| cycle | action |
|---|---|
| 1 | read Z, b |
| 2 | Z^2 and Z^4 through the chained squarers; mul0 <- b*Z^4; Z^2 loaded into mul1; read X |
| 3 | X^2 and X^4; mul1 <- Z^2*X^2; X^4 stored in temporary T0 |
| 4-7 | read T0; in cycle 7: X <- X^4 + mul0, Z <- mul1, done |

With three cycles for the hand-over between machines (one in the main
machine's step state and one for each start), one key bit takes 21 cycles,
and 6 multiplications, 5 squarings and 3 additions.

## Final conversion and inversion

When the ladder ends, `conv_fsm` recovers the affine result from
P1 = (X1 : Z1) = mP, P2 = (X2 : Z2) = (m+1)P and P = (x, y):

```
inv = (x Z1 Z2)^-1
x3  = X1 * (x Z2) * inv                                   (= X1/Z1)
y3  = (x + x3) * [(X1 + x Z1)(X2 + x Z2) + (x^2 + y) Z1 Z2] * inv + y
```

Only one inversion is needed, because x3 reuses it. Independent products
are paired on the two multipliers wherever the order allows.

The inverse is computed with Fermat's little theorem,
`a^-1 = a^(2^191 - 2) = prod_{i=1..190} a^(2^i)`:

* The squaring register steps through a^4, a^8, ... using squarer 0.
* Multiplier 0 accumulates their product, one multiplication per power.

In all this is 189 multiplications, about 760 cycles. The whole conversion
takes about 795 cycles.

The conversion also handles two special cases:

* **Z1 = 0.** mP is the point at infinity. The result words are cleared and
  `inf` is set.
* **Z2 = 0.** (m+1)P is infinity, so mP = -P = (x, x + y). The machine
  writes this directly.

The main machine handles m = 0 itself, with result infinity.

## Field arithmetic

**LFSR multiplier (`gf2m_lfsr_mult`).** This is a polynomial-basis
multiplier, modulo `f(x) = x^191 + x^9 + 1`. Operand b is split into
`ceil(N/D)` words, most significant word first. Each cycle computes
`p <- p * x^D + a * word (mod f)`. This is D steps of the bit-serial LFSR
multiplier, unrolled.

* The first word is processed on the start edge. The product is therefore
  in `p` four cycles after `start`, and `ready` rises in that same cycle.
* `D` can be set to any value from 1 (bit-serial) to N. Table-style area
  studies over word lengths 1 to 100 are done by changing this parameter.
* The reduction polynomial is a parameter.

**Squarer (`gf2m_squarer`).** Squaring spreads the bits (bit i goes to bit
2i) and then folds the top half back down with the trinomial. Only XOR
gates are needed.

**Massey-Omura multiplier (`gf2m_mo_mult`).** This multiplier works in a
type II optimal normal basis of GF(2^191). Such a basis exists because
2·191+1 = 383 is prime.

* In a normal basis, squaring is a cyclic shift.
* Every product bit is the same bilinear form of the operands, applied to
  rotated copies of them. The form's matrix has 2N-1 ones. It is derived
  from N at elaboration time, using discrete logarithms base 2 modulo 383,
  so no table is stored.
* D copies of the form give D product bits per cycle, and the operand
  registers rotate by D bits. A product therefore takes `ceil(N/D)` cycles,
  4 at the default D = 50, with the same handshake as the LFSR multiplier.
* Bit i of an operand is the coefficient of beta^(2^i), and the unit element
  is all ones.

## Memory map and host protocol

| word | contents |
|---|---|
| 0, 1 | x, y of the base point P (written by the host) |
| 2 | curve coefficient b (written by the host) |
| 3, 4 | X1, Z1 (ladder point P1) |
| 5, 6 | X2, Z2 (ladder point P2) |
| 7-9 | temporaries |
| 13, 14 | result x3, y3 |
| 10-12, 15 | unused |

While `busy` is low, the host owns memory port B through `host_rd`,
`host_we`, `host_addr` and `host_wdata`. Read data appears on `host_rdata`
one cycle after `host_rd`.

To run a point multiplication:

1. Write x, y and b.
2. Pulse `start` for one cycle with the scalar on `m`.
3. Wait for the one-cycle `done` pulse.
4. Read words 13 and 14. `inf` is valid from `done` until the next `start`.

Starting while busy is an assertion error.

Set-up before the ladder: `main_fsm` searches for the leading one bit, at
one cycle per bit from the top. It then writes X1 = x, Z1 = 1, X2 = x^4 + b
and Z2 = x^2 in three cycles.

Timing for a 191-bit scalar:

| part | cycles |
|---|---|
| search for the leading one, set-up | 4 |
| ladder, 190 key bits at 21 cycles each | 3990 |
| conversion, with the hand-over to and from the conversion machine | 799 |
| total (measured in simulation) | 4793 |

At the 20 MHz clock the source design reached on a Virtex-E device, that is
about 240 µs per point multiplication.

Reset is asynchronous and active low. It clears all state machines,
multiplier registers and the squaring register, but not the operand memory.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| most | `N` | 191 | field degree |
| multipliers, datapath | `D` | 50 | word length (bits per cycle) |
| LFSR path | `POLY` | `x^9 + 1` | f(x) without its x^N term |
| `ecc_top` | `MO_D` | 50 | word length of the Massey-Omura multiplier |
| `operand_dpram` | `WORDS` | 16 | memory depth |

The state machines' memory map and the inversion loop count follow `N`.
The scalar width is N. The testbenches and their reference model, however,
are written for N = 191 and the default polynomial.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Reference values
come from `tb/gf_ref_pkg.sv`, which is written independently of the RTL:

* multiplication as a full carry-less product followed by reduction;
* inversion with the extended Euclidean algorithm;
* affine point addition and doubling on the full curve with a, and scalar
  multiplication by double-and-add.

Test curves are random: x, y and a are drawn at random, and b follows from
the curve equation. The Massey-Omura test uses a different representation:
polynomials modulo x^383 - 1.

| testbench | what it shows |
|---|---|
| `tb_ecc_top` | end-to-end mP at full size, with no parameter overrides. Covers m = 0, 1, 2, 3, random and all-ones 191-bit scalars, and a point of order 2 for both special cases. Also checks 6 multiplications per key bit, counts each mechanism (additions and doublings for each key-bit value, indirect accesses, parallel multiplications, inversion, infinity, -P, m = 0), and checks the Massey-Omura identities |
| `tb_ecc_coprocessor` | the same end-to-end checks on the coprocessor alone |
| `tb_madd_fsm`, `tb_mdbl_fsm` | each machine on the real datapath, for both parameter orders. Checks results, that the other point is untouched, the multiplication count, and 11 and 7 cycles |
| `tb_conv_fsm` | affine recovery against the formula, and the Z1 = 0 and Z2 = 0 cases |
| `tb_main_fsm` | parameter addresses and trigger order for each key bit, set-up writes, m = 0 |
| `tb_ecc_datapath` | a hand-written control program through the chained units, both multipliers and the squaring register |
| `tb_gf2m_lfsr_mult`, `tb_gf2m_mo_mult` | products and the 4-cycle latency |
| `tb_mult_word_lengths` | both multipliers at word lengths 1, 2, 4, 8, 16, 32, 50, 64 and 100: products, `ceil(191/D)`-cycle latency, and that the product is held |
| `tb_gf2m_squarer`, `tb_gf2m_adder`, `tb_operand_dpram`, `tb_param_addr_mux` | the small blocks |

To run one with Verilator 5, list the packages first:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ecc_pkg.sv tb/gf_ref_pkg.sv $(ls rtl/*.sv | grep -v ecc_pkg) \
  tb/tb_ecc_top.sv --top-module tb_ecc_top -Mdir obj -o sim
./obj/sim
```

The full-size end-to-end test simulates about 40,000 cycles and finishes in
well under a second.

## Where this design makes its own choices

The source design fixes the algorithm and the costs in the tables above,
the field size, two multipliers with 50-bit words and 4-cycle
multiplications, the dual-ported operand memory, the main machine with
addition and doubling sub-machines, and the address multiplexer that
resolves parameter addresses. The following are this implementation's
choices:

* **Ladder formulas.** The source design describes its Montgomery method as
  built on Jacobian coordinates, but the operation counts it gives per step
  (4M + 1S + 2A for the addition, 2M + 4S + 1A for the doubling) are those
  of the x-only (X : Z) formulas of López and Dahab. Those formulas are used
  here.
* **Multipliers in the conversion.** The final conversion has more
  independent products than two, but it still runs on the two ladder
  multipliers, pairing products where it can.
* **Reduction trinomial.** `x^191 + x^9 + 1`, the usual one for 191-bit
  binary curves.
* **Datapath interconnect.** The unit chaining, the squaring register, two
  squarers and two adders, the operand load enables, and the 16-word memory
  map.
* **Schedules.** The cycle-by-cycle schedules of all machines, and doing the
  addition before the doubling.
* **Inversion.** The Fermat product loop. An addition chain (Itoh-Tsujii)
  would need about 10 multiplications instead of 189, and would shorten the
  conversion to about 150 cycles.
* **Affine recovery.** The y-recovery formula, and the handling of m = 0,
  Z1 = 0 and Z2 = 0.
* **Host interface.** The host port and the start/done handshake.
* **Massey-Omura basis and word length.** The type II optimal normal basis
  and the 50-bit default word length.

Known limits:

* A base point with x = 0 only works through the special cases above. Such
  a point has order 2, so this does not affect real use.
* The scalar is not reduced modulo the group order.
* The design is not protected against side-channel attacks, apart from the
  ladder's fixed operation sequence per bit. Run time still depends on the
  position of the leading one bit.

The source design reported about 17,000 4-input LUTs, 3,600 flip-flops and
20 MHz on a Xilinx XCV2000E. No FPGA mapping was done for this RTL.
