# Dual quaternion multiplication accelerators (FP32, AXI4 slave)

A dual quaternion holds a rigid-body pose, a rotation and a translation together,
in eight numbers:

    P = Pr + eps * Pd,   eps^2 = 0

Here `Pr` is the rotation quaternion, and `Pd = t*Pr/2` carries the translation `t`.
Composing two poses, and moving a point by a pose, is a dual quaternion
product. A small RISC-V core without a floating-point unit spends most of its
time on these products, so this RTL moves them into hardware. There are two
accelerators, each an AXI4 slave with its own single-precision floating-point
arithmetic:

| | Dual Quaternion IP (`dq_ip`) | Quaternion IP (`quat_ip`) |
|---|---|---|
| one operation computes | a full dual quaternion product, 8 x 8 -> 8 words | one quaternion product, 4 x 4 -> 4 words |
| FP32 multipliers / adders | 24 / 64 | 8 / 28 |
| core latency | 4 cycles | 3 cycles |
| a dual quaternion product costs | 1 operation | 3 operations + 1 quaternion addition on the host |

The Dual Quaternion IP is the fast one. The Quaternion IP has about a third of
the arithmetic. It is also useful for plain quaternion work.
`dq_accel_top` instantiates both side by side, each on its own AXI4 port. A
system that wants only one of them leaves the other port unconnected.

This RTL is an implementation of the accelerator described in *Dual Quaternion
Hardware Accelerator for RISC-V based System*. That description fixes the
arithmetic (the product formulas, the 24-multiplication / 64-addition count,
IEEE 754 single precision, an own FPU) and the system role (an AXI4 slave
reached through a byte-addressable register space). It leaves the
micro-architecture, register map, latencies and floating-point corner cases
open. Those are choices made here, listed in
[Where this departs from or adds to the source](#where-this-departs-from-or-adds-to-the-source).

## Element order and the product

Both IPs use IEEE 754 binary32 words. A quaternion is `(w, x, y, z)` = the
coefficients of `(1, i, j, k)`. A dual quaternion is eight words in the order

    index:   0  1  2  3  4      5      6      7
    basis:   1  i  j  k  eps*i  eps*j  eps*k  eps

Note that the dual scalar is *last*. The real part is `Pr = (P0, P1, P2, P3)` and
the dual part, written as a `(w, x, y, z)` quaternion, is `Pd = (P7, P4, P5, P6)`.
In the packed types of `fp32_pkg` (`quat_t`, `dquat_t`) element 0 is in the
low 32 bits.

Because `eps^2 = 0`, the product `T = P*Q` is

    Tr = Pr*Qr
    Td = Pr*Qd + Pd*Qr

where `*` is the Hamilton product:

    (a*b).w = a0 b0 - a1 b1 - a2 b2 - a3 b3
    (a*b).x = a0 b1 + a1 b0 + a2 b3 - a3 b2
    (a*b).y = a0 b2 - a1 b3 + a2 b0 + a3 b1
    (a*b).z = a0 b3 + a1 b2 - a2 b1 + a3 b0

Written out directly this needs 48 multiplications.

## The 24-multiplication datapath

This is the part of the design that is least obvious from the code.

**One quaternion product with 8 multiplications.** The product is written as
eight pairwise products of sums, followed by a fixed linear combination
(`quat_pre_left`, `quat_pre_right`, `quat_post`):

    s = (a0+a1, a3-a2, a0-a1, a2+a3, a1+a3, a1-a3, a0+a2, a0-a2)     8 adds
    t = (b0+b1, b2-b3, b2+b3, b0-b1, b1+b2, b1-b2, b0-b3, b0+b3)     8 adds
    (A,B,C,D,E,F,G,H) = s .* t                                       8 mults
    w = B + ((G+H) - (E+F))/2
    x = A - ((E+F) + (G+H))/2
    y = C + ((E-F) + (G-H))/2
    z = D + ((E-F) - (G-H))/2                                       12 adds

The halvings are exponent decrements (`fp32_half`), not multipliers.
`quat_mul` (the Quaternion IP core) is exactly this: 16 + 12 adders and
8 multipliers.

**Three quaternion products with shared work.** `dq_mul` needs `Pr*Qr`,
`Pr*Qd` and `Pd*Qr`. It uses two properties of the factorisation:

* The `s` vector depends only on the left operand and `t` only on the right
  one. `s(Pr)` therefore serves both `Pr*Qr` and `Pr*Qd`, and `t(Qr)` serves
  both `Pr*Qr` and `Pd*Qr`. Only four pre-addition blocks are needed:
  32 adders.
* The post-combination is linear. The two dual-part products therefore do not
  need two post networks: their eight-element product vectors are added first
  (8 adders) and go through a single `quat_post`.

The totals are 24 multipliers and 32 + 8 + 2 x 12 = 64 adders. These are the
counts the source gives for its optimised algorithm.

**Pipeline.** Registers sit after the pre-additions, after the multipliers,
after the dual-part sums and after the post-additions:

    cycle 0  in_valid, operands        -> pre-additions (1 FP add deep)
    cycle 1  24 multipliers            (1 FP mul deep)
    cycle 2  8 dual-part sums          (1 FP add deep)
    cycle 3  post-additions            (3 FP adds deep)
    cycle 4  out_valid, result

`quat_mul` has no dual-part stage: its latency is 3 cycles. Both cores accept
a new operand pair every cycle. Through the AXI4 wrappers only one operation
is in flight at a time. Only the valid bits are reset; the data registers
simply follow.

**Rounding.** The factorised product rounds differently from the textbook
formula. It rounds after each pre-addition, product and post-addition,
including a cancellation in the post network, so results typically differ from
the directly evaluated formula by a few units in the last place, relative to
the size of the terms. Example: P = (1,...,8), Q = (0.1,...,0.8) gives
`c0333333 3eccccce 3f199998 3f4ccccd 40866667 40c00001 40f9999b c1199999`, which is
(-2.8, 0.4, 0.6, 0.8, 4.2, 6.0, 7.8, -9.6). The testbenches accept an error of
1e-6 times the sum of the magnitudes of all partial products. Operands with
very different magnitudes can lose more precision than a direct evaluation
would.

## Floating-point units

`fp32_add` (add/subtract) and `fp32_mul` are combinational. The cores place
all registers.

* Rounding is to nearest, ties to even. Guard, round and sticky bits are used
  in the adder; guard and sticky in the multiplier.
* Subnormal inputs are read as zero. Results below the normal range are
  flushed to a signed zero, and so is a halving of the smallest normal value.
* Overflow gives a signed infinity. NaN operands, `inf - inf` and `0 * inf`
  give the quiet NaN `0x7fc00000`. An exact cancellation gives `+0`.

The adder uses a single significand adder: the subtrahend is inverted, and all
shifts are computed unconditionally and selected afterwards. This keeps
synthesis tools from trying to share operators across the two paths, which
made flattened synthesis of the cores very slow.

## Host interface: the Byte-RAM

Each IP is an AXI4 slave built around `axi4_byte_ram`, a small register space
that the host reads and writes like memory. Byte offsets within an IP's
window:

| offset | name | access | meaning |
|---|---|---|---|
| `0x00` | CTRL | W | write 1 to bit 0 to start; reads 0 |
| `0x04` | STATUS | R | bit 0 busy, bit 1 done |
| `0x40 + 4i` | A[i] | R/W | left operand, i < 8 (DQ) or 4 (Q) |
| `0x80 + 4i` | B[i] | R/W | right operand |
| `0xC0 + 4i` | C[i] | R | result |

A host computes one product like this:

    write A[0..n-1]            (one INCR burst)
    write B[0..n-1]            (one INCR burst)
    write CTRL = 1
    poll STATUS until bit 1
    read  C[0..n-1]            (one INCR burst)

**Timing.** The start pulse comes one cycle after the W beat that writes CTRL.
`done` is set when the result is stored: 5 cycles after start for `dq_ip`,
4 for `quat_ip`. `done` stays set until the next start, and `busy` covers the
interval in between. A start while busy is ignored. The operands are sampled
into the core's first pipeline stage on the start cycle. They may be
rewritten for the next operation as soon as the host has seen the write
response for CTRL.

**AXI4 details.**
* 32-bit data, 4-bit ID, 32-bit address of which the low 8 bits are decoded
  (widths in `axi4_pkg`).
* Byte strobes are honoured on the operand words.
* INCR and FIXED bursts of up to 256 beats are supported. WRAP is treated as
  INCR.
* One write burst and one read burst are served at a time. The write and read
  channels run independently.
* AW is accepted only when idle. W beats are taken one per cycle and B
  follows the last one. R beats go out one per cycle while RREADY is high.
  Each R beat is sampled when it is put on the bus and held stable until
  accepted.
* Unmapped addresses read zero. Writes to unmapped or read-only locations are
  dropped. Every response is OKAY.
* Concurrent assertions check that B and R stay valid and stable until
  accepted.

## Using the Quaternion IP for dual quaternions

One operation on `quat_ip` is one Hamilton product `a*b`. For `T = P*Q` the
host runs three operations and one addition:

    C0 = Pr*Qr              -> T0..T3
    C1 = Pr*Qd,  C2 = Pd*Qr -> (T7, T4, T5, T6) = C1 + C2

The same IP serves ordinary quaternion work (rotations, attitude) at a third
of the Dual Quaternion IP's multiplier count.

## Kinematics on top of the product

Translation, rotation and transformation of a point `p` are host sequences of
products. They use the point form `1 + eps*p` and the conjugate
`conj(P) = (P0, -P1, -P2, -P3, P4, P5, P6, -P7)`:

* translation by `d`: `D = 1 + eps*d/2`, `p' = D * p * conj(D)` (2 products)
* rotation by unit quaternion `r`: `p' = r * p * conj(r)` (2 products)
* transformation: `C = R*D`, `p' = C * p * conj(C)` (3 products)

Example: point (3, 4, 5), displacement (4, 2, 6), roll 180 degrees. The
transformation gives `(1, 0, 0, 0) + eps(7, -6, -11)`, with the dual scalar 0.
`tb_dq_workloads` runs all three, and the host-side trigonometry stays
in software.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_fp32_add` | 20 000 random add/sub against a correctly rounded reference; signed zeros, cancellation, inf, NaN, overflow, ties to even, subnormal input |
| `tb_fp32_mul` | 20 000 random products; zeros, inf, 0*inf, NaN, overflow, underflow, subnormal input |
| `tb_quat_mul` | the example (1,4,5,6)*(4,2,7,3) = (-57,-9,27,45) bit-exact; latency 3; 2000 back-to-back random products |
| `tb_dq_mul` | the example above, bit-exact and in value; latency 4; 2000 back-to-back random products |
| `tb_axi4_byte_ram` | burst read-back, byte strobes, FIXED bursts, read-only and unmapped space, start pulse, busy/done, back-pressure |
| `tb_dq_ip`, `tb_quat_ip` | AXI4-level operations with random back-pressure, examples, 100 random products, core latency, start-while-busy |
| `tb_dq_accel_top` | both IPs at their defaults. Each product is computed on the DQ IP and, in parallel, on the Q IP (3 operations + host add), both against a reference. It counts bursts, byte-strobe writes, back-pressure, busy polls, done clearing, ignored starts and simultaneous traffic, and fails if any never happened |
| `tb_dq_workloads` | 100 products on each IP with per-product cycle counts at the AXI4 port; translation, rotation, and the transformation example above |

The reference model (`tb_fp_pkg`) evaluates the products from their
definitions in double precision. It does not use the factorisation. Its
single-precision conversion is written on bit patterns, so it does not depend
on a simulator's `shortreal` support. The AXI4 master model is
`tb_axi_master`.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_dq_accel_top \
      -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/axi4_pkg.sv rtl/fp32_pkg.sv tb/tb_fp_pkg.sv tb/tb_dq_accel_top.sv
    ./obj_dir/Vtb_dq_accel_top

Each testbench finishes in a few seconds. `tb_dq_accel_top` runs the top with
no parameter overrides. The design has no size parameters: the only module
parameter is `NE` of `axi4_byte_ram`, which the wrappers set to 8 and 4.

## Where this departs from or adds to the source

* **Algorithm.** The source states 24 multiplications and 64 additions but
  does not print the algorithm. It prints only the direct formulas. The
  factorisation above meets both counts, but its rounding is not necessarily
  the source's. The example output above matches the source's example to the
  printed precision.
* **Floating-point behaviour.** The following are choices made here:
  flush-to-zero for subnormals, a single quiet NaN, round-to-nearest-even and
  combinational units.
* **Register map, handshake, latencies, reset.** All are choices made here.
  The source says only that the IP is an AXI4 slave mapped into the host's
  memory and that a "Byte-RAM" mediates the transfer. Reset is synchronous
  and active low.
* **Both IPs in one top.** The source offers them as alternative builds. Here
  they are instantiated side by side.
* **Not included.** The host processor (a Shakti E-class RISC-V core), the
  SoC's AXI4 interconnect and its timer are not included. The host software
  for translation, rotation and transformation, including the
  angle-to-quaternion trigonometry, exists only as testbench code.
* **Performance.** The source measures whole-program cycle counts on the host
  processor, for example about 10 000 cycles per dual quaternion product with
  the Dual Quaternion IP against about 306 000 in software. Those counts are
  dominated by host software and are not reproduced here. At the AXI4 port,
  with a master that never waits, one product takes about 38 cycles on the
  Dual Quaternion IP and about 78 on the Quaternion IP, host addition not
  included.

## Files

| file | contents |
|---|---|
| `rtl/fp32_pkg.sv` | FP32, quaternion and dual quaternion types, `fp32_half` |
| `rtl/axi4_pkg.sv` | AXI4 channel structs, register map constants |
| `rtl/fp32_add.sv`, `rtl/fp32_mul.sv` | FP32 adder/subtractor and multiplier |
| `rtl/quat_pre_left.sv`, `rtl/quat_pre_right.sv`, `rtl/quat_post.sv` | the three parts of the 8-multiplication quaternion product |
| `rtl/quat_mul.sv`, `rtl/dq_mul.sv` | pipelined quaternion and dual quaternion cores |
| `rtl/axi4_byte_ram.sv` | AXI4 slave register space |
| `rtl/quat_ip.sv`, `rtl/dq_ip.sv` | the two accelerators |
| `rtl/dq_accel_top.sv` | both accelerators side by side |
| `tb/tb_fp_pkg.sv`, `tb/tb_axi_master.sv` | reference model, AXI4 master model |
| `tb/tb_*.sv` | testbenches |
