# 128x128 Vedic multiplier with modified linear carry select adders

This is a combinational unsigned multiplier, `p = a * b`, for 128-bit operands
and a 256-bit product. It is built by recursion on the Urdhva Tiryakbhyam
("vertically and crosswise") rule of Vedic arithmetic. An N x N product is made
from four (N/2) x (N/2) products, two "vertical" ones (high x high, low x low)
and two "crosswise" ones (low x high, high x low). Three N-bit adders then
merge them. The recursion bottoms out in a 2x2 multiplier made of two half
adders.

All adders are *modified linear carry select adders* (CSLAs). A regular CSLA
computes each group of sum bits twice, with a carry in of 0 and of 1, and a
multiplexer picks one. The modified CSLA computes the carry-in-0 result only.
It gets the carry-in-1 result from a *binary to excess-1 converter* (BEC), a
short chain of AND and XOR gates that adds one. That saves most of the second
adder's area, which is the point of the design.

There are no registers and no clock. The product settles after the longest
carry path.

## Hierarchy

```
vm128x128                      top: 4 x vm64x64 + 3 x mlcsla(128)
 └ vm64x64                     4 x vm32x32  + 3 x mlcsla(64)
    └ vm32x32                  4 x vm16x16  + 3 x mlcsla(32)
       └ vm16x16               4 x vm8x8    + 3 x mlcsla(16)
          └ vm8x8              4 x vm4x4    + 3 x mlcsla(8)
             └ vm4x4           4 x vm2x2    + 3 x mlcsla(4)
                └ vm2x2        4 AND + 2 x half_adder
mlcsla(N)                      rca(G) for group 0; per later group:
                               rca(G) + bec(G+1) + mux2(G+1)
rca(W)                         W x full_adder
```

Each size has its own module (`rtl/vmNxN.sv`), so every level can be used on
its own as a 4x4 … 128x128 multiplier. All levels have the same structure. In
total the 128x128 multiplier contains 4096 2x2 cells and 1365 merge levels,
so 4095 adders (3072 of them at 4 bits, down to 3 at 128 bits).

## The merge of four sub-products (vmNxN)

With H = N/2, write `a = {Ah, Al}` and `b = {Bh, Bl}`. The four sub-multipliers
give N-bit products:

| name | product | weight |
|------|---------|--------|
| `hh` | Ah x Bh | 2^N    |
| `lh` | Al x Bh | 2^H    |
| `hl` | Ah x Bl | 2^H    |
| `ll` | Al x Bl | 1      |

These are merged by three N-bit CSLAs, with every carry in tied to 0:

```
CSLA1:  sum1 = lh + hl                                  carry C1
CSLA2:  sum2 = sum1 + { H zeros,     ll[N-1:H] }        carry C2
CSLA3:  p[2N-1:N] = hh + { H-1 zeros, C, sum2[N-1:H] }  carry C3
        with C = C1 | C2
p[N-1:H] = sum2[H-1:0]
p[H-1:0] = ll[H-1:0]
```

The low H bits of `ll` are final product bits and pass straight through. CSLA2
adds the upper half of `ll` into the cross-product sum, and the low half of
that result is the next H product bits. Everything left over has weight 2^N or
more. That is the upper half of `sum2`, plus a carry of weight 2^(N+H), which
CSLA3 adds to `hh`.

The carry of weight 2^(N+H) can come out of CSLA1 (C1) or out of CSLA2 (C2),
but never out of both. That is because `lh + hl + ll[N-1:H]` is less than
2 x 2^N. So an OR gate is enough to join them, and the carry lands at bit H
of CSLA3's second operand. C3 is the carry out of CSLA3. The design brings it
out as a port, but it is always 0, because a 2N-bit product cannot overflow.
The sub-multipliers' own C3 outputs are left open for the same reason.

Both carries do occur. C1 is common for dense operands. C2 without C1 needs
the cross-product sum just below 2^N. One such input is
`a = {H'(2), H'(all ones)}`, `b = all ones`. The testbenches apply it
explicitly, because random operands almost never produce it at 32 bits and
above.

## The 2x2 cell (vm2x2)

`S0 = A0·B0`. A half adder adds the crosswise terms `A1·B0 + A0·B1`, giving
`S1` and `C1`. A second half adder adds `A1·B1 + C1`, giving `S2` and `C2`,
and `C2` is the top product bit. That makes 4 AND gates, 2 XORs and 2 more
ANDs.

## Modified linear carry select adder (mlcsla)

`mlcsla #(N, G)` computes `{co, s} = a + b + ci`. The operands are cut into
N/G equal groups of G bits. "Linear" means all groups have the same size, in
contrast to a square-root CSLA, whose groups grow.

- Group 0 knows its carry in. It is a plain G-bit ripple carry adder (`rca`).
- Each later group k has:
  - one G-bit `rca` with carry in 0, giving `{cout0, sum0}`;
  - a (G+1)-bit `bec` that turns `{cout0, sum0}` into `{cout0, sum0} + 1`,
    which is the result the group would give with carry in 1;
  - a (G+1)-bit `mux2`, selected by the carry out of group k-1, that gives
    the group's sum bits and its carry out.

All group adders and BECs work at the same time. After that, only the select
carry moves from group to group, through one mux per group. The critical path
is therefore one G-bit ripple followed by N/G - 1 mux stages, and it grows
linearly with N. The default G = 2 gives 3-bit BECs and 63 mux stages in the
128-bit adder. A larger G (a multiple that divides every adder width, e.g. 4)
shortens the mux chain and lengthens each ripple.

The BEC sets bit 0 to `~b0` and bit i to `bi XOR (b0 & … & b(i-1))`.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `vm4x4` … `vm128x128` | `G` | 2 | group size of every CSLA inside; must divide 4 (the smallest adder), so 1, 2 or 4 |
| `mlcsla` | `N`, `G` | 128, 2 | adder width, group size (N must be a multiple of G; checked at elaboration) |
| `rca` | `W` | 2 | width |
| `bec` | `W` | 3 | width (group size + 1) |
| `mux2` | `W` | 3 | width |

The operand widths of the multipliers are fixed by the module, not by a
parameter, because each level is a separate module.

## Interface

`vm128x128`: inputs `a[127:0]`, `b[127:0]`; outputs `p[255:0]` (the product)
and `c3` (always 0). Smaller sizes have the same ports at their widths. `vm2x2`
has no `c3`. Operands are unsigned. There is no handshake and no latency in
cycles: drive the inputs and read `p` once the logic has settled.

## Choices made in this implementation

The multiplier structure is the design's own. So are the 2x2 cell, the operand
split, the three adders per level, the zero padding, the OR of C1 and C2 and
the BEC idea. The following were chosen here:

- **Group size G = 2.** The design uses a linear CSLA with a BEC but does not
  fix the group width. With G = 2 every BEC is 3 bits. Even the 4-bit adders of
  the 4x4 level then have one selected group instead of collapsing into a
  single ripple adder.
- **Group 0 is a plain ripple adder** that takes the carry in directly. That
  is the usual form of the modified CSLA.
- **A carry-in port on `mlcsla`.** It is tied to 0 everywhere in the
  multipliers.
- **All three adders at the 4x4 level are modified linear CSLAs,** as at every
  other level. Regular (two-RCA) CSLAs are the baseline the design improves on,
  and are not included.
- **Gate forms** of the half adder, full adder and BEC are the textbook ones.
- **Unsigned operands; purely combinational; no reset.**

Square-root CSLAs have a gate depth of O(√n). With equal groups, this adder
has a linear select chain, as its name says.

## Size

After coarse synthesis with yosys (word-level cells), `vm128x128` has about
118k cells: 57k ANDs, 35k XORs, 9k ORs and 8k muxes, all combinational. A
128-bit `mlcsla` is 640 cells.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares with
results the simulator computes itself (`+`, `*`), prints
`TB_RESULT checks=N failures=M` and stops at a watchdog time limit.

- `tb_half_adder`, `tb_full_adder`, `tb_vm2x2`, `tb_mux2`: all inputs.
- `tb_rca`: all inputs at W = 2 and W = 6.
- `tb_bec`: all inputs at W = 3 and W = 9.
- `tb_mlcsla`:
  - 128 bits: directed corners, such as a carry rippling from carry in to
    carry out, plus 3000 random pairs of varied bit density;
  - 4 bits: all inputs;
  - 12 bits with G = 3: 3000 random pairs.
  - It also fails unless the BEC path and the full ripple were both exercised.
- `tb_vm4x4`, `tb_vm8x8`: all operand pairs (256 and 65536).
- `tb_vm16x16` … `tb_vm128x128`: corners (zero, one, all ones, walking single
  bits and single zeros, the C2-only case), then random operands (20000 at
  16 and 32 bits, 10000 at 64, 30000 at 128). Each also checks that `c3` stays
  0. Each fails unless C1 and C2 were both seen, since C1 and C2 are what the
  OR joins.
- `tb_vm_group_sizes`: the 32x32 multiplier with G = 1 and G = 4, on
  corners and 10000 random pairs.

`tb_vm128x128` runs the whole design at its default parameters. It takes a
few seconds.

Each testbench was also run against a copy of its module with one deliberate
fault, and caught it. For example, C1 and C2 were joined with AND instead of
OR, the BEC was fed a 0 instead of the group carry, and the mux inputs were
swapped.

To simulate with Verilator (5.x), from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_vm128x128 tb/tb_vm128x128.sv
./obj_dir/Vtb_vm128x128
```

Any other testbench works the same way. Verilator finds the submodules in
`rtl/` by their file names. For lint, use
`verilator --lint-only -Wall -Irtl rtl/vm128x128.sv`. The only warnings are
the deliberately open `c3` pins of the sub-multipliers.

## Limits

- There are no timing constraints or pipeline registers. The full 128x128
  path is one long combinational cone, dominated by the linear mux chains of
  the adders at every level. If the multiplier has to run at a clock rate,
  register the operands and the product outside it, or split it between
  levels.
- The FPGA resource and power figures that come with this architecture belong
  to a vendor flow and are not reproduced here.
