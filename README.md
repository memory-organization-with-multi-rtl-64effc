# 2D multi-pattern parallel memory

Vector and media processors often need a whole 2D block of words in one cycle. The block may be
a rectangle, a set of strided rows or columns, or a grid of small tiles. This memory stores an
M x N word array in a VD x HD matrix of independent memory modules. It reads or writes a
programmable 2D pattern at up to VD x HD words per clock cycle, with no two words of one access
falling in the same module.

The main idea is that no single data layout is conflict-free for every stride and group length.
So the pattern is classified at run time into one of six cases, and each case has its own
*module assignment function* (skewing scheme) and its own element order. The address logic is
separable: a vertical side and a horizontal side, each working on one address component, are
identical. Their cost therefore grows with VD + HD rather than with VD x HD.

The default build is 8 x 8 modules of 64-bit words, with a 10-bit row address per module. That is
1024 words per module and a 256 x 256 word array (4 Mbit).

## The access pattern

A pattern is given by these values, which are held in special purpose registers (SPRs):

| SPR | index | meaning |
|---|---|---|
| `BASE` | 0 | linear base address b' = vb*N + hb (vb is the row, hb the column of the first word) |
| `VS`, `HS` | 1, 2 | vertical / horizontal stride S, in words, between the starts of adjacent groups |
| `VGL`, `HGL` | 3, 4 | group length GL: consecutive words per group along that side |
| `VBL`, `HBL` | 5, 6 | block length BL: number of groups along that side |

The pattern is the set of words

    va = vb + i*VS + k,   i in [0,VBL), k in [0,VGL)
    ha = hb + j*HS + l,   j in [0,HBL), l in [0,HGL)

For example, VGL x HGL = 2 x 4 groups, arranged 2 x 3 with strides (4, 5), make a pattern of six
tiles. The two components do not interact. From here on everything is described for one side,
with D modules along it (D = VD or HD, a power of two 2^d).

## The six cases

Write the stride as S = sigma * 2^s with sigma odd. Whether groups or blocks are walked first is
decided by comparing two access counts: ceil(BL/D)*GL ("block-major") against ceil(GL/D)*BL
("group-major"). The mode select unit picks the case:

| case | condition | module m(a) | order per access | accesses |
|---|---|---|---|---|
| I   | S odd, block-major cheaper | a mod D | D groups i, same k | ceil(BL/D)*GL |
| II  | (S odd, or S even and GL not 2^x), group-major not dearer | a mod D | D elements k, same group i | ceil(GL/D)*BL |
| III | S even, GL not 2^x, block-major cheaper, s >= d | (a + floor(a / 2^s)) mod D | as I | ceil(BL/D)*GL |
| IV  | S even, GL not 2^x, block-major cheaper, s < d | (a + (floor(a/D) mod 2^s)) mod D | as I | ceil(BL/D)*GL |
| V   | S even, GL = 2^x, s >= d | (a + GL*floor(a / 2^s)) mod D | D consecutive elements, k fastest | ceil(GL*BL/D) |
| VI  | S even, GL = 2^x, s < d | (a + (GL*floor(a/D) mod 2^s)) mod D | as V | ceil(GL*BL/D) |

GL = 1 counts as 2^0. In cases V and VI, the words of the pattern are numbered e = i*GL + k and
taken D at a time. Because GL is a power of two, splitting e back into (i, k) is a shift and a
mask. Cases V and VI use every module on every access except the last one. Cases I to IV leave
modules idle when BL (or GL) is not a multiple of D.

The two sides are stepped as nested loops: the horizontal side advances every cycle and the
vertical side advances when the horizontal side wraps. An access command therefore takes exactly
t = t_v x t_h cycles, with t_v and t_h taken from the table. One access per cycle is the full
bandwidth: at 310 MHz the 8 x 8 x 64-bit build moves 4096 bits per cycle, which is 1182 Gibit/s.

### Where a word lives

Word (va, ha) is stored in module (m_v(va), m_h(ha)), at row

    A = floor(va/VD) * (N/HD) + floor(ha/HD)

The vertical row part forms the upper row address bits and the horizontal part the lower bits. No
logic is needed for this. Every module assignment function above rotates the low d address bits
by an amount that depends only on floor(a/D). So each case is a valid one-to-one layout, but the
layouts differ between cases.

**A region must be read with a pattern of the same case (per side) as it was written with.** The
exception is cases I and II, which share the layout a mod D. For instance, data written with
strided groups in case I can be read back as one dense case-II block. Mixing layouts returns
other words than intended. The hardware does not detect this, because it keeps no record of
how a region was written.

## Structure

```
            SPRs (pm_spr_file)
          /                     \
 vertical side (pm_addr_side)    horizontal side (pm_addr_side)
   mode select  (pm_mode_select)     same, on ha
   address gen  (pm_addr_gen)
   row address  (bit field a >> d)
   module assign(pm_module_assign)
   addr shuffle (pm_shuffle)
          \                     /
   VD x HD module matrix (pm_mem_module), enable = row used AND column used,
   row address = {vertical row part, horizontal row part}
   write data: pm_shuffle over module rows, then over module columns
   read data : pm_deshuffle over module columns, then over module rows
```

Each side outputs its lanes' addresses and module indices in *lane order*, which is the order
the client sees. It also outputs, in *module order*, the row part and an enable for each module.
The shuffle units are demultiplexers with OR-ed outputs. The de-shuffle units are one multiplexer
per lane. The read path registers the module indices of the access, so the de-shuffle lines up
with the memory's one-cycle read latency.

The critical path runs through the address generator's multiply-add (base + i*S + k), the
module assignment adder and the shuffle decoders. None of these is pipelined in this RTL.

## Interface of `pm_top`

Parameters: `VD`, `HD` (module matrix, powers of two, default 8 and 8), `WB` (word bytes, default
8) and `WA` (module row address bits, default 10). The vertical address has log2(VD) + WA/2 bits
and the horizontal address has log2(HD) + WA - WA/2 bits.

* **SPRs:** `spr_we`, `spr_addr`, `spr_wdata` write a register at the clock edge. `spr_rdata` reads
  the register at `spr_addr` back, combinationally. Writes are ignored while an access runs.
  Writing 0 to a stride or length stores 1. Reset gives a single word at address 0.
* **Command:** `cmd_valid` while `cmd_ready` starts one access of the whole programmed pattern.
  `cmd_write` = 1 means write, 0 means read.
* **Accesses:** from the next cycle, `acc_valid` is high for t cycles. `acc_va[p]`, `acc_ha[q]`,
  `acc_lane_v`, `acc_lane_h` give the lane addresses and masks of the current access. `done`
  marks the last access. `mode_v` and `mode_h` show the selected cases.
* **Write:** in each cycle with `wr_ready`, `wr_data[p][q]` is stored at (`acc_va[p]`, `acc_ha[q]`)
  for valid lanes. The lane addresses are known before the cycle, so a client can prepare the
  data.
* **Read:** one cycle after each read access, `rd_valid` is high. `rd_data[p][q]` then holds the
  word at (`rd_va[p]`, `rd_ha[q]`), and invalid lanes read 0. `rd_last` marks the final beat.
* **`conflict`:** high in an access where one side put two different addresses on one module.
  See below.

Addresses wrap modulo M and N. A pattern that runs past the array edge wraps around, and
conflict-freedom is not guaranteed there.

## Departures and open points

* **Case VI with odd-multiple strides.** The layouts are built for strides 2^s and are meant to
  serve every stride sigma*2^s as well. An exhaustive model shows this does not hold in
  case VI when sigma > 1. One example is D = 8, S = 10, GL = 4, base 71: an access that spans two
  groups can put two words in one module. For pure powers of two (sigma = 1) and for every other
  case, no conflict was found. The RTL keeps the published function. It raises `conflict` on such
  accesses, and the words of those accesses are not reliable. A user can avoid the problem by
  choosing S = 2^s, or a GL that is not a power of two (which gives case II or IV), in that
  situation.
* **Case VI function.** Its printed form reduces GL*floor(a/D) modulo the stride's power of two
  2^s, as in the theorem it relies on. That form is used here.
* **Write data path.** The organization defines an address shuffle and a read de-shuffle. Write
  data needs the same routing as the addresses, so here it goes through two more shuffle stages.
* **Address generator counters.** The organization uses two double counters and a simple counter
  in the address generator. Here, one pair of counter registers is reinterpreted for each order. The
  sequences produced are the same.
* **Choices of this design:** SPR map and widths (32-bit base, 16-bit strides and lengths), the
  command and stream handshake, the one-cycle read latency, the SPR lock, and treating zeros as
  ones. These are not specified by the scheme.
* **Sizes.** The organization is meant for 2x2 to 8x8 matrices with W = 4 or 8 bytes and a 10-bit
  row address. All are reachable through the parameters. The row address is split evenly between
  the vertical and horizontal sides (for 2 x 8 that is a 64 x 256 array). The split is an
  assumption. Timing and area figures are not reproduced.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). It ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog. `tb/pm_ref_pkg.sv` is an
independent integer model of the scheme, which the testbenches compare against. It covers case
selection, the six module functions, the three element orders and the access counts.

* `tb_pm_mode_select`, `tb_pm_addr_gen`, `tb_pm_module_assign` and `tb_pm_addr_side` run every
  case and hundreds of random patterns. They check addresses, masks, module indices, routed row
  parts, `last`, and the number of accesses.
* `tb_pm_module_assign` also checks that conflicts appear only in case VI, and that the flag
  matches a pairwise search.
* `tb_pm_top` runs the full default build. Over a set of directed and random patterns, it keeps a
  model of every module's contents, placed with the reference functions, and predicts every read
  from it. It checks that each command takes t_v x t_h cycles. At the end it looks inside every
  module to confirm that each written word sits in the module and row the scheme prescribes. It
  requires that each of these happens: all six cases on both sides, multi-cycle and partial
  accesses, a read with a different pattern of the same layout, an ignored SPR write, and a
  flagged conflict.

* `tb_pm_top_configs` runs the other eleven sizes (2x2, 2x4, 2x8, 4x4, 4x8 and 8x8 modules, with
  32-bit and 64-bit words) side by side through `tb/pm_cfg_harness.sv`. Each size gets random
  patterns with the same placement model.

To simulate with Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pm_top \
  -y rtl -y tb +libext+.sv rtl/pm_pkg.sv tb/pm_ref_pkg.sv tb/tb_pm_top.sv
./obj_dir/Vtb_pm_top
```

Replace `tb_pm_top` with any other testbench name. `tb_pm_top_configs` takes about a minute to build. The full-size top builds in about half a
minute and runs in well under a second.
