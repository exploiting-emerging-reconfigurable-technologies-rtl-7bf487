# Key-locked logic from reconfigurable nanowire transistors

A silicon-nanowire reconfigurable FET (RFET) has two gates. The control gate
switches the channel, as in an ordinary MOSFET. The program gate picks the
carrier type, so one device can act as p-type or as n-type. Gates built from
such devices are *polymorphic*: one physical cell with one program input is a
NAND or a NOR, or an XNOR or an XOR, depending on that input. Looking at the
layout does not tell you which.

This design uses that for IP protection. Each gate's program input is a key
bit. The netlist computes its intended function only when the whole key is
right, and a reverse engineer who copies the layout gets a circuit without its
key. Inverters add something of their own: an RFET inverter inverts for either
program value. Its key bit is therefore a *don't-care* that can be set freely,
and those free bits can make 0s and 1s in the key equally common.

The RTL models this at logic level. A 2-bit ripple-carry adder is mapped onto
18 polymorphic cells and locked by an 18-bit key. The adder is built twice:

- from RFET gates, which are assembled transistor by transistor from a switch
  model of the device;
- from their CMOS equivalent, where each cell is a set of fixed gates plus a
  multiplexer driven by the key bit.

Everything is combinational. There is no clock, no state and no latency.

## The device and its gates

`rfet_fet` is one transistor as a switch. Its output `on` means "the channel
conducts". It is modelled as a p-type view (`~cg`) and an n-type view (`cg`),
with the program gate choosing between them. With `pg=1` the device is n-type,
so it conducts when `cg=1`. With `pg=0` it is p-type, so it conducts when
`cg=0`. Put shortly, a device conducts when `cg == pg`. The source names no
polarity. This one was chosen because it is the only one under which the gates
below get the functions their key convention gives them.

Each gate has two networks. One runs from the output to a rail held at `~p`,
the other to a rail held at `p`. When `p` flips, pull-up and pull-down swap
roles. Exactly one network conducts for every input, and an immediate assertion
in each gate checks this.

| cell | devices | network on rail `~p` | network on rail `p` | p=0 | p=1 |
|---|---|---|---|---|---|
| `rfet_nand_nor` | 4 | a ∥ b, programmed by p | a – b in series, programmed by ~p | NAND | NOR |
| `rfet_xnor_xor` | 8 | (a–b) ∥ (~a–~b), programmed by p | (~b–a) ∥ (b–~a), programmed by ~p | XNOR | XOR |
| `rfet_inv` | 2 | a, programmed by p | a, programmed by ~p | NOT | NOT |

In the XNOR/XOR cell, the `~p` network conducts when `a == b`, whatever `p` is.
The output is then `~p` when the inputs are equal and `p` when they differ. In
the inverter, the device that conducts always drives the output to `~a`, and
that is why its key bit does not matter.

The CMOS equivalents have the same ports and the same key convention:

- `cmos_nand_nor_mux`: a NAND, a NOR and a 2:1 mux. Select 0 passes the NAND.
- `cmos_xnor_xor_mux`: an XNOR, an XOR and a 2:1 mux. Select 1 passes the XOR.
- `cmos_inv_mux`: an inverter followed by a mux whose two data inputs are both
  the inverter output. The cell then looks like every other keyed cell, but its
  select line is a don't-care.

`poly_nand_nor`, `poly_xnor_xor` and `poly_inv` are thin wrappers. Their `IMPL`
parameter (`IMPL_SINW` or `IMPL_CMOS`, from `rfet_key_pkg`) picks between the
two realisations.

## The locked adder (`keyed_rca2`)

The netlist is the result of technology-mapping the adder onto the RFET cell
library. The node numbers are those of the mapped netlist:

```
n10 = nand(cin,a0)   n13 = nand(cin,b0)   n12 = nand(a0,b0)
n11 = ~n10           n14 = nand(n13,n12)  n15 = nor(n11,n14)     -- ~carry1
n17 = xnor(a0,b0)    n18 = xnor(cin,n17)                         -- sum0
n9  = xor(a1,b1)     n16 = xnor(n15,n9)                          -- sum1
n21 = nand(a1,b1)    n22 = ~n21   n23 = ~b1   n19 = ~n15
n24 = nor(n15,n23)   n25 = nor(n24,n22)
n20 = nand(n19,a1)   n26 = nand(n20,n25)                         -- cout
```

That is 7 NAND, 3 NOR, 1 XOR, 3 XNOR and 4 inverters, so 18 key bits. The key
is read level by level from the inputs to the outputs, left to right within a
level. The levels are as-late-as-possible levels: a gate sits one level below
its earliest consumer.

| level | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|
| nodes | n10 n13 n12 | n11 n14 | n15 n21 n23 | n19 n24 n22 | n17 n20 n9 n25 | n18 n16 n26 |
| key | 0 0 0 | X 0 | 1 0 X | X 1 X | 0 0 1 1 | 0 0 0 |
| `key[]` bits | 0–2 | 3–4 | 5–7 | 8–10 | 11–14 | 15–17 |

`rfet_key_pkg` holds these facts: `K_Nxx` gives the key position of each node,
`RCA_KEY_VALUE = 18'h06220` is the correct key (don't-cares as 0), and
`RCA_KEY_CARE = 18'h3FA77` masks the 14 bits that matter.

## Don't-cares and key entropy

The strength of a key is measured here by the Shannon entropy of its 0/1
symbol counts, H = −p₁·log₂p₁ − p₀·log₂p₀. Counted over its 14 fixed bits, the
adder's key has 4 ones and 10 zeros, so H = 0.8631 bit/symbol. The four
don't-cares can push this up. The balancing rule:

- If 1s fill more than half the key, every don't-care becomes 0.
- If 0s fill more than half the key, every don't-care becomes 1.
- Otherwise the don't-cares are split so that both counts reach half.

For the adder, all four don't-cares become 1. That gives 8 ones and 10 zeros,
and H = 0.9911. To reach exactly 1 bit/symbol, `N_PAD_INV = 2` inserts two
inverters in series between n14 and n15. The function stays the same and the
key gains two don't-care bits, `key[18]` and `key[19]`. Setting all six
don't-cares to 1 gives ten 1s and ten 0s. `N_PAD_INV` must be even. The
padding bits are placed above the 18 base bits; that placement is this
design's choice.

The balancing rule is a design-time choice of key values, not hardware. The
top-level testbench applies it to the key and checks both entropy figures.

## What a wrong key does

Any single wrong bit among the 14 that matter breaks the adder. Depending on
the bit, 8, 12 or all 32 of the 32 operand combinations give a wrong result.
Keys with several wrong bits can cancel out, though. Setting a group of gates
to their De Morgan duals can restore the function. An exhaustive sweep of all
2¹⁴ = 16,384 settings of the bits that matter finds exactly 16 that add
correctly (listed in `tb_secure_rca2_top` as `EQUIV_KEYS`). These are four
independent pairwise equivalences. So there are 16,368 locking settings, and a
random guess at the 14 bits unlocks the adder with probability
16/16,384 = 2⁻¹⁰. In effect the key holds 10 bits of secrecy, not 14. The source does not
discuss this. Keep it in mind before reading key length as security.

## Top level (`secure_rca2_top`)

Both realisations sit side by side. They share the operands `a[1:0]`,
`b[1:0]` and `cin` and the key `key[17+N_PAD_INV:0]`. Each drives its own
`sum_*[1:0]` and `cout_*`. For any key the two give identical results. With
the correct key both compute `a + b + cin`. How the key is stored or delivered
on a chip is not specified, so it is a plain input port.

Hierarchy:

```
secure_rca2_top
├── keyed_rca2 #(IMPL_SINW) u_sinw ── poly_* ── rfet_nand_nor / rfet_xnor_xor / rfet_inv ── rfet_fet
└── keyed_rca2 #(IMPL_CMOS) u_cmos ── poly_* ── cmos_nand_nor_mux / cmos_xnor_xor_mux / cmos_inv_mux
```

## Simulating

Every cell, the adder and the top have a self-checking testbench
`tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/rfet_key_pkg.sv tb/tb_secure_rca2_top.sv --top-module tb_secure_rca2_top
./obj_dir/Vtb_secure_rca2_top
```

- `tb_secure_rca2_top` runs at the default size and takes under a second. It
  covers:
  - the correct key under all 16 don't-care values;
  - the balancing rule and its entropy figures (0.8631 → 0.9911);
  - all 16,384 settings of the bits that matter. Each setting is checked
    against a gate-by-gate reference model and against the 16-key
    equivalence list, and the two realisations must agree throughout.

  It counts how often each of these mechanisms occurred and fails if any count
  is zero.
- `tb_keyed_rca2` checks both realisations with and without padding:
  - every don't-care assignment;
  - the exact number of failing operand sets for each single-bit key error;
  - the balanced 20-bit key.
- The cell testbenches are exhaustive truth tables.

## What is modelled and what is not

- The model is logic-level only. Voltage swing, drive strength, leakage, delay
  and area are outside it. So is camouflaging, which is a layout property.
- The key convention (NAND/XNOR for 0, NOR/XOR for 1) follows the gate
  drawings. The opposite polarity for the NAND/NOR cell also appears in the
  prose of the source. It would not give the published key of the adder
  (10 zeros, 4 ones), so it was not used.
- The multiplexer of the CMOS equivalent could in principle hold further
  "ambiguous" gate functions as extra decoy inputs. What those would be is not
  specified, so each mux has just the two functions the adder needs.
- Key compression (sharing key bits between gates) is only suggested, with no
  scheme given, and is not built. The opposite refinement is not built either:
  a separate program input for every transistor gives finer control, at the
  cost of more routing. Here each cell takes one key bit.
- The key-entropy statistics of the larger benchmark circuits need their
  mapped netlists, which are not available. Only the adder is built.
