# Obfuscated NoC links: programmable MUX switches with a serially loaded activation package

A network-on-chip is a set of routers wired into a topology, and that wiring
tells a lot about the SoC. Anyone who holds the layout or a die can read it
off. This RTL hides the wiring. The fixed links between a router and its
neighbours are replaced by a network of programmable 4-to-1 multiplexers.
Until the select lines are programmed, the silicon does not show which
neighbour is attached to which router port.

The select bits are called the **activation package**. They are shifted into
an on-chip register after fabrication. The correct package gives the intended
topology. Most other packages give a different topology that is still
complete and one-to-one (a *legal* topology): every router still has exactly
one link to each neighbour, only to a different one. An attacker who checks
that the chip "works" cannot tell the intended topology from these. Packages
that wire one source to two places are *non-functional* and easy to spot. They
are not the ones that give the protection.

The routers and IP cores are not part of this RTL. In the target flow they come
from a vendor interconnect generator. The RTL is the layer inserted between
them: the switch network on each obfuscated router's links, plus the register
that holds the package.

## Building blocks

```
 obnoc_interconnect            top: N obfuscated routers + one package register
 ├── ap_load_reg               serial-in / parallel-out register, 32*N bits
 └── obf_router_ports  (xN)    16 MUXes around one router, 32-bit package slice
     ├── mux_demux_switch      router outputs  -> neighbours (8 MUXes)
     └── mux_demux_switch      neighbours -> router inputs   (8 MUXes)
         └── mux4x1   (x8)     programmable 4:1 MUX
 obnoc_pkg                     link type and the size constants
```

A **link** is a streaming bundle in the Avalon-ST style:
`link_fwd_t = {valid, sop, eop, data[31:0]}` travels forward and a `ready` bit
travels back. The MUXes switch the whole 35-bit forward struct. The 32-bit
data width is a choice of this design. Change `DATA_W` in `obnoc_pkg` to match
the routers you attach.

## The two-stage MUX-DEMUX switch (`mux_demux_switch`)

This is the core of the design and the part worth understanding in detail.

```
  src[0..3] ──► stage 1: four 4:1 MUXes ──► stage 2: four 4:1 MUXes ──► dst[0..3]
               ("DEMUX" stage)                ("MUX" stage)
               each sees all 4 sources        each sees all 4 stage-1 outputs
               sel[7:0]                       sel[15:8]
```

* Each stage has four MUXes, and each MUX has 2 select bits. MUX `k` of a stage
  uses bits `[2k+1:2k]` of that stage's byte.
* **Scrambled input order.** The switch does not wire MUX input `i` to signal
  `i`. Every MUX of a stage sees the previous row in the order given by the
  parameter `IN_ORDER`: input `i` connects to signal `IN_ORDER[2i+1:2i]`. The
  default `8'h93` is the order (3,0,1,2). Selecting input `k` therefore does
  not select signal `k`: the straight-through wiring needs the package
  `39393939`, and the regular-looking byte `e4` gives a rotation. The select
  values alone do not show the topology. Elaboration stops with an error if
  `IN_ORDER` is not a permutation.
* **Which source reaches destination `d`?** Let `ord(x)` be field `x` of
  `IN_ORDER`. Stage-2 MUX `d` takes stage-1 MUX `m = ord(sel2[d])`, and that
  MUX takes source `ord(sel1[m])`.
* **Legality.** All MUXes of a stage share one input order. So a stage is
  one-to-one exactly when its four selects are all different, that is, when its
  byte is a permutation such as `e4`, `6c` or `27`. Each stage has 4! = 24 such
  bytes, so one switch has 4!·4! = 576 legal patterns out of 65,536. Every
  other pattern copies some source to two destinations and leaves another
  source unconnected.
* **Ready path.** The document describes only the forward MUXes. This design
  also carries `ready` back along the same path. A source is ready when at
  least one destination is connected to it and every destination connected to
  it is ready. Under a legal package this is exactly the ready of its one
  destination, so handshakes pass through unchanged. A source that nothing
  selects sees `ready = 0` and stalls. It does not drop data.
* Timing: the switch is purely combinational. It adds two MUX levels forward
  and a small compare tree on the ready path. It has no clock and no latency.

## One obfuscated router (`obf_router_ports`)

One router takes two switches: one on the four links it drives and one on the
four links that drive it. That makes 16 MUXes and a 32-bit package:

| bits      | drives                                  |
|-----------|-----------------------------------------|
| `[7:0]`   | output switch, stage 1 (router outputs) |
| `[15:8]`  | output switch, stage 2 (to neighbours)  |
| `[23:16]` | input switch, stage 1 (from neighbours) |
| `[31:24]` | input switch, stage 2 (router inputs)   |

Port names: `rtr_out_*` are the router's output ports and `fab_out_*` the
links to the neighbours. `fab_in_*` are the links from the neighbours and
`rtr_in_*` the router's input ports.

For reference, here are the nine 32-bit packages of the nine-copy comparison
(one correct, six wrong but legal, two non-functional), with the wiring each
one gives under the default `IN_ORDER`. "n0←0" means neighbour link 0 carries
router output 0. "p0←2" means router input 0 carries neighbour link 2.

| package | name | router → neighbours | neighbours → router | class |
|---|---|---|---|---|
| `e4e4e46c` | correct | n0←0 n1←3 n2←2 n3←1 | p0←2 p1←3 p2←0 p3←1 | intended |
| `b427e46c` | W1 | n0←0 n1←3 n2←2 n3←1 | p0←3 p1←2 p2←1 p3←0 | legal, unintended |
| `b4e4276c` | W2 | n0←1 n1←3 n2←2 n3←0 | p0←2 p1←3 p2←1 p3←0 | legal, unintended |
| `e4e4e463` | W3 | n0←0 n1←2 n2←3 n3←1 | p0←2 p1←3 p2←0 p3←1 | legal, unintended |
| `e4e4276c` | W4 | n0←1 n1←3 n2←2 n3←0 | p0←2 p1←3 p2←0 p3←1 | legal, unintended |
| `d8e4e46c` | W5 | n0←0 n1←3 n2←2 n3←1 | p0←2 p1←0 p2←3 p3←1 | legal, unintended |
| `e4e1e46c` | W6 | n0←0 n1←3 n2←2 n3←1 | p0←2 p1←0 p2←3 p3←1 | legal, unintended |
| `cdd432a3` | IL1 | n0←3 n1←1 n2←1 n3←1 | p0←3 p1←0 p2←2 p3←0 | non-functional |
| `cda332d4` | IL2 | n0←0 n1←2 n2←0 n3←2 | p0←2 p1←1 p2←1 p3←1 | non-functional |

The byte-per-stage layout was chosen so that these packages fall into exactly
these classes: seven functional, six of them unintended, and two
non-functional.

## Loading the activation package (`ap_load_reg`)

Pins are scarce, so the package is loaded serially, in the manner of a scan
chain:

* `ap_in` carries one bit per rising clock edge while `load_en` is high.
* Bits enter at the top of the register and move toward bit 0. **Send the
  package least significant bit first.** After `32*N` enabled cycles, the
  first bit sent is in bit 0.
* While `load_en` is low the register holds, whatever `ap_in` does. Loading
  can pause and resume.
* `rst` (synchronous, active high) clears the register to all zeros. Every
  MUX then selects its input 0, so one source is copied to all four
  destinations: a non-functional wiring until a package is loaded.
* The loader is described as gating the clock with `LOAD_en`. Here `load_en`
  is a clock enable on an ungated clock. The register contents are the same,
  and the RTL has no gated clock.

In `obnoc_interconnect`, router `r` takes bits `[32r+31:32r]`. To load
`NUM_OBF_ROUTERS` routers, send router 0's package first, then router 1's, and
so on, each least significant bit first.

The design does not store the package. In the field it has to come from
somewhere, for example a small tamper-resistant ROM that drives `ap_in` and
`load_en` after reset. That source is outside this RTL.

## Top level (`obnoc_interconnect`)

| parameter | default | meaning |
|---|---|---|
| `NUM_OBF_ROUTERS` | 1 | obfuscated routers. 1 is the worked example: one router with four neighbours and a 32-bit package. 2, 4, 8 and 16 are the four obfuscation levels. |

Ports: `clk`, `rst`, `load_en`, `ap_in`, plus the four link groups as packed
arrays `[NUM_OBF_ROUTERS][4]` of `link_fwd_t` (forward) or bits (ready). The
link paths are combinational. Loading takes `32*NUM_OBF_ROUTERS` cycles.

To insert the layer, cut the four links of each chosen router. Connect the
router's side to `rtr_*` and the neighbour's side to `fab_*`. Then compute
the package that restores the intended wiring with the "which source reaches
destination `d`" rule above.

## What is this design's own choice

The document fixes the 4:1 MUXes, the two stages, the 16 MUXes and 32 package
bits per router, the serial-in parallel-out register with `AP_in`, `LOAD_en`,
`CLK` and `RST`, and the Avalon-ST style of the router ports. This RTL adds
the following:

* Every obfuscated router has exactly four links, and all of them are
  switched. Routers with other link counts would need `NPORT` and the select
  widths generalised. The constants in `obnoc_pkg` derive from `NPORT`, but
  only `NPORT = 4` has been built and simulated.
* The "randomised connection" of MUX inputs is a fixed order shared by all
  MUXes of a stage (`IN_ORDER`), not a separate random order per MUX.
* The package bit layout, the shift direction, the reset value and the
  clock-enable form of the load gating.
* The backward `ready` path through the switch.
* The 32-bit data width.
* Not included: the routers, the IP cores, the key storage, and the extension
  that lets a switch also reach blocks that are not neighbours of the router.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_mux4x1` | every select value of the 4:1 MUX with random data |
| `tb_mux_demux_switch` | all 65,536 select patterns: forward data, ready, legal exactly when both bytes are permutations, 576 legal patterns, `3939` is the straight wiring |
| `tb_ap_load_reg` | 50 random packages: 32-cycle load, partial contents, hold with `load_en` low, reset |
| `tb_obf_router_ports` | nine copies with the nine packages in the table above: wiring and ready checked against a reference walk; 7 functional, 6 unintended, 2 non-functional |
| `tb_obnoc_interconnect` | top at default size, end to end: reset, paused serial load, three-beat packets both ways under random backpressure (order, framing and no loss checked), reload with a legal wrong package, a non-functional package (duplicated and starved sources), reset. Counts each of these and fails if one never happens. An assertion checks that a beat stalled at any sink stays unchanged until it is accepted |
| `tb_obnoc_levels` | tops with 2, 4, 8 and 16 routers side by side: 64- to 512-bit random legal packages loaded serially, every router's wiring and ready checked |

`tb_obnoc_ref_pkg` holds the reference model that the testbenches share. It
walks the two stages select by select.

Run one testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_obnoc_interconnect \
    -y rtl -y tb +libext+.sv rtl/obnoc_pkg.sv tb/tb_obnoc_ref_pkg.sv \
    tb/tb_obnoc_interconnect.sv -o sim
./obj_dir/sim
```

Replace the top module and file name to run the others. Every testbench
finishes within seconds.

## Limits

* The switches are verified on their own, not with real routers. The flow
  control check assumes that routers hold `valid` and data while `ready` is
  low.
* Power, area and timing were measured on an FPGA flow and are not reproduced
  here. In this RTL the cost per router is 16 MUXes of link width and 32
  flip-flops.
* Packages are applied statically. Changing the package while traffic is in
  flight can cut packets. Load the package before releasing the routers from
  reset.
