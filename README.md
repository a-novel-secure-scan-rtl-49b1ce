# Secure scan with a PUF-configured key register

A scan chain gives a tester full control over a chip's flip-flops, and it
gives the same control to an attacker who wants the key out of a
cryptographic core. Here the scan chain is locked. At *N* points along the
chain a pair of NAND gates sits between two scan cells. While its select line
is high, the gate pair ORs an internal node of the core into the shifted
data. The *N* select lines come from an *N*-bit key register, the
**NLSR** (non-linear shift register). At the start of every test session the
tester shifts an *N*-bit **scan input code (SIC)** into the NLSR. The chain
only shifts faithfully if the code leaves the register in the right state.

The right code is not a constant you could copy from one chip to the next.
Every stage of the NLSR passes its bit on through a **CF unit**, a
fuse/antifuse pair burned once. The link then either copies the bit
or inverts it. The setting of each link comes from an on-chip delay
**PUF** (physical unclonable function), so it differs from die to die. The
code therefore depends on two secrets:

* the **connection style** (`CONN_STYLE`): whether each lock gate is wired to
  Q or Q-bar of its NLSR cell. This is fixed in the netlist.
* the **CF settings**: one PUF bit per NLSR link, set per chip.

A wrong code is not simply rejected. The register keeps circulating the
wrong key through its CF links, so the lock gates corrupt the scan data in a
pattern that changes from cycle to cycle.

## Block overview

| module (`rtl/`) | role |
|---|---|
| `secure_scan_top` | the whole protection: PUF units and their programming sequencer, NLSR, lock controller, locked chain, enrollment port |
| `puf_unit` | *behavioural model*: two multiplexer+buffer delay paths racing into an arbiter |
| `sr_arbiter` | *behavioural model*: balanced SR latch, NAND type (PA) or NOR type (NA) |
| `puf_prog_ctrl` | sequencer that burns the PUF responses into the CF units |
| `cf_unit` | one-time programmable fuse/antifuse link (C follows F or AF) |
| `nlsr` | N flip-flops, N CF links, input multiplexer (code or feedback) |
| `scan_lock_ctrl` | modulo-N counter, key check gate G4, check flip-flop DFF1, NLSR clock enable |
| `secure_scan_chain` | L mux-D scan cells with N NAND lock points |
| `scan_ff` | mux-D scan flip-flop |
| `obs_port` | enrollment output on the last CF link, removed by a fuse |
| `secure_scan_pkg` | shared types and the compile-time helpers (lock placement, delay hash) |

The core under test is outside the top. The top takes the core's next-state
bits (`cut_d`) and the *N* internal nodes that feed the lock gates
(`cut_node`), and returns the scan cells' state (`cut_q`). The scan cells
*are* the core's flip-flops.

## The lock point

Lock *i* sits in front of scan cell *p* = `lock_pos(i)`:

```
A_i = NAND(key_sel[i], node[i])
B_i = NAND(A_i, Qbar[p-1])          -> scan input of cell p
```

* `key_sel[i] = 0`: A_i = 1 and B_i = Q[p-1], so the chain shifts normally.
* `key_sel[i] = 1`: B_i = node[i] OR Q[p-1]. Whenever the core node is 1,
  cell *p* receives a 1 regardless of the data.

`key_sel[i]` is NLSR stage *i*'s Q, or its Q-bar where `CONN_STYLE[i] = 1`.
So the key that opens every lock is NLSR state == `CONN_STYLE`.

In silicon the lock positions and the nodes would be picked at random. This
RTL spreads the positions evenly with `lock_pos(i) = (i+1)*L/(N+1)`, which
needs `L >= N+1`. The nodes are whatever the core wires to `cut_node`.

## The NLSR and how the code maps to the key

Stage 0 takes the serial code while the counter runs (`fb_sel = Cout = 0`).
After that it takes the output of the last CF link. CF link *i* sits between
stage *i* and stage *i+1*. Its F input is Q and its AF input is Q-bar, so a
link programmed with T = 1 inverts. With `t[i]` the setting of link *i*, one
shift is

```
q'[0] = fb_sel ? q[N-1] ^ t[N-1] : sic
q'[i] = q[i-1] ^ t[i-1]            (i = 1..N-1)
```

Starting from the all-zero reset state and shifting code bits X1..XN (X1
first), stage *i* ends with `X(N-i) ^ t[0] ^ ... ^ t[i-1]`. The correct code
is therefore

```
X(N-i) = CONN_STYLE[i] ^ t[0] ^ ... ^ t[i-1]      for i = 0..N-1
```

Worked example with N = 8 and every link inverting: the code 0,0,1,1,0,0,0,1
leaves the key 1,1,0,1,1,0,0,1 (stage 1 first). `tb/tb_nlsr.sv` checks this
cycle by cycle against the intermediate states.

Once loaded, a wrong key circulates as a rotation with an XOR by the link
settings. Such a rotation repeats after at most 2N cycles. It also has
exactly two fixed points when the link settings have even parity:
`q[i] = c ^ t[0] ^ ... ^ t[i-1]`, for c = 0 or 1. A wrong key that happens to
be one of those two states stays put. It still keeps some locks closed, so
the scan data is still corrupted, just not in a changing pattern. The
all-zero enrollment code leaves the register in the c = 0 state, so with
even link parity it stays there.

## Lock controller timing (`scan_lock_ctrl`)

| signal | meaning |
|---|---|
| G3 = `SE & ~Cout` | counter enable; the counter pauses when SE drops during loading |
| Cout | set after N counted cycles, held until reset |
| G4 = OR(`key_sel`) | 0 exactly when every lock is open |
| DFF1 (`o`) | samples G4 once, one cycle after Cout rises, then holds |
| clk2 (`nlsr_shift_en`) = `SE & (~Cout \| (checked & o))` | NLSR clock |

With SE held high from reset:

* cycles 1..N: code bits shift in, and the scan chain shifts too.
* cycle N+1: DFF1 samples G4, and the NLSR is held for that one cycle.
* from then on a correct key is frozen: clk2 never ticks again until reset,
  through any number of capture cycles (SE = 0) and shift phases. A wrong
  key moves on every shift cycle.

Test preparation therefore costs N clock cycles (64 for the default key).
The chain can be loaded with the first pattern from cycle N+1 on. In
functional mode (SE = 0 after reset) the counter, DFF1 and NLSR never move.

The gated clocks clk1 = G1(CLK, Cout) and clk2 = G2(...) are written as
clock enables on the one system clock. The enabled edges are the same.

## PUF and solidification

Each `puf_unit` launches one pulse down two paths. Each path is a
multiplexer followed by a buffer. The first arrival sets the SR-latch
arbiter. With the NAND latch, both buffer outputs are first preset to 0 and
then rising edges race: path 1 winning gives X = 0. With the NOR latch the
buffers idle at 1 and falling edges race: path 1 winning gives X = 1. The
response is X. The multiplexers have `MUX_IN` inputs, all fed by the pulse.
The challenge selects which one carries it, so one unit answers `MUX_IN`
challenges.

Process variation is a deterministic hash: every multiplexer input and
buffer gets `base + mfg_var_ps(SEED, element, VAR_PS+1)` picoseconds, with
bases of 200 ps and 150 ps and a spread of 0..40 ps. A different `SEED` stands
for a different die. Exact ties are possible, and the latch model then
resolves them arbitrarily. A real latch would go metastable. These two
modules use delays and latches and are simulation models, not
synthesizable logic.

The N CF units are split into `GROUPS` groups of `GS = N/GROUPS`:

* PUF unit *g* drives T of every CF unit in group *g*.
* Enable EN_j drives the *j*-th CF unit of every group.

`puf_prog_ctrl` visits j = 0..GS-1. For each j it drives challenge j, holds
the pulse low for `SETTLE` cycles, holds it high for `SETTLE` cycles, then
raises EN_j for one cycle. A full run takes `GS*(2*SETTLE+1)` cycles (72 by
default). A CF unit takes the first EN it sees and ignores later ones. It
powers up connecting F, the fuse being intact.

## Bring-up and enrollment

After fabrication nobody knows the CF settings, so nobody knows the code.
The bring-up sequence is:

1. Pulse `fab_clr_n`. It stands for the as-fabricated fuse state and is
   never driven in the field. Then reset.
2. Pulse `puf_prog_start` and wait for `puf_prog_done`.
3. Reset. Hold SE = 1 and shift zeros into `sic` for N cycles, reading the
   `obs` port (the last CF link's output) before each clock. After *k* zero
   shifts, `obs = t[N-1-k] ^ ... ^ t[N-1]`, so
   `t[N-1] = obs_0` and `t[N-1-k] = obs_k ^ obs_(k-1)`.
4. Raise `obs_blow` for one cycle. The port reads 0 from then on, and reset
   does not restore it.
5. Compute the code from the CF settings and `CONN_STYLE` (previous
   section). This needs both the enrolled settings and the netlist secret,
   so the tester has to be trusted.

In the field: reset, set SE = 1, shift the code on `sic` for N cycles, then
use the chain as usual.

## Parameters

| parameter | default | where it comes from |
|---|---|---|
| `N` (key length) | 64 | the evaluation uses 64 and 128 |
| `GROUPS` | 8 | 64 CF units in 8 groups of 8 |
| `SCAN_LEN` | 818 | chain length of the smallest benchmark core (Wb-Conmax) |
| `CONN_STYLE` | `64'hA5C3_0F96_3C5A_E718` | arbitrary; choose your own secret |
| `ARB_TYPE` | `ARB_NAND` | PA arbiter |
| `PUF_SEED` | 7 | stands for the die |
| `SETTLE` | 4 | cycles per PUF preset and race phase |

`N` must be a multiple of `GROUPS`, and `SCAN_LEN` at least `N+1`. If you
change `N`, give `CONN_STYLE` all *N* bits. Otherwise the upper bits are
zero.

## Where this RTL goes its own way

* **Gated clocks** are clock enables (see above).
* **Key check one cycle later.** Read literally, DFF1 clocked by
  G1(CLK, Cout) would sample G4 at the same edge that loads the last code
  bit, so it would check an incomplete key. Here DFF1 samples one cycle
  after the carry, while the NLSR is held.
* **clk2 during loading.** Read literally, G2 = AND(O, CLK, SE) with O = 0
  during loading would stop the NLSR from loading at all. This design
  clocks the NLSR through the whole loading phase, which is the described
  behaviour: `clk2 = SE & (~Cout | O)`.
* **N CF units.** One CF unit follows each stage, including the last one,
  which feeds the input multiplexer. So *y* = *x* = N.
* **Lock positions** use a formula, not random placement. There is one lock
  per NLSR stage.
* **Dedicated `sic` pin** for the code.
* **PUF multiplexers** are `MUX_IN`-to-1 with the challenge as select, so
  that eight CF units sharing one PUF unit can get different bits. The delay
  values are invented.
* **Fuses in logic.** The CF units and the enrollment port keep their
  one-time state in flip-flops with a separate `fab_clr_n`. In silicon they
  are fuse/antifuse cells, so treat these modules as the logical function
  of those cells.
* **Not built:** multiple scan chains (the architecture allows them), and
  an optional BIST for the protection logic.

## Simulating

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog. With
Verilator 5, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -y rtl -y tb +libext+.sv rtl/secure_scan_pkg.sv \
  tb/tb_secure_scan_top.sv --top-module tb_secure_scan_top
./obj_dir/Vtb_secure_scan_top
```

`--timing` is needed because the PUF model uses delays.

| testbench | what it shows |
|---|---|
| `tb_secure_scan_top` | full default size (N = 64, 818 cells). It covers the steps below. |
| `tb_secure_scan_workloads` | the same flow on chain lengths 818, 1048 and 3458 with 64- and 128-bit keys; the 818/128 case uses NOR-type (NA) arbiters (`secure_scan_flow` is its reusable sequence) |
| `tb_nlsr` | the N = 8 worked example, cycle by cycle; random link settings against a reference model |
| `tb_scan_lock_ctrl` | counter, carry, one-time check, clk2 for right and wrong keys, SE gaps |
| `tb_secure_scan_chain` | plain shifting with locks open, capture, gate-level reference with random selects |
| `tb_puf_unit`, `tb_sr_arbiter` | races against the delay formula; both latch types; repeatability |
| `tb_puf_prog_ctrl`, `tb_cf_unit`, `tb_obs_port`, `tb_scan_ff` | sequencing and one-time behaviour |

`tb_secure_scan_top` runs the following steps and counts each one, failing
if any never happened:

* functional mode: the protection logic stays idle;
* PUF solidification;
* enrollment through `obs`, checked against the responses predicted from
  the delay model;
* fuse blow;
* a one-bit-wrong code: the NLSR keeps moving and the unloaded data is
  corrupted (about 60 % of bits);
* the correct code: the key is ready after 64 cycles and stays frozen, and
  two load/capture/unload patterns come back exactly.

The same flow also passes at chain lengths 10776 (N = 64) and 17071
(N = 128): instantiate `secure_scan_flow` with those parameters. Expect a
build of several minutes and a simulation of about 3.5 minutes.
