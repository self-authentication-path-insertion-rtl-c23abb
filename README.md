# Self-authenticating FPGA fabric

An FPGA bitstream can be read back, decompiled, and patched. Encryption protects
the bitstream while it is shipped. It does nothing about a patch applied after
configuration, such as a partial reconfiguration or a fault injected into
configuration memory. This fabric checks its own configuration while it runs. It
needs no key and no extra output pin.

- Every LUT has a twin, the **authentication module**. The twin holds the same
  function, stored in a different bit order.
- A change to either table shows up as a disagreement between them once an input
  pattern reaches a changed minterm.
- A disagreement **locks** the circuit. The switch boxes near the fault start
  driving inverted data onto the routing, and they keep doing so until the
  fabric is reconfigured.

The fabric is not meant to report tampering. It is meant to make a tampered
design useless, so the damage can be seen in its outputs.

The RTL implements the architecture from S. Zamanzadeh and A. Jahanian, *Self
Authentication Path Insertion in FPGA-based Design Flow for Tamper-resistant
Purpose* (ISeCure, 2016). That publication describes the security cell, the
OR-based authentication network and the obfuscating switch box. The fabric
around them (tile arrangement, channel width, configuration port) is filled in
here, using the simplest choices that work. The sections below say which parts
are which.

## The security cell

```
            in[K-1:0] ──┬──────────────► LUT (table T) ──────────► out
                        │                      │
                        └─► permute ─► auth LUT (table A) ─► XOR ─► auth
```

A security cell (`security_cell`) is a K-input LUT (`lut`, K = 6, 64 table bits)
plus an authentication module (`auth_module`). Both see the same K inputs. The
authentication module receives them through a configured permutation `perm`:
its input j is cell input `perm[j]`.

Its table A must therefore be the permuted copy of the LUT table T. For every
minterm i:

```
a(i) = Σ_j bit(i, perm[j]) · 2^j        A[a(i)] = T[i]
```

The authentication module looks up `A[a(in)]` and XORs the result with the LUT
output. So `auth` is 1 exactly when the current input pattern reads two table
bits that disagree.

Consequences worth knowing:

- **Detection happens on activation, not at load time.** A flipped table bit is
  caught the first time the circuit reaches that minterm. A flipped bit that the
  mapped circuit can never address stays silent. That is harmless, because the
  circuit's function did not change.
- **Both tables are guarded.** Altering T or A alone is detected. An attacker
  would have to alter T and A consistently, which requires knowing the
  permutation.
- **Unused LUTs** carry all-zero T and A tables and never flag.
- **Only the full-width twin (m = n) is built.** The source also mentions
  smaller authentication LUTs that check a subset of the minterms, but does not
  say how. That variant is not built.

## The authentication network

Violations travel on a path of their own, beside the data path:

1. **CLB_authentication.** Inside each CLB (`clb`, 10 security cells), the 10
   `auth` signals are ORed by an `auth_aggregator` tree.
2. **SB_authentication.** Each switch box sits at the corner shared by four
   tiles: (x,y), (x+1,y), (x,y+1) and (x+1,y+1). A second `auth_aggregator` ORs
   the CLB_authentication signals of those four CLBs. Tiles outside the array
   count as 0.
3. **Obfuscation cell.** SB_authentication sets that switch box's obfuscation
   cell (`obf_latch`).

All of this is combinational up to the obfuscation cell. The cell is clocked, so
a switch box starts inverting on the **first rising clock edge after** the
violating input pattern is present.

## Obfuscating switch box and the lock

The switch box (`switch_box`) uses unidirectional routing. On each of its four
sides, H = W/2 tracks enter and H tracks leave, for 2W outputs in all.

Each output is a 4:1 multiplexer with two configuration bits (`sa_pkg::sb_sel_e`).
For output track i on side s, the choices are:

- incoming track i of side s+1, s+2 or s+3 (mod 4);
- the CLB output pin `(s·H + i) mod N`.

Every multiplexer output then passes through an `obf_mux`, an inverter and a 2:1
multiplexer. All `obf_mux` selects in a switch box come from its one
`obf_latch`. This is the only element of the security path that sits on the
data path: one 2:1 mux delay per switch box crossed.

The obfuscation cell works as follows:

| event (priority order)                        | cell becomes |
|-----------------------------------------------|--------------|
| `rst_n` low                                   | 0            |
| configuration write of the tile's last word   | bit 0 of that word |
| SB_authentication high at a rising edge       | 1            |
| otherwise                                     | unchanged    |

So the lock is **sticky**. The violating pattern can go away, and the tampered
word can even be rewritten, yet the switch box keeps inverting. It stops only
when its obfuscation word is written, which is part of a full reconfiguration.

The inversion spreads: every net routed through a locked switch box arrives
complemented. In the end-to-end test, the 4-bit output of a locked adder differs
from the correct value in 3.96 bits on average.

## Fabric organisation

`sa_fpga` is an NX × NY array of tiles. Each tile has one CLB and the switch box
at its north-east corner.

- **Between tiles.** Wires are length 1. The outgoing east tracks of tile (x,y)
  are the incoming west tracks of tile (x+1,y). Likewise, north connects to the
  south of tile (x,y+1).
- **At the edge of the array.** Incoming tracks come from the `io_*_in` ports,
  and outgoing tracks leave on `io_*_out`. Each is a packed `[tile][track]`
  array along that edge.
- **Inside the CLB.** Each of the K·N cell inputs has a full multiplexer. It
  selects from the 2W tracks entering the tile's switch box (index `side·H +
  track`, sides ordered N, E, S, W) or from the CLB's own N outputs (index
  `2W + cell`). Each cell output is either the LUT output or that output
  registered (`ff_en`).
- **Observation ports.** `clb_auth`, `sb_auth`, `sb_obf` (per tile) and
  `locked` expose the authentication path. They are for testing and
  observation; the mechanism does not need them.

Default sizes: K = 6 and N = 10 (the k6_N10 organisation), W = 8, NX = NY = 11.
That gives 1210 LUTs, enough for the smallest benchmark the method was evaluated
on (586 LUTs on an 11 × 11 array). The larger benchmarks need NX = NY from 16 up
to 31.

### Combinational loops

This is a real programmable fabric. Routing and local feedback can close
combinational loops, and linters report them as structural loops. The
configuration decides whether any loop is actually closed.

A closed loop through a locked switch box can oscillate, because the lock
inverts. Keep routing acyclic, as a place-and-route tool would.

While `rst_n` is low, every switch-box multiplexer selects the CLB pin and every
cell input reads 0. A random power-up configuration therefore cannot close a
loop. The reset image of the configuration memory has the same property.

### Configuration

A tile's configuration is `TILE_WORDS` 32-bit words. It is written through
`cfg_we`, `cfg_tile` (= y·NX + x), `cfg_word` and `cfg_wdata`, one word per
clock. Reading the tile's words as one little-endian bit vector, the layout is:

| field (per cell c = 0..N-1, base c·CELL_BITS) | bits |
|---|---|
| LUT table T                                      | 2^K |
| authentication table A                           | 2^K |
| permutation, K fields                            | K·⌈log2 K⌉ |
| input selects, K fields                          | K·⌈log2(2W+N+1)⌉ |
| flip-flop enable                                 | 1 |

After the N cells come the switch-box selects, 2 bits per output at index
`side·H + track`. The last word, `TILE_WORDS-1`, holds only the obfuscation
cell's value in bit 0.

With the defaults, CELL_BITS = 177 and a tile has 57 + 1 words. The whole 11 × 11
array holds about 225k configuration bits.

To build a configuration, take each LUT table T, choose a permutation, and
compute A with the formula above. The testbench package `tb/sa_tb_pkg.sv` has
`auth_table()`, `perm_addr()` and `rand_perm()` for this.

## Files

| file | content |
|---|---|
| `rtl/sa_pkg.sv` | default sizes, side and switch-box select enums |
| `rtl/lut.sv` | K-input LUT |
| `rtl/auth_module.sv` | authentication LUT + comparator |
| `rtl/security_cell.sv` | LUT + permutation + authentication module |
| `rtl/auth_aggregator.sv` | OR tree (CLB and switch-box aggregation) |
| `rtl/clb.sv` | N security cells, input selection, flip-flops, CLB_authentication |
| `rtl/obf_mux.sv` | inverter + 2:1 mux |
| `rtl/obf_latch.sv` | sticky obfuscation cell |
| `rtl/switch_box.sv` | 4:1-mux switch box with obfuscation |
| `rtl/sa_fpga.sv` | top: array, configuration memory, authentication network |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/sa_tb_pkg.sv` | authentication-table generation for testbenches |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/sa_pkg.sv tb/sa_tb_pkg.sv rtl/*.sv tb/tb_sa_fpga.sv --top-module tb_sa_fpga
./obj_dir/Vtb_sa_fpga
```

`tb_sa_fpga` runs the top at its default size with no parameter overrides. It
takes about 2 minutes to build and a few seconds to run. It does the following:

1. Loads every word of all 121 tiles.
2. Maps a 4-bit adder onto tile (0,0). The carry into bit 2 comes through local
   feedback.
3. Puts a registered XOR stage on tile (1,0).
4. Routes the result east across the remaining tiles to `io_e_out[0]`.

It then checks, against a table-level model and against plain arithmetic:

- normal operation;
- a tamper that can never be activated, which stays silent;
- a run-time LUT tamper and an authentication-table tamper. Each is checked
  for:
  - correct outputs before activation;
  - detection on the activating pattern;
  - lock on the next edge;
  - every output wrong while locked;
  - stickiness;
  - unlock by reconfiguration.

The block testbenches cover each module exhaustively or with random stimulus
against their own reference models.

## Where this departs from the published method, and limits

- **Fabric details.** The tile arrangement, length-1 wires, the track pattern of
  the switch box, the CLB input multiplexers, the channel width W = 8 and the
  configuration port are this design's choices. The source gives none of them.
- **Obfuscation cell.** The source calls it a latch, or an SRAM cell that the
  authentication signal overwrites. Here it is a clocked flip-flop, which costs
  one cycle of lock latency.
- **Reset hold.** Holding the routing quiet during reset is an addition.
- **Missing parts.** No carry chains, I/O blocks, or hard blocks are modelled.
  The smaller-authentication-LUT variant (m < n) is not built.
- **Not verified here.** The area, delay and power figures of the method, and
  its results on the MCNC benchmarks, depend on place-and-route of real
  netlists. They are not reproduced. Whether those benchmarks route at W = 8 is
  unknown.
- **Inversions can cancel.** A locked switch box inverts every net it
  carries. A net that crosses two locked switch boxes is inverted twice. If a
  purely linear stage (XOR) sits between them, the two inversions can cancel,
  and the value arrives correct. The lock can therefore hide less than it
  seems on some nets. The end-to-end test locks one switch box, on the adder's
  side only, so it does not exercise this case.
- **Software.** The CAD step that inserts the security path (placing
  authentication tables and wiring the OR network into a netlist) is software.
  Here the network is fixed in the RTL, and only the authentication tables have
  to be generated, with the formula above.
