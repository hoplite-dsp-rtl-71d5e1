# Hoplite-DSP: a deflection-routed FPGA network-on-chip built from DSP48 slices

A Hoplite router is a very small network switch for FPGAs. It routes packets
on a unidirectional 2D torus and resolves every conflict by deflecting a
packet, not by buffering it. Almost all of its area is two wide multiplexers
(one per output) and the pipeline registers on its links. A Xilinx DSP48E1
slice already contains 48-bit multiplexers (X, Y and Z, selected at run time
by OPMODE), a 48-bit adder that can merge them, a set of registers and a
dedicated 48-bit cascade link (PCOUT to PCIN) to the slice above it.

This design moves the router's multiplexers and registers into one DSP slice
per router. The fabric keeps only the routing decision and a few flags. The
design is written as synthesizable SystemVerilog around a register-transfer
model of the slice (`dsp48_mux`). It targets a 16 x 16 network with a 47-bit
payload.

## The router inside one slice

| Hoplite port     | DSP48 port                          | Operand selected by OPMODE |
|------------------|-------------------------------------|----------------------------|
| West input       | PCIN (cascade from the slice below) | Z = PCIN                   |
| North input      | A:B (30 + 18 bits, one 48-bit lane) | X = A:B                    |
| PE input         | C                                   | Y = C                      |
| East output      | PCOUT (cascade to the slice above)  | driven by P                |
| South / PE output | P (to the fabric)                  | driven by P                |

The ALU always adds (ALUMODE 0000). For each selection, two of X, Y and Z are
set to zero, so `P = Z + X + Y` is a plain multiplexer. The OPMODE values are
in `rtl/hoplite_pkg.sv`:

- `OPM_PCIN`: Z = PCIN.
- `OPM_AB`: X = A:B.
- `OPM_C`: Y = C.
- `OPM_P`: Z = P, so P holds its own value.
- `OPM_ZERO`: all operands zero.

The routing decision (`rtl/dor_logic.sv`) reads only the valid flags and
address fields. It turns them into the OPMODE for each sub-cycle.

## Multi-pumping: two sub-cycles per router cycle

A Hoplite router has two outputs: East, and South shared with the PE exit.
A slice has only one P register. So the slice runs at twice the PE clock, and
every router cycle is split into two `clk` cycles:

- **East sub-cycle** (`sub_s = 0`), ending at the *E edge*:
  - P takes the East packet: the West packet from PCIN, or the PE packet from C.
  - A:B captures the North lane.
  - The plan for the South sub-cycle (its OPMODE, valid and exit) is registered in fabric flip-flops.
- **South sub-cycle** (`sub_s = 1`), ending at the *S edge*:
  - P takes the South or exit packet. The source is A:B (North), P (a parked West packet) or C (the PE).
  - C loads the next PE packet if the PE has one and the previous one has been taken.

P therefore carries two packets in turn. During the South sub-cycle it holds
the East packet, marked by `e_valid`. During the next East sub-cycle it holds
the South/exit packet, marked by `s_valid` or `pe_out_valid`. Downstream
slices must sample P or PCIN at exactly the right edge; see "Phase alignment"
below.

### Parking a turning West packet

A West packet that has reached its column position must turn South. It
arrives on PCIN during the East sub-cycle, but PCIN will hold something else
by the South sub-cycle. This design parks the packet in P at the E edge and
drives `e_valid = 0`, so the East lane is empty during that router cycle. At
the S edge, OPMODE Z = P keeps it in P as the South output.

This choice has one consequence. A West packet occupies P during the East
sub-cycle whether it goes East or turns. So **the PE can inject East only when
no West packet is present**. The other rules are Hoplite's:

- A North packet always wins the South output.
- A West packet that wants South while a North packet is present is
  deflected East and goes around its ring again.
- The PE injects only into an output that nobody else uses in that cycle.
  Its packet waits in the C register until it is taken.

### Valid flags

Valid flags travel on fabric wires beside each lane, through the same number
of registers as the lane. They are needed because a parked packet sits on
PCOUT while the East lane is empty. Lane bit 47 is always 0. The payload is
bits 46..0, and the destination is in its low bits: `dx` in `[XW-1:0]` and
`dy` in `[XW+YW-1:XW]`, with `XW = clog2(NX)` and `YW = clog2(NY)`.

## Layout on DSP columns

Cascades run only upward inside one DSP column. The network is therefore laid
out as follows (`rtl/hoplite_dsp_noc.sv`):

- **East rings run up the columns.** Column `c` holds routers `0 .. NX-1` on
  one cascade chain. `PASS_PER_HOP` *pass-through slices* sit between
  consecutive routers (`passthru_dsp`, OPMODE = PCIN; one cycle of pipeline).
- **The ring closes through the fabric.**
  - A *top-turn slice* after the last router takes PCIN into P, which drives the fabric (`top_turn_dsp`).
  - `COL_RET_REGS` fabric registers follow (`fabric_pipe`).
  - A *bottom-turn slice* before router 0 takes the lane on A:B and drives the cascade (`bottom_turn_dsp`; A:B register, then P).
- **South rings run across the columns.** Router `i` of column `c` drives
  router `i` of column `c+1` on fabric wires. The last column wraps to column
  0 through `ROW_RET_REGS` registers.

So `dx` is a router's position in its column, counted from the bottom. `dy`
is its column number.

## Phase alignment

A router's East packet is in P during that router's South sub-cycle. The
next router has to sample PCIN exactly then, at its own E edge. The top level
gives each router a sub-cycle phase offset equal to the number of `clk`
stages upstream of it, modulo 2. Router `i` is offset by
`i * (PASS_PER_HOP + 1)`.

Two conditions must hold for every ring to close in phase. Both are checked
at elaboration:

- Around a column ring, `(NX-1)*(PASS_PER_HOP+1) + (1 + COL_RET_REGS + 2 + 1)`
  must be even.
- `ROW_RET_REGS` must be even. Routers of the same position share a phase
  across all columns.

The defaults give every router the same phase: one pass-through slice per hop
and two registers on each return. With `PASS_PER_HOP = 0`, neighbouring
routers alternate phases and `COL_RET_REGS` must be odd when `NX` is even.

## Latency and throughput

A lone packet reaches the destination PE after this many `clk` cycles,
counted from the edge where it is handed over to the edge where the PE
samples it:

`3 + 2*hx + 4*[wraps through the column return] + 2*hy + 2*[wraps through the row return]`

Here `hx` and `hy` are the hop counts on each ring. The defaults are assumed.

Under uniform random traffic at 16 x 16, the delivered rate per PE tracks the
offered rate at low load. It saturates near 0.05 packets per PE per router
cycle once more than about 0.1 is offered, and does not fall beyond that.
The injection-sweep testbench measured:

| Offered per router cycle | 0.01 | 0.02 | 0.05 | 0.07 | 0.1 | 0.2 | 0.5 | 1.0 |
|--------------------------|------|------|------|------|-----|-----|-----|-----|
| Delivered                | 0.0098 | 0.0193 | 0.0424 | 0.0478 | 0.0501 | 0.0505 | 0.0509 | 0.0510 |

## Interfaces

Top level `hoplite_dsp_noc`. All per-router signals are packed arrays indexed
`[column][position]`.

| Port | Dir | Meaning |
|------|-----|---------|
| `clk` | in | DSP clock, twice the PE rate |
| `rst` | in | synchronous reset, active high |
| `pe_in_valid`, `pe_in_data[46:0]` | in | PE offers a packet; keep it stable until taken |
| `pe_in_ready` | out | the packet is taken at this edge (valid && ready) |
| `pe_out_valid`, `pe_out_data[46:0]` | out | packet delivered; valid for exactly one `clk` cycle |
| `ev` | out | per-router event pulses (`router_ev_t`): West East, West turn, deflection, North South, inject East, inject South, injection blocked, exit |

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `NX` | 16 | routers per DSP column (East ring length) |
| `NY` | 16 | DSP columns (South ring length) |
| `PASS_PER_HOP` | 1 | pass-through slices between routers |
| `COL_RET_REGS` | 2 | fabric registers from the top-turn slice back to the bottom-turn slice |
| `ROW_RET_REGS` | 2 | fabric registers from the last column back to the first |

## Modules

| File | Role |
|------|------|
| `rtl/hoplite_pkg.sv` | lane type, OPMODE encodings, event struct |
| `rtl/dsp48_mux.sv` | DSP48E1 slice model: A, B and C registers, X/Y/Z multiplexers, adder, P, cascade |
| `rtl/dor_logic.sv` | routing decision and OPMODE generation (combinational) |
| `rtl/hoplite_dsp_router.sv` | one router: a slice plus about 22 fabric flip-flops |
| `rtl/passthru_dsp.sv` | pass-through slice (cascade pipeline stage) |
| `rtl/top_turn_dsp.sv` | cascade to fabric corner turn |
| `rtl/bottom_turn_dsp.sv` | fabric to cascade corner turn |
| `rtl/fabric_pipe.sv` | registered fabric wire |
| `rtl/hoplite_dsp_noc.sv` | the torus |

## Where this design departs from the original Hoplite-DSP

- **The slice model is partial.** The multiplier, pre-adder, D port and all
  ALUMODEs except add are left out. The network never uses them. OPMODE
  selections of the multiplier output read as zero.
- **Own choices**, not taken from the original work:
  - parking turning West packets in P, and the resulting East-injection rule;
  - valid flags on separate wires;
  - the phase-alignment scheme;
  - the number of registers on the return wires;
  - the address encoding;
  - the PE valid/ready handshake and the synchronous reset.
- **Fabric logic is larger than the published figure.** The original reports
  about 13 LUTs and 17 flip-flops of fabric per router. This RTL keeps the
  PE's destination fields, the registered South plan and the valid flags in
  fabric. That is about 22 flip-flops at 16 x 16. No synthesis for a device
  was run.
- **Not included:** the processing elements, and the generation of the 2x
  clock from the PE clock. The whole network runs on one clock, and the PE
  interface is sampled at that rate.

## Simulating

The package must be compiled first. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/hoplite_pkg.sv \
    $(ls rtl/*.sv | grep -v _pkg) tb/tb_hoplite_dsp_noc.sv \
    --top-module tb_hoplite_dsp_noc -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog that counts a failure if the run hangs.

| Testbench | What it checks |
|-----------|----------------|
| `tb_hoplite_dsp_noc` | 16 x 16 defaults: lone-packet latencies, then random traffic with a scoreboard. It checks that every event kind occurred at least once. |
| `tb_noc_injection_sweep` | 16 x 16: delivered rate against offered rate from 0.01 to 1.0 per router cycle |
| `tb_noc_configs` | 2 x 2, 8 x 8, and a 4 x 4 network without pass-through slices (alternating phases), side by side. It uses the helper `noc_traffic_check`. |
| `tb_hoplite_dsp_router` | one router against a cycle model, random inputs on both sub-cycles |
| `tb_dor_logic` | every routing case against an independent model |
| `tb_dsp48_mux` | random OPMODE, enables and reset against a model |
| `tb_passthru_dsp`, `tb_top_turn_dsp`, `tb_bottom_turn_dsp`, `tb_fabric_pipe` | latency, data and reset |

The 16 x 16 testbenches take under a minute to build. The full-size
end-to-end run delivered 20372 packets with about 13900 deflections. Every
packet arrived once, at the right router, intact.
