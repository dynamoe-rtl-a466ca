# DyNAMoE: a reconfigurable-NoC accelerator for Mixture-of-Experts layers

In a Mixture-of-Experts (MoE) layer a gating network picks, for every token, a
few experts out of many, and only those experts run. Which experts run is known
only at run time. A fixed dataflow therefore fits badly. This design keeps the
experts' arithmetic in an array of identical matrix-vector cores. Every token is
steered to its experts, and the expert outputs are summed on the way back, by
three networks-on-chip. Each network is reprogrammed at run time by header
packets that travel through it:

* **Distro NoC**: scatters (and multicasts) token vectors to the cores that
  hold the selected experts.
* **Weight Distro NoC**: carries expert weight matrices into the cores' weight
  banks.
* **Redux NoC**: brings the expert outputs back along the same paths in the
  reverse direction, adding them where paths meet.

The default configuration is a 4 x 4 mesh of cores. Each core has 256
multiply-accumulate units and two 256 x 256 x 16-bit weight banks. The mesh
shares a 16 MB global buffer. All of this is synthesizable SystemVerilog
(IEEE 1800-2017), and it is checked by self-checking testbenches that run under
Verilator.

## Structure

```
            host writes                     controller requests
                |                                  |
        +-------v----------------------------------v------+
        | global_buffer: 4 banks x 8192 words x 4097 bits |
        +------------------------+------------------------+
                                 | one flit per request
                                 v
      west port of core (0,0): Distro in / Weight Distro in / Redux out (results)
        +--------+   +--------+   +--------+   +--------+
        | (0,0)  |---| (1,0)  |---| (2,0)  |---| (3,0)  |     every "---" and "|"
        +--------+   +--------+   +--------+   +--------+     is three links: one
            |            |            |            |          Distro, one Weight
           ...          ...          ...          ...         Distro, one Redux
        +--------+   +--------+   +--------+   +--------+
        | (0,3)  |---| (1,3)  |---| (2,3)  |---| (3,3)  |
        +--------+   +--------+   +--------+   +--------+
```

Core `(x, y)` has router id `y*4 + x`; `y` grows southwards. One core
(`dynamoe_core`) contains:

```
 Distro router (5x5) --Loc out--> gemm_core token input
 Weight Distro router (4x5) --Loc out--> gemm_core weight banks (ping-pong)
 gemm_core result --topk_en=0--------------------> NIC buffer --> Redux Loc in
                  --topk_en=1--> topk_generator --> NIC buffer --> Redux Loc in
 Redux router (5x3 in-xbar, adder, 2x5 out-xbar) --Loc out--> NIC buffer --> Distro Loc in
 Distro reconfiguration logic --setting--> Redux configuration memory
```

Every link is a 4096-bit flit (256 lanes of 16 bits) plus one sideband bit that
marks it as a header or as data. Links use a valid/ready handshake. Every
router output is a two-flit register queue, so a hop costs one cycle. A
router's ready never depends on its neighbour's ready in the same cycle, so
back-pressure cannot form combinational loops around the mesh.

## Header packets and run-time reconfiguration

This is the central mechanism. Reading it first makes the rest of the RTL
straightforward.

A header flit has the same 256 x 16-bit shape as a data flit. **Lane `r` is the
configuration word for router `r`**, so one header flit can reprogram up to 256
routers at once. A configuration word is:

| bits  | 15    | 14:12 | 11:9  | 8:6   | 5:3   | 2:0   |
|-------|-------|-------|-------|-------|-------|-------|
| field | MC/UC | N out | S out | E out | W out | Loc out |

Each 3-bit field names the input that drives that output: 0 means unused,
1 = N, 2 = S, 3 = E, 4 = W, 5 = Loc. The MC bit must be 1 for multicast, where
several outputs name the same input. With MC = 0, only the first output
(counting from bit 14) that names a given input keeps it. Fields holding 6 or 7
are ignored. `dynamoe_pkg::encode_lane` and `decode_lane` convert between this
format and the per-output select array `xcfg_t`.

When a header flit arrives on some input of a Distro or Weight Distro router:

1. The router decodes its own lane and replaces its whole crossbar setting
   with it. In that cycle the router moves no other flit.
2. It forwards the same header flit to every output that the new setting
   connects to the input the header came in on. Every router along the new
   path therefore receives its own lane, and the path is built hop by hop.
3. Data flits that arrive later on that input follow the stored setting. If
   the input drives several outputs, the flit is copied to all of them in the
   same cycle (in-network multicast), once all of them have room.

A flit that arrives on an input with no route is consumed and reported
(`drop`). Inputs are served in fixed priority N > S > E > W > Loc. A header that
reaches a core's Loc output is ignored by the GEMM core.

### The Redux NoC reuses the Distro setting in reverse

Each time the Distro router of a core stores a new setting, it also writes the
same 15 bits into the configuration memory of the Redux router in that core.
The Redux router reads the bits backwards. If Distro output `o` is fed by
Distro input `i`, then Redux input `o` feeds Redux output `i`. A token that
fans out from `i` to two outputs therefore has its two results come back on
those same two ports, and they are added and sent out towards `i`. If only one
port comes back, the flit goes through the bypass path.

Inside, the Redux router has a 5x3 input crossbar that selects adder operand A,
adder operand B and one bypass flit. A 256-lane adder (16-bit, wrapping) sits
behind it, followed by a 2x5 output crossbar. In each cycle it can do one add
and one bypass. An add waits until both operands are present (a join).

Consequences worth knowing:

* **A Redux output can have at most two sources.** A Distro input may therefore
  fan out to at most two outputs in any router whose results come back through
  the Redux NoC. With two experts per token on XY-style multicast trees this
  always holds. Wider fan-out is flagged by an assertion and such a route never
  fires.
* Expert outputs are summed without weighting by the gate score.
* The Weight Distro NoC decodes headers in the same format. Its headers are
  sent separately, because weights go to one expert at a time while tokens go
  to all selected experts.

### Example program (from `tb/tb_dynamoe_top.sv`)

Two experts sit on cores 1 = (1,0) and 2 = (2,0). Everything enters at the
west port of core 0.

| step | NoC | flit | lanes |
|------|-----|------|-------|
| 1 | Weight Distro | header, UC | r0: E<-W, r1: Loc<-W |
| 2 | Weight Distro | 256 weight columns of expert A | |
| 3 | Weight Distro | header, UC | r0: E<-W, r1: E<-W, r2: Loc<-W |
| 4 | Weight Distro | 256 weight columns of expert B | |
| 5 | Distro | header, MC | r0: E<-W, r1: Loc<-W and E<-W, r2: Loc<-W |
| 6 | Distro | token | |

The result `W_A x + W_B x` leaves Redux router 0 on its west output, which is
the `res_*` port. In core 1 the adder sums the local result and the result
coming from core 2. Core 0 passes the sum through its bypass path.

## GEMM core

`gemm_core` computes `y = W x` for a 256-element token and a 256 x 256 matrix.
The weights arrive as 256 flits, one column per flit (lane `i` = `W[i][j]`),
and fill one of two SRAM banks. The core computes with one bank (`cmp_bank`,
the bank-select signal) while the other bank loads the matrix for the next
token. Each bank is used for one token and then released.

In cycle `j` the core reads column `j`, and one cycle later all 256 MACs add
`W[i][j] * x[j]` to 32-bit accumulators. The token is shifted one lane per
cycle, so `x[j]` is broadcast to every MAC. The result (the low 16 bits of each
accumulator, two's complement) is ready COLS + 1 = 257 cycles after the token
is taken, and is held until the Redux side accepts it. Numbers are plain 16-bit
integers. No fixed-point scaling is applied.

## Top-K generator

`topk_generator` takes a flit of gating scores (lanes 0..N_EXP-1, signed). It
returns the K best expert indices in lanes 0..K-1, best first, and their scores
in lanes K..2K-1. The other lanes are zero. It inserts one score per cycle into
a sorted K-entry list, so the result appears N_EXP cycles after the scores are
taken. Ties go to the lower index. The defaults are N_EXP = 16 (one expert per
core) and K = 2.

When a core's `topk_en` input is set, its GEMM result goes through the
generator. That core becomes the gating core: it computes `Wg x` with the
gating matrix in its bank, and the expert IDs travel back along the Redux path
like any other result.

## Global buffer and the host side

`global_buffer` has four banks, each 8192 words of one flit. One word is
4096 data bits plus the header bit, so each bank holds 4 MB of data. Port A
writes (the host or PCIe side, `gb_*` at the top). Port B reads for the
NoCs. The top does not contain the controller that decides which experts go
where. In its place is a request port: `inj_valid/inj_ready/inj_addr/inj_noc`
sends one buffer word into the Distro (`inj_noc = 0`) or Weight Distro
(`inj_noc = 1`) input of core (0,0). A request is accepted every third cycle.
Flits routed out of the Distro NoC at core (0,0)'s west port appear on
`dout_*`. Flits leaving the mesh at any other edge are discarded.

## Departures from the source description, and open points

* **Controller, PCIe link and mapper are not built.** A test bench plays the
  controller. It writes header and data flits into the global buffer and
  requests their injection. Tiling of matrices larger than 256 x 256, expert
  placement and prefetch scheduling are therefore not in the RTL.
* **Single clock.** The source runs the Top-K generator at one tenth of the
  core clock. Here it runs on the core clock with a short serial datapath.
* **Header semantics are a reconstruction.** The 1 + 5 x 3 bit split per lane
  comes from the source. The meaning of a field (the input select of an
  output), the port numbering, the "lane = router id" rule and the forwarding
  of headers along the new path are this design's choices.
* **Local-port wiring.** The source's block diagram places the Top-K generator
  between the Redux local output and the Distro local input, and has
  `buffer_en` multiplexers next to NIC buffers. Here the Top-K generator sits
  between the GEMM result and the Redux local input. The NIC buffers are plain
  FIFOs, one before the Redux local input and one between the Redux local
  output and the Distro local input.
* **Injection point.** All traffic enters and leaves at core (0,0). The source
  does not say where the global buffer meets the mesh.
* Reset is synchronous and active low. SRAM contents are not reset.

Sizes as built: 4 x 4 cores, 256 MACs and 2 x 128 KB weight banks per core, and
a 16 MB global buffer. A whole Switch-base-8 MoE layer (about 75 MB of expert
weights) does not fit on chip. Running it needs the streaming and tiling that
the missing controller would provide.

## Files

| file | contents |
|------|----------|
| `rtl/dynamoe_pkg.sv` | flit type, port enum, header lane encode/decode |
| `rtl/dynamoe_top.sv` | mesh, global buffer, injection/exit link |
| `rtl/dynamoe_core.sv` | one core |
| `rtl/gemm_core.sv` | 256-MAC matrix-vector unit, ping-pong banks |
| `rtl/sram_1w1r.sv` | SRAM array (weight banks, buffer banks) |
| `rtl/noc_switch.sv` | header-programmed crossbar shared by both Distro routers |
| `rtl/distro_router.sv`, `rtl/weight_distro_router.sv` | 5x5 and 4x5 routers |
| `rtl/redux_router.sv`, `rtl/redux_config_mem.sv` | reduction router and its configuration |
| `rtl/nic_buffer.sv` | flit FIFO (NIC buffers and router output queues) |
| `rtl/topk_generator.sv` | top-K selection |
| `rtl/global_buffer.sv` | banked global buffer |
| `tb/tb_<block>.sv` | one self-checking testbench per block |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It has
a watchdog that ends a hung run with a failure. To run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_gemm_core \
    -y rtl -y tb +libext+.sv rtl/dynamoe_pkg.sv tb/tb_gemm_core.sv
./obj_dir/Vtb_gemm_core
```

`tb_dynamoe_top` runs the whole accelerator at its default size. It covers a
gating layer with Top-K and two tokens through two experts, with multicast,
in-network addition, bypass, weight preload during compute, injection stalls
and result back-pressure. It counts each of these events. The Verilator build
takes a few minutes, and the run (about 5,500 cycles) takes under a second.

`tb_moe_wide_expert` also runs at the default size. It shows how a matrix wider
than one core is handled. The 768 inputs of one Switch-base-8 expert layer
are split over three cores, each holding a 256 x 256 tile. The testbench sends
each core its token slice by unicast. A multicast header then programs the
reduction tree, so the Redux NoC adds the three partial products. It runs two
tokens, and each token's weights stream in while the previous one computes.

The block testbenches for the routers drive random traffic with random
back-pressure and compare against a reference model in the testbench.
`tb_dynamoe_core` uses COLS = 16 to stay short. Every other testbench uses the
default sizes, except `tb_global_buffer`, which uses 32-word banks.
