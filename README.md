# Asynchronous 4x4 mesh NoC with per-island DVFS

This is a network-on-chip for a 16-tile multicore. The NoC is split into voltage/frequency
islands (VFIs). Each island runs at a frequency picked at run time from its own traffic load.
When an island needs a higher frequency, its supply voltage is raised first. The islands are
globally asynchronous and locally synchronous (GALS): every link that crosses an island border
passes through a resynchronizer. The design shows the whole control loop in hardware:

- routers measure their congestion;
- a policy turns the congestion into a frequency;
- a DVS sequencer orders voltage and frequency changes safely;
- a glitch-free divider makes the island clock from one chip clock;
- resynchronizers keep the traffic correct while neighbouring islands run at unrelated rates.

The design follows a published DVFS/GALS NoC simulation framework. Where that framework gives a
model or a number, the RTL uses it. Where it is silent, the choices made here are listed at the
end, under "Departures and own choices".

## Structure

```
clk_pll (4 GHz) ──┬─ per island: threshold_policy ─┐
                  │              linear_policy ────┼─ mux ─ dvs_ctrl ─ clk_divider ─ island clock
                  │              fixed divisor ────┘          │ vid (voltage command)
                  │
   island clocks ─┴─ 16 x vc_router (4x4 mesh, XY) ── link_resync (FIFO / handshake / wire)
clk_core (tiles) ──── fifo_resync ─ local_ni ─ router local port ─ fifo_resync ── ejection
```

| file | role |
|---|---|
| `noc_pkg.sv` | flit type, mesh size, port and voltage enums |
| `vc_router.sv` | 5-port wormhole router with 4 VCs, credit flow control, congestion count |
| `hs_resync.sv` | two-phase req/ack resynchronizer |
| `fifo_resync.sv` | bi-synchronous FIFO, 6 slots, Johnson-coded pointers |
| `link_resync.sv` | selects FIFO, handshake or plain wire for one link channel |
| `local_ni.sv` | credit keeping for the tile injection port |
| `clk_divider.sv` | island clock = chip clock / divisor; changes only at a period boundary |
| `dvs_ctrl.sv` | voltage table and raise-then-wait sequencing |
| `threshold_policy.sv` | 3-level policy (800/500/250 MHz) with minimum hold time |
| `linear_policy.sv` | f = k * C policy |
| `dvfs_noc_top.sv` | the mesh, islands and control |

## Flits and the router

A flit is 72 bits. It holds a 64-bit payload and a sideband with these fields:

- type (head, body, tail or head-tail);
- VC number;
- destination x and y.

Only the head's destination is used. Ports are numbered LOCAL=0, NORTH=1, EAST=2, SOUTH=3 and
WEST=4. North is towards row 0. Router `r` sits at column `r % 4`, row `r / 4`.

The router is a virtual-channel wormhole router. Each input port has 4 VCs, and each VC buffers
`BUF_DEPTH` = 4 flits. A head flit goes through these steps:

1. **BW/RC.** The flit is written into its VC buffer. If it is a head, the XY output port is
   computed in the same cycle.
2. **VA.** The head asks for a free VC on that output port, that is, a VC in the downstream
   router. The allocator is separable and round-robin: each input VC picks one free output VC,
   then each output VC grants one requester.
3. **SA.** Flits that own an output VC and hold a credit for it compete for the crossbar. The
   allocator is separable and round-robin: one VC per input port is chosen, then one input per
   output port. The winner's credit is taken.
4. **ST.** The crossbar output is registered. `out_valid` rises after the third clock edge from
   arrival.

Body and tail flits skip RC and VA. An output VC is released when two things are true: its tail
has been sent, and all of its credits have come back. This means the downstream buffer is empty
before a new packet can claim that VC.

Credits go back upstream on a separate channel, `cr_out_valid`/`cr_out_vc`. They are sent one
per cycle and per port, and are held in a small counter while the credit link is busy. A router
never sends a flit without a credit. So a receiver never needs to push back on a flit: the
flit channel of a link has no ready towards the router.

`congestion` counts the flits held in all input buffers. This is the load measure the policies
use.

## Crossing clock domains

Links inside one island are plain wires. A link between islands puts a resynchronizer on both
its channels: flits going one way and credits going the other.

**FIFO resynchronizer** (`fifo_resync`, default and main configuration). This is a dual-clock
FIFO with `DEPTH` = 6 slots.

- Each pointer is a Johnson counter of DEPTH bits. It changes one bit per step and makes a full
  turn in 2*DEPTH steps, so it can cross a clock boundary through a 2-flop synchronizer at any
  depth, including 6, which is not a power of two.
- Each side counts the other side's synchronized pointer back to a position to work out its
  fill level.
- The writer sees `full`, as `wr_ready` low. The reader sees `empty`, as `rd_valid` low.
- The read side is first-word fall-through.
- Best case, a written word is readable 3 reader edges later. At equal clocks it passes one
  word per cycle.

**Handshake resynchronizer** (`hs_resync`). This is a two-phase, edge-signalled req/ack pair.

- The sender toggles `req` when it accepts a word, and holds the word on the data link.
  `busy = req XOR ack_synchronized` blocks the next word.
- At the receiver, `req` passes two flops and becomes `req_stable`. A third flop and an XOR
  form the edge detector `data_valid`.
- `req_stable` is returned as `ack` through two sender flops.
- The receive register loads on the receiver edge at which `req_stable` toggles. So the word is
  already held when `data_valid` pulses. This detail matters. If the register loaded one edge
  later, a sender clocked much faster than the receiver could see `ack`, replace the link data,
  and corrupt the word before capture.
- Latency is 2 receiver edges. At equal clocks the handshake passes one word every 4 cycles.
  That is why it costs far more throughput than the FIFO.

Tiles run on `clk_core` and are outside every island. Their injection and ejection paths always
use a FIFO resynchronizer, because injection must be able to stall. `local_ni` keeps the
router's credits for the local input port. It only lets a head flit leave the FIFO when the
local VC's buffer is empty, and body flits only with a credit. The ejection FIFO returns the
router's local-port credit as soon as a flit leaves the router, so the tile side must always
accept ejected flits.

## Frequency and voltage control

All island clocks come from one chip clock, `clk_pll`, assumed to run at 4 GHz. The frequency
settings then become whole divisors:

| frequency | 2 GHz | 1 GHz | 800 MHz | 500 MHz | 250 MHz |
|---|---|---|---|---|---|
| divisor | 2 | 4 | 5 | 8 | 16 |

`clk_divider` loads a new divisor only when its count wraps. So a change never produces a short
pulse. The clock is high for floor(div/2) chip cycles. Every island starts at divisor 8
(500 MHz).

`dvs_ctrl` sits between the policy and the divider. It picks the lowest voltage that supports
the frequency:

| frequency | voltage |
|---|---|
| up to 250 MHz | 0.7 V |
| up to 500 MHz | 0.8 V |
| up to 750 MHz | 0.9 V |
| above 750 MHz | 1.0 V |

It handles a request like this:

- **Slower frequency.** The new divisor applies at once, and the voltage command drops in the
  same cycle.
- **Faster frequency, same voltage.** The new divisor also applies at once.
- **Faster frequency, higher voltage.** The voltage command is raised first. `ramping` stays
  high for `V_DELAY_CYCLES` = 20000 chip cycles (5 us). Only then is the new divisor released.

The frequency therefore never runs ahead of the voltage. An assertion checks this. With
`dvs_en` = 0 the voltage stays at 1.0 V and only the frequency changes (DFS). The regulator
itself is outside the design: `vid_out` is its command.

Each island feeds the average congestion of its routers to two policies. `policy_sel` chooses
one of them or a fixed divisor:

- **Threshold policy.** It samples every 400 chip cycles (0.1 us). Above `HIGH_TH` = 20 flits it
  asks for 800 MHz, below `LOW_TH` = 10 for 250 MHz, and otherwise 500 MHz. After a change it
  holds the frequency for at least `LIMIT_SAMPLES` = 10 samples (1 us).
- **Linear policy.** It samples every 400 chip cycles (10 MHz) and sets f = 40 MHz x C. The
  result is clamped to 250 MHz – 1 GHz, then rounded up to the next frequency the divider can
  make. The divisor is the largest d with d x f <= 4000.

The congestion count reaches the chip-clock domain through one `hs_resync` per router. It is
refreshed as fast as the handshake allows.

## Top-level parameters

| parameter | default | meaning |
|---|---|---|
| `VFI_2X2` | 0 | 0: each router is an island (16 islands). 1: four 2x2 islands |
| `RESYNC` | `RESYNC_FIFO` | resynchronizer on island borders: FIFO or handshake |
| `FIFO_DEPTH` | 6 | FIFO slots |
| `BUF_DEPTH` | 4 | router buffer per VC |
| `V_DELAY_CYCLES` | 20000 | voltage rise time in chip cycles |
| `SAMPLE_CYCLES` | 400 | policy sampling period |
| `LIMIT_SAMPLES` | 10 | threshold policy hold time in samples |

With `dvs_en` and `VFI_2X2` you get the four configurations compared in the source work: DFS
or DVFS, with 1-router or 2x2 islands. `policy_sel` = FIXED with `fixed_div` = 4 gives a fixed
1 GHz network, which you can use to compare the FIFO and handshake schemes.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/noc_pkg.sv tb/tb_vc_router.sv -y rtl \
          --top-module tb_vc_router -o sim && ./obj_dir/sim
```

The end-to-end tests are these:

- **`tb_dvfs_noc_top`** runs the top at its default parameters: 16 islands with FIFO-6, DVFS.
  It goes through light traffic, hot-spot bursts, the linear policy and fixed 1 GHz. It checks
  that every packet arrives once, in order and unmixed. It counts each mechanism and fails if one
  never occurs:
  - frequency increases and decreases;
  - voltage ramps;
  - changes held back by the 1 us limit;
  - full injection and link FIFOs;
  - credit stalls;
  - linear-policy settings.
- **`tb_dvfs_noc_top_hs`** runs four 2x2 islands with handshake links. It also checks traffic
  inside the islands, islands running at different divisors, and handshake back-pressure.

Each takes a few seconds.

## Departures and own choices

- **Chip clock.** The source work models either dividers from one PLL or one PLL per island, the
  latter with a second-order step response. Only the divider scheme is built. The PLL's analog
  behaviour has no logic equivalent. The 4 GHz chip clock is chosen here so that the policies'
  frequencies are whole divisors.
- **Frequency range.** The source describes router frequencies from 500 MHz to 2 GHz in 20 MHz
  steps. A divider only makes 4000/d MHz (2000, 1333, 1000, 800, ...), so such a sweep cannot be
  reproduced exactly. The voltage table and both policies stop at 1 GHz, as the source's voltage
  table does. Divisors 2 and 3 run the routers at 1.0 V.
- **Threshold names.** The source names the thresholds in two inconsistent orders. Here the
  upper threshold is 20 flits and the lower 10.
- **k = 0.04.** The units of k are not given. It is read as GHz per flit, so 25 buffered flits
  ask for 1 GHz.
- **Router details chosen here:**
  - buffer depth 4;
  - one virtual network;
  - one local port shared by core and cache;
  - separable round-robin allocators;
  - conservative VC release (tail sent and credits back).
- **FIFO best case.** The source's FIFO timing model counts two cycles in the best case. This
  FIFO uses a full two-flop synchronizer and so takes three receiver edges.
- **Congestion transport.** How a router's load reaches the policy is not described. A handshake
  channel into the chip-clock domain is used.
- **Not built.** The processors, caches, coherence protocol, memory controllers and voltage
  regulator are outside the RTL. The tile ports are brought out at the top, and the regulator is
  represented by its voltage command and the 5 us wait.
