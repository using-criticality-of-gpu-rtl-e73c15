# Criticality-aware memory management for CPU-GPU processors

When CPU cores and an integrated GPU share the last-level cache (LLC) and
DRAM, the GPU's large volume of traffic slows the CPU applications. Most of
that traffic does not limit the GPU's own speed. This RTL picks out the GPU
memory accesses that do limit it (the *critical* ones) and gives only those
priority in the DRAM schedulers. Everything else from the GPU goes behind
the CPU.

- **3D rendering.** An access is critical when the pipeline unit that issued
  it is the bottleneck of the rendering pipeline and the frame is projected
  to miss its frame-rate target. A game that already meets 40 frames/s gets
  no help.
- **GPGPU kernels.** An access is critical when its shader core is
  bottlenecked on memory and the load/store that issued it is one of the few
  that cause most of the core's stall cycles. The other shader misses bypass
  the LLC.

The DRAM schedulers then favour critical GPU requests. Two protections keep
the CPU from starving:

- a CPU request is sometimes put ahead of critical GPU traffic;
- CPU applications whose LLC miss rate suddenly rises are promoted.

The scheme follows a published proposal for CPU-GPU heterogeneous
processors. Where that proposal gives no number or rule, this design makes
its own choice; those choices are listed in
[Own choices and departures](#own-choices-and-departures).

## Block structure

```
gpu_crit_mem_top
├── pipeline_monitor            98 x flow_monitor (C_in / C_out: 2 x sat_counter each)
├── bottleneck_finder           back-to-front search over FE, ZS, SH, CW, BT
├── frame_rate_estimator
│   ├── rtp_tracker             render-target planes from tile coverage
│   ├── rtp_table               64 RTP records, last one accumulates
│   └── serial_divider
├── stream_classifier_3d        stream -> unit -> critical?
├── gpgpu_classifier
│   ├── 16 x shader_stall_monitor   (InputStall / OutputStall: sat_counter)
│   ├── 16 x stall_table            16 entries: PC, stall cycles, valid, LRU
│   └── gpu_miss_rate_monitor       GPU LLC miss rate <= 80 %?
├── llc_interference_monitor    IM-LLC: H/M/L classes, emergency mode
├── gpgpu_boost_detector        100K-cycle all-GPU priority probes
└── NCH x { im_sched_prob (+ serial_divider),  dram_scheduler (+ lfsr16) }
```

`crit_pkg` holds the shared types:

- `unit_e`: the five unit types;
- `stream_e`: the access streams;
- `bneck_t`: the bottleneck vector;
- `unit_stat_t`: the three occupancy/throughput bits;
- `intensity_e`: the H/M/L classes;
- `mem_req_t`: a DRAM request;
- `dram_cmd_t`: an issued command.

The GPU, the CPU cores, the LLC, the ring and the DRAM devices are not part
of this RTL. The events it needs from them arrive on ports of the top:
unit queue lengths, dispatch stalls, LLC lookups and the LLC misses bound
for memory.

## 3D rendering: finding the bottleneck unit

### The queuing network

The rendering pipeline is modelled as a network of five unit types:

- a front end (**FE**);
- one depth/stencil unit (**ZS**) per ROP (raster output unit);
- the shader cores (**SH**);
- one colour writer (**CW**) per ROP;
- a blitter (**BT**).

A draw call flows FE → ZS → SH → CW when the depth test runs early
(early-Z). It flows FE → SH → ZS → CW when the test runs late (late-Z). A
blit goes through BT alone.

With 16 ROPs and 64 shader cores there are 1 + 16 + 64 + 16 + 1 = 98
monitored instances. They sit on the `unit_pending` / `unit_completed`
arrays in the order FE, ZS[0..15], SH[0..63], CW[0..15], BT.

### Flow counters

Each instance has two 8-bit up/down saturating counters that start at the
mid-point 128 (`flow_monitor`):

- **C_in** counts up in a cycle in which the instance has more than `th_in`
  requests pending, and down otherwise.
- **C_out** counts up in a cycle in which it completed more than `th_out`
  requests, and down otherwise.

A counter above 128 means the condition has held more often than not
recently. The thresholds are ports, one pair per unit type. They should be
set from each unit's peak input and output bandwidth. For the shader they
should be the peak input bandwidth divided by the cycles a shader program
spends per fragment.

### Occupancy and throughput bits

`pipeline_monitor` reduces the counters to three bits per unit type:

| bit         | meaning                                      |
|-------------|----------------------------------------------|
| IOccupancy  | C_in of **any** instance above the mid-point |
| AOccupancy  | C_in of **all** instances above it           |
| Throughput  | C_out of **all** instances above it          |

- **Bottlenecked.** A unit with Throughput = 0 and IOccupancy = 1 has work
  but is not getting it done. The shader array is stricter: it needs
  AOccupancy = 1, so every core must have work.
- **Underloaded.** A multi-instance unit (ZS, SH, CW) with AOccupancy = 0 is
  underloaded: some of its instances are starved.

### The search (`bottleneck_finder`)

Every `BNECK_PERIOD` cycles the finder runs these steps:

1. Test CW and BT directly.
2. If CW is underloaded, something upstream is starving it. Walk the
   pipeline from back to front:
   - early-Z: test SH; if SH is underloaded, test ZS; if ZS is underloaded,
     test FE.
   - late-Z: test ZS, then SH, then FE.
3. At each step the unit in front is examined only if the unit behind it is
   underloaded.
4. If the front end is found bottlenecked, ZS and SH are marked as well.

The result is a registered 5-bit vector. It changes one cycle after the
period boundary, and `update` pulses in that cycle.

### Stream classification (`stream_classifier_3d`)

A GPU access is critical if the unit behind its stream is marked in that
vector **and** the frame-rate estimator projects the current frame to miss
its target.

| stream         | unit |
|----------------|------|
| colour         | CW   |
| depth          | ZS   |
| texture        | SH   |
| shader         | SH   |
| blitter        | BT   |
| everything else (vertex, index, …) | FE |

This lookup is combinational, so the GPU can attach the bit to the LLC
request it is sending.

## Projecting the frame rate

The frame-rate estimator has to know early in a frame whether the frame will
be late. Without a profile it has no way to know how much work a frame
holds, so it uses a proxy.

### Render-target planes

The render target is cut into t × t tiles. The run-time port `rt_num_tiles`
gives the tile count for the current resolution. The tracker's capacity
`NTILES = 570` covers 1920×1200 in 64×64 tiles.

A **render-target plane (RTP)** is a run of render-target updates that has
touched every tile at least once. `rtp_tracker` keeps a touched-tile bit
vector. When the last untouched tile is hit, it closes the RTP and reports
three counts:

- the RTP's updates;
- its cycles;
- its tiles.

A frame end closes a partial RTP. Overdraw means a frame is a sequence of
such planes, and the number of planes per frame changes slowly from frame
to frame.

### Learning mode

The first frame after reset, and any frame after a mismatch, is a learning
frame. Each RTP is written to `rtp_table`: 64 entries of updates, cycles and
tiles (32 bits each) plus a valid bit. After the 63rd RTP, the 64th entry
accumulates all the rest.

At the frame end the estimator keeps three values:

- the RTP count `N`;
- the total updates `U`;
- the average cycles per RTP, `C_avg`.

### Prediction mode

In every following frame the estimator repeats these steps:

```
lambda = min(1, updates so far this frame / U)        (Q16)
C_cur  = average cycles of the RTPs finished this frame (C_avg before the first)
C_rtp  = lambda * C_cur + (1 - lambda) * C_avg
F      = C_rtp * N                                    (projected frame cycles)
below_target = F > TARGET_CYCLES
```

- **Weighting.** Early in the frame the learned average dominates. As the
  frame proceeds, its own measured speed takes over.
- **Division.** The two divisions and the division for C_cur share one
  48-bit serial divider. A new estimate is ready about 150 cycles after it
  starts, and `below_target` holds between estimates.
- **Target.** `TARGET_CYCLES` is 25,000,000, which is 40 frames/s at a 1 GHz
  GPU clock.
- **Relearning.** The update count of each RTP finished in prediction mode
  is compared with the learned entry of the same index, for the RTPs that
  have their own entry (index below 63). The frame's RTP count is compared
  with `N`. A difference of more than 1/8 in either discards what was
  learned, and the next frame is then a learning frame. Cycle counts are not
  compared: a slower frame with the same work is what prediction is for.

## GPGPU: critical loads

When the GPU runs a compute kernel (`mode_gpgpu = 1`), `gpgpu_classifier`
works in two levels.

### Level 1: which cores are bottlenecked

Each of the 16 cores has two 8-bit saturating counters:

- **InputStall** counts up in cycles in which no warp could be dispatched
  because operands are pending.
- **OutputStall** counts up in cycles in which nothing committed.

Every `GPGPU_PERIOD` cycles a core whose counters are both above the
mid-point is marked bottlenecked.

### Level 2: which loads cause the stalls

Each core has a 16-entry fully associative `stall_table`. An entry holds:

- a 32-bit PC;
- a 32-bit stall-cycle count;
- a valid bit;
- a 4-bit true-LRU age.

Each cycle in which dispatch waits on a load that missed in the core's
cache, that load's PC gains one stall cycle. A new PC replaces the first
invalid entry, or else the least recently used one.

A PC is in the **top set** when the stall cycles of all entries ranked ahead
of it are below 90 % of the table's total. Entries are ranked by count, and
the lower slot wins a tie. In effect, PCs are taken from the top until 90 %
of the stall cycles are covered. The test is evaluated combinationally for
the PC of the request being classified.

### The rule for one request

A shader request to the LLC is critical when its core is bottlenecked
**and** one of these holds:

- its PC is in the top set;
- its PC is not in the table at all, and the GPU's LLC miss rate in the last
  interval was at most 80 % (`gpu_miss_rate_monitor`).

Every other shader request is non-critical and `gpu_req_bypass` tells the
LLC not to allocate it on a miss.

## DRAM scheduling

Each channel has a `dram_scheduler` with a 32-entry request queue. The queue
is kept in arrival order: issuing from the middle shifts the younger
requests down.

### Selection

Each cycle, if the data bus is free, one request to an idle bank is issued.
The winner has the largest key `{row hit, level}`, with the oldest winning
among equals:

- requests to an already open row go first, and critical ones first among
  them;
- when a row must be opened, the oldest request of the highest level wins,
  rather than the global oldest.

| level | requests |
|-------|----------|
| 3 | CPU requests, IM policy, in a cycle where the IM-SCHED coin fires |
| 2 | critical GPU requests; every GPU request while the boost is on; under IM-LLC, requests of CPU applications in emergency mode |
| 1 | other CPU requests |
| 0 | non-critical GPU requests |

### Policies

`policy_im = 0` selects the **GPU-favoring policy**: levels 2, 1 and 0 only.

`policy_im = 1` selects the **IM (interference mitigation) policy**, which
adds two mechanisms.

**IM-SCHED** (`im_sched_prob`, one per channel):

- Whenever a critical GPU request is issued, every older CPU request still
  waiting is flagged as passed over.
- Over each interval, the unit counts the CPU requests served and how many
  of them were flagged.
- At the interval end the fraction, capped at ½, becomes the probability for
  the next interval. The fraction is computed on a serial divider and kept in
  Q16.
- Each cycle a 16-bit LFSR draws against that probability. When the draw
  hits, CPU requests are placed above critical GPU requests.

**IM-LLC** (`llc_interference_monitor`):

- In each interval, every CPU application is classed by its LLC miss rate:
  L at most 10 %, M up to 70 %, H above 70 %.
- An application whose class goes from L to M or from L to H between two
  intervals is probably suffering LLC interference from the GPU. It enters
  **emergency mode**.
- At a later interval end, an application in emergency mode that is back in
  L stays in emergency mode (the help is working). One still in M or H
  leaves it (the help did not work).
- While any application is in emergency mode, its requests are scheduled at
  the level of critical GPU requests.

### GPGPU boost

`gpgpu_boost_detector` handles memory-sensitive compute phases, which
benefit from putting every GPU request first:

- Time is cut into 100,000-cycle windows, and shader instructions retired are
  counted in each.
- Every 10th window is a probe: all GPU requests get level 2 for that window.
- The boost is kept for the next window while each boosted window retires
  more instructions than the window before it. It drops at the first window
  that does no better.

### Bank timing

The bank model is open-page and uses DDR3 14-14-14 timing with BL8:

| access | cycles the bank is busy |
|--------|-------------------------|
| row hit | 4 |
| closed bank | tRCD + 4 = 18 |
| row conflict | tRP + tRCD + 4 = 32 |

Column commands on a channel are at least 4 cycles apart. The issued request
appears on `dram_cmd` one cycle after the decision, with activate and
precharge flags. An assertion checks that the queue never accepts a request
while full.

## Top-level interface and timing

| group | ports | notes |
|-------|-------|-------|
| mode | `mode_gpgpu`, `early_z`, `policy_im` | static configuration |
| 3D monitors | `th_in/th_out[5]`, `unit_pending/unit_completed[98]` | sampled every cycle |
| frame | `rt_upd_valid`, `rt_upd_tile`, `rt_num_tiles`, `frame_end` | one update per cycle at most; `rt_num_tiles` changes only between frames |
| GPGPU cores | `core_dispatch_stall`, `core_commit_none`, `core_stall_valid`, `core_stall_pc[16]`, `shader_retired` | per cycle |
| GPU request | `gpu_req_stream/core/pc` → `gpu_req_critical`, `gpu_req_bypass` | combinational |
| LLC events | `gpu_llc_access/miss`, `cpu_llc_access/id/miss` | one lookup of each kind per cycle |
| memory | `mc_req_valid/mc_req/mc_req_ready[NCH]` → `dram_cmd_valid/dram_cmd[NCH]` | valid/ready; `mc_req.critical` must carry the bit the GPU request got |
| status | bottleneck vector, frame estimate, per-core bottleneck bits, emergency bits, boost, per-channel probability and event pulses | observation only |

All state uses one clock and an asynchronous active-low reset. The original
setting has a 1 GHz 3D GPU, a 2 GHz GPGPU and a DDR3-2133 memory clock. The
clock-domain crossings between them are not modelled.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `N_ROP`, `N_SH` | 16, 64 | evaluated 3D GPU |
| `N_GC` | 16 | evaluated GPGPU |
| `N_CPU`, `NCH` | 4, 2 | evaluated processor: four cores, two single-channel controllers |
| `W` | 8 | counter width of the scheme |
| `STALL_ENTRIES`, `RTP_ENTRIES` | 16, 64 | sizes of the scheme |
| `TARGET_CYCLES` | 25,000,000 | 40 frames/s at 1 GHz |
| `BOOST_WINDOW` | 100,000 | window of the scheme |
| `NTILES` | 570 | own choice (64×64 tiles at 1920×1200) |
| `CNT_W` | 8 | own choice (width of the pending/completed counts) |
| `BNECK_PERIOD`, `GPGPU_PERIOD` | 1024 | own choice |
| `MISS_INTERVAL`, `IM_INTERVAL`, `LLC_INTERVAL` | 65,536 | own choice |
| `PROBE_EVERY` | 10 | own choice |
| `QDEPTH` | 32 | own choice |

At these defaults the storage matches the scheme's budget:

- 98 × 2 flow counters;
- 16 stall tables of 16 × 69 bits;
- a 64 × 97-bit RTP table.

## Own choices and departures

These are decisions the original scheme leaves open, or on which this design
departs from it:

- **Evaluation periods and intervals** (bottleneck search, GPGPU algorithm,
  miss rate, IM-SCHED, IM-LLC) are only described as "periodic" or "equal
  intervals". The lengths used here are guesses; tune them.
- **The FE check.** It marks FE, ZS and SH when FE has Throughput = 0 and
  IOccupancy = 1. No other condition is applied.
- **Shader flow monitors.** The queuing network draws the shader array as
  one queue, but the storage count implies one monitor per core. Here each
  of the 64 shader cores has its own C_in/C_out pair, and the array's bits
  are the any/all reduction.
- **"Other" streams** (vertex, index, constant data) are attributed to the
  front end.
- **Top-set rule.** "Top PCs covering up to 90 % of the stall cycles" is
  implemented as the ranking rule above. Stall counts saturate and are never
  cleared.
- **Definition of λ.** λ is the fraction of the learned frame's updates
  already done.
- **Mismatch rules.** The mismatch threshold of 1/8 and the rule that mode
  changes happen only at frame boundaries are own choices.
- **Reset values.** Until the first interval completes, the GPU miss rate
  counts as at most 80 %. An interval with no CPU LLC lookups classes the
  application as L. The first interval after reset only sets the classes:
  with no earlier interval, no application can enter emergency mode there.
- **Counting passed-over CPU requests.** IM-SCHED counts a CPU request in
  the interval in which it is served. The request counts as passed over if
  any younger critical GPU request issued while it waited.
- **DRAM model.** It has no CAS latency, tRAS, tWR, refresh or read/write
  turnaround. Bank, row and column arrive already decoded. Read data is not
  returned: the scheduler's output is the issue order.
- **Random source.** The IM-SCHED coin comes from a 16-bit LFSR per channel
  (the top gives each channel its own seed).

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the block
against a behavioural reference model written in the testbench, ends by
printing `TB_RESULT checks=N failures=M`, and has a watchdog.

| testbench | what it exercises |
|-----------|-------------------|
| `tb_sat_counter`, `tb_flow_monitor`, `tb_shader_stall_monitor` | random up/down streams including both saturation ends |
| `tb_pipeline_monitor` | reduced network held in random pending/completion patterns, all three bits per type |
| `tb_bottleneck_finder` | random IO/AO/TH bits in both pipeline orders against a step-by-step model of the search, plus the update period |
| `tb_stream_classifier_3d` | every stream × bottleneck vector × target state |
| `tb_stall_table` | random stall streams with more PCs than entries, LRU replacement and the 90 % rule |
| `tb_rtp_tracker` | random updates and frame ends, two render-target sizes |
| `tb_rtp_table` | a 4-entry table given more records than entries (overflow accumulation), sums, clearing |
| `tb_frame_rate_estimator` | learning, prediction values, target crossing, relearning |
| `tb_im_sched_prob`, `tb_llc_interference_monitor`, `tb_gpgpu_boost_detector`, `tb_gpu_miss_rate_monitor` | interval arithmetic, cap, class transitions, probe/keep/drop |
| `tb_dram_scheduler` | random traffic in four phases (GPU-favoring, IM with an emergency application, IM with a 50 % coin, boost) against a reference that tracks queue, rows and timing every cycle |
| `tb_gpu_crit_mem_top` | reduced sizes, end to end |
| `tb_gpu_crit_mem_top_full` | the top at its default parameters |

Five more testbenches run workloads like those the proposal was evaluated
with. They use blocks at their default sizes and check behaviour rather
than exact values:

| testbench | workload |
|-----------|----------|
| `tb_workload_3d_frames` | game-like frames of 70 render-target planes at 1280×1024, 1920×1200 and 1600×1200 (320, 570 and 475 tiles of 64×64). Per size: a learning frame, the same frame (estimate within 2 %), a frame three times slower (estimate follows the λ blend mid-frame and ends within 5 % of the real length, target missed), and a 50-plane frame that forces relearning. The target is scaled to 50,000 cycles so that whole frames fit in a simulation. |
| `tb_workload_3d_bottleneck` | the full 98-unit monitor network, the search and the stream classifier watching a flow model of the pipeline. Each instance has a 16-entry queue and a peak rate; units only complete what the next stage has room for. One unit type at a time is made slow, in both depth-test orders. The search must name the slow type, and the classifier must mark exactly its streams critical. Because the model spreads work evenly over the shader cores, it cannot tell the shader AOccupancy test from an IOccupancy test; `tb_bottleneck_finder` covers that. |
| `tb_workload_gpgpu` | a CUDA-like kernel on all 16 cores: 12 loads per core with a 1/(i+1) stall profile, a third of the cores compute bound, the LLC miss rate moving from 50 % to 95 %. Every 1000 cycles each load's critical/bypass answer is compared with a reference of exact stall counts. |
| `tb_workload_gpgpu_boost` | the boost detector at its default 100K-cycle windows under a two-phase kernel model whose throughput reacts to the boost: in a compute-bound phase boosting changes nothing, so each probe lasts one window; in a memory-sensitive phase each boosted window runs faster until the gain saturates, so the boost is held for exactly five windows. |
| `tb_workload_mix` | one channel and the LLC interference monitor under four CPU applications (two with high, two with low miss intensity, random rows) and a GPU stream with row locality, 30 % critical. One L application turns M after the first interval and recovers while it is served in emergency mode. Run under GPU-favoring and under IM. It checks that critical GPU requests wait less than CPU requests, which wait less than non-critical GPU requests; that the IM coin acts, and only under IM; that under IM critical GPU requests wait no less and CPU requests no more; and that only the disturbed application enters emergency mode. Under IM that application stays in emergency mode and waits less than its L neighbour; under GPU-favoring it leaves after one interval. |

At reduced sizes, `tb_gpu_crit_mem_top` makes every mechanism occur at least
once and fails if one never does:

- each unit type as the bottleneck;
- both pipeline orders;
- a frame under the target, a frame over it, and relearning;
- queue back-pressure;
- critical service;
- CPU-over-critical coin decisions;
- emergency service;
- row hits and conflicts;
- GPGPU critical and bypassed requests;
- the boost turning on and off.

`tb_gpu_crit_mem_top_full` runs the top at its default parameters through a
learning frame and a predicted frame, then through a GPGPU critical-load
scenario.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/crit_pkg.sv tb/tb_dram_scheduler.sv --top-module tb_dram_scheduler \
    -Mdir obj_tb -o sim
./obj_tb/sim
```

Some testbenches need a few seconds. The full-size top simulation runs in
about 20 s.

## Limits

What has been checked:

- the block behaviour against the rules above;
- the integration at reduced and full size.

What has not been checked:

- the performance effect (frame rate, CPU speed-up), which needs a full
  CPU-GPU simulator around the RTL;
- timing closure. At the default sizes the 98 flow monitors, the 16 stall
  tables with their combinational top-set ranking (a 16 × 16 comparison per
  lookup) and the 32-entry scheduler selection are the largest logic.
