# Workload-aware network-processor front end

A network processor pushes packets through many small cores. Two things then
decide both its throughput and its power bill: **which core gets each packet**,
and **how many cores, at what clock speed, are switched on**. This RTL
implements hardware for both decisions, following the scheme of M. F. Iqbal's
thesis *Workload-Aware Network Processors: Improving Performance While
Minimizing Power Consumption*.

* **LAPS (Locality Aware Packet Scheduler)** steers every packet with a hash of
  its flow five-tuple. All packets of a flow go to one core, which keeps the
  flow in order and keeps its state in that core's data cache. Each service
  (IP forwarding, IPsec, ...) owns a private set of cores, so a core only ever
  runs one program and its instruction cache stays warm. Three mechanisms react
  to load:
  * Heavy ("aggressive") flows are detected in hardware and moved off an
    overloaded core.
  * Whole cores move between services as their traffic shifts. Linear hashing
    lets a service's core set grow or shrink by one core while remapping only
    the flows of one bucket.
  * Cores that no service needs are released and put to sleep.
* **TAP (Traffic Aware Power management)** runs a pool of DVFS-capable cores
  fed first-come-first-served from one queue. Every 500 µs it forecasts the
  next interval's packet count and converts it, using the application's cycles
  per packet, into the number of cores to keep powered. Every 50 µs it nudges
  individual cores' P-states up or down from a filtered queue length. A sudden
  queue build-up wakes a core at once.

The two run side by side in `np_top` and share only the clock and reset. The
processing cores themselves are not part of this RTL. They attach to the
per-core dequeue ports (LAPS) and dispatch ports (TAP), and obey the sleep,
C-state and P-state outputs.

```
                 ┌──────────────────────── laps_scheduler ─────────────────────────┐
 pkt_desc ──────►│ crc16_hash ─► migration_table (hit wins) ─┐                     │
                 │           └─► lh_map_table[svc] ─────────►├─► core ─► (1 clk reg)├─► queue_manager ─► core_deq_*[16]
                 │           └─► afd (aggressive?) ──► migrate to least-loaded core │      │ qlen, imbalance,
                 └──────────────────────────▲──────────────────────────────────────┘      │ max/least core
                                            │ grow / shrink bucket lists                   ▼
                                     resource_manager ◄──── arrivals, departures, queue lengths
                                            └──► core_sleep[16]

 tap_in_desc ─► pkt_fifo (80) ─► dispatcher (first idle running core) ─► tap_disp[16]
                  │ qlen                    ▲ active
                  ├─► queue_avg ─► pstate_governor ─► tap_pstate[16]
                  ├─► threshold_adapt (low/high/C_th)        │ wake_req
  arrivals/500µs ─► des_predictor ─► traffic_factor ─► C ─► cstate_manager ─► tap_cstate[16]
                  └─ qlen reaches C_th ─────────────────────────► wake one core
```

## Steering a packet (LAPS)

Each clock a packet descriptor arrives. It holds the 104-bit five-tuple, a
2-bit service number and the length. `laps_scheduler` picks the core in one
clock and registers the decision. One clock later the descriptor is written
into that core's queue in `queue_manager`. If that queue is full, the packet
is dropped (`pkt_drop`). The combinational path is CRC16 → map-table read →
mux, the same path whose speed sets the scheduler's packet rate. The AFD and
all table updates happen at the clock edge, off that path.

1. `crc16_hash` hashes the five-tuple (CRC-16/CCITT, polynomial 0x1021, initial
   value 0xFFFF, MSB first).
2. If the flow is in the **migration table**, it goes to the core stored
   there. The table is fully associative with 32 entries, replaced
   round-robin.
3. Otherwise the **service's map table** maps the hash to a bucket, and the
   bucket to a core (next section).
4. A flow is migrated when all of these hold:
   * the queue manager signals **imbalance**: the longest of all queues has
     reached `IMB_TH` (75 of 100);
   * the chosen core is that longest-queue core;
   * the flow is **aggressive**: it is in the AFD's small cache.

   The packet then goes to the least-loaded core of its own service. The
   move is recorded in the migration table, so the rest of the flow follows
   even after the imbalance clears.

Migration is the only thing that can reorder a flow. Packets already queued
on the old core may leave after newer ones on the new core. Only heavy flows
on the hottest core are moved, which keeps this rare.

## Per-service map tables and linear hashing

This is the least obvious part of the design.

Each service has a bucket list: bucket *j* holds a core ID. A service with *b*
buckets owns *b* cores. With four services and 16 cores, each starts with
`M_INIT = 4`. A plain `hash mod b` would remap almost every flow whenever *b*
changes. Linear hashing changes *b* one step at a time and moves only the
flows of one bucket:

* Let *i* = ⌊log2 *b*⌋ (the splitting round) and *p* = *b* − 2^i (the next
  bucket to split).
* A key *k* first goes to bucket *k* mod 2^i.
* If that bucket is below *p*, it has already been split this round, and the
  key uses *k* mod 2^(i+1) instead.

Adding a core appends bucket *b* and raises *p* by one. Only keys of bucket
*p* can move, and only into the new bucket. Removing a core is the exact
reverse: the last bucket disappears and its keys fall back into the bucket it
was split from.

Example, starting from 4 buckets over cores A–D. Keys 8 and 16 are in bucket 0.

* Adding core E (5 buckets, *i* = 2, *p* = 1) splits bucket 0 with mod 8:
  * 8 and 16 stay in bucket 0;
  * a key such as 4 or 12 moves to bucket 4 (core E).
* After three more cores, all four original buckets are split. That gives 8
  buckets with *p* = 0, and the next round uses mod 8 / mod 16.

With a power-of-two `M_INIT` this is the same family as
*h_i(k) = k mod 2^i·m*. The modulo becomes a bit mask. `tb_lh_map_table`
walks through this example key by key.

A service never drops below one bucket. The core that leaves a service is
always the one in its last bucket. The resource manager therefore reads
`shrink_core` back from the map table before it commands a shrink. Entries in
the migration table that point at that core are cleared in the same clock,
so no flow follows a core into a foreign service.

## Finding heavy flows: the aggressive flow detector

`afd` must name the few heavy flows among thousands without a counter per
flow. It uses two caches of flow counters:

* the **AFC**: 16 entries, fully associative. Membership means
  "aggressive";
* the **annex cache**: 512 entries, 4-way set associative, indexed by low
  hash bits. Every flow must qualify here first.

Each packet looks up both caches:

* **AFC hit:** the hit counts. If the counter is saturated, all AFC counters
  are first halved. This also ages out flows that went quiet. The annex
  counters are halved in the same clock.
* **Annex hit:** the count rises. If it is now strictly greater than the
  smallest (LFU) count in the AFC, the flow is promoted, and the AFC's LFU
  entry is written back into its own annex set.
* **Miss in both:** the flow replaces the LFU way of its annex set with a
  count of 1.

Counters are 8 bits wide.

Halving the annex along with the AFC matters. Without it, annex counters
would keep growing to saturation while the AFC counts keep being cut in
half. Every annex hit would then beat the AFC's LFU count, and the AFC would
fill with churn instead of heavy flows.

Packets can also be sampled so that not all of them update the caches.
`SAMPLE_LOG2` = s gives a sampling probability of 2^-s. A 16-bit LFSR steps
once per packet, and a packet is sampled when its low s bits are zero. Only
sampled packets count or promote, but every packet still gets the AFC
answer. The default, 0, samples every packet.

## Moving cores between services: the resource manager

`resource_manager` works in rate intervals of `RM_INTERVAL_CYC` clocks. From
the queue manager's arrival and departure pulses it counts, per service:

* Ra, the arrivals, and Rd, the departures;
* C = ⌊Ra / Rd1⌋, the cores the service needs. Rd1 (`rd1` input) is how many
  packets one core of that service handles per interval, taken from
  profiling.

Each interval it then applies these rules:

* **Needy service:** C > K (K = the cores it holds), or Ra > Rd while one of
  its queues has reached `HIGH_TH`. The second rule catches a slow build-up
  that flooring C hides.
* **Surplus:** while C < K, a per-service timer runs. After `IDLE_TH_CYC`
  (10 µs), one of the service's cores is marked surplus. The core keeps
  working for its service, and the mark is dropped again if C ≥ K.
* **Allocation:** at most one new core per needy service per interval.
  * A free core is taken first.
  * Else, if the system is in **underload** (ΣC ≤ N), the service takes the
    marked core of whichever service has held its mark longest.
  * Else, in **overload**, it may take a core only if it holds less than its
    proportional share (K_i/N < C_i/ΣC). The donor must hold more than its own
    share.
* **Release:** a mark that no one claims for `SLEEP_INTERVALS` (2) intervals
  releases the core. It leaves the bucket list and, once its queue has
  drained, `core_sleep` goes high so the core can be power-gated. This is
  how the LAPS cores save power: they have on/off control only, no DVFS.

At the end of each interval the manager spends 2 × N_SERVICES clocks walking
the services: first the release pass, then the allocation pass.

## Power management of the TAP pool

**Prediction and core count (every 500 µs).** Arrivals at the global queue are
counted per interval. `des_predictor` applies double exponential smoothing to
the count:

* level: S = α·X + (1−α)(S + b);
* trend: b = γ·ΔS + (1−γ)·b;
* forecast: S + b.

α and γ are Q0.16 inputs. `traffic_factor` then computes:

* β = forecast × IPP × CPI / (f_max × cycles per interval × N), where IPP is
  instructions per packet, CPI is cycles per instruction, f_max is 1 GHz and
  N is the pool size;
* C = ⌈β·N⌉, clamped to 1..N.

The division is bit-serial. Its result is ready 74 clocks after the interval
ends. `cstate_manager` then wakes or sleeps cores to match C:

* A sleeping core sits in C1 for two intervals, then drops to C2.
* Waking takes 10 µs from C1 and 100 µs from C2. C1 cores are woken first.
* Core 0 never sleeps.

**Speed (every 50 µs).** `queue_avg` low-pass filters the queue length at
every arrival, with weight 0.025 (1638/65536), so short bursts do not toggle
states. `pstate_governor` uses one global rule for all cores:

* average < low_th: the fastest active core drops one P-state;
* average ≥ high_th: the slowest one rises one P-state;
* average ≥ high_th and every active core already at P0: one more core is
  woken.

P0…P4 run at 100/85/75/65/50 % of f_max.

**Immediate wake-up.** When the instantaneous queue rises to C_th, one sleeping
core is woken at once, without waiting for the next interval.

**Adaptive thresholds.** `threshold_adapt` starts from the 80-entry queue:

* high_th = 80 − 40 = 40 (room for one core's wake-up worth of packets);
* low_th = high_th / 4 = 10;
* C_th = 40.

If the queue reached 95 % full in a 50 µs interval, all three drop by 10 %:
the wake-up came too late. After 10 consecutive intervals in which the queue
never reached C_th, they rise by 10 %, up to their starting values.

Packets leave the queue in arrival order. Each goes to the lowest-numbered
running core that says it is idle.

## Time base

All sizes in time are converted to clocks of an assumed 200 MHz front-end
clock:

| Quantity | Value | Clocks |
|---|---|---|
| Rate interval of the resource manager | 100 µs | 20000 |
| Idle_th | 10 µs | 2000 |
| TAP core interval | 500 µs | 100000 |
| P-state interval | 50 µs | 10000 |
| Wake-up from C1 / C2 | 10 / 100 µs | 2000 / 20000 |

TAP's clock is the `CLK_MHZ` parameter. The core frequency used for β is 1 GHz
(`F_MAX_MHZ`).

## Top-level interface (`np_top`)

* **LAPS:**
  * `pkt_valid/pkt_desc/pkt_drop` take the input packets.
  * `core_deq_ready/valid/desc[N]` are the per-core queue heads. A core takes
    its head by raising `ready` while `valid` is high.
  * `core_sleep`, `core_svc`, `core_owned` and `core_qlen` give per-core
    state.
  * `rd1[svc]` sets the per-core service rates. `svc_cores` and `svc_need`
    report K and C per service.
  * The mechanism event strobes are `ev_imbalance`, `ev_migrate`,
    `ev_mig_hit`, `ev_promote`, `ev_grow`, `ev_shrink`, `ev_release` and
    `ev_rm_interval`.
* **TAP:**
  * `tap_in_valid/desc/drop` take the input packets.
  * `tap_core_idle[N]` comes in from the cores. `tap_disp[N]` is a one-clock
    dispatch strobe, with the descriptor on `tap_disp_desc`.
  * `tap_pstate[N]` and `tap_cstate[N]` are the power-state commands.
  * `tap_alpha`, `tap_gamma`, `tap_ipp` and `tap_cpi` are configuration
    inputs.
  * `tap_c_req`, `tap_beta`, `tap_pred`, `tap_qlen`, `tap_avg_qlen` and
    `tap_n_on` are observation outputs.
  * `tap_events[10:0]` holds the strobes core_tick, p_tick, wake, sleep,
    deep, slower, faster, gov_wake, cth_wake, th_down and th_up, in that bit
    order.

Shared types (`pkt_desc_t`, `pstate_e`, `cstate_e`) are in `rtl/np_pkg.sv`.

| Parameter | Default | Meaning |
|---|---|---|
| N_CORES / N_SERVICES / M_INIT | 16 / 4 / 4 | LAPS cores, services, initial cores per service (power of two) |
| DEPTH / IMB_TH | 100 / 75 | per-core queue depth, imbalance threshold |
| AFC_N / ANNEX_N / ANNEX_WAYS | 16 / 512 / 4 | aggressive flow detector sizes |
| MIG_N | 32 | migration table entries |
| AFD_SAMPLE_LOG2 | 0 | AFD sampling, probability 2^-n (0 = every packet) |
| RM_INTERVAL_CYC / IDLE_TH_CYC / HIGH_TH | 20000 / 2000 / 50 | resource manager timing and queue threshold |
| TAP_N_CORES / Q_MAX / CLK_MHZ | 16 / 80 / 200 | TAP pool, global queue, clock |

## Interpretations and departures

The following are this implementation's choices where the scheme leaves room:

* **Rounding of C.**
  * LAPS floors C. The scheme speaks both of rounding to the nearest integer
    and of flooring to K. Flooring plus the `HIGH_TH` rule covers the case
    the rounding was meant for.
  * TAP rounds C up, so the forecast work always fits.
* **Sizes the scheme does not give:**
  * migration table: 32 entries;
  * imbalance threshold: 75;
  * HIGH_TH: 50;
  * rate interval: 100 µs;
  * counter widths;
  * which annex set a victim returns to: its own;
  * tie-breaking: lowest index.
* **Resource manager in hardware.** The scheme allows a software resource
  manager running on a data-plane core. Here it is a small FSM.
* **Releasing cores to sleep.** Releasing unclaimed surplus cores to sleep
  follows the combined LAPS-with-power-management configuration. When no
  core is marked, a needy service in underload waits.
* **Reading of C_th.** C_th is read as the queue length that triggers an
  immediate wake-up. It starts equal to high_th and fires once per upward
  crossing.
* **Wake-up latencies.** They are 10/100 µs. The 40-entry headroom in high_th
  was sized for a slower, 200 µs wake-up, which makes the default
  conservative.
* **P-states.** The governor keeps a P-state per core. A woken core starts at
  P0.
* **TAP pool size.** The pool is 16 cores. The most demanding applications
  evaluated for TAP (IPsec, SSL decryption) keep about 24–26 cores busy on
  average and need `TAP_N_CORES = 32`.
* **Annex aging.** Only the AFC's shift-on-saturation aging is specified.
  Here the annex counters are halved in the same clock.
* **Packet sampling.** How samples are picked is not specified. An LFSR is
  used, and sampling is off by default.

Not included: the processing cores, the frame/buffer manager and
classifier, the security accelerators, and the voltage/frequency regulators
and power switches that act on the P-state and C-state commands.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/np_pkg.sv tb/tb_afd.sv --top-module tb_afd
./obj_dir/Vtb_afd
```

Replace `tb_afd` with any testbench name.

| Testbench | What it exercises |
|---|---|
| `tb_crc16_hash` | CRC against a bit-serial reference, including the standard check value |
| `tb_lh_map_table` | the worked linear-hashing example, growth over several rounds, shrink as the exact reverse |
| `tb_afd` | promotion, re-promotion, victim write-back, halving on saturation (small instance); 1-in-4 sampling against an LFSR model |
| `tb_afd_accuracy` | full-size AFD on heavy-tailed traffic from 4000 flows: how many AFC entries are truly top-16 flows, with and without sampling |
| `tb_migration_table` | hit, update in place, round-robin replacement, invalidation by core |
| `tb_pkt_fifo`, `tb_queue_manager` | FIFO behaviour, drops, imbalance, least-loaded core per service |
| `tb_laps_scheduler` | flow stickiness, service partitioning, migration and its persistence |
| `tb_resource_manager` | free-core allocation, surplus mark and release to sleep, underload takeover, overload proportional share |
| `tb_des_predictor`, `tb_traffic_factor`, `tb_queue_avg` | fixed-point results against real-valued models or hand-worked values, and latency |
| `tb_pstate_governor`, `tb_threshold_adapt`, `tb_cstate_manager` | governor steps, 10 % threshold moves, C1→C2 ageing and wake-up latencies |
| `tb_tap_power_manager` | TAP with a behavioural core model: light, heavy, burst, overflow and quiet phases |
| `tb_tap_load` | TAP at full default size (16 cores, 200 MHz) under a 10–90 % load sweep; about 5 s |
| `tb_np_top` | both halves end to end at reduced size; counts every mechanism and fails if one never occurs |
| `tb_np_top_full` | the same at full default size (16+16 cores, 200 MHz time base); takes about 10 s |
| `tb_np_top_traffic` | full-size LAPS under the multi-service rate model (baseline + trend + seasonal sine + noise per service), underload and overload parameter sets, 60 s of model time compressed into 3 M clocks each; about 25 s |

The end-to-end testbenches check conservation (every packet is served or
dropped). They also check per-core FIFO order within each flow, that no
packet is left on a sleeping core, and that TAP dispatches only to running,
idle cores.

`tb_np_top_traffic` models the cores with per-service service times: 3.7 µs
plus 0.23 µs per 64 bytes, 0.5 µs, 3.53 µs, and 5.8 µs plus 0.21 µs per
64 bytes. A core that switches service pays a 10 µs cold-cache penalty.
Packet sizes (64–1024 bytes) and the flow popularity are the testbench's own
choices. With these, about 6 % of packets are lost in the underload set and
about 9 % in the overload set. Cores are re-assigned between services about
90–100 times per run. The testbench checks the same invariants and that the
overload set loses the larger share. It does not try to reproduce absolute
loss figures, which depend on the traces behind the original evaluation.

`tb_tap_load` steps the offered load through 10, 30, 50, 70 and 90 % of the
pool's full-speed capacity. Its cores take 4000 instructions per packet at
CPI 1.0, which is 4 µs at full clock. After each step settles, C matches
⌈16 × load⌉ within one core, and no packets are lost. The mean number of
powered cores rises from about 3.7 at 10 % load to the full pool at 70 %.
The mean clock of the running cores is about 68 % of full speed at 10 % load
and about 93 % at 90 % load. Between intervals, the P-state governor and the
C_th rule wake cores beyond C when the queue builds. That is why more cores
are powered than C asks for at medium load. A step up in load loses packets
until the next interval re-plans.

`tb_afd_accuracy` sends 200000 packets from 4000 flows with Zipf-like
popularity through the full-size detector. At the end, 14 of the 16 AFC
entries are among the 16 heaviest flows. The other two are flows ranked 17
to 20. A detector that samples one packet in 16 does equally well.
Flows near rank 16 differ little in weight, so they trade places; this sets
the limit on accuracy.
