# Real-time clustering deinterleaver (RCDA) in SystemVerilog

An electronic-support receiver hears radar pulses from many emitters at
once, and their pulse trains arrive interleaved. For each pulse the receiver
delivers a pulse description word (PDW): carrier frequency, pulse width (PW),
pulse amplitude (PA) and time of arrival (TOA). This design sorts that stream
back into emitters. For each emitter it also finds the pulse repetition
interval (PRI) pattern: **stable** (one PRI), **dwell** (a run of equal PRIs,
then a longer gap) or **stagger** (a repeating cycle of 2 or more different
PRIs; the number of PRIs is the *level*).

The main idea is that no pulse history is stored. Each PDW updates two small
tables of *clusters* as soon as it arrives:

* **PDW clusters** group pulses that look alike in frequency, PW and PA.
* **PRI clusters** record the intervals seen within each PDW cluster. They
  are chained by next/previous pointers in the order the intervals occur.

At the end of a collection window (a pulse count or a time limit set by the
operator), a second unit walks the PRI clusters. It reads each emitter's
pattern off the chains and the occurrence counts. Collection costs a few tens
of clocks per pulse. Interpretation costs a few clocks per PRI cluster.

```
 pdw_valid/pdw ──► pdw_fifo ──► arranger ──writes──► pdw_cluster_ram
                                   │                 pri_cluster_ram
                                   │ arranged             │ (read port shared,
                                   ▼                      │  switched by halted)
                               interpreter ◄──────────────┘
                                   │
              radar_valid/radar, sequence_found, search_ends, radar_count
```

`analyzer` is the top level. Its two halves are the **Arranger**, which does
the clustering, and the **Interpreter**, which classifies the clusters.

## Cluster records

| PDW cluster (`pdw_cluster_t`) | meaning |
|---|---|
| `freq`, `pw`, `pa` | running averages of the member pulses |
| `toa` | TOA of the latest member pulse |
| `n` | number of member pulses |
| `last_pri` | PRI cluster formed or hit by the latest pulse of this cluster |

| PRI cluster (`pri_cluster_t`) | meaning |
|---|---|
| `pri` | interval value (first value seen; not averaged) |
| `pdw_ptr` | PDW cluster the interval belongs to |
| `occ` | how many times the interval was seen |
| `next`, `prev` | the PRI cluster seen after / before this one for the same PDW cluster |

Pointer value 0 means "none". Clusters are therefore numbered from 1, and
word 0 of each memory is never used. There are 63 PDW clusters and 255 PRI
clusters (`PDW_IDX_W = 6` and `PRI_IDX_W = 8` in `rcda_pkg`).

## Arranger: what happens to one pulse

1. **PDW match.** The PDW clusters are read in index order, one per clock
   (the block RAM read is pipelined). The first cluster whose frequency, PW
   and PA are all within the operator's `d_freq`, `d_pw` and `d_pa` wins. The
   windows are inclusive: `ref - d <= new <= ref + d`. If nothing matches,
   the pulse opens a new PDW cluster with `n = 1` and no PRI, and its work is
   done.
2. **New PRI.** On a match, the PRI is the new TOA minus the cluster's stored
   TOA. Three moving-average units start: `(n*old + new)/(n+1)` for
   frequency, PW and PA. Each is a multiplier plus a restoring divider that
   makes four quotient bits per clock (parameter `BITS`), so it takes
   5 clocks. It runs while the PRI search goes on.
3. **PRI match.** The PRI clusters are read in order. The target is the
   first cluster that points to the same PDW cluster and whose PRI is within
   `d_pri`.
   * Hit: its occurrence count goes up by one.
   * Miss: a new PRI cluster opens with `occ = 1` and `next = 0`. Its `prev`
     is the PDW cluster's `last_pri`.
4. **Link.** The cluster the PDW cluster pointed to before, `last_pri`, gets
   its `next` pointer rewritten to the new or hit cluster, unless it is the
   same cluster. This link is what closes the loops the Interpreter looks
   for. For example, a level-3 stagger 700 → 900 → 1100 → 700 … ends with
   `next` pointers forming the ring 700 → 900 → 1100 → 700. A stable emitter
   keeps hitting its own cluster, so its `next` stays 0.
5. **Write-back.** The PDW cluster is rewritten with the averages, the new
   TOA, `n + 1` and the new `last_pri`.
6. **End of window.**
   * `LIMIT_PULSES`: checked after each pulse. The window ends once
     `search_limit` pulses have been taken in.
   * `LIMIT_TIME`: checked while idle. The window ends `search_limit` clocks
     after its first pulse.

   Either way, `arranged` pulses for one clock and the Arranger halts. The
   Interpreter then owns the memory read ports. When the Interpreter raises
   `search_ends`, both cluster sets are emptied and the next window starts.
   PDWs that arrive in the meantime wait in the FIFO.

A cluster memory that is full refuses new clusters. Each refusal is counted
on an event strobe. Occurrence and pulse counters saturate. PRIs longer than
2^24 − 1 ticks saturate.

## Interpreter: reading emitters off the chains

Thresholds are 8-bit fractions (Q0.8, so 192 means 0.75). Ratios are always
*smaller occurrence / larger occurrence*. They are compared without a
divider, as `occ_small * 256` against `threshold * occ_large`.

The PRI clusters are visited in index order. Clusters already reported as
part of an emitter are skipped. For cluster *i*:

| condition | result |
|---|---|
| `occ_i < occ_thr` | waste data (from missing pulses or false alarms): skipped |
| `next_i = 0` | **stable** emitter, PRI *i* |
| *j* = `next_i` is valid, and ratio(*i*,*j*) ≥ `stagger_occ` | **stagger** candidate: follow `next` from *j* until it returns to *i* |
| `gap_occ` < ratio(*i*,*j*) < `stagger_occ`, and `next_j = i` | **dwell** emitter: main PRI and gap |
| anything else | *i* reported as **stable** |

A stagger candidate is dropped as *broken* in any of these cases. Nothing is
reported for it, and its clusters remain free to be visited later.

* The chain reaches a null pointer.
* It reaches a waste or already-reported cluster.
* It repeats a cluster.
* It grows beyond `MAX_LEVEL` (8) PRIs.
* Its smallest/largest occurrence ratio over the whole chain ends below
  `stagger_occ`.

Dwell works by occurrence counts. The gap occurs once per dwell window, while
the main PRI occurs 5 to 20 times. The gap/main ratio of about 0.05 to 0.2
therefore separates dwell from stagger, whose PRIs occur about equally often.
Suggested settings are `gap_occ` ≈ 13 (0.05) and `stagger_occ` ≈ 192 (0.75).

Output format:
* Each emitter is sent as one `radar_beat_t` per PRI: mode, level, position,
  `last` flag, PRI, and the averaged frequency, PW and PA of its PDW cluster.
* `sequence_found` pulses with the final beat of each emitter.
* `search_ends` pulses once when all clusters have been visited.
* `radar_count` holds the number of emitters found.
* The output has no back-pressure.

## Operator settings (`rcda_cfg_t`, held stable)

| field | width | use |
|---|---|---|
| `d_freq`, `d_pw`, `d_pa` | 16 | PDW match windows |
| `d_pri` | 24 | PRI match window |
| `occ_thr` | 16 | minimum occurrence of a valid PRI cluster |
| `stagger_occ`, `gap_occ` | 8 (Q0.8) | ratio thresholds |
| `limit_mode` | 1 | `LIMIT_PULSES` or `LIMIT_TIME` |
| `search_limit` | 32 | pulses, or clocks since the first pulse of the window |

## Timing

Measured at the default parameters with one stable and one level-4 stagger
emitter (the reference case for this algorithm's hardware):

* **Cluster update:** at most 14 clocks per pulse. At a 100 MHz clock that is
  140 ns, against 300 ns (30 clocks) published for the original
  implementation.
  * The update is 1 clock to accept the PDW, 1 clock per PDW cluster
    scanned, 1 clock per PRI cluster scanned, then 1 to 3 clocks to update
    and link the PRI cluster, 1 to write the PDW cluster back and 1 to check
    the limit.
  * The moving average (5 clocks) runs in parallel with the PRI scan.
  * With many emitters the two sequential scans set the pace: at 59
    emitters a pulse can take over 100 clocks.
* **Interpretation:** `sequence_found` for the first emitter comes 14 clocks
  after `arranged`, against 15 published.
  * Each visited cluster costs 2 clocks, each chain step 1 clock, and each
    output beat 2 clocks.
* **Throughput:** the two-emitter stream was played at 8 million PDWs per
  second (one every 12.5 clocks on average) with no PDW lost. That matches
  the original's claim of more than 8 million pulses per second on average.
  This holds for small scenes only, because the scans grow with the cluster
  count.
* **Input buffer:** `pdw_fifo` (depth 4) absorbs bursts of PDWs closer together
  than the update time. A PDW that finds it full is dropped and counted on
  `pdw_dropped`. The original loses a PDW that follows the previous one by
  less than 100 ns. Here, bursts of up to 5 PDWs at any spacing survive, but
  the sustained rate is one PDW per update time.
* **During interpretation** the Arranger is halted. PDWs arriving in that
  time wait in the same buffer, so a dense stream loses pulses while a large
  cluster set is being read out.
* **Clock speed:** no timing closure has been run. The longest path is
  probably the divider's four chained 18-bit compare-subtract stages. Setting
  `BITS` (the `moving_avg` default) to 2 or 1 shortens that path, at the
  cost of 9 or 17 clocks per moving average instead of 5.

Synthesis gives about 730 cells and 1250 flip-flop bits. The two memories hold
22,528 bits: 64 × 104 bits and 256 × 62 bits. That maps to 5 RAMB16-class
block RAMs in x36 mode (3 + 2); the original reports 8.

## Detection quality

`tb_workloads` measures how often the whole design finds each generated
emitter with the right mode, PRIs and frequency.

Setup:
* Each trial draws emitters of random mode, PRI and PDW values and plays
  them through the Analyzer.
* Noise: PDW parameters vary by ±j % of mid-scale. Each interval varies by
  ±j % of a 10,000-tick reference PRI.
* Settings: deltas of twice the noise amplitude, `occ_thr` = 3,
  `gap_occ` = 13 and `stagger_occ` = 192.
* About 32 emitters per cell.

In every window the output also equals the reference model's, beat for beat.

| jitter / missing | 1 emitter | 3 | 5 | 8 |
|---|---|---|---|---|
| 0 % / 2 % | 94 % | 97 % | 91 % | 94 % |
| 0 % / 5 % | 75 % | 79 % | 63 % | 72 % |
| 0 % / 10 % | 66 % | 33 % | 60 % | 41 % |
| 2 % / 2 % | 88 % | 94 % | 100 % | 94 % |
| 2 % / 5 % | 88 % | 85 % | 71 % | 66 % |
| 2 % / 10 % | 75 % | 58 % | 34 % | 44 % |
| 5 % / 2 % | 94 % | 94 % | 86 % | 94 % |
| 5 % / 5 % | 84 % | 67 % | 77 % | 69 % |
| 5 % / 10 % | 59 % | 64 % | 37 % | 50 % |

Results of the other runs:

| run | emitters found |
|---|---|
| one emitter, jitter up to 16 %, no missing pulses | all |
| 59 emitters, no jitter, no missing pulses | all |
| one emitter, missing pulses 3 / 6 / 9 / 12 % | 81 / 69 / 66 / 44 % |

Noise and jitter are harmless once the deltas cover them. Missing pulses are
what costs detections. A missing pulse leaves an interval equal to the sum of
two true PRIs, and that interval gets its own PRI cluster.
* **Stable emitter:** the emitter's only cluster then points to the
  harmonic cluster, and the harmonic points back. If the harmonic is seen
  `occ_thr` times or more, the pair looks exactly like a dwell: the ratio is
  about the loss rate, 0.02 to 0.12.
* **Stagger emitter:** a harmonic in the last cycle of the window breaks the
  ring.
* **Threshold trade-off:** a higher `occ_thr` hides the harmonics, but it
  also hides dwell gaps, which occur only once per dwell.

Summed over the table, 283 of 435 stable, 294 of 402 dwell and 291 of 351
stagger emitters were found. Published software runs of this algorithm
report 100 % in most of these cells. Those runs used a different generator
and operator settings that are not known in detail, so the two sets of
numbers are not directly comparable.

## What this design fills in or changes

The algorithm is published as prose. The points below are this design's own
choices:

* **Link on a hit.** The `next` pointer of the previous last cluster is
  rewritten both when a pulse opens a new PRI cluster and when it hits an
  existing one. The published text states the rewrite only for a new
  cluster. Without it, though, the last PRI of a dwell or stagger cycle
  never points back to the first, and the Interpreter's loop test could
  never succeed.
* **Ratio as min/max.** The published text takes the ratio against the first
  cluster's occurrence. With min/max, a dwell is still found when the gap
  cluster happens to have the lower index.
* **Fallback and broken-chain rules.** The stable fallback and the rules
  that drop a broken stagger chain are this design's own.
* **Sizes and widths.** All bit widths, the cluster counts (63 and 255), the
  FIFO depth and `MAX_LEVEL` are chosen here. The original gives none.
* **Windows restart.** The published description lets clustering run
  continuously. Here each window is frozen for interpretation, then emptied,
  which gives the Interpreter a consistent snapshot.
* **Time limit in clocks.** The time limit counts clock cycles, and TOA is
  taken in receiver ticks. The testbenches use one tick per clock.
* **Rounding.** Moving averages truncate toward zero.
* **Divider.** The divider is a restoring divider that makes 4 bits per
  clock. The original names only adders and block RAMs as its building
  blocks.

Only frequency, PW and PA are matched. Angle of arrival is not used.

## Files

| file | content |
|---|---|
| `rtl/rcda_pkg.sv` | widths, cluster and output records, settings struct |
| `rtl/analyzer.sv` | top level |
| `rtl/arranger.sv` | clustering state machine |
| `rtl/interpreter.sv` | classification state machine |
| `rtl/moving_avg.sv` | `(n*prev+new)/(n+1)` unit |
| `rtl/tol_window.sv` | inclusive `ref ± delta` comparator |
| `rtl/pdw_fifo.sv` | first-word-fall-through input buffer with drop counter |
| `rtl/pdw_cluster_ram.sv`, `rtl/pri_cluster_ram.sv` | cluster memories (one write port, one registered read port) |
| `tb/rcda_ref_pkg.sv` | behavioural reference model of both halves; emitter pulse-train generator |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_workloads.sv` | detection-quality runs over many generated scenes |

## Verification

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.
Each also has a watchdog.

* **`tb_analyzer`** runs the whole design at its default parameters. Pulse
  trains are generated and fed in real time, one TOA tick per clock, over
  five collection windows:
  * the two-emitter timing case, with the 30- and 15-clock bounds checked;
  * stable, stagger and dwell emitters with parameter noise and 5 % missing
    pulses;
  * a time-limited window;
  * more distinct PDWs than PDW clusters;
  * a burst that overflows the input FIFO.

  It compares every output beat with the reference model. It checks that
  each generated emitter is found with its mode, PRIs and frequency. It also
  checks that every mechanism happens: PDW/PRI cluster new, match and full,
  linking, both limits, waste data, all three modes, queueing, dropping and
  restart.
* **`tb_arranger`** compares both cluster tables word by word with the model
  after each window.
* **`tb_workloads`** runs the detection-quality scenes above, again at the
  default parameters.
* **`tb_interpreter`** checks:
  * a hand-worked table with every outcome;
  * the interpretation latency;
  * 60 random cluster tables against the model.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_analyzer \
  rtl/rcda_pkg.sv tb/rcda_ref_pkg.sv \
  rtl/{analyzer,arranger,interpreter,moving_avg,tol_window,pdw_fifo,pdw_cluster_ram,pri_cluster_ram}.sv \
  tb/tb_analyzer.sv
./obj_dir/Vtb_analyzer +verilator+rand+reset+2
```

Building and running `tb_analyzer` takes a few seconds. Substitute the module under test and its
testbench for the others; the unit testbenches need only their module(s),
plus the two packages.

To change the sizes, edit `rcda_pkg`. `PDW_IDX_W` and `PRI_IDX_W` set the
cluster counts and `MAX_LEVEL` sets the longest chain. The reference model
follows these automatically.
