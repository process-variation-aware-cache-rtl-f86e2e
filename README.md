# Way-prioritized L3 cache: leakage-aware selective cache ways

Manufacturing variation in gate length makes transistor leakage vary
exponentially from place to place on a die. In a large last-level cache
this means that two equally sized regions can differ in static power by
several times. A cache that switches off ways to save leakage
("selective cache ways") but treats all ways as equal can end up keeping
the leakiest ways powered.

This RTL implements a 16 MB, 16-way set-associative L3 cache in which

* every way is a separate sub-array with its own supply gate, so a disabled
  way stops leaking;
* two small registers describe the leakage of *this particular chip*:
  **PRIORITY** lists the physical ways from most to least leaky and
  **DEGREE** holds each listed way's quantized leakage;
* when the cache is sized to `k` ways, the ways kept on are the `k` least
  leaky ones (the last `k` PRIORITY entries). Because the list is pre-sorted,
  this is the lowest-leakage choice of `k` ways without searching all
  combinations;
* an energy-delay search uses DEGREE to decide *how many* ways to keep;
* a built-in self-test powers the ways one at a time so that an external
  current measurement can rank them and fill the two registers.

The scheme itself is "way prioritization". The cache organisation, the
register formats, both sizing rules, the write-back-before-gating rule and
the self-test idea follow that published scheme. Line size, address width,
replacement, handshakes, fixed-point formats and the exact sequencing are
choices made here; they are listed under
[Design choices](#design-choices-not-fixed-by-the-scheme).

## Block diagram

```
            req/rsp (level above)                mem_* (next level)
                    |                                   ^
                    v                                   |
   +------------------------------------------------------------+
   | cache_ctrl  (requests, misses, resize sweep, way mask,     |
   |              supply enables)                               |
   +----+-----------+-------------+------------------+----------+
        | index     | hit_vec     | dsel             ^ resize_req / mask
        v           | valid/dirty v                  |
   tag_array -> decode_logic    data_array -> data_select
   (16 gated    (tag match in   (16 gated    (way mux)
    sub-arrays)  enabled ways)   sub-arrays)         |
        ^ pwr_en (16)                                |
        |                                    way_select_policy <-- k (size_k,
   self-test pattern (leak_profiler) or controller   ^         ^   perf_sizer)
                                                     |         |
   cfg_* (boot) --> wp_regs: PRIORITY[16] x 4 bit ---+         |
   leak_profiler -> (load)   DEGREE[16]   x 4 bit --> ed_sizer -+
                                                   (core_power, slowdown[])
```

Module files (one per file, in `rtl/`):

| module | role |
|---|---|
| `wp_pkg` | shared constants (default sizes) and the request opcode type |
| `wp_l3_cache` | top level: wires everything, latches sizing requests |
| `cache_ctrl` | request FSM, miss handling, resize/invalidate sweeps, way mask, supply enables |
| `tag_array`, `data_array` | 16 `way_sram` sub-arrays each, read in parallel |
| `way_sram` | one gated sub-array (synchronous single-port SRAM + `pwr_en`) |
| `decode_logic` | address split and tag match restricted to enabled, valid ways |
| `data_select` | one-hot AND-OR line multiplexer |
| `wp_regs` | PRIORITY and DEGREE registers |
| `way_select_policy` | `k` → way mask (last `k` PRIORITY entries) |
| `perf_sizer` | fewest ways whose profiled slowdown is within a bound |
| `ed_sizer` | energy-delay search for `k` |
| `leak_profiler` | self-test sequence, ranking and quantization |

## The PRIORITY and DEGREE registers

PRIORITY has N = 16 entries of log2 N = 4 bits. Entry 0 names the most
leaky physical way, entry 15 the least leaky. DEGREE entry `i` is the
leakage of the way named by PRIORITY entry `i`, quantized to 4 bits (0–15),
so DEGREE decreases from entry 0 to entry 15. Example:

```
PRIORITY:  1  2  0  4 ... 7      (way 1 leaks most, way 7 least)
DEGREE  : 15 15 11  9 ... 1
k = 13  -> ways named by entries 3..15 enabled, ways 1, 2, 0 disabled
```

After reset PRIORITY = 0, 1, …, 15 and DEGREE = 0. With no leakage
information the cache then behaves like ordinary selective ways (it
disables the lowest-numbered ways first).

The registers can be written one entry at a time through `cfg_*`
(`cfg_sel` 0 = PRIORITY, 1 = DEGREE). This is the boot path: the ranking is
measured once at manufacturing test, kept in off-chip non-volatile storage
and written back at every boot. The self-test result is also loaded directly
when the test finishes. Nothing checks that PRIORITY is a permutation;
software must write one.

## Sizing: how many ways, and which

**Fixed performance target.** Software that knows, from a working-set
profile, that a workload needs `k` ways pulses `size_req` with `size_k`.
`way_select_policy` turns `k` into a mask that enables exactly the ways
named by PRIORITY entries `16-k … 15`. `k` is clamped to 1…16: a cache
with no way would need a bypass path, which this design does not have.

**Slowdown bound.** The static policy "disable as many ways as possible
while losing at most 2% performance" is built in as `perf_sizer`. Software
provides the profiled slowdown table (see below) and `max_slowdown`
(1.02 = 4177 in 4.12 format) and pulses `perf_req`. `perf_k` is the
smallest `k` with `slowdown[k-1] <= max_slowdown`. If no entry qualifies,
all 16 ways are kept. The `k` least leaky ways are then enabled as above.

**Energy-delay target.** `ed_sizer` picks `k` itself. Software provides
`core_power` (in DEGREE units) and `slowdown[j]`, the profiled run time
with `j+1` ways relative to the full cache (unsigned 4.12 fixed point,
1.0 = 4096). The search computes

```
ED(k) = (core_power + DEGREE[15] + DEGREE[14] + ... + DEGREE[16-k]) * slowdown[k-1]^2
```

for k = 1, 2, … — one step per clock, starting with the least leaky way
alone. It stops at the first `k` whose ED is larger than the best so far.
Power rises and delay falls with `k`, so the minimum has then been passed.
In the worst case all 16 steps are taken. On equal ED the smaller `k` is
kept. When `ed_done` pulses, `ed_best_k` is applied through the same path
as a fixed request. `ed_steps` reports how many steps were made.

Sizing requests are latched in the top level and handed to the controller
when it is idle. A request that arrives during a resize is applied after
that resize ends. A newer request replaces one that has not started.
`active_k` shows the size in force after `resize_done`.

## Resizing without losing data

Changing the mask from `old` to `new` is the longest operation in the design:

1. Ways in `new & ~old` are powered up (supply on for `old | new`).
2. Every set is visited in turn (`SETS` iterations). The set is read from
   all ways. Each valid, dirty line in a way being disabled (`old & ~new`)
   is written to the next level, one line per `mem_req` handshake. Then the
   entries of all changed ways (`old ^ new`) are invalidated in one write.
   Newly powered ways are invalidated because an unpowered array holds
   garbage.
3. The mask becomes `new` and the supply of the disabled ways is gated.

Requests from the level above are stalled (`req_ready` low) for the whole
sweep. At full size a sweep takes at least 4 × 16384 cycles plus one
write-back handshake per dirty line. The same invalidation sweep (one set
per cycle) runs after reset and after the self-test.

## Normal operation

The controller serves one line request at a time from the level above:
`OP_READ` (a fill request) or `OP_WRITE` (a dirty line written back from
above).

* The set is read from all powered ways in the cycle after acceptance.
  In the next cycle `decode_logic` compares tags in ways that are both
  valid and enabled. A disabled way can never hit.
* **Hit:** read data is taken through `data_select`, and a write updates
  the line and sets its dirty bit. The response (`rsp_valid`,
  `rsp_hit = 1`) comes exactly `HIT_LATENCY` = 20 cycles after the
  accepting clock edge. An assertion in `cache_ctrl` checks this.
* **Miss:** the victim is the first invalid enabled way, otherwise the
  next enabled way after a rotating pointer. A dirty victim is written to
  the next level first. A read miss then fetches the line and fills it
  clean. A write miss allocates the written line, dirty, without a fetch.
  Miss latency depends on the next level.

The cache is write-back and write-allocate. Addresses are 40-bit
physical byte addresses split as `tag[39:20] | index[19:6] | offset[5:0]`.
The offset is ignored: requests are whole 64-byte lines.

## Leakage self-test

`bist_start` runs `leak_profiler`. It is meant for manufacturing test, with
the processor idle, and it destroys the cache contents. The profiler drives
the array supply directly: first no way powered (baseline), then each way
alone. After `SETTLE` cycles for each pattern it raises `meas_req` and
waits for `meas_valid`/`meas_value`, a reading of total chip current from
outside the chip.

* Leakage of way `w` = reading − baseline, clipped at 0.
* Rank of way `w` = number of ways that leak more, or leak the same and
  have a lower way number. Then `PRIORITY[rank] = w`.
* DEGREE = ceil(leakage / 2^QSHIFT), saturated at 15, so any measurable
  leakage gives at least 1. `QSHIFT` sets the current step that one DEGREE
  unit stands for. Because the scale is absolute, DEGREE values from
  different chips can be compared.

The result appears on `prof_priority`/`prof_degree` (for storage) and is
loaded into the registers. The controller then re-invalidates all sets.

## Interfaces and timing (top level `wp_l3_cache`)

All signals are synchronous to `clk`. `rst_n` is an asynchronous
active-low reset. After reset, `req_ready` stays low for 16384 cycles while
all sets are invalidated.

| group | signals | protocol |
|---|---|---|
| level above | `req_valid`, `req_ready`, `req_op`, `req_addr`, `req_wline`; `rsp_valid`, `rsp_rline`, `rsp_hit` | valid/ready. One outstanding request. `rsp_valid` is a one-cycle pulse. |
| next level | `mem_req_valid`, `mem_req_ready`, `mem_req_we`, `mem_req_addr`, `mem_req_wline`; `mem_rsp_valid`, `mem_rsp_rline` | valid/ready per line. Reads are answered later by a one-cycle `mem_rsp_valid`. |
| registers | `cfg_we`, `cfg_sel`, `cfg_idx`, `cfg_wdata`; `priority_q`, `degree_q` | write takes effect at the clock edge |
| sizing | `size_req`, `size_k`; `perf_req`, `max_slowdown`, `perf_k`; `ed_start`, `core_power`, `slowdown[16]`; `ed_busy`, `ed_done`, `ed_best_k`, `ed_best_ed`, `ed_steps`, `active_k`, `resize_busy`, `resize_done` | pulses. Keep the ED inputs stable until `ed_done`. |
| power | `way_mask`, `pwr_en` | `pwr_en[w]` drives way `w`'s supply gate |
| self-test | `bist_start`, `bist_active`, `meas_req`, `meas_valid`, `meas_value`, `prof_done`, `prof_priority`, `prof_degree` | see above |
| events | `ev_hit`, `ev_miss`, `ev_victim_wb`, `ev_resize_wb`, `ev_stall` | one-cycle strobes for performance counters |

## Parameters

| parameter | default | origin |
|---|---|---|
| `N_WAYS` | 16 | the scheme's evaluated L3 |
| `CACHE_BYTES` | 16 MB | the scheme's evaluated L3 |
| `HIT_LATENCY` | 20 cycles | the scheme's evaluated L3 (minimum 4 here) |
| `LINE_BYTES` | 64 | own choice (gives 16384 sets) |
| `ADDR_W` | 40 | own choice |
| `DEG_W` | 4 | own choice (values 0–15) |
| `POWER_W`, `SLOW_W` | 16, 16 (4.12 format) | own choice |
| `MEAS_W`, `QSHIFT`, `SETTLE` | 16, 8, 16 | own choice |

Sets, index and tag widths are derived from the first three parameters.
Everything is parameterised, so the design scales to other sizes.
`wp_pkg` holds the defaults.

## Design choices not fixed by the scheme

* **Line size, address width, DEGREE width, number formats.** Chosen as
  listed above. The 4-bit DEGREE matches example values up to 15.
* **Replacement.** First invalid way, else round robin over enabled ways.
  A per-set LRU would cost another array.
* **Gated arrays in the model.** `way_sram` ignores accesses and reads zero
  while gated, but it keeps its old words instead of losing them. The
  controller never relies on this: it invalidates every way it powers up.
  The supply switch itself is analog and is represented only by the
  `pwr_en` outputs.
* **Tag storage.** Each way's tags sit in that way's gated sub-array, so
  gating a way also removes the leakage of its tags.
* **Self-test on chip.** The ranking and quantization could equally be
  done by the tester. Here they are done on chip, which is why the
  registers can also be loaded directly. The ammeter and the non-volatile
  store are outside the design.
* **Energy-delay search in hardware.** The same loop could run in firmware
  using `priority_q`/`degree_q`. In hardware it needs one adder and two
  multipliers and takes one step per cycle.
* **Resize granularity.** One set per step, all sets every time, with
  requests stalled. The cost scales with `SETS`. Resizing is expected to be
  rare (once per workload).
* **No zero-way configuration** (see Sizing).
* **Temperature** is not taken into account. DEGREE is a static
  manufacturing-time value.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_way_sram`, `tb_tag_array`, `tb_data_array` | read-after-write, read latency, multi-way writes, gated ways ignore writes and read zero |
| `tb_decode_logic` | address split, masked hit vector, hit way, valid/dirty over 2000 random cases |
| `tb_data_select` | one-hot selection, zero on empty select |
| `tb_wp_regs` | reset values, boot writes, bulk load priority |
| `tb_way_select_policy` | mask = last `k` entries for random permutations and all `k`, including clamping |
| `tb_perf_sizer` | smallest qualifying `k` for random tables and bounds |
| `tb_ed_sizer` | best `k`, best ED and step count against a reference search; one step per clock; early stop and full search both occur |
| `tb_leak_profiler` | one-way-at-a-time supply pattern, ranking and quantization against a reference |
| `tb_cache_ctrl` | 4-way cache under random traffic and random resizes. Checks data coherence against a golden copy, 20-cycle hits, no writes into disabled ways, and the mask/supply after each resize. Hits, misses, victim and resize write-backs, stalls, shrinking and growing must all occur. |
| `tb_wp_l3_cache` | whole design with 16 ways and 8 sets: boot writes, traffic, self-test, fixed sizing to 5 and to 0 (clamped) ways, two energy-delay searches (one stopping early), sizing to a 2% slowdown bound, growing back to 16. Checks that the enabled ways are the `k` truly least leaky ones of the chip model. |
| `tb_wp_leakage_eval` | six synthetic chips, sized to every `k` from 1 to 16. The static power of the enabled ways must equal the best possible `k`-way choice. It is compared with a variation-unaware choice, averaged (`k/16` of the total) and worst case (the `k` leakiest ways). Energy-delay sizing runs with cache leakage at 20% of total power. Typical output: enabled ways draw 37% of cache leakage on average against 53% (unaware average) and 69% (worst case), i.e. about 30% and 47% less. The search finds the exhaustive optimum on all six chips. The chips' leakage profiles are synthetic, so these numbers illustrate the mechanism and do not predict silicon. |
| `tb_wp_l3_cache_full` | the same sequence at the full default size (16 MB, 64-byte lines). Traffic is confined to 8 sets so hits and write-backs occur; every sweep covers all 16384 sets. Runs in about 15 s. |

`tb_mem_model` is a behavioural next-level memory used by the cache
testbenches. It applies random back-pressure and a fixed read latency.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/wp_pkg.sv tb/tb_wp_l3_cache.sv --top-module tb_wp_l3_cache -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Uninitialised state is
never read: everything is reset or written before use, and the arrays are
invalidated by the controller after reset.

## Limits

* Not modelled: the power switches, the current measurement and the
  non-volatile store. Leakage savings are therefore only checked
  structurally: the testbench confirms that the `k` least leaky ways are
  the ones kept on. Energy is not measured.
* The design answers one request at a time. It does not pipeline, overlap
  misses or keep a write-back buffer; a real L3 would.
* `wp_l3_cache` is one private L3. In a two-core part, where each core owns
  its L3, it is instantiated once per core, each copy with its own
  PRIORITY/DEGREE registers and its own sizing.
* Choosing `k` from a working-set profile or from dynamic working-set
  analysis is left to software.
