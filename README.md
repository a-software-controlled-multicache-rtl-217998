# Software-controlled multicache coherence

A shared-memory multiprocessor in which every processor has its own
copy-back cache, and the caches are kept coherent **without any hardware
path between them**. There is no snooping bus and no directory. Instead, the
program tells its cache how to treat each access. It does so through four
*cache commands* that the processor fetches as part of the program code and
passes to its cache. Shared data is only touched inside critical sections.
When a processor leaves a critical section, its cache copies the shared lines
it used back to main memory and drops them. The next processor to enter the
section therefore finds the current value in memory.

Nothing in the cache depends on the number of processors, and caches never
talk to each other. The cost is paid by the program, in commands executed and
in memory layout.

This repository holds synthesizable SystemVerilog for the cache, the memory
path shared by all caches, a main memory, and a top level that joins N of each
into a system. It also holds self-checking testbenches for every module.

## The protocol

### Operating modes

Every cache is always in one of three modes:

| mode    | what a load or store does |
|---------|---------------------------|
| normal  | Ordinary copy-back cache access. The line's shared tag is left as it is. |
| shared  | The same cached access. In addition, the referenced line's **shared tag** is set. |
| bypass  | The access goes to main memory only. The cache is not searched and not updated. |

### Commands

| command | effect |
|---------|--------|
| Normal  | Switch to normal mode. |
| Bypass  | Switch to bypass mode. |
| Shared  | Switch to shared mode. |
| Save    | Copy **every** line whose shared tag is set to main memory, then invalidate it. Invalidation clears the tag. Then switch to normal mode. |

Any command can be issued in any mode.

### Life of a shared tag

Each cache line has one shared-tag bit, beside its valid and dirty bits.
The tag changes only as follows:

* A shared-mode access, hit or miss, sets it. On a miss the line is first
  fetched with the tag clear, and then the repeated access sets it.
* A normal-mode access leaves it unchanged. A bypass-mode access never
  touches the cache.
* Save writes the line to memory and invalidates it, which clears the tag.
* Refilling the line after an ordinary replacement also clears the tag.

Save copies a shared line to memory even when the line is clean. This is what
the protocol specifies. Ordinary replacement copies back only dirty lines.

### How software is expected to use it

* **Semaphores are never cached.** Before Wait or Signal touches a
  semaphore, the code issues Bypass. Afterwards it issues Normal.
* **Shared items are accessed in shared mode inside their critical section.**
  Each access can be wrapped as Shared … Normal. Alternatively, Wait can
  issue Shared once for the whole section. Section-wide shared mode costs
  fewer commands. However, Save then also writes back every private line
  touched in the section.
* **Signal issues Save.** The lines used in the section reach memory, and
  the next access to them misses. The processor that enters the section
  next therefore reads the new values.
* **One shared item per line.** A line must not mix a shared item with
  private data, or with items guarded by different critical sections.
  Otherwise a later copy-back of the stale line can overwrite a newer value
  saved by another processor. This constraint falls on memory allocation,
  not on the hardware. It wastes on average up to (z−1)/2 words per shared
  item, for a line of z words, so short lines are preferred.

The hardware enforces none of these rules. A program that accesses shared
data outside shared mode, or that breaks the one-item-per-line rule, gets
stale data.

## Hardware organisation

```
  processor 0 ... processor N-1       (not part of the RTL: cpu_* ports)
        |               |
  coherent_cache  coherent_cache      one per processor
   |- cache_mode_ctrl      mode register
   |- cache_tag_store      tag, valid, dirty, shared tag, LRU ages
   |- cache_data_store     line data
   '- cache_controller     sequencer
        |               |
        mem_interconnect              round-robin, one transfer at a time
               |
         shared_memory                line and word transfers
```

All the modules live in `rtl/`, and the shared enums, struct and default
sizes are in `rtl/mc_pkg.sv`. The top level is `multicache_system`.

### Cache controller

`cache_controller` is a blocking sequencer with seven states:

* `S_IDLE` takes a request.
  - A Normal, Bypass or Shared command is answered at once, and the mode
    register changes.
  - Save goes to `S_SAVE`.
  - A load or store goes to `S_BYPASS` in bypass mode, and to `S_LOOKUP`
    otherwise.
* `S_LOOKUP` searches the set.
  - **On a hit**, it reads or writes the word and sets the dirty bit on a
    store. It sets the shared tag if the mode is shared, updates the LRU
    ages, and answers.
  - **On a miss**, it latches the victim and goes to `S_WB` if the victim
    is valid and dirty. Otherwise it goes to `S_FILL`.
* `S_WB` writes the victim line to memory, then goes to `S_FILL`.
* `S_FILL` reads the missing line and installs it clean, with its shared
  tag clear. It then returns to `S_LOOKUP`, where the access now hits.
* `S_BYPASS` makes a single-word read or write in memory and answers.
* `S_SAVE` asks the tag store for the lowest-numbered line with its shared
  tag set.
  - If there is one, `S_SAVE_WB` writes it to memory and invalidates it,
    then control returns to `S_SAVE`.
  - If there is none, the cache answers the Save and its mode returns to
    normal.

The tag store finds the next shared line with a priority encoder. Save
therefore visits only shared lines, and its time depends on their number and
not on the cache size.

### Timing

Cycle 0 is the cycle in which the cache takes the request. T is the number of
cycles a memory transfer stays pending, counted from its request through its
acknowledgement. With an idle memory path, T = MEM_LAT + 2 = 6 at the defaults.

| request | answered in cycle |
|---------|-------------------|
| Normal / Bypass / Shared | 1 |
| load or store hit | 2 |
| miss, clean victim | 2 + T + 1 |
| miss, dirty victim | 2 + 2T + 1 |
| bypass access | 1 + T |
| Save with k shared lines | 2 + k·(1 + T) |

Contention for the memory path adds waiting cycles to T.

### Memory path and main memory

`mem_interconnect` gives the single memory port to one cache at a time. While
the port is free, a round-robin arbiter chooses among the requesting caches.
It starts with the cache after the one served last, and forwards the winner's
request in the same cycle. The winner holds the port until the memory's
acknowledgement, which goes to that cache only. The `contention` output flags
every cycle in which some request is waiting.

`shared_memory` serves one transfer at a time. A transfer moves either a
whole line (fill, copy-back, Save) or a single word (bypass). The memory
takes the request as soon as it is idle, makes the access MEM_LAT cycles
later, and acknowledges in the following cycle.

### Interfaces

Processor side, for each cache:

* A request is `cpu_req_valid`, `cpu_req_op` (load, store or command),
  `cpu_req_cmd`, `cpu_req_addr` (a word address) and `cpu_req_wdata`.
* The cache takes the request in a cycle where `cpu_req_ready` is high.
* Every request is answered by exactly one `cpu_resp_valid` pulse, with
  load data on `cpu_resp_rdata`. Stores and commands are answered too, so
  software can tell when a Save has finished.

Memory side:

* `mem_req_valid` and the request fields are held stable until a one-cycle
  `mem_resp_valid`. An assertion in each requester checks this.
* Line transfers use line-aligned addresses. Word reads return the word in
  the lowest lane of the line-wide data.

For observation, the top brings out each cache's `mode`. It also brings out a
`cache_events_t` of one-cycle pulses: hit, miss, copy-back, bypass access,
shared tag newly set, line copied by Save, and Save done.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N_CPU` | 4 | processors and caches |
| `WORD_W` | 32 | bits per word |
| `ADDR_W` | 12 | word-address bits (4096-word memory) |
| `LINE_WORDS` | 4 | words per line (z) |
| `SETS` | 16 | sets per cache |
| `WAYS` | 2 | lines per set |
| `MEM_LAT` | 4 | memory access cycles (≥ 1) |
| `INIT_FILE` | "" | optional `$readmemh` image of main memory, one line per entry |

The protocol fixes none of these numbers, so all of them are choices made
here. `LINE_WORDS`, `SETS` and `WAYS` must be powers of two, and `ADDR_W`
must leave at least one tag bit.

## What follows the protocol and what is chosen here

The following come from the protocol:

* the three modes and their access rules;
* the four commands and the transitions between modes;
* the shared tag, and the fact that Save copies every shared line, clean or
  dirty, then invalidates it;
* copy-back private caches;
* set-associative line selection with status-bit replacement;
* the absence of any cache-to-cache path.

The following are choices made in this design:

* all sizes and latencies;
* the processor and memory handshakes;
* LRU ages as the replacement status bits;
* writing back only dirty lines on replacement;
* the priority-encoder Save sweep;
* a single round-robin memory path instead of some richer network;
* reset state: all lines invalid, shared tags clear, normal mode.

Points to be aware of:

* **Bypass accesses do not look at the cache.** A bypass read of an
  address that is also held dirty in the same cache returns the memory
  copy. This is the rule as specified. Keep semaphores on lines of their
  own that are never accessed through the cache.
* **No atomic read-modify-write.** The protocol leaves the implementation
  of Wait and Signal to the semaphore mechanism. This memory offers only
  plain reads and writes. The system testbench therefore uses a
  turn-passing lock, which needs nothing more.
* **No flush command.** Flushing the whole cache at every critical-section
  exit is the costlier alternative that Save replaces, so it is not built.
* **The processors are not included.** The testbenches stand in for them
  and drive the `cpu_*` ports.

## Simulating

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mc_pkg.sv tb/tb_multicache_system.sv \
          --top-module tb_multicache_system -o sim
./obj_dir/sim
```

Replace the testbench name to run another one:

* `tb_multicache_system` is the whole system at the default parameters.
  Four processors take turns through a bypass-mode lock. They increment two
  shared counters, each on a line of its own, inside critical sections that
  use Shared and Save. Between sections they work on private data that
  forces dirty replacements. The testbench checks that each processor reads
  the value left by the previous owner, and that memory ends with the right
  totals. It counts every mechanism (hit, miss, copy-back, bypass access,
  shared tag set, Save, both non-normal modes, memory-path contention) and
  fails if any of them never happened.
* `tb_command_placement` runs the same critical section under two command
  placements. It touches 3 shared lines and 4 private lines, at the default
  sizes.
  - With Shared … Normal around the shared accesses only, Save writes
    3 lines in 23 cycles.
  - With Shared at entry, Save writes all 7 lines in 51 cycles, but the
    section needs one command fewer.

  It then reproduces the shared-and-private-on-one-line hazard. It shows
  that a stale copy-back overwrites a saved update of S when S shares a
  line with private data, and that the update survives when the two items
  are on separate lines.
* `tb_coherent_cache` tests one cache against a memory model written in the
  testbench. It checks the latencies listed above, that stores stay in the
  cache, and copy-back of dirty LRU victims. It also checks that bypass
  accesses go to memory only, which lines Save writes and invalidates, and
  how long Save takes. A random phase then checks 3000 mixed requests
  against a reference copy of memory.
* `tb_cache_tag_store`, `tb_cache_data_store`, `tb_cache_mode_ctrl`,
  `tb_mem_interconnect` and `tb_shared_memory` test each part against a
  reference model.

The whole system simulates in well under a second.
