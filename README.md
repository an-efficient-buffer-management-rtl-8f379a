# BCachet: buffer-managed Cachet cache coherence in SystemVerilog

Cachet is an adaptive cache-coherence protocol for distributed shared memory. It switches each cache line between three micro-protocols:

- **Base:** the memory keeps no directory.
- **Writer-Push:** the memory tracks readers and pushes invalidations.
- **Migratory:** one cache owns the line exclusively.

Cachet is correct only if messages can be reordered freely. Built directly, that takes one FIFO per (processor, address line) pair at the memory input. It also takes suspended-message storage that grows with P² times the request depth.

BCachet keeps Cachet's behaviour but reduces the memory's input to two FIFOs:

- a high-priority FIFO for cache responses;
- a low-priority FIFO for cache requests.

Several small mechanisms make that safe:

- **Request counter.** Each cache has at most `rqmax` requests in flight, so its request queue cannot overflow.
- **Message holding.** The cache has five *locked* states, and the memory sends a `CacheAck` when a request has been served. Together they stop a downgrade message from overtaking the request it belongs with.
- **Shared buffers.** One shared directory and one shared suspended-writer buffer (GM) serve all address lines.
- **Stalled queue (STQ).** It lets the memory put aside requests it cannot serve yet, and refuse them with a Nack when the queue is full.
- **Fairness units.** A first-priority request register (FR), its tag (FRTAG) and a fairness controller (FRCRT) on the network ensure that every request is eventually served.

This repository holds synthesizable RTL for the whole system: P cache sites, the network and one memory site. It also has self-checking testbenches for every block and for the whole system.

## System structure

```
 processor s ──► PMB ─┐                                   ┌─► HIN ─┐
 processor s ◄── MPB ◄┤  cache_engine   HOUT ─► network ──┤        ├─ memory_engine ─ memory array
                      │  (cache, rqcnt, LOUT ─► (HPS,     └─► LIN ◄┤   (states, dir_table,
                      │   tags)         IN ◄──   FRCRT,      STQ ◄─┤    gm_buffer, fr_unit)
                      └────────────────────────  MPS, FRT) ◄─ OUT ◄┘
```

| module | role |
|---|---|
| `bcachet_top` | P `cache_site`s, one `network`, one `memory_site` |
| `cache_site` | `cache_engine` plus PMB, MPB, HOUT, LOUT and IN (`sync_fifo`) |
| `cache_engine` | the cache (14 states per line), request counter, request tags, processor/voluntary/mandatory cache rules |
| `network` | moves messages: HOUT→HIN, LOUT→LIN through FRCRT, OUT→IN; scans the caches' request tags for FRTAG |
| `memory_site` | `memory_engine` plus HIN, LIN, OUT and STQ with its retry path |
| `memory_engine` | memory array and states; HIN, Tw-service, FR, LIN and voluntary memory rules |
| `dir_table` | directory shared by all lines: (address, site, sent) entries |
| `gm_buffer` | suspended writers shared by all lines: (address, site) entries |
| `fr_unit` | FR (one whole message) and FRTAG (site, address) |
| `sync_fifo` | the FIFO behind every queue |
| `bcachet_pkg` | message commands, cache and memory state encodings, instruction and voluntary-rule codes, event indices |

### Messages

A message is `{cmd[4:0], site, addr, has_value, value}`. For messages from a cache to memory, `site` is the sender. For messages from memory to a cache, it is the destination. Messages travel on three paths:

- **Low priority (LOUT → LIN):** `CacheReq`, `Wb`. Only these are requests, and only these count against `rqmax`.
- **High priority (HOUT → HIN):** `Down_wb`, `Down_mw`, `DownV_mw`, `Down_mb`, `DownV_mb`, `ErFRTag`. The memory always sinks them, which is why they can never deadlock behind requests.
- **Memory to cache (OUT → IN):** `Cache_w`, `Cache_m`, `Up_wm`, `WbAck_b`, the three `DownReq`s, `CacheAck`, `CacheNack` and `WbNack`.
  - `CacheAck` with a value is the reply to a `CacheReq`.
  - `CacheAck` without a value only tells the cache that its request is gone (see message holding).

## The cache site

Each line is in one of 14 states (`cstate_e`):

- **Plain states:**
  - Clean and Dirty, in each of the Base, Writer-Push and Migratory flavours (`CB DB CW DW CM DM`);
  - `INV` (not cached);
  - `WBP` (writeback pending);
  - `CP` (cache request pending).
- **Locked states:** `(CB,Down_wb)`, `(CB,Down_mb)`, `(CW,-)`, `(CW,Down_mw)` and `(CM,-)`.

The engine fires at most one rule per clock. It takes the first that applies, in this order:

1. The second message of a two-message rule from the previous cycle.
2. The message at the head of IN (mandatory rules).
3. The instruction at the head of PMB (processor rules). PMB is served in order.
4. A voluntary rule requested on `vc_*`.

Rules that send on HOUT wait until HOUT is empty. That leaves room for a rule that sends two messages: the second one goes out of a holding register in the next cycle. If the IN head is waiting for HOUT, the PMB head may go ahead.

Every instruction returns exactly one MPB entry with its tag: the loaded value for `Loadl`, 0 otherwise. A `Loadl` or `Storel` that misses sends `CacheReq`, moves the line to `CP` and waits at the PMB head. `Commit` on a dirty line sends `Wb`, moves the line to `WBP` and waits for `WbAck_b`. Requests are sent only while `rqcnt < RQMAX`. Each request records its address in a tag slot, and the slot is freed when the request is answered.

### Message holding (the subtle part)

Requests and responses now travel on different FIFOs, so a cache's response can overtake its own earlier request. Here is the dangerous case:

1. A cache in `CP` has sent `CacheReq` for line *a*.
2. The memory, on its own, pushes the line with `Cache_w`.
3. The cache, now a Writer-Push reader, is asked to give the line back and answers `Down_wb` on the fast path.
4. The memory then sees the `Down_wb` first and the old `CacheReq` later. It would treat the stale request as a new one.

BCachet prevents this as follows:

- `Cache_w` or `Cache_m` arriving in `CP` moves the line to a **locked** state (`(CW,-)` or `(CM,-)`). The value is already usable for loads.
- While locked, the cache sends nothing for that line. Every downgrade the cache wants to send, whether its own choice (VC11-VC14) or asked for by a `DownReq`, is *recorded in the state* instead. For example, `(CW,-)` with a `DownReq_wb` becomes `(CB,Down_wb)`.
- When the memory serves the `CacheReq`, it always answers `CacheAck`. At that line state the `CacheAck` carries no value. It means "your request has left the system". The cache then unlocks to the plain state and sends the held downgrade. After that it sends `ErFRTag`, so the memory can clear FRTAG if FRTAG names this request.

`ev_cache[s][0]` pulses when a line locks, and `ev_cache[s][1]` when a held message is released.

## The memory site

### Memory line and directories

Each memory line holds a kind (`mkind_e`: Cw, Tw, Cm, Tm, T'm), a value and one site-id slot with a valid and a "sent" bit:

- **In Cm, Tm and T'm,** the slot is the owner.
- **In Cw and Tw,** it is one directory entry. Any further sharers of the line live in `dir_table`, a table of (address, site, sent) entries shared by all lines.

For a line in Tw, the directory has two parts, set by the sent bit:

- the sites already sent a `DownReq_wb` (sent = 1);
- the sites still to be sent one (sent = 0).

The engine merges the in-line slot and the table hits for its address into two P-bit masks each cycle.

`gm_buffer` holds the writers whose `Wb` has been accepted but not yet acknowledged, as (address, site) pairs. An accepted `Wb` writes its value into the memory line at once. The suspended writer waits only for its `WbAck_b`. One entry (`GM_SIZE = 1`) is the minimum that keeps the protocol live.

### Service order

At most one rule fires per clock:

1. **HIN head.** Responses are always consumed: downgrades, write-backs of values, and `ErFRTag`.
2. **Tw service.** Any line that entered Tw is marked in a service vector. For the lowest marked line:
   - if a site is still to be sent a `DownReq_wb`, send it and mark that site as sent;
   - otherwise, if a writer is suspended, send it `WbAck_b` and remove it from GM;
   - otherwise, return the line to Cw and clear the mark.
3. **FR or LIN head.** When both are waiting, they take turns.
4. **A voluntary rule requested on `vm_*`.** These fire only with LIN empty.

Sources 2-4 run only when OUT has two free slots and no second message is waiting. A rule may emit two messages, for example a `DownReq` plus a Nack; the second one is sent the next cycle.

### Requests the memory cannot serve yet

A `CacheReq` for a line in Tw or owned by another cache must wait. So must a `Wb` that arrives when GM is full. Depending on the line state, the engine first starts the downgrade the request needs (a `DownReq`), then applies **Stall-or-Nack**:

- If STQ has room, the request goes to STQ. From there it is moved back into LIN when LIN has room, taking turns with the network.
- If STQ is full, the sender gets `CacheNack` or `WbNack` and sends the request again.

A few request and state combinations have no rule, for example a `Wb` that finds Tw with empty directories while GM has room. Such a request simply stays at the head of LIN until the Tw service has finished with the line.

### Fairness: FRTAG, FR and FRCRT

- **FRTAG and FR.** The network sweeps a pointer over every (site, tag slot). When FRTAG is empty it takes the valid tag under the pointer: this request is now the one that will not be left behind.
  - When that request reaches the LIN head and FR is empty, it moves into FR.
  - FR is served in turn with LIN.
  - FR is never stalled or refused; it simply retries until its rule applies.
  - If a `Wb` in FR finds GM full, the engine at least removes that writer from the line's directories, so the request makes progress.
  - FRTAG is cleared when its request is served, either directly or through the sender's `ErFRTag`.
- **FRCRT.** This fairness controller on the network picks, round-robin, the one site whose LOUT head goes into LIN next. It stays on that site until the message is taken, so no site can be shut out of LIN.

## Parameters (defaults)

| parameter | default | meaning |
|---|---|---|
| `P` | 256 | cache sites (site id 8 bits) |
| `N` | 16 | address lines in the memory unit |
| `V_W` | 32 | value width |
| `RQMAX` | 2 | requests in flight per site |
| `TAG_W` | 4 | processor instruction tag width |
| `HOUT_SIZE`, `LOUT_SIZE`, `IN_SIZE` | 2, `RQMAX`, 1 | cache-site queues (the protocol's minimums) |
| `HIN_SIZE`, `LIN_SIZE`, `OUT_SIZE` | 1, 1, 2 | memory-site queues (the protocol's minimums) |
| `STQ_SIZE` | 2 | stalled queue; 0 is allowed (every stall becomes a Nack) |
| `DIR_SIZE` | 8 | shared directory entries (at least 1) beyond the in-line slot |
| `GM_SIZE` | 1 | suspended-writer entries (the minimum) |
| `PMB_SIZE`, `MPB_SIZE` | 2, 2 | processor buffers |

The queue sizes are the minimums the protocol needs to stay free of deadlock; larger values only change performance. At the defaults, yosys reports about 156k cells, 168k flip-flop bits and about 105k bits in 1284 memories (cache lines and queues). Most of that is the 256 caches of 16 lines each.

## Using the top

- **`proc_req_*[s]` (valid/ready):** one instruction per handshake: `op` (`op_e`: Loadl, Storel, Commit, Reconcile, Fence), `tag`, `a`, `v`.
- **`proc_rsp_*[s]`:** results, in instruction order, with their tag. Assert `proc_rsp_pop[s]` to consume one.
- **`vc_*[s]` and `vm_*`:** requests for a voluntary (adaptive) rule.
  - Cache side (`vc_op_e`): purge, writeback, the three downgrades, prefetch `CacheReq`.
  - Memory side (`vm_op_e`): `Cache_w`, `Up_wm`, `Cache_m` and the four `DownReq`s.
  - Hold `*_valid` until `*_done`. `*_fired` says whether the rule applied in the current state.
  - The design has no adaptivity policy of its own; whatever drives these ports is the policy.
- **`dbg_site`, `dbg_a`:** read one site's cache state and value and the memory line's kind, value and owner slot.
- **`ev_mem`:** pulses per memory mechanism, indexed by `MEV_*` in `bcachet_pkg`.
- **`ev_cache[s]`:** four cache pulses: bit 0 line locked, bit 1 held message released, bit 2 request re-sent after a Nack, bit 3 instruction blocked by `rqcnt`.

All state changes happen on the rising edge of `clk`. Reset is asynchronous and active low. On reset, caches are invalid and memory lines are Cw with value 0.

## Where this design makes its own choices

The rule tables define the protocol's behaviour. The following are implementation choices, and a reader changing the design may revisit them:

- **One line per address in each cache.** The cache holds every address (16 by default), so there is no replacement. A line that is not cached is simply `INV`.
- **In-line directory slot.** The protocol keeps every sharer in the shared directory. Here one sharer per line sits in the line's owner field, and only additional sharers use `dir_table`.
- **One rule per cycle** in a fixed priority order on both sides, with round-robin and alternation wherever two sources compete.
- **Readings of the rule tables:**
  - A `Commit` writeback stalls while `rqcnt ≥ rqmax`. One row of the cache rules prints the opposite condition for that stall.
  - `Wb` and `CacheReq` always travel on the low-priority path, although some rule rows print the high-priority destination for them.
  - A request tag is taken only in the cycle its request is sent, so a tag always stands for a request in flight.
- **Messages with no rule.** A message that matches no cache rule is consumed with no effect. A memory request with no rule waits in LIN.
- **Voluntary rules** are ports, as described above.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sync_fifo` | random push/pop against a queue model, including push+pop when full |
| `tb_dir_table`, `tb_gm_buffer` | random operations against set models; directory masks, full flag |
| `tb_fr_unit` | FRTAG take/erase/clear and FR load/clear against a model |
| `tb_cache_engine` | miss and fill, Storel/Commit/Wb/WbAck, locked state with a held DownReq and its release, Nack retry, `rqmax` blocking, Cm downgrade, purge |
| `tb_memory_engine` | CacheAck with and without value, Cache_w/Cache_m, Wb with sharer (DownReq_wb, Down_wb, WbAck_b, back to Cw), GM full → STQ and WbNack, CacheReq at Cm, the FR path |
| `tb_cache_site`, `tb_memory_site` | the same through the queues; PMB back-pressure; STQ retry loop |
| `tb_network` | every mover's rules under random back-pressure, equal shares for all sites, every request tag offered |
| `tb_bcachet_top` | 4 sites, 4 addresses, STQ 1, GM 1, DIR 2 (see below) |
| `tb_bcachet_full` | the default 256-site system: store/commit on one site seen by others, a pushed `Cache_w`, eight sites writing one line at once |

`tb_bcachet_top` runs in three phases:

1. Directed tests: visibility of a committed store, and locked states with held downgrades.
2. Random instruction streams on all sites, with random voluntary rules.
3. All sites contending on one address.

Every instruction must retire in order with its tag, and every loaded value must be one that was stored to that address. The test also counts each mechanism and fails if any never occurred: STQ stall, Nack, FR load and service, GM suspension, WbAck, DownReq, both kinds of CacheAck, voluntary rules, locking, release of a held message, re-sent request, and FRCRT.

Each testbench was also run against a copy of its module with one deliberate fault, and reported failures every time.

To run a testbench with Verilator:

```
verilator --binary --timing -Irtl rtl/bcachet_pkg.sv rtl/*.sv tb/tb_bcachet_top.sv \
          --top-module tb_bcachet_top -o sim && ./obj_dir/sim
```

The 256-site build takes about two minutes to compile; the simulation takes seconds.

## Hardware cost at the defaults

For 256 sites the protocol needs these minimums:

- **Suspended-writer storage:** one site name per memory unit (8 bits). Here it is a 13-bit entry, because the address is stored too.
- **Request tags:** `P·rqmax·(A+1)` bits = 2560 bits.
- **Other fairness state:** FR, FRTAG and FRCRT are a single register each, 73 bits together.
- **Messages:** 50 bits long at the default 32-bit value. A 64-byte message would need `V_W` = 494.

## Not included

- **The processors.** The testbenches drive the PMB/MPB ports.
- **An adaptivity policy** for the voluntary rules.
- **Cache capacity limits and replacement.**
- **Systems with more than one memory unit.**
