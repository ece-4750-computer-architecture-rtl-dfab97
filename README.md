# Blocking FSM caches: direct-mapped and two-way set-associative

Main memory is slow. A small cache close to the processor answers most
requests itself, as long as the addresses the program uses show locality.
This repository holds two organisations of the same small cache, built so
that they can be compared side by side:

* **`cache_base`**: direct-mapped. Each line of memory has exactly one place
  in the cache.
* **`cache_alt`**: two-way set-associative with least-recently-used (LRU)
  replacement. Each line can go in either of two places, which removes
  conflict misses between pairs of lines that share an index.

Both caches have the same shape:

* 256 bytes of data in 16-byte lines.
* Write-back: a written line goes to memory only when it is evicted.
* Write-allocate: a write miss first fetches the line.
* Blocking: one request at a time.

A finite-state machine (FSM) in a control unit steps a separate datapath
through each request. Both caches use the same set of FSM states.

## Interface: four val/rdy channels

Each cache talks to the outside world through four latency-insensitive
channels. On each channel, a message moves in a cycle where both `val` and
`rdy` are high at the clock edge:

| channel     | direction          | message type     | bits |
|-------------|--------------------|------------------|------|
| `cachereq`  | processor → cache  | `mem_req_4B_t`   | 77   |
| `cacheresp` | cache → processor  | `mem_resp_4B_t`  | 47   |
| `memreq`    | cache → memory     | `mem_req_16B_t`  | 175  |
| `memresp`   | memory → cache     | `mem_resp_16B_t` | 145  |

The messages are packed structs defined in `cache_msgs_pkg`:

```
request   {type[2:0], opaque[7:0], addr[31:0], len, data}
response  {type[2:0], opaque[7:0], test[1:0],  len, data}
```

* **Word messages** have a 2-bit `len` and 32-bit `data`.
* **Line messages** have a 4-bit `len` and 128-bit `data`.
* **`len`:** 0 means every byte is valid. The caches support only whole-word
  accesses and always send 0.
* **`type`:** read is 0, write is 1, init is 2.
* **`opaque`:** returned unchanged in the response.
* **`test`:** 1 if the request hit in the cache and 0 if it missed. Test
  benches use it to check hit/miss behaviour from outside the cache.

### The init transaction

Besides read and write there is a third request type, *init*. It exists to
make testing easier:

* It writes one word straight into the line that its index selects.
* It writes the tag, marks the line valid and clean, and answers with
  `test = 0`.
* It never touches main memory.

Init lets a test put known data in the cache without the miss path working.
Using init on a dirty line is not meaningful: the word is overwritten, the
line is marked clean and its other dirty words are lost.

## How a request walks through the FSM

This is the core of the design. Every request passes through a fixed chain
of states. Each state takes at least one cycle, and the chain depends on
hit, miss and dirtiness:

| state | name             | what happens                                                  | next |
|-------|------------------|---------------------------------------------------------------|------|
| I     | idle             | `cachereq_rdy` high; an accepted request is registered        | TC |
| TC    | tag check        | compare the stored tag(s), with valid bits, against the request | IN / RD / WD / EP / RR |
| IN    | init access      | write the word and tag; valid = 1, dirty = 0                  | W |
| RD    | read access      | read the line, keep the requested word                        | W |
| WD    | write access     | write the word; dirty = 1                                     | W |
| EP    | evict prepare    | copy the victim's address and line into registers             | ER |
| ER    | evict request    | `memreq` write of the victim line; stay until `memreq_rdy`    | EW |
| EW    | evict wait       | wait for the write's `memresp`                                | RR |
| RR    | refill request   | `memreq` read of the missing line; stay until `memreq_rdy`    | RW |
| RW    | refill wait      | wait for `memresp`; register the line                         | RU |
| RU    | refill update    | write the line and tag; valid = 1, dirty = 0                  | RD (read) / WD (write) |
| W     | wait             | `cacheresp_val` high; stay until `cacheresp_rdy`              | I |

These are the transitions out of tag check:

* An init goes to IN.
* A read hit goes to RD, and a write hit to WD.
* A miss whose victim line is valid and dirty goes to EP.
* Any other miss goes straight to RR.

### Timing

Assume the memory answers in the cycle after it accepts a request, and the
processor is always ready. Then, counting from the cycle that accepts the
request:

* **Hit or init:** 4 cycles (I, TC, RD/WD/IN, W). The response is valid 3
  cycles after the accepting clock edge.
* **Clean miss:** 7 cycles (I, TC, RR, RW, RU, RD/WD, W).
* **Dirty miss:** 10 cycles (I, TC, EP, ER, EW, RR, RW, RU, RD/WD, W).

This is the line trace `tb_cache_trace` prints (abridged) for a read miss
followed by a read hit:

```
  8: rd:02:00000000:00000000  (I )
  9:                          (TC)
 10:                          (RR) rd:00:00000000
 11:                          (RW)                   rd:00:0e5ca18d
 12:                          (RU)
 13:                          (RD)
 14:                          (W )                                    rd:02:0:0e5ca18d
 15: rd:03:00000000:00000000  (I )
 16:                          (TC)
 17:                          (RD)
 18:                          (W )                                    rd:03:1:0e5ca18d
```

Each extra cycle of memory latency adds one cycle per memory transaction. A
new request can be accepted in the cycle after the response leaves. So
back-to-back hits run at one request every four cycles.

### Control/datapath split

The control unit (`cache_*_ctrl`) holds the FSM and all the state bits:

* the valid and dirty bits;
* the hit flag for the `test` field;
* for the two-way cache, the chosen way and the LRU bits.

The control unit drives the datapath (`cache_*_dpath`) with one packed
control word, `cache_ctrl_t`, every cycle. The datapath answers with the
request type, the index and the tag-match result(s). The wrapper modules
`cache_base` and `cache_alt` only connect the two halves. They also assert
that a message waiting for `rdy` holds still.

## Datapath

For the direct-mapped cache, the address splits into:

* `tag = addr[31:8]` (24 bits);
* `idx = addr[7:4]`, selecting one of 16 lines;
* `addr[3:2]`, selecting the word in the line.

The datapath is built from these parts:

* **Request registers:** type, opaque, address and data, loaded when the
  request is accepted.
* **Tag array (16 × 24) and data array (16 × 128):** both are `comb_sram`
  instances. They are read combinationally at `idx`, so the tag check and a
  data access each fit in one state, and they are written at the clock edge.
  The data array has one write enable per 32-bit word.
* **Tag comparator:** `tag_match` goes to the control unit, which ANDs it
  with the line's valid bit.
* **rep1:** the request word copied four times across 128 bits. It is
  written with a one-word enable for init and write accesses.
* **mkaddr:** `{tag, idx, 4'b0000}`, the line address. The refill uses the
  request tag. The eviction uses the stored tag, captured in EP.
* **Eviction registers:** the victim's address and line, so that ER can
  present a stable `memreq` for as long as memory stalls.
* **Refill register:** holds the line from `memresp` between RW and RU.
* **Read-data register:** holds the requested word from RD until the
  response is taken.

Memory requests use `opaque = 0` and `len = 0`. Responses carry the read
word for reads and 0 for writes and inits.

## The two-way set-associative cache

`cache_alt` keeps 256 bytes as 8 sets of two 16-byte lines:

* `tag = addr[31:7]` (25 bits);
* `idx = addr[6:4]`.

Each way has its own tag array, data array and comparator. The control unit
keeps valid and dirty bits per way and one LRU bit per set. In tag check it
picks a way and holds it in `way_reg` for the rest of the request:

1. If a way hits (valid AND tag match), use that way.
2. Otherwise, if a way is invalid, use it (way 0 first).
3. Otherwise, use the way named by the set's LRU bit.

The chosen way is evicted first if it is valid and dirty. Every init, read
or write access (IN, RD, WD) sets the set's LRU bit to the *other* way. The
FSM, the channels and the latencies are exactly those of the direct-mapped
cache.

Two-way is not always better. A loop that cycles through three lines of the
same set misses every time under LRU. In the same loop, a direct-mapped
cache may still keep some of the lines in other indices. The loop-2d
pattern below shows this.

## Measured behaviour on loop patterns

`tb_cache_eval` runs three loop access patterns on freshly reset caches,
with a main memory that answers 20 cycles late. The counts below are checked
by the testbench against counts worked out by hand. One assumption: the
array of loop-1d and loop-2d starts at address 0, with `a[i]` at `4*i`.

| pattern | accesses | misses, direct-mapped | misses, two-way | cycles, direct-mapped | cycles, two-way |
|---------|----------|-----------------------|-----------------|-----------------------|-----------------|
| loop-1d: `a[i]`, i < 100              | 100 | 25 | 25  | 975  | 975  |
| loop-2d: the same array, five times   | 500 | 97 | 125 | 4231 | 4875 |
| loop-3d: `a[j*64 + k*4]`, 5 × 2 × 8   | 80  | 80 | 16  | 2160 | 688  |

With 20 cycles of memory latency, a hit costs 4 cycles and a clean miss 27.

* **loop-3d:** the two lines of each `k` share an index. In the direct-mapped
  cache they evict each other on every access. The two-way cache holds both.
* **loop-2d:** the 25 lines exceed the cache. LRU then evicts exactly the
  line that is needed next.

## Departures and choices

The published description fixes these points:

* the FSM states and transitions;
* the four-cycle hit path;
* the capacity and line size;
* the write-back, write-allocate policy;
* the init transaction;
* the message fields;
* per-way valid bits ANDed with the tag matches;
* LRU replacement with its bits in the control unit.

The following are this design's own choices:

* **Datapath registers:** the exact set of registers around the memory
  channels (eviction, refill and read-data registers).
* **Word writes:** rep1 combined with per-word write enables.
* **Valid and dirty bits:** kept as flip-flops in the control unit, cleared
  by a synchronous active-high `reset`. The array contents are not reset.
* **Type encodings:** read 0, write 1, init 2.
* **Line `len` field:** 4 bits wide. One description of the format calls it
  a 16-bit field, but the bit positions of the message layout leave room for
  only four.
* **Victim choice (two-way):** an invalid way is preferred over the LRU way.
  Init uses the same victim choice.
* **Response fields:** responses carry `len = 0`, and write and init
  responses carry data 0.

Only whole-word accesses are implemented. Byte and half-word accesses,
shorter hit paths, pipelining, atomic operations and two-level hierarchies
are extensions this design does not include.

## Files

`rtl/` holds the design:

| file | contents |
|------|----------|
| `cache_msgs_pkg.sv` | message structs, type encodings, FSM state enum, control word |
| `comb_sram.sv` | array with combinational read and sliced synchronous write |
| `cache_base_ctrl.sv`, `cache_base_dpath.sv`, `cache_base.sv` | direct-mapped cache |
| `cache_alt_ctrl.sv`, `cache_alt_dpath.sv`, `cache_alt.sv` | two-way set-associative cache |
| `cache_top.sv` | both caches side by side; ports prefixed `base_` and `alt_` |

`tb/` holds the verification code:

| file | contents |
|------|----------|
| `cache_ref_pkg.sv` | transaction-level reference model: predicts read data, hit/miss, refills and write-backs |
| `test_mem.sv` | behavioural main memory with adjustable latency and random stalls |
| `cache_agent.sv` | test source, sink and memory for one cache; checks every response, and the cycle count when nothing stalls |
| `tb_comb_sram.sv` | array test |
| `tb_cache_base.sv`, `tb_cache_alt.sv` | directed tests, then random tests under delays |
| `tb_cache_top.sv` | both caches end to end, at full size; counts every mechanism |
| `tb_cache_eval.sv` | the loop patterns above |
| `tb_cache_trace.sv` | two short directed tests on the direct-mapped cache; prints a line trace and checks the FSM state in every cycle (below) |

Every testbench ends by printing `TB_RESULT checks=N failures=M` and has a
watchdog. The cache testbenches count the following mechanisms, and fail if
any of them never happened:

* hits, clean misses and dirty misses with write-back;
* inits;
* replacement of a valid line (LRU in the two-way cache);
* memory back-pressure and processor back-pressure.

## Simulating

Verilator 5 and these commands are enough:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cache_msgs_pkg.sv tb/cache_ref_pkg.sv tb/tb_cache_top.sv --top-module tb_cache_top
./obj_dir/Vtb_cache_top
```

Replace `tb_cache_top` with any other testbench name. Each run takes well
under a second. To lint the design alone:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/cache_msgs_pkg.sv rtl/cache_top.sv
```

The only lint warnings are about unused bits: the request `len` field, the
low address bits, and the header fields of memory responses.
