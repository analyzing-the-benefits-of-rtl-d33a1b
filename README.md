# Atomic thread/inlet interface for a message co-processor (TAM)

In the Threaded Abstract Machine (TAM) model a program is split into short
threads, scheduled by the compiler, and *inlets*, small handlers that receive
messages, store their data into an activation frame and enable threads
(POST). On a conventional processor the inlets, and the polling that finds
messages, can eat a large share of the run time. This design moves them onto a
second processor, the **Inlet-processor**, next to an unmodified SPARC
**Main-processor** that runs the threads.

The two processors then share two structures of the running frame:

* **entry counters**: a synchronizing FORK (Main) and a POST (Inlet) both
  decrement a counter with a load / subtract / store sequence, and the thread
  is enabled when the count reaches zero;
* the **LCV** (local continuation vector), the list of enabled threads of the
  running frame: FORK pushes, STOP pops, POST pushes, and when it runs empty
  the Main-processor's *leave-thread* SWAPs to another frame.

The RTL here is the small amount of hardware that makes those accesses atomic
without a general lock: a comparator on counter addresses, two copies of the
LCV top pointer, a copy of the frame pointer, and five control lines
(INCLCV, DECLCV, STEM, WAIT, HOLD).
The two processors themselves are not part of it: they are the environment
that drives its ports.

```
        Main-processor (SPARC)                         Inlet-processor
   lds/stb, ifetch, cdbp, std, cbs                 lds/stb, POST, cmp fp,ifp, next
          |            |                                  |            |
          |      cdbp_unit  --INCLCV/DECLCV-->  lcv_mirror (lcv copy, lcvend)
          |      cbs_unit   <------STEM-------        |
          |         |  HOLD ----------------->  wait_ctrl
          |         |  <------WAIT------------       |
     slock_ctrl   sync_compare              slock_ctrl
          |            (stall lds)               |
          +------ micbus_arbiter / micbus -------+
                           |
                   frame_memory (Common Cache)
```

## Entry counters: SLOCK, latch L and the comparator

A counter update is `lds` (load synchronization counter, a byte load), `subcc`,
then either the store-back `stb` or, if the result is zero, nothing.

* `slock_ctrl` (one per processor): when an `lds` is accepted on the bus, the
  address is registered into latch L and SLOCK is set, both at that clock
  edge. SLOCK is cleared at the edge after the processor reports its zero bit
  (`zero_i`) or after its next store completes (`stb_done_i`).
* `sync_compare`: for each processor, CMP = (address of the lds it presents ==
  the *other* processor's latch L), SYNC_OK = CMP & other SLOCK, and the lds is
  stalled while SYNC_OK holds. A stalled request is removed from arbitration,
  so the lock holder can still use the bus to store back.

Only the rare case of both processors hitting the same counter costs a stall;
everything else is ordinary bus contention. Bus cost as seen by the other
processor: the lds holds the MICBus one cycle and the stb two.

## The LCV as a queue-stack

The LCV lives in the Common Cache. The Main-processor works at its top, the
Inlet-processor at its bottom, so neither needs the other's pointer:

```
 address:  lcv-2      lcv        lcv+2  ...  lcvend-2   lcvend
           (next      [top]      ...         [bottom]   (next
            FORK push)                                   POST push)
 live entries: [lcv, lcvend)        empty  <=>  lcv == lcvend  (STEM)
```

Thread pointers are halfwords, so each entry is 2 bytes (`STEP`/`LCV_STEP`).

* **Main-processor top**. Register `r_ntp` always holds the thread the Main
  processor will run next: the entry at `lcv`, or, once the LCV is empty, the
  leave-thread pointer kept in `r_ltp` (the leave-thread is never stored in the
  LCV, so inlet pushes never have to be inserted in front of it).
  `cdbp` (conditional double branch and pop) ends a FORK or STOP: count zero ->
  jump to the forked thread; otherwise jump to `r_ntp` and pop: INCLCV steps
  lcv past the entry, and in the next cycle either the new top is loaded into
  `r_ntp` (`pop_o`) or, if that pop emptied the LCV (STEM), `r_ltp` is copied
  into `r_ntp` (`ltp_move_o`). A FORK push is `std` at `lcv-2` with DECLCV, and
  the pushed pointer becomes `r_ntp`.
* **Inlet-processor bottom**. A POST to the running frame stores the pointer
  at `lcvend` and then steps `lcvend` (`lcvend_inc_i`).
* **The lcv copy**. `lcv_mirror` holds a 16-bit copy of lcv inside the
  Inlet-processor. Only the Main-processor changes it, through INCLCV and DECLCV
  in the same cycle as its own lcv, so the copies stay identical and STEM =
  (copy == lcvend) needs no bus between the processors. STEM is a comparison
  of registers, valid in the cycle after an update.

One subtlety the RTL fixes: INCLCV is raised only when `r_ntp` is not the
leave-thread pointer. Once `r_ntp` holds the leave-thread, an inlet may post
(STEM back to 0) before the Main-processor gets to its cdbp. Popping there
would skip the posted entry and lose the thread; instead the cdbp goes to the
leave-thread, whose CHECK then finds the entry.

## CHECK: STEM, WAIT and HOLD

The leave-thread starts with `cbs` (conditional branch and stall: SPARC format 2,
op = 0, op2 = 5, with the usual annul bit and 22-bit displacement). `cbs_unit`
evaluates it in execute:

| STEM | WAIT | action |
|------|------|--------|
| 0 | x | branch to the STOP code; the delay slot (`lduh [lcv], r_ntp`) loads the newly posted thread (cases 1, 2) |
| 1 | 0 | set HOLD, fall through to the rest of the leave-thread and its SWAP; with `cbs,a` the delay slot is annulled (case 3) |
| 1 | 1 | stall the Main-processor, re-evaluate every cycle until WAIT drops (case 4) |

* **WAIT** (`wait_ctrl`, Inlet side) is set by the `cmp fp,ifp` that opens the
  critical part of a POST and cleared by the inlet's closing `next`. The same
  cmp compares the message's frame (`ifp_i`) with the Inlet-processor's copy
  of the running frame pointer fp. If they match, the thread goes on the LCV
  (`post_lcv_o` = 1); otherwise it goes on that frame's RCV (remote
  continuation vector).
* **fp copy.** Setting HOLD invalidates the copy. The SWAP loads the new
  frame's fp (`fp_load_i`). A POST whose frame was swapped out before its cmp
  therefore goes to the RCV, and is never pushed onto a new frame's LCV.
* **HOLD** (in `cbs_unit`) stalls the whole Inlet-processor (`inlet_stall_o`,
  and its bus requests are gated off) while the frame is being swapped. It is
  cleared by the next `cdbp`, the one at the end of the SWAP.
* Same-cycle race: if `cbs` sets HOLD in the very cycle the Inlet-processor
  executes `cmp fp,ifp`, the cmp is stalled and WAIT is not set. So HOLD and
  WAIT are never both set (asserted in `wait_ctrl`).

## The MICBus and the Common Cache

* `micbus_arbiter`: equal priority as round robin between the two processors.
  A lone request is granted in the same cycle. `hold_i` keeps the grant for the
  second cycle of a store.
* `micbus`: forwards the granted request (`tam_pkg::micbus_req_t`: req, we,
  lds, size, addr, wdata). It returns `ready` to the granted processor and
  routes load data, valid one cycle after the load, to the processor that issued it.
* `frame_memory`: the Common Cache seen from the bus. It is a byte-addressed,
  big-endian array (`MEM_BYTES`, default 4096) that always hits. A load
  completes in its first bus cycle. A store takes two bus cycles, with
  `hold_o` in the second.

Protocol for a processor: drive the request and hold it unchanged until
`*_ready_o` is 1 at a rising edge. Load data come on `rdata_o` with
`*_rvalid_o` one cycle later. An lds is accepted as the start of a counter
sequence. The next store by the same processor ends it, and so does its
`*_zero_i`.

## Top level (`tam_ip_top`)

`tam_ip_top` wires all of the above. Its ports fall into four groups:

* the two bus request ports and their `ready` / `rvalid` / `lds_stall`
  outputs, plus `rdata_o`;
* the Main-processor execute-stage strobes: `ex_valid_i`/`ex_inst_i` for cbs,
  and `cdbp_i`, `count_zero_i`, `thr_addr_i`, `std_lcv_i`, the r_ntp/r_ltp
  write ports;
* the Inlet-processor strobes: `post_cmp_i` with `ifp_i`, `next_i`,
  `lcvend_inc_i`;
* `lcv_load_i` and `fp_load_i`, which install a new running frame's lcv,
  lcvend and fp (part of SWAP).

Observation outputs (`micbus_gnt_o`, `store_hold_o`, `sync_ok_o`, `stem_o`,
`wait_o`, `hold_o`, ...) are brought out for testing. Parameters:
`MEM_BYTES` (4096) and `LCV_STEP` (2). Widths are in `tam_pkg`: 32-bit
addresses and data, a 16-bit lcv copy and 16-bit thread pointers. Reset is
asynchronous and active low.

## Verification

Each module has a self-checking testbench in `tb/<module>_tb.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. `tam_ip_top_tb` runs
the whole interface at its default parameters, with behavioural models of both
processors:

1. **Bus cost.** A counter update holds the bus 3 cycles (lds 1 + stb 2). An
   update that reaches zero holds it 1 cycle.
2. **Counter atomicity.** Both processors decrement one counter 30 times each.
   The Main-processor also fetches instructions in between. The 60 values seen
   must be exactly 59..0.
3. **LCV, CHECK and SWAP.** Directed runs of CHECK cases 4, 2 and 1 come first.
   Then a random run: FORK pushes, STOPs and inlet POSTs, some to other
   frames, with CHECK case 3 and SWAPs. The hardware's `cmp fp,ifp` result
   decides between LCV and RCV. A POST to the running frame must hold the bus
   2 cycles. Every enabled thread must run exactly once.
   The lcv copy must equal the Main-processor's lcv at every thread start.

The test also counts each mechanism and fails if any never happened: bus
contention, two-cycle stores, SYNC_OK stalls, INCLCV, DECLCV, bottom pushes,
ltp moves, pop refills, the four CHECK cases and HOLD stalls.

To run one test with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  --top-module tam_ip_top_tb rtl/tam_pkg.sv tb/tam_ip_top_tb.sv && ./obj_dir/Vtam_ip_top_tb
```

## Choices and departures

Choices this design had to make:

* The LCV layout `[lcv, lcvend)`, 2-byte entries, and the push writing
  `lcv-2`. The push is described as a post-decrementing `std`; the exact
  addressing here is chosen to fit the STEM test lcv == lcvend and the
  `lduh [lcv]` pop.
* INCLCV is specified as "cdbp with a non-zero count". Here it is also
  blocked while `r_ntp` holds the leave-thread pointer (see above).
* The refill after a pop is decided in the stage after the pop, from STEM.
* Equal priority is implemented as round robin. The HOLD-versus-WAIT race is
  broken in favour of HOLD.
* SLOCK and latch L are registered at one edge. The original describes a
  slightly delayed SLOCK and an edge-triggered latch.
* Bus handshake, access sizes, reset and memory size are this design's own.

Not built, and left to the environment:

* the SPARC Main-processor and its pipeline. This includes the instruction
  cycle costs (e.g. CHECK 2 or 3 cycles) and the `lds` clearing of the zero
  bit; the zero bit is an input here.
* the Inlet-processor itself. Only its lcv copy, lcvend, WAIT and fp copy are
  built.
* the dispatch of SENDs and heap operations from the Main- to the
  Inlet-processor.
* the network interface and the Inlet Cache.
* the cache behaviour of the Common Cache, and the MBus to Main Memory.
* the SWAP itself. Only its effect on the LCV pointers (`lcv_load_i`,
  `r_ltp`) is provided.

The speedups reported for this organisation (about 2.3x for Gamteb and 2x
for Paraffins on a 64-node CM-5) come from an instruction-mix analysis. This
RTL does not reproduce them, since it contains no processor.
