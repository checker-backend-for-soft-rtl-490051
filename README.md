# Checker backend: soft- and timing-error detection and recovery for a clustered core

A clustered out-of-order core already has several identical execution
clusters ("backends"). This design turns one of them into a **checker**.
Every instruction that commits from the ROB is sent a second time, to the
checker cluster, and runs again on different transistors. A particle strike
or a path that became too slow through process, voltage or temperature
variation then shows up as a difference between the two executions.
Checking can be switched off at run time, and the checker cluster then works
as an ordinary cluster again.

The checker cluster itself is unchanged. This RTL is the small amount of
hardware added around it: queues that carry the values of the first
execution to the second, a reorder buffer for the checker, the checker's own
rename map, a checkpoint window for rollback, and the controllers. The
processor it attaches to (fetch, ROB, clusters, caches) is outside and is
reached through ports.

The scheme comes from a published microarchitecture proposal. The
structure, the sizes and the checking and recovery rules follow it. Where the
proposal says what a block does but not how, the choices are this design's
own; they are listed at the end and in each file's header.

## What is checked, and what is not

Three rules keep the checker cheap.

* **Only stores are validated against memory.** A wrong register value is
  not reported where it arises. It is caught when it reaches a store's
  address or data. Errors that never reach memory are masked.
* **Loads are not repeated.** The caches are assumed to be protected by
  parity or ECC already. A committed load leaves its address and data in the
  **LVQ** (load value queue). The checker's copy of the load takes the data
  from there and only its address is compared.
* **Branches are compared, not followed.** Instructions are fetched only
  once, so the checker has no control flow of its own. Each committed
  branch leaves its taken bit and target in the **BVQ** (branch value queue),
  and the checker's outcome is compared with it.

An exception is serviced only when both executions raised it. If only one of
them did, that is treated as an error.

The checker never accesses the cache, and its branches do not change the PC.
The checker re-executes loads, stores and branches in program order within
each class, because the LVQ and BVQ are plain FIFOs.

## Life of an instruction

1. **Commit** (`commit_alloc`). Up to 6 instructions per cycle leave the ROB
   head. With checking on, each one is at the same time allocated to the
   checker. This takes a checkROB entry and, if the instruction writes a
   register, a free checker register. A load also takes an LVQ entry, a
   store an SVQ entry, and a branch a BVQ entry. Lanes are checked in program
   order. The first instruction that finds its structure full stops itself
   and every younger instruction. That is the commit stall.
2. **Rename again** (`checker_rename`). The checker has its own map table,
   so the checker runs as an independent, data-separate thread.
3. **Re-execute** (checker cluster, outside). Completions come back on 4
   ports (`cmp_*`) carrying checkROB slot numbers. Loads read the LVQ
   (`chk_ld_*`). Stores and branches present their results for comparison
   (`chk_st_*`, `chk_br_*`).
4. **Retire** (`check_rob`). Instructions leave the checkROB in order, up to
   6 per cycle. A store may leave only after the SVQ has validated it.
   Commit and retire are two separate events. The previous physical
   register of an instruction's destination, in both the regular and the
   checker register file, is released only at retire. Until then a rollback
   can still use it.
5. **Checkpoint window** (`ckpt_buf`). Each retired instruction writes one
   entry: its logical destination and the two released values. The window
   holds the last 64 retired instructions.
6. **Store to memory** (`svq`). A store's checkpoint entry is eventually
   overwritten (or given up early, see *Window shortening* below). At that point the store can no longer be rolled back, and its
   SVQ record is allowed to go to memory.

## The store value queue

The SVQ is the most involved block. It is a circular buffer of 16 + 32 = 48
records (address, data) with four pointers. In age order:

```
 head ........ wr_ptr ........ vld_ptr ........ tail
 |  allowed to   |  validated, held |  waiting for the  |
 |  write; drains|  while inside the|  checker's copy   |
 |  to memory    |  checkpoint window                   |
```

* A committed store is written at `tail`.
* The checker's store is compared with the record at `vld_ptr`. A match
  moves `vld_ptr` and gives the checkROB one store credit. A mismatch is an
  error.
* The checkpoint buffer reports, each cycle, how many stores were pushed
  out of the window (`rel_stores`). `wr_ptr` advances by that count.
* Records between `head` and `wr_ptr` leave one per cycle into a small
  dual-clock FIFO (`domain_fifo`), which hands them to the memory side on
  its own clock `clk_mem`.
* On a rollback, everything from `wr_ptr` onward is dropped, because those
  stores belong to instructions that are re-executed. Stores already allowed
  to write are older than the rollback point, so they keep draining.

The original proposal sizes the queue as "16 + 32". Here that is read as
follows: at most 16 records may wait for validation, and at most 48 may be
in the queue in total. Commit sees the smaller of the two free counts.

Loads in the regular clusters must also search the SVQ. A store may have
committed and still be waiting here while a younger load executes. The
`lk_*` port returns the data of the youngest record with the same address.
Only whole-word addresses are matched; partial overlap is not handled.
The forwarded value is the one the regular cluster committed, right or
wrong: if it is wrong, that store fails validation, and the rollback also
undoes the load that consumed it.
A store that has already moved into the dual-clock FIFO is no longer
searched: the memory side must make it visible from then on (for example by
looking in its own write buffer).

## Rollback and the recovery sequence

An error is known only when a store (or load, branch or exception) reaches
the comparison. By then the faulty instruction may be up to 64 instructions
in the past. `recovery_ctrl` therefore rolls back as far as the window
reaches:

| step | cycles | what happens |
|---|---|---|
| error | 0 | some `err_src` bit is set; retirement still completes in this cycle |
| FLUSH | 1 | `flush`: the checkROB, LVQ, BVQ and held SVQ stores are emptied, and the checker map is reset to its retirement copy. `freq_level` goes up one step. The checkpoint walk starts. |
| UNDO | one per window entry + 1 | `restore_v/restore_ent` give the saved values, newest first; the processor writes them back into the architectural registers |
| resume | 0 | `resume` with `restart_pc`: the oldest instruction of the window, or the oldest checkROB instruction if the window was empty |
| REEXEC | — | normal operation at the lower frequency |

The error counts as fixed once as many instructions have retired as were
rolled back, without a new error. Then the frequency returns to nominal.
Each error during re-execution starts another trial and lowers the
frequency one more step. After 3 failed trials (`MAX_TRIALS`) the error is
taken as permanent. `hard_error` is then raised and everything is held until
`hard_ack`, which is meant to follow a hardware test that disables the
faulty part. After `hard_ack` the sequencer rolls back once more and
resumes at nominal frequency.

The rollback restores the architectural register state. The surrounding
processor must also reset its own rename map to its retirement state. It
must refetch from `restart_pc`.

## Switching checking off and on

`mode_ctrl` handles this. When `ft_req` falls, commit is held until the
checkROB is empty, no store waits for validation, and no recovery is
running. Then, for one cycle, `release_all` lets every validated store go to
memory and the checkpoint window is cleared. From then on `ft_on` is low:

* instructions commit with no checker allocation;
* registers of the regular clusters are released at commit (`rel_reg_*` is
  then driven from the commit lanes);
* stores still go through the SVQ, already allowed to write, so they stay
  ordered and can be found by load searches.

Raising `ft_req` again turns checking on at the next cycle.

## Interface of `ft_checker_top`

Two clocks: `clk` for everything except the memory write port, and
`clk_mem` for `mem_v/addr/data/mem_rdy`. Reset `rst_n` is active low,
asynchronous inside the dual-clock FIFO and synchronous elsewhere; hold it
for a few cycles of both clocks. Shared types are in `rtl/chk_pkg.sv`.

| group | ports | notes |
|---|---|---|
| ROB head | `rob_slot[W]` (`commit_t`), `commit_v`, `n_commit`, `commit_stall` | valid lanes must form a prefix; all combinational, consumed at the clock edge |
| to checker | `chk_alloc[W]` (`chk_alloc_t`) | renamed sources/destination and checkROB slot |
| from checker | `cmp_v/cmp_idx/cmp_exc[4]`, `chk_ld_*`, `chk_st_*`, `chk_br_*` | `chk_ld_data` is combinational from the LVQ head |
| register files | `rel_reg_v/preg/val`, `rel_chk_v/preg/val` | read ports for the released registers; the values are captured into the window in the same cycle |
| memory (`clk_mem`) | `mem_v/addr/data`, `mem_rdy` | one store per `clk_mem` cycle, valid/ready |
| disambiguation | `lk_addr`, `lk_hit`, `lk_data` | combinational |
| recovery | `err_src`, `flush`, `restore_v/ent`, `resume`, `restart_pc`, `freq_level`, `hard_error`, `hard_ack`, `in_reexec` | |
| mode | `ft_req`, `ft_on`, `release_all` | |
| other | `exc_v/exc_pc`, `n_retire`, `ckpt_count` | |

## Parameters

| parameter | default | source |
|---|---|---|
| `W` commit/allocate/retire width | 6 | evaluated configuration (commit bandwidth) |
| `CROB_DEPTH` checkROB | 128 (at most 128) | evaluated configuration |
| `LVQ_DEPTH` | 8 | evaluated configuration |
| `SVQ_NV` + `SVQ_EXTRA` | 16 + 32 | evaluated configuration |
| `BVQ_DEPTH` | 16 | evaluated configuration |
| `CKPT_DEPTH` | 64 | evaluated configuration |
| `CMP_W` completion ports | 4 | issue width of a cluster |
| `MAX_TRIALS` | 3 | own choice ("several") |
| `MEM_FIFO` dual-clock FIFO depth | 8 (power of two, at least 4) | own choice |
| 32-bit words, 16 logical / 128 physical registers | in `chk_pkg` | own choice |

The evaluated processor has a 512-entry ROB and a 256-entry LSQ. These
belong to the base core and are not part of this RTL.

## Design choices and departures

* **Clock domains.** In the original, the frontend, each cluster and the
  memory side may run on separate clocks, joined by simple synchronising
  FIFOs. Here the checking logic runs on one clock `clk`, and only the
  crossing to the memory side is built: validated stores leave through a
  Gray-pointer FIFO with two-flop synchronisers (`rtl/domain_fifo.sv`). A
  store takes about three `clk_mem` cycles to appear at `mem_v`. The
  checker cluster's ports are on `clk`; if it runs on its own clock, the same
  FIFO can be put in front of them. Lowering the frequency is expressed as
  the step count `freq_level` for an external clock generator.
* **Rollback depth.** Rollback always goes to the oldest instruction of the
  window, because the faulty instruction is not known. "Fixed" means
  re-executing as many instructions as were rolled back without a new error.
* **Hard-error handling.** The hard-error handshake and the resume after
  `hard_ack` are this design's own.
* **Mode switch.** Switching off waits for the checker to drain; the
  original only says it can be done at any time.
* **Store credit.** A store retires only after validation. This is a credit
  counter between the SVQ and the checkROB.
* **Checker renaming.** The checker's rename logic is a map table plus a
  free-register vector. Each lane takes the lowest free register. A rollback
  restores the map from the retirement map.
* **Window shortening.** Store-dense code can fill the SVQ with validated
  stores that are all still inside the 64-instruction window. The next
  store then cannot commit, so nothing retires and the window never moves:
  a deadlock. The original reports 32 extra entries as enough in its
  experiments and says nothing more. Here, when the SVQ is full, no record
  in it is allowed to write yet and the checkROB is empty, the checkpoint
  buffer gives up its oldest entry, one per cycle (`ckpt_shrink`), until a
  store is released. While that happens, errors can be recovered only
  across the shorter window.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares the
block against an independent model, prints
`TB_RESULT checks=N failures=M`, and has a cycle watchdog.

* `tb_lvq`, `tb_bvq`, `tb_svq`, `tb_check_rob`, `tb_checker_rename`,
  `tb_ckpt_buf`: random traffic against reference queues and maps. Covers
  flush, the release and forwarding rules of the SVQ, out-of-order
  completion and store credits in the checkROB, one-entry-per-cycle
  rollback walks, and window shortening.
* `tb_commit_alloc`: 20,000 random groups against a model of the
  stall rule.
* `tb_recovery_ctrl`, `tb_mode_ctrl`: directed, cycle-exact sequences.
* `tb_domain_fifo`: unrelated write and read clocks in three phases
  (half-periods 5/7, 9/4, 6/5), random valid and ready. Checks order, no
  loss, no duplication, that `w_full` is reached, and that a word written
  into an empty FIFO is visible within 4 read clocks.
* `tb_ft_checker_top`: the whole subsystem at its default size, running a
  random 3000-instruction program. The testbench plays ROB head, checker
  cluster, register files and memory; the memory runs on its own clock with
  a random `mem_rdy`. It injects transient faults of every
  kind and one persistent fault, and switches checking off and on once. It
  checks four things:
  * memory receives exactly the program's stores, in order and each once,
    with the right values;
  * every rollback restores the saved values newest first and restarts at
    the right PC;
  * forwarding returns the youngest store;
  * every mechanism occurred at least once: stall, each error source,
    rollback, lower frequency, hard error, mode switch, serviced exception,
    forwarding, checkpoint release, window shortening (the program holds a
    burst of 120 consecutive stores).

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/chk_pkg.sv \
    tb/tb_ft_checker_top.sv --top-module tb_ft_checker_top
./obj_dir/Vtb_ft_checker_top
```

## Files

`rtl/chk_pkg.sv` holds the shared types. `rtl/mpush_fifo.sv` is the
multi-write FIFO behind the LVQ and BVQ. The blocks are `rtl/commit_alloc.sv`,
`rtl/checker_rename.sv`, `rtl/check_rob.sv`, `rtl/lvq.sv`, `rtl/svq.sv`,
`rtl/bvq.sv`, `rtl/ckpt_buf.sv`, `rtl/recovery_ctrl.sv`, `rtl/mode_ctrl.sv`
and `rtl/domain_fifo.sv`.
`rtl/ft_checker_top.sv` connects them. The testbenches are in `tb/`, one per
block, named `tb_<block>.sv`.
