# Extraction logic for multi-core program monitoring

A dynamic program monitor (taint tracking, memory-bug detection, ...) can run
on a separate core of a chip multiprocessor instead of being instrumented
into the program it watches. The cores then need a cheap way to get execution
facts from one core to the other: which PCs committed, which addresses were
touched, what values were produced. This RTL is that hardware, the
**extraction logic**. It sits at the commit stage of each core, picks out the
instructions the monitor cares about, and writes one 8-byte message per
picked instruction into a **communication queue** in shared memory. The
monitor, on another core, reads the queue.

The extraction logic can pick instructions in two ways, and most of the
design is about these two modes:

* **Table-driven mode.** A small ternary CAM (the *extraction table*) holds
  PCs and data-address ranges. Each committing instruction is looked up. A
  hit forwards the instruction.
* **Forward-bit mode.** The monitored binary carries an annotation section
  with one *forward bit* per instruction. The bit is fetched along with the
  instruction, rides in the ROB, and decides at commit.

In both modes the forwarding step is the same: the message goes to address
`QBR + RQR` and `RQR` steps by 8. When the target queue entry is still full,
commit stalls.

## Structure

```
xl_top                       NCORES copies + one shared queue
 ├─ xl_extraction_logic[c]   one per core: registers, mode select, kernel-entry drain
 │   ├─ xl_table_ctrl        table-driven mode: suspension register, bypass
 │   │   └─ xl_ext_table     ternary CAM TAG + DIRECTION store
 │   ├─ xl_fetch             forward-bit mode, fetch side: annotation address, bit select
 │   ├─ xl_rob_fb            forward-bit flag per ROB entry
 │   └─ xl_forward           QBR/RQR, queue item address, full-entry stall
 └─ xl_comm_queue            queue memory with per-entry full/empty bits
xl_pkg                       widths, message and table-entry types, register map
```

The processor pipeline, the caches and the monitor core are not part of this
RTL. Their connections are ports of `xl_top`:

* fetch: `if_*` in, `fb_*` out;
* annotation-byte reads to the cache: `ann_*`;
* ROB insertion: `rob_ins_*`;
* commit: `cm_*`;
* kernel entry: `kern_*`;
* monitor reads of the queue: `mon_rd_*`.

Each per-core port is an array indexed by core.

## The extraction table and suspension (table-driven mode)

Each table entry has two parts:

* **TAG:** an address, a *care* mask and an I/D flag. A care bit of 0 is a
  don't-care, so one entry with tag `0x8000a000` and care `0xfffff000` covers
  the whole range `0x8000aXXX`.
* **DIRECTION word:**
  * `valid`: forward the instruction;
  * `susp`: this instruction begins a table update;
  * `ttype`: four type bits passed to the monitor.

Each committing instruction is looked up twice in the same cycle. The table
has two lookup ports: the PC with the I flag, and the data address with the D
flag (memory instructions only). When several entries match, the lowest index
wins. When both lookups hit, the PC entry's type bits are used.

The tricky part is updating the table while the program runs. The monitor
marks with `susp` every entry whose instruction may change what should be
monitored, such as a call to `malloc`. When such an entry matches, three
things happen:

1. The instruction's message carries the `upd` flag, and `update_bit` pulses.
2. The one-bit **suspension register** is set.
3. From the next committing instruction on, the table is bypassed. Every
   instruction is forwarded as `{PC[31:0], data address[31:0]}` (message kind
   `MSG_TRACE`). The monitor therefore loses nothing while it rewrites
   entries.

The monitor ends the update by writing 0 to the suspension register
(`CFG_SUSP`).

## Forward bits (forward-bit mode)

The monitoring system programs two registers:

* the Annotation Base Register (`CFG_ABR`): the physical base of the
  annotation section;
* a PC mask (`CFG_CMASK`): it turns a PC into the instruction's offset in the
  code section.

Instructions are 4 bytes, and one annotation byte covers 8 instructions. For
each fetched PC:

```
offset  = pc & CMASK
address = ABR + (offset >> 5)          byte holding the forward bit
index   = offset[4:2]                  which of its 8 bits
bit     = byte[7 - index]              bit 0 of the group is the byte's MSB
```

Example: offset `0x1a004` with `ABR = 0x0f000000` reads byte `0x0f000d00`. It
uses index 1, so the byte `0b01100001` gives forward bit 1. This numbering,
MSB first, is the one that makes the example come out right.

`xl_fetch` issues byte reads to the cache. Up to 4 instructions can wait for
their bytes, and responses must come back in order. The forward bits are
handed back in fetch order on `fb_valid/fb_bit`.

Code in a dynamically loaded library has no forward bits. The OS loader
describes such code to `xl_fetch` through up to four base/limit register
pairs (`CFG_LIB_BASE+r`, `CFG_LIB_LIM+r`). Instructions in these regions get
bit 0 and cause no memory read.

The pipeline writes the bit into the instruction's ROB entry (`xl_rob_fb`).
All micro-ops of one instruction get the same bit. At commit, the ROB index
selects the flag.

## Forwarding, the queue and the two stalls

Messages have an 8-byte payload:

* the data address, for a memory instruction;
* the result, for any other instruction;
* `{PC, data address}`, while the table is suspended.

A 7-bit tag travels with the payload: the kind (`MSG_VALUE`, `MSG_MADDR`,
`MSG_TRACE`), the update flag and the type bits.

`xl_forward` writes the message to `QBR + RQR` and then advances `RQR` by 8.
`RQR` wraps after `QUEUE_ENTRIES` entries. The queue must be aligned to its
own size: 512 KB for 64K entries.

Every queue entry has a full/empty bit:

* A write is accepted only into an empty entry, and it sets the bit.
* A monitor read of a full entry returns the message one cycle later and
  clears the bit.
* A read of an empty entry returns `rd_valid = 0`.

This gives the monitored program two ways to stall:

* **Queue full:** the entry at `QBR + RQR` is still full, so `cm_ready` drops
  and commit waits.
* **Kernel entry:** `kern_stall` stays high while `kern_req` is set and the
  queue still holds any message. The monitor has therefore checked everything
  before the program enters the kernel.

After reset, `xl_comm_queue` clears its full/empty bits, one entry per cycle.
This takes 65536 cycles at the default size (`q_init_busy`). No write is
accepted before it ends.

The forwarding decision is combinational with commit. A forwarded instruction
commits in the same cycle that its queue entry is written.

## Several cores

Each core has an extraction logic. Only the one on the core that runs the
monitored process is enabled (`CFG_CTRL[0]`). `CFG_CTRL[1]` selects the mode
(1 = forward-bit). When more than one core writes in a cycle, the lowest core
index wins. The others stall that cycle as if their entry were full.

## Configuration registers

The registers are written through `cfg_we/cfg_addr/cfg_wdata`, one port per
core. The addresses are in `xl_pkg`:

| addr | name | contents |
|---|---|---|
| 0x00 | CTRL | [0] enable, [1] mode |
| 0x01 | SUSP | [0] suspension register |
| 0x02 | ABR | annotation base |
| 0x03 | CMASK | PC-to-offset mask |
| 0x04 | QBR | queue base |
| 0x05 | RQR | queue offset (bytes) |
| 0x06 | TAG | [32] I/D flag (1 = instruction), [31:0] tag, staged |
| 0x07 | CARE | care mask, staged |
| 0x08 | TBLWR | [31:16] index, [8] used, [7] valid, [6] susp, [3:0] type: writes the entry from TAG/CARE |
| 0x10+r | LIB_BASE | library region r, first address |
| 0x18+r | LIB_LIM | library region r, end (exclusive) |

## Parameters

| parameter | default | origin |
|---|---|---|
| NCORES | 4 | evaluated 4-core chip |
| QUEUE_ENTRIES | 65536 | evaluated 64K-entry queue; 8-byte entries |
| INSTR_BYTES | 4 | SPARC instructions |
| TBL_ENTRIES | 32 | chosen here |
| ROB_ENTRIES | 64 | chosen here |
| NINS | 2 | ROB insertion ports, chosen here |
| NLIB | 4 | library regions, chosen here |
| FETCH_DEPTH | 4 | outstanding annotation reads, power of two, chosen here |

The address width is 32 bits, the result width 64 bits and the type field 4
bits (`xl_pkg`).

## What is this design's own

The two modes follow the original design, as do the table organisation, the
suspension mechanism, the ABR/QBR/RQR address arithmetic, the 8-byte entries,
the full/empty synchronisation and the kernel-entry drain. The following were
left open and are decisions of this RTL:

* the table size, ROB size and lookup priority;
* the message payload rule and the 7-bit message tag;
* sending the update notice as a flag in the queue message;
* the register map;
* the library-region registers;
* reading a queue entry also empties it;
* the clearing pass after reset;
* the arbitration between cores;
* RQR wraps rather than saturates.

Some things are not built:

* Library code cannot be forwarded in forward-bit mode; the monitor must use
  table mode for that.
* The queue is one on-chip memory with one write and one read port, not a
  region of the cache hierarchy.
* Message formats that need more than 8 bytes do not fit an entry. Examples
  are a 64-byte message carrying a whole instruction, or 32-byte items.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/xl_pkg.sv tb/tb_xl_top.sv --top-module tb_xl_top -o sim
./obj_dir/sim
```

`tb_xl_top` runs the whole chip at the default parameters in about 300 000
cycles, a few seconds. A monitor model reads every message and compares it
against a scoreboard. The test goes through:

* table-mode hits, misses and range hits;
* suspension, bypass and clearing;
* forward-bit mode with annotation reads and library code;
* a completely filled queue (queue-full stall) and a wrap of RQR;
* a kernel entry that waits for the queue to drain;
* two cores contending for the queue.

It counts each of these events and fails if any never happens.

`tb_xl_workload_loop` runs a small memory-bug-detection workload on the
full-size chip. The monitored loop computes `q = p + i`, loads and stores
through `q`, and repeats 1024 times. An in-order pipeline model fetches and
commits it on core 0. It is fed to the monitor in three ways:

* table-driven: the load and store PCs are table entries, giving 2048 data
  addresses;
* forward bits on the instructions that produce `q` and `i`, giving 2048
  values;
* a forward bit only on the instruction that produces `p`, giving one value.
  The monitor recomputes every `q` from it.

In each case the testbench checks the message count. It also checks that
every load and store address the monitor receives or computes equals the
address the program used. The
block-level testbenches (`tb_xl_ext_table`, `tb_xl_table_ctrl`,
`tb_xl_fetch`, `tb_xl_rob_fb`, `tb_xl_forward`, `tb_xl_comm_queue`,
`tb_xl_extraction_logic`) use smaller parameters.
