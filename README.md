# An object-oriented ASIP: methods as functional units

This processor is built around a class library rather than an instruction
set. Take a small C++-style hierarchy, here class `A` with a public method
`f()` and class `B` derived from `A`, which overrides `f()` and adds `g()`.
Each hardware method becomes a functional unit (FU). Objects are not hardware
modules. An object is a few words of storage, and one FU per method serves
every object of that class. A method call in the program is an
`invokevirtual`, and it is bound at run time:

1. The object id (oid) gives the class through the **Object Type Table** (OTT).
2. The (class, method id) pair gives an implementation through the **Virtual
   Method Table** (VMT).

The VMT can name either kind of implementation:

* **A hardware FU.** The processor starts it and waits for it to finish.
* **A software routine in instruction memory.** The processor branches and
  links to it.

Because the binding is a table lookup, one call site serves every class
that has the method. A hardware method can also be replaced by software
after manufacture: rewriting one VMT entry is enough.

Because objects are just storage, they can be created and destroyed at run
time. This means writing the three tables:

* the OTT;
* the VMT, when a class is new;
* the OMU's address mapping table.

The FUs are never instantiated per object.

## Block structure

```
            instr_mem
                |
   OTT ---- MIU (Method Invocation Unit) ---- VMT
                |  command / status / call  (one channel per FU slot)
      +---------+---------+-----------+
    A::f      B::f      B::g      spare slot(s) -> ext_* ports
      +---------+---------+-----------+
                |  (oid, field index) requests
   OMU (Object Management Unit): per-FU caches, arbiter, lock, address mapping table
                |
        reg_file          data_mem
```

| File | Role |
|---|---|
| `rtl/ooasip_pkg.sv` | widths, IDs, opcodes, all interface structs |
| `rtl/ooasip_top.sv` | the whole processor with its memories |
| `rtl/miu.sv` | bytecode engine, dynamic binding, FU control, FU-originated calls |
| `rtl/ott.sv`, `rtl/vmt.sv` | the binding tables (combinational read, clocked write) |
| `rtl/fu_a_f.sv`, `rtl/fu_b_f.sv`, `rtl/fu_b_g.sv` | the three method units |
| `rtl/omu.sv` | arbitration, locking, oid/field → physical address |
| `rtl/omu_fu_cache.sv` | one FU's field cache inside the OMU |
| `rtl/addr_map_table.sv` | oid → {storage, base} |
| `rtl/reg_file.sv`, `rtl/data_mem.sv`, `rtl/instr_mem.sv` | storage |

Default sizes (all parameters or package constants):

| Item | Size |
|---|---|
| Data word / object field | 32 bits |
| Objects | up to 16 (4-bit oid) |
| Classes | up to 4 |
| Methods | up to 4 |
| Fields per object | up to 16 |
| Instruction memory | 256 bytes |
| Operand stack | 16 words |
| Call frames | 8 |
| Register file | 16 words |
| Data memory | 256 words |
| OMU cache | 4 entries per FU |
| Spare FU slots | 1 |

## The MIU: bytecode and calls

The MIU runs a subset of JVM bytecode with the standard JVM encodings:

| Group | Instructions |
|---|---|
| Constants | `nop`, `iconst_m1..5`, `bipush` |
| Stack | `pop`, `dup` |
| Arithmetic | `iadd`, `isub` |
| Branches | `if_icmpeq`, `if_icmpne`, `goto` |
| Calls | `jsr`, `return`, `invokevirtual` |

Timing and encoding:

* Each instruction takes one clock, fetch and execute together.
* The instruction memory has two read ports, one for the opcode and one for
  the operand byte.
* Branch offsets are one signed byte. They count from the address of the
  offset byte, not from the opcode.

`invokevirtual mid` reads the oid from the top of the stack and leaves it
there. The caller pops it afterwards, together with the argument below it.
What happens next depends on the VMT entry:

* **Hardware.** The FU gets `START`, the oid, and the word under the oid as
  its one `int` argument. The MIU stalls until the FU reports `DONE`, drops
  `START`, and continues in the next cycle.
* **Software.** The return address and a copy of the oid are pushed, and the
  pc jumps to the routine. `return` pops both and resumes after the call.

**Plain subroutine calls.** Methods that exist only in software have no
VMT entry. They are called with `jsr <offset>`, which involves no table
lookup. The return address is kept in the MIU's call-frame record, not on
the operand stack. So a subroutine can consume its arguments from the
stack and leave its results there. Its `return` resumes after the `jsr`.

A `return` with no open call frame ends the program (`halted`).

**Calls made by an FU.** While the MIU waits for an FU, that FU may raise
`call_req` with a method id, an oid and an argument. The MIU binds this call
exactly like an instruction:

* **Hardware target.** The MIU starts the target FU and records the caller
  on a small nesting stack. When the target finishes, the caller receives
  `call_ack`, and the MIU goes back to waiting for it.
* **Software target.** The MIU pushes a four-word frame: argument, oid,
  return address, oid. It then runs the routine while the calling FU keeps
  waiting. The routine's `return` drops the frame and pulses `call_ack` to
  the FU.

These rules allow both "software calls hardware calls software" and
"hardware calls software calls other hardware". Calling an FU that is
already busy would be recursion through hardware, and that stops the MIU
with an exception.

| `exc_code` | Cause |
|---|---|
| 1 | unsupported opcode |
| 2 | operand stack overflow or underflow |
| 3 | no valid OTT entry for the object, or no valid VMT entry for the class/method, or an FU number with no slot |
| 4 | hardware recursion (target FU busy) |
| 5 | call frame stack full |

## FU handshake

The handshake between the MIU and an FU is four-phase:

1. The MIU raises `command = START` together with `oid` and `arg`, and holds
   them.
2. The FU answers `STARTED` while it works, then `DONE`.
3. The MIU drops `START`.
4. The FU returns to `RESET`, which is its idle state.

An assertion in the MIU checks that `START` is never dropped before `DONE`.

The three method bodies are examples of the scheme, each a read-modify-write
under the OMU lock:

| FU | Body | Cycles with a free OMU |
|---|---|---|
| `A::f` | field 0 += 1 | 5 from `START` to `DONE` |
| `B::f` | field 0 += arg | 5 from `START` to `DONE` |
| `B::g` | plain read of field 0; field 1 += 1; then `f(field0 + field1)` on the same object through the call port | 7 to its call request |

The call made by `B::g` is dynamically bound like any other call. Field 0
of a `B` object is the part inherited from `A`, and field 1 is `B`'s own.

## The OMU: locking and caches

FUs address storage only as (oid, field index). For each request the OMU:

1. arbitrates between the FUs (round robin);
2. looks up the object in its mapping table to get `in_rf` and `base`;
3. accesses the register file or the data memory at `base + index`.

A miss takes two cycles: a grant cycle that drives the storage port, then an
`ack` with the read data. An FU holds its request until `ack`. An access to
an unmapped object is not performed and returns `err`.

**Locking.** A granted access with `lock = 1` reserves the OMU for that FU.
No other FU is granted until the same FU makes an access with `lock = 0`.
Every FU here locks its read and releases the lock with its write, so its
read-modify-write is atomic. Whether to lock is the FU designer's decision.
The OMU does not detect races.

**Caches.** Each FU slot has a small, fully associative field cache
(`omu_fu_cache`) in front of the arbiter:

* **Plain reads** that hit are answered in the same cycle, without
  arbitration.
* **Misses** go to the arbiter and fill a line when answered (round-robin
  replacement).
* **Writes** go through to storage.
* **Locked reads** always bypass the cache, because the lock must be taken
  at the arbiter.

Coherency uses update snooping. Every completed write is broadcast to all
caches, and each one updates its copy. Every cache is flushed when:

* a mapping-table entry changes;
* the system writes the register file or data memory through its own ports.

The caches are tagged by (oid, index). Two objects mapped onto overlapping
storage would therefore alias without being noticed, so keep mappings
disjoint.

## Spare FU slots

The top has `N_EXT_FU` spare FU slots (default 1). The MIU and the OMU treat
them exactly like the built-in FUs, as FU numbers 3 and up. Their four
channels are brought out as ports: `ext_fu_cmd`, `ext_fu_sts`,
`ext_omu_req` and `ext_omu_rsp`.

A method unit added later, for example in on-chip programmable logic,
connects to a slot. It is reached by writing a VMT entry that names the
slot's FU number. An unused slot must drive `ext_fu_sts` and `ext_omu_req`
to zero.

## Using the top

1. Hold `run` low.
2. Load the program with `imem_wr_*`. It starts at address 0.
3. Allocate objects:
   * `ott_wr_*`: oid → class;
   * `map_wr_*`: oid → register file or data memory, plus the base address.
4. Bind methods with `vmt_wr_*`: (class, mid) → {hardware, FU number} or
   {software, start address}.
5. Write the object fields through the system ports of the data memory
   (`dm_*`) or the register file (`rf_*`).
6. Raise `run`. The processor stops with `halted` or `exception`. `pc`,
   `stack_count` and `stack_top` show the MIU's state.

`rst_n` is asynchronous and active low. It clears all tables, the register
file and the caches, but not the instruction memory or the data memory.
Reload register-file objects after a reset.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/ooasip_pkg.sv rtl/*.sv \
    tb/tb_ooasip_top.sv --top-module tb_ooasip_top
./obj_dir/Vtb_ooasip_top
```

Replace `tb_ooasip_top` with any other `tb/tb_<block>` to test one block.

`tb_ooasip_top` runs the full processor at its default sizes, in four
phases:

1. **All methods in hardware**, including a loop, the call from `B::g` into
   `B::f`, and a cache hit on data that `B::f` changed in between.
2. **`B::f` replaced by software**, which itself calls hardware.
3. **A binding exception.**
4. **A new class** whose `f()` is an FU that the testbench attaches to the
   spare slot. This phase also makes a plain subroutine call.

The testbench checks every object field after each phase. It also counts:

* hardware dispatches per FU;
* software dispatches and FU-originated calls;
* MIU stalls;
* locked accesses;
* register-file and memory accesses;
* taken branches;
* subroutine calls;
* cache hits;
* spare-slot dispatches.

A mechanism that never happens counts as a failure.

## Departures and choices

* **`iadd`.** `iadd` pops two words and pushes their sum, as in the JVM.
  The original interpreter sketch writes the sum one slot lower and drops
  two words. That was taken as a slip, and the JVM meaning was followed.
* **`jsr`** uses the JVM opcode, but it takes a one-byte offset and ends
  with `return`. The JVM instead stores the return address on the stack
  and ends with `ret`.
* **Branch offsets** are one byte, relative to the offset byte, so a branch
  reaches about ±127 bytes.
* **Arguments** are passed on the operand stack, one `int` per method. The
  register-based passing scheme discussed as an optimisation is not built.
* **Method bodies.** The bodies of `B::f` and `B::g`, every size, the cache
  organisation, the arbitration order, the exception codes and the
  system-side ports are this design's own choices. The source only names
  these parts or states what they do.
* **Not built.** The programmable fabric that would hold FUs added after
  manufacture is not part of the RTL. Only the spare ports that such units
  would use are built.
* **Synthesis.** The memories are plain arrays: the data memory is
  synchronous read-first, and the instruction memory has combinational
  reads. They synthesise to flip-flops or to block RAM, depending on the
  tool.
