# Distributed memory for hardware Erlang processes

This RTL implements the distributed memory architecture of Azuma, Ishiura et
al., "Distributed Memory Architecture for High-Level Synthesis of Embedded
Controllers from Erlang" (Erlang Workshop 2017). The setting is an embedded controller written in a small
subset of Erlang. Each Erlang process is compiled into its own circuit, so
processes really run in parallel. But an Erlang process needs a heap, a stack
and a message queue. If all processes share one memory, that memory needs as
many ports as there are circuits, which is not affordable.

The architecture gives every process its own small single-port memories:

* **H_i** holds heap and stack.
* **Q_i** holds the message queue and the "mini heaps" that carry message data.

A process touches only its own memories for ordinary work. Other memories are
reached over just two shared buses:

* The **Q-bus** is used by senders writing into another process's queue.
* The **H-bus** is used by one **garbage collector** shared by all processes.

An **arbiter** orders the bus users. Only one send and one collection run at a
time, and the two may overlap when they concern different memories. All
control flags are memory-mapped through a per-process **I/O module**. A process
therefore starts library work, requests collections and takes part in sends
with ordinary loads and stores.

What is here: the memories, the two bus modules, the arbiter, the I/O modules,
the library module (the seven runtime functions of a process), the garbage
collector and a top level that wires `NPROC` process nodes together. Not here:
the process circuits themselves and the byte-stream port circuits. In the
original flow both are produced by a high-level synthesis tool. The top brings
out each process's memory port (`p_req`/`p_rdata`) so that a process circuit,
or a testbench model of one, can be attached.

## System structure

```
             P_0 (outside)            P_1 (outside)          ...
               | p_req/p_rdata          |
         +-----+------+           +-----+------+
         |  dm_io 0   |<--------->|  dm_arbiter |<------> dm_gc
         |  (flags)   |           +------------+            |
         +--+---+--+--+                                     |
   L_0 <--->|   |  |                                        |
  (dm_lib)  |   |  +-- Q side --> dm_bus (Q-bus) --> Q_0, Q_1, ...
            |   +----- H side --> dm_bus (H-bus) --> H_0, H_1, ... <--+
```

One node (`g_node` in `dm_top`) contains:

* an I/O module `dm_io`;
* a library module `dm_lib`;
* two `dm_spram` memories, H_i and Q_i. Each has 4096 words of 32 bits.

Shared by all nodes:

* the H-bus and the Q-bus, both instances of `dm_bus`;
* `dm_arbiter`;
* `dm_gc`. It is the one extra master on the H-bus.

`dm_copier` is the deep-copy engine inside both the library module and the
collector. `dm_pkg` holds the shared constants, types and helper functions.

## Address space

All accesses use one 32-bit byte address. The low 14 bits are the offset inside
a memory, which gives 4096 words. The upper 18 bits are the segment number.

| Segment  | Memory                                  |
|----------|-----------------------------------------|
| 0 + i    | H_i, heap and stack of process i        |
| 16 + i   | Q_i, message queue of process i         |
| 32 + i   | the I/O register window of node i       |

The segment map has room for 16 nodes. The paper targets "up to 10" fixed
processes.

### Routing

A bus module routes each request from node k by its segment:

* **Its own segment:** the request goes straight to memory k. It never occupies
  the shared bus, so all nodes can use their own memories in the same cycle.
* **Any other segment:** the request is placed on the shared bus with its full
  address. The memory whose segment matches serves it, and the answer returns
  to the requester.

Reads return data one cycle after the request, for local and bus accesses
alike. The arbiter guarantees two things: at most one bus master at a time, and
no bus access to a memory that its owner is using. Assertions in `dm_bus` check
both.

An I/O module sits between a node and its two bus modules. It answers its own
register window. It sends H-segment traffic from the process and the library
module to the H-bus, and Q-segment traffic from the library module to the
Q-bus.

## Term format and memory layouts

Terms are 32-bit tagged words:

| Low bits | Meaning |
|---|---|
| `..1111` | small integer (28-bit signed) |
| `..0011` | pid; the process number is in the upper bits |
| `..01`   | list pointer; car at the address, cdr 4 bytes later |
| `..10`   | boxed pointer to a tuple header (arity in bits 31:6, low 6 bits 0) |
| `..11`   | other immediates; `NIL` is `0x3B` (the testbenches use `..001011` for atoms) |

Pointers are full byte addresses, so a term names the memory it lives in.

### H_i words

| Word  | Content |
|---|---|
| 0–7   | x[0..7], the argument and result registers |
| 8     | heap top |
| 9     | stack pointer |
| 10    | active semispace |
| 11    | result code of the last library call |
| 12, 13 | arguments m and n |

From word 16 the memory is split into two semispaces of 2040 words each. In
the active semispace the heap grows up from the bottom and the stack grows down
from the top.

### Q_i words

| Word | Content |
|---|---|
| 0 | head |
| 1 | tail |
| 2 | current ("save") message |
| 3 | first free word |
| 4 | message before the current one |

From word 8, messages are stored as records `[next, term, size]`. Each record
is followed directly by its mini heap, which holds the copied data of the
message.

## Library module: the runtime of one process

A process starts a library function as follows:

1. It writes the arguments into H_i.
2. It writes the function number into `RUN` in its I/O window.
3. It polls `RUN` until it reads 0.
4. It reads the result code: 0 OK, 1 none/timeout, 2 overflow.

The library module runs the function, writes the result code, and then clears
`RUN`.

| # | Function | What it does |
|---|---|---|
| 1 | `test_heap m,n` | Makes sure m words are free between heap top and stack. x[0..n-1] are live. |
| 2 | `allocate m,n` | Grows the stack by m+1 words. The new slots are filled with NIL. |
| 3 | `send` | Copies term x[1] into the queue of the process whose pid is in x[0]. |
| 4 | `receive` | Copies the current message into the heap and puts it in x[0]. |
| 5 | `remove_message` | Unlinks the current message. |
| 6 | `save_message` | Moves the current-message pointer one step on. |
| 7 | `wait_timeout t` | Waits up to t cycles for a message to become current. |

If there is not enough free space, functions 1, 2 and 4 request one garbage
collection and try again. If the space still does not fit after that, they
return "overflow".

Queue space is reclaimed only when the queue becomes empty. At that point the
free pointer goes back to word 8. This is simple and enough for a controller
whose queues drain. A queue that never empties runs out of space after about
4000 words of traffic.

## Sending a message: the enqueue handshake

A send writes into another process's queue. That process must not be
rearranging the same queue at the time. The flags that coordinate this live in
the I/O windows of the two nodes.

1. Sender L_i writes `SEND_TO = j` and `SEND_REQ = 1`.
2. The arbiter picks one waiting sender, the lowest index first, and sets
   `ENQ_REQ` of node j.
3. Node j sets `ENQ_READY` as soon as its library module is not inside
   receive, remove_message, save_message or a queue check of wait_timeout.
   While `ENQ_REQ` or `ENQ_READY` is set, node j starts none of those functions.
4. The arbiter sets `SEND_ACK` of node i.
5. L_i uses the Q-bus to:
   * read the head, tail and free pointer of Q_j;
   * write the record and deep-copy the term behind it;
   * link the record and update the pointers.
6. L_i clears `SEND_REQ`.
7. The arbiter clears `SEND_ACK` and `ENQ_REQ`, waits for `ENQ_READY` to fall,
   and takes the next sender.

A node that is itself waiting to send still answers `ENQ_REQ`. Otherwise two
nodes sending to each other would deadlock. A node in `wait_timeout` watches
the handshake and checks its queue again after every completed enqueue.

**Departure from the paper.** The paper's step 4 gives the grant to the sender
by "setting send_req_i = 1". That flag is already 1, so it cannot carry a
grant. This design therefore adds the separate `SEND_ACK` flag.

## Garbage collection

1. A library module writes `GC_REQ = 1`.
2. The arbiter picks one requester, the lowest index first. It raises `gc_req`
   with `gc_process = i`.
3. `dm_gc` collects H_i over the H-bus.
4. The arbiter clears `GC_REQ`, which releases the library module.

The collector is a copying collector over the two static semispaces:

* It copies everything reachable from the stack slots and from x[0..n-1] into
  the inactive semispace.
* It rewrites the roots.
* It sets the new heap top, stack pointer and active semispace.

All other processes keep running. A send into Q_i, or a send between two other
nodes, can proceed during a collection of H_i. Only the owner of H_i is
stopped, because it is waiting in its library call.

### The copy engine

`dm_copier` performs all three copies in the system:

* heap to mini heap, on send;
* mini heap to heap, on receive;
* old semispace to new semispace, on collection.

It is a Cheney-style breadth-first copy:

1. Copy the root object to the destination.
2. Walk a scan pointer over the copied words.
3. For each pointer found, copy the object it points to onto the end of the
   area and replace the word with the new pointer.

For message copies the source is only read, so a sub-term reachable twice is
copied twice, as Erlang message passing does anyway. For the collector the
copier leaves forwarding marks. Once an object of two or more words is copied,
its first old word becomes `FWD_MARK` (`0x3C`, a tag-00 word that neither a
header nor a term can be). Its second old word becomes the new pointer. A later
reference to the object finds the mark and reuses the new pointer, so shared
structure stays shared.

Only an empty tuple, which is one word, has no room for a forwarding pointer.
It is copied once per reference. That is the one way a collection can need
more room than the old region used. If the result would not fit, the copy stops
and reports overflow, and the owning library call returns the overflow code.
Each copied word costs two cycles, each scanned word two more, and setting a
forwarding mark two more.

## Top-level interface (`dm_top`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `p_req[NPROC]` | in | process memory requests `{req, we, addr, wdata}` |
| `p_rdata[NPROC]` | out | read data, one cycle after the request |
| `lib_busy` | out | per node: library function running |
| `gc_active`, `gc_process`, `gc_overflow` | out | collector status |
| `send_active`, `send_src`, `send_dst` | out | send status |

Parameters:

* `NPROC`: number of process nodes, default 2, as in the paper's
  two-process example.
* `PW`: width of a process index.

The memory size is set by `LOCAL_AW` in `dm_pkg`. The paper gives no memory
size; 4096 words per memory is this design's choice.

A process attached to `p_req` must follow two rules:

1. Before its first library call, initialise its own heap top (word 16), stack
   pointer (word 16 + 2040) and active semispace (0).
2. Do not touch H_i while `RUN` is nonzero, except for reading `RUN`.

## How far to trust it, and where it departs from the paper

Taken from the paper:

* the partition into H_i and Q_i per process;
* single-port memories;
* the two buses and their routing rules;
* one shared collector working on H_i through the H-bus;
* two static alternating regions for collection;
* the seven library functions and the RUN protocol;
* the GC and send handshakes, with fixed-priority arbitration;
* memory-mapped control flags.

This design's own choices:

* All word layouts, the segment numbers, the tuple header format and the result
  codes.
* The `SEND_ACK` flag.
* Lowest index first as the priority order.
* Queue space reclaimed only when the queue is empty.
* The forwarding mark format.
* Library calls retry once after a collection.
* GC completion is signalled with a one-cycle `gc_done` pulse, followed by the
  arbiter dropping `gc_req`. The paper instead has the collector itself drop
  `GC_req`.
* One GC step of the paper says the collector cleans up "Q_i". Its bus
  description and the parallelism example clearly collect the heap memory H_i,
  and this design does that.

The library module and the collector here are hand-written state machines. In
the paper they are generated from C code taken from the BEAM runtime. Their
external behaviour follows the function descriptions, but the sizes reported in
the paper (Artix-7 LUT and FF counts) do not apply to this RTL.

Not built:

* The process circuits. They are the output of the Erlang-to-hardware
  compiler, and the testbenches model them.
* The input and output port circuits and their byte buffers. The paper gives
  their purpose but not their framing, their format, or how a port takes part
  in arbitration.
* Sending to a port. The send path is implemented only for process
  destinations.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if the design
hangs.

| Testbench | What it exercises |
|---|---|
| `tb_dm_spram` | memory read and write timing |
| `tb_dm_bus` | local and bus routing against a reference model |
| `tb_dm_arbiter` | both handshakes, priority and queuing of requests |
| `tb_dm_io` | the register window, passthrough, `ENQ_READY` rules |
| `tb_dm_gc` | collections with stack and x roots, lists, tuples, overflow |
| `tb_dm_lib` | all seven functions against behavioural arbiter and collector models |
| `tb_dm_top` | the default two-node system end to end |
| `tb_dm_fig7` | four nodes, with the parallel cases of the paper's Figure 7 |
| `tb_dm_roomba` | the paper's two-process robot controller example |

The end-to-end tests are `tb_dm_top`, `tb_dm_fig7` and `tb_dm_roomba`:

* **`tb_dm_top`** runs at the default parameters. It counts sends, collections,
  send conflicts, collections overlapping sends, timeouts, wake-ups, saves,
  removes, allocates and overflows. It fails if any of them never happens.
* **`tb_dm_fig7`** uses four nodes. It reproduces the paper's Figure 7 cases:
  * (a) local work in parallel;
  * (b) a send beside independent work;
  * (c) a collection of H1 while P2 sends to P1.

  It measures the cycles in which these overlap.
* **`tb_dm_roomba`** runs the paper's two-process example, the robot controller
  (decode, then calc/encode), for 160 joystick records. Both heaps fill up and
  are collected. Every motor command is checked.

To simulate with plain Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    --top-module tb_dm_top \
    -y rtl rtl/dm_pkg.sv tb/tb_dm_top.sv
./obj_dir/Vtb_dm_top
```

To run another test, replace `tb_dm_top` with another testbench name. Memories
and state that are not reset are initialised by the design or the testbench, so
the results do not depend on Verilator's random initial values.
