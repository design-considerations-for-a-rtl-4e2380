# A tagged-token dataflow multiprocessor in SystemVerilog

A dataflow machine has no program counter. An instruction (a *node* of the
program graph) fires as soon as all its operands have arrived. Operands travel
between processors as *tokens*. Each token names the processor, the node and the
node input it is meant for. The hardware therefore has two jobs:

- find the partner of every arriving operand quickly, among possibly millions of
  waiting ones;
- turn every result into one token per destination, fast enough to keep the
  processors busy.

This RTL builds such a machine. There are 64 identical processing elements joined
by a three-level network of buffered 4 x 4 crossbar switches. All of it runs on
one 50 ns clock. The evaluation cycle is 200 ns, four clocks. Each element aims
to sustain one diadic (two-operand) evaluation every 200 ns.

The machine mixes two evaluation models:

- **Dynamic (tagged) model.** Tokens carry a 38-bit *colour*, so many instances
  of one node can be active at once, even on different elements. Tokens with
  the same node and colour are partners.
- **Static model.** An uncoloured token (colour 0) behaves as if its colour were
  zero. Tokens that reach the same input of the same node, with the same colour,
  wait in a first-in first-out *queue* on that arc. That keeps streams of data
  in order.

The matching hardware has to support both models at once. That is the hardest
part of the design, and most of this document is about it.

## Token and work packet

A token is one 128-bit word (`dfm_pkg::token_t`), most significant field first:

| bits | field | meaning |
|---|---|---|
| 2 | spare | unused |
| 8 | processor | element the token goes to; 0xFF = the host |
| 8 | process | user or task; tokens of different processes never match |
| 22 | node | instruction number within the element |
| 1 | inp | input point: 0 = left operand, 1 = right operand |
| 1 | mon | monadic flag: no partner needed |
| 38 | colour | tag; 0 = uncoloured |
| 8 | type | integer, real, boolean, 2-element vector slice (`T_*`) |
| 40 | data | value (32-bit integers and IEEE single reals use the low 32 bits) |

The matching unit turns one token, or a matched pair, into a 220-bit *work
packet* (`packet_t`). A work packet holds:

- function 8, two operand types of 8 each, process 8, node 22, colour 38;
- two 64-bit operands.

## One processing element

```
network ─► input queue ─► matching unit ─► evaluation queue ─► evaluation unit ─► dispatcher ─► network
           128K x 128     │ token cache 16K (2-way)            │ FP/I ALU x2, GP ALU │ destination cache 8K x 64
           4 banks        │ valid bits 256K x 1                │ object store        │ recirculating buffer 1K x 128
                          │ instruction cache 8K               │                     │ main memory 1M x 64
                          └ main memory 1M x 80 (hash table, chains, queues, instructions)
```

Every stage hands work to the next with a valid/ready handshake. A stage can
therefore run at its own speed, and back-pressure propagates upstream.

### Input queue (`input_queue`)

The input queue has to accept a token every 50 ns from the network, and give one
to the matching unit every 50 ns, using memory parts with a 100 ns cycle. It
does this with four interleaved banks:

- Token *n* is stored in bank *n* mod 4.
- Each bank stays busy for two clocks after an access.
- Sequential writes, and sequential reads, therefore never wait for each other.

Only a write and a read that meet in the same bank can collide. Then the write
goes first and the read waits one clock. These clashes are counted.

A four-token output buffer covers the two-clock read time.

### Matching unit (`matching_unit`)

The matching unit looks for a waiting token with the same key. The key is
{process, node, colour}, 68 bits, far too wide for an associative memory. The
lookup is layered instead:

1. **Token cache** (`token_cache`). A two-way set-associative cache of 8K sets
   (16K entries) holds recently arrived tokens that have not been matched.
   - Each entry has a 48-bit data field. It holds either the waiting token's
     type and data, or the head and tail pointers of a queue.
   - The victim on replacement is the least recently written way.
2. **Hash table in main memory.** There are 256K buckets in the 1M x 80 memory,
   chosen by exclusive-or folding node and colour into 18 bits. Each bucket
   heads a linked chain of two-word entries.
3. **Valid bits** (`valid_bit_store`). One bit per bucket, in fast memory, says
   whether that bucket's chain is non-empty. A cache miss on a bucket whose bit
   is clear proves that no partner exists anywhere. The token can then go
   straight into the cache without touching main memory.
4. **Instruction cache** (`instr_cache`). A direct-mapped cache of 8K lines
   holds each node's function code and its optional literal operand. It is
   read in the same cycle.

**Fast path.** A token costs two clocks (100 ns, 10 million per second) in
three common cases:

- **Monadic.** The work packet is built at once. The instruction's literal, if
  it has one, becomes the second operand.
- **Cache hit for the opposite input.** The pair forms a work packet and the
  cache way is freed.
- **Cache miss, valid bit clear, a free way in the set.** The token is written
  into the cache.

**Exceptions.** Everything else goes to a slower sequencer that works on main
memory. In the original machine this sequencer is microprogrammed; here it is a
state machine with the same steps. Main memory is laid out like this:

```
0x00000  bucket heads      word = first chain entry (0 = empty)
0x40000  instructions      word = instr_t, indexed by node[17:0]
0x80000  block pool        two-word blocks, free list + bump allocator
         chain entry:      w0 = key;  w1 = {inp, queued, data48, next}
         queue element:    w0 = {type, data};  w1 = next
```

The sequencer handles four situations:

- **Same input point, cache hit.** A second left operand arrives while a left
  operand with the same key is already waiting. This is the static model. The
  cache entry becomes a queue: its data field now points to the head and tail
  of a list of queue elements in main memory. Later left operands are appended
  at the tail. A right operand takes the element at the head, so operands pair
  in arrival order. When the last queued token is taken, the entry is removed
  and its blocks return to the free list.
- **Valid bit set, cache miss.** The partner may be in the bucket's chain. The
  sequencer walks the whole chain and compares keys.
  - If the key is found, the entry is unlinked from the chain and then treated
    exactly like a cache entry (matched, or turned into a queue).
  - When the chain becomes empty, the bucket's valid bit is cleared.
- **Full set.** The older entry is written to the head of its own bucket's chain
  and that bucket's valid bit is set. Only then is the new token stored.
- **Instruction cache miss.** The instruction is read from main memory and the
  line is filled.

**Storage nodes.** A storage node (function `F_STORE`) keeps its value, so that
the graph can hold semi-permanent data:

- A token on input 0 is stored as the node's value. A later one replaces it.
- Each token on input 1 reads the value without removing it. The work packet
  carries the stored value as operand 0, and the evaluation unit passes it on.
- Reads that arrive before any value form an ordinary queue. When the value
  arrives, all of them are answered in order, and the value stays.

Because a hit on a storage node never frees its cache entry, such hits always
take the sequencer path.

Evicting tokens to main memory and setting valid bits in this way keeps one rule
true at all times: a token whose partner is waiting anywhere in the element
always finds it. An eviction scheme that searched only at eviction time would
break that rule, and could leave both halves of a pair waiting for ever.

### Evaluation queue and evaluation unit (`sync_fifo`, `evaluation_unit`)

A 1K-entry FIFO of work packets absorbs the different speeds of matching and
evaluation.

The evaluation unit does not decode instructions one step at a time. A dispatch
table indexed by {function, type0, type1} gives the start address of a short
microcode sequence. Each micro-step takes one 200 ns machine cycle:

- **One step.** Integer or real add, subtract, multiply, compare, logic and
  negate, on FP/I lane 0.
- **Two steps.** An integer mixed with a real: the integer is first converted
  (coercion), then the real operation runs.
- **Vector slice** (`T_VINT`, `T_VREAL`). Two 32-bit elements per 64-bit operand,
  one in each FP/I ALU, in one step.
- **Organisational functions.** Identity, gate (pass operand 0 when operand 1
  is true) and typed equality, on the general purpose ALU (`gp_alu`).
- **I-structure read and write** in the object store (`object_store`). Each
  word has a *full* bit.
  - Reading a full word answers at once.
  - Reading an empty word parks the reader's process, node and colour in the
    word. The result then appears when the word is written, with the reader's
    context.
  - A second write to a full word is refused and counted.
- **No result.** A function with no microcode for its operand types gives no
  result and is counted as illegal.

The next packet is taken in the clock the previous result leaves. Single-step
functions therefore complete one per 200 ns.

`fpi_alu` does IEEE single arithmetic in simplified form: results are truncated,
not rounded, and tiny results are flushed to zero. It does 32-bit two's
complement integer arithmetic exactly.

### Dispatcher (`dispatcher`)

Each node can have any number of destinations. A destination is 32 bits:
{processor 8, node 22, inp, mon}.

The destination cache is direct mapped, 8K x 64, and holds each node's first two
destinations.

- If there is only one destination, the second half of the pair is zero.
- If there are more than two, the second half is an *indirection*: processor
  0xFE, with the low 20 bits giving an address in the element's 1M x 64 memory.
  The remaining destinations are stored there as consecutive pairs, ended by a
  zero destination.
- On a cache miss the pair is read from memory and the cache line is filled.

Timing, on the 50 ns clock:

- The result is taken in one clock. The first token leaves in the next clock,
  and the second one clock (50 ns) after that.
- For a destination list, the first memory read starts in the clock the result
  is taken. After that, a pair arrives every 200 ns and gives two tokens. With
  three or more destinations, tokens therefore flow at one per 100 ns.

Each token is merged from a destination and the result (process, colour, type
and the low 40 data bits). A token that the network does not take at once goes
into the 1K x 128 *recirculating buffer* and is offered again, oldest first, so
tokens always leave in order. The dispatcher stalls only when that buffer is
full.

## Network (`xbar_switch`, `omega_network`)

Each switch is a buffered synchronous 4 x 4 crossbar:

- one input FIFO (4 tokens deep) per input;
- each output moves one token per clock;
- round-robin choice among the inputs that want the same output.

The switches are connected as an omega network. Between levels, the links are
permuted by a four-way perfect shuffle, which rotates the link number left by
two bits. Level *s* steers a token by base-4 digit `STAGES-1-s` of its
processor number, so three levels reach all 64 processors.

The switches run at twice the rate one element needs, one transfer per 50 ns
against one token per 100 ns. That margin covers the losses from contention in
a deep network.

## The whole machine (`dfm_multiprocessor`)

The top level connects the elements and the network, and adds the host
interface:

- Every element's output enters the network on that element's link, and
  arrives at the input queue of the processor the token names.
- Tokens addressed to processor 0xFF leave the machine on that element's
  `host_out_*` port.
- The host injects tokens through `host_in_*`, which shares network link 0 with
  element 0 and has priority.
- A load port writes program words into either main memory of any element,
  before tokens flow:
  - `load_sel` 0 selects the 1M x 80 matching memory. Instructions go at
    0x40000 + node.
  - `load_sel` 1 selects the 1M x 64 evaluation memory. Destination pairs go at
    node, and lists anywhere above them.

  A load holds that memory for a clock, so loads must be spaced by the memory's
  busy time.
- Event counters from every unit are brought out for observation. They cover
  matches, evictions, chain searches, queue operations, cache misses,
  coercions, deferred reads, recirculated tokens, bank conflicts and network
  contention.

## Sizes and parameters

Every size parameter defaults to the full machine:

| parameter | default | meaning |
|---|---|---|
| `STAGES` | 3 | network levels, 4**STAGES elements |
| `IQ_DEPTH` | 128K | input queue tokens |
| `EQ_DEPTH` | 1K | evaluation queue packets |
| `TC_SETS` | 8K | token cache sets (2 ways) |
| `IC_LINES` | 8K | instruction cache lines |
| `DC_LINES` | 8K | destination cache lines |
| `RBUF_DEPTH` | 1K | recirculating buffer tokens |
| `EVAL_CLKS` | 4 | clocks per machine cycle |
| `NET_BUF` | 4 | switch input FIFO depth |

The 1M-word memories are fixed by the 20-bit address width in `dfm_pkg`.
Memories are plain arrays. Caches and valid bits are cleared by a sweep after
reset, during which the units report busy. At full size that takes 8K clocks.

## Where this design departs from the original, and what is missing

- **Evaluation rate.** Evaluation takes 200 ns per machine cycle. An element
  therefore evaluates at most 5 million functions per second, even though
  monadic work packets are produced at 10 million per second.
- **Destination lookup timing.** The destination cache is read when a result
  arrives, not while the function is being evaluated. This adds one clock of
  latency but does not change the rates.
- **Recirculating buffer.** The buffer holds only tokens that the network
  refused. The original writes every token there as well.
- **Main memory model.** The memories have a fixed latency: two clocks for the
  matching memory and four for the evaluation memory. Page-mode bursts and
  refresh are not modelled.
- **Object store.** It has its own 4K-word array, with one waiting reader per
  word. A second waiting reader is dropped and counted. Object creation and
  deletion, plain read-write objects and objects spread across elements are not
  built.
- **Storage nodes.** Input 0 holds the value and input 1 reads it. There is no
  separate reset; a new value simply replaces the old one.
- **Matching features not built.**
  - List start and end tokens.
  - Multi-word vector and record tokens.

  So vectors exist only as 2-element 64-bit slices inside work packets.
- **Data cache.** The two-way data cache of the evaluation unit is not built;
  its role is not specified.
- **Encodings.** Type and function codes, the destination format, the hash, the
  instruction word and the memory maps are this design's own.
- **Rounding.** The real arithmetic truncates.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dfm_pkg.sv tb/tb_dispatcher.sv \
          --top-module tb_dispatcher -Mdir obj && obj/Vtb_dispatcher
```

Notable testbenches:

- **`tb_matching_unit`** drives 3000 random tokens through a small cache (4
  sets) and compares every work packet with a reference model. The model
  keeps a queue of waiting tokens for each key and input point. The test
  checks that every slow path was taken.
- **`tb_processing_element`** runs one element at full size. It loads a
  program and checks the results and rates: one diadic result per 200 ns, a
  second destination 50 ns after the first, and destination lists.
- **`tb_dfm_multiprocessor`** runs four elements with small caches. For 48
  colours it computes `c(c+1) + (c+2)(c+3)`, halves the result (integer coerced
  to real) and negates it on other elements. It also covers token queues, a
  storage node, deferred I-structure reads, vector slices and gates. It counts every
  mechanism and fails if one never happened.
- **`tb_dfm_full`** runs the same program on the full 64-element machine, with
  every parameter at its default. It leaves out the storage node program. Verilator
  takes about 8 minutes to build it, and the simulation needs about 1.5 GB of memory.
