// dfm_pkg: shared types and constants of the dataflow multiprocessor.
//
// The token (one 128-bit network word) and the work packet (one 220-bit
// evaluation queue entry) follow the field lists and widths of the
// published formats: processor 8, process 8, node 22, input point 1,
// monadic flag 1, colour 38, type 8, data 40 bits for a token, and
// function 8, two types of 8, process 8, node 22, colour 38 and two 64-bit
// arguments for a work packet.  The token fields add up to 126 bits; the two
// remaining bits of the 128-bit word are kept as spare bits at the top.
//
// Everything else here is this design's own choice: the type and function
// codes, the 32-bit destination format, the hash fold, the layout of the
// matching unit's bulk memory and the reserved processor numbers.
package dfm_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned PROC_W   = 8;
  localparam int unsigned PID_W    = 8;   // process number
  localparam int unsigned NODE_W   = 22;
  localparam int unsigned COLOUR_W = 38;
  localparam int unsigned TYPE_W   = 8;
  localparam int unsigned DATA_W   = 40;
  localparam int unsigned FUNC_W   = 8;
  localparam int unsigned ARG_W    = 64;
  localparam int unsigned TOKEN_W  = 128;
  localparam int unsigned PACKET_W = 220;
  localparam int unsigned DEST_W   = 32;
  localparam int unsigned CDATA_W  = 48;  // token cache data field
  localparam int unsigned QPTR_W   = 24;  // queue head / tail pointer

  // One token word (most significant field first).
  typedef struct packed {
    logic [1:0]          spare;
    logic [PROC_W-1:0]   processor;
    logic [PID_W-1:0]    process;
    logic [NODE_W-1:0]   node;
    logic                inp;       // input point: 0 = left, 1 = right
    logic                mon;       // monadic: no match needed
    logic [COLOUR_W-1:0] colour;    // 0 = uncoloured
    logic [TYPE_W-1:0]   dtype;
    logic [DATA_W-1:0]   data;
  } token_t;

  // One evaluation queue entry.
  typedef struct packed {
    logic [FUNC_W-1:0]   func;
    logic [TYPE_W-1:0]   type0;
    logic [TYPE_W-1:0]   type1;
    logic [PID_W-1:0]    process;
    logic [NODE_W-1:0]   node;
    logic [COLOUR_W-1:0] colour;
    logic [ARG_W-1:0]    arg0;
    logic [ARG_W-1:0]    arg1;
  } packet_t;

  // Destination address, two of which fill one 64-bit destination cache word.
  typedef struct packed {
    logic [PROC_W-1:0] processor;
    logic [NODE_W-1:0] node;
    logic              inp;
    logic              mon;
  } dest_t;

  // Reserved processor numbers in a destination.
  localparam logic [PROC_W-1:0] PROC_HOST     = 8'hFF;  // leaves the machine
  localparam logic [PROC_W-1:0] PROC_INDIRECT = 8'hFE;  // pointer to more destinations

  // Matching key: the fields a partner must agree on.
  typedef struct packed {
    logic [PID_W-1:0]    process;
    logic [NODE_W-1:0]   node;
    logic [COLOUR_W-1:0] colour;
  } key_t;

  // Waiting-token entry as held by the token cache and main memory chains.
  typedef struct packed {
    key_t               key;
    logic               inp;      // input point of the waiting token(s)
    logic               queued;   // data holds {head, tail} of a queue
    logic [CDATA_W-1:0] data;     // {type, data} or {head, tail}
  } entry_t;
  localparam int unsigned KEY_W   = $bits(key_t);     // 68
  localparam int unsigned ENTRY_W = $bits(entry_t);   // 118

  // Instruction as held by the instruction cache.
  typedef struct packed {
    logic [FUNC_W-1:0] func;
    logic              has_lit;
    logic [TYPE_W-1:0] lit_type;
    logic [DATA_W-1:0] lit_data;
  } instr_t;
  localparam int unsigned INSTR_W = $bits(instr_t);   // 57

  // ---------------------------------------------------------------- types
  localparam logic [TYPE_W-1:0] T_NONE  = 8'd0;
  localparam logic [TYPE_W-1:0] T_INT   = 8'd1;  // 32-bit two's complement
  localparam logic [TYPE_W-1:0] T_REAL  = 8'd2;  // IEEE single
  localparam logic [TYPE_W-1:0] T_BOOL  = 8'd3;
  localparam logic [TYPE_W-1:0] T_VINT  = 8'd4;  // slice of two 32-bit integers
  localparam logic [TYPE_W-1:0] T_VREAL = 8'd5;  // slice of two 32-bit reals

  // ------------------------------------------------------------ functions
  localparam logic [FUNC_W-1:0] F_ID   = 8'd0;   // copy operand 0
  localparam logic [FUNC_W-1:0] F_ADD  = 8'd1;
  localparam logic [FUNC_W-1:0] F_SUB  = 8'd2;
  localparam logic [FUNC_W-1:0] F_MUL  = 8'd3;
  localparam logic [FUNC_W-1:0] F_AND  = 8'd4;
  localparam logic [FUNC_W-1:0] F_OR   = 8'd5;
  localparam logic [FUNC_W-1:0] F_XOR  = 8'd6;
  localparam logic [FUNC_W-1:0] F_LT   = 8'd7;
  localparam logic [FUNC_W-1:0] F_EQ   = 8'd8;
  localparam logic [FUNC_W-1:0] F_NEG  = 8'd9;
  localparam logic [FUNC_W-1:0] F_ITOR = 8'd10;  // integer to real
  localparam logic [FUNC_W-1:0] F_RTOI = 8'd11;  // real to integer (truncate)
  localparam logic [FUNC_W-1:0] F_GATE = 8'd12;  // pass operand 0 when operand 1 true
  localparam logic [FUNC_W-1:0] F_IWR  = 8'd13;  // I-structure write  (addr, value)
  localparam logic [FUNC_W-1:0] F_IRD  = 8'd14;  // I-structure read   (addr)
  localparam logic [FUNC_W-1:0] F_STORE = 8'd15; // storage node: input 0 value kept, input 1 reads it

  // Result of one evaluation, handed to the dispatcher.
  typedef struct packed {
    logic [PID_W-1:0]    process;
    logic [NODE_W-1:0]   node;
    logic [COLOUR_W-1:0] colour;
    logic [TYPE_W-1:0]   rtype;
    logic [ARG_W-1:0]    rdata;
  } result_t;

  // Event counters of the evaluation unit.
  typedef struct packed {
    logic [31:0] ops;          // work packets evaluated
    logic [31:0] single;       // finished in one machine cycle
    logic [31:0] coerced;      // needed a type coercion micro-step
    logic [31:0] vector;       // vector slice through both FP/I ALUs
    logic [31:0] gp;           // handled by the general purpose ALU
    logic [31:0] obj;          // object store accesses
    logic [31:0] illegal;      // function / type pair with no microcode
    logic [31:0] deferred;     // I-structure reads made to wait for a write
    logic [31:0] waw_errors;   // refused second writes to an I-structure word
  } eu_stats_t;

  // Event counters of the dispatcher.
  typedef struct packed {
    logic [31:0] results;       // results taken from the evaluation unit
    logic [31:0] tokens;        // tokens written to the network side
    logic [31:0] second_dest;   // second destination of a pair used
    logic [31:0] indirect;      // destination lists read from main memory
    logic [31:0] dcache_miss;   // destination cache misses
    logic [31:0] recirculated;  // tokens held in the recirculating buffer
  } dp_stats_t;

  // Evaluation unit memory (1M x 64): destination pairs indexed by the low
  // 19 node bits, longer destination lists and other data above.
  localparam int unsigned EADDR_W   = 20;
  localparam logic [EADDR_W-1:0] DEST_BASE = 20'h00000;

  // Event counters of the matching unit.
  typedef struct packed {
    logic [31:0] fast_match;    // matched in the token cache, one cache cycle
    logic [31:0] fast_insert;   // stored in a free cache way, one cache cycle
    logic [31:0] monadic;       // passed straight through (monadic flag)
    logic [31:0] exceptions;    // handed to the main-memory sequencer
    logic [31:0] evictions;     // cache entry retired to a main memory chain
    logic [31:0] chain_search;  // main memory chain searched (valid bit set)
    logic [31:0] chain_found;   // ... and the key was found there
    logic [31:0] queue_ops;     // token queued on, or taken off, a queue
    logic [31:0] imiss;         // instruction cache misses
    logic [31:0] store_ops;     // storage node writes and reads
  } mu_stats_t;

  // --------------------------------------------------- matching unit map
  localparam int unsigned HASH_W  = 18;                  // 256K buckets
  localparam int unsigned MADDR_W = 20;                  // 1M words of 80 bits
  localparam int unsigned MWORD_W = 80;
  localparam logic [MADDR_W-1:0] BUCKET_BASE = 20'h00000;
  localparam logic [MADDR_W-1:0] INSTR_BASE  = 20'h40000;
  localparam logic [MADDR_W-1:0] POOL_BASE   = 20'h80000;

  // Multi-way exclusive-or of node and colour into a bucket number.  With
  // colour zero this reduces to a fold of the node number alone.
  function automatic logic [HASH_W-1:0] hash_key(input logic [NODE_W-1:0] node,
                                                 input logic [COLOUR_W-1:0] colour);
    logic [71:0] c;
    logic [35:0] n;
    c = {34'b0, colour};
    n = {14'b0, node};
    return n[17:0] ^ n[35:18] ^ c[17:0] ^ c[35:18] ^ c[53:36] ^ c[71:54];
  endfunction

  function automatic key_t token_key(input token_t t);
    return '{process: t.process, node: t.node, colour: t.colour};
  endfunction

endpackage
