// matching_unit: finds the partner of each arriving token and builds work
// packets for the evaluation unit.
//
// A token taken from the input queue is looked up, in one cache cycle, in
// the instruction cache, the two-way token cache and the valid-bit store.
// The common cases finish in that cycle (two clocks of 50 ns, so 10 million
// matches or mismatches per second):
//   * monadic flag set: a work packet is built at once, the instruction's
//     literal (if any) filling the other operand;
//   * cache hit on a token for the opposite input point: work packet built,
//     cache way freed;
//   * cache miss, valid bit clear, a free way in the set: the token is stored.
// Everything else is an exception handled by a slower sequencer that works
// on main memory (the 1M x 80 bulk memory):
//   * a second token for the same input point forms (or extends) a FIFO queue
//     in main memory; the cache entry then holds the queue's head and tail
//     pointers, and a token for the other input consumes the queue head;
//   * cache miss with the valid bit set: the bucket's overflow chain is
//     searched; an entry found there is unlinked and handled as above;
//   * a full set: the older entry is retired to the head of its bucket's
//     chain and the bucket's valid bit is set.
// Chain entries and queue elements are two-word blocks taken from a free
// list.  Main memory map: bucket heads at 0x00000 (one per hash bucket),
// instructions at 0x40000 (indexed by the low 18 node bits), block pool from
// 0x80000.  Main memory word layouts:
//   bucket:        [19:0] first chain entry (0 = empty)
//   chain entry:   word 0 [67:0] key; word 1 {10'b0, inp, queued, data48, next20}
//   queue element: word 0 [47:0] {type, data}; word 1 [19:0] next
//   free block:    word 1 [19:0] next free block
//   instruction:   [56:0] instr_t
// The matching rules, cache organisation, valid bits, hash table with
// chains and queues, and the split between a fast cache controller and a
// slower main-memory controller follow the published design.  The published
// controller for the slow path is microprogrammed; here it is a state
// machine with the same steps.  The memory map, word layouts, free list and
// the choice to promote a chain entry back into the cache are this
// design's own.
// Storage nodes (function F_STORE) keep their value: a token on input 0 is
// stored (replacing an older value) and each token on input 1 reads it
// without removing it; reads that come before the value wait in a queue and
// are all answered when it arrives.  A hit on a storage node entry is
// therefore always handled by the sequencer.  Which input holds the value,
// and that a new value simply replaces the old one, are this design's
// reading.  List tokens and multi-word (vector and record) tokens are not
// handled.
module matching_unit
  import dfm_pkg::*;
#(
  parameter int unsigned CACHE_SETS = 8192,
  parameter int unsigned IC_LINES   = 8192
) (
  input  logic               clk,
  input  logic               rst_n,
  // tokens from the input queue
  input  logic               in_valid,
  output logic               in_ready,
  input  token_t             in_tok,
  // work packets to the evaluation queue
  output logic               out_valid,
  input  logic               out_ready,
  output packet_t            out_pkt,
  // main memory (1M x 80)
  output logic               mem_req,
  output logic               mem_we,
  output logic [MADDR_W-1:0] mem_addr,
  output logic [MWORD_W-1:0] mem_wdata,
  input  logic               mem_ready,
  input  logic               mem_rvalid,
  input  logic [MWORD_W-1:0] mem_rdata,
  output mu_stats_t          stats,
  output logic               idle
);
  localparam int unsigned SW = $clog2(CACHE_SETS);

  typedef enum logic [5:0] {
    S_IDLE, S_LOOK, S_EMIT, S_MEM, S_MWAIT,
    S_IF1, S_IF2,
    S_ACT, S_B1, S_B2, S_B3, S_B4, S_B5, S_B6, S_B7,
    S_C1, S_C2, S_C3, S_C4, S_C5,
    S_D1, S_D2, S_D3, S_D4,
    S_AL1, S_AL2,
    S_INS, S_E1, S_E2, S_E3, S_E4, S_E5, S_E6, S_E7,
    S_S1, S_S2, S_S3, S_S4, S_S5, S_S6, S_S7, S_S8
  } state_t;

  state_t state, mret, aret, eret;

  token_t             t;         // token being handled
  instr_t             ins;       // its instruction
  entry_t             h;         // entry being worked on
  entry_t             v;         // victim being retired
  logic               v_way;
  packet_t            pkt;
  logic [MADDR_W-1:0] free_head, bump, alloc_addr;
  logic [MADDR_W-1:0] q1, p, prev, nxt, head;
  logic [MWORD_W-1:0] prev_w1, rd;
  logic [CDATA_W-1:0] qdata;
  logic               m_we;
  logic [MADDR_W-1:0] m_addr;
  logic [MWORD_W-1:0] m_wdata;

  // ---------------------------------------------------------- lookups
  logic [HASH_W-1:0] th, vh;
  key_t              tk;
  assign tk = token_key(t);
  assign th = hash_key(t.node, t.colour);
  assign vh = hash_key(v.key.node, v.key.colour);

  logic   c_busy, c_hit, c_hit_way, c_vway, c_vvalid;
  entry_t c_hent, c_vent;
  logic   c_we, c_wway, c_wvalid;
  entry_t c_went;
  token_cache #(.SETS(CACHE_SETS)) u_cache (
    .clk, .rst_n, .busy(c_busy),
    .idx(th[SW-1:0]), .key(tk),
    .hit(c_hit), .hit_way(c_hit_way), .hit_entry(c_hent),
    .victim_way(c_vway), .victim_valid(c_vvalid), .victim_entry(c_vent),
    .we(c_we), .w_idx(th[SW-1:0]), .w_way(c_wway), .w_valid(c_wvalid), .w_entry(c_went)
  );

  logic              vb_bit, vb_busy, vb_set, vb_clr;
  logic [HASH_W-1:0] vb_raddr, vb_waddr;
  valid_bit_store #(.HASH_W(HASH_W)) u_valid (
    .clk, .rst_n, .raddr(vb_raddr), .rbit(vb_bit),
    .set(vb_set), .clr(vb_clr), .waddr(vb_waddr), .busy(vb_busy)
  );

  logic   ic_busy, ic_hit, ic_fill;
  instr_t ic_instr;
  instr_cache #(.LINES(IC_LINES)) u_icache (
    .clk, .rst_n, .busy(ic_busy), .node(t.node), .hit(ic_hit), .instr(ic_instr),
    .fill(ic_fill), .fill_node(t.node), .fill_instr(instr_t'(rd[INSTR_W-1:0]))
  );

  // ---------------------------------------------------------- helpers
  function automatic packet_t make_pkt(input instr_t i, input token_t tk_in,
                                       input logic [CDATA_W-1:0] other);
    packet_t       r;
    logic [63:0]   a_t, a_o;
    a_t = {24'b0, tk_in.data};
    a_o = {24'b0, other[DATA_W-1:0]};
    r.func    = i.func;
    r.process = tk_in.process;
    r.node    = tk_in.node;
    r.colour  = tk_in.colour;
    if (!tk_in.inp) begin
      r.type0 = tk_in.dtype; r.arg0 = a_t;
      r.type1 = other[CDATA_W-1:DATA_W]; r.arg1 = a_o;
    end else begin
      r.type1 = tk_in.dtype; r.arg1 = a_t;
      r.type0 = other[CDATA_W-1:DATA_W]; r.arg0 = a_o;
    end
    return r;
  endfunction

  entry_t t_entry;
  assign t_entry = '{key: tk, inp: t.inp, queued: 1'b0, data: {t.dtype, t.data}};

  logic [CDATA_W-1:0] mon_other;
  assign mon_other = ic_instr.has_lit ? {ic_instr.lit_type, ic_instr.lit_data} : {T_NONE, 40'b0};

  // fast-path decisions in S_LOOK
  logic look_ok, f_mon, f_match, f_insert;
  assign look_ok  = (state == S_LOOK) && ic_hit;
  assign f_mon    = look_ok && t.mon;
  assign f_match  = look_ok && !t.mon && c_hit && !c_hent.queued && (c_hent.inp != t.inp)
                    && (ic_instr.func != F_STORE);
  assign f_insert = look_ok && !t.mon && !c_hit && !vb_bit && !c_vvalid;

  packet_t look_pkt;
  assign look_pkt = t.mon ? make_pkt(ic_instr, t, mon_other) : make_pkt(ic_instr, t, c_hent.data);

  assign in_ready  = (state == S_IDLE) && !c_busy && !vb_busy && !ic_busy;
  assign out_valid = (state == S_EMIT) || f_mon || f_match;
  assign out_pkt   = (state == S_EMIT) ? pkt : look_pkt;
  assign idle      = (state == S_IDLE) && !c_busy && !vb_busy && !ic_busy;

  // main memory port
  assign mem_req   = (state == S_MEM);
  assign mem_we    = m_we;
  assign mem_addr  = m_addr;
  assign mem_wdata = m_wdata;

  // cache write port (combinational control from state)
  always_comb begin
    c_we = 1'b0; c_wway = 1'b0; c_wvalid = 1'b0; c_went = t_entry;
    if (f_match) begin
      c_we = 1'b1; c_wway = c_hit_way; c_wvalid = 1'b0;
    end else if (f_insert) begin
      c_we = 1'b1; c_wway = c_vway; c_wvalid = 1'b1; c_went = t_entry;
    end else if (look_ok && !t.mon && c_hit) begin
      // exception on a cache-resident entry: take it out of the cache
      c_we = 1'b1; c_wway = c_hit_way; c_wvalid = 1'b0;
    end else if (state == S_INS && !c_vvalid) begin
      c_we = 1'b1; c_wway = c_vway; c_wvalid = 1'b1; c_went = h;
    end else if (state == S_E7) begin
      c_we = 1'b1; c_wway = v_way; c_wvalid = 1'b1; c_went = h;
    end
  end

  assign vb_raddr = (state == S_E1) ? vh : th;
  assign vb_set   = (state == S_E7);
  assign vb_clr   = (state == S_S8) && (prev == '0) && (nxt == '0);
  assign vb_waddr = (state == S_E7) ? vh : th;
  assign ic_fill  = (state == S_IF2);

  // ---------------------------------------------------------- sequencer
  // Sequencer steps: one main memory access (returning to ret), a block
  // allocation (returning to ret), a work packet handed out (then ret).
`define MU_MEM_OP(we, a, d, ret) begin m_we <= (we); m_addr <= (a); m_wdata <= (d); mret <= (ret); state <= S_MEM; end
`define MU_ALLOC(ret) begin aret <= (ret); state <= S_AL1; end
`define MU_EMIT(pk, ret) begin pkt <= (pk); eret <= (ret); state <= S_EMIT; end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      mret      <= S_IDLE;
      aret      <= S_IDLE;
      eret      <= S_IDLE;
      free_head <= '0;
      bump      <= POOL_BASE;
      stats     <= '0;
      m_we      <= 1'b0;
      m_addr    <= '0;
      m_wdata   <= '0;
      t         <= '0;
      h         <= '0;
      v         <= '0;
      v_way     <= 1'b0;
      prev      <= '0;
      nxt       <= '0;
      p         <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid && in_ready) begin
          t     <= in_tok;
          state <= S_LOOK;
        end

        S_LOOK: begin
          ins <= ic_instr;
          if (!ic_hit) begin
            stats.imiss <= stats.imiss + 1;
            `MU_MEM_OP(1'b0, INSTR_BASE + MADDR_W'(t.node[HASH_W-1:0]), '0, S_IF2)
          end else if (t.mon) begin
            stats.monadic <= stats.monadic + 1;
            if (!out_ready) `MU_EMIT(look_pkt, S_IDLE) else state <= S_IDLE;
          end else if (f_match) begin
            stats.fast_match <= stats.fast_match + 1;
            if (!out_ready) `MU_EMIT(look_pkt, S_IDLE) else state <= S_IDLE;
          end else if (f_insert) begin
            stats.fast_insert <= stats.fast_insert + 1;
            state <= S_IDLE;
          end else begin
            stats.exceptions <= stats.exceptions + 1;
            if (c_hit) begin
              h     <= c_hent;
              state <= S_ACT;
            end else if (vb_bit) begin
              stats.chain_search <= stats.chain_search + 1;
              state <= S_S1;
            end else begin
              h     <= t_entry;
              state <= S_INS;
            end
          end
        end

        S_IF2: state <= S_LOOK;       // line filled this cycle

        S_EMIT: if (out_ready) state <= eret;

        // one main memory access; reads leave their word in rd
        S_MEM: if (mem_ready) state <= m_we ? mret : S_MWAIT;
        S_MWAIT: if (mem_rvalid) begin
          rd    <= mem_rdata;
          state <= mret;
        end

        // allocate a two-word block
        S_AL1: if (free_head != '0) begin
          `MU_MEM_OP(1'b0, free_head + 1'b1, '0, S_AL2)
        end else begin
          alloc_addr <= bump;
          bump       <= bump + MADDR_W'(2);
          state      <= aret;
        end
        S_AL2: begin
          alloc_addr <= free_head;
          free_head  <= rd[MADDR_W-1:0];
          state      <= aret;
        end

        // act on entry h with token t (same key)
        S_ACT: begin
          if (ins.func == F_STORE && !h.inp && t.inp) begin
            // read of a stored value: the value stays
            stats.store_ops <= stats.store_ops + 1;
            `MU_EMIT(make_pkt(ins, t, h.data), S_INS)
          end else if (ins.func == F_STORE && !h.inp) begin
            // new value for a storage node: overwrite
            stats.store_ops <= stats.store_ops + 1;
            h.data <= {t.dtype, t.data};
            state  <= S_INS;
          end else if (ins.func == F_STORE && !t.inp && !h.queued) begin
            // value arrives for one waiting read: answer it, keep the value
            stats.store_ops <= stats.store_ops + 1;
            h <= t_entry;
            `MU_EMIT(make_pkt(ins, t, h.data), S_INS)
          end else if (!h.queued && h.inp != t.inp) begin
            `MU_EMIT(make_pkt(ins, t, h.data), S_IDLE)
          end else begin
            stats.queue_ops <= stats.queue_ops + 1;
            if (!h.queued)          state <= S_B1;   // start a queue
            else if (h.inp == t.inp) state <= S_C1;  // join the queue
            else                     state <= S_D1;  // consume queue head
          end
        end

        // start a queue: element q1 = waiting token, q2 = new token
        S_B1: `MU_ALLOC(S_B2)
        S_B2: begin
          q1 <= alloc_addr;
          `MU_MEM_OP(1'b1, alloc_addr, {32'b0, h.data}, S_B3)
        end
        S_B3: `MU_ALLOC(S_B4)
        S_B4: `MU_MEM_OP(1'b1, alloc_addr, {32'b0, t.dtype, t.data}, S_B5)
        S_B5: `MU_MEM_OP(1'b1, alloc_addr + 1'b1, '0, S_B6)
        S_B6: `MU_MEM_OP(1'b1, q1 + 1'b1, {60'b0, alloc_addr}, S_B7)
        S_B7: begin
          h.queued <= 1'b1;
          h.data   <= {4'b0, q1, 4'b0, alloc_addr};
          state    <= S_INS;
        end

        // append to the queue tail
        S_C1: `MU_ALLOC(S_C2)
        S_C2: `MU_MEM_OP(1'b1, alloc_addr, {32'b0, t.dtype, t.data}, S_C3)
        S_C3: `MU_MEM_OP(1'b1, alloc_addr + 1'b1, '0, S_C4)
        S_C4: `MU_MEM_OP(1'b1, h.data[MADDR_W-1:0] + 1'b1, {60'b0, alloc_addr}, S_C5)
        S_C5: begin
          h.data[QPTR_W-1:0] <= QPTR_W'(alloc_addr);
          state              <= S_INS;
        end

        // take the queue head
        S_D1: begin
          head <= h.data[QPTR_W+MADDR_W-1:QPTR_W];
          `MU_MEM_OP(1'b0, h.data[QPTR_W+MADDR_W-1:QPTR_W], '0, S_D2)
        end
        S_D2: begin
          qdata <= rd[CDATA_W-1:0];
          `MU_MEM_OP(1'b0, head + 1'b1, '0, S_D3)
        end
        S_D3: begin
          nxt <= rd[MADDR_W-1:0];
          `MU_MEM_OP(1'b1, head + 1'b1, {60'b0, free_head}, S_D4)
        end
        S_D4: begin
          free_head <= head;
          if (ins.func == F_STORE && head == h.data[MADDR_W-1:0]) begin
            h <= t_entry;                                    // last read answered,
            `MU_EMIT(make_pkt(ins, t, qdata), S_INS)          // the value is kept
          end else if (head == h.data[MADDR_W-1:0]) begin
            `MU_EMIT(make_pkt(ins, t, qdata), S_IDLE)          // queue now empty
          end else begin
            h.data[QPTR_W+MADDR_W-1:QPTR_W] <= nxt;
            // a storage node's value answers every waiting read in turn
            `MU_EMIT(make_pkt(ins, t, qdata), (ins.func == F_STORE) ? S_ACT : S_INS)
          end
        end

        // place h in the cache, retiring the victim if the set is full
        S_INS: begin
          if (!c_vvalid) begin
            state <= S_IDLE;                                 // written now
          end else begin
            v     <= c_vent;
            v_way <= c_vway;
            stats.evictions <= stats.evictions + 1;
            state <= S_E1;
          end
        end
        S_E1: begin
          prev <= '0;                                        // chain head
          if (vb_bit) `MU_MEM_OP(1'b0, BUCKET_BASE + MADDR_W'(vh), '0, S_E2)
          else        state <= S_E3;
        end
        S_E2: begin
          prev  <= rd[MADDR_W-1:0];
          state <= S_E3;
        end
        S_E3: `MU_ALLOC(S_E4)
        S_E4: `MU_MEM_OP(1'b1, alloc_addr, {12'b0, v.key}, S_E5)
        S_E5: `MU_MEM_OP(1'b1, alloc_addr + 1'b1, {10'b0, v.inp, v.queued, v.data, prev}, S_E6)
        S_E6: `MU_MEM_OP(1'b1, BUCKET_BASE + MADDR_W'(vh), {60'b0, alloc_addr}, S_E7)
        S_E7: begin
          prev  <= '0;
          state <= S_IDLE;                                   // h written, bit set
        end

        // search the bucket chain for t's key
        S_S1: `MU_MEM_OP(1'b0, BUCKET_BASE + MADDR_W'(th), '0, S_S2)
        S_S2: begin
          p     <= rd[MADDR_W-1:0];
          prev  <= '0;
          state <= S_S3;
        end
        S_S3: begin
          if (p == '0) begin
            h     <= t_entry;                                // not there
            state <= S_INS;
          end else begin
            `MU_MEM_OP(1'b0, p, '0, S_S4)
          end
        end
        S_S4: begin
          if (rd[KEY_W-1:0] == tk) `MU_MEM_OP(1'b0, p + 1'b1, '0, S_S6)
          else                     `MU_MEM_OP(1'b0, p + 1'b1, '0, S_S5)
        end
        S_S5: begin
          prev    <= p;
          prev_w1 <= rd;
          p       <= rd[MADDR_W-1:0];
          state   <= S_S3;
        end
        S_S6: begin
          stats.chain_found <= stats.chain_found + 1;
          h   <= '{key: tk, inp: rd[69], queued: rd[68], data: rd[67:20]};
          nxt <= rd[MADDR_W-1:0];
          if (prev == '0) `MU_MEM_OP(1'b1, BUCKET_BASE + MADDR_W'(th), {60'b0, rd[MADDR_W-1:0]}, S_S7)
          else            `MU_MEM_OP(1'b1, prev + 1'b1, {prev_w1[MWORD_W-1:MADDR_W], rd[MADDR_W-1:0]}, S_S7)
        end
        S_S7: `MU_MEM_OP(1'b1, p + 1'b1, {60'b0, free_head}, S_S8)
        S_S8: begin
          free_head <= p;
          state     <= S_ACT;                                // bit cleared if chain empty
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // The block pool must not run into the end of memory.
  assert property (@(posedge clk) disable iff (!rst_n) bump >= POOL_BASE);
endmodule

`undef MU_MEM_OP
`undef MU_ALLOC
`undef MU_EMIT
