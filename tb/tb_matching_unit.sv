// tb_matching_unit: random streams of coloured and uncoloured tokens for a
// few nodes, with a token cache of only four sets so that sets overflow,
// entries retire to main memory chains and are found there again, and with
// repeated tokens on one input point so that queues form.  Work packets
// must come out in the order, and with the operands, given by a reference
// model of the matching rules: a token meets the oldest waiting token of the
// same process, node and colour on the other input point, or else waits in
// arrival order.  Monadic tokens pass straight through, taking the
// instruction's literal as the other operand.  Checks that the fast cases
// take one 100 ns cache cycle (two clocks) per token, and that every path
// (fast match, fast store, queue, retirement, chain search, instruction
// cache miss, storage node) is taken.  Some nodes are storage nodes: a
// token on input 0 is kept as the node's value (a later one replaces it),
// and every token on input 1 reads it without removing it, or waits for it.
`timescale 1ns/1ps
module tb_matching_unit;
  import dfm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready, idle;
  token_t in_tok;
  packet_t out_pkt;
  logic mem_req, mem_we, mem_ready, mem_rvalid;
  logic [MADDR_W-1:0] mem_addr;
  logic [MWORD_W-1:0] mem_wdata, mem_rdata;
  mu_stats_t stats;
  matching_unit #(.CACHE_SETS(4), .IC_LINES(16)) dut (.*);
  dyn_memory #(.W(MWORD_W), .DEPTH(1 << MADDR_W), .LAT(2)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .ready(mem_ready), .rvalid(mem_rvalid), .rdata(mem_rdata));

  localparam int NODES = 24;
  instr_t prog [NODES];

  // reference model
  typedef struct { bit inp; logic [47:0] q [$]; } wait_t;
  wait_t   waiting [key_t];
  packet_t expq [$];
  int      n_in = 0, n_out = 0, cyc = 0, n_store = 0;
  int      accept_t [$];
  always @(posedge clk) cyc <= cyc + 1;
  bit rand_ready = 0;
  always @(posedge clk) if (rand_ready) out_ready <= ($urandom % 4) != 0;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic packet_t pkt_of(input token_t t, input logic [47:0] other);
    packet_t p;
    p.func = prog[t.node].func; p.process = t.process; p.node = t.node; p.colour = t.colour;
    if (!t.inp) begin
      p.type0 = t.dtype; p.arg0 = {24'b0, t.data};
      p.type1 = other[47:40]; p.arg1 = {24'b0, other[39:0]};
    end else begin
      p.type1 = t.dtype; p.arg1 = {24'b0, t.data};
      p.type0 = other[47:40]; p.arg0 = {24'b0, other[39:0]};
    end
    return p;
  endfunction

  function automatic void model(input token_t t);
    key_t k;
    k = token_key(t);
    if (t.mon) begin
      instr_t i;
      i = prog[t.node];
      expq.push_back(pkt_of(t, i.has_lit ? {i.lit_type, i.lit_data} : {T_NONE, 40'b0}));
      return;
    end
    if (prog[t.node].func == F_STORE) begin
      // storage node: input 0 holds a value that input 1 tokens read
      if (!t.inp) begin
        if (waiting.exists(k) && waiting[k].inp)
          while (waiting[k].q.size() > 0) expq.push_back(pkt_of(t, waiting[k].q.pop_front()));
        waiting[k].inp = 0;
        waiting[k].q = '{{t.dtype, t.data}};
        n_store++;
      end else if (waiting.exists(k) && !waiting[k].inp) begin
        expq.push_back(pkt_of(t, waiting[k].q[0]));
        n_store++;
      end else begin
        waiting[k].inp = 1;
        waiting[k].q.push_back({t.dtype, t.data});
      end
      return;
    end
    if (waiting.exists(k) && waiting[k].inp != t.inp) begin
      expq.push_back(pkt_of(t, waiting[k].q.pop_front()));
      if (waiting[k].q.size() == 0) waiting.delete(k);
    end else if (waiting.exists(k)) begin
      waiting[k].q.push_back({t.dtype, t.data});
    end else begin
      waiting[k].inp = t.inp;
      waiting[k].q.push_back({t.dtype, t.data});
    end
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      model(in_tok);
      n_in++;
      accept_t.push_back(cyc);
    end
    if (out_valid && out_ready) begin
      chk(expq.size() > 0 && out_pkt == expq[0],
          $sformatf("packet %0d: node %0d colour %0d", n_out, out_pkt.node, out_pkt.colour));
      if (expq.size() > 0) void'(expq.pop_front());
      n_out++;
    end
  end

  function automatic token_t tok(input int node, input int colour, input bit inp, input bit mon,
                                 input int proc_n);
    token_t t;
    t = '0;
    t.process = 8'(proc_n); t.node = NODE_W'(node); t.colour = COLOUR_W'(colour);
    t.inp = inp; t.mon = mon; t.dtype = T_INT; t.data = {8'h0, $urandom};
    return t;
  endfunction

  task automatic put(input token_t t);
    #1 in_valid = 1; in_tok = t;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_tok = '0; out_ready = 1;
    for (int n = 0; n < NODES; n++) begin
      prog[n] = '{func: (n % 6 == 5) ? F_STORE : 8'(1 + n % 8), has_lit: (n % 5 == 0),
                  lit_type: T_INT, lit_data: 40'(n * 1111)};
      u_mem.mem[INSTR_BASE + MADDR_W'(n)] = {23'b0, prog[n]};
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    while (!idle) @(posedge clk);
    // warm the instruction cache for node 1, then three fast tokens in a row
    put(tok(1, 0, 0, 1, 0));
    while (!idle) @(posedge clk);
    accept_t.delete();
    #1 in_valid = 1; in_tok = tok(1, 100, 0, 0, 0);
    @(posedge clk); while (!in_ready) @(posedge clk);
    #1 in_tok = tok(1, 100, 1, 0, 0);
    @(posedge clk); while (!in_ready) @(posedge clk);
    #1 in_tok = tok(1, 101, 0, 0, 0);
    @(posedge clk); while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
    while (!idle) @(posedge clk);
    chk(accept_t.size() == 3 && accept_t[1] - accept_t[0] == 2 && accept_t[2] - accept_t[1] == 2,
        $sformatf("one token per cache cycle: %p", accept_t));
    chk(stats.fast_insert == 2 && stats.fast_match == 1, "fast paths used");
    put(tok(1, 101, 1, 0, 0));
    // random streams, with the evaluation queue side randomly not ready
    rand_ready = 1;
    for (int k = 0; k < 3000; k++) begin
      int node, colour;
      bit inp, mon;
      node   = $urandom % NODES;
      colour = (k % 3 == 0) ? 0 : 1 + $urandom % 6;
      inp    = $urandom % 2;
      mon    = ($urandom % 10) == 0;
      put(tok(node, colour, inp, mon, $urandom % 2));
    end
    rand_ready = 0;
    #1 out_ready = 1;
    while (!idle) @(posedge clk);
    repeat (5) @(posedge clk);
    #1 out_ready = 1;
    repeat (5) @(posedge clk);
    chk(expq.size() == 0, $sformatf("%0d packets missing", expq.size()));
    chk(stats.fast_match > 0 && stats.fast_insert > 0 && stats.monadic > 0, "fast paths");
    chk(stats.evictions > 0, "entries retired to main memory");
    chk(stats.chain_search > 0 && stats.chain_found > 0, "chains searched and hit");
    chk(stats.queue_ops > 0, "queues formed and consumed");
    chk(stats.imiss > 0, "instruction cache misses");
    chk(stats.store_ops > 0 && n_store > 0, "storage node values kept and read");
    $display("matching: in %0d out %0d | fast match %0d insert %0d monadic %0d | exc %0d evict %0d search %0d found %0d queue %0d imiss %0d store %0d",
             n_in, n_out, stats.fast_match, stats.fast_insert, stats.monadic, stats.exceptions,
             stats.evictions, stats.chain_search, stats.chain_found, stats.queue_ops, stats.imiss, stats.store_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
