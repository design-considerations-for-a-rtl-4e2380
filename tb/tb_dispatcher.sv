// tb_dispatcher: results for nodes with one, two and many destinations are
// turned into tokens that are checked against the destination lists held
// here.  Timing checks, on the 50 ns clock: first token one clock after the
// result is taken, second token one clock later, and for longer lists one
// pair per memory cycle (four clocks), about one token per 100 ns.  With
// the network refusing tokens, they wait in the recirculating buffer and
// still leave in order, and the dispatcher stalls once the buffer is full.
`timescale 1ns/1ps
module tb_dispatcher;
  import dfm_pkg::*;
  localparam int LAT = 4;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready, idle;
  result_t in_res;
  token_t out_tok;
  logic mem_req, mem_ready, mem_rvalid;
  logic [EADDR_W-1:0] mem_addr;
  logic [63:0] mem_rdata;
  dp_stats_t stats;
  dispatcher #(.DC_LINES(16), .RBUF_DEPTH(8)) dut (.*);
  dyn_memory #(.W(64), .DEPTH(1 << EADDR_W), .LAT(LAT)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(1'b0), .addr(mem_addr), .wdata(64'b0),
    .ready(mem_ready), .rvalid(mem_rvalid), .rdata(mem_rdata));

  dest_t  dlist [int][$];    // destinations of each node
  token_t expq [$];
  int     tok_time [$];
  int     cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic dest_t dst(input int n);
    return '{processor: 8'(n % 60), node: 22'(1000 + n), inp: n[0], mon: n[1]};
  endfunction

  // write the destinations of node n into memory: a pair, and a list
  task automatic make_node(input int n, input int ndest, input int list_at);
    dest_t d [$];
    for (int i = 0; i < ndest; i++) d.push_back(dst(n * 10 + i));
    dlist[n] = d;
    if (ndest == 0)      u_mem.mem[n] = 64'b0;
    else if (ndest == 1) u_mem.mem[n] = {d[0], 32'b0};
    else if (ndest == 2) u_mem.mem[n] = {d[0], d[1]};
    else begin
      int a;
      u_mem.mem[n] = {d[0], PROC_INDIRECT, 4'b0, 20'(list_at)};
      a = list_at;
      for (int i = 1; i < ndest; i += 2) begin
        u_mem.mem[a] = {d[i], (i + 1 < ndest) ? d[i + 1] : 32'b0};
        a++;
      end
      if (ndest % 2 == 1) u_mem.mem[a] = 64'b0;
    end
  endtask

  // collect tokens
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    chk(expq.size() > 0 && out_tok == expq[0], $sformatf("token %h", out_tok));
    if (expq.size() > 0) void'(expq.pop_front());
    tok_time.push_back(cyc);
  end

  task automatic send(input int n, input int v, output int t_take);
    result_t r;
    r = '{process: 8'(n), node: 22'(n), colour: 38'(v), rtype: T_INT, rdata: 64'(v)};
    foreach (dlist[n][i]) begin
      token_t t;
      t = '0;
      t.processor = dlist[n][i].processor; t.node = dlist[n][i].node;
      t.inp = dlist[n][i].inp; t.mon = dlist[n][i].mon;
      t.process = r.process; t.colour = r.colour; t.dtype = r.rtype; t.data = r.rdata[39:0];
      expq.push_back(t);
    end
    #1 in_valid = 1; in_res = r;
    #1;
    while (!in_ready) begin @(posedge clk); #1; end
    t_take = cyc;
    @(posedge clk); #1 in_valid = 0;
  endtask

  task automatic wait_idle();
    while (!(idle && expq.size() == 0)) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tt;
    in_valid = 0; in_res = '0; out_ready = 1;
    make_node(1, 1, 0);
    make_node(2, 2, 0);
    make_node(3, 4, 20'h80000);
    make_node(4, 7, 20'h80100);
    make_node(5, 0, 0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // first use of each node misses in the destination cache
    for (int n = 1; n <= 5; n++) begin send(n, n * 7, tt); wait_idle(); end
    chk(stats.dcache_miss == 5, "destination cache misses");
    // timing with the cache warm
    tok_time.delete();
    send(2, 99, tt); wait_idle();
    chk(tok_time.size() == 2 && tok_time[0] == tt + 1 && tok_time[1] == tt + 2,
        $sformatf("two destinations at +1,+2: %p from %0d", tok_time, tt));
    tok_time.delete();
    send(4, 98, tt); wait_idle();
    chk(tok_time.size() == 7, "seven tokens");
    if (tok_time.size() == 7) begin
      chk(tok_time[0] == tt + 1, "first token one clock after the result");
      chk(tok_time[3] - tok_time[1] == LAT && tok_time[5] - tok_time[3] == LAT,
          $sformatf("one pair per memory cycle: %p", tok_time));
      chk(tok_time[6] - tok_time[1] <= 3 * LAT, "about one token per 100 ns");
    end
    // network refuses tokens: they wait in the recirculating buffer
    out_ready = 0;
    fork
      for (int k = 0; k < 6; k++) send(1 + k % 4, 200 + k, tt);
      begin
        repeat (80) @(posedge clk);
        #2;
        chk(stats.recirculated == 8, $sformatf("buffer filled: %0d", stats.recirculated));
        chk(in_valid && !in_ready, "stalled on a full buffer");
        out_ready = 1;
      end
    join
    wait_idle();
    fork
      for (int k = 0; k < 25; k++) send(1 + ($urandom % 5), 300 + k, tt);
      repeat (400) begin
        @(posedge clk); #1 out_ready = ($urandom % 3) != 0;
      end
    join
    out_ready = 1;
    wait_idle();
    chk(expq.size() == 0, "all tokens out");
    $display("dispatcher: %0d tokens, %0d recirculated, %0d lists", stats.tokens,
             stats.recirculated, stats.indirect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
