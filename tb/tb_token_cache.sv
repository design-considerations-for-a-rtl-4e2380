// tb_token_cache: entries written are found by full key in either way,
// different keys miss, an empty way is chosen for replacement before an
// occupied one, and with both ways full the least recently written way is
// chosen.
`timescale 1ns/1ps
module tb_token_cache;
  import dfm_pkg::*;
  localparam int S = 16;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic busy, hit, hit_way, victim_way, victim_valid, we, w_way, w_valid;
  logic [$clog2(S)-1:0] idx, w_idx;
  key_t   key;
  entry_t hit_entry, victim_entry, w_entry;
  token_cache #(.SETS(S)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic entry_t ent(input int n);
    entry_t e;
    e.key    = '{process: 8'(n), node: 22'(n * 7), colour: 38'(n * 1000003)};
    e.inp    = n[0];
    e.queued = 1'b0;
    e.data   = 48'(n * 48271);
    return e;
  endfunction

  task automatic wr(input int set, input bit way, input bit v, input entry_t e);
    #1 we = 1; w_idx = set[$clog2(S)-1:0]; w_way = way; w_valid = v; w_entry = e;
    @(posedge clk); #1 we = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; idx = 0; key = '0; w_idx = 0; w_way = 0; w_valid = 0; w_entry = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    while (busy) @(posedge clk);
    for (int s = 0; s < S; s++) begin
      #1 idx = s[$clog2(S)-1:0]; key = ent(s).key;
      #1 chk(!hit && !victim_valid && victim_way == 0, "empty after reset");
    end
    for (int s = 0; s < S; s++) begin
      // first entry goes to way 0 (empty), second to way 1 (empty)
      #1 idx = s[$clog2(S)-1:0];
      #1 chk(victim_way == 0, "empty way 0 first");
      wr(s, victim_way, 1, ent(s));
      #1 chk(victim_way == 1 && !victim_valid, "then empty way 1");
      wr(s, victim_way, 1, ent(s + 100));
      #1 chk(victim_valid && victim_way == 0, "oldest way is victim");
      key = ent(s).key;
      #1 chk(hit && hit_way == 0 && hit_entry == ent(s), "hit way 0");
      key = ent(s + 100).key;
      #1 chk(hit && hit_way == 1 && hit_entry == ent(s + 100), "hit way 1");
      key = ent(s + 200).key;
      #1 chk(!hit, "miss on other key");
      // replace way 0: now way 1 is the oldest
      wr(s, 0, 1, ent(s + 300));
      #1 chk(victim_way == 1 && victim_entry == ent(s + 100), "LRU victim");
      key = ent(s).key;
      #1 chk(!hit, "replaced entry gone");
      // invalidate way 1: it becomes the victim as an empty way
      wr(s, 1, 0, ent(s + 100));
      key = ent(s + 100).key;
      #1 chk(!hit && victim_way == 1 && !victim_valid, "invalidated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
