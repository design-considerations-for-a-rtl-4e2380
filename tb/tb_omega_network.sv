// tb_omega_network: a two-stage network (16 links) under random traffic
// with random output backpressure.  Every token must arrive on the output
// link equal to its destination processor, none may be lost, and tokens
// from one source to one destination must keep their order.  A permutation
// with no two tokens meeting in a switch (the identity) must pass at the full
// rate of one token per link per clock.
`timescale 1ns/1ps
module tb_omega_network;
  import dfm_pkg::*;
  localparam int ST = 2, N = 16;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] in_valid, in_ready, out_valid, out_ready;
  token_t in_tok [N];
  token_t out_tok [N];
  logic [31:0] transfers, blocked;
  omega_network #(.STAGES(ST), .BUF_DEPTH(4)) dut (.*);

  token_t exp_q [N][N][$];
  int sent = 0, got = 0, seq = 0;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic token_t mk(input int src, input int dst);
    token_t t;
    t = '0;
    t.processor = 8'(dst);
    t.process   = 8'(src);
    t.data      = 40'(seq);
    return t;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < N; o++) if (out_valid[o] && out_ready[o]) begin
      int src;
      src = int'(out_tok[o].process);
      chk(int'(out_tok[o].processor) == o, "arrived at its destination");
      chk(exp_q[src][o].size() > 0 && exp_q[src][o][0] == out_tok[o], "order per pair");
      if (exp_q[src][o].size() > 0) void'(exp_q[src][o].pop_front());
      got++;
    end
    for (int i = 0; i < N; i++) if (in_valid[i] && in_ready[i]) begin
      exp_q[i][in_tok[i].processor].push_back(in_tok[i]);
      sent++;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    in_valid = 0; out_ready = '1;
    for (int i = 0; i < N; i++) in_tok[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // identity permutation at full rate: 100 tokens per link
    t0 = $time / 50;
    for (int k = 0; k < 100; k++) begin
      #1;
      for (int i = 0; i < N; i++) begin in_valid[i] = 1; in_tok[i] = mk(i, i); seq++; end
      @(posedge clk);
      while (in_ready != '1) @(posedge clk);
    end
    #1 in_valid = 0;
    while (got != sent) @(posedge clk);
    chk(($time / 50) - t0 <= 100 + 2 * ST + 4, $sformatf("identity took %0d clocks", ($time / 50) - t0));
    // random traffic
    for (int k = 0; k < 3000; k++) begin
      #1;
      for (int i = 0; i < N; i++) begin
        if (!in_valid[i] || in_ready[i]) begin
          in_valid[i] = ($urandom % 100) < 50;
          in_tok[i]   = mk(i, $urandom % N); seq++;
        end
      end
      out_ready = N'($urandom);
      @(posedge clk);
    end
    #1 in_valid = 0; out_ready = '1;
    repeat (100) @(posedge clk);
    chk(got == sent && sent > 10000, $sformatf("delivered %0d of %0d", got, sent));
    chk(blocked > 0, "contention seen");
    $display("network: %0d tokens, %0d blocked token-clocks", got, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
