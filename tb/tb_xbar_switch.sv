// tb_xbar_switch: random tokens on all four inputs, outputs randomly
// ready.  Every token must leave on the output named by its routing digit,
// tokens from one input to one output must keep their order, none may be
// lost or duplicated, and with all outputs ready and a permutation of
// destinations all four links must transfer in the same clock.
`timescale 1ns/1ps
module tb_xbar_switch;
  import dfm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] in_valid, in_ready, out_valid, out_ready;
  token_t in_tok [4];
  token_t out_tok [4];
  logic [31:0] transfers, blocked;
  xbar_switch #(.BUF_DEPTH(4), .ROUTE_LSB(2)) dut (.*);

  token_t exp_q [4][4][$];     // [input][output]
  int sent = 0, got = 0, seq = 0;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic token_t mk(input int src, input int dst);
    token_t t;
    t = '0;
    t.processor = {4'($urandom), 2'(dst), 2'($urandom)};
    t.process   = 8'(src);
    t.data      = 40'(seq);
    return t;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 4; o++) if (out_valid[o] && out_ready[o]) begin
      int src;
      src = int'(out_tok[o].process);
      chk(out_tok[o].processor[3:2] == 2'(o), "routed to its output");
      chk(exp_q[src][o].size() > 0 && exp_q[src][o][0] == out_tok[o], "order per input/output");
      if (exp_q[src][o].size() > 0) void'(exp_q[src][o].pop_front());
      got++;
    end
    for (int i = 0; i < 4; i++) if (in_valid[i] && in_ready[i]) begin
      exp_q[i][in_tok[i].processor[3:2]].push_back(in_tok[i]);
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
    int full4;
    in_valid = 0; out_ready = '1;
    for (int i = 0; i < 4; i++) in_tok[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // a permutation: all four links move together
    full4 = 0;
    for (int k = 0; k < 40; k++) begin
      #1;
      for (int i = 0; i < 4; i++) begin
        in_valid[i] = 1; in_tok[i] = mk(i, (i + k) % 4); seq++;
      end
      @(posedge clk);
      #1 if ($countones(out_valid & out_ready) == 4) full4++;
    end
    #1 in_valid = 0;
    repeat (10) @(posedge clk);
    chk(full4 >= 30, $sformatf("four transfers per clock seen %0d times", full4));
    chk(got == sent, "permutation delivered");
    // random traffic
    for (int k = 0; k < 4000; k++) begin
      #1;
      for (int i = 0; i < 4; i++) begin
        if (!in_valid[i] || in_ready[i]) begin
          in_valid[i] = ($urandom % 100) < 60;
          in_tok[i]   = mk(i, $urandom % 4); seq++;
        end
      end
      out_ready = 4'($urandom);
      @(posedge clk);
    end
    #1 in_valid = 0; out_ready = '1;
    repeat (30) @(posedge clk);
    chk(got == sent && sent > 4000, $sformatf("delivered %0d of %0d", got, sent));
    chk(blocked > 0, "contention seen");
    $display("xbar: %0d tokens, %0d transfers, %0d blocked token-clocks", got, transfers, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
