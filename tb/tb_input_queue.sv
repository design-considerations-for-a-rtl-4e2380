// tb_input_queue: tokens pushed and popped at random rates must come out in
// order; a full queue must refuse tokens; and with both sides always ready
// the queue must sustain one token in and one out per clock (50 ns) even
// though each bank needs two clocks per access.
`timescale 1ns/1ps
module tb_input_queue;
  import dfm_pkg::*;
  localparam int D = 64;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic   in_valid, in_ready, out_valid, out_ready, busy;
  token_t in_tok, out_tok;
  logic [$clog2(D+1)-1:0] level;
  logic [31:0] conflicts;
  input_queue #(.DEPTH(D)) dut (.*);

  token_t model [$];
  int     sent = 0, got = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic token_t mk(input int n);
    token_t t;
    t = '0;
    t.node = NODE_W'(n);
    t.data = {8'h5A, 32'(n * 2654435761)};
    return t;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    chk(model.size() > 0 && out_tok == model[0], $sformatf("order at %0d", got));
    if (model.size() > 0) void'(model.pop_front());
    got++;
  end
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    model.push_back(in_tok);
    sent++;
  end

  initial begin
    int t0, first_out, stalls;
    in_valid = 0; out_ready = 0; in_tok = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // 1. fill with the output stopped: the queue must stop taking tokens
    stalls = 0;
    for (int i = 0; i < D + 20; i++) begin
      #1 in_valid = 1; in_tok = mk(sent);
      @(posedge clk);
    end
    #1 in_valid = 0;
    chk(level == D, $sformatf("full level %0d", level));
    chk(!in_ready, "full queue refuses tokens");
    // 2. drain
    out_ready = 1;
    while (busy) @(posedge clk);
    repeat (2) @(posedge clk);
    chk(got == sent && got >= D, $sformatf("drained %0d of %0d", got, sent));
    // 3. streaming: 200 tokens, both sides always ready
    t0 = $time / 50;
    first_out = -1;
    for (int i = 0; i < 200; i++) begin
      #1 in_valid = 1; in_tok = mk(sent);
      @(posedge clk);
      if (!in_ready) stalls++;
    end
    #1 in_valid = 0;
    while (busy) @(posedge clk);
    chk(stalls == 0, $sformatf("input stalled %0d times while streaming", stalls));
    chk(($time / 50) - t0 <= 200 + 8, $sformatf("200 tokens took %0d clocks", ($time / 50) - t0));
    // 4. random rates
    for (int i = 0; i < 3000; i++) begin
      #1 in_valid = ($urandom % 100) < 60; in_tok = mk(sent);
      out_ready = ($urandom % 100) < 55;
      @(posedge clk);
    end
    #1 in_valid = 0; out_ready = 1;
    while (busy) @(posedge clk);
    repeat (2) @(posedge clk);
    chk(got == sent, "all tokens out");
    chk(conflicts > 0, "bank conflicts seen");
    $display("input_queue: %0d tokens, %0d bank conflicts", got, conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
