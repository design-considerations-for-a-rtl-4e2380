// tb_sync_fifo: checks the FIFO (evaluation queue) against a queue model
// under random pushes and pops, including full and empty, simultaneous push
// and pop, and a word leaving one clock after it was written.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(D+1)-1:0] count;
  sync_fifo #(.W(W), .DEPTH(D)) dut (.*);

  logic [W-1:0] model [$];
  int fulls = 0, empties = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // a word written in one clock may leave in the next
    #1 in_valid = 1; in_data = 16'hBEEF;
    @(posedge clk); #1 in_valid = 0;
    chk(out_valid && out_data == 16'hBEEF, "one-clock latency");
    out_ready = 1; @(posedge clk); #1 out_ready = 0;
    chk(!out_valid && count == 0, "empty after pop");
    for (int cyc = 0; cyc < 4000; cyc++) begin
      in_valid  = ($urandom % 100) < (cyc < 2000 ? 70 : 30);
      out_ready = ($urandom % 100) < (cyc < 2000 ? 30 : 70);
      in_data   = W'($urandom);
      #1;
      chk(count == model.size(), "count");
      chk(in_ready == (model.size() < D), "in_ready");
      chk(out_valid == (model.size() > 0), "out_valid");
      if (out_valid) chk(out_data == model[0], "order");
      if (!in_ready) fulls++;
      if (!out_valid) empties++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
      #1;
    end
    chk(fulls > 0 && empties > 0, "saw full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
