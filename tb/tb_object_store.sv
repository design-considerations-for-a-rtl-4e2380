// tb_object_store: I-structure rules.  A read of a written word answers at
// once; a read of an empty word answers, with the reader's context, in the
// cycle after the word is written; a second write to a word is refused; a
// second early read of one word is refused.
`timescale 1ns/1ps
module tb_object_store;
  import dfm_pkg::*;
  localparam int WD = 16;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic busy, req, is_write, resp;
  logic [$clog2(WD)-1:0] addr;
  logic [TYPE_W-1:0] wtype, resp_type;
  logic [DATA_W-1:0] wdata, resp_data;
  key_t ctx, resp_ctx;
  logic [31:0] waw_errors, defer_errors, deferred;
  object_store #(.WORDS(WD)) dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic op(input bit w, input int a, input int v, input int who_n);
    #1 req = 1; is_write = w; addr = a[$clog2(WD)-1:0]; wtype = T_INT; wdata = 40'(v);
    ctx = '{process: 8'(who_n), node: 22'(who_n), colour: 38'(who_n)};
    @(posedge clk); #1 req = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; is_write = 0; addr = 0; wtype = 0; wdata = 0; ctx = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    while (busy) @(posedge clk);
    // write then read
    op(1, 3, 333, 0);
    chk(!resp, "no answer to a plain write");
    op(0, 3, 0, 7);
    chk(resp && resp_data == 333 && resp_ctx.node == 7, "read of full word");
    // read before write: deferred
    op(0, 5, 0, 9);
    chk(!resp && deferred == 1, "early read waits");
    op(0, 5, 0, 10);
    chk(!resp && defer_errors == 1, "second early read refused");
    repeat (3) @(posedge clk);
    op(1, 5, 555, 0);
    chk(resp && resp_data == 555 && resp_ctx.node == 9 && resp_ctx.process == 9,
        "deferred read answered by the write");
    // write after write
    op(1, 5, 777, 0);
    chk(!resp && waw_errors == 1, "second write refused");
    op(0, 5, 0, 11);
    chk(resp && resp_data == 555, "first value kept");
    // every word
    for (int a = 0; a < WD; a++) if (a != 3 && a != 5) op(0, a, 0, 100 + a);
    for (int a = 0; a < WD; a++) if (a != 3 && a != 5) begin
      op(1, a, a * 11, 0);
      chk(resp && resp_data == 40'(a * 11) && resp_ctx.node == 22'(100 + a), "sweep");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
