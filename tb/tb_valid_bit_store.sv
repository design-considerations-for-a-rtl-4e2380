// tb_valid_bit_store: after the reset sweep every bit reads clear; bits set
// and cleared at random are checked against a model.
`timescale 1ns/1ps
module tb_valid_bit_store;
  localparam int HW = 10;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic [HW-1:0] raddr, waddr;
  logic rbit, set, clr, busy;
  valid_bit_store #(.HASH_W(HW)) dut (.*);
  bit model [1 << HW];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set = 0; clr = 0; raddr = 0; waddr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    while (busy) @(posedge clk);
    #1;
    for (int a = 0; a < (1 << HW); a++) begin
      raddr = HW'(a); #1;
      chk(rbit == 0, "clear after reset");
    end
    for (int i = 0; i < 3000; i++) begin
      set = $urandom % 2; clr = !set && ($urandom % 2); waddr = HW'($urandom % 64 * 7);
      raddr = HW'($urandom % 64 * 7);
      #1 chk(rbit == model[raddr], "read");
      @(posedge clk);
      if (set) model[waddr] = 1; else if (clr) model[waddr] = 0;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
