// tb_dyn_memory: checks the bulk memory model: words written are read
// back, a read returns exactly LAT clocks after it is taken, and no request
// is taken while an access is in progress.
`timescale 1ns/1ps
module tb_dyn_memory;
  localparam int W = 80, D = 1024, LAT = 2;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic req, we, ready, rvalid;
  logic [$clog2(D)-1:0] addr;
  logic [W-1:0] wdata, rdata;
  dyn_memory #(.W(W), .DEPTH(D), .LAT(LAT)) dut (.*);
  logic [W-1:0] model [D];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(input bit w, input int a, input logic [W-1:0] d);
    int lat;
    #1 req = 1; we = w; addr = a[$clog2(D)-1:0]; wdata = d;
    while (!ready) begin @(posedge clk); #1; end
    @(posedge clk); #1 req = 0;
    chk(!ready || LAT == 1, "busy after request");
    if (!w) begin
      lat = 1;
      while (!rvalid) begin @(posedge clk); #1 lat++; end
      chk(lat == LAT, $sformatf("read latency %0d", lat));
      chk(rdata == model[a], "read data");
    end else model[a] = d;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; we = 0; addr = 0; wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < 64; i++) access(1, i * 13 % D, {$urandom, $urandom, 16'($urandom)});
    for (int i = 0; i < 64; i++) access(0, i * 13 % D, '0);
    for (int i = 0; i < 200; i++) begin
      int a;
      a = $urandom % 64 * 13 % D;
      if ($urandom % 2) access(1, a, {$urandom, $urandom, 16'($urandom)});
      else access(0, a, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
