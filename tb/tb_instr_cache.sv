// tb_instr_cache: lines miss after reset, hit after a fill, miss for a
// different node mapping to the same line, and return what was filled.
`timescale 1ns/1ps
module tb_instr_cache;
  import dfm_pkg::*;
  localparam int L = 16;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic busy, hit, fill;
  logic [NODE_W-1:0] node, fill_node;
  instr_t instr, fill_instr;
  instr_cache #(.LINES(L)) dut (.*);
  instr_t model [int];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fill = 0; node = 0; fill_node = 0; fill_instr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    while (busy) @(posedge clk);
    for (int i = 0; i < L; i++) begin
      #1 node = NODE_W'(i); #1 chk(!hit, "miss after reset");
    end
    for (int i = 0; i < 2000; i++) begin
      int n, line;
      n = $urandom % 64;
      #1 node = NODE_W'(n);
      #1;
      line = n % L;
      // the model: line holds the node last filled into it
      begin
        bit exp_hit;
        exp_hit = model.exists(line) && model[line].lit_data[21:0] == 22'(n);
        chk(hit == exp_hit, $sformatf("hit for node %0d", n));
        if (hit) chk(instr == model[line], "contents");
        if (!hit) begin
          instr_t ins;
          ins = '{func: 8'(n), has_lit: n[0], lit_type: T_INT, lit_data: 40'(n)};
          fill = 1; fill_node = NODE_W'(n); fill_instr = ins;
          @(posedge clk); #1 fill = 0;
          model[line] = ins;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
