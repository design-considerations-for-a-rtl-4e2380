// tb_fpi_alu: integer and logical results are compared with SystemVerilog
// arithmetic on random operands; real results with real arithmetic on
// operands whose exact results are representable (so truncation does not
// matter), and with real results truncated toward zero otherwise.
`timescale 1ns/1ps
module tb_fpi_alu;
  import dfm_pkg::*;
  int checks = 0, failures = 0;
  logic [FUNC_W-1:0] func;
  logic is_real, is_bool, ok;
  logic [31:0] a, b, y;
  fpi_alu dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // IEEE single bits of x, truncated toward zero (x within single range)
  function automatic logic [31:0] r(input real x);
    logic [63:0] d;
    if (x == 0.0) return 32'b0;
    d = $realtobits(x);
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  function automatic real to_r(input logic [31:0] f);
    if (f[30:23] == 0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'b0});
  endfunction

  task automatic real_op(input logic [FUNC_W-1:0] f, input real x, input real z,
                         input real expect_v);
    func = f; is_real = 1; a = r(x); b = r(z);
    #1 chk(y == r(expect_v), $sformatf("real f%0d %f %f -> %h want %h", f, x, z, y, r(expect_v)));
  endtask

  initial begin
    // integers
    for (int i = 0; i < 500; i++) begin
      logic [31:0] x, z;
      x = $urandom; z = $urandom;
      if (i % 3 == 0) z = z % 1000;
      is_real = 0; a = x; b = z;
      func = F_ADD; #1 chk(y == x + z, "int add");
      func = F_SUB; #1 chk(y == x - z, "int sub");
      func = F_MUL; #1 chk(y == x * z, "int mul");
      func = F_AND; #1 chk(y == (x & z), "and");
      func = F_OR;  #1 chk(y == (x | z), "or");
      func = F_XOR; #1 chk(y == (x ^ z), "xor");
      func = F_NEG; #1 chk(y == -x, "int neg");
      func = F_LT;  #1 chk(y == {31'b0, $signed(x) < $signed(z)} && is_bool, "int lt");
      func = F_EQ;  #1 chk(y == {31'b0, x == z} && is_bool, "eq");
    end
    // reals with exact results
    real_op(F_MUL, 1.5, 2.25, 3.375);
    real_op(F_MUL, -3.0, 0.5, -1.5);
    real_op(F_MUL, 0.0, 7.0, 0.0);
    real_op(F_ADD, 3.0, 0.25, 3.25);
    real_op(F_ADD, 5.5, -7.25, -1.75);
    real_op(F_ADD, 1024.0, 1024.0, 2048.0);
    real_op(F_ADD, 2.5, -2.5, 0.0);
    real_op(F_SUB, 10.0, 0.125, 9.875);
    real_op(F_SUB, -1.0, 1.0, -2.0);
    real_op(F_ADD, 0.0, -6.5, -6.5);
    real_op(F_NEG, 4.75, 0.0, -4.75);
    for (int i = 0; i < 300; i++) begin
      // small integers as reals: sums and products are exact
      int p, q;
      p = int'($urandom % 2001) - 1000;
      q = int'($urandom % 2001) - 1000;
      real_op(F_ADD, real'(p), real'(q), real'(p + q));
      real_op(F_MUL, real'(p), real'(q), real'(p * q));
      func = F_LT; a = r(real'(p)); b = r(real'(q));
      #1 chk(y[0] == (p < q) && is_bool, "real lt");
      // conversions
      func = F_ITOR; is_real = 0; a = 32'(p * 1021);
      #1 chk(y == r(real'(p * 1021)), "int to real");
      func = F_RTOI; a = r(real'(p) + 0.75);
      #1 chk($signed(y) == ((p >= 0) ? p : p + 1), $sformatf("real to int %0d -> %0d", p, $signed(y)));
    end
    for (int i = 0; i < 300; i++) begin
      real x, z;
      int  xi, zi;
      xi = int'($urandom % 2000000) - 1000000;
      zi = int'($urandom % 2000000) - 1000000;
      x = real'(xi) / 1024.0;
      z = real'(zi) / 65536.0;
      // operands first rounded to single, then the exact product truncated
      func = F_MUL; is_real = 1; a = r(x); b = r(z);
      #1 chk(y == r(to_r(a) * to_r(b)), "random real product");
    end
    func = 8'hEE; #1 chk(!ok, "undefined function flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
