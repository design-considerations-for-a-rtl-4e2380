// tb_gp_alu: identity passes operand 0 and its type, gate passes operand 0
// only when operand 1 is non-zero, and equality compares type and value.
`timescale 1ns/1ps
module tb_gp_alu;
  import dfm_pkg::*;
  int checks = 0, failures = 0;
  logic [FUNC_W-1:0] func;
  logic [TYPE_W-1:0] type0, type1, rtype;
  logic [ARG_W-1:0] arg0, arg1, rdata;
  logic has_result, ok;
  gp_alu dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 500; i++) begin
      arg0 = {$urandom, $urandom};
      arg1 = (i % 2) ? 64'(i % 3) : arg0;
      type0 = 8'($urandom % 6);
      type1 = (i % 4 == 0) ? type0 : 8'($urandom % 6);
      func = F_ID;   #1 chk(has_result && rdata == arg0 && rtype == type0, "id");
      func = F_GATE; #1 chk(has_result == (arg1 != 0) && rdata == arg0 && rtype == type0, "gate");
      func = F_EQ;   #1 chk(has_result && rtype == T_BOOL &&
                            rdata == {63'b0, type0 == type1 && arg0 == arg1}, "eq");
      func = F_ADD;  #1 chk(!ok && !has_result, "not a gp function");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
