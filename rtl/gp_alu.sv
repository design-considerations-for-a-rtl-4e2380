// gp_alu: the evaluation unit's general purpose ALU, for the organisational
// functions that move or steer operands rather than compute with them.
//
//   F_ID    result = operand 0, with its type
//   F_GATE  result = operand 0 if operand 1 is non-zero, else no result
//   F_EQ    result = 1 if both operands have the same type and value
//           (any type, including vector slices), type T_BOOL
// It works on the whole 64-bit arguments and is combinational; has_result
// low means the function sends no token.  The published design names this
// ALU without giving its function set; this set is this design's choice.
module gp_alu
  import dfm_pkg::*;
(
  input  logic [FUNC_W-1:0] func,
  input  logic [TYPE_W-1:0] type0,
  input  logic [TYPE_W-1:0] type1,
  input  logic [ARG_W-1:0]  arg0,
  input  logic [ARG_W-1:0]  arg1,
  output logic [TYPE_W-1:0] rtype,
  output logic [ARG_W-1:0]  rdata,
  output logic              has_result,
  output logic              ok
);
  always_comb begin
    rtype      = type0;
    rdata      = arg0;
    has_result = 1'b1;
    ok         = 1'b1;
    unique case (func)
      F_ID:   ;
      F_GATE: has_result = (arg1 != '0);
      F_EQ: begin
        rtype = T_BOOL;
        rdata = {63'b0, (type0 == type1) && (arg0 == arg1)};
      end
      default: begin
        ok         = 1'b0;
        has_result = 1'b0;
      end
    endcase
  end
endmodule
