// evaluation_unit: applies each work packet's function to its operands.
//
// The function and the two operand types index a dispatch table that gives
// the start of a short microcode sequence, so no sequential decoding is
// needed.  Each micro-step takes one machine cycle of EVAL_CLKS clocks
// (200 ns: four 50 ns clocks).  Frequent functions, such as a multiply of
// two reals, are a single step; mixing an integer with a real adds a step
// that converts the integer operand first.  The micro-steps are:
//   LANE   scalar operation in FP/I ALU lane 0
//   VEC    vector slice: both FP/I ALU lanes, one 32-bit element each
//   CONV0  / CONV1  integer-to-real conversion of operand 0 / 1 in lane 0
//   GP     organisational function in the general purpose ALU (also the
//          read of a storage node, which passes on the stored operand 0)
//   OBJ    I-structure read or write in the object store
//   ERR    no microcode for this function and type pair: no result
// The result (type, 64-bit data, and the process, node and colour it
// belongs to) goes to the dispatcher with valid/ready.  An I-structure read
// that must wait gives no result now; the object store's later answer comes
// out here when the word is written.  Packets come in with valid/ready from
// the evaluation queue; a new one is taken while the unit is idle or in the
// clock its previous result leaves, and that clock counts as the first of
// its machine cycle, so single-step functions complete one per 200 ns and a
// result is offered EVAL_CLKS-1 clocks after its packet was taken.  The ALU
// complement (one general purpose and two FP/I ALUs), the 200 ns
// single-cycle case, microcoded coercion indexed by function and type
// and the two-lane vector slices follow the published design; the micro-step
// set, the dispatch table contents and the codes are this design's own.
module evaluation_unit
  import dfm_pkg::*;
#(
  parameter int unsigned EVAL_CLKS = 4,
  parameter int unsigned OBJ_WORDS = 4096
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  packet_t   in_pkt,
  output logic      out_valid,
  input  logic      out_ready,
  output result_t   out_res,
  output eu_stats_t stats,
  output logic [31:0] obj_defer_errors,
  output logic      idle
);
  typedef enum logic [2:0] {U_ERR, U_LANE, U_VEC, U_CONV0, U_CONV1, U_GP, U_OBJ} ukind_t;
  typedef struct packed {
    ukind_t kind;
    logic   is_real;
    logic   last;
  } uinstr_t;

  // microcode store
  localparam int unsigned UPC_W = 4;
  function automatic uinstr_t urom(input logic [UPC_W-1:0] a);
    unique case (a)
      4'd0:  return '{U_ERR,   1'b0, 1'b1};
      4'd1:  return '{U_LANE,  1'b0, 1'b1};
      4'd2:  return '{U_LANE,  1'b1, 1'b1};
      4'd3:  return '{U_CONV0, 1'b1, 1'b0};
      4'd4:  return '{U_LANE,  1'b1, 1'b1};
      4'd5:  return '{U_CONV1, 1'b1, 1'b0};
      4'd6:  return '{U_LANE,  1'b1, 1'b1};
      4'd7:  return '{U_VEC,   1'b0, 1'b1};
      4'd8:  return '{U_VEC,   1'b1, 1'b1};
      4'd9:  return '{U_GP,    1'b0, 1'b1};
      4'd10: return '{U_OBJ,   1'b0, 1'b1};
      default: return '{U_ERR, 1'b0, 1'b1};
    endcase
  endfunction

  // dispatch table: {function, type0, type1} -> first micro-step
  function automatic logic [UPC_W-1:0] dispatch(input logic [FUNC_W-1:0] f,
                                                input logic [TYPE_W-1:0] t0,
                                                input logic [TYPE_W-1:0] t1);
    logic arith, logic_op;
    arith    = (f == F_ADD) || (f == F_SUB) || (f == F_MUL) || (f == F_LT);
    logic_op = (f == F_AND) || (f == F_OR)  || (f == F_XOR);
    if (f == F_ID || f == F_GATE || f == F_EQ || f == F_STORE) return 4'd9;
    if (f == F_IWR || f == F_IRD)             return 4'd10;
    if (f == F_ITOR) return (t0 == T_INT)  ? 4'd1 : 4'd0;
    if (f == F_RTOI) return (t0 == T_REAL) ? 4'd1 : 4'd0;
    if (f == F_NEG)  return (t0 == T_INT)  ? 4'd1 : (t0 == T_REAL) ? 4'd2 : 4'd0;
    if (arith) begin
      if (t0 == T_INT   && t1 == T_INT)   return 4'd1;
      if (t0 == T_REAL  && t1 == T_REAL)  return 4'd2;
      if (t0 == T_INT   && t1 == T_REAL)  return 4'd3;
      if (t0 == T_REAL  && t1 == T_INT)   return 4'd5;
      if (t0 == T_VINT  && t1 == T_VINT  && f != F_LT) return 4'd7;
      if (t0 == T_VREAL && t1 == T_VREAL && f != F_LT) return 4'd8;
    end
    if (logic_op) begin
      if ((t0 == T_INT || t0 == T_BOOL) && t1 == t0) return 4'd1;
      if (t0 == T_VINT && t1 == T_VINT)              return 4'd7;
    end
    return 4'd0;
  endfunction

  typedef enum logic [1:0] {E_IDLE, E_RUN, E_OBJW, E_OUT} estate_t;
  estate_t    state;
  packet_t    p;
  logic [ARG_W-1:0]        a0, a1;
  logic [UPC_W-1:0]        upc;
  logic [$clog2(EVAL_CLKS+1)-1:0] clk_cnt;
  result_t    res;
  uinstr_t    ui;

  assign ui = urom(upc);

  // lane 0: scalars, conversions and the low vector element
  logic [FUNC_W-1:0] l0_func;
  logic [31:0]       l0_a, l0_b, l0_y, l1_y;
  logic              l0_bool, l0_ok, l1_bool, l1_ok;
  always_comb begin
    l0_func = p.func;
    l0_a    = a0[31:0];
    l0_b    = a1[31:0];
    if (ui.kind == U_CONV0) begin
      l0_func = F_ITOR;
    end else if (ui.kind == U_CONV1) begin
      l0_func = F_ITOR;
      l0_a    = a1[31:0];
    end
  end
  fpi_alu u_lane0 (.func(l0_func), .is_real(ui.is_real), .a(l0_a), .b(l0_b),
                   .y(l0_y), .is_bool(l0_bool), .ok(l0_ok));
  fpi_alu u_lane1 (.func(p.func), .is_real(ui.is_real), .a(a0[63:32]), .b(a1[63:32]),
                   .y(l1_y), .is_bool(l1_bool), .ok(l1_ok));

  logic [TYPE_W-1:0] gp_type;
  logic [ARG_W-1:0]  gp_data;
  logic              gp_has, gp_ok;
  // a storage node's read hands on the stored value (operand 0)
  gp_alu u_gp (.func(p.func == F_STORE ? F_ID : p.func), .type0(p.type0), .type1(p.type1), .arg0(a0), .arg1(a1),
               .rtype(gp_type), .rdata(gp_data), .has_result(gp_has), .ok(gp_ok));

  localparam int unsigned OAW = $clog2(OBJ_WORDS);
  logic              os_busy, os_req, os_resp;
  key_t              os_ctx;
  logic [TYPE_W-1:0] os_type;
  logic [DATA_W-1:0] os_data;
  logic [31:0]       os_waw, os_def;
  logic              step_end;
  assign step_end = (state == E_RUN) && (clk_cnt == ($clog2(EVAL_CLKS+1))'(EVAL_CLKS - 1));
  assign os_req   = step_end && ui.kind == U_OBJ;
  object_store #(.WORDS(OBJ_WORDS)) u_obj (
    .clk, .rst_n, .busy(os_busy), .req(os_req), .is_write(p.func == F_IWR),
    .addr(a0[OAW-1:0]), .wtype(p.type1), .wdata(a1[DATA_W-1:0]),
    .ctx('{process: p.process, node: p.node, colour: p.colour}),
    .resp(os_resp), .resp_ctx(os_ctx), .resp_type(os_type), .resp_data(os_data),
    .waw_errors(os_waw), .defer_errors(obj_defer_errors), .deferred(os_def)
  );

  // lane result type
  logic [TYPE_W-1:0] lane_type;
  always_comb begin
    if (l0_bool)               lane_type = T_BOOL;
    else if (p.func == F_ITOR) lane_type = T_REAL;
    else if (p.func == F_RTOI) lane_type = T_INT;
    else if (ui.is_real)       lane_type = T_REAL;
    else                       lane_type = p.type0;
  end

  assign stats.deferred   = os_def;
  assign stats.waw_errors = os_waw;

  assign in_ready  = (state == E_IDLE || (state == E_OUT && out_ready)) && !os_busy;
  assign out_valid = (state == E_OUT);
  assign out_res   = res;
  assign idle      = (state == E_IDLE) && !os_busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= E_IDLE;
      stats.ops     <= '0;
      stats.single  <= '0;
      stats.coerced <= '0;
      stats.vector  <= '0;
      stats.gp      <= '0;
      stats.obj     <= '0;
      stats.illegal <= '0;
      clk_cnt <= '0;
      upc     <= '0;
      p       <= '0;
      a0      <= '0;
      a1      <= '0;
      res     <= '0;
    end else begin
      unique case (state)
        E_IDLE: ;
        E_RUN: begin
          if (!step_end) begin
            clk_cnt <= clk_cnt + 1'b1;
          end else begin
            clk_cnt <= '0;
            res.process <= p.process;
            res.node    <= p.node;
            res.colour  <= p.colour;
            unique case (ui.kind)
              U_CONV0: a0 <= {32'b0, l0_y};
              U_CONV1: a1 <= {32'b0, l0_y};
              U_LANE: begin
                res.rtype <= lane_type;
                res.rdata <= {32'b0, l0_y};
              end
              U_VEC: begin
                res.rtype <= p.type0;
                res.rdata <= {l1_y, l0_y};
                stats.vector <= stats.vector + 1;
              end
              U_GP: begin
                res.rtype <= gp_type;
                res.rdata <= gp_data;
                stats.gp  <= stats.gp + 1;
              end
              U_OBJ: stats.obj <= stats.obj + 1;
              default: stats.illegal <= stats.illegal + 1;
            endcase
            if (ui.kind == U_CONV0 || ui.kind == U_CONV1) stats.coerced <= stats.coerced + 1;
            if (!ui.last) begin
              upc <= upc + 1'b1;
            end else begin
              if (upc != 4'd4 && upc != 4'd6) stats.single <= stats.single + 1;
              unique case (ui.kind)
                U_OBJ:  state <= E_OBJW;
                U_ERR:  state <= E_IDLE;
                U_GP:   state <= gp_has ? E_OUT : E_IDLE;
                default: state <= E_OUT;
              endcase
            end
          end
        end
        E_OBJW: begin
          // the store answers in this cycle if the access completes now
          state <= E_IDLE;
        end
        E_OUT: if (out_ready) state <= E_IDLE;
        default: state <= E_IDLE;
      endcase
      // a new packet is taken while idle, or in the clock the previous
      // result leaves; that clock is the first of its machine cycle
      if (in_valid && in_ready) begin
        p       <= in_pkt;
        a0      <= in_pkt.arg0;
        a1      <= in_pkt.arg1;
        upc     <= dispatch(in_pkt.func, in_pkt.type0, in_pkt.type1);
        clk_cnt <= (EVAL_CLKS > 1) ? ($clog2(EVAL_CLKS+1))'(1) : '0;
        state   <= E_RUN;
        stats.ops <= stats.ops + 1;
      end
      // an answer from the object store (immediate or deferred)
      if (os_resp) begin
        res.process <= os_ctx.process;
        res.node    <= os_ctx.node;
        res.colour  <= os_ctx.colour;
        res.rtype   <= os_type;
        res.rdata   <= {24'b0, os_data};
        state       <= E_OUT;
      end
    end
  end
endmodule
