`timescale 1ns/1ps
// tb_dfm_full: the multiprocessor at its full size, every parameter at its
// default: 64 processing elements behind three levels of 4 x 4 switches,
// with the full-size input queues, caches and main memories.
//
// The same program as the reduced end-to-end test is loaded into all 64
// elements, and one complete run of it is made: for 64 colours the host
// sends the operands of s = c*(c+1) + (c+2)*(c+3) to element c, the sum is
// formed on element c+1, halved (coerced to real) there and negated on
// element c+3, with results 100 (s), 101/102 (h = s/2, the second through a
// destination list) and 104 (-h) returned to the host.  Token queues,
// deferred I-structure reads, vector slices and the gate run alongside.
// Every host token is checked against the value computed here.  With 8K
// cache sets nothing overflows into the hash chains at this load, so only
// the mechanisms that the program must use at any size are counted.
module tb_dfm_full;
  import dfm_pkg::*;

  localparam int STAGES = 3;
  localparam int NPE    = 4 ** STAGES;
  localparam int NC     = 64;          // colours of the main program

  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;

  logic               host_in_valid = 0, host_in_ready;
  token_t             host_in_tok = '0;
  logic [NPE-1:0]     host_out_valid, host_out_ready = '1;
  token_t             host_out_tok [NPE];
  logic               load_valid = 0, load_sel = 0;
  logic [PROC_W-1:0]  load_pe = '0;
  logic [MADDR_W-1:0] load_addr = '0;
  logic [MWORD_W-1:0] load_data = '0;
  mu_stats_t          mu_stats [NPE];
  eu_stats_t          eu_stats [NPE];
  dp_stats_t          dp_stats [NPE];
  logic [31:0]        iq_conflicts [NPE];
  logic [31:0]        derr [NPE];
  logic [31:0]        net_transfers, net_blocked;
  logic               idle;

  dfm_multiprocessor dut (
    .clk, .rst_n, .host_in_valid, .host_in_ready, .host_in_tok,
    .host_out_valid, .host_out_ready, .host_out_tok,
    .load_valid, .load_pe, .load_sel, .load_addr, .load_data,
    .mu_stats, .eu_stats, .dp_stats, .iq_conflicts, .obj_defer_errors(derr),
    .net_transfers, .net_blocked, .idle
  );

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ helpers
  function automatic logic [31:0] fr(input real x);
    logic [63:0] d;
    if (x == 0.0) return 32'b0;
    d = $realtobits(x);
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  function automatic dest_t dst(input int pe, input int node, input logic inp, input logic mon);
    return '{processor: PROC_W'(pe), node: NODE_W'(node), inp: inp, mon: mon};
  endfunction
  function automatic dest_t host(input int node);
    return dst(int'(PROC_HOST), node, 1'b0, 1'b0);
  endfunction
  function automatic logic [MWORD_W-1:0] ins(input logic [FUNC_W-1:0] f, input logic [TYPE_W-1:0] lt,
                                             input logic [DATA_W-1:0] v);
    instr_t i;
    i.func = f; i.has_lit = (lt != T_NONE); i.lit_type = lt; i.lit_data = v;
    return MWORD_W'(i);
  endfunction

  task automatic load(input int pe, input logic sel, input logic [MADDR_W-1:0] a,
                      input logic [MWORD_W-1:0] d);
    @(negedge clk);
    load_valid = 1; load_pe = PROC_W'(pe); load_sel = sel; load_addr = a; load_data = d;
    @(negedge clk);
    load_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic send(input token_t t);
    @(negedge clk);
    host_in_valid = 1; host_in_tok = t;
    while (!host_in_ready) @(negedge clk);
    @(posedge clk); #1;
    host_in_valid = 0;
  endtask

  function automatic token_t mk(input int pe, input int node, input logic inp, input logic mon,
                                input int colour, input logic [TYPE_W-1:0] ty,
                                input logic [DATA_W-1:0] value);
    token_t t;
    t = '0;
    t.processor = PROC_W'(pe); t.process = 8'd2; t.node = NODE_W'(node);
    t.inp = inp; t.mon = mon; t.colour = COLOUR_W'(colour);
    t.dtype = ty; t.data = value;
    return t;
  endfunction

  // ------------------------------------------------- expected host tokens
  typedef logic [TYPE_W+DATA_W-1:0] tv_t;   // {type, data}
  tv_t    want [longint][$];                // {node, colour} -> values
  int     expected = 0, received = 0;

  function automatic longint key(input int node, input int colour);
    return (longint'(node) << 32) | longint'(colour);
  endfunction
  task automatic expect_tok(input int node, input int colour, input logic [TYPE_W-1:0] ty,
                            input logic [DATA_W-1:0] v);
    want[key(node, colour)].push_back({ty, v});
    expected++;
  endtask

  always @(negedge clk) begin
    for (int i = 0; i < NPE; i++) begin
      if (host_out_valid[i] && host_out_ready[i]) begin
        longint k;
        tv_t    got;
        bit     found;
        k     = key(int'(host_out_tok[i].node), int'(host_out_tok[i].colour));
        got   = {host_out_tok[i].dtype, host_out_tok[i].data};
        found = 0;
        received++;
        chk(host_out_tok[i].process == 8'd2, "process number carried through");
        if (want.exists(k)) begin
          for (int j = 0; j < want[k].size(); j++)
            if (want[k][j] == got) begin
              want[k].delete(j);
              found = 1;
              break;
            end
        end
        chk(found, $sformatf("host token node %0d colour %0d value %h expected",
                             host_out_tok[i].node, host_out_tok[i].colour, got));
      end
    end
  end

  // the host takes its tokens at random
  bit rand_out = 0;
  always @(posedge clk) begin
    #1;
    for (int i = 0; i < NPE; i++)
      host_out_ready[i] = rand_out ? ($urandom % 4 != 0) : 1'b1;
  end

  // --------------------------------------------------------------- program
  task automatic load_program();
    for (int p = 0; p < NPE; p++) begin
      load(p, 0, INSTR_BASE + 10, ins(F_MUL, T_NONE, '0));
      load(p, 0, INSTR_BASE + 11, ins(F_MUL, T_NONE, '0));
      load(p, 0, INSTR_BASE + 12, ins(F_ADD, T_NONE, '0));
      load(p, 0, INSTR_BASE + 13, ins(F_MUL, T_REAL, 40'(fr(0.5))));
      load(p, 0, INSTR_BASE + 14, ins(F_NEG, T_NONE, '0));
      load(p, 0, INSTR_BASE + 20, ins(F_IWR, T_NONE, '0));
      load(p, 0, INSTR_BASE + 21, ins(F_IRD, T_NONE, '0));
      load(p, 0, INSTR_BASE + 30, ins(F_ADD, T_NONE, '0));
      load(p, 0, INSTR_BASE + 31, ins(F_GATE, T_NONE, '0));
      load(p, 0, INSTR_BASE + 40, ins(F_ADD, T_NONE, '0));
      load(p, 1, DEST_BASE + 10, {16'b0, dst((p + 1) % NPE, 12, 1'b0, 1'b0), 32'b0});
      load(p, 1, DEST_BASE + 11, {16'b0, dst((p + 1) % NPE, 12, 1'b1, 1'b0), 32'b0});
      load(p, 1, DEST_BASE + 12, {16'b0, host(100), dst(p, 13, 1'b0, 1'b1)});
      load(p, 1, DEST_BASE + 13, {16'b0, host(101), PROC_INDIRECT, 4'b0, 20'h80000});
      load(p, 1, 20'h80000,      {16'b0, host(102), dst((p + 2) % NPE, 14, 1'b0, 1'b1)});
      load(p, 1, 20'h80001,      80'b0);
      load(p, 1, DEST_BASE + 14, {16'b0, host(104), 32'b0});
      load(p, 1, DEST_BASE + 21, {16'b0, host(121), 32'b0});
      load(p, 1, DEST_BASE + 30, {16'b0, host(130), 32'b0});
      load(p, 1, DEST_BASE + 31, {16'b0, host(131), 32'b0});
      load(p, 1, DEST_BASE + 40, {16'b0, host(140), 32'b0});
    end
  endtask

  // -------------------------------------------------------------- stimulus
  function automatic longint sum_mu(input int f);
    longint s;
    s = 0;
    for (int i = 0; i < NPE; i++)
      case (f)
        0: s += mu_stats[i].fast_match;
        1: s += mu_stats[i].fast_insert;
        2: s += mu_stats[i].monadic;
        3: s += mu_stats[i].exceptions;
        4: s += mu_stats[i].evictions;
        5: s += mu_stats[i].chain_search;
        6: s += mu_stats[i].chain_found;
        7: s += mu_stats[i].queue_ops;
        8: s += mu_stats[i].imiss;
        default: ;
      endcase
    return s;
  endfunction
  function automatic longint sum_eu(input int f);
    longint s;
    s = 0;
    for (int i = 0; i < NPE; i++)
      case (f)
        0: s += eu_stats[i].ops;
        1: s += eu_stats[i].coerced;
        2: s += eu_stats[i].vector;
        3: s += eu_stats[i].gp;
        4: s += eu_stats[i].obj;
        5: s += eu_stats[i].deferred;
        6: s += eu_stats[i].illegal;
        7: s += eu_stats[i].waw_errors;
        default: ;
      endcase
    return s;
  endfunction
  function automatic longint sum_dp(input int f);
    longint s;
    s = 0;
    for (int i = 0; i < NPE; i++)
      case (f)
        0: s += dp_stats[i].tokens;
        1: s += dp_stats[i].second_dest;
        2: s += dp_stats[i].indirect;
        3: s += dp_stats[i].dcache_miss;
        4: s += dp_stats[i].recirculated;
        5: s += iq_conflicts[i];
        default: ;
      endcase
    return s;
  endfunction

  task automatic mech(input string name, input longint n);
    $display("  %-34s %0d", name, n);
    chk(n > 0, {"mechanism never happened: ", name});
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    load_program();
    wait (idle);
    repeat (4) @(negedge clk);
    rand_out = 1;

    // main program: all left operands first, then all right operands
    for (int c = 1; c <= NC; c++) begin
      int s, q;
      real h;
      s = c * (c + 1) + (c + 2) * (c + 3);
      h = real'(s) * 0.5;
      expect_tok(100, c, T_INT, 40'(32'(s)));
      expect_tok(101, c, T_REAL, 40'(fr(h)));
      expect_tok(102, c, T_REAL, 40'(fr(h)));
      expect_tok(104, c, T_REAL, 40'(fr(-h)));
      q = c % NPE;
      send(mk(q, 10, 1'b0, 1'b0, c, T_INT, 40'(c)));
      send(mk(q, 11, 1'b0, 1'b0, c, T_INT, 40'(c + 2)));
    end
    // token queues: two left operands with the same key before their partners
    for (int c = 1; c <= 6; c++) begin
      expect_tok(140, c, T_INT, 40'(c + 10 + 2 * c));
      expect_tok(140, c, T_INT, 40'(c + 100 + 3 * c));
      send(mk(0, 40, 1'b0, 1'b0, c, T_INT, 40'(c + 10)));
      send(mk(0, 40, 1'b0, 1'b0, c, T_INT, 40'(c + 100)));
    end
    // I-structure reads that arrive before the writes
    for (int c = 1; c <= 4; c++) begin
      expect_tok(121, c, T_INT, 40'(c * 11));
      send(mk(1, 21, 1'b0, 1'b1, c, T_INT, 40'(c)));
    end
    for (int c = NC; c >= 1; c--) begin
      int q;
      q = c % NPE;
      send(mk(q, 10, 1'b1, 1'b0, c, T_INT, 40'(c + 1)));
      send(mk(q, 11, 1'b1, 1'b0, c, T_INT, 40'(c + 3)));
    end
    for (int c = 1; c <= 6; c++) begin
      send(mk(0, 40, 1'b1, 1'b0, c, T_INT, 40'(2 * c)));
      send(mk(0, 40, 1'b1, 1'b0, c, T_INT, 40'(3 * c)));
    end
    for (int c = 1; c <= 4; c++) begin
      send(mk(1, 20, 1'b0, 1'b0, 100 + c, T_INT, 40'(c)));
      send(mk(1, 20, 1'b1, 1'b0, 100 + c, T_INT, 40'(c * 11)));
    end
    // vector slices and the gate
    for (int c = 1; c <= 8; c++) begin
      expect_tok(130, c, T_VINT, {8'(c + 2), 32'(c * 5 + 7)});
      send(mk(2, 30, 1'b0, 1'b0, c, T_VINT, {8'(c), 32'(c * 5)}));
      send(mk(2, 30, 1'b1, 1'b0, c, T_VINT, {8'd2, 32'd7}));
      if (c % 2 == 1) expect_tok(131, c, T_INT, 40'(77 + c));
      send(mk(3, 31, 1'b0, 1'b0, c, T_INT, 40'(77 + c)));
      send(mk(3, 31, 1'b1, 1'b0, c, T_BOOL, 40'(c % 2)));
    end

    wait (received == expected);
    rand_out = 0;
    repeat (50) @(negedge clk);
    chk(received == expected, "no extra tokens reached the host");
    begin
      int left;
      left = 0;
      foreach (want[k]) left += want[k].size();
      chk(left == 0, $sformatf("%0d expected tokens missing", left));
    end
    chk(idle, "machine idle at the end");
    chk(sum_eu(6) == 0 && sum_eu(7) == 0, "no illegal operations, no double writes");
    begin
      int de;
      de = 0;
      for (int i = 0; i < NPE; i++) de += derr[i];
      chk(de == 0, "no lost deferred reads");
    end
    $display("host tokens: %0d, evaluations: %0d", received, sum_eu(0));
    $display("mechanisms:");
    mech("token cache match",              sum_mu(0));
    mech("matching exception",             sum_mu(3));
    mech("token cache insert",             sum_mu(1));
    mech("monadic bypass / literal",       sum_mu(2));
    mech("token queue operation",          sum_mu(7));
    mech("instruction cache miss",         sum_mu(8));
    mech("type coercion micro-step",       sum_eu(1));
    mech("vector slice",                   sum_eu(2));
    mech("general purpose ALU",            sum_eu(3));
    mech("object store access",            sum_eu(4));
    mech("deferred I-structure read",      sum_eu(5));
    mech("second destination",             sum_dp(1));
    mech("destination list read",          sum_dp(2));
    mech("destination cache miss",         sum_dp(3));
    mech("token recirculated",             sum_dp(4));
    mech("network transfer",               longint'(net_transfers));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
