`timescale 1ns/1ps
// tb_processing_element: one processing element at its full default sizes.
//
// A small program is loaded through the load port: instructions into the
// matching unit's memory and destination pairs (plus one destination list)
// into the evaluation unit's memory.  Every destination names the host
// (processor 0xFF), so all tokens the element makes come out of its network
// port, where they are compared with values worked out here:
//   node 1  ADD, diadic          -> host node 100
//   node 2  MUL by literal 3     -> host nodes 200 and 201 (both halves of the pair)
//   node 3  ID, monadic          -> host 300, then list 301, 302, 303
// Timing checks: a stream of diadic pairs that all match in the token cache
// must yield one work packet per 200 ns (4 clocks), and a stream of monadic
// tokens one result per 200 ns (the evaluation cycle) with its two tokens
// 50 ns apart.  The run ends when every expected token has arrived.
module tb_processing_element;
  import dfm_pkg::*;

  localparam int NPAIR = 64;     // diadic pairs on node 1
  localparam int NMON  = 64;     // monadic tokens on node 2
  localparam int NLIST = 8;      // monadic tokens on node 3

  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;

  logic               in_valid = 0, in_ready;
  token_t             in_tok = '0;
  logic               out_valid, out_ready = 1;
  token_t             out_tok;
  logic               load_valid = 0, load_sel = 0;
  logic [MADDR_W-1:0] load_addr = '0;
  logic [MWORD_W-1:0] load_data = '0;
  mu_stats_t          mu_stats;
  eu_stats_t          eu_stats;
  dp_stats_t          dp_stats;
  logic [31:0]        iq_conflicts, derr;
  logic               idle;

  processing_element dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_tok,
    .out_valid, .out_ready, .out_tok,
    .load_valid, .load_sel, .load_addr, .load_data,
    .mu_stats, .eu_stats, .dp_stats, .iq_conflicts,
    .obj_defer_errors(derr), .idle
  );

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ helpers
  function automatic dest_t host(input int node);
    return '{processor: PROC_HOST, node: NODE_W'(node), inp: 1'b0, mon: 1'b0};
  endfunction

  function automatic logic [MWORD_W-1:0] ins(input logic [FUNC_W-1:0] f, input logic lit,
                                             input logic [DATA_W-1:0] v);
    instr_t i;
    i.func = f; i.has_lit = lit; i.lit_type = lit ? T_INT : T_NONE; i.lit_data = v;
    return MWORD_W'(i);
  endfunction

  task automatic load(input logic sel, input logic [MADDR_W-1:0] a, input logic [MWORD_W-1:0] d);
    @(negedge clk);
    load_valid = 1; load_sel = sel; load_addr = a; load_data = d;
    @(negedge clk);
    load_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic send(input token_t t);
    @(negedge clk);
    in_valid = 1; in_tok = t;
    while (!in_ready) @(negedge clk);
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  function automatic token_t mk(input int node, input logic inp, input logic mon,
                                input int colour, input int value);
    token_t t;
    t = '0;
    t.processor = 8'd0; t.process = 8'd1; t.node = NODE_W'(node);
    t.inp = inp; t.mon = mon; t.colour = COLOUR_W'(colour);
    t.dtype = T_INT; t.data = {8'b0, 32'(value)};
    return t;
  endfunction

  // ------------------------------------------------ expected output tokens
  int expect_val [longint];     // key {node, colour}
  int expected = 0, received = 0;
  longint t_first [int];        // node -> cycle of first token
  longint t_last  [int];
  longint pair_first = -1, pair_last = -1;
  longint prev200 = -1;
  int     gap_ok = 0, gap_n = 0;

  function automatic longint k(input int node, input int colour);
    return (longint'(node) << 32) | longint'(colour);
  endfunction

  always @(negedge clk) begin
    if (out_valid && out_ready) begin
      longint key;
      key = k(int'(out_tok.node), int'(out_tok.colour));
      received++;
      chk(out_tok.processor == PROC_HOST, "token addressed to host");
      chk(out_tok.dtype == T_INT, "result type");
      chk(out_tok.process == 8'd1, "process number kept");
      if (expect_val.exists(key)) begin
        chk(out_tok.data[31:0] == 32'(expect_val[key]), "result value");
        if (out_tok.data[31:0] != 32'(expect_val[key]))
          $display("  node %0d colour %0d got %0d want %0d", out_tok.node, out_tok.colour,
                   out_tok.data[31:0], expect_val[key]);
        expect_val.delete(key);
      end else begin
        chk(0, "unexpected token");
        $display("  node %0d colour %0d", out_tok.node, out_tok.colour);
      end
      if (!t_first.exists(int'(out_tok.node))) t_first[int'(out_tok.node)] = cyc;
      t_last[int'(out_tok.node)] = cyc;
      if (out_tok.node == 200) prev200 = cyc;
      if (out_tok.node == 201) begin
        gap_n++;
        if (cyc - prev200 == 1) gap_ok++;
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    dest_t  list_base;
    repeat (4) @(negedge clk);
    rst_n = 1;
    // program
    load(0, INSTR_BASE + 1, ins(F_ADD, 1'b0, '0));
    load(0, INSTR_BASE + 2, ins(F_MUL, 1'b1, 40'd3));
    load(0, INSTR_BASE + 3, ins(F_ID, 1'b0, '0));
    load(1, DEST_BASE + 1, {16'b0, host(100), 32'b0});
    load(1, DEST_BASE + 2, {16'b0, host(200), host(201)});
    list_base = dest_t'({PROC_INDIRECT, 4'b0, 20'h80000});
    load(1, DEST_BASE + 3, {16'b0, host(300), list_base});
    load(1, 20'h80000, {16'b0, host(301), host(302)});
    load(1, 20'h80001, {16'b0, host(303), 32'b0});
    // wait for the reset sweeps of the caches to end
    wait (idle);
    repeat (2) @(negedge clk);

    // ---- phase 1: diadic pairs, left then right, all matching in the cache
    for (int c = 1; c <= NPAIR; c++) begin
      expect_val[k(100, c)] = c * 7 + (c + 1000);
      expected++;
    end
    for (int c = 1; c <= NPAIR; c++) begin
      send(mk(1, 1'b0, 1'b0, c, c * 7));
      send(mk(1, 1'b1, 1'b0, c, c + 1000));
    end
    wait (received == expected);
    chk(mu_stats.fast_match == NPAIR, "every pair matched in the token cache");
    chk(mu_stats.fast_insert == NPAIR, "every first token stored in the token cache");
    // after the first (instruction miss) one packet per 4 clocks
    $display("node 100: %0d tokens in %0d clocks", NPAIR, t_last[100] - t_first[100]);
    chk(t_last[100] - t_first[100] <= 4 * (NPAIR - 1) + 8, "diadic rate one packet per 200 ns");
    chk(t_last[100] - t_first[100] >= 4 * (NPAIR - 1), "no faster than the evaluation cycle");

    // ---- phase 2: monadic with a literal, two destinations
    for (int c = 1; c <= NMON; c++) begin
      expect_val[k(200, c)] = (c + 5) * 3;
      expect_val[k(201, c)] = (c + 5) * 3;
      expected += 2;
    end
    for (int c = 1; c <= NMON; c++) send(mk(2, 1'b0, 1'b1, c, c + 5));
    wait (received == expected);
    $display("node 200: %0d results in %0d clocks", NMON, t_last[200] - t_first[200]);
    chk(t_last[200] - t_first[200] <= 4 * (NMON - 1) + 8, "monadic results one per 200 ns");
    chk(gap_n == NMON && gap_ok == NMON, "second destination 50 ns after the first");
    chk(mu_stats.monadic == NMON, "monadic tokens bypass matching");

    // ---- phase 3: destination list of four
    for (int c = 1; c <= NLIST; c++) begin
      expect_val[k(300, c)] = c;
      expect_val[k(301, c)] = c;
      expect_val[k(302, c)] = c;
      expect_val[k(303, c)] = c;
      expected += 4;
    end
    for (int c = 1; c <= NLIST; c++) send(mk(3, 1'b0, 1'b1, c, c));
    wait (received == expected);
    chk(dp_stats.indirect >= NLIST, "destination lists read");
    chk(eu_stats.ops == NPAIR + NMON + NLIST, "evaluation count");
    chk(mu_stats.imiss == 3, "one instruction miss per node");
    repeat (20) @(negedge clk);
    chk(dp_stats.tokens == expected, $sformatf("dispatcher token count %0d want %0d", dp_stats.tokens, expected));
    chk(expect_val.size() == 0, "all expected tokens arrived");
    chk(received == expected, "no extra tokens");
    chk(idle, "element idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
