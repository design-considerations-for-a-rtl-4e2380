// tb_evaluation_unit: work packets of each micro-sequence kind are evaluated
// and their results compared with values computed here; the time from
// taking a packet to the clock its result is taken is checked: one machine
// cycle (EVAL_CLKS clocks) for a single-step function, two when an integer
// must first be converted to real; a back-to-back stream must give one
// result per machine cycle.  Also checks vector slices in both lanes, an
// illegal function/type pair (no result), a gate that sends nothing, and
// I-structure accesses, including a read that waits for its write.
`timescale 1ns/1ps
module tb_evaluation_unit;
  import dfm_pkg::*;
  localparam int EC = 4;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready, idle;
  packet_t in_pkt;
  result_t out_res;
  eu_stats_t stats;
  logic [31:0] obj_defer_errors;
  evaluation_unit #(.EVAL_CLKS(EC), .OBJ_WORDS(64)) dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] fr(input real x);
    logic [63:0] d;
    if (x == 0.0) return 32'b0;
    d = $realtobits(x);
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  function automatic packet_t pk(input logic [7:0] f, input logic [7:0] t0, input logic [63:0] a0,
                                 input logic [7:0] t1, input logic [63:0] a1, input int n);
    return '{func: f, type0: t0, type1: t1, process: 8'(n), node: 22'(n), colour: 38'(n * 3),
             arg0: a0, arg1: a1};
  endfunction

  // send a packet; return clocks until the result is offered (-1: none)
  task automatic run(input packet_t p, output int lat, output result_t res);
    #1 in_valid = 1; in_pkt = p;
    while (!in_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1 in_valid = 0;
    lat = 1;  // counts the clock edge at which the result is taken
    while (!out_valid && lat < 5 * EC) begin @(posedge clk); #1 lat++; end
    res = out_res;
    if (!out_valid) lat = -1;
    else begin out_ready = 1; @(posedge clk); #1 out_ready = 0; end
  endtask

  task automatic expect_res(input packet_t p, input int want_lat, input logic [7:0] rt,
                            input logic [63:0] rd, input string what);
    int lat; result_t res;
    run(p, lat, res);
    chk(lat == want_lat, $sformatf("%s: latency %0d want %0d", what, lat, want_lat));
    if (want_lat >= 0) begin
      chk(res.rtype == rt && res.rdata == rd, $sformatf("%s: got %0d:%h want %0d:%h", what,
          res.rtype, res.rdata, rt, rd));
      chk(res.node == p.node && res.colour == p.colour && res.process == p.process,
          $sformatf("%s: context", what));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    while (!idle) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      int x, z;
      x = int'($urandom % 20001) - 10000;
      z = int'($urandom % 20001) - 10000;
      expect_res(pk(F_ADD, T_INT, 64'(32'(x)), T_INT, 64'(32'(z)), i), EC, T_INT,
                 {32'b0, 32'(x + z)}, "int add");
      expect_res(pk(F_MUL, T_REAL, 64'(fr(x)), T_REAL, 64'(fr(z)), i), EC, T_REAL,
                 64'(fr(real'(x) * real'(z))), "real mul");
      // integer times real: one conversion step first
      expect_res(pk(F_MUL, T_INT, 64'(32'(x)), T_REAL, 64'(fr(0.5)), i), 2 * EC, T_REAL,
                 64'(fr(real'(x) * 0.5)), "int*real");
      expect_res(pk(F_SUB, T_REAL, 64'(fr(x)), T_INT, 64'(32'(z)), i), 2 * EC, T_REAL,
                 64'(fr(real'(x - z))), "real-int");
      expect_res(pk(F_LT, T_INT, 64'(32'(x)), T_INT, 64'(32'(z)), i), EC, T_BOOL,
                 64'(x < z), "lt");
      // vector slice: two elements, one per FP/I ALU
      expect_res(pk(F_ADD, T_VREAL, {fr(x), fr(z)}, T_VREAL, {fr(z), fr(x)}, i), EC, T_VREAL,
                 {fr(real'(x + z)), fr(real'(z + x))}, "vector real add");
      expect_res(pk(F_MUL, T_VINT, {32'(x), 32'(z)}, T_VINT, {32'(3), 32'(-2)}, i), EC, T_VINT,
                 {32'(x * 3), 32'(z * -2)}, "vector int mul");
      expect_res(pk(F_ID, T_INT, 64'(x), T_NONE, 0, i), EC, T_INT, 64'(x), "identity");
    end
    expect_res(pk(F_ADD, T_BOOL, 1, T_REAL, 0, 1), -1, 0, 0, "illegal pair");
    expect_res(pk(F_GATE, T_INT, 5, T_BOOL, 0, 2), -1, 0, 0, "gate closed");
    expect_res(pk(F_GATE, T_INT, 5, T_BOOL, 1, 2), EC, T_INT, 5, "gate open");
    // I-structure: write then read; read before write
    expect_res(pk(F_IWR, T_INT, 7, T_INT, 700, 3), -1, 0, 0, "write");
    expect_res(pk(F_IRD, T_INT, 7, T_NONE, 0, 4), EC + 1, T_INT, 700, "read");
    expect_res(pk(F_IRD, T_INT, 9, T_NONE, 0, 5), -1, 0, 0, "early read waits");
    begin
      int lat; result_t res;
      run(pk(F_IWR, T_INT, 9, T_INT, 900, 6), lat, res);
      chk(lat == EC + 1 && res.rdata == 900 && res.node == 5, "write answers the waiting read");
    end
    // back to back: one single-step packet per machine cycle
    begin
      int got, t0, t1;
      got = 0; t0 = 0; t1 = 0;
      out_ready = 1;
      fork
        for (int i = 0; i < 20; i++) begin
          #1 in_valid = 1; in_pkt = pk(F_ADD, T_INT, 64'(i), T_INT, 64'(i), i);
          while (!in_ready) begin @(posedge clk); #1; end
          @(posedge clk);
          if (i == 19) #1 in_valid = 0;
        end
        while (got < 20) begin
          @(negedge clk);
          if (out_valid) begin
            if (got == 0) t0 = int'($time / 50);
            t1 = int'($time / 50);
            chk(out_res.rdata == 64'(2 * got), "stream result");
            got++;
          end
        end
      join
      #1 in_valid = 0; out_ready = 0;
      chk(t1 - t0 == EC * 19, $sformatf("stream: 20 results in %0d clocks", t1 - t0));
    end
    chk(stats.coerced == 80 && stats.vector == 80 && stats.illegal == 1 && stats.deferred == 1,
        "event counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
