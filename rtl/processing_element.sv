// processing_element: one node of the dataflow multiprocessor.
//
// Tokens from the network enter the input queue (128K x 128, four
// interleaved banks), pass to the matching unit, which pairs operands using
// its token cache, valid bits, instruction cache and a 1M x 80 main memory,
// and leave it as work packets.  The evaluation queue (1K x 220) absorbs the
// difference in rate between the matching unit and the evaluation unit,
// which applies the function (one general purpose and two FP/I ALUs, an
// object store), and the dispatcher (destination cache, recirculating
// buffer, 1M x 64 main memory for long destination lists) sends one token
// per destination back to the network.  Everything runs on one 50 ns clock.
//
// A load port writes words into either main memory (sel 0: matching unit
// memory, instructions at 0x40000; sel 1: evaluation unit memory,
// destination pairs at 0x00000), for program loading before tokens flow; a
// load takes the memory from the units for that clock.  The block structure
// and sizes follow the published design; the load port is this design's.
module processing_element
  import dfm_pkg::*;
#(
  parameter int unsigned IQ_DEPTH   = 128 * 1024,
  parameter int unsigned EQ_DEPTH   = 1024,
  parameter int unsigned TC_SETS    = 8192,
  parameter int unsigned IC_LINES   = 8192,
  parameter int unsigned DC_LINES   = 8192,
  parameter int unsigned RBUF_DEPTH = 1024,
  parameter int unsigned EVAL_CLKS  = 4,
  parameter int unsigned MM_LAT     = 2,
  parameter int unsigned EM_LAT     = 4,
  parameter int unsigned OBJ_WORDS  = 4096
) (
  input  logic               clk,
  input  logic               rst_n,
  // network side
  input  logic               in_valid,
  output logic               in_ready,
  input  token_t             in_tok,
  output logic               out_valid,
  input  logic               out_ready,
  output token_t             out_tok,
  // program load
  input  logic               load_valid,
  input  logic               load_sel,
  input  logic [MADDR_W-1:0] load_addr,
  input  logic [MWORD_W-1:0] load_data,
  // observation
  output mu_stats_t          mu_stats,
  output eu_stats_t          eu_stats,
  output dp_stats_t          dp_stats,
  output logic [31:0]        iq_conflicts,
  output logic [31:0]        obj_defer_errors,
  output logic               idle
);
  // input queue -> matching unit
  logic   iq_v, iq_r, iq_busy;
  token_t iq_t;
  logic [$clog2(IQ_DEPTH+1)-1:0] iq_level;
  input_queue #(.DEPTH(IQ_DEPTH)) u_iq (
    .clk, .rst_n, .in_valid, .in_ready, .in_tok,
    .out_valid(iq_v), .out_ready(iq_r), .out_tok(iq_t),
    .level(iq_level), .conflicts(iq_conflicts), .busy(iq_busy)
  );

  // matching unit and its main memory
  logic               mu_req, mu_we, mm_ready, mm_rvalid;
  logic [MADDR_W-1:0] mu_addr;
  logic [MWORD_W-1:0] mu_wdata, mm_rdata;
  logic               mu_ov, mu_or, mu_idle;
  packet_t            mu_pkt;
  matching_unit #(.CACHE_SETS(TC_SETS), .IC_LINES(IC_LINES)) u_mu (
    .clk, .rst_n,
    .in_valid(iq_v), .in_ready(iq_r), .in_tok(iq_t),
    .out_valid(mu_ov), .out_ready(mu_or), .out_pkt(mu_pkt),
    .mem_req(mu_req), .mem_we(mu_we), .mem_addr(mu_addr), .mem_wdata(mu_wdata),
    .mem_ready(mm_ready && !(load_valid && !load_sel)),
    .mem_rvalid(mm_rvalid), .mem_rdata(mm_rdata),
    .stats(mu_stats), .idle(mu_idle)
  );
  logic mm_sel_load;
  assign mm_sel_load = load_valid && !load_sel;
  dyn_memory #(.W(MWORD_W), .DEPTH(1 << MADDR_W), .LAT(MM_LAT)) u_mm (
    .clk, .rst_n,
    .req(mm_sel_load || mu_req), .we(mm_sel_load || mu_we),
    .addr(mm_sel_load ? load_addr : mu_addr),
    .wdata(mm_sel_load ? load_data : mu_wdata),
    .ready(mm_ready), .rvalid(mm_rvalid), .rdata(mm_rdata)
  );

  // evaluation queue
  logic    eq_v, eq_r;
  packet_t eq_p;
  logic [$clog2(EQ_DEPTH+1)-1:0] eq_count;
  sync_fifo #(.W(PACKET_W), .DEPTH(EQ_DEPTH)) u_eq (
    .clk, .rst_n,
    .in_valid(mu_ov), .in_ready(mu_or), .in_data(mu_pkt),
    .out_valid(eq_v), .out_ready(eq_r), .out_data(eq_p),
    .count(eq_count)
  );

  // evaluation unit
  logic        eu_ov, eu_or, eu_idle;
  result_t     eu_res;
  logic [31:0] eu_derr;
  evaluation_unit #(.EVAL_CLKS(EVAL_CLKS), .OBJ_WORDS(OBJ_WORDS)) u_eu (
    .clk, .rst_n,
    .in_valid(eq_v), .in_ready(eq_r), .in_pkt(eq_p),
    .out_valid(eu_ov), .out_ready(eu_or), .out_res(eu_res),
    .stats(eu_stats), .obj_defer_errors(eu_derr), .idle(eu_idle)
  );

  // dispatcher and the evaluation unit's main memory
  logic               dp_req, em_ready, em_rvalid, dp_idle;
  logic [EADDR_W-1:0] dp_addr;
  logic [63:0]        em_rdata;
  dispatcher #(.DC_LINES(DC_LINES), .RBUF_DEPTH(RBUF_DEPTH)) u_dp (
    .clk, .rst_n,
    .in_valid(eu_ov), .in_ready(eu_or), .in_res(eu_res),
    .out_valid, .out_ready, .out_tok,
    .mem_req(dp_req), .mem_addr(dp_addr),
    .mem_ready(em_ready && !(load_valid && load_sel)),
    .mem_rvalid(em_rvalid), .mem_rdata(em_rdata),
    .stats(dp_stats), .idle(dp_idle)
  );
  logic em_sel_load;
  assign em_sel_load = load_valid && load_sel;
  dyn_memory #(.W(64), .DEPTH(1 << EADDR_W), .LAT(EM_LAT)) u_em (
    .clk, .rst_n,
    .req(em_sel_load || dp_req), .we(em_sel_load),
    .addr(em_sel_load ? load_addr : dp_addr),
    .wdata(load_data[63:0]),
    .ready(em_ready), .rvalid(em_rvalid), .rdata(em_rdata)
  );

  assign obj_defer_errors = eu_derr;
  assign idle = mu_idle && eu_idle && dp_idle && !iq_busy && !eq_v;
endmodule
