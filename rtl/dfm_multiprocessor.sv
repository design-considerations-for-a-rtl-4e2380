// dfm_multiprocessor: the dataflow multiprocessor: 4**STAGES identical
// processing elements joined by a buffered multistage network of 4 x 4
// switches (64 elements and three switch levels by default).
//
// Every token a processing element produces enters the network on the
// element's own link and comes out on the link of the processor named in
// the token, where it enters that element's input queue.  A token addressed
// to processor PROC_HOST (0xFF) does not enter the network; it leaves the
// machine on the element's host output (one per element, valid/ready).  The
// host puts tokens in through host_in, which shares network link 0 with
// processing element 0 and goes first.  The load port writes program words
// into the main memories of the element named by load_pe.  All of it runs on
// one 50 ns clock.  The element count and network depth follow the
// published design; the host ports are this design's.
module dfm_multiprocessor
  import dfm_pkg::*;
#(
  parameter int unsigned STAGES     = 3,
  parameter int unsigned IQ_DEPTH   = 128 * 1024,
  parameter int unsigned EQ_DEPTH   = 1024,
  parameter int unsigned TC_SETS    = 8192,
  parameter int unsigned IC_LINES   = 8192,
  parameter int unsigned DC_LINES   = 8192,
  parameter int unsigned RBUF_DEPTH = 1024,
  parameter int unsigned EVAL_CLKS  = 4,
  parameter int unsigned NET_BUF    = 4,
  localparam int unsigned NPE       = 4 ** STAGES
) (
  input  logic               clk,
  input  logic               rst_n,
  // host token input
  input  logic               host_in_valid,
  output logic               host_in_ready,
  input  token_t             host_in_tok,
  // tokens for the host, one port per processing element
  output logic [NPE-1:0]     host_out_valid,
  input  logic [NPE-1:0]     host_out_ready,
  output token_t             host_out_tok [NPE],
  // program load
  input  logic               load_valid,
  input  logic [PROC_W-1:0]  load_pe,
  input  logic               load_sel,
  input  logic [MADDR_W-1:0] load_addr,
  input  logic [MWORD_W-1:0] load_data,
  // observation
  output mu_stats_t          mu_stats [NPE],
  output eu_stats_t          eu_stats [NPE],
  output dp_stats_t          dp_stats [NPE],
  output logic [31:0]        iq_conflicts [NPE],
  output logic [31:0]        obj_defer_errors [NPE],
  output logic [31:0]        net_transfers,
  output logic [31:0]        net_blocked,
  output logic               idle
);
  logic [NPE-1:0] ni_valid, ni_ready, no_valid, no_ready;
  token_t         ni_tok [NPE];
  token_t         no_tok [NPE];
  logic [NPE-1:0] pe_ov, pe_or, pe_idle;
  token_t         pe_tok [NPE];

  omega_network #(.STAGES(STAGES), .BUF_DEPTH(NET_BUF)) u_net (
    .clk, .rst_n,
    .in_valid(ni_valid), .in_ready(ni_ready), .in_tok(ni_tok),
    .out_valid(no_valid), .out_ready(no_ready), .out_tok(no_tok),
    .transfers(net_transfers), .blocked(net_blocked)
  );

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    logic to_host, host_here;
    assign to_host   = (pe_tok[i].processor == PROC_HOST);
    assign host_here = (i == 0) && host_in_valid;

    processing_element #(
      .IQ_DEPTH(IQ_DEPTH), .EQ_DEPTH(EQ_DEPTH), .TC_SETS(TC_SETS), .IC_LINES(IC_LINES),
      .DC_LINES(DC_LINES), .RBUF_DEPTH(RBUF_DEPTH), .EVAL_CLKS(EVAL_CLKS)
    ) u_pe (
      .clk, .rst_n,
      .in_valid(no_valid[i]), .in_ready(no_ready[i]), .in_tok(no_tok[i]),
      .out_valid(pe_ov[i]), .out_ready(pe_or[i]), .out_tok(pe_tok[i]),
      .load_valid(load_valid && load_pe == PROC_W'(i)), .load_sel, .load_addr, .load_data,
      .mu_stats(mu_stats[i]), .eu_stats(eu_stats[i]), .dp_stats(dp_stats[i]),
      .iq_conflicts(iq_conflicts[i]), .obj_defer_errors(obj_defer_errors[i]), .idle(pe_idle[i])
    );

    assign host_out_valid[i] = pe_ov[i] && to_host;
    assign host_out_tok[i]   = pe_tok[i];
    assign ni_valid[i] = host_here || (pe_ov[i] && !to_host);
    assign ni_tok[i]   = host_here ? host_in_tok : pe_tok[i];
    assign pe_or[i]    = to_host ? host_out_ready[i] : (ni_ready[i] && !host_here);
  end

  assign host_in_ready = ni_ready[0];
  assign idle = &pe_idle && !(|no_valid) && !(|ni_valid);
endmodule
