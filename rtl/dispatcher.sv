// dispatcher: turns each result into one token per destination of its node.
//
// A direct mapped destination cache (8K lines of 64 bits) holds each node's
// first two destinations.  If a node has more than two, the second
// destination of the pair is an indirection (processor field PROC_INDIRECT,
// low 20 bits a main memory address) to the rest, stored as consecutive
// 64-bit pairs in the evaluation unit's main memory and ended by a null
// (all-zero) destination.  A null first destination means no destination.
// A destination is {processor 8, node 22, input point 1, monadic flag 1}.
//
// Timing, on a 50 ns clock: the result is taken in one clock, the first
// token is written in the next and the second token one clock (50 ns) later.
// For a list, the first main memory read starts in the clock the result is
// taken, in parallel with the first token, and each further pair arrives one
// memory cycle (200 ns) after the one before, so three or more destinations
// go out at about one token per 100 ns.  On a destination cache miss the
// pair is first read from main memory and written into the cache.
//
// Each token is merged from the destination and the result (process, colour,
// type and the low 40 bits of the data) and offered to the network.  When the
// network does not take it at once (contention), it is kept in the
// recirculating buffer (1K x 128) and offered again, oldest first; tokens
// always leave in the order they were made.  The dispatcher stalls only
// when that buffer is full.
//
// The destination cache, the pair-plus-indirection scheme, the 50 ns and
// 100 ns token rates and the buffer size follow the published design.  The
// destination format, the list terminator and the use of the buffer as the
// holding place for tokens the network refuses are this design's reading.
module dispatcher
  import dfm_pkg::*;
#(
  parameter int unsigned DC_LINES  = 8192,
  parameter int unsigned RBUF_DEPTH = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  result_t            in_res,
  output logic               out_valid,
  input  logic               out_ready,
  output token_t             out_tok,
  // evaluation unit main memory (1M x 64), read only here
  output logic               mem_req,
  output logic [EADDR_W-1:0] mem_addr,
  input  logic               mem_ready,
  input  logic               mem_rvalid,
  input  logic [63:0]        mem_rdata,
  output dp_stats_t          stats,
  output logic               idle
);
  localparam int unsigned IW = $clog2(DC_LINES);
  localparam int unsigned TW = NODE_W - IW;

  // destination cache
  logic [63:0]   dc_data [DC_LINES];
  logic [TW-1:0] dc_tag  [DC_LINES];
  logic          dc_val  [DC_LINES];
  logic [IW-1:0] sweep;
  logic          sweeping;

  typedef enum logic [1:0] {D_IDLE, D_FILL, D_EMIT} dstate_t;
  dstate_t      state;
  result_t      r;
  dest_t        dq [4];           // destinations waiting to be sent
  logic [1:0]   dq_rd, dq_wr;
  logic [2:0]   dq_cnt;
  logic         ind_active, ind_req, ind_wait;
  logic [EADDR_W-1:0] ind_addr;
  logic         ind_wait_list;

  logic [IW-1:0] li;
  logic          dc_hit;
  dest_t         hd0, hd1;
  assign li     = in_res.node[IW-1:0];
  assign dc_hit = !sweeping && dc_val[li] && (dc_tag[li] == in_res.node[NODE_W-1:IW]);
  assign {hd0, hd1} = dc_data[li];

  // token being made this cycle
  logic   mk;
  token_t mk_tok;
  dest_t  pend0;
  assign pend0 = dq[dq_rd];
  assign mk = (state == D_EMIT) && (dq_cnt != '0);
  always_comb begin
    mk_tok           = '0;
    mk_tok.processor = pend0.processor;
    mk_tok.process   = r.process;
    mk_tok.node      = pend0.node;
    mk_tok.inp       = pend0.inp;
    mk_tok.mon       = pend0.mon;
    mk_tok.colour    = r.colour;
    mk_tok.dtype     = r.rtype;
    mk_tok.data      = r.rdata[DATA_W-1:0];
  end

  // output: straight to the network, or through the recirculating buffer
  logic   rb_in_valid, rb_in_ready, rb_out_valid, rb_out_ready;
  token_t rb_out;
  logic [$clog2(RBUF_DEPTH+1)-1:0] rb_count;
  logic   direct, space;
  assign direct      = mk && !rb_out_valid && out_ready;
  assign rb_in_valid = mk && !direct;
  assign space       = direct || rb_in_ready;
  assign out_valid   = rb_out_valid || mk;
  assign out_tok     = rb_out_valid ? rb_out : mk_tok;
  assign rb_out_ready = out_ready;

  sync_fifo #(.W(TOKEN_W), .DEPTH(RBUF_DEPTH)) u_rbuf (
    .clk, .rst_n,
    .in_valid(rb_in_valid), .in_ready(rb_in_ready), .in_data(mk_tok),
    .out_valid(rb_out_valid), .out_ready(rb_out_ready), .out_data(rb_out),
    .count(rb_count)
  );

  logic sent;           // the pending first destination left this cycle
  assign sent = mk && space;

  assign in_ready = (state == D_IDLE) && dc_hit;
  assign idle     = (state == D_IDLE) && !sweeping && !rb_out_valid;

  // main memory reads: cache fill or destination list
  logic fill_req;
  assign fill_req = (state == D_FILL) && !ind_wait;
  logic ind_now;        // next list read, issued in the clock a pair arrives
  assign mem_req  = fill_req || ind_req || ind_now;
  assign mem_addr = fill_req ? DEST_BASE + EADDR_W'(r.node[18:0]) :
                    ind_now  ? ind_addr + 1'b1 : ind_addr;

  function automatic logic is_ind(input dest_t d);
    return d.processor == PROC_INDIRECT;
  endfunction

  // destinations added this cycle
  logic       take, arrive;
  dest_t      pa, pb, ma, mb;
  logic [2:0] n_push, cnt_next;
  assign take   = (state == D_IDLE) && in_valid && in_ready;
  assign arrive = (state == D_EMIT) && mem_rvalid && ind_active;
  assign {pa, pb} = take ? {hd0, hd1} : mem_rdata;
  assign ma     = pa;
  assign mb     = pb;
  always_comb begin
    n_push = 3'd0;
    if (take) n_push = (hd0 == '0) ? 3'd0 : (hd1 == '0 || is_ind(hd1)) ? 3'd1 : 3'd2;
    else if (arrive) n_push = (ma == '0) ? 3'd0 : (mb == '0) ? 3'd1 : 3'd2;
    cnt_next = dq_cnt + n_push - 3'(sent);
  end

  // the next list read may start once the destinations already queued are
  // sure to have left (and made room) before it returns
  logic list_more, rb_room;
  assign list_more = ind_active && !(arrive && (ma == '0 || mb == '0));
  assign rb_room   = (rb_count + 4 <= ($clog2(RBUF_DEPTH+1))'(RBUF_DEPTH));
  assign ind_now   = arrive && list_more && cnt_next <= 3'd2 && rb_room;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sweeping   <= 1'b1;
      sweep      <= '0;
      state      <= D_IDLE;
      dq_rd      <= '0;
      dq_wr      <= '0;
      dq_cnt     <= '0;
      ind_active <= 1'b0;
      ind_req    <= 1'b0;
      ind_wait   <= 1'b0;
      ind_addr   <= '0;
      stats      <= '0;
      r          <= '0;
    end else begin
      if (sweeping) begin
        dc_val[sweep] <= 1'b0;
        sweep         <= sweep + 1'b1;
        if (sweep == IW'(DC_LINES - 1)) sweeping <= 1'b0;
      end
      if (rb_in_valid && rb_in_ready) stats.recirculated <= stats.recirculated + 1;
      if (sent) begin
        stats.tokens <= stats.tokens + 1;
        dq_rd        <= dq_rd + 1'b1;
      end
      if (n_push >= 3'd1) dq[dq_wr]        <= pa;
      if (n_push == 3'd2) dq[dq_wr + 2'd1] <= pb;
      dq_wr  <= dq_wr + n_push[1:0];
      dq_cnt <= cnt_next;
      if (take && n_push == 3'd2) stats.second_dest <= stats.second_dest + 1;

      unique case (state)
        D_IDLE: begin
          if (in_valid && !sweeping && !dc_hit) begin
            r        <= in_res;       // keep the node for the fill
            state    <= D_FILL;
            ind_wait <= 1'b0;
            stats.dcache_miss <= stats.dcache_miss + 1;
          end else if (take) begin
            r     <= in_res;
            stats.results <= stats.results + 1;
            if (hd0 != '0 && is_ind(hd1)) begin
              ind_active <= 1'b1;
              ind_req    <= 1'b1;       // first read goes with the first token
              ind_addr   <= EADDR_W'(hd1[19:0]);
              stats.indirect <= stats.indirect + 1;
            end
            state <= D_EMIT;
          end
        end
        D_FILL: begin
          if (fill_req && mem_ready) ind_wait <= 1'b1;
          if (mem_rvalid) begin
            dc_val[r.node[IW-1:0]]  <= 1'b1;
            dc_tag[r.node[IW-1:0]]  <= r.node[NODE_W-1:IW];
            dc_data[r.node[IW-1:0]] <= mem_rdata;
            ind_wait <= 1'b0;
            state    <= D_IDLE;
          end
        end
        D_EMIT: begin
          if (ind_req && mem_ready) ind_req <= 1'b0;
          if (arrive) begin
            ind_active <= list_more;
            ind_addr   <= ind_addr + 1'b1;
            if (ind_now && !mem_ready) ind_req <= 1'b1;
          end else if (ind_active && !ind_req && !ind_wait_list && cnt_next <= 3'd2 && rb_room) begin
            ind_req <= 1'b1;
          end
          if (cnt_next == '0 && !ind_active && !arrive) state <= D_IDLE;
          if (arrive && !list_more && cnt_next == '0) state <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  // a list read has been issued and its pair has not yet come back
  always_ff @(posedge clk) begin
    if (!rst_n)                        ind_wait_list <= 1'b0;
    else if ((ind_req || ind_now) && mem_ready) ind_wait_list <= 1'b1;
    else if (arrive)                   ind_wait_list <= 1'b0;
  end

  // at most four destinations are ever queued
  assert property (@(posedge clk) disable iff (!rst_n) cnt_next <= 3'd4);
endmodule
