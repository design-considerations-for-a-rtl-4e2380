// input_queue: the matching unit's large token input queue (128K x 128 bits),
// built as four interleaved memory banks between an input register and an
// output register.
//
// Consecutive queue words go to consecutive banks (bank = word index mod 4),
// so although one bank access occupies its bank for BANK_CYCLES clocks
// (100 ns devices on a 50 ns clock), one token can be written and one read in
// every clock.  Each bank has its own address register.  A write from the
// input register and a read into the output side may want the same bank in
// the same clock; the write goes first and the read waits (counted in
// conflicts).  A read returns its word BANK_CYCLES clocks after issue; the
// output register is a four-word buffer so that reads already issued always
// have room.  Both sides use valid/ready.  The four-bank organisation, the
// 128K depth and the one-token-per-50-ns rate follow the published design;
// the conflict rule and the output buffer depth are this design's choices.
module input_queue
  import dfm_pkg::*;
#(
  parameter int unsigned DEPTH       = 128 * 1024,
  parameter int unsigned BANK_CYCLES = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  token_t in_tok,
  output logic   out_valid,
  input  logic   out_ready,
  output token_t out_tok,
  output logic [$clog2(DEPTH+1)-1:0] level,      // tokens held in the banks
  output logic [31:0]                conflicts,  // read held off by a write
  output logic                       busy        // holds any token anywhere
);
  localparam int unsigned BANKS = 4;
  localparam int unsigned BDEP  = DEPTH / BANKS;
  localparam int unsigned BA    = $clog2(BDEP);
  localparam int unsigned PW    = $clog2(DEPTH);
  localparam int unsigned OUTD  = 4;
  localparam int unsigned CW    = $clog2(BANK_CYCLES + 1);

  token_t        bank0 [BDEP];
  token_t        bank1 [BDEP];
  token_t        bank2 [BDEP];
  token_t        bank3 [BDEP];
  logic [BA-1:0] addr_reg [BANKS];        // per-bank address register
  logic [CW-1:0] bank_busy [BANKS];

  // input register
  logic   inr_v;
  token_t inr;

  logic [PW-1:0] wr_ptr, rd_ptr;
  logic [1:0]    wb, rb;
  logic          do_wr, do_rd, want_rd;

  // reads in flight: bank, remaining cycles
  logic [CW-1:0] fl_cnt [BANKS];
  logic [2:0]    inflight;

  // output register (small buffer)
  token_t        outq [OUTD];
  logic [1:0]    oq_wr, oq_rd;
  logic [2:0]    oq_cnt;

  assign wb = wr_ptr[1:0];
  assign rb = rd_ptr[1:0];

  assign do_wr   = inr_v && (level < DEPTH[$clog2(DEPTH+1)-1:0]) && (bank_busy[wb] == '0);
  assign want_rd = (level != '0) && ({1'b0, oq_cnt} + {1'b0, inflight} < 4'(OUTD));
  assign do_rd   = want_rd && (bank_busy[rb] == '0) && !(do_wr && wb == rb);
  assign in_ready = !inr_v || do_wr;

  assign out_valid = (oq_cnt != '0);
  assign busy      = inr_v || (level != '0) || (inflight != '0) || (oq_cnt != '0);
  assign out_tok   = outq[oq_rd];

  // words arriving from the banks this cycle
  logic   arrive;
  token_t arrive_tok;
  always_comb begin
    arrive     = 1'b0;
    arrive_tok = '0;
    for (int b = 0; b < BANKS; b++) begin
      if (fl_cnt[b] == 1) begin
        arrive = 1'b1;
        case (b)
          0: arrive_tok = bank0[addr_reg[0]];
          1: arrive_tok = bank1[addr_reg[1]];
          2: arrive_tok = bank2[addr_reg[2]];
          default: arrive_tok = bank3[addr_reg[3]];
        endcase
      end
    end
  end

  logic pop;
  assign pop = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      inr_v     <= 1'b0;
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      level     <= '0;
      inflight  <= '0;
      oq_wr     <= '0;
      oq_rd     <= '0;
      oq_cnt    <= '0;
      conflicts <= '0;
      for (int b = 0; b < BANKS; b++) begin
        bank_busy[b]     <= '0;
        fl_cnt[b]   <= '0;
        addr_reg[b] <= '0;
      end
    end else begin
      for (int b = 0; b < BANKS; b++) begin
        if (bank_busy[b] != '0)   bank_busy[b]   <= bank_busy[b] - 1'b1;
        if (fl_cnt[b] != '0) fl_cnt[b] <= fl_cnt[b] - 1'b1;
      end
      if (in_valid && in_ready) begin
        inr_v <= 1'b1;
        inr   <= in_tok;
      end else if (do_wr) begin
        inr_v <= 1'b0;
      end
      if (do_wr) begin
        addr_reg[wb] <= wr_ptr[PW-1:2];
        bank_busy[wb]     <= CW'(BANK_CYCLES - 1);
        wr_ptr       <= wr_ptr + 1'b1;
      end
      if (do_rd) begin
        addr_reg[rb] <= rd_ptr[PW-1:2];
        bank_busy[rb]     <= CW'(BANK_CYCLES - 1);
        fl_cnt[rb]   <= CW'(BANK_CYCLES);
        rd_ptr       <= rd_ptr + 1'b1;
      end
      if (want_rd && (bank_busy[rb] == '0) && do_wr && wb == rb) conflicts <= conflicts + 1;
      case ({do_wr, do_rd})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: ;
      endcase
      inflight <= inflight + 3'(do_rd) - 3'(arrive);
      if (arrive) begin
        outq[oq_wr] <= arrive_tok;
        oq_wr       <= oq_wr + 1'b1;
      end
      if (pop) oq_rd <= oq_rd + 1'b1;
      oq_cnt <= oq_cnt + 3'(arrive) - 3'(pop);
    end
  end

  // bank write port: the word is stored at the start of its access
  always_ff @(posedge clk) begin
    if (do_wr) begin
      case (wb)
        2'd0: bank0[wr_ptr[PW-1:2]] <= inr;
        2'd1: bank1[wr_ptr[PW-1:2]] <= inr;
        2'd2: bank2[wr_ptr[PW-1:2]] <= inr;
        default: bank3[wr_ptr[PW-1:2]] <= inr;
      endcase
    end
  end

  initial assert (DEPTH % BANKS == 0 && BANK_CYCLES >= 1)
    else $error("input_queue: DEPTH must be a multiple of 4");
endmodule
