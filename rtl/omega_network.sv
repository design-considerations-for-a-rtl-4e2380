// omega_network: multistage interconnection network of 4 x 4 crossbar
// switches joining N = 4**STAGES processing elements (64 with three
// stages).
//
// Stage s has N/4 switches.  Before every stage the N links are permuted by
// a 4-way perfect shuffle (the link number rotated left by two bits), and the
// switch in stage s steers a token by digit STAGES-1-s (two bits, most
// significant first) of its destination processor number.  After the last
// stage a token is on the output link of its destination processor, from
// any input.  Every switch buffers its inputs and moves one token per link
// per 50 ns clock; backpressure (valid/ready) runs back through the stages,
// so no token is lost.  The network type (buffered, synchronous,
// multistage, 4 x 4 switches, three levels for 64 processors) follows the
// published design; the shuffle (Omega) topology and digit routing are
// this design's choices.
module omega_network
  import dfm_pkg::*;
#(
  parameter int unsigned STAGES    = 3,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [4**STAGES-1:0]  in_valid,
  output logic [4**STAGES-1:0]  in_ready,
  input  token_t                in_tok  [4**STAGES],
  output logic [4**STAGES-1:0]  out_valid,
  input  logic [4**STAGES-1:0]  out_ready,
  output token_t                out_tok [4**STAGES],
  output logic [31:0]           transfers,   // switch-to-switch moves, all stages
  output logic [31:0]           blocked      // token-clocks spent waiting
);
  localparam int unsigned N  = 4 ** STAGES;
  localparam int unsigned LW = 2 * STAGES;

  function automatic int unsigned shuffle(input int unsigned i);
    return ((i << 2) | (i >> (LW - 2))) & (N - 1);
  endfunction

  // links entering each stage (before the shuffle), and leaving the last
  logic [N-1:0] lv_valid [STAGES+1];
  logic [N-1:0] lv_ready [STAGES+1];
  token_t       lv_tok   [STAGES+1][N];
  logic [31:0]  sw_xfer  [STAGES][N/4];
  logic [31:0]  sw_blk   [STAGES][N/4];

  assign lv_valid[0] = in_valid;
  assign in_ready    = lv_ready[0];
  for (genvar i = 0; i < N; i++) begin : g_io
    assign lv_tok[0][i] = in_tok[i];
    assign out_tok[i]   = lv_tok[STAGES][i];
  end
  assign out_valid        = lv_valid[STAGES];
  assign lv_ready[STAGES] = out_ready;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    logic [N-1:0] sv, sr;       // switch-side links (after the shuffle)
    token_t       st [N];
    for (genvar i = 0; i < N; i++) begin : g_shuf
      assign sv[shuffle(i)]     = lv_valid[s][i];
      assign st[shuffle(i)]     = lv_tok[s][i];
      assign lv_ready[s][i]     = sr[shuffle(i)];
    end
    for (genvar k = 0; k < N / 4; k++) begin : g_sw
      token_t     ti [4];
      token_t     to [4];
      for (genvar j = 0; j < 4; j++) begin : g_p
        assign ti[j] = st[4*k + j];
        assign lv_tok[s+1][4*k + j] = to[j];
      end
      xbar_switch #(.BUF_DEPTH(BUF_DEPTH), .ROUTE_LSB(2 * (STAGES - 1 - s))) u_sw (
        .clk, .rst_n,
        .in_valid(sv[4*k +: 4]), .in_ready(sr[4*k +: 4]), .in_tok(ti),
        .out_valid(lv_valid[s+1][4*k +: 4]), .out_ready(lv_ready[s+1][4*k +: 4]),
        .out_tok(to),
        .transfers(sw_xfer[s][k]), .blocked(sw_blk[s][k])
      );
    end
  end

  always_comb begin
    transfers = '0;
    blocked   = '0;
    for (int s = 0; s < STAGES; s++) begin
      for (int k = 0; k < N / 4; k++) begin
        transfers = transfers + sw_xfer[s][k];
        blocked   = blocked + sw_blk[s][k];
      end
    end
  end
endmodule
