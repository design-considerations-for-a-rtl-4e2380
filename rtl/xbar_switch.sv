// xbar_switch: buffered synchronous 4 x 4 crossbar switch, the building
// block of the multistage network.
//
// Each of the four inputs has a FIFO buffer (BUF_DEPTH tokens).  In every
// clock (one 50 ns transfer cycle) each output takes at most one token from
// the heads of the input buffers that ask for it, chosen round-robin, and
// each input sends at most one; all four outputs may transfer in the same
// clock.  The output a token asks for is the 2-bit digit of its destination
// processor number at bit ROUTE_LSB.  Both sides use valid/ready; a token
// whose output is taken by another input, or whose output is not ready,
// waits in its buffer, which is counted in blocked.  The 4 x 4 size, the
// buffering and the 50 ns synchronous transfer cycle follow the published
// design; the buffer depth, round-robin arbitration and routing by processor
// digit are this design's choices.
module xbar_switch
  import dfm_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 4,
  parameter int unsigned ROUTE_LSB = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  in_valid,
  output logic [3:0]  in_ready,
  input  token_t      in_tok  [4],
  output logic [3:0]  out_valid,
  input  logic [3:0]  out_ready,
  output token_t      out_tok [4],
  output logic [31:0] transfers,
  output logic [31:0] blocked
);
  logic [3:0] hv;          // buffer head valid
  token_t     ht [4];      // buffer head token
  logic [3:0] hpop;
  logic [1:0] want [4];
  logic [1:0] rr   [4];    // round-robin pointer per output
  logic [1:0] win  [4];    // winning input per output
  logic [3:0] grant_out;   // output o grants this cycle
  logic [$clog2(BUF_DEPTH+1)-1:0] buf_count [4];  // occupancy, for observation only

  for (genvar i = 0; i < 4; i++) begin : g_buf
    sync_fifo #(.W(TOKEN_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid(in_valid[i]), .in_ready(in_ready[i]), .in_data(in_tok[i]),
      .out_valid(hv[i]), .out_ready(hpop[i]), .out_data(ht[i]),
      .count(buf_count[i])
    );
    assign want[i] = ht[i].processor[ROUTE_LSB +: 2];
  end

  always_comb begin
    hpop      = '0;
    grant_out = '0;
    for (int o = 0; o < 4; o++) begin
      win[o] = '0;
      for (int k = 3; k >= 0; k--) begin
        // search from the round-robin pointer; the last hit in this
        // descending loop is the first in round-robin order
        logic [1:0] i;
        i = rr[o] + 2'(k);
        if (hv[i] && want[i] == 2'(o)) begin
          win[o]       = i;
          grant_out[o] = 1'b1;
        end
      end
      out_valid[o] = grant_out[o];
      out_tok[o]   = ht[win[o]];
      if (grant_out[o] && out_ready[o]) hpop[win[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int o = 0; o < 4; o++) rr[o] <= 2'(o);
      transfers <= '0;
      blocked   <= '0;
    end else begin
      for (int o = 0; o < 4; o++) begin
        if (grant_out[o] && out_ready[o]) rr[o] <= win[o] + 1'b1;
      end
      transfers <= transfers + 32'($countones(hpop));
      blocked   <= blocked + 32'($countones(hv & ~hpop));
    end
  end
endmodule
