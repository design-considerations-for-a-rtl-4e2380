// valid_bit_store: one bit per bucket of the matching unit's main hash table,
// kept in fast memory (256K x 1).
//
// A set bit says the bucket's overflow chain in main memory is not empty, so
// a token that misses in the token cache may still have its partner in main
// memory and must search the chain before it is put in the cache.  Reads are
// combinational (fast static memory); set and clear take effect at the clock
// edge.  The whole store is cleared at reset by sweeping it, one word of
// 64 bits per cycle, with busy high until the sweep ends.
module valid_bit_store #(
  parameter int unsigned HASH_W = 18
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [HASH_W-1:0] raddr,
  output logic              rbit,
  input  logic              set,
  input  logic              clr,
  input  logic [HASH_W-1:0] waddr,
  output logic              busy
);
  localparam int unsigned WORDS = ((1 << HASH_W) + 63) / 64;
  localparam int unsigned WA    = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [63:0]   bits [WORDS];
  logic [WA-1:0] sweep;
  logic          sweeping;

  function automatic logic [WA-1:0] word_of(input logic [HASH_W-1:0] a);
    return WA'(a >> 6);
  endfunction

  assign rbit = bits[word_of(raddr)][raddr[5:0]];
  assign busy = sweeping;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sweeping <= 1'b1;
      sweep    <= '0;
    end else if (sweeping) begin
      bits[sweep] <= '0;
      sweep       <= sweep + 1'b1;
      if (sweep == WA'(WORDS - 1)) sweeping <= 1'b0;
    end else if (set) begin
      bits[word_of(waddr)][waddr[5:0]] <= 1'b1;
    end else if (clr) begin
      bits[word_of(waddr)][waddr[5:0]] <= 1'b0;
    end
  end
endmodule
