// token_cache: two-way set associative cache of waiting tokens (16K entries).
//
// Each entry holds the matching key (process, node, colour), the input point
// of the waiting token, a queue flag and a 48-bit data field: the token's
// type and 40-bit data, or, once a queue has formed on that input, the
// 24-bit head and tail pointers of the queue in main memory.  The set is
// chosen by the low bits of the node/colour hash.  A lookup is
// combinational: it reports a hit (full key compare), the way that would be
// replaced (an empty way first, else the least recently written one) and the
// entry that way holds.  Writes take effect at the clock edge; a written
// way becomes the most recent of its set.  Reset clears every valid bit by a
// sweep of one set per clock, with busy high meanwhile.  The organisation,
// size and data field width follow the published design; the replacement
// rule and the full-key tag are this design's choices.
module token_cache
  import dfm_pkg::*;
#(
  parameter int unsigned SETS = 8192
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    busy,
  // lookup
  input  logic [$clog2(SETS)-1:0] idx,
  input  key_t                    key,
  output logic                    hit,
  output logic                    hit_way,
  output entry_t                  hit_entry,
  output logic                    victim_way,
  output logic                    victim_valid,
  output entry_t                  victim_entry,
  // write
  input  logic                    we,
  input  logic [$clog2(SETS)-1:0] w_idx,
  input  logic                    w_way,
  input  logic                    w_valid,
  input  entry_t                  w_entry
);
  localparam int unsigned SW = $clog2(SETS);

  entry_t        ent0 [SETS];
  entry_t        ent1 [SETS];
  logic          val0 [SETS];
  logic          val1 [SETS];
  logic          lru  [SETS];    // way to replace next
  logic [SW-1:0] sweep;
  logic          sweeping;

  logic h0, h1;
  assign h0 = val0[idx] && (ent0[idx].key == key);
  assign h1 = val1[idx] && (ent1[idx].key == key);
  assign hit       = h0 || h1;
  assign hit_way   = h1 && !h0;
  assign hit_entry = hit_way ? ent1[idx] : ent0[idx];

  always_comb begin
    if (!val0[idx])      victim_way = 1'b0;
    else if (!val1[idx]) victim_way = 1'b1;
    else                 victim_way = lru[idx];
  end
  assign victim_valid = victim_way ? val1[idx] : val0[idx];
  assign victim_entry = victim_way ? ent1[idx] : ent0[idx];
  assign busy         = sweeping;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sweeping <= 1'b1;
      sweep    <= '0;
    end else if (sweeping) begin
      val0[sweep] <= 1'b0;
      val1[sweep] <= 1'b0;
      lru[sweep]  <= 1'b0;
      sweep       <= sweep + 1'b1;
      if (sweep == SW'(SETS - 1)) sweeping <= 1'b0;
    end else if (we) begin
      if (w_way) begin
        val1[w_idx] <= w_valid;
        ent1[w_idx] <= w_entry;
      end else begin
        val0[w_idx] <= w_valid;
        ent0[w_idx] <= w_entry;
      end
      if (w_valid) lru[w_idx] <= !w_way;
    end
  end
endmodule
