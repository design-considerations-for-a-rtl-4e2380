// instr_cache: direct mapped, read-only instruction cache (8K entries).
//
// Holds, per node, the function code and any literal operand of the node's
// instruction.  It is indexed by the low bits of the node number and tagged
// with the rest; a lookup is combinational.  On a miss the matching unit
// reads the instruction word from main memory and writes it here with
// fill; the literal comes in with the instruction.  Reset invalidates every
// line by a sweep of one line per clock, with busy high meanwhile.  Size,
// mapping and contents follow the published design; the tag layout is this
// design's choice.
module instr_cache
  import dfm_pkg::*;
#(
  parameter int unsigned LINES = 8192
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              busy,
  input  logic [NODE_W-1:0] node,
  output logic              hit,
  output instr_t            instr,
  input  logic              fill,
  input  logic [NODE_W-1:0] fill_node,
  input  instr_t            fill_instr
);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = NODE_W - IW;

  instr_t        data [LINES];
  logic [TW-1:0] tag  [LINES];
  logic          val  [LINES];
  logic [IW-1:0] sweep;
  logic          sweeping;

  assign hit   = !sweeping && val[node[IW-1:0]] && (tag[node[IW-1:0]] == node[NODE_W-1:IW]);
  assign instr = data[node[IW-1:0]];
  assign busy  = sweeping;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sweeping <= 1'b1;
      sweep    <= '0;
    end else if (sweeping) begin
      val[sweep] <= 1'b0;
      sweep      <= sweep + 1'b1;
      if (sweep == IW'(LINES - 1)) sweeping <= 1'b0;
    end else if (fill) begin
      val[fill_node[IW-1:0]]  <= 1'b1;
      tag[fill_node[IW-1:0]]  <= fill_node[NODE_W-1:IW];
      data[fill_node[IW-1:0]] <= fill_instr;
    end
  end
endmodule
