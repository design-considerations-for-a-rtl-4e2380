// sync_fifo: first-in first-out buffer with a valid/ready handshake on
// both sides.
//
// Used as the evaluation queue between the matching and evaluation units
// (default 1K entries of one 220-bit work packet, the size of the commercial
// queue devices the queue is built from), and, at other sizes, as the
// recirculating buffer of the dispatcher and the input buffers of the
// network switches.  The storage is an array; the head word is read
// combinationally so that a word written in one cycle can leave in the next.
// One push and one pop may happen in the same cycle.  Reset empties it.
module sync_fifo #(
  parameter int unsigned W     = 220,
  parameter int unsigned DEPTH = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          push, pop;

  assign in_ready  = (count < DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // A full queue must not be written, an empty one not read.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> count < ($clog2(DEPTH+1))'(DEPTH));
endmodule
