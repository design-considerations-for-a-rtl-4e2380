// dyn_memory: bulk dynamic memory of a processing element.
//
// The matching unit holds a 1M x 80 bit memory (hash table, overflow chains,
// token queues and the instruction store) and the evaluation unit a 1M x 64
// bit memory (destination lists and objects).  The sizes are the published
// ones; the timing is this design's model of 100 ns devices on a 50 ns
// clock: a request is accepted when the memory is idle, a write completes
// and a read returns its word LAT cycles later (rvalid pulses for one
// cycle), and no new request is taken in between.  Refresh and page-mode
// bursts are not modelled.
module dyn_memory #(
  parameter int unsigned W     = 80,
  parameter int unsigned DEPTH = 1 << 20,
  parameter int unsigned LAT   = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     req,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic                     ready,   // request would be taken now
  output logic                     rvalid,
  output logic [W-1:0]             rdata
);
  logic [W-1:0]              mem [DEPTH];
  logic [$clog2(LAT+1)-1:0]  busy;
  logic                      rd_pend;
  logic [$clog2(DEPTH)-1:0]  rd_addr;

  assign ready = (busy == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= '0;
      rd_pend <= 1'b0;
      rvalid  <= 1'b0;
    end else begin
      rvalid <= 1'b0;
      if (req && ready) begin
        busy    <= ($clog2(LAT+1))'(LAT - 1);
        rd_pend <= !we;
        rd_addr <= addr;
        if (LAT == 1 && !we) rvalid <= 1'b1;
      end else if (busy != '0) begin
        busy <= busy - 1'b1;
        if (busy == 1 && rd_pend) rvalid <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (req && ready && we) mem[addr] <= wdata;
    if ((req && ready && !we && LAT == 1)) rdata <= mem[addr];
    else if (busy == 1 && rd_pend)         rdata <= mem[rd_addr];
  end
endmodule
