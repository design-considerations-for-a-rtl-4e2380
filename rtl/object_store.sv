// object_store: I-structure storage kept by the evaluation unit.
//
// Each word of the store is empty or full.  A write (F_IWR) fills an empty
// word; a second write to a full word is refused and counted in waw_errors,
// which guards against indeterminate results.  A read (F_IRD) of a full word
// answers at once.  A read of an empty word is deferred: the reader's
// context (process, node, colour) is kept with the word, and the answer is
// sent when the word is written, giving read-before-write synchronisation.
// One deferred reader per word is held; a further early read of the same
// word is refused and counted in defer_errors.
//
// Request and response are one-cycle strobes: a request takes effect at the
// clock edge and its response (if any) appears in the next cycle.  The
// response carries the context of the read it answers.  The I-structure
// rules follow the published design; the word count, the single deferred
// reader per word and the direct-read-write objects, object creation,
// deletion and distribution across processing elements (whose operations the
// published design leaves to a later description) are not covered here:
// this store holds a single I-structure.
module object_store
  import dfm_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     busy,        // clearing after reset
  input  logic                     req,
  input  logic                     is_write,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [TYPE_W-1:0]        wtype,
  input  logic [DATA_W-1:0]        wdata,
  input  key_t                     ctx,         // context of a read
  output logic                     resp,
  output key_t                     resp_ctx,
  output logic [TYPE_W-1:0]        resp_type,
  output logic [DATA_W-1:0]        resp_data,
  output logic [31:0]              waw_errors,
  output logic [31:0]              defer_errors,
  output logic [31:0]              deferred
);
  localparam int unsigned AW = $clog2(WORDS);

  logic                           full   [WORDS];
  logic                           waiter [WORDS];
  logic [TYPE_W+DATA_W-1:0]       value  [WORDS];
  key_t                           who    [WORDS];
  logic [AW-1:0]                  sweep;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy         <= 1'b1;
      sweep        <= '0;
      resp         <= 1'b0;
      waw_errors   <= '0;
      defer_errors <= '0;
      deferred     <= '0;
    end else if (busy) begin
      full[sweep]   <= 1'b0;
      waiter[sweep] <= 1'b0;
      sweep         <= sweep + 1'b1;
      if (sweep == AW'(WORDS - 1)) busy <= 1'b0;
    end else begin
      resp <= 1'b0;
      if (req && is_write) begin
        if (full[addr]) begin
          waw_errors <= waw_errors + 1;
        end else begin
          full[addr]  <= 1'b1;
          value[addr] <= {wtype, wdata};
          if (waiter[addr]) begin
            waiter[addr] <= 1'b0;
            resp         <= 1'b1;
            resp_ctx     <= who[addr];
            resp_type    <= wtype;
            resp_data    <= wdata;
          end
        end
      end else if (req) begin
        if (full[addr]) begin
          resp      <= 1'b1;
          resp_ctx  <= ctx;
          {resp_type, resp_data} <= value[addr];
        end else if (waiter[addr]) begin
          defer_errors <= defer_errors + 1;
        end else begin
          waiter[addr] <= 1'b1;
          who[addr]    <= ctx;
          deferred     <= deferred + 1;
        end
      end
    end
  end
endmodule
