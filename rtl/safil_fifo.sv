// safil_fifo: first-word-fall-through FIFO with an almost-full flag.
//
// Used twice in every processing element (west and north inputs) and once
// per input port of every contention resolver. The head entry is always
// visible on rd_data while empty is low; asserting rd pops it. A write
// (wr high) is stored at the rising edge and is visible on rd_data from the
// next cycle. A write to a completely full FIFO is dropped and counted on
// the one-cycle pulse `dropped`: the document relies on the congestion
// controller to keep that from happening. almost_full is high while the
// occupancy is at or above ALMOST_FULL_LEVEL (the document's "predefined
// threshold", 50 % of the 1024-entry depth by default). Reset empties the
// FIFO; the storage itself is not cleared, so it maps onto distributed or
// block RAM.
//
// First word fall through, as the document asks for: a word written into an
// empty FIFO is passed straight to rd_data (and empty drops) in the same
// cycle it is written, so the reader may take it at once; it is then never
// stored. This keeps the per-PE latency at the document's two cycles.
module safil_fifo #(
  parameter int unsigned WIDTH             = 49,
  parameter int unsigned DEPTH             = 1024,
  parameter int unsigned ALMOST_FULL_LEVEL = 512
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             almost_full,
  output logic             full,
  output logic             dropped
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count;
  logic             do_wr, do_rd, stored_empty, bypass_taken;

  assign stored_empty = (count == '0);
  assign empty        = stored_empty && !wr;
  assign full         = (count == (AW+1)'(DEPTH));
  assign almost_full  = (count >= (AW+1)'(ALMOST_FULL_LEVEL));
  assign rd_data      = stored_empty ? wr_data : mem[rptr];
  assign bypass_taken = rd && stored_empty && wr;
  assign do_rd        = rd && !stored_empty;
  assign do_wr        = wr && !full && !bypass_taken;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr    <= '0;
      rptr    <= '0;
      count   <= '0;
      dropped <= 1'b0;
    end else begin
      dropped <= wr && full;
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  rd_when_empty: assert property (@(posedge clk) disable iff (rst) rd |-> !empty)
    else $error("safil_fifo: read while empty");

endmodule
