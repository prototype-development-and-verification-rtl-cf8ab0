// safil_cr: contention resolver in front of one boundary PE.
//
// Every selector unit has a path to every CR, the PE at the far end of the
// CR's row or column wraps its east or south output back into it, and the
// CRs on the north side also take the RAM data loader's update frames. Many
// frames can arrive in the same cycle, so each input port has its own FIFO
// (the document's buffered CR). Each cycle the CR forwards at most one
// frame to its PE: the wrapped-around PE port (PRIO_PORT) always goes
// first, because a search already in the array must not be held up by new
// ones; the other ports are served round robin, starting after the port
// served last.
//
// Ports 0..NUM_IN-1: by this design's convention 0..15 are the selector
// units, 16 is the PE and 17 (north CRs only) the RAM data loader.
// Timing: a frame arriving in cycle k can be chosen in cycle k (FIFO
// fall-through) and leaves on data_out with data_av_out high in cycle k+1.
// The port FIFOs are FIFO_DEPTH = 2048 deep: the document asks for CR FIFOs
// at least 1.78 times the 1024-entry PE FIFOs so that they never fill
// before the congestion controller reacts; 2048 is the smallest power of
// two that satisfies that. A write into a full port FIFO is dropped and
// shows on `dropped`.
module safil_cr
  import safil_pkg::*;
#(
  parameter int unsigned NUM_IN     = 18,
  parameter int unsigned PRIO_PORT  = 16,
  parameter int unsigned FIFO_DEPTH = 2048
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   data_av_in [NUM_IN],
  input  frame_t data_in    [NUM_IN],
  output logic   data_av_out,
  output frame_t data_out,
  output logic   dropped
);
  localparam int unsigned PW = $clog2(NUM_IN);

  frame_t            head   [NUM_IN];
  logic [NUM_IN-1:0] empty, rd, drop;
  logic [PW-1:0]     last, pick;
  logic              any;

  for (genvar g = 0; g < NUM_IN; g++) begin : g_port
    logic af_unused, full_unused;
    safil_fifo #(.WIDTH(FRAME_W), .DEPTH(FIFO_DEPTH), .ALMOST_FULL_LEVEL(FIFO_DEPTH)) u_fifo (
      .clk, .rst, .wr(data_av_in[g]), .wr_data(data_in[g]), .rd(rd[g]),
      .rd_data(head[g]), .empty(empty[g]), .almost_full(af_unused),
      .full(full_unused), .dropped(drop[g]));
  end

  // Arbitration: priority port first, else the first non-empty port after
  // `last` in circular order.
  function automatic logic [PW-1:0] rr_next(input logic [NUM_IN-1:0] req,
                                            input logic [PW-1:0]     after);
    logic [PW-1:0] found;
    logic          hit;
    found = '0;
    hit   = 1'b0;
    for (int k = 1; k <= NUM_IN; k++) begin
      if (!hit && req[(int'(after) + k) % NUM_IN]) begin
        hit   = 1'b1;
        found = PW'((int'(after) + k) % NUM_IN);
      end
    end
    return found;
  endfunction

  assign any  = ~&empty;
  assign pick = !empty[PRIO_PORT] ? PW'(PRIO_PORT) : rr_next(~empty, last);
  assign rd   = any ? (NUM_IN'(1) << pick) : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      last        <= PW'(NUM_IN - 1);
      data_av_out <= 1'b0;
      data_out    <= '0;
      dropped     <= 1'b0;
    end else begin
      dropped     <= |drop;
      data_av_out <= any;
      if (any) begin
        data_out <= head[pick];
        if (int'(pick) != PRIO_PORT) last <= pick;
      end
    end
  end
endmodule
