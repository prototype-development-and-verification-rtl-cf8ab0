// safil_su: selector unit, the entry point of a search.
//
// Takes a 32-bit destination IP address and does the initial partitioning:
// its leftmost PART_W (= r = 4) bits select one of the 16 output ports, one
// per contention resolver (a 4-to-16 decoder, document Table 4-3). On that
// port it emits a lookup frame whose A field is the remaining 28 address
// bits, left-aligned in the 30-bit field, whose I field is the Block RAM
// index of that partition's subtree root, whose P field is DEFAULT_PORT
// (the answer when no prefix on the path is valid) and whose U bit is 0.
//
// Timing: an address presented with data_av_in high while enable is high
// is registered; the frame appears on data_out[k] with data_av_out[k] high
// for one cycle in the next cycle. An address offered while enable is low
// (the congestion controller has switched this unit off) is not taken and
// pulses `refused`. The partitioning rule is the document's; the root
// index of partition k (k + 1, so that the two partitions entering the
// corner PE never share a root and index 0 stays the null pointer), the
// left alignment of A and the enable gating are this design's choices.
module safil_su
  import safil_pkg::*;
#(
  parameter int unsigned        NUM_OUT      = 16,
  parameter logic [PORT_W-1:0]  DEFAULT_PORT = '1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            enable,
  input  logic            data_av_in,
  input  logic [IP_W-1:0] data_in,
  output logic            data_av_out [NUM_OUT],
  output frame_t          data_out    [NUM_OUT],
  output logic            refused
);
  localparam int unsigned PAD = ADDR_W - (IP_W - PART_W);

  function automatic logic [IDX_W-1:0] root_index(input logic [PART_W-1:0] part);
    return IDX_W'(part) + 1'b1;
  endfunction

  logic [PART_W-1:0] part;
  lookup_frame_t     frame;

  always_comb begin
    part    = data_in[IP_W-1 -: PART_W];
    frame.a = {data_in[IP_W-PART_W-1:0], PAD'(0)};
    frame.i = root_index(part);
    frame.p = DEFAULT_PORT;
    frame.u = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      refused <= 1'b0;
      for (int k = 0; k < NUM_OUT; k++) begin
        data_av_out[k] <= 1'b0;
        data_out[k]    <= '0;
      end
    end else begin
      refused <= data_av_in && !enable;
      for (int k = 0; k < NUM_OUT; k++) begin
        data_av_out[k] <= data_av_in && enable && (int'(part) == k);
        data_out[k]    <= frame_t'(frame);
      end
    end
  end
endmodule
