// safil_rdl: RAM data loader, the path by which trie nodes are loaded and
// updated while lookups keep running.
//
// Takes one node write at a time: the 32-bit node, its 13-bit Block RAM
// address and a 6-bit PE id. The low three id bits name the column, the
// high three the row within it (the document's example sends id 111010 to
// column 2). The loader builds an update frame {node, address, row, U = 1}
// and sends it to the north contention resolver of that column, whence it
// walks south until the PE of that row stores it.
//
// Timing: inputs sampled while data_update_av_in is high; the frame
// appears on data_update_out[column] with data_update_av_out[column] high
// for one cycle in the next cycle.
module safil_rdl
  import safil_pkg::*;
#(
  parameter int unsigned NUM_COL = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              data_update_av_in,
  input  logic [NODE_W-1:0] ram_data_in,
  input  logic [IDX_W-1:0]  ram_address_in,
  input  logic [PEID_W-1:0] pe_id_in,
  output logic              data_update_av_out [NUM_COL],
  output frame_t            data_update_out    [NUM_COL]
);
  logic [ROWID_W-1:0] col, row;
  update_frame_t      frame;

  always_comb begin
    col      = pe_id_in[ROWID_W-1:0];
    row      = pe_id_in[PEID_W-1 -: ROWID_W];
    frame.d  = ram_data_in;
    frame.i  = ram_address_in;
    frame.pe = row;
    frame.u  = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < NUM_COL; c++) begin
        data_update_av_out[c] <= 1'b0;
        data_update_out[c]    <= '0;
      end
    end else begin
      for (int c = 0; c < NUM_COL; c++) begin
        data_update_av_out[c] <= data_update_av_in && (int'(col) == c);
        data_update_out[c]    <= frame_t'(frame);
      end
    end
  end
endmodule
