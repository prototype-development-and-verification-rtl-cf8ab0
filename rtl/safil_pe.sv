// safil_pe: one processing element (PE) of the SAFIL array.
//
// Each PE holds one level-slice of the trie in its own Block RAM and serves
// frames arriving from its west and north neighbours. It contains two
// first-word-fall-through FIFOs (west, north), the data flow manager, the
// 8192 x 32 Block RAM and the lookup logic, as in the document's PE block
// diagram.
//
// Per frame, every two cycles at most:
//   lookup    read the node, step one trie level; forward the new frame
//             south (address bit 0) or east (address bit 1), or, at a null
//             child, put the carried port number on the backplane
//   update    (update frame whose row id equals ROW_ID) write the node
//   propagate (update frame for another row) pass it south unchanged
//
// Timing: a frame presented with data_av_in_* high in cycle k can be picked
// in that same cycle (FIFO fall-through), and its result shows on the
// outputs in cycle k+2 for one cycle: the document's two-cycle PE latency.
// Output strobes (data_av_out_*, backplane_av) are one cycle long.
// fifo_almost_full is the registered OR of both FIFOs' almost-full flags.
// backplane_av is this design's addition: the document's 5-bit backplane
// output alone cannot tell a result of port 0 from no result.
module safil_pe
  import safil_pkg::*;
#(
  parameter logic [ROWID_W-1:0] ROW_ID            = '0,
  parameter int unsigned        FIFO_DEPTH        = 1024,
  parameter int unsigned        ALMOST_FULL_LEVEL = 512,
  parameter int unsigned        MEM_ADDR_W        = IDX_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              data_av_in_west,
  input  frame_t            data_in_west,
  input  logic              data_av_in_north,
  input  frame_t            data_in_north,
  output logic              data_av_out_east,
  output frame_t            data_out_east,
  output logic              data_av_out_south,
  output frame_t            data_out_south,
  output logic [PORT_W-1:0] data_backplane,
  output logic              backplane_av,
  output logic              fifo_almost_full,
  output logic              fifo_dropped
);
  frame_t            f1_data, f2_data, dfm_frame;
  logic              f1_empty, f2_empty, f1_en, f2_en;
  logic              f1_af, f2_af, f1_full, f2_full, f1_drop, f2_drop;
  logic              mem_en, mem_we;
  logic [IDX_W-1:0]  mem_addr;
  logic [NODE_W-1:0] mem_wdata, mem_rdata;
  action_e           action;
  lookup_frame_t     next_frame;
  logic              go_east, terminate;
  logic [PORT_W-1:0] result_port;

  safil_fifo #(.WIDTH(FRAME_W), .DEPTH(FIFO_DEPTH), .ALMOST_FULL_LEVEL(ALMOST_FULL_LEVEL)) u_fifo_west (
    .clk, .rst, .wr(data_av_in_west), .wr_data(data_in_west), .rd(f1_en),
    .rd_data(f1_data), .empty(f1_empty), .almost_full(f1_af), .full(f1_full), .dropped(f1_drop));

  safil_fifo #(.WIDTH(FRAME_W), .DEPTH(FIFO_DEPTH), .ALMOST_FULL_LEVEL(ALMOST_FULL_LEVEL)) u_fifo_north (
    .clk, .rst, .wr(data_av_in_north), .wr_data(data_in_north), .rd(f2_en),
    .rd_data(f2_data), .empty(f2_empty), .almost_full(f2_af), .full(f2_full), .dropped(f2_drop));

  safil_dfm #(.ROW_ID(ROW_ID)) u_dfm (
    .clk, .rst,
    .fifo1_data(f1_data), .fifo1_empty(f1_empty),
    .fifo2_data(f2_data), .fifo2_empty(f2_empty),
    .fifo1_en(f1_en), .fifo2_en(f2_en),
    .mem_en, .mem_we, .mem_addr, .mem_wdata,
    .action, .frame(dfm_frame));

  safil_bram #(.DATA_W(NODE_W), .ADDR_W(MEM_ADDR_W)) u_bram (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr[MEM_ADDR_W-1:0]),
    .wdata(mem_wdata), .rdata(mem_rdata));

  safil_lookup_logic u_logic (
    .frame_in(lookup_frame_t'(dfm_frame)), .node(node_t'(mem_rdata)),
    .frame_out(next_frame), .go_east, .terminate, .result_port);

  always_ff @(posedge clk) begin
    if (rst) begin
      data_av_out_east  <= 1'b0;
      data_av_out_south <= 1'b0;
      data_out_east     <= '0;
      data_out_south    <= '0;
      data_backplane    <= '0;
      backplane_av      <= 1'b0;
      fifo_almost_full  <= 1'b0;
      fifo_dropped      <= 1'b0;
    end else begin
      fifo_almost_full  <= f1_af || f2_af;
      fifo_dropped      <= f1_drop || f2_drop;
      data_av_out_east  <= 1'b0;
      data_av_out_south <= 1'b0;
      backplane_av      <= 1'b0;
      data_backplane    <= '0;
      unique case (action)
        ACT_LOOKUP: begin
          if (terminate) begin
            data_backplane <= result_port;
            backplane_av   <= 1'b1;
          end else if (go_east) begin
            data_out_east    <= frame_t'(next_frame);
            data_av_out_east <= 1'b1;
          end else begin
            data_out_south    <= frame_t'(next_frame);
            data_av_out_south <= 1'b1;
          end
        end
        ACT_PROPAGATE: begin
          data_out_south    <= dfm_frame;
          data_av_out_south <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  // The full flags are kept for visibility of overflow in simulation.
  full_seen: cover property (@(posedge clk) f1_full || f2_full);

endmodule
