// safil_dfm: data flow manager of a processing element.
//
// Serves the west FIFO (fifo1) and the north FIFO (fifo2) round robin,
// taking at most one frame every two cycles: in a "pick" cycle it pops the
// chosen FIFO head and starts the work the frame needs; the next cycle is
// left for the Block RAM read and the lookup logic, and nothing is popped.
// When both FIFOs hold a frame, the one not served last time wins.
//
// Frame decode (U bit = bit 0):
//   U = 0                    lookup: read the node at the I field
//   U = 1, row id == ROW_ID  update: write the D field to the I address
//   U = 1, row id /= ROW_ID  propagate: pass the frame on to the south
// Memory control (mem_en, mem_we, mem_addr, mem_wdata) is driven in the
// pick cycle itself so the Block RAM acts on the edge that ends it;
// action and frame are registered there and are valid during the
// following (second) cycle, together with the Block RAM read data.
// The round-robin rule, the two-cycle rhythm and the three actions follow
// the document; a matching row id is the document's update condition.
module safil_dfm
  import safil_pkg::*;
#(
  parameter logic [ROWID_W-1:0] ROW_ID = '0
) (
  input  logic               clk,
  input  logic               rst,
  input  frame_t             fifo1_data,
  input  logic               fifo1_empty,
  input  frame_t             fifo2_data,
  input  logic               fifo2_empty,
  output logic               fifo1_en,
  output logic               fifo2_en,
  output logic               mem_en,
  output logic               mem_we,
  output logic [IDX_W-1:0]   mem_addr,
  output logic [NODE_W-1:0]  mem_wdata,
  output action_e            action,
  output frame_t             frame
);
  logic    busy;        // second cycle of a two-cycle slot
  logic    last_was2;   // fifo2 was served last
  frame_t        sel;
  update_frame_t sel_upd;
  lookup_frame_t sel_lkp;
  action_e       act_now;

  assign sel_upd = update_frame_t'(sel);
  assign sel_lkp = lookup_frame_t'(sel);

  always_comb begin
    fifo1_en = 1'b0;
    fifo2_en = 1'b0;
    if (!busy) begin
      if (!fifo1_empty && !fifo2_empty) begin
        if (last_was2) fifo1_en = 1'b1;
        else           fifo2_en = 1'b1;
      end else if (!fifo1_empty) begin
        fifo1_en = 1'b1;
      end else if (!fifo2_empty) begin
        fifo2_en = 1'b1;
      end
    end
    sel = fifo2_en ? fifo2_data : fifo1_data;

    if (!(fifo1_en || fifo2_en))  act_now = ACT_NONE;
    else if (!sel_lkp.u)          act_now = ACT_LOOKUP;
    else if (sel_upd.pe == ROW_ID) act_now = ACT_UPDATE;
    else                          act_now = ACT_PROPAGATE;

    mem_en    = (act_now == ACT_LOOKUP) || (act_now == ACT_UPDATE);
    mem_we    = (act_now == ACT_UPDATE);
    mem_addr  = (act_now == ACT_UPDATE) ? sel_upd.i : sel_lkp.i;
    mem_wdata = sel_upd.d;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      last_was2 <= 1'b1;
      action    <= ACT_NONE;
      frame     <= '0;
    end else begin
      busy   <= (act_now != ACT_NONE);
      action <= act_now;
      if (act_now != ACT_NONE) begin
        frame     <= sel;
        last_was2 <= fifo2_en;
      end
    end
  end

  one_pop: assert property (@(posedge clk) disable iff (rst) !(fifo1_en && fifo2_en))
    else $error("safil_dfm: both FIFOs popped");
  no_back_to_back: assert property (@(posedge clk) disable iff (rst)
      (fifo1_en || fifo2_en) |=> !(fifo1_en || fifo2_en))
    else $error("safil_dfm: pick in the second cycle of a slot");

endmodule
