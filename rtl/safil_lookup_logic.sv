// safil_lookup_logic: the "combinational logic" of a processing element.
//
// Given the lookup frame being served and the trie node read for it from
// the Block RAM, it takes one step down the binary trie. The most
// significant bit of the A field picks the child: 0 follows the south
// index (SI) and sends the frame south, 1 follows the east index (EI) and
// sends it east. If the node is a valid prefix (V = 1) its port number
// replaces the P field, so the frame always carries the longest match so
// far. A child index of zero is a null pointer: the search ends here and
// the carried port number is the result for the backplane. Otherwise the
// outgoing frame holds A shifted left by one, the child index and the
// updated port number. The rules are the document's; the module is purely
// combinational and has no timing of its own.
module safil_lookup_logic
  import safil_pkg::*;
(
  input  lookup_frame_t     frame_in,
  input  node_t             node,
  output lookup_frame_t     frame_out,
  output logic              go_east,
  output logic              terminate,
  output logic [PORT_W-1:0] result_port
);
  logic [IDX_W-1:0]  child;
  logic [PORT_W-1:0] port;

  always_comb begin
    go_east     = frame_in.a[ADDR_W-1];
    child       = go_east ? node.ei : node.si;
    port        = node.v ? node.pn : frame_in.p;
    terminate   = (child == '0);
    result_port = port;
    frame_out.a = {frame_in.a[ADDR_W-2:0], 1'b0};
    frame_out.i = child;
    frame_out.p = port;
    frame_out.u = 1'b0;
  end
endmodule
