// tb_safil_lookup_logic: self-checking test of one trie step.
// First the node and frames of the document's PE example (node word
// 0x000800EB: south child 1, east child 3, port 21, valid), then random
// frames and nodes, each against expected values built from raw bit
// slices of the 49-bit frame and the 32-bit node.
module tb_safil_lookup_logic;
  import safil_pkg::*;
  logic [48:0] fin_raw, fout_raw;
  logic [31:0] node_raw;
  lookup_frame_t frame_out;
  logic go_east, terminate;
  logic [4:0] result_port;
  int checks = 0, failures = 0;

  safil_lookup_logic dut (
    .frame_in(lookup_frame_t'(fin_raw)), .node(node_t'(node_raw)),
    .frame_out, .go_east, .terminate, .result_port);
  assign fout_raw = frame_out;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step_and_check();
    logic        bit0;
    logic [12:0] child;
    logic [4:0]  port;
    #1;
    bit0  = fin_raw[48];
    child = bit0 ? node_raw[18:6] : node_raw[31:19];
    port  = node_raw[0] ? node_raw[5:1] : fin_raw[5:1];
    check(go_east == bit0, "direction");
    check(terminate == (child == 0), "null pointer");
    check(result_port == port, "result port");
    if (child != 0)
      check(fout_raw == {fin_raw[47:19], 1'b0, child, port, 1'b0}, "next frame");
  endtask

  initial begin
    node_raw = 32'h000800EB;
    fin_raw  = {30'b011101110111011100111100000000, 13'd1, 5'd2, 1'b0};
    step_and_check();
    check(!go_east && fout_raw[18:6] == 13'd1 && fout_raw[5:1] == 5'd21, "example west frame goes south");
    fin_raw  = {30'b111111000001111100000000001111, 13'd1, 5'd0, 1'b0};
    step_and_check();
    check(go_east && fout_raw[18:6] == 13'd3, "example north frame goes east");
    node_raw = 32'h0000000B;          // leaf with port 5
    step_and_check();
    check(terminate && result_port == 5'd5, "leaf gives its port");
    node_raw = 32'h00000000;          // invalid leaf: carried port
    fin_raw[5:1] = 5'd9;
    step_and_check();
    check(terminate && result_port == 5'd9, "carried port on null");
    for (int n = 0; n < 5000; n++) begin
      fin_raw = {$urandom, $urandom};
      fin_raw[0] = 1'b0;
      node_raw = $urandom;
      if (n % 4 == 0) node_raw[31:19] = '0;
      if (n % 4 == 1) node_raw[18:6]  = '0;
      step_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
