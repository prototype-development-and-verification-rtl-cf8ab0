// tb_safil_rdl: self-checking test of the RAM data loader.
// The document's example (PE id 111010 goes to column 2 with row 7) and
// random node writes: checks that exactly the target column's output
// strobes one cycle later and that the update frame has the node, the
// address, the row and U = 1 in the right bits.
module tb_safil_rdl;
  import safil_pkg::*;
  logic clk = 0, rst = 1;
  logic data_update_av_in;
  logic [31:0] ram_data_in;
  logic [12:0] ram_address_in;
  logic [5:0]  pe_id_in;
  logic   data_update_av_out [8];
  frame_t data_update_out    [8];
  int checks = 0, failures = 0;

  safil_rdl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(input logic [31:0] d, input logic [12:0] a, input logic [5:0] id);
    ram_data_in = d; ram_address_in = a; pe_id_in = id; data_update_av_in = 1;
    @(negedge clk);
    data_update_av_in = 0;
    for (int c = 0; c < 8; c++) begin
      check(data_update_av_out[c] == (c == int'(id[2:0])), $sformatf("column strobe %0d", c));
      if (c == int'(id[2:0]))
        check(data_update_out[c] == {d, a, id[5:3], 1'b1}, "update frame");
    end
    @(negedge clk);
    for (int c = 0; c < 8; c++) check(!data_update_av_out[c], "strobe one cycle");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_update_av_in = 0; ram_data_in = '0; ram_address_in = '0; pe_id_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    send(32'h00FFFFFF, 13'b1010101010101, 6'b111010);
    for (int n = 0; n < 300; n++) send($urandom, 13'($urandom), 6'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
