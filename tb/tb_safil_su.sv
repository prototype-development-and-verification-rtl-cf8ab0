// tb_safil_su: self-checking test of the selector unit.
// Feeds the document's example addresses (FFFFFFFF, CFFFFFFF, 0FFFFFFF,
// 2FFFFFFF, one per cycle, which must leave on ports 15, 12, 0 and 2) and
// random addresses; checks the port chosen by the top four bits, the frame
// fields (A = remaining 28 bits left-aligned, I = partition + 1, P = 31,
// U = 0), the one-cycle latency, and that a disabled unit takes nothing.
module tb_safil_su;
  import safil_pkg::*;
  logic clk = 0, rst = 1;
  logic enable, data_av_in, refused;
  logic [31:0] data_in;
  logic   data_av_out [16];
  frame_t data_out    [16];
  int checks = 0, failures = 0;

  safil_su dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(input logic [31:0] ip, input bit en, input int exp_port);
    data_in = ip; data_av_in = 1; enable = en;
    @(negedge clk);
    data_av_in = 0;
    check(refused == !en, "refused flag");
    for (int k = 0; k < 16; k++) begin
      check(data_av_out[k] == (en && k == exp_port), $sformatf("port strobe %0d", k));
      if (en && k == exp_port)
        check(data_out[k] == {ip[27:0], 2'b00, 13'(exp_port + 1), 5'h1F, 1'b0}, "frame");
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_av_in = 0; data_in = '0; enable = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    send(32'hFFFFFFFF, 1, 15);
    send(32'hCFFFFFFF, 1, 12);
    send(32'h0FFFFFFF, 1, 0);
    send(32'h2FFFFFFF, 1, 2);
    for (int n = 0; n < 500; n++) begin
      logic [31:0] ip;
      bit en;
      ip = $urandom;
      en = ($urandom_range(0, 9) != 0);
      send(ip, en, int'(ip[31:28]));
    end
    @(negedge clk);
    for (int k = 0; k < 16; k++) check(!data_av_out[k], "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
