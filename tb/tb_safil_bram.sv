// tb_safil_bram: self-checking test of the 8192 x 32 node memory.
// Writes random words to random addresses, keeps a copy, and reads them
// back, checking the one-cycle read latency and that a write leaves the
// read data register unchanged.
module tb_safil_bram;
  logic clk = 0;
  logic en, we;
  logic [12:0] addr;
  logic [31:0] wdata, rdata, prev;
  int checks = 0, failures = 0;
  logic [31:0] shadow [int];

  safil_bram dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = '0; wdata = '0;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      en = 1; we = 1;
      addr = 13'($urandom);
      if (n < 4) addr = 13'(n == 0 ? 0 : (n == 1 ? 8191 : n));
      wdata = $urandom;
      shadow[int'(addr)] = wdata;
      @(negedge clk);
    end
    // read back everything written, in random order
    foreach (shadow[a]) begin
      en = 1; we = 0; addr = 13'(a);
      @(negedge clk);
      check(rdata == shadow[a], $sformatf("read back %0d", a));
      // a write must not disturb the read register
      prev = rdata;
      we = 1; addr = 13'($urandom); wdata = $urandom;
      shadow[int'(addr)] = wdata;
      @(negedge clk);
      check(rdata == prev, "rdata held on write");
      // disabled port holds too
      en = 0; we = 0; addr = 13'(a);
      @(negedge clk);
      check(rdata == prev, "rdata held when disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
