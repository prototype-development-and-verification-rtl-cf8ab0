// tb_safil_ccu: self-checking test of the congestion control unit.
// Replays the document's CCU example (almost-full flags of FIFOs 0, 14 and
// 35 raised one cycle apart, then all cleared) and checks su_control cycle
// by cycle against the printed sequence FFFF, FF00, F000, C000, E000, F000,
// F800 ... FFFE, FFFF; then random flag patterns against a model of
// additive increase / multiplicative decrease.
module tb_safil_ccu;
  logic clk = 0, rst = 1;
  logic [63:0] fifo_full;
  logic [15:0] su_control;
  int checks = 0, failures = 0;
  int n;

  safil_ccu dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t: %h", what, $time, su_control); end
  endtask

  function automatic logic [15:0] mask(input int k);
    return (k == 0) ? 16'h0 : ~((16'h1 << (16 - k)) - 16'h1);
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] seq [$] = '{16'hFF00, 16'hF000, 16'hC000, 16'hE000, 16'hF000, 16'hF800,
                             16'hFC00, 16'hFE00, 16'hFF00, 16'hFF80, 16'hFFC0, 16'hFFE0,
                             16'hFFF0, 16'hFFF8, 16'hFFFC, 16'hFFFE, 16'hFFFF, 16'hFFFF};
    fifo_full = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    check(su_control == 16'hFFFF, "all active after reset");
    fifo_full[0] = 1;
    @(negedge clk); check(su_control == seq[0], "seq 0");
    fifo_full[14] = 1;
    @(negedge clk); check(su_control == seq[1], "seq 1");
    fifo_full[35] = 1;
    @(negedge clk); check(su_control == seq[2], "seq 2");
    fifo_full = '0;
    for (int k = 3; k < seq.size(); k++) begin
      @(negedge clk); check(su_control == seq[k], $sformatf("seq %0d", k));
    end
    n = 16;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      fifo_full = '0;
      if ($urandom_range(0, 99) < 20) fifo_full[$urandom_range(0, 63)] = 1'b1;
      @(negedge clk);
      n = (fifo_full != 0) ? n / 2 : (n < 16 ? n + 1 : 16);
      check(su_control == mask(n), "AIMD model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
