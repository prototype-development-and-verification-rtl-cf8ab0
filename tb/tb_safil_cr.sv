// tb_safil_cr: self-checking test of the contention resolver.
// An 18-port instance (16 selector-unit ports, PE port 16 with priority,
// loader port 17) with 32-deep port FIFOs. First the document's example
// (frames on ports 3, 7, then 1 and 8, then all 18 ports at once), then
// random traffic; every output frame and its cycle are compared with a
// queue model of "PE port first, others round robin". Finally one port is
// overfilled to see the drop flag.
module tb_safil_cr;
  import safil_pkg::*;
  localparam int NI = 18, PR = 16, D = 32;
  logic clk = 0, rst = 1;
  logic   data_av_in [NI];
  frame_t data_in    [NI];
  logic   data_av_out, dropped;
  frame_t data_out;
  int checks = 0, failures = 0;
  frame_t q [NI][$];
  int last = NI - 1;
  bit     exp_av;
  frame_t exp_d;
  int prio_wins = 0, drops = 0;

  safil_cr #(.NUM_IN(NI), .PRIO_PORT(PR), .FIFO_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One cycle: check last cycle's output, drive this cycle's inputs,
  // update the model.
  task automatic cycle(input bit [NI-1:0] av);
    check(data_av_out == exp_av, "output strobe");
    if (exp_av) check(data_out == exp_d, "output frame");
    for (int p = 0; p < NI; p++) begin
      data_av_in[p] = av[p];
      data_in[p]    = {$urandom, $urandom};
      data_in[p][7:0] = 8'(p);
      if (av[p]) q[p].push_back(data_in[p]);
    end
    exp_av = 0;
    if (q[PR].size() > 0) begin
      exp_av = 1; exp_d = q[PR].pop_front(); prio_wins++;
    end else begin
      for (int k = 1; k <= NI; k++) begin
        int idx;
        idx = (last + k) % NI;
        if (!exp_av && q[idx].size() > 0) begin
          exp_av = 1; exp_d = q[idx].pop_front(); last = idx;
        end
      end
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NI; p++) begin data_av_in[p] = 0; data_in[p] = '0; end
    exp_av = 0; exp_d = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    cycle(18'(1) << 3);
    cycle(18'(1) << 7);
    cycle((18'(1) << 1) | (18'(1) << 8));
    cycle('0);
    cycle('1);
    repeat (25) cycle('0);
    for (int n = 0; n < 3000; n++) begin
      bit [NI-1:0] av;
      for (int p = 0; p < NI; p++) av[p] = ($urandom_range(0, 99) < 4);
      cycle(av);
    end
    repeat (40) cycle('0);
    check(prio_wins > 0, "priority port used");
    // overfill port 5 in one burst with the output busy on port 16
    for (int n = 0; n < D + 4; n++) begin
      for (int p = 0; p < NI; p++) data_av_in[p] = 0;
      data_av_in[5] = 1;
      data_av_in[PR] = 1;
      @(negedge clk);
      if (dropped) drops++;
    end
    for (int p = 0; p < NI; p++) data_av_in[p] = 0;
    repeat (3) begin @(negedge clk); if (dropped) drops++; end
    check(drops > 0, "overflow drop flagged");
    $display("priority_wins=%0d drops=%0d", prio_wins, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
