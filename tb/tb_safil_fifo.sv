// tb_safil_fifo: self-checking test of the fall-through FIFO.
// A small instance (8 deep, almost full at 4) is driven with random reads
// and writes against a queue model. Every cycle it checks the head word,
// the empty / almost-full / full flags, the same-cycle fall-through of a
// word written into an empty FIFO and the drop of a write into a full FIFO.
module tb_safil_fifo;
  localparam int W = 49, D = 8, AF = 4;
  logic clk = 0, rst = 1;
  logic wr, rd;
  logic [W-1:0] wr_data, rd_data;
  logic empty, almost_full, full, dropped;
  int checks = 0, failures = 0;
  int bypasses = 0, drops_seen = 0;
  logic [W-1:0] model [$];
  logic exp_drop;

  safil_fifo #(.WIDTH(W), .DEPTH(D), .ALMOST_FULL_LEVEL(AF)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = 0; rd = 0; wr_data = '0; exp_drop = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      check(dropped == exp_drop, "dropped pulse");
      // bias the mix so that the FIFO visits both empty and full
      wr = ($urandom_range(0, 99) < ((cyc / 500) % 2 ? 80 : 35));
      wr_data = {$urandom, $urandom};
      rd = ($urandom_range(0, 99) < ((cyc / 500) % 2 ? 30 : 70));
      #1;
      if (model.size() == 0 && !wr) rd = 0;
      #1;
      check(empty == (model.size() == 0 && !wr), "empty flag");
      check(full == (model.size() == D), "full flag");
      check(almost_full == (model.size() >= AF), "almost_full flag");
      if (model.size() > 0) check(rd_data == model[0], "head word");
      else if (wr) begin
        check(rd_data == wr_data, "fall-through word");
        if (rd) bypasses++;
      end
      @(posedge clk);
      exp_drop = wr && (model.size() == D);
      if (exp_drop) drops_seen++;
      if (model.size() == 0 && wr && rd) begin
        // passed straight through
      end else begin
        int nbefore;
        nbefore = model.size();
        if (rd && nbefore > 0) void'(model.pop_front());
        if (wr && nbefore < D) model.push_back(wr_data);
      end
    end
    check(bypasses > 0, "fall-through exercised");
    check(drops_seen > 0, "overflow exercised");
    $display("bypasses=%0d drops=%0d", bypasses, drops_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
