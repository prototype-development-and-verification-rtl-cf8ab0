// tb_safil_dfm: self-checking test of the data flow manager.
// The two FIFOs are modelled by queues in the testbench. Checks: at most
// one pop every two cycles, strict alternation when both FIFOs hold frames,
// the decode of lookup / update (own row) / propagate (other row) frames,
// the memory control driven in the pick cycle, and the registered action
// and frame in the cycle after.
module tb_safil_dfm;
  import safil_pkg::*;
  localparam logic [2:0] ME = 3'd5;
  logic clk = 0, rst = 1;
  frame_t fifo1_data, fifo2_data, frame;
  logic fifo1_empty, fifo2_empty, fifo1_en, fifo2_en;
  logic mem_en, mem_we;
  logic [12:0] mem_addr;
  logic [31:0] mem_wdata;
  action_e action;
  int checks = 0, failures = 0;
  frame_t q1 [$], q2 [$];
  int lookups = 0, updates = 0, propagates = 0, alternations = 0;

  safil_dfm #(.ROW_ID(ME)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic frame_t rnd_frame();
    frame_t f;
    f = {$urandom, $urandom};
    case ($urandom_range(0, 2))
      0: f[0] = 1'b0;                              // lookup
      1: begin f[0] = 1'b1; f[3:1] = ME; end        // update for this row
      default: begin f[0] = 1'b1; f[3:1] = ME ^ 3'($urandom_range(1, 7)); end
    endcase
    return f;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign fifo1_empty = (q1.size() == 0);
  assign fifo2_empty = (q2.size() == 0);
  assign fifo1_data  = fifo1_empty ? '0 : q1[0];
  assign fifo2_data  = fifo2_empty ? '0 : q2[0];

  initial begin
    bit     picked_prev, last2, have_prev;
    frame_t exp_frame;
    action_e exp_act;
    picked_prev = 0; last2 = 1; have_prev = 0;
    exp_act = ACT_NONE; exp_frame = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if ($urandom_range(0, 99) < 30) q1.push_back(rnd_frame());
      if ($urandom_range(0, 99) < 30) q2.push_back(rnd_frame());
      #1;
      // registered outputs describe the previous pick
      check(action == exp_act, "registered action");
      if (exp_act != ACT_NONE) check(frame == exp_frame, "registered frame");
      // which FIFO should be popped now
      begin
        bit e1, e2, want1, want2;
        frame_t f;
        e1 = q1.size() > 0; e2 = q2.size() > 0;
        want1 = 0; want2 = 0;
        if (!picked_prev) begin
          if (e1 && e2) begin
            want1 = last2; want2 = !last2; alternations++;
          end else begin
            want1 = e1; want2 = e2;
          end
        end
        check(fifo1_en == want1 && fifo2_en == want2, "pop choice");
        exp_act = ACT_NONE;
        if (want1 || want2) begin
          f = want2 ? q2[0] : q1[0];
          if (!f[0])              begin exp_act = ACT_LOOKUP;    lookups++;    end
          else if (f[3:1] == ME)  begin exp_act = ACT_UPDATE;    updates++;    end
          else                    begin exp_act = ACT_PROPAGATE; propagates++; end
          check(mem_en == (exp_act != ACT_PROPAGATE), "memory enable");
          check(mem_we == (exp_act == ACT_UPDATE), "memory write");
          if (exp_act == ACT_LOOKUP) check(mem_addr == f[18:6], "lookup address");
          if (exp_act == ACT_UPDATE) check(mem_addr == f[16:4] && mem_wdata == f[48:17], "update address/data");
          exp_frame = f;
          last2 = want2;
        end else begin
          check(!mem_en, "memory idle");
        end
        picked_prev = want1 || want2;
        @(posedge clk);
        #1;
        if (want1) void'(q1.pop_front());
        if (want2) void'(q2.pop_front());
      end
    end
    check(lookups > 0 && updates > 0 && propagates > 0 && alternations > 0, "all actions seen");
    $display("lookups=%0d updates=%0d propagates=%0d ties=%0d", lookups, updates, propagates, alternations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
