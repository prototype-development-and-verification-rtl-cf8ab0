// tb_safil_pe: self-checking test of one processing element (row id 0,
// 16-deep FIFOs, almost full at 8). Follows the document's five PE
// scenarios with this design's frame layout:
//   1 a west and a north lookup one cycle apart through an intermediate
//     valid node: south then east output, two cycles after each pick;
//   2 three frames on each side at once: outputs alternate south / east,
//     one every two cycles (round robin);
//   3 lookups reaching nodes with two null children: backplane results;
//   4 update frames for another row: passed south unchanged;
//   5 a lookup, an update of the node it used, the same lookup again: the
//     second result reflects the new node.
// Then random lookups over random nodes, checked against expected outputs
// computed from the node table, and a burst that raises almost-full and
// overflows a FIFO.
module tb_safil_pe;
  import safil_pkg::*;
  logic clk = 0, rst = 1;
  logic   data_av_in_west, data_av_in_north;
  frame_t data_in_west, data_in_north;
  logic   data_av_out_east, data_av_out_south, backplane_av;
  frame_t data_out_east, data_out_south;
  logic [4:0] data_backplane;
  logic   fifo_almost_full, fifo_dropped;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [31:0] nodes [int];

  typedef struct { int kind; frame_t f; int at; } ev_t;  // kind 0 south 1 east 2 backplane
  ev_t got [$];

  safil_pe #(.ROW_ID(3'd0), .FIFO_DEPTH(16), .ALMOST_FULL_LEVEL(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // record outputs, stamped with the cycle in which they are visible
  always @(negedge clk) if (!rst) begin
    if (data_av_out_south) got.push_back('{0, data_out_south, cyc});
    if (data_av_out_east)  got.push_back('{1, data_out_east, cyc});
    if (backplane_av)      got.push_back('{2, frame_t'(data_backplane), cyc});
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  function automatic frame_t lk(input logic [29:0] a, input logic [12:0] i, input logic [4:0] p);
    return {a, i, p, 1'b0};
  endfunction
  function automatic frame_t up(input logic [31:0] d, input logic [12:0] i, input logic [2:0] row);
    return {d, i, row, 1'b1};
  endfunction

  // expected result of one lookup step, from raw bits
  function automatic ev_t expect_step(input frame_t f);
    logic [31:0] nd;
    logic [12:0] ch;
    logic [4:0]  pt;
    ev_t e;
    nd = nodes[int'(f[18:6])];
    ch = f[48] ? nd[18:6] : nd[31:19];
    pt = nd[0] ? nd[5:1] : f[5:1];
    if (ch == 0) e = '{2, frame_t'(pt), 0};
    else         e = '{f[48] ? 1 : 0, {f[47:19], 1'b0, ch, pt, 1'b0}, 0};
    return e;
  endfunction

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic drive(input bit w, input frame_t wf, input bit n, input frame_t nf);
    data_av_in_west = w;  data_in_west  = wf;
    data_av_in_north = n; data_in_north = nf;
    @(negedge clk);
    data_av_in_west = 0; data_av_in_north = 0;
  endtask

  task automatic load(input int addr, input logic [31:0] word);
    drive(0, '0, 1, up(word, 13'(addr), 3'd0));
    nodes[addr] = word;
    idle(2);
  endtask

  task automatic expect_event(input ev_t e, input int at, input string what);
    bit found = 0;
    foreach (got[k]) if (!found && got[k].kind == e.kind && got[k].f == e.f) begin
      found = 1;
      if (at >= 0) check(got[k].at == at, {what, " cycle"});
      got.delete(k);
    end
    check(found, what);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_t wf, nf;
    int t0;
    data_av_in_west = 0; data_av_in_north = 0; data_in_west = '0; data_in_north = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    idle(10);

    // ---- scenario 1
    load(1, 32'h000800EB);              // SI 1, EI 3, port 21, valid
    got.delete();
    wf = lk(30'b011101110111011100111100000000, 13'd1, 5'd2);
    nf = lk(30'b111111000001111100000000001111, 13'd1, 5'd0);
    t0 = cyc;
    drive(1, wf, 0, '0);
    drive(0, '0, 1, nf);
    idle(8);
    expect_event('{0, lk({wf[47:19], 1'b0}, 13'd1, 5'd21), 0}, t0 + 2, "s1 south");
    expect_event('{1, lk({nf[47:19], 1'b0}, 13'd3, 5'd21), 0}, t0 + 4, "s1 east");
    check(got.size() == 0, "s1 nothing else");

    // ---- scenario 2
    load(4, {13'd100, 13'd200, 5'd7, 1'b0});  // intermediate, not a prefix
    got.delete();
    wf = lk(30'h0EEEEEEE, 13'd4, 5'd2);
    nf = lk(30'h3E0F803C, 13'd4, 5'd0);
    t0 = cyc;
    drive(1, wf, 1, nf);
    drive(1, wf, 1, nf);
    drive(1, wf, 1, nf);
    idle(14);
    check(got.size() == 6, "s2 six outputs");
    foreach (got[k]) begin
      check(got[k].at == t0 + 2 + 2 * k, "s2 one output every two cycles");
      check(got[k].kind == (k % 2), "s2 round robin alternation");
      check(got[k].f[18:6] == ((k % 2) ? 13'd200 : 13'd100), "s2 child index");
      check(got[k].f[5:1] == ((k % 2) ? 5'd0 : 5'd2), "s2 carried port");
    end
    got.delete();

    // ---- scenario 3
    load(0, 32'h0000000B);
    load(3, 32'h0000003F);
    got.delete();
    t0 = cyc;
    drive(1, lk(30'h1DDDDDDC, 13'd0, 5'd2), 1, lk(30'h3E0F803C, 13'd3, 5'd7));
    idle(8);
    expect_event('{2, frame_t'(5'd5), 0}, t0 + 2, "s3 backplane west");
    expect_event('{2, frame_t'(5'd31), 0}, t0 + 4, "s3 backplane north");
    check(got.size() == 0, "s3 nothing else");

    // ---- scenario 4
    got.delete();
    nf = up(32'hF83E0078, 13'd0, 3'd1);
    t0 = cyc;
    drive(0, '0, 1, nf);
    drive(0, '0, 1, nf);
    drive(0, '0, 1, nf);
    idle(10);
    check(got.size() == 3, "s4 three propagated frames");
    foreach (got[k]) begin
      check(got[k].kind == 0 && got[k].f == nf, "s4 passed south unchanged");
      check(got[k].at == t0 + 2 + 2 * k, "s4 timing");
    end
    got.delete();

    // ---- scenario 5
    wf = lk(30'h3DDDDDDC, 13'd1, 5'd0);       // first bit 1: east
    drive(1, wf, 0, '0);
    idle(4);
    expect_event('{1, lk({wf[47:19], 1'b0}, 13'd3, 5'd21), 0}, -1, "s5 before update");
    drive(0, '0, 1, up(32'hFFFFFFFF, 13'd1, 3'd0));
    nodes[1] = 32'hFFFFFFFF;
    drive(1, wf, 0, '0);
    idle(6);
    expect_event('{1, lk({wf[47:19], 1'b0}, 13'd8191, 5'd31), 0}, -1, "s5 after update");
    check(got.size() == 0, "s5 nothing else");

    // ---- random lookups over random nodes
    for (int a = 16; a < 48; a++) begin
      logic [31:0] w;
      w = $urandom;
      if (a % 3 == 0) w[31:19] = '0;
      if (a % 5 == 0) w[18:6] = '0;
      load(a, w);
    end
    got.delete();
    begin
      ev_t exp_q [$];
      for (int n = 0; n < 600; n++) begin
        bit w, nn;
        w  = ($urandom_range(0, 99) < 25);
        nn = ($urandom_range(0, 99) < 25);
        wf = lk(30'($urandom), 13'($urandom_range(16, 47)), 5'($urandom));
        nf = lk(30'($urandom), 13'($urandom_range(16, 47)), 5'($urandom));
        if (w)  exp_q.push_back(expect_step(wf));
        if (nn) exp_q.push_back(expect_step(nf));
        drive(w, wf, nn, nf);
      end
      idle(60);
      check(got.size() == exp_q.size(), "random: output count");
      foreach (exp_q[k]) expect_event(exp_q[k], -1, "random: output");
    end

    // ---- almost full and overflow
    begin
      int af_seen = 0, drop_seen = 0;
      for (int n = 0; n < 40; n++) begin
        drive(1, lk(30'($urandom), 13'd16, 5'd0), 1, lk(30'($urandom), 13'd17, 5'd0));
        if (fifo_almost_full) af_seen++;
        if (fifo_dropped) drop_seen++;
      end
      idle(3);
      check(af_seen > 0, "almost full raised");
      check(drop_seen > 0 || fifo_dropped, "overflow flagged");
      idle(150);
      check(!fifo_almost_full, "almost full released after drain");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
