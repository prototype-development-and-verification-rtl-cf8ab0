// tb_safil_top: end-to-end test of the full 8 x 8 engine at its default
// sizes (1024-deep PE FIFOs, almost full at 512, 2048-deep CR FIFOs,
// 8192-node memories).
//
// The testbench builds a random routing table, maps its binary trie onto
// the torus the way the hardware walks it (partition k starts in the
// boundary PE of contention resolver k at node index k + 1; a 0 bit moves
// one PE south, a 1 bit one PE east, wrapping round the row or column; each
// PE gets its own node numbering), and loads every node through the
// update_data port. Then:
//   1 single lookups, one at a time: the port number must equal the
//     longest-prefix match computed directly from the table, and it must
//     appear 2 + 2 * (PEs visited) + (wrap-arounds) cycles after the
//     address was offered;
//   2 lookups from all 16 inputs at once (offered only while enabled), with
//     node updates for one partition loaded meanwhile: the multiset of
//     results must equal the multiset of expected ports;
//   3 single lookups confirming the updated routes;
//   4 a flood of one partition from all 16 inputs, offered every cycle:
//     the congestion controller must cut the inputs, refused and dropped
//     frames appear, and every accepted search must end in exactly one
//     result or one drop.
// Each mechanism (wrap-around, CR contention and PE priority, PE round
// robin, update, propagate, congestion throttling, refusal, overflow drop)
// is counted; one that never happens is a failure.
module tb_safil_top;
  import safil_pkg::*;
  localparam int N = 8, NSU = 16, NPE = N * N;
  logic clock = 0, reset = 1;
  logic [31:0] data_in [NSU];
  logic        data_av_in [NSU];
  logic [51:0] update_data;
  logic [4:0]  port [NPE];
  logic        port_av [NPE];
  logic [15:0] data_in_enable, data_refused;
  logic [31:0] drop_count;
  int checks = 0, failures = 0;
  int cyc = 0;

  safil_top dut (.*);

  always #5 clock = ~clock;
  always @(posedge clock) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ routing table
  localparam int NPFX = 400;
  logic [31:0] pfx_val [NPFX];
  int          pfx_len [NPFX];
  int          pfx_port[NPFX];
  int          npfx = 0;

  function automatic logic [31:0] lenmask(input int len);
    return (len == 0) ? 32'h0 : ~((32'h1 << (32 - len)) - 1);
  endfunction

  function automatic int lpm(input logic [31:0] ip);
    int best = 31, bl = -1;
    for (int k = 0; k < npfx; k++)
      if (pfx_len[k] > bl && ((ip ^ pfx_val[k]) & lenmask(pfx_len[k])) == 0) begin
        best = pfx_port[k]; bl = pfx_len[k];
      end
    return best;
  endfunction

  // ---------------------------------------------------- trie on the torus
  int nd_r[$], nd_c[$], nd_idx[$], nd_ch0[$], nd_ch1[$], nd_v[$], nd_pn[$];
  int next_free [N][N];
  int root [NSU];

  function automatic int new_node(input int r, input int c, input int idx);
    nd_r.push_back(r); nd_c.push_back(c); nd_idx.push_back(idx);
    nd_ch0.push_back(-1); nd_ch1.push_back(-1); nd_v.push_back(0); nd_pn.push_back(0);
    return nd_r.size() - 1;
  endfunction

  function automatic int find_node(input logic [31:0] val, input int len, input bit create);
    int n;
    n = root[val[31:28]];
    for (int d = 4; d < len; d++) begin
      bit b;
      int ch;
      b  = val[31 - d];
      ch = b ? nd_ch1[n] : nd_ch0[n];
      if (ch < 0) begin
        int r, c;
        if (!create) return -1;
        r = b ? nd_r[n] : (nd_r[n] + 1) % N;
        c = b ? (nd_c[n] + 1) % N : nd_c[n];
        ch = new_node(r, c, next_free[r][c]);
        next_free[r][c]++;
        if (b) nd_ch1[n] = ch; else nd_ch0[n] = ch;
      end
      n = ch;
    end
    return n;
  endfunction

  function automatic logic [31:0] node_word(input int n);
    logic [12:0] si, ei;
    si = (nd_ch0[n] < 0) ? 13'd0 : 13'(nd_idx[nd_ch0[n]]);
    ei = (nd_ch1[n] < 0) ? 13'd0 : 13'(nd_idx[nd_ch1[n]]);
    return {si, ei, 5'(nd_pn[n]), 1'(nd_v[n])};
  endfunction

  // walk the mapped trie: returns port, PEs visited and wrap-arounds
  task automatic walk(input logic [31:0] ip, output int pt, output int visited, output int wraps);
    int n;
    pt = 31; visited = 0; wraps = 0;
    n = root[ip[31:28]];
    for (int d = 4; d < 32; d++) begin
      bit b;
      int ch;
      visited++;
      if (nd_v[n]) pt = nd_pn[n];
      b  = ip[31 - d];
      ch = b ? nd_ch1[n] : nd_ch0[n];
      if (ch < 0) return;
      if (b ? (nd_c[n] == N - 1) : (nd_r[n] == N - 1)) wraps++;
      n = ch;
    end
  endtask

  task automatic send_update(input int n);
    update_data = {node_word(n), 13'(nd_idx[n]), 3'(nd_r[n]), 3'(nd_c[n]), 1'b1};
    @(negedge clock);
    update_data = '0;
  endtask

  // ------------------------------------------------------- observation
  int results_seen = 0;
  int res_hist [32];
  int last_port, last_at;
  always @(negedge clock) if (!reset) begin
    for (int k = 0; k < NPE; k++) if (port_av[k]) begin
      results_seen++;
      res_hist[port[k]]++;
      last_port = int'(port[k]);
      last_at = cyc;
    end
  end

  int wraps_seen = 0, cr_contention = 0, pe_ties = 0, updates_seen = 0, propagates_seen = 0;
  int throttled = 0, refused = 0;
  for (genvar k = 0; k < 2 * N; k++) begin : g_mon_cr
    always @(posedge clock) if (!reset) begin
      if (dut.g_cr[k].in_av[NSU]) wraps_seen++;
      if ($countones(~dut.g_cr[k].u_cr.empty) > 1) cr_contention++;
    end
  end
  for (genvar r = 0; r < N; r++) begin : g_mon_r
    for (genvar c = 0; c < N; c++) begin : g_mon_c
      always @(posedge clock) if (!reset) begin
        if (!dut.g_row[r].g_col[c].u_pe.u_dfm.busy &&
            !dut.g_row[r].g_col[c].u_pe.u_dfm.fifo1_empty &&
            !dut.g_row[r].g_col[c].u_pe.u_dfm.fifo2_empty) pe_ties++;
        if (dut.g_row[r].g_col[c].u_pe.u_dfm.act_now == ACT_UPDATE) updates_seen++;
        if (dut.g_row[r].g_col[c].u_pe.u_dfm.act_now == ACT_PROPAGATE) propagates_seen++;
      end
    end
  end
  always @(posedge clock) if (!reset) begin
    if (data_in_enable != 16'hFFFF) throttled++;
    refused += $countones(data_refused);
  end

  function automatic logic [31:0] pick_addr(input int avoid_part);
    logic [31:0] ip;
    do begin
      if ($urandom_range(0, 99) < 75) begin
        int k;
        k = $urandom_range(0, npfx - 1);
        ip = (pfx_val[k] & lenmask(pfx_len[k])) | ($urandom & ~lenmask(pfx_len[k]));
      end else ip = $urandom;
    end while (int'(ip[31:28]) == avoid_part);
    return ip;
  endfunction

  task automatic single_lookups(input int count, input string tag);
    for (int n = 0; n < count; n++) begin
      logic [31:0] ip;
      int pt, vis, wr, t0, nbefore;
      ip = pick_addr(-1);
      walk(ip, pt, vis, wr);
      check(pt == lpm(ip), {tag, ": mapped trie agrees with table"});
      nbefore = results_seen;
      t0 = cyc;
      data_in[n % NSU] = ip; data_av_in[n % NSU] = 1;
      @(negedge clock);
      data_av_in[n % NSU] = 0;
      repeat (2 * 32 + 40) @(negedge clock);
      check(results_seen == nbefore + 1, {tag, ": exactly one result"});
      check(last_port == pt, {tag, ": port number"});
      check(last_at == t0 + 2 + 2 * vis + wr, {tag, ": latency"});
    end
  endtask

  initial begin
    int upd_nodes [$];
    int exp_hist [32];
    int offered, accepted, res0, drop0, ref0;
    for (int s = 0; s < NSU; s++) begin data_in[s] = '0; data_av_in[s] = 0; end
    update_data = '0;
    foreach (res_hist[k]) res_hist[k] = 0;

    // routing table: random prefixes of length 4..24, many nested
    while (npfx < NPFX) begin
      logic [31:0] v;
      int l;
      bit dup;
      if (npfx > 20 && $urandom_range(0, 99) < 40) begin
        int b;
        b = $urandom_range(0, npfx - 1);
        l = (pfx_len[b] + $urandom_range(1, 8) > 24) ? 24 : pfx_len[b] + $urandom_range(1, 8);
        v = (pfx_val[b] & lenmask(pfx_len[b])) | ($urandom & ~lenmask(pfx_len[b]));
      end else begin
        l = $urandom_range(4, 24);
        v = $urandom;
      end
      v &= lenmask(l);
      dup = 0;
      for (int k = 0; k < npfx; k++) if (pfx_len[k] == l && pfx_val[k] == v) dup = 1;
      if (!dup) begin
        pfx_val[npfx] = v; pfx_len[npfx] = l; pfx_port[npfx] = $urandom_range(0, 30);
        npfx++;
      end
    end
    // a long all-zero path and a long all-one path force wrap-arounds
    pfx_val[0] = 32'h0000_0000; pfx_len[0] = 20; pfx_port[0] = 3;
    pfx_val[1] = 32'hFFFF_F000; pfx_len[1] = 20; pfx_port[1] = 4;

    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) next_free[r][c] = NSU + 1;
    for (int k = 0; k < NSU; k++)
      root[k] = new_node(k < N ? 0 : k - N, k < N ? k : 0, k + 1);
    for (int k = 0; k < npfx; k++) begin
      int n;
      n = find_node(pfx_val[k], pfx_len[k], 1);
      nd_v[n] = 1; nd_pn[n] = pfx_port[k];
    end
    $display("table: %0d prefixes, %0d trie nodes", npfx, nd_r.size());

    repeat (3) @(negedge clock);
    reset = 0;
    repeat (20) @(negedge clock);

    // ---- load the whole trie through the loader
    foreach (nd_r[n]) send_update(n);
    repeat (400) @(negedge clock);
    check(results_seen == 0, "loading gives no results");

    // ---- 1: single lookups
    single_lookups(150, "single");

    // ---- 2: all inputs at once, with updates to partition 15 meanwhile
    foreach (exp_hist[k]) exp_hist[k] = 0;
    for (int k = 0; k < npfx; k++)
      if (pfx_val[k][31:28] == 4'hF && pfx_len[k] > 4) begin
        int n;
        n = find_node(pfx_val[k], pfx_len[k], 0);
        pfx_port[k] = (pfx_port[k] + 7) % 31;
        nd_pn[n] = pfx_port[k];
        upd_nodes.push_back(n);
      end
    res0 = results_seen;
    foreach (res_hist[k]) res_hist[k] = 0;
    offered = 0;
    for (int t = 0; t < 1500; t++) begin
      for (int s = 0; s < NSU; s++) begin
        data_av_in[s] = 0;
        if (data_in_enable[s] && $urandom_range(0, 99) < 50) begin
          data_in[s] = pick_addr(15);
          data_av_in[s] = 1;
          exp_hist[lpm(data_in[s])]++;
          offered++;
        end
      end
      if (t < upd_nodes.size())
        update_data = {node_word(upd_nodes[t]), 13'(nd_idx[upd_nodes[t]]),
                       3'(nd_r[upd_nodes[t]]), 3'(nd_c[upd_nodes[t]]), 1'b1};
      else update_data = '0;
      @(negedge clock);
    end
    for (int s = 0; s < NSU; s++) data_av_in[s] = 0;
    update_data = '0;
    repeat (20000) @(negedge clock);
    check(results_seen - res0 == offered, "parallel: one result per search");
    for (int k = 0; k < 32; k++) check(res_hist[k] == exp_hist[k], $sformatf("parallel: count of port %0d", k));
    check(drop_count == 0, "parallel: nothing dropped");
    $display("parallel phase: %0d searches", offered);

    // ---- 3: the updated routes
    for (int k = 0; k < npfx; k++)
      if (pfx_val[k][31:28] == 4'hF && pfx_len[k] > 4) begin
        logic [31:0] ip;
        int pt, vis, wr;
        ip = pfx_val[k] | ($urandom & ~lenmask(pfx_len[k]));
        walk(ip, pt, vis, wr);
        check(pt == lpm(ip), "updated: table agrees");
        data_in[0] = ip; data_av_in[0] = 1;
        @(negedge clock);
        data_av_in[0] = 0;
        repeat (2 * 32 + 40) @(negedge clock);
        check(last_port == pt, "updated: new port number");
      end
    single_lookups(30, "after update");

    // ---- 4: flood partition 0 from every input, every cycle
    res0 = results_seen; drop0 = drop_count; ref0 = refused;
    offered = 0;
    for (int t = 0; t < 4000; t++) begin
      for (int s = 0; s < NSU; s++) begin
        data_in[s] = {4'h0, 28'($urandom)};
        data_av_in[s] = 1;
        offered++;
      end
      @(negedge clock);
    end
    for (int s = 0; s < NSU; s++) data_av_in[s] = 0;
    repeat (150000) @(negedge clock);
    accepted = offered - (refused - ref0);
    check(results_seen - res0 + (drop_count - drop0) == accepted,
          "flood: every accepted search ends in one result or one drop");
    $display("flood: offered %0d accepted %0d results %0d dropped %0d",
             offered, accepted, results_seen - res0, drop_count - drop0);

    $display("mechanisms: wraps=%0d cr_contention=%0d pe_round_robin_ties=%0d updates=%0d propagates=%0d throttled_cycles=%0d refused=%0d drops=%0d",
             wraps_seen, cr_contention, pe_ties, updates_seen, propagates_seen, throttled, refused, drop_count);
    check(wraps_seen > 0, "wrap-around happened");
    check(cr_contention > 0, "CR contention happened");
    check(pe_ties > 0, "PE round robin tie happened");
    check(updates_seen > 0, "update happened");
    check(propagates_seen > 0, "propagate happened");
    check(throttled > 0, "congestion throttling happened");
    check(refused > 0, "refusal happened");
    check(drop_count > 0, "overflow drop happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
