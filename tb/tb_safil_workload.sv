// tb_safil_workload: throughput and latency of the full 8 x 8 engine, at
// its default sizes, under two kinds of traffic.
//
// The engine was originally measured with two packet traces over one
// large routing table: a skewed trace, in which most addresses fall in
// partition 0 (first four bits 0000), and an even trace whose addresses
// spread almost evenly over the 16 partitions. The original results at an
// almost-full threshold of 50 % were about 0.45 lookups per cycle (skewed)
// and 1.7 (even), with no losses on the even trace. The traces themselves
// are not public, so this testbench generates traces with the same shape:
//   skewed : SKEW_PCT % of the addresses in partition 0, the rest spread
//            over all partitions;
//   even   : partitions chosen uniformly.
// Each address falls inside a random table prefix 3 times in 4 and is
// fully random otherwise. The table (NPFX prefixes, lengths mostly 16 to
// 24 as in a backbone table) is mapped onto the torus and loaded through
// update_data exactly as in tb_safil_top.
//
// Each trace is replayed as fast as the engine admits it: every cycle each
// enabled input takes the next address. Measured, as originally defined:
//   speedup = addresses / cycles from the first admission to the last result
//   mean latency = (sum of result cycles - sum of admission cycles) / count
// (results carry no tag, but the sums do not depend on which result
// belongs to which address). Because every enabled input is fed every
// cycle, far more addresses are offered than the array can serve, so the
// latency here is mostly time spent queued in the contention resolvers'
// FIFOs; the skewed trace also overflows the FIFOs of the partition-0
// root PE, since the resolvers feed it one frame per cycle while it
// serves one per two cycles.
// Checks:
//   * every admitted address ends in exactly one result or one counted drop;
//   * with no drops, the number of results per port number equals the
//     count expected from the table (a direct longest-prefix match is also
//     compared with the trie walk for a sample of addresses);
//   * the even trace runs without drops;
//   * the even trace is faster than the skewed one, and the skewed trace
//     cannot beat its bound: partition 0 enters through one PE, which takes
//     at most one frame every two cycles, so at most half a partition-0
//     result per cycle can come out (the others add at most their count);
//   * the even trace reaches more than one lookup per cycle.
module tb_safil_workload;
  import safil_pkg::*;
  localparam int N = 8, NSU = 16, NPE = N * N;
  localparam int NPFX = 2000;
  localparam int NPKT = 30000;
  localparam int SKEW_PCT = 80;
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
    repeat (3000000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ routing table
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

  function automatic int find_node(input logic [31:0] val, input int len);
    int n;
    n = root[val[31:28]];
    for (int d = 4; d < len; d++) begin
      bit b;
      int ch;
      b  = val[31 - d];
      ch = b ? nd_ch1[n] : nd_ch0[n];
      if (ch < 0) begin
        int r, c;
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

  // port found by walking the mapped trie (same rule as the hardware)
  function automatic int walk_port(input logic [31:0] ip);
    int n, pt;
    pt = 31;
    n = root[ip[31:28]];
    for (int d = 4; d < 32; d++) begin
      int ch;
      if (nd_v[n]) pt = nd_pn[n];
      ch = ip[31 - d] ? nd_ch1[n] : nd_ch0[n];
      if (ch < 0) return pt;
      n = ch;
    end
    return pt;
  endfunction

  // ------------------------------------------------------- observation
  int results_seen = 0;
  int res_hist [32];
  longint res_cycle_sum = 0;
  int last_at = 0;
  always @(negedge clock) if (!reset) begin
    for (int k = 0; k < NPE; k++) if (port_av[k]) begin
      results_seen++;
      res_hist[port[k]]++;
      res_cycle_sum += cyc;
      last_at = cyc;
    end
  end

  int refused = 0;
  always @(posedge clock) if (!reset) refused += $countones(data_refused);

  function automatic logic [31:0] trace_addr(input bit skewed);
    logic [31:0] ip;
    int part;
    if (skewed && $urandom_range(0, 99) < SKEW_PCT) part = 0;
    else part = $urandom_range(0, NSU - 1);
    // an address in a prefix of this partition 3 times in 4
    if ($urandom_range(0, 3) != 0) begin
      int k, tries;
      tries = 0;
      do begin
        k = $urandom_range(0, npfx - 1);
        tries++;
      end while (int'(pfx_val[k][31:28]) != part && tries < 200);
      if (int'(pfx_val[k][31:28]) == part) begin
        ip = (pfx_val[k] & lenmask(pfx_len[k])) | ($urandom & ~lenmask(pfx_len[k]));
        return ip;
      end
    end
    ip = {4'(part), 28'($urandom)};
    return ip;
  endfunction

  // replay one trace; returns speedup and mean latency
  task automatic run_trace(input bit skewed, input string name,
                           output real speedup, output real latency, output int drops);
    logic [31:0] trace [$];
    int exp_hist [32];
    int res0, drop0, ref0, next, admitted, first_at, part0;
    longint in_sum, out0;
    foreach (exp_hist[k]) exp_hist[k] = 0;
    part0 = 0;
    for (int n = 0; n < NPKT; n++) begin
      logic [31:0] ip;
      ip = trace_addr(skewed);
      trace.push_back(ip);
      exp_hist[walk_port(ip)]++;
      if (ip[31:28] == 4'h0) part0++;
      if (n < 300) check(walk_port(ip) == lpm(ip), {name, ": trie walk agrees with the table"});
    end

    res0 = results_seen; drop0 = drop_count; ref0 = refused; out0 = res_cycle_sum;
    foreach (res_hist[k]) res_hist[k] = 0;
    next = 0; admitted = 0; in_sum = 0; first_at = cyc;
    while (next < NPKT) begin
      for (int s = 0; s < NSU; s++) begin
        data_av_in[s] = 0;
        if (data_in_enable[s] && next < NPKT) begin
          data_in[s] = trace[next];
          data_av_in[s] = 1;
          in_sum += cyc;
          next++;
        end
      end
      @(negedge clock);
    end
    for (int s = 0; s < NSU; s++) data_av_in[s] = 0;
    // wait until the engine has been silent for a while
    while (cyc - last_at < 2000 || results_seen - res0 + (drop_count - drop0) < NPKT - (refused - ref0))
      @(negedge clock);
    admitted = NPKT - (refused - ref0);
    drops = drop_count - drop0;
    check(refused == ref0, {name, ": the source offered only on enabled inputs"});
    check(results_seen - res0 + drops == admitted, {name, ": one result or one drop per address"});
    if (drops == 0)
      for (int k = 0; k < 32; k++)
        check(res_hist[k] == exp_hist[k], $sformatf("%s: count of port %0d", name, k));
    // the address was offered in the cycle counted by in_sum and taken at
    // the next edge, the same reference the single-lookup latency uses
    speedup = real'(NPKT) / real'(last_at - first_at);
    latency = (drops == 0) ? real'(res_cycle_sum - out0 - in_sum) / real'(NPKT) : -1.0;
    $display("%s trace: %0d addresses (%0d in partition 0), %0d cycles, speedup %0.3f lookups/cycle, mean latency %0.2f cycles, drops %0d",
             name, NPKT, part0, last_at - first_at, speedup, latency, drops);
    // partition-0 results pass the root PE, at most one per two cycles
    if (skewed)
      check(results_seen - res0 <= (last_at - first_at) / 2 + 2 + (NPKT - part0),
            {name, ": results within the bound of the partition-0 root PE"});
  endtask

  initial begin
    real sp_skew, sp_even, lat_skew, lat_even;
    int dr_skew, dr_even;
    for (int s = 0; s < NSU; s++) begin data_in[s] = '0; data_av_in[s] = 0; end
    update_data = '0;
    foreach (res_hist[k]) res_hist[k] = 0;

    // routing table: lengths mostly 16..24, with nested more-specifics
    while (npfx < NPFX) begin
      logic [31:0] v;
      int l;
      bit dup;
      if (npfx > 50 && $urandom_range(0, 99) < 30) begin
        int b;
        b = $urandom_range(0, npfx - 1);
        l = (pfx_len[b] + $urandom_range(1, 8) > 24) ? 24 : pfx_len[b] + $urandom_range(1, 8);
        v = (pfx_val[b] & lenmask(pfx_len[b])) | ($urandom & ~lenmask(pfx_len[b]));
      end else begin
        l = ($urandom_range(0, 9) == 0) ? $urandom_range(4, 15) : $urandom_range(16, 24);
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

    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) next_free[r][c] = NSU + 1;
    for (int k = 0; k < NSU; k++)
      root[k] = new_node(k < N ? 0 : k - N, k < N ? k : 0, k + 1);
    for (int k = 0; k < npfx; k++) begin
      int n;
      n = find_node(pfx_val[k], pfx_len[k]);
      nd_v[n] = 1; nd_pn[n] = pfx_port[k];
    end
    begin
      int most;
      most = 0;
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
        if (next_free[r][c] > most) most = next_free[r][c];
      $display("table: %0d prefixes, %0d trie nodes, fullest PE uses %0d of 8192 node slots",
               npfx, nd_r.size(), most);
      check(most <= 8192, "table fits in the node memories");
    end

    repeat (3) @(negedge clock);
    reset = 0;
    repeat (20) @(negedge clock);
    foreach (nd_r[n]) begin
      update_data = {node_word(n), 13'(nd_idx[n]), 3'(nd_r[n]), 3'(nd_c[n]), 1'b1};
      @(negedge clock);
    end
    update_data = '0;
    repeat (400) @(negedge clock);
    check(results_seen == 0, "loading gives no results");

    run_trace(1, "skewed", sp_skew, lat_skew, dr_skew);
    run_trace(0, "even", sp_even, lat_even, dr_even);

    check(dr_even == 0, "even trace: no drops");
    check(sp_even > sp_skew, "even trace is faster than the skewed one");
    check(sp_even > 1.0, "even trace: more than one lookup per cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
