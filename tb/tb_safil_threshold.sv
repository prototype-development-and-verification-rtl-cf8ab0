// tb_safil_threshold: effect of the PE almost-full threshold on a skewed
// traffic load.
//
// The almost-full threshold decides how early the congestion controller
// cuts the inputs. Set it low and the engine throttles early and runs
// slower. Set it high and frames already inside the resolvers can overflow
// a PE FIFO before the cut takes effect. The original evaluation swept the
// threshold from 34 % to 75 % of a 1024-deep FIFO and found that both the
// lookup rate and the loss rate rise with it. This testbench runs three
// full-size engines side by side, identical except for ALMOST_FULL_LEVEL =
// 348, 512 (the default) and 768. Each gets the same table and the same
// skewed trace: SKEW_PCT % of the addresses in partition 0, the rest
// spread evenly, offered on every enabled input each cycle.
//
// Checks, for each engine:
//   * every admitted address ends in exactly one result or one counted drop;
//   * with no drops, the results per port number match the table.
// Across the engines:
//   * the loss count does not fall as the threshold rises;
//   * the lookup rate does not fall as the threshold rises (a 2 %
//     tolerance allows for arbitration noise).
// Everything else (table, mapping, loading) is as in tb_safil_workload.
module tb_safil_threshold;
  import safil_pkg::*;
  localparam int N = 8, NSU = 16, NPE = N * N;
  localparam int NPFX = 1000;
  localparam int NPKT = 20000;
  localparam int SKEW_PCT = 60;
  localparam int NT = 3;
  localparam int LEVEL [NT] = '{348, 512, 768};
  logic clock = 0, reset = 1;
  int checks = 0, failures = 0;
  int cyc = 0;

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

  function automatic logic [31:0] trace_addr();
    logic [31:0] ip;
    int part;
    part = ($urandom_range(0, 99) < SKEW_PCT) ? 0 : $urandom_range(0, NSU - 1);
    if ($urandom_range(0, 3) != 0) begin
      int k, tries;
      tries = 0;
      do begin
        k = $urandom_range(0, npfx - 1);
        tries++;
      end while (int'(pfx_val[k][31:28]) != part && tries < 200);
      if (int'(pfx_val[k][31:28]) == part)
        return (pfx_val[k] & lenmask(pfx_len[k])) | ($urandom & ~lenmask(pfx_len[k]));
    end
    ip = {4'(part), 28'($urandom)};
    return ip;
  endfunction

  // shared stimulus, built once
  logic [31:0] trace [NPKT];
  int          exp_hist [32];
  bit          go = 0;

  // per-engine results
  real speedup [NT];
  int  drops   [NT];
  bit  done    [NT];

  for (genvar t = 0; t < NT; t++) begin : g_eng
    logic [31:0] data_in [NSU];
    logic        data_av_in [NSU];
    logic [51:0] update_data;
    logic [4:0]  port [NPE];
    logic        port_av [NPE];
    logic [15:0] data_in_enable, data_refused;
    logic [31:0] drop_count;

    safil_top #(.ALMOST_FULL_LEVEL(LEVEL[t])) dut (.*);

    int results_seen = 0, last_at = 0, refused = 0;
    int res_hist [32];
    always @(negedge clock) if (!reset) begin
      for (int k = 0; k < NPE; k++) if (port_av[k]) begin
        results_seen++;
        res_hist[port[k]]++;
        last_at = cyc;
      end
    end
    always @(posedge clock) if (!reset) refused += $countones(data_refused);

    initial begin
      int next, first_at;
      for (int s = 0; s < NSU; s++) begin data_in[s] = '0; data_av_in[s] = 0; end
      update_data = '0;
      foreach (res_hist[k]) res_hist[k] = 0;
      done[t] = 0;
      wait (go);
      @(negedge clock);
      foreach (nd_r[n]) begin
        update_data = {node_word(n), 13'(nd_idx[n]), 3'(nd_r[n]), 3'(nd_c[n]), 1'b1};
        @(negedge clock);
      end
      update_data = '0;
      repeat (400) @(negedge clock);
      check(results_seen == 0, $sformatf("level %0d: loading gives no results", LEVEL[t]));

      next = 0; first_at = cyc;
      while (next < NPKT) begin
        for (int s = 0; s < NSU; s++) begin
          data_av_in[s] = 0;
          if (data_in_enable[s] && next < NPKT) begin
            data_in[s] = trace[next];
            data_av_in[s] = 1;
            next++;
          end
        end
        @(negedge clock);
      end
      for (int s = 0; s < NSU; s++) data_av_in[s] = 0;
      while (cyc - last_at < 2000 || results_seen + int'(drop_count) < NPKT - refused)
        @(negedge clock);
      drops[t] = drop_count;
      check(refused == 0, $sformatf("level %0d: the source offered only on enabled inputs", LEVEL[t]));
      check(results_seen + drops[t] == NPKT - refused,
            $sformatf("level %0d: one result or one drop per address", LEVEL[t]));
      if (drops[t] == 0)
        for (int k = 0; k < 32; k++)
          check(res_hist[k] == exp_hist[k], $sformatf("level %0d: count of port %0d", LEVEL[t], k));
      speedup[t] = real'(NPKT) / real'(last_at - first_at);
      $display("almost-full level %0d of 1024: %0d cycles, speedup %0.3f lookups/cycle, drops %0d (%0.2f %%)",
               LEVEL[t], last_at - first_at, speedup[t], drops[t], 100.0 * drops[t] / NPKT);
      done[t] = 1;
    end
  end

  initial begin
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
    foreach (exp_hist[k]) exp_hist[k] = 0;
    for (int n = 0; n < NPKT; n++) begin
      trace[n] = trace_addr();
      exp_hist[walk_port(trace[n])]++;
      if (n < 300) check(walk_port(trace[n]) == lpm(trace[n]), "trie walk agrees with the table");
    end
    $display("table: %0d prefixes, %0d trie nodes; trace: %0d addresses, %0d %% aimed at partition 0",
             npfx, nd_r.size(), NPKT, SKEW_PCT);

    repeat (3) @(negedge clock);
    reset = 0;
    repeat (20) @(negedge clock);
    go = 1;
    for (int t = 0; t < NT; t++) wait (done[t]);

    for (int t = 1; t < NT; t++) begin
      check(drops[t] >= drops[t-1],
            $sformatf("losses do not fall from level %0d to %0d", LEVEL[t-1], LEVEL[t]));
      check(speedup[t] >= 0.98 * speedup[t-1],
            $sformatf("lookup rate does not fall from level %0d to %0d", LEVEL[t-1], LEVEL[t]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
