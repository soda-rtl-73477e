// tb_cspf_accel: self-checking test of the CSPF accelerator at its full
// 128-node size. Random directed graphs are loaded through the graph port and
// queried with random source, destination and bandwidth bound; each result
// (reachable, cost, hops, first hop) is compared with a plain Dijkstra
// computed in the testbench with the same tie rule (lowest node number wins;
// a predecessor changes only on a strictly cheaper path). Also covered:
// src == dst, a bound that cuts every path, out-of-range queries, context
// passing, result hold under back-pressure, and a latency bound of
// n*n + n + 4 cycles per query. A watchdog ends the run if it hangs.
module tb_cspf_accel;
  import soda_pkg::*;
  localparam int unsigned N     = 128;
  localparam int unsigned CTX_W = 8;
  localparam int INF = 65535;

  logic clk = 1'b0, rst_n = 1'b0;
  logic g_we;
  node_t g_u, g_v;
  link_t g_link;
  logic q_valid, q_ready, r_valid, r_ready, busy;
  cspf_query_t q;
  logic [CTX_W-1:0] q_ctx, r_ctx;
  cspf_result_t r;

  int checks = 0, failures = 0;
  int n_reach = 0, n_unreach = 0, n_err = 0;

  bit gv [N][N];
  int gc [N][N];
  int gb [N][N];

  cspf_accel #(.MAX_NODES(N), .CTX_W(CTX_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Build a random graph on n nodes and write it (all n*n words) to the DUT.
  task automatic load_graph(input int n, input int density);
    for (int u = 0; u < n; u++)
      for (int v = 0; v < n; v++) begin
        gv[u][v] = (u != v) && ($urandom_range(0, 99) < density);
        gc[u][v] = $urandom_range(1, 255);
        gb[u][v] = $urandom_range(0, 255);
        g_we = 1'b1; g_u = node_t'(u); g_v = node_t'(v);
        g_link.valid = gv[u][v]; g_link.cost = 8'(gc[u][v]); g_link.bw = 8'(gb[u][v]);
        @(posedge clk); #1;
      end
    g_we = 1'b0;
  endtask

  // Reference model.
  task automatic ref_cspf(input int n, input int src, input int dst, input int minbw,
                          output bit reach, output int cost, output int hops, output int nh);
    int d[N]; int p[N]; bit s[N];
    int u, bd, t;
    for (int i = 0; i < n; i++) begin d[i] = INF; p[i] = i; s[i] = 0; end
    d[src] = 0;
    reach = 0; cost = 0; hops = 0; nh = dst;
    forever begin
      u = -1; bd = INF;
      for (int i = 0; i < n; i++) if (!s[i] && d[i] < bd) begin u = i; bd = d[i]; end
      if (u < 0) return;
      s[u] = 1;
      if (u == dst) break;
      for (int v = 0; v < n; v++)
        if (gv[u][v] && gb[u][v] >= minbw && !s[v] && d[u] + gc[u][v] < d[v]) begin
          d[v] = d[u] + gc[u][v]; p[v] = u;
        end
    end
    reach = 1; cost = d[dst];
    t = dst;
    while (t != src) begin nh = t; t = p[t]; hops++; end
  endtask

  task automatic run_query(input int n, input int src, input int dst, input int minbw);
    bit er, rr; int rc, rh, rn; int cyc;
    logic [CTX_W-1:0] ctx;
    ctx = CTX_W'($urandom);
    er = !(n >= 1 && n <= N && src < n && dst < n);
    if (!er) ref_cspf(n, src, dst, minbw, rr, rc, rh, rn);
    q_valid = 1'b1; q_ctx = ctx;
    q.last = node_t'(n - 1); q.src = node_t'(src); q.dst = node_t'(dst); q.min_bw = 8'(minbw);
    #1;
    check(q_ready, "idle accelerator ready for a query");
    @(posedge clk); #1;
    q_valid = 1'b0;
    cyc = 0;
    while (!r_valid) begin @(posedge clk); #1; cyc++; end
    // hold the result a few cycles under back-pressure
    r_ready = 1'b0;
    repeat ($urandom_range(0, 3)) @(posedge clk);
    #1;
    check(r_valid, "result held while not accepted");
    check(r_ctx == ctx, "context returned");
    check(r.err == er, $sformatf("err flag n=%0d src=%0d dst=%0d", n, src, dst));
    if (er) n_err++;
    else begin
      check(cyc <= n * n + n + 4, $sformatf("latency %0d for n=%0d", cyc, n));
      check(r.reachable == rr, $sformatf("reachable %0d exp %0d (n=%0d %0d->%0d bw>=%0d)",
                                         r.reachable, rr, n, src, dst, minbw));
      if (rr) begin
        n_reach++;
        check(r.cost == rc, $sformatf("cost %0d exp %0d (n=%0d %0d->%0d bw>=%0d)", r.cost, rc, n, src, dst, minbw));
        check(r.hops == rh, $sformatf("hops %0d exp %0d", r.hops, rh));
        check(r.next_hop == rn, $sformatf("next hop %0d exp %0d", r.next_hop, rn));
      end else n_unreach++;
    end
    r_ready = 1'b1;
    @(posedge clk); #1;
    r_ready = 1'b0;
  endtask

  initial begin
    g_we = 0; g_u = '0; g_v = '0; g_link = '0;
    q_valid = 0; q = '0; q_ctx = '0; r_ready = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    @(posedge clk); #1;

    // small graphs of the sizes the evaluation spans
    for (int k = 0; k < 6; k++) begin
      int n;
      n = 4 << k;   // 4, 8, 16, 32, 64, 128
      load_graph(n, (n <= 8) ? 50 : ((n <= 32) ? 20 : 6));
      for (int t = 0; t < ((n <= 32) ? 12 : 4); t++)
        run_query(n, $urandom_range(0, n - 1), $urandom_range(0, n - 1), $urandom_range(0, 160));
      run_query(n, 0, n - 1, 0);          // no bandwidth bound
      run_query(n, 1, 1, 50);             // src == dst
      run_query(n, 0, n - 1, 256 - 1);    // bound that cuts nearly every link
    end
    // out-of-range queries
    run_query(N, 0, N, 0);
    run_query(8, 9, 2, 0);
    check(n_reach > 10, "reachable queries exercised");
    check(n_unreach > 0, "unreachable queries exercised");
    check(n_err == 2, "range errors exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk); #1;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
