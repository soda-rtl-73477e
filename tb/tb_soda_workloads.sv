// tb_soda_workloads: the two workloads the platform is evaluated with, run on
// soda_top at its default sizes.
//
// Part 1, node sweep: CSPF queries on networks of 4, 8, 16, 32, 64 and 128
// nodes, one at a time on the 128-node engine. Each result is checked against
// a Dijkstra search in the testbench, and the cycles from issue to result
// are printed per size and checked against the bound n*n + n + 12 (the
// engine's n cycles per settled node plus queue and scheduler overhead).
//
// Part 2, thread program: 256 independent hardware threads, the first 128
// on the 64-node engine and the other 128 on the 128-node engine, each
// writing its own result buffer (variable id mod 16, so destinations are
// reused and renamed). All 256 must return a correct result, retire in issue
// order (the join), and the two engines must work in parallel. A watchdog
// ends the run if it hangs.
module tb_soda_workloads;
  import soda_pkg::*;
  localparam int N0 = 64, N1 = 128;
  localparam int NTH = 256;
  localparam int INF = 65535;

  logic clk = 1'b0, rst_n = 1'b0;
  logic task_valid, task_ready, res_valid, res_ready, ret_valid, g_we, g_acc, idle;
  task_t task_in;
  result_t res_out;
  task_id_t ret_id;
  node_t g_u, g_v;
  link_t g_link;
  logic [1:0] acc_busy;

  soda_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  bit gv [2][N1][N1];
  int gc [2][N1][N1];
  int gb [2][N1][N1];

  task automatic load_graph(input int a, input int n);
    for (int u = 0; u < n; u++)
      for (int v = 0; v < n; v++) begin
        // a ring keeps the network connected; random chords add choices
        gv[a][u][v] = (v == (u + 1) % n) || ((u != v) && ($urandom_range(0, 999) < 40));
        gc[a][u][v] = $urandom_range(1, 255);
        gb[a][u][v] = (v == (u + 1) % n) ? 255 : $urandom_range(0, 255);
        g_we = 1'b1; g_acc = 1'(a); g_u = node_t'(u); g_v = node_t'(v);
        g_link.valid = gv[a][u][v]; g_link.cost = 8'(gc[a][u][v]); g_link.bw = 8'(gb[a][u][v]);
        @(posedge clk); #1;
      end
    g_we = 1'b0;
  endtask

  task automatic ref_cspf(input int a, input int n, input int src, input int dst, input int minbw,
                          output bit reach, output int cost, output int hops, output int nh);
    int d[N1]; int p[N1]; bit s[N1];
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
        if (gv[a][u][v] && gb[a][u][v] >= minbw && !s[v] && d[u] + gc[a][u][v] < d[v]) begin
          d[v] = d[u] + gc[a][u][v]; p[v] = u;
        end
    end
    reach = 1; cost = d[dst];
    t = dst;
    while (t != src) begin nh = t; t = p[t]; hops++; end
  endtask

  // ---- host side -----------------------------------------------------------------
  task_t prog [NTH];
  bit    got [NTH];
  int    n_results = 0, n_ret = 0, n_parallel = 0;
  int    issue_order [$];

  task automatic send(input task_t t);
    task_valid = 1'b1;
    task_in    = t;
    #1;
    while (!task_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    task_valid = 1'b0;
    issue_order.push_back(int'(t.id));
  endtask

  function automatic task_t make_task(input int id, input func_t f, input int n,
                                      input int src, input int dst, input int minbw, input int dvar);
    task_t t;
    cspf_query_t qq;
    t = '0;
    qq.last = node_t'(n - 1); qq.src = node_t'(src); qq.dst = node_t'(dst); qq.min_bw = 8'(minbw);
    t.id = task_id_t'(id); t.func = f; t.arg = ARG_W'(qq);
    t.dst_used = 1'b1; t.dst = var_t'(dvar);
    return t;
  endfunction

  task automatic check_result(input result_t r);
    int k, a, n; bit rr; int rc, rh, rn; cspf_query_t qq;
    k  = int'(r.id);
    qq = cspf_query_t'(prog[k].arg);
    a  = int'(prog[k].func);
    n  = int'(qq.last) + 1;
    ref_cspf(a, n, int'(qq.src), int'(qq.dst), int'(qq.min_bw), rr, rc, rh, rn);
    check(!r.res.err && r.res.reachable == rr, $sformatf("task %0d reachable", k));
    if (rr) begin
      check(r.res.cost == rc, $sformatf("task %0d cost %0d exp %0d", k, r.res.cost, rc));
      check(r.res.hops == rh, $sformatf("task %0d hops %0d exp %0d", k, r.res.hops, rh));
      check(r.res.next_hop == rn, $sformatf("task %0d next hop %0d exp %0d", k, r.res.next_hop, rn));
    end
  endtask

  // results are always accepted in this test; part 2 collects them here
  bit collect = 1'b0;
  always @(posedge clk) begin
    #1;
    if (rst_n && collect) begin
      if (acc_busy == 2'b11) n_parallel++;
      if (ret_valid) begin
        check(issue_order.size() > 0 && int'(ret_id) == issue_order[0],
              $sformatf("retired %0d out of issue order", ret_id));
        if (issue_order.size() > 0) void'(issue_order.pop_front());
        n_ret++;
      end
    end
  end
  initial begin
    forever begin
      @(posedge clk); #2;
      if (collect && res_valid && res_ready) begin
        check(!got[int'(res_out.id)], $sformatf("one result for thread %0d", res_out.id));
        got[int'(res_out.id)] = 1'b1;
        check_result(res_out);
        n_results++;
      end
    end
  end

  initial begin
    int sizes [6] = '{4, 8, 16, 32, 64, 128};
    task_valid = 1'b0; task_in = '0; res_ready = 1'b1;
    g_we = 1'b0; g_acc = 1'b0; g_u = '0; g_v = '0; g_link = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    load_graph(0, N0);
    load_graph(1, N1);

    // ---- part 1: node sweep on the 128-node engine ----
    for (int i = 0; i < 6; i++) begin
      int n, t0, lat;
      n = sizes[i];
      prog[i] = make_task(i, FUNC_CSPF128, n, 0, n - 1, 0, i);
      t0 = cyc;
      send(prog[i]);
      while (!res_valid) begin @(posedge clk); #1; end
      lat = cyc - t0;
      check(int'(res_out.id) == i, "sweep result id");
      check_result(res_out);
      $display("sweep: %0d nodes, %0d hops, %0d cycles from issue to result", n, res_out.res.hops, lat);
      check(lat <= n * n + n + 12, $sformatf("latency %0d for %0d nodes", lat, n));
      @(posedge clk); #1;   // result taken
    end
    wait (idle);
    repeat (4) @(posedge clk);
    #1;

    // ---- part 2: 256 hardware threads, 128 per engine ----
    for (int k = 0; k < NTH; k++) begin
      int n;
      if (k < NTH / 2) begin
        n = N0;
        prog[k] = make_task(k, FUNC_CSPF64, n, $urandom_range(0, n - 1), $urandom_range(0, n - 1),
                            $urandom_range(0, 100), k % NUM_ARCH);
      end else begin
        n = N1;
        prog[k] = make_task(k, FUNC_CSPF128, n, $urandom_range(0, n - 1), $urandom_range(0, n - 1),
                            $urandom_range(0, 100), k % NUM_ARCH);
      end
      got[k] = 1'b0;
    end
    n_ret = 0;
    issue_order.delete();
    collect = 1'b1;
    // the 64-node threads and the 128-node threads are created in two loops,
    // interleaved here so that both engines have work from the start
    for (int j = 0; j < NTH / 2; j++) begin
      send(prog[j]);
      send(prog[j + NTH / 2]);
    end
    wait (n_results == NTH && n_ret == NTH);
    repeat (4) @(posedge clk);
    #1;
    check(idle, "platform idle after the join");
    for (int k = 0; k < NTH; k++) check(got[k], $sformatf("thread %0d returned", k));
    $display("threads: %0d results, %0d retired, both engines busy for %0d cycles, done at cycle %0d",
             n_results, n_ret, n_parallel, cyc);
    check(n_parallel > 1000, "engines worked in parallel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (results %0d, retired %0d)", n_results, n_ret);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
