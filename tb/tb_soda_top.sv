// tb_soda_top: end-to-end test of the platform at its default sizes (a 64-node
// and a 128-node CSPF engine). It loads a random graph into each engine, then
// issues a program of CSPF tasks over a few variables so that tasks depend on
// one another, with random gaps on the task channel and random back-pressure
// on the result channel. Queries span 4 to 128 nodes, and some ask the 64-node
// engine for more than it holds. Every result is compared with a Dijkstra
// search done in the testbench (same tie rule as the engine); every task must
// return one result and retire in issue order, and no task may finish before
// a task whose output it reads. It counts, and requires at least once each:
// read-after-write waits, results returned out of issue order, both engines
// busy together, both engines offering a result in the same cycle (arbitration), a
// stalled task channel, a held result channel, a range error and an
// unreachable destination. A watchdog ends the run if it hangs.
module tb_soda_top;
  import soda_pkg::*;
  localparam int N0 = 64, N1 = 128;
  localparam int NT = 48;
  localparam int NVAR = 4;
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

  // ---- graphs --------------------------------------------------------------------
  bit gv [2][N1][N1];
  int gc [2][N1][N1];
  int gb [2][N1][N1];

  task automatic load_graph(input int a, input int n, input int density);
    for (int u = 0; u < n; u++)
      for (int v = 0; v < n; v++) begin
        // denser near the low node numbers so small queries find paths too
        gv[a][u][v] = (u != v) && ($urandom_range(0, 99) < ((u < 8 && v < 8) ? 50 : density));
        gc[a][u][v] = $urandom_range(1, 255);
        gb[a][u][v] = $urandom_range(0, 255);
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

  // ---- program -------------------------------------------------------------------------
  task_t prog [NT];
  int    prod [NT][NUM_SRC];
  int    last_writer [NVAR];
  int    res_cyc [NT];
  int    issue_cyc [NT];
  bit    got [NT];
  int    cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_raw_wait = 0, n_ooo = 0, n_parallel = 0, n_arb = 0, n_task_stall = 0;
  int n_res_hold = 0, n_err = 0, n_unreach = 0, n_results = 0, n_ret = 0;
  int max_res = -1;
  bit raw_pending [NT];
  int task_start = 0;

  initial begin
    int sizes [6] = '{4, 8, 16, 32, 64, 128};
    cspf_query_t qq;
    for (int v = 0; v < NVAR; v++) last_writer[v] = -1;
    for (int k = 0; k < NT; k++) begin
      int n;
      prog[k] = '0;
      prog[k].id = task_id_t'(k);
      prog[k].func = func_t'($urandom_range(0, 1));
      n = sizes[$urandom_range(0, prog[k].func ? 5 : 4)];
      if (k == 5) begin prog[k].func = FUNC_CSPF64; n = 128; end         // too large for engine 0
      if (k == 1 || k == 2) begin prog[k].func = FUNC_CSPF128; n = 128; end // full-size queries
      qq.last = node_t'(n - 1);
      qq.src = node_t'($urandom_range(0, n - 1));
      qq.dst = node_t'($urandom_range(0, n - 1));
      qq.min_bw = 8'($urandom_range(0, 120));
      if (k == 7) qq.min_bw = 8'd255;                                 // cuts (nearly) every link
      prog[k].arg = ARG_W'(qq);
      prog[k].src_used = NUM_SRC'($urandom_range(0, 3));
      for (int s = 0; s < NUM_SRC; s++) prog[k].src[s] = var_t'($urandom_range(0, NVAR - 1));
      // a run of independent tasks alternating between the engines, so that
      // both are kept busy while the result channel is held
      if (k >= 8 && k < 28) begin
        prog[k].src_used = '0;
        prog[k].func     = func_t'(k % 2);
        qq.last = node_t'(7); qq.src = node_t'($urandom_range(0, 7)); qq.dst = node_t'($urandom_range(0, 7));
        prog[k].arg = ARG_W'(qq);
      end
      prog[k].dst_used = 1'b1;
      prog[k].dst = var_t'($urandom_range(0, NVAR - 1));
      for (int s = 0; s < NUM_SRC; s++)
        prod[k][s] = prog[k].src_used[s] ? last_writer[prog[k].src[s]] : -1;
      last_writer[prog[k].dst] = k;
    end
  end

  // ---- host: graphs, then tasks -----------------------------------------------------------
  initial begin
    bit hs;
    task_valid = 1'b0; task_in = '0; g_we = 1'b0; g_acc = 1'b0; g_u = '0; g_v = '0; g_link = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    load_graph(0, N0, 8);
    load_graph(1, N1, 4);
    task_start = cyc;
    for (int k = 0; k < NT; ) begin
      task_valid = ($urandom_range(0, 99) < 70);
      task_in    = prog[k];
      #1;
      hs = task_valid && task_ready;
      if (task_valid && !task_ready) n_task_stall++;
      @(posedge clk); #1;
      if (hs) begin
        issue_cyc[k] = cyc;
        for (int s = 0; s < NUM_SRC; s++)
          if (prod[k][s] >= 0 && !got[prod[k][s]]) raw_pending[k] = 1'b1;
        k++;
      end
    end
    task_valid = 1'b0;
  end

  // ---- result and retirement monitors -------------------------------------------------------
  initial begin
    res_ready = 1'b0;
    forever begin
      @(posedge clk); #2;
      // the result channel is held for a long stretch after the first task, so
      // that it fills and both engines end up waiting on it together
      res_ready = (task_start > 0 && cyc > task_start && cyc < task_start + 60000)
                ? 1'b0 : ($urandom_range(0, 99) < 60);
      #1;
      if (res_valid && res_ready) begin
        int k, a, n; bit rr; int rc, rh, rn; cspf_query_t qq;
        k  = int'(res_out.id);
        qq = cspf_query_t'(prog[k].arg);
        a  = int'(prog[k].func);
        n  = int'(qq.last) + 1;
        check(!got[k], $sformatf("one result for task %0d", k));
        got[k] = 1'b1; res_cyc[k] = cyc; n_results++;
        for (int s = 0; s < NUM_SRC; s++) if (prod[k][s] >= 0)
          check(got[prod[k][s]], $sformatf("task %0d finished after its producer %0d", k, prod[k][s]));
        if (raw_pending[k]) n_raw_wait++;
        if (k < max_res) n_ooo++;
        if (k > max_res) max_res = k;
        if (n > ((a == 0) ? N0 : N1)) begin
          check(res_out.res.err, $sformatf("task %0d range error", k));
          n_err++;
        end else begin
          ref_cspf(a, n, int'(qq.src), int'(qq.dst), int'(qq.min_bw), rr, rc, rh, rn);
          check(!res_out.res.err && res_out.res.reachable == rr, $sformatf("task %0d reachable", k));
          if (rr) begin
            check(res_out.res.cost == rc, $sformatf("task %0d cost %0d exp %0d", k, res_out.res.cost, rc));
            check(res_out.res.hops == rh, $sformatf("task %0d hops %0d exp %0d", k, res_out.res.hops, rh));
            check(res_out.res.next_hop == rn, $sformatf("task %0d next hop %0d exp %0d", k, res_out.res.next_hop, rn));
          end else n_unreach++;
        end
      end
      if (res_valid && !res_ready) n_res_hold++;
    end
  end

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (acc_busy == 2'b11) n_parallel++;
      if (dut.r_valid[0] && dut.r_valid[1]) n_arb++;
      if (ret_valid) begin
        check(int'(ret_id) == n_ret, $sformatf("retired %0d expected %0d", ret_id, n_ret));
        n_ret++;
      end
    end
  end

  initial begin
    wait (n_ret == NT && n_results == NT);
    repeat (5) @(posedge clk);
    #1;
    check(idle && !res_valid, "platform idle at the end");
    for (int k = 0; k < NT; k++) check(got[k], $sformatf("task %0d returned", k));
    $display("raw_wait=%0d out_of_order=%0d parallel_cycles=%0d both_offering=%0d task_stall=%0d result_hold=%0d range_err=%0d unreachable=%0d",
             n_raw_wait, n_ooo, n_parallel, n_arb, n_task_stall, n_res_hold, n_err, n_unreach);
    check(n_raw_wait > 0, "read-after-write wait happened");
    check(n_ooo > 0, "out-of-order completion happened");
    check(n_parallel > 0, "both engines busy together");
    check(n_arb > 0, "both engines offered a result in one cycle");
    check(n_task_stall > 0, "task channel stalled");
    check(n_res_hold > 0, "result channel held");
    check(n_err > 0, "range error returned");
    check(n_unreach > 0, "unreachable destination returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (results %0d, retired %0d of %0d)", n_results, n_ret, NT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
