// cspf_accel: constrained shortest path first (CSPF) accelerator.
//
// Given a directed graph with a cost and an available bandwidth on every link,
// a query asks for the cheapest path from a source node to a destination node
// that uses only links whose bandwidth is at least a given minimum. This is
// the route computation a software-defined-network controller runs for every
// new flow, and the function the platform offloads to hardware. The
// description names the accelerator, its graph sizes (4 to 128 nodes; a
// 64-node and a 128-node instance in the platform) and nothing of its
// insides: the algorithm and micro-architecture here are this design's own.
//
// How it works: the graph is held as a MAX_NODES x MAX_NODES adjacency memory
// of link_t words, written by the host through the g_* port. A query runs
// Dijkstra's algorithm with links below the bandwidth bound pruned. Each
// round settles one node u and scans all n nodes v, one per clock: the link
// u->v relaxes cost_to[v], and in the same pass the cheapest unsettled node is
// tracked, which becomes u of the next round. A round therefore takes n
// cycles. The search stops when the destination is settled (or nothing
// reachable is left), and the predecessor chain is then walked back from the
// destination, one node per cycle, to count hops and find the first hop.
// Ties are broken towards the lower node number, both when a node is chosen
// and when a predecessor is kept (a predecessor changes only on a strictly
// cheaper path).
//
// Interface: q_valid/q_ready start a query (q_ready is high only when idle);
// q_ctx is returned unchanged on r_ctx. r_valid stays high with the result
// until r_ready. A query whose src, dst or node count does not fit MAX_NODES
// returns err=1 without a search. The graph must not be written while a query
// runs. Latency: 2 cycles of overhead + n cycles per settled node + hops.
module cspf_accel import soda_pkg::*; #(
  parameter int unsigned MAX_NODES = 128,
  parameter int unsigned CTX_W     = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // graph memory write port
  input  logic             g_we,
  input  node_t            g_u,
  input  node_t            g_v,
  input  link_t            g_link,
  // query
  input  logic             q_valid,
  output logic             q_ready,
  input  cspf_query_t      q,
  input  logic [CTX_W-1:0] q_ctx,
  // result
  output logic             r_valid,
  input  logic             r_ready,
  output cspf_result_t     r,
  output logic [CTX_W-1:0] r_ctx,
  output logic             busy
);
  localparam int unsigned IW = $clog2(MAX_NODES);
  localparam logic [DIST_W-1:0] INF = '1;
  typedef logic [IW-1:0] idx_t;

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_TRACE, S_DONE} state_t;
  state_t state;

  link_t             adj  [MAX_NODES][MAX_NODES];
  logic [DIST_W-1:0] cost_to [MAX_NODES];
  idx_t              pred [MAX_NODES];
  logic [MAX_NODES-1:0] settled;

  cspf_query_t       qr;
  logic [CTX_W-1:0]  ctx_r;
  idx_t              u, v, last, tr, best;
  logic [DIST_W-1:0] du, best_d;
  node_t             hops, nh;
  cspf_result_t      res_r;

  // ---- graph memory ----------------------------------------------------
  always_ff @(posedge clk) begin
    if (g_we && (32'(g_u) < MAX_NODES) && (32'(g_v) < MAX_NODES))
      adj[IW'(g_u)][IW'(g_v)] <= g_link;
  end

  // ---- one scan step: relax u->v and track the cheapest unsettled node -----
  link_t             lk;
  logic [DIST_W-1:0] nd, cd;
  logic              relax, cand;
  idx_t              nbest;
  logic [DIST_W-1:0] nbest_d;

  always_comb begin
    lk      = adj[u][v];
    nd      = du + DIST_W'(lk.cost);
    relax   = lk.valid && (lk.bw >= qr.min_bw) && !settled[v] && (nd < cost_to[v]);
    cd      = relax ? nd : cost_to[v];
    cand    = !settled[v] && (cd < best_d);
    nbest   = cand ? v : best;
    nbest_d = cand ? cd : best_d;
  end

  logic q_ok;
  always_comb begin
    q_ok = (32'(q.last) < MAX_NODES) && (q.src <= q.last) && (q.dst <= q.last);
  end

  assign q_ready = (state == S_IDLE);
  assign r_valid = (state == S_DONE);
  assign busy    = (state != S_IDLE);
  assign r       = res_r;
  assign r_ctx   = ctx_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      settled <= '0;
      u <= '0; v <= '0; last <= '0; tr <= '0; best <= '0;
      du <= '0; best_d <= INF; hops <= '0; nh <= '0;
      qr <= '0; ctx_r <= '0; res_r <= '0;
      for (int i = 0; i < MAX_NODES; i++) begin
        cost_to[i] <= INF;
        pred[i] <= idx_t'(i);
      end
    end else begin
      unique case (state)
        S_IDLE: if (q_valid) begin
          qr    <= q;
          ctx_r <= q_ctx;
          res_r <= '0;
          if (!q_ok) begin
            res_r.err <= 1'b1;
            state     <= S_DONE;
          end else begin
            for (int i = 0; i < MAX_NODES; i++) begin
              cost_to[i] <= (idx_t'(i) == idx_t'(q.src)) ? '0 : INF;
              pred[i] <= idx_t'(i);
            end
            settled           <= '0;
            settled[IW'(q.src)] <= 1'b1;
            u      <= IW'(q.src);
            du     <= '0;
            v      <= '0;
            last   <= IW'(q.last);
            best_d <= INF;
            best   <= '0;
            tr     <= IW'(q.dst);
            hops   <= '0;
            nh     <= q.dst;
            state  <= (q.src == q.dst) ? S_TRACE : S_SCAN;
          end
        end

        S_SCAN: begin
          if (relax) begin
            cost_to[v] <= nd;
            pred[v] <= u;
          end
          if (v == last) begin
            v      <= '0;
            best_d <= INF;
            if (nbest_d == INF) begin
              res_r.reachable <= 1'b0;
              state           <= S_DONE;
            end else if (nbest == IW'(qr.dst)) begin
              settled[nbest] <= 1'b1;
              state          <= S_TRACE;
            end else begin
              settled[nbest] <= 1'b1;
              u              <= nbest;
              du             <= nbest_d;
            end
          end else begin
            v      <= v + 1'b1;
            best   <= nbest;
            best_d <= nbest_d;
          end
        end

        S_TRACE: begin
          if (tr == IW'(qr.src)) begin
            res_r.reachable <= 1'b1;
            res_r.cost      <= cost_to[IW'(qr.dst)];
            res_r.hops      <= hops;
            res_r.next_hop  <= nh;
            state           <= S_DONE;
          end else begin
            nh   <= node_t'(tr);
            tr   <= pred[tr];
            hops <= hops + 1'b1;
          end
        end

        S_DONE: if (r_ready) state <= S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end

  // The graph is static while a query runs.
  a_no_write_busy: assert property (@(posedge clk) disable iff (!rst_n) !(g_we && busy));

endmodule
