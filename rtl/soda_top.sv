// soda_top: hardware side of the SODA software-defined accelerator platform.
//
// A host processor runs the application and its threads; each hardware thread
// becomes a task that is sent here. The platform in the description has two
// accelerator slots, one holding a 64-node CSPF engine and one a 128-node
// CSPF engine, and an out-of-order task scheduler that spreads tasks over
// them while honouring the data dependences between tasks. This module wires
// that together:
//
//   host tasks --> task channel (soda_comm_fifo) --> soda_task_scheduler
//       scheduler port 0 (function FUNC_CSPF64)  --> cspf_accel, 64 nodes
//       scheduler port 1 (function FUNC_CSPF128) --> cspf_accel, 128 nodes
//   accelerator results --> result channel (soda_comm_fifo) --> host
//   accelerator finishes --> scheduler completion inputs
//
// A task's argument word is a cspf_query_t. Its source and destination
// variables only express ordering between tasks here: the CSPF engines do not
// exchange data with one another. Results carry the task id and the physical
// tag the task's destination was renamed to.
//
// The host loads each engine's graph through g_* (g_acc selects the engine)
// while no query is running. When both engines finish in the same cycle they
// take turns into the result channel (round robin); the one waiting holds its
// result, so completions reach the scheduler when the result is accepted.
// ret_valid/ret_id report tasks retiring in issue order. The processors, bus,
// memory, peripherals and reconfiguration of the accelerator slots belong to
// the surrounding FPGA system and are not part of this module. Queue depths
// and the result arbitration are this design's choices.
module soda_top import soda_pkg::*; #(
  parameter int unsigned TASK_FIFO_DEPTH = 16,
  parameter int unsigned RES_FIFO_DEPTH  = 16,
  parameter int unsigned RS_DEPTH        = 8,
  parameter int unsigned ACC0_NODES      = 64,
  parameter int unsigned ACC1_NODES      = 128
) (
  input  logic     clk,
  input  logic     rst_n,
  // task channel from the host
  input  logic     task_valid,
  output logic     task_ready,
  input  task_t    task_in,
  // result channel to the host
  output logic     res_valid,
  input  logic     res_ready,
  output result_t  res_out,
  // retirement in issue order
  output logic     ret_valid,
  output task_id_t ret_id,
  // graph memory load
  input  logic     g_we,
  input  logic     g_acc,
  input  node_t    g_u,
  input  node_t    g_v,
  input  link_t    g_link,
  // status
  output logic     idle,
  output logic [1:0] acc_busy
);
  localparam int unsigned NUM_ACC = 2;
  localparam int unsigned CTX_W   = $bits(task_id_t) + $bits(rob_idx_t) + $bits(tag_t);

  typedef struct packed {
    task_id_t id;
    rob_idx_t rob;
    tag_t     dst_tag;
  } ctx_t;

  // ---- task channel ----------------------------------------------------------
  logic  tq_valid, tq_ready;
  task_t tq_task;

  soda_comm_fifo #(.T(task_t), .DEPTH(TASK_FIFO_DEPTH)) u_task_fifo (
    .clk, .rst_n,
    .in_valid (task_valid), .in_ready (task_ready), .in_data (task_in),
    .out_valid(tq_valid),   .out_ready(tq_ready),   .out_data(tq_task),
    .count    ()
  );

  // ---- scheduler ----------------------------------------------------------------
  logic     disp_valid [NUM_ACC];
  logic     disp_ready [NUM_ACC];
  disp_t    disp       [NUM_ACC];
  logic     comp_valid [NUM_ACC];
  rob_idx_t comp_rob   [NUM_ACC];

  soda_task_scheduler #(
    .RS_DEPTH(RS_DEPTH), .NUM_ACC(NUM_ACC), .ACC_FUNC({FUNC_CSPF128, FUNC_CSPF64})
  ) u_sched (
    .clk, .rst_n,
    .in_valid(tq_valid), .in_ready(tq_ready), .in_task(tq_task),
    .disp_valid, .disp_ready, .disp,
    .comp_valid, .comp_rob,
    .ret_valid, .ret_id, .idle
  );

  // ---- accelerators ----------------------------------------------------------------
  logic         r_valid [NUM_ACC];
  logic         r_ready [NUM_ACC];
  cspf_result_t r_res   [NUM_ACC];
  logic [CTX_W-1:0] r_ctx [NUM_ACC];
  logic [CTX_W-1:0] q_ctx [NUM_ACC];
  logic         busy    [NUM_ACC];

  rob_idx_t r_rob [NUM_ACC];

  for (genvar i = 0; i < NUM_ACC; i++) begin : g_ctx
    ctx_t c, rc;
    assign rc       = ctx_t'(r_ctx[i]);
    assign r_rob[i] = rc.rob;
    always_comb begin
      c.id      = disp[i].id;
      c.rob     = disp[i].rob;
      c.dst_tag = disp[i].dst_tag;
    end
    assign q_ctx[i] = c;
  end

  cspf_accel #(.MAX_NODES(ACC0_NODES), .CTX_W(CTX_W)) u_cspf64 (
    .clk, .rst_n,
    .g_we(g_we && !g_acc), .g_u, .g_v, .g_link,
    .q_valid(disp_valid[0]), .q_ready(disp_ready[0]), .q(cspf_query_t'(disp[0].arg)), .q_ctx(q_ctx[0]),
    .r_valid(r_valid[0]), .r_ready(r_ready[0]), .r(r_res[0]), .r_ctx(r_ctx[0]),
    .busy(busy[0])
  );

  cspf_accel #(.MAX_NODES(ACC1_NODES), .CTX_W(CTX_W)) u_cspf128 (
    .clk, .rst_n,
    .g_we(g_we && g_acc), .g_u, .g_v, .g_link,
    .q_valid(disp_valid[1]), .q_ready(disp_ready[1]), .q(cspf_query_t'(disp[1].arg)), .q_ctx(q_ctx[1]),
    .r_valid(r_valid[1]), .r_ready(r_ready[1]), .r(r_res[1]), .r_ctx(r_ctx[1]),
    .busy(busy[1])
  );

  assign acc_busy = {busy[1], busy[0]};

  // ---- result arbitration and channel ---------------------------------------------
  logic    rr;          // engine preferred on a tie
  logic    grant;       // engine whose result goes in this cycle
  logic    rf_valid, rf_ready;
  result_t rf_data;
  ctx_t    gctx;

  always_comb begin
    if (r_valid[0] && r_valid[1]) grant = rr;
    else                          grant = r_valid[1];
    rf_valid = r_valid[0] || r_valid[1];
    gctx     = ctx_t'(r_ctx[grant]);
    rf_data.id      = gctx.id;
    rf_data.dst_tag = gctx.dst_tag;
    rf_data.res     = r_res[grant];
    for (int i = 0; i < NUM_ACC; i++) begin
      r_ready[i]    = rf_valid && rf_ready && (grant == 1'(i));
      comp_valid[i] = r_valid[i] && r_ready[i];
      comp_rob[i]   = r_rob[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              rr <= 1'b0;
    else if (rf_valid && rf_ready)           rr <= !grant;
  end

  soda_comm_fifo #(.T(result_t), .DEPTH(RES_FIFO_DEPTH)) u_res_fifo (
    .clk, .rst_n,
    .in_valid (rf_valid),  .in_ready (rf_ready),  .in_data (rf_data),
    .out_valid(res_valid), .out_ready(res_ready), .out_data(res_out),
    .count    ()
  );

endmodule
