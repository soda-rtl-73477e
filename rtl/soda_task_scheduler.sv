// soda_task_scheduler: out-of-order hardware task scheduler with renaming.
//
// The host issues tasks in program order. Each task reads up to NUM_SRC
// variables and writes one. The scheduler lets a task start as soon as the
// tasks producing its inputs have finished, in whatever order that happens,
// and dispatches ready tasks to free accelerators of the right kind in
// parallel. Following the description, it removes write-after-write and
// write-after-read hazards by renaming and only read-after-write dependences
// make a task wait; there is no speculation. How it does so is this design's
// own choice, borrowed from register renaming in superscalar processors:
//
//  * Rename table: maps each of NUM_ARCH variables to the physical tag of its
//    newest value, with a ready bit per physical tag. Each issued task takes a
//    fresh destination tag from a free list, so a later writer never disturbs
//    an earlier reader or writer of the same variable.
//  * Task window (RS_DEPTH entries): holds issued tasks with their source tags
//    and ready bits until all sources are ready. Completions broadcast their
//    destination tag and wake waiting entries in the same cycle.
//  * Select: for every accelerator port with an empty or draining output
//    register, the oldest ready task of that port's function is moved out.
//    Two ports of the same function never take the same task.
//  * Completion order buffer (ROB_DEPTH entries): records every task in issue
//    order with the tag its destination used to have. Tasks retire in order
//    once finished, and retirement returns that old tag to the free list; by
//    then every task that could read it has finished.
//
// Interface: in_* valid/ready for issue (one task per cycle). disp_*[i]
// valid/ready per accelerator port i; port i serves function
// ACC_FUNC[i*FUNC_W +: FUNC_W]; an offered task is held stable until taken.
// comp_valid[i]/comp_rob[i]: accelerator i has finished the task with that
// order-buffer index (several ports may complete in one cycle). ret_valid/
// ret_id: one task retired, in issue order (the join point for the host).
// Timing: a task issued at cycle t whose sources are ready is offered on its
// port at t+2 (rename, then select into the port register); a completion at
// cycle t makes a waiting consumer eligible for select in the same cycle.
module soda_task_scheduler import soda_pkg::*; #(
  parameter int unsigned              RS_DEPTH = 8,
  parameter int unsigned              NUM_ACC  = 2,
  parameter logic [NUM_ACC*FUNC_W-1:0] ACC_FUNC = {FUNC_CSPF128, FUNC_CSPF64}
) (
  input  logic      clk,
  input  logic      rst_n,
  // issue
  input  logic      in_valid,
  output logic      in_ready,
  input  task_t     in_task,
  // dispatch
  output logic      disp_valid [NUM_ACC],
  input  logic      disp_ready [NUM_ACC],
  output disp_t     disp       [NUM_ACC],
  // completion
  input  logic      comp_valid [NUM_ACC],
  input  rob_idx_t  comp_rob   [NUM_ACC],
  // retirement
  output logic      ret_valid,
  output task_id_t  ret_id,
  output logic      idle
);
  localparam int unsigned RSW = $clog2(RS_DEPTH);
  localparam int unsigned FLW = $clog2(NUM_PHYS);

  // ---- rename table and tag state ------------------------------------------
  tag_t                map_tag [NUM_ARCH];
  logic [NUM_PHYS-1:0] tag_rdy;

  // ---- free list of physical tags ------------------------------------------
  tag_t                fl      [NUM_PHYS];
  logic [FLW-1:0]      fl_head, fl_tail;
  logic [FLW:0]        fl_cnt;

  // ---- completion order buffer ---------------------------------------------
  logic [ROB_DEPTH-1:0] rob_done;
  logic [ROB_DEPTH-1:0] rob_dst_used;
  tag_t                 rob_old  [ROB_DEPTH];
  tag_t                 rob_new  [ROB_DEPTH];
  task_id_t             rob_id   [ROB_DEPTH];
  rob_idx_t             rob_head, rob_tail;
  logic [ROB_W:0]       rob_cnt;

  // ---- task window -----------------------------------------------------------
  typedef struct packed {
    logic               valid;
    logic [NUM_SRC-1:0] src_rdy;
    disp_t              t;
  } rs_entry_t;
  rs_entry_t rs [RS_DEPTH];

  // ---- port output registers -------------------------------------------------
  logic  dq_valid [NUM_ACC];
  disp_t dq       [NUM_ACC];

  // ---- completions: tags woken this cycle ---------------------------------------
  logic [NUM_PHYS-1:0] woken;
  always_comb begin
    woken = '0;
    for (int i = 0; i < NUM_ACC; i++)
      if (comp_valid[i] && rob_dst_used[comp_rob[i]])
        woken[rob_new[comp_rob[i]]] = 1'b1;
  end

  // ---- issue and rename --------------------------------------------------------
  logic                rs_has_free;
  logic [RSW-1:0]      rs_free_idx;
  logic                issue;
  rs_entry_t           new_ent;
  tag_t                new_tag;

  always_comb begin
    rs_has_free = 1'b0;
    rs_free_idx = '0;
    for (int e = RS_DEPTH - 1; e >= 0; e--)
      if (!rs[e].valid) begin
        rs_has_free = 1'b1;
        rs_free_idx = RSW'(e);
      end
  end

  assign in_ready = rs_has_free && (rob_cnt != (ROB_W+1)'(ROB_DEPTH)) && (fl_cnt != '0);
  assign issue    = in_valid && in_ready;
  assign new_tag  = fl[fl_head];

  always_comb begin
    new_ent           = '0;
    new_ent.valid     = 1'b1;
    new_ent.t.id      = in_task.id;
    new_ent.t.rob     = rob_tail;
    new_ent.t.func    = in_task.func;
    new_ent.t.src_used = in_task.src_used;
    new_ent.t.dst_used = in_task.dst_used;
    new_ent.t.dst_tag = in_task.dst_used ? new_tag : '0;
    new_ent.t.arg     = in_task.arg;
    for (int s = 0; s < NUM_SRC; s++) begin
      new_ent.t.src_tag[s] = in_task.src_used[s] ? map_tag[in_task.src[s]] : '0;
      new_ent.src_rdy[s]   = !in_task.src_used[s]
                           || tag_rdy[map_tag[in_task.src[s]]]
                           || woken[map_tag[in_task.src[s]]];
    end
  end

  // ---- select: oldest ready task per port --------------------------------------
  logic                 pick_valid [NUM_ACC];
  logic [RSW-1:0]       pick_idx   [NUM_ACC];
  logic [RS_DEPTH-1:0]  taken;
  logic [RS_DEPTH-1:0]  ent_ready;

  always_comb begin
    for (int e = 0; e < RS_DEPTH; e++) begin
      ent_ready[e] = rs[e].valid;
      for (int s = 0; s < NUM_SRC; s++)
        if (!rs[e].src_rdy[s] && !woken[rs[e].t.src_tag[s]])
          ent_ready[e] = 1'b0;
    end
  end

  rob_idx_t best_age, age;
  always_comb begin
    taken    = '0;
    best_age = '1;
    age      = '0;
    for (int i = 0; i < NUM_ACC; i++) begin
      pick_valid[i] = 1'b0;
      pick_idx[i]   = '0;
      best_age      = '1;
      if (!dq_valid[i] || disp_ready[i]) begin
        for (int e = 0; e < RS_DEPTH; e++) begin
          age = rs[e].t.rob - rob_head;
          if (ent_ready[e] && !taken[e]
              && rs[e].t.func == ACC_FUNC[i*FUNC_W +: FUNC_W]
              && (!pick_valid[i] || age < best_age)) begin
            pick_valid[i] = 1'b1;
            pick_idx[i]   = RSW'(e);
            best_age      = age;
          end
        end
        if (pick_valid[i]) taken[pick_idx[i]] = 1'b1;
      end
    end
  end

  // ---- retirement ------------------------------------------------------------------
  logic retire;
  assign retire = (rob_cnt != '0) && rob_done[rob_head];

  // ---- state update ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < NUM_ARCH; a++) map_tag[a] <= tag_t'(a);
      tag_rdy <= '1;
      for (int p = 0; p < NUM_PHYS; p++)
        fl[p] <= tag_t'((p + NUM_ARCH) % NUM_PHYS);
      fl_head  <= '0;
      fl_tail  <= FLW'(NUM_PHYS - NUM_ARCH);
      fl_cnt   <= (FLW+1)'(NUM_PHYS - NUM_ARCH);
      rob_done <= '0;
      rob_dst_used <= '0;
      for (int r = 0; r < ROB_DEPTH; r++) begin
        rob_old[r] <= '0;
        rob_new[r] <= '0;
        rob_id[r]  <= '0;
      end
      rob_head <= '0;
      rob_tail <= '0;
      rob_cnt  <= '0;
      for (int e = 0; e < RS_DEPTH; e++) rs[e] <= '0;
      for (int i = 0; i < NUM_ACC; i++) begin
        dq_valid[i] <= 1'b0;
        dq[i]       <= '0;
      end
      ret_valid <= 1'b0;
      ret_id    <= '0;
    end else begin
      // wake-up of waiting tasks
      for (int e = 0; e < RS_DEPTH; e++)
        for (int s = 0; s < NUM_SRC; s++)
          if (woken[rs[e].t.src_tag[s]]) rs[e].src_rdy[s] <= 1'b1;

      // port registers: drain and refill from the window
      for (int i = 0; i < NUM_ACC; i++) begin
        if (dq_valid[i] && disp_ready[i]) dq_valid[i] <= 1'b0;
        if (pick_valid[i]) begin
          dq_valid[i]             <= 1'b1;
          dq[i]                   <= rs[pick_idx[i]].t;
          rs[pick_idx[i]].valid   <= 1'b0;
        end
      end

      // completions
      tag_rdy <= tag_rdy | woken;
      for (int i = 0; i < NUM_ACC; i++)
        if (comp_valid[i]) rob_done[comp_rob[i]] <= 1'b1;

      // issue
      if (issue) begin
        rs[rs_free_idx] <= new_ent;
        rob_done[rob_tail]     <= 1'b0;
        rob_dst_used[rob_tail] <= in_task.dst_used;
        rob_old[rob_tail]      <= map_tag[in_task.dst];
        rob_new[rob_tail]      <= new_tag;
        rob_id[rob_tail]       <= in_task.id;
        rob_tail               <= rob_tail + 1'b1;
        if (in_task.dst_used) begin
          map_tag[in_task.dst] <= new_tag;
          tag_rdy[new_tag]     <= 1'b0;
          fl_head              <= fl_head + 1'b1;
        end
      end

      // retirement: give the superseded tag back
      ret_valid <= retire;
      if (retire) begin
        ret_id   <= rob_id[rob_head];
        rob_head <= rob_head + 1'b1;
        if (rob_dst_used[rob_head]) begin
          fl[fl_tail] <= rob_old[rob_head];
          fl_tail     <= fl_tail + 1'b1;
        end
      end

      fl_cnt  <= fl_cnt
               + (FLW+1)'(retire && rob_dst_used[rob_head])
               - (FLW+1)'(issue && in_task.dst_used);
      rob_cnt <= rob_cnt + (ROB_W+1)'(issue) - (ROB_W+1)'(retire);
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_ACC; i++) begin
      disp_valid[i] = dq_valid[i];
      disp[i]       = dq[i];
    end
  end

  assign idle = (rob_cnt == '0);

  // ---- protocol rules --------------------------------------------------------------
  for (genvar i = 0; i < NUM_ACC; i++) begin : g_chk
    // an offered task stays offered, unchanged, until the port takes it
    a_disp_hold: assert property (@(posedge clk) disable iff (!rst_n)
      disp_valid[i] && !disp_ready[i] |=> disp_valid[i] && $stable(disp[i]));
    // only tasks in flight and not yet finished can complete
    a_comp_live: assert property (@(posedge clk) disable iff (!rst_n)
      comp_valid[i] |-> !rob_done[comp_rob[i]] && ((ROB_W+1)'(rob_idx_t'(comp_rob[i] - rob_head)) < rob_cnt));
  end

endmodule
