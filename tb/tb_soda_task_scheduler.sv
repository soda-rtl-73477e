// tb_soda_task_scheduler: self-checking test of the out-of-order task
// scheduler. Three accelerator ports are modelled (two of function 0, one of
// function 1) with random acceptance and random run times. A random program
// of tasks over a few variables, so that dependences are dense, is issued in
// order. The testbench keeps its own program-order model and checks:
//  * each task goes to a port of its function, exactly once;
//  * each source tag is the destination tag given to the last older writer of
//    that variable (or the variable's reset tag), and that writer has
//    finished (read-after-write respected);
//  * a destination tag is never one that still holds a live value
//    (write-after-write and write-after-read removed by renaming);
//  * tasks retire in issue order, each once;
//  * an independent task reaches its port two cycles after issue.
// It counts read-after-write waits, out-of-order dispatches, renamed
// write-after-write/read hazards, issue stalls and parallel dispatch, and
// fails if any of them never happened. A watchdog ends the run if it hangs.
module tb_soda_task_scheduler;
  import soda_pkg::*;
  localparam int NUM_ACC = 3;
  localparam logic [NUM_ACC*FUNC_W-1:0] ACC_FUNC = {2'd1, 2'd0, 2'd0};
  localparam int NT   = 240;   // tasks in the program
  localparam int NVAR = 6;     // variables the program uses

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready;
  task_t in_task;
  logic disp_valid [NUM_ACC];
  logic disp_ready [NUM_ACC];
  disp_t disp [NUM_ACC];
  logic comp_valid [NUM_ACC];
  rob_idx_t comp_rob [NUM_ACC];
  logic ret_valid, idle;
  task_id_t ret_id;

  soda_task_scheduler #(.RS_DEPTH(8), .NUM_ACC(NUM_ACC), .ACC_FUNC(ACC_FUNC)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // ---- program and its model ------------------------------------------------
  task_t prog [NT];
  int    prod [NT][NUM_SRC];   // producer task of each source, -1 = reset value
  int    prev_writer [NT];     // older writer of the same variable, -1 = none
  int    last_writer [NVAR];
  int    issue_cyc [NT];
  bit    issued [NT], dispatched [NT], completed [NT], retired [NT], dead [NT];
  bit    init_dead [NUM_ARCH];
  tag_t  dtag [NT];
  int    cyc = 0;
  int    next_ret = 0;
  int    max_disp = -1;

  int n_raw_wait = 0, n_ooo = 0, n_rename = 0, n_stall = 0, n_parallel = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int v = 0; v < NVAR; v++) last_writer[v] = -1;
    for (int k = 0; k < NT; k++) begin
      prog[k] = '0;
      prog[k].id       = task_id_t'(k);
      prog[k].func     = func_t'($urandom_range(0, 1));
      prog[k].src_used = NUM_SRC'($urandom_range(0, 3));
      for (int s = 0; s < NUM_SRC; s++) prog[k].src[s] = var_t'($urandom_range(0, NVAR - 1));
      prog[k].dst_used = ($urandom_range(0, 9) != 0);
      prog[k].dst      = var_t'($urandom_range(0, NVAR - 1));
      prog[k].arg      = $urandom;
      for (int s = 0; s < NUM_SRC; s++)
        prod[k][s] = prog[k].src_used[s] ? last_writer[prog[k].src[s]] : -1;
      prev_writer[k] = prog[k].dst_used ? last_writer[prog[k].dst] : -1;
      if (prog[k].dst_used) last_writer[prog[k].dst] = k;
    end
  end

  // ---- issue driver -------------------------------------------------------------
  int k_iss = 0;
  bit hs;
  bit raw_pending [NT];
  initial begin
    in_valid = 1'b0; in_task = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    // the first task goes alone into an idle scheduler, to measure the latency
    while (k_iss < NT) begin
      in_valid = (k_iss == 0) || ($urandom_range(0, 99) < 85);
      in_task  = prog[k_iss];
      #1;
      hs = in_valid && in_ready;
      if (in_valid && !in_ready) n_stall++;
      @(posedge clk);
      #1;
      if (hs) begin
        issued[k_iss]    = 1'b1;
        issue_cyc[k_iss] = cyc;
        for (int s = 0; s < NUM_SRC; s++)
          if (prod[k_iss][s] >= 0 && !completed[prod[k_iss][s]]) raw_pending[k_iss] = 1'b1;
        // a renamed hazard: an older, unfinished task reads or writes our destination
        if (prog[k_iss].dst_used)
          for (int j = 0; j < k_iss; j++)
            if (!completed[j] &&
                ((prog[j].dst_used && prog[j].dst == prog[k_iss].dst) ||
                 (prog[j].src_used[0] && prog[j].src[0] == prog[k_iss].dst) ||
                 (prog[j].src_used[1] && prog[j].src[1] == prog[k_iss].dst))) begin
              n_rename++;
              break;
            end
        k_iss++;
        if (k_iss == 1) begin
          in_valid = 1'b0;
          repeat (6) @(posedge clk);
          #1;
        end
      end
    end
    in_valid = 1'b0;
  end

  // ---- accelerator models ----------------------------------------------------------
  bit running [NUM_ACC];
  for (genvar i = 0; i < NUM_ACC; i++) begin : g_acc
    int     remaining = 0;
    disp_t  cur;
    initial begin
      disp_ready[i] = 1'b0;
      comp_valid[i] = 1'b0;
      comp_rob[i]   = '0;
      forever begin
        @(posedge clk);
        #2;
        comp_valid[i] = 1'b0;
        if (running[i]) begin
          if (remaining == 0) begin
            comp_valid[i] = 1'b1;
            comp_rob[i]   = cur.rob;
            completed[int'(cur.id)] = 1'b1;
            running[i] = 1'b0;
          end else remaining--;
        end
        disp_ready[i] = !running[i] && !comp_valid[i] && (($urandom_range(0, 99) < 70) || cyc < 12);
        #1;
        if (disp_valid[i] && disp_ready[i]) begin
          cur = disp[i];
          running[i] = 1'b1;
          remaining = $urandom_range(0, 12);
          accept(i, disp[i]);
        end
      end
    end
  end

  // checks made when port i takes task t
  function automatic void accept(input int i, input disp_t t);
    int k = int'(t.id);
    int busy_ports = 0;
    check(issued[k] && !dispatched[k], $sformatf("task %0d dispatched once, after issue", k));
    dispatched[k] = 1'b1;
    check(t.func == prog[k].func && t.func == ACC_FUNC[i*FUNC_W +: FUNC_W],
          $sformatf("task %0d on a port of its function", k));
    check(t.arg == prog[k].arg, "argument carried");
    for (int s = 0; s < NUM_SRC; s++) if (prog[k].src_used[s]) begin
      if (prod[k][s] < 0)
        check(t.src_tag[s] == tag_t'(prog[k].src[s]), $sformatf("task %0d src %0d reset tag", k, s));
      else begin
        check(dispatched[prod[k][s]] && t.src_tag[s] == dtag[prod[k][s]],
              $sformatf("task %0d src %0d tag of producer %0d", k, s, prod[k][s]));
        check(completed[prod[k][s]], $sformatf("task %0d waited for producer %0d", k, prod[k][s]));
      end
    end
    if (prog[k].dst_used) begin
      dtag[k] = t.dst_tag;
      for (int j = 0; j < NT; j++)
        if (j != k && dispatched[j] && prog[j].dst_used && !dead[j])
          check(dtag[j] != t.dst_tag, $sformatf("task %0d tag %0d still live in task %0d", k, t.dst_tag, j));
      for (int v = 0; v < NUM_ARCH; v++)
        if (!init_dead[v]) check(tag_t'(v) != t.dst_tag, $sformatf("task %0d took live reset tag %0d", k, v));
    end
    if (raw_pending[k]) n_raw_wait++;
    if (k < max_disp) n_ooo++;
    if (k > max_disp) max_disp = k;
    for (int p = 0; p < NUM_ACC; p++) if (running[p]) busy_ports++;
    if (busy_ports >= 2) n_parallel++;
    if (k == 0) check(cyc + 1 - issue_cyc[0] == 2, $sformatf("issue to dispatch latency %0d", cyc + 1 - issue_cyc[0]));
  endfunction

  // ---- retirement ----------------------------------------------------------------------
  always @(posedge clk) begin
    #1;
    if (rst_n && ret_valid) begin
      int k;
      k = int'(ret_id);
      check(k == next_ret, $sformatf("retired %0d, expected %0d", k, next_ret));
      check(completed[k], $sformatf("task %0d retired after finishing", k));
      retired[k] = 1'b1;
      if (prog[k].dst_used) begin
        if (prev_writer[k] < 0) init_dead[prog[k].dst] = 1'b1;
        else                    dead[prev_writer[k]] = 1'b1;
      end
      next_ret++;
    end
  end

  initial begin
    wait (next_ret == NT);
    repeat (5) @(posedge clk);
    #1;
    check(idle, "scheduler idle at the end");
    for (int k = 0; k < NT; k++) check(dispatched[k] && completed[k] && retired[k], $sformatf("task %0d ran", k));
    $display("raw_wait=%0d ooo=%0d rename=%0d stall=%0d parallel=%0d",
             n_raw_wait, n_ooo, n_rename, n_stall, n_parallel);
    check(n_raw_wait > 0, "read-after-write wait happened");
    check(n_ooo > 0, "out-of-order dispatch happened");
    check(n_rename > 0, "renamed hazard happened");
    check(n_stall > 0, "issue stall happened");
    check(n_parallel > 0, "parallel dispatch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (retired %0d of %0d)", next_ret, NT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
