// tb_soda_comm_fifo: self-checking test of the communication queue.
// Drives random pushes and pops against a queue model kept in the testbench,
// checks every word leaving against the model, checks that in_ready drops
// exactly when DEPTH words are held (and the count), that a full queue
// accepts a write in a cycle it is read, and that order is kept over many
// wrap-arounds. A watchdog ends the run if it hangs.
module tb_soda_comm_fifo;
  localparam int unsigned DEPTH = 4;
  typedef logic [15:0] word_t;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid, in_ready, out_valid, out_ready;
  word_t in_data, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  int checks = 0, failures = 0;
  word_t model[$];
  int full_seen = 0, full_push_pop = 0;
  bit do_pop, do_push;

  soda_comm_fifo #(.T(word_t), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phases bias towards filling and towards draining
      in_valid  = ($urandom_range(0, 99) < ((cyc / 200) % 2 ? 80 : 30));
      out_ready = ($urandom_range(0, 99) < ((cyc / 200) % 2 ? 30 : 80));
      in_data   = word_t'($urandom);
      #1;
      check(out_valid == (model.size() != 0), "out_valid vs model");
      check(count == model.size(), "count vs model");
      check(in_ready == (model.size() < DEPTH || out_ready), "in_ready rule");
      if (model.size() == DEPTH) begin
        full_seen++;
        if (in_valid && out_ready) full_push_pop++;
      end
      if (out_valid && out_ready) begin
        check(out_data == model[0], $sformatf("data %h expected %h", out_data, model[0]));
      end
      do_pop  = out_valid && out_ready;
      do_push = in_valid && in_ready;
      @(posedge clk); #1;
      if (do_pop)  void'(model.pop_front());
      if (do_push) model.push_back(in_data);
    end
    check(full_seen > 0, "queue reached full");
    check(full_push_pop > 0, "push and pop while full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk); #1;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
