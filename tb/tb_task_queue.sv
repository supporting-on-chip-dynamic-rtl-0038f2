// tb_task_queue: random pushes and pops against a reference queue model;
// checks head contents and order, full/empty behaviour at a small depth, and
// the fill level.
module tb_task_queue;
  import cb2_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, full, pop, head_valid;
  task_t push_task, head;
  logic [3:0] level;
  task_queue #(.DEPTH(D)) dut (.*);
  int checks = 0, failures = 0;
  task_t model [$];
  int fulls = 0;
  initial begin
    repeat (50000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    push = 0; pop = 0; push_task = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      push = ($urandom_range(0, 9) < ((t / 500) % 2 ? 3 : 7));
      pop  = ($urandom_range(0, 9) < ((t / 500) % 2 ? 7 : 3));
      push_task = '0;
      push_task.task_id = $urandom;
      push_task.args[0] = {$urandom, $urandom};
      push_task.kernel = 8'($urandom);
      checks++;
      if (head_valid != (model.size() != 0) || full != (model.size() == D) ||
          int'(level) != model.size() || (head_valid && head != model[0])) begin
        failures++; $display("FAIL: t=%0d size %0d level %0d", t, model.size(), level);
      end
      if (full) fulls++;
      @(posedge clk);
      begin
        bit do_push;
        do_push = push && model.size() < D;
        if (pop && model.size() != 0) void'(model.pop_front());
        if (do_push) model.push_back(push_task);
      end
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
