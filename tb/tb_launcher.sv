// tb_launcher: feeds a queue head of tasks for two PE kinds and checks that
// each is started on an idle PE of its kind with its arguments and task ID,
// that the return action is handed over with it, that a head task whose PEs
// are all busy stalls (FIFO order, no overtaking) and that a release makes
// the PE available again.
module tb_launcher;
  import cb2_pkg::*;
  localparam int NPE = 4;
  localparam kid_t [NPE-1:0] KIDS = {8'd2, 8'd2, 8'd1, 8'd1};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic head_valid, pop, act_valid, hol_stall;
  task_t head;
  logic [NPE-1:0] pe_start, release_pe, busy;
  args_t pe_args; cnt_t pe_argc; tid_t pe_task_id;
  logic [1:0] act_pe;
  action_t act;
  launcher #(.NPE(NPE), .PE_KID(KIDS)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic offer(input kid_t k, input int id, input int exp_pe);
    @(negedge clk);
    head = '0; head.kernel = k; head.task_id = tid_t'(id); head.args[0] = arg_t'(id * 3);
    head.argc = 3'd1; head.dest = '{kind: DST_HOST, idx: 16'(id)};
    head_valid = 1; #1;
    if (exp_pe < 0) begin
      check(!pop && hol_stall, $sformatf("task %0d stalls", id));
    end else begin
      check(pop && !hol_stall, $sformatf("task %0d popped", id));
      @(posedge clk); #1;
      check(pe_start == NPE'(1) << exp_pe, $sformatf("task %0d on PE %0d", id, exp_pe));
      check(pe_args[0] == arg_t'(id * 3) && pe_task_id == tid_t'(id), "arguments and id");
      check(act_valid && act_pe == 2'(exp_pe) && act.task_id == tid_t'(id) &&
            act.dest.idx == 16'(id), "return action handed over");
      check(busy[exp_pe], "PE marked busy");
    end
    head_valid = 0;
  endtask
  initial begin
    head_valid = 0; head = '0; release_pe = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    offer(8'd1, 1, 0);
    offer(8'd1, 2, 1);
    offer(8'd1, 3, -1);
    offer(8'd2, 4, 2);
    offer(8'd2, 5, 3);
    offer(8'd2, 6, -1);
    @(negedge clk); release_pe = 4'b0010; @(negedge clk); release_pe = '0;
    check(busy == 4'b1101, "release clears busy");
    offer(8'd1, 7, 1);
    offer(8'd3, 8, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
