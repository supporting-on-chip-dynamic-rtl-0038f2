// tb_request_ingress: applies host, PE and merge-task submissions and checks
// the task pushed into the queue: priority (merge task, then PE, then host),
// increasing task IDs, destination resolution for discard, parent and
// grandparent (with the hand-off mark and the inherited interrupt), merge
// group opening and joining, and back-pressure from a full queue or from no
// free merge group.
module tb_request_ingress;
  import cb2_pkg::*;
  localparam int NPE = 4, S = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic mt_valid, mt_ready, pe_valid, pe_ready, host_valid, host_ready;
  sub_t mt_sub, host_sub;
  launch_req_t pe_req;
  logic [1:0] pe_src, deleg_pe;
  action_t [NPE-1:0] ctx;
  logic deleg_valid, alloc_req, alloc_gnt, push, full;
  merge_meta_t alloc_meta;
  logic [3:0] alloc_slot;
  task_t push_task;
  request_ingress #(.NPE(NPE), .SLOTS(S)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  tid_t last_id;
  task automatic expect_push(input string what, input dest_t d, input logic irq);
    #1;
    check(push, {what, ": pushed"});
    check(push_task.dest == d, {what, ": destination"});
    check(push_task.irq == irq, {what, ": interrupt flag"});
    check(push_task.task_id == last_id + 1, {what, ": task id"});
    last_id = push_task.task_id;
    @(posedge clk); #1;
  endtask

  initial begin
    mt_valid = 0; pe_valid = 0; host_valid = 0; mt_sub = '0; host_sub = '0;
    pe_req = '0; pe_src = 0; full = 0; alloc_gnt = 1; alloc_slot = 4'd9;
    for (int i = 0; i < NPE; i++) begin
      ctx[i] = '0;
      ctx[i].dest = '{kind: DST_MERGE, idx: 16'(40 + i)};
      ctx[i].irq  = (i == 2);
    end
    last_id = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // all three valid: merge task first
    mt_valid = 1; pe_valid = 1; host_valid = 1;
    mt_sub.dest = '{kind: DST_PE, idx: 16'd3}; mt_sub.kernel = 8'd2;
    host_sub.dest = '{kind: DST_HOST, idx: '0}; host_sub.irq = 1;
    pe_req.ret_mode = RET_DISCARD; pe_req.kernel = 8'd1; pe_src = 2'd1;
    #1;
    check(mt_ready && !pe_ready && !host_ready, "merge task has priority");
    expect_push("merge task", '{kind: DST_PE, idx: 16'd3}, 1'b0);
    mt_valid = 0; #1;
    check(pe_ready && !host_ready, "PE request before host");
    expect_push("discard", '{kind: DST_NONE, idx: '0}, 1'b0);
    pe_req.ret_mode = RET_PARENT;
    expect_push("parent", '{kind: DST_PE, idx: 16'd1}, 1'b0);
    pe_req.ret_mode = RET_GRANDPARENT; pe_src = 2'd2; #1;
    check(deleg_valid && deleg_pe == 2'd2, "hand-off marked for the parent");
    expect_push("grandparent", '{kind: DST_MERGE, idx: 16'd42}, 1'b1);
    // merge group of 3 from PE 3, parent mode
    pe_src = 2'd3; pe_req.ret_mode = RET_PARENT; pe_req.merge = 1;
    pe_req.merge_count = 3'd3; pe_req.merge_kernel = 8'd2;
    alloc_gnt = 0; #1;
    check(!pe_ready && !push, "waits for a free merge group");
    alloc_gnt = 1; #1;
    check(alloc_req && alloc_meta.count == 3'd3 && alloc_meta.kernel == 8'd2 &&
          alloc_meta.dest == '{kind: DST_PE, idx: 16'd3}, "group allocated with parent destination");
    expect_push("merge member 1", '{kind: DST_MERGE, idx: 16'd9}, 1'b0);
    alloc_slot = 4'd5; #1;
    check(!alloc_req, "second member joins without allocating");
    expect_push("merge member 2", '{kind: DST_MERGE, idx: 16'd9}, 1'b0);
    expect_push("merge member 3", '{kind: DST_MERGE, idx: 16'd9}, 1'b0);
    #1;
    check(alloc_req, "fourth merged request opens a new group");
    expect_push("new group member", '{kind: DST_MERGE, idx: 16'd5}, 1'b0);
    // full queue blocks everything
    pe_valid = 0; full = 1; #1;
    check(!host_ready && !push, "full queue blocks host");
    full = 0;
    expect_push("host", '{kind: DST_HOST, idx: '0}, 1'b1);
    host_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
