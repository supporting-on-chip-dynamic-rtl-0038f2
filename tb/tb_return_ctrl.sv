// tb_return_ctrl: records return actions for four PEs, signals their
// completion and checks what follows: result beats in formats a, b and c to
// the right PE, a deposit into the right merge group, a host result, no
// output for discard or for a task that handed its result on, the host
// interrupt, the PE release, and the event pulses.
module tb_return_ctrl;
  import cb2_pkg::*;
  localparam int NPE = 4, S = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic act_valid, deleg_valid;
  logic [1:0] act_pe, deleg_pe, res_dest;
  action_t act;
  action_t [NPE-1:0] ctx;
  logic [NPE-1:0] pe_done, release_pe;
  arg_t [NPE-1:0] pe_retval;
  logic res_valid, res_ready, res_last, dep_valid, dep_ready, hres_valid, hres_ready, irq;
  arg_t res_data, dep_value, hres_value;
  logic [3:0] dep_slot;
  tid_t hres_task_id;
  ret_ev_t ev;
  return_ctrl #(.NPE(NPE), .SLOTS(S)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // observers
  arg_t beats [$]; logic lasts [$]; int dests [$];
  arg_t deps [$]; int dslots [$]; arg_t hvals [$]; int irqs = 0, rels = 0;
  ret_ev_t evs = '0;
  always @(posedge clk) if (rst_n) begin
    if (res_valid && res_ready) begin beats.push_back(res_data); lasts.push_back(res_last); dests.push_back(int'(res_dest)); end
    if (dep_valid && dep_ready) begin deps.push_back(dep_value); dslots.push_back(int'(dep_slot)); end
    if (hres_valid && hres_ready) hvals.push_back(hres_value);
    if (irq) irqs++;
    rels += $countones(release_pe);
    evs |= ev;
  end
  always @(negedge clk) begin
    res_ready = ($urandom_range(0, 1) != 0);
    dep_ready = ($urandom_range(0, 1) != 0);
    hres_ready = ($urandom_range(0, 1) != 0);
  end
  task automatic record(input int pe, input int id, input dkind_t k, input int idx, input fmt_t f, input logic i);
    @(negedge clk);
    act_valid = 1; act_pe = 2'(pe);
    act = '{task_id: tid_t'(id), dest: '{kind: k, idx: 16'(idx)}, fmt: f, irq: i};
    @(negedge clk);
    act_valid = 0;
  endtask
  task automatic finish(input int pe, input arg_t v);
    @(negedge clk);
    pe_retval[pe] = v; pe_done = NPE'(1) << pe;
    @(negedge clk);
    pe_done = '0;
    repeat (20) @(posedge clk);
  endtask
  initial begin
    act_valid = 0; deleg_valid = 0; pe_done = '0; pe_retval = '0; act = '0;
    act_pe = 0; deleg_pe = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // format a to PE 2
    record(0, 11, DST_PE, 2, FMT_A, 0);
    check(ctx[0].dest == '{kind: DST_PE, idx: 16'd2}, "context visible to ingress");
    finish(0, 64'h1111_2222_3333_4444);
    check(beats.size() == 1 && beats[0] == 64'h1111_2222_3333_4444 && lasts[0] && dests[0] == 2, "format a");
    // format b to PE 3
    record(1, 12, DST_PE, 3, FMT_B, 0);
    finish(1, 64'h9999_8888_7777_6666);
    check(beats.size() == 2 && beats[1] == {32'd12, 32'h7777_6666} && lasts[1] && dests[1] == 3, "format b");
    // format c to PE 0
    record(2, 13, DST_PE, 0, FMT_C, 0);
    finish(2, 64'd55);
    check(beats.size() == 4 && beats[2] == 64'd55 && !lasts[2] && beats[3] == 64'd13 && lasts[3], "format c");
    // merge deposit
    record(3, 14, DST_MERGE, 7, FMT_A, 0);
    finish(3, 64'd77);
    check(deps.size() == 1 && deps[0] == 64'd77 && dslots[0] == 7, "merge deposit");
    // host with interrupt
    record(0, 15, DST_HOST, 0, FMT_A, 1);
    finish(0, 64'd99);
    check(hvals.size() == 1 && hvals[0] == 64'd99 && irqs == 1, "host result and interrupt");
    // discard
    record(1, 16, DST_NONE, 0, FMT_A, 0);
    finish(1, 64'd1);
    // hand-off: destination PE but marked
    record(2, 17, DST_PE, 1, FMT_A, 1);
    @(negedge clk); deleg_valid = 1; deleg_pe = 2; @(negedge clk); deleg_valid = 0;
    finish(2, 64'd2);
    check(beats.size() == 4 && deps.size() == 1 && hvals.size() == 1, "nothing sent for discard and hand-off");
    check(irqs == 1, "no interrupt for a handed-off result");
    // two PEs finishing together are both served
    record(0, 18, DST_PE, 1, FMT_A, 0);
    record(3, 19, DST_PE, 1, FMT_A, 0);
    @(negedge clk);
    pe_retval[0] = 64'd5; pe_retval[3] = 64'd6; pe_done = 4'b1001;
    @(negedge clk); pe_done = '0;
    repeat (30) @(posedge clk);
    check(beats.size() == 6 && beats[4] == 64'd5 && beats[5] == 64'd6, "simultaneous completions");
    check(rels == 9, $sformatf("every PE released once (%0d)", rels));
    check(evs == '{discard: 1, parent: 1, merge: 1, host: 1, skip: 1}, "all event pulses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
