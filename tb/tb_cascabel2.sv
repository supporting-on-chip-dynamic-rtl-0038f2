// tb_cascabel2: end-to-end test of the Cascabel 2 unit on its own. The test
// bench plays all PEs: PE 0 is a "parent" whose launch requests and result
// stream it drives and checks, PE 1 and PE 2 behave as immediately returning
// (NOP) PEs that echo their first argument, PE 3 sums its arguments (reduce
// kernel). It checks:
//  * launch-and-return latency of a NOP child with return-to-parent, which
//    must not exceed 62 cycles (the published figure for this operation);
//  * the three result formats (value; {task ID, value}; value then task ID);
//  * discard (no result beat), merge of three siblings into one reduce task
//    whose sum returns to the parent, and return-to-grandparent;
//  * host submission, host result read-back and the host interrupt.
module tb_cascabel2;
  import cb2_pkg::*;

  localparam int unsigned NPE = 4;
  localparam kid_t [NPE-1:0] KIDS = {KID_REDUCE, KID_NOP, KID_NOP, KID_EXT};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        host_wr_en = 1'b0, host_rd_en = 1'b0;
  logic [7:0]  host_wr_addr = '0, host_rd_addr = '0;
  logic [63:0] host_wr_data = '0, host_rd_data;
  logic        host_irq;
  logic [NPE-1:0] lr_valid, lr_ready, rs_valid, rs_ready, rs_last;
  logic [NPE-1:0][LAUNCH_W-1:0] lr_data;
  logic [NPE-1:0][RESULT_W-1:0] rs_data;
  logic [NPE-1:0] pe_start, pe_done, pe_busy;
  args_t pe_args; cnt_t pe_argc; tid_t pe_task_id;
  arg_t [NPE-1:0] pe_retval;
  logic ready, hol_stall;
  logic [6:0] queue_level;
  logic [4:0] free_groups;
  ret_ev_t ret_ev;

  cascabel2 #(.NPE(NPE), .PE_KID(KIDS), .QUEUE_DEPTH(64), .SLOTS(16)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- PE models for PEs 1..3 ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pe_done[3:1] <= '0;
      pe_retval[3:1] <= '0;
    end else begin
      pe_done[3:1] <= pe_start[3:1];
      for (int i = 1; i < 3; i++) if (pe_start[i]) pe_retval[i] <= pe_args[0];
      if (pe_start[3]) begin
        arg_t s; s = '0;
        for (int k = 0; k < 4; k++) if (k < int'(pe_argc)) s += pe_args[k];
        pe_retval[3] <= s;
      end
    end
  end
  assign lr_valid[3:1] = '0;
  assign lr_data[3:1]  = '0;
  assign rs_ready      = '1;

  // PE 0: parent; its own start/done driven by the test
  logic p0_done = 1'b0;
  arg_t p0_ret  = '0;
  assign pe_done[0]   = p0_done;
  assign pe_retval[0] = p0_ret;
  logic lv0 = 1'b0;
  logic [LAUNCH_W-1:0] ld0 = '0;
  assign lr_valid[0] = lv0;
  assign lr_data[0]  = ld0;

  // count result beats at PE 0, PE 1..3 must see none
  int beats0 = 0;
  always @(posedge clk) begin
    if (rst_n && rs_valid[0]) beats0++;
    if (rst_n && |rs_valid[3:1]) begin
      failures++;
      $display("FAIL: result beat to a PE that asked for none");
    end
  end

  task automatic send(input launch_req_t r);
    ld0 <= r; lv0 <= 1'b1;
    do @(posedge clk); while (!lr_ready[0]);
    lv0 <= 1'b0;
  endtask

  function automatic launch_req_t mk(kid_t k, arg_t a0, ret_mode_t m, fmt_t f);
    launch_req_t r = '0;
    r.kernel = k; r.argc = 3'd1; r.args[0] = a0; r.ret_mode = m; r.fmt = f;
    return r;
  endfunction

  task automatic get_beat(output arg_t d, output logic l, output int cyc);
    cyc = 0;
    while (!rs_valid[0]) begin @(posedge clk); cyc++; end
    d = rs_data[0]; l = rs_last[0];
    @(posedge clk);
  endtask

  task automatic host_wr(input logic [7:0] a, input logic [63:0] d);
    host_wr_en <= 1'b1; host_wr_addr <= a; host_wr_data <= d;
    @(posedge clk);
    host_wr_en <= 1'b0;
  endtask
  task automatic host_rd(input logic [7:0] a, output logic [63:0] d);
    host_rd_en <= 1'b1; host_rd_addr <= a;
    @(posedge clk);
    host_rd_en <= 1'b0;
    @(posedge clk);
    d = host_rd_data;
  endtask

  // task ID of the most recent start on a NOP PE, and a cycle counter
  tid_t last_child_id = '0;
  int   cycle = 0;
  always @(posedge clk) begin
    cycle++;
    if (pe_start[1] || pe_start[2]) last_child_id <= pe_task_id;
  end

  int irqs = 0;
  always @(posedge clk) if (rst_n && host_irq) irqs++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    arg_t d, d2; logic l, l2; int cyc, t0, lat; logic [63:0] r;
    launch_req_t q;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (ready);
    @(posedge clk);

    // give PE 0 a running task first (host launches kernel EXT), so that it
    // has a recorded destination (host) for return-to-grandparent
    host_wr(8'h00, {52'd0, 1'b1, 3'd1, KID_EXT});
    host_wr(8'h08, 64'd7);
    host_wr(8'h28, 64'd1);
    wait (pe_start[0]);
    check(pe_args[0] == 64'd7, "host task argument at PE 0");
    @(posedge clk);

    // 1. latency: NOP child, return to parent, format a
    t0 = cycle;
    send(mk(KID_NOP, 64'h1234, RET_PARENT, FMT_A));
    get_beat(d, l, cyc);
    lat = cycle - t0;
    $display("launch-and-return latency: %0d cycles", lat);
    check(d == 64'h1234 && l, "format a value");
    check(lat <= 62, "launch-and-return latency within 62 cycles");

    // 2. format b
    send(mk(KID_NOP, 64'hABCD, RET_PARENT, FMT_B));
    get_beat(d, l, cyc);
    check(d == {last_child_id, 32'hABCD} && l, "format b {task id, value}");
    // 3. format c
    send(mk(KID_NOP, 64'h5555, RET_PARENT, FMT_C));
    get_beat(d, l, cyc);
    get_beat(d2, l2, cyc);
    check(d == 64'h5555 && !l, "format c beat 1 value");
    check(d2 == 64'(last_child_id), "format c beat 2 task id");
    check(l2, "format c last on beat 2");

    // 4. discard: no beat arrives
    t0 = beats0;
    send(mk(KID_NOP, 64'h77, RET_DISCARD, FMT_A));
    repeat (40) @(posedge clk);
    check(beats0 == t0, "discard sends nothing");

    // 5. merge three siblings -> reduce -> parent
    q = mk(KID_NOP, 64'd10, RET_PARENT, FMT_A);
    q.merge = 1'b1; q.merge_count = 3'd3; q.merge_kernel = KID_REDUCE;
    send(q);
    q.args[0] = 64'd20; send(q);
    q.args[0] = 64'd33; send(q);
    get_beat(d, l, cyc);
    check(d == 64'd63, "merge/reduce sum returned to parent");

    // 6. return to grandparent: parent's destination is the host
    send(mk(KID_NOP, 64'h99, RET_GRANDPARENT, FMT_A));
    repeat (30) @(posedge clk);
    host_rd(8'h40, r);
    check(r[1], "grandparent result reached host");
    host_rd(8'h38, r);
    host_rd(8'h30, r);
    check(r == 64'h99, "grandparent result value at host");
    check(irqs == 1, "host interrupt inherited by the grandparent result");
    // parent now finishes: its result must be dropped (it passed it on)
    p0_ret <= 64'hDEAD; p0_done <= 1'b1; @(posedge clk); p0_done <= 1'b0;
    repeat (20) @(posedge clk);
    host_rd(8'h40, r);
    check(!r[1], "parent result dropped after hand-off");
    check(!pe_busy[0], "parent PE released");

    // 7. host launches a reduce task directly
    host_wr(8'h00, {52'd0, 1'b0, 3'd2, KID_REDUCE});
    host_wr(8'h08, 64'd5);
    host_wr(8'h10, 64'd6);
    host_wr(8'h28, 64'd1);
    repeat (20) @(posedge clk);
    host_rd(8'h30, r);
    check(r == 64'd11, "host-launched reduce result");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
