// tb_cascabel2_soc: end-to-end test of the full system at its default size
// (2 Fibonacci PEs, 4 reduce PEs, 1 NOP PE, 3 aggregation PEs, 1 external
// slot, 512-entry queue, 4096 merge groups). The test bench is the host,
// the table memory of the aggregation PEs and the PE in the external slot.
// It
//  * computes f(n) for n = 1..11 through recursive on-chip launches and
//    checks each result read back by the host, the host interrupt, and that
//    f(11) takes no more than 18939 cycles (63.13 us at 300 MHz, the time
//    published for this configuration);
//  * from the external PE, launches a NOP child with return-to-parent
//    (latency at most 62 cycles), a Fibonacci child with return-to-parent
//    (its result arrives through merged grandchildren), and a discarded
//    child, and then finishes its own host task;
//  * runs the aggregation query avg(age), max(salary), sum(hours) over
//    tables of 2, 4, 8, ... 262144 records, the sizes plotted for the
//    query in the published evaluation (four 64-bit words per record: id,
//    age, salary, hours), launched from the external PE as three on-chip
//    tasks whose results return in format c (value, then task ID) and are
//    matched to their tasks by ID;
//  * counts each mechanism (merge deposit, result hand-off to the
//    grandparent, return to parent, discard, host result, interrupt,
//    head-of-line stall of the FIFO queue) and fails any that never occurs.
module tb_cascabel2_soc;
  import cb2_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        host_wr_en = 1'b0, host_rd_en = 1'b0;
  logic [7:0]  host_wr_addr = '0, host_rd_addr = '0;
  logic [63:0] host_wr_data = '0, host_rd_data;
  logic        host_irq, ready, hol_stall;
  logic [10:0] pe_busy;
  logic [2:0]  ndp_mem_req, ndp_mem_gnt, ndp_mem_rvalid;
  logic [2:0][31:0] ndp_mem_addr;
  arg_t [2:0]  ndp_mem_rdata;
  logic [9:0]  queue_level;
  logic [12:0] free_groups;
  ret_ev_t     ret_ev;
  logic [0:0]  ext_start, ext_done, ext_lr_valid, ext_lr_ready;
  logic [0:0]  ext_rs_valid, ext_rs_ready, ext_rs_last;
  args_t       ext_args;
  cnt_t        ext_argc;
  tid_t        ext_task_id;
  arg_t [0:0]  ext_retval;
  logic [0:0][LAUNCH_W-1:0] ext_lr_data;
  logic [0:0][RESULT_W-1:0] ext_rs_data;

  cascabel2_soc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int cycle = 0;
  int n_merge = 0, n_skip = 0, n_parent = 0, n_discard = 0, n_host = 0;
  int n_irq = 0, n_stall = 0, max_level = 0;
  always @(posedge clk) begin
    cycle++;
    if (rst_n && ret_ev.merge)   n_merge++;
    if (rst_n && ret_ev.skip)    n_skip++;
    if (rst_n && ret_ev.parent)  n_parent++;
    if (rst_n && ret_ev.discard) n_discard++;
    if (rst_n && ret_ev.host)    n_host++;
    if (rst_n && host_irq) n_irq++;
    if (rst_n && hol_stall) n_stall++;
    if (rst_n && int'(queue_level) > max_level) max_level = int'(queue_level);
  end

  initial begin : watchdog
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
  task automatic host_launch(input kid_t k, input arg_t a0, input logic irq);
    host_wr(8'h00, {52'd0, irq, 3'd1, k});
    host_wr(8'h08, a0);
    host_wr(8'h28, 64'd1);
  endtask
  // wait for a host result; returns its value
  task automatic host_result(output arg_t v, output int ok);
    logic [63:0] st;
    ok = 0;
    for (int t = 0; t < 100000 && !ok; t++) begin
      host_rd(8'h40, st);
      if (st[1]) ok = 1;
    end
    host_rd(8'h30, v);
  endtask

  function automatic arg_t fib_ref(int n);
    arg_t a = 0, b = 1;
    for (int i = 0; i < n; i++) begin
      arg_t t = a + b; a = b; b = t;
    end
    return a;
  endfunction

  // ---- table memory: word a holds a value computed from a ----
  function automatic arg_t mem_word(logic [31:0] a);
    logic [31:0] h;
    h = a * 32'h9E37_79B1 ^ (a >> 3);
    unique case (a[1:0])
      2'd0: return arg_t'(a >> 2);              // record id
      2'd1: return arg_t'(18 + h % 50);         // age
      2'd2: return arg_t'(30000 + h % 90000);   // salary
      default: return arg_t'(h % 60);           // hours
    endcase
  endfunction
  localparam logic [31:0] TABLE_BASE = 32'h1000;
  always @(negedge clk) ndp_mem_gnt = 3'($urandom_range(0, 7)) | 3'b001;
  always_ff @(posedge clk) begin
    for (int p = 0; p < 3; p++) begin
      ndp_mem_rvalid[p] <= rst_n && ndp_mem_req[p] && ndp_mem_gnt[p];
      ndp_mem_rdata[p]  <= mem_word(ndp_mem_addr[p]);
    end
  end

  // task IDs given to the aggregation PEs (avg, max, sum) when they start
  tid_t ndp_tid [3];
  always @(posedge clk)
    for (int p = 0; p < 3; p++) if (dut.pe_start[7 + p]) ndp_tid[p] = dut.pe_task_id;

  // ---- external PE (slot 10), driven by the test ----
  logic lv = 1'b0;
  launch_req_t ld = '0;
  assign ext_lr_valid[0] = lv;
  assign ext_lr_data[0]  = ld;
  assign ext_rs_ready[0] = 1'b1;
  logic ed = 1'b0;
  arg_t er = '0;
  assign ext_done[0]   = ed;
  assign ext_retval[0] = er;

  // offer one launch beat; ready is sampled in the low clock phase, so the
  // beat is taken at the next rising edge
  task automatic ext_send(input launch_req_t r);
    @(negedge clk);
    ld = r; lv = 1'b1;
    #1;
    while (!ext_lr_ready[0]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 lv = 1'b0;
  endtask
  task automatic ext_get(output arg_t d);
    int t = 0;
    while (!ext_rs_valid[0] && t < 2000000) begin @(posedge clk); t++; end
    d = ext_rs_data[0];
    @(posedge clk);
  endtask
  function automatic launch_req_t mk(kid_t k, arg_t a0, ret_mode_t m);
    launch_req_t r = '0;
    r.kernel = k; r.argc = 3'd1; r.args[0] = a0; r.ret_mode = m; r.fmt = FMT_A;
    return r;
  endfunction


  initial begin
    arg_t v; int ok, t0, lat;
    logic [63:0] st;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (ready);
    @(posedge clk);

    // ---- Fibonacci through recursive on-chip launches ----
    for (int n = 1; n <= 11; n++) begin
      int irq0;
      irq0 = n_irq;
      t0 = cycle;
      host_launch(KID_FIB, arg_t'(n), 1'b1);
      host_result(v, ok);
      check(ok == 1, $sformatf("f(%0d) result arrived", n));
      check(v == fib_ref(n), $sformatf("f(%0d) = %0d, expected %0d", n, v, fib_ref(n)));
      repeat (5) @(posedge clk);
      check(n_irq == irq0 + 1, $sformatf("one host interrupt for f(%0d)", n));
      if (n == 11) begin
        $display("f(11) = %0d in %0d cycles (host polling included)", v, cycle - t0);
        check(cycle - t0 <= 18939, "f(11) within 63.13 us at 300 MHz");
      end
    end
    host_rd(8'h40, st);
    check(st[12:8] == 0, "no stray host results");
    check(int'(free_groups) == 4096, "all merge groups returned to the free list");

    // ---- external PE as a parent ----
    host_launch(KID_EXT, 64'd1, 1'b0);
    wait (ext_start[0]);
    @(posedge clk);
    t0 = cycle;
    ext_send(mk(KID_NOP, 64'h42, RET_PARENT));
    ext_get(v);
    lat = cycle - t0;
    $display("NOP launch-and-return latency: %0d cycles", lat);
    check(v == 64'h42, "NOP child result returned to parent");
    check(lat <= 62, "launch-and-return within 62 cycles");
    ext_send(mk(KID_FIB, 64'd9, RET_PARENT));
    ext_get(v);
    check(v == 64'd34, "f(9) returned to the parent PE");
    ext_send(mk(KID_NOP, 64'h5, RET_DISCARD));
    repeat (30) @(posedge clk);
    er <= 64'd777; ed <= 1'b1; @(posedge clk); ed <= 1'b0;
    host_result(v, ok);
    check(v == 64'd777, "external PE's own result at host");

    // ---- aggregation query ----
    for (int r = 1; r <= 18; r++) begin
      int rows;
      arg_t e_avg, e_max, e_sum, got [3];
      int seen;
      launch_req_t q;
      rows = 1 << r;
      e_avg = 0; e_max = 0; e_sum = 0;
      for (int i = 0; i < rows; i++) begin
        e_avg += mem_word(TABLE_BASE + 4 * i + 1);
        if (mem_word(TABLE_BASE + 4 * i + 2) > e_max) e_max = mem_word(TABLE_BASE + 4 * i + 2);
        e_sum += mem_word(TABLE_BASE + 4 * i + 3);
      end
      e_avg = e_avg / arg_t'(rows);
      host_launch(KID_EXT, 64'd2, 1'b0);
      wait (ext_start[0]);
      @(posedge clk);
      t0 = cycle;
      for (int p = 0; p < 3; p++) begin
        q = '0;
        q.kernel = (p == 0) ? KID_AVG : (p == 1) ? KID_MAX : KID_SUM;
        q.argc = 3'd3;
        q.args[0] = arg_t'(TABLE_BASE + 1 + p);
        q.args[1] = arg_t'(rows);
        q.args[2] = 64'd4;
        q.ret_mode = RET_PARENT;
        q.fmt = FMT_C;
        ext_send(q);
      end
      seen = 0;
      for (int k = 0; k < 3; k++) begin
        arg_t val, id;
        ext_get(val);
        ext_get(id);
        for (int p = 0; p < 3; p++) if (tid_t'(id) == ndp_tid[p]) begin
          got[p] = val; seen |= (1 << p);
        end
      end
      $display("query over %0d records: %0d cycles", rows, cycle - t0);
      check(seen == 7, $sformatf("all three results matched by task id (%0d rows)", rows));
      check(got[0] == e_avg, $sformatf("avg(age) over %0d rows: %0d vs %0d", rows, got[0], e_avg));
      check(got[1] == e_max, $sformatf("max(salary) over %0d rows", rows));
      check(got[2] == e_sum, $sformatf("sum(hours) over %0d rows", rows));
      er <= 64'd0; ed <= 1'b1; @(posedge clk); ed <= 1'b0;
      host_result(v, ok);
    end

    // ---- mechanism coverage ----
    $display("merge=%0d skip=%0d parent=%0d discard=%0d host=%0d irq=%0d stall=%0d maxq=%0d",
             n_merge, n_skip, n_parent, n_discard, n_host, n_irq, n_stall, max_level);
    check(n_merge > 0,   "merge deposits happened");
    check(n_skip > 0,    "results handed to grandparent happened");
    check(n_parent > 0,  "return to parent happened");
    check(n_discard > 0, "discard happened");
    check(n_host > 0,    "host results happened");
    check(n_irq > 0,     "host interrupts happened");
    check(n_stall > 0,   "head-of-line stall happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
