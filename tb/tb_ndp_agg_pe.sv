// tb_ndp_agg_pe: runs one PE of each aggregation (avg, max, sum) over
// strided columns of a generated table held in a memory model with random
// grant and a random 1..3-cycle in-order response delay, for record counts
// 0, 1, 2, 7 and 300, and checks each result against a reference computed
// here, that each PE reads exactly one word per record, and that the sum
// and max PEs finish 1 cycle after their last word.
module tb_ndp_agg_pe;
  import cb2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start;
  args_t args;
  logic [2:0] done, mem_req, mem_gnt, mem_rvalid;
  arg_t [2:0] retval, mem_rdata;
  logic [2:0][31:0] mem_addr;

  for (genvar g = 0; g < 3; g++) begin : g_pe
    ndp_agg_pe #(.OP(agg_op_t'(g))) dut (
      .clk, .rst_n, .start, .args, .done(done[g]), .retval(retval[g]),
      .mem_req(mem_req[g]), .mem_addr(mem_addr[g]), .mem_gnt(mem_gnt[g]),
      .mem_rvalid(mem_rvalid[g]), .mem_rdata(mem_rdata[g])
    );
  end

  function automatic arg_t word(logic [31:0] a);
    return arg_t'((a * 32'd2654435761) >> 7) ^ (arg_t'(a) << 33);
  endfunction

  // memory model: in-order responses after 1..3 cycles
  typedef struct { int due; logic [31:0] a; } pend_t;
  pend_t q [3][$];
  int cyc = 0, reads [3];
  int last_rsp [3];
  always @(posedge clk) begin
    cyc++;
    for (int p = 0; p < 3; p++) begin
      mem_rvalid[p] <= 1'b0;
      if (q[p].size() != 0 && q[p][0].due <= cyc) begin
        mem_rvalid[p] <= 1'b1;
        mem_rdata[p]  <= word(q[p][0].a);
        last_rsp[p] = cyc;
        void'(q[p].pop_front());
      end
      if (rst_n && mem_req[p] && mem_gnt[p]) begin
        pend_t e;
        e.due = cyc + $urandom_range(0, 2) + ((q[p].size() != 0) ? q[p][$].due - cyc : 0);
        if (e.due <= cyc) e.due = cyc;
        e.a = mem_addr[p];
        q[p].push_back(e);
        reads[p]++;
      end
    end
  end
  always @(negedge clk) mem_gnt = 3'($urandom);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int ns [5] = '{0, 1, 2, 7, 300};
  initial begin
    start = 0; args = '0; mem_rvalid = '0; mem_rdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (ns[t]) begin
      int n; arg_t e_sum, e_max, e_avg; logic [2:0] seen; int done_cyc [3];
      n = ns[t];
      e_sum = 0; e_max = 0;
      for (int i = 0; i < n; i++) begin
        arg_t w; w = word(32'd500 + 32'(5 * i));
        e_sum += w;
        if (w > e_max) e_max = w;
      end
      e_avg = (n == 0) ? 0 : e_sum / arg_t'(n);
      for (int p = 0; p < 3; p++) reads[p] = 0;
      @(negedge clk);
      start = 1; args[0] = 64'd500; args[1] = arg_t'(n); args[2] = 64'd5;
      @(negedge clk); start = 0;
      seen = '0;
      while (seen != 3'b111) begin
        @(posedge clk); #1;
        for (int p = 0; p < 3; p++) if (done[p]) begin seen[p] = 1'b1; done_cyc[p] = cyc; end
      end
      check(retval[0] == e_avg, $sformatf("avg over %0d", n));
      check(retval[1] == e_max, $sformatf("max over %0d", n));
      check(retval[2] == e_sum, $sformatf("sum over %0d", n));
      for (int p = 0; p < 3; p++) check(reads[p] == n, $sformatf("PE %0d read %0d words", p, reads[p]));
      if (n > 0) for (int p = 1; p < 3; p++)
        check(done_cyc[p] - last_rsp[p] == 2, $sformatf("PE %0d finishes right after its last word", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
