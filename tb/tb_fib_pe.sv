// tb_fib_pe: starts the Fibonacci PE with n = 0..20 and checks that leaves
// (n < 2) finish at once with result n and launch nothing, and that other
// tasks send exactly two launch requests (f(n-1), then f(n-2), both with
// the return-to-grandparent action and a two-member merge group reduced by
// the reduce kernel) under random back-pressure, and finish afterwards.
module tb_fib_pe;
  import cb2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, done, lr_valid, lr_ready;
  args_t args;
  arg_t retval;
  logic [LAUNCH_W-1:0] lr_data;
  fib_pe dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  launch_req_t got [$];
  always @(posedge clk) if (lr_valid && lr_ready) got.push_back(launch_req_t'(lr_data));
  always @(negedge clk) lr_ready = ($urandom_range(0, 2) != 0);
  initial begin
    start = 0; args = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n <= 20; n++) begin
      int t;
      got.delete();
      @(negedge clk); start = 1; args[0] = arg_t'(n);
      @(negedge clk); start = 0;
      t = 0;
      while (!done && t < 100) begin @(negedge clk); t++; end
      check(done, $sformatf("f(%0d) done", n));
      if (n < 2) begin
        check(t == 0 && retval == arg_t'(n) && got.size() == 0, $sformatf("leaf f(%0d)", n));
      end else begin
        check(got.size() == 2, $sformatf("f(%0d) launches two children", n));
        if (got.size() == 2) begin
          check(got[0].args[0] == arg_t'(n - 1) && got[1].args[0] == arg_t'(n - 2), "children n-1, n-2");
          for (int k = 0; k < 2; k++)
            check(got[k].kernel == KID_FIB && got[k].argc == 3'd1 &&
                  got[k].ret_mode == RET_GRANDPARENT && got[k].merge &&
                  got[k].merge_count == 3'd2 && got[k].merge_kernel == KID_REDUCE,
                  "child request fields");
        end
      end
      @(negedge clk);
      check(!done, "done is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
