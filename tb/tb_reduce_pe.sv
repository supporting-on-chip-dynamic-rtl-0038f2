// tb_reduce_pe: starts the reduce PE with random values and argument counts
// 1..4 and checks the sum and the one-cycle completion.
module tb_reduce_pe;
  import cb2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, done;
  args_t args; cnt_t argc; arg_t retval;
  reduce_pe dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    start = 0; args = '0; argc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      arg_t s = '0;
      @(negedge clk);
      start = 1; argc = cnt_t'($urandom_range(1, 4));
      for (int k = 0; k < 4; k++) args[k] = {$urandom, $urandom};
      s = '0;
      for (int k = 0; k < int'(argc); k++) s += args[k];
      @(negedge clk); start = 0;
      checks++;
      if (!done || retval != s) begin failures++; $display("FAIL: sum of %0d", argc); end
      @(negedge clk);
      checks++;
      if (done) begin failures++; $display("FAIL: done not a pulse"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
