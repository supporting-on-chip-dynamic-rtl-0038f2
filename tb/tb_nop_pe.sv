// tb_nop_pe: starts the NOP PE with random arguments and checks the
// one-cycle completion pulse and the echoed first argument.
module tb_nop_pe;
  import cb2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, done;
  args_t args; arg_t retval;
  nop_pe dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    start = 0; args = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      start = 1; args[0] = {$urandom, $urandom}; args[1] = {$urandom, $urandom};
      @(negedge clk); start = 0;
      checks++;
      if (!done || retval != args[0]) begin failures++; $display("FAIL: echo"); end
      @(negedge clk);
      checks++;
      if (done) begin failures++; $display("FAIL: done not a pulse"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
