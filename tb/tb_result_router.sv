// tb_result_router: sends random beats to random destinations with random
// per-destination ready, and checks that exactly the addressed output is
// valid, carries the data and last flag, and that the input ready is the
// addressed output's ready.
module tb_result_router;
  localparam int N = 6, W = 64;
  logic in_valid, in_ready, in_last;
  logic [W-1:0] in_data;
  logic [2:0] in_dest;
  logic [N-1:0] out_valid, out_ready, out_last;
  logic [N-1:0][W-1:0] out_data;
  result_router #(.N(N), .W(W)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 2000; t++) begin
      in_valid = 1'($urandom);
      in_last = 1'($urandom);
      in_data = {$urandom, $urandom};
      in_dest = 3'($urandom_range(0, N - 1));
      out_ready = N'($urandom);
      #1;
      checks++;
      if (out_valid != (in_valid ? N'(1) << in_dest : '0) ||
          in_ready != out_ready[in_dest] ||
          out_data[in_dest] != in_data || out_last[in_dest] != in_last) begin
        failures++;
        $display("FAIL: dest %0d valid %b ready %b", in_dest, out_valid, in_ready);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
