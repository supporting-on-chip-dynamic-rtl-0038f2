// tb_launch_arbiter: drives four sources with random request streams and
// random output back-pressure, and checks that every beat is delivered
// once, unchanged, with the right source tag, in per-source order; that an
// offered beat stays stable until accepted; and that with all sources busy
// the grants rotate round-robin.
module tb_launch_arbiter;
  localparam int N = 4, W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] in_valid, in_ready;
  logic [N-1:0][W-1:0] in_data;
  logic out_valid, out_ready;
  logic [W-1:0] out_data;
  logic [1:0] out_src;

  launch_arbiter #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  int sent [N], recv [N];
  logic [W-1:0] prev_data; logic prev_stall;
  logic [1:0] prev_src;
  logic all_busy_q; logic [1:0] last_g; int rr_ok = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // sources: data = {source, sequence number}
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_valid <= '0;
      for (int i = 0; i < N; i++) begin sent[i] = 0; in_data[i] <= '0; end
    end else begin
      for (int i = 0; i < N; i++) begin
        if (in_valid[i] && in_ready[i]) begin
          sent[i] = sent[i] + 1;
          in_valid[i] <= 1'b0;
        end
        if ((!in_valid[i] || in_ready[i]) && $urandom_range(0, 3) != 0 && sent[i] < 200) begin
          in_valid[i] <= 1'b1;
          in_data[i]  <= {8'(i), 24'(sent[i])};
        end
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (prev_stall) begin
        checks++;
        if (!(out_valid && out_data == prev_data && out_src == prev_src)) begin
          failures++; $display("FAIL: offered beat changed before acceptance");
        end
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != {8'(out_src), 24'(recv[out_src])}) begin
          failures++;
          $display("FAIL: src %0d got %h expected seq %0d", out_src, out_data, recv[out_src]);
        end
        recv[out_src]++;
        if (all_busy_q) begin
          checks++;
          if (out_src != last_g + 2'd1) begin
            failures++; $display("FAIL: not round robin");
          end else rr_ok++;
        end
        last_g = out_src;
      end
      prev_stall = out_valid && !out_ready;
      prev_data = out_data; prev_src = out_src;
      all_busy_q = &in_valid;
    end
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  initial begin
    for (int i = 0; i < N; i++) recv[i] = 0;
    prev_stall = 0; all_busy_q = 0; last_g = 2'd3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (recv[i] != 200) begin failures++; $display("FAIL: src %0d delivered %0d", i, recv[i]); end
    end
    checks++;
    if (rr_ok == 0) begin failures++; $display("FAIL: round robin never observed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
