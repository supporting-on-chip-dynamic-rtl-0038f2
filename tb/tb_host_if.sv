// tb_host_if: writes a task through the register map and checks the
// submission (kernel, count, arguments, host destination, interrupt flag),
// that it stays pending until taken, read-back of registers, the result
// FIFO (order, task IDs, status count, back-pressure when full) and the
// interrupt output.
module tb_host_if;
  import cb2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_en, host_irq, sub_valid, sub_ready, hres_valid, hres_ready, irq_in;
  logic [7:0] wr_addr, rd_addr;
  logic [63:0] wr_data, rd_data;
  sub_t sub;
  arg_t hres_value;
  tid_t hres_task_id;
  host_if dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic wr(input logic [7:0] a, input logic [63:0] d);
    @(negedge clk); wr_en = 1; wr_addr = a; wr_data = d; @(negedge clk); wr_en = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [63:0] d);
    @(negedge clk); rd_en = 1; rd_addr = a; @(negedge clk); rd_en = 0; d = rd_data;
  endtask
  initial begin
    logic [63:0] d;
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0; sub_ready = 0;
    hres_valid = 0; hres_value = 0; hres_task_id = 0; irq_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wr(8'h00, {52'd0, 1'b1, 3'd3, 8'd5});
    wr(8'h08, 64'd10); wr(8'h10, 64'd20); wr(8'h18, 64'd30); wr(8'h20, 64'd40);
    check(!sub_valid, "nothing submitted before LAUNCH");
    wr(8'h28, 64'd1);
    check(sub_valid && sub.kernel == 8'd5 && sub.argc == 3'd3 && sub.irq &&
          sub.args[0] == 64'd10 && sub.args[3] == 64'd40 && sub.dest.kind == DST_HOST,
          "submission contents");
    rd(8'h40, d); check(d[0], "status shows pending submission");
    rd(8'h18, d); check(d == 64'd30, "argument read-back");
    @(negedge clk); sub_ready = 1; @(negedge clk); sub_ready = 0;
    check(!sub_valid, "submission taken");
    // results
    for (int i = 0; i < 18; i++) begin
      @(negedge clk); hres_valid = 1; hres_value = arg_t'(100 + i); hres_task_id = tid_t'(i);
      #1;
      check(hres_ready == (i < 16), $sformatf("result %0d ready", i));
    end
    @(negedge clk); hres_valid = 0;
    rd(8'h40, d); check(d[1] && d[12:8] == 5'd16, "status shows 16 results");
    for (int i = 0; i < 16; i++) begin
      rd(8'h38, d); check(d == 64'(i), "result task id");
      rd(8'h30, d); check(d == 64'(100 + i), "result value in order");
    end
    rd(8'h40, d); check(!d[1], "result FIFO empty");
    @(negedge clk); irq_in = 1; @(negedge clk); irq_in = 0; #1;
    check(host_irq, "interrupt forwarded");
    @(negedge clk); check(!host_irq, "interrupt is a pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
