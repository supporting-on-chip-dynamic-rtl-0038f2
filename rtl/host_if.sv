// host_if: the memory-mapped interface through which the host submits tasks
// to the Cascabel 2 queue and collects the results of the tasks it launched.
// It also forwards the completion interrupt to the host.
//
// The design description states that the host submits tasks through a
// memory-mapped interface into the queue and that tasks may raise a host
// interrupt on completion; the register map, the 16-entry result FIFO and
// the simple single-cycle register bus are this design's choices.
//
// Register map (64-bit registers, byte addresses):
//   0x00 TASK    w  [7:0] kernel ID, [10:8] argument count, [11] interrupt
//   0x08-0x20 ARG0..ARG3  w  task arguments
//   0x28 LAUNCH  w  any value: submit the task described by TASK/ARGx
//   0x30 RESULT  r  oldest result value; reading it removes the entry
//   0x38 RESTID  r  task ID of the oldest result
//   0x40 STATUS  r  [0] submission pending, [1] result available,
//                   [12:8] number of results held
// A write takes effect at the clock edge; read data is valid one cycle after
// `rd_en`. A submission stays pending (STATUS[0]) until the queue takes it;
// a write to LAUNCH while one is pending is ignored.
module host_if #(
  parameter int unsigned RES_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // host register bus
  input  logic              wr_en,
  input  logic [7:0]        wr_addr,
  input  logic [63:0]       wr_data,
  input  logic              rd_en,
  input  logic [7:0]        rd_addr,
  output logic [63:0]       rd_data,
  output logic              host_irq,
  // submission to the queue
  output logic              sub_valid,
  input  logic              sub_ready,
  output cb2_pkg::sub_t     sub,
  // results of host-launched tasks
  input  logic              hres_valid,
  output logic              hres_ready,
  input  cb2_pkg::arg_t     hres_value,
  input  cb2_pkg::tid_t     hres_task_id,
  input  logic              irq_in
);
  import cb2_pkg::*;

  localparam int unsigned RW = $clog2(RES_DEPTH);

  kid_t  kernel_q;
  cnt_t  argc_q;
  logic  irq_q;
  args_t args_q;
  logic  pend_q;

  arg_t  rval  [RES_DEPTH];
  tid_t  rtid  [RES_DEPTH];
  logic [RW-1:0] rrd_q, rwr_q;
  logic [RW:0]   rcnt_q;

  logic res_push, res_pop;
  assign hres_ready = (rcnt_q != (RW+1)'(RES_DEPTH));
  assign res_push   = hres_valid && hres_ready;
  assign res_pop    = rd_en && rd_addr == 8'h30 && rcnt_q != '0;

  assign sub_valid  = pend_q;
  always_comb begin
    sub        = '0;
    sub.kernel = kernel_q;
    sub.argc   = argc_q;
    sub.args   = args_q;
    sub.dest   = '{kind: DST_HOST, idx: '0};
    sub.fmt    = FMT_A;
    sub.irq    = irq_q;
  end

  always_ff @(posedge clk) begin
    if (res_push) begin
      rval[rwr_q] <= hres_value;
      rtid[rwr_q] <= hres_task_id;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kernel_q <= '0;
      argc_q   <= '0;
      irq_q    <= 1'b0;
      args_q   <= '0;
      pend_q   <= 1'b0;
      rrd_q    <= '0;
      rwr_q    <= '0;
      rcnt_q   <= '0;
      rd_data  <= '0;
      host_irq <= 1'b0;
    end else begin
      host_irq <= irq_in;
      if (sub_valid && sub_ready) pend_q <= 1'b0;
      if (wr_en) begin
        unique case (wr_addr)
          8'h00: begin
            kernel_q <= wr_data[7:0];
            argc_q   <= wr_data[10:8];
            irq_q    <= wr_data[11];
          end
          8'h08: args_q[0] <= wr_data;
          8'h10: args_q[1] <= wr_data;
          8'h18: args_q[2] <= wr_data;
          8'h20: args_q[3] <= wr_data;
          8'h28: if (!pend_q) pend_q <= 1'b1;
          default: ;
        endcase
      end
      if (res_push) rwr_q <= rwr_q + 1'b1;
      if (res_pop)  rrd_q <= rrd_q + 1'b1;
      rcnt_q <= rcnt_q + (RW+1)'(res_push) - (RW+1)'(res_pop);
      if (rd_en) begin
        unique case (rd_addr)
          8'h00: rd_data <= {52'd0, irq_q, argc_q, kernel_q};
          8'h08: rd_data <= args_q[0];
          8'h10: rd_data <= args_q[1];
          8'h18: rd_data <= args_q[2];
          8'h20: rd_data <= args_q[3];
          8'h30: rd_data <= rval[rrd_q];
          8'h38: rd_data <= 64'(rtid[rrd_q]);
          8'h40: rd_data <= {51'd0, 5'(rcnt_q), 6'd0, (rcnt_q != '0), pend_q};
          default: rd_data <= '0;
        endcase
      end
    end
  end

endmodule
