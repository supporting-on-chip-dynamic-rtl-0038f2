// task_queue: the hardware task queue of the Cascabel 2 unit. It holds
// submitted tasks (kernel ID, arguments, task ID and resolved return action)
// until the launcher finds an idle PE for them, in first-in first-out order.
//
// The queue itself is taken from the design description; its depth is not
// given there and 512 entries (one 320-bit word each) is this design's
// choice. It is a first-word-fall-through FIFO: the oldest entry is visible
// on `head` while `head_valid` is high and is removed by `pop`. A push and a
// pop may happen in the same cycle; `push` is ignored when the queue is full
// (`full` high), `pop` when it is empty.
module task_queue #(
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           push,
  input  cb2_pkg::task_t push_task,
  output logic           full,
  input  logic           pop,
  output cb2_pkg::task_t head,
  output logic           head_valid,
  output logic [AW:0]    level
);

  cb2_pkg::task_t mem [DEPTH];
  logic [AW-1:0] wr_q, rd_q;
  logic [AW:0]   cnt_q;

  logic do_push, do_pop;
  assign full       = (cnt_q == (AW+1)'(DEPTH));
  assign head_valid = (cnt_q != '0);
  assign do_push    = push && !full;
  assign do_pop     = pop && head_valid;
  assign head       = mem[rd_q];
  assign level      = cnt_q;

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_q] <= push_task;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q  <= '0;
      rd_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= (32'(wr_q) == DEPTH - 1) ? '0 : wr_q + 1'b1;
      if (do_pop)  rd_q <= (32'(rd_q) == DEPTH - 1) ? '0 : rd_q + 1'b1;
      cnt_q <= cnt_q + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

endmodule
