// fib_pe: Fibonacci task PE for the recursion stress test, in the
// asynchronous style that relies on merge/reduce and return-to-grandparent.
// A task with argument n < 2 finishes at once with result n. A task with
// n >= 2 launches two child tasks, f(n-1) and f(n-2), and then finishes
// without waiting; its own result (0) is dropped, because both children
// are launched with the return-to-grandparent action and the merge flag
// (group of two, reduce kernel): their results are summed by a reduce
// task, whose sum goes wherever this task's result would have gone.
//
// The recursion scheme follows the design description (f(1) = f(2) = 1,
// children n-1 and n-2, completion right after spawning). Treating n < 2
// as the leaves, so that f(2) expands into f(1) and f(0) as in the
// recursion tree drawn for this design, and the PE's control timing are
// this design's choices.
//
// Timing: `done` is a one-cycle pulse, 1 cycle after `start` for a leaf and
// 1 cycle after the second launch beat is accepted otherwise. `retval` is
// held until the next `start`.
module fib_pe (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  cb2_pkg::args_t               args,
  output logic                         done,
  output cb2_pkg::arg_t                retval,
  output logic                         lr_valid,
  input  logic                         lr_ready,
  output logic [cb2_pkg::LAUNCH_W-1:0] lr_data
);
  import cb2_pkg::*;

  typedef enum logic [1:0] {F_IDLE, F_L1, F_L2, F_DONE} fstate_t;
  fstate_t st_q;
  arg_t    n_q;
  launch_req_t req;

  always_comb begin
    req              = '0;
    req.kernel       = KID_FIB;
    req.argc         = cnt_t'(1);
    req.ret_mode     = RET_GRANDPARENT;
    req.merge        = 1'b1;
    req.merge_count  = cnt_t'(2);
    req.merge_kernel = KID_REDUCE;
    req.fmt          = FMT_A;
    req.args[0]      = (st_q == F_L1) ? n_q - arg_t'(1) : n_q - arg_t'(2);
  end

  assign lr_valid = (st_q == F_L1) || (st_q == F_L2);
  assign lr_data  = req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= F_IDLE;
      n_q    <= '0;
      done   <= 1'b0;
      retval <= '0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        F_IDLE: if (start) begin
          n_q <= args[0];
          if (args[0] < arg_t'(2)) begin
            retval <= args[0];
            done   <= 1'b1;
          end else begin
            retval <= '0;
            st_q   <= F_L1;
          end
        end
        F_L1: if (lr_ready) st_q <= F_L2;
        F_L2: if (lr_ready) st_q <= F_DONE;
        F_DONE: begin
          done <= 1'b1;
          st_q <= F_IDLE;
        end
        default: st_q <= F_IDLE;
      endcase
    end
  end

endmodule
