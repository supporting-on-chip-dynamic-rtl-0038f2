// reduce_pe: merge/reduce task PE that sums its arguments. A merge task
// issued by the merge buffer carries the collected child results as its
// arguments (argument count = number of results); this PE returns their sum.
//
// Summation as the reduce operation follows the recursion example of the
// design description; taking the values as task arguments is this design's
// way of handing the buffered results to the reduce PE.
//
// Timing: `done` pulses 1 cycle after `start`; `retval` holds the sum until
// the next `start`.
module reduce_pe (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  cb2_pkg::args_t args,
  input  cb2_pkg::cnt_t  argc,
  output logic           done,
  output cb2_pkg::arg_t  retval
);
  import cb2_pkg::*;

  arg_t sum;
  always_comb begin
    sum = '0;
    for (int unsigned i = 0; i < NARGS; i++)
      if (cnt_t'(i) < argc) sum = sum + args[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done   <= 1'b0;
      retval <= '0;
    end else begin
      done <= start;
      if (start) retval <= sum;
    end
  end

endmodule
