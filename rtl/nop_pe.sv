// nop_pe: immediately returning task PE, as used to measure the
// launch-and-return latency. It finishes one cycle after it is started and
// returns its first argument, so that a caller can tell which launch a
// result belongs to.
//
// An immediately returning task follows the design description; returning
// the first argument rather than a constant is this design's choice.
//
// Timing: `done` pulses 1 cycle after `start`; `retval` holds until the
// next `start`.
module nop_pe (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  cb2_pkg::args_t args,
  output logic           done,
  output cb2_pkg::arg_t  retval
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done   <= 1'b0;
      retval <= '0;
    end else begin
      done <= start;
      if (start) retval <= args[0];
    end
  end

endmodule
