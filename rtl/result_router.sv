// result_router: the 1-to-n task result interconnect. The Cascabel 2 unit
// sends each result beat (64 bits) with the index of the PE it is meant for;
// this block steers the beat to that PE's result port and returns that PE's
// ready. A two-beat result (value, then task ID) is marked by `last` on the
// second beat and is passed on unchanged.
//
// The design description gives the width (64 bits) and that the result
// interconnect is a 1-to-n stream. Steering by a destination index and the
// combinational, zero-latency path are this design's choices.
module result_router #(
  parameter int unsigned N = 6,
  parameter int unsigned W = cb2_pkg::RESULT_W,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [W-1:0]        in_data,
  input  logic                in_last,
  input  logic [SW-1:0]       in_dest,
  output logic [N-1:0]        out_valid,
  input  logic [N-1:0]        out_ready,
  output logic [N-1:0][W-1:0] out_data,
  output logic [N-1:0]        out_last
);

  always_comb begin
    out_valid = '0;
    in_ready  = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      out_data[i] = in_data;
      out_last[i] = in_last;
      if (32'(in_dest) == i) begin
        out_valid[i] = in_valid;
        in_ready     = out_ready[i];
      end
    end
  end

endmodule
