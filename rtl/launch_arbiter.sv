// launch_arbiter: the n-to-1 launch request interconnect. Each PE drives an
// AXI4-Stream-style launch request port (valid/ready/data, one 512-bit beat
// per request); this block merges them into the single stream that enters
// the Cascabel 2 unit and tags each beat with the index of the PE it came
// from, which the unit needs to resolve "return to parent" and "return to
// grandparent" actions.
//
// The design description gives only that this is an n-to-1 streaming
// interconnect of 512 bits. Round-robin arbitration, the source tag and the
// purely combinational path (no added latency, output valid in the same
// cycle as an input valid) are this design's choices. Once a beat is offered
// on the output it stays offered, unchanged, until it is accepted.
module launch_arbiter #(
  parameter int unsigned N = 6,
  parameter int unsigned W = cb2_pkg::LAUNCH_W,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        in_valid,
  output logic [N-1:0]        in_ready,
  input  logic [N-1:0][W-1:0] in_data,
  output logic                out_valid,
  input  logic                out_ready,
  output logic [W-1:0]        out_data,
  output logic [SW-1:0]       out_src
);

  logic [SW-1:0] last_q;     // last granted input
  logic          locked_q;   // an offered beat is waiting for out_ready
  logic [SW-1:0] lock_src_q;
  logic [SW-1:0] pick;
  logic          any;

  // Round-robin pick: first valid input after the last granted one.
  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned c;
      c = (32'(last_q) + k) % N;
      if (!any && in_valid[c]) begin
        any  = 1'b1;
        pick = SW'(c);
      end
    end
  end

  logic [SW-1:0] sel;
  assign sel       = locked_q ? lock_src_q : pick;
  assign out_valid = locked_q ? 1'b1 : any;
  assign out_data  = in_data[sel];
  assign out_src   = sel;

  always_comb begin
    in_ready = '0;
    if (out_valid) in_ready[sel] = out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q     <= SW'(N - 1);
      locked_q   <= 1'b0;
      lock_src_q <= '0;
    end else begin
      if (out_valid && out_ready) begin
        last_q   <= sel;
        locked_q <= 1'b0;
      end else if (out_valid) begin
        locked_q   <= 1'b1;
        lock_src_q <= sel;
      end
    end
  end

  // A source must hold its request until it is accepted.
  for (genvar g = 0; g < N; g++) begin : g_chk
    a_hold : assert property (@(posedge clk) disable iff (!rst_n)
      in_valid[g] && !in_ready[g] |=> in_valid[g]);
  end

endmodule
