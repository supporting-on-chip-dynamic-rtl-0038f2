// ndp_agg_pe: near-data processing PE that computes one aggregate (average,
// maximum or sum, chosen by OP) over one column of a table stored with a
// fixed record size in memory attached to the accelerator. One task covers
// the whole column: args[0] is the word address of the column in the first
// record, args[1] the number of records, args[2] the record size in words.
// The PE reads the column with strided word addresses, keeps a running sum
// or maximum, and for the average divides the sum by the record count with
// a 64-step restoring divider (integer quotient). Zero records give 0.
//
// Aggregation PEs working with strided, offset-based column access over
// fixed-size records follow the design description; the argument layout,
// 64-bit unsigned column values, the memory port and the divider are this
// design's choices.
//
// Memory port: a read is requested with `mem_req`/`mem_addr` and taken when
// `mem_gnt` is high; read data returns in request order on `mem_rdata` with
// `mem_rvalid`, any number of cycles later. Requests are issued back to
// back, so with a one-cycle memory the PE reads one word per cycle. Data
// must come at least one cycle after its request was taken.
// Timing: `done` pulses one cycle after the last word (sum, maximum) or 65
// cycles after it (average); `retval` holds until the next `start`.
module ndp_agg_pe #(
  parameter cb2_pkg::agg_op_t OP = cb2_pkg::AGG_SUM,
  parameter int unsigned AW = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  cb2_pkg::args_t args,
  output logic           done,
  output cb2_pkg::arg_t  retval,
  output logic           mem_req,
  output logic [AW-1:0]  mem_addr,
  input  logic           mem_gnt,
  input  logic           mem_rvalid,
  input  cb2_pkg::arg_t  mem_rdata
);
  import cb2_pkg::*;

  typedef enum logic [1:0] {A_IDLE, A_SCAN, A_DIV, A_DONE} astate_t;
  astate_t st_q;
  logic [AW-1:0] addr_q, stride_q;
  arg_t          n_q, issued_q, recv_q, acc_q;
  // divider
  arg_t          quo_q, rem_q;
  logic [6:0]    step_q;

  assign mem_req  = (st_q == A_SCAN) && (issued_q != n_q);
  assign mem_addr = addr_q;

  arg_t rem_shift;
  assign rem_shift = {rem_q[62:0], quo_q[63]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= A_IDLE;
      addr_q   <= '0;
      stride_q <= '0;
      n_q      <= '0;
      issued_q <= '0;
      recv_q   <= '0;
      acc_q    <= '0;
      quo_q    <= '0;
      rem_q    <= '0;
      step_q   <= '0;
      done     <= 1'b0;
      retval   <= '0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        A_IDLE: if (start) begin
          addr_q   <= AW'(args[0]);
          n_q      <= args[1];
          stride_q <= AW'(args[2]);
          issued_q <= '0;
          recv_q   <= '0;
          acc_q    <= '0;
          st_q     <= (args[1] == '0) ? A_DONE : A_SCAN;
        end
        A_SCAN: begin
          if (mem_req && mem_gnt) begin
            issued_q <= issued_q + 1'b1;
            addr_q   <= addr_q + stride_q;
          end
          if (mem_rvalid) begin
            recv_q <= recv_q + 1'b1;
            if (OP == AGG_MAX) acc_q <= (mem_rdata > acc_q) ? mem_rdata : acc_q;
            else               acc_q <= acc_q + mem_rdata;
            if (recv_q + 1'b1 == n_q) begin
              if (OP == AGG_AVG) begin
                quo_q  <= acc_q + mem_rdata;
                rem_q  <= '0;
                step_q <= '0;
                st_q   <= A_DIV;
              end else begin
                st_q <= A_DONE;
              end
            end
          end
        end
        A_DIV: begin
          // restoring division acc / n, one quotient bit per cycle
          if (rem_shift >= n_q) begin
            rem_q <= rem_shift - n_q;
            quo_q <= {quo_q[62:0], 1'b1};
          end else begin
            rem_q <= rem_shift;
            quo_q <= {quo_q[62:0], 1'b0};
          end
          step_q <= step_q + 1'b1;
          if (step_q == 7'd63) st_q <= A_DONE;
        end
        A_DONE: begin
          retval <= (n_q == '0) ? '0 : (OP == AGG_AVG) ? quo_q : acc_q;
          done   <= 1'b1;
          st_q   <= A_IDLE;
        end
        default: st_q <= A_IDLE;
      endcase
    end
  end

  a_no_extra : assert property (@(posedge clk) disable iff (!rst_n)
    mem_rvalid |-> (st_q == A_SCAN && recv_q < issued_q));

endmodule
