// merge_buffer: the merge/reduce result buffer of the Cascabel 2 unit.
// Results of sibling child tasks that were launched in merge mode are
// collected here; once all siblings of a group have delivered, the buffer
// issues a new merge (reduce) task whose arguments are the collected values
// and whose return action is the one recorded for the group.
//
// Following the design description, results are buffered in block RAM: the
// default of 4096 groups of four 64-bit values is 16384 x 64 bit, which is
// the data capacity of the 32 RAMB36 blocks quoted for the evaluated
// designs. Groups of at most four values (so that one merge task receives
// all of them as its four arguments), the free list of groups and the
// handshakes below are this design's choices.
//
// Interface and timing:
//  * After reset the buffer spends SLOTS cycles clearing its counters and
//    filling the free list; `ready_o` then goes high.
//  * Allocation: `alloc_req` with `alloc_meta` takes a free group in the
//    cycle `alloc_gnt` is high; its index is `alloc_slot` in that cycle.
//  * Deposit: a value for group `dep_slot` is accepted when `dep_valid` and
//    `dep_ready` are high. A deposit takes 2 cycles, the last deposit of a
//    group another 1 + count cycles of read-back before the merge task is
//    offered on `mt_valid`/`mt_sub`, held until `mt_ready`.
module merge_buffer #(
  parameter int unsigned SLOTS = 4096,
  localparam int unsigned SLW = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 ready_o,
  // allocation of a merge group
  input  logic                 alloc_req,
  input  cb2_pkg::merge_meta_t alloc_meta,
  output logic                 alloc_gnt,
  output logic [SLW-1:0]       alloc_slot,
  // deposit of a child result
  input  logic                 dep_valid,
  output logic                 dep_ready,
  input  logic [SLW-1:0]       dep_slot,
  input  cb2_pkg::arg_t        dep_value,
  // merge task issued when a group is complete
  output logic                 mt_valid,
  input  logic                 mt_ready,
  output cb2_pkg::sub_t        mt_sub,
  output logic [SLW:0]         free_groups
);
  import cb2_pkg::*;

  // ---------------- storage ----------------
  merge_meta_t meta [SLOTS];            // written at allocation
  cnt_t        got  [SLOTS];            // values received so far
  arg_t        vals [SLOTS*NARGS];      // buffered child results
  logic [SLW-1:0] flist [SLOTS];        // free list (circular)

  // ---------------- free list ----------------
  logic [SLW-1:0] fl_rd_q, fl_wr_q;
  logic [SLW:0]   fl_cnt_q;
  logic           fl_push;
  logic [SLW-1:0] fl_push_val;
  logic           fl_pop;

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_LOOK, S_UPD, S_READ, S_EMIT} state_t;
  state_t st_q;

  assign ready_o     = (st_q != S_INIT);
  assign alloc_gnt   = ready_o && (fl_cnt_q != '0);
  assign alloc_slot  = flist[fl_rd_q];
  assign fl_pop      = alloc_req && alloc_gnt;
  assign free_groups = fl_cnt_q;

  always_ff @(posedge clk) begin
    if (fl_push) flist[fl_wr_q] <= fl_push_val;
    if (fl_pop)  meta[alloc_slot] <= alloc_meta;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fl_rd_q  <= '0;
      fl_wr_q  <= '0;
      fl_cnt_q <= '0;
    end else begin
      if (fl_pop)  fl_rd_q <= (32'(fl_rd_q) == SLOTS - 1) ? '0 : fl_rd_q + 1'b1;
      if (fl_push) fl_wr_q <= (32'(fl_wr_q) == SLOTS - 1) ? '0 : fl_wr_q + 1'b1;
      fl_cnt_q <= fl_cnt_q + (SLW+1)'(fl_push) - (SLW+1)'(fl_pop);
    end
  end

  // ---------------- deposit / emit engine ----------------
  logic [SLW-1:0] init_q;
  logic [SLW-1:0] slot_q;
  arg_t           val_q;
  merge_meta_t    meta_rd_q;
  cnt_t           got_rd_q;
  cnt_t           k_q;         // read-back index
  cnt_t           kd_q;        // index of the value arriving from vals
  logic           rd_pend_q;   // a vals read is in flight
  arg_t           vals_rd_q;
  args_t          args_q;

  logic          got_we;
  logic [SLW-1:0] got_wa;
  cnt_t          got_wd;
  logic          val_we;
  logic [SLW+1:0] val_wa;
  logic [SLW+1:0] val_ra;

  assign dep_ready = (st_q == S_IDLE);
  assign mt_valid  = (st_q == S_EMIT);

  always_comb begin
    got_we = 1'b0; got_wa = slot_q; got_wd = '0;
    val_we = 1'b0; val_wa = {slot_q, got_rd_q[1:0]};
    fl_push = 1'b0; fl_push_val = slot_q;
    case (st_q)
      S_INIT: begin
        got_we = 1'b1; got_wa = init_q; got_wd = '0;
        fl_push = 1'b1; fl_push_val = init_q;
      end
      S_UPD: begin
        val_we = 1'b1;
        got_we = 1'b1;
        got_wd = (got_rd_q + 1'b1 == meta_rd_q.count) ? '0 : got_rd_q + 1'b1;
      end
      S_EMIT: if (mt_ready) fl_push = 1'b1;
      default: ;
    endcase
  end

  assign val_ra = {slot_q, k_q[1:0]};

  always_ff @(posedge clk) begin
    if (got_we) got[got_wa] <= got_wd;
    if (val_we) vals[val_wa] <= val_q;
    meta_rd_q <= meta[(st_q == S_IDLE) ? dep_slot : slot_q];
    got_rd_q  <= got[(st_q == S_IDLE) ? dep_slot : slot_q];
    vals_rd_q <= vals[val_ra];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= S_INIT;
      init_q    <= '0;
      slot_q    <= '0;
      val_q     <= '0;
      k_q       <= '0;
      kd_q      <= '0;
      rd_pend_q <= 1'b0;
      args_q    <= '0;
    end else begin
      case (st_q)
        S_INIT: begin
          init_q <= init_q + 1'b1;
          if (32'(init_q) == SLOTS - 1) st_q <= S_IDLE;
        end
        S_IDLE: if (dep_valid) begin
          slot_q <= dep_slot;
          val_q  <= dep_value;
          st_q   <= S_LOOK;
        end
        S_LOOK: st_q <= S_UPD;   // meta / counter read of slot_q
        S_UPD: begin
          if (got_rd_q + 1'b1 == meta_rd_q.count) begin
            k_q       <= '0;
            rd_pend_q <= 1'b0;
            args_q    <= '0;
            st_q      <= S_READ;
          end else begin
            st_q <= S_IDLE;
          end
        end
        S_READ: begin
          // one vals read per cycle; the value arrives a cycle later
          rd_pend_q <= (k_q < meta_rd_q.count);
          kd_q      <= k_q;
          if (k_q < meta_rd_q.count) k_q <= k_q + 1'b1;
          if (rd_pend_q) args_q[kd_q[1:0]] <= vals_rd_q;
          if (rd_pend_q && (kd_q + 1'b1 == meta_rd_q.count)) st_q <= S_EMIT;
        end
        S_EMIT: if (mt_ready) st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    mt_sub        = '0;
    mt_sub.kernel = meta_rd_q.kernel;
    mt_sub.argc   = meta_rd_q.count;
    mt_sub.args   = args_q;
    mt_sub.dest   = meta_rd_q.dest;
    mt_sub.fmt    = meta_rd_q.fmt;
    mt_sub.irq    = meta_rd_q.irq;
  end

  a_count : assert property (@(posedge clk) disable iff (!rst_n)
    fl_pop |-> alloc_meta.count inside {[1:NARGS]});

endmodule
