// request_ingress: the entry point of the task queue. Tasks arrive from three
// sources: merge tasks issued by the merge buffer, launch requests from PEs
// (via the launch arbiter) and submissions from the host interface. Each
// accepted task is given a task ID and an absolute return destination and is
// pushed into the queue; at most one task is accepted per cycle, merge
// tasks first, then PE requests, then the host.
//
// A PE request names its return action relative to the launching PE (the
// parent). The destination is resolved here, in the cycle the request is
// accepted, from the parent's own recorded destination:
//   discard      -> no destination
//   parent       -> the launching PE
//   grandparent  -> the parent's destination; the parent's own result is
//                   then dropped (`deleg_valid`/`deleg_pe` tell the return
//                   control), so the value skips the parent. Cascades over
//                   any number of levels. The parent's interrupt request
//                   moves with its result.
// With the merge flag set, that destination becomes the destination of a
// merge group instead, and the child's result goes into the group. The
// first merged request of a PE allocates a group sized by `merge_count`; the
// following merge_count-1 merged requests of the same PE join it.
//
// Resolving at acceptance, sibling grouping by consecutive requests, task
// IDs from a 32-bit counter and the source priorities are this design's
// choices; the return actions themselves follow the design description.
// The block is combinational apart from the ID counter and the per-PE
// open-group registers: a request is accepted only when all it needs (queue
// space, and a free group when it opens one) is there in the same cycle.
module request_ingress #(
  parameter int unsigned NPE   = 6,
  parameter int unsigned SLOTS = 4096,
  localparam int unsigned SW  = (NPE > 1) ? $clog2(NPE) : 1,
  localparam int unsigned SLW = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // merge tasks
  input  logic                         mt_valid,
  output logic                         mt_ready,
  input  cb2_pkg::sub_t                mt_sub,
  // PE launch requests
  input  logic                         pe_valid,
  output logic                         pe_ready,
  input  cb2_pkg::launch_req_t         pe_req,
  input  logic [SW-1:0]                pe_src,
  // host submissions
  input  logic                         host_valid,
  output logic                         host_ready,
  input  cb2_pkg::sub_t                host_sub,
  // recorded destinations of the tasks running on the PEs
  input  cb2_pkg::action_t [NPE-1:0]   ctx,
  output logic                         deleg_valid,
  output logic [SW-1:0]                deleg_pe,
  // merge group allocation
  output logic                         alloc_req,
  output cb2_pkg::merge_meta_t         alloc_meta,
  input  logic                         alloc_gnt,
  input  logic [SLW-1:0]               alloc_slot,
  // queue
  output logic                         push,
  output cb2_pkg::task_t               push_task,
  input  logic                         full
);
  import cb2_pkg::*;

  tid_t                      next_id_q;
  logic [NPE-1:0]            open_q;
  logic [NPE-1:0][SLW-1:0]   open_slot_q;
  logic [NPE-1:0][CNT_W-1:0] open_left_q;

  dest_t base_dest;
  cnt_t  mcount;
  logic  irq_eff;
  logic  pe_ok;
  logic  joins;

  always_comb begin
    unique case (pe_req.ret_mode)
      RET_PARENT:      base_dest = '{kind: DST_PE, idx: IDX_W'(pe_src)};
      RET_GRANDPARENT: base_dest = ctx[pe_src].dest;
      default:         base_dest = '{kind: DST_NONE, idx: '0};
    endcase
    mcount = (pe_req.merge_count == '0) ? cnt_t'(1)
           : (pe_req.merge_count > cnt_t'(NARGS)) ? cnt_t'(NARGS) : pe_req.merge_count;
    // a result passed on to the grandparent carries the parent's interrupt
    irq_eff = pe_req.irq ||
              (pe_req.ret_mode == RET_GRANDPARENT && ctx[pe_src].irq);
    joins  = pe_req.merge && open_q[pe_src];
    pe_ok  = !full && (!pe_req.merge || joins || alloc_gnt);
  end

  always_comb begin
    mt_ready    = 1'b0;
    pe_ready    = 1'b0;
    host_ready  = 1'b0;
    push        = 1'b0;
    push_task   = '0;
    deleg_valid = 1'b0;
    deleg_pe    = pe_src;
    alloc_req   = 1'b0;
    alloc_meta  = '{count: mcount, kernel: pe_req.merge_kernel, dest: base_dest,
                    fmt: pe_req.fmt, irq: irq_eff};
    push_task.task_id = next_id_q;
    if (mt_valid) begin
      mt_ready = !full;
      push     = !full;
      push_task.kernel = mt_sub.kernel;
      push_task.argc   = mt_sub.argc;
      push_task.args   = mt_sub.args;
      push_task.dest   = mt_sub.dest;
      push_task.fmt    = mt_sub.fmt;
      push_task.irq    = mt_sub.irq;
    end else if (pe_valid) begin
      pe_ready = pe_ok;
      push     = pe_ok;
      push_task.kernel = pe_req.kernel;
      push_task.argc   = pe_req.argc;
      push_task.args   = pe_req.args;
      push_task.fmt    = pe_req.fmt;
      if (pe_req.merge) begin
        push_task.dest = '{kind: DST_MERGE,
                           idx: IDX_W'(joins ? open_slot_q[pe_src] : alloc_slot)};
        push_task.irq  = 1'b0;   // the interrupt belongs to the merge task
        alloc_req      = !joins && !full;
      end else begin
        push_task.dest = base_dest;
        push_task.irq  = irq_eff;
      end
      deleg_valid = pe_ok && (pe_req.ret_mode == RET_GRANDPARENT);
    end else if (host_valid) begin
      host_ready = !full;
      push       = !full;
      push_task.kernel = host_sub.kernel;
      push_task.argc   = host_sub.argc;
      push_task.args   = host_sub.args;
      push_task.dest   = host_sub.dest;
      push_task.fmt    = host_sub.fmt;
      push_task.irq    = host_sub.irq;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_id_q   <= tid_t'(1);
      open_q      <= '0;
      open_slot_q <= '0;
      open_left_q <= '0;
    end else begin
      if (push) next_id_q <= next_id_q + 1'b1;
      if (!mt_valid && pe_valid && pe_ok && pe_req.merge) begin
        if (joins) begin
          open_left_q[pe_src] <= open_left_q[pe_src] - 1'b1;
          if (open_left_q[pe_src] == cnt_t'(1)) open_q[pe_src] <= 1'b0;
        end else begin
          open_slot_q[pe_src] <= alloc_slot;
          open_left_q[pe_src] <= mcount - 1'b1;
          open_q[pe_src]      <= (mcount > cnt_t'(1));
        end
      end
    end
  end

endmodule
