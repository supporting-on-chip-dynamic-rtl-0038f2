// cascabel2: the on-chip task dispatcher/launcher with dynamic parallelism.
// Tasks enter from the host (memory-mapped registers) or from the PEs
// themselves (512-bit launch request streams, four 64-bit arguments in one
// beat), wait in one FIFO queue, and are started on an idle PE of their
// kind. When a PE finishes, its result is dropped, returned to the parent PE
// on the 64-bit result stream, collected in the merge buffer for a
// merge/reduce task, or passed up to the grandparent, as chosen when the task
// was launched.
//
// Structure (as in the block diagram of the design: queue, launcher, result
// control, launch and result interconnects, host port):
//   launch_arbiter -> request_ingress -> task_queue -> launcher -> PEs
//   PEs (done, result) -> return_ctrl -> result_router / merge_buffer / host_if
//   merge_buffer (merge tasks) -> request_ingress
//
// PE control is a simplified form of a memory-mapped PE register file: the
// unit pulses `pe_start[i]` together with arguments, argument count and task
// ID (shared by all PEs), and a PE pulses `pe_done[i]` (its completion
// interrupt) with its result held on `pe_retval[i]` until its next start.
// PE_KID[i] gives the kernel ID served by PE i.
//
// Status outputs: busy PEs, head-of-line stall of the queue, queue fill,
// free merge groups and a one-cycle pulse per completed task telling which
// return action was taken.
//
// Timing: a task submitted by a PE on an empty, idle unit starts on its PE 3
// cycles after the request beat is accepted; a result is on the result
// stream 3 cycles after `pe_done`.
module cascabel2 #(
  parameter int unsigned NPE         = 6,
  parameter cb2_pkg::kid_t [NPE-1:0] PE_KID = {
    cb2_pkg::KID_REDUCE, cb2_pkg::KID_REDUCE, cb2_pkg::KID_REDUCE,
    cb2_pkg::KID_REDUCE, cb2_pkg::KID_FIB, cb2_pkg::KID_FIB},
  parameter int unsigned QUEUE_DEPTH = 512,
  parameter int unsigned SLOTS       = 4096,
  localparam int unsigned SW = (NPE > 1) ? $clog2(NPE) : 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // host register bus
  input  logic                                  host_wr_en,
  input  logic [7:0]                            host_wr_addr,
  input  logic [63:0]                           host_wr_data,
  input  logic                                  host_rd_en,
  input  logic [7:0]                            host_rd_addr,
  output logic [63:0]                           host_rd_data,
  output logic                                  host_irq,
  // launch request streams from the PEs
  input  logic [NPE-1:0]                        lr_valid,
  output logic [NPE-1:0]                        lr_ready,
  input  logic [NPE-1:0][cb2_pkg::LAUNCH_W-1:0] lr_data,
  // result streams to the PEs
  output logic [NPE-1:0]                        rs_valid,
  input  logic [NPE-1:0]                        rs_ready,
  output logic [NPE-1:0][cb2_pkg::RESULT_W-1:0] rs_data,
  output logic [NPE-1:0]                        rs_last,
  // PE control
  output logic [NPE-1:0]                        pe_start,
  output cb2_pkg::args_t                        pe_args,
  output cb2_pkg::cnt_t                         pe_argc,
  output cb2_pkg::tid_t                         pe_task_id,
  input  logic [NPE-1:0]                        pe_done,
  input  cb2_pkg::arg_t [NPE-1:0]               pe_retval,
  // status
  output logic [NPE-1:0]                        pe_busy,
  output logic                                  ready,
  output logic                                  hol_stall,
  output logic [$clog2(QUEUE_DEPTH):0]          queue_level,
  output logic [$clog2(SLOTS):0]                free_groups,
  output cb2_pkg::ret_ev_t                      ret_ev
);
  import cb2_pkg::*;

  localparam int unsigned SLW = (SLOTS > 1) ? $clog2(SLOTS) : 1;

  // launch interconnect
  logic               arb_valid, arb_ready;
  logic [LAUNCH_W-1:0] arb_data;
  logic [SW-1:0]      arb_src;

  launch_arbiter #(.N(NPE), .W(LAUNCH_W)) u_arb (
    .clk, .rst_n,
    .in_valid(lr_valid), .in_ready(lr_ready), .in_data(lr_data),
    .out_valid(arb_valid), .out_ready(arb_ready), .out_data(arb_data),
    .out_src(arb_src)
  );

  // host interface
  logic  hsub_valid, hsub_ready;
  sub_t  hsub;
  logic  hres_valid, hres_ready;
  arg_t  hres_value;
  tid_t  hres_task_id;
  logic  irq_pulse;

  host_if u_host (
    .clk, .rst_n,
    .wr_en(host_wr_en), .wr_addr(host_wr_addr), .wr_data(host_wr_data),
    .rd_en(host_rd_en), .rd_addr(host_rd_addr), .rd_data(host_rd_data),
    .host_irq,
    .sub_valid(hsub_valid), .sub_ready(hsub_ready), .sub(hsub),
    .hres_valid, .hres_ready, .hres_value, .hres_task_id,
    .irq_in(irq_pulse)
  );

  // merge buffer
  logic        mt_valid, mt_ready;
  sub_t        mt_sub;
  logic        alloc_req, alloc_gnt;
  merge_meta_t alloc_meta;
  logic [SLW-1:0] alloc_slot;
  logic        dep_valid, dep_ready;
  logic [SLW-1:0] dep_slot;
  arg_t        dep_value;

  merge_buffer #(.SLOTS(SLOTS)) u_merge (
    .clk, .rst_n, .ready_o(ready),
    .alloc_req, .alloc_meta, .alloc_gnt, .alloc_slot,
    .dep_valid, .dep_ready, .dep_slot, .dep_value,
    .mt_valid, .mt_ready, .mt_sub, .free_groups
  );

  // ingress and queue
  action_t [NPE-1:0] ctx;
  logic            deleg_valid;
  logic [SW-1:0]   deleg_pe;
  logic            q_push, q_full, q_pop, q_head_valid;
  task_t           q_push_task, q_head;

  request_ingress #(.NPE(NPE), .SLOTS(SLOTS)) u_ingress (
    .clk, .rst_n,
    .mt_valid, .mt_ready, .mt_sub,
    .pe_valid(arb_valid), .pe_ready(arb_ready), .pe_req(launch_req_t'(arb_data)),
    .pe_src(arb_src),
    .host_valid(hsub_valid), .host_ready(hsub_ready), .host_sub(hsub),
    .ctx, .deleg_valid, .deleg_pe,
    .alloc_req, .alloc_meta, .alloc_gnt, .alloc_slot,
    .push(q_push), .push_task(q_push_task), .full(q_full)
  );

  task_queue #(.DEPTH(QUEUE_DEPTH)) u_queue (
    .clk, .rst_n,
    .push(q_push), .push_task(q_push_task), .full(q_full),
    .pop(q_pop), .head(q_head), .head_valid(q_head_valid), .level(queue_level)
  );

  // launcher
  logic            act_valid;
  logic [SW-1:0]   act_pe;
  action_t         act;
  logic [NPE-1:0]  release_pe;

  launcher #(.NPE(NPE), .PE_KID(PE_KID)) u_launch (
    .clk, .rst_n,
    .head_valid(q_head_valid), .head(q_head), .pop(q_pop),
    .pe_start, .pe_args, .pe_argc, .pe_task_id,
    .act_valid, .act_pe, .act,
    .release_pe, .busy(pe_busy), .hol_stall
  );

  // return control and result interconnect
  logic          res_valid, res_ready, res_last;
  arg_t          res_data;
  logic [SW-1:0] res_dest;

  return_ctrl #(.NPE(NPE), .SLOTS(SLOTS)) u_ret (
    .clk, .rst_n,
    .act_valid, .act_pe, .act,
    .deleg_valid, .deleg_pe, .ctx,
    .pe_done, .pe_retval, .release_pe,
    .res_valid, .res_ready, .res_data, .res_last, .res_dest,
    .dep_valid, .dep_ready, .dep_slot, .dep_value,
    .hres_valid, .hres_ready, .hres_value, .hres_task_id,
    .irq(irq_pulse),
    .ev(ret_ev)
  );

  result_router #(.N(NPE), .W(RESULT_W)) u_router (
    .in_valid(res_valid), .in_ready(res_ready), .in_data(res_data),
    .in_last(res_last), .in_dest(res_dest),
    .out_valid(rs_valid), .out_ready(rs_ready), .out_data(rs_data),
    .out_last(rs_last)
  );

endmodule
