// launcher: dispatches the task at the head of the queue to an idle PE of the
// task's kind and starts it, and hands the task's return action to the
// return control, which performs it when the PE reports completion.
//
// The design description gives the launcher's role, that the return action
// is forwarded to the return control at launch, and that scheduling is
// "FIFO": only the head of the queue is considered, so a head task whose PEs
// are all busy holds back the tasks behind it (`hol_stall` is high in such a
// cycle). Choosing the lowest-numbered idle PE, the busy bits, and the
// simplified PE control port (a one-cycle `pe_start` with the arguments,
// argument count and task ID, registered, so a PE starts one cycle after
// the pop) are this design's choices. A PE is busy from its launch until the
// return control releases it with `release_pe`.
module launcher #(
  parameter int unsigned NPE = 6,
  parameter cb2_pkg::kid_t [NPE-1:0] PE_KID = {
    cb2_pkg::KID_REDUCE, cb2_pkg::KID_REDUCE, cb2_pkg::KID_REDUCE,
    cb2_pkg::KID_REDUCE, cb2_pkg::KID_FIB, cb2_pkg::KID_FIB},
  localparam int unsigned SW = (NPE > 1) ? $clog2(NPE) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // queue head
  input  logic                  head_valid,
  input  cb2_pkg::task_t        head,
  output logic                  pop,
  // PE control
  output logic [NPE-1:0]        pe_start,
  output cb2_pkg::args_t        pe_args,
  output cb2_pkg::cnt_t         pe_argc,
  output cb2_pkg::tid_t         pe_task_id,
  // return action to the return control
  output logic                  act_valid,
  output logic [SW-1:0]         act_pe,
  output cb2_pkg::action_t      act,
  // PE release from the return control
  input  logic [NPE-1:0]        release_pe,
  output logic [NPE-1:0]        busy,
  output logic                  hol_stall
);
  import cb2_pkg::*;

  logic [NPE-1:0] busy_q;
  logic [SW-1:0]  sel;
  logic           found;

  always_comb begin
    sel   = '0;
    found = 1'b0;
    for (int i = NPE - 1; i >= 0; i--) begin
      if (!busy_q[i] && PE_KID[i] == head.kernel) begin
        found = 1'b1;
        sel   = SW'(i);
      end
    end
  end

  assign pop       = head_valid && found;
  assign hol_stall = head_valid && !found;
  assign busy      = busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q     <= '0;
      pe_start   <= '0;
      pe_args    <= '0;
      pe_argc    <= '0;
      pe_task_id <= '0;
      act_valid  <= 1'b0;
      act_pe     <= '0;
      act        <= '0;
    end else begin
      pe_start  <= '0;
      act_valid <= 1'b0;
      busy_q    <= busy_q & ~release_pe;
      if (pop) begin
        busy_q[sel]   <= 1'b1;
        pe_start[sel] <= 1'b1;
        pe_args       <= head.args;
        pe_argc       <= head.argc;
        pe_task_id    <= head.task_id;
        act_valid     <= 1'b1;
        act_pe        <= sel;
        act           <= '{task_id: head.task_id, dest: head.dest,
                           fmt: head.fmt, irq: head.irq};
      end
    end
  end

  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> !busy_q[sel]);

endmodule
