// return_ctrl: performs the return action of each finished task (the "Result
// Ctrl" of the Cascabel 2 unit). The launcher records, per PE, the task ID
// and the resolved destination of the task it starts there. When the PE
// signals completion (`pe_done`, standing for its completion interrupt),
// this block looks the action up, reads the PE's result (except for a
// discarded result, which is never read) and
//   * drops it (discard, or the task handed its result on to its children
//     with return-to-grandparent: `deleg_valid` marked it),
//   * sends it on the result stream to a PE, as one 64-bit beat (format a),
//     one beat {task ID[31:0], value[31:0]} (format b) or two beats, value
//     then task ID with `res_last` (format c),
//   * deposits it in a merge group of the merge buffer, or
//   * hands it to the host interface;
// then it raises the host interrupt if the task asked for one (unless its
// result was handed on) and releases the PE to the launcher.
//
// The four actions, the three result formats and the interrupt option follow
// the design description; the order of the steps, serving one completion at
// a time with the lowest-numbered PE first, and the handshakes are this
// design's choices. A completion takes 2 cycles plus one per result beat or
// deposit handshake.
module return_ctrl #(
  parameter int unsigned NPE   = 6,
  parameter int unsigned SLOTS = 4096,
  localparam int unsigned SW  = (NPE > 1) ? $clog2(NPE) : 1,
  localparam int unsigned SLW = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // actions from the launcher
  input  logic                     act_valid,
  input  logic [SW-1:0]            act_pe,
  input  cb2_pkg::action_t         act,
  // result hand-off marks from the ingress
  input  logic                     deleg_valid,
  input  logic [SW-1:0]            deleg_pe,
  output cb2_pkg::action_t [NPE-1:0] ctx,
  // PE completion and result registers
  input  logic [NPE-1:0]           pe_done,
  input  cb2_pkg::arg_t [NPE-1:0]  pe_retval,
  output logic [NPE-1:0]           release_pe,
  // result stream to the PEs
  output logic                     res_valid,
  input  logic                     res_ready,
  output cb2_pkg::arg_t            res_data,
  output logic                     res_last,
  output logic [SW-1:0]            res_dest,
  // merge buffer deposit
  output logic                     dep_valid,
  input  logic                     dep_ready,
  output logic [SLW-1:0]           dep_slot,
  output cb2_pkg::arg_t            dep_value,
  // host
  output logic                     hres_valid,
  input  logic                     hres_ready,
  output cb2_pkg::arg_t            hres_value,
  output cb2_pkg::tid_t            hres_task_id,
  output logic                     irq,
  // event pulses (one per completion, by the action taken)
  output cb2_pkg::ret_ev_t         ev
);
  import cb2_pkg::*;

  action_t [NPE-1:0] act_q;
  logic    [NPE-1:0] deleg_q;
  logic    [NPE-1:0] pend_q;

  typedef enum logic [2:0] {R_IDLE, R_READ, R_ACT, R_BEAT2, R_DONE} rstate_t;
  rstate_t st_q;
  logic [SW-1:0] cur_q;
  arg_t          val_q;
  action_t       cur_act_q;
  logic          cur_skip_q;

  assign ctx = act_q;

  // lowest pending PE
  logic [SW-1:0] pick;
  logic          any;
  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int i = NPE - 1; i >= 0; i--) begin
      if (pend_q[i]) begin
        any  = 1'b1;
        pick = SW'(i);
      end
    end
  end

  // outputs of the acting state
  logic act_done;
  always_comb begin
    res_valid    = 1'b0;
    res_data     = val_q;
    res_last     = 1'b1;
    res_dest     = SW'(cur_act_q.dest.idx);
    dep_valid    = 1'b0;
    dep_slot     = SLW'(cur_act_q.dest.idx);
    dep_value    = val_q;
    hres_valid   = 1'b0;
    hres_value   = val_q;
    hres_task_id = cur_act_q.task_id;
    act_done     = 1'b0;
    if (st_q == R_ACT) begin
      if (cur_skip_q) begin
        act_done = 1'b1;
      end else begin
        unique case (cur_act_q.dest.kind)
          DST_PE: begin
            res_valid = 1'b1;
            unique case (cur_act_q.fmt)
              FMT_B: res_data = {cur_act_q.task_id, val_q[31:0]};
              FMT_C: res_last = 1'b0;
              default: ;
            endcase
            act_done = res_ready;
          end
          DST_MERGE: begin
            dep_valid = 1'b1;
            act_done  = dep_ready;
          end
          DST_HOST: begin
            hres_valid = 1'b1;
            act_done   = hres_ready;
          end
          default: act_done = 1'b1;
        endcase
      end
    end else if (st_q == R_BEAT2) begin
      res_valid = 1'b1;
      res_data  = arg_t'(cur_act_q.task_id);
      res_last  = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q      <= '0;
      deleg_q    <= '0;
      pend_q     <= '0;
      st_q       <= R_IDLE;
      cur_q      <= '0;
      val_q      <= '0;
      cur_act_q  <= '0;
      cur_skip_q <= 1'b0;
      release_pe <= '0;
      irq        <= 1'b0;
      ev         <= '0;
    end else begin
      release_pe <= '0;
      irq        <= 1'b0;
      ev         <= '0;
      pend_q     <= pend_q | pe_done;
      if (deleg_valid) deleg_q[deleg_pe] <= 1'b1;
      if (act_valid) begin
        act_q[act_pe]   <= act;
        deleg_q[act_pe] <= 1'b0;
      end
      unique case (st_q)
        R_IDLE: if (any) begin
          cur_q        <= pick;
          pend_q[pick] <= 1'b0;
          st_q         <= R_READ;
        end
        R_READ: begin
          // read the recorded action, and the PE's result register
          // unless the result is to be discarded
          if (act_q[cur_q].dest.kind != DST_NONE) val_q <= pe_retval[cur_q];
          cur_act_q  <= act_q[cur_q];
          cur_skip_q <= deleg_q[cur_q];
          st_q       <= R_ACT;
        end
        R_ACT: if (act_done) begin
          if (cur_skip_q) ev.skip <= 1'b1;
          else begin
            unique case (cur_act_q.dest.kind)
              DST_PE:    ev.parent <= 1'b1;
              DST_MERGE: ev.merge <= 1'b1;
              DST_HOST:  ev.host <= 1'b1;
              default:   ev.discard <= 1'b1;
            endcase
          end
          st_q <= (!cur_skip_q && cur_act_q.dest.kind == DST_PE && cur_act_q.fmt == FMT_C)
                  ? R_BEAT2 : R_DONE;
        end
        R_BEAT2: if (res_ready) st_q <= R_DONE;
        R_DONE: begin
          irq               <= cur_act_q.irq && !cur_skip_q;
          release_pe[cur_q] <= 1'b1;
          st_q              <= R_IDLE;
        end
        default: st_q <= R_IDLE;
      endcase
    end
  end

  a_done_busy : assert property (@(posedge clk) disable iff (!rst_n)
    (pe_done & pend_q) == '0);

endmodule
