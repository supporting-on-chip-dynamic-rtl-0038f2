// cb2_pkg: types and constants shared by the Cascabel 2 on-chip task
// dispatcher and the processing elements (PEs) attached to it.
//
// A task is launched with up to four 64-bit arguments, all carried in one
// beat of the 512-bit launch request stream; results travel back on a 64-bit
// result stream. These widths and the four-argument limit follow the design
// description. The field layout of the 512-bit beat, the kernel IDs, the
// 32-bit task IDs and the encoding of return destinations are this design's
// own choices.
package cb2_pkg;

  localparam int unsigned ARG_W    = 64;   // argument width
  localparam int unsigned NARGS    = 4;    // arguments per task
  localparam int unsigned LAUNCH_W = 512;  // launch request stream width
  localparam int unsigned RESULT_W = 64;   // result stream width
  localparam int unsigned TID_W    = 32;   // task ID width (fits format (b))
  localparam int unsigned KID_W    = 8;    // kernel (PE type) ID width
  localparam int unsigned IDX_W    = 16;   // PE index or merge slot index
  localparam int unsigned CNT_W    = 3;    // argument / merge counts 0..4

  typedef logic [ARG_W-1:0]            arg_t;
  typedef logic [NARGS-1:0][ARG_W-1:0] args_t;
  typedef logic [TID_W-1:0]            tid_t;
  typedef logic [KID_W-1:0]            kid_t;
  typedef logic [CNT_W-1:0]            cnt_t;

  // Kernel IDs of the PE types used in this design.
  localparam kid_t KID_FIB    = 8'd1;
  localparam kid_t KID_REDUCE = 8'd2;
  localparam kid_t KID_NOP    = 8'd3;
  localparam kid_t KID_EXT    = 8'd4;
  localparam kid_t KID_AVG    = 8'd5;
  localparam kid_t KID_MAX    = 8'd6;
  localparam kid_t KID_SUM    = 8'd7;

  // Aggregation performed by a near-data processing PE.
  typedef enum logic [1:0] {
    AGG_AVG = 2'd0,
    AGG_MAX = 2'd1,
    AGG_SUM = 2'd2
  } agg_op_t;

  // Return action requested for a child task, relative to the launching PE.
  typedef enum logic [1:0] {
    RET_DISCARD     = 2'd0,  // (1) discard child result
    RET_PARENT      = 2'd1,  // (2) return to parent
    RET_GRANDPARENT = 2'd2   // (4) return to grandparent (skip parent)
  } ret_mode_t;

  // Result stream format when a result is delivered to a PE (Fig. 4).
  typedef enum logic [1:0] {
    FMT_A = 2'd0,  // one beat: 64-bit value
    FMT_B = 2'd1,  // one beat: {task ID[31:0], value[31:0]}
    FMT_C = 2'd2   // two beats: 64-bit value, then task ID
  } fmt_t;

  // Absolute destination of a task result, resolved at submission.
  typedef enum logic [1:0] {
    DST_NONE  = 2'd0,
    DST_PE    = 2'd1,
    DST_MERGE = 2'd2,
    DST_HOST  = 2'd3
  } dkind_t;

  typedef struct packed {
    dkind_t           kind;
    logic [IDX_W-1:0] idx;   // PE index or merge slot
  } dest_t;

  // One 512-bit launch request beat from a PE.
  typedef struct packed {
    logic [LAUNCH_W-285:0] rsvd;
    logic      irq;           // raise host interrupt when this task finishes
    fmt_t      fmt;           // result format if delivered to a PE
    kid_t      merge_kernel;  // kernel of the merge/reduce task
    cnt_t      merge_count;   // number of sibling launches merged (1..4)
    logic      merge;         // merge/reduce the results of the siblings
    ret_mode_t ret_mode;
    cnt_t      argc;
    kid_t      kernel;
    args_t     args;          // args[0] in bits 63:0
  } launch_req_t;

  // A task as held in the queue and handed to the launcher.
  typedef struct packed {
    kid_t  kernel;
    cnt_t  argc;
    args_t args;
    tid_t  task_id;
    dest_t dest;
    fmt_t  fmt;
    logic  irq;
  } task_t;

  // Task submitted by the host or by the merge buffer (destination known,
  // task ID not yet assigned).
  typedef struct packed {
    kid_t  kernel;
    cnt_t  argc;
    args_t args;
    dest_t dest;
    fmt_t  fmt;
    logic  irq;
  } sub_t;

  // Return action recorded by the launcher for the task running on a PE.
  typedef struct packed {
    tid_t  task_id;
    dest_t dest;
    fmt_t  fmt;
    logic  irq;
  } action_t;

  // Merge group as set up when the first merged sibling is submitted.
  typedef struct packed {
    cnt_t  count;
    kid_t  kernel;
    dest_t dest;
    fmt_t  fmt;
    logic  irq;
  } merge_meta_t;

  // One-cycle pulses, one per completed task, naming the action performed.
  typedef struct packed {
    logic discard;  // result dropped (no destination)
    logic parent;   // sent to a PE on the result stream
    logic merge;    // deposited in a merge group
    logic host;     // handed to the host interface
    logic skip;     // dropped because the task passed its result on
  } ret_ev_t;

endpackage
