// cascabel2_soc: a system built around the Cascabel 2 unit that holds the
// PEs of all evaluated workloads: Fibonacci PEs and sum-reduce PEs that
// launch and merge tasks on chip (recursion test), a NOP PE (launch latency
// test), three near-data processing PEs computing avg, max and sum over a
// table column (database query test, their memory read ports brought out),
// and N_EXT external PE slots whose control, launch and result ports are
// brought out, so that further accelerators (or a test bench acting as a
// parent PE) can be attached.
//
// PE numbering: 0..N_FIB-1 Fibonacci, then N_RED reduce PEs, then N_NOP NOP
// PEs, then the avg, max and sum PEs, then N_EXT external slots. The PE
// counts of the recursion test (2 Fibonacci, 4 reduce) are the evaluated
// configuration; putting all workloads' PEs into one system, the NOP PE
// count and the external slot are this design's choices. PEs that never
// launch tasks or receive results have those ports tied off, as the
// launch/result interconnect is optional per PE.
//
// Status outputs (busy PEs, queue stall and fill, free merge groups,
// return-action pulses) are those of cascabel2.
//
// The host drives the Cascabel 2 register bus (see host_if for the map).
// An external PE follows the cascabel2 PE control port: `ext_start[i]`
// pulses with `ext_args`/`ext_argc`/`ext_task_id`, and the PE answers with
// a one-cycle `ext_done[i]` and its result on `ext_retval[i]`.
module cascabel2_soc #(
  parameter int unsigned N_FIB       = 2,
  parameter int unsigned N_RED       = 4,
  parameter int unsigned N_NOP       = 1,
  parameter int unsigned MEM_AW      = 32,
  parameter int unsigned N_EXT       = 1,
  parameter int unsigned QUEUE_DEPTH = 512,
  parameter int unsigned SLOTS       = 4096,
  localparam int unsigned NPE = N_FIB + N_RED + N_NOP + 3 + N_EXT
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  // host register bus
  input  logic                                    host_wr_en,
  input  logic [7:0]                              host_wr_addr,
  input  logic [63:0]                             host_wr_data,
  input  logic                                    host_rd_en,
  input  logic [7:0]                              host_rd_addr,
  output logic [63:0]                             host_rd_data,
  output logic                                    host_irq,
  output logic                                    ready,
  output logic [NPE-1:0]                          pe_busy,
  output logic                                    hol_stall,
  output logic [$clog2(QUEUE_DEPTH):0]            queue_level,
  output logic [$clog2(SLOTS):0]                  free_groups,
  output cb2_pkg::ret_ev_t                        ret_ev,
  // memory read ports of the NDP PEs (0 avg, 1 max, 2 sum)
  output logic [2:0]                              ndp_mem_req,
  output logic [2:0][MEM_AW-1:0]                  ndp_mem_addr,
  input  logic [2:0]                              ndp_mem_gnt,
  input  logic [2:0]                              ndp_mem_rvalid,
  input  cb2_pkg::arg_t [2:0]                     ndp_mem_rdata,
  // external PE slots
  output logic [N_EXT-1:0]                        ext_start,
  output cb2_pkg::args_t                          ext_args,
  output cb2_pkg::cnt_t                           ext_argc,
  output cb2_pkg::tid_t                           ext_task_id,
  input  logic [N_EXT-1:0]                        ext_done,
  input  cb2_pkg::arg_t [N_EXT-1:0]               ext_retval,
  input  logic [N_EXT-1:0]                        ext_lr_valid,
  output logic [N_EXT-1:0]                        ext_lr_ready,
  input  logic [N_EXT-1:0][cb2_pkg::LAUNCH_W-1:0] ext_lr_data,
  output logic [N_EXT-1:0]                        ext_rs_valid,
  input  logic [N_EXT-1:0]                        ext_rs_ready,
  output logic [N_EXT-1:0][cb2_pkg::RESULT_W-1:0] ext_rs_data,
  output logic [N_EXT-1:0]                        ext_rs_last
);
  import cb2_pkg::*;

  localparam int unsigned B_RED = N_FIB;
  localparam int unsigned B_NOP = N_FIB + N_RED;
  localparam int unsigned B_NDP = N_FIB + N_RED + N_NOP;
  localparam int unsigned B_EXT = N_FIB + N_RED + N_NOP + 3;

  function automatic kid_t [NPE-1:0] kinds();
    kid_t [NPE-1:0] k;
    for (int unsigned i = 0; i < NPE; i++)
      k[i] = (i < B_RED) ? KID_FIB : (i < B_NOP) ? KID_REDUCE
           : (i < B_NDP) ? KID_NOP : (i == B_NDP) ? KID_AVG
           : (i == B_NDP + 1) ? KID_MAX : (i == B_NDP + 2) ? KID_SUM : KID_EXT;
    return k;
  endfunction
  localparam kid_t [NPE-1:0] PE_KID = kinds();

  logic [NPE-1:0]                lr_valid, lr_ready;
  logic [NPE-1:0][LAUNCH_W-1:0]  lr_data;
  logic [NPE-1:0]                rs_valid, rs_ready, rs_last;
  logic [NPE-1:0][RESULT_W-1:0]  rs_data;
  logic [NPE-1:0]                pe_start, pe_done;
  arg_t [NPE-1:0]                pe_retval;
  args_t                         pe_args;
  cnt_t                          pe_argc;
  tid_t                          pe_task_id;

  cascabel2 #(.NPE(NPE), .PE_KID(PE_KID), .QUEUE_DEPTH(QUEUE_DEPTH),
              .SLOTS(SLOTS)) u_cb2 (
    .clk, .rst_n,
    .host_wr_en, .host_wr_addr, .host_wr_data,
    .host_rd_en, .host_rd_addr, .host_rd_data, .host_irq,
    .lr_valid, .lr_ready, .lr_data,
    .rs_valid, .rs_ready, .rs_data, .rs_last,
    .pe_start, .pe_args, .pe_argc, .pe_task_id,
    .pe_done, .pe_retval,
    .pe_busy, .ready, .hol_stall, .queue_level, .free_groups, .ret_ev
  );

  for (genvar i = 0; i < N_FIB; i++) begin : g_fib
    fib_pe u_pe (
      .clk, .rst_n, .start(pe_start[i]), .args(pe_args),
      .done(pe_done[i]), .retval(pe_retval[i]),
      .lr_valid(lr_valid[i]), .lr_ready(lr_ready[i]), .lr_data(lr_data[i])
    );
    assign rs_ready[i] = 1'b1;
  end

  for (genvar i = B_RED; i < B_NOP; i++) begin : g_red
    reduce_pe u_pe (
      .clk, .rst_n, .start(pe_start[i]), .args(pe_args), .argc(pe_argc),
      .done(pe_done[i]), .retval(pe_retval[i])
    );
    assign lr_valid[i] = 1'b0;
    assign lr_data[i]  = '0;
    assign rs_ready[i] = 1'b1;
  end

  for (genvar i = B_NOP; i < B_NDP; i++) begin : g_nop
    nop_pe u_pe (
      .clk, .rst_n, .start(pe_start[i]), .args(pe_args),
      .done(pe_done[i]), .retval(pe_retval[i])
    );
    assign lr_valid[i] = 1'b0;
    assign lr_data[i]  = '0;
    assign rs_ready[i] = 1'b1;
  end

  for (genvar i = 0; i < 3; i++) begin : g_ndp
    ndp_agg_pe #(.OP(agg_op_t'(i)), .AW(MEM_AW)) u_pe (
      .clk, .rst_n, .start(pe_start[B_NDP+i]), .args(pe_args),
      .done(pe_done[B_NDP+i]), .retval(pe_retval[B_NDP+i]),
      .mem_req(ndp_mem_req[i]), .mem_addr(ndp_mem_addr[i]),
      .mem_gnt(ndp_mem_gnt[i]), .mem_rvalid(ndp_mem_rvalid[i]),
      .mem_rdata(ndp_mem_rdata[i])
    );
    assign lr_valid[B_NDP+i] = 1'b0;
    assign lr_data[B_NDP+i]  = '0;
    assign rs_ready[B_NDP+i] = 1'b1;
  end

  for (genvar i = 0; i < N_EXT; i++) begin : g_ext
    assign ext_start[i]         = pe_start[B_EXT+i];
    assign pe_done[B_EXT+i]     = ext_done[i];
    assign pe_retval[B_EXT+i]   = ext_retval[i];
    assign lr_valid[B_EXT+i]    = ext_lr_valid[i];
    assign ext_lr_ready[i]      = lr_ready[B_EXT+i];
    assign lr_data[B_EXT+i]     = ext_lr_data[i];
    assign ext_rs_valid[i]      = rs_valid[B_EXT+i];
    assign rs_ready[B_EXT+i]    = ext_rs_ready[i];
    assign ext_rs_data[i]       = rs_data[B_EXT+i];
    assign ext_rs_last[i]       = rs_last[B_EXT+i];
  end
  assign ext_args    = pe_args;
  assign ext_argc    = pe_argc;
  assign ext_task_id = pe_task_id;

endmodule
