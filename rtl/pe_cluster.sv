// pe_cluster: one processing-element cluster of the video platform.
//
// A cluster runs one task of the macroblock pipeline. It holds the hardware OS
// kernel (hosk), one command queue per core in front of the task-specific
// accelerator (acc_cmd_queue) and the accelerator itself, chosen by KIND:
// ACC_PARSE (parse_accel), ACC_ME (me_accel) or ACC_FILTER (filter_accel).
// The RISC cores and their shared caches sit outside; per core this module offers
//   - the HOSK command bus (kernel calls, PUT/GET on the control network),
//   - the accelerator command bus (commands queued per core, answers tagged back),
//   - the context bus (ctx_sw_* from the HOSK, ctx_out_data from each core).
// The HOSK's context-memory port and the control-network port leave the cluster.
// All buses are valid/ready with one-cycle responses, see the sub-blocks for
// their timing. The composition follows the cluster description (cores, HOSK,
// task-specific accelerator, network interface); the interfaces are this design's.
module pe_cluster
  import vp_pkg::*;
#(
  parameter acc_kind_t KIND    = ACC_FILTER,
  parameter int        N_CORES = 4,
  parameter int        N_PE    = 4,
  parameter int        N_FID   = 4,
  parameter int        SR      = 64,
  parameter int        MAX_THREADS = 8,
  parameter logic [31:0] CTX_BASE = 32'h0,
  localparam int CW = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int TW = (MAX_THREADS > 1) ? $clog2(MAX_THREADS) : 1,
  localparam int PW = (N_PE > 1) ? $clog2(N_PE) : 1,
  localparam int FW = (N_FID > 1) ? $clog2(N_FID) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // HOSK command bus
  input  logic [N_CORES-1:0] h_cmd_valid,
  input  hosk_cmd_t          h_cmd [N_CORES],
  output logic [N_CORES-1:0] h_cmd_ready,
  output logic [N_CORES-1:0] h_rsp_valid,
  output logic [31:0]        h_rsp_data,
  output logic               h_rsp_ok,
  // accelerator command bus
  input  logic [N_CORES-1:0] a_cmd_valid,
  input  acc_cmd_t           a_cmd [N_CORES],
  output logic [N_CORES-1:0] a_cmd_ready,
  output logic [N_CORES-1:0] a_rsp_valid,
  output logic [31:0]        a_rsp_data,
  // context bus
  output logic               ctx_sw_valid,
  output logic [CW-1:0]      ctx_sw_core,
  output logic [$clog2(CTX_WORDS)-1:0] ctx_sw_idx,
  output logic               ctx_sw_new_valid,
  output logic [31:0]        ctx_in_data,
  input  logic [31:0]        ctx_out_data [N_CORES],
  // context memory
  output logic               mem_req,
  output logic               mem_we,
  output logic [31:0]        mem_addr,
  output logic [31:0]        mem_wdata,
  input  logic               mem_gnt,
  input  logic               mem_rvalid,
  input  logic [31:0]        mem_rdata,
  // control network
  output logic               put_valid,
  output logic [PW-1:0]      put_pid,
  output logic [FW-1:0]      put_fid,
  output logic [31:0]        put_data,
  input  logic               put_ready,
  output logic               get_valid,
  output logic [PW-1:0]      get_pid,
  output logic [FW-1:0]      get_fid,
  input  logic [31:0]        get_data,
  input  logic               get_avail,
  input  logic [N_FID-1:0]   tx_full  [N_PE],
  input  logic [N_FID-1:0]   rx_empty [N_PE],
  // status
  output logic [MAX_THREADS-1:0] ready_vec,
  output logic               core_busy [N_CORES],
  output logic [TW-1:0]      core_tid  [N_CORES]
);
  hosk #(.N_CORES(N_CORES), .MAX_THREADS(MAX_THREADS), .N_PE(N_PE), .N_FID(N_FID),
         .CTX_BASE(CTX_BASE)) u_hosk (
    .clk, .rst_n,
    .cmd_valid(h_cmd_valid), .cmd(h_cmd), .cmd_ready(h_cmd_ready),
    .rsp_valid(h_rsp_valid), .rsp_data(h_rsp_data), .rsp_ok(h_rsp_ok),
    .put_valid, .put_pid, .put_fid, .put_data, .put_ready,
    .get_valid, .get_pid, .get_fid, .get_data, .get_avail, .tx_full, .rx_empty,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .ctx_sw_valid, .ctx_sw_core, .ctx_sw_idx, .ctx_sw_new_valid, .ctx_in_data, .ctx_out_data,
    .ready_vec, .core_busy, .core_tid);

  logic          q_valid, q_ready, r_valid;
  acc_cmd_t      q_cmd;
  logic [CW-1:0] q_tag, r_tag;
  logic [31:0]   r_data;

  acc_cmd_queue #(.N_CORES(N_CORES)) u_queue (
    .clk, .rst_n,
    .core_cmd_valid(a_cmd_valid), .core_cmd(a_cmd), .core_cmd_ready(a_cmd_ready),
    .core_rsp_valid(a_rsp_valid), .core_rsp_data(a_rsp_data),
    .acc_cmd_valid(q_valid), .acc_cmd(q_cmd), .acc_cmd_tag(q_tag), .acc_cmd_ready(q_ready),
    .acc_rsp_valid(r_valid), .acc_rsp_tag(r_tag), .acc_rsp_data(r_data));

  if (KIND == ACC_PARSE) begin : g_parse
    parse_accel #(.TAG_W(CW)) u_acc (
      .clk, .rst_n, .cmd_valid(q_valid), .cmd(q_cmd), .cmd_tag(q_tag), .cmd_ready(q_ready),
      .rsp_valid(r_valid), .rsp_tag(r_tag), .rsp_data(r_data));
  end else if (KIND == ACC_ME) begin : g_me
    me_accel #(.SR(SR), .TAG_W(CW)) u_acc (
      .clk, .rst_n, .cmd_valid(q_valid), .cmd(q_cmd), .cmd_tag(q_tag), .cmd_ready(q_ready),
      .rsp_valid(r_valid), .rsp_tag(r_tag), .rsp_data(r_data));
  end else begin : g_filter
    filter_accel #(.N_COPIES(4), .N_REGS(16), .TAG_W(CW)) u_acc (
      .clk, .rst_n, .cmd_valid(q_valid), .cmd(q_cmd), .cmd_tag(q_tag), .cmd_ready(q_ready),
      .rsp_valid(r_valid), .rsp_tag(r_tag), .rsp_data(r_data));
  end
endmodule
