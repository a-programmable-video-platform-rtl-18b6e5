// video_platform: programmable video platform of four PE clusters.
//
// Four PE clusters, each running one task of a macroblock-pipelined HD video codec,
// are joined by two separate point-to-point networks: the control network
// (ctrl_network: FIFOs for syntax elements and synchronisation, PUT/GET by PID and
// FID, issued through each cluster's HOSK) and the data network (data_network:
// a 2 KB double-buffered shared memory per link for pixel and coefficient data,
// WRITE/READ by base address). The 720p configuration is
//   PID 0  parsing cluster      (parse_accel)
//   PID 1  ME/MC cluster        (me_accel, [-64,+64] search range)
//   PID 2  filtering cluster    (filter_accel)
//   PID 3  filtering cluster    (filter_accel)
// The RISC cores, their shared caches, the host processor, the AHB bus with DMA
// and DDR controller are not part of this module: each cluster's core buses, the
// HOSKs' context-memory ports and the clusters' data-network ports are top-level
// ports. Arrays are indexed [cluster][core]. The cluster-to-PID order is this
// design's choice; the cluster mix, networks and sizes follow the platform.
module video_platform
  import vp_pkg::*;
#(
  parameter int N_CORES    = 4,
  parameter int N_FID      = 4,
  parameter int SR         = 64,
  parameter int LINK_BYTES = 2048,
  parameter int MAX_THREADS = 8,
  localparam int N_PE = 4,
  localparam int CW = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int TW = (MAX_THREADS > 1) ? $clog2(MAX_THREADS) : 1,
  localparam int PW = 2,
  localparam int FW = (N_FID > 1) ? $clog2(N_FID) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // HOSK command buses
  input  logic [N_CORES-1:0] h_cmd_valid [N_PE],
  input  hosk_cmd_t          h_cmd       [N_PE][N_CORES],
  output logic [N_CORES-1:0] h_cmd_ready [N_PE],
  output logic [N_CORES-1:0] h_rsp_valid [N_PE],
  output logic [31:0]        h_rsp_data  [N_PE],
  output logic               h_rsp_ok    [N_PE],
  // accelerator command buses
  input  logic [N_CORES-1:0] a_cmd_valid [N_PE],
  input  acc_cmd_t           a_cmd       [N_PE][N_CORES],
  output logic [N_CORES-1:0] a_cmd_ready [N_PE],
  output logic [N_CORES-1:0] a_rsp_valid [N_PE],
  output logic [31:0]        a_rsp_data  [N_PE],
  // context buses
  output logic               ctx_sw_valid     [N_PE],
  output logic [CW-1:0]      ctx_sw_core      [N_PE],
  output logic [$clog2(CTX_WORDS)-1:0] ctx_sw_idx [N_PE],
  output logic               ctx_sw_new_valid [N_PE],
  output logic [31:0]        ctx_in_data      [N_PE],
  input  logic [31:0]        ctx_out_data     [N_PE][N_CORES],
  // context memory ports (to the off-chip memory through the system bus)
  output logic               mem_req    [N_PE],
  output logic               mem_we     [N_PE],
  output logic [31:0]        mem_addr   [N_PE],
  output logic [31:0]        mem_wdata  [N_PE],
  input  logic               mem_gnt    [N_PE],
  input  logic               mem_rvalid [N_PE],
  input  logic [31:0]        mem_rdata  [N_PE],
  // data-network ports of the clusters
  input  logic [N_PE-1:0]    dn_wr_en,
  input  logic [31:0]        dn_wr_addr [N_PE],
  input  logic [31:0]        dn_wr_data [N_PE],
  input  logic [N_PE-1:0]    dn_rd_en,
  input  logic [31:0]        dn_rd_addr [N_PE],
  output logic [31:0]        dn_rd_data [N_PE],
  output logic [N_PE-1:0]    dn_rd_valid,
  // status
  output logic [MAX_THREADS-1:0] ready_vec [N_PE],
  output logic               core_busy [N_PE][N_CORES],
  output logic [TW-1:0]      core_tid  [N_PE][N_CORES]
);
  localparam acc_kind_t KINDS [N_PE] = '{ACC_PARSE, ACC_ME, ACC_FILTER, ACC_FILTER};

  logic [N_PE-1:0]  put_valid, put_ready, get_valid, get_avail;
  logic [PW-1:0]    put_pid [N_PE], get_pid [N_PE];
  logic [FW-1:0]    put_fid [N_PE], get_fid [N_PE];
  logic [31:0]      put_data [N_PE], get_data [N_PE];
  logic [N_FID-1:0] tx_full  [N_PE][N_PE];
  logic [N_FID-1:0] rx_empty [N_PE][N_PE];

  ctrl_network #(.N_PE(N_PE), .N_FID(N_FID), .W(32), .DEPTH(24)) u_ctrl (
    .clk, .rst_n,
    .put_valid, .put_pid, .put_fid, .put_data, .put_ready,
    .get_valid, .get_pid, .get_fid, .get_data, .get_avail,
    .tx_full, .rx_empty);

  data_network #(.N_PE(N_PE), .LINK_BYTES(LINK_BYTES)) u_data (
    .clk, .rst_n,
    .wr_en(dn_wr_en), .wr_addr(dn_wr_addr), .wr_data(dn_wr_data),
    .rd_en(dn_rd_en), .rd_addr(dn_rd_addr), .rd_data(dn_rd_data), .rd_valid(dn_rd_valid));

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    pe_cluster #(.KIND(KINDS[p]), .N_CORES(N_CORES), .N_PE(N_PE), .N_FID(N_FID), .SR(SR),
                 .MAX_THREADS(MAX_THREADS)) u_pe (
      .clk, .rst_n,
      .h_cmd_valid(h_cmd_valid[p]), .h_cmd(h_cmd[p]), .h_cmd_ready(h_cmd_ready[p]),
      .h_rsp_valid(h_rsp_valid[p]), .h_rsp_data(h_rsp_data[p]), .h_rsp_ok(h_rsp_ok[p]),
      .a_cmd_valid(a_cmd_valid[p]), .a_cmd(a_cmd[p]), .a_cmd_ready(a_cmd_ready[p]),
      .a_rsp_valid(a_rsp_valid[p]), .a_rsp_data(a_rsp_data[p]),
      .ctx_sw_valid(ctx_sw_valid[p]), .ctx_sw_core(ctx_sw_core[p]), .ctx_sw_idx(ctx_sw_idx[p]),
      .ctx_sw_new_valid(ctx_sw_new_valid[p]), .ctx_in_data(ctx_in_data[p]),
      .ctx_out_data(ctx_out_data[p]),
      .mem_req(mem_req[p]), .mem_we(mem_we[p]), .mem_addr(mem_addr[p]), .mem_wdata(mem_wdata[p]),
      .mem_gnt(mem_gnt[p]), .mem_rvalid(mem_rvalid[p]), .mem_rdata(mem_rdata[p]),
      .put_valid(put_valid[p]), .put_pid(put_pid[p]), .put_fid(put_fid[p]),
      .put_data(put_data[p]), .put_ready(put_ready[p]),
      .get_valid(get_valid[p]), .get_pid(get_pid[p]), .get_fid(get_fid[p]),
      .get_data(get_data[p]), .get_avail(get_avail[p]),
      .tx_full(tx_full[p]), .rx_empty(rx_empty[p]),
      .ready_vec(ready_vec[p]), .core_busy(core_busy[p]), .core_tid(core_tid[p]));
  end
endmodule
