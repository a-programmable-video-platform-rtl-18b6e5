// hosk: hardware operating system kernel of one PE cluster.
//
// The RISC cores of the cluster issue kernel calls on their command buses
// (valid/ready, one hosk_cmd_t per core). The main controller grants one core per
// cycle, round robin, and routes the call:
//   - thread, priority, active-core and semaphore calls go to the TAS manager;
//   - PUT, GET and STATUS go to the cluster's control-network port. A PUT to a
//     full FIFO or a GET from an empty one completes with rsp_ok = 0 and moves no
//     data, so a core can look for a FIFO that is ready instead of stalling.
// Every call answers one cycle after it is accepted (rsp_valid to that core, with
// rsp_data and rsp_ok). SEM_WAIT answers rsp_data = 0 when the caller blocked; the
// context manager then swaps the core's context out on the context bus.
// The TAS manager's decisions go to the context manager, which moves contexts
// between the external context memory and the cores (16 cycles on the bus).
// The split into main controller, TAS manager and context manager follows the
// HOSK description; the command encoding, round-robin grant and the
// non-blocking PUT/GET are this design's choices.
module hosk
  import vp_pkg::*;
#(
  parameter int N_CORES     = 4,
  parameter int MAX_THREADS = 8,
  parameter int N_SEM       = 8,
  parameter int N_PE        = 4,
  parameter int N_FID       = 4,
  parameter logic [31:0] CTX_BASE = 32'h0,
  localparam int CW = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int TW = (MAX_THREADS > 1) ? $clog2(MAX_THREADS) : 1,
  localparam int PW = (N_PE > 1) ? $clog2(N_PE) : 1,
  localparam int FW = (N_FID > 1) ? $clog2(N_FID) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // command bus, one per core
  input  logic [N_CORES-1:0] cmd_valid,
  input  hosk_cmd_t          cmd [N_CORES],
  output logic [N_CORES-1:0] cmd_ready,
  output logic [N_CORES-1:0] rsp_valid,
  output logic [31:0]        rsp_data,
  output logic               rsp_ok,
  // control-network port of this cluster
  output logic              put_valid,
  output logic [PW-1:0]     put_pid,
  output logic [FW-1:0]     put_fid,
  output logic [31:0]       put_data,
  input  logic              put_ready,
  output logic              get_valid,
  output logic [PW-1:0]     get_pid,
  output logic [FW-1:0]     get_fid,
  input  logic [31:0]       get_data,
  input  logic              get_avail,
  input  logic [N_FID-1:0]  tx_full  [N_PE],
  input  logic [N_FID-1:0]  rx_empty [N_PE],
  // external context memory
  output logic              mem_req,
  output logic              mem_we,
  output logic [31:0]       mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [31:0]       mem_rdata,
  // context bus
  output logic              ctx_sw_valid,
  output logic [CW-1:0]     ctx_sw_core,
  output logic [$clog2(CTX_WORDS)-1:0] ctx_sw_idx,
  output logic              ctx_sw_new_valid,
  output logic [31:0]       ctx_in_data,
  input  logic [31:0]       ctx_out_data [N_CORES],
  // status
  output logic [MAX_THREADS-1:0] ready_vec,
  output logic              core_busy [N_CORES],
  output logic [TW-1:0]     core_tid  [N_CORES]
);
  // ------------------------------------------------------------ round-robin grant
  logic [CW-1:0] rr_ptr;
  logic          g_v;
  logic [CW-1:0] g_core;
  always_comb begin
    g_v = 1'b0;
    g_core = '0;
    for (int k = N_CORES-1; k >= 0; k--) begin
      automatic int c = (int'(rr_ptr) + k) % N_CORES;
      if (cmd_valid[c]) begin g_v = 1'b1; g_core = CW'(c); end
    end
  end

  hosk_cmd_t g_cmd;
  assign g_cmd = cmd[g_core];
  wire is_net = (g_cmd.op == H_PUT) || (g_cmd.op == H_GET) || (g_cmd.op == H_STATUS);

  // ------------------------------------------------------------ TAS + context
  logic              tas_ready, tas_ok;
  logic [31:0]       tas_rsp;
  logic              cr_v;
  logic [TW-1:0]     cr_t;
  logic [31:0]       cr_pc;
  logic              s_v, s_nv, s_ov, s_done, cm_idle;
  logic [CW-1:0]     s_core;
  logic [TW-1:0]     s_nt, s_ot;
  logic [CW:0]       n_active;

  wire accept = g_v && (is_net || tas_ready);

  hosk_tas_manager #(.N_CORES(N_CORES), .MAX_THREADS(MAX_THREADS), .N_SEM(N_SEM)) u_tas (
    .clk, .rst_n,
    .op_valid(g_v && !is_net), .op_ready(tas_ready), .op(g_cmd.op), .op_core(g_core),
    .op_a0(g_cmd.a0), .op_a1(g_cmd.a1), .op_rsp(tas_rsp), .op_ok(tas_ok),
    .create_valid(cr_v), .create_tid(cr_t), .create_pc(cr_pc),
    .sched_valid(s_v), .sched_core(s_core), .sched_new_valid(s_nv), .sched_new_tid(s_nt),
    .sched_old_valid(s_ov), .sched_old_tid(s_ot), .sched_done(s_done), .sched_allow(cm_idle),
    .ready_vec, .n_active, .core_busy, .core_tid);

  hosk_context_manager #(.N_CORES(N_CORES), .MAX_THREADS(MAX_THREADS), .CTX_WORDS(CTX_WORDS),
                         .CTX_BASE(CTX_BASE)) u_ctx (
    .clk, .rst_n,
    .create_valid(cr_v), .create_tid(cr_t), .create_pc(cr_pc),
    .sched_valid(s_v), .sched_core(s_core), .sched_new_valid(s_nv), .sched_new_tid(s_nt),
    .sched_old_valid(s_ov), .sched_old_tid(s_ot), .sched_done(s_done), .idle(cm_idle),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .ctx_sw_valid, .ctx_sw_core, .ctx_sw_idx, .ctx_sw_new_valid, .ctx_in_data, .ctx_out_data);

  // ------------------------------------------------------------ network calls
  wire [PW-1:0] n_pid = g_cmd.a0[FW+PW-1:FW];
  wire [FW-1:0] n_fid = g_cmd.a0[FW-1:0];
  assign put_pid  = n_pid;
  assign put_fid  = n_fid;
  assign put_data = g_cmd.a1;
  assign get_pid  = n_pid;
  assign get_fid  = n_fid;
  assign put_valid = accept && (g_cmd.op == H_PUT) && put_ready;
  assign get_valid = accept && (g_cmd.op == H_GET) && get_avail;

  logic [31:0] net_rsp;
  logic        net_ok;
  always_comb begin
    net_rsp = '0;
    net_ok  = 1'b1;
    unique case (g_cmd.op)
      H_PUT:    begin net_ok = put_ready; net_rsp = {31'd0, put_ready}; end
      H_GET:    begin net_ok = get_avail; net_rsp = get_avail ? get_data : '0; end
      H_STATUS: net_rsp = {30'd0, tx_full[n_pid][n_fid], rx_empty[n_pid][n_fid]};
      default: ;
    endcase
  end

  // ------------------------------------------------------------ responses
  always_comb begin
    cmd_ready = '0;
    if (accept) cmd_ready[g_core] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_ptr    <= '0;
      rsp_valid <= '0;
      rsp_data  <= '0;
      rsp_ok    <= 1'b0;
    end else begin
      rsp_valid <= cmd_ready;
      if (accept) begin
        rr_ptr   <= (g_core == CW'(N_CORES-1)) ? '0 : g_core + 1'b1;
        rsp_data <= is_net ? net_rsp : tas_rsp;
        rsp_ok   <= is_net ? net_ok  : tas_ok;
      end
    end
  end
endmodule
