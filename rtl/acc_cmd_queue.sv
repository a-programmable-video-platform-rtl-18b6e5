// acc_cmd_queue: per-core command queues in front of a task-specific accelerator.
//
// Each RISC core of the cluster pushes accelerator commands into a queue of its
// own (DEPTH entries), so a core can run ahead of the accelerator. The queue heads
// are issued to the accelerator round robin, one per cycle when it is ready, each
// tagged with the core number; the accelerator returns every response with the
// same tag and this block hands it back to that core (core_rsp_valid[tag]).
// One queue per issuing core follows the accelerator coupling description; the
// depth, round-robin issue and the tag scheme are this design's choices.
module acc_cmd_queue
  import vp_pkg::*;
#(
  parameter int N_CORES = 4,
  parameter int DEPTH   = 4,
  localparam int CW = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int QW = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_CORES-1:0] core_cmd_valid,
  input  acc_cmd_t           core_cmd [N_CORES],
  output logic [N_CORES-1:0] core_cmd_ready,
  output logic [N_CORES-1:0] core_rsp_valid,
  output logic [31:0]        core_rsp_data,
  // to the accelerator
  output logic               acc_cmd_valid,
  output acc_cmd_t           acc_cmd,
  output logic [CW-1:0]      acc_cmd_tag,
  input  logic               acc_cmd_ready,
  input  logic               acc_rsp_valid,
  input  logic [CW-1:0]      acc_rsp_tag,
  input  logic [31:0]        acc_rsp_data
);
  acc_cmd_t      q     [N_CORES][DEPTH];
  logic [QW-1:0] wp    [N_CORES];
  logic [QW-1:0] rp    [N_CORES];
  logic [QW:0]   cnt   [N_CORES];
  logic [CW-1:0] rr;

  logic          sel_v;
  logic [CW-1:0] sel;
  always_comb begin
    sel_v = 1'b0;
    sel   = '0;
    for (int k = N_CORES-1; k >= 0; k--) begin
      automatic int c = (int'(rr) + k) % N_CORES;
      if (cnt[c] != 0) begin sel_v = 1'b1; sel = CW'(c); end
    end
  end

  assign acc_cmd_valid = sel_v;
  assign acc_cmd       = q[sel][rp[sel]];
  assign acc_cmd_tag   = sel;
  wire   issue         = sel_v && acc_cmd_ready;

  always_comb begin
    for (int c = 0; c < N_CORES; c++) core_cmd_ready[c] = (cnt[c] != (QW+1)'(DEPTH));
    core_rsp_valid = '0;
    if (acc_rsp_valid) core_rsp_valid[acc_rsp_tag] = 1'b1;
  end
  assign core_rsp_data = acc_rsp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0;
      for (int c = 0; c < N_CORES; c++) begin wp[c] <= '0; rp[c] <= '0; cnt[c] <= '0; end
    end else begin
      if (issue) rr <= (sel == CW'(N_CORES-1)) ? '0 : sel + 1'b1;
      for (int c = 0; c < N_CORES; c++) begin
        automatic logic push = core_cmd_valid[c] && core_cmd_ready[c];
        automatic logic pop  = issue && (sel == CW'(c));
        if (push) wp[c] <= wp[c] + 1'b1;
        if (pop)  rp[c] <= rp[c] + 1'b1;
        cnt[c] <= cnt[c] + (QW+1)'(push) - (QW+1)'(pop);
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int c = 0; c < N_CORES; c++)
      if (core_cmd_valid[c] && core_cmd_ready[c]) q[c][wp[c]] <= core_cmd[c];
  end
endmodule
