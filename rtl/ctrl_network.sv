// ctrl_network: the point-to-point control network between PE clusters.
//
// For every ordered pair of clusters (source, target) there is a group of N_FID
// ctrl_fifo channels. A control link is named by a pair of IDs: the sender does a
// PUT with (target PID, FID), which decodes to the FIFO src->target[FID]; the
// receiver does a GET with (source PID, FID), which decodes to FIFO
// source->self[FID]. Each cluster port is a single PUT and a single GET per cycle.
// put_ready says the addressed FIFO is not full, get_avail that it is not empty;
// get_data shows its head word combinationally and is consumed by get_valid.
// tx_full / rx_empty give every cluster the status of all its links at once, so
// cores can look for a FIFO that is not full or not empty before issuing.
// Groups for every ordered pair follow the description of a group of FIFOs per
// pair of clusters; N_FID = 4 is this design's choice. A PID equal to the port's
// own PID addresses no FIFO (put_ready/get_avail low).
module ctrl_network #(
  parameter int N_PE  = 4,
  parameter int N_FID = 4,
  parameter int W     = 32,
  parameter int DEPTH = 24,
  localparam int PW   = (N_PE  > 1) ? $clog2(N_PE)  : 1,
  localparam int FW   = (N_FID > 1) ? $clog2(N_FID) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // PUT side, one per cluster
  input  logic [N_PE-1:0]      put_valid,
  input  logic [PW-1:0]        put_pid  [N_PE],
  input  logic [FW-1:0]        put_fid  [N_PE],
  input  logic [W-1:0]         put_data [N_PE],
  output logic [N_PE-1:0]      put_ready,
  // GET side, one per cluster
  input  logic [N_PE-1:0]      get_valid,
  input  logic [PW-1:0]        get_pid  [N_PE],
  input  logic [FW-1:0]        get_fid  [N_PE],
  output logic [W-1:0]         get_data [N_PE],
  output logic [N_PE-1:0]      get_avail,
  // link status: tx_full[src][dst][fid], rx_empty[dst][src][fid]
  output logic [N_FID-1:0]     tx_full  [N_PE][N_PE],
  output logic [N_FID-1:0]     rx_empty [N_PE][N_PE]
);
  logic          f_wr   [N_PE][N_PE][N_FID];
  logic          f_rd   [N_PE][N_PE][N_FID];
  logic [W-1:0]  f_dout [N_PE][N_PE][N_FID];
  logic          f_full [N_PE][N_PE][N_FID];
  logic          f_empty[N_PE][N_PE][N_FID];

  for (genvar s = 0; s < N_PE; s++) begin : g_src
    for (genvar d = 0; d < N_PE; d++) begin : g_dst
      for (genvar f = 0; f < N_FID; f++) begin : g_fid
        if (s != d) begin : g_link
          assign f_wr[s][d][f] = put_valid[s] && (put_pid[s] == PW'(d)) && (put_fid[s] == FW'(f));
          assign f_rd[s][d][f] = get_valid[d] && (get_pid[d] == PW'(s)) && (get_fid[d] == FW'(f));
          logic [$clog2(DEPTH+1)-1:0] cnt;
          ctrl_fifo #(.W(W), .DEPTH(DEPTH)) u_fifo (
            .clk, .rst_n,
            .wr_en(f_wr[s][d][f]), .wr_data(put_data[s]),
            .rd_en(f_rd[s][d][f]), .rd_data(f_dout[s][d][f]),
            .full(f_full[s][d][f]), .empty(f_empty[s][d][f]), .count(cnt));
        end else begin : g_self
          assign f_wr[s][d][f]    = 1'b0;
          assign f_rd[s][d][f]    = 1'b0;
          assign f_dout[s][d][f]  = '0;
          assign f_full[s][d][f]  = 1'b1;
          assign f_empty[s][d][f] = 1'b1;
        end
        assign tx_full[s][d][f]  = f_full[s][d][f];
        assign rx_empty[d][s][f] = f_empty[s][d][f];
      end
    end
  end

  // Per-port decode of the addressed FIFO.
  always_comb begin
    for (int p = 0; p < N_PE; p++) begin
      put_ready[p] = !f_full[p][put_pid[p]][put_fid[p]];
      get_avail[p] = !f_empty[get_pid[p]][p][get_fid[p]];
      get_data[p]  = f_dout[get_pid[p]][p][get_fid[p]];
    end
  end
endmodule
