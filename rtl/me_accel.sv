// me_accel: ME/MC (motion estimation / compensation) accelerator.
//
// Holds the current 16x16 macroblock and a search-range buffer of
// (16+2*SR) x (16+2*SR) reference pixels, i.e. 144x144 = 20.25 KB for the
// [-64,+64] range. The RISC cores run the search strategy (which candidates to
// try); the accelerator does the heavy part for each candidate:
//   M_SADCAND (mvx, mvy)  reads the 16 reference rows of the candidate one per
//       cycle, computes the row SADs (me_sad4x4), accumulates the sixteen 4x4 SADs,
//       forms the costs of all 41 partitions (me_vbs_tree) and updates the best
//       cost and motion vector of each partition (me_best_mv). Answers the 16x16
//       cost 18 cycles after acceptance.
//   M_6TAB (row, col)     half-pel interpolation of four horizontal positions
//       col+0.5 .. col+3.5 with the 6-tap filter (1,-5,20,20,-5,1), rounded,
//       shifted by 5 and clipped to 8 bits; answers the four pixels packed.
//   M_LDCUR / M_LDREF load four pixels (a1[7:0] is the leftmost); M_CLRBEST resets
//   the best costs; M_GETBEST / M_GETCOST read a partition's best {mv, cost} or the
//   last candidate's cost.
//   M_SETPMV (pmvx, pmvy, lambda) / M_MVCE (mvx, mvy)  motion-vector cost
//       lambda * (bits(mvx-pmvx) + bits(mvy-pmvy)), bits = length of the se(v)
//       code of the difference; M_MVCE answers it and every candidate's partition
//       costs include it before the compare (lambda = 0 after reset: pure SAD).
//   M_STMV col / M_PMV col, newrow  motion-vector row buffer: M_STMV stores the
//       best 16x16 vector in column col of a one-row buffer (and as the left
//       neighbour); M_PMV forms the component-wise median of left, top (col) and
//       top-right (col+1) vectors, sets it as the predictor for M_MVCE and answers
//       it. newrow (a0[8]) treats the left neighbour as zero, as does a top-right
//       beyond the last column.
// The reference buffer is organised as one wide word per row so a candidate row is
// a single read followed by a byte shift. cmd_ready is low while a command runs.
// SAD, the 41-partition adder tree, the compare-and-update and the 6-tap filter
// and the motion-vector cost estimate follow the accelerator description and its
// command list; the bit-count cost model, the command encoding,
// row-serial schedule and buffer organisation are this design's choices. The
// half/quarter-pel buffers are not included; the row buffer and the median
// predictor are this design's reading of the motion-vector buffer.
module me_accel
  import vp_pkg::*;
#(
  parameter int SR    = 64,
  parameter int TAG_W = 2,
  parameter int MB_COLS = 80,              // macroblocks per row (1280 / 16)
  localparam int MB   = 16,
  localparam int WIN  = MB + 2*SR,
  localparam int XW   = $clog2(WIN)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  input  acc_cmd_t         cmd,
  input  logic [TAG_W-1:0] cmd_tag,
  output logic             cmd_ready,
  output logic             rsp_valid,
  output logic [TAG_W-1:0] rsp_tag,
  output logic [31:0]      rsp_data
);
  typedef enum logic [2:0] {S_IDLE, S_SAD, S_CMP, S_F6RD, S_F6} state_t;
  state_t state;

  logic [7:0]         cur_mb  [MB][MB];
  logic [8*WIN-1:0]   ref_mem [WIN];
  logic [8*WIN-1:0]   row_q;
  logic [4:0]         cnt;
  logic [XW-1:0]      r0, c0;
  logic signed [7:0]  mvx_q, mvy_q;
  logic [11:0]        acc [16];
  logic [15:0]        cost [41];
  logic [15:0]        last_cost [41];
  logic [15:0]        best_cost [41];
  logic [15:0]        best_mv   [41];
  logic [TAG_W-1:0]   tag_q;
  logic               upd, clr;
  logic signed [7:0]  pmvx, pmvy;         // motion-vector predictor
  logic [7:0]         lambda;             // cost per motion-vector bit
  logic [15:0]        cost_mv [41];       // SAD + motion-vector cost
  logic [15:0]        mv_row [MB_COLS];   // 16x16 vectors of the row above / current row
  logic [15:0]        mv_left;            // vector of the macroblock to the left

  localparam int CLW = $clog2(MB_COLS);
  function automatic logic signed [7:0] med3(input logic signed [7:0] a, input logic signed [7:0] b,
                                             input logic signed [7:0] c);
    if ((a >= b) == (b >= c)) return b;
    if ((b >= a) == (a >= c)) return a;
    return c;
  endfunction
  // median prediction for the macroblock in column a0[7:0] (left, top, top-right)
  wire [CLW-1:0] pcol    = CLW'(cmd.a0[7:0]);
  wire [15:0]    mv_top  = mv_row[pcol];
  wire [15:0]    mv_tr   = (int'(cmd.a0[7:0]) + 1 < MB_COLS) ? mv_row[CLW'(int'(pcol) + 1)] : 16'd0;
  wire [15:0]    mv_lf   = cmd.a0[8] ? 16'd0 : mv_left;
  wire signed [7:0] pred_x = med3(mv_lf[7:0],  mv_top[7:0],  mv_tr[7:0]);
  wire signed [7:0] pred_y = med3(mv_lf[15:8], mv_top[15:8], mv_tr[15:8]);

  // ------------------------------------------------------- motion-vector cost
  // Length in bits of the se(v) Exp-Golomb code of a vector difference d:
  // k = 2|d| - (d > 0), length = 2*floor(log2(k+1)) + 1.
  function automatic logic [4:0] mvd_bits(input logic signed [8:0] d);
    logic [9:0] k1;
    logic [3:0] lg;
    k1 = (d > 0) ? 10'(2 * int'(d)) : 10'(-2 * int'(d) + 1);   // k + 1
    lg = '0;
    for (int i = 0; i < 10; i++) if (k1[i]) lg = 4'(i);
    return {lg, 1'b1};
  endfunction
  function automatic logic [15:0] mv_cost(input logic signed [7:0] x, input logic signed [7:0] y,
                                          input logic signed [7:0] px, input logic signed [7:0] py,
                                          input logic [7:0] lam);
    logic [5:0]  nb;
    logic [13:0] c;
    nb = 6'(mvd_bits(9'(x) - 9'(px))) + 6'(mvd_bits(9'(y) - 9'(py)));
    c  = 14'(nb) * 14'(lam);
    return 16'(c);
  endfunction
  wire [15:0] cand_mvc = mv_cost(mvx_q, mvy_q, pmvx, pmvy, lambda);
  wire [15:0] cmd_mvc  = mv_cost($signed(cmd.a0[7:0]), $signed(cmd.a0[15:8]), pmvx, pmvy, lambda);

  // ---------------------------------------------------------------- SAD datapath
  logic [7:0] ref_px [MB];
  logic [7:0] cur_row [MB];
  logic [9:0] sad4 [4];
  logic [3:0] prow;                       // row being accumulated (cnt-1)
  assign prow = 4'(cnt - 1'b1);
  always_comb begin
    for (int i = 0; i < MB; i++) begin
      ref_px[i]  = row_q[8*(int'(c0) + i) +: 8];
      cur_row[i] = cur_mb[prow][i];
    end
  end
  me_sad4x4 u_sad (.cur(cur_row), .ref_px(ref_px), .sad4(sad4));

  me_vbs_tree #(.SW(12)) u_tree (.sad4x4(acc), .cost(cost));

  always_comb
    for (int p = 0; p < 41; p++)
      cost_mv[p] = (17'(cost[p]) + 17'(cand_mvc) > 17'hFFFF) ? 16'hFFFF : cost[p] + cand_mvc;

  me_best_mv #(.CW(16), .NP(41)) u_best (
    .clk, .rst_n, .clear(clr), .upd(upd), .cost(cost_mv), .mvx(mvx_q), .mvy(mvy_q),
    .best_cost, .best_mv);

  // ---------------------------------------------------------------- 6-tap path
  logic signed [15:0] fx [4][6];
  logic signed [7:0]  fw [6];
  logic signed [26:0] fy [4];
  logic [7:0]         fpx [4];
  assign fw = '{8'sd1, -8'sd5, 8'sd20, 8'sd20, -8'sd5, 8'sd1};
  for (genvar i = 0; i < 4; i++) begin : g_f6
    always_comb
      for (int k = 0; k < 6; k++)
        fx[i][k] = 16'(row_q[8*(int'(c0) + i + k - 2) +: 8]);
    filter_6tap #(.DW(16), .CW(8)) u_f (.x(fx[i]), .w(fw), .shift(5'd5), .y(fy[i]));
    assign fpx[i] = (fy[i] < 0) ? 8'd0 : (fy[i] > 255) ? 8'd255 : 8'(fy[i]);
  end

  // ---------------------------------------------------------------- control
  assign cmd_ready = (state == S_IDLE);
  wire go = cmd_valid && cmd_ready;
  assign upd = (state == S_CMP);
  assign clr = go && (cmd.op == M_CLRBEST);

  always_ff @(posedge clk) begin
    if (go && cmd.op == M_LDREF)
      ref_mem[XW'(cmd.a0[7:0])][8*int'(cmd.a0[15:8]) +: 32] <=
        {cmd.a1[31:24], cmd.a1[23:16], cmd.a1[15:8], cmd.a1[7:0]};
    if (state == S_SAD && cnt < 5'd16) row_q <= ref_mem[r0 + XW'(cnt)];
    if (state == S_F6RD)               row_q <= ref_mem[r0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      r0        <= '0;
      c0        <= '0;
      mvx_q     <= '0;
      mvy_q     <= '0;
      pmvx      <= '0;
      pmvy      <= '0;
      lambda    <= '0;
      mv_left   <= '0;
      for (int i = 0; i < MB_COLS; i++) mv_row[i] <= '0;
      tag_q     <= '0;
      rsp_valid <= 1'b0;
      rsp_tag   <= '0;
      rsp_data  <= '0;
      for (int b = 0; b < 16; b++) acc[b] <= '0;
      for (int p = 0; p < 41; p++) last_cost[p] <= '0;
      for (int r = 0; r < MB; r++) for (int c = 0; c < MB; c++) cur_mb[r][c] <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (go) begin
          tag_q <= cmd_tag;
          rsp_tag <= cmd_tag;
          rsp_data <= '0;
          unique case (cmd.op)
            M_LDCUR: begin
              for (int i = 0; i < 4; i++)
                cur_mb[cmd.a0[7:4]][cmd.a0[3:0] + 4'(i)] <= cmd.a1[8*i +: 8];
              rsp_valid <= 1'b1;
            end
            M_SADCAND: begin
              mvx_q <= $signed(cmd.a0[7:0]);
              mvy_q <= $signed(cmd.a0[15:8]);
              r0    <= XW'(SR + int'($signed(cmd.a0[15:8])));
              c0    <= XW'(SR + int'($signed(cmd.a0[7:0])));
              cnt   <= '0;
              for (int b = 0; b < 16; b++) acc[b] <= '0;
              state <= S_SAD;
            end
            M_6TAB: begin
              r0 <= XW'(cmd.a0[7:0]);
              c0 <= XW'(cmd.a0[15:8]);
              state <= S_F6RD;
            end
            M_GETBEST: begin
              rsp_data  <= {best_mv[cmd.a0[5:0]], best_cost[cmd.a0[5:0]]};
              rsp_valid <= 1'b1;
            end
            M_SETPMV: begin
              pmvx      <= $signed(cmd.a0[7:0]);
              pmvy      <= $signed(cmd.a0[15:8]);
              lambda    <= cmd.a1[7:0];
              rsp_valid <= 1'b1;
            end
            M_STMV: begin
              mv_row[pcol] <= best_mv[40];
              mv_left      <= best_mv[40];
              rsp_data     <= {16'd0, best_mv[40]};
              rsp_valid    <= 1'b1;
            end
            M_PMV: begin
              pmvx      <= pred_x;
              pmvy      <= pred_y;
              rsp_data  <= {16'd0, pred_y, pred_x};
              rsp_valid <= 1'b1;
            end
            M_MVCE: begin
              rsp_data  <= {16'd0, cmd_mvc};
              rsp_valid <= 1'b1;
            end
            M_GETCOST: begin
              rsp_data  <= {16'd0, last_cost[cmd.a0[5:0]]};
              rsp_valid <= 1'b1;
            end
            default: rsp_valid <= 1'b1;   // M_LDREF, M_CLRBEST and unknown
          endcase
        end
        S_SAD: begin
          if (cnt != 0)
            for (int g = 0; g < 4; g++)
              acc[4*int'(prow[3:2]) + g] <= acc[4*int'(prow[3:2]) + g] + 12'(sad4[g]);
          cnt <= cnt + 1'b1;
          if (cnt == 5'd16) state <= S_CMP;
        end
        S_CMP: begin
          for (int p = 0; p < 41; p++) last_cost[p] <= cost_mv[p];
          rsp_data  <= {16'd0, cost_mv[40]};
          rsp_tag   <= tag_q;
          rsp_valid <= 1'b1;
          state     <= S_IDLE;
        end
        S_F6RD: state <= S_F6;
        S_F6: begin
          rsp_data  <= {fpx[3], fpx[2], fpx[1], fpx[0]};
          rsp_tag   <= tag_q;
          rsp_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
