// me_best_mv: best-cost / best-motion-vector registers for the 41 partitions.
//
// On upd, for every partition p whose new cost is strictly lower than the stored
// best, the cost and the candidate's motion vector are stored (ties keep the
// earlier candidate). clear sets all best costs to the maximum. All 41 compares
// happen in the same cycle, one candidate per update. Reset clears like clear.
module me_best_mv #(
  parameter int CW = 16,
  parameter int NP = 41
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 upd,
  input  logic [CW-1:0]        cost    [NP],
  input  logic signed [7:0]    mvx,
  input  logic signed [7:0]    mvy,
  output logic [CW-1:0]        best_cost [NP],
  output logic [15:0]          best_mv   [NP]    // {mvy, mvx}
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) begin best_cost[p] <= '1; best_mv[p] <= '0; end
    end else if (clear) begin
      for (int p = 0; p < NP; p++) begin best_cost[p] <= '1; best_mv[p] <= '0; end
    end else if (upd) begin
      for (int p = 0; p < NP; p++)
        if (cost[p] < best_cost[p]) begin
          best_cost[p] <= cost[p];
          best_mv[p]   <= {mvy, mvx};
        end
    end
  end
endmodule
