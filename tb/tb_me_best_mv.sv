// tb_me_best_mv: self-checking test of the best-cost / best-MV registers. Feeds
// random candidates and keeps a reference minimum per partition (strictly lower
// wins), then checks clear.
module tb_me_best_mv;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic rst_n, clear, upd;
  logic [15:0] cost [41], best_cost [41], best_mv [41];
  logic signed [7:0] mvx, mvy;
  me_best_mv #(.CW(16), .NP(41)) dut (.*);

  int bc [41];
  logic [15:0] bm [41];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clear = 0; upd = 0; mvx = 0; mvy = 0;
    for (int p = 0; p < 41; p++) begin cost[p] = 0; bc[p] = 65535; bm[p] = 0; end
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      upd = ($urandom % 4 != 0);
      mvx = 8'($urandom); mvy = 8'($urandom);
      for (int p = 0; p < 41; p++) begin
        cost[p] = 16'($urandom % 3000);
        if (upd && cost[p] < bc[p]) begin bc[p] = cost[p]; bm[p] = {mvy, mvx}; end
      end
      @(negedge clk);
      for (int p = 0; p < 41; p++)
        chk(best_cost[p] == 16'(bc[p]) && best_mv[p] == bm[p], $sformatf("partition %0d", p));
    end
    upd = 0; clear = 1; @(negedge clk); clear = 0;
    for (int p = 0; p < 41; p++) chk(best_cost[p] == 16'hFFFF, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
