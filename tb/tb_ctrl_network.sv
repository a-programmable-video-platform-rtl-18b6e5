// tb_ctrl_network: self-checking test of the control network (4 clusters, 4 FIFOs
// per link). Every cluster PUTs tagged words to random (target, FID) links while
// every cluster GETs from random (source, FID) links; a per-link queue model checks
// that each word arrives at the right cluster, from the right source, on the right
// FIFO and in order, and that put_ready/get_avail and the status vectors match.
// Also repeats the worked example of the architecture: cluster 1 PUTs to (2, FID 3), cluster 2 GETs (1, 3).
module tb_ctrl_network;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int N = 4, NF = 4, D = 24;
  logic rst_n;
  logic [N-1:0] put_valid, put_ready, get_valid, get_avail;
  logic [1:0] put_pid[N], get_pid[N], put_fid[N], get_fid[N];
  logic [31:0] put_data[N], get_data[N];
  logic [NF-1:0] tx_full[N][N], rx_empty[N][N];
  ctrl_network #(.N_PE(N), .N_FID(NF), .W(32), .DEPTH(D)) dut (.*);

  logic [31:0] q[N][N][NF][$];
  int fulls = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; put_valid = 0; get_valid = 0;
    for (int p = 0; p < N; p++) begin
      put_pid[p] = 0; get_pid[p] = 0; put_fid[p] = 0; get_fid[p] = 0; put_data[p] = 0;
    end
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    // example link: PE1 -> PE2, FID 3
    put_pid[1] = 2; put_fid[1] = 3; put_data[1] = 32'hC0FFEE;
    chk(put_ready[1], "example link not full");
    put_valid[1] = 1; @(negedge clk); put_valid = 0;
    get_pid[2] = 1; get_fid[2] = 3; #1;
    chk(get_avail[2] && get_data[2] == 32'hC0FFEE, "example word visible at (1,3)");
    chk(!rx_empty[2][1][3] == 1'b1, "rx status shows data");
    get_valid[2] = 1; @(negedge clk); get_valid = 0;
    chk(rx_empty[2][1][3], "link empty after GET");
    // self link does not exist
    put_pid[0] = 0; #1; chk(!put_ready[0], "no self link");
    // random traffic
    for (int it = 0; it < 4000; it++) begin
      for (int p = 0; p < N; p++) begin
        put_pid[p] = 2'($urandom % N); put_fid[p] = 2'($urandom % NF);
        put_data[p] = {8'(p), 8'(put_pid[p]), 16'(it)};
        get_pid[p] = 2'($urandom % N); get_fid[p] = 2'($urandom % NF);
      end
      #1;
      for (int p = 0; p < N; p++) begin
        automatic int t = put_pid[p], f = put_fid[p], s = get_pid[p], g = get_fid[p];
        automatic bit exp_pr = (t != p) && (q[p][t][f].size() < D);
        automatic bit exp_ga = (s != p) && (q[s][p][g].size() > 0);
        chk(put_ready[p] == exp_pr, "put_ready");
        chk(get_avail[p] == exp_ga, "get_avail");
        if (exp_ga) chk(get_data[p] == q[s][p][g][0], $sformatf("data on link %0d->%0d fid %0d", s, p, g));
        if (t != p && !exp_pr) fulls++;
        put_valid[p] = ($urandom % 4 != 0) && exp_pr;   // bias towards filling
        get_valid[p] = ($urandom % 3 == 0) && exp_ga;
      end
      #1;
      for (int p = 0; p < N; p++) if (get_valid[p]) void'(q[get_pid[p]][p][get_fid[p]].pop_front());
      for (int p = 0; p < N; p++) if (put_valid[p]) q[p][put_pid[p]][put_fid[p]].push_back(put_data[p]);
      @(negedge clk);
      put_valid = 0; get_valid = 0;
    end
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) if (s != d)
      for (int f = 0; f < NF; f++) begin
        chk(tx_full[s][d][f] == (q[s][d][f].size() == D), "tx_full status");
        chk(rx_empty[d][s][f] == (q[s][d][f].size() == 0), "rx_empty status");
      end
    chk(fulls > 0, "some link reached full");
    $display("full links seen: %0d", fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
