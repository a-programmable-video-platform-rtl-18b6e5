// tb_data_network: self-checking test of the data network. Every cluster writes a
// distinct pattern to every other cluster's link (base = target PID * 2 KB), then
// every cluster reads each incoming link (base = source PID * 2 KB) and checks that
// it sees exactly what that source wrote for it, one cycle after the request.
module tb_data_network;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int N = 4, LB = 2048;
  logic rst_n;
  logic [N-1:0] wr_en, rd_en, rd_valid;
  logic [31:0] wr_addr[N], wr_data[N], rd_addr[N], rd_data[N];
  data_network #(.N_PE(N), .LINK_BYTES(LB)) dut (.*);

  function automatic logic [31:0] pat(input int s, input int d, input int i);
    return {4'(s), 4'(d), 24'(i * 13 + 5)};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; wr_en = 0; rd_en = 0;
    for (int p = 0; p < N; p++) begin wr_addr[p] = 0; wr_data[p] = 0; rd_addr[p] = 0; end
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int d = 0; d < N; d++)
      for (int i = 0; i < 64; i++) begin
        for (int s = 0; s < N; s++) begin
          wr_en[s] = 1;
          wr_addr[s] = 32'(((s + d + 1) % N) * LB + 4 * (i * 8));  // spread over the link
          wr_data[s] = pat(s, (s + d + 1) % N, i);
        end
        @(negedge clk);
      end
    wr_en = 0;
    for (int k = 1; k < N; k++)
      for (int i = 0; i < 64; i++) begin
        for (int d = 0; d < N; d++) begin
          rd_en[d] = 1; rd_addr[d] = 32'(((d + k) % N) * LB + 4 * (i * 8));
        end
        @(negedge clk);
        for (int d = 0; d < N; d++) begin
          chk(rd_valid[d], "rd_valid one cycle later");
          chk(rd_data[d] == pat((d + k) % N, d, i), $sformatf("link %0d->%0d word %0d", (d + k) % N, d, i));
        end
      end
    rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
