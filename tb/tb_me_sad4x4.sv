// tb_me_sad4x4: self-checking test of the row SAD unit: random rows, extreme
// values (0 vs 255), and identical rows, against an integer reference.
module tb_me_sad4x4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [7:0] cur [16], ref_px [16];
  logic [9:0] sad4 [4];
  me_sad4x4 dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < 16; k++) begin
        cur[k]    = (i == 0) ? 8'd0 : (i == 1) ? 8'(k * 9) : 8'($urandom);
        ref_px[k] = (i == 0) ? 8'd255 : (i == 1) ? 8'(k * 9) : 8'($urandom);
      end
      #1;
      for (int g = 0; g < 4; g++) begin
        automatic int s = 0;
        for (int j = 0; j < 4; j++) begin
          automatic int d = int'(cur[4*g+j]) - int'(ref_px[4*g+j]);
          s += (d < 0) ? -d : d;
        end
        chk(int'(sad4[g]) == s, $sformatf("group %0d", g));
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
