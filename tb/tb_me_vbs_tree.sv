// tb_me_vbs_tree: self-checking test of the 41-partition adder tree. For random
// 4x4 SADs, computes every partition's cost geometrically (sum of the 4x4 blocks
// it covers) and compares with the tree's output order.
module tb_me_vbs_tree;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [11:0] sad4x4 [16];
  logic [15:0] cost [41];
  me_vbs_tree #(.SW(12)) dut (.*);

  // sum of 4x4 blocks in rows r0..r0+h-1, cols c0..c0+w-1 (in 4x4 units)
  function automatic int area(input int r0, input int c0, input int h, input int w);
    int s = 0;
    for (int r = r0; r < r0 + h; r++) for (int c = c0; c < c0 + w; c++) s += sad4x4[4*r + c];
    return s;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int b = 0; b < 16; b++) sad4x4[b] = (i == 0) ? 12'd4080 : 12'($urandom % 4081);
      #1;
      for (int b = 0; b < 16; b++) chk(cost[b] == area(b / 4, b % 4, 1, 1), "4x4");
      for (int r = 0; r < 4; r++) for (int h = 0; h < 2; h++)
        chk(cost[16 + 2*r + h] == area(r, 2*h, 1, 2), "8x4");
      for (int rr = 0; rr < 2; rr++) for (int c = 0; c < 4; c++)
        chk(cost[24 + 4*rr + c] == area(2*rr, c, 2, 1), "4x8");
      for (int q = 0; q < 4; q++) chk(cost[32 + q] == area(2*(q/2), 2*(q%2), 2, 2), "8x8");
      chk(cost[36] == area(0, 0, 2, 4) && cost[37] == area(2, 0, 2, 4), "16x8");
      chk(cost[38] == area(0, 0, 4, 2) && cost[39] == area(0, 2, 4, 2), "8x16");
      chk(cost[40] == area(0, 0, 4, 4), "16x16");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
