// tb_ctrl_fifo: self-checking test of one control-network FIFO (32 x 24).
// Fills it to full, checks that a push when full is not taken, drains it in order,
// then runs random push/pop traffic against a queue reference model.
module tb_ctrl_fifo;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic rst_n, wr_en, rd_en, full, empty;
  logic [31:0] wr_data, rd_data;
  logic [4:0] count;
  ctrl_fifo #(.W(32), .DEPTH(24)) dut (.*);

  logic [31:0] model[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(empty && !full && count == 0, "empty after reset");
    // fill
    for (int i = 0; i < 24; i++) begin
      wr_en = 1; wr_data = 32'hA000_0000 + i;
      model.push_back(wr_data);
      @(negedge clk);
    end
    wr_en = 0;
    chk(full && count == 24, "full after 24 pushes");
    chk(rd_data == 32'hA000_0000, "head word after fill");
    // drain
    for (int i = 0; i < 24; i++) begin
      chk(rd_data == model.pop_front(), $sformatf("drain order %0d", i));
      rd_en = 1; @(negedge clk); rd_en = 0;
    end
    chk(empty, "empty after drain");
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      wr_en = ($urandom % 2) && !full;
      rd_en = ($urandom % 2) && !empty;
      wr_data = $urandom;
      if (rd_en) chk(rd_data == model[0], "random read data");
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      @(negedge clk);
      chk(count == model.size(), "count tracks model");
      chk(full == (model.size() == 24) && empty == (model.size() == 0), "flags track model");
    end
    wr_en = 0; rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
