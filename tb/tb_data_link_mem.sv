// tb_data_link_mem: self-checking test of one 2 KB data-link memory. Writes region 0,
// reads it back while writing region 1 (double buffering), checks one-cycle read
// latency and that the regions do not overlap.
module tb_data_link_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic wr_en;
  logic [8:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  data_link_mem #(.BYTES(2048), .W(32)) dut (.*);

  function automatic logic [31:0] pat(input int region, input int i);
    return {8'(region + 1), 8'hD5, 16'(i * 7 + 3)};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      wr_en = 1; wr_addr = 9'(i); wr_data = pat(0, i); @(negedge clk);
    end
    // producer fills region 1 while consumer drains region 0
    for (int i = 0; i < 256; i++) begin
      wr_en = 1; wr_addr = 9'(256 + i); wr_data = pat(1, i);
      rd_addr = 9'(i);
      @(negedge clk);
      chk(rd_data == pat(0, i), $sformatf("region 0 word %0d", i));
    end
    wr_en = 0;
    for (int i = 0; i < 256; i++) begin
      rd_addr = 9'(256 + i); @(negedge clk);
      chk(rd_data == pat(1, i), $sformatf("region 1 word %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
