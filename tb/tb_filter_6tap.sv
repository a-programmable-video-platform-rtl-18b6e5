// tb_filter_6tap: self-checking test of the 6-tap weighted-summation datapath.
// Checks the H.264 half-pel filter (1,-5,20,20,-5,1, shift 5) on known pixels and
// random samples/weights/shifts against an integer reference.
module tb_filter_6tap;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic signed [15:0] x [6];
  logic signed [7:0]  w [6];
  logic [4:0]         shift;
  logic signed [26:0] y;
  filter_6tap #(.DW(16), .CW(8)) dut (.*);

  function automatic longint ref_y(input int sh);
    longint s = 0;
    for (int k = 0; k < 6; k++) s += longint'(x[k]) * longint'(w[k]);
    if (sh > 0) s += (longint'(1) << (sh - 1));
    return s >>> sh;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w = '{8'sd1, -8'sd5, 8'sd20, 8'sd20, -8'sd5, 8'sd1};
    x = '{16'sd10, 16'sd20, 16'sd30, 16'sd40, 16'sd50, 16'sd60};
    shift = 5;
    #1;
    // 10-100+600+800-250+60 = 1120; (1120+16)>>5 = 35
    chk(y == 35, $sformatf("half-pel example got %0d", y));
    for (int i = 0; i < 3000; i++) begin
      for (int k = 0; k < 6; k++) begin x[k] = 16'($urandom); w[k] = 8'($urandom); end
      shift = 5'($urandom % 16);
      #1;
      chk(longint'(y) == ref_y(shift), "random weighted sum");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
