// tb_acc_cmd_queue: self-checking test of the per-core accelerator command queues.
// Four cores push tagged commands at random; a behavioural accelerator in the
// testbench accepts them with random back-pressure and answers a0+1 two cycles
// later. Checks that every core gets the answers to its own commands, in order,
// that a full queue refuses pushes, and that issue alternates between cores.
module tb_acc_cmd_queue;
  import vp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int NC = 4;
  logic rst_n;
  logic [NC-1:0] core_cmd_valid, core_cmd_ready, core_rsp_valid;
  acc_cmd_t core_cmd [NC];
  logic [31:0] core_rsp_data;
  logic acc_cmd_valid, acc_cmd_ready, acc_rsp_valid;
  acc_cmd_t acc_cmd;
  logic [1:0] acc_cmd_tag, acc_rsp_tag;
  logic [31:0] acc_rsp_data;
  acc_cmd_queue #(.N_CORES(NC), .DEPTH(4)) dut (.*);

  // behavioural accelerator: 2-cycle answer pipeline
  logic        p1_v, p2_v;
  logic [1:0]  p1_t, p2_t;
  logic [31:0] p1_d, p2_d;
  int sent [NC], got [NC], fulls = 0, switches = 0;
  int last_tag = -1;
  always_ff @(posedge clk) begin
    p1_v <= acc_cmd_valid && acc_cmd_ready;
    p1_t <= acc_cmd_tag;
    p1_d <= acc_cmd.a0 + 1;
    p2_v <= p1_v; p2_t <= p1_t; p2_d <= p1_d;
    if (acc_cmd_valid && acc_cmd_ready) begin
      if (last_tag != -1 && last_tag != int'(acc_cmd_tag)) switches++;
      last_tag = int'(acc_cmd_tag);
    end
  end
  assign acc_rsp_valid = p2_v;
  assign acc_rsp_tag   = p2_t;
  assign acc_rsp_data  = p2_d;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; core_cmd_valid = 0; acc_cmd_ready = 0; p1_v = 0; p2_v = 0;
    for (int c = 0; c < NC; c++) begin core_cmd[c] = '0; sent[c] = 0; got[c] = 0; end
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int it = 0; it < 3000; it++) begin
      acc_cmd_ready = (it < 100) ? 1'b0 : ($urandom % 3 != 0);
      for (int c = 0; c < NC; c++) begin
        core_cmd_valid[c] = (it < 3000 - 50) && ($urandom % 2 == 0);
        core_cmd[c] = '{op: 8'h1, a0: {8'(c), 24'(sent[c])}, a1: 0};
      end
      #1;
      for (int c = 0; c < NC; c++) begin
        if (core_cmd_valid[c] && !core_cmd_ready[c]) fulls++;
        if (core_cmd_valid[c] && core_cmd_ready[c]) sent[c]++;
      end
      for (int c = 0; c < NC; c++)
        if (core_rsp_valid[c]) begin
          chk(core_rsp_data == {8'(c), 24'(got[c])} + 1, $sformatf("core %0d answer %0d", c, got[c]));
          got[c]++;
        end
      @(negedge clk);
    end
    core_cmd_valid = 0;
    for (int c = 0; c < NC; c++) chk(sent[c] == got[c], $sformatf("core %0d all answered (%0d/%0d)", c, got[c], sent[c]));
    chk(fulls > 0, "queue-full back-pressure seen");
    chk(switches > 100, "issue alternates between cores");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
