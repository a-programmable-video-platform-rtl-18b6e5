// tb_pe_cluster: self-checking test of one filtering PE cluster (default kind) with
// a behavioural context memory and core register files. Creates a thread and checks
// it is switched onto a core; all four cores then send interleaved accelerator
// commands (each loads and reads back its own sample registers, then one core runs
// a 6-tap filter) and every answer must reach the core that asked; a PUT through
// the HOSK must appear on the cluster's network port.
module tb_pe_cluster;
  import vp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int NC = 4, NP = 4, NF = 4;
  logic rst_n;
  logic [NC-1:0] h_cmd_valid, h_cmd_ready, h_rsp_valid, a_cmd_valid, a_cmd_ready, a_rsp_valid;
  hosk_cmd_t h_cmd [NC];
  acc_cmd_t a_cmd [NC];
  logic [31:0] h_rsp_data, a_rsp_data;
  logic h_rsp_ok;
  logic ctx_sw_valid, ctx_sw_new_valid;
  logic [1:0] ctx_sw_core;
  logic [3:0] ctx_sw_idx;
  logic [31:0] ctx_in_data, ctx_out_data [NC];
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic put_valid, put_ready, get_valid, get_avail;
  logic [1:0] put_pid, put_fid, get_pid, get_fid;
  logic [31:0] put_data, get_data;
  logic [NF-1:0] tx_full [NP], rx_empty [NP];
  logic [7:0] ready_vec;
  logic core_busy [NC];
  logic [2:0] core_tid [NC];
  pe_cluster dut (.*);
  ctx_mem_model #(.WORDS(1024), .LAT(2)) u_mem (.*);

  logic [31:0] regs [NC][16];
  always_comb for (int c = 0; c < NC; c++) ctx_out_data[c] = regs[c][ctx_sw_idx];
  always_ff @(posedge clk) if (ctx_sw_valid) regs[ctx_sw_core][ctx_sw_idx] <= ctx_in_data;

  // network port stub: always room, never data
  assign put_ready = 1'b1;
  assign get_avail = 1'b0;
  assign get_data  = '0;
  always_comb for (int p = 0; p < NP; p++) begin tx_full[p] = '0; rx_empty[p] = '1; end
  int puts = 0; logic [31:0] put_seen;
  always @(negedge clk) if (put_valid) begin puts++; put_seen = put_data; end

  logic [31:0] answers [NC][$];
  always @(negedge clk) for (int c = 0; c < NC; c++) if (a_rsp_valid[c]) answers[c].push_back(a_rsp_data);

  task automatic acall(input int core, input logic [7:0] op, input logic [31:0] a0, input logic [31:0] a1);
    a_cmd_valid[core] = 1; a_cmd[core] = '{op: op, a0: a0, a1: a1};
    #1;
    while (!a_cmd_ready[core]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 a_cmd_valid[core] = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; h_cmd_valid = 0; a_cmd_valid = 0;
    for (int c = 0; c < NC; c++) begin h_cmd[c] = '0; a_cmd[c] = '0; for (int i = 0; i < 16; i++) regs[c][i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    h_cmd_valid[2] = 1; h_cmd[2] = '{op: H_THREAD_CREATE, a0: 32'h7700, a1: 3};
    #1;
    while (!h_cmd_ready[2]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 h_cmd_valid[2] = 0;
    repeat (80) @(posedge clk);
    chk(core_busy[0] && regs[0][0] == 32'h7700, "thread switched into core 0");
    // four cores: interleaved register loads and reads
    @(negedge clk);
    fork
      for (int c = 0; c < NC; c++) begin
        automatic int cc = c;
        fork
          begin
            for (int i = 0; i < 4; i++) acall(cc, F_SETX, 4 * cc + i, 32'(cc * 10 + i));
            for (int i = 0; i < 4; i++) acall(cc, F_GETX, 4 * cc + i, 0);
          end
        join_none
      end
    join_none
    repeat (200) @(posedge clk);
    for (int c = 0; c < NC; c++) begin
      chk(answers[c].size() == 8, $sformatf("core %0d got its 8 answers (%0d)", c, answers[c].size()));
      for (int i = 0; i < 4; i++) chk(answers[c][4 + i] == 32'(c * 10 + i), "answer routed to its core");
    end
    // PUT through the HOSK
    h_cmd_valid[1] = 1; h_cmd[1] = '{op: H_PUT, a0: 32'b01_10, a1: 32'hABCD};
    #1;
    while (!h_cmd_ready[1]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 h_cmd_valid[1] = 0;
    chk(puts == 1 && put_seen == 32'hABCD, "PUT reaches the network port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
