// tb_hosk: self-checking test of the hardware OS kernel of one cluster, with a
// behavioural context memory, behavioural core register files on the context bus
// and a two-cluster control network (the HOSK is cluster 0, the testbench drives
// cluster 1). Checks kernel calls on the command bus (create, dispatch through the
// context bus, semaphore blocking and wake-up), PUT/GET/STATUS through the network
// including the non-blocking failure on an empty FIFO, and that simultaneous
// commands from all cores are served round robin with one answer each. Ends with
// random PUT/GET/STATUS traffic from random cores checked against queue models.
module tb_hosk;
  import vp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int NC = 4, NP = 2, NF = 4;
  logic rst_n;
  logic [NC-1:0] cmd_valid, cmd_ready, rsp_valid;
  hosk_cmd_t cmd [NC];
  logic [31:0] rsp_data;
  logic rsp_ok;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic ctx_sw_valid, ctx_sw_new_valid;
  logic [1:0] ctx_sw_core;
  logic [3:0] ctx_sw_idx;
  logic [31:0] ctx_in_data, ctx_out_data [NC];
  logic [7:0] ready_vec;
  logic core_busy [NC];
  logic [2:0] core_tid [NC];
  // network
  logic [NP-1:0] put_valid, put_ready, get_valid, get_avail;
  logic [0:0] put_pid [NP], get_pid [NP];
  logic [1:0] put_fid [NP], get_fid [NP];
  logic [31:0] put_data [NP], get_data [NP];
  logic [NF-1:0] tx_full [NP][NP], rx_empty [NP][NP];

  hosk #(.N_CORES(NC), .MAX_THREADS(8), .N_SEM(8), .N_PE(NP), .N_FID(NF)) dut (
    .clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .rsp_valid, .rsp_data, .rsp_ok,
    .put_valid(put_valid[0]), .put_pid(put_pid[0]), .put_fid(put_fid[0]), .put_data(put_data[0]),
    .put_ready(put_ready[0]), .get_valid(get_valid[0]), .get_pid(get_pid[0]), .get_fid(get_fid[0]),
    .get_data(get_data[0]), .get_avail(get_avail[0]), .tx_full(tx_full[0]), .rx_empty(rx_empty[0]),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .ctx_sw_valid, .ctx_sw_core, .ctx_sw_idx, .ctx_sw_new_valid, .ctx_in_data, .ctx_out_data,
    .ready_vec, .core_busy, .core_tid);
  ctrl_network #(.N_PE(NP), .N_FID(NF), .W(32), .DEPTH(24)) u_net (.*);
  ctx_mem_model #(.WORDS(1024), .LAT(2)) u_mem (.*);

  logic [31:0] regs [NC][16];
  always_comb for (int c = 0; c < NC; c++) ctx_out_data[c] = regs[c][ctx_sw_idx];
  always_ff @(posedge clk) if (ctx_sw_valid) regs[ctx_sw_core][ctx_sw_idx] <= ctx_in_data;

  logic [31:0] r; logic ok;
  task automatic call(input int core, input hosk_op_t o, input logic [31:0] a0, input logic [31:0] a1);
    @(negedge clk);
    cmd_valid[core] = 1; cmd[core] = '{op: o, a0: a0, a1: a1};
    #1;
    while (!cmd_ready[core]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 cmd_valid[core] = 0;
    chk(rsp_valid[core], "answer one cycle after acceptance");
    r = rsp_data; ok = rsp_ok;
  endtask
  task automatic settle(); repeat (80) @(posedge clk); endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; cmd_valid = 0;
    for (int c = 0; c < NC; c++) begin cmd[c] = '0; for (int i = 0; i < 16; i++) regs[c][i] = 0; end
    put_valid[1] = 0; get_valid[1] = 0; put_pid[1] = 0; get_pid[1] = 0;
    put_fid[1] = 0; get_fid[1] = 0; put_data[1] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // boot: two threads, only one core active
    call(0, H_SET_ACTIVE, 1, 0);
    call(0, H_THREAD_CREATE, 32'h0000_4000, 2); chk(ok && r == 0, "create t0");
    call(0, H_THREAD_CREATE, 32'h0000_5000, 1); chk(ok && r == 1, "create t1");
    settle();
    chk(core_busy[0] && core_tid[0] == 0 && regs[0][0] == 32'h4000, "t0 switched into core 0 with its PC");
    chk(!core_busy[1], "inactive core stays idle");
    // t0 blocks on semaphore 2 -> t1 runs on core 0
    call(0, H_SEM_INIT, 2, 0);
    call(0, H_SEM_WAIT, 2, 0); chk(r == 0, "t0 blocks");
    settle();
    chk(core_tid[0] == 1 && regs[0][0] == 32'h5000, "t1 switched in after t0 blocked");
    call(0, H_SEM_POST, 2, 0);
    settle();
    chk(core_tid[0] == 0 && regs[0][0] == 32'h4000, "post wakes t0, which preempts t1");
    // control transfer: PUT to (PID 1, FID 2)
    call(0, H_PUT, {29'd0, 1'b1, 2'd2}, 32'h1234_5678); chk(ok, "PUT accepted");
    get_pid[1] = 0; get_fid[1] = 2; #1;
    chk(get_avail[1] && get_data[1] == 32'h1234_5678, "word arrives at cluster 1 (0,2)");
    @(negedge clk); get_valid[1] = 1; @(negedge clk); get_valid[1] = 0;
    call(0, H_GET, {29'd0, 1'b1, 2'd1}, 0); chk(!ok, "GET on empty link fails without blocking");
    call(0, H_STATUS, {29'd0, 1'b1, 2'd1}, 0); chk(r == 32'd1, "status: not full, empty");
    @(negedge clk); put_pid[1] = 0; put_fid[1] = 1; put_data[1] = 32'hBEEF; put_valid[1] = 1;
    @(negedge clk); put_valid[1] = 0;
    call(0, H_GET, {29'd0, 1'b1, 2'd1}, 0); chk(ok && r == 32'hBEEF, "GET returns the word");
    // simultaneous commands from all four cores
    @(negedge clk);
    for (int c = 0; c < NC; c++) begin cmd_valid[c] = 1; cmd[c] = '{op: H_STATUS, a0: 32'(c), a1: 0}; end
    begin
      int served [NC];
      int order [$];
      for (int c = 0; c < NC; c++) served[c] = 0;
      for (int k = 0; k < 12 && cmd_valid != 0; k++) begin
        @(posedge clk); #1;
        for (int c = 0; c < NC; c++) if (cmd_ready[c] || rsp_valid[c]) ;
        for (int c = 0; c < NC; c++) if (rsp_valid[c]) begin served[c]++; order.push_back(c); cmd_valid[c] = 0; end
      end
      @(posedge clk); #1;
      for (int c = 0; c < NC; c++) if (rsp_valid[c]) begin served[c]++; order.push_back(c); end
      for (int c = 0; c < NC; c++) chk(served[c] == 1, $sformatf("core %0d served once", c));
    end
    cmd_valid = 0;
    // random control traffic from random cores against per-FIFO queue models;
    // cluster 1 (the testbench) drains and fills the other direction at random
    begin
      int q01 [NF][$], q10 [NF][$];
      for (int k = 0; k < 600; k++) begin
        automatic int c = $urandom % NC, f = $urandom % NF, kind = $urandom % 5;
        automatic logic [31:0] d = $urandom;
        if (kind <= 1) begin
          call(c, H_PUT, {29'd0, 1'b1, 2'(f)}, d);
          chk(ok == (q01[f].size() < 24), $sformatf("PUT %0d ok flag (fill %0d)", k, q01[f].size()));
          if (ok) q01[f].push_back(d);
        end else if (kind == 2) begin
          call(c, H_GET, {29'd0, 1'b1, 2'(f)}, 0);
          chk(ok == (q10[f].size() > 0), $sformatf("GET %0d ok flag", k));
          if (ok) chk(r == q10[f].pop_front(), $sformatf("GET %0d data", k));
        end else if (kind == 3) begin
          call(c, H_STATUS, {29'd0, 1'b1, 2'(f)}, 0);
          chk(r == {30'd0, q01[f].size() == 24, q10[f].size() == 0}, $sformatf("STATUS %0d", k));
        end else begin
          // cluster 1 side: pop one word from 0->1 and push one into 1->0
          @(negedge clk);
          get_pid[1] = 0; get_fid[1] = 2'(f); put_pid[1] = 0; put_fid[1] = 2'(f); put_data[1] = d;
          #1;
          chk(get_avail[1] == (q01[f].size() > 0), "cluster 1 sees the 0->1 fill");
          if (get_avail[1]) chk(get_data[1] == q01[f][0], "cluster 1 head word");
          get_valid[1] = get_avail[1];
          put_valid[1] = put_ready[1];
          @(negedge clk);
          if (get_valid[1]) void'(q01[f].pop_front());
          if (put_valid[1]) q10[f].push_back(d);
          get_valid[1] = 0; put_valid[1] = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
