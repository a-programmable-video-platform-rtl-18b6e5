// tb_workload_mapping: the kernel side of three 720p 30 fps application mappings on
// the full-size platform (no parameter override).
//
// For the H.264/AVC decoder, the H.264/AVC encoder and the VC-1 decoder, each of the
// four tasks is mapped to its cluster (PARSING -> PID 0, ITQ/INTRA or TQ/ITQ/INTRA ->
// PID 2, INTER or ME/INTER -> PID 1, DEBLOCK -> PID 3) with the number of active
// cores and threads of the published mapping. Each task then runs one macroblock
// of kernel activity with as many context switches as the mapping reports: a
// running thread waits on a semaphore (it is switched out and a ready thread in)
// and is posted again. Checked per task and application:
//   - every thread is created, min(cores, threads) cores run and the rest are ready;
//   - the context bus shows exactly one swap per dispatch and per switch, and each
//     swap holds its core for 16 cycles;
//   - the switching time per macroblock, divided by the active cores, stays below
//     10 % of the 1851-cycle macroblock budget (200 MHz / (3600 MBs x 30 fps)).
module tb_workload_mapping;
  import vp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int NP = 4, NC = 4, BUDGET = 1851;

  logic rst_n;
  logic [NC-1:0] h_cmd_valid [NP], h_cmd_ready [NP], h_rsp_valid [NP];
  hosk_cmd_t     h_cmd [NP][NC];
  logic [31:0]   h_rsp_data [NP];
  logic          h_rsp_ok [NP];
  logic [NC-1:0] a_cmd_valid [NP], a_cmd_ready [NP], a_rsp_valid [NP];
  acc_cmd_t      a_cmd [NP][NC];
  logic [31:0]   a_rsp_data [NP];
  logic          ctx_sw_valid [NP], ctx_sw_new_valid [NP];
  logic [1:0]    ctx_sw_core [NP];
  logic [3:0]    ctx_sw_idx [NP];
  logic [31:0]   ctx_in_data [NP], ctx_out_data [NP][NC];
  logic          mem_req [NP], mem_we [NP], mem_gnt [NP], mem_rvalid [NP];
  logic [31:0]   mem_addr [NP], mem_wdata [NP], mem_rdata [NP];
  logic [NP-1:0] dn_wr_en, dn_rd_en, dn_rd_valid;
  logic [31:0]   dn_wr_addr [NP], dn_wr_data [NP], dn_rd_addr [NP], dn_rd_data [NP];
  logic [7:0]    ready_vec [NP];
  logic          core_busy [NP][NC];
  logic [2:0]    core_tid [NP][NC];

  video_platform dut (.*);

  for (genvar p = 0; p < NP; p++) begin : g_mem
    ctx_mem_model #(.WORDS(1024), .LAT(2)) u_mem (
      .clk, .mem_req(mem_req[p]), .mem_we(mem_we[p]), .mem_addr(mem_addr[p]),
      .mem_wdata(mem_wdata[p]), .mem_gnt(mem_gnt[p]), .mem_rvalid(mem_rvalid[p]),
      .mem_rdata(mem_rdata[p]));
  end
  for (genvar p = 0; p < NP; p++) begin : g_core
    for (genvar c = 0; c < NC; c++) begin : g_c
      assign ctx_out_data[p][c] = 32'(p * 256 + c * 16) + 32'(ctx_sw_idx[p]);
    end
  end

  // swaps and the cycles each one holds its core
  int n_swap [NP], held [NP], run [NP], bad_run = 0;
  always_ff @(posedge clk) for (int p = 0; p < NP; p++) begin
    if (!rst_n) begin
      n_swap[p] <= 0; held[p] <= 0; run[p] <= 0;
    end else if (ctx_sw_valid[p]) begin
      held[p] <= held[p] + 1;
      run[p]  <= run[p] + 1;
      if (ctx_sw_idx[p] == 4'd15) n_swap[p] <= n_swap[p] + 1;
    end else begin
      if (run[p] != 0 && run[p] != 16) bad_run <= bad_run + 1;
      run[p] <= 0;
    end
  end

  task automatic hcall(input int p, input int c, input hosk_op_t o, input logic [31:0] a0,
                       input logic [31:0] a1, output logic [31:0] r, output logic ok);
    h_cmd_valid[p][c] = 1; h_cmd[p][c] = '{op: o, a0: a0, a1: a1};
    #1;
    while (!h_cmd_ready[p][c]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 h_cmd_valid[p][c] = 0;
    r = h_rsp_data[p]; ok = h_rsp_ok[p];
  endtask

  // published mappings: active cores, threads, context switches per macroblock,
  // tasks in the order PARSING, ITQ(/INTRA), INTER, DEBLOCK
  string app_name [3] = '{"H.264/AVC decoder", "H.264/AVC encoder", "VC-1 decoder"};
  int cores [3][4]   = '{'{2, 1, 1, 1}, '{2, 3, 3, 2}, '{2, 2, 1, 2}};
  int threads [3][4] = '{'{4, 3, 1, 2}, '{3, 6, 5, 3}, '{3, 2, 1, 4}};
  int switches [3][4] = '{'{2, 7, 0, 6}, '{2, 13, 4, 6}, '{2, 0, 0, 5}};
  int pid_of [4] = '{0, 2, 1, 3};

  task automatic run_task(input int app, input int t);
    automatic int p = pid_of[t];
    automatic int nc = cores[app][t], nt = threads[app][t], ns = switches[app][t];
    automatic int held0, swap0, busy = 0;
    logic [31:0] r; logic ok;
    hcall(p, 0, H_SET_ACTIVE, nc, 0, r, ok);
    for (int k = 0; k < nt; k++) begin
      hcall(p, 0, H_THREAD_CREATE, 32'h100 * (k + 1), 1, r, ok);
      chk(ok && r == 32'(k), $sformatf("%s task %0d: thread %0d created", app_name[app], t, k));
    end
    hcall(p, 0, H_SEM_INIT, 0, 0, r, ok);
    repeat (100 + 60 * nt) @(posedge clk); #1;
    for (int c = 0; c < NC; c++) busy += int'(core_busy[p][c]);
    chk(busy == ((nc < nt) ? nc : nt), $sformatf("%s task %0d: %0d cores busy", app_name[app], t, busy));
    chk($countones(ready_vec[p]) == nt - busy, "the other threads are ready");
    chk(n_swap[p] == busy, $sformatf("%s task %0d: one swap per dispatch (%0d swaps, %0d busy)", app_name[app], t, n_swap[p], busy));
    held0 = held[p]; swap0 = n_swap[p];
    // one macroblock: ns context switches
    for (int k = 0; k < ns; k++) begin
      automatic int c = k % nc;
      hcall(p, c, H_SEM_WAIT, 0, 0, r, ok);
      chk(r == 0, "the waiting thread blocks");
      repeat (60) @(posedge clk); #1;
      hcall(p, c, H_SEM_POST, 0, 0, r, ok);
      repeat (4) @(posedge clk); #1;
    end
    chk(n_swap[p] - swap0 == ns, $sformatf("%s task %0d: %0d switches for %0d", app_name[app], t, n_swap[p] - swap0, ns));
    chk(held[p] - held0 == 16 * ns, "16 cycles per switch");
    chk((held[p] - held0) * 100 < 10 * BUDGET * nc,
        $sformatf("%s task %0d: switching %0d cycles per MB on %0d cores", app_name[app], t, held[p] - held0, nc));
    $display("%s task %0d (PID %0d): %0d cores, %0d threads, %0d switches, %0d cycles held (%0d.%0d %% of budget per core)",
             app_name[app], t, p, nc, nt, ns, held[p] - held0,
             (held[p] - held0) * 100 / (BUDGET * nc), ((held[p] - held0) * 1000 / (BUDGET * nc)) % 10);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dn_wr_en = 0; dn_rd_en = 0;
    for (int p = 0; p < NP; p++) begin
      h_cmd_valid[p] = 0; a_cmd_valid[p] = 0;
      dn_wr_addr[p] = 0; dn_wr_data[p] = 0; dn_rd_addr[p] = 0;
      for (int c = 0; c < NC; c++) begin h_cmd[p][c] = '0; a_cmd[p][c] = '0; end
    end
    for (int app = 0; app < 3; app++) begin
      rst_n = 0;
      repeat (3) @(posedge clk); rst_n = 1;
      @(posedge clk); #1;
      fork
        run_task(app, 0);
        run_task(app, 1);
        run_task(app, 2);
        run_task(app, 3);
      join
    end
    chk(bad_run == 0, "every swap held its core exactly 16 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
