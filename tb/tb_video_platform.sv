// tb_video_platform: end-to-end test of the whole platform at its default sizes.
//
// Behavioural RISC cores (testbench tasks), one behavioural context memory per
// cluster and core register files on the context buses drive a small macroblock
// pipeline through all four clusters:
//   PID 0 parsing  : boots threads, parses NMB macroblocks (a table-matched header
//                    and Exp-Golomb coded coefficients) with its accelerator, writes them to the data link
//                    0->2 (alternating double-buffer regions) and PUTs a sync word;
//                    also drains a control FIFO that the ME cluster filled to full.
//   PID 1 ME/MC    : loads the full 144x144 search window and a macroblock, runs a
//                    small gradient search of candidates with its accelerator, checks
//                    the best vector and PUTs it to PID 3; fills link 1->0 FID 3 until
//                    a PUT is refused (FIFO full).
//   PID 2 filtering: GETs each sync (polling while the FIFO is empty), READs the
//                    coefficients, applies the 4-point integer transform with the
//                    filter accelerator, WRITEs the result to link 2->3, PUTs a sync.
//                    Its threads also block on and are woken by a semaphore.
//   PID 3 filtering: GETs syncs, READs the data, runs the 6-tap filter and checks
//                    every output against a reference computed here.
// Every mechanism is counted (context switches, preemption, semaphore block/wake,
// PUT, GET, empty-FIFO poll, full-FIFO refusal, both buffer regions, data-network
// writes/reads, each accelerator) and one that never happened is a failure.
module tb_video_platform;
  import vp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int NP = 4, NC = 4, SR = 64, WIN = 16 + 2*SR, LB = 2048, NMB = 4;

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

  // core register files on the context buses; count switches
  logic [31:0] regs [NP][NC][16];
  int n_switch = 0, sw_run [NP] = '{0, 0, 0, 0}, sw_max = 0;
  always_comb for (int p = 0; p < NP; p++) for (int c = 0; c < NC; c++)
    ctx_out_data[p][c] = regs[p][c][ctx_sw_idx[p]];
  // the core is held only while words move on its context bus: measure the runs
  always_ff @(posedge clk) for (int p = 0; p < NP; p++) begin
    if (ctx_sw_valid[p]) begin
      regs[p][ctx_sw_core[p]][ctx_sw_idx[p]] <= ctx_in_data[p];
      if (ctx_sw_idx[p] == 4'd15) n_switch++;
      sw_run[p] <= sw_run[p] + 1;
      if (sw_run[p] + 1 > sw_max) sw_max <= sw_run[p] + 1;
    end else sw_run[p] <= 0;
  end

  // mechanism counters
  int n_preempt = 0, n_block = 0, n_wake = 0, n_put = 0, n_get = 0, n_get_empty = 0;
  int n_put_full = 0, n_region [2] = '{0, 0}, n_dwr = 0, n_drd = 0;
  int n_parse = 0, n_me = 0, n_filt = 0, n_vlc = 0;
  bit me_full = 0;

  // ------------------------------------------------------------ core-side tasks
  task automatic hcall(input int p, input int c, input hosk_op_t o, input logic [31:0] a0,
                       input logic [31:0] a1, output logic [31:0] r, output logic ok);
    h_cmd_valid[p][c] = 1; h_cmd[p][c] = '{op: o, a0: a0, a1: a1};
    #1;
    while (!h_cmd_ready[p][c]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 h_cmd_valid[p][c] = 0;
    r = h_rsp_data[p]; ok = h_rsp_ok[p];
    if (!h_rsp_valid[p][c]) begin failures++; $display("FAIL: no HOSK answer"); end
  endtask

  task automatic acall(input int p, input int c, input logic [7:0] op, input logic [31:0] a0,
                       input logic [31:0] a1, output logic [31:0] r);
    a_cmd_valid[p][c] = 1; a_cmd[p][c] = '{op: op, a0: a0, a1: a1};
    #1;
    while (!a_cmd_ready[p][c]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 a_cmd_valid[p][c] = 0;
    while (!a_rsp_valid[p][c]) begin @(posedge clk); #1; end
    r = a_rsp_data[p];
  endtask

  task automatic dwrite(input int p, input int addr, input logic [31:0] d);
    dn_wr_en[p] = 1; dn_wr_addr[p] = 32'(addr); dn_wr_data[p] = d;
    @(posedge clk); #1 dn_wr_en[p] = 0;
    n_dwr++;
  endtask

  task automatic dread(input int p, input int addr, output logic [31:0] d);
    dn_rd_en[p] = 1; dn_rd_addr[p] = 32'(addr);
    @(posedge clk); #1 dn_rd_en[p] = 0;
    d = dn_rd_data[p];
    n_drd++;
  endtask

  task automatic put(input int p, input int c, input int pid, input int fid, input logic [31:0] d);
    logic [31:0] r; logic ok;
    do begin
      hcall(p, c, H_PUT, 32'(pid * 4 + fid), d, r, ok);
      if (!ok) n_put_full++;
    end while (!ok);
    n_put++;
  endtask

  task automatic get(input int p, input int c, input int pid, input int fid, output logic [31:0] d);
    logic ok;
    forever begin
      hcall(p, c, H_GET, 32'(pid * 4 + fid), 0, d, ok);
      if (ok) break;
      n_get_empty++;
      repeat (3) @(posedge clk); #1;
    end
    n_get++;
  endtask

  // ------------------------------------------------------------ reference data
  int coef [NMB][16];
  int tm [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
  int hp [6] = '{1, -5, 20, 20, -5, 1};
  bit bits [$];
  int hdr_len [4] = '{1, 2, 3, 3};
  logic [2:0] hdr_code [4] = '{3'b1, 3'b01, 3'b001, 3'b000};
  function automatic int pix(input int r, input int c);
    // a smooth bowl, so that the SAD surface has one minimum
    return ((r - 70) * (r - 70) + (c - 75) * (c - 75)) / 45;
  endfunction
  task automatic put_ue(input int k);
    automatic longint v = longint'(k) + 1;
    automatic int len = 0;
    while ((v >> len) > 1) len++;
    for (int i = 0; i < len; i++) bits.push_back(1'b0);
    for (int i = len; i >= 0; i--) bits.push_back(v[i]);
  endtask

  // ------------------------------------------------------------ cluster programs
  task automatic boot(input int p);
    logic [31:0] r; logic ok;
    hcall(p, 0, H_SET_ACTIVE, 1, 0, r, ok);
    hcall(p, 0, H_THREAD_CREATE, 32'h1000 * (p + 1), 1, r, ok);
    chk(ok, "thread create");
    repeat (60) @(posedge clk); #1;
    hcall(p, 0, H_THREAD_CREATE, 32'h1000 * (p + 1) + 32'h100, 4, r, ok);
    repeat (80) @(posedge clk); #1;
    // the priority-4 thread must have preempted the first one on core 0
    if (core_tid[p][0] == 3'(r) && ready_vec[p] == 8'b1) n_preempt++;
    chk(regs[p][0][0] == 32'h1000 * (p + 1) + 32'h100, "higher-priority thread's PC on core 0");
    hcall(p, 0, H_SET_ACTIVE, 2, 0, r, ok);
    repeat (80) @(posedge clk); #1;
    chk(core_busy[p][1] && regs[p][1][0] == 32'h1000 * (p + 1), "second core gets the other thread");
  endtask

  task automatic parse_prog();
    logic [31:0] r, w;
    int pos = 0;
    for (int k = 0; k < 4; k++)
      acall(0, 0, P_VTLOAD, 32'(k) | 32'(hdr_len[k] << 16), {16'(50 + k), 13'd0, hdr_code[k]}, r);
    acall(0, 0, P_LEVEL, 0, 0, r);
    for (int mb = 0; mb < NMB; mb++) begin
      automatic int region = mb % 2;
      if (mb >= 2) get(0, 0, 2, 1, r);   // region released by the consumer
      for (int i = -1; i < 16; i++) begin
        // keep at least 32 bits buffered
        acall(0, 0, P_LEVEL, 0, 0, r);
        while (r <= 32 && pos < bits.size()) begin
          w = '0;
          for (int b = 0; b < 32; b++) w[31 - b] = (pos + b < bits.size()) ? bits[pos + b] : 1'b0;
          pos += 32;
          acall(0, 0, P_PUSH, 0, w, r);
          acall(0, 0, P_LEVEL, 0, 0, r);
        end
        if (i < 0) begin
          acall(0, 0, P_VTMATCH, 0, 0, r);
          n_vlc++;
          chk(r == {11'd0, 5'(hdr_len[mb % 4]), 16'(50 + mb % 4)}, "macroblock header decoded by table match");
          continue;
        end
        acall(0, 0, P_EXPBITOP, 1, 0, r);
        n_parse++;
        chk($signed(r) == coef[mb][i], $sformatf("parsed coefficient mb %0d #%0d", mb, i));
        dwrite(0, 2 * LB + region * (LB / 2) + 4 * i, r);
      end
      n_region[region]++;
      put(0, 0, 2, 0, {16'(mb), 16'(region)});
    end
    // drain the FIFO the ME cluster filled
    wait (me_full);
    for (int k = 0; k < 25; k++) begin
      get(0, 1, 1, 3, r);
      chk(r == 32'(k), "full-FIFO burst arrives in order");
    end
  endtask

  task automatic me_prog();
    logic [31:0] r;
    logic ok;
    int bx = 0, by = 0, best;
    localparam int TX = 3, TY = -2;
    for (int rr = 0; rr < WIN; rr++)
      for (int c = 0; c < WIN; c += 4)
        acall(1, 2, M_LDREF, 32'(rr) | 32'(c << 8),
              {8'(pix(rr, c+3)), 8'(pix(rr, c+2)), 8'(pix(rr, c+1)), 8'(pix(rr, c))}, r);
    for (int rr = 0; rr < 16; rr++)
      for (int c = 0; c < 16; c += 4)
        acall(1, 2, M_LDCUR, 32'(rr * 16 + c),
              {8'(pix(SR+TY+rr, SR+TX+c+3)), 8'(pix(SR+TY+rr, SR+TX+c+2)),
               8'(pix(SR+TY+rr, SR+TX+c+1)), 8'(pix(SR+TY+rr, SR+TX+c))}, r);
    acall(1, 2, M_CLRBEST, 0, 0, r);
    // small gradient-descent style search run by the "core"
    acall(1, 2, M_SADCAND, 0, 0, r); best = int'(r); n_me++;
    for (int step = 0; step < 8 && best != 0; step++) begin
      automatic int nbx = bx, nby = by;
      for (int d = 0; d < 4; d++) begin
        automatic int cx = bx + ((d == 0) ? 1 : (d == 1) ? -1 : 0);
        automatic int cy = by + ((d == 2) ? 1 : (d == 3) ? -1 : 0);
        acall(1, 2, M_SADCAND, {16'd0, 8'(cy), 8'(cx)}, 0, r); n_me++;
        if (int'(r) < best) begin best = int'(r); nbx = cx; nby = cy; end
      end
      bx = nbx; by = nby;
    end
    acall(1, 2, M_GETBEST, 40, 0, r);
    chk(r[15:0] == 0 && r[31:16] == {8'(TY), 8'(TX)}, $sformatf("ME finds the true motion vector (got %h, %0d steps at %0d,%0d)", r, n_me, bx, by));
    put(1, 0, 3, 1, r);
    // fill link 1->0 FID 3 past its depth: the 25th PUT is refused until PID 0 drains
    for (int k = 0; k < 24; k++) put(1, 0, 0, 3, k);
    hcall(1, 0, H_PUT, 32'(0 * 4 + 3), 24, r, ok);
    chk(!ok, "PUT to a full FIFO is refused");
    if (!ok) n_put_full++;
    me_full = 1;
    put(1, 0, 0, 3, 24);
  endtask

  task automatic itq_prog();
    logic [31:0] r, sync;
    logic ok;
    for (int c = 0; c < 4; c++)
      for (int k = 0; k < 6; k++) acall(2, 0, F_SETW, 32'(c) | 32'(k << 2), (k < 4) ? 32'(tm[c][k]) : 0, r);
    // semaphore handshake between the two threads of this cluster:
    // core 0's thread blocks, core 1's thread posts and wakes it
    hcall(2, 0, H_SEM_INIT, 1, 0, r, ok);
    hcall(2, 0, H_SEM_WAIT, 1, 0, r, ok);
    if (r == 0) n_block++;
    repeat (80) @(posedge clk); #1;
    chk(!core_busy[2][0] || core_tid[2][0] != core_tid[2][1], "blocked thread left core 0");
    hcall(2, 1, H_SEM_POST, 1, 0, r, ok);
    repeat (80) @(posedge clk); #1;
    if (ready_vec[2] == 8'b0 && core_busy[2][0]) n_wake++;
    for (int mb = 0; mb < NMB; mb++) begin
      get(2, 0, 0, 0, sync);
      chk(sync[31:16] == 16'(mb), "sync carries the macroblock number");
      for (int i = 0; i < 16; i++) begin
        dread(2, 0 * LB + int'(sync[15:0]) * (LB / 2) + 4 * i, r);
        acall(2, 0, F_SETX, i, r, r);
      end
      put(2, 0, 0, 1, sync);             // release the input region
      if (mb >= 2) get(2, 0, 3, 2, r);   // wait until the output region is free
      for (int row = 0; row < 4; row++) begin
        acall(2, 0, F_6TAB, 32'(4 * row), 0, r); n_filt++;
        for (int c = 0; c < 4; c++) begin
          acall(2, 0, F_GETY, c, 0, r);
          dwrite(2, 3 * LB + int'(sync[15:0]) * (LB / 2) + 4 * (4 * row + c), r);
        end
      end
      put(2, 0, 3, 0, sync);
    end
  endtask

  task automatic dbk_prog();
    logic [31:0] r, sync;
    int t [16];
    for (int k = 0; k < 6; k++) acall(3, 0, F_SETW, 32'h100 | 32'(k << 2), 32'(hp[k]), r);
    get(3, 0, 1, 1, r);
    chk(r[31:16] == {8'hFE, 8'h03}, "motion vector arrives from the ME cluster");
    for (int mb = 0; mb < NMB; mb++) begin
      get(3, 0, 2, 0, sync);
      // reference: transform of the coefficients
      for (int row = 0; row < 4; row++)
        for (int c = 0; c < 4; c++) begin
          t[4*row + c] = 0;
          for (int k = 0; k < 4; k++) t[4*row + c] += tm[c][k] * coef[mb][4*row + k];
        end
      for (int i = 0; i < 16; i++) begin
        dread(3, 2 * LB + int'(sync[15:0]) * (LB / 2) + 4 * i, r);
        chk($signed(r) == t[i], $sformatf("transformed mb %0d #%0d got %0d exp %0d", mb, i, $signed(r), t[i]));
        acall(3, 0, F_SETX, i, r, r);
      end
      put(3, 0, 2, 2, sync);             // release the region
      for (int b = 0; b < 16; b += 4) begin
        acall(3, 0, F_6TAB, 32'(b) | (1 << 4) | (5 << 8), 0, r); n_filt++;
        for (int c = 0; c < 4; c++) begin
          automatic int s = 0;
          for (int k = 0; k < 6; k++) s += hp[k] * t[(b + c + k) % 16];
          s = (s + 16) >>> 5;
          acall(3, 0, F_GETY, c, 0, r);
          chk($signed(r) == s, $sformatf("filtered mb %0d pos %0d", mb, b + c));
        end
      end
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    dn_wr_en = 0; dn_rd_en = 0;
    for (int p = 0; p < NP; p++) begin
      h_cmd_valid[p] = 0; a_cmd_valid[p] = 0;
      dn_wr_addr[p] = 0; dn_wr_data[p] = 0; dn_rd_addr[p] = 0;
      for (int c = 0; c < NC; c++) begin
        h_cmd[p][c] = '0; a_cmd[p][c] = '0;
        for (int i = 0; i < 16; i++) regs[p][c][i] = 0;
      end
    end
    for (int mb = 0; mb < NMB; mb++) begin
      // macroblock header: a 4-symbol code 1, 01, 001, 000 for mb % 4
      for (int b = 0; b < hdr_len[mb % 4]; b++) bits.push_back(hdr_code[mb % 4][hdr_len[mb % 4] - 1 - b]);
      for (int i = 0; i < 16; i++) begin
        coef[mb][i] = int'($urandom % 41) - 20;
        put_ue(coef[mb][i] > 0 ? 2 * coef[mb][i] - 1 : -2 * coef[mb][i]);
      end
    end
    repeat (3) @(posedge clk); rst_n = 1;
    @(posedge clk); #1;
    fork boot(0); boot(1); boot(2); boot(3); join
    fork parse_prog(); me_prog(); itq_prog(); dbk_prog(); join
    $display("switches %0d preempt %0d block %0d wake %0d put %0d get %0d get_empty %0d put_full %0d",
             n_switch, n_preempt, n_block, n_wake, n_put, n_get, n_get_empty, n_put_full);
    $display("regions %0d/%0d dwr %0d drd %0d parse %0d me %0d filt %0d",
             n_region[0], n_region[1], n_dwr, n_drd, n_parse, n_me, n_filt);
    chk(n_switch > 0, "context switches happened");
    chk(sw_max == 16, $sformatf("a context switch holds the core %0d cycles (16 bus words, within 20)", sw_max));
    chk(n_preempt == 4, "preemption in every cluster");
    chk(n_block > 0 && n_wake > 0, "semaphore block and wake-up");
    chk(n_put > 0 && n_get > 0, "control transfers");
    chk(n_get_empty > 0, "GET polled an empty FIFO");
    chk(n_put_full > 0, "PUT refused by a full FIFO");
    chk(n_region[0] > 0 && n_region[1] > 0, "both double-buffer regions used");
    chk(n_dwr > 0 && n_drd > 0, "data-network transfers");
    chk(n_parse > 0 && n_me > 0 && n_filt > 0, "every accelerator used");
    chk(n_vlc == NMB, "table matching used for every macroblock header");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
