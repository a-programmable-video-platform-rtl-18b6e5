// tb_hosk_context_manager: self-checking test of the context manager with a
// behavioural context memory (random grant stalls, 2-cycle read latency) and
// behavioural core register files. Checks: thread_create writes the PC into word 0
// of the thread's slot; a switch prefetches the new context before touching the
// core, then swaps it in over exactly 16 context-bus cycles while the old context
// comes out, then writes the old context back to its slot; a switch with no
// incoming thread loads zeros and a switch with nothing to save writes nothing.
module tb_hosk_context_manager;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int NC = 4, MT = 8, CW = 16;
  logic rst_n, create_valid, sched_valid, sched_new_valid, sched_old_valid, sched_done, idle;
  logic [2:0] create_tid, sched_new_tid, sched_old_tid;
  logic [31:0] create_pc;
  logic [1:0] sched_core;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic ctx_sw_valid, ctx_sw_new_valid;
  logic [1:0] ctx_sw_core;
  logic [3:0] ctx_sw_idx;
  logic [31:0] ctx_in_data, ctx_out_data [NC];
  hosk_context_manager #(.N_CORES(NC), .MAX_THREADS(MT), .CTX_WORDS(CW), .CTX_BASE(32'h100)) dut (.*);
  ctx_mem_model #(.WORDS(1024), .LAT(2)) u_mem (.*);

  // behavioural cores: register files swapped through the context bus
  logic [31:0] regs [NC][CW];
  int bus_cycles = 0;
  always_comb for (int c = 0; c < NC; c++) ctx_out_data[c] = regs[c][ctx_sw_idx];
  always_ff @(posedge clk) if (ctx_sw_valid) begin
    regs[ctx_sw_core][ctx_sw_idx] <= ctx_in_data;
    bus_cycles++;
  end

  task automatic switch_ctx(input int core, input bit nv, input int nt, input bit ov, input int ot,
                            output int sw_cycles);
    int start;
    @(negedge clk);
    sched_valid = 1; sched_core = 2'(core); sched_new_valid = nv; sched_new_tid = 3'(nt);
    sched_old_valid = ov; sched_old_tid = 3'(ot);
    @(negedge clk); sched_valid = 0;
    start = bus_cycles;
    while (!sched_done) @(negedge clk);
    sw_cycles = bus_cycles - start;
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rst_n = 0; create_valid = 0; sched_valid = 0; create_tid = 0; create_pc = 0;
    sched_core = 0; sched_new_valid = 0; sched_new_tid = 0; sched_old_valid = 0; sched_old_tid = 0;
    for (int c = 0; c < NC; c++) for (int i = 0; i < CW; i++) regs[c][i] = 32'(c * 100 + i);
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    // create thread 3 with PC 0x8000
    create_valid = 1; create_tid = 3; create_pc = 32'h8000;
    @(negedge clk); create_valid = 0;
    while (!idle) @(negedge clk);
    chk(u_mem.mem[32'h100 + 3*CW] == 32'h8000, "create writes PC into word 0 of slot 3");
    // switch thread 3 into core 2, core 2's old context belongs to thread 5
    switch_ctx(2, 1, 3, 1, 5, n);
    chk(n == CW, $sformatf("swap takes %0d context-bus cycles", n));
    chk(regs[2][0] == 32'h8000, "core 2 restored PC of thread 3");
    for (int i = 1; i < CW; i++) chk(regs[2][i] == 32'hDEAD_0000 + 32'h100 + 3*CW + i, "restored word");
    for (int i = 0; i < CW; i++) chk(u_mem.mem[32'h100 + 5*CW + i] == 32'(200 + i), "thread 5 saved");
    // core 2 modifies its registers, then thread 5 comes back and 3 is saved
    for (int i = 0; i < CW; i++) regs[2][i] = 32'hCAFE_0000 + i;
    switch_ctx(2, 1, 5, 1, 3, n);
    for (int i = 0; i < CW; i++) chk(regs[2][i] == 32'(200 + i), "thread 5 restored intact");
    for (int i = 0; i < CW; i++) chk(u_mem.mem[32'h100 + 3*CW + i] == 32'hCAFE_0000 + i, "thread 3 saved");
    // switch out only: core 1 gets zeros, thread 6 saved; then switch in without save
    switch_ctx(1, 0, 0, 1, 6, n);
    chk(n == CW, "switch-out also 16 cycles");
    for (int i = 0; i < CW; i++) chk(regs[1][i] == 0 && u_mem.mem[32'h100 + 6*CW + i] == 32'(100 + i), "switch-out");
    begin
      automatic int w0 = u_mem.writes;
      switch_ctx(1, 1, 6, 0, 0, n);
      chk(u_mem.writes == w0, "nothing written back without a save");
      for (int i = 0; i < CW; i++) chk(regs[1][i] == 32'(100 + i), "thread 6 restored on core 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
