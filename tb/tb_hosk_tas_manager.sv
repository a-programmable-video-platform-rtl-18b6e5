// tb_hosk_tas_manager: self-checking test of the thread-and-semaphore manager with
// two cores. A responder in the testbench acknowledges each context switch after
// 4 cycles and records it. The script checks: dispatch of the highest-priority
// threads to idle cores, creation of a higher-priority thread preempting the
// lowest-priority running one, semaphore wait blocking the caller and switching it
// out (with its context saved), semaphore post waking the waiter in FIFO order
// through the linked list, kill freeing a core without a save, change of priority,
// reducing the active-core count, and a create refused when all slots are used.
module tb_hosk_tas_manager;
  import vp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int NC = 2, MT = 4;
  logic rst_n, op_valid, op_ready, op_ok;
  hosk_op_t op;
  logic [0:0] op_core;
  logic [31:0] op_a0, op_a1, op_rsp;
  logic create_valid, sched_valid, sched_new_valid, sched_old_valid, sched_done, sched_allow;
  logic [1:0] create_tid, sched_new_tid, sched_old_tid;
  logic [31:0] create_pc;
  logic [0:0] sched_core;
  logic [MT-1:0] ready_vec;
  logic [1:0] n_active;
  logic core_busy [NC];
  logic [1:0] core_tid [NC];
  hosk_tas_manager #(.N_CORES(NC), .MAX_THREADS(MT), .N_SEM(4), .PRIO_W(3)) dut (.*);

  // switch responder
  typedef struct { int core; bit nv; int nt; bit ov; int ot; } sw_t;
  sw_t sw [$];
  int  cnt_down = 0;
  assign sched_allow = 1'b1;
  always @(posedge clk) begin
    if (sched_valid) begin
      sw.push_back('{int'(sched_core), sched_new_valid, int'(sched_new_tid), sched_old_valid, int'(sched_old_tid)});
      cnt_down <= 4;
    end else if (cnt_down > 0) cnt_down <= cnt_down - 1;
  end
  assign sched_done = (cnt_down == 1);

  logic [31:0] last_rsp;
  logic last_ok;
  task automatic do_op(input hosk_op_t o, input int core, input int a0, input int a1);
    op_valid = 1; op = o; op_core = 1'(core); op_a0 = a0; op_a1 = a1;
    #1;
    while (!op_ready) begin @(negedge clk); #1; end
    last_rsp = op_rsp; last_ok = op_ok;
    @(posedge clk);
    #1 op_valid = 0;
    repeat (12) @(posedge clk);   // let the scheduler settle
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; op_valid = 0; op = H_SET_ACTIVE; op_core = 0; op_a0 = 0; op_a1 = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    chk(n_active == 2, "all cores active after reset");
    do_op(H_THREAD_CREATE, 0, 32'h1000, 1); chk(last_ok && last_rsp == 0, "create t0");
    chk(core_busy[0] && core_tid[0] == 0, "t0 dispatched to core 0");
    do_op(H_THREAD_CREATE, 0, 32'h2000, 2); chk(last_rsp == 1, "create t1");
    chk(core_busy[1] && core_tid[1] == 1, "t1 dispatched to core 1");
    do_op(H_THREAD_CREATE, 0, 32'h3000, 3); chk(last_rsp == 2, "create t2");
    // t2 (prio 3) preempts t0 (prio 1) on core 0
    chk(core_tid[0] == 2 && ready_vec == 4'b0001, "t2 preempts t0");
    chk(sw[$].ov && sw[$].ot == 0 && sw[$].nt == 2, "preemption saves t0");
    // sem 0 starts at 0: t1 on core 1 waits and blocks
    do_op(H_SEM_INIT, 0, 0, 0);
    do_op(H_SEM_WAIT, 1, 0, 0); chk(last_rsp == 0, "wait blocks");
    chk(core_tid[1] == 0 && core_busy[1], "t0 takes core 1 after t1 blocks");
    chk(sw[$].ov && sw[$].ot == 1, "blocked t1 is saved");
    // t0 on core 1 also waits: queue t1 -> t0, core 1 goes idle
    do_op(H_SEM_WAIT, 1, 0, 0);
    chk(!core_busy[1] && ready_vec == 0, "core 1 idle, nothing ready");
    // post wakes t1 first (FIFO), it runs on idle core 1
    do_op(H_SEM_POST, 0, 0, 0);
    chk(core_busy[1] && core_tid[1] == 1, "post wakes t1");
    do_op(H_SEM_POST, 0, 0, 0);
    chk(ready_vec == 4'b0001, "second post wakes t0 (ready, lower priority)");
    // post with no waiter counts up; wait then succeeds without blocking
    do_op(H_SEM_POST, 0, 0, 0);
    do_op(H_SEM_WAIT, 0, 0, 0); chk(last_rsp == 1 && core_tid[0] == 2, "wait on count>0 passes");
    // raise t0 above t1: it preempts t1 on core 1
    do_op(H_CHANGE_PRIO, 0, 0, 7);
    chk(core_tid[1] == 0 && ready_vec == 4'b0010, "priority change preempts");
    // kill t2 on core 0: t1 takes core 0, no save of t2
    do_op(H_THREAD_KILL, 0, 0, 0);
    chk(core_tid[0] == 1 && ready_vec == 0, "kill frees the core");
    chk(!sw[$].ov, "killed thread not saved");
    // only one active core: core 1 gives back t0; t0 (prio 7) then preempts t1 on core 0
    do_op(H_SET_ACTIVE, 0, 1, 0);
    chk(!core_busy[1], "core 1 released");
    chk(core_tid[0] == 0 && ready_vec == 4'b0010, "highest thread on remaining core");
    // fill the thread table
    do_op(H_THREAD_CREATE, 0, 32'h4000, 0); chk(last_ok, "create t2 again");
    do_op(H_THREAD_CREATE, 0, 32'h5000, 0); chk(last_ok, "create t3");
    do_op(H_THREAD_CREATE, 0, 32'h6000, 0); chk(!last_ok && last_rsp == 32'hFFFF_FFFF, "no free slot");
    do_op(H_THREAD_KILL, 0, 0, 0);
    chk(core_tid[0] == 1 && ready_vec == 4'b1100, "highest-priority ready thread picked over lower ones");
    $display("switches: %0d", sw.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
