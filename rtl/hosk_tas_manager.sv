// hosk_tas_manager: thread-and-semaphore (TAS) manager of the hardware OS kernel.
//
// Keeps a descriptor per thread (state, priority, next-pointer), a ready queue as a
// bit vector and, per semaphore, a count and a waiting queue as a linked list
// (head/tail pointers, next-pointer per thread). It executes one kernel operation
// per cycle (op_valid & op_ready) and answers in the same cycle on op_rsp/op_ok.
// Independently it schedules the threads onto the cores: it raises sched_valid for
// one core at a time with the thread to switch in (highest priority ready thread)
// and the thread to switch out, and waits for sched_done from the context manager
// before the next decision. A switch is issued when
//   - a core has a thread that blocked (semaphore) or was killed,
//   - an active core is idle and a thread is ready,
//   - a ready thread has a strictly higher priority than the lowest-priority
//     running thread (preemption), or
//   - a core above the active-core count still runs a thread.
// The bit-vector ready queue and the linked-list waiting queue follow the HOSK
// description; sizes, tie-breaking (lower thread id wins) and the one-switch-at-a-
// time policy are this design's choices. While a switch is in flight, op_ready is
// low so descriptors stay consistent with the context being moved.
module hosk_tas_manager
  import vp_pkg::*;
#(
  parameter int N_CORES     = 4,
  parameter int MAX_THREADS = 8,
  parameter int N_SEM       = 8,
  parameter int PRIO_W      = 3,
  localparam int TW = (MAX_THREADS > 1) ? $clog2(MAX_THREADS) : 1,
  localparam int CW = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int SW = (N_SEM > 1) ? $clog2(N_SEM) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // kernel operations from the main controller
  input  logic              op_valid,
  output logic              op_ready,
  input  hosk_op_t          op,
  input  logic [CW-1:0]     op_core,
  input  logic [31:0]       op_a0,
  input  logic [31:0]       op_a1,
  output logic [31:0]       op_rsp,
  output logic              op_ok,
  // thread creation: PC to be written into the new thread's context
  output logic              create_valid,
  output logic [TW-1:0]     create_tid,
  output logic [31:0]       create_pc,
  // scheduling decisions to the context manager
  output logic              sched_valid,
  output logic [CW-1:0]     sched_core,
  output logic              sched_new_valid,
  output logic [TW-1:0]     sched_new_tid,
  output logic              sched_old_valid,   // old context must be saved
  output logic [TW-1:0]     sched_old_tid,
  input  logic              sched_done,
  input  logic              sched_allow,       // context manager can take a request
  // status
  output logic [MAX_THREADS-1:0] ready_vec,
  output logic [CW:0]       n_active,
  output logic              core_busy [N_CORES],
  output logic [TW-1:0]     core_tid  [N_CORES]
);
  typedef enum logic [1:0] {T_FREE, T_READY, T_RUN, T_WAIT} tstate_t;

  tstate_t           t_state [MAX_THREADS];
  logic [PRIO_W-1:0] t_prio  [MAX_THREADS];
  logic [TW-1:0]     t_next  [MAX_THREADS];

  logic [15:0]       s_count [N_SEM];
  logic              s_nonempty [N_SEM];
  logic [TW-1:0]     s_head  [N_SEM];
  logic [TW-1:0]     s_tail  [N_SEM];

  // per core: thread switched in, and a thread that left and must be swapped out
  logic              c_run   [N_CORES];
  logic              c_out   [N_CORES];   // core holds a stale context (blocked/killed)
  logic              c_save  [N_CORES];   // that context must be written back
  logic              busy;                // a switch is in flight

  assign op_ready = !busy && !sched_valid && sched_allow;

  always_comb begin
    for (int t = 0; t < MAX_THREADS; t++) ready_vec[t] = (t_state[t] == T_READY);
    for (int c = 0; c < N_CORES; c++) core_busy[c] = c_run[c];
  end

  // ---------------------------------------------------------------- best ready
  logic              best_v;
  logic [TW-1:0]     best_t;
  always_comb begin
    best_v = 1'b0;
    best_t = '0;
    for (int t = 0; t < MAX_THREADS; t++) begin
      if (ready_vec[t] && (!best_v || t_prio[t] > t_prio[best_t])) begin
        best_v = 1'b1;
        best_t = TW'(t);
      end
    end
  end

  // lowest-priority running thread on an active core
  logic              low_v;
  logic [CW-1:0]     low_c;
  always_comb begin
    low_v = 1'b0;
    low_c = '0;
    for (int c = 0; c < N_CORES; c++) begin
      if (c_run[c] && (CW+1)'(c) < n_active &&
          (!low_v || t_prio[core_tid[c]] < t_prio[core_tid[low_c]])) begin
        low_v = 1'b1;
        low_c = CW'(c);
      end
    end
  end

  // ---------------------------------------------------------------- decision
  logic              dec_v;
  logic [CW-1:0]     dec_core;
  logic              dec_new_v, dec_old_v, dec_preempt;
  always_comb begin
    dec_v = 1'b0; dec_core = '0; dec_new_v = 1'b0; dec_old_v = 1'b0; dec_preempt = 1'b0;
    // 1) a core above the active count gives its thread back
    for (int c = N_CORES-1; c >= 0; c--)
      if ((CW+1)'(c) >= n_active && c_run[c]) begin
        dec_v = 1'b1; dec_core = CW'(c); dec_new_v = 1'b0; dec_old_v = 1'b1; dec_preempt = 1'b1;
      end
    // 2) a core holding a blocked or killed thread, or idle: give it the best ready thread
    if (!dec_v)
      for (int c = N_CORES-1; c >= 0; c--)
        if (c_out[c] || (!c_run[c] && (CW+1)'(c) < n_active && best_v)) begin
          dec_v = 1'b1; dec_core = CW'(c);
          dec_new_v = best_v && (CW+1)'(c) < n_active;
          dec_old_v = c_out[c] && c_save[c];
          dec_preempt = 1'b0;
        end
    // 3) preemption of the lowest-priority running thread
    if (!dec_v && best_v && low_v && t_prio[best_t] > t_prio[core_tid[low_c]]) begin
      dec_v = 1'b1; dec_core = low_c; dec_new_v = 1'b1; dec_old_v = 1'b1; dec_preempt = 1'b1;
    end
  end

  // ---------------------------------------------------------------- operations
  logic          free_v;
  logic [TW-1:0] free_t;
  always_comb begin
    free_v = 1'b0;
    free_t = '0;
    for (int t = MAX_THREADS-1; t >= 0; t--)
      if (t_state[t] == T_FREE) begin free_v = 1'b1; free_t = TW'(t); end
  end

  wire [SW-1:0] op_sem = op_a0[SW-1:0];
  wire          op_has_thread = c_run[op_core];
  wire [TW-1:0] op_tid = core_tid[op_core];

  always_comb begin
    op_rsp = '0;
    op_ok  = 1'b1;
    create_valid = 1'b0;
    create_tid   = free_t;
    create_pc    = op_a0;
    if (op_valid && op_ready) begin
      unique case (op)
        H_THREAD_CREATE: begin
          op_ok  = free_v;
          op_rsp = free_v ? 32'(free_t) : '1;
          create_valid = free_v;
        end
        H_THREAD_KILL:  op_ok = op_has_thread;
        H_SEM_WAIT: begin
          op_ok  = (s_count[op_sem] != 0);      // 0: the caller blocks
          op_rsp = {31'd0, op_ok};
        end
        H_CHANGE_PRIO:  op_ok = (op_a0 < MAX_THREADS) && t_state[op_a0[TW-1:0]] != T_FREE;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < MAX_THREADS; t++) begin
        t_state[t] <= T_FREE; t_prio[t] <= '0; t_next[t] <= '0;
      end
      for (int s = 0; s < N_SEM; s++) begin
        s_count[s] <= '0; s_nonempty[s] <= 1'b0; s_head[s] <= '0; s_tail[s] <= '0;
      end
      for (int c = 0; c < N_CORES; c++) begin
        c_run[c] <= 1'b0; c_out[c] <= 1'b0; c_save[c] <= 1'b0; core_tid[c] <= '0;
      end
      n_active        <= (CW+1)'(N_CORES);
      busy            <= 1'b0;
      sched_valid     <= 1'b0;
      sched_core      <= '0;
      sched_new_valid <= 1'b0;
      sched_new_tid   <= '0;
      sched_old_valid <= 1'b0;
      sched_old_tid   <= '0;
    end else begin
      sched_valid <= 1'b0;
      if (busy) begin
        if (sched_done) busy <= 1'b0;
      end else if (op_valid && op_ready) begin
        unique case (op)
          H_THREAD_CREATE: if (free_v) begin
            t_state[free_t] <= T_READY;
            t_prio[free_t]  <= op_a1[PRIO_W-1:0];
          end
          H_THREAD_KILL: if (op_has_thread) begin
            t_state[op_tid] <= T_FREE;
            c_run[op_core]  <= 1'b0;
            c_out[op_core]  <= 1'b1;
            c_save[op_core] <= 1'b0;
          end
          H_SET_ACTIVE:
            n_active <= (op_a0 == 0) ? (CW+1)'(1) :
                        (op_a0 > N_CORES) ? (CW+1)'(N_CORES) : (CW+1)'(op_a0);
          H_CHANGE_PRIO: if (op_ok) t_prio[op_a0[TW-1:0]] <= op_a1[PRIO_W-1:0];
          H_SEM_INIT: if (op_a0 < N_SEM) s_count[op_sem] <= op_a1[15:0];
          H_SEM_WAIT: begin
            if (s_count[op_sem] != 0) s_count[op_sem] <= s_count[op_sem] - 1'b1;
            else if (op_has_thread) begin
              // append the caller to the semaphore's waiting list
              t_state[op_tid] <= T_WAIT;
              if (s_nonempty[op_sem]) t_next[s_tail[op_sem]] <= op_tid;
              else s_head[op_sem] <= op_tid;
              s_tail[op_sem]     <= op_tid;
              s_nonempty[op_sem] <= 1'b1;
              c_run[op_core]  <= 1'b0;
              c_out[op_core]  <= 1'b1;
              c_save[op_core] <= 1'b1;
            end
          end
          H_SEM_POST: begin
            if (s_nonempty[op_sem]) begin
              // wake the head of the waiting list
              t_state[s_head[op_sem]] <= T_READY;
              s_head[op_sem] <= t_next[s_head[op_sem]];
              if (s_head[op_sem] == s_tail[op_sem]) s_nonempty[op_sem] <= 1'b0;
            end else begin
              s_count[op_sem] <= s_count[op_sem] + 1'b1;
            end
          end
          default: ;
        endcase
      end else if (dec_v && sched_allow) begin
        // issue one context switch
        busy            <= 1'b1;
        sched_valid     <= 1'b1;
        sched_core      <= dec_core;
        sched_new_valid <= dec_new_v;
        sched_new_tid   <= best_t;
        sched_old_valid <= dec_old_v;
        sched_old_tid   <= core_tid[dec_core];
        if (dec_preempt) t_state[core_tid[dec_core]] <= T_READY;
        if (dec_new_v) begin
          t_state[best_t]    <= T_RUN;
          core_tid[dec_core] <= best_t;
        end
        c_run[dec_core]  <= dec_new_v;
        c_out[dec_core]  <= 1'b0;
        c_save[dec_core] <= 1'b0;
      end
    end
  end

  a_sched_one_at_a_time: assert property (@(posedge clk) disable iff (!rst_n)
    sched_valid |=> !sched_valid);
endmodule
