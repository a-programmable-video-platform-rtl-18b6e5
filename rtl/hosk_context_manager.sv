// hosk_context_manager: context manager of the hardware OS kernel.
//
// The contexts of all threads live in an external context memory (thread t at word
// address CTX_BASE + t*CTX_WORDS, program counter in word 0). For each scheduling
// decision it runs three phases:
//   PREFETCH  read the incoming thread's CTX_WORDS words into the on-chip context
//             buffer (skipped when no thread comes in; the buffer is then zero);
//   SWAP      CTX_WORDS cycles on the duplex 32-bit context bus of the chosen core:
//             each cycle one word goes into the core (ctx_in_data) and one word of
//             the leaving context comes out (ctx_out_data[core]);
//   WRITEBACK write the leaving context to its slot (only if it must be saved).
// The core is held only during SWAP, so the switch costs CTX_WORDS (16) cycles;
// the memory traffic is hidden before and after it. thread_create requests write
// the entry PC into word 0 of the new thread's slot.
// The memory port is a request/grant port with read data returned on mem_rvalid
// (in order, one outstanding request). The slot layout and this handshake are this
// design's choices; prefetch-then-swap and the 16-cycle duplex bus follow the HOSK
// description.
module hosk_context_manager #(
  parameter int N_CORES     = 4,
  parameter int MAX_THREADS = 8,
  parameter int CTX_WORDS   = 16,
  parameter logic [31:0] CTX_BASE = 32'h0,
  localparam int TW = (MAX_THREADS > 1) ? $clog2(MAX_THREADS) : 1,
  localparam int CW = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int IW = $clog2(CTX_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // requests
  input  logic              create_valid,
  input  logic [TW-1:0]     create_tid,
  input  logic [31:0]       create_pc,
  input  logic              sched_valid,
  input  logic [CW-1:0]     sched_core,
  input  logic              sched_new_valid,
  input  logic [TW-1:0]     sched_new_tid,
  input  logic              sched_old_valid,
  input  logic [TW-1:0]     sched_old_tid,
  output logic              sched_done,
  output logic              idle,
  // external context memory (word addresses)
  output logic              mem_req,
  output logic              mem_we,
  output logic [31:0]       mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [31:0]       mem_rdata,
  // context bus
  output logic              ctx_sw_valid,     // one word each way this cycle
  output logic [CW-1:0]     ctx_sw_core,
  output logic [IW-1:0]     ctx_sw_idx,
  output logic              ctx_sw_new_valid, // core has a thread after the swap
  output logic [31:0]       ctx_in_data,
  input  logic [31:0]       ctx_out_data [N_CORES]
);
  typedef enum logic [2:0] {S_IDLE, S_CREATE, S_PF, S_SWAP, S_WB, S_DONE} state_t;
  state_t state;

  logic [31:0]   in_buf  [CTX_WORDS];
  logic [31:0]   out_buf [CTX_WORDS];
  logic [IW:0]   req_i, rsp_i, sw_i;
  logic          wait_rsp;
  logic [CW-1:0] core_q;
  logic          new_v_q, old_v_q;
  logic [TW-1:0] new_t_q, old_t_q;
  logic [TW-1:0] cr_tid_q;
  logic [31:0]   cr_pc_q;

  function automatic logic [31:0] slot(input logic [TW-1:0] t, input logic [IW:0] i);
    return CTX_BASE + 32'(t) * 32'(CTX_WORDS) + 32'(i);
  endfunction

  assign idle = (state == S_IDLE);

  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    unique case (state)
      S_CREATE: begin
        mem_req = 1'b1; mem_we = 1'b1;
        mem_addr = slot(cr_tid_q, '0); mem_wdata = cr_pc_q;
      end
      S_PF: if (!wait_rsp && req_i < (IW+1)'(CTX_WORDS)) begin
        mem_req = 1'b1; mem_addr = slot(new_t_q, req_i);
      end
      S_WB: begin
        mem_req = 1'b1; mem_we = 1'b1;
        mem_addr = slot(old_t_q, req_i); mem_wdata = out_buf[req_i[IW-1:0]];
      end
      default: ;
    endcase
  end

  assign ctx_sw_valid     = (state == S_SWAP);
  assign ctx_sw_core      = core_q;
  assign ctx_sw_idx       = sw_i[IW-1:0];
  assign ctx_sw_new_valid = new_v_q;
  assign ctx_in_data      = in_buf[sw_i[IW-1:0]];
  assign sched_done       = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      req_i    <= '0;
      rsp_i    <= '0;
      sw_i     <= '0;
      wait_rsp <= 1'b0;
      core_q   <= '0;
      new_v_q  <= 1'b0;
      old_v_q  <= 1'b0;
      new_t_q  <= '0;
      old_t_q  <= '0;
      cr_tid_q <= '0;
      cr_pc_q  <= '0;
      for (int i = 0; i < CTX_WORDS; i++) begin in_buf[i] <= '0; out_buf[i] <= '0; end
    end else begin
      unique case (state)
        S_IDLE: begin
          req_i <= '0; rsp_i <= '0; sw_i <= '0; wait_rsp <= 1'b0;
          if (create_valid) begin
            cr_tid_q <= create_tid;
            cr_pc_q  <= create_pc;
            state    <= S_CREATE;
          end else if (sched_valid) begin
            core_q  <= sched_core;
            new_v_q <= sched_new_valid;
            new_t_q <= sched_new_tid;
            old_v_q <= sched_old_valid;
            old_t_q <= sched_old_tid;
            if (sched_new_valid) state <= S_PF;
            else begin
              for (int i = 0; i < CTX_WORDS; i++) in_buf[i] <= '0;
              state <= S_SWAP;
            end
          end
        end
        S_CREATE: if (mem_gnt) state <= S_IDLE;
        S_PF: begin
          if (mem_req && mem_gnt) begin
            req_i    <= req_i + 1'b1;
            wait_rsp <= 1'b1;
          end
          if (mem_rvalid) begin
            in_buf[rsp_i[IW-1:0]] <= mem_rdata;
            rsp_i    <= rsp_i + 1'b1;
            wait_rsp <= 1'b0;
            if (rsp_i == (IW+1)'(CTX_WORDS-1)) state <= S_SWAP;
          end
        end
        S_SWAP: begin
          out_buf[sw_i[IW-1:0]] <= ctx_out_data[core_q];
          sw_i <= sw_i + 1'b1;
          if (sw_i == (IW+1)'(CTX_WORDS-1)) begin
            req_i <= '0;
            state <= old_v_q ? S_WB : S_DONE;
          end
        end
        S_WB: if (mem_gnt) begin
          req_i <= req_i + 1'b1;
          if (req_i == (IW+1)'(CTX_WORDS-1)) state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_create_not_during_switch: assert property (@(posedge clk) disable iff (!rst_n)
    (create_valid || sched_valid) |-> idle);
endmodule
