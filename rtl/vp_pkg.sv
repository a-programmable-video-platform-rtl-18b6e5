// vp_pkg: types and constants shared by the video platform.
//
// The platform is a set of PE clusters (processing-element clusters), each running
// one task of a macroblock-pipelined video codec on a few RISC cores, a hardware OS
// kernel (HOSK) and one task-specific accelerator. Clusters talk over a FIFO-based
// control network (addressed by cluster ID "PID" and FIFO ID "FID") and a
// shared-memory data network. The numbers below that come from the platform's
// 720p configuration are the four clusters, four cores per cluster, 32-bit control
// FIFOs of depth 24 and 2 KB per data link; the command encodings are this
// design's own.
package vp_pkg;

  localparam int N_PE_DEF     = 4;    // PE clusters in the 720p configuration
  localparam int N_CORES_DEF  = 4;    // RISC cores per cluster
  localparam int PID_W        = 2;    // cluster ID width (up to 4 clusters)
  localparam int FID_W        = 2;    // FIFO ID width (4 FIFOs per link)
  localparam int CTX_WORDS    = 16;   // 32-bit words per thread context

  // Kind of task-specific accelerator a cluster carries.
  typedef enum logic [1:0] {
    ACC_PARSE  = 2'd0,
    ACC_ME     = 2'd1,
    ACC_FILTER = 2'd2
  } acc_kind_t;

  // ---------------------------------------------------------------- HOSK commands
  typedef enum logic [3:0] {
    H_THREAD_CREATE = 4'd0,   // a0 = entry PC, a1[7:0] = priority; returns thread id
    H_THREAD_KILL   = 4'd1,   // terminate the calling thread
    H_SET_ACTIVE    = 4'd2,   // a0 = number of active cores
    H_CHANGE_PRIO   = 4'd3,   // a0 = thread id, a1 = new priority
    H_SEM_INIT      = 4'd4,   // a0 = semaphore id, a1 = initial count
    H_SEM_WAIT      = 4'd5,   // a0 = semaphore id
    H_SEM_POST      = 4'd6,   // a0 = semaphore id
    H_PUT           = 4'd7,   // a0 = {target PID, FID}, a1 = data; returns 1 on success
    H_GET           = 4'd8,   // a0 = {source PID, FID}; returns data, status in rsp_ok
    H_STATUS        = 4'd9    // a0 = {PID, FID}; returns {tx_full, rx_empty}
  } hosk_op_t;

  typedef struct packed {
    hosk_op_t    op;
    logic [31:0] a0;
    logic [31:0] a1;
  } hosk_cmd_t;

  // --------------------------------------------------------- accelerator commands
  // One command format for all accelerators; the meaning of op depends on the kind.
  typedef struct packed {
    logic [7:0]  op;
    logic [31:0] a0;
    logic [31:0] a1;
  } acc_cmd_t;

  // Filtering accelerator opcodes
  localparam logic [7:0] F_SETW    = 8'h01; // a0[1:0]=copy, a0[4:2]=tap, a0[8]=all copies, a1[7:0]=weight
  localparam logic [7:0] F_SETX    = 8'h02; // a0[3:0]=reg, a1[15:0]=sample
  localparam logic [7:0] F_6TAB    = 8'h03; // a0[3:0]=base, a0[7:4]=stride, a0[11:8]=shift
  localparam logic [7:0] F_QUANT   = 8'h04; // a0[3:0]=base, a0[12:8]=shift, a0[31:16]=scale, a1=offset
  localparam logic [7:0] F_REORDER = 8'h05; // 4x4 zigzag of the sample registers
  localparam logic [7:0] F_GETY    = 8'h06; // a0[1:0]=copy: read filter/quant result
  localparam logic [7:0] F_GETX    = 8'h07; // a0[3:0]=reg: read sample register

  // ME/MC accelerator opcodes
  localparam logic [7:0] M_LDCUR   = 8'h11; // a0[7:0]=pixel index (row*16+col), a1[31:0]=4 pixels
  localparam logic [7:0] M_LDREF   = 8'h12; // a0[7:0]=row, a0[15:8]=col (mult. of 4), a1=4 pixels
  localparam logic [7:0] M_CLRBEST = 8'h13; // reset best costs
  localparam logic [7:0] M_SADCAND = 8'h14; // a0[7:0]=mvx, a0[15:8]=mvy (signed): SAD, tree, compare
  localparam logic [7:0] M_GETBEST = 8'h15; // a0[5:0]=partition: returns {mv, cost}
  localparam logic [7:0] M_GETCOST = 8'h16; // a0[5:0]=partition: cost of last candidate
  localparam logic [7:0] M_6TAB    = 8'h17; // a0[7:0]=row, a0[15:8]=col: 6-tap on ref row
  localparam logic [7:0] M_SETPMV  = 8'h18; // a0[7:0]=pmvx, a0[15:8]=pmvy, a1[7:0]=lambda
  localparam logic [7:0] M_MVCE    = 8'h19; // a0[7:0]=mvx, a0[15:8]=mvy: motion-vector cost
  localparam logic [7:0] M_STMV    = 8'h1A; // a0[7:0]=MB column: store best 16x16 MV in the row buffer
  localparam logic [7:0] M_PMV     = 8'h1B; // a0[7:0]=MB column, a0[8]=new row: median predictor

  // Parsing accelerator opcodes
  localparam logic [7:0] P_PUSH    = 8'h21; // a1 = next 32 bitstream bits (MSB first)
  localparam logic [7:0] P_FBITOP  = 8'h22; // a0[5:0] = n (1..32): read n bits
  localparam logic [7:0] P_EXPBITOP= 8'h23; // a0[0] = signed: read ue(v) / se(v)
  localparam logic [7:0] P_CLZ     = 8'h24; // count leading zeros of next 32 bits (peek)
  localparam logic [7:0] P_LEVEL   = 8'h25; // returns buffered bit count
  localparam logic [7:0] P_VTMATCH = 8'h26; // a0[1:0] = table: match next bits, returns {len, value}
  localparam logic [7:0] P_RLREORDER=8'h27; // a0[4:0] = total coeffs, a0[8] = start at 1
  localparam logic [7:0] P_T1DEC   = 8'h28; // a0[1:0] = trailing ones: read signs into levels
  localparam logic [7:0] P_VTLOAD  = 8'h29; // a0[5:0] entry, a0[9:8] table, a0[20:16] len, a1 = {value, code}
  localparam logic [7:0] P_SETLEVEL= 8'h2A; // a0[3:0] = index, a1[15:0] = level
  localparam logic [7:0] P_SETRUN  = 8'h2B; // a0[3:0] = index, a1[3:0] = run before
  localparam logic [7:0] P_GETCOEF = 8'h2C; // a0[3:0] = scan position: reordered coefficient
  localparam logic [7:0] P_IWR     = 8'h2D; // a0[7:0] = address, a0[8] = upper half, a1 = instruction word half
  localparam logic [7:0] P_RUN     = 8'h2E; // a0[7:0] = start address: run the program, answer r1 at HALT
  localparam logic [7:0] P_GETREG  = 8'h2F; // a0[3:0] = sequencer register
  localparam logic [7:0] P_SETREG  = 8'h30; // a0[3:0] = sequencer register, a1 = value

endpackage
