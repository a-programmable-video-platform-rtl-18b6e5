// parse_accel: command-driven datapath of the parsing accelerator.
//
// Holds up to 64 not-yet-parsed bitstream bits, left aligned (bit 63 is the next
// bit), refilled 32 bits at a time by P_PUSH, and implements the custom bit and
// entropy-decoding operations of the parsing accelerator. Each command takes one
// cycle and answers the next cycle (cmd_ready is 1 unless a program runs):
//   P_FBITOP n   read the next n bits (1..32) as an unsigned number
//   P_EXPBITOP s read one Exp-Golomb code: ue(v) = 2^lz - 1 + next lz bits, where
//                lz is the number of leading zeros; se(v) maps k to (-1)^(k+1)*ceil(k/2)
//   P_CLZ        count the leading zeros of the next 32 bits without consuming them
//   P_LEVEL      number of buffered bits
//   P_VTMATCH t  variable-length table matching: the N_VLC-entry code table holds
//                entries {table, len, code, value}; all entries of table t whose
//                len-bit code equals the next len bits are compared in parallel, the
//                lowest-numbered match wins, its len bits are consumed and
//                {len, value} is answered. P_VTLOAD writes one entry (len 0 = empty),
//                so the cores load whatever VLC tables the codec needs (CAVLC
//                coeff_token, total_zeros, run_before, ...).
//   P_T1DEC t    trailing-ones decoding (H.264 CAVLC): reads t (0..3) sign bits and
//                writes level[k] = +1 (bit 0) or -1 (bit 1) for k < t; answers the bits.
//   P_SETLEVEL / P_SETRUN  fill the level and run-before register files.
//   P_RLREORDER n, s  run-level reordering: level[0..n-1] and run[0..n-1] hold the
//                coefficients from the highest frequency down, as CAVLC sends them;
//                coefficient i goes to scan position s + sum_{j>=i}(run[j]+1) - 1,
//                every other position becomes 0. Answers the highest position used (0 if n
//                is 0), or all ones (nothing written) if a position would pass 15.
//   P_GETCOEF p  read the reordered coefficient at scan position p.
// An operation that needs more bits than are buffered, or finds no table match,
// consumes nothing and answers all ones; P_PUSH into a buffer holding more than
// 32 bits is refused the same way.
// The operations (fixed-length, Exp-Golomb, leading zeros, table matching,
// run-level reorder, trailing ones) follow the parsing accelerator's command list;
// the buffer, refill command, loadable code table, register files, encodings and
// error convention are this design's.
//
// VLIW sequencer. The same operations can also be run by the accelerator's own
// program: N_IMEM 64-bit instructions (written by P_IWR in two halves) and
// sixteen 32-bit registers r0..r15 (P_SETREG / P_GETREG). P_RUN a starts at
// address a; cmd_ready is low while the program runs, one instruction per cycle,
// and the command is answered with r1 (as it stands before the halting
// instruction) when an instruction executes HALT. Bits [63:60] give the format:
//   0xxx  two 12-bit condition slots C0 [59:48], C1 [47:36] and two 18-bit
//         execution slots E0 [35:18], E1 [17:0]. Low bits 00: E0 if C0, E1 if C1;
//         01: E0 if (C0 and C1) else E1; 10: E0 if (C0 or C1) else E1.
//   1xxx  one condition slot C [59:48] and two 24-bit execution slots E0 [47:24],
//         E1 [23:0]. Low bits 00: E0 if C else E1; 01: both if C; 10: E0 if C, E1
//         always.
// Condition slot {op[11:9], ra[8:5], k[4:0]}: 0 true, 1 r[ra]==0, 2 r[ra]!=0,
// 3 r[ra]<k, 4 r[ra]>=k, 5 r[ra]==k, 6 r[ra]!=k, 7 fewer than k bits buffered.
// Execution slot {op[5 bits], rd[4 bits], f} with f the remaining 9 or 15 bits
// (sign-extended as an immediate): 0 NOP, 1 LI rd=f, 2 ADDI rd+=f, 3 ADD rd+=r[f],
// 4 SUB rd-=r[f], 5 SHLI rd<<=f, 6 ANDI rd&=f, 7 MOV rd=r[f], 8 J f, 9 HALT;
// bitstream and coefficient operations, the answer going to rd: 16 FBIT f bits,
// 17 UE, 18 SE, 19 CLZ, 20 VTM table f, 21 T1 r[f] trailing ones,
// 22 SETLV level[r[f]]=r[rd], 23 SETRN run[r[f]]=r[rd], 24 RLR n=r[f] (f bit 8 =
// start at 1), 25 FBITR r[f] bits, 26 GETCF coef[r[f]]. Only one of these
// reaches the datapath per instruction: the first active slot that holds one
// (E0 before E1). If both slots write the same register, E1 wins. Two condition
// slots and a 4-bit format field in a 64-bit word follow the document's
// description of the accelerator's instruction set; the slot encodings and the
// operation numbers are this design's.
module parse_accel
  import vp_pkg::*;
#(
  parameter int TAG_W = 2,
  parameter int N_VLC = 64,
  parameter int N_IMEM = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  input  acc_cmd_t         cmd,
  input  logic [TAG_W-1:0] cmd_tag,
  output logic             cmd_ready,
  output logic             rsp_valid,
  output logic [TAG_W-1:0] rsp_tag,
  output logic [31:0]      rsp_data
);
  localparam int VW = $clog2(N_VLC);
  localparam int IW = $clog2(N_IMEM);

  logic [63:0] bits;
  logic [6:0]  nbits;

  // code table
  logic [1:0]  vt_tab  [N_VLC];
  logic [4:0]  vt_len  [N_VLC];    // 0 = empty, else 1..16
  logic [15:0] vt_code [N_VLC];    // right aligned
  logic [15:0] vt_val  [N_VLC];

  // run-level register files and reordered coefficients
  logic signed [15:0] level [16];
  logic [3:0]         run   [16];
  logic signed [15:0] coef  [16];

  // sequencer
  logic [63:0]       imem [N_IMEM];
  logic [31:0]       gr   [16];
  logic [IW-1:0]     pc;
  logic              running;
  logic [TAG_W-1:0]  run_tag;

  typedef struct packed {
    logic [4:0]  op;
    logic [3:0]  rd;
    logic [14:0] f;
  } slot_t;

  logic [63:0] ins_r;                       // code memory read port
  wire  [63:0] ins = running ? ins_r : 64'd0;

  function automatic logic cond_eval(input logic [11:0] c, input logic [31:0] rv,
                                     input logic [6:0] nb);
    unique case (c[11:9])
      3'd0: return 1'b1;
      3'd1: return rv == 0;
      3'd2: return rv != 0;
      3'd3: return rv < 32'(c[4:0]);
      3'd4: return rv >= 32'(c[4:0]);
      3'd5: return rv == 32'(c[4:0]);
      3'd6: return rv != 32'(c[4:0]);
      default: return nb < 7'(c[4:0]);
    endcase
  endfunction

  logic  c0, c1, act0, act1;
  slot_t e0, e1;
  always_comb begin
    c0 = cond_eval(ins[59:48], gr[ins[56:53]], nbits);
    c1 = cond_eval(ins[47:36], gr[ins[44:41]], nbits);
    if (!ins[63]) begin
      e0 = {ins[35:31], ins[30:27], {6{ins[26]}}, ins[26:18]};
      e1 = {ins[17:13], ins[12:9],  {6{ins[8]}},  ins[8:0]};
      unique case (ins[61:60])
        2'b01:   begin act0 = c0 && c1;  act1 = !(c0 && c1); end
        2'b10:   begin act0 = c0 || c1;  act1 = !(c0 || c1); end
        default: begin act0 = c0;        act1 = c1;          end
      endcase
    end else begin
      e0 = ins[47:24];
      e1 = ins[23:0];
      unique case (ins[61:60])
        2'b01:   begin act0 = c0;  act1 = c0;   end
        2'b10:   begin act0 = c0;  act1 = 1'b1; end
        default: begin act0 = c0;  act1 = !c0;  end
      endcase
    end
  end

  // datapath request from the program: first active slot with op >= 16
  wire   dp0 = act0 && e0.op[4];
  wire   dp1 = act1 && e1.op[4] && !dp0;
  slot_t ds;
  assign ds = dp0 ? e0 : e1;
  wire   [31:0] ds_r = gr[ds.f[3:0]];
  logic  [7:0]  s_op;
  logic  [31:0] s_a0, s_a1;
  logic         s_wr;     // the answer is written to ds.rd
  always_comb begin
    s_op = 8'h00; s_a0 = '0; s_a1 = '0; s_wr = 1'b1;
    unique case (ds.op)
      5'd16: begin s_op = P_FBITOP;   s_a0 = 32'(ds.f[5:0]); end
      5'd17: begin s_op = P_EXPBITOP; s_a0 = 32'd0; end
      5'd18: begin s_op = P_EXPBITOP; s_a0 = 32'd1; end
      5'd19: s_op = P_CLZ;
      5'd20: begin s_op = P_VTMATCH;  s_a0 = 32'(ds.f[1:0]); end
      5'd21: begin s_op = P_T1DEC;    s_a0 = ds_r; end
      5'd22: begin s_op = P_SETLEVEL; s_a0 = ds_r; s_a1 = gr[ds.rd]; s_wr = 1'b0; end
      5'd23: begin s_op = P_SETRUN;   s_a0 = ds_r; s_a1 = gr[ds.rd]; s_wr = 1'b0; end
      5'd24: begin s_op = P_RLREORDER; s_a0 = {23'd0, ds.f[8], 3'd0, ds_r[4:0]}; end
      5'd25: begin s_op = P_FBITOP;   s_a0 = ds_r; end
      5'd26: begin s_op = P_GETCOEF;  s_a0 = ds_r; end
      default: s_wr = 1'b0;
    endcase
    if (!(dp0 || dp1)) s_wr = 1'b0;
  end

  // operation presented to the datapath: the program's while running, else the command
  wire        d_v  = running ? (dp0 || dp1) : cmd_valid;
  wire [7:0]  d_op = running ? s_op : cmd.op;
  wire [31:0] d_a0 = running ? s_a0 : cmd.a0;
  wire [31:0] d_a1 = running ? s_a1 : cmd.a1;

  function automatic logic [31:0] alu(input slot_t e, input logic [31:0] rdv,
                                      input logic [31:0] rsv);
    automatic logic [31:0] imm = 32'(signed'(e.f));
    unique case (e.op)
      5'd1: return imm;
      5'd2: return rdv + imm;
      5'd3: return rdv + rsv;
      5'd4: return rdv - rsv;
      5'd5: return rdv << e.f[4:0];
      5'd6: return rdv & 32'(e.f);
      default: return rsv;      // 7: MOV
    endcase
  endfunction
  wire alu0 = act0 && e0.op >= 5'd1 && e0.op <= 5'd7;
  wire alu1 = act1 && e1.op >= 5'd1 && e1.op <= 5'd7;
  wire jmp0 = act0 && e0.op == 5'd8;
  wire jmp1 = act1 && e1.op == 5'd8;
  wire halt = (act0 && e0.op == 5'd9) || (act1 && e1.op == 5'd9);

  // code memory: written by P_IWR, read one cycle ahead at the next pc
  logic [IW-1:0] pc_nxt;
  always_comb begin
    if (!running) pc_nxt = (cmd_valid && cmd.op == P_RUN) ? cmd.a0[IW-1:0] : pc;
    else          pc_nxt = jmp1 ? e1.f[IW-1:0] : jmp0 ? e0.f[IW-1:0] : pc + IW'(1);
  end
  wire iwr = !running && cmd_valid && cmd.op == P_IWR;
  always_ff @(posedge clk) begin
    if (iwr && cmd.a0[8])  imem[cmd.a0[IW-1:0]][63:32] <= cmd.a1;
    if (iwr && !cmd.a0[8]) imem[cmd.a0[IW-1:0]][31:0]  <= cmd.a1;
    ins_r <= imem[pc_nxt];
  end

  // leading zeros of the whole buffer (64 when empty of ones)
  logic [6:0] lz;
  always_comb begin
    lz = 7'd64;
    for (int i = 0; i < 64; i++)
      if (bits[i]) lz = 7'(63 - i);
  end

  wire [6:0]  n      = {1'b0, d_a0[5:0]};
  wire [6:0]  eg_len = {lz[5:0], 1'b1} ;            // 2*lz + 1
  wire [63:0] eg_raw = bits >> (7'd64 - eg_len);      // lz zeros, '1', lz info bits
  wire [31:0] ue     = 32'(eg_raw) - 32'd1;
  wire [31:0] se_mag = (ue + 32'd1) >> 1;
  wire [31:0] se     = ue[0] ? se_mag : -se_mag;

  // parallel table match
  logic          vm_hit;
  logic [VW-1:0] vm_idx;
  always_comb begin
    vm_hit = 1'b0;
    vm_idx = '0;
    for (int e = N_VLC - 1; e >= 0; e--) begin
      automatic logic [15:0] nxt = 16'(bits[63:48] >> (5'd16 - vt_len[e]));
      if (vt_len[e] != 0 && vt_tab[e] == d_a0[1:0] && 7'(vt_len[e]) <= nbits &&
          nxt == vt_code[e]) begin
        vm_hit = 1'b1;
        vm_idx = VW'(e);
      end
    end
  end

  // run-level placement: position of coefficient i for total n_tot, start s
  wire [4:0] n_tot = d_a0[4:0];
  logic [5:0] rl_pos [16];
  logic       rl_ok;
  always_comb begin
    automatic logic [5:0] acc = 6'(d_a0[8]);
    rl_ok = (n_tot <= 5'd16);
    for (int i = 15; i >= 0; i--) begin
      rl_pos[i] = '0;
      if (5'(i) < n_tot) begin
        acc       = acc + 6'(run[i]) + 6'd1;
        rl_pos[i] = acc - 6'd1;
        if (rl_pos[i] > 6'd15) rl_ok = 1'b0;
      end
    end
  end

  wire [1:0] t1 = d_a0[1:0];

  assign cmd_ready = !running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits      <= '0;
      nbits     <= '0;
      rsp_valid <= 1'b0;
      rsp_tag   <= '0;
      rsp_data  <= '0;
      for (int e = 0; e < N_VLC; e++) begin
        vt_tab[e] <= '0; vt_len[e] <= '0; vt_code[e] <= '0; vt_val[e] <= '0;
      end
      for (int i = 0; i < 16; i++) begin
        level[i] <= '0; run[i] <= '0; coef[i] <= '0; gr[i] <= '0;
      end
      pc      <= '0;
      running <= 1'b0;
      run_tag <= '0;
    end else begin
      automatic logic [31:0] r = '1;
      rsp_valid <= 1'b0;
      if (d_v) begin
        unique case (d_op)
          P_PUSH: if (nbits <= 7'd32) begin
            bits     <= bits | ({d_a1, 32'd0} >> nbits);
            nbits    <= nbits + 7'd32;
            r = '0;
          end
          P_FBITOP: if (n != 0 && n <= 7'd32 && n <= nbits) begin
            r = 32'(bits >> (7'd64 - n));
            bits     <= bits << n;
            nbits    <= nbits - n;
          end
          P_EXPBITOP: if (lz < 7'd32 && eg_len <= nbits) begin
            r = d_a0[0] ? se : ue;
            bits     <= bits << eg_len;
            nbits    <= nbits - eg_len;
          end
          P_CLZ:   r = (lz > 7'd32) ? 32'd32 : 32'(lz);
          P_LEVEL: r = 32'(nbits);
          P_VTLOAD: begin
            vt_tab[d_a0[VW-1:0]]  <= d_a0[9:8];
            vt_len[d_a0[VW-1:0]]  <= (d_a0[20:16] > 5'd16) ? 5'd16 : d_a0[20:16];
            vt_code[d_a0[VW-1:0]] <= d_a1[15:0];
            vt_val[d_a0[VW-1:0]]  <= d_a1[31:16];
            r = '0;
          end
          P_VTMATCH: if (vm_hit) begin
            r = {11'd0, vt_len[vm_idx], vt_val[vm_idx]};
            bits     <= bits << vt_len[vm_idx];
            nbits    <= nbits - 7'(vt_len[vm_idx]);
          end
          P_T1DEC: if (7'(t1) <= nbits) begin
            for (int k = 0; k < 3; k++)
              if (2'(k) < t1) level[k] <= bits[63 - k] ? -16'sd1 : 16'sd1;
            r = 32'(bits[63:61] >> (2'd3 - t1));
            bits     <= bits << t1;
            nbits    <= nbits - 7'(t1);
          end
          P_SETLEVEL: begin level[d_a0[3:0]] <= d_a1[15:0]; r = '0; end
          P_SETRUN:   begin run[d_a0[3:0]]   <= d_a1[3:0];  r = '0; end
          P_RLREORDER: if (rl_ok) begin
            for (int p = 0; p < 16; p++) begin
              automatic logic signed [15:0] v = '0;
              for (int i = 0; i < 16; i++)
                if (5'(i) < n_tot && rl_pos[i] == 6'(p)) v = level[i];
              coef[p] <= v;
            end
            r = (n_tot == 0) ? 32'd0 : 32'(rl_pos[0]);
          end
          P_GETCOEF: r = 32'(coef[d_a0[3:0]]);
          P_IWR: r = '0;
          P_SETREG: if (!running) begin gr[d_a0[3:0]] <= d_a1; r = '0; end
          P_GETREG: r = gr[d_a0[3:0]];
          default: ;
        endcase
      end
      if (!running) begin
        if (cmd_valid) begin
          rsp_tag <= cmd_tag;
          if (cmd.op == P_RUN) begin
            running <= 1'b1;
            pc      <= pc_nxt;
            run_tag <= cmd_tag;
          end else begin
            rsp_valid <= 1'b1;
            rsp_data  <= r;
          end
        end
      end else begin
        if (alu0) gr[e0.rd] <= alu(e0, gr[e0.rd], gr[e0.f[3:0]]);
        if (s_wr && dp0) gr[ds.rd] <= r;
        if (alu1) gr[e1.rd] <= alu(e1, gr[e1.rd], gr[e1.f[3:0]]);
        if (s_wr && dp1) gr[ds.rd] <= r;
        pc <= pc_nxt;
        if (halt) begin
          running   <= 1'b0;
          rsp_valid <= 1'b1;
          rsp_tag   <= run_tag;
          rsp_data  <= gr[1];
        end
      end
    end
  end

  a_level_bound: assert property (@(posedge clk) disable iff (!rst_n) nbits <= 7'd64);
endmodule
