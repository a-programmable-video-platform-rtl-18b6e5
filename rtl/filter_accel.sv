// filter_accel: filtering accelerator (weighted summations for transform,
// quantization, intra prediction and deblocking tasks).
//
// N_COPIES filter_6tap datapaths share a register file of N_REGS signed 16-bit
// samples; each copy has its own six programmable weights. Commands (acc_cmd_t,
// opcodes F_* in vp_pkg):
//   F_SETW    set weight a0[4:2] of copy a0[1:0] (or of all copies if a0[8]) to a1[7:0]
//   F_SETX    load sample register a0[3:0] with a1[15:0]
//   F_6TAB    copy c filters x[base + c*stride + k], k = 0..5 (indices mod N_REGS),
//             base a0[3:0], stride a0[7:4], shift a0[11:8]; results to y[c].
//             stride 1 with common weights gives N_COPIES outputs of a 6-tap FIR;
//             stride 0 with one matrix row per copy gives a 4-point transform.
//   F_QUANT   y[c] = sign(x)*((|x|*scale + offset) >> shift) for x = x[base+c]
//   F_REORDER reorders the 16 sample registers in 4x4 zigzag order
//   F_GETY / F_GETX  read y[a0[1:0]] / x[a0[3:0]]
// Every command is accepted in one cycle (cmd_ready = 1) and answered the next
// cycle with its tag; F_6TAB and F_QUANT answer y[0]. Four copies and the
// weighted-summation, quantization and pixel-reorder operations follow the
// accelerator description; the encoding and quantizer form are this design's.
module filter_accel
  import vp_pkg::*;
#(
  parameter int N_COPIES = 4,
  parameter int N_REGS   = 16,
  parameter int TAG_W    = 2
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
  localparam int RW = $clog2(N_REGS);
  localparam int KW = (N_COPIES > 1) ? $clog2(N_COPIES) : 1;
  localparam int ZZ [16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};

  logic signed [15:0] x [N_REGS];
  logic signed [7:0]  w [N_COPIES][6];
  logic signed [31:0] y [N_COPIES];

  logic signed [15:0] fx [N_COPIES][6];
  logic signed [26:0] fy [N_COPIES];
  logic signed [31:0] qy [N_COPIES];

  wire [RW-1:0] base   = cmd.a0[RW-1:0];
  wire [3:0]    stride = cmd.a0[7:4];

  for (genvar c = 0; c < N_COPIES; c++) begin : g_copy
    always_comb begin
      for (int k = 0; k < 6; k++)
        fx[c][k] = x[RW'(int'(base) + c*int'(stride) + k)];
    end
    filter_6tap #(.DW(16), .CW(8)) u_f (.x(fx[c]), .w(w[c]), .shift({1'b0, cmd.a0[11:8]}), .y(fy[c]));

    // quantizer on x[base + c]
    always_comb begin
      automatic logic signed [15:0] xv  = x[RW'(int'(base) + c)];
      automatic logic        [15:0] ax  = xv[15] ? 16'(-xv) : 16'(xv);
      automatic logic        [47:0] pr  = 48'(ax) * 48'(cmd.a0[31:16]) + 48'(cmd.a1);
      automatic logic        [31:0] mag = 32'(pr >> cmd.a0[12:8]);
      qy[c] = xv[15] ? -$signed(mag) : $signed(mag);
    end
  end

  assign cmd_ready = 1'b1;
  wire go = cmd_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N_REGS; r++) x[r] <= '0;
      for (int c = 0; c < N_COPIES; c++) begin
        y[c] <= '0;
        for (int k = 0; k < 6; k++) w[c][k] <= '0;
      end
      rsp_valid <= 1'b0;
      rsp_tag   <= '0;
      rsp_data  <= '0;
    end else begin
      rsp_valid <= go;
      if (go) begin
        rsp_tag  <= cmd_tag;
        rsp_data <= '0;
        unique case (cmd.op)
          F_SETW: for (int c = 0; c < N_COPIES; c++)
                    if (cmd.a0[8] || cmd.a0[KW-1:0] == KW'(c)) w[c][cmd.a0[4:2]] <= cmd.a1[7:0];
          F_SETX: x[cmd.a0[RW-1:0]] <= cmd.a1[15:0];
          F_6TAB: begin
            for (int c = 0; c < N_COPIES; c++) y[c] <= 32'(fy[c]);
            rsp_data <= 32'(fy[0]);
          end
          F_QUANT: begin
            for (int c = 0; c < N_COPIES; c++) y[c] <= qy[c];
            rsp_data <= qy[0];
          end
          F_REORDER: if (N_REGS == 16) for (int i = 0; i < 16; i++) x[i] <= x[ZZ[i]];
          F_GETY: rsp_data <= y[cmd.a0[KW-1:0]];
          F_GETX: rsp_data <= 32'(x[cmd.a0[RW-1:0]]);
          default: ;
        endcase
      end
    end
  end
endmodule
