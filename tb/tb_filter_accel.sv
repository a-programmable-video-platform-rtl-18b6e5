// tb_filter_accel: self-checking test of the filtering accelerator. Programs the
// H.264 half-pel weights into all copies and checks four FIR outputs per F_6TAB;
// programs the rows of the 4x4 forward integer transform matrix (one per copy,
// stride 0) and checks a 4-point transform per cycle; checks F_QUANT against the
// H.264-style quantizer, F_REORDER against the zigzag order, and the one-cycle
// response latency.
module tb_filter_accel;
  import vp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic rst_n, cmd_valid, cmd_ready, rsp_valid;
  acc_cmd_t cmd;
  logic [1:0] cmd_tag, rsp_tag;
  logic [31:0] rsp_data;
  filter_accel #(.N_COPIES(4), .N_REGS(16), .TAG_W(2)) dut (.*);

  int xs [16];
  localparam int ZZ [16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};

  task automatic send(input logic [7:0] op, input logic [31:0] a0, input logic [31:0] a1,
                      output logic [31:0] r);
    cmd_valid = 1; cmd = '{op: op, a0: a0, a1: a1}; cmd_tag = 2'($urandom);
    @(negedge clk);
    cmd_valid = 0;
    chk(rsp_valid && rsp_tag == cmd_tag, "response next cycle with tag");
    r = rsp_data;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    int hp [6] = '{1, -5, 20, 20, -5, 1};
    int tm [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
    rst_n = 0; cmd_valid = 0; cmd = '0; cmd_tag = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    // FIR mode
    for (int k = 0; k < 6; k++) send(F_SETW, 32'h100 | 32'(k << 2), 32'(hp[k]), r);
    for (int t = 0; t < 20; t++) begin
      int base;
      for (int i = 0; i < 16; i++) begin xs[i] = $urandom % 256; send(F_SETX, i, xs[i], r); end
      base = $urandom % 16;
      send(F_6TAB, 32'(base) | (1 << 4) | (5 << 8), 0, r);
      for (int c = 0; c < 4; c++) begin
        automatic int s = 0;
        for (int k = 0; k < 6; k++) s += hp[k] * xs[(base + c + k) % 16];
        s = (s + 16) >>> 5;
        send(F_GETY, c, 0, r);
        chk($signed(r) == s, $sformatf("FIR out %0d base %0d: got %0d exp %0d", c, base, $signed(r), s));
      end
    end
    // transform mode: copy c holds row c of the matrix, taps 4,5 zero
    for (int c = 0; c < 4; c++)
      for (int k = 0; k < 6; k++) send(F_SETW, 32'(c) | 32'(k << 2), (k < 4) ? 32'(tm[c][k]) : 0, r);
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < 16; i++) begin xs[i] = int'($urandom % 511) - 255; send(F_SETX, i, 32'(xs[i]), r); end
      send(F_6TAB, 32'(4 * (t % 4)), 0, r);
      for (int c = 0; c < 4; c++) begin
        automatic int s = 0;
        for (int k = 0; k < 4; k++) s += tm[c][k] * xs[(4 * (t % 4) + k) % 16];
        send(F_GETY, c, 0, r);
        chk($signed(r) == s, "transform output");
      end
    end
    // quantization: scale 13107, shift 15, offset 2^15/3
    begin
      automatic int sc = 13107, sh = 15, off = 10923;
      send(F_QUANT, 32'(sc << 16) | 32'(sh << 8) | 0, off, r);
      for (int c = 0; c < 4; c++) begin
        automatic int a = xs[c] < 0 ? -xs[c] : xs[c];
        automatic int q = (a * sc + off) >> sh;
        if (xs[c] < 0) q = -q;
        send(F_GETY, c, 0, r);
        chk($signed(r) == q, $sformatf("quant %0d: x=%0d got %0d exp %0d", c, xs[c], $signed(r), q));
      end
    end
    // zigzag reorder
    send(F_REORDER, 0, 0, r);
    for (int i = 0; i < 16; i++) begin
      send(F_GETX, i, 0, r);
      chk($signed(r[15:0]) == 16'(xs[ZZ[i]]), "zigzag reorder");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
