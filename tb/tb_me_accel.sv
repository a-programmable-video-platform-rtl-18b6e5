// tb_me_accel: self-checking test of the ME/MC accelerator at its full [-64,+64]
// search range (144x144 reference buffer). Loads a generated reference window and
// a current macroblock cut from it at motion vector (+5,-3) with a few pixels
// changed, evaluates a set of candidates (including the true one and the window
// corners), and checks each candidate's 16x16 cost and all 41 partition costs
// against a reference, the 18-cycle candidate latency, the best cost and MV per
// partition, and the 6-tap half-pel interpolation. Then sets a vector predictor
// and lambda, checks M_MVCE and repeats the candidates with the vector cost added,
// and checks the motion-vector row buffer and its median predictor over two rows.
module tb_me_accel;
  import vp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int SR = 64, WIN = 16 + 2*SR;
  logic rst_n, cmd_valid, cmd_ready, rsp_valid;
  acc_cmd_t cmd;
  logic [1:0] cmd_tag, rsp_tag;
  logic [31:0] rsp_data;
  me_accel #(.SR(SR), .TAG_W(2)) dut (.*);

  function automatic int pix(input int r, input int c);
    return (r * 7 + c * 13 + ((r * c) % 17) * 5) & 255;
  endfunction
  int curp [16][16];
  int bestc [41];
  int bestmv [41];

  task automatic send(input logic [7:0] op, input logic [31:0] a0, input logic [31:0] a1,
                      output logic [31:0] r, output int lat);
    cmd_valid = 1; cmd = '{op: op, a0: a0, a1: a1}; cmd_tag = 2'($urandom);
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 cmd_valid = 0;
    lat = 0;
    while (!rsp_valid) begin @(posedge clk); #1; lat++; end
    chk(rsp_tag == cmd_tag, "tag returned");
    r = rsp_data;
  endtask

  function automatic void ref_costs(input int mvx, input int mvy, output int cst [41]);
    int s4 [16];
    for (int b = 0; b < 16; b++) s4[b] = 0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
      automatic int d = curp[r][c] - pix(SR + mvy + r, SR + mvx + c);
      s4[4*(r/4) + c/4] += (d < 0) ? -d : d;
    end
    for (int b = 0; b < 16; b++) cst[b] = s4[b];
    for (int r = 0; r < 4; r++) for (int h = 0; h < 2; h++) cst[16+2*r+h] = s4[4*r+2*h] + s4[4*r+2*h+1];
    for (int rr = 0; rr < 2; rr++) for (int c = 0; c < 4; c++) cst[24+4*rr+c] = s4[8*rr+c] + s4[8*rr+4+c];
    for (int q = 0; q < 4; q++) cst[32+q] = s4[8*(q/2)+2*(q%2)] + s4[8*(q/2)+2*(q%2)+1] +
                                            s4[8*(q/2)+2*(q%2)+4] + s4[8*(q/2)+2*(q%2)+5];
    cst[36] = cst[32] + cst[33]; cst[37] = cst[34] + cst[35];
    cst[38] = cst[32] + cst[34]; cst[39] = cst[33] + cst[35];
    cst[40] = cst[36] + cst[37];
  endfunction

  // se(v) code length of a vector difference, times lambda = 4, predictor (2,-1)
  function automatic int se_len(input int d);
    automatic int k1 = (d > 0) ? 2 * d : -2 * d + 1;
    automatic int lg = 0;
    while ((k1 >> (lg + 1)) != 0) lg++;
    return 2 * lg + 1;
  endfunction
  function automatic int med(input int a, input int b, input int c);
    if ((a >= b) == (b >= c)) return b;
    if ((b >= a) == (a >= c)) return a;
    return c;
  endfunction
  function automatic int ref_mvc(input int mx, input int my);
    return 4 * (se_len(mx - 2) + se_len(my + 1));
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    int lat;
    int cand [14][2] = '{'{5, -3}, '{0, 0}, '{4, -3}, '{5, -2}, '{-64, -64}, '{64, 64},
                         '{-64, 64}, '{64, -64}, '{6, -4}, '{-10, 20}, '{5, -3}, '{1, 1},
                         '{33, -17}, '{-1, 0}};
    rst_n = 0; cmd_valid = 0; cmd = '0; cmd_tag = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int rr = 0; rr < WIN; rr++)
      for (int c = 0; c < WIN; c += 4)
        send(M_LDREF, 32'(rr) | 32'(c << 8),
             {8'(pix(rr, c+3)), 8'(pix(rr, c+2)), 8'(pix(rr, c+1)), 8'(pix(rr, c))}, r, lat);
    for (int rr = 0; rr < 16; rr++)
      for (int c = 0; c < 16; c++) begin
        curp[rr][c] = pix(SR - 3 + rr, SR + 5 + c);
        if ((rr * 16 + c) % 37 == 0) curp[rr][c] = (curp[rr][c] + 9) & 255;
      end
    for (int rr = 0; rr < 16; rr++)
      for (int c = 0; c < 16; c += 4)
        send(M_LDCUR, 32'(rr * 16 + c),
             {8'(curp[rr][c+3]), 8'(curp[rr][c+2]), 8'(curp[rr][c+1]), 8'(curp[rr][c])}, r, lat);
    send(M_CLRBEST, 0, 0, r, lat);
    for (int p = 0; p < 41; p++) begin bestc[p] = 65535; bestmv[p] = 0; end
    for (int k = 0; k < 14; k++) begin
      int cst [41];
      ref_costs(cand[k][0], cand[k][1], cst);
      send(M_SADCAND, {16'd0, 8'(cand[k][1]), 8'(cand[k][0])}, 0, r, lat);
      chk(r == 32'(cst[40]), $sformatf("16x16 cost mv(%0d,%0d): got %0d exp %0d", cand[k][0], cand[k][1], r, cst[40]));
      chk(lat == 18, $sformatf("candidate latency %0d", lat));
      for (int p = 0; p < 41; p++) begin
        if (cst[p] < bestc[p]) begin bestc[p] = cst[p]; bestmv[p] = {8'(cand[k][1]), 8'(cand[k][0])}; end
        send(M_GETCOST, p, 0, r, lat);
        chk(r == 32'(cst[p]), $sformatf("partition %0d cost", p));
      end
    end
    for (int p = 0; p < 41; p++) begin
      send(M_GETBEST, p, 0, r, lat);
      chk(r[15:0] == 16'(bestc[p]) && r[31:16] == 16'(bestmv[p]), $sformatf("best of partition %0d", p));
    end
    send(M_GETBEST, 40, 0, r, lat);
    chk(r[31:16] == {8'hFD, 8'h05}, "16x16 best MV is (+5,-3)");
    // half-pel interpolation at row 30, columns 40.5..43.5
    send(M_6TAB, 32'(30) | 32'(40 << 8), 0, r, lat);
    for (int i = 0; i < 4; i++) begin
      automatic int h = pix(30, 38+i) - 5*pix(30, 39+i) + 20*pix(30, 40+i) + 20*pix(30, 41+i)
                        - 5*pix(30, 42+i) + pix(30, 43+i);
      h = (h + 16) >>> 5;
      if (h < 0) h = 0;
      if (h > 255) h = 255;
      chk(r[8*i +: 8] == 8'(h), $sformatf("half-pel %0d", i));
    end
    // motion-vector cost: predictor (2,-1), lambda 4, then the candidates again
    send(M_SETPMV, {16'd0, 8'hFF, 8'd2}, 4, r, lat);
    for (int k = 0; k < 200; k++) begin
      automatic int mx = int'($urandom % 129) - 64, my = int'($urandom % 129) - 64;
      send(M_MVCE, {16'd0, 8'(my), 8'(mx)}, 0, r, lat);
      chk(r == 32'(ref_mvc(mx, my)), $sformatf("mv cost (%0d,%0d): got %0d exp %0d", mx, my, r, ref_mvc(mx, my)));
    end
    send(M_CLRBEST, 0, 0, r, lat);
    for (int p = 0; p < 41; p++) begin bestc[p] = 65535; bestmv[p] = 0; end
    for (int k = 0; k < 14; k++) begin
      int cst [41];
      ref_costs(cand[k][0], cand[k][1], cst);
      for (int p = 0; p < 41; p++) begin
        cst[p] += ref_mvc(cand[k][0], cand[k][1]);
        if (cst[p] > 65535) cst[p] = 65535;
      end
      send(M_SADCAND, {16'd0, 8'(cand[k][1]), 8'(cand[k][0])}, 0, r, lat);
      chk(r == 32'(cst[40]), $sformatf("16x16 cost with mv cost (%0d,%0d)", cand[k][0], cand[k][1]));
      for (int p = 0; p < 41; p++)
        if (cst[p] < bestc[p]) begin bestc[p] = cst[p]; bestmv[p] = {8'(cand[k][1]), 8'(cand[k][0])}; end
    end
    for (int p = 0; p < 41; p++) begin
      send(M_GETBEST, p, 0, r, lat);
      chk(r[15:0] == 16'(bestc[p]) && r[31:16] == 16'(bestmv[p]), $sformatf("best of partition %0d with mv cost", p));
    end
    // motion-vector row buffer and median predictor over two rows of 80 macroblocks
    begin
      automatic int rowx [80], rowy [80];
      automatic int lx = 0, ly = 0;
      for (int c = 0; c < 80; c++) begin rowx[c] = 0; rowy[c] = 0; end
      for (int mbr = 0; mbr < 2; mbr++)
        for (int c = 0; c < 80; c++) begin
          automatic int mx = int'($urandom % 129) - 64, my = int'($urandom % 129) - 64;
          automatic int ax = (c == 0) ? 0 : lx, ay = (c == 0) ? 0 : ly;
          automatic int tx = (c < 79) ? rowx[c + 1] : 0, ty = (c < 79) ? rowy[c + 1] : 0;
          automatic int px = med(ax, rowx[c], tx), py = med(ay, rowy[c], ty);
          send(M_PMV, 32'(c) | ((c == 0) ? 32'h100 : 0), 0, r, lat);
          chk(r[15:0] == {8'(py), 8'(px)}, $sformatf("median predictor row %0d col %0d", mbr, c));
          send(M_SETPMV, {16'd0, 8'(py), 8'(px)}, 0, r, lat);   // lambda 0: pure SAD
          send(M_CLRBEST, 0, 0, r, lat);
          send(M_SADCAND, {16'd0, 8'(my), 8'(mx)}, 0, r, lat);
          send(M_STMV, c, 0, r, lat);
          chk(r[15:0] == {8'(my), 8'(mx)}, "stored vector");
          rowx[c] = mx; rowy[c] = my; lx = mx; ly = my;
        end
      // the predictor is also the reference of M_MVCE
      send(M_PMV, 5, 0, r, lat);
      send(M_MVCE, {16'd0, r[15:8], r[7:0]}, 0, r, lat);
      chk(r == 0, "lambda 0 gives no vector cost");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
