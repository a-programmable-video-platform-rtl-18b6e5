// tb_parse_accel: self-checking test of the parsing accelerator's bit operations.
// Builds a random bitstream of fixed-length fields and ue(v)/se(v) Exp-Golomb codes
// with a reference encoder, feeds it 32 bits at a time, parses it back with
// P_FBITOP / P_EXPBITOP and checks every value, P_CLZ, P_LEVEL and the refusal of
// a read that needs more bits than are buffered. Then loads three code tables and
// matches a random symbol stream with P_VTMATCH (and an empty table), decodes
// trailing-ones signs with P_T1DEC, and checks P_RLREORDER against a reference
// placement of random level/run sets, including a refused overflowing one.
// Finally loads programs into the VLIW sequencer: a loop that sums a random
// number of ue(v) codes, a run of both instruction formats and all their slot
// relations and condition kinds against a reference, and a variable-length read
// (a 4-bit length followed by that many bits) plus an se(v) code.
module tb_parse_accel;
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
  parse_accel #(.TAG_W(2)) dut (.*);

  bit stream [$];
  typedef struct { int kind; int n; int val; } item_t;   // kind 0 fixed, 1 ue, 2 se
  item_t items [$];
  int pos = 0;
  int vl2 [7] = '{2, 2, 3, 3, 3, 4, 4};
  int vc2 [7] = '{3, 2, 3, 2, 1, 1, 0};   // 11 10 011 010 001 0001 0000

  task automatic put_bits(input longint v, input int n);
    for (int i = n - 1; i >= 0; i--) stream.push_back(v[i]);
  endtask
  task automatic put_ue(input int k);
    automatic longint v = longint'(k) + 1;
    automatic int len = 0;
    while ((v >> len) > 1) len++;
    put_bits(0, len);
    put_bits(v, len + 1);
  endtask

  task automatic send(input logic [7:0] op, input logic [31:0] a0, input logic [31:0] a1,
                      output logic [31:0] r);
    cmd_valid = 1; cmd = '{op: op, a0: a0, a1: a1}; cmd_tag = 2'($urandom);
    @(negedge clk);
    cmd_valid = 0;
    chk(rsp_valid && rsp_tag == cmd_tag, "response next cycle");
    r = rsp_data;
  endtask

  task automatic refill();
    logic [31:0] r, w;
    send(P_LEVEL, 0, 0, r);
    while (r <= 32 && pos < stream.size()) begin
      w = '0;
      for (int i = 0; i < 32; i++) w[31 - i] = (pos + i < stream.size()) ? stream[pos + i] : 1'b0;
      pos += 32;
      send(P_PUSH, 0, w, r);
      send(P_LEVEL, 0, 0, r);
    end
  endtask

  // sequencer instruction encoders
  function automatic logic [11:0] cs(input int op, input int ra, input int k);
    return {3'(op), 4'(ra), 5'(k)};
  endfunction
  function automatic logic [17:0] e18(input int op, input int rd, input int f);
    return {5'(op), 4'(rd), 9'(f)};
  endfunction
  function automatic logic [23:0] e24(input int op, input int rd, input int f);
    return {5'(op), 4'(rd), 15'(f)};
  endfunction
  function automatic logic [63:0] ins_a(input int rel, input logic [11:0] c0, input logic [11:0] c1,
                                        input logic [17:0] x0, input logic [17:0] x1);
    return {2'b00, 2'(rel), c0, c1, x0, x1};
  endfunction
  function automatic logic [63:0] ins_b(input int rel, input logic [11:0] c,
                                        input logic [23:0] x0, input logic [23:0] x1);
    return {2'b10, 2'(rel), c, x0, x1};
  endfunction
  task automatic iwr(input int a, input logic [63:0] w);
    logic [31:0] r;
    send(P_IWR, a | 256, w[63:32], r);
    send(P_IWR, a, w[31:0], r);
  endtask
  task automatic run_prog(input int a, output logic [31:0] r);
    automatic int t = 0;
    automatic logic [1:0] tg = 2'($urandom);
    cmd_valid = 1; cmd = '{op: P_RUN, a0: a, a1: 0}; cmd_tag = tg;
    @(negedge clk);
    cmd_valid = 0;
    chk(!rsp_valid && !cmd_ready, "busy while the program runs");
    while (!rsp_valid && t < 2000) begin @(negedge clk); t++; end
    chk(rsp_valid && rsp_tag == tg, "program answers with the run tag");
    r = rsp_data;
    @(negedge clk);
    chk(cmd_ready, "ready after HALT");
  endtask
  task automatic drain();
    logic [31:0] r;
    send(P_LEVEL, 0, 0, r);
    while (r > 0) begin
      send(P_FBITOP, (r > 32) ? 32 : r, 0, r);
      send(P_LEVEL, 0, 0, r);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    rst_n = 0; cmd_valid = 0; cmd = '0; cmd_tag = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    // empty buffer: a read is refused
    send(P_FBITOP, 8, 0, r);
    chk(r == 32'hFFFF_FFFF, "read from empty buffer refused");
    // build the stream
    for (int i = 0; i < 400; i++) begin
      automatic item_t it;
      it.kind = $urandom % 3;
      if (it.kind == 0) begin
        it.n = 1 + $urandom % 32;
        it.val = int'($urandom) & int'((64'd1 << it.n) - 1);
        put_bits(it.val, it.n);
      end else if (it.kind == 1) begin
        it.val = ($urandom % 4 == 0) ? int'($urandom % 60000) : int'($urandom % 20);
        put_ue(it.val);
      end else begin
        it.val = int'($urandom % 201) - 100;
        put_ue(it.val > 0 ? 2 * it.val - 1 : -2 * it.val);
      end
      items.push_back(it);
    end
    foreach (items[i]) begin
      refill();
      if (items[i].kind == 0) begin
        send(P_FBITOP, items[i].n, 0, r);
        chk(r == 32'(items[i].val), $sformatf("fixed field %0d", i));
      end else begin
        send(P_CLZ, 0, 0, r);
        // reference leading zeros from the stream position still buffered
        chk(r <= 32, "clz in range");
        send(P_EXPBITOP, (items[i].kind == 2) ? 1 : 0, 0, r);
        chk($signed(r) == items[i].val, $sformatf("exp-golomb %0d: got %0d exp %0d", i, $signed(r), items[i].val));
      end
    end
    // P_CLZ on a known pattern
    send(P_LEVEL, 0, 0, r);
    begin
      automatic int left = int'(r);
      for (int k = 0; k < left; k++) send(P_FBITOP, 1, 0, r);
    end
    send(P_PUSH, 0, 32'h0004_0000, r);
    send(P_CLZ, 0, 0, r);
    chk(r == 13, $sformatf("clz of 0x00040000 = %0d", r));
    send(P_LEVEL, 0, 0, r);
    chk(r == 32, "clz does not consume");
    send(P_FBITOP, 32, 0, r);

    // ---- variable-length table matching and trailing ones
    // table 0: k zeros then a one (len k+1) -> 100+k; table 1: 4-bit codes -> 200+k;
    // table 2: a small prefix-free code; table 3 stays empty
    for (int k = 0; k < 16; k++) begin
      send(P_VTLOAD, k | (0 << 8) | ((k + 1) << 16), ((100 + k) << 16) | 1, r);
      send(P_VTLOAD, (16 + k) | (1 << 8) | (4 << 16), ((200 + k) << 16) | k, r);
    end
    for (int k = 0; k < 7; k++)
      send(P_VTLOAD, (40 + k) | (2 << 8) | (vl2[k] << 16), ((300 + k) << 16) | vc2[k], r);
    stream.delete(); items.delete(); pos = 0;
    for (int i = 0; i < 300; i++) begin
      automatic item_t it;
      it.kind = 3 + $urandom % 2;
      if (it.kind == 3) begin
        it.n = $urandom % 3;                 // table
        it.val = (it.n == 2) ? int'($urandom % 7) : int'($urandom % 16);
        if (it.n == 0) begin put_bits(0, it.val); put_bits(1, 1); end
        else if (it.n == 1) put_bits(it.val, 4);
        else put_bits(vc2[it.val], vl2[it.val]);
      end else begin
        it.n = $urandom % 4;                 // trailing ones
        it.val = int'($urandom % 8) & ((1 << it.n) - 1);
        put_bits(it.val, it.n);
      end
      items.push_back(it);
    end
    foreach (items[i]) begin
      refill();
      if (items[i].kind == 3) begin
        automatic int len = (items[i].n == 0) ? items[i].val + 1 : (items[i].n == 1) ? 4 : vl2[items[i].val];
        automatic int v = (items[i].n == 0) ? 100 + items[i].val : (items[i].n == 1) ? 200 + items[i].val : 300 + items[i].val;
        if (i % 17 == 0) begin
          send(P_VTMATCH, 3, 0, r);
          chk(r == 32'hFFFF_FFFF, "no match in an empty table");
        end
        send(P_VTMATCH, items[i].n, 0, r);
        chk(r == 32'((len << 16) | v), $sformatf("table %0d symbol %0d: got %h", items[i].n, items[i].val, r));
      end else begin
        send(P_T1DEC, items[i].n, 0, r);
        chk(r == 32'(items[i].val), $sformatf("trailing ones %0d", i));
      end
    end
    // trailing ones land in the level registers: t=3, signs -,+,- then reorder 3 coeffs
    send(P_LEVEL, 0, 0, r);
    begin
      automatic int left = int'(r);
      for (int k = 0; k < left; k++) send(P_FBITOP, 1, 0, r);
    end
    send(P_PUSH, 0, 32'hA000_0000, r);
    send(P_T1DEC, 3, 0, r);
    chk(r == 3'b101, "t1 sign bits");
    for (int i = 0; i < 3; i++) send(P_SETRUN, i, 0, r);
    send(P_RLREORDER, 3, 0, r);
    chk(r == 2, "three coefficients end at position 2");
    send(P_GETCOEF, 2, 0, r); chk($signed(r) == -1, "level 0 = -1 at position 2");
    send(P_GETCOEF, 1, 0, r); chk($signed(r) == 1, "level 1 = +1 at position 1");
    send(P_GETCOEF, 0, 0, r); chk($signed(r) == -1, "level 2 = -1 at position 0");

    // ---- run-level reordering against a reference placement
    for (int trial = 0; trial < 300; trial++) begin
      automatic int st = $urandom % 2;
      automatic int n = $urandom % (17 - st);
      automatic int ps [$];
      automatic int ref_c [16];
      automatic int lv;
      for (int p = 0; p < 16; p++) ref_c[p] = 0;
      for (int p = 15; p >= st; p--) ps.push_back(p);
      ps.shuffle();
      ps = ps[0:n-1];
      ps.rsort();                             // highest frequency first
      for (int i = 0; i < n; i++) begin
        lv = int'($urandom % 61) - 30;
        if (lv == 0) lv = 7;
        ref_c[ps[i]] = lv;
        send(P_SETLEVEL, i, 32'(lv) & 32'hFFFF, r);
        send(P_SETRUN, i, (i < n - 1) ? ps[i] - ps[i + 1] - 1 : ps[i] - st, r);
      end
      send(P_RLREORDER, n | (st << 8), 0, r);
      chk(r == ((n == 0) ? 0 : ps[0]), $sformatf("reorder answer trial %0d", trial));
      for (int p = 0; p < 16; p++) begin
        send(P_GETCOEF, p, 0, r);
        chk($signed(r) == ref_c[p], $sformatf("trial %0d position %0d: got %0d exp %0d", trial, p, $signed(r), ref_c[p]));
      end
    end
    // a run that would pass position 15 is refused and leaves the coefficients alone
    send(P_SETRUN, 0, 15, r);
    send(P_SETRUN, 1, 3, r);
    send(P_GETCOEF, 5, 0, r);
    begin
      automatic logic [31:0] prev_c = r;
      send(P_RLREORDER, 2, 0, r);
      chk(r == 32'hFFFF_FFFF, "overflowing runs refused");
      send(P_GETCOEF, 5, 0, r);
      chk(r == prev_c, "refused reorder writes nothing");
    end
    // ---- VLIW sequencer ----
    // program 1 at 0: while (r2 != 0) { r3 = ue; r1 += r3; r2 -= 1 }
    iwr(0, ins_b(0, cs(1, 2, 0), e24(9, 0, 0), e24(17, 3, 0)));
    iwr(1, ins_a(0, cs(0, 0, 0), cs(0, 0, 0), e18(3, 1, 3), e18(2, 2, -1)));
    iwr(2, ins_b(2, cs(0, 0, 0), e24(8, 0, 0), e24(0, 0, 0)));
    for (int trial = 0; trial < 40; trial++) begin
      automatic int cnt = 1 + $urandom % 6;
      automatic int sum = 0, used = 0;
      automatic logic [31:0] w = '0;
      drain();
      stream.delete();
      for (int i = 0; i < cnt; i++) begin
        automatic int v = $urandom % 7;
        sum += v;
        put_ue(v);
      end
      used = stream.size();
      for (int i = 0; i < used; i++) w[31 - i] = stream[i];
      send(P_PUSH, 0, w, r);
      send(P_SETREG, 1, 0, r);
      send(P_SETREG, 2, cnt, r);
      run_prog(0, r);
      chk(r == sum, $sformatf("ue loop trial %0d: got %0d exp %0d", trial, r, sum));
      send(P_LEVEL, 0, 0, r);
      chk(r == 32 - used, "ue loop consumed its bits");
      send(P_GETREG, 2, 0, r);
      chk(r == 0, "loop counter at zero");
    end
    // program 2 at 8: slot relations and condition kinds
    iwr(8,  ins_a(1, cs(3, 4, 20), cs(4, 5, 10), e18(1, 1, 1), e18(1, 1, 2)));
    iwr(9,  ins_a(2, cs(5, 4, 7), cs(6, 5, 3), e18(2, 1, 16), e18(5, 1, 3)));
    iwr(10, ins_b(1, cs(2, 4, 0), e24(2, 1, 100), e24(9, 0, 0)));
    iwr(11, ins_b(2, cs(0, 0, 0), e24(4, 1, 5), e24(0, 0, 0)));
    iwr(12, ins_a(0, cs(7, 0, 5), cs(7, 0, 0), e18(1, 6, 55), e18(9, 0, 0)));
    iwr(13, ins_b(0, cs(0, 0, 0), e24(9, 0, 0), e24(0, 0, 0)));
    for (int trial = 0; trial < 200; trial++) begin
      automatic int x = (trial % 5 == 0) ? 0 : (trial % 5 == 1) ? 7 : $urandom % 41;
      automatic int y = (trial % 7 == 0) ? 3 : $urandom % 41;
      automatic int e = (x < 20 && y >= 10) ? 1 : 2;
      automatic int lvl;
      e = (x == 7 || y != 3) ? e + 16 : e << 3;
      drain();
      if (trial % 2) begin send(P_PUSH, 0, 32'h1234_5678, r); send(P_FBITOP, 30, 0, r); end
      send(P_LEVEL, 0, 0, lvl);
      send(P_SETREG, 4, x, r);
      send(P_SETREG, 5, y, r);
      send(P_SETREG, 6, 9, r);
      run_prog(8, r);
      if (x != 0) begin
        chk(r == e, $sformatf("relations x=%0d y=%0d: got %0d exp %0d", x, y, r, e));
        send(P_GETREG, 1, 0, r);
        chk(r == e + 100, "slot beside HALT still executes");
      end else begin
        chk(r == e - y, $sformatf("relations x=0 y=%0d: got %0d exp %0d", y, r, e - y));
        send(P_GETREG, 6, 0, r);
        chk(r == ((lvl < 5) ? 55 : 9), "buffer-level condition");
      end
    end
    // program 3 at 20: r7 = 4 bits; r1 = r7 bits; r8 = se; halt
    iwr(20, ins_b(0, cs(0, 0, 0), e24(16, 7, 4), e24(0, 0, 0)));
    iwr(21, ins_b(1, cs(0, 0, 0), e24(25, 1, 7), e24(1, 9, 1)));
    iwr(22, ins_a(0, cs(0, 0, 0), cs(0, 0, 0), e18(18, 8, 0), e18(19, 10, 0)));
    iwr(23, ins_b(0, cs(0, 0, 0), e24(9, 0, 0), e24(0, 0, 0)));
    for (int trial = 0; trial < 100; trial++) begin
      automatic int len = 1 + $urandom % 12;
      automatic int val = $urandom % (1 << len);
      automatic int sv = int'($urandom % 21) - 10;
      automatic logic [31:0] w = '0;
      drain();
      stream.delete();
      put_bits(len, 4);
      put_bits(val, len);
      put_ue(sv > 0 ? 2 * sv - 1 : -2 * sv);
      for (int i = 0; i < stream.size(); i++) w[31 - i] = stream[i];
      send(P_PUSH, 0, w, r);
      run_prog(20, r);
      chk(r == val, $sformatf("variable-length read len %0d: got %0d exp %0d", len, r, val));
      send(P_GETREG, 8, 0, r);
      chk($signed(r) == sv, $sformatf("se in slot 0: got %0d exp %0d", $signed(r), sv));
      send(P_GETREG, 9, 0, r);
      chk(r == 1, "ALU op beside a datapath op");
      send(P_GETREG, 10, 0, r);
      chk(r == 0, "second datapath op of an instruction skipped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
