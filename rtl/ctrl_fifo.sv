// ctrl_fifo: one FIFO channel of the control network.
//
// A circular buffer of DEPTH words of W bits. The head word is always visible on
// rd_data while the FIFO is not empty (show-ahead), so a GET reads and pops in the
// same cycle. full and empty are the link status a network interface checks before
// a PUT or a GET. Width 32 and depth 24 are the sizes chosen for the 720p platform
// (enough for the largest syntax elements plus about 50% margin); the show-ahead
// read and the asynchronous active-low reset are this design's choices.
// Timing: a push is visible at rd_data the cycle after wr_en; count updates on the
// same edge. A push when full or a pop when empty is ignored (and asserted against).
module ctrl_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 24
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         wr_en,
  input  logic [W-1:0]                 wr_data,
  input  logic                         rd_en,
  output logic [W-1:0]                 rd_data,
  output logic                         full,
  output logic                         empty,
  output logic [$clog2(DEPTH+1)-1:0]   count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      count <= count + ($clog2(DEPTH+1))'(do_wr) - ($clog2(DEPTH+1))'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  // A sender must check full, a receiver must check empty.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
