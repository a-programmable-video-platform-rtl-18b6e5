// filter_6tap: one 6-tap weighted-summation datapath.
//
// y = (sum_{k=0..5} w[k]*x[k] + round) >>> shift, with round = 2^(shift-1) (0 when
// shift = 0). Samples are signed DW-bit, weights signed CW-bit, all programmable,
// so the same datapath serves interpolation (1,-5,20,20,-5,1 with shift 5),
// transforms (rows of the integer transform matrix, shift 0) and other weighted
// sums. Purely combinational. The six-multiplier, adder-tree structure and the
// widths are this design's reading of the weighted-summation datapath.
module filter_6tap #(
  parameter int DW = 16,
  parameter int CW = 8,
  localparam int OW = DW + CW + 3
) (
  input  logic signed [DW-1:0] x [6],
  input  logic signed [CW-1:0] w [6],
  input  logic        [4:0]    shift,
  output logic signed [OW-1:0] y
);
  logic signed [DW+CW-1:0] p [6];
  logic signed [OW-1:0]    s01, s23, s45, sum, rnd;

  always_comb begin
    for (int k = 0; k < 6; k++) p[k] = x[k] * w[k];
    s01 = OW'(p[0]) + OW'(p[1]);
    s23 = OW'(p[2]) + OW'(p[3]);
    s45 = OW'(p[4]) + OW'(p[5]);
    sum = s01 + s23 + s45;
    rnd = (shift == 0) ? '0 : (OW'(1) <<< (shift - 1'b1));
    y   = (sum + rnd) >>> shift;
  end
endmodule
