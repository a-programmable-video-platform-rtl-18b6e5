// me_sad4x4: SAD of one 16-pixel row of a macroblock, split into four 4-pixel groups.
//
// sad4[g] = sum_{i=0..3} |cur[4g+i] - ref[4g+i]| for 8-bit pixels. Accumulating
// the four group sums over four rows gives the SADs of four 4x4 blocks, so one
// instance processes a 16x16 candidate in 16 cycles (one row per cycle); the
// 4x4 SADs then feed the variable-block-size adder tree. Combinational.
// The row-serial organisation is this design's choice.
module me_sad4x4 (
  input  logic [7:0]  cur  [16],
  input  logic [7:0]  ref_px [16],
  output logic [9:0]  sad4 [4]
);
  always_comb begin
    for (int g = 0; g < 4; g++) begin
      sad4[g] = '0;
      for (int i = 0; i < 4; i++) begin
        automatic logic [7:0] a = cur[4*g+i];
        automatic logic [7:0] b = ref_px[4*g+i];
        sad4[g] += 10'((a > b) ? 8'(a - b) : 8'(b - a));
      end
    end
  end
endmodule
