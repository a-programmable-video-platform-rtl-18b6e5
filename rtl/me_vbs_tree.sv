// me_vbs_tree: variable-block-size cost adder tree of the ME/MC accelerator.
//
// From the SADs of the sixteen 4x4 blocks of a 16x16 macroblock (raster order,
// blk = 4*row4 + col4) it forms the costs of all 41 H.264 partitions at once by
// adding neighbours level by level:
//   [0..15]  4x4   (raster)        [16..23] 8x4  (two 4x4 side by side)
//   [24..31] 4x8   (two stacked)   [32..35] 8x8  [36..37] 16x8  [38..39] 8x16
//   [40]     16x16
// Combinational. The 41-partition set is H.264's; the output order is this
// design's choice.
module me_vbs_tree #(
  parameter int SW = 12,          // 4x4 SAD width
  localparam int OW = SW + 4      // 16x16 SAD width
) (
  input  logic [SW-1:0] sad4x4 [16],
  output logic [OW-1:0] cost   [41]
);
  logic [OW-1:0] s8x8 [4];

  always_comb begin
    for (int b = 0; b < 16; b++) cost[b] = OW'(sad4x4[b]);
    // 8x4: horizontal pairs, 4x8: vertical pairs
    for (int r = 0; r < 4; r++)
      for (int h = 0; h < 2; h++)
        cost[16 + 2*r + h] = OW'(sad4x4[4*r + 2*h]) + OW'(sad4x4[4*r + 2*h + 1]);
    for (int rr = 0; rr < 2; rr++)
      for (int c = 0; c < 4; c++)
        cost[24 + 4*rr + c] = OW'(sad4x4[8*rr + c]) + OW'(sad4x4[8*rr + 4 + c]);
    // 8x8 from the two 8x4 halves
    for (int q = 0; q < 4; q++) begin
      automatic int qr = q / 2, qc = q % 2;
      s8x8[q] = cost[16 + 2*(2*qr) + qc] + cost[16 + 2*(2*qr + 1) + qc];
      cost[32 + q] = s8x8[q];
    end
    cost[36] = s8x8[0] + s8x8[1];   // 16x8 top
    cost[37] = s8x8[2] + s8x8[3];   // 16x8 bottom
    cost[38] = s8x8[0] + s8x8[2];   // 8x16 left
    cost[39] = s8x8[1] + s8x8[3];   // 8x16 right
    cost[40] = cost[36] + cost[37];
  end
endmodule
