// fme_mode_decision: macroblock partition decision. Given the Lagrangian cost
// J of each of the 41 blocks at its refined vector, it finds for every 8x8
// quadrant the cheapest sub-partition (one 8x8, two 8x4, two 4x8 or four
// 4x4), then the cheapest macroblock partition (16x16, two 16x8, two 8x16 or
// four 8x8 with their best sub-partitions). Ties keep the larger partition.
// Purely combinational. mb_mode: 0 = 16x16, 1 = 16x8, 2 = 8x16, 3 = 8x8;
// sub_mode: 0 = 8x8, 1 = 8x4, 2 = 4x8, 3 = 4x4. Block indices as in me_pkg.
// The document names a Lagrangian mode decision; the search over the H.264
// partitions is this design's reading, and no mode rate term is added.
module fme_mode_decision
  import me_pkg::*;
(
  input  logic [23:0] j [NBLK],
  output logic [1:0]  mb_mode,
  output logic [1:0]  sub_mode [4],
  output logic [25:0] mb_cost
);

  always_comb begin
    logic [25:0] sub_cost [4];
    logic [25:0] c8, c;
    for (int q = 0; q < 4; q++) begin
      int x4, y4;
      x4 = (q % 2) * 2;
      y4 = (q / 2) * 2;
      sub_cost[q] = 26'(j[5+q]);
      sub_mode[q] = 2'd0;
      c = 26'(j[9+2*q]) + 26'(j[10+2*q]);
      if (c < sub_cost[q]) begin sub_cost[q] = c; sub_mode[q] = 2'd1; end
      c = 26'(j[17+2*q]) + 26'(j[18+2*q]);
      if (c < sub_cost[q]) begin sub_cost[q] = c; sub_mode[q] = 2'd2; end
      c = 26'(j[25+y4*4+x4]) + 26'(j[25+y4*4+x4+1]) + 26'(j[25+(y4+1)*4+x4]) + 26'(j[25+(y4+1)*4+x4+1]);
      if (c < sub_cost[q]) begin sub_cost[q] = c; sub_mode[q] = 2'd3; end
    end
    mb_cost = 26'(j[0]);
    mb_mode = 2'd0;
    c = 26'(j[1]) + 26'(j[2]);
    if (c < mb_cost) begin mb_cost = c; mb_mode = 2'd1; end
    c = 26'(j[3]) + 26'(j[4]);
    if (c < mb_cost) begin mb_cost = c; mb_mode = 2'd2; end
    c8 = sub_cost[0] + sub_cost[1] + sub_cost[2] + sub_cost[3];
    if (c8 < mb_cost) begin mb_cost = c8; mb_mode = 2'd3; end
  end

endmodule
