// ime_vbs_tree: the parallel VBS adder tree of the IME engine. From the sixteen
// 4x4 SADs of one search candidate it forms the SADs of all 41 blocks of the
// seven H.264 block sizes at once, so the larger sizes reuse the 4x4 sums
// instead of reading the reference pixels again:
//   4x8 and 8x4 from two 4x4 sums, 8x8 from two 8x4 sums, 16x8 and 8x16 from
//   two 8x8 sums, 16x16 from the two 16x8 sums.
// Output index order is the one of me_pkg. Purely combinational.
module ime_vbs_tree
  import me_pkg::*;
(
  input  logic [11:0] sad4 [4][4],
  output logic [15:0] sad [NBLK]
);

  logic [12:0] s8x4 [4][2];   // [8x8 index][top/bottom]
  logic [12:0] s4x8 [4][2];   // [8x8 index][left/right]
  logic [13:0] s8x8 [4];

  always_comb begin
    for (int q = 0; q < 4; q++) begin
      int x4, y4;
      x4 = (q % 2) * 2;
      y4 = (q / 2) * 2;
      for (int s = 0; s < 2; s++) begin
        s8x4[q][s] = 13'(sad4[y4+s][x4]) + 13'(sad4[y4+s][x4+1]);
        s4x8[q][s] = 13'(sad4[y4][x4+s]) + 13'(sad4[y4+1][x4+s]);
      end
      s8x8[q] = 14'(s8x4[q][0]) + 14'(s8x4[q][1]);
    end

    sad[1] = 16'(s8x8[0]) + 16'(s8x8[1]);   // 16x8 top
    sad[2] = 16'(s8x8[2]) + 16'(s8x8[3]);   // 16x8 bottom
    sad[3] = 16'(s8x8[0]) + 16'(s8x8[2]);   // 8x16 left
    sad[4] = 16'(s8x8[1]) + 16'(s8x8[3]);   // 8x16 right
    sad[0] = sad[1] + sad[2];
    for (int q = 0; q < 4; q++) begin
      sad[5+q] = 16'(s8x8[q]);
      for (int s = 0; s < 2; s++) begin
        sad[9+2*q+s]  = 16'(s8x4[q][s]);
        sad[17+2*q+s] = 16'(s4x8[q][s]);
      end
    end
    for (int i = 0; i < 16; i++) sad[25+i] = 16'(sad4[i/4][i%4]);
  end

endmodule
