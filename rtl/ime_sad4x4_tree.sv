// ime_sad4x4_tree: the sixteen 2-D adder trees of the IME engine. Each tree
// adds the 16 absolute differences of one 4x4 block: first the four values of
// each row, then the four row sums. sad4[by][bx] is the SAD of the 4x4 block
// in block row by and block column bx. Purely combinational.
module ime_sad4x4_tree
  import me_pkg::*;
(
  input  logic [7:0]  ad [MB][MB],
  output logic [11:0] sad4 [4][4]
);

  always_comb begin
    for (int by = 0; by < 4; by++) begin
      for (int bx = 0; bx < 4; bx++) begin
        logic [9:0] row_sum [4];
        for (int r = 0; r < 4; r++)
          row_sum[r] = 10'(ad[4*by+r][4*bx]) + 10'(ad[4*by+r][4*bx+1])
                     + 10'(ad[4*by+r][4*bx+2]) + 10'(ad[4*by+r][4*bx+3]);
        sad4[by][bx] = 12'(row_sum[0]) + 12'(row_sum[1]) + 12'(row_sum[2]) + 12'(row_sum[3]);
      end
    end
  end

endmodule
