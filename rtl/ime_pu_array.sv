// ime_pu_array: the 256 processing units of the IME engine, one per pixel of
// the 16x16 block. Each unit drops the TRUNC low bits of the current and the
// reference pixel and outputs the absolute difference (subtract + absolute).
// With SUBSAMPLE = 1 only the units on a checkerboard ((row + column) even)
// are used and the others output zero, halving the SAD work.
// Purely combinational.
//
// The unit function and the count of 256 follow the document, as do the
// default "3-bit pixel truncation" and "1/2 sub-sampling" of the fabricated
// engine; the checkerboard pattern is this design's choice, the document does
// not give the pattern.
module ime_pu_array
  import me_pkg::*;
#(
  parameter int TRUNC     = 3,
  parameter bit SUBSAMPLE = 1'b1
) (
  input  pix_t       cur [MB][MB],
  input  pix_t       refp [MB][MB],
  output logic [7:0] ad [MB][MB]
);

  always_comb begin
    for (int r = 0; r < MB; r++) begin
      for (int c = 0; c < MB; c++) begin
        logic [7:0] a, b;
        a = cur[r][c] >> TRUNC;
        b = refp[r][c] >> TRUNC;
        if (SUBSAMPLE && ((r + c) % 2 != 0)) ad[r][c] = '0;
        else                                 ad[r][c] = (a > b) ? a - b : b - a;
      end
    end
  end

endmodule
