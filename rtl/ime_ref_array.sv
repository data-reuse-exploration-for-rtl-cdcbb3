// ime_ref_array: 16x16 reference-pixel systolic array of the IME engine.
//
// The array holds the 16x16 reference block of the current search candidate.
// Each move to a neighbouring candidate brings in only the 16 pixels that are
// new and shifts the other 240 by one position, which is how the engine
// reuses reference data between adjacent candidates:
//   SCAN_DOWN : rows shift up by one, in_pix becomes the bottom row
//   SCAN_UP   : rows shift down by one, in_pix becomes the top row
//   SCAN_RIGHT: columns shift left by one, in_pix becomes the right column
//               (in_pix[k] is the pixel of row k)
//   SCAN_HOLD : no change
// The three moves are the three configurations the document gives for the
// snake scan; which way the data moves for each is this design's reading.
// The new content is visible the clock after `mode` and `in_pix` are applied.
module ime_ref_array
  import me_pkg::*;
(
  input  logic  clk,
  input  scan_t mode,
  input  pix_t  in_pix [MB],
  output pix_t  ref_pix [MB][MB]   // [row][column]
);

  always_ff @(posedge clk) begin
    unique case (mode)
      SCAN_DOWN: begin
        for (int r = 0; r < MB - 1; r++) ref_pix[r] <= ref_pix[r+1];
        ref_pix[MB-1] <= in_pix;
      end
      SCAN_UP: begin
        for (int r = 1; r < MB; r++) ref_pix[r] <= ref_pix[r-1];
        ref_pix[0] <= in_pix;
      end
      SCAN_RIGHT: begin
        for (int r = 0; r < MB; r++) begin
          for (int c = 0; c < MB - 1; c++) ref_pix[r][c] <= ref_pix[r][c+1];
          ref_pix[r][MB-1] <= in_pix[r];
        end
      end
      default: ;
    endcase
  end

endmodule
