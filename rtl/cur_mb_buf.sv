// cur_mb_buf: register buffer for the 16x16 current macroblock.
//
// The IME engine needs all 256 current pixels at once (one per absolute
// difference unit) and the FME engine picks four of them per cycle, so the
// buffer is built from registers and shows its whole content on `pix`. It is
// loaded one row of 16 pixels per clock through wr_en / wr_row / wr_data and
// holds its content otherwise; there is no read latency. The document only
// names this buffer; the load port is this design's choice.
module cur_mb_buf
  import me_pkg::*;
(
  input  logic       clk,
  input  logic       wr_en,
  input  logic [3:0] wr_row,
  input  pix_t       wr_data [MB],
  output pix_t       pix [MB][MB]   // [row][column]
);

  always_ff @(posedge clk) begin
    if (wr_en) pix[wr_row] <= wr_data;
  end

endmodule
