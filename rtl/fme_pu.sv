// fme_pu: 4x4-element processing unit of the FME engine, one per search
// candidate. Each clock it subtracts a line of four interpolated reference
// pixels from the matching four current pixels, passes the differences to the
// 4-parallel 2-D Hadamard unit and, whenever a 4x4 element is complete, adds
// its SATD to the accumulator. Larger blocks are folded onto the unit as a
// sequence of 4x4 elements, so `cost` after the last element is the block's
// SATD. acc_clr clears the accumulator (it wins over an add in the same
// clock). `cost` is valid two clocks after the line that completes the last
// element. Structure as in the document's PU diagram.
module fme_pu
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [1:0]  row,
  input  pix_t        cur [4],
  input  pix_t        refp [4],
  input  logic        acc_clr,
  output logic [19:0] cost
);

  logic signed [8:0] diff [4];
  logic              satd_valid;
  logic [16:0]       satd;

  always_comb
    for (int c = 0; c < 4; c++) diff[c] = 9'(cur[c]) - 9'(refp[c]);

  fme_hadamard u_had (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .row(row), .diff(diff),
    .satd_valid(satd_valid), .satd(satd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cost <= '0;
    else if (acc_clr)    cost <= '0;
    else if (satd_valid) cost <= cost + 20'(satd);
  end

endmodule
