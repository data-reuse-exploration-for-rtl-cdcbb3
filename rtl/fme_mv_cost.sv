// fme_mv_cost: rate term of the Lagrangian cost of one motion vector,
// lambda * (bits(mvd.x) + bits(mvd.y)), where mvd is the difference between
// the quarter-pel vector and the predicted vector and bits() is the length of
// its signed Exp-Golomb code. Purely combinational.
// The document names the MV cost and the Lagrangian decision but gives no
// formula; this one is the usual H.264 encoder choice.
module fme_mv_cost
  import me_pkg::*;
(
  input  logic [7:0]        lambda,
  input  logic signed [8:0] mvq_x,    // quarter-pel units
  input  logic signed [8:0] mvq_y,
  input  logic signed [8:0] pmvq_x,
  input  logic signed [8:0] pmvq_y,
  output logic [13:0]       cost
);

  always_comb begin
    int unsigned bits;
    bits = se_len(int'(mvq_x) - int'(pmvq_x)) + se_len(int'(mvq_y) - int'(pmvq_y));
    cost = 14'(int'(lambda) * int'(bits));
  end

endmodule
