// fme_hadamard: 4-parallel 2-D Hadamard transform unit. It takes the four
// differences of one line of a 4x4 element per clock (`row` = line 0..3),
// applies the 4-point Hadamard transform to the line and adds the result,
// weighted by +1/-1 according to the line number, into the 16 coefficient
// registers, which performs the second (vertical) transform on the fly. One
// clock after line 3, satd_valid is high and `satd` holds the sum of the
// absolute values of the 16 coefficients (the element's SATD, unscaled).
// The unit and its 4-pixel parallelism follow the document; the incremental
// column transform and the unscaled sum are this design's choices.
module fme_hadamard (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [1:0]         row,
  input  logic signed [8:0]  diff [4],
  output logic               satd_valid,
  output logic [16:0]        satd
);

  // Bit c of HNEG[u] is set where entry (u, c) of the 4-point Hadamard matrix is -1.
  localparam logic [3:0] HNEG [4] = '{4'b0000, 4'b1100, 4'b0110, 4'b1010};

  logic signed [12:0] coef [4][4];   // [vertical][horizontal]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      satd_valid <= 1'b0;
    end else begin
      satd_valid <= in_valid && row == 2'd3;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      logic signed [12:0] t [4];
      for (int v = 0; v < 4; v++) begin
        t[v] = '0;
        for (int c = 0; c < 4; c++)
          t[v] = HNEG[v][c] ? t[v] - 13'(diff[c]) : t[v] + 13'(diff[c]);
      end
      for (int u = 0; u < 4; u++)
        for (int v = 0; v < 4; v++) begin
          logic signed [12:0] base, term;
          base = (row == 2'd0) ? 13'sd0 : coef[u][v];
          term = HNEG[u][row] ? -t[v] : t[v];
          coef[u][v] <= base + term;
        end
    end
  end

  always_comb begin
    satd = '0;
    for (int u = 0; u < 4; u++)
      for (int v = 0; v < 4; v++)
        satd = satd + 17'(coef[u][v] < 0 ? 13'(-coef[u][v]) : coef[u][v]);
  end

endmodule
