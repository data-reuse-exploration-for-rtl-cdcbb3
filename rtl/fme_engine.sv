// fme_engine: fractional motion estimation engine (half-pel and quarter-pel
// refinement).
//
// For each of the 41 VBS blocks it takes the block's integer motion vector
// and evaluates the nine candidates at that vector and the eight half-pel
// positions around it, all nine in parallel. The controller streams lines of
// 10 reference pixels from the search-window memory into the row-parallel
// interpolation engine, which feeds four pixels of each candidate per clock to
// nine 4x4-element processing units (36 pixels per clock). Each unit returns
// the candidate's SATD for the whole block, folded over its 4x4 elements. The
// Lagrangian cost J = SATD + lambda * bits(mvd) picks the best of the nine
// (ties keep the integer position, then the lowest index). With QPEL = 1 the
// block's lines are then streamed a second time and the same nine units
// evaluate the winner and its eight quarter-pel neighbours, the interpolation
// engine averaging half samples; the winner of that pass (ties keep the
// half-pel winner) is the block's result. The refined quarter-pel vector and
// J go to the output buffer, and once all 41 blocks are done the mode
// decision picks the macroblock partition.
//
// Interface: load the current block through cur_wr_* (one row per clock),
// apply the 41 integer vectors on `mv` and pulse `start`; they must stay
// stable while busy. The engine drives sw_req and receives 16 pixels on
// sw_data one clock later; it uses lanes 0..9. `done` pulses when mvq, blk_j,
// mb_mode, sub_mode and mb_cost are valid; they hold until the next run.
// lambda and pmvq (the predicted vector, quarter-pel, one for the whole
// macroblock) are side information and must be stable while busy.
// Timing: each pass over a block takes its number of line accesses plus 4
// clocks; a macroblock takes 2 * (760 + 41 * 4) + 1 = 1849 clocks with ADV = 1
// and QPEL = 1 (760 + 41 * 4 + 1 = 925 for the half-pel pass alone).
// The nine-PU architecture, both processing flows and the two-pass flow
// follow the document; running the quarter pass on the same units, the cost
// formula, side information and buffer layout are this design's.
module fme_engine
  import me_pkg::*;
#(
  parameter int OFF = 19,
  parameter bit ADV = 1'b1,
  parameter bit QPEL = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cur_wr_en,
  input  logic [3:0]        cur_wr_row,
  input  pix_t              cur_wr_data [MB],
  input  mv2_t              mv [NBLK],
  input  logic [7:0]        lambda,
  input  logic signed [8:0] pmvq_x,
  input  logic signed [8:0] pmvq_y,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output sw_req_t           sw_req,
  input  pix_t              sw_data [MB],
  output logic signed [8:0] mvq_x [NBLK],   // refined vectors, quarter-pel
  output logic signed [8:0] mvq_y [NBLK],
  output logic [23:0]       blk_j [NBLK],   // Lagrangian cost per block
  output logic [1:0]        mb_mode,
  output logic [1:0]        sub_mode [4],
  output logic [25:0]       mb_cost
);

  pix_t        cur [MB][MB];
  pix_t        line_pix [10];
  pix_t        cand_pix [9][4];
  pix_t        cur4 [4];
  logic [19:0] cost [9];
  logic [13:0] rate [9];
  logic signed [8:0] cmvq_x [9];
  logic signed [8:0] cmvq_y [9];

  logic       tag_out, tag_tr, capture, cap_tr, ctrl_done, ctrl_busy, pass;
  // half-pel winner of the block in progress, in block (true) and in engine
  // (possibly transposed) coordinates, -1 .. 1 half-pel
  logic signed [1:0] hb_x, hb_y, hbe_x, hbe_y;
  logic [1:0] tag_row;
  logic [3:0] tag_cx, tag_cy;
  logic [5:0] cap_blk;

  // Tag pipeline: d1 = pixels returned, d2 = line at the processing units.
  logic       rd_d1;
  logic       out_d1, out_d2;
  logic [1:0] row_d1, row_d2;
  logic [3:0] cx_d1, cx_d2, cy_d1, cy_d2;
  logic       tr_d1, tr_d2;

  cur_mb_buf u_cur (
    .clk(clk), .wr_en(cur_wr_en), .wr_row(cur_wr_row), .wr_data(cur_wr_data), .pix(cur)
  );

  fme_ctrl #(.OFF(OFF), .ADV(ADV), .QPEL(QPEL)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .mv(mv), .busy(ctrl_busy), .req(sw_req),
    .tag_out(tag_out), .tag_row(tag_row), .tag_cx(tag_cx), .tag_cy(tag_cy),
    .tag_transposed(tag_tr), .pass(pass), .capture(capture), .cap_blk(cap_blk),
    .cap_transposed(cap_tr), .done(ctrl_done)
  );

  always_comb for (int k = 0; k < 10; k++) line_pix[k] = sw_data[k];

  fme_interp u_interp (.clk(clk), .in_valid(rd_d1), .in_pix(line_pix), .q_en(pass),
                       .qbx(hbe_x), .qby(hbe_y), .cand_pix(cand_pix));

  // Current pixels of the output line: a row segment, or a column segment
  // when the strip is processed transposed.
  always_comb begin
    for (int c = 0; c < 4; c++)
      cur4[c] = tr_d2 ? cur[4'(cy_d2 + 4'(c))][cx_d2] : cur[cy_d2][4'(cx_d2 + 4'(c))];
  end

  for (genvar e = 0; e < 9; e++) begin : g_pu
    fme_pu u_pu (
      .clk(clk), .rst_n(rst_n), .in_valid(out_d2), .row(row_d2), .cur(cur4),
      .refp(cand_pix[e]), .acc_clr(capture), .cost(cost[e])
    );
  end

  // Candidate t of the finished pass: offset (t % 3 - 1, t / 3 - 1) in
  // half-pel units around the integer vector, or in quarter-pel units around
  // the half-pel winner.
  for (genvar t = 0; t < 9; t++) begin : g_rate
    assign cmvq_x[t] = pass ? 9'(4 * int'(mv[cap_blk].x) + 2 * int'(hb_x) + (t % 3 - 1))
                            : 9'(4 * int'(mv[cap_blk].x) + 2 * (t % 3 - 1));
    assign cmvq_y[t] = pass ? 9'(4 * int'(mv[cap_blk].y) + 2 * int'(hb_y) + (t / 3 - 1))
                            : 9'(4 * int'(mv[cap_blk].y) + 2 * (t / 3 - 1));
    fme_mv_cost u_rate (
      .lambda(lambda), .mvq_x(cmvq_x[t]), .mvq_y(cmvq_y[t]),
      .pmvq_x(pmvq_x), .pmvq_y(pmvq_y), .cost(rate[t])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_d1  <= 1'b0;
      out_d1 <= 1'b0;
      out_d2 <= 1'b0;
      done   <= 1'b0;
    end else begin
      rd_d1  <= sw_req.valid;
      out_d1 <= tag_out;
      out_d2 <= out_d1;
      done   <= ctrl_done;
    end
  end

  always_ff @(posedge clk) begin
    row_d1 <= tag_row;  row_d2 <= row_d1;
    cx_d1  <= tag_cx;   cx_d2  <= cx_d1;
    cy_d1  <= tag_cy;   cy_d2  <= cy_d1;
    tr_d1  <= tag_tr;   tr_d2  <= tr_d1;
  end

  // Best of nine and output buffer.
  always_ff @(posedge clk) begin
    if (capture) begin
      logic [23:0] jt, jbest;
      logic [3:0]  best;
      best  = 4;
      jbest = 24'(cost[4]) + 24'(rate[4]);
      for (int t = 0; t < 9; t++) begin
        // transposed strips swap the roles of the two offsets
        jt = 24'(cost[cap_tr ? (t % 3) * 3 + t / 3 : t]) + 24'(rate[t]);
        if (jt < jbest) begin
          jbest = jt;
          best  = 4'(t);
        end
      end
      blk_j[cap_blk] <= jbest;
      mvq_x[cap_blk] <= cmvq_x[best];
      mvq_y[cap_blk] <= cmvq_y[best];
      if (!pass) begin
        hb_x  <= 2'(int'(best) % 3 - 1);
        hb_y  <= 2'(int'(best) / 3 - 1);
        hbe_x <= cap_tr ? 2'(int'(best) / 3 - 1) : 2'(int'(best) % 3 - 1);
        hbe_y <= cap_tr ? 2'(int'(best) % 3 - 1) : 2'(int'(best) / 3 - 1);
      end
    end
  end

  fme_mode_decision u_mode (.j(blk_j), .mb_mode(mb_mode), .sub_mode(sub_mode), .mb_cost(mb_cost));

  assign busy = ctrl_busy || done;

endmodule
