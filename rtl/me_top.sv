// me_top: motion estimation for one H.264 macroblock, integer search followed
// by half-pel and quarter-pel refinement, around a search-window memory with the ladder-shaped
// data arrangement.
//
// Flow: the host writes the search window (53 x 53 pixels: the 47 x 47 window
// of the H[-16,15] x V[-16,15] full search plus a 3-pixel margin on each side
// for the interpolation filter) and the current macroblock, then pulses
// `start`. The IME engine runs the snake-scan full search (1039 accesses of 16
// pixels) and hands the best integer vector of each of the 41 blocks to the
// FME engine, which refines them to half-pel positions (760 accesses of 10
// pixels), then to quarter-pel positions (another 760), and picks the
// partition mode. A macroblock takes 1043 + 1849 = 2892 clocks. Both engines read the one window
// memory; the IME engine owns it while it is busy. `done` pulses when all
// outputs are valid.
//
// Window coordinates: pixel (X, Y) of the window is at displacement
// (X - 19, Y - 19) from the current macroblock's top-left pixel.
// ime_reads / fme_reads count the window accesses of the last run.
// The document presents the two engines separately; running them in sequence
// on one memory is this design's way of putting them together.
module me_top
  import me_pkg::*;
#(
  parameter int SR        = 32,
  parameter int PAD       = 3,
  parameter int TRUNC     = 3,
  parameter bit SUBSAMPLE = 1'b1,
  parameter bit ADV       = 1'b1,
  parameter bit QPEL      = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  // search window load: a row segment of 16 pixels starting at (sw_wr_x, sw_wr_y)
  input  logic              sw_wr_en,
  input  logic [CW-1:0]     sw_wr_x,
  input  logic [CW-1:0]     sw_wr_y,
  input  pix_t              sw_wr_data [MB],
  // current macroblock load: one row per clock
  input  logic              cur_wr_en,
  input  logic [3:0]        cur_wr_row,
  input  pix_t              cur_wr_data [MB],
  // side information for the FME cost
  input  logic [7:0]        lambda,
  input  logic signed [8:0] pmvq_x,
  input  logic signed [8:0] pmvq_y,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // integer search result
  output mv2_t              ime_mv  [NBLK],
  output logic [15:0]       ime_sad [NBLK],
  // fractional refinement result
  output logic signed [8:0] mvq_x [NBLK],
  output logic signed [8:0] mvq_y [NBLK],
  output logic [23:0]       blk_j [NBLK],
  output logic [1:0]        mb_mode,
  output logic [1:0]        sub_mode [4],
  output logic [25:0]       mb_cost,
  output logic [15:0]       ime_reads,
  output logic [15:0]       fme_reads,
  output logic [31:0]       sw_reads    // all window accesses since reset
);

  localparam int SW_E = MB + SR - 1 + 2 * PAD;

  sw_req_t     ime_req, fme_req, sw_req;
  pix_t        sw_data [MB];
  logic        ime_busy, ime_done, fme_busy, fme_done;

  sw_sram_ladder #(.SW_W(SW_E), .SW_H(SW_E), .NB(MB)) u_sw (
    .clk(clk), .rst_n(rst_n), .wr_en(sw_wr_en), .wr_x(sw_wr_x), .wr_y(sw_wr_y),
    .wr_data(sw_wr_data), .rd_req(sw_req), .rd_data(sw_data), .rd_count(sw_reads)
  );

  ime_engine #(.SR(SR), .X0(PAD), .Y0(PAD), .TRUNC(TRUNC), .SUBSAMPLE(SUBSAMPLE)) u_ime (
    .clk(clk), .rst_n(rst_n), .cur_wr_en(cur_wr_en), .cur_wr_row(cur_wr_row),
    .cur_wr_data(cur_wr_data), .start(start), .busy(ime_busy), .done(ime_done),
    .sw_req(ime_req), .sw_data(sw_data), .best_sad(ime_sad), .best_mv(ime_mv)
  );

  fme_engine #(.OFF(PAD + SR / 2), .ADV(ADV), .QPEL(QPEL)) u_fme (
    .clk(clk), .rst_n(rst_n), .cur_wr_en(cur_wr_en), .cur_wr_row(cur_wr_row),
    .cur_wr_data(cur_wr_data), .mv(ime_mv), .lambda(lambda), .pmvq_x(pmvq_x),
    .pmvq_y(pmvq_y), .start(ime_done), .busy(fme_busy), .done(fme_done),
    .sw_req(fme_req), .sw_data(sw_data), .mvq_x(mvq_x), .mvq_y(mvq_y), .blk_j(blk_j),
    .mb_mode(mb_mode), .sub_mode(sub_mode), .mb_cost(mb_cost)
  );

  assign sw_req = ime_busy ? ime_req : fme_req;
  assign busy   = ime_busy || fme_busy;
  assign done   = fme_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ime_reads <= '0;
      fme_reads <= '0;
    end else if (start) begin
      ime_reads <= '0;
      fme_reads <= '0;
    end else begin
      if (ime_req.valid && ime_busy)  ime_reads <= ime_reads + 1;
      if (fme_req.valid && !ime_busy) fme_reads <= fme_reads + 1;
    end
  end

endmodule
