// ime_engine: integer motion estimation engine with the parallel 2-D adder
// tree architecture. It runs a full search of SR x SR candidates for one
// 16x16 macroblock and returns, for each of the 41 VBS blocks, the best
// integer motion vector and its SAD.
//
// How it works: the current macroblock sits in a register buffer. The snake
// scan controller reads reference data from the search-window memory, one
// 16-pixel row or column per clock, into the 16x16 reference array, which
// shifts so that each access completes one new candidate. 256 absolute
// difference units compare the array with the current block, sixteen adder
// trees form the 4x4 SADs, the VBS tree derives the other 37 block SADs from
// them, and the decision unit keeps the minimum per block. After the 16-row
// fill the engine evaluates one candidate per clock.
//
// Interface: the current block is loaded through cur_wr_*. `start` begins a
// search; the engine drives sw_req and receives sw_data one clock later from
// a sw_sram_ladder. `done` pulses for one clock when best_mv / best_sad hold
// the result; they stay valid until the next search. Timing: `done` comes
// 16 + SR*SR - 1 + 4 clocks after `start` (1043 for SR = 32), the last four
// being pipeline latency (memory read, array, 4x4 SAD register, decision).
// The architecture follows the document; the pipeline registers are this
// design's choice.
module ime_engine
  import me_pkg::*;
#(
  parameter int SR        = 32,
  parameter int X0        = 3,
  parameter int Y0        = 3,
  parameter int TRUNC     = 3,
  parameter bit SUBSAMPLE = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cur_wr_en,
  input  logic [3:0]  cur_wr_row,
  input  pix_t        cur_wr_data [MB],
  input  logic        start,
  output logic        busy,
  output logic        done,
  output sw_req_t     sw_req,
  input  pix_t        sw_data [MB],
  output logic [15:0] best_sad [NBLK],
  output mv2_t        best_mv  [NBLK]
);

  typedef struct packed {
    logic valid;
    logic first;
    logic last;
    mv2_t mv;
  } cand_tag_t;

  pix_t        cur [MB][MB];
  pix_t        refp [MB][MB];
  logic [7:0]  ad [MB][MB];
  logic [11:0] sad4 [4][4];
  logic [11:0] sad4_q [4][4];
  logic [15:0] sad [NBLK];
  scan_t       mode, mode_d1;
  cand_tag_t   tag0, tag1, tag2, tag3;
  logic        ctrl_busy;

  cur_mb_buf u_cur (
    .clk(clk), .wr_en(cur_wr_en), .wr_row(cur_wr_row), .wr_data(cur_wr_data), .pix(cur)
  );

  ime_scan_ctrl #(.SR(SR), .X0(X0), .Y0(Y0)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(ctrl_busy), .req(sw_req), .mode(mode),
    .cand_valid(tag0.valid), .cand_first(tag0.first), .cand_last(tag0.last), .cand_mv(tag0.mv)
  );

  ime_ref_array u_ref (.clk(clk), .mode(mode_d1), .in_pix(sw_data), .ref_pix(refp));

  ime_pu_array #(.TRUNC(TRUNC), .SUBSAMPLE(SUBSAMPLE)) u_pu (.cur(cur), .refp(refp), .ad(ad));

  ime_sad4x4_tree u_t4 (.ad(ad), .sad4(sad4));

  ime_vbs_tree u_vbs (.sad4(sad4_q), .sad(sad));

  ime_decision u_dec (
    .clk(clk), .rst_n(rst_n), .in_valid(tag3.valid), .start(tag3.first), .in_mv(tag3.mv),
    .in_sad(sad), .best_sad(best_sad), .best_mv(best_mv)
  );

  // Stage 1: memory read; stage 2: array holds the candidate; stage 3: 4x4 SADs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_d1 <= SCAN_HOLD;
      tag1    <= '0;
      tag2    <= '0;
      tag3    <= '0;
      done    <= 1'b0;
    end else begin
      mode_d1 <= mode;
      tag1    <= tag0;
      tag2    <= tag1;
      tag3    <= tag2;
      done    <= tag3.valid && tag3.last;
    end
  end

  always_ff @(posedge clk) sad4_q <= sad4;

  assign busy = ctrl_busy || tag1.valid || tag2.valid || tag3.valid;

endmodule
