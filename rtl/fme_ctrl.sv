// fme_ctrl: block and line sequencer of the FME engine.
//
// The 41 VBS blocks are refined one after another, each at its own integer
// motion vector. A block is cut into strips of 4x4 elements that the
// interpolation engine processes back to back, so the interpolation windows
// of neighbouring elements in a strip share their reference lines:
//   - normally a strip is a column of elements, read row by row; a strip of n
//     elements needs 4n + 6 rows of 10 pixels;
//   - with ADV = 1 (advanced flow) blocks wider than tall (16x8, 8x4) are cut
//     into rows of elements and read column by column, which needs the
//     two-dimensional access of the ladder-shaped window memory.
// For one macroblock the half-pel pass takes 760 accesses of 10 pixels with
// ADV = 1 and 832 with ADV = 0. With QPEL = 1 every block is read a second
// time, in the same order, for the quarter-pel pass (`pass` = 1), which
// doubles both figures (1520 and 1664).
//
// Line k of a strip is requested at clock t; pixels arrive at t+1 and enter
// the interpolation window; at t+2 line k-6 of the strip (if k >= 6) reaches
// the processing units. The tag outputs describe line k and are delayed by the
// engine. After the last line of a block the controller idles three clocks so
// the accumulators settle, then pulses `capture` for one clock with
// cap_blk / cap_transposed of the finished block, and goes on with the
// block's quarter pass or the next block. `pass` is steady from a capture to
// the next one, so it is valid for every line between them. `done` pulses in
// the last capture of block 40.
// Strip cutting and the two flows follow the document; timing and handshake
// are this design's.
module fme_ctrl
  import me_pkg::*;
#(
  parameter int OFF = 19,   // window column/row of macroblock pixel 0 at MV 0
  parameter bit ADV = 1'b1,
  parameter bit QPEL = 1'b1  // 1: quarter-pel pass after each half-pel pass
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  mv2_t       mv [NBLK],
  output logic       busy,
  output sw_req_t    req,
  // tag of the line requested this clock
  output logic       tag_out,        // line k >= 6: produces an output line
  output logic [1:0] tag_row,        // element line 0..3 of that output line
  output logic [3:0] tag_cx,         // current-block pixel of output-line pixel 0
  output logic [3:0] tag_cy,
  output logic       tag_transposed,
  // block completion
  output logic       pass,           // 0: half-pel pass, 1: quarter-pel pass
  output logic       capture,
  output logic [5:0] cap_blk,
  output logic       cap_transposed,
  output logic       done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_CAPT} state_t;

  state_t     state;
  logic [5:0] blk;
  logic [2:0] strip;
  logic [4:0] line;
  logic [1:0] drain;

  blk_geom_t  g;
  logic       tr;
  int         nstrips, nelem, nlines;
  int         sx, sy;       // strip origin in the macroblock
  int         wx, wy;       // window position of the strip origin
  int         j;

  always_comb begin
    g       = blk_geom(int'(blk));
    tr      = ADV && (g.w4 > g.h4);
    nstrips = tr ? int'(g.h4) : int'(g.w4);
    nelem   = tr ? int'(g.w4) : int'(g.h4);
    nlines  = 4 * nelem + 6;
    sx      = 4 * int'(g.x4) + (tr ? 0 : 4 * int'(strip));
    sy      = 4 * int'(g.y4) + (tr ? 4 * int'(strip) : 0);
    wx      = OFF + sx + int'(mv[blk].x);
    wy      = OFF + sy + int'(mv[blk].y);
    j       = int'(line) - 6;

    req = '0;
    if (state == S_RUN) begin
      if (tr) req = '{valid: 1'b1, dir: ACC_COL, x: CW'(wx - 3 + int'(line)), y: CW'(wy - 3)};
      else    req = '{valid: 1'b1, dir: ACC_ROW, x: CW'(wx - 3), y: CW'(wy - 3 + int'(line))};
    end
    tag_out        = (state == S_RUN) && line >= 5'd6;
    tag_row        = 2'(j);
    tag_cx         = 4'(tr ? sx + j : sx);
    tag_cy         = 4'(tr ? sy : sy + j);
    tag_transposed = tr;
  end

  assign busy           = (state != S_IDLE);
  assign capture        = (state == S_CAPT);
  assign cap_blk        = blk;
  assign cap_transposed = tr;
  assign done           = capture && blk == 6'(NBLK - 1) && (pass || !QPEL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      blk   <= '0;
      strip <= '0;
      line  <= '0;
      drain <= '0;
      pass  <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          blk   <= '0;
          strip <= '0;
          line  <= '0;
          pass  <= 1'b0;
        end
        S_RUN: begin
          if (int'(line) == nlines - 1) begin
            line <= '0;
            if (int'(strip) == nstrips - 1) begin
              strip <= '0;
              state <= S_DRAIN;
              drain <= '0;
            end else begin
              strip <= strip + 1;
            end
          end else begin
            line <= line + 1;
          end
        end
        S_DRAIN: begin
          drain <= drain + 1;
          if (drain == 2'd2) state <= S_CAPT;
        end
        S_CAPT: begin
          if (QPEL && !pass) begin
            state <= S_RUN;
            pass  <= 1'b1;
          end else if (blk == 6'(NBLK - 1)) begin
            state <= S_IDLE;
            blk   <= '0;
          end else begin
            state <= S_RUN;
            blk   <= blk + 1;
            pass  <= 1'b0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
