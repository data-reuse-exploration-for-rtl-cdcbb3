// fme_interp: row-parallel interpolation engine of the FME engine.
//
// It takes one line of 10 integer reference pixels per clock and produces,
// for the nine half-pel refinement candidates around an integer position,
// the four pixels of one line of each candidate's 4x4 element. Ten pixels
// (p[0..9] = positions x-3 .. x+6) suffice for the four integer pixels x..x+3
// and the five horizontal half positions x-1/2 .. x+3.5 that three
// horizontally adjacent candidates share, so one memory line serves all nine
// candidates (inter-candidate reuse) and all four pixels of a line
// (intra-candidate reuse).
//
// Half-pel samples use the H.264 six-tap filter (1, -5, 20, 20, -5, 1):
//   horizontal or vertical half: clip((tap6 + 16) >> 5)
//   centre (half, half): six-tap over the unrounded horizontal sums,
//                        clip((tap6 + 512) >> 10)
// A window of the last seven lines is kept. After line k has been shifted in,
// the outputs belong to line k-3: candidates with vertical offset 0 use
// integer line k-3, offset +1/2 the half line between k-3 and k-2, offset
// -1/2 the half line between k-4 and k-3. So the first output line is ready
// after seven input lines and a 4-line element needs 10 input lines.
// Candidate index = (dy + 1) * 3 + (dx + 1), dx, dy in half-pel units
// (-1, 0, +1); index 4 is the integer position.
//
// Quarter pass (q_en = 1): the nine outputs become the best half-pel
// position (qbx, qby), in half-pel units, and the eight quarter-pel positions
// around it; candidate index = (qy + 1) * 3 + (qx + 1), qx, qy in quarter-pel
// units. The same window holds every half sample they need: a grid of half
// samples two half-pel steps either side of each output pixel (integer pixels
// x-1 .. x+4 and all five horizontal halves, on lines k-4 .. k-2 and the half
// lines between them) is formed, and each quarter sample is the rounded
// average of the two grid samples next to it, (a + b + 1) >> 1; on a diagonal
// quarter position those are the two neighbours that lie on a horizontal and
// a vertical half position, as H.264 prescribes.
//
// Interface: in_valid / in_pix shift a line in at the clock edge; cand_pix is
// combinational from the window and q_en / qbx / qby. Fed with columns instead of rows, the same
// engine interpolates the transposed block and dx and dy swap roles.
// The 10-pixel line, the filter, the nine candidates and bilinear quarter
// samples follow the document; reusing the half-pel window for the quarter
// pass is this design's choice.
// The rounding offsets and clipping are the standard H.264 ones, the document
// prints the filter without them; the window arrangement is this design's.
module fme_interp
  import me_pkg::*;
(
  input  logic clk,
  input  logic in_valid,
  input  pix_t in_pix [10],
  input  logic q_en,                // 1: quarter pass around (qbx, qby)
  input  logic signed [1:0] qbx,    // best half-pel offset, -1 .. 1
  input  logic signed [1:0] qby,
  output pix_t cand_pix [9][4]
);

  // Window: index 0 is the newest line.
  pix_t              win_p [7][6];   // integer pixels x-1 .. x+4
  logic signed [15:0] win_b [7][5];  // unrounded horizontal sums, x-1/2 .. x+3.5

  function automatic int tap6(input int a, b, c, d, e, f);
    return a - 5 * b + 20 * c + 20 * d - 5 * e + f;
  endfunction

  function automatic pix_t clip_shift(input int v, input int sh);
    int r;
    r = (v + (1 <<< (sh - 1))) >>> sh;
    if (r < 0)   return 8'd0;
    if (r > 255) return 8'd255;
    return pix_t'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int w = 6; w > 0; w--) begin
        win_p[w] <= win_p[w-1];
        win_b[w] <= win_b[w-1];
      end
      for (int c = 0; c < 6; c++) win_p[0][c] <= in_pix[2+c];
      for (int m = 0; m < 5; m++)
        win_b[0][m] <= 16'(tap6(int'(in_pix[m]), int'(in_pix[m+1]), int'(in_pix[m+2]),
                                int'(in_pix[m+3]), int'(in_pix[m+4]), int'(in_pix[m+5])));
    end
  end

  // Half-sample grid around line k-3: row u = 0..4 is half-pel line u - 2
  // (even u: integer lines k-4, k-3, k-2; odd u: the half lines between),
  // column v = 0..10 is half-pel column v - 2 relative to pixel x.
  pix_t grid [5][11];

  always_comb begin
    for (int u = 0; u < 5; u += 2) begin
      for (int c = 0; c < 6; c++) grid[u][2*c] = win_p[4-u/2][c];
      for (int m = 0; m < 5; m++) grid[u][2*m+1] = clip_shift(int'(win_b[4-u/2][m]), 5);
    end
    for (int c = 0; c < 6; c++) begin
      grid[1][2*c] = clip_shift(tap6(int'(win_p[6][c]), int'(win_p[5][c]), int'(win_p[4][c]),
                                     int'(win_p[3][c]), int'(win_p[2][c]), int'(win_p[1][c])), 5);
      grid[3][2*c] = clip_shift(tap6(int'(win_p[5][c]), int'(win_p[4][c]), int'(win_p[3][c]),
                                     int'(win_p[2][c]), int'(win_p[1][c]), int'(win_p[0][c])), 5);
    end
    for (int m = 0; m < 5; m++) begin
      grid[1][2*m+1] = clip_shift(tap6(int'(win_b[6][m]), int'(win_b[5][m]), int'(win_b[4][m]),
                                       int'(win_b[3][m]), int'(win_b[2][m]), int'(win_b[1][m])), 10);
      grid[3][2*m+1] = clip_shift(tap6(int'(win_b[5][m]), int'(win_b[4][m]), int'(win_b[3][m]),
                                       int'(win_b[2][m]), int'(win_b[1][m]), int'(win_b[0][m])), 10);
    end
  end

  always_comb begin
    for (int t = 0; t < 9; t++)
      for (int c = 0; c < 4; c++) begin
        int px, py;   // position, quarter-pel units: px from pixel x-1, py from line k-4
        int u0, v0;
        if (q_en) begin
          px = 4 * c + 4 + 2 * int'(qbx) + (t % 3 - 1);
          py = 8 + 2 * int'(qby) + (t / 3 - 1) - 4;
        end else begin
          px = 4 * c + 4 + 2 * (t % 3 - 1);
          py = 4 + 2 * (t / 3 - 1);
        end
        u0 = py / 2;
        v0 = px / 2;
        if (px % 2 == 0 && py % 2 == 0)
          cand_pix[t][c] = grid[u0][v0];
        else if (py % 2 == 0)
          cand_pix[t][c] = pix_t'((int'(grid[u0][v0]) + int'(grid[u0][v0+1]) + 1) >> 1);
        else if (px % 2 == 0)
          cand_pix[t][c] = pix_t'((int'(grid[u0][v0]) + int'(grid[u0+1][v0]) + 1) >> 1);
        else if ((u0 + v0) % 2 == 1)
          cand_pix[t][c] = pix_t'((int'(grid[u0][v0]) + int'(grid[u0+1][v0+1]) + 1) >> 1);
        else
          cand_pix[t][c] = pix_t'((int'(grid[u0+1][v0]) + int'(grid[u0][v0+1]) + 1) >> 1);
      end
  end

endmodule
