// me_pkg: types and constants shared by the integer (IME) and fractional (FME)
// motion-estimation engines.
//
// The 41 blocks of H.264 variable block-size (VBS) motion estimation are
// numbered here once for both engines:
//   0        16x16
//   1..2     16x8  (top, bottom)
//   3..4     8x16  (left, right)
//   5..8     8x8   (raster order)
//   9..16    8x4   (two per 8x8, 8x8 blocks in raster order)
//   17..24   4x8   (two per 8x8, 8x8 blocks in raster order)
//   25..40   4x4   (raster order over the macroblock)
// Sizes are written width x height. blk_geom() gives each block's position
// and size in units of 4x4 elements. The seven sizes and the count of 41
// follow the document; the numbering is this design's own.
package me_pkg;

  localparam int PIX_W  = 8;   // luma sample width
  localparam int MB     = 16;  // macroblock edge
  localparam int NBLK   = 41;  // VBS blocks per macroblock
  localparam int CW     = 7;   // search-window coordinate width
  localparam int MVW    = 6;   // integer MV component width (signed, -16..15)

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic signed [MVW-1:0] mv_t;

  typedef struct packed {
    mv_t x;
    mv_t y;
  } mv2_t;

  // Direction of one 16-pixel search-window access.
  typedef enum logic {ACC_ROW = 1'b0, ACC_COL = 1'b1} sw_dir_t;

  typedef struct packed {
    logic          valid;
    sw_dir_t       dir;
    logic [CW-1:0] x;   // column of the first pixel
    logic [CW-1:0] y;   // row of the first pixel
  } sw_req_t;

  // Movement of the search position in the IME reference array.
  typedef enum logic [1:0] {
    SCAN_HOLD  = 2'd0,
    SCAN_DOWN  = 2'd1,  // candidate one row lower: a new row enters at the bottom
    SCAN_UP    = 2'd2,  // candidate one row higher: a new row enters at the top
    SCAN_RIGHT = 2'd3   // candidate one column right: a new column enters at the right
  } scan_t;

  typedef struct packed {
    logic [1:0] x4;  // left edge, 4x4 units
    logic [1:0] y4;  // top edge, 4x4 units
    logic [2:0] w4;  // width, 4x4 units (1, 2 or 4)
    logic [2:0] h4;  // height, 4x4 units
  } blk_geom_t;

  function automatic blk_geom_t blk_geom(input int unsigned i);
    blk_geom_t g;
    int unsigned q, s;
    if (i == 0) begin
      g = '{x4: 2'd0, y4: 2'd0, w4: 3'd4, h4: 3'd4};
    end else if (i < 3) begin
      g = '{x4: 2'd0, y4: 2'((i - 1) * 2), w4: 3'd4, h4: 3'd2};
    end else if (i < 5) begin
      g = '{x4: 2'((i - 3) * 2), y4: 2'd0, w4: 3'd2, h4: 3'd4};
    end else if (i < 9) begin
      q = i - 5;
      g = '{x4: 2'((q % 2) * 2), y4: 2'((q / 2) * 2), w4: 3'd2, h4: 3'd2};
    end else if (i < 17) begin
      q = (i - 9) / 2; s = (i - 9) % 2;
      g = '{x4: 2'((q % 2) * 2), y4: 2'((q / 2) * 2 + s), w4: 3'd2, h4: 3'd1};
    end else if (i < 25) begin
      q = (i - 17) / 2; s = (i - 17) % 2;
      g = '{x4: 2'((q % 2) * 2 + s), y4: 2'((q / 2) * 2), w4: 3'd1, h4: 3'd2};
    end else begin
      q = i - 25;
      g = '{x4: 2'(q % 4), y4: 2'(q / 4), w4: 3'd1, h4: 3'd1};
    end
    return g;
  endfunction

  // Signed Exp-Golomb code length of v, as used for motion vector differences.
  function automatic int unsigned se_len(input int v);
    int unsigned code, len;
    code = (v > 0) ? unsigned'(2 * v - 1) : unsigned'(-2 * v);
    len = 1;
    for (int k = 1; k < 16; k++)
      if ((code + 1) >> k != 0) len = 2 * k + 1;
    return len;
  endfunction

endpackage
