// ime_scan_ctrl: search-order controller of the IME engine (snake scan).
//
// For a full search over SR x SR candidates it first fills the reference
// array with 16 rows (the first candidate is complete after the 16th row),
// then walks down the first candidate column one row per clock, steps right
// at the bottom by reading one 16-pixel column, walks up the next column, and
// so on. Every access after the fill brings exactly one new candidate, so a
// search costs 16 + SR*SR - 1 accesses of 16 pixels (1039 for SR = 32).
// The snake order, the fill and the one-row / one-column reloads follow the
// document; the handshake and encodings are this design's.
//
// Interface: `start` (one clock, while idle) begins a search. While busy the
// controller issues one search-window request per clock on `req`, together
// with the array move `mode` that the returned pixels are for and, when the
// access completes a candidate, cand_valid / cand_mv / cand_first /
// cand_last for that candidate. Candidate (cx, cy) has its reference block at
// window position (X0 + cx, Y0 + cy) and motion vector (cx - SR/2, cy - SR/2).
// Requests are not stalled; the memory answers each one a clock later.
module ime_scan_ctrl
  import me_pkg::*;
#(
  parameter int SR = 32,  // search range edge: H[-16,15], V[-16,15]
  parameter int X0 = 3,   // window position of candidate (0, 0)
  parameter int Y0 = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  output logic    busy,
  output sw_req_t req,
  output scan_t   mode,
  output logic    cand_valid,
  output logic    cand_first,
  output logic    cand_last,
  output mv2_t    cand_mv
);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_SCAN} state_t;

  state_t     state;
  logic [4:0] fill_cnt;
  int unsigned cx, cy;          // current candidate
  logic        down;            // walking down the current column
  int unsigned ncx, ncy;        // candidate this clock's access completes
  logic        ndown;

  assign busy = (state != S_IDLE);

  always_comb begin
    req        = '0;
    mode       = SCAN_HOLD;
    cand_valid = 1'b0;
    cand_first = 1'b0;
    ncx        = cx;
    ncy        = cy;
    ndown      = down;
    case (state)
      S_FILL: begin
        req   = '{valid: 1'b1, dir: ACC_ROW, x: CW'(X0), y: CW'(Y0 + int'(fill_cnt))};
        mode  = SCAN_DOWN;
        ncx   = 0;
        ncy   = 0;
        ndown = 1'b1;
        cand_valid = (fill_cnt == 5'(MB - 1));
        cand_first = cand_valid;
      end
      S_SCAN: begin
        cand_valid = 1'b1;
        if (down && cy != SR - 1) begin
          req  = '{valid: 1'b1, dir: ACC_ROW, x: CW'(X0 + cx), y: CW'(Y0 + cy + MB)};
          mode = SCAN_DOWN;
          ncy  = cy + 1;
        end else if (!down && cy != 0) begin
          req  = '{valid: 1'b1, dir: ACC_ROW, x: CW'(X0 + cx), y: CW'(Y0 + cy - 1)};
          mode = SCAN_UP;
          ncy  = cy - 1;
        end else begin
          req   = '{valid: 1'b1, dir: ACC_COL, x: CW'(X0 + cx + MB), y: CW'(Y0 + cy)};
          mode  = SCAN_RIGHT;
          ncx   = cx + 1;
          ndown = !down;
        end
      end
      default: ;
    endcase
  end

  assign cand_mv   = '{x: MVW'(int'(ncx) - SR / 2), y: MVW'(int'(ncy) - SR / 2)};
  assign cand_last = cand_valid && ncx == SR - 1 &&
                     ((ndown && ncy == SR - 1) || (!ndown && ncy == 0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      fill_cnt <= '0;
      cx       <= 0;
      cy       <= 0;
      down     <= 1'b1;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state    <= S_FILL;
          fill_cnt <= '0;
        end
        S_FILL: begin
          fill_cnt <= fill_cnt + 1;
          if (fill_cnt == 5'(MB - 1)) state <= (SR == 1) ? S_IDLE : S_SCAN;
        end
        S_SCAN: if (cand_last) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      if (state != S_IDLE) begin
        cx   <= ncx;
        cy   <= ncy;
        down <= ndown;
      end
    end
  end

endmodule
