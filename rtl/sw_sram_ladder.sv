// sw_sram_ladder: search-window (SW) memory built from NB single-pixel-wide
// banks with the ladder-shaped data arrangement, so that NB horizontally
// consecutive pixels (a row segment) or NB vertically consecutive pixels (a
// column segment) starting anywhere in the window are read in one cycle.
//
// Arrangement: row y of the window is rotated right by y positions before it is
// spread over the banks, so pixel (x, y) lives in bank (x + y) mod NB at word
// y * WPR + x / NB, WPR = ceil(SW_W / NB). A plain arrangement, bank = x mod NB,
// would put a whole column into one bank; the rotation spreads both a row and
// a column over all NB banks. The rotation rule and the banks-per-column idea
// follow the document; the document's example uses 8 banks, this design uses
// NB = 16 because both engines ask for 16 pixels at a time.
//
// Interface: one write port that stores a row segment of NB pixels at (wr_x,
// wr_y), and one read port taking a request (direction, x, y). Lane k of the
// read data is pixel (x + k, y) for a row request or (x, y + k) for a column
// request. Read latency is one clock. Lanes that fall outside the window
// return unspecified pixels; callers ignore them. rd_count counts accepted
// read requests, the memory-access figure the document's comparisons use.
module sw_sram_ladder
  import me_pkg::*;
#(
  parameter int SW_W = 53,  // window width: 16 + 31 + 6 (search range + FME filter margin)
  parameter int SW_H = 53,
  parameter int NB   = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // write port: a row segment
  input  logic             wr_en,
  input  logic [CW-1:0]    wr_x,
  input  logic [CW-1:0]    wr_y,
  input  pix_t             wr_data [NB],
  // read port
  input  sw_req_t          rd_req,
  output pix_t             rd_data [NB],
  output logic [31:0]      rd_count
);

  localparam int WPR   = (SW_W + NB - 1) / NB;
  localparam int DEPTH = SW_H * WPR;
  localparam int AW    = $clog2(DEPTH);
  localparam int LW    = $clog2(NB);

  pix_t bank_mem [NB][DEPTH];

  // Word address of pixel (x, y); out-of-window rows wrap to word 0.
  function automatic logic [AW-1:0] word_addr(input int unsigned x, input int unsigned y);
    int unsigned a;
    a = y * WPR + x / NB;
    return (a < DEPTH) ? AW'(a) : '0;
  endfunction

  logic [LW-1:0] rot_q;        // lane of bank 0 in the read data, one cycle late
  pix_t          bank_q [NB];

  // Per-bank address: lane k = (b - x - y) mod NB goes to bank b.
  always_ff @(posedge clk) begin
    for (int b = 0; b < NB; b++) begin
      int unsigned k;
      k = unsigned'(((b - int'(rd_req.x) - int'(rd_req.y)) % NB + NB) % NB);
      if (rd_req.valid) begin
        if (rd_req.dir == ACC_ROW)
          bank_q[b] <= bank_mem[b][word_addr(int'(rd_req.x) + k, int'(rd_req.y))];
        else
          bank_q[b] <= bank_mem[b][word_addr(int'(rd_req.x), int'(rd_req.y) + k)];
      end
    end
    if (rd_req.valid) rot_q <= LW'((int'(rd_req.x) + int'(rd_req.y)) % NB);
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int b = 0; b < NB; b++) begin
        int unsigned k;
        k = unsigned'(((b - int'(wr_x) - int'(wr_y)) % NB + NB) % NB);
        bank_mem[b][word_addr(int'(wr_x) + k, int'(wr_y))] <= wr_data[k];
      end
    end
  end

  // Undo the rotation: lane k reads bank (x + y + k) mod NB.
  always_comb begin
    for (int k = 0; k < NB; k++)
      rd_data[k] = bank_q[(int'(rot_q) + k) % NB];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            rd_count <= '0;
    else if (rd_req.valid) rd_count <= rd_count + 1;
  end

endmodule
