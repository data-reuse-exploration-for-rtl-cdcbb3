// tb_me_top: end-to-end run of the whole design at its default parameters
// (32x32 full search, 3-bit truncation, 1/2 sub-sampling, advanced FME flow).
// For two macroblocks it loads a random window with a planted, quarter-pel
// shifted copy of the current block, runs integer search and two-pass
// fractional refinement, and compares the 41 integer vectors and SADs and the
// 41 refined vectors and costs with direct software computations. It checks
// the access counts (1039 IME accesses of 16 pixels, 2 x 760 FME accesses of
// 10 pixels) and the start-to-done time (1043 + 1849 clocks), and counts how
// often each mechanism occurs: array down / up / right moves, row and column
// window accesses, normal and transposed FME strips, half-pel and quarter-pel
// passes and results. A mechanism that never occurs counts as a failure.
module tb_me_top;
  import me_pkg::*;
  import tb_ref_pkg::*;
  localparam int SR = 32, PAD = 3, OFF = 19;
  logic clk = 0, rst_n = 0;
  logic sw_wr_en = 0, cur_wr_en = 0, start = 0, busy, done;
  logic [CW-1:0] sw_wr_x = '0, sw_wr_y = '0;
  pix_t sw_wr_data [16], cur_wr_data [16];
  logic [3:0] cur_wr_row = '0;
  logic [7:0] lambda;
  logic signed [8:0] pmvq_x, pmvq_y;
  mv2_t ime_mv [41];
  logic [15:0] ime_sad [41];
  logic signed [8:0] mvq_x [41], mvq_y [41];
  logic [23:0] blk_j [41];
  logic [1:0] mb_mode;
  logic [1:0] sub_mode [4];
  logic [25:0] mb_cost;
  logic [15:0] ime_reads, fme_reads;
  logic [31:0] sw_reads;
  int checks = 0, failures = 0;
  int n_down = 0, n_up = 0, n_right = 0, n_row = 0, n_col = 0, n_tr = 0, n_norm = 0, n_half = 0, n_quarter = 0, n_qpass = 0;

  me_top dut (.clk(clk), .rst_n(rst_n), .sw_wr_en(sw_wr_en), .sw_wr_x(sw_wr_x), .sw_wr_y(sw_wr_y),
    .sw_wr_data(sw_wr_data), .cur_wr_en(cur_wr_en), .cur_wr_row(cur_wr_row),
    .cur_wr_data(cur_wr_data), .lambda(lambda), .pmvq_x(pmvq_x), .pmvq_y(pmvq_y),
    .start(start), .busy(busy), .done(done), .ime_mv(ime_mv), .ime_sad(ime_sad),
    .mvq_x(mvq_x), .mvq_y(mvq_y), .blk_j(blk_j), .mb_mode(mb_mode), .sub_mode(sub_mode),
    .mb_cost(mb_cost), .ime_reads(ime_reads), .fme_reads(fme_reads), .sw_reads(sw_reads));
  always #5 clk = ~clk;

  // mechanism counters, observed inside the design
  always @(posedge clk) begin
    if (dut.u_ime.mode_d1 == SCAN_DOWN)  n_down++;
    if (dut.u_ime.mode_d1 == SCAN_UP)    n_up++;
    if (dut.u_ime.mode_d1 == SCAN_RIGHT) n_right++;
    if (dut.sw_req.valid && dut.sw_req.dir == ACC_ROW) n_row++;
    if (dut.sw_req.valid && dut.sw_req.dir == ACC_COL) n_col++;
    if (dut.u_fme.capture && dut.u_fme.cap_tr)  n_tr++;
    if (dut.u_fme.capture && !dut.u_fme.cap_tr) n_norm++;
    if (dut.u_fme.capture && dut.u_fme.pass)    n_qpass++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_blocks();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      int px4, py4, cycles;
      int ms [41], mx [41], my [41];
      fill_random(0);
      px4 = 4 * (OFF - 9 + 5 * run) + (run == 0 ? 2 : 1);
      py4 = 4 * (OFF + 6 - 3 * run) + (run == 0 ? 3 : 2);
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++)
          cur[y][x] = clip255(qpel(px4 + 4 * x, py4 + 4 * y) + $urandom_range(0, 2) - 1);
      lambda = 8'(4);
      pmvq_x = 9'(px4 - 4 * OFF);
      pmvq_y = 9'(py4 - 4 * OFF);
      for (int y = 0; y < SWE; y++)
        for (int xs = 0; xs < 4; xs++) begin
          int x0;
          x0 = (xs == 3) ? SWE - 16 : 16 * xs;
          @(negedge clk);
          sw_wr_en = 1; sw_wr_x = CW'(x0); sw_wr_y = CW'(y);
          for (int k = 0; k < 16; k++) sw_wr_data[k] = pix_t'(sw[y][x0 + k]);
        end
      @(negedge clk) sw_wr_en = 0;
      for (int y = 0; y < 16; y++) begin
        @(negedge clk);
        cur_wr_en = 1; cur_wr_row = 4'(y);
        for (int x = 0; x < 16; x++) cur_wr_data[x] = pix_t'(cur[y][x]);
      end
      @(negedge clk) cur_wr_en = 0;
      // integer search reference, snake order
      for (int cx = 0; cx < SR; cx++)
        for (int i = 0; i < SR; i++) begin
          int cy;
          cy = (cx % 2 == 0) ? i : SR - 1 - i;
          for (int b = 0; b < 41; b++) begin
            int s;
            s = block_sad(b, PAD + cx, PAD + cy, 3, 1'b1);
            if ((cx == 0 && i == 0) || s < ms[b]) begin
              ms[b] = s; mx[b] = cx - SR / 2; my[b] = cy - SR / 2;
            end
          end
        end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      chk(cycles == 1043 + 1849, $sformatf("run took %0d clocks", cycles));
      chk(ime_reads == 16'd1039, $sformatf("IME accesses %0d", ime_reads));
      chk(fme_reads == 16'(2 * 760), $sformatf("FME accesses %0d", fme_reads));
      for (int b = 0; b < 41; b++) begin
        int bj, bmx, bmy;
        chk(int'(ime_sad[b]) == ms[b] && int'(ime_mv[b].x) == mx[b] && int'(ime_mv[b].y) == my[b],
            $sformatf("run %0d IME block %0d: got %0d (%0d,%0d) exp %0d (%0d,%0d)", run, b,
                      ime_sad[b], int'(ime_mv[b].x), int'(ime_mv[b].y), ms[b], mx[b], my[b]));
        fme_ref(b, OFF, mx[b], my[b], int'(lambda), int'(pmvq_x), int'(pmvq_y), 1'b1, bj, bmx, bmy);
        if (bmx % 2 != 0 || bmy % 2 != 0) n_quarter++;
        else if (bmx % 4 != 0 || bmy % 4 != 0) n_half++;
        chk(int'(blk_j[b]) == bj && int'(mvq_x[b]) == bmx && int'(mvq_y[b]) == bmy,
            $sformatf("run %0d FME block %0d: got J %0d (%0d,%0d) exp J %0d (%0d,%0d)", run, b,
                      blk_j[b], mvq_x[b], mvq_y[b], bj, bmx, bmy));
      end
      $display("run %0d: IME 16x16 (%0d,%0d) SAD %0d; FME 16x16 (%0d,%0d)/4 J %0d; mode %0d cost %0d",
               run, int'(ime_mv[0].x), int'(ime_mv[0].y), ime_sad[0], mvq_x[0], mvq_y[0], blk_j[0],
               mb_mode, mb_cost);
    end
    $display("mechanisms: down %0d up %0d right %0d row-acc %0d col-acc %0d fme-normal %0d fme-transposed %0d quarter-pel passes %0d half-pel results %0d quarter-pel results %0d",
             n_down, n_up, n_right, n_row, n_col, n_norm, n_tr, n_qpass, n_half, n_quarter);
    chk(n_down > 0, "no down move");
    chk(n_up > 0, "no up move");
    chk(n_right > 0, "no right move");
    chk(n_row > 0 && n_col > 0, "row or column access missing");
    chk(n_norm > 0 && n_tr > 0, "normal or transposed strip missing");
    chk(n_half > 0, "no half-pel refinement chosen");
    chk(n_quarter > 0, "no quarter-pel refinement chosen");
    chk(n_qpass == 2 * 41, "quarter-pel pass count");
    chk(sw_reads == 32'(2 * (1039 + 2 * 760)), "total access count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
