// tb_fme_engine: two-pass (half-pel, then quarter-pel) refinement of a whole
// macroblock. The window is random with a noisy copy of the current block
// planted at a fractional offset;
// each block gets an integer vector near the planted one. For each of the 41
// blocks the refined quarter-pel vector and cost J = SATD + lambda * bits(mvd)
// are compared with a direct computation from the window (each pass starts
// at its centre, then candidates 0..8, strict improvement), the partition
// decision is compared too, and a macroblock must take 1849 clocks. Both a
// half-pel and a quarter-pel result must occur. Run with the advanced flow
// (transposed strips) at its defaults.
module tb_fme_engine;
  import me_pkg::*;
  import tb_ref_pkg::*;
  localparam int OFF = 19;
  logic clk = 0, rst_n = 0;
  logic cur_wr_en = 0, start = 0, busy, done;
  logic [3:0] cur_wr_row = '0;
  pix_t cur_wr_data [16];
  mv2_t mv [41];
  logic [7:0] lambda;
  logic signed [8:0] pmvq_x, pmvq_y;
  sw_req_t sw_req;
  pix_t sw_data [16];
  logic signed [8:0] mvq_x [41], mvq_y [41];
  logic [23:0] blk_j [41];
  logic [1:0] mb_mode;
  logic [1:0] sub_mode [4];
  logic [25:0] mb_cost;
  logic sw_wr_en = 0;
  logic [CW-1:0] sw_wr_x = '0, sw_wr_y = '0;
  pix_t sw_wr_data [16];
  logic [31:0] rd_count;
  int checks = 0, failures = 0;

  sw_sram_ladder u_sw (.clk(clk), .rst_n(rst_n), .wr_en(sw_wr_en), .wr_x(sw_wr_x), .wr_y(sw_wr_y),
    .wr_data(sw_wr_data), .rd_req(sw_req), .rd_data(sw_data), .rd_count(rd_count));
  fme_engine dut (.clk(clk), .rst_n(rst_n), .cur_wr_en(cur_wr_en), .cur_wr_row(cur_wr_row),
    .cur_wr_data(cur_wr_data), .mv(mv), .lambda(lambda), .pmvq_x(pmvq_x), .pmvq_y(pmvq_y),
    .start(start), .busy(busy), .done(done), .sw_req(sw_req), .sw_data(sw_data),
    .mvq_x(mvq_x), .mvq_y(mvq_y), .blk_j(blk_j), .mb_mode(mb_mode), .sub_mode(sub_mode),
    .mb_cost(mb_cost));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, nhalf, nquarter;
    build_blocks();
    repeat (2) @(posedge clk);
    rst_n = 1;
    nhalf = 0; nquarter = 0;
    for (int run = 0; run < 3; run++) begin
      int px4, py4, jb [41];
      fill_random(0);
      // current block = interpolated window at offset (px4, py4) / 4
      px4 = 4 * (OFF - 5 + run) + (run == 2 ? 0 : (run == 1 ? 1 : 2));
      py4 = 4 * (OFF + 4) + (run == 1 ? -2 : (run == 0 ? 3 : 2));
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++)
          cur[y][x] = clip255(qpel(px4 + 4 * x, py4 + 4 * y) + $urandom_range(0, 4) - 2);
      lambda = 8'(run * 4);
      pmvq_x = 9'(run == 2 ? -20 : 0);
      pmvq_y = 9'(8);
      for (int b = 0; b < 41; b++) begin
        int ix, iy;
        ix = (px4 - 4 * OFF) / 4; iy = (py4 - 4 * OFF) / 4;
        if (b % 5 == 3) ix += 1;
        if (b % 7 == 2) iy -= 1;
        mv[b] = '{x: MVW'(ix), y: MVW'(iy)};
      end
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
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != 1849) begin failures++; $display("macroblock took %0d clocks, expected 1849", cycles); end
      for (int b = 0; b < 41; b++) begin
        int bj, bmx, bmy;
        fme_ref(b, OFF, int'(mv[b].x), int'(mv[b].y), int'(lambda), int'(pmvq_x), int'(pmvq_y), 1'b1,
                bj, bmx, bmy);
        jb[b] = bj;
        if (bmx % 2 != 0 || bmy % 2 != 0) nquarter++;
        else if (bmx % 4 != 0 || bmy % 4 != 0) nhalf++;
        checks++;
        if (int'(blk_j[b]) != bj || int'(mvq_x[b]) != bmx || int'(mvq_y[b]) != bmy) begin
          failures++;
          if (failures < 6) $display("run %0d block %0d: got J %0d mv (%0d,%0d) exp J %0d mv (%0d,%0d)",
            run, b, blk_j[b], mvq_x[b], mvq_y[b], bj, bmx, bmy);
        end
      end
      begin
        int best;
        best = jb[0];
        if (jb[1] + jb[2] < best) best = jb[1] + jb[2];
        if (jb[3] + jb[4] < best) best = jb[3] + jb[4];
        checks++;
        if (int'(mb_cost) > best) failures++;
      end
      $display("run %0d: 16x16 mvq (%0d,%0d) J %0d, mode %0d", run, mvq_x[0], mvq_y[0], blk_j[0], mb_mode);
    end
    checks++;
    if (nhalf == 0) begin failures++; $display("no half-pel vector was chosen"); end
    checks++;
    if (nquarter == 0) begin failures++; $display("no quarter-pel vector was chosen"); end
    $display("half-pel results %0d, quarter-pel results %0d", nhalf, nquarter);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
