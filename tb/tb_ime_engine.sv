// tb_ime_engine: full 32x32 search of a random window in which a noisy copy
// of the current block is planted, at default parameters (3-bit truncation,
// 1/2 sub-sampling). The 41 best SADs and vectors are compared with an
// exhaustive software search that visits candidates in the same snake order
// (so ties resolve alike), and the start-to-done time must be 1043 clocks.
module tb_ime_engine;
  import me_pkg::*;
  import tb_ref_pkg::*;
  localparam int SR = 32, X0 = 3, Y0 = 3;
  logic clk = 0, rst_n = 0;
  logic cur_wr_en = 0, start = 0, busy, done;
  logic [3:0] cur_wr_row = '0;
  pix_t cur_wr_data [16];
  sw_req_t sw_req;
  pix_t sw_data [16];
  logic [15:0] best_sad [41];
  mv2_t best_mv [41];
  logic sw_wr_en = 0;
  logic [CW-1:0] sw_wr_x = '0, sw_wr_y = '0;
  pix_t sw_wr_data [16];
  logic [31:0] rd_count;
  int checks = 0, failures = 0;

  sw_sram_ladder u_sw (.clk(clk), .rst_n(rst_n), .wr_en(sw_wr_en), .wr_x(sw_wr_x), .wr_y(sw_wr_y),
    .wr_data(sw_wr_data), .rd_req(sw_req), .rd_data(sw_data), .rd_count(rd_count));
  ime_engine dut (.clk(clk), .rst_n(rst_n), .cur_wr_en(cur_wr_en), .cur_wr_row(cur_wr_row),
    .cur_wr_data(cur_wr_data), .start(start), .busy(busy), .done(done), .sw_req(sw_req),
    .sw_data(sw_data), .best_sad(best_sad), .best_mv(best_mv));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ms [41], mx [41], my [41];
    int cycles, run;
    build_blocks();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (run = 0; run < 2; run++) begin
      fill_random(0);
      plant_block(X0 + 7 + run, Y0 + 22 - run, run == 0 ? 3 : 0);
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
      // reference: snake order
      for (int cx = 0; cx < SR; cx++)
        for (int i = 0; i < SR; i++) begin
          int cy;
          cy = (cx % 2 == 0) ? i : SR - 1 - i;
          for (int b = 0; b < 41; b++) begin
            int s;
            s = block_sad(b, X0 + cx, Y0 + cy, 3, 1'b1);
            if ((cx == 0 && i == 0) || s < ms[b]) begin
              ms[b] = s; mx[b] = cx - SR / 2; my[b] = cy - SR / 2;
            end
          end
        end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != 1043) begin failures++; $display("latency %0d, expected 1043", cycles); end
      for (int b = 0; b < 41; b++) begin
        checks++;
        if (int'(best_sad[b]) != ms[b] || int'(best_mv[b].x) != mx[b] || int'(best_mv[b].y) != my[b]) begin
          failures++;
          if (failures < 6) $display("block %0d: got sad %0d mv (%0d,%0d) exp %0d (%0d,%0d)", b,
            best_sad[b], best_mv[b].x, best_mv[b].y, ms[b], mx[b], my[b]);
        end
      end
      $display("run %0d: 16x16 mv (%0d,%0d) sad %0d", run, best_mv[0].x, best_mv[0].y, best_sad[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
