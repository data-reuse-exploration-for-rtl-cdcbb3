// tb_fme_interp: feeds ten 10-pixel lines of a random window (rows y-3 .. y+6
// around a 4x4 element at (x, y)) and, for each of the four output lines,
// compares all 9 x 4 candidate pixels with the H.264 half-pel samples computed
// directly from the window. Repeated at several positions, including flat
// white and black areas that drive the clipping. Every position is fed a
// second time in the quarter mode, around a random half-pel offset, and the
// outputs are compared with the H.264 quarter samples.
module tb_fme_interp;
  import me_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, in_valid = 0;
  pix_t in_pix [10];
  pix_t cand_pix [9][4];
  logic q_en = 0;
  logic signed [1:0] qbx = '0, qby = '0;
  int checks = 0, failures = 0;

  fme_interp dut (.clk(clk), .in_valid(in_valid), .in_pix(in_pix), .q_en(q_en), .qbx(qbx), .qby(qby), .cand_pix(cand_pix));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fill_random(0);
    // a saturated corner: white square with a black line for clipping
    for (int y = 30; y < 45; y++) for (int x = 30; x < 45; x++) sw[y][x] = (x == 37) ? 0 : 255;
    for (int n = 0; n < 120; n++) begin
      int x, y;
      q_en = (n >= 60);
      qbx = 2'($urandom_range(0, 2) - 1);
      qby = 2'($urandom_range(0, 2) - 1);
      x = (n % 60 < 4) ? 33 + n % 60 : $urandom_range(3, SWE - 7);
      y = (n % 60 < 4) ? 33 : $urandom_range(3, SWE - 7);
      for (int k = 0; k < 10; k++) begin
        @(negedge clk);
        in_valid = 1;
        for (int i = 0; i < 10; i++) in_pix[i] = pix_t'(sw[y - 3 + k][x - 3 + i]);
        @(negedge clk);
        in_valid = 0;
        if (k >= 6) begin
          int j;
          j = k - 6;
          for (int t = 0; t < 9; t++)
            for (int c = 0; c < 4; c++) begin
              int e;
              if (q_en)
                e = qpel(4 * (x + c) + 2 * int'(qbx) + (t % 3 - 1), 4 * (y + j) + 2 * int'(qby) + (t / 3 - 1));
              else
                e = hpel(2 * (x + c) + (t % 3 - 1), 2 * (y + j) + (t / 3 - 1));
              checks++;
              if (int'(cand_pix[t][c]) != e) begin
                failures++;
                if (failures < 6) $display("pos (%0d,%0d) line %0d cand %0d pix %0d: got %0d exp %0d",
                                           x, y, j, t, c, cand_pix[t][c], e);
              end
            end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
