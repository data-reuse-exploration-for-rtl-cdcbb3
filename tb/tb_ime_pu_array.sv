// tb_ime_pu_array: random and extreme pixel pairs; every unit's output is
// compared with |(cur >> 3) - (ref >> 3)| on the checkerboard and 0 elsewhere.
module tb_ime_pu_array;
  import me_pkg::*;
  pix_t cur [16][16], refp [16][16];
  logic [7:0] ad [16][16];
  int checks = 0, failures = 0;

  ime_pu_array dut (.cur(cur), .refp(refp), .ad(ad));

  initial begin
    for (int n = 0; n < 50; n++) begin
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          cur[y][x]  = pix_t'(n == 0 ? 255 : $urandom_range(0, 255));
          refp[y][x] = pix_t'(n == 0 ? 0 : $urandom_range(0, 255));
        end
      #1;
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          int a, b, e;
          a = int'(cur[y][x]) / 8;
          b = int'(refp[y][x]) / 8;
          e = ((x + y) % 2 == 1) ? 0 : (a > b ? a - b : b - a);
          checks++;
          if (int'(ad[y][x]) != e) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
