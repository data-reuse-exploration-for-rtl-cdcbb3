// tb_ime_ref_array: a reference window model moves over a random image by
// random down / up / right steps (and holds); the array is fed the pixels that
// enter and must equal the image block under the window after every step.
module tb_ime_ref_array;
  import me_pkg::*;
  logic clk = 0;
  scan_t mode = SCAN_HOLD;
  pix_t in_pix [16];
  pix_t ref_pix [16][16];
  int img [64][64];
  int wx, wy;
  int checks = 0, failures = 0;
  int n_down = 0, n_up = 0, n_right = 0;

  ime_ref_array dut (.clk(clk), .mode(mode), .in_pix(in_pix), .ref_pix(ref_pix));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(scan_t m);
    @(negedge clk);
    mode = m;
    case (m)
      SCAN_DOWN:  for (int k = 0; k < 16; k++) in_pix[k] = pix_t'(img[wy + 16][wx + k]);
      SCAN_UP:    for (int k = 0; k < 16; k++) in_pix[k] = pix_t'(img[wy - 1][wx + k]);
      SCAN_RIGHT: for (int k = 0; k < 16; k++) in_pix[k] = pix_t'(img[wy + k][wx + 16]);
      default: ;
    endcase
    @(negedge clk);
    mode = SCAN_HOLD;
    case (m)
      SCAN_DOWN:  begin wy++; n_down++; end
      SCAN_UP:    begin wy--; n_up++; end
      SCAN_RIGHT: begin wx++; n_right++; end
      default: ;
    endcase
  endtask

  initial begin
    for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++) img[y][x] = $urandom_range(0, 255);
    wx = 5; wy = -11;   // fill: 16 down steps starting above the block at (5, 5)
    for (int i = 0; i < 16; i++) step(SCAN_DOWN);
    for (int n = 0; n < 300; n++) begin
      scan_t m;
      int r;
      r = $urandom_range(0, 9);
      if (r < 4 && wy + 17 < 64) m = SCAN_DOWN;
      else if (r < 7 && wy > 0)  m = SCAN_UP;
      else if (r < 9 && wx + 17 < 64) m = SCAN_RIGHT;
      else m = SCAN_HOLD;
      step(m);
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          checks++;
          if (int'(ref_pix[y][x]) != img[wy + y][wx + x]) failures++;
        end
    end
    checks++;
    if (n_down == 0 || n_up == 0 || n_right == 0) failures++;
    $display("moves: down %0d up %0d right %0d", n_down, n_up, n_right);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
