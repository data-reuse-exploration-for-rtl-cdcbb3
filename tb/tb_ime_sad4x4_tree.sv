// tb_ime_sad4x4_tree: random and all-maximum absolute differences; each of the
// sixteen outputs must equal the plain sum over its 4x4 block.
module tb_ime_sad4x4_tree;
  logic [7:0] ad [16][16];
  logic [11:0] sad4 [4][4];
  int checks = 0, failures = 0;

  ime_sad4x4_tree dut (.ad(ad), .sad4(sad4));

  initial begin
    for (int n = 0; n < 50; n++) begin
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) ad[y][x] = 8'(n == 0 ? 255 : $urandom_range(0, 255));
      #1;
      for (int b = 0; b < 16; b++) begin
        int s;
        s = 0;
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) s += ad[4 * (b / 4) + y][4 * (b % 4) + x];
        checks++;
        if (int'(sad4[b / 4][b % 4]) != s) failures++;
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
