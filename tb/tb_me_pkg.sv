// tb_me_pkg: checks the package's block table against the reference block
// list (positions and sizes of all 41 blocks, which together tile the
// macroblock seven times) and its Exp-Golomb length function.
module tb_me_pkg;
  import me_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  initial begin
    int cov [16][16];
    build_blocks();
    for (int b = 0; b < NBLK; b++) begin
      blk_geom_t g;
      g = blk_geom(b);
      checks++;
      if (4 * int'(g.x4) != bx[b] || 4 * int'(g.y4) != by[b] || 4 * int'(g.w4) != bw[b] || 4 * int'(g.h4) != bh[b]) begin
        failures++;
        $display("block %0d geometry", b);
      end
      for (int y = 0; y < 4 * int'(g.h4); y++)
        for (int x = 0; x < 4 * int'(g.w4); x++) cov[4 * g.y4 + y][4 * g.x4 + x]++;
    end
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        checks++;
        if (cov[y][x] != 7) failures++;
      end
    for (int v = -300; v <= 300; v++) begin
      checks++;
      if (int'(se_len(v)) != se_bits(v)) failures++;
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
