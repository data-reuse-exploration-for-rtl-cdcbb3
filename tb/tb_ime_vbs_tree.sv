// tb_ime_vbs_tree: random 4x4 SADs; each of the 41 outputs must equal the sum
// of the 4x4 SADs that its block covers (block list from the reference model).
module tb_ime_vbs_tree;
  import me_pkg::*;
  import tb_ref_pkg::*;
  logic [11:0] sad4 [4][4];
  logic [15:0] sad [41];
  int checks = 0, failures = 0;

  ime_vbs_tree dut (.sad4(sad4), .sad(sad));

  initial begin
    build_blocks();
    for (int n = 0; n < 100; n++) begin
      for (int i = 0; i < 16; i++) sad4[i / 4][i % 4] = 12'(n == 0 ? 4080 : $urandom_range(0, 4080));
      #1;
      for (int b = 0; b < 41; b++) begin
        int s;
        s = 0;
        for (int y = by[b] / 4; y < (by[b] + bh[b]) / 4; y++)
          for (int x = bx[b] / 4; x < (bx[b] + bw[b]) / 4; x++) s += sad4[y][x];
        checks++;
        if (int'(sad[b]) != s) begin
          failures++;
          if (failures < 5) $display("block %0d got %0d exp %0d", b, sad[b], s);
        end
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
