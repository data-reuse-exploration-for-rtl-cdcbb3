// tb_fme_mode_decision: random block costs, biased per trial so that each
// partition mode and each sub-partition wins in some trials; the chosen
// modes and total cost must match an exhaustive comparison.
module tb_fme_mode_decision;
  import tb_ref_pkg::*;
  logic [23:0] j [41];
  logic [1:0] mb_mode;
  logic [1:0] sub_mode [4];
  logic [25:0] mb_cost;
  int checks = 0, failures = 0;
  int seen_mode [4];
  int seen_sub [4];

  fme_mode_decision dut (.j(j), .mb_mode(mb_mode), .sub_mode(sub_mode), .mb_cost(mb_cost));

  initial begin
    build_blocks();
    for (int n = 0; n < 2000; n++) begin
      int c [41];
      int sc [4], sm [4];
      int best, bm, s8;
      for (int b = 0; b < 41; b++) begin
        // scale each size class by a random factor so every mode can win
        c[b] = $urandom_range(0, 1000) + (bw[b] * bh[b]) * $urandom_range(0, 8);
        j[b] = 24'(c[b]);
      end
      #1;
      for (int q = 0; q < 4; q++) begin
        int qx, qy, v;
        qx = 8 * (q % 2); qy = 8 * (q / 2);
        sc[q] = c[5 + q]; sm[q] = 0;
        // 8x4 pair, 4x8 pair, 4x4 quad found by position
        v = 0; for (int b = 9; b < 17; b++) if (bx[b] == qx && by[b] >= qy && by[b] < qy + 8) v += c[b];
        if (v < sc[q]) begin sc[q] = v; sm[q] = 1; end
        v = 0; for (int b = 17; b < 25; b++) if (by[b] == qy && bx[b] >= qx && bx[b] < qx + 8) v += c[b];
        if (v < sc[q]) begin sc[q] = v; sm[q] = 2; end
        v = 0; for (int b = 25; b < 41; b++) if (bx[b] >= qx && bx[b] < qx + 8 && by[b] >= qy && by[b] < qy + 8) v += c[b];
        if (v < sc[q]) begin sc[q] = v; sm[q] = 3; end
      end
      best = c[0]; bm = 0;
      if (c[1] + c[2] < best) begin best = c[1] + c[2]; bm = 1; end
      if (c[3] + c[4] < best) begin best = c[3] + c[4]; bm = 2; end
      s8 = sc[0] + sc[1] + sc[2] + sc[3];
      if (s8 < best) begin best = s8; bm = 3; end
      checks++;
      if (int'(mb_mode) != bm || int'(mb_cost) != best) failures++;
      for (int q = 0; q < 4; q++) begin
        checks++;
        if (int'(sub_mode[q]) != sm[q]) failures++;
        seen_sub[sm[q]]++;
      end
      seen_mode[bm]++;
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (seen_mode[m] == 0 || seen_sub[m] == 0) begin
        failures++;
        $display("mode %0d never chosen", m);
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
