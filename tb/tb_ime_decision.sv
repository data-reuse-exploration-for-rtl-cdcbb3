// tb_ime_decision: several searches of random candidates (with many equal
// SADs to exercise ties); after each search every block's minimum and the
// vector of its first occurrence are compared with a software minimum.
module tb_ime_decision;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, start = 0;
  mv2_t in_mv;
  logic [15:0] in_sad [41];
  logic [15:0] best_sad [41];
  mv2_t best_mv [41];
  int checks = 0, failures = 0, ties = 0;

  ime_decision dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .start(start), .in_mv(in_mv),
    .in_sad(in_sad), .best_sad(best_sad), .best_mv(best_mv));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ms [41];
    int mx [41], my [41];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 5; s++) begin
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 4) != 0) || n == 0;
        start = (n == 0);
        in_mv = '{x: MVW'($urandom_range(0, 63)), y: MVW'($urandom_range(0, 63))};
        for (int b = 0; b < 41; b++) begin
          in_sad[b] = 16'($urandom_range(0, 40));
          if (in_valid) begin
            if (n == 0 || int'(in_sad[b]) < ms[b]) begin
              ms[b] = int'(in_sad[b]); mx[b] = int'(in_mv.x); my[b] = int'(in_mv.y);
            end else if (int'(in_sad[b]) == ms[b]) ties++;
          end
        end
      end
      @(negedge clk);
      in_valid = 0; start = 0;
      for (int b = 0; b < 41; b++) begin
        checks++;
        if (int'(best_sad[b]) != ms[b] || int'(best_mv[b].x) != mx[b] || int'(best_mv[b].y) != my[b])
          failures++;
      end
    end
    checks++;
    if (ties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
