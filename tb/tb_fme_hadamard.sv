// tb_fme_hadamard: random and extreme 4x4 difference blocks, fed one line per
// clock with gaps; the SATD must equal sum |H D H^T| and appear one clock
// after the fourth line.
module tb_fme_hadamard;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0] row = '0;
  logic signed [8:0] diff [4];
  logic satd_valid;
  logic [16:0] satd;
  int checks = 0, failures = 0;

  fme_hadamard dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .row(row), .diff(diff),
    .satd_valid(satd_valid), .satd(satd));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d [4][4];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++)
          d[y][x] = (n == 0) ? 255 : (n == 1) ? ((x + y) % 2 ? 255 : -255) : $urandom_range(0, 510) - 255;
      for (int y = 0; y < 4; y++) begin
        @(negedge clk);
        in_valid = 1; row = 2'(y);
        for (int x = 0; x < 4; x++) diff[x] = 9'(d[y][x]);
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (satd_valid != (y == 3)) failures++;
        if (y == 3) begin
          checks++;
          if (int'(satd) != satd4(d)) begin
            failures++;
            if (failures < 5) $display("got %0d exp %0d", satd, satd4(d));
          end
        end
        if ($urandom_range(0, 1) == 1) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
