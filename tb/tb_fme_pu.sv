// tb_fme_pu: streams blocks of one to sixteen random 4x4 elements through the
// unit, one line per clock; after each block the accumulated cost must equal
// the sum of the elements' SATDs, and acc_clr must restart the sum.
module tb_fme_pu;
  import me_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, acc_clr = 0;
  logic [1:0] row = '0;
  pix_t cur4 [4], ref4 [4];
  logic [19:0] cost;
  int checks = 0, failures = 0;

  fme_pu dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .row(row), .cur(cur4), .refp(ref4),
    .acc_clr(acc_clr), .cost(cost));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) acc_clr = 1;
    @(negedge clk) acc_clr = 0;
    for (int n = 0; n < 60; n++) begin
      int ne, exp_c;
      int d [4][4];
      ne = (n % 3 == 0) ? 16 : $urandom_range(1, 8);
      exp_c = 0;
      for (int e = 0; e < ne; e++) begin
        for (int y = 0; y < 4; y++) begin
          @(negedge clk);
          in_valid = 1; row = 2'(y);
          for (int x = 0; x < 4; x++) begin
            cur4[x] = pix_t'($urandom_range(0, 255));
            ref4[x] = pix_t'($urandom_range(0, 255));
            d[y][x] = int'(cur4[x]) - int'(ref4[x]);
          end
        end
        exp_c += satd4(d);
      end
      @(negedge clk) in_valid = 0;
      @(negedge clk);
      checks++;
      if (int'(cost) != exp_c) begin
        failures++;
        if (failures < 5) $display("block %0d: got %0d exp %0d", n, cost, exp_c);
      end
      acc_clr = 1;
      @(negedge clk) acc_clr = 0;
      checks++;
      if (cost != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
