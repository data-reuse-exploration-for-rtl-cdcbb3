// tb_fme_mv_cost: random vectors, predictors and lambdas; the rate cost must
// equal lambda times the two signed Exp-Golomb code lengths.
module tb_fme_mv_cost;
  import tb_ref_pkg::*;
  logic [7:0] lambda;
  logic signed [8:0] mx, my, px, py;
  logic [13:0] cost;
  int checks = 0, failures = 0;

  fme_mv_cost dut (.lambda(lambda), .mvq_x(mx), .mvq_y(my), .pmvq_x(px), .pmvq_y(py), .cost(cost));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int e;
      lambda = 8'($urandom_range(0, 40));
      mx = 9'($urandom_range(0, 130) - 66);
      my = 9'($urandom_range(0, 130) - 66);
      px = (n % 4 == 0) ? mx : 9'($urandom_range(0, 130) - 66);
      py = 9'($urandom_range(0, 130) - 66);
      #1;
      e = int'(lambda) * (se_bits(int'(mx) - int'(px)) + se_bits(int'(my) - int'(py)));
      checks++;
      if (int'(cost) != e) begin
        failures++;
        if (failures < 5) $display("got %0d exp %0d", cost, e);
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
