// tb_cur_mb_buf: writes random rows in random order and checks the parallel
// output after every write, including that unwritten rows hold their value.
module tb_cur_mb_buf;
  import me_pkg::*;
  logic clk = 0;
  logic wr_en = 0;
  logic [3:0] wr_row = '0;
  pix_t wr_data [16];
  pix_t pix [16][16];
  int model [16][16];
  int checks = 0, failures = 0;

  cur_mb_buf dut (.clk(clk), .wr_en(wr_en), .wr_row(wr_row), .wr_data(wr_data), .pix(pix));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 100; n++) begin
      int r;
      r = (n < 16) ? n : $urandom_range(0, 15);
      @(negedge clk);
      wr_en = (n < 16) || ($urandom_range(0, 3) != 0);
      wr_row = 4'(r);
      for (int c = 0; c < 16; c++) wr_data[c] = pix_t'($urandom_range(0, 255));
      if (wr_en) for (int c = 0; c < 16; c++) model[r][c] = int'(wr_data[c]);
      @(negedge clk);
      wr_en = 0;
      if (n >= 15)
        for (int y = 0; y < 16; y++)
          for (int x = 0; x < 16; x++) begin
            checks++;
            if (int'(pix[y][x]) != model[y][x]) failures++;
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
