// tb_sw_sram_ladder: fills the 53x53 window with random pixels through the row
// write port, then checks random 16-pixel row and column reads against the
// stored image (single-cycle row and column access is what the ladder
// arrangement provides) and that the access counter counts every read.
module tb_sw_sram_ladder;
  import me_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [CW-1:0] wr_x = '0, wr_y = '0;
  pix_t wr_data [16];
  sw_req_t req = '0;
  pix_t rd_data [16];
  logic [31:0] rd_count;
  int checks = 0, failures = 0;

  sw_sram_ladder dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_x(wr_x), .wr_y(wr_y),
    .wr_data(wr_data), .rd_req(req), .rd_data(rd_data), .rd_count(rd_count));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nreads;
    fill_random(0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < SWE; y++)
      for (int xs = 0; xs < 4; xs++) begin
        int x0;
        x0 = (xs == 3) ? SWE - 16 : 16 * xs;
        @(negedge clk);
        wr_en = 1; wr_x = CW'(x0); wr_y = CW'(y);
        for (int k = 0; k < 16; k++) wr_data[k] = pix_t'(sw[y][x0 + k]);
      end
    @(negedge clk) wr_en = 0;
    nreads = 0;
    for (int n = 0; n < 400; n++) begin
      int x, y;
      bit col;
      col = n % 2 == 1;
      x = $urandom_range(0, col ? SWE - 1 : SWE - 16);
      y = $urandom_range(0, col ? SWE - 16 : SWE - 1);
      @(negedge clk);
      req = '{valid: 1'b1, dir: col ? ACC_COL : ACC_ROW, x: CW'(x), y: CW'(y)};
      nreads++;
      @(negedge clk);
      req = '0;
      for (int k = 0; k < 16; k++) begin
        int exp_v;
        exp_v = col ? sw[y + k][x] : sw[y][x + k];
        checks++;
        if (int'(rd_data[k]) != exp_v) begin
          failures++;
          if (failures < 5) $display("read %s (%0d,%0d) lane %0d: got %0d exp %0d",
                                     col ? "col" : "row", x, y, k, rd_data[k], exp_v);
        end
      end
    end
    checks++;
    if (rd_count != 32'(nreads)) begin failures++; $display("rd_count %0d exp %0d", rd_count, nreads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
