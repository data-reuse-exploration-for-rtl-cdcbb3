// tb_fme_ctrl: runs the sequencer for one macroblock with random vectors, with
// the advanced flow (ADV = 1) and the basic flow (ADV = 0) side by side. Every
// request is compared with an independently generated list (strips, lines,
// direction, coordinates); each block is read twice, half-pel pass then
// quarter-pel pass. The half-pel pass totals must be 760 and 832 lines of 10
// pixels (7600 and 8320 pixels) and the whole run twice that, there must be
// 896 output lines per flow, and the 82 captures must come in order (each
// block's half-pel pass, then its quarter-pel pass) with the transposed flag
// exactly on the 16x8 and 8x4 blocks of the advanced flow.
module tb_fme_ctrl;
  import me_pkg::*;
  import tb_ref_pkg::*;
  localparam int OFF = 19;
  logic clk = 0, rst_n = 0, start = 0;
  mv2_t mv [41];
  logic busy [2];
  sw_req_t req [2];
  logic tag_out [2], tag_tr [2], capture [2], cap_tr [2], done [2], pass [2];
  logic [1:0] tag_row [2];
  logic [3:0] tag_cx [2], tag_cy [2];
  logic [5:0] cap_blk [2];
  int checks = 0, failures = 0;

  fme_ctrl #(.OFF(OFF), .ADV(1'b1)) dut_adv (.clk(clk), .rst_n(rst_n), .start(start), .mv(mv),
    .busy(busy[0]), .req(req[0]), .tag_out(tag_out[0]), .tag_row(tag_row[0]), .tag_cx(tag_cx[0]),
    .tag_cy(tag_cy[0]), .tag_transposed(tag_tr[0]), .pass(pass[0]), .capture(capture[0]), .cap_blk(cap_blk[0]),
    .cap_transposed(cap_tr[0]), .done(done[0]));
  fme_ctrl #(.OFF(OFF), .ADV(1'b0)) dut_basic (.clk(clk), .rst_n(rst_n), .start(start), .mv(mv),
    .busy(busy[1]), .req(req[1]), .tag_out(tag_out[1]), .tag_row(tag_row[1]), .tag_cx(tag_cx[1]),
    .tag_cy(tag_cy[1]), .tag_transposed(tag_tr[1]), .pass(pass[1]), .capture(capture[1]), .cap_blk(cap_blk[1]),
    .cap_transposed(cap_tr[1]), .done(done[1]));
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t %s", $time, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected request list of one flow
  int ex_dir [2][$], ex_x [2][$], ex_y [2][$];

  initial begin
    int nreq [2], nhalf [2], nout [2], ncap [2], ndone [2], pos [2];
    build_blocks();
    for (int b = 0; b < 41; b++) mv[b] = '{x: MVW'($urandom_range(0, 31) - 16), y: MVW'($urandom_range(0, 31) - 16)};
    for (int f = 0; f < 2; f++)
      for (int b = 0; b < 41; b++) begin
        int X, Y;
        bit tr;
        X = OFF + bx[b] + int'(mv[b].x);
        Y = OFF + by[b] + int'(mv[b].y);
        tr = (f == 0) && bw[b] > bh[b];
        for (int q = 0; q < 2; q++)
        if (tr) begin
          for (int s = 0; s < bh[b] / 4; s++)
            for (int k = 0; k < bw[b] + 6; k++) begin
              ex_dir[f].push_back(1); ex_x[f].push_back(X - 3 + k); ex_y[f].push_back(Y + 4 * s - 3);
            end
        end else begin
          for (int s = 0; s < bw[b] / 4; s++)
            for (int k = 0; k < bh[b] + 6; k++) begin
              ex_dir[f].push_back(0); ex_x[f].push_back(X + 4 * s - 3); ex_y[f].push_back(Y - 3 + k);
            end
        end
      end
    nreq = '{0, 0}; nhalf = '{0, 0}; nout = '{0, 0}; ncap = '{0, 0}; ndone = '{0, 0}; pos = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (busy[0] || busy[1]) begin
      for (int f = 0; f < 2; f++) begin
        if (req[f].valid) begin
          int p;
          p = pos[f];
          nreq[f]++;
          if (!pass[f]) nhalf[f]++;
          if (p < ex_x[f].size())
            chk(int'(req[f].dir) == ex_dir[f][p] && int'(req[f].x) == ex_x[f][p] && int'(req[f].y) == ex_y[f][p],
                $sformatf("flow %0d request %0d: got %0d (%0d,%0d) exp %0d (%0d,%0d)", f, p, req[f].dir,
                          req[f].x, req[f].y, ex_dir[f][p], ex_x[f][p], ex_y[f][p]));
          pos[f]++;
        end
        if (tag_out[f]) nout[f]++;
        if (capture[f]) begin
          int b;
          b = int'(cap_blk[f]);
          chk(b == ncap[f] / 2 && pass[f] == ncap[f][0], "capture order");
          chk(cap_tr[f] == (f == 0 && bw[b] > bh[b]), "transposed flag");
          ncap[f]++;
        end
        if (done[f]) ndone[f]++;
      end
      @(negedge clk);
    end
    chk(nhalf[0] == 760, $sformatf("advanced flow half-pel accesses %0d", nhalf[0]));
    chk(nhalf[1] == 832, $sformatf("basic flow half-pel accesses %0d", nhalf[1]));
    for (int f = 0; f < 2; f++) begin
      chk(nreq[f] == 2 * nhalf[f], "quarter-pel pass reads as much as the half-pel pass");
      chk(nout[f] == 896, "output lines");
      chk(ncap[f] == 82 && ndone[f] == 1, "captures");
    end
    $display("half-pel pass pixels read: advanced %0d, basic %0d", nhalf[0] * 10, nhalf[1] * 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
