// tb_ime_scan_ctrl: runs one full 32x32 search. A window model follows the
// array moves; each request must fetch exactly the row or column that the
// move brings in, each announced candidate must match the window position,
// every candidate must be visited once, the access count must be
// 16 + 32*32 - 1 = 1039 (16.23 pixels per candidate) and the search must end
// with cand_last on the last candidate.
module tb_ime_scan_ctrl;
  import me_pkg::*;
  localparam int SR = 32, X0 = 3, Y0 = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, cand_valid, cand_first, cand_last;
  sw_req_t req;
  scan_t mode;
  mv2_t cand_mv;
  int checks = 0, failures = 0;

  ime_scan_ctrl #(.SR(SR), .X0(X0), .Y0(Y0)) dut (.clk(clk), .rst_n(rst_n), .start(start),
    .busy(busy), .req(req), .mode(mode), .cand_valid(cand_valid), .cand_first(cand_first),
    .cand_last(cand_last), .cand_mv(cand_mv));
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t %s", $time, what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wx, wy, nreq, ncand, nfirst, nlast, cycles, nright;
    bit seen [SR][SR];
    wx = X0; wy = Y0 - 16;
    nreq = 0; ncand = 0; nfirst = 0; nlast = 0; cycles = 0; nright = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (busy) begin
      cycles++;
      if (req.valid) begin
        nreq++;
        case (mode)
          SCAN_DOWN: begin
            chk(req.dir == ACC_ROW && int'(req.x) == wx && int'(req.y) == wy + 16, "down request");
            wy++;
          end
          SCAN_UP: begin
            chk(req.dir == ACC_ROW && int'(req.x) == wx && int'(req.y) == wy - 1, "up request");
            wy--;
          end
          SCAN_RIGHT: begin
            chk(req.dir == ACC_COL && int'(req.x) == wx + 16 && int'(req.y) == wy, "right request");
            wx++; nright++;
          end
          default: chk(0, "request without move");
        endcase
      end
      if (cand_valid) begin
        int cx, cy;
        cx = wx - X0; cy = wy - Y0;
        ncand++;
        chk(cx >= 0 && cx < SR && cy >= 0 && cy < SR, "candidate outside range");
        if (cx >= 0 && cx < SR && cy >= 0 && cy < SR) begin
          chk(!seen[cx][cy], "candidate visited twice");
          seen[cx][cy] = 1;
        end
        chk(int'(cand_mv.x) == cx - SR / 2 && int'(cand_mv.y) == cy - SR / 2, "candidate mv");
        if (cand_first) nfirst++;
        if (cand_last) begin
          nlast++;
          chk(ncand == SR * SR, "last flag before the last candidate");
        end
      end
      @(negedge clk);
    end
    chk(nreq == 1039, $sformatf("access count %0d", nreq));
    chk(ncand == SR * SR, $sformatf("candidate count %0d", ncand));
    chk(nfirst == 1 && nlast == 1, "first/last flags");
    chk(nright == SR - 1, "column steps");
    chk(cycles == 1039, $sformatf("busy cycles %0d", cycles));
    $display("accesses %0d, candidates %0d, pixels per candidate x100 = %0d",
             nreq, ncand, nreq * 1600 / ncand);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
