// tb_svm_classifier: normalized cells are fed in the order the block normalizer produces them
// (blocks in raster order, the four cells of a block in a row), with random values, random
// idle cycles and random weights and bias. A model forms, for every 7x15-block window at a
// two-block stride, the dot product of the window's 3780 features with the weight vector
// (weight SRAM i holds component i; one word holds the four cells of a block) minus the
// bias, and its sign. Each window's score, sign and position must match, each window is
// reported once, and both decisions (object and background) must occur.
module tb_svm_classifier;
  logic clk = 0, rst_n = 1;
  logic [7:0] bnh = 9; logic [15:0] bnv = 17;
  logic in_valid = 0, in_ready;
  logic signed [8:0][13:0] in_fv = '0;
  logic [1:0] in_pos = 0; logic [7:0] in_bx = 0; logic [15:0] in_by = 0;
  logic w_we = 0; logic [3:0] w_sel = 0; logic [6:0] w_addr = 0; logic [63:0] w_wdata = 0;
  logic signed [47:0] bias = 0;
  logic det_valid, bypass_hit; logic [6:0] det_wx; logic [9:0] det_wy; logic [15:0] det_widx;
  logic signed [47:0] det_score; logic signed [1:0] det_sign;
  int checks = 0, failures = 0, npos = 0, nneg = 0, ndet = 0;
  int feat [0:31][0:31][4][9];
  logic [63:0] wm [9][105];
  longint exp_s [int]; int got [int];
  int BNH;

  svm_classifier dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && det_valid) begin
    automatic int k = int'(det_widx), n = (BNH-7)/2+1;
    checks++; ndet++;
    if (!exp_s.exists(k) || got.exists(k) || k != int'(det_wy)*n + int'(det_wx)) begin
      failures++; $display("FAIL unexpected window %0d", k);
    end else begin
      automatic longint e = exp_s[k];
      if (longint'(det_score) != e || det_sign != ((e > 0) ? 2'sd1 : (e == 0) ? 2'sd0 : -2'sd1)) begin
        failures++; $display("FAIL window %0d score %0d exp %0d sign %0d", k, det_score, e, det_sign);
      end
      if (e > 0) npos++; else nneg++;
    end
    got[k] = 1;
  end

  task automatic frame(input int bw, input int bh, input int gaps);
    int n = (bw-7)/2+1, m = (bh-15)/2+1;
    BNH = bw; bnh <= 8'(bw); bnv <= 16'(bh);
    exp_s.delete(); got.delete();
    for (int y = 0; y < bh; y++) for (int x = 0; x < bw; x++) for (int p = 0; p < 4; p++)
      for (int i = 0; i < 9; i++) feat[y][x][p][i] = int'($urandom_range(0, 8192)) - 4096;
    for (int wy = 0; wy < m; wy++) for (int wx = 0; wx < n; wx++) begin
      longint s = 0;
      for (int by = 0; by < 15; by++) for (int bx = 0; bx < 7; bx++) for (int p = 0; p < 4; p++)
        for (int i = 0; i < 9; i++)
          s += longint'(feat[2*wy+by][2*wx+bx][p][i]) * longint'($signed(wm[i][by*7+bx][(3-p)*16 +: 16]));
      exp_s[wy*n+wx] = s - longint'(bias);
    end
    @(posedge clk);
    for (int y = 0; y < bh; y++) for (int x = 0; x < bw; x++) for (int p = 0; p < 4; p++) begin
      if (gaps && $urandom_range(0, 3) == 0) begin in_valid <= 0; repeat ($urandom_range(1, 3)) @(posedge clk); end
      in_valid <= 1; in_pos <= 2'(p); in_bx <= 8'(x); in_by <= 16'(y);
      for (int i = 0; i < 9; i++) in_fv[i] <= 14'(feat[y][x][p][i]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0;
    repeat (50) @(posedge clk);
    checks++;
    if (got.size() != n*m) begin failures++; $display("FAIL %0d of %0d windows", got.size(), n*m); end
  endtask

  initial begin
    #1 rst_n = 0; repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 9; i++) for (int a = 0; a < 105; a++) begin
      wm[i][a] = {$urandom, $urandom};
      w_we <= 1; w_sel <= 4'(i); w_addr <= 7'(a); w_wdata <= wm[i][a];
      @(posedge clk);
    end
    w_we <= 0;
    bias <= 48'sd5000;
    @(posedge clk);
    frame(9, 17, 0);
    frame(11, 19, 1);
    frame(7, 15, 1);
    $display("windows %0d positive %0d negative %0d", ndet, npos, nneg);
    checks++;
    if (npos == 0 || nneg == 0) begin failures++; $display("FAIL only one decision seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
