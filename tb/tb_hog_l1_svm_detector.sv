// tb_hog_l1_svm_detector: random 9-bin cell vectors are streamed into the L1-norm + SVM
// detector for two image sizes and two cell sizes, with random weights and bias. A model
// normalizes each component of each 2x2-cell block by the block's sum of that component
// (x 4096, truncated), forms w.x over each 64x128-pixel window (7 x 15 blocks) and the sign
// of w.x - b; every window decision and score must match.
module tb_hog_l1_svm_detector;
  logic clk = 0, rst_n = 1, frame_start = 0;
  logic [10:0] img_width; logic [15:0] img_height; logic [2:0] cs_log2;
  logic cfg_err, cell_valid = 0, cell_ready;
  logic signed [8:0][15:0] cell_fv;
  logic w_we = 0; logic [3:0] w_sel; logic [6:0] w_addr; logic [63:0] w_wdata;
  logic signed [47:0] bias;
  logic det_valid; logic [6:0] det_wx; logic [9:0] det_wy; logic [15:0] det_widx;
  logic signed [47:0] det_score; logic signed [1:0] det_sign;
  logic blk_valid, blk_stall;
  int checks = 0, failures = 0, ndet = 0, npos = 0, nneg = 0;
  int cells [0:63][0:63][0:8];
  logic [63:0] wm [0:8][0:104];
  longint exp_score [int]; int got [int];

  hog_l1_svm_detector dut (.*);
  always #5 clk = ~clk;

  function automatic int norm(input int bx, input int by, input int p, input int i);
    int s = 0, c;
    for (int q = 0; q < 4; q++) s += cells[by+q/2][bx+q%2][i];
    c = cells[by+p/2][bx+p%2][i];
    return (s == 0) ? 0 : (c * 4096) / s;
  endfunction

  task automatic model(input int cnh, input int cnv);
    int n = (cnh-1-7)/2+1, m = (cnv-1-15)/2+1;
    exp_score.delete(); got.delete();
    for (int wy = 0; wy < m; wy++) for (int wx = 0; wx < n; wx++) begin
      longint dot = 0;
      for (int by = 0; by < 15; by++) for (int bx = 0; bx < 7; bx++)
        for (int p = 0; p < 4; p++) for (int i = 0; i < 9; i++)
          dot += longint'(norm(2*wx+bx, 2*wy+by, p, i)) *
                 longint'($signed(wm[i][by*7+bx][(3-p)*16 +: 16]));
      exp_score[wy*n+wx] = dot - longint'(bias);
    end
  endtask

  always @(posedge clk) if (det_valid) begin
    automatic int k = int'(det_widx);
    automatic longint e;
    ndet++;
    checks++;
    if (!exp_score.exists(k) || got.exists(k)) begin failures++; $display("FAIL window %0d", k); end
    else begin
      e = exp_score[k];
      if (longint'(det_score) != e || det_sign != ((e > 0) ? 2'sd1 : (e == 0) ? 2'sd0 : -2'sd1)) begin
        failures++; $display("FAIL window %0d score %0d exp %0d", k, det_score, e);
      end
      if (e > 0) npos++; else nneg++;
    end
    got[k] = 1;
  end

  task automatic frame(input int w, input int h, input int csl, input int maxv);
    int cnh = w >> csl, cnv = h >> csl;
    for (int y = 0; y < cnv; y++) for (int x = 0; x < cnh; x++) for (int i = 0; i < 9; i++)
      cells[y][x][i] = ($urandom_range(0, 9) == 0) ? 0 : $urandom_range(0, maxv);
    model(cnh, cnv);
    img_width = 11'(w); img_height = 16'(h); cs_log2 = 3'(csl);
    @(posedge clk); frame_start <= 1; @(posedge clk); frame_start <= 0;
    for (int y = 0; y < cnv; y++) for (int x = 0; x < cnh; x++) begin
      cell_valid <= 1;
      for (int i = 0; i < 9; i++) cell_fv[i] <= 16'(cells[y][x][i]);
      @(posedge clk);
      while (!cell_ready) @(posedge clk);
    end
    cell_valid <= 0;
    while (got.size() < exp_score.size()) @(posedge clk);
    repeat (30) @(posedge clk);
    checks++;
    if (got.size() != exp_score.size() || exp_score.size() == 0) begin failures++; $display("FAIL count"); end
  endtask

  initial begin
    #1 rst_n = 0; repeat (3) @(posedge clk); rst_n = 1;
    bias = 48'sd1000;
    for (int i = 0; i < 9; i++) for (int a = 0; a < 105; a++) begin
      wm[i][a] = {$urandom, $urandom};
      w_we <= 1; w_sel <= 4'(i); w_addr <= 7'(a); w_wdata <= wm[i][a];
      @(posedge clk);
    end
    w_we <= 0;
    frame(80, 144, 3, 32767);     // 8x8 cells: 10 x 18 cells, 4 windows
    frame(48, 68, 2, 300);        // 4x4 cells: 12 x 17 cells, 3 windows
    checks++;
    if (cfg_err) begin failures++; $display("FAIL cfg_err"); end
    $display("windows %0d positive %0d negative %0d", ndet, npos, nneg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
