// tb_vision_top: end-to-end test of the whole chip at its default parameters, both engines
// running at the same time.
//
// Simplified-SURF + NNS engine: four random references are loaded, then a random 640x480
// (VGA) gray frame, an 88x136 frame and a 1024x768 (XGA) frame are streamed in; the pixel source honours pix_ready.
// A model builds the 4-D Haar cell vectors from the pixels, the 1680-D vector of every
// 64x128 scan window, and its squared distance to each reference (cell components shifted
// right by 6 against 8-bit reference components); each window's winner and distance must
// match and each window must be reported once. The same windows are also checked on the
// PLS path: random projection weights and reduced references are loaded, and the model forms
// each window's 8 projections (>>> 16, saturated) and the nearest reduced reference.
// HOG L1-norm + SVM detector: random weights and bias are loaded, then the 9-bin cell vectors
// (standing in for the cell extractor) of a 640x480 frame with 8x8-pixel cells and of a
// 320x240 frame with 4x4-pixel cells and of a 1024x768 frame with 8x8-pixel cells (128 cells
// per row, the largest row the defaults hold) are streamed in. A model normalizes each block per
// component (Eq. 4.4, p = 1, 2^12 scale), forms w.x - b over each 7x15-block window, and its
// sign; every window decision and score must match.
// Mechanisms counted, each must occur: pixel back-pressure when the FV FIFO fills (the NNS
// is slower than the pixel stream on interior cells), BBNC output stalled by the SVM, cells
// that belong to no scan window (dropped), more than one reference winning, object and
// background decisions, both cell sizes, and the configuration error for a cell size of one
// pixel, and PLS results. The cycles each frame takes are printed. Simulates in a few seconds.
module tb_vision_top;
  logic clk = 0, rst_n = 1;
  logic s_frame_start = 0, s_pix_valid = 0, s_pix_ready; logic [7:0] s_pix = 0;
  logic [10:0] s_img_width = 640; logic [15:0] s_img_height = 480;
  logic s_ref_we = 0; logic [1:0] s_ref_bank = 0; logic [8:0] s_ref_addr = 0; logic [31:0] s_ref_wdata = 0;
  logic s_res_valid; logic [6:0] s_res_wx; logic [9:0] s_res_wy; logic [15:0] s_res_widx;
  logic [1:0] s_res_winner; logic [31:0] s_res_dist;
  logic s_cell_valid, s_fifo_full_stall, s_bypass_hit;
  logic s_pls_w_we = 0; logic [1:0] s_pls_w_bank = 0; logic [2:0] s_pls_w_k = 0; logic [6:0] s_pls_w_addr = 0;
  logic [63:0] s_pls_w_wdata = 0; logic s_pls_r_we = 0; logic [3:0] s_pls_r_addr = 0; logic [127:0] s_pls_r_wdata = 0;
  logic s_pls_res_valid; logic [6:0] s_pls_res_wx; logic [9:0] s_pls_res_wy; logic [15:0] s_pls_res_widx;
  logic [127:0] s_pls_res_d; logic [3:0] s_pls_res_winner; logic [39:0] s_pls_res_dist;
  logic h_frame_start = 0; logic [10:0] h_img_width = 640; logic [15:0] h_img_height = 480;
  logic [2:0] h_cs_log2 = 3; logic h_cfg_err;
  logic h_cell_valid = 0, h_cell_ready; logic [9*16-1:0] h_cell_fv = '0;
  logic h_w_we = 0; logic [3:0] h_w_sel = 0; logic [6:0] h_w_addr = 0; logic [63:0] h_w_wdata = 0;
  logic signed [47:0] h_bias = 0;
  logic h_det_valid; logic [6:0] h_det_wx; logic [9:0] h_det_wy; logic [15:0] h_det_widx;
  logic signed [47:0] h_det_score; logic signed [1:0] h_det_sign;
  logic h_blk_valid, h_blk_stall;

  vision_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_pix_stall = 0, n_blk_stall = 0, n_drop = 0, n_pos = 0, n_neg = 0, n_cfg_err = 0;
  int n_cs8 = 0, n_cs4 = 0, n_sres = 0, n_hdet = 0, n_pres = 0;
  int win_ref [4] = '{default: 0};

  always @(posedge clk) if (rst_n) begin
    if (s_fifo_full_stall) n_pix_stall++;
    if (h_blk_stall) n_blk_stall++;
    if (dut.u_surf.dropped) n_drop++;
  end

  // ---------------- SURF + NNS side ----------------
  int img [0:767][0:1023];
  int fv [0:95][0:127][4];
  logic [31:0] refm [4][420];
  int s_exp_win [int]; longint s_exp_dist [int]; int s_got [int];
  int pw [4][8][105][4];      // PLS projection weights: position, vector, block, component
  int pr [16][8];             // reduced references
  int p_exp_d [int][8]; int p_exp_w [int]; longint p_exp_dist [int]; int p_got [int];

  function automatic int sx8(input logic [7:0] v); return int'($signed(v)); endfunction

  task automatic surf_model(input int w, input int h);
    int cnh = w/8, cnv = h/8, n = (cnh-8)/2+1, m = (cnv-16)/2+1;
    for (int cy = 0; cy < cnv; cy++) for (int cx = 0; cx < cnh; cx++) begin
      int s[4]; s = '{0, 0, 0, 0};
      for (int sy = 0; sy < 2; sy++) for (int sxx = 0; sxx < 2; sxx++) begin
        int dxv = 0, dyv = 0;
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
          int p = img[cy*8+sy*4+y][cx*8+sxx*4+x];
          dxv += (x < 2) ? p : -p; dyv += (y < 2) ? p : -p;
        end
        s[0] += dxv; s[1] += dyv; s[2] += (dxv < 0) ? -dxv : dxv; s[3] += (dyv < 0) ? -dyv : dyv;
      end
      for (int d = 0; d < 4; d++) fv[cy][cx][d] = s[d];
    end
    s_exp_win.delete(); s_exp_dist.delete(); s_got.delete();
    for (int wy = 0; wy < m; wy++) for (int wx = 0; wx < n; wx++) begin
      longint best = -1; int bi = 0;
      for (int r = 0; r < 4; r++) begin
        longint sed = 0;
        for (int by = 0; by < 15; by++) for (int bx = 0; bx < 7; bx++) for (int p = 0; p < 4; p++)
          for (int d = 0; d < 4; d++) begin
            int c = fv[2*wy+by+p/2][2*wx+bx+p%2][d] >>> 6;
            int rv = sx8(refm[p][r*105+by*7+bx][(3-d)*8 +: 8]);
            sed += longint'((c-rv)*(c-rv));
          end
        if (best < 0 || sed < best) begin best = sed; bi = r; end
      end
      s_exp_win[wy*n+wx] = bi; s_exp_dist[wy*n+wx] = best;
    end
    // PLS path
    p_exp_d.delete(); p_exp_w.delete(); p_exp_dist.delete(); p_got.delete();
    for (int wy = 0; wy < m; wy++) for (int wx = 0; wx < n; wx++) begin
      int wi = wy*n + wx, bi = 0; longint bd = -1;
      for (int k = 0; k < 8; k++) begin
        longint s = 0;
        for (int by = 0; by < 15; by++) for (int bx = 0; bx < 7; bx++) for (int p = 0; p < 4; p++)
          for (int d = 0; d < 4; d++)
            s += longint'(fv[2*wy+by+p/2][2*wx+bx+p%2][d]) * longint'(pw[p][k][by*7+bx][d]);
        s = s >>> 16;
        p_exp_d[wi][k] = (s > 32767) ? 32767 : (s < -32768) ? -32768 : int'(s);
      end
      for (int r = 0; r < 16; r++) begin
        longint dd = 0;
        for (int k = 0; k < 8; k++) dd += longint'(p_exp_d[wi][k] - pr[r][k]) * longint'(p_exp_d[wi][k] - pr[r][k]);
        if (bd < 0 || dd < bd) begin bd = dd; bi = r; end
      end
      p_exp_w[wi] = bi; p_exp_dist[wi] = bd;
    end
  endtask

  always @(posedge clk) if (rst_n && s_pls_res_valid) begin
    automatic int k = int'(s_pls_res_widx);
    automatic logic bad = 0;
    n_pres++; checks++;
    if (!p_exp_w.exists(k) || p_got.exists(k)) begin
      failures++; $display("FAIL PLS: unexpected window %0d", k);
    end else begin
      for (int i = 0; i < 8; i++) if (int'($signed(s_pls_res_d[(7-i)*16 +: 16])) != p_exp_d[k][i]) bad = 1;
      if (bad || int'(s_pls_res_winner) != p_exp_w[k] || longint'(s_pls_res_dist) != p_exp_dist[k]) begin
        failures++; $display("FAIL PLS window %0d: ref %0d dist %0d, exp ref %0d dist %0d",
                             k, s_pls_res_winner, s_pls_res_dist, p_exp_w[k], p_exp_dist[k]);
      end
    end
    p_got[k] = 1;
  end

  always @(posedge clk) if (rst_n && s_res_valid) begin
    automatic int k = int'(s_res_widx);
    n_sres++; checks++;
    if (!s_exp_win.exists(k) || s_got.exists(k)) begin
      failures++; $display("FAIL SURF: unexpected window %0d", k);
    end else if (s_res_winner != 2'(s_exp_win[k]) || longint'(s_res_dist) != s_exp_dist[k]) begin
      failures++; $display("FAIL SURF window %0d: ref %0d dist %0d, exp ref %0d dist %0d",
                           k, s_res_winner, s_res_dist, s_exp_win[k], s_exp_dist[k]);
    end
    win_ref[s_res_winner]++;
    s_got[k] = 1;
  end

  task automatic surf_frame(input int w, input int h);
    longint t0;
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) img[y][x] = $urandom_range(0, 255);
    surf_model(w, h);
    s_img_width <= 11'(w); s_img_height <= 16'(h);
    @(posedge clk); s_frame_start <= 1; @(posedge clk); s_frame_start <= 0;
    t0 = $time;
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) begin
      s_pix_valid <= 1; s_pix <= 8'(img[y][x]);
      @(posedge clk);
      while (!s_pix_ready) @(posedge clk);
    end
    s_pix_valid <= 0;
    while (s_got.size() < s_exp_win.size() || p_got.size() < p_exp_w.size()) @(posedge clk);
    $display("SURF %0dx%0d frame: %0d cycles from first pixel to last window result", w, h, ($time - t0) / 10);
    repeat (80) @(posedge clk);
    checks++;
    if (s_got.size() != s_exp_win.size()) begin failures++; $display("FAIL SURF window count"); end
    checks++;
    if (p_got.size() != p_exp_w.size()) begin failures++; $display("FAIL PLS window count"); end
  endtask

  // ---------------- HOG + L1 + SVM side ----------------
  int cells [0:95][0:127][9];
  logic [63:0] wm [9][105];
  longint h_exp [int]; int h_got [int];

  function automatic int norm(input int bx, input int by, input int p, input int i);
    int s = 0, c;
    for (int q = 0; q < 4; q++) s += cells[by+q/2][bx+q%2][i];
    c = cells[by+p/2][bx+p%2][i];
    return (s == 0) ? 0 : (c * 4096) / s;
  endfunction

  always @(posedge clk) if (rst_n && h_det_valid) begin
    automatic int k = int'(h_det_widx);
    n_hdet++; checks++;
    if (!h_exp.exists(k) || h_got.exists(k)) begin failures++; $display("FAIL HOG: unexpected window %0d", k); end
    else begin
      automatic longint e = h_exp[k];
      if (longint'(h_det_score) != e || h_det_sign != ((e > 0) ? 2'sd1 : (e == 0) ? 2'sd0 : -2'sd1)) begin
        failures++; $display("FAIL HOG window %0d score %0d exp %0d", k, h_det_score, e);
      end
      if (h_det_sign > 0) n_pos++; else n_neg++;
    end
    h_got[k] = 1;
  end

  task automatic hog_frame(input int w, input int h, input int csl);
    int cnh = w >> csl, cnv = h >> csl, n = (cnh-1-7)/2+1, m = (cnv-1-15)/2+1;
    longint t0;
    for (int y = 0; y < cnv; y++) for (int x = 0; x < cnh; x++) for (int i = 0; i < 9; i++)
      cells[y][x][i] = ($urandom_range(0, 9) == 0) ? 0 : $urandom_range(0, 32767);
    h_exp.delete(); h_got.delete();
    for (int wy = 0; wy < m; wy++) for (int wx = 0; wx < n; wx++) begin
      longint dot = 0;
      for (int by = 0; by < 15; by++) for (int bx = 0; bx < 7; bx++)
        for (int p = 0; p < 4; p++) for (int i = 0; i < 9; i++)
          dot += longint'(norm(2*wx+bx, 2*wy+by, p, i)) * longint'($signed(wm[i][by*7+bx][(3-p)*16 +: 16]));
      h_exp[wy*n+wx] = dot - longint'(h_bias);
    end
    h_img_width <= 11'(w); h_img_height <= 16'(h); h_cs_log2 <= 3'(csl);
    @(posedge clk); h_frame_start <= 1; @(posedge clk); h_frame_start <= 0;
    t0 = $time;
    if (csl == 3) n_cs8++; else if (csl == 2) n_cs4++;
    for (int y = 0; y < cnv; y++) for (int x = 0; x < cnh; x++) begin
      h_cell_valid <= 1;
      for (int i = 0; i < 9; i++) h_cell_fv[i*16 +: 16] <= 16'(cells[y][x][i]);
      @(posedge clk);
      while (!h_cell_ready) @(posedge clk);
    end
    h_cell_valid <= 0;
    while (h_got.size() < h_exp.size()) @(posedge clk);
    $display("HOG %0dx%0d frame (cell %0d): %0d cycles from first cell to last decision", w, h, 1 << csl, ($time - t0) / 10);
    repeat (50) @(posedge clk);
    checks++;
    if (h_got.size() != h_exp.size() || h_exp.size() == 0) begin failures++; $display("FAIL HOG window count"); end
  endtask

  task automatic mech(input string name, input int n);
    $display("  %-34s %0d", name, n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", name); end
  endtask

  initial begin
    #1 rst_n = 0; repeat (3) @(posedge clk); rst_n = 1;
    // load references and weights
    for (int p = 0; p < 4; p++) for (int a = 0; a < 420; a++) begin
      refm[p][a] = $urandom;
      s_ref_we <= 1; s_ref_bank <= 2'(p); s_ref_addr <= 9'(a); s_ref_wdata <= refm[p][a];
      @(posedge clk);
    end
    s_ref_we <= 0;
    for (int p = 0; p < 4; p++) for (int k = 0; k < 8; k++) for (int b = 0; b < 105; b++) begin
      for (int d = 0; d < 4; d++) pw[p][k][b][d] = int'($urandom_range(0, 512)) - 256;
      s_pls_w_we <= 1; s_pls_w_bank <= 2'(p); s_pls_w_k <= 3'(k); s_pls_w_addr <= 7'(b);
      s_pls_w_wdata <= {16'(pw[p][k][b][0]), 16'(pw[p][k][b][1]), 16'(pw[p][k][b][2]), 16'(pw[p][k][b][3])};
      @(posedge clk);
    end
    s_pls_w_we <= 0;
    for (int r = 0; r < 16; r++) begin
      for (int k = 0; k < 8; k++) begin pr[r][k] = int'($urandom_range(0, 4096)) - 2048; s_pls_r_wdata[(7-k)*16 +: 16] <= 16'(pr[r][k]); end
      s_pls_r_we <= 1; s_pls_r_addr <= 4'(r);
      @(posedge clk);
    end
    s_pls_r_we <= 0;
    for (int i = 0; i < 9; i++) for (int a = 0; a < 105; a++) begin
      wm[i][a] = {$urandom, $urandom};
      h_w_we <= 1; h_w_sel <= 4'(i); h_w_addr <= 7'(a); h_w_wdata <= wm[i][a];
      @(posedge clk);
    end
    h_w_we <= 0;
    h_bias <= 48'sd200000;
    // an illegal cell size must raise the configuration error
    h_cs_log2 <= 3'd0; repeat (2) @(posedge clk);
    if (h_cfg_err) n_cfg_err++;
    h_cs_log2 <= 3'd3; repeat (2) @(posedge clk);
    checks++;
    if (h_cfg_err) begin failures++; $display("FAIL cfg_err stuck"); end
    fork
      begin surf_frame(640, 480); surf_frame(88, 136); surf_frame(1024, 768); end
      begin hog_frame(640, 480, 3); hog_frame(320, 240, 2); hog_frame(1024, 768, 3); end
    join
    $display("PLS windows %0d", n_pres);
    $display("SURF windows %0d (winners %0d/%0d/%0d/%0d), HOG windows %0d", n_sres,
             win_ref[0], win_ref[1], win_ref[2], win_ref[3], n_hdet);
    $display("mechanisms:");
    mech("pixel stall (FV FIFO nearly full)", n_pix_stall);
    mech("BBNC output stalled by SVM", n_blk_stall);
    mech("cell in no scan window", n_drop);
    mech("references winning (>1)", ((win_ref[0] > 0) + (win_ref[1] > 0) + (win_ref[2] > 0) + (win_ref[3] > 0)) > 1);
    mech("object decisions", n_pos);
    mech("background decisions", n_neg);
    mech("frames with 8x8 cells", n_cs8);
    mech("frames with 4x4 cells", n_cs4);
    mech("configuration error", n_cfg_err);
    mech("PLS reduced-vector results", n_pres);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
