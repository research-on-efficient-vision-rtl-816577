// tb_surf_nns_coprocessor: end-to-end check of the simplified-SURF + NNS coprocessor at its
// default parameters. Random references are loaded, then a random gray image is streamed in
// (the source honours pix_ready). Every window result is compared with a model that builds the
// 4-D cell vectors from the pixels, forms each window's 1680-dimensional vector block by block
// and computes the squared Euclidean distance to every reference; the winner is the first
// reference with the smallest distance. A flat frame and a second size follow.
module tb_surf_nns_coprocessor;
  logic clk = 0, rst_n = 1, frame_start = 0, pix_valid = 0, pix_ready;
  logic [7:0] pix;
  logic [10:0] img_width;
  logic [15:0] img_height;
  logic ref_we = 0; logic [1:0] ref_bank; logic [8:0] ref_addr; logic [31:0] ref_wdata;
  logic res_valid; logic [6:0] res_wx; logic [9:0] res_wy; logic [15:0] res_widx;
  logic [1:0] res_winner; logic [31:0] res_dist;
  logic cell_valid, fifo_full_stall, bypass_hit;
  // PLS path: not loaded here (checked in the top-level test)
  logic pls_w_we = 0; logic [1:0] pls_w_bank = 0; logic [2:0] pls_w_k = 0; logic [6:0] pls_w_addr = 0;
  logic [63:0] pls_w_wdata = 0; logic pls_r_we = 0; logic [3:0] pls_r_addr = 0; logic [127:0] pls_r_wdata = 0;
  logic pls_res_valid; logic [6:0] pls_res_wx; logic [9:0] pls_res_wy; logic [15:0] pls_res_widx;
  logic [127:0] pls_res_d; logic [3:0] pls_res_winner; logic [39:0] pls_res_dist;
  int checks = 0, failures = 0, nres = 0, stalls = 0;
  int img [0:255][0:127];
  int fv [0:31][0:15][0:3];
  logic [31:0] refm [0:3][0:419];
  int W, H;
  int exp_win [int]; longint exp_dist [int]; int got [int];

  surf_nns_coprocessor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (fifo_full_stall) stalls++;

  function automatic int sx8(input logic [7:0] v); return int'($signed(v)); endfunction

  task automatic model();
    int cnh = W/8, cnv = H/8, n = (cnh-8)/2+1, m = (cnv-16)/2+1;
    for (int cy = 0; cy < cnv; cy++) for (int cx = 0; cx < cnh; cx++) begin
      int s[4]; s = '{0,0,0,0};
      for (int sy = 0; sy < 2; sy++) for (int sxx = 0; sxx < 2; sxx++) begin
        int dxv = 0, dyv = 0;
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
          int p = img[cy*8+sy*4+y][cx*8+sxx*4+x];
          dxv += (x < 2) ? p : -p; dyv += (y < 2) ? p : -p;
        end
        s[0] += dxv; s[1] += dyv; s[2] += (dxv<0)?-dxv:dxv; s[3] += (dyv<0)?-dyv:dyv;
      end
      for (int d = 0; d < 4; d++) fv[cy][cx][d] = s[d];
    end
    exp_win.delete(); exp_dist.delete(); got.delete();
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
      exp_win[wy*n+wx] = bi; exp_dist[wy*n+wx] = best;
    end
  endtask

  always @(posedge clk) if (res_valid) begin
    automatic int k = int'(res_widx);
    nres++;
    checks++;
    if (!exp_win.exists(k) || got.exists(k)) begin
      failures++; $display("FAIL unexpected window %0d", k);
    end else if (res_winner != 2'(exp_win[k]) || longint'(res_dist) != exp_dist[k]) begin
      failures++; $display("FAIL window %0d: got ref %0d dist %0d, exp ref %0d dist %0d",
                           k, res_winner, res_dist, exp_win[k], exp_dist[k]);
    end
    got[k] = 1;
  end

  task automatic frame(input int w, input int h, input int maxp, input int gap);
    W = w; H = h;
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) img[y][x] = $urandom_range(0, maxp);
    model();
    img_width = 11'(w); img_height = 16'(h);
    @(posedge clk); frame_start <= 1; @(posedge clk); frame_start <= 0;
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) begin
      if (gap != 0) while ($urandom_range(0, gap) == 0) begin pix_valid <= 0; @(posedge clk); end
      pix_valid <= 1; pix <= 8'(img[y][x]);
      @(posedge clk);
      while (!pix_ready) @(posedge clk);
    end
    pix_valid <= 0;
    while (got.size() < exp_win.size()) @(posedge clk);
    repeat (50) @(posedge clk);
    checks++;
    if (got.size() != exp_win.size()) begin failures++; $display("FAIL count"); end
  endtask

  initial begin
    #1 rst_n = 0; repeat (3) @(posedge clk); rst_n = 1;
    for (int p = 0; p < 4; p++) for (int a = 0; a < 420; a++) begin
      refm[p][a] = $urandom;
      ref_we <= 1; ref_bank <= 2'(p); ref_addr <= 9'(a); ref_wdata <= refm[p][a];
      @(posedge clk);
    end
    ref_we <= 0;
    frame(96, 160, 255, 3);
    frame(80, 128, 0, 0);
    frame(64, 176, 255, 0);
    $display("windows %0d, stall cycles %0d", nres, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
