// tb_pls_projector: the PLS projector gets the OSW stream of small images (cells in raster
// order, worked out in the testbench by brute force) with random cell vectors, after random
// projection weights and reduced references have been loaded. A model forms, for every
// window, d_i = sum over its 105 blocks, 4 cells per block and 4 components of the cell
// component times the matching component of projection vector i, scales it (>>> 16,
// saturated to 16 bits), and finds the nearest reduced reference. Every window's reduced
// vector, winner and distance must match, and every window must be reported once. One image
// is only one window wide, so that consecutive OSWs update the same window and the
// forwarding path is exercised (counted). One OSW per cycle is checked where nothing waits.
module tb_pls_projector;
  import vision_pkg::*;
  localparam int K = 8, NR = 16;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0, in_ready; osw_t in_osw = '0; haar_fv_t in_fv = '0;
  logic w_we = 0; logic [1:0] w_bank = 0; logic [2:0] w_k = 0; logic [6:0] w_addr = 0; logic [63:0] w_wdata = 0;
  logic r_we = 0; logic [3:0] r_addr = 0; logic [127:0] r_wdata = 0;
  logic res_valid; logic [6:0] res_wx; logic [9:0] res_wy; logic [15:0] res_widx;
  logic [127:0] res_d; logic [3:0] res_winner; logic [39:0] res_dist;
  int checks = 0, failures = 0, nres = 0, nfwd = 0, nosw = 0, nwait = 0;
  int fv [0:31][0:31][4];
  int wt [4][K][105][4];
  int rf [NR][K];
  int exp_d [int][K]; int exp_w [int]; longint exp_dist [int]; int seen [int];
  int CNH;

  pls_projector dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && dut.b_valid && dut.b_fwd && !dut.b_first) nfwd++;

  always @(posedge clk) if (rst_n && res_valid) begin
    automatic int wi = int'(res_widx), n = (CNH-8)/2+1;
    automatic logic bad = 0;
    checks++; nres++;
    if (!exp_w.exists(wi) || seen.exists(wi) || wi != int'(res_wy)*n + int'(res_wx)) begin
      failures++; $display("FAIL unexpected window %0d", wi);
    end else begin
      for (int k = 0; k < K; k++) if (int'($signed(res_d[(K-1-k)*16 +: 16])) != exp_d[wi][k]) bad = 1;
      if (bad || int'(res_winner) != exp_w[wi] || longint'(res_dist) != exp_dist[wi]) begin
        failures++;
        $display("FAIL window %0d d1 %0d exp %0d winner %0d exp %0d dist %0d exp %0d", wi,
                 $signed(res_d[127:112]), exp_d[wi][0], res_winner, exp_w[wi], res_dist, exp_dist[wi]);
      end
    end
    seen[wi] = 1;
  end

  task automatic run(input int w, input int h);
    int n = (w-8)/2+1, m = (h-16)/2+1;
    CNH = w;
    exp_d.delete(); exp_w.delete(); exp_dist.delete(); seen.delete();
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) for (int d = 0; d < 4; d++)
      fv[y][x][d] = int'($urandom_range(0, 8192)) - 4096;
    for (int wy = 0; wy < m; wy++) for (int wx = 0; wx < n; wx++) begin
      int wi = wy*n + wx, bi = 0; longint bd = -1;
      for (int k = 0; k < K; k++) begin
        longint s = 0;
        for (int by = 0; by < 15; by++) for (int bx = 0; bx < 7; bx++) for (int p = 0; p < 4; p++)
          for (int d = 0; d < 4; d++)
            s += longint'(fv[2*wy+by+p/2][2*wx+bx+p%2][d]) * longint'(wt[p][k][by*7+bx][d]);
        s = s >>> 16;
        exp_d[wi][k] = (s > 32767) ? 32767 : (s < -32768) ? -32768 : int'(s);
      end
      for (int r = 0; r < NR; r++) begin
        longint dd = 0;
        for (int k = 0; k < K; k++) dd += longint'(exp_d[wi][k] - rf[r][k]) * longint'(exp_d[wi][k] - rf[r][k]);
        if (bd < 0 || dd < bd) begin bd = dd; bi = r; end
      end
      exp_w[wi] = bi; exp_dist[wi] = bd;
    end
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++)
      for (int wy = 0; wy < m; wy++) for (int wx = 0; wx < n; wx++)
        if (x >= 2*wx && x < 2*wx + 8 && y >= 2*wy && y < 2*wy + 16) begin
          int lx = x - 2*wx, ly = y - 2*wy;
          int ex = (lx == 0 || lx == 7), ey = (ly == 0 || ly == 15);
          in_valid <= 1;
          in_osw <= '{wx: 7'(wx), wy: 10'(wy), widx: 16'(wy*n + wx), lx: 5'(lx), ly: 5'(ly),
                      rrrt: (ex && ey) ? 3'd1 : (ex || ey) ? 3'd2 : 3'd4,
                      first: (lx == 0 && ly == 0), last: (lx == 7 && ly == 15)};
          in_fv <= '{sdx: 16'(fv[y][x][0]), sdy: 16'(fv[y][x][1]), adx: 16'(fv[y][x][2]), ady: 16'(fv[y][x][3])};
          @(posedge clk);
          while (!in_ready) begin nwait++; @(posedge clk); end
          nosw++;
        end
    in_valid <= 0;
    repeat (3 * NR + 10) @(posedge clk);
    checks++;
    if (seen.size() != n*m) begin failures++; $display("FAIL %0d of %0d windows reported", seen.size(), n*m); end
  endtask

  initial begin
    #1 rst_n = 0; repeat (2) @(posedge clk); rst_n = 1;
    for (int p = 0; p < 4; p++) for (int k = 0; k < K; k++) for (int b = 0; b < 105; b++) begin
      for (int d = 0; d < 4; d++) wt[p][k][b][d] = int'($urandom_range(0, 512)) - 256;
      w_we <= 1; w_bank <= 2'(p); w_k <= 3'(k); w_addr <= 7'(b);
      w_wdata <= {16'(wt[p][k][b][0]), 16'(wt[p][k][b][1]), 16'(wt[p][k][b][2]), 16'(wt[p][k][b][3])};
      @(posedge clk);
    end
    w_we <= 0;
    for (int r = 0; r < NR; r++) begin
      for (int k = 0; k < K; k++) begin rf[r][k] = int'($urandom_range(0, 1024)) - 512; r_wdata[(K-1-k)*16 +: 16] <= 16'(rf[r][k]); end
      r_we <= 1; r_addr <= 4'(r);
      @(posedge clk);
    end
    r_we <= 0;
    run(12, 20);    // 3 x 3 windows
    run(8, 16);     // one window: consecutive OSWs update the same window
    run(10, 18);
    checks++;
    if (nwait != 0) begin failures++; $display("FAIL input waited %0d cycles", nwait); end
    checks++;
    if (nfwd == 0) begin failures++; $display("FAIL forwarding never used"); end
    // the projector takes one OSW per cycle: it waited only for the search queue
    $display("OSWs %0d results %0d forwards %0d wait cycles %0d", nosw, nres, nfwd, nwait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
