// tb_nns_psed_engine: the nearest-neighbour search engine gets the OSW stream of a small
// image (worked out in the testbench by brute force, cells in raster order) with random cell
// vectors, after random references have been loaded into its four banks. For every window a
// model sums, over the window's 7x15 blocks, the four cells of each block and the four
// components, the squared difference between the cell component (shifted right by 6) and
// the reference component, for each reference, and takes the first reference with the
// smallest sum. Each window result (position, index, winner, distance) must match, and each
// window must be reported exactly once. A second engine with a single reference is run on a
// stream where consecutive OSWs update the same partial distance, so that the read-after-
// write forwarding (bypass) must be used; it is counted and must occur. Throughput: one
// reference per cycle, checked through the number of cycles per OSW.
module tb_nns_psed_engine;
  import vision_pkg::*;
  logic clk = 0, rst_n = 1;
  logic sel = 0;                      // 0: 4-reference engine, 1: 1-reference engine
  logic in_valid = 0; osw_t in_osw; haar_fv_t in_fv;
  logic ref_we = 0; logic [1:0] ref_bank = 0; logic [8:0] ref_addr = 0; logic [31:0] ref_wdata = 0;
  logic rdy4, rdy1, rv4, rv1, bh4, bh1;
  logic [6:0] wx4, wx1; logic [9:0] wy4, wy1; logic [15:0] wi4, wi1;
  logic [1:0] win4; logic win1; logic [31:0] d4, d1;
  int checks = 0, failures = 0, nres = 0, nbypass = 0, nosw = 0;
  int NR, CNH, CNV;
  int fv [0:31][0:31][4];
  int rf [4][4][105][4];              // reference, position, block, component
  longint exp_d [int][4];
  int seen [int];

  nns_psed_engine u4 (.clk, .rst_n, .in_valid(in_valid && !sel), .in_ready(rdy4), .in_osw, .in_fv,
    .ref_we(ref_we && !sel), .ref_bank, .ref_addr, .ref_wdata,
    .res_valid(rv4), .res_wx(wx4), .res_wy(wy4), .res_widx(wi4), .res_winner(win4), .res_dist(d4), .bypass_hit(bh4));
  nns_psed_engine #(.NUM_REF(1)) u1 (.clk, .rst_n, .in_valid(in_valid && sel), .in_ready(rdy1), .in_osw, .in_fv,
    .ref_we(ref_we && sel), .ref_bank, .ref_addr(ref_addr[6:0]), .ref_wdata,
    .res_valid(rv1), .res_wx(wx1), .res_wy(wy1), .res_widx(wi1), .res_winner(win1), .res_dist(d1), .bypass_hit(bh1));
  always #5 clk = ~clk;

  // result checker
  always @(posedge clk) if (rst_n && (sel ? rv1 : rv4)) begin
    automatic int wi = sel ? int'(wi1) : int'(wi4);
    automatic int wxx = sel ? int'(wx1) : int'(wx4), wyy = sel ? int'(wy1) : int'(wy4);
    automatic int gw = sel ? int'(win1) : int'(win4);
    automatic longint gd = sel ? longint'(d1) : longint'(d4);
    automatic int n = (CNH-8)/2+1, bw = 0;
    checks++; nres++;
    if (!exp_d.exists(wi) || seen.exists(wi) || wi != wyy*n + wxx) begin
      failures++; $display("FAIL unexpected window %0d (%0d,%0d)", wi, wxx, wyy);
    end else begin
      for (int r = 1; r < NR; r++) if (exp_d[wi][r] < exp_d[wi][bw]) bw = r;
      if (gw != bw || gd != exp_d[wi][bw]) begin
        failures++; $display("FAIL window %0d winner %0d dist %0d exp %0d / %0d", wi, gw, gd, bw, exp_d[wi][bw]);
      end
    end
    seen[wi] = 1;
  end
  always @(posedge clk) if (rst_n && (bh1 || bh4)) nbypass++;

  function automatic int sx(input int v); return ((v & 16'hffff) ^ 16'h8000) - 32'h8000; endfunction

  task automatic load_refs(input int nr);
    for (int r = 0; r < nr; r++) for (int p = 0; p < 4; p++) for (int b = 0; b < 105; b++) begin
      for (int d = 0; d < 4; d++) rf[r][p][b][d] = int'($urandom_range(0, 255)) - 128;
      ref_we <= 1; ref_bank <= 2'(p); ref_addr <= 9'(r*105 + b);
      ref_wdata <= {8'(rf[r][p][b][0]), 8'(rf[r][p][b][1]), 8'(rf[r][p][b][2]), 8'(rf[r][p][b][3])};
      @(posedge clk);
    end
    ref_we <= 0;
  endtask

  task automatic run(input int w, input int h, input int nr, input int s, input int zero_fv);
    int n = (w-8)/2+1, m = (h-16)/2+1;
    NR = nr; CNH = w; CNV = h; sel = s[0];
    exp_d.delete(); seen.delete();
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) for (int d = 0; d < 4; d++)
      fv[y][x][d] = zero_fv ? 0 : sx($urandom);
    load_refs(nr);
    // model: per window, per reference
    for (int wy = 0; wy < m; wy++) for (int wx = 0; wx < n; wx++) for (int r = 0; r < nr; r++) begin
      longint acc = 0;
      for (int by = 0; by < 15; by++) for (int bx = 0; bx < 7; bx++) for (int p = 0; p < 4; p++)
        for (int d = 0; d < 4; d++) begin
          int c = fv[2*wy + by + p/2][2*wx + bx + p%2][d] >>> 6;
          int df = c - rf[r][p][by*7 + bx][d];
          acc += df * df;
        end
      exp_d[wy*n + wx][r] = acc;
    end
    // OSW stream
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++)
      for (int wy = 0; wy < m; wy++) for (int wx = 0; wx < n; wx++)
        if (x >= 2*wx && x < 2*wx + 8 && y >= 2*wy && y < 2*wy + 16) begin
          int lx = x - 2*wx, ly = y - 2*wy;
          int ex = (lx == 0 || lx == 7), ey = (ly == 0 || ly == 15);
          longint t0;
          in_valid <= 1;
          in_osw <= '{wx: 7'(wx), wy: 10'(wy), widx: 16'(wy*n + wx), lx: 5'(lx), ly: 5'(ly),
                      rrrt: (ex && ey) ? 3'd1 : (ex || ey) ? 3'd2 : 3'd4,
                      first: (lx == 0 && ly == 0), last: (lx == 7 && ly == 15)};
          in_fv <= '{sdx: 16'(fv[y][x][0]), sdy: 16'(fv[y][x][1]), adx: 16'(fv[y][x][2]), ady: 16'(fv[y][x][3])};
          @(posedge clk);
          t0 = $time;
          while (!(sel ? rdy1 : rdy4)) @(posedge clk);
          nosw++;
          checks++;
          if (($time - t0)/10 + 1 != nr) begin failures++; $display("FAIL %0d cycles per OSW", ($time - t0)/10 + 1); end
        end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (seen.size() != n*m) begin failures++; $display("FAIL %0d of %0d windows reported", seen.size(), n*m); end
  endtask

  initial begin
    in_osw = '0; in_fv = '0;
    #1 rst_n = 0; repeat (2) @(posedge clk); rst_n = 1;
    run(10, 18, 4, 0, 0);     // 2 x 2 windows
    run(8, 16, 4, 0, 0);      // one window
    run(12, 16, 1, 1, 0);     // one reference: consecutive cells of a single window
    checks++;
    if (nbypass == 0) begin failures++; $display("FAIL bypass never used"); end
    $display("OSWs %0d results %0d bypass %0d", nosw, nres, nbypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
