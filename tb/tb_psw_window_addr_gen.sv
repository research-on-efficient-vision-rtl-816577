// tb_psw_window_addr_gen: streams every cell of an image in raster order into the window
// address generator and compares each emitted overlapping scan window (OSW) with a list
// worked out by brute force: every window (wx, wy) whose 8x16-cell area, at a stride of two
// cells, contains the cell, in the order wx first, then wy. Checked per OSW: window column,
// row and index wy*N+wx, position inside the window, reusing time (1 corner, 2 edge,
// 4 inside), first/last flags, last-OSW-of-unit flag and the payload; cells in no window must
// be dropped. Includes the VGA case of the cell in column 7, row 2 (zero-based), whose OSWs
// are windows 0..3 and 37..40. With out_ready high a cell with K OSWs must take K+1 cycles;
// other images run with random out_ready.
module tb_psw_window_addr_gen;
  import vision_pkg::*;
  logic clk = 0, rst_n = 1;
  logic [7:0] units_w = 80; logic [15:0] units_h = 60;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_unit_last, dropped;
  logic [7:0] in_x = 0; logic [15:0] in_y = 0;
  logic [63:0] in_payload = 0, out_payload;
  osw_t out_osw;
  int checks = 0, failures = 0, nosw = 0, ndrop = 0, bp = 0;
  int exp_q [$];          // expected OSWs of the current cell: packed as wy*256+wx
  int cur_x, cur_y, cur_n, ncells;
  logic [63:0] cur_pay;
  int got_idx [$];

  psw_window_addr_gen dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    automatic int wx = int'(out_osw.wx), wy = int'(out_osw.wy);
    automatic int lx = cur_x - 2*wx, ly = cur_y - 2*wy;
    automatic int ex = (lx == 0 || lx == 7), ey = (ly == 0 || ly == 15);
    automatic int er = (ex && ey) ? 1 : (ex || ey) ? 2 : 4;
    automatic int n = (int'(units_w) - 8)/2 + 1;
    checks++; nosw++;
    got_idx.push_back(int'(out_osw.widx));
    if (exp_q.size() == 0) begin failures++; $display("FAIL extra OSW (%0d,%0d)", wx, wy); end
    else begin
      automatic int e = exp_q.pop_front();
      if (e != wy*256 + wx || int'(out_osw.widx) != wy*n + wx || int'(out_osw.lx) != lx
          || int'(out_osw.ly) != ly || int'(out_osw.rrrt) != er || out_osw.first != (lx == 0 && ly == 0)
          || out_osw.last != (lx == 7 && ly == 15) || out_unit_last != (exp_q.size() == 0)
          || out_payload != cur_pay) begin
        failures++;
        $display("FAIL cell (%0d,%0d) OSW (%0d,%0d) exp (%0d,%0d) l (%0d,%0d) rrrt %0d", cur_x, cur_y,
                 wx, wy, e%256, e/256, out_osw.lx, out_osw.ly, out_osw.rrrt);
      end
    end
  end
  always @(posedge clk) if (rst_n && dropped) ndrop++;
  always @(posedge clk) out_ready <= (bp == 0) || ($urandom_range(0, 2) != 0);

  task automatic one_cell(input int x, input int y, input int w, input int h);
    int n = (w-8)/2 + 1, m = (h-16)/2 + 1;
    longint t0;
    exp_q.delete();
    for (int wy = 0; wy < m; wy++) for (int wx = 0; wx < n; wx++)
      if (x >= 2*wx && x < 2*wx + 8 && y >= 2*wy && y < 2*wy + 16) exp_q.push_back(wy*256 + wx);
    cur_n = exp_q.size();
    in_valid <= 1; in_x <= 8'(x); in_y <= 16'(y); in_payload <= {$urandom, $urandom};
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    // accepted at this edge
    cur_x = x; cur_y = y; cur_pay = in_payload;
    in_valid <= 0;
    t0 = $time;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    if (bp == 0) begin
      checks++;
      if (($time - t0)/10 != cur_n + 1) begin
        failures++; $display("FAIL cell (%0d,%0d): %0d cycles for %0d OSWs", x, y, ($time - t0)/10, cur_n);
      end
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL cell (%0d,%0d): %0d OSWs missing", x, y, exp_q.size()); end
    ncells++;
  endtask

  task automatic image(input int w, input int h, input int back);
    int d0 = ndrop, n = (w-8)/2 + 1, m = (h-16)/2 + 1, edrop = 0;
    units_w <= 8'(w); units_h <= 16'(h); bp = back;
    @(posedge clk);
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) begin
      one_cell(x, y, w, h);
      if (cur_n == 0) edrop++;
    end
    repeat (2) @(posedge clk);
    checks++;
    if (ndrop - d0 != edrop) begin failures++; $display("FAIL %0d dropped, exp %0d", ndrop - d0, edrop); end
  endtask

  initial begin
    #1 rst_n = 0; @(posedge clk); rst_n = 1;
    // VGA, 8x8 cells: the cell in column 7, row 2 belongs to windows 0-3 and 37-40
    units_w <= 80; units_h <= 60; bp = 0; @(posedge clk);
    got_idx.delete();
    one_cell(7, 2, 80, 60);
    checks++;
    if (got_idx != '{0, 1, 2, 3, 37, 38, 39, 40}) begin failures++; $display("FAIL VGA example %p", got_idx); end
    image(12, 20, 0);
    image(17, 21, 1);     // odd sizes: last column and row belong to no window
    image(8, 16, 0);      // exactly one window
    $display("cells %0d OSWs %0d dropped %0d", ncells, nosw, ndrop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
