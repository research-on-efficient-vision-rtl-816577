// tb_bbnc_l1norm: random signed cell vectors (including zero components and negative values)
// are streamed into the block-based L1-norm circuit for three image widths, with random
// back-pressure on the output. Every output cell is checked against a model of Eq. 4.4
// (component / sum of the component's absolute values over the block, scaled by 2^12,
// truncated towards zero), including the block position, the cell order inside the block
// and the number of blocks; the cycles per cell (6, or 10 when a block completes) are checked.
module tb_bbnc_l1norm;
  logic clk = 0, rst_n = 1, frame_start = 0;
  logic [7:0] cnh; logic [15:0] cnv;
  logic in_valid = 0, in_ready, out_valid, out_ready;
  logic signed [8:0][15:0] in_fv;
  logic signed [8:0][13:0] out_fv;
  logic [1:0] out_pos; logic [7:0] out_bx; logic [15:0] out_by;
  int checks = 0, failures = 0, nout = 0, nexp = 0, bp = 0;
  int cells [0:63][0:63][0:8];
  int H, V;

  bbnc_l1norm dut (.*);
  always #5 clk = ~clk;

  function automatic int absi(input int v); return v < 0 ? -v : v; endfunction
  function automatic int norm(input int bx, input int by, input int p, input int i);
    int s = 0, c;
    for (int q = 0; q < 4; q++) s += absi(cells[by+q/2][bx+q%2][i]);
    c = cells[by+p/2][bx+p%2][i];
    return (s == 0) ? 0 : (c * 4096) / s;
  endfunction

  // outputs arrive block by block in raster order
  always @(posedge clk) if (out_valid && out_ready) begin
    automatic int b = nout / 4, p = nout % 4;
    automatic int bx = b % (H-1), by = b / (H-1);
    automatic logic bad = 0;
    for (int i = 0; i < 9; i++) if (int'($signed(out_fv[i])) != norm(bx, by, p, i)) bad = 1;
    if (out_bx != 8'(bx) || out_by != 16'(by) || out_pos != 2'(p)) bad = 1;
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL block (%0d,%0d) pos %0d: got (%0d,%0d) pos %0d c0 %0d exp %0d",
               bx, by, p, out_bx, out_by, out_pos, out_fv[0], norm(bx, by, p, 0));
    end
    nout++;
  end
  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0) || (bp == 0);

  task automatic frame(input int h, input int v, input int back);
    longint t0, t1;
    H = h; V = v; nout = 0; bp = back;
    for (int y = 0; y < v; y++) for (int x = 0; x < h; x++) for (int i = 0; i < 9; i++)
      cells[y][x][i] = ($urandom_range(0, 7) == 0) ? 0 : int'($urandom_range(0, 60000)) - 30000;
    cnh = 8'(h); cnv = 16'(v);
    @(posedge clk); frame_start <= 1; @(posedge clk); frame_start <= 0;
    for (int y = 0; y < v; y++) for (int x = 0; x < h; x++) begin
      in_valid <= 1;
      for (int i = 0; i < 9; i++) in_fv[i] <= 16'(cells[y][x][i]);
      @(posedge clk);
      t0 = $time;
      while (!in_ready) @(posedge clk);
      t1 = $time;
      // cycles the circuit spent on the previous cell (no back-pressure)
      if (back == 0 && (y != 0 || x != 0)) begin
        automatic int px = (x == 0) ? h-1 : x-1, py = (x == 0) ? y-1 : y;
        automatic int expc = (px > 0 && py > 0) ? 10 : 6;
        checks++;
        if ((t1 - t0) / 10 + 1 != expc) begin
          failures++; $display("FAIL cycles per cell %0d exp %0d", (t1 - t0)/10 + 1, expc);
        end
      end
    end
    in_valid <= 0;
    repeat (40) @(posedge clk);
    checks++;
    if (nout != 4*(h-1)*(v-1)) begin failures++; $display("FAIL %0d outputs", nout); end
  endtask

  initial begin
    #1 rst_n = 0; repeat (3) @(posedge clk); rst_n = 1;
    frame(5, 4, 0);
    frame(12, 6, 1);
    frame(2, 3, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
