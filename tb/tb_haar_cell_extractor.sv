// tb_haar_cell_extractor: random gray images of two widths are streamed in raster order
// (with random idle cycles) through the cell extractor; every cell vector is compared with
// sums computed here directly from the pixel array, and the latency from a cell's last pixel
// to its vector is checked (cell_valid is high in the second cycle after the one presenting the last pixel).
module tb_haar_cell_extractor;
  import vision_pkg::*;
  localparam int MAXW = 64;
  logic clk = 0, rst_n = 1, frame_start = 0, pix_valid = 0;
  logic [7:0] pix;
  logic [6:0] img_width;
  logic cell_valid;
  haar_fv_t cell_fv;
  logic [2:0] cell_x;
  logic [15:0] cell_y;
  int checks = 0, failures = 0;
  int img [0:63][0:63];
  int W, H, ncells, got;
  longint cyc = 0, last_pix_cyc [0:63][0:7];

  haar_cell_extractor #(.MAX_WIDTH(MAXW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic void ref_cell(input int cx, input int cy, output haar_fv_t f);
    automatic int sdx = 0, sdy = 0, adx = 0, ady = 0;
    for (int sy = 0; sy < 2; sy++) for (int sx = 0; sx < 2; sx++) begin
      automatic int dxv = 0, dyv = 0;
      for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
        automatic int p = img[cy*8+sy*4+y][cx*8+sx*4+x];
        dxv += (x < 2) ? p : -p;
        dyv += (y < 2) ? p : -p;
      end
      sdx += dxv; sdy += dyv; adx += (dxv < 0) ? -dxv : dxv; ady += (dyv < 0) ? -dyv : dyv;
    end
    f.sdx = 16'(sdx); f.sdy = 16'(sdy); f.adx = 16'(adx); f.ady = 16'(ady);
  endfunction

  // checker
  always @(posedge clk) if (cell_valid) begin
    automatic haar_fv_t e;
    automatic int cx = got % (W/8);
    automatic int cy = got / (W/8);
    ref_cell(cx, cy, e);
    checks++;
    if (cell_fv !== e || cell_x != 3'(cx) || cell_y != 16'(cy)) begin
      failures++;
      $display("FAIL cell (%0d,%0d): got %h at (%0d,%0d) exp %h", cx, cy, cell_fv, cell_x, cell_y, e);
    end
    checks++;
    if (cyc - last_pix_cyc[cy][cx] != 3) begin
      failures++; $display("FAIL latency %0d", cyc - last_pix_cyc[cy][cx]);
    end
    got++;
  end

  task automatic run_frame(input int w, input int h, input int maxpix);
    W = w; H = h; got = 0; ncells = (w/8)*(h/8);
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) img[y][x] = $urandom_range(0, maxpix);
    img_width = 7'(w);
    @(posedge clk); frame_start <= 1; @(posedge clk); frame_start <= 0;
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) begin
      while ($urandom_range(0, 3) == 0) begin pix_valid <= 0; @(posedge clk); end
      pix_valid <= 1; pix <= 8'(img[y][x]);
      @(posedge clk);
      if (x % 8 == 7 && y % 8 == 7) last_pix_cyc[y/8][x/8] = cyc;
    end
    pix_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (got != ncells) begin failures++; $display("FAIL %0d cells, expected %0d", got, ncells); end
  endtask

  initial begin
    #1 rst_n = 0; repeat (3) @(posedge clk); rst_n = 1;
    run_frame(64, 24, 255);
    run_frame(16, 40, 255);
    run_frame(32, 16, 0);     // flat image: all responses zero
    run_frame(40, 16, 255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
