// tb_haar_subcell_calc: drives raster pixels of random frames into the sub-cell calculator,
// with the control decodes worked out in the testbench from the pixel position (not taken
// from the controller), and compares every 4x4 sub-cell response with a direct sum:
// Dx = (left two columns) - (right two columns), Dy = (upper two rows) - (lower two rows).
// Each response must appear in the cycle after the sub-cell's last pixel, with its
// odd/lower flags and cell position.
module tb_haar_subcell_calc;
  localparam int MW = 64;
  logic clk = 0, rst_n = 1, pix_valid = 0;
  logic [7:0] pix = 0;
  logic [3:0] addr1 = 0; logic [2:0] addr2 = 0; logic [15:0] cell_row = 0;
  logic h_add = 0, v_add = 0, sc_init = 0, sc_rd = 0, load_sum = 0, sc_done = 0, sc_odd = 0, cell_lower = 0;
  logic sub_valid, sub_odd, sub_lower; logic signed [15:0] dx, dy;
  logic [2:0] sub_cell_col; logic [15:0] sub_cell_row;
  int checks = 0, failures = 0, nsub = 0;
  int img [0:31][0:63];

  haar_subcell_calc #(.MAX_WIDTH(MW)) dut (.*);
  always #5 clk = ~clk;

  task automatic frame(input int w, input int h);
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) img[y][x] = $urandom_range(0, 255);
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) begin
      while ($urandom_range(0, 3) == 0) begin pix_valid <= 0; @(posedge clk); end
      pix_valid <= 1; pix <= 8'(img[y][x]);
      addr1 <= 4'(x/4); addr2 <= 3'(x/8); cell_row <= 16'(y/8);
      h_add <= (x%4 < 2); v_add <= (y%4 < 2); sc_init <= (y%4 == 0);
      sc_rd <= (x%4 == 1); load_sum <= (x%4 == 3); sc_done <= (x%4 == 3 && y%4 == 3);
      sc_odd <= ((x/4)%2 == 1); cell_lower <= ((y/4)%2 == 1);
      @(posedge clk);
      if (x%4 == 3 && y%4 == 3) begin
        automatic int ex = 0, ey = 0, sx = x - 3, sy = y - 3;
        for (int j = 0; j < 4; j++) for (int i = 0; i < 4; i++) begin
          ex += (i < 2) ? img[sy+j][sx+i] : -img[sy+j][sx+i];
          ey += (j < 2) ? img[sy+j][sx+i] : -img[sy+j][sx+i];
        end
        pix_valid <= 0;
        #1;
        checks++; nsub++;
        if (!sub_valid || int'(dx) != ex || int'(dy) != ey || sub_odd != ((x/4)%2 == 1)
            || sub_lower != ((y/4)%2 == 1) || int'(sub_cell_col) != x/8 || int'(sub_cell_row) != y/8) begin
          failures++; $display("FAIL sub-cell at (%0d,%0d): v %0d dx %0d/%0d dy %0d/%0d", sx, sy, sub_valid, dx, ex, dy, ey);
        end
      end
    end
    pix_valid <= 0;
  endtask

  initial begin
    #1 rst_n = 0; @(posedge clk); rst_n = 1;
    frame(16, 8);
    frame(64, 16);
    frame(24, 32);
    $display("%0d sub-cells", nsub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
