// tb_haar_pipeline_ctrl: streams pixels (with random idle cycles) of frames of random width
// through the controller and checks every decoded control against the pixel position
// (x, y): memory addresses x/4 and x/8, the add/subtract selects of the Dx (left half +,
// right half -) and Dy (upper half +, lower half -) sums, the sub-cell start row, the
// read/load columns of the first storage, sub-cell completion, odd sub-cell, lower
// sub-cell row, cell row and end of line. frame_start must bring it back to (0, 0).
module tb_haar_pipeline_ctrl;
  localparam int MW = 64;
  logic clk = 0, rst_n = 1, frame_start = 0, pix_valid = 0;
  logic [6:0] img_width = 16;
  logic [5:0] col; logic [2:0] row8; logic [15:0] cell_row;
  logic [3:0] addr1; logic [2:0] addr2;
  logic h_add, v_add, sc_init, sc_rd, load_sum, sc_done, sc_odd, cell_lower, row_end;
  int checks = 0, failures = 0;

  haar_pipeline_ctrl #(.MAX_WIDTH(MW)) dut (.*);
  always #5 clk = ~clk;

  task automatic frame(input int w, input int h);
    img_width <= 7'(w);
    @(posedge clk); frame_start <= 1; @(posedge clk); frame_start <= 0;
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) begin
      automatic logic bad;
      while ($urandom_range(0, 3) == 0) begin pix_valid <= 0; @(posedge clk); end
      pix_valid <= 1;
      #1;
      bad = (int'(addr1) != x/4) || (int'(addr2) != x/8) || (h_add != (x%4 < 2)) || (v_add != (y%4 < 2))
         || (sc_init != (y%4 == 0)) || (sc_rd != (x%4 == 1)) || (load_sum != (x%4 == 3))
         || (sc_done != (x%4 == 3 && y%4 == 3)) || (sc_odd != ((x/4)%2 == 1))
         || (cell_lower != ((y/4)%2 == 1)) || (int'(cell_row) != y/8) || (row_end != (x == w-1));
      checks++;
      if (bad) begin failures++; $display("FAIL pixel (%0d,%0d)", x, y); end
      @(posedge clk);
    end
    pix_valid <= 0;
  endtask

  initial begin
    #1 rst_n = 0; @(posedge clk); rst_n = 1;
    frame(16, 16);
    frame(64, 24);
    frame(8 * $urandom_range(1, 8), 8 * $urandom_range(1, 3));
    // abandon a frame half way and restart
    frame(24, 5);
    frame(32, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
