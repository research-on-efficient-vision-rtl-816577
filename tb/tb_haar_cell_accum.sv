// tb_haar_cell_accum: feeds random sub-cell responses in the extractor's order (sub-cell
// rows top to bottom, left to right within a row, random gaps of at least one cycle) and
// compares every cell vector with the sum of its 2x2 sub-cells: {sum Dx, sum Dy,
// sum |Dx|, sum |Dy|}. The cell must appear two cycles after its last sub-cell, with its
// column and row; every cell of the frame must appear exactly once.
module tb_haar_cell_accum;
  import vision_pkg::*;
  localparam int MW = 64;
  logic clk = 0, rst_n = 1, sub_valid = 0, sub_odd = 0, sub_lower = 0;
  logic signed [15:0] dx = 0, dy = 0;
  logic [2:0] sub_cell_col = 0; logic [15:0] sub_cell_row = 0;
  logic cell_valid; haar_fv_t cell_fv; logic [2:0] cell_x; logic [15:0] cell_y;
  int checks = 0, failures = 0, ncell = 0;
  int sdx [0:15][0:15], sdy [0:15][0:15];

  haar_cell_accum #(.MAX_WIDTH(MW)) dut (.*);
  always #5 clk = ~clk;

  function automatic int absi(input int v); return v < 0 ? -v : v; endfunction

  task automatic frame(input int cw, input int ch);   // size in cells
    for (int y = 0; y < 2*ch; y++) for (int x = 0; x < 2*cw; x++) begin
      sdx[y][x] = $urandom_range(0, 4080) - 2040;
      sdy[y][x] = $urandom_range(0, 4080) - 2040;
    end
    for (int y = 0; y < 2*ch; y++) for (int x = 0; x < 2*cw; x++) begin
      sub_valid <= 1; dx <= 16'(sdx[y][x]); dy <= 16'(sdy[y][x]);
      sub_odd <= x[0]; sub_lower <= y[0]; sub_cell_col <= 3'(x/2); sub_cell_row <= 16'(y/2);
      @(posedge clk);
      if (x[0] && y[0]) begin
        automatic int cx = x/2, cy = y/2, e[4] = '{0, 0, 0, 0};
        for (int j = 0; j < 2; j++) for (int i = 0; i < 2; i++) begin
          e[0] += sdx[2*cy+j][2*cx+i]; e[1] += sdy[2*cy+j][2*cx+i];
          e[2] += absi(sdx[2*cy+j][2*cx+i]); e[3] += absi(sdy[2*cy+j][2*cx+i]);
        end
        sub_valid <= 0;
        @(posedge clk); #1;
        checks++; ncell++;
        if (!cell_valid || int'(cell_fv.sdx) != e[0] || int'(cell_fv.sdy) != e[1] || int'(cell_fv.adx) != e[2]
            || int'(cell_fv.ady) != e[3] || int'(cell_x) != cx || int'(cell_y) != cy) begin
          failures++; $display("FAIL cell (%0d,%0d) v %0d sdx %0d/%0d adx %0d/%0d", cx, cy, cell_valid, cell_fv.sdx, e[0], cell_fv.adx, e[2]);
        end
      end else begin
        // idle cycles (the valid flag is written once per time step)
        automatic int gap = $urandom_range(0, 3);
        if (gap > 0) begin sub_valid <= 0; repeat (gap) @(posedge clk); end
      end
    end
    sub_valid <= 0;
  endtask

  // no cell output may appear other than the checked ones
  int nvalid = 0;
  always @(posedge clk) if (rst_n && cell_valid) nvalid++;

  initial begin
    #1 rst_n = 0; @(posedge clk); rst_n = 1;
    frame(2, 2);
    frame(8, 3);
    frame($urandom_range(1, 8), $urandom_range(1, 6));
    repeat (3) @(posedge clk);
    checks++;
    if (nvalid != ncell) begin failures++; $display("FAIL %0d outputs for %0d cells", nvalid, ncell); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
