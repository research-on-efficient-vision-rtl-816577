// tb_param_init: applies random image sizes and cell sizes (including invalid cell sizes
// and images wider than the cell memory) and checks, one cycle later, the number of cells
// and blocks per row and column and the configuration error flag against their definitions:
// cells = pixels / cell size, blocks = cells - 1 (2x2-cell blocks, one-cell stride).
module tb_param_init;
  logic clk = 0, rst_n = 1;
  logic [10:0] img_width = 0; logic [15:0] img_height = 0; logic [2:0] cs_log2 = 3;
  logic [7:0] cnh, bnh; logic [15:0] cnv, bnv; logic cfg_err;
  int checks = 0, failures = 0;

  param_init dut (.*);
  always #5 clk = ~clk;

  task automatic one(input int w, input int h, input int c);
    int cs = 1 << c, ech, ecv, err;
    img_width <= 11'(w); img_height <= 16'(h); cs_log2 <= 3'(c);
    @(posedge clk); @(posedge clk); #1;
    ech = w / cs; ecv = h / cs;
    err = (c < 1 || c > 5 || ech > 128);
    if (ech > 128) ech = 128;
    checks++;
    if (cfg_err != err[0] || int'(cnh) != ech || int'(cnv) != ecv
        || int'(bnh) != ((ech == 0) ? 0 : ech - 1) || int'(bnv) != ((ecv == 0) ? 0 : ecv - 1)) begin
      failures++;
      $display("FAIL w=%0d h=%0d cs=%0d: cnh %0d cnv %0d bnh %0d bnv %0d err %0d", w, h, cs, cnh, cnv, bnh, bnv, cfg_err);
    end
  endtask

  initial begin
    #1 rst_n = 0; @(posedge clk); rst_n = 1;
    one(640, 480, 3);    // VGA, 8x8 cells
    one(1024, 768, 3);   // XGA
    one(320, 240, 2);    // QVGA, 4x4 cells
    one(64, 128, 3);     // one window
    one(1024, 768, 2);   // 256 cells per row: too wide
    one(640, 480, 0);    // cell size 1: not allowed
    for (int n = 0; n < 200; n++)
      one($urandom_range(0, 2047), $urandom_range(0, 65535), $urandom_range(0, 7));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
