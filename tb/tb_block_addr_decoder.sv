// tb_block_addr_decoder: walks the decoder over whole images of random size and compares,
// for every cell, the four block addresses with the block numbers of Eq. 4.5
// (k-k/h, k-k/h-1, k-k/h-h, k-k/h-h+1 for cell number k, taken modulo h = cnh), their
// valid flags with the image borders, the nine-way cell case, and the cell-memory
// addresses with k mod (cnh+1), k+1 and k-1 (mod cnh+1). 'advance' is random.
module tb_block_addr_decoder;
  logic clk = 0, rst_n = 1, frame_start = 0, advance = 0;
  logic [7:0] cnh = 4; logic [15:0] cnv = 4;
  logic [7:0] cx; logic [15:0] cy;
  logic [6:0] ba [4]; logic [3:0] ba_valid, cell_case; logic [7:0] ca, ca_tr, ca_l;
  int checks = 0, failures = 0;
  int cases_seen [9] = '{default: 0};

  block_addr_decoder dut (.*);
  always #5 clk = ~clk;

  function automatic int md(input int a, input int m); return ((a % m) + m) % m; endfunction

  task automatic check(input int x, input int y, input int h, input int v);
    int k = y*h + x, b = k - k/h;
    int eb [4], ev [4], ec;
    eb[0] = md(b, h); eb[1] = md(b-1, h); eb[2] = md(b-h, h); eb[3] = md(b-h+1, h);
    ev[0] = (x < h-1) && (y < v-1); ev[1] = (x > 0) && (y < v-1);
    ev[2] = (x > 0) && (y > 0);     ev[3] = (x < h-1) && (y > 0);
    ec = (y == 0 ? 0 : y == v-1 ? 2 : 1) * 3 + (x == 0 ? 0 : x == h-1 ? 2 : 1);
    checks++;
    if (int'(cx) != x || int'(cy) != y || int'(cell_case) != ec
        || int'(ca) != md(k, h+1) || int'(ca_tr) != md(k+1, h+1) || int'(ca_l) != md(k-1, h+1)) begin
      failures++; $display("FAIL cell (%0d,%0d) case %0d exp %0d ca %0d", x, y, cell_case, ec, ca);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (ba_valid[i] != ev[i][0] || (ev[i] != 0 && int'(ba[i]) != eb[i])) begin
        failures++; $display("FAIL cell (%0d,%0d) BA%0d %0d/%0d exp %0d/%0d", x, y, i, ba[i], ba_valid[i], eb[i], ev[i]);
      end
    end
    cases_seen[ec]++;
  endtask

  task automatic frame(input int h, input int v);
    cnh <= 8'(h); cnv <= 16'(v);
    @(posedge clk); frame_start <= 1; @(posedge clk); frame_start <= 0;
    for (int y = 0; y < v; y++) for (int x = 0; x < h; x++) begin
      #1 check(x, y, h, v);
      while ($urandom_range(0, 2) == 0) @(posedge clk);
      advance <= 1; @(posedge clk); advance <= 0;
    end
  endtask

  initial begin
    #1 rst_n = 0; @(posedge clk); rst_n = 1;
    frame(5, 4);
    frame(80, 60);      // VGA with 8x8 cells
    frame(2, 2);
    frame(128, 3);      // widest row
    frame($urandom_range(3, 40), $urandom_range(3, 20));
    for (int c = 0; c < 9; c++) begin
      checks++; if (cases_seen[c] == 0) begin failures++; $display("FAIL case %0d never seen", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
