// tb_dp_ram: random writes and reads on the two-port RAM, compared with an array model.
// Checks the one-cycle read latency, that rdata holds while rd_en is low, and that a
// read of the address being written in the same cycle returns the old word.
module tb_dp_ram;
  localparam int W = 16, D = 40;
  logic clk = 0, we = 0, rd_en = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] model [D];
  logic [W-1:0] exp_q;
  logic exp_v = 0;
  int checks = 0, failures = 0;

  dp_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    // fill every word first so that every read is defined
    for (int a = 0; a < D; a++) begin
      model[a] = 16'($urandom);
      we <= 1; waddr <= 6'(a); wdata <= model[a]; @(posedge clk);
    end
    we <= 0; rd_en <= 1; raddr <= 0; @(posedge clk);
    exp_q = model[0];
    for (int n = 0; n < 2000; n++) begin
      automatic int wa = $urandom_range(0, D-1), ra = $urandom_range(0, D-1);
      automatic logic w = $urandom_range(0, 1), r = $urandom_range(0, 1);
      automatic logic [W-1:0] d = 16'($urandom);
      if (n % 7 == 0) ra = wa;               // read-during-write of the same word
      we <= w; waddr <= 6'(wa); wdata <= d; rd_en <= r; raddr <= 6'(ra);
      @(posedge clk);
      if (r) exp_q = model[ra];              // old data
      if (w) model[wa] = d;
      #1;
      checks++;
      if (rdata !== exp_q) begin failures++; $display("FAIL n=%0d rdata %h exp %h", n, rdata, exp_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
