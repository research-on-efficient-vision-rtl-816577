// tb_sync_fifo: the FIFO is filled and drained by random valid/ready patterns, in phases
// that fill it completely and that empty it. Each word read is compared with a queue model,
// and count, in_ready and out_valid are checked every cycle against the model's occupancy.
// The FIFO has a depth of 8 here to reach the full state often.
module tb_sync_fifo;
  localparam int W = 20, D = 8;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data = 0, out_data;
  logic [3:0] count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, nfull = 0, nempty = 0;
  int pin = 50, pout = 50;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (int'(count) != q.size() || in_ready != (q.size() < D) || out_valid != (q.size() > 0)) begin
      failures++; $display("FAIL count %0d model %0d", count, q.size());
    end
    if (q.size() == D) nfull++;
    if (q.size() == 0) nempty++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_data != q[0]) begin failures++; $display("FAIL data %h exp %h", out_data, q[0]); end
      void'(q.pop_front());
    end
    if (in_valid && in_ready) q.push_back(in_data);
    in_valid  <= ($urandom_range(0, 99) < pin);
    in_data   <= W'($urandom);
    out_ready <= ($urandom_range(0, 99) < pout);
  end

  initial begin
    #1 rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
    repeat (500) @(posedge clk);
    pin = 90; pout = 20; repeat (500) @(posedge clk);
    pin = 20; pout = 90; repeat (500) @(posedge clk);
    pin = 100; pout = 100; repeat (500) @(posedge clk);
    checks++;
    if (nfull == 0 || nempty == 0) begin failures++; $display("FAIL full %0d empty %0d", nfull, nempty); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
