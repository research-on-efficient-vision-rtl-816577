// param_init: parameter initializing circuit (PIC) of the normalized-feature detector.
// It turns the run-time image resolution and the programmable cell size (2, 4, 8, 16 or 32
// pixels square, given as cs_log2 = 1..5) into the cell counts per row (CNH) and per column
// (CNV) that the block-based normalization and the window search are configured with, and
// the matching block counts (cells minus one: 2x2-cell blocks step by one cell). A height of
// 0 means an unlimited image height (CNV = 0 is passed on as "no bottom edge"). cfg_err
// flags a request the circuit cannot hold (more than MAX_CNH cells per row, or a cell size
// outside 2..32). Outputs are registered and follow the inputs one cycle later.
module param_init #(
  parameter int unsigned MAX_CNH = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [10:0] img_width,
  input  logic [15:0] img_height,
  input  logic [2:0]  cs_log2,
  output logic [7:0]  cnh,
  output logic [15:0] cnv,
  output logic [7:0]  bnh,
  output logic [15:0] bnv,
  output logic        cfg_err
);
  logic [10:0] w_cells;
  logic [15:0] h_cells;
  logic        bad_cs;
  always_comb begin
    bad_cs  = (cs_log2 == 3'd0) || (cs_log2 > 3'd5);
    w_cells = img_width >> cs_log2;
    h_cells = img_height >> cs_log2;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnh <= '0; cnv <= '0; bnh <= '0; bnv <= '0; cfg_err <= 1'b0;
    end else begin
      cfg_err <= bad_cs || (w_cells > 11'(MAX_CNH));
      cnh <= (w_cells > 11'(MAX_CNH)) ? 8'(MAX_CNH) : w_cells[7:0];
      cnv <= h_cells;
      bnh <= (w_cells == 0) ? 8'd0 : ((w_cells > 11'(MAX_CNH)) ? 8'(MAX_CNH-1) : w_cells[7:0] - 8'd1);
      bnv <= (h_cells == 0) ? 16'd0 : h_cells - 16'd1;
    end
  end
endmodule
