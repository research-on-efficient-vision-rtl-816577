// haar_cell_extractor: pixel-based pipelined extraction of the simplified-SURF (edge
// Haar-like) cell feature vectors, after Fig. 2.11 of the design.
//
// 8-bit gray pixels enter in raster order, one per cycle when pix_valid is high, for an image
// of programmable width (multiple of 8, up to MAX_WIDTH) and unlimited height. The pipeline
// controller decodes the pixel position, the sub-cell calculator forms Dx and Dy of every
// 4x4 sub-cell with the first storage, and the cell accumulator sums 2x2 sub-cells into the
// 4-D cell FV with the second storage. No pixel is stored. cell_valid is high in the
// second cycle after the one that presents the cell's last (bottom-right) pixel; during
// the last pixel row of a cell row one vector is produced every 8 pixels. Cells come out in
// raster order with their cell column and row.
module haar_cell_extractor #(
  parameter int unsigned MAX_WIDTH = 1024,
  localparam int unsigned CW = $clog2(MAX_WIDTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 frame_start,
  input  logic [CW:0]          img_width,
  input  logic                 pix_valid,
  input  logic [7:0]           pix,
  output logic                 cell_valid,
  output vision_pkg::haar_fv_t cell_fv,
  output logic [CW-4:0]        cell_x,
  output logic [15:0]          cell_y
);
  logic [CW-1:0] col;
  logic [2:0]    row8;
  logic [15:0]   cell_row;
  logic [CW-3:0] addr1;
  logic [CW-4:0] addr2;
  logic h_add, v_add, sc_init, sc_rd, load_sum, sc_done, sc_odd, cell_lower, row_end;

  logic sub_valid, sub_odd, sub_lower;
  logic signed [vision_pkg::HFV_W-1:0] dx, dy;
  logic [CW-4:0] sub_cell_col;
  logic [15:0]   sub_cell_row;

  haar_pipeline_ctrl #(.MAX_WIDTH(MAX_WIDTH)) u_ctrl (
    .clk, .rst_n, .frame_start, .img_width, .pix_valid,
    .col, .row8, .cell_row, .addr1, .addr2, .h_add, .v_add, .sc_init, .sc_rd,
    .load_sum, .sc_done, .sc_odd, .cell_lower, .row_end);

  haar_subcell_calc #(.MAX_WIDTH(MAX_WIDTH)) u_sub (
    .clk, .rst_n, .pix_valid, .pix, .addr1, .addr2, .cell_row, .h_add, .v_add, .sc_init,
    .sc_rd, .load_sum, .sc_done, .sc_odd, .cell_lower,
    .sub_valid, .dx, .dy, .sub_odd, .sub_lower, .sub_cell_col, .sub_cell_row);

  haar_cell_accum #(.MAX_WIDTH(MAX_WIDTH)) u_acc (
    .clk, .rst_n, .sub_valid, .dx, .dy, .sub_odd, .sub_lower, .sub_cell_col, .sub_cell_row,
    .cell_valid, .cell_fv, .cell_x, .cell_y);
endmodule
