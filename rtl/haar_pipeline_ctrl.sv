// haar_pipeline_ctrl: the pipeline controller (counter group) of the Haar cell extractor.
//
// Pixels arrive in raster order, one per cycle in which pix_valid is high. Three variable
// counters follow the position of the current pixel: the pixel column (0..w-1, wrapping at the
// programmed image width, so the image height is unlimited), the pixel row inside the current
// cell row (0..7) and the cell-row number. From them the controller decodes, for the pixel
// that is on the input in this cycle:
//   addr1      sub-cell column = col/4, address of the first storage (Dx and Dy parts)
//   addr2      cell column     = col/8, address of the second storage
//   h_add      pixel lies in the left half of its sub-cell (add), else right half (subtract)
//   v_add      pixel lies in the upper half of its sub-cell (add), else lower half (subtract)
//   sc_init    first pixel row of a sub-cell row: the sub-cell sum starts from 0 (MUX3..MUX6)
//   sc_rd      read the stored partial sum of this sub-cell (second pixel of the group of 4)
//   load_sum   last pixel of the sub-cell in this row: write back / load the sum register
//   sc_done    last pixel of the whole sub-cell: Dx and Dy are complete
//   sc_odd     the sub-cell is the right one of its cell
//   cell_lower the sub-cell is in the lower sub-cell row of its cell
// All outputs are combinational decodes of registered counters. Following the document, the
// memory-saving add/subtract scheme is used for Dx as well as Dy (M = 4 in Fig. 2.21), so one
// counter of ceil(log2(w/4)) bits addresses the first storage and one of ceil(log2(w/8)) bits
// the second. frame_start clears the counters; img_width must be a multiple of 8.
module haar_pipeline_ctrl #(
  parameter int unsigned MAX_WIDTH = 1024,
  localparam int unsigned CW = $clog2(MAX_WIDTH)       // column counter width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_start,
  input  logic [CW:0]   img_width,
  input  logic          pix_valid,
  output logic [CW-1:0] col,
  output logic [2:0]    row8,
  output logic [15:0]   cell_row,
  output logic [CW-3:0] addr1,
  output logic [CW-4:0] addr2,
  output logic          h_add,
  output logic          v_add,
  output logic          sc_init,
  output logic          sc_rd,
  output logic          load_sum,
  output logic          sc_done,
  output logic          sc_odd,
  output logic          cell_lower,
  output logic          row_end
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; row8 <= '0; cell_row <= '0;
    end else if (frame_start) begin
      col <= '0; row8 <= '0; cell_row <= '0;
    end else if (pix_valid) begin
      if (row_end) begin
        col  <= '0;
        row8 <= row8 + 3'd1;
        if (row8 == 3'd7) cell_row <= cell_row + 16'd1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  always_comb begin
    row_end    = ({1'b0, col} == img_width - 1'b1);
    addr1      = col[CW-1:2];
    addr2      = col[CW-1:3];
    h_add      = ~col[1];
    v_add      = ~row8[1];
    sc_init    = (row8[1:0] == 2'd0);
    sc_rd      = (col[1:0] == 2'd1);
    load_sum   = (col[1:0] == 2'd3);
    sc_done    = load_sum && (row8[1:0] == 2'd3);
    sc_odd     = col[2];
    cell_lower = row8[2];
  end
endmodule
