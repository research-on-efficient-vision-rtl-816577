// haar_subcell_calc: the sub-cell calculator, computing the edge Haar-like responses of every
// 4x4-pixel sub-cell directly from the raster pixel stream (no frame buffer, no integral image).
//
//   Dx = sum(left two columns) - sum(right two columns)
//   Dy = sum(upper two rows)   - sum(lower two rows)
//
// Both calculators use the add/subtract scheme: the four pixels of a sub-cell in one pixel row
// are accumulated in a row register with the sign chosen from the pixel position (h_add,
// v_add), and at the fourth pixel the row total is added to the partial sum of that sub-cell
// held in the first storage (one 16-bit word per sub-cell column, w/4 words per part) and
// written back. In the first row of a sub-cell row the stored value is replaced by 0
// (sc_init), so the storage is reused for every sub-cell row and the image height is
// unlimited. The storage word is read at the second pixel of the group and written at the
// fourth, a fixed two-cycle distance that keeps the two ports of the dual-port memory apart.
// When the last pixel of a sub-cell arrives (sc_done), Dx and Dy are registered and
// sub_valid pulses for one cycle together with the sub-cell's position flags.
module haar_subcell_calc #(
  parameter int unsigned MAX_WIDTH = 1024,
  localparam int unsigned CW = $clog2(MAX_WIDTH),
  localparam int unsigned SW = vision_pkg::HFV_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  pix_valid,
  input  logic [7:0]            pix,
  // decodes from haar_pipeline_ctrl for the current pixel
  input  logic [CW-3:0]         addr1,
  input  logic [CW-4:0]         addr2,
  input  logic [15:0]           cell_row,
  input  logic                  h_add,
  input  logic                  v_add,
  input  logic                  sc_init,
  input  logic                  sc_rd,
  input  logic                  load_sum,
  input  logic                  sc_done,
  input  logic                  sc_odd,
  input  logic                  cell_lower,
  // completed sub-cell
  output logic                  sub_valid,
  output logic signed [SW-1:0]  dx,
  output logic signed [SW-1:0]  dy,
  output logic                  sub_odd,
  output logic                  sub_lower,
  output logic [CW-4:0]         sub_cell_col,
  output logic [15:0]           sub_cell_row
);
  localparam int unsigned DEPTH = MAX_WIDTH / 4;

  logic signed [SW-1:0] hreg, vreg;           // row accumulators (the 'REG' of Fig. 2.17)
  logic signed [SW-1:0] hsum_row, vsum_row;   // row accumulators including this pixel
  logic signed [SW-1:0] hmem, vmem;           // first storage read data
  logic signed [SW-1:0] htot, vtot;
  logic signed [SW-1:0] spix;

  assign spix     = SW'($unsigned(pix));
  assign hsum_row = hreg + (h_add ? spix : -spix);
  assign vsum_row = vreg + (v_add ? spix : -spix);
  assign htot     = (sc_init ? SW'(0) : hmem) + hsum_row;
  assign vtot     = (sc_init ? SW'(0) : vmem) + vsum_row;

  // first storage, Dx part and Dy part
  dp_ram #(.WIDTH(SW), .DEPTH(DEPTH)) u_first_dx (
    .clk, .we(pix_valid && load_sum), .waddr(addr1), .wdata(htot),
    .rd_en(pix_valid && sc_rd), .raddr(addr1), .rdata(hmem));
  dp_ram #(.WIDTH(SW), .DEPTH(DEPTH)) u_first_dy (
    .clk, .we(pix_valid && load_sum), .waddr(addr1), .wdata(vtot),
    .rd_en(pix_valid && sc_rd), .raddr(addr1), .rdata(vmem));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hreg <= '0; vreg <= '0;
      sub_valid <= 1'b0; dx <= '0; dy <= '0;
      sub_odd <= 1'b0; sub_lower <= 1'b0; sub_cell_col <= '0; sub_cell_row <= '0;
    end else begin
      sub_valid <= pix_valid && sc_done;
      if (pix_valid) begin
        // the group of four pixels restarts after load_sum
        hreg <= load_sum ? SW'(0) : hsum_row;
        vreg <= load_sum ? SW'(0) : vsum_row;
        if (sc_done) begin
          dx <= htot;
          dy <= vtot;
          sub_odd      <= sc_odd;
          sub_lower    <= cell_lower;
          sub_cell_col <= addr2;
          sub_cell_row <= cell_row;
        end
      end
    end
  end
endmodule
