// haar_cell_accum: builds the 4-D cell feature vector v_cell = {sum Dx, sum Dy, sum |Dx|,
// sum |Dy|} of every 8x8-pixel cell (2x2 sub-cells) from the sub-cell responses.
//
// Sub-cells of a cell row arrive left to right, the upper sub-cell row of the cell first. The
// left sub-cell of a cell loads the accumulator (from 0 in the upper row, from the second
// storage in the lower row: MUX1/MUX2 of the document), the right sub-cell adds to it. At
// the end of the upper row the two-sub-cell sum is parked in the second storage, one word
// per cell column, split like the document's into a 32-bit Dx part {sum Dx, sum |Dx|} and a
// 32-bit Dy part {sum Dy, sum |Dy|}; at the end of the lower row the finished vector is
// latched into the output register (Load_FV). The second storage is read when the left
// sub-cell of the lower row arrives and used one cycle later (two-stage pipeline), so a
// sub-cell may arrive every cycle except that a cell's two sub-cells must be at least two
// cycles apart (they are four pixel cycles apart in the extractor). cell_valid pulses one
// cycle per finished cell, with its cell column and row.
module haar_cell_accum #(
  parameter int unsigned MAX_WIDTH = 1024,
  localparam int unsigned CW = $clog2(MAX_WIDTH),
  localparam int unsigned SW = vision_pkg::HFV_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sub_valid,
  input  logic signed [SW-1:0] dx,
  input  logic signed [SW-1:0] dy,
  input  logic                 sub_odd,
  input  logic                 sub_lower,
  input  logic [CW-4:0]        sub_cell_col,
  input  logic [15:0]          sub_cell_row,
  output logic                 cell_valid,
  output vision_pkg::haar_fv_t cell_fv,
  output logic [CW-4:0]        cell_x,
  output logic [15:0]          cell_y
);
  import vision_pkg::*;
  localparam int unsigned DEPTH = MAX_WIDTH / 8;

  // stage 1
  logic                 s1_valid, s1_odd, s1_lower;
  logic signed [SW-1:0] s1_dx, s1_dy;
  logic [CW-4:0]        s1_col;
  logic [15:0]          s1_row;
  // accumulator and second storage
  haar_fv_t acc, base, sum;
  logic [2*SW-1:0] mx_rdata, my_rdata;
  logic signed [SW-1:0] adx, ady;

  always_comb begin
    adx = (s1_dx < 0) ? -s1_dx : s1_dx;
    ady = (s1_dy < 0) ? -s1_dy : s1_dy;
    if (s1_odd) base = acc;
    else if (s1_lower) base = '{sdx: mx_rdata[2*SW-1:SW], adx: mx_rdata[SW-1:0],
                                sdy: my_rdata[2*SW-1:SW], ady: my_rdata[SW-1:0]};
    else base = '0;
    sum.sdx = base.sdx + s1_dx;
    sum.sdy = base.sdy + s1_dy;
    sum.adx = base.adx + adx;
    sum.ady = base.ady + ady;
  end

  dp_ram #(.WIDTH(2*SW), .DEPTH(DEPTH)) u_second_dx (
    .clk, .we(s1_valid && s1_odd && !s1_lower), .waddr(s1_col), .wdata({sum.sdx, sum.adx}),
    .rd_en(sub_valid && !sub_odd && sub_lower), .raddr(sub_cell_col), .rdata(mx_rdata));
  dp_ram #(.WIDTH(2*SW), .DEPTH(DEPTH)) u_second_dy (
    .clk, .we(s1_valid && s1_odd && !s1_lower), .waddr(s1_col), .wdata({sum.sdy, sum.ady}),
    .rd_en(sub_valid && !sub_odd && sub_lower), .raddr(sub_cell_col), .rdata(my_rdata));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; s1_odd <= 1'b0; s1_lower <= 1'b0;
      s1_dx <= '0; s1_dy <= '0; s1_col <= '0; s1_row <= '0;
      acc <= '0; cell_valid <= 1'b0; cell_fv <= '0; cell_x <= '0; cell_y <= '0;
    end else begin
      s1_valid <= sub_valid;
      if (sub_valid) begin
        s1_odd <= sub_odd; s1_lower <= sub_lower;
        s1_dx <= dx; s1_dy <= dy; s1_col <= sub_cell_col; s1_row <= sub_cell_row;
      end
      cell_valid <= s1_valid && s1_odd && s1_lower;
      if (s1_valid) begin
        acc <= sum;
        if (s1_odd && s1_lower) begin
          cell_fv <= sum;
          cell_x  <= s1_col;
          cell_y  <= s1_row;
        end
      end
    end
  end
endmodule
