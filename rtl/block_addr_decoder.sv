// block_addr_decoder: status monitor and block-address analyser of the block-based
// normalization circuit (BBNC).
//
// The status monitor is a set of counters following the raster position (cx, cy) of the
// current cell in an image of cnh x cnv cells (cnv = 0: unlimited height); 'advance' moves
// to the next cell, frame_start clears it. A cell belongs to up to four 2x2-cell blocks,
// which step by one cell: the block whose top-left cell it is (BA0), top-right (BA1),
// bottom-right (BA2) and bottom-left (BA3). Eq. 4.5 gives their block numbers k-k/h,
// k-k/h-1, k-k/h-h and k-k/h-h+1 for cell number k and h = cnh. Only about one row of blocks
// is alive at a time, so the block memory is addressed by the block number modulo cnh; with
// that, the four addresses become a0-1, a0, a0, a0+1 with a0 = (cx - cy) mod cnh, which the
// counters keep without a divider. BA2 (the block the cell completes) and BA0 (the block
// the cell starts) share a word: the user finishes BA2 before it starts BA0.
// The analyser sorts each cell into one of nine cases (corner, edge or interior in each
// direction) and flags which of the four addresses exist.
// The cell memory keeps cnh+1 cells; ca = k mod (cnh+1) is where the current cell is written,
// and also where the oldest needed cell (top-left of the completed block) is, ca_tr holds the
// top-right cell (cx, cy-1) and ca_l the left neighbour (cx-1, cy).
// All outputs are combinational from the counters.
module block_addr_decoder #(
  parameter int unsigned MAX_CNH = 128,
  localparam int unsigned AW = $clog2(MAX_CNH),
  localparam int unsigned CAW = $clog2(MAX_CNH+1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           frame_start,
  input  logic [7:0]     cnh,
  input  logic [15:0]    cnv,
  input  logic           advance,
  output logic [7:0]     cx,
  output logic [15:0]    cy,
  output logic [AW-1:0]  ba [4],
  output logic [3:0]     ba_valid,
  output logic [3:0]     cell_case,
  output logic [CAW-1:0] ca,
  output logic [CAW-1:0] ca_tr,
  output logic [CAW-1:0] ca_l
);
  logic [AW-1:0] a0, rs;    // a0 = (cx - cy) mod cnh, rs = (-cy) mod cnh
  logic [AW-1:0] hm1;
  logic [CAW-1:0] cam;      // cnh (largest cell address)
  assign hm1 = AW'(cnh - 8'd1);
  assign cam = CAW'(cnh);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cx <= '0; cy <= '0; a0 <= '0; rs <= '0; ca <= '0;
    end else if (frame_start) begin
      cx <= '0; cy <= '0; a0 <= '0; rs <= '0; ca <= '0;
    end else if (advance) begin
      ca <= (ca == cam) ? '0 : ca + 1'b1;
      if (cx == cnh - 8'd1) begin
        cx <= '0;
        cy <= cy + 16'd1;
        rs <= (rs == '0) ? hm1 : rs - 1'b1;
        a0 <= (rs == '0) ? hm1 : rs - 1'b1;
      end else begin
        cx <= cx + 8'd1;
        a0 <= (a0 == hm1) ? '0 : a0 + 1'b1;
      end
    end
  end

  logic left, right, top, bottom;
  always_comb begin
    left   = (cx == 8'd0);
    right  = (cx == cnh - 8'd1);
    top    = (cy == 16'd0);
    bottom = (cnv != 16'd0) && (cy == cnv - 16'd1);
    cell_case = 4'((top ? 0 : bottom ? 2 : 1) * 3 + (left ? 0 : right ? 2 : 1));
    ba_valid[0] = !right && !bottom;
    ba_valid[1] = !left  && !bottom;
    ba_valid[2] = !left  && !top;
    ba_valid[3] = !right && !top;
    ba[0] = a0;
    ba[1] = (a0 == '0) ? hm1 : a0 - 1'b1;
    ba[2] = a0;
    ba[3] = (a0 == hm1) ? '0 : a0 + 1'b1;
    ca_tr = (ca == cam) ? '0 : ca + 1'b1;
    ca_l  = (ca == '0) ? cam : ca - 1'b1;
  end
endmodule
