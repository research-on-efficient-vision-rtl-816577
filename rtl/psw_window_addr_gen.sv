// psw_window_addr_gen: window address generator of the parallel scan-window (PSW) scheme.
//
// Scan windows of WIN_W x WIN_H units (cells, or blocks for the block-based scheme) slide over
// an image of units_w x units_h units with a stride of 2 units (one non-overlapping block) in
// both directions, giving N = (units_w-WIN_W)/2+1 windows per row and M = (units_h-WIN_H)/2+1
// rows of windows (Eq. 3.3). Each unit, arriving in raster order, is used once and handed to
// every overlapping scan window (OSW) that contains it.
//
// For the accepted unit at (x, y) the window look-up (WLUT) gives the first and last window
// column and row that contain it; their counts are the 'hor' and 'ver' multiplication factors
// of Tables III.I/III.II (up to WIN_W/2 and WIN_H/2), and the first window is the initial
// window address i(n) of Fig. 3.8. The loop control then emits one OSW per cycle, window
// index i(n) + j + N*k for j < hor, k < ver (Eq. 3.4), together with the unit's position
// inside that window and, in cell mode, its reusing time RRRT inside the window: 1 at a
// corner, 2 on an edge, 4 inside, because 2x2-cell blocks step by one cell inside a window.
// The position is computed from the coordinates instead of being kept per window in a
// position memory (CPLUT); the result is the same. A payload (the unit's feature vector)
// travels with every OSW. Units that no window contains are dropped.
// Handshakes are valid/ready; a unit with hor*ver OSWs takes hor*ver+1 cycles.
module psw_window_addr_gen #(
  parameter int unsigned WIN_W   = 8,    // window width in units  (64-pixel wide window, 8x8 cells)
  parameter int unsigned WIN_H   = 16,   // window height in units (128-pixel high window)
  parameter int unsigned PW      = 64,   // payload width
  parameter bit          CELL_RRRT = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [7:0]          units_w,   // CNH
  input  logic [15:0]         units_h,   // CNV
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [7:0]          in_x,
  input  logic [15:0]         in_y,
  input  logic [PW-1:0]       in_payload,
  output logic                out_valid,
  input  logic                out_ready,
  output vision_pkg::osw_t    out_osw,
  output logic [PW-1:0]       out_payload,
  output logic                out_unit_last,  // last OSW of this unit
  output logic                dropped         // pulse: accepted unit belongs to no window
);
  import vision_pkg::*;

  logic [7:0]  nwin;    // N
  logic [15:0] mwin;    // M
  always_comb begin
    nwin = (units_w >= 8'(WIN_W)) ? 8'(((units_w - 8'(WIN_W)) >> 1) + 8'd1) : 8'd0;
    mwin = (units_h >= 16'(WIN_H)) ? (((units_h - 16'(WIN_H)) >> 1) + 16'd1) : 16'd0;
  end

  // WLUT: window range containing unit (x, y)
  logic [7:0]  xmin, xmax;
  logic [15:0] ymin, ymax;
  logic        any;
  always_comb begin
    xmin = (in_x < 8'(WIN_W)) ? 8'd0 : 8'((in_x - 8'(WIN_W) + 8'd2) >> 1);
    xmax = ((in_x >> 1) < nwin) ? (in_x >> 1) : nwin - 8'd1;
    ymin = (in_y < 16'(WIN_H)) ? 16'd0 : ((in_y - 16'(WIN_H) + 16'd2) >> 1);
    ymax = ((in_y >> 1) < mwin) ? (in_y >> 1) : mwin - 16'd1;
    any  = (nwin != 0) && (mwin != 0) && (xmin <= xmax) && (ymin <= ymax);
  end

  logic        busy;
  logic [7:0]  ux, wx, wx0, wx1;
  logic [15:0] uy, wy, wy1;
  logic [PW-1:0] payload;

  assign in_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; ux <= '0; uy <= '0; wx <= '0; wx0 <= '0; wx1 <= '0; wy <= '0; wy1 <= '0;
      payload <= '0; dropped <= 1'b0;
    end else begin
      dropped <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          ux <= in_x; uy <= in_y; payload <= in_payload;
          wx <= xmin; wx0 <= xmin; wx1 <= xmax; wy <= ymin; wy1 <= ymax;
          busy <= any;
          dropped <= !any;
        end
      end else if (out_ready) begin
        if (wx == wx1) begin
          wx <= wx0;
          if (wy == wy1) busy <= 1'b0;
          else wy <= wy + 16'd1;
        end else begin
          wx <= wx + 8'd1;
        end
      end
    end
  end

  logic [7:0]  lx;
  logic [15:0] ly;
  logic        ex, ey;
  always_comb begin
    lx = ux - (wx << 1);
    ly = uy - (wy << 1);
    ex = (lx == 8'd0) || (lx == 8'(WIN_W-1));
    ey = (ly == 16'd0) || (ly == 16'(WIN_H-1));
    out_valid      = busy;
    out_payload    = payload;
    out_unit_last  = (wx == wx1) && (wy == wy1);
    out_osw.wx     = wx[6:0];
    out_osw.wy     = wy[9:0];
    out_osw.widx   = 16'(wy * nwin) + 16'(wx);
    out_osw.lx     = lx[4:0];
    out_osw.ly     = ly[4:0];
    out_osw.rrrt   = !CELL_RRRT ? 3'd1 : (ex && ey) ? 3'd1 : (ex || ey) ? 3'd2 : 3'd4;
    out_osw.first  = (lx == 8'd0) && (ly == 16'd0);
    out_osw.last   = (lx == 8'(WIN_W-1)) && (ly == 16'(WIN_H-1));
  end
endmodule
