// surf_nns_coprocessor: feature-vector based recognition coprocessor that couples the
// simplified-SURF cell extractor with a parallel scan-window nearest-neighbour classifier.
//
// Data flow: raster pixels -> haar_cell_extractor (one 4-D vector per 8x8 cell) -> FV buffer
// FIFO (FIFO_DEPTH x 64 bit) -> psw_window_addr_gen (every 64x128-pixel window that holds the
// cell, stride 16 pixels) -> nns_psed_engine (partial squared Euclidean distances to NUM_REF
// references, minimum search). A window is classified as soon as its last cell has been
// processed, while later windows are still being built, so no window vector is ever stored.
//
// Flow control: extraction runs at the pixel rate, classification needs about NUM_REF cycles
// per OSW of a cell, so the FIFO absorbs the bursts of cells produced in the last pixel row of
// each cell row; when it is nearly full pix_ready drops and the pixel source must wait.
// Image width (multiple of 8, up to MAX_WIDTH) and height (multiple of 8) are run-time inputs;
// frame_start clears all position counters before a frame. References are written through the
// ref_* port (bank = position of the cell slot in its block, address = ref*105 + block index).
// The same OSW stream also feeds pls_projector, which reduces every window's 1680-D vector to
// PLS_K dimensions and classifies it against PLS_REF reduced references (pls_* ports). An OSW
// leaves the window generator only when both classifiers take it.
module surf_nns_coprocessor #(
  parameter int unsigned MAX_WIDTH  = 1024,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned NUM_REF    = 4,
  parameter int unsigned PLS_K      = 8,
  parameter int unsigned PLS_REF    = 16,
  localparam int unsigned CW  = $clog2(MAX_WIDTH),
  localparam int unsigned RAW = $clog2(NUM_REF*105),
  localparam int unsigned RW  = (NUM_REF > 1) ? $clog2(NUM_REF) : 1,
  localparam int unsigned PKW = (PLS_K > 1) ? $clog2(PLS_K) : 1,
  localparam int unsigned PRW = (PLS_REF > 1) ? $clog2(PLS_REF) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            frame_start,
  input  logic [CW:0]     img_width,
  input  logic [15:0]     img_height,
  input  logic            pix_valid,
  output logic            pix_ready,
  input  logic [7:0]      pix,
  input  logic            ref_we,
  input  logic [1:0]      ref_bank,
  input  logic [RAW-1:0]  ref_addr,
  input  logic [31:0]     ref_wdata,
  output logic            res_valid,
  output logic [6:0]      res_wx,
  output logic [9:0]      res_wy,
  output logic [15:0]     res_widx,
  output logic [RW-1:0]   res_winner,
  output logic [31:0]     res_dist,
  output logic            cell_valid,     // a cell vector was produced (status)
  output logic            fifo_full_stall,// pix_ready low while pixels are waiting (status)
  output logic            bypass_hit,     // PSED bypass used (status)
  // PLS projection weights, reduced references and results
  input  logic                 pls_w_we,
  input  logic [1:0]           pls_w_bank,
  input  logic [PKW-1:0]       pls_w_k,
  input  logic [6:0]           pls_w_addr,
  input  logic [63:0]          pls_w_wdata,
  input  logic                 pls_r_we,
  input  logic [PRW-1:0]       pls_r_addr,
  input  logic [PLS_K*16-1:0]  pls_r_wdata,
  output logic                 pls_res_valid,
  output logic [6:0]           pls_res_wx,
  output logic [9:0]           pls_res_wy,
  output logic [15:0]          pls_res_widx,
  output logic [PLS_K*16-1:0]  pls_res_d,
  output logic [PRW-1:0]       pls_res_winner,
  output logic [39:0]          pls_res_dist
);
  import vision_pkg::*;
  localparam int unsigned FAW = $clog2(FIFO_DEPTH);

  haar_fv_t       cell_fv;
  logic [CW-4:0]  cell_x;
  logic [15:0]    cell_y;
  logic           pix_go;

  assign pix_go = pix_valid && pix_ready;

  haar_cell_extractor #(.MAX_WIDTH(MAX_WIDTH)) u_fe (
    .clk, .rst_n, .frame_start, .img_width, .pix_valid(pix_go), .pix,
    .cell_valid, .cell_fv, .cell_x, .cell_y);

  // FV buffer
  logic           f_valid, f_ready, f_in_ready;
  haar_fv_t       f_fv;
  logic [FAW:0]   f_count;
  sync_fifo #(.WIDTH($bits(haar_fv_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .in_valid(cell_valid), .in_ready(f_in_ready), .in_data(cell_fv),
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_fv), .count(f_count));

  // leave room for the cells still in the extractor pipeline
  assign pix_ready = (f_count <= (FAW+1)'(FIFO_DEPTH-4));
  assign fifo_full_stall = pix_valid && !pix_ready;

  assert property (@(posedge clk) disable iff (!rst_n) cell_valid |-> f_in_ready);

  // raster position of the cell at the FIFO head
  logic [7:0]  cnh, hx;
  logic [15:0] cnv, hy;
  assign cnh = 8'(img_width >> 3);
  assign cnv = img_height >> 3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hx <= '0; hy <= '0;
    end else if (frame_start) begin
      hx <= '0; hy <= '0;
    end else if (f_valid && f_ready) begin
      if (hx == cnh - 8'd1) begin hx <= '0; hy <= hy + 16'd1; end
      else hx <= hx + 8'd1;
    end
  end

  osw_t     o_osw;
  logic     o_valid, o_ready, o_last, dropped;
  logic [$bits(haar_fv_t)-1:0] o_payload;
  psw_window_addr_gen #(.WIN_W(8), .WIN_H(16), .PW($bits(haar_fv_t)), .CELL_RRRT(1'b1)) u_psw (
    .clk, .rst_n, .units_w(cnh), .units_h(cnv),
    .in_valid(f_valid), .in_ready(f_ready), .in_x(hx), .in_y(hy), .in_payload(f_fv),
    .out_valid(o_valid), .out_ready(o_ready), .out_osw(o_osw), .out_payload(o_payload),
    .out_unit_last(o_last), .dropped);

  // both classifiers take each OSW in the same cycle
  logic n_ready, p_ready;
  assign o_ready = n_ready && p_ready;

  nns_psed_engine #(.NUM_REF(NUM_REF), .WIN_W(8), .WIN_H(16)) u_nns (
    .clk, .rst_n, .in_valid(o_valid && p_ready), .in_ready(n_ready), .in_osw(o_osw), .in_fv(o_payload),
    .ref_we, .ref_bank, .ref_addr, .ref_wdata,
    .res_valid, .res_wx, .res_wy, .res_widx, .res_winner, .res_dist, .bypass_hit);

  pls_projector #(.K(PLS_K), .NUM_REF(PLS_REF), .WIN_W(8), .WIN_H(16)) u_pls (
    .clk, .rst_n, .in_valid(o_valid && n_ready), .in_ready(p_ready), .in_osw(o_osw), .in_fv(o_payload),
    .w_we(pls_w_we), .w_bank(pls_w_bank), .w_k(pls_w_k), .w_addr(pls_w_addr), .w_wdata(pls_w_wdata),
    .r_we(pls_r_we), .r_addr(pls_r_addr), .r_wdata(pls_r_wdata),
    .res_valid(pls_res_valid), .res_wx(pls_res_wx), .res_wy(pls_res_wy), .res_widx(pls_res_widx),
    .res_d(pls_res_d), .res_winner(pls_res_winner), .res_dist(pls_res_dist));
endmodule
