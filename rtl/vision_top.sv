// vision_top: the two detection frameworks of the design, side by side.
//
//  * surf_nns_coprocessor: raster pixels in, simplified-SURF (edge Haar-like) cell vectors
//    extracted on the fly, every 64x128-pixel scan window compared with NUM_REF reference
//    vectors by nearest-neighbour search; one result (winning reference, squared distance)
//    per window. The same windows are also reduced to 8 dimensions by PLS projection and
//    classified against reduced references (s_pls_* ports).
//  * hog_l1_svm_detector: cell feature vectors of an external cell-based descriptor (HOG)
//    in, block-based L1 normalization, linear SVM per 64x128-pixel window; one decision
//    sgn(w.x - b) per window.
// The two share only clock and reset; each has its own ports, prefixed s_ and h_.
module vision_top #(
  parameter int unsigned MAX_WIDTH  = 1024,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned NUM_REF    = 4,
  parameter int unsigned PLS_K      = 8,
  parameter int unsigned PLS_REF    = 16,
  parameter int unsigned MAX_CNH    = 128,
  localparam int unsigned CW  = $clog2(MAX_WIDTH),
  localparam int unsigned RAW = $clog2(NUM_REF*105),
  localparam int unsigned RW  = (NUM_REF > 1) ? $clog2(NUM_REF) : 1,
  localparam int unsigned PKW = (PLS_K > 1) ? $clog2(PLS_K) : 1,
  localparam int unsigned PRW = (PLS_REF > 1) ? $clog2(PLS_REF) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // ---- simplified-SURF + NNS coprocessor ----
  input  logic                  s_frame_start,
  input  logic [CW:0]           s_img_width,
  input  logic [15:0]           s_img_height,
  input  logic                  s_pix_valid,
  output logic                  s_pix_ready,
  input  logic [7:0]            s_pix,
  input  logic                  s_ref_we,
  input  logic [1:0]            s_ref_bank,
  input  logic [RAW-1:0]        s_ref_addr,
  input  logic [31:0]           s_ref_wdata,
  output logic                  s_res_valid,
  output logic [6:0]            s_res_wx,
  output logic [9:0]            s_res_wy,
  output logic [15:0]           s_res_widx,
  output logic [RW-1:0]         s_res_winner,
  output logic [31:0]           s_res_dist,
  output logic                  s_cell_valid,
  output logic                  s_fifo_full_stall,
  output logic                  s_bypass_hit,
  input  logic                  s_pls_w_we,
  input  logic [1:0]            s_pls_w_bank,
  input  logic [PKW-1:0]        s_pls_w_k,
  input  logic [6:0]            s_pls_w_addr,
  input  logic [63:0]           s_pls_w_wdata,
  input  logic                  s_pls_r_we,
  input  logic [PRW-1:0]        s_pls_r_addr,
  input  logic [PLS_K*16-1:0]   s_pls_r_wdata,
  output logic                  s_pls_res_valid,
  output logic [6:0]            s_pls_res_wx,
  output logic [9:0]            s_pls_res_wy,
  output logic [15:0]           s_pls_res_widx,
  output logic [PLS_K*16-1:0]   s_pls_res_d,
  output logic [PRW-1:0]        s_pls_res_winner,
  output logic [39:0]           s_pls_res_dist,
  // ---- L1-norm + SVM detector ----
  input  logic                  h_frame_start,
  input  logic [10:0]           h_img_width,
  input  logic [15:0]           h_img_height,
  input  logic [2:0]            h_cs_log2,
  output logic                  h_cfg_err,
  input  logic                  h_cell_valid,
  output logic                  h_cell_ready,
  input  logic [9*16-1:0]       h_cell_fv,
  input  logic                  h_w_we,
  input  logic [3:0]            h_w_sel,
  input  logic [6:0]            h_w_addr,
  input  logic [63:0]           h_w_wdata,
  input  logic signed [47:0]    h_bias,
  output logic                  h_det_valid,
  output logic [6:0]            h_det_wx,
  output logic [9:0]            h_det_wy,
  output logic [15:0]           h_det_widx,
  output logic signed [47:0]    h_det_score,
  output logic signed [1:0]     h_det_sign,
  output logic                  h_blk_valid,
  output logic                  h_blk_stall
);
  surf_nns_coprocessor #(.MAX_WIDTH(MAX_WIDTH), .FIFO_DEPTH(FIFO_DEPTH), .NUM_REF(NUM_REF),
                         .PLS_K(PLS_K), .PLS_REF(PLS_REF)) u_surf (
    .clk, .rst_n, .frame_start(s_frame_start), .img_width(s_img_width), .img_height(s_img_height),
    .pix_valid(s_pix_valid), .pix_ready(s_pix_ready), .pix(s_pix),
    .ref_we(s_ref_we), .ref_bank(s_ref_bank), .ref_addr(s_ref_addr), .ref_wdata(s_ref_wdata),
    .res_valid(s_res_valid), .res_wx(s_res_wx), .res_wy(s_res_wy), .res_widx(s_res_widx),
    .res_winner(s_res_winner), .res_dist(s_res_dist), .cell_valid(s_cell_valid),
    .fifo_full_stall(s_fifo_full_stall), .bypass_hit(s_bypass_hit),
    .pls_w_we(s_pls_w_we), .pls_w_bank(s_pls_w_bank), .pls_w_k(s_pls_w_k), .pls_w_addr(s_pls_w_addr),
    .pls_w_wdata(s_pls_w_wdata), .pls_r_we(s_pls_r_we), .pls_r_addr(s_pls_r_addr),
    .pls_r_wdata(s_pls_r_wdata), .pls_res_valid(s_pls_res_valid), .pls_res_wx(s_pls_res_wx),
    .pls_res_wy(s_pls_res_wy), .pls_res_widx(s_pls_res_widx), .pls_res_d(s_pls_res_d),
    .pls_res_winner(s_pls_res_winner), .pls_res_dist(s_pls_res_dist));

  hog_l1_svm_detector #(.MAX_CNH(MAX_CNH)) u_hog (
    .clk, .rst_n, .frame_start(h_frame_start), .img_width(h_img_width), .img_height(h_img_height),
    .cs_log2(h_cs_log2), .cfg_err(h_cfg_err), .cell_valid(h_cell_valid), .cell_ready(h_cell_ready),
    .cell_fv(h_cell_fv), .w_we(h_w_we), .w_sel(h_w_sel), .w_addr(h_w_addr), .w_wdata(h_w_wdata),
    .bias(h_bias), .det_valid(h_det_valid), .det_wx(h_det_wx), .det_wy(h_det_wy),
    .det_widx(h_det_widx), .det_score(h_det_score), .det_sign(h_det_sign),
    .blk_valid(h_blk_valid), .blk_stall(h_blk_stall));
endmodule
