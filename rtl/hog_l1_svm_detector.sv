// hog_l1_svm_detector: normalized-feature object detector: block-based L1 normalization of
// cell feature vectors followed by a linear SVM over all overlapping scan windows.
//
// The cell feature vectors come from an external cell-based descriptor (9-bin HOG cells of
// 16-bit bins in the document's configuration), in raster order with a valid/ready handshake.
// param_init turns the image size and the programmable cell size (2..32 pixels) into cell
// and block counts, bbnc_l1norm normalizes every 2x2-cell block (m = 12 fraction bits), and
// svm_classifier accumulates w.x for every 64x128-pixel window (7 x 15 blocks of 8x8-pixel
// cells) containing the block and emits sgn(w.x - b) when the window is complete. The window
// size in cells is fixed by the SVM parameters; with other cell sizes the same 7 x 15 blocks
// cover a proportionally larger or smaller image area (one pyramid level per cell size).
// frame_start clears the position counters; configuration inputs must be stable during a frame.
module hog_l1_svm_detector #(
  parameter int unsigned NCOMP   = 9,
  parameter int unsigned IN_W    = 16,
  parameter int unsigned M_SHIFT = 12,
  parameter int unsigned MAX_CNH = 128,
  parameter int unsigned WW      = 16,
  parameter int unsigned ACC_W   = 48,
  localparam int unsigned FW = M_SHIFT + 2
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              frame_start,
  input  logic [10:0]                       img_width,
  input  logic [15:0]                       img_height,
  input  logic [2:0]                        cs_log2,
  output logic                              cfg_err,
  input  logic                              cell_valid,
  output logic                              cell_ready,
  input  logic signed [NCOMP-1:0][IN_W-1:0] cell_fv,
  input  logic                              w_we,
  input  logic [3:0]                        w_sel,
  input  logic [6:0]                        w_addr,
  input  logic [4*WW-1:0]                   w_wdata,
  input  logic signed [ACC_W-1:0]           bias,
  output logic                              det_valid,
  output logic [6:0]                        det_wx,
  output logic [9:0]                        det_wy,
  output logic [15:0]                       det_widx,
  output logic signed [ACC_W-1:0]           det_score,
  output logic signed [1:0]                 det_sign,
  output logic                              blk_valid,   // a normalized cell left the BBNC (status)
  output logic                              blk_stall    // BBNC output waiting for the SVM (status)
);
  logic [7:0]  cnh, bnh;
  logic [15:0] cnv, bnv;
  param_init #(.MAX_CNH(MAX_CNH)) u_pic (
    .clk, .rst_n, .img_width, .img_height, .cs_log2, .cnh, .cnv, .bnh, .bnv, .cfg_err);

  logic                            n_ready, bypass_hit;
  logic signed [NCOMP-1:0][FW-1:0] n_fv;
  logic [1:0]  n_pos;
  logic [7:0]  n_bx;
  logic [15:0] n_by;
  bbnc_l1norm #(.NCOMP(NCOMP), .IN_W(IN_W), .M_SHIFT(M_SHIFT), .MAX_CNH(MAX_CNH)) u_bbnc (
    .clk, .rst_n, .frame_start, .cnh, .cnv, .in_valid(cell_valid), .in_ready(cell_ready),
    .in_fv(cell_fv), .out_valid(blk_valid), .out_ready(n_ready), .out_fv(n_fv),
    .out_pos(n_pos), .out_bx(n_bx), .out_by(n_by));

  assign blk_stall = blk_valid && !n_ready;

  svm_classifier #(.NCOMP(NCOMP), .FW(FW), .WW(WW), .ACC_W(ACC_W)) u_svm (
    .clk, .rst_n, .bnh, .bnv, .in_valid(blk_valid), .in_ready(n_ready), .in_fv(n_fv),
    .in_pos(n_pos), .in_bx(n_bx), .in_by(n_by), .w_we, .w_sel, .w_addr, .w_wdata, .bias,
    .det_valid, .det_wx, .det_wy, .det_widx, .det_score, .det_sign, .bypass_hit);
endmodule
