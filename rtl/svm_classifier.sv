// svm_classifier: linear SVM over the normalized block feature vectors of all overlapping
// scan windows, evaluated while the windows are being built.
//
// The BBNC delivers each 2x2-cell block as four normalized cells (pos 0..3). They are
// regrouped by four cell FIFOs, one per position, so a whole block (4 cells x NCOMP
// components) is handled at once. The window search (psw_window_addr_gen in block units:
// windows of WIN_W x WIN_H blocks, 7 x 15 for a 64x128-pixel window of 8x8 cells, stepping by
// two blocks) lists every window that contains the block and the block's index inside it.
// The trained weight vector w (NCOMP*4*WIN_W*WIN_H = 3780 components) is held in NCOMP weight
// SRAMs, SRAM i holding component i; one word holds the four cells' weights of one block, so
// all 4 x NCOMP products of a block are formed in parallel (NCOMP multipliers per cell FIFO)
// and summed by an adder tree. Per window the partial dot product is kept in the window
// accumulator memory (NMAX windows per row, WIN_H/2+1 rows live; rows are reused) with the
// same two-stage read/add/write pipeline and same-address bypass as the NNS engine. After
// the window's last block, f = w.x - b is formed and sgn(f) (Eq. 5.4/5.5) is the decision:
// +1 object, -1 background, 0 on the hyperplane.
// Weights are written through w_we/w_sel/w_addr (word = {cell0, cell1, cell2, cell3}
// weights, cell0 in the top bits); the bias is a static input.
module svm_classifier #(
  parameter int unsigned NCOMP  = 9,
  parameter int unsigned FW     = 14,   // normalized feature width (from bbnc_l1norm)
  parameter int unsigned WW     = 16,   // weight width
  parameter int unsigned ACC_W  = 48,
  parameter int unsigned WIN_W  = 7,    // blocks per window row
  parameter int unsigned WIN_H  = 15,   // blocks per window column
  parameter int unsigned NMAX   = 64,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned BPW  = WIN_W*WIN_H,
  localparam int unsigned WAW  = $clog2(BPW),
  localparam int unsigned VROW = 1 << $clog2(WIN_H/2 + 1),
  localparam int unsigned SAW  = $clog2(VROW) + $clog2(NMAX),
  localparam int unsigned CELLW = NCOMP*FW
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [7:0]                        bnh,       // blocks per image row
  input  logic [15:0]                       bnv,       // blocks per image column
  // normalized cells from the BBNC
  input  logic                              in_valid,
  output logic                              in_ready,
  input  logic signed [NCOMP-1:0][FW-1:0]   in_fv,
  input  logic [1:0]                        in_pos,
  input  logic [7:0]                        in_bx,
  input  logic [15:0]                       in_by,
  // weights and bias
  input  logic                              w_we,
  input  logic [3:0]                        w_sel,
  input  logic [WAW-1:0]                    w_addr,
  input  logic [4*WW-1:0]                   w_wdata,
  input  logic signed [ACC_W-1:0]           bias,
  // decisions
  output logic                              det_valid,
  output logic [6:0]                        det_wx,
  output logic [9:0]                        det_wy,
  output logic [15:0]                       det_widx,
  output logic signed [ACC_W-1:0]           det_score,
  output logic signed [1:0]                 det_sign,
  output logic                              bypass_hit
);
  import vision_pkg::*;

  // ---------------- four cell FIFOs ----------------
  logic [3:0] f_in_ready, f_valid;
  logic [CELLW+24-1:0] f_data [4];
  logic blk_valid, blk_ready;
  for (genvar p = 0; p < 4; p++) begin : g_fifo
    logic [$clog2(FIFO_DEPTH):0] cnt;
    sync_fifo #(.WIDTH(CELLW+24), .DEPTH(FIFO_DEPTH)) u_f (
      .clk, .rst_n, .in_valid(in_valid && in_pos == 2'(p)), .in_ready(f_in_ready[p]),
      .in_data({in_fv, in_bx, in_by}), .out_valid(f_valid[p]), .out_ready(blk_ready && blk_valid),
      .out_data(f_data[p]), .count(cnt));
  end
  assign in_ready  = f_in_ready[in_pos];
  assign blk_valid = &f_valid;

  logic [4*CELLW-1:0] blk_payload;
  assign blk_payload = {f_data[0][CELLW+23:24], f_data[1][CELLW+23:24],
                        f_data[2][CELLW+23:24], f_data[3][CELLW+23:24]};

  // ---------------- window search over blocks ----------------
  osw_t o_osw;
  logic o_valid, o_ready, o_last, dropped;
  logic [4*CELLW-1:0] o_payload;
  psw_window_addr_gen #(.WIN_W(WIN_W), .WIN_H(WIN_H), .PW(4*CELLW), .CELL_RRRT(1'b0)) u_wbs (
    .clk, .rst_n, .units_w(bnh), .units_h(bnv),
    .in_valid(blk_valid), .in_ready(blk_ready), .in_x(f_data[0][23:16]), .in_y(f_data[0][15:0]),
    .in_payload(blk_payload),
    .out_valid(o_valid), .out_ready(o_ready), .out_osw(o_osw), .out_payload(o_payload),
    .out_unit_last(o_last), .dropped);
  assign o_ready = 1'b1;

  // ---------------- stage A: weight and accumulator reads ----------------
  logic [WAW-1:0] a_waddr;
  logic [SAW-1:0] a_slot;
  assign a_waddr = WAW'(32'(o_osw.ly) * WIN_W + 32'(o_osw.lx));
  assign a_slot  = {o_osw.wy[$clog2(VROW)-1:0], o_osw.wx[$clog2(NMAX)-1:0]};

  logic [4*WW-1:0] w_rd [NCOMP];
  for (genvar i = 0; i < NCOMP; i++) begin : g_wsram
    dp_ram #(.WIDTH(4*WW), .DEPTH(BPW)) u_w (
      .clk, .we(w_we && w_sel == 4'(i)), .waddr(w_addr), .wdata(w_wdata),
      .rd_en(o_valid), .raddr(a_waddr), .rdata(w_rd[i]));
  end

  logic             b_we;
  logic [SAW-1:0]   b_slot;
  logic signed [ACC_W-1:0] b_new, acc_rd;
  dp_ram #(.WIDTH(ACC_W), .DEPTH(1 << SAW)) u_acc (
    .clk, .we(b_we), .waddr(b_slot), .wdata(b_new),
    .rd_en(o_valid), .raddr(a_slot), .rdata(acc_rd));

  // ---------------- stage B: 4 x NCOMP products, accumulate ----------------
  logic b_valid, b_first, b_last, b_fwd;
  logic signed [ACC_W-1:0] b_fwd_data;
  logic [4*CELLW-1:0] b_payload;
  logic [6:0]  b_wx;
  logic [9:0]  b_wy;
  logic [15:0] b_widx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid <= 1'b0; b_first <= 1'b0; b_last <= 1'b0; b_fwd <= 1'b0; b_fwd_data <= '0;
      b_payload <= '0; b_slot <= '0; b_wx <= '0; b_wy <= '0; b_widx <= '0;
    end else begin
      b_valid <= o_valid;
      if (o_valid) begin
        b_first <= o_osw.first; b_last <= o_osw.last;
        b_payload <= o_payload; b_slot <= a_slot;
        b_wx <= o_osw.wx; b_wy <= o_osw.wy; b_widx <= o_osw.widx;
        b_fwd <= b_we && (b_slot == a_slot);
        b_fwd_data <= b_new;
      end
    end
  end

  logic signed [ACC_W-1:0] dot;
  always_comb begin
    dot = '0;
    for (int p = 0; p < 4; p++)
      for (int i = 0; i < NCOMP; i++) begin
        logic signed [FW-1:0] x;
        logic signed [WW-1:0] w;
        x = b_payload[(3-p)*CELLW + i*FW +: FW];
        w = w_rd[i][(3-p)*WW +: WW];
        dot = dot + ACC_W'(x * w);
      end
    b_we  = b_valid;
    b_new = (b_first ? '0 : (b_fwd ? b_fwd_data : acc_rd)) + dot;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det_valid <= 1'b0; det_wx <= '0; det_wy <= '0; det_widx <= '0; det_score <= '0;
      det_sign <= '0; bypass_hit <= 1'b0;
    end else begin
      det_valid  <= b_valid && b_last;
      bypass_hit <= b_valid && b_fwd && !b_first;
      if (b_valid && b_last) begin
        det_wx    <= b_wx;
        det_wy    <= b_wy;
        det_widx  <= b_widx;
        det_score <= b_new - bias;
        det_sign  <= (b_new > bias) ? 2'sd1 : (b_new == bias) ? 2'sd0 : -2'sd1;
      end
    end
  end
endmodule
