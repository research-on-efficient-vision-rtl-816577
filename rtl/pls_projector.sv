// pls_projector: PLS dimensionality reduction of the simplified-SURF window vectors, followed
// by a nearest-neighbour search on the reduced vectors.
//
// Each 64x128-pixel scan window has a 1680-D Haar feature vector (105 blocks x 4 cells x
// 4 components). Instead of building it, every cell is projected, as it arrives, onto the
// matching pieces of K pre-stored projection vectors w_1..w_K (K = 8), and the products are
// added into the window's K partial results d_1..d_K (Eq. 4.6: Y = X P). The input is the OSW
// stream of psw_window_addr_gen: one record per (cell, window that contains it), with the
// cell's position inside the window and its reusing time (1, 2 or 4 blocks). The cell is
// used in up to four blocks of the window, as the top-left, top-right, bottom-left or
// bottom-right cell; the weight memory is split by that position into four banks, each word
// holding the 4-D sub-components of one block for one projection vector. All (up to 4
// positions) x 4 components x K products of one OSW are formed in parallel (one OSW per
// cycle). The K partial results of each live window sit in the accumulator memory, addressed
// by the window's column (mod NMAX) and row (mod WIN_H/2), read in stage A and written back
// in stage B, with forwarding when the same window is updated in consecutive cycles.
// After a window's last cell, d_i >>> D_SHIFT, saturated to 16 bits, is queued and a
// sequential nearest-neighbour search compares it with NUM_REF reduced reference vectors, one
// per cycle (squared Euclidean distance; the first reference with the smallest distance wins).
//
// Interface: OSW + cell vector in with valid/ready; projection weights written through
// w_we/w_bank (cell position)/w_k (projection vector)/w_addr (block index in the window,
// by*7+bx)/w_wdata ({sdx, sdy, adx, ady} weights, 16-bit signed, sdx in the top bits);
// references through r_we/r_addr/r_wdata (K x 16 bits, d_1 in the top bits).
// Results: res_valid with window position and index, the reduced vector res_d, winner and
// distance, NUM_REF+2 cycles after the window's last OSW if the search is idle.
// The document gives the projection scheme, K = 8 for the 1680-D vector, parallel processing
// of the sub-components of one cell and the per-window storage of the partial results; the
// word widths, D_SHIFT, the number of reduced references and the sequential search are this
// design's own choices.
module pls_projector #(
  parameter int unsigned K        = 8,
  parameter int unsigned WW       = 16,   // projection weight width
  parameter int unsigned ACC_W    = 48,
  parameter int unsigned D_SHIFT  = 16,   // scaling of d_i before the search
  parameter int unsigned NUM_REF  = 16,
  parameter int unsigned WIN_W    = 8,
  parameter int unsigned WIN_H    = 16,
  parameter int unsigned NMAX     = 64,
  parameter int unsigned QDEPTH   = 4,
  localparam int unsigned BPW   = (WIN_W-1)*(WIN_H-1),
  localparam int unsigned BAW   = $clog2(BPW),
  localparam int unsigned KW    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned RW    = (NUM_REF > 1) ? $clog2(NUM_REF) : 1,
  localparam int unsigned SAW   = $clog2(WIN_H/2) + $clog2(NMAX),
  localparam int unsigned DIST_W = 40
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  vision_pkg::osw_t          in_osw,
  input  vision_pkg::haar_fv_t      in_fv,
  input  logic                      w_we,
  input  logic [1:0]                w_bank,
  input  logic [KW-1:0]             w_k,
  input  logic [BAW-1:0]            w_addr,
  input  logic [4*WW-1:0]           w_wdata,
  input  logic                      r_we,
  input  logic [RW-1:0]             r_addr,
  input  logic [K*16-1:0]           r_wdata,
  output logic                      res_valid,
  output logic [6:0]                res_wx,
  output logic [9:0]                res_wy,
  output logic [15:0]               res_widx,
  output logic [K*16-1:0]           res_d,
  output logic [RW-1:0]             res_winner,
  output logic [DIST_W-1:0]         res_dist
);
  import vision_pkg::*;

  // ---------------- stage A: weight and accumulator reads ----------------
  logic           q_in_ready;
  logic           a_fire;
  logic [3:0]     a_vmask;
  logic [BAW-1:0] a_baddr [4];
  logic [SAW-1:0] a_slot;
  assign in_ready = q_in_ready;
  assign a_fire   = in_valid && in_ready;

  always_comb begin
    for (int p = 0; p < 4; p++)
      a_baddr[p] = BAW'(32'(in_osw.ly - 5'(p / 2)) * (WIN_W-1) + 32'(in_osw.lx - 5'(p % 2)));
    a_vmask[0] = (in_osw.lx < 5'(WIN_W-1)) && (in_osw.ly < 5'(WIN_H-1));
    a_vmask[1] = (in_osw.lx > 0)           && (in_osw.ly < 5'(WIN_H-1));
    a_vmask[2] = (in_osw.lx < 5'(WIN_W-1)) && (in_osw.ly > 0);
    a_vmask[3] = (in_osw.lx > 0)           && (in_osw.ly > 0);
    a_slot = {in_osw.wy[$clog2(WIN_H/2)-1:0], in_osw.wx[$clog2(NMAX)-1:0]};
  end

  logic [4*WW-1:0] w_rd [4][K];
  for (genvar p = 0; p < 4; p++) begin : g_pos
    for (genvar k = 0; k < K; k++) begin : g_k
      dp_ram #(.WIDTH(4*WW), .DEPTH(BPW)) u_w (
        .clk, .we(w_we && w_bank == 2'(p) && w_k == KW'(k)), .waddr(w_addr), .wdata(w_wdata),
        .rd_en(a_fire), .raddr(a_baddr[p]), .rdata(w_rd[p][k]));
    end
  end

  logic             b_we;
  logic [SAW-1:0]   b_slot;
  logic [K*ACC_W-1:0] b_new, acc_rd;
  dp_ram #(.WIDTH(K*ACC_W), .DEPTH(1 << SAW)) u_acc (
    .clk, .we(b_we), .waddr(b_slot), .wdata(b_new),
    .rd_en(a_fire), .raddr(a_slot), .rdata(acc_rd));

  // ---------------- stage B: K x 4 x 4 products ----------------
  logic             b_valid, b_first, b_last, b_fwd;
  logic [3:0]       b_vmask;
  haar_fv_t         b_fv;
  logic [K*ACC_W-1:0] b_fwd_data;
  logic [6:0]       b_wx;
  logic [9:0]       b_wy;
  logic [15:0]      b_widx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid <= 1'b0; b_first <= 1'b0; b_last <= 1'b0; b_fwd <= 1'b0; b_vmask <= '0;
      b_fv <= '0; b_fwd_data <= '0; b_slot <= '0; b_wx <= '0; b_wy <= '0; b_widx <= '0;
    end else begin
      b_valid <= a_fire;
      if (a_fire) begin
        b_first <= in_osw.first; b_last <= in_osw.last; b_vmask <= a_vmask; b_fv <= in_fv;
        b_slot <= a_slot; b_wx <= in_osw.wx; b_wy <= in_osw.wy; b_widx <= in_osw.widx;
        b_fwd <= b_we && (b_slot == a_slot);
        b_fwd_data <= b_new;
      end
    end
  end

  logic signed [WW-1:0] comp [4];
  always_comb begin
    comp[0] = b_fv.sdx; comp[1] = b_fv.sdy; comp[2] = b_fv.adx; comp[3] = b_fv.ady;
    b_we = b_valid;
    for (int k = 0; k < K; k++) begin
      logic signed [ACC_W-1:0] sum, base;
      sum = '0;
      for (int p = 0; p < 4; p++)
        for (int d = 0; d < 4; d++) begin
          logic signed [WW-1:0] w;
          w = w_rd[p][k][(3-d)*WW +: WW];
          if (b_vmask[p]) sum = sum + ACC_W'(comp[d]) * ACC_W'(w);
        end
      base = b_first ? '0 : (b_fwd ? b_fwd_data[k*ACC_W +: ACC_W] : acc_rd[k*ACC_W +: ACC_W]);
      b_new[k*ACC_W +: ACC_W] = base + sum;
    end
  end

  // scaled, saturated reduced vector of a finished window
  logic [K*16-1:0] b_dvec;
  always_comb begin
    for (int k = 0; k < K; k++) begin
      logic signed [ACC_W-1:0] s;
      s = $signed(b_new[k*ACC_W +: ACC_W]) >>> D_SHIFT;
      if (s > ACC_W'(32767)) b_dvec[(K-1-k)*16 +: 16] = 16'sh7fff;
      else if (s < -ACC_W'(32768)) b_dvec[(K-1-k)*16 +: 16] = 16'sh8000;
      else b_dvec[(K-1-k)*16 +: 16] = s[15:0];
    end
  end

  // ---------------- queue of finished windows ----------------
  localparam int unsigned QW = K*16 + 7 + 10 + 16;
  logic          q_valid, q_ready;
  logic [QW-1:0] q_data;
  logic [$clog2(QDEPTH):0] q_count;
  sync_fifo #(.WIDTH(QW), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n, .in_valid(b_valid && b_last), .in_ready(),
    .in_data({b_dvec, b_wx, b_wy, b_widx}),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_data), .count(q_count));
  // one entry may still be in stage B: keep room for it
  assign q_in_ready = (q_count < ($clog2(QDEPTH)+1)'(QDEPTH - 1)) ||
                      ((q_count == ($clog2(QDEPTH)+1)'(QDEPTH - 1)) && !(b_valid && b_last));

  // ---------------- sequential nearest-neighbour search ----------------
  logic [K*16-1:0] ref_rd;
  logic            s_busy, s_chk;
  logic [RW-1:0]   s_ref, s_chk_ref;
  logic [QW-1:0]   s_cur;
  dp_ram #(.WIDTH(K*16), .DEPTH(NUM_REF)) u_ref (
    .clk, .we(r_we), .waddr(r_addr), .wdata(r_wdata),
    .rd_en(s_busy), .raddr(s_ref), .rdata(ref_rd));

  logic [DIST_W-1:0] cdist, best_d;
  logic [RW-1:0]     best_r;
  always_comb begin
    cdist = '0;
    for (int k = 0; k < K; k++) begin
      logic signed [16:0] df;
      logic [33:0] sq;
      df = 17'($signed(s_cur[QW-1-16*k -: 16])) - 17'($signed(ref_rd[(K-1-k)*16 +: 16]));
      sq = 34'($unsigned(34'(df) * 34'(df)));
      cdist = cdist + DIST_W'(sq);
    end
  end

  assign q_ready = !s_busy;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_busy <= 1'b0; s_chk <= 1'b0; s_ref <= '0; s_chk_ref <= '0; s_cur <= '0;
      best_d <= '0; best_r <= '0; res_valid <= 1'b0; res_wx <= '0; res_wy <= '0;
      res_widx <= '0; res_d <= '0; res_winner <= '0; res_dist <= '0;
    end else begin
      res_valid <= 1'b0;
      // issue reference reads
      if (!s_busy && q_valid) begin
        s_busy <= 1'b1; s_cur <= q_data; s_ref <= '0;
      end else if (s_busy) begin
        if (s_ref == RW'(NUM_REF-1)) s_busy <= 1'b0;
        else s_ref <= s_ref + 1'b1;
      end
      // compare the reference read in the previous cycle
      s_chk     <= s_busy;
      s_chk_ref <= s_ref;
      if (s_chk) begin
        if (s_chk_ref == '0 || cdist < best_d) begin best_d <= cdist; best_r <= s_chk_ref; end
        if (s_chk_ref == RW'(NUM_REF-1)) begin
          res_valid  <= 1'b1;
          res_d      <= s_cur[QW-1 -: K*16];
          res_wx     <= s_cur[32:26];
          res_wy     <= s_cur[25:16];
          res_widx   <= s_cur[15:0];
          res_winner <= (s_chk_ref == '0 || cdist < best_d) ? s_chk_ref : best_r;
          res_dist   <= (s_chk_ref == '0 || cdist < best_d) ? cdist : best_d;
        end
      end
    end
  end
endmodule
