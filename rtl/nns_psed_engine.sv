// nns_psed_engine: cell-based nearest-neighbour search over the overlapping scan windows.
//
// Every OSW record from the window address generator carries the current cell's 4-D Haar
// vector and the cell's position (lx, ly) inside that window. Inside a window the 2x2-cell
// blocks step by one cell, so the cell appears in up to four blocks (its RRRT), once in each
// of the four positions of a block (top-left, top-right, bottom-left, bottom-right). The
// reference vectors are therefore stored in four banks, one per position in the block, each
// word holding the four 8-bit components of one cell slot of one block; the up to four slots
// the cell occupies are read in the same cycle and up to 16 squared differences are formed in
// parallel, the partial squared Euclidean distance (PSED) of this cell to one reference.
//
// The engine handles one (OSW, reference) pair per cycle in a two-stage pipeline:
//   A: read the PSED store at {reference, window slot} and the four reference banks;
//   B: add the cell's contribution (the first cell of a window starts from 0) and write back.
// The PSED store keeps one word per reference for every window of VMAX window rows of NMAX
// windows (window slot = {wy mod VMAX, wx}); a row of windows is overwritten by a later row.
// A read that hits the word written in the same cycle takes the written value (bypass).
// When the last cell of a window is added, the final SED is latched (buffer 2) and compared
// with the running minimum (buffer 3); after the last reference the minimum and the winning
// reference leave on res_valid. The cell vector is compared after an arithmetic right shift
// by IN_SHIFT so that its range matches the 8-bit reference components.
module nns_psed_engine #(
  parameter int unsigned NUM_REF  = 4,
  parameter int unsigned WIN_W    = 8,
  parameter int unsigned WIN_H    = 16,
  parameter int unsigned REF_W    = 8,
  parameter int unsigned IN_SHIFT = 6,
  parameter int unsigned NMAX     = 64,
  parameter int unsigned SED_W    = 32,
  localparam int unsigned BPW   = (WIN_W-1)*(WIN_H-1),       // blocks per window
  localparam int unsigned RDEP  = NUM_REF*BPW,               // words per reference bank
  localparam int unsigned RAW   = $clog2(RDEP),
  localparam int unsigned VMAX  = WIN_H/2,
  localparam int unsigned RW    = (NUM_REF > 1) ? $clog2(NUM_REF) : 1,
  localparam int unsigned SLOTW = $clog2(VMAX) + $clog2(NMAX),
  localparam int unsigned PAW   = $clog2(NUM_REF) + SLOTW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // OSW stream
  input  logic                  in_valid,
  output logic                  in_ready,
  input  vision_pkg::osw_t      in_osw,
  input  vision_pkg::haar_fv_t  in_fv,
  // reference load port: bank = position of the cell slot in its block
  input  logic                  ref_we,
  input  logic [1:0]            ref_bank,
  input  logic [RAW-1:0]        ref_addr,    // reference*BPW + block index in the window
  input  logic [4*REF_W-1:0]    ref_wdata,   // {sdx, sdy, adx, ady} components, signed
  // classification of a finished window
  output logic                  res_valid,
  output logic [6:0]            res_wx,
  output logic [9:0]            res_wy,
  output logic [15:0]           res_widx,
  output logic [RW-1:0]         res_winner,
  output logic [SED_W-1:0]      res_dist,
  output logic                  bypass_hit   // pulse: PSED read took the just-written value
);
  import vision_pkg::*;

  // ---------------- stage A ----------------
  logic [RW-1:0] rsel;                 // reference being processed for the current OSW
  logic          a_fire;
  logic [3:0]    a_vmask;
  logic [RAW-1:0] a_raddr [4];
  logic [PAW-1:0] a_paddr;
  logic [6:0]    blk_x [4];
  logic [4:0]    blk_y [4];

  assign a_fire   = in_valid;
  assign in_ready = (rsel == RW'(NUM_REF-1));

  always_comb begin
    // block containing the cell at each position p: p=0 TL, 1 TR, 2 BL, 3 BR
    for (int p = 0; p < 4; p++) begin
      blk_x[p] = 7'(in_osw.lx) - 7'(p % 2);
      blk_y[p] = in_osw.ly - 5'(p / 2);
    end
    a_vmask[0] = (in_osw.lx < 5'(WIN_W-1)) && (in_osw.ly < 5'(WIN_H-1));
    a_vmask[1] = (in_osw.lx > 0)           && (in_osw.ly < 5'(WIN_H-1));
    a_vmask[2] = (in_osw.lx < 5'(WIN_W-1)) && (in_osw.ly > 0);
    a_vmask[3] = (in_osw.lx > 0)           && (in_osw.ly > 0);
    for (int p = 0; p < 4; p++)
      a_raddr[p] = RAW'(32'(rsel) * BPW + 32'(blk_y[p]) * (WIN_W-1) + 32'(blk_x[p]));
    a_paddr = {rsel, in_osw.wy[$clog2(VMAX)-1:0], in_osw.wx[$clog2(NMAX)-1:0]};
  end

  // the RRRT supplied with the OSW equals the number of blocks found here
  assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (3'($countones(a_vmask)) == in_osw.rrrt));

  // reference banks
  logic [4*REF_W-1:0] ref_rd [4];
  for (genvar p = 0; p < 4; p++) begin : g_bank
    dp_ram #(.WIDTH(4*REF_W), .DEPTH(RDEP)) u_ref (
      .clk, .we(ref_we && ref_bank == 2'(p)), .waddr(ref_addr), .wdata(ref_wdata),
      .rd_en(a_fire), .raddr(a_raddr[p]), .rdata(ref_rd[p]));
  end

  // PSED store
  logic             b_we;
  logic [PAW-1:0]   b_paddr;
  logic [SED_W-1:0] b_new, psed_rd;
  dp_ram #(.WIDTH(SED_W), .DEPTH(1 << PAW)) u_psed (
    .clk, .we(b_we), .waddr(b_paddr), .wdata(b_new),
    .rd_en(a_fire), .raddr(a_paddr), .rdata(psed_rd));

  // ---------------- stage B registers ----------------
  logic             b_valid, b_first, b_last, b_fwd;
  logic [3:0]       b_vmask;
  logic [RW-1:0]    b_ref;
  haar_fv_t         b_fv;
  logic [SED_W-1:0] b_fwd_data;
  logic [6:0]       b_wx;
  logic [9:0]       b_wy;
  logic [15:0]      b_widx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsel <= '0; b_valid <= 1'b0; b_first <= 1'b0; b_last <= 1'b0; b_fwd <= 1'b0;
      b_vmask <= '0; b_ref <= '0; b_fv <= '0; b_fwd_data <= '0; b_paddr <= '0;
      b_wx <= '0; b_wy <= '0; b_widx <= '0;
    end else begin
      b_valid <= a_fire;
      if (a_fire) begin
        rsel      <= (rsel == RW'(NUM_REF-1)) ? '0 : rsel + 1'b1;
        b_first   <= in_osw.first;
        b_last    <= in_osw.last;
        b_vmask   <= a_vmask;
        b_ref     <= rsel;
        b_fv      <= in_fv;
        b_paddr   <= a_paddr;
        b_wx      <= in_osw.wx;
        b_wy      <= in_osw.wy;
        b_widx    <= in_osw.widx;
        b_fwd     <= b_we && (b_paddr == a_paddr);
        b_fwd_data <= b_new;
      end
    end
  end

  // ---------------- stage B datapath ----------------
  logic signed [HFV_W-1:0] comp [4];
  logic [SED_W-1:0] contrib;
  always_comb begin
    comp[0] = b_fv.sdx >>> IN_SHIFT;
    comp[1] = b_fv.sdy >>> IN_SHIFT;
    comp[2] = b_fv.adx >>> IN_SHIFT;
    comp[3] = b_fv.ady >>> IN_SHIFT;
    contrib = '0;
    for (int p = 0; p < 4; p++) begin
      for (int d = 0; d < 4; d++) begin
        logic signed [REF_W-1:0] r;
        logic signed [HFV_W:0]   diff;
        logic signed [2*HFV_W+1:0] sq;
        r    = ref_rd[p][(3-d)*REF_W +: REF_W];
        diff = (HFV_W+1)'(comp[d]) - (HFV_W+1)'(r);
        sq   = (2*HFV_W+2)'(diff) * (2*HFV_W+2)'(diff);
        if (b_vmask[p]) contrib = contrib + SED_W'($unsigned(sq));
      end
    end
    b_we  = b_valid;
    b_new = (b_first ? '0 : (b_fwd ? b_fwd_data : psed_rd)) + contrib;
  end

  // ---------------- minimum search (buffer 2 / buffer 3) ----------------
  logic [SED_W-1:0] buf2, buf3;
  logic [RW-1:0]    best;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf2 <= '0; buf3 <= '0; best <= '0; res_valid <= 1'b0; res_wx <= '0; res_wy <= '0;
      res_widx <= '0; res_winner <= '0; res_dist <= '0; bypass_hit <= 1'b0;
    end else begin
      res_valid  <= 1'b0;
      bypass_hit <= b_valid && b_fwd && !b_first;
      if (b_valid && b_last) begin
        buf2 <= b_new;
        if (b_ref == '0 || b_new < buf3) begin
          buf3 <= b_new; best <= b_ref;
        end
        if (b_ref == RW'(NUM_REF-1)) begin
          res_valid  <= 1'b1;
          res_wx     <= b_wx;
          res_wy     <= b_wy;
          res_widx   <= b_widx;
          res_winner <= (b_ref == '0 || b_new < buf3) ? b_ref : best;
          res_dist   <= (b_ref == '0 || b_new < buf3) ? b_new : buf3;
        end
      end
    end
  end
endmodule
