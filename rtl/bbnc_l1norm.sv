// bbnc_l1norm: reconfigurable block-based normalization circuit (BBNC) with the L1-norm.
//
// Cell feature vectors (NCOMP components of IN_W bits, e.g. the 9 HOG bins) arrive in raster
// order for an image of cnh x cnv cells (cnh up to MAX_CNH, unlimited height with cnv = 0).
// Blocks of 2x2 cells step by one cell, and every component of every cell is normalized by
// the same component summed over the four cells of the block (Eq. 4.4 with p = 1):
//     d'_i = (d_i * 2^M_SHIFT) / (|d_i(cell0)| + |d_i(cell1)| + |d_i(cell2)| + |d_i(cell3)|)
// The numerator is scaled by 2^M_SHIFT (m = 12) so that a fixed-point divider keeps the
// precision; a zero sum gives 0 (it takes the place of the small constant epsilon).
//
// Cell part: the last cnh+1 cells are kept in the cell memory, written at the loop address
// of block_addr_decoder. Block part: one row of block sums (NCOMP x (IN_W+2) bits per word,
// cnh words) is kept in the block memory; each arriving cell adds its absolute values to the
// up to four blocks it belongs to and so starts, extends or completes them.
// Pipelined L1-norm part: when a cell completes a block (it is the block's bottom-right cell)
// the block's sums are the denominators and the four cells of the block leave one per cycle
// in raster order inside the block (pos 0 top-left .. 3 bottom-right), each normalized by
// NCOMP parallel dividers, tagged with the block's position (bx, by).
//
// Timing: a cell is accepted in the idle state, the block updates take four cycles (BA2,
// BA1, BA3, BA0 in that order so that BA2's word is freed before BA0 reuses it), a completed
// block then takes four output cycles (held while out_ready is low) and one cycle writes the
// cell into the cell memory: 6 cycles per cell, 10 when a block completes.
module bbnc_l1norm #(
  parameter int unsigned NCOMP   = 9,
  parameter int unsigned IN_W    = 16,
  parameter int unsigned M_SHIFT = 12,
  parameter int unsigned MAX_CNH = 128,
  localparam int unsigned OUT_W = M_SHIFT + 2,
  localparam int unsigned SUM_W = IN_W + 2,
  localparam int unsigned AW  = $clog2(MAX_CNH),
  localparam int unsigned CAW = $clog2(MAX_CNH+1)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                frame_start,
  input  logic [7:0]                          cnh,
  input  logic [15:0]                         cnv,
  input  logic                                in_valid,
  output logic                                in_ready,
  input  logic signed [NCOMP-1:0][IN_W-1:0]   in_fv,
  output logic                                out_valid,
  input  logic                                out_ready,
  output logic signed [NCOMP-1:0][OUT_W-1:0]  out_fv,
  output logic [1:0]                          out_pos,
  output logic [7:0]                          out_bx,
  output logic [15:0]                         out_by
);
  typedef enum logic [2:0] {S_IDLE, S_BA2, S_BA1, S_BA3, S_BA0, S_OUT, S_WR} state_t;
  state_t state;

  logic [NCOMP-1:0][IN_W-1:0]  cell_mem [MAX_CNH+1];
  logic [NCOMP-1:0][SUM_W-1:0] blk_mem  [MAX_CNH];

  logic signed [NCOMP-1:0][IN_W-1:0] cur;
  logic [NCOMP-1:0][SUM_W-1:0] cur_abs, den, rmw;
  logic [1:0]  pos;
  logic        compl;

  // decoder
  logic [7:0]     cx;
  logic [15:0]    cy;
  logic [AW-1:0]  ba [4];
  logic [3:0]     ba_valid, cell_case;
  logic [CAW-1:0] ca, ca_tr, ca_l;
  logic           advance;

  block_addr_decoder #(.MAX_CNH(MAX_CNH)) u_dec (
    .clk, .rst_n, .frame_start, .cnh, .cnv, .advance,
    .cx, .cy, .ba, .ba_valid, .cell_case, .ca, .ca_tr, .ca_l);

  assign advance  = (state == S_WR);
  assign in_ready = (state == S_IDLE);

  // absolute values of the current cell, and block word plus them
  logic [AW-1:0] step_addr;
  always_comb begin
    unique case (state)
      S_BA2:   step_addr = ba[2];
      S_BA1:   step_addr = ba[1];
      S_BA3:   step_addr = ba[3];
      default: step_addr = ba[0];
    endcase
    for (int i = 0; i < NCOMP; i++) begin
      logic signed [SUM_W-1:0] e;
      e = SUM_W'($signed(cur[i]));
      cur_abs[i] = (e < 0) ? -e : e;
      rmw[i]     = blk_mem[step_addr][i] + cur_abs[i];
    end
  end

  // the cell leaving at position pos, and its normalization
  logic signed [NCOMP-1:0][IN_W-1:0] ocell;
  always_comb begin
    unique case (pos)
      2'd0:    ocell = cell_mem[ca];
      2'd1:    ocell = cell_mem[ca_tr];
      2'd2:    ocell = cell_mem[ca_l];
      default: ocell = cur;
    endcase
    for (int i = 0; i < NCOMP; i++) begin
      logic signed [IN_W+M_SHIFT:0] num;
      logic signed [SUM_W:0]        dd;
      num = (IN_W+M_SHIFT+1)'($signed(ocell[i])) <<< M_SHIFT;
      dd  = $signed({1'b0, den[i]});
      out_fv[i] = (den[i] == '0) ? '0 : OUT_W'(num / dd);
    end
  end

  assign out_valid = (state == S_OUT);
  assign out_pos   = pos;
  assign out_bx    = cx - 8'd1;
  assign out_by    = cy - 16'd1;

  always_ff @(posedge clk) begin
    unique case (state)
      S_BA1:   if (ba_valid[1]) blk_mem[ba[1]] <= rmw;
      S_BA3:   if (ba_valid[3]) blk_mem[ba[3]] <= rmw;
      S_BA0:   if (ba_valid[0]) blk_mem[ba[0]] <= cur_abs;
      default: ;
    endcase
    if (state == S_WR) cell_mem[ca] <= cur;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cur <= '0; den <= '0; pos <= '0; compl <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin cur <= in_fv; state <= S_BA2; end
        S_BA2: begin
          compl <= ba_valid[2];
          if (ba_valid[2]) den <= rmw;
          state <= S_BA1;
        end
        S_BA1: state <= S_BA3;
        S_BA3: state <= S_BA0;
        S_BA0: begin pos <= '0; state <= compl ? S_OUT : S_WR; end
        S_OUT: if (out_ready) begin
          pos <= pos + 2'd1;
          if (pos == 2'd3) state <= S_WR;
        end
        S_WR: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
