// vision_pkg: types and constants shared by the feature-extraction and detection blocks.
// The Haar cell feature vector is the 4-D vector {sum Dx, sum Dy, sum |Dx|, sum |Dy|} of an
// 8x8-pixel cell, each component 16 bits (the document's word precision). The OSW record is
// what the window-address generator hands to a classifier for one overlapping scan window.
package vision_pkg;
  localparam int unsigned HFV_W   = 16;   // Haar cell-FV component
  localparam int unsigned HFV_DIM = 4;    // dimensions of a Haar cell FV

  typedef struct packed {
    logic signed [HFV_W-1:0] sdx;   // sum of Dx over the 4 sub-cells
    logic signed [HFV_W-1:0] sdy;   // sum of Dy
    logic signed [HFV_W-1:0] adx;   // sum of |Dx|
    logic signed [HFV_W-1:0] ady;   // sum of |Dy|
  } haar_fv_t;                      // 64 bits, one FV-buffer word

  // One overlapping scan window (OSW) that contains the current cell or block.
  typedef struct packed {
    logic [6:0]  wx;      // window column (block-stride units)
    logic [9:0]  wy;      // window row
    logic [15:0] widx;    // window index wy*N + wx (Eq. 3.4, zero-based)
    logic [4:0]  lx;      // position of the unit inside the window, column
    logic [4:0]  ly;      // position inside the window, row
    logic [2:0]  rrrt;    // reusing time of the unit in this window: 1, 2 or 4
    logic        first;   // unit is the first one of the window (top-left)
    logic        last;    // unit is the last one of the window (bottom-right)
  } osw_t;
endpackage
