// wino_pkg: types and constants shared by the Winograd systolic convolution
// engine (WinoCNN). The engine works with a Winograd filter size OMEGA = 4 and
// serves two kernel sizes with the same multipliers: F4(4x4,1x1) and
// F4(2x2,3x3). The kernel size is picked per tile by a selection bit in the
// output transform. Data widths are this design's choice: 8-bit signed input
// pixels, 16-bit pre-transformed weights (as in the weight buffer sizing of the
// WinoCNN resource model) and wide accumulators that cannot overflow for the
// channel counts the testbenches use.
package wino_pkg;

  localparam int OMEGA  = 4;   // Winograd filter (input tile) size
  localparam int PIX_W  = 8;   // input pixel width, signed
  localparam int U_W    = 10;  // transformed input width: B^T d B adds up to 4 pixels
  localparam int WT_W   = 16;  // transformed weight width
  localparam int ACC_W  = 32;  // element-wise product accumulator (before A^T . A)
  localparam int OUT_W  = 36;  // output after the output transform (up to 9 terms)
  localparam int TAG_W  = 24;  // tile coordinate tag carried with the data

  // Kernel-size selection. The output transform row 1 is [0 1 -1 s]:
  // s = 0 gives F4(4x4,1x1), s = -1 gives F4(2x2,3x3).
  typedef enum logic [0:0] {
    KSEL_1X1 = 1'b0,
    KSEL_3X3 = 1'b1
  } ksel_e;

  // Output tile size m for a kernel selection (omega = m + k - 1).
  function automatic int unsigned tile_m(ksel_e k);
    return (k == KSEL_3X3) ? 2 : 4;
  endfunction

  // Control word that travels with an input tile through the pipeline and
  // down the systolic columns.
  typedef struct packed {
    logic              valid;  // tile carries work
    logic              first;  // first input-channel group of an output tile
    logic              last;   // last input-channel group of an output tile
    ksel_e             ksel;   // kernel size of this tile
    logic [TAG_W-1:0]  tag;    // output tile coordinates, opaque to the array
  } wino_ctl_t;

  // One row of B^T (standard Cook-Toom points 0, 1, -1, inf):
  //   [1 0 -1 0], [0 1 1 0], [0 -1 1 0], [0 1 0 -1]
  function automatic logic signed [U_W-1:0] bt_dot(
      int unsigned row,
      logic signed [U_W-1:0] x0, logic signed [U_W-1:0] x1,
      logic signed [U_W-1:0] x2, logic signed [U_W-1:0] x3);
    case (row)
      0:       return x0 - x2;
      1:       return x1 + x2;
      2:       return x2 - x1;
      default: return x1 - x3;
    endcase
  endfunction

  // One row of the selectable output transform A_sel^T:
  //   [1 1 1 0], [0 1 -1 s], [0 1 1 0], [0 1 -1 -1]
  function automatic logic signed [OUT_W-1:0] at_dot(
      int unsigned row, ksel_e k,
      logic signed [OUT_W-1:0] x0, logic signed [OUT_W-1:0] x1,
      logic signed [OUT_W-1:0] x2, logic signed [OUT_W-1:0] x3);
    case (row)
      0:       return x0 + x1 + x2;
      1:       return (k == KSEL_3X3) ? (x1 - x2 - x3) : (x1 - x2);
      2:       return x1 + x2;
      default: return x1 - x2 - x3;
    endcase
  endfunction

endpackage
