// clkgen_pkg: types, widths and topology functions shared by the distributed
// clock generator.
//
// The network is a ROWS x COLS grid of ADPLL nodes indexed [row][col]
// (row = y - 1, col = x - 1 in the usual (x,y) notation where x runs to the
// right and y downwards). Three kinds of node exist:
//   * kernel : inner node, compares its divided clock with its four
//              neighbours (west, east, north, south). Border neighbours feed
//              kernel nodes, kernel nodes never feed border nodes.
//   * border : node of the outer ring that is not a corner; compares only
//              with its two ring neighbours, so the ring ignores the kernel.
//   * corner : ring corner; compares with its two ring neighbours, and its
//              two outward-facing PFDs (which have no neighbour) compare with
//              the reference clock, so the reference weighs half of the
//              corner's average error.
// node_src() returns, for input k of a node, a flat source index
// row*COLS+col into the vector of divided clocks, or ROWS*COLS for the
// reference clock. The 5-bit signed PFD code follows the published design;
// the control-word width and the 2 fractional bits of the average error are
// choices of this implementation.
package clkgen_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int PFD_W    = 5;   // PFD output code width (signed)
  localparam int ERR_FRAC = 2;   // fractional bits kept by the error average
  localparam int ERR_W    = PFD_W + ERR_FRAC + 1;  // average error width
  localparam int CW_W     = 8;   // DCO control word width (signed)
  localparam int TRIM_W   = 8;   // DCO trim / mismatch input width (signed)
  localparam int SH_W     = 4;   // width of a loop-filter gain shift field
  localparam int MAX_IN   = 4;   // most PFDs in one node

  typedef logic signed [PFD_W-1:0]  pfd_code_t;
  typedef logic signed [ERR_W-1:0]  err_t;
  typedef logic signed [CW_W-1:0]   cw_t;
  typedef logic signed [TRIM_W-1:0] trim_t;
  typedef logic [SH_W-1:0]          shift_t;

  typedef enum logic [1:0] {
    NODE_KERNEL = 2'd0,
    NODE_BORDER = 2'd1,
    NODE_CORNER = 2'd2
  } node_kind_e;

  function automatic node_kind_e node_kind(int r, int c, int rows, int cols);
    bit on_row_edge = (r == 0) || (r == rows - 1);
    bit on_col_edge = (c == 0) || (c == cols - 1);
    if (on_row_edge && on_col_edge) return NODE_CORNER;
    if (on_row_edge || on_col_edge) return NODE_BORDER;
    return NODE_KERNEL;
  endfunction

  // Number of phase-frequency detectors (inputs) of node (r,c).
  function automatic int node_n_in(int r, int c, int rows, int cols);
    case (node_kind(r, c, rows, cols))
      NODE_CORNER: return 4;
      NODE_BORDER: return 2;
      default:     return 4;
    endcase
  endfunction

  // Source of input k of node (r,c): flat index of a node, or rows*cols for
  // the reference clock.
  function automatic int node_src(int r, int c, int k, int rows, int cols);
    int idx;
    idx = rows * cols;
    case (node_kind(r, c, rows, cols))
      NODE_KERNEL: begin
        case (k)
          0:       idx = r * cols + (c - 1);    // west
          1:       idx = r * cols + (c + 1);    // east
          2:       idx = (r - 1) * cols + c;    // north
          default: idx = (r + 1) * cols + c;    // south
        endcase
      end
      NODE_BORDER: begin
        if (c == 0 || c == cols - 1) begin      // left / right column
          idx = (k == 0) ? (r - 1) * cols + c : (r + 1) * cols + c;
        end else begin                          // top / bottom row
          idx = (k == 0) ? r * cols + (c - 1) : r * cols + (c + 1);
        end
      end
      default: begin                            // corner
        case (k)
          0:       idx = r * cols + ((c == 0) ? 1 : cols - 2);        // ring, horizontal
          1:       idx = ((r == 0) ? 1 : rows - 2) * cols + c;        // ring, vertical
          default: idx = rows * cols;                                 // reference (k = 2, 3)
        endcase
      end
    endcase
    return idx;
  endfunction
endpackage
