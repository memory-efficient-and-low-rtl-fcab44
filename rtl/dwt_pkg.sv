// dwt_pkg: constants and types shared by the 2-D 5/3 lifting DWT.
//
// The sideband tag travels with every pixel pair from the scan controller,
// through the row processing unit and the transpose unit, to the column
// processing unit. It tells each stage which row of the stripe a pair belongs
// to and how to label the result it emits for that pair. The defaults
// (256x256 frame, 8-bit pixels) are those of the reference implementation;
// the field layout of the tag is this design's own.
package dwt_pkg;

  // Default frame size (NxN pixels) and pixel width.
  localparam int unsigned N_DEFAULT     = 256;
  localparam int unsigned PIX_W_DEFAULT = 8;

  // Sideband tag of one pixel pair / coefficient pair.
  typedef struct packed {
    logic slot;    // row of the stripe: 0 = upper (even) row, 1 = lower (odd) row
    logic emit;    // the row unit produces a valid L/H pair for this input
    logic s0;      // that L/H pair belongs to stripe 0 of the frame
    logic last;    // that L/H pair is the last one of the frame
  } scan_tag_t;

  // Lifting state of a line after the pairs seen so far:
  //   P = 2*x[2k-1] + 1 - x[2k-2]
  //   Q = 4*x[2k-2] + 2 + d[k-2]
  // For a line that is zero-extended on the left the start values are:
  localparam int P_INIT = 1;
  localparam int Q_INIT = 2;

endpackage
