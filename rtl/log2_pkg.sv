// log2_pkg: widths, segment encoding and coefficient constants shared by the
// 16-bit base-2 logarithm generator.
//
// The generator computes log2(N) = k + log2(1+x) for an unsigned integer N,
// where k is the position of the leading one of N and x the bits below it
// read as a binary fraction. log2(1+x) is approximated on four equal
// segments of x by a line a_i*x + b_i whose slope is a sum or difference of
// two powers of two, then corrected by a small signed error table.
//
// All fractions in this package are unsigned, in units of 2^-13 (F_W bits).
// The intercepts b_i are the published segment intercepts; the error-table
// scaling (ELUT_SHIFT) is this design's own choice.
package log2_pkg;

  localparam int unsigned N_W        = 16;  // input width
  localparam int unsigned K_W        = 4;   // characteristic width
  localparam int unsigned F_W        = 13;  // fraction width of x and F
  localparam int unsigned SEG_W      = 2;   // segment select: 2 MSBs of x
  localparam int unsigned ELUT_AW    = 7;   // error table address: 7 MSBs of x
  localparam int unsigned ELUT_DW    = 5;   // error table entry width (signed)
  localparam int unsigned ELUT_SHIFT = 3;   // entry LSB is 2^-(F_W-ELUT_SHIFT) = 2^-10

  typedef logic [F_W-1:0] frac_t;

  // Segment of x in [0,1): x in [i/4, (i+1)/4) is segment i.
  typedef enum logic [SEG_W-1:0] {
    SEG_0_25   = 2'd0,  // a = 2^0 + 2^-2,  b = 2^-7
    SEG_25_50  = 2'd1,  // a = 2^0 + 2^-4,  b = 2^-4
    SEG_50_75  = 2'd2,  // a = 2^0 - 2^-3,  b = 77 * 2^-9
    SEG_75_100 = 2'd3   // a = 2^-1 + 2^-2, b = 2^-2
  } seg_e;

  // Intercepts b_i as F_W-bit fractions (units of 2^-13).
  localparam frac_t B_SEG0 = frac_t'(1 << (F_W - 7));        // 2^-7
  localparam frac_t B_SEG1 = frac_t'(1 << (F_W - 4));        // 2^-4
  localparam frac_t B_SEG2 = frac_t'(77 << (F_W - 9));       // 77 * 2^-9
  localparam frac_t B_SEG3 = frac_t'(1 << (F_W - 2));        // 2^-2

endpackage
