// log2_cof_lut: coefficient table holding the four segment intercepts b_i.
//
// The two MSBs of x name the segment; the table returns its intercept as an
// F_W-bit fraction: 2^-7, 2^-4, 77*2^-9 and 2^-2 for the segments starting at
// x = 0, 0.25, 0.5 and 0.75. These values are the published ones.
//
// Interface: seg (log2_pkg::seg_e) in; b[F_W-1:0] out, LSB 2^-13.
// Combinational.
module log2_cof_lut
  import log2_pkg::*;
(
  input  seg_e  seg,
  output frac_t b
);

  always_comb begin
    unique case (seg)
      SEG_0_25:   b = B_SEG0;
      SEG_25_50:  b = B_SEG1;
      SEG_50_75:  b = B_SEG2;
      SEG_75_100: b = B_SEG3;
      default:    b = B_SEG0;
    endcase
  end

endmodule
