// log2_approx: approximation block, F ~= log2(1 + x) for x in [0,1).
//
// Difference method: F = D(x) + E(x) where D(x) = a_i*x + b_i is a four-segment
// linear estimate and E(x) a tabulated correction.
//   - the two MSBs of x pick the segment: the coefficient table gives b_i, the
//     slope multiplexers and the +/- unit give a_i*x from shifts of x;
//   - the seven MSBs of x address the 5-bit error table, whose entry is sign
//     extended and shifted left by ELUT_SHIFT so its 2^-10 LSB lines up with
//     the 13-bit fraction;
//   - one three-input adder sums the three terms.
// Over all 8192 inputs the sum stays within 0..8190, so the final adder needs
// no saturation. The structure follows the published architecture; the error
// entry alignment is this design's choice.
//
// Interface: x[F_W-1:0] in; f[F_W-1:0] out, LSB 2^-13. Combinational.
module log2_approx
  import log2_pkg::*;
(
  input  frac_t x,
  output frac_t f
);

  frac_t                opa, opb, ax, b;
  logic                 sub;
  logic [ELUT_DW-1:0]   e_raw;
  logic [F_W-1:0]       e_ext;
  logic [F_W-1:0]       total;

  log2_slope_mux u_mux (.x(x), .opa(opa), .opb(opb), .sub(sub));

  log2_addsub #(.F_W(F_W)) u_addsub (.opa(opa), .opb(opb), .sub(sub), .sum(ax));

  log2_cof_lut u_cof (.seg(seg_e'(x[F_W-1 -: SEG_W])), .b(b));

  log2_error_lut #(.AW(ELUT_AW), .DW(ELUT_DW)) u_err (
    .addr(x[F_W-1 -: ELUT_AW]),
    .e   (e_raw)
  );

  always_comb begin
    // Sign extension, then alignment of the 2^-10 LSB to 2^-13.
    e_ext = {{(F_W-ELUT_DW-ELUT_SHIFT){e_raw[ELUT_DW-1]}}, e_raw, {ELUT_SHIFT{1'b0}}};
    // Modulo-2^F_W sum: adding the two's-complement correction subtracts it.
    total = ax + b + e_ext;
    f     = total;
  end

endmodule
