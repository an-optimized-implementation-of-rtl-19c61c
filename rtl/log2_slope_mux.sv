// log2_slope_mux: the two segment multiplexers that realise the slope a_i.
//
// Every slope is a sum or difference of two powers of two, so a_i*x is
// opa +/- opb with opa and opb fixed shifts of x:
//   segment 0: a = 1 + 1/4   -> opa = x,    opb = x>>2, add
//   segment 1: a = 1 + 1/16  -> opa = x,    opb = x>>4, add
//   segment 2: a = 1 - 1/8   -> opa = x,    opb = x>>3, subtract
//   segment 3: a = 1/2 + 1/4 -> opa = x>>2, opb = x>>1, add
// The upper multiplexer picks opa, the lower one opb; both are steered by the
// two MSBs of x. Bits shifted out on the right are dropped.
//
// Interface: x[F_W-1:0] in; opa, opb[F_W-1:0] and sub out. Combinational.
module log2_slope_mux
  import log2_pkg::*;
(
  input  frac_t x,
  output frac_t opa,
  output frac_t opb,
  output logic  sub
);

  seg_e seg;

  always_comb begin
    seg = seg_e'(x[F_W-1 -: SEG_W]);
    unique case (seg)
      SEG_0_25:   begin opa = x;      opb = x >> 2; end
      SEG_25_50:  begin opa = x;      opb = x >> 4; end
      SEG_50_75:  begin opa = x;      opb = x >> 3; end
      SEG_75_100: begin opa = x >> 2; opb = x >> 1; end
      default:    begin opa = x;      opb = x >> 2; end
    endcase
    sub = (seg == SEG_50_75);
  end

endmodule
