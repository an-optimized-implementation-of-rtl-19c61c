// log2_addsub: the +/- unit that forms the slope product a_i*x.
//
// sum = opa + opb, or opa - opb when sub is set, modulo 2^F_W. With the
// operands the slope multiplexers deliver, a_i*x stays within [0, 0.75), so
// the F_W-bit unsigned fraction holds it without carry or borrow out.
//
// Interface: opa, opb[F_W-1:0], sub in; sum[F_W-1:0] out. Combinational.
module log2_addsub #(
  parameter int unsigned F_W = log2_pkg::F_W
) (
  input  logic [F_W-1:0] opa,
  input  logic [F_W-1:0] opb,
  input  logic           sub,
  output logic [F_W-1:0] sum
);

  always_comb sum = sub ? (opa - opb) : (opa + opb);

endmodule
