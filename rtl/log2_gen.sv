// log2_gen: 16-bit binary logarithm generator.
//
// Computes log2(N) for an unsigned 16-bit integer N as k + F: k (4 bits) is
// the position of the leading one of N and F (13 bits, LSB 2^-13) approximates
// log2(1 + x), x being the bits of N below the leading one read as a fraction.
//   LODE        -> k
//   INV         -> shift amount 15-k
//   barrel shift-> x (13 bits, truncated)
//   approx block-> F = piecewise-linear estimate + table correction
// The result as a fixed-point number is {k, f} with 13 fraction bits. The
// worst absolute error of k + F against log2(N) is about 1.2e-3 over all
// nonzero inputs.
//
// The block structure and widths follow the published architecture. The
// design is purely combinational (the source reports only a propagation
// delay). N = 0 has no logarithm: it raises `zero`, with k and f then reading
// as for N = 1; the zero flag is this design's addition.
//
// Interface: n[N_W-1:0] in; k[K_W-1:0], f[F_W-1:0], zero out.
module log2_gen #(
  parameter int unsigned N_W = log2_pkg::N_W,
  parameter int unsigned K_W = log2_pkg::K_W,
  parameter int unsigned F_W = log2_pkg::F_W
) (
  input  logic [N_W-1:0] n,
  output logic [K_W-1:0] k,
  output logic [F_W-1:0] f,
  output logic           zero
);

  logic [K_W-1:0] shamt;
  logic [F_W-1:0] x;

  log2_lode #(.N_W(N_W), .K_W(K_W)) u_lode (.n(n), .k(k), .zero(zero));

  log2_inv #(.K_W(K_W)) u_inv (.k(k), .shamt(shamt));

  log2_barrel_shifter #(.N_W(N_W), .K_W(K_W), .F_W(F_W)) u_shift (
    .n(n), .shamt(shamt), .x(x)
  );

  log2_approx u_approx (.x(x), .f(f));

  // The approximation datapath is built for the package widths.
  if (F_W != log2_pkg::F_W || N_W != 2**K_W) begin : g_bad_width
    $error("log2_gen: F_W must equal log2_pkg::F_W and N_W must be 2**K_W");
  end

endmodule
