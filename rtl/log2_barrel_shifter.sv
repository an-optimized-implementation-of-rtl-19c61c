// log2_barrel_shifter: normalising left shifter that produces the fraction x.
//
// N = 2^k (1 + x). Shifting N left by shamt = N_W-1-k puts the leading one at
// bit N_W-1; the bits right below it are x, MSB first. This "modified" barrel
// shifter drops the leading one and keeps only the F_W bits that follow
// (truncation), which is all the approximation datapath uses. The shifter is
// built from K_W stages that each shift by 2^s or pass through.
//
// Interface: n[N_W-1:0] and shamt[K_W-1:0] in; x[F_W-1:0] out, an unsigned
// fraction with LSB 2^-F_W. Combinational. Requires F_W <= N_W-1.
module log2_barrel_shifter #(
  parameter int unsigned N_W = log2_pkg::N_W,
  parameter int unsigned K_W = log2_pkg::K_W,
  parameter int unsigned F_W = log2_pkg::F_W
) (
  input  logic [N_W-1:0] n,
  input  logic [K_W-1:0] shamt,
  output logic [F_W-1:0] x
);

  logic [N_W-1:0] stage [K_W+1];

  always_comb begin
    stage[0] = n;
    for (int unsigned s = 0; s < K_W; s++) begin
      stage[s+1] = shamt[s] ? (stage[s] << (1 << s)) : stage[s];
    end
    x = stage[K_W][N_W-2 -: F_W];
  end

endmodule
