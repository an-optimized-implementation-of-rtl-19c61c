// log2_inv: inverter between the leading-one encoder and the barrel shifter.
//
// The fraction x of N is obtained by shifting N left until its leading one
// sits at the top bit, a shift of (N_W-1-k). With N_W = 2^K_W this is the
// bitwise complement of k, so the block is a row of K_W inverters.
//
// Interface: k[K_W-1:0] in; shamt[K_W-1:0] out = ~k. Combinational.
module log2_inv #(
  parameter int unsigned K_W = log2_pkg::K_W
) (
  input  logic [K_W-1:0] k,
  output logic [K_W-1:0] shamt
);

  always_comb shamt = ~k;

endmodule
