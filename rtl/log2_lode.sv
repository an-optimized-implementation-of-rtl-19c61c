// log2_lode: leading-one detector and encoder.
//
// Finds the position k of the most significant '1' of the unsigned input n;
// k is the characteristic (integer part) of log2(n). It is a plain priority
// encoder scanned from the LSB up so the highest set bit wins. For n = 0 there
// is no leading one: k reads 0 and `zero` is raised (the zero flag is this
// design's own addition).
//
// Interface: n[N_W-1:0] in; k[K_W-1:0], zero out. Purely combinational.
module log2_lode #(
  parameter int unsigned N_W = log2_pkg::N_W,
  parameter int unsigned K_W = log2_pkg::K_W
) (
  input  logic [N_W-1:0] n,
  output logic [K_W-1:0] k,
  output logic           zero
);

  always_comb begin
    k = '0;
    for (int unsigned i = 0; i < N_W; i++) begin
      if (n[i]) k = K_W'(i);
    end
    zero = (n == '0);
  end

endmodule
