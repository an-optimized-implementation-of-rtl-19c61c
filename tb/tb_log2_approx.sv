// tb_log2_approx: all 8192 fractions x. The output must equal the reference
// D(x) + 8*entry, and its distance from the real log2(1+x) must stay under
// 1.1e-3 (one table LSB plus margin). The block's own linear estimate
// D(x) = a_i*x + b_i, read before the table correction, must reproduce the
// published uncorrected error: largest positive error 6.3e-3, largest
// negative error -8.8e-3 (checked to within 0.3e-3).
module tb_log2_approx;
  import log2_pkg::*;
  import log2_ref_pkg::*;

  frac_t x, f;
  int checks = 0, failures = 0;
  real worst = 0.0, d_pos = 0.0, d_neg = 0.0;
  logic clk = 0;

  log2_approx dut (.x(x), .f(f));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real err;
    int entries [128];
    for (int j = 0; j < 128; j++) entries[j] = ref_entry(j);
    for (int v = 0; v < 8192; v++) begin
      x = frac_t'(v);
      @(posedge clk); #1;
      checks += 2;
      if (int'(f) != ref_d(v) + 8 * entries[v / 64]) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d f=%0d exp=%0d", v, f, ref_d(v) + 8 * entries[v / 64]);
      end
      err = log2r(1.0 + real'(v) / 8192.0) - real'(int'(dut.ax) + int'(dut.b)) / 8192.0;
      if (err > d_pos) d_pos = err;
      if (err < d_neg) d_neg = err;
      err = log2r(1.0 + real'(v) / 8192.0) - real'(f) / 8192.0;
      if (err < 0) err = -err;
      if (err > worst) worst = err;
      if (err > 1.1e-3) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d error %e", v, err);
      end
    end
    $display("worst |log2(1+x) - F| = %e", worst);
    $display("uncorrected D(x): max positive error %e, max negative error %e", d_pos, d_neg);
    checks += 2;
    if (d_pos < 6.0e-3 || d_pos > 6.6e-3) failures++;
    if (d_neg > -8.5e-3 || d_neg < -9.1e-3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
