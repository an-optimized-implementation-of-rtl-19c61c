// tb_log2_cof_lut: each segment's intercept must equal the published value
// 2^-7, 2^-4, 77*2^-9, 2^-2 (computed here in real arithmetic, scaled by 2^13).
module tb_log2_cof_lut;
  import log2_pkg::*;

  seg_e  seg;
  frac_t b;
  int checks = 0, failures = 0;
  logic clk = 0;
  real expv [4] = '{2.0 ** -7, 2.0 ** -4, 77.0 * 2.0 ** -9, 2.0 ** -2};

  log2_cof_lut dut (.seg(seg), .b(b));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      seg = seg_e'(s);
      @(posedge clk); #1;
      checks++;
      if (real'(b) != expv[s] * 8192.0) begin
        failures++;
        $display("FAIL seg=%0d b=%0d exp=%f", s, b, expv[s] * 8192.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
