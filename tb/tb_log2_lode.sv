// tb_log2_lode: exhaustive check of the leading-one detector over all 2^16
// inputs against a halving reference; also checks the zero flag.
module tb_log2_lode;
  import log2_ref_pkg::*;

  logic [15:0] n;
  logic [3:0]  k;
  logic        zero;
  int checks = 0, failures = 0;
  logic clk = 0;

  log2_lode dut (.n(n), .k(k), .zero(zero));

  always #5 clk = ~clk;

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      n = 16'(v);
      @(posedge clk); #1;
      checks++;
      if (zero !== (v == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d zero=%0b", v, zero);
      end
      if (v != 0) begin
        checks++;
        if (int'(k) != ref_k(v)) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d k=%0d exp=%0d", v, k, ref_k(v));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
