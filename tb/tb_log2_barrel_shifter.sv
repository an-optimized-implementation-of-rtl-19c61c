// tb_log2_barrel_shifter: for every nonzero 16-bit N, drives the shifter with
// the shift 15-k (k from the reference) and compares x with the reference
// fraction (N - 2^k) * 2^13 / 2^k, truncated. Also checks all 16 shift
// amounts on random words against a direct shift.
module tb_log2_barrel_shifter;
  import log2_ref_pkg::*;

  logic [15:0] n;
  logic [3:0]  shamt;
  logic [12:0] x;
  int checks = 0, failures = 0;
  logic clk = 0;

  log2_barrel_shifter dut (.n(n), .shamt(shamt), .x(x));

  always #5 clk = ~clk;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    for (int v = 1; v < 65536; v++) begin
      n = 16'(v);
      shamt = 4'(15 - ref_k(v));
      @(posedge clk); #1;
      checks++;
      if (int'(x) != ref_x(v)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d x=%0d exp=%0d", v, x, ref_x(v));
      end
    end
    for (int i = 0; i < 2000; i++) begin
      n = 16'($urandom);
      shamt = 4'($urandom);
      w = 32'(n) << shamt;
      @(posedge clk); #1;
      checks++;
      if (x !== w[14:2]) begin
        failures++;
        if (failures < 10) $display("FAIL n=%h sh=%0d x=%h", n, shamt, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
