// tb_log2_inv: the inverter must turn every characteristic k into the
// normalising left shift 15-k.
module tb_log2_inv;
  logic [3:0] k, shamt;
  int checks = 0, failures = 0;
  logic clk = 0;

  log2_inv dut (.k(k), .shamt(shamt));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      k = 4'(v);
      @(posedge clk); #1;
      checks++;
      if (int'(shamt) != 15 - v) begin
        failures++;
        $display("FAIL k=%0d shamt=%0d", v, shamt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
