// tb_log2_error_lut: every one of the 128 entries must equal the mid-range
// rounding of the bin's error, recomputed here with real-valued log2.
module tb_log2_error_lut;
  import log2_ref_pkg::*;

  logic [6:0] addr;
  logic [4:0] e;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0;
  logic clk = 0;

  log2_error_lut dut (.addr(addr), .e(e));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    for (int j = 0; j < 128; j++) begin
      addr = 7'(j);
      @(posedge clk); #1;
      expv = ref_entry(j);
      checks++;
      if (int'($signed(e)) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL entry %0d = %0d exp %0d", j, $signed(e), expv);
      end
      if (expv > 0) n_pos++;
      if (expv < 0) n_neg++;
    end
    checks++;
    if (n_pos == 0 || n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
