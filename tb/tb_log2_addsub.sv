// tb_log2_addsub: random operand pairs, both operations, compared with
// integer arithmetic modulo 2^13.
module tb_log2_addsub;
  logic [12:0] opa, opb, sum;
  logic        sub;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0;
  logic clk = 0;

  log2_addsub dut (.opa(opa), .opb(opb), .sub(sub), .sum(sum));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int i = 0; i < 10000; i++) begin
      opa = 13'($urandom);
      opb = 13'($urandom);
      sub = 1'($urandom);
      @(posedge clk); #1;
      e = sub ? (int'(opa) - int'(opb)) : (int'(opa) + int'(opb));
      e = ((e % 8192) + 8192) % 8192;
      checks++;
      if (int'(sum) != e) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d sub=%0b sum=%0d exp=%0d", opa, opb, sub, sum, e);
      end
      if (sub) n_sub++; else n_add++;
    end
    checks++;
    if (n_add == 0 || n_sub == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
