// tb_log2_slope_mux: for all 8192 values of x, opa +/- opb must equal the
// reference slope product (5/4, 17/16, 7/8, 3/4 times x, with the shifted
// term truncated), and sub must be set only in the third segment.
module tb_log2_slope_mux;
  import log2_pkg::*;

  frac_t x, opa, opb;
  logic  sub;
  int checks = 0, failures = 0;
  int segs_seen [4] = '{0, 0, 0, 0};
  logic clk = 0;

  log2_slope_mux dut (.x(x), .opa(opa), .opb(opb), .sub(sub));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_ax(input int xv);
    case (xv / 2048)
      0: return xv + xv / 4;
      1: return xv + xv / 16;
      2: return xv - xv / 8;
      default: return xv / 4 + xv / 2;
    endcase
  endfunction

  initial begin
    int got;
    for (int v = 0; v < 8192; v++) begin
      x = frac_t'(v);
      @(posedge clk); #1;
      got = sub ? int'(opa) - int'(opb) : int'(opa) + int'(opb);
      checks += 2;
      if (got != exp_ax(v)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d a*x=%0d exp=%0d", v, got, exp_ax(v));
      end
      if (sub != (v / 2048 == 2)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d sub=%0b", v, sub);
      end
      segs_seen[v / 2048]++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
