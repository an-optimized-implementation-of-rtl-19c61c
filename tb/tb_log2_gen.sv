// tb_log2_gen: end-to-end, full-size test of the 16-bit logarithm generator.
//
// Runs every input N = 0 .. 65535 through the top at its default parameters.
// For each nonzero N it checks k against the leading-one position, f against
// the reference fraction D(x) + 8*entry, and the absolute error of k + f/2^13
// against the real log2(N) (bound 1.25e-3: one table LSB plus the two bits
// lost when x is truncated for N >= 2^14). It counts how often each mechanism
// of the datapath was exercised and fails if one never was: the four slope
// segments, the subtracting segment, positive, negative and zero corrections,
// every characteristic 0..15, truncation of x, and the N = 0 flag. It also
// prints the error statistics (largest positive and negative error, mean
// absolute error, largest and mean relative error).
module tb_log2_gen;
  import log2_ref_pkg::*;

  logic [15:0] n;
  logic [3:0]  k;
  logic [12:0] f;
  logic        zero;
  int checks = 0, failures = 0;
  logic clk = 0;

  log2_gen dut (.n(n), .k(k), .f(f), .zero(zero));

  always #5 clk = ~clk;

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  seg_hits [4];
  int  k_hits [16];
  int  sub_hits, pos_corr, neg_corr, nil_corr, trunc_hits, zero_hits;
  int  entries [128];
  int  kv, xv, fexp, n_rel;
  real err, rel, max_pos, max_neg, sum_abs, max_rel, sum_rel;

  function automatic void need(input string what, input int count,
                               inout int checks_io, inout int failures_io);
    checks_io++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      failures_io++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endfunction

  initial begin
    sub_hits = 0; pos_corr = 0; neg_corr = 0; nil_corr = 0; trunc_hits = 0; zero_hits = 0;
    n_rel = 0;
    max_pos = 0.0; max_neg = 0.0; sum_abs = 0.0; max_rel = 0.0; sum_rel = 0.0;
    for (int j = 0; j < 128; j++) entries[j] = ref_entry(j);
    for (int i = 0; i < 4; i++) seg_hits[i] = 0;
    for (int i = 0; i < 16; i++) k_hits[i] = 0;

    for (int v = 0; v < 65536; v++) begin
      n = 16'(v);
      @(posedge clk); #1;
      checks++;
      if (zero !== (v == 0)) begin
        failures++;
        $display("FAIL n=%0d zero=%0b", v, zero);
      end
      if (v == 0) begin
        zero_hits++;
      end else begin
        kv   = ref_k(v);
        xv   = ref_x(v);
        fexp = ref_d(xv) + 8 * entries[xv / 64];
        checks += 3;
        if (int'(k) != kv) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d k=%0d exp=%0d", v, k, kv);
        end
        if (int'(f) != fexp) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d f=%0d exp=%0d", v, f, fexp);
        end
        err = log2r(real'(v)) - (real'(k) + real'(f) / 8192.0);
        if (err > max_pos) max_pos = err;
        if (err < max_neg) max_neg = err;
        sum_abs += (err < 0.0) ? -err : err;
        if (v > 1) begin
          rel = err / log2r(real'(v));
          if (rel < 0.0) rel = -rel;
          if (rel > max_rel) max_rel = rel;
          sum_rel += rel;
          n_rel++;
        end
        if (err > 1.25e-3 || err < -1.25e-3) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d error %e", v, err);
        end
        seg_hits[xv / 2048]++;
        if (xv / 2048 == 2) sub_hits++;
        k_hits[kv]++;
        if (entries[xv / 64] > 0) pos_corr++;
        else if (entries[xv / 64] < 0) neg_corr++;
        else nil_corr++;
        if (kv > 13 && (v & ((1 << (kv - 13)) - 1)) != 0) trunc_hits++;
      end
    end

    $display("error of k + F against log2(N), N = 1 .. 65535:");
    $display("  max positive error   %e", max_pos);
    $display("  max negative error   %e", max_neg);
    $display("  mean absolute error  %e", sum_abs / 65535.0);
    $display("  max relative error   %e", max_rel);
    $display("  mean relative error  %e", sum_rel / real'(n_rel));

    $display("mechanisms exercised:");
    for (int s = 0; s < 4; s++) need($sformatf("segment %0d", s), seg_hits[s], checks, failures);
    need("subtracting slope (seg 2)", sub_hits, checks, failures);
    need("positive correction", pos_corr, checks, failures);
    need("negative correction", neg_corr, checks, failures);
    need("zero correction", nil_corr, checks, failures);
    for (int i = 0; i < 16; i++) need($sformatf("characteristic k=%0d", i), k_hits[i], checks, failures);
    need("truncated fraction bits", trunc_hits, checks, failures);
    need("zero input flag", zero_hits, checks, failures);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
