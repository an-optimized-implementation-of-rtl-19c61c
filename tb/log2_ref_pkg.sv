// log2_ref_pkg: reference model for the logarithm generator testbenches.
//
// Everything here is recomputed from the defining formulas, not from the RTL:
//   ref_k      position of the leading one, by repeated halving
//   ref_x      13-bit fraction: (N - 2^k) scaled to 2^13 by multiplication/division
//   ref_d      four-segment linear estimate, written with integer multiplies
//              of the slopes (5/4, 17/16, 7/8, 3/4) on truncated shift terms
//   ref_entry  error-table entry, from log2 evaluated in real arithmetic
//   ref_f      complete fraction D(x) + 8*entry
package log2_ref_pkg;

  localparam real LN2 = 0.6931471805599453;

  function automatic real log2r(input real v);
    return $ln(v) / LN2;
  endfunction

  function automatic int ref_k(input int n);
    int k = 0;
    while (n > 1) begin n = n / 2; k++; end
    return k;
  endfunction

  // Bits below the leading one, scaled to 13 fraction bits and truncated.
  function automatic int ref_x(input int n);
    int k   = ref_k(n);
    longint r = (longint'(n) - (longint'(1) << k)) * 64'd8192;
    return int'(r / (longint'(1) << k));
  endfunction

  function automatic int ref_d(input int x);
    int s = x / 2048;
    case (s)
      0: return x + x / 4 + 64;
      1: return x + x / 16 + 512;
      2: return x - x / 8 + 77 * 16;
      default: return x / 2 + x / 4 + 2048;
    endcase
  endfunction

  function automatic int round_half_away(input real r);
    return (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
  endfunction

  function automatic int ref_entry(input int j);
    real mx = -1.0e9, mn = 1.0e9, e;
    for (int x = j * 64; x < (j + 1) * 64; x++) begin
      e = 8192.0 * log2r(1.0 + real'(x) / 8192.0) - real'(ref_d(x));
      if (e > mx) mx = e;
      if (e < mn) mn = e;
    end
    return round_half_away((mx + mn) / 2.0 / 8.0);
  endfunction

  function automatic int ref_f(input int x);
    return ref_d(x) + 8 * ref_entry(x / 64);
  endfunction

endpackage
