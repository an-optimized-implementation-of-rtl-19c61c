// log2_error_lut: 128 x 5-bit error-compensation table.
//
// Addressed by the 7 MSBs of x, i.e. x split into 128 bins of 64 codes. Entry
// j is a signed correction in units of 2^-10:
//   e[j] = round( (max + min) / 2 / 8 ),
// with max and min taken over the 64 codes x of bin j of
//   8192*log2(1 + x/8192) - D(x),
// where D(x) is the 13-bit linear estimate of the datapath (a_i*x + b_i with
// the right shifts truncating). Taking the mid-range of each bin keeps the
// largest remaining error as small as a single entry allows. The table size
// (5 x 128 bits, 7 address bits) is the published one; the entry scaling and
// the fitting rule are this design's own. All entries lie in -9..7, so none
// saturates.
//
// Interface: addr[AW-1:0] in; e[DW-1:0] out, two's complement. A
// combinational ROM; the table below lists bins 0..127 in order.
module log2_error_lut #(
  parameter int unsigned AW = log2_pkg::ELUT_AW,
  parameter int unsigned DW = log2_pkg::ELUT_DW
) (
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] e
);

  localparam logic signed [4:0] ENTRIES [128] = '{
     -7,  -6,  -4,  -3,  -2,  -1,   0,   1,  // bins   0..  7
      2,   3,   4,   4,   5,   5,   6,   6,  // bins   8.. 15
      6,   6,   6,   7,   7,   6,   6,   6,  // bins  16.. 23
      6,   5,   5,   5,   4,   3,   3,   2,  // bins  24.. 31
     -6,  -5,  -5,  -4,  -4,  -3,  -3,  -2,  // bins  32.. 39
     -2,  -2,  -2,  -2,  -1,  -1,  -1,  -1,  // bins  40.. 47
     -2,  -2,  -2,  -2,  -2,  -3,  -3,  -4,  // bins  48.. 55
     -4,  -5,  -5,  -6,  -6,  -7,  -8,  -9,  // bins  56.. 63
     -3,  -2,  -1,  -1,   0,   0,   1,   1,  // bins  64.. 71
      1,   2,   2,   2,   3,   3,   3,   3,  // bins  72.. 79
      3,   3,   3,   3,   3,   3,   3,   3,  // bins  80.. 87
      3,   3,   2,   2,   2,   2,   1,   1,  // bins  88.. 95
     -5,  -4,  -4,  -3,  -3,  -2,  -2,  -2,  // bins  96..103
     -1,  -1,  -1,   0,   0,   0,   0,   1,  // bins 104..111
      1,   1,   1,   1,   1,   1,   1,   1,  // bins 112..119
      1,   1,   1,   1,   1,   1,   0,   0   // bins 120..127
  };

  // The table is fitted to 7 address bits and 5 data bits.
  if (AW != 7 || DW != 5) begin : g_bad_size
    $error("log2_error_lut: the table is 128 x 5 bits");
  end

  always_comb e = DW'(ENTRIES[addr]);

endmodule
