// ep_pkg: constants shared by the exponential-product (EP) datapath.
//
// The EP datapath works on IEEE-754 style floating-point words {sign, exponent,
// fraction}. The widths are parameters of every unit so that one source covers
// single precision (the configuration used on the accelerator board: 8-bit
// exponent, 23-bit fraction) up towards double precision. This package holds the
// single-precision defaults, the pipeline latencies of the single-precision build
// and the fixed-point constants log2(e) and ln(2) used by the exponential unit.
// The latencies and the 37-bit multiplier-to-exp interface follow the published
// single-precision figures; the constant formats are this design's own. The
// double-precision latencies are kept here for a double-precision build.
package ep_pkg;

  // Single-precision word format (IEEE-754 binary32).
  localparam int SP_EXP_W  = 8;
  localparam int SP_FRAC_W = 23;

  // Width of the non-standard word between the first multiplier and the exp
  // unit: sign + 8-bit exponent + 28-bit fraction = 37 bits.
  localparam int SP_MID_W  = 37;

  // Pipeline latencies of the single-precision units, in clock cycles.
  localparam int SP_MUL_LAT = 4;
  localparam int SP_EXP_LAT = 21;
  localparam int SP_ACC_LAT = 8;

  // Double-precision word format (IEEE-754 binary64) and the published
  // double-precision latencies. The 69-bit intermediate word (52-bit fraction
  // plus 5 guard bits, as in single precision) is this design's choice.
  localparam int DP_EXP_W   = 11;
  localparam int DP_FRAC_W  = 52;
  localparam int DP_MID_W   = 69;
  localparam int DP_MUL_LAT = 5;
  localparam int DP_EXP_LAT = 30;
  localparam int DP_ACC_LAT = 10;

  // log2(e) with 128 fraction bits (value 1.4426950408889634...), rounded.
  localparam logic [128:0] LOG2E_Q128 = 129'h1_71547652_B82FE177_7D0FFDA0_D23A7D12;
  // ln(2) with 128 fraction bits (value 0.6931471805599453...), rounded.
  localparam logic [127:0] LN2_Q128   = 128'hB17217F7_D1CF79AB_C9E3B398_03F2F6AF;

endpackage
