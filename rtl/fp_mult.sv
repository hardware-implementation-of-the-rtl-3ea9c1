// fp_mult: pipelined floating-point multiplier with a truncated mantissa array.
//
// Multiplies two floating-point words that share an exponent format but may have
// different fraction widths (FA_W, FB_W) and produces a word with FO_W fraction
// bits. This lets the same unit serve both multipliers of the EP datapath: the
// first one (alpha * r^2) widens its result to the 37-bit intermediate format and
// the second one (exp * C) returns a standard single-precision word.
//
// How it works: the full product of the two (F+1)-bit mantissas would be
// FA_W+FB_W+2 bits, far more than the output keeps. As in the published design,
// the least significant columns of the partial-product array are not built at
// all: only partial-product bits whose weight is at least 2^DROP are summed.
// DROP is chosen so that GUARD bits below the output's rounding position remain;
// with GUARD = 7 the error of the dropped columns stays below 0.2 ulp. The kept
// bits are normalised (the product of two mantissas in [1,2) lies in [1,4)) and
// rounded to nearest, ties away from zero.
//
// Special values (this design's choice): an exponent field of zero is read as
// zero (subnormals are flushed), a result below the normal range is flushed to
// zero and a result above it saturates to infinity (all-ones exponent, zero
// fraction). NaN is not propagated.
//
// Interface and timing: one product per clock, no stall. Inputs a, b with
// in_valid are presented in one cycle; p with out_valid appears LATENCY cycles
// later (4 in the single-precision build). Three of those stages do work
// (operand decode, truncated array sum, normalise and round); the rest are a
// delay line so that the latency matches the specified figure.
module fp_mult #(
  parameter int EXP_W   = ep_pkg::SP_EXP_W,
  parameter int FA_W    = ep_pkg::SP_FRAC_W,
  parameter int FB_W    = ep_pkg::SP_FRAC_W,
  parameter int FO_W    = ep_pkg::SP_MID_W - 1 - ep_pkg::SP_EXP_W,
  parameter int GUARD   = 7,
  parameter int LATENCY = ep_pkg::SP_MUL_LAT
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic [EXP_W+FA_W:0]   a,
  input  logic [EXP_W+FB_W:0]   b,
  output logic                  out_valid,
  output logic [EXP_W+FO_W:0]   p
);
  localparam int PW    = FA_W + FB_W + 2;             // full product width
  localparam int KEEP  = FO_W + 2 + GUARD;             // product bits kept
  localparam int DROP  = (PW > KEEP) ? PW - KEEP : 0;  // columns not built
  localparam int EW2   = EXP_W + 2;                    // signed exponent arithmetic
  localparam int BIAS  = (1 << (EXP_W - 1)) - 1;
  localparam int EMAX  = (1 << EXP_W) - 1;

  if (LATENCY < 3) begin : g_bad_latency
    $error("fp_mult: LATENCY must be at least 3");
  end

  // ---------------- stage 1: operand decode ----------------
  logic              s1_valid, s1_sign, s1_zero;
  logic [FA_W:0]     s1_ma;
  logic [FB_W:0]     s1_mb;
  logic [EW2-1:0]    s1_exp;   // ea + eb - bias, signed

  always_ff @(posedge clk) begin
    if (rst) s1_valid <= 1'b0;
    else     s1_valid <= in_valid;
    s1_sign <= a[EXP_W+FA_W] ^ b[EXP_W+FB_W];
    s1_zero <= (a[EXP_W+FA_W-1:FA_W] == '0) || (b[EXP_W+FB_W-1:FB_W] == '0);
    s1_ma   <= {1'b1, a[FA_W-1:0]};
    s1_mb   <= {1'b1, b[FB_W-1:0]};
    s1_exp  <= EW2'(a[EXP_W+FA_W-1:FA_W]) + EW2'(b[EXP_W+FB_W-1:FB_W]) - EW2'(BIAS);
  end

  // ---------------- stage 2: truncated partial-product array ----------------
  // Row j is ma * mb[j] shifted by j; bits of weight below 2^DROP are masked
  // off before the rows are added, so those columns need no adder cells.
  localparam logic [PW-1:0] COL_MASK = ~((PW'(1) << DROP) - PW'(1));

  logic [PW-1:0] pp_sum;
  always_comb begin
    pp_sum = '0;
    for (int j = 0; j <= FB_W; j++) begin
      if (s1_mb[j]) pp_sum = pp_sum + ((PW'(s1_ma) << j) & COL_MASK);
    end
  end

  logic              s2_valid, s2_sign, s2_zero;
  logic [PW-1:0]     s2_prod;
  logic [EW2-1:0]    s2_exp;
  always_ff @(posedge clk) begin
    if (rst) s2_valid <= 1'b0;
    else     s2_valid <= s1_valid;
    s2_sign <= s1_sign;
    s2_zero <= s1_zero;
    s2_prod <= pp_sum;
    s2_exp  <= s1_exp;
  end

  // ---------------- stage 3: normalise, round, pack ----------------
  logic [EXP_W+FO_W:0] res;
  always_comb begin
    logic [FO_W+1:0] mant;     // 1.f with one carry bit
    logic            rnd;
    logic [EW2-1:0]  e;
    logic [PW-1:0]   norm;

    e    = s2_exp;
    norm = s2_prod;
    if (s2_prod[PW-1]) begin   // product in [2,4)
      e = e + EW2'(1);
    end else begin
      norm = s2_prod << 1;
    end
    // norm[PW-1] is the leading one; FO_W fraction bits follow it.
    mant = {1'b0, norm[PW-1 -: FO_W+1]};
    rnd  = (PW > FO_W + 1) ? norm[PW-2-FO_W] : 1'b0;
    mant = mant + (FO_W+2)'(rnd);
    if (mant[FO_W+1]) begin    // rounding carried out to 2.0
      mant = mant >> 1;
      e    = e + EW2'(1);
    end

    if (s2_zero || int'($signed(e)) <= 0) begin
      res = {s2_sign, {(EXP_W+FO_W){1'b0}}};
    end else if (int'($signed(e)) >= EMAX) begin
      res = {s2_sign, {EXP_W{1'b1}}, {FO_W{1'b0}}};
    end else begin
      res = {s2_sign, e[EXP_W-1:0], mant[FO_W-1:0]};
    end
  end

  logic                s3_valid;
  logic [EXP_W+FO_W:0] s3_p;
  always_ff @(posedge clk) begin
    if (rst) s3_valid <= 1'b0;
    else     s3_valid <= s2_valid;
    s3_p <= res;
  end

  // ---------------- latency padding ----------------
  pipe_delay #(.WIDTH(1 + EXP_W + FO_W + 1), .DEPTH(LATENCY - 3)) u_pad (
    .clk (clk),
    .rst (rst),
    .d   ({s3_valid, s3_p}),
    .q   ({out_valid, p})
  );

endmodule
