// exp_module: pipelined floating-point exponential, e^x, by table and polynomial.
//
// The argument arrives in the EP datapath's intermediate format (sign, EXP_W-bit
// exponent, FI_W-bit fraction; 37 bits in the single-precision build) and the
// result leaves as a standard word with FO_W fraction bits.
//
// Method, following the identity e^x = 2^xi * e^(x - xi*ln2), where xi is the
// integer part (floor) of x*log2(e):
//   1. the argument is converted to signed fixed point with XF fraction bits;
//   2. it is multiplied by log2(e); the integer part xi becomes the result's
//      exponent and the fraction f is kept;
//   3. the remainder r = x - xi*ln2 is formed as f*ln2, which lies in [0, ln2);
//   4. e^r is split as e^r_hi * e^r_lo: the top AW bits of r address a table of
//      e^(k/2^AW) (exp_rom), and e^r_lo, with r_lo < 2^-AW, is evaluated by its
//      Taylor polynomial of degree PDEG (1 + r_lo + r_lo^2/2 by default),
//      by Horner's rule;
//   5. the two factors are multiplied, the product (in [1,2)) is normalised and
//      rounded to nearest, and xi + bias is packed as the exponent.
// The identity and the split into a table part and a polynomial part follow the
// published unit; the fixed-point widths, table size and polynomial degree are
// this design's own choice. The defaults (AW = 8, PDEG = 2, XF = 31) give an
// error below one ulp in single precision; AW = 10, PDEG = 4, XF = 60 do the
// same in double precision (XF + 4 may not exceed 128, the precision of the
// log2(e) and ln(2) constants).
//
// Special values (this design's choice): a zero argument gives 1.0; a result
// above the normal range, or an argument of magnitude >= 2^(EXP_W-1) that is
// positive, gives infinity; a result below the normal range, or such an
// argument that is negative, gives zero. The result's sign is always 0.
//
// Interface and timing: one argument per clock, no stall; y and out_valid follow
// x and in_valid by LATENCY cycles (21 in the single-precision build). Six stages
// do work; the rest are a delay line that brings the latency to the specified
// figure.
module exp_module #(
  parameter int EXP_W   = ep_pkg::SP_EXP_W,
  parameter int FI_W    = ep_pkg::SP_MID_W - 1 - ep_pkg::SP_EXP_W,
  parameter int FO_W    = ep_pkg::SP_FRAC_W,
  parameter int AW      = 8,              // table address bits
  parameter int PDEG    = 2,              // degree of the polynomial for e^r_lo
  parameter int XF      = FO_W + 8,       // fixed-point fraction bits
  parameter int LATENCY = ep_pkg::SP_EXP_LAT
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic [EXP_W+FI_W:0] x,
  output logic                out_valid,
  output logic [EXP_W+FO_W:0] y
);
  localparam int BIAS = (1 << (EXP_W - 1)) - 1;
  localparam int EMAX = (1 << EXP_W) - 1;
  localparam int XW   = EXP_W + XF;        // |x| fixed point, unsigned
  localparam int YW   = XW + 2;            // x*log2(e), signed
  localparam int IW   = YW - XF;           // integer part of y, signed
  localparam int EW   = EXP_W + 3;         // result exponent, signed
  localparam int LF   = XF + 4;            // fraction bits of the constants

  localparam logic [LF:0]   LOG2E_FIX = (LF+1)'(ep_pkg::LOG2E_Q128 >> (128 - LF));
  localparam logic [LF-1:0] LN2_FIX   = LF'(ep_pkg::LN2_Q128 >> (128 - LF));

  // Taylor coefficient 1/n! with XF fraction bits, rounded.
  function automatic logic [XF:0] inv_fact(int n);
    logic [255:0] v;
    v = 256'd1 << 200;
    for (int i = 2; i <= n; i++) v = v / 256'(i);
    v = (v + (256'd1 << (199 - XF))) >> (200 - XF);
    return v[XF:0];
  endfunction

  if (LATENCY < 6) begin : g_bad_latency
    $error("exp_module: LATENCY must be at least 6");
  end

  // ---------------- stage 1: to fixed point ----------------
  logic          s1_valid, s1_sign, s1_big;
  logic [XW-1:0] s1_x;

  always_ff @(posedge clk) begin
    logic [EXP_W-1:0] e;
    logic [FI_W:0]    mant;
    int               sh;
    e    = x[EXP_W+FI_W-1:FI_W];
    mant = {1'b1, x[FI_W-1:0]};
    sh   = int'(e) - BIAS + XF - FI_W;   // weight of the mantissa LSB in X units
    if (rst) s1_valid <= 1'b0;
    else     s1_valid <= in_valid;
    s1_sign <= x[EXP_W+FI_W];
    s1_big  <= (e == EMAX[EXP_W-1:0]) || (int'(e) - BIAS >= EXP_W - 1);
    if (e == '0)          s1_x <= '0;
    else if (sh >= XW)    s1_x <= '0;    // only reached together with s1_big
    else if (sh >= 0)     s1_x <= XW'(mant) << sh;
    else if (-sh > FI_W)  s1_x <= '0;
    else                  s1_x <= XW'(mant >> (-sh));
  end

  // ---------------- stage 2: multiply by log2(e) ----------------
  logic          s2_valid, s2_big, s2_sign;
  logic [YW-1:0] s2_y;
  always_ff @(posedge clk) begin
    logic [XW+LF:0] prod;
    logic [YW-1:0]  mag;
    prod = (XW+LF+1)'(s1_x) * (XW+LF+1)'(LOG2E_FIX);
    mag  = YW'(prod >> LF);
    if (rst) s2_valid <= 1'b0;
    else     s2_valid <= s1_valid;
    s2_big  <= s1_big;
    s2_sign <= s1_sign;
    s2_y    <= s1_sign ? -mag : mag;
  end

  // ---------------- stage 3: split, remainder r = f*ln2 ----------------
  logic          s3_valid, s3_big, s3_sign;
  logic [EW-1:0] s3_e;
  logic [XF-1:0] s3_r;
  always_ff @(posedge clk) begin
    logic [IW-1:0]    xi;
    logic [XF+LF-1:0] rp;
    xi = s2_y[YW-1:XF];                       // floor(y), two's complement
    rp = (XF+LF)'(s2_y[XF-1:0]) * (XF+LF)'(LN2_FIX);
    if (rst) s3_valid <= 1'b0;
    else     s3_valid <= s2_valid;
    s3_big  <= s2_big;
    s3_sign <= s2_sign;
    s3_e    <= EW'($signed(xi)) + EW'(BIAS);
    s3_r    <= XF'(rp >> LF);
  end

  // ---------------- stage 4: table read, polynomial for e^r_lo ----------------
  localparam int LOW = XF - AW;              // bits of r_lo
  logic [XF+1:0] tab;                        // e^r_hi, 2.XF, from the ROM register
  logic          s4_valid, s4_big, s4_sign;
  logic [EW-1:0] s4_e;
  logic [XF:0]   s4_q;                       // e^r_lo, 1.XF

  exp_rom #(.AW(AW), .FW(XF)) u_rom (
    .clk  (clk),
    .addr (s3_r[XF-1 -: AW]),
    .data (tab)
  );

  // e^r_lo by Horner's rule: q = c0 + r(c1 + r(c2 + ... + r*cP)), c_n = 1/n!.
  logic [XF:0] poly;
  always_comb begin
    logic [2*XF+1:0] t;
    logic [XF:0]     rlo;
    rlo  = (XF+1)'(s3_r[LOW-1:0]);
    poly = inv_fact(PDEG);
    for (int n = PDEG - 1; n >= 0; n--) begin
      t    = (2*XF+2)'(poly) * (2*XF+2)'(rlo);
      poly = inv_fact(n) + (XF+1)'(t >> XF);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) s4_valid <= 1'b0;
    else     s4_valid <= s3_valid;
    s4_big  <= s3_big;
    s4_sign <= s3_sign;
    s4_e    <= s3_e;
    s4_q    <= poly;
  end

  // ---------------- stage 5: e^r_hi * e^r_lo ----------------
  localparam int PW = 2*XF + 3;
  logic          s5_valid, s5_big, s5_sign;
  logic [EW-1:0] s5_e;
  logic [PW-1:0] s5_p;                        // 2XF fraction bits
  always_ff @(posedge clk) begin
    if (rst) s5_valid <= 1'b0;
    else     s5_valid <= s4_valid;
    s5_big  <= s4_big;
    s5_sign <= s4_sign;
    s5_e    <= s4_e;
    s5_p    <= PW'(tab) * PW'(s4_q);
  end

  // ---------------- stage 6: normalise, round, pack ----------------
  logic [EXP_W+FO_W:0] res;
  always_comb begin
    logic [PW-1:0]   p;
    logic [EW-1:0]   e;
    logic [FO_W+1:0] mant;
    p = s5_p;
    e = s5_e;
    if (p[2*XF+1]) begin                      // >= 2 by rounding error
      p = p >> 1;
      e = e + EW'(1);
    end
    mant = {2'b01, p[2*XF-1 -: FO_W]} + (FO_W+2)'(p[2*XF-1-FO_W]);
    if (mant[FO_W+1]) begin
      mant = mant >> 1;
      e    = e + EW'(1);
    end
    if (s5_big)                res = s5_sign ? '0 : {1'b0, {EXP_W{1'b1}}, {FO_W{1'b0}}};
    else if (int'($signed(e)) <= 0)  res = '0;
    else if (int'($signed(e)) >= EMAX) res = {1'b0, {EXP_W{1'b1}}, {FO_W{1'b0}}};
    else                       res = {1'b0, e[EXP_W-1:0], mant[FO_W-1:0]};
  end

  logic                s6_valid;
  logic [EXP_W+FO_W:0] s6_y;
  always_ff @(posedge clk) begin
    if (rst) s6_valid <= 1'b0;
    else     s6_valid <= s5_valid;
    s6_y <= res;
  end

  pipe_delay #(.WIDTH(EXP_W + FO_W + 2), .DEPTH(LATENCY - 6)) u_pad (
    .clk (clk),
    .rst (rst),
    .d   ({s6_valid, s6_y}),
    .q   ({out_valid, y})
  );

endmodule
