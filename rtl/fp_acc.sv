// fp_acc: pipelined floating-point accumulator taking one addend per clock.
//
// Sums a stream of floating-point words framed by in_first (the word starts a
// new sum) and in_last (the word ends it) and returns each finished sum as a
// standard word. The published accumulator is described only as a fully
// pipelined, mixed-precision unit that accepts one datum per cycle; this is
// the simplest structure that does that, and its insides are this design's
// own choice.
//
// How it works: the running sum is held in a wider format than the words it
// adds: a signed mantissa with GUARD extra fraction bits and its own exponent
// ("mixed precision"). Stage 1 decodes the incoming word into that format.
// Stage 2 is the only feedback loop: in a single cycle it aligns the smaller
// operand to the larger exponent (bits shifted out are dropped), adds, and
// renormalises with a leading-one search, so a new addend can enter every
// cycle without the read-after-write hazard a multi-cycle adder would have.
// Stage 3 rounds the finished sum to FRAC_W fraction bits (to nearest, ties
// away from zero) and packs it. The remaining LATENCY-3 cycles are a delay line
// that gives the specified latency (8 cycles in the single-precision build).
//
// Special values (this design's choice): an exponent field of zero reads as
// zero; sums below the normal range are flushed to zero; sums above it
// saturate to infinity. Infinity and NaN inputs are not treated specially.
//
// Interface and timing: in_valid qualifies a word; in_first/in_last are only
// looked at with in_valid and may both be set for a one-word sum. Gaps between
// words are allowed, and a new sum may start the cycle after the previous one
// ended. out_valid pulses with out_sum LATENCY cycles after the in_last word.
module fp_acc #(
  parameter int EXP_W   = ep_pkg::SP_EXP_W,
  parameter int FRAC_W  = ep_pkg::SP_FRAC_W,
  parameter int GUARD   = 8,
  parameter int LATENCY = ep_pkg::SP_ACC_LAT
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic                  in_first,
  input  logic                  in_last,
  input  logic [EXP_W+FRAC_W:0] in_data,
  output logic                  out_valid,
  output logic [EXP_W+FRAC_W:0] out_sum
);
  localparam int MW   = FRAC_W + GUARD + 1;   // normalised magnitude bits
  localparam int SW   = MW + 2;               // signed mantissa, one carry bit
  localparam int EW   = EXP_W + 2;            // signed exponent
  localparam int EMAX = (1 << EXP_W) - 1;

  if (LATENCY < 3) begin : g_bad_latency
    $error("fp_acc: LATENCY must be at least 3");
  end

  // ---------------- stage 1: decode the addend ----------------
  logic          s1_valid, s1_first, s1_last, s1_zero;
  logic [EW-1:0] s1_e;
  logic [SW-1:0] s1_m;
  always_ff @(posedge clk) begin
    logic [SW-1:0] mag;
    mag = SW'({1'b1, in_data[FRAC_W-1:0]}) << GUARD;
    if (rst) s1_valid <= 1'b0;
    else     s1_valid <= in_valid;
    s1_first <= in_first;
    s1_last  <= in_last;
    s1_zero  <= (in_data[EXP_W+FRAC_W-1:FRAC_W] == '0);
    s1_e     <= EW'(in_data[EXP_W+FRAC_W-1:FRAC_W]);
    s1_m     <= in_data[EXP_W+FRAC_W] ? -mag : mag;
  end

  // ---------------- stage 2: align, add, renormalise (the loop) ----------------
  logic          acc_zero;
  logic [EW-1:0] acc_e;
  logic [SW-1:0] acc_m;
  logic          acc_done;      // acc holds a finished sum this cycle

  logic          nx_zero;
  logic [EW-1:0] nx_e;
  logic [SW-1:0] nx_m;

  always_comb begin
    logic          a_zero;
    logic [EW-1:0] e;
    logic [SW-1:0] ma, mb, sum, mag;
    int            diff, lead;

    a_zero = s1_first || acc_zero;
    nx_zero = 1'b0;
    nx_e    = acc_e;
    nx_m    = acc_m;
    e       = acc_e;
    ma      = acc_m;
    mb      = s1_m;
    sum     = '0;
    mag     = '0;
    lead    = 0;
    diff    = 0;
    if (a_zero && s1_zero) begin
      nx_zero = 1'b1;
      nx_e    = '0;
      nx_m    = '0;
    end else if (a_zero) begin
      nx_e = s1_e;
      nx_m = s1_m;
    end else if (s1_zero) begin
      nx_zero = acc_zero;
    end else begin
      if ($signed(acc_e) >= $signed(s1_e)) begin
        diff = int'($signed(acc_e)) - int'($signed(s1_e));
        e    = acc_e;
        mb   = (diff >= SW) ? '0 : SW'($signed(s1_m) >>> diff);
        ma   = acc_m;
      end else begin
        diff = int'($signed(s1_e)) - int'($signed(acc_e));
        e    = s1_e;
        ma   = (diff >= SW) ? '0 : SW'($signed(acc_m) >>> diff);
        mb   = s1_m;
      end
      sum = ma + mb;
      mag = sum[SW-1] ? -sum : sum;
      for (int i = 0; i < SW - 1; i++) if (mag[i]) lead = i;
      if (mag == '0) begin
        nx_zero = 1'b1;
        nx_e    = '0;
        nx_m    = '0;
      end else begin
        // place the leading one at bit MW-1
        if (lead >= MW - 1) begin
          mag = mag >> (lead - (MW - 1));
          e   = e + EW'(lead - (MW - 1));
        end else begin
          mag = mag << ((MW - 1) - lead);
          e   = e - EW'((MW - 1) - lead);
        end
        if ($signed(e) <= 0) begin
          nx_zero = 1'b1;
          nx_e    = '0;
          nx_m    = '0;
        end else begin
          if ($signed(e) > EW'(EMAX)) e = EW'(EMAX);
          nx_e = e;
          nx_m = sum[SW-1] ? -mag : mag;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_zero <= 1'b1;
      acc_e    <= '0;
      acc_m    <= '0;
      acc_done <= 1'b0;
    end else begin
      acc_done <= s1_valid && s1_last;
      if (s1_valid) begin
        acc_zero <= nx_zero;
        acc_e    <= nx_e;
        acc_m    <= nx_m;
      end
    end
  end

  // ---------------- stage 3: round and pack the finished sum ----------------
  logic [EXP_W+FRAC_W:0] packed_sum;
  always_comb begin
    logic [SW-1:0]     mag;
    logic [FRAC_W+1:0] mant;
    logic [EW-1:0]     e;
    logic              sgn;
    sgn  = acc_m[SW-1];
    mag  = sgn ? -acc_m : acc_m;
    e    = acc_e;
    mant = {1'b0, mag[MW-1:GUARD]} + (FRAC_W+2)'(mag[GUARD-1]);
    if (mant[FRAC_W+1]) begin
      mant = mant >> 1;
      e    = e + EW'(1);
    end
    if (acc_zero)
      packed_sum = '0;
    else if (int'($signed(e)) >= EMAX)
      packed_sum = {sgn, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    else
      packed_sum = {sgn, e[EXP_W-1:0], mant[FRAC_W-1:0]};
  end

  logic                  s3_valid;
  logic [EXP_W+FRAC_W:0] s3_sum;
  always_ff @(posedge clk) begin
    if (rst) s3_valid <= 1'b0;
    else     s3_valid <= acc_done;
    s3_sum <= packed_sum;
  end

  pipe_delay #(.WIDTH(EXP_W + FRAC_W + 2), .DEPTH(LATENCY - 3)) u_pad (
    .clk (clk),
    .rst (rst),
    .d   ({s3_valid, s3_sum}),
    .q   ({out_valid, out_sum})
  );

endmodule
