// ep_dp_tb: the EP datapath built for double precision.
//
// The same sources are elaborated with an 11-bit exponent and 52-bit fraction,
// the published double-precision latencies (multiplier 5, exp 30, accumulator
// 10 cycles), a 69-bit intermediate word and a larger exp table and polynomial
// (1024 entries, degree 4). Two units are checked:
//   - the exponential alone, over [-700, 700] and small arguments, against
//     exp() in double precision, to within 2 ulp (the reference itself may be
//     off by half an ulp), with overflow and underflow cases and its 30-cycle
//     latency;
//   - the whole EP core on random orbital sums of 1 to 16 terms, against the
//     double-precision sum, to within one ulp of the result plus eight ulps of
//     the sum of the terms' magnitudes (and the reference's own rounding of
//     alpha*r^2), with its 5+30+5+10 = 50-cycle latency.
module ep_dp_tb;
  import tb_fp_pkg::*;

  localparam int EW = 11, FW = 52, MW = 69, MF = MW - 1 - EW;
  localparam int EXP_LAT = 30;
  localparam int EP_LAT  = 2 * 5 + 30 + 10;
  localparam int N_EXP   = 2000;
  localparam int FRAMES  = 150;
  localparam real DP_MIN = 2.2250738585072014e-308;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // ---------------- exp unit ----------------
  logic          x_valid, y_valid;
  logic [MW-1:0] x;
  logic [63:0]   y;

  exp_module #(
    .EXP_W(EW), .FI_W(MF), .FO_W(FW), .AW(10), .PDEG(4), .XF(60), .LATENCY(EXP_LAT)
  ) u_exp (
    .clk(clk), .rst(rst), .in_valid(x_valid), .x(x), .out_valid(y_valid), .y(y)
  );

  typedef struct { real x; longint t; } xjob_t;
  xjob_t xq[$];
  int    n_inf = 0, n_zero = 0;

  always @(posedge clk) begin
    if (!rst && y_valid) begin
      xjob_t j;
      real   want, got;
      if (xq.size() == 0) check(1'b0, "exp result without a request");
      else begin
        j = xq.pop_front();
        check(cycle - j.t == longint'(EXP_LAT), $sformatf("exp latency %0d", cycle - j.t));
        if (j.x > 709.8) begin
          n_inf++;
          check(is_inf(128'(y), EW, FW), $sformatf("exp(%g) should be inf", j.x));
        end else if (j.x < -708.5) begin
          n_zero++;
          check(y == '0, $sformatf("exp(%g) should be 0", j.x));
        end else if (j.x < 709.0 && j.x > -707.0) begin
          want = $exp(j.x);
          got  = from_fp(128'(y), EW, FW);
          check(absr(got - want) <= 2.0 * ulp(want, FW),
                $sformatf("exp(%.17g): got %.17g want %.17g (%.2f ulp)", j.x, got, want,
                          (got - want) / ulp(want, FW)));
        end
      end
    end
  end

  task automatic send_x(real v);
    xjob_t j;
    x = MW'(to_fp(v, EW, MF));
    j.x = from_fp(128'(x), EW, MF);
    x_valid = 1'b1;
    @(negedge clk);
    j.t = cycle - 1;
    xq.push_back(j);
    x_valid = 1'b0;
  endtask

  // ---------------- EP core ----------------
  logic        t_valid, t_first, t_last, s_valid;
  logic [63:0] ci, r2, alpha, s;

  ep_module #(
    .EXP_W(EW), .FRAC_W(FW), .MID_W(MW), .MUL_LAT(5), .EXP_LAT(30), .ACC_LAT(10),
    .EXP_AW(10), .EXP_DEG(4)
  ) u_ep (
    .clk(clk), .rst(rst), .in_valid(t_valid), .in_first(t_first), .in_last(t_last),
    .ci(ci), .r2(r2), .alpha(alpha), .out_valid(s_valid), .out_sum(s)
  );

  typedef struct { real sum; real mag; real arg; int n; longint t; } sjob_t;
  sjob_t sq[$];

  always @(posedge clk) begin
    if (!rst && s_valid) begin
      sjob_t j;
      real   got, tol;
      if (sq.size() == 0) check(1'b0, "sum without a request");
      else begin
        j   = sq.pop_front();
        got = from_fp(128'(s), EW, FW);
        // The reference rounds alpha*r^2 to 53 bits before exp(), which the
        // core does not: that costs the reference |alpha*r^2| * 2^-53 relative.
        tol = ulp(j.sum, FW) + 8.0 * j.mag / (2.0 ** FW) + j.arg / (2.0 ** 52)
              + real'(j.n) * 8.0 * DP_MIN;
        check(cycle - j.t == longint'(EP_LAT), $sformatf("EP latency %0d", cycle - j.t));
        check(absr(got - j.sum) <= tol,
              $sformatf("sum of %0d: got %.17g want %.17g", j.n, got, j.sum));
      end
    end
  end

  initial begin
    x_valid = 1'b0; x = '0;
    t_valid = 1'b0; t_first = 1'b0; t_last = 1'b0; ci = '0; r2 = '0; alpha = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    fork
      begin
        for (int i = 0; i < N_EXP; i++) begin
          int k;
          k = $urandom_range(0, 60);
          case ($urandom % 3)
            0:       send_x(urand(-720.0, 720.0));
            1:       send_x(urand(-20.0, 20.0));
            default: send_x(urand(-1.0, 1.0) / (2.0 ** k));
          endcase
        end
        send_x(0.0);
        send_x(1.0e300);
        send_x(-1.0e300);
      end
      begin
        for (int f = 0; f < FRAMES; f++) begin
          sjob_t j;
          int    n;
          n = $urandom_range(1, 16);
          j.sum = 0.0; j.mag = 0.0; j.arg = 0.0; j.n = n;
          for (int i = 0; i < n; i++) begin
            real cv, t, a_r2;
            cv = urand(0.1, 4.0);
            if ($urandom % 2 == 1) cv = -cv;
            ci    = 64'(to_fp(cv, EW, FW));
            r2    = 64'(to_fp(urand(0.0, 5.0), EW, FW));
            alpha = 64'(to_fp(urand(0.05, 30.0), EW, FW));
            a_r2  = from_fp(128'(alpha), EW, FW) * from_fp(128'(r2), EW, FW);
            t     = from_fp(128'(ci), EW, FW) * $exp(-a_r2);
            j.sum = j.sum + t;
            j.mag = j.mag + absr(t);
            j.arg = j.arg + absr(t) * a_r2;
            t_valid = 1'b1;
            t_first = (i == 0);
            t_last  = (i == n - 1);
            @(negedge clk);
            if (i == n - 1) j.t = cycle - 1;
          end
          t_valid = 1'b0; t_first = 1'b0; t_last = 1'b0;
          sq.push_back(j);
          if ($urandom % 2 == 1) @(negedge clk);
        end
      end
    join
    repeat (EP_LAT + 4) @(negedge clk);
    check(xq.size() == 0 && sq.size() == 0, "results missing");
    check(n_inf > 0 && n_zero > 0, "exp range limits not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_EXP + FRAMES * 20 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
