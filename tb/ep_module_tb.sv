// ep_module_tb: end-to-end test of one EP core, S = sum_i C_i * exp(-alpha_i * r^2).
//
// Sends orbital sums of random length (1 to 32 terms) with C_i in +-[0.1, 4),
// alpha_i in [0.05, 30) and r^2 in [0, 5), so that some terms underflow to
// zero in the exponential. Sums follow each other back to back or after idle
// cycles, and terms inside a sum come every cycle or with gaps. Each result is
// compared with the same sum computed in double precision from the same
// single-precision inputs; the allowed error is one ulp of the result plus
// four single-precision ulps of the sum of the terms' magnitudes (the error of
// the exp unit, the two multipliers and the accumulator together), plus the
// terms lost by flushing values below the normal range to zero. The latency
// from the last term to the result is checked: 2*4 + 21 + 8 = 37 cycles.
module ep_module_tb;
  import tb_fp_pkg::*;

  localparam int LAT    = 37;
  localparam int FRAMES = 400;
  localparam real SP_MIN = 1.1754943508222875e-38;   // smallest normal value

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        in_valid, in_first, in_last;
  logic [31:0] ci, r2, alpha;
  logic        out_valid;
  logic [31:0] out_sum;

  ep_module dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_first(in_first), .in_last(in_last),
    .ci(ci), .r2(r2), .alpha(alpha), .out_valid(out_valid), .out_sum(out_sum)
  );

  int checks = 0, failures = 0;
  int n_single = 0, n_b2b = 0, n_gap = 0, n_under = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { real sum; real mag; int n; longint t; } job_t;
  job_t q[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      job_t j;
      real  got, tol;
      if (q.size() == 0) check(1'b0, "result without a sum");
      else begin
        j   = q.pop_front();
        got = from_fp(64'(out_sum), 8, 23);
        // results and terms below the normal range are flushed to zero
        tol = ulp(j.sum, 23) + 4.0 * j.mag / (2.0 ** 23) + real'(j.n) * 8.0 * SP_MIN;
        check(cycle - j.t == longint'(LAT), $sformatf("latency %0d", cycle - j.t));
        check(absr(got - j.sum) <= tol,
              $sformatf("sum of %0d: got %.10g want %.10g", j.n, got, j.sum));
      end
    end
  end

  task automatic term(real c, real r, real a, bit first, bit last, inout job_t j);
    real cq, rq, aq, t;
    ci       = 32'(to_fp(c, 8, 23));
    r2       = 32'(to_fp(r, 8, 23));
    alpha    = 32'(to_fp(a, 8, 23));
    in_first = first;
    in_last  = last;
    in_valid = 1'b1;
    cq = from_fp(64'(ci), 8, 23);
    rq = from_fp(64'(r2), 8, 23);
    aq = from_fp(64'(alpha), 8, 23);
    if (aq * rq > 87.0) n_under++;
    t = cq * $exp(-aq * rq);
    j.sum = j.sum + t;
    j.mag = j.mag + absr(t);
    @(negedge clk);
    if (last) j.t = cycle - 1;   // the edge that sampled the last term
    in_valid = 1'b0;
    in_first = 1'b0;
    in_last  = 1'b0;
  endtask

  initial begin
    in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
    ci = '0; r2 = '0; alpha = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      job_t j;
      int   n;
      bit   gaps;
      n    = $urandom_range(1, 32);
      gaps = ($urandom % 4 == 0);
      j.sum = 0.0; j.mag = 0.0; j.n = n;
      if (n == 1) n_single++;
      if (gaps)   n_gap++;
      for (int i = 0; i < n; i++) begin
        real c;
        c = urand(0.1, 4.0);
        if ($urandom % 2 == 1) c = -c;
        term(c, urand(0.0, 5.0), urand(0.05, 30.0), i == 0, i == n - 1, j);
        if (gaps && $urandom % 2 == 1) @(negedge clk);
      end
      q.push_back(j);
      if ($urandom % 3 == 0) repeat ($urandom_range(1, 50)) @(negedge clk);
      else n_b2b++;
    end
    repeat (LAT + 4) @(negedge clk);
    check(q.size() == 0, "results missing");
    check(n_single > 0 && n_b2b > 0 && n_gap > 0 && n_under > 0, "a case was never exercised");
    $display("single=%0d back_to_back=%0d with_gaps=%0d underflowing_terms=%0d",
             n_single, n_b2b, n_gap, n_under);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * 100 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
