// fp_acc_tb: self-checking test of the pipelined floating-point accumulator.
//
// Sends framed sums of random length (1 to 24 words) of random single-precision
// words of both signs spread over 2^-12 .. 2^12. Sums follow each other back to
// back or after idle cycles, words inside a sum come every cycle or with gaps,
// and some sums cancel exactly to zero. Each result is compared with the sum of
// the same words in double precision; the allowed error is one single-precision
// ulp of the result plus the truncation of the internal 32-bit mantissa (one
// internal ulp of the largest partial sum per addition). The latency from the
// last word of a sum to its result is checked against the specified 8 cycles.
module fp_acc_tb;
  import tb_fp_pkg::*;

  localparam int LAT    = 8;
  localparam int FRAMES = 600;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        in_valid, in_first, in_last;
  logic [31:0] in_data;
  logic        out_valid;
  logic [31:0] out_sum;

  fp_acc dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_first(in_first), .in_last(in_last),
    .in_data(in_data), .out_valid(out_valid), .out_sum(out_sum)
  );

  int checks = 0, failures = 0;
  int n_single = 0, n_b2b = 0, n_gap = 0, n_cancel = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { real sum; real big; int n; longint t; } job_t;
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
        tol = ulp(j.sum, 23) + real'(j.n) * j.big / (2.0 ** 31);
        check(cycle - j.t == longint'(LAT), $sformatf("latency %0d", cycle - j.t));
        check(absr(got - j.sum) <= tol,
              $sformatf("sum of %0d: got %.10g want %.10g", j.n, got, j.sum));
      end
    end
  end

  task automatic word(real v, bit first, bit last, inout job_t j);
    real w;
    in_data  = 32'(to_fp(v, 8, 23));
    in_first = first;
    in_last  = last;
    in_valid = 1'b1;
    w        = from_fp(64'(in_data), 8, 23);
    j.sum    = j.sum + w;
    if (absr(j.sum) > j.big) j.big = absr(j.sum);
    if (absr(w) > j.big)     j.big = absr(w);
    @(negedge clk);
    if (last) j.t = cycle - 1;   // the edge that sampled the last word
    in_valid = 1'b0;
    in_first = 1'b0;
    in_last  = 1'b0;
  endtask

  initial begin
    in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0; in_data = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      job_t j;
      int   n;
      bit   cancel, gaps;
      n      = $urandom_range(1, 24);
      cancel = ($urandom % 8 == 0) && (n >= 2);
      gaps   = ($urandom % 4 == 0);
      if (cancel) n = n & ~1;
      j.sum = 0.0; j.big = 0.0; j.n = n;
      if (n == 1) n_single++;
      if (cancel) n_cancel++;
      if (gaps)   n_gap++;
      for (int i = 0; i < n; i++) begin
        real v;
        int  k;
        k = $urandom_range(0, 24);
        v = urand(1.0, 2.0) * (2.0 ** (k - 12));
        if ($urandom % 2 == 1) v = -v;
        if (cancel) begin
          word(v, i == 0, 1'b0, j);
          word(-v, 1'b0, i + 2 == n, j);
          i++;
        end else begin
          word(v, i == 0, i == n - 1, j);
        end
        if (gaps && $urandom % 2 == 1) @(negedge clk);
      end
      q.push_back(j);
      if ($urandom % 3 == 0) repeat ($urandom_range(1, 12)) @(negedge clk);
      else n_b2b++;
    end
    repeat (LAT + 4) @(negedge clk);
    check(q.size() == 0, "results missing");
    check(n_single > 0 && n_b2b > 0 && n_gap > 0 && n_cancel > 0, "a case was never exercised");
    $display("single=%0d back_to_back=%0d with_gaps=%0d cancelling=%0d",
             n_single, n_b2b, n_gap, n_cancel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * 80 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
