// exp_module_tb: self-checking test of the table-polynomial exponential unit.
//
// Arguments in the 37-bit intermediate format (8-bit exponent, 28-bit
// fraction) enter one per cycle, with occasional gaps: uniformly spread over
// [-100, 100] (which crosses both ends of the single-precision range), tiny
// magnitudes down to 2^-40, and the special cases zero, +-200 and +-1e30.
// Each result is compared with exp() of the same argument computed in double
// precision, to within one ulp of single precision; results that leave the
// normal range must be infinity or zero. The latency of every result is checked
// against the specified 21 cycles.
module exp_module_tb;
  import tb_fp_pkg::*;

  localparam int LAT = 21;
  localparam int N   = 4000;
  localparam real SP_MAX = 3.4028234663852886e38;
  localparam real SP_MIN = 1.1754943508222875e-38;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        in_valid;
  logic [36:0] x;
  logic        out_valid;
  logic [31:0] y;

  exp_module dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x(x), .out_valid(out_valid), .y(y)
  );

  int checks = 0, failures = 0;
  int n_inf = 0, n_zero = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { real x; longint t; } job_t;
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
      real  want, got;
      if (q.size() == 0) check(1'b0, "result without a request");
      else begin
        j    = q.pop_front();
        want = $exp(j.x);
        got  = from_fp(64'(y), 8, 23);
        check(cycle - j.t == longint'(LAT), $sformatf("latency %0d", cycle - j.t));
        if (want > SP_MAX * 1.01) begin
          n_inf++;
          check(is_inf(64'(y), 8, 23) && !y[31], $sformatf("exp(%g) should be inf, got %h", j.x, y));
        end else if (want < SP_MIN * 0.99) begin
          n_zero++;
          check(y == '0, $sformatf("exp(%g) should be 0, got %h", j.x, y));
        end else if (want < SP_MAX * 0.99 && want > SP_MIN * 1.01) begin
          check(absr(got - want) <= ulp(want, 23),
                $sformatf("exp(%.10g): got %.10g want %.10g (%.3f ulp)", j.x, got, want,
                          (got - want) / ulp(want, 23)));
        end
      end
    end
  end

  task automatic send(real v);
    job_t j;
    x = 37'(to_fp(v, 8, 28));
    j.x = from_fp(64'(x), 8, 28);
    in_valid = 1'b1;
    @(negedge clk);
    j.t = cycle - 1;   // the edge that sampled the input
    q.push_back(j);
  endtask

  initial begin
    in_valid = 1'b0; x = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      int k;
      k = $urandom_range(0, 39);
      case ($urandom % 4)
        0, 1: send(urand(-100.0, 100.0));
        2:    send(urand(-10.0, 10.0));
        default: send(urand(-1.0, 1.0) / (2.0 ** k));
      endcase
      if ($urandom % 10 == 0) begin in_valid = 1'b0; @(negedge clk); end
    end
    send(0.0);
    send(1.0);
    send(-1.0);
    send(200.0);
    send(-200.0);
    send(1.0e30);
    send(-1.0e30);
    send(88.7);
    send(-87.3);
    in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    check(q.size() == 0, "results missing");
    check(n_inf > 0 && n_zero > 0, "range limits not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
