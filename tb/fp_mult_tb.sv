// fp_mult_tb: self-checking test of the truncated floating-point multiplier.
//
// Two instances are tested side by side, in the two roles the EP core uses:
// single x single -> 37-bit intermediate word (28 fraction bits) and
// single x single -> single. Random operands of both signs and a wide exponent
// spread enter every cycle, followed by zero, overflow and underflow cases.
// Each product is compared with the exact product of the operands (computed in
// double precision) to within one ulp of the output format, and the latency of
// every result is checked against the specified 4 cycles.
module fp_mult_tb;
  import tb_fp_pkg::*;

  localparam int LAT = 4;
  localparam int N   = 3000;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        in_valid;
  logic [31:0] a, b;
  logic        v0, v1;
  logic [36:0] p0;
  logic [31:0] p1;

  fp_mult u_mid (
    .clk(clk), .rst(rst), .in_valid(in_valid), .a(a), .b(b), .out_valid(v0), .p(p0)
  );
  fp_mult #(.FO_W(23)) u_sp (
    .clk(clk), .rst(rst), .in_valid(in_valid), .a(a), .b(b), .out_valid(v1), .p(p1)
  );

  int  checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { real a; real b; longint t; int kind; } job_t;  // kind 0 normal, 1 zero, 2 inf
  job_t q[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // Compare one output word against the expected job.
  task automatic compare(job_t j, logic [63:0] w, int fw, string tag);
    real exp_v, got;
    exp_v = j.a * j.b;
    got   = from_fp(w, 8, fw);
    if (j.kind == 1)
      check(got == 0.0, $sformatf("%s zero: got %g", tag, got));
    else if (j.kind == 2)
      check(is_inf(w, 8, fw), $sformatf("%s overflow: got %h", tag, w));
    else
      check(absr(got - exp_v) <= ulp(exp_v, fw),
            $sformatf("%s %g*%g: got %.12g want %.12g", tag, j.a, j.b, got, exp_v));
  endtask

  // Outputs are checked as they arrive; both instances run in step.
  always @(posedge clk) begin
    if (!rst && v0) begin
      job_t j;
      if (q.size() == 0) check(1'b0, "result without a request");
      else begin
        j = q.pop_front();
        check(cycle - j.t == longint'(LAT), $sformatf("latency %0d", cycle - j.t));
        check(v1, "instances out of step");
        compare(j, 64'(p0), 28, "mid");
        compare(j, 64'(p1), 23, "sp");
      end
    end
  end

  task automatic send(real x, real y, int kind);
    job_t j;
    a = 32'(to_fp(x, 8, 23));
    b = 32'(to_fp(y, 8, 23));
    j.a = from_fp(64'(a), 8, 23);
    j.b = from_fp(64'(b), 8, 23);
    j.kind = kind;
    in_valid = 1'b1;
    @(negedge clk);
    j.t = cycle - 1;   // the edge that sampled the inputs
    q.push_back(j);
  endtask

  initial begin
    in_valid = 1'b0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      real x, y;
      x = urand(1.0, 2.0) * (2.0 ** ($signed($urandom % 61) - 30));
      y = urand(1.0, 2.0) * (2.0 ** ($signed($urandom % 61) - 30));
      if ($urandom % 2 == 1) x = -x;
      if ($urandom % 2 == 1) y = -y;
      send(x, y, 0);
      if ($urandom % 8 == 0) begin in_valid = 1'b0; @(negedge clk); end
    end
    send(0.0, 3.5, 1);
    send(-7.25, 0.0, 1);
    send(1.0e30, 1.0e20, 2);
    send(-1.0e-30, 1.0e-20, 1);
    send(1.5, 1.0, 0);          // exact
    send(1.9999999, 1.9999999, 0);
    in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    check(q.size() == 0, "results missing");
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
