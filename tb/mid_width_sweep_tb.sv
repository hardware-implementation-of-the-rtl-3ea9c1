// mid_width_sweep_tb: error of the exp unit against the width of the word
// between the first multiplier and the exp unit.
//
// The EP core's first multiplier (alpha * r^2) hands its product to the exp
// unit in a non-standard word whose width is a design parameter; 37 bits is
// the default. This testbench builds the multiplier + exp pair for widths of
// 32 to 38 bits side by side (an 8-bit exponent and 23 to 29 fraction bits),
// feeds all of them the same single-precision alpha in [0.05, 30) and r^2 in
// [0, 5), and measures the mean square error of e^(-alpha*r^2) in
// single-precision ulps against the double-precision value. It prints the
// curve and checks that the error does not grow with the width, that 37 bits
// stays below 0.5 ulp^2, and that the widest word is clearly better than the
// narrowest. Latency: 4 + 21 cycles for every width.
module mid_width_sweep_tb;
  import tb_fp_pkg::*;

  localparam int NW  = 7;          // widths 32 .. 38
  localparam int LAT = 4 + 21;
  localparam int N   = 20000;
  localparam real SP_MIN = 1.1754943508222875e-38;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        in_valid;
  logic [31:0] alpha, r2;
  logic [NW-1:0]      y_valid;
  logic [NW-1:0][31:0] y;

  for (genvar w = 0; w < NW; w++) begin : g_w
    localparam int MF = 32 + w - 9;
    logic          m_valid;
    logic [MF+8:0] m_p;
    fp_mult #(.FO_W(MF)) u_mult (
      .clk(clk), .rst(rst), .in_valid(in_valid), .a({~alpha[31], alpha[30:0]}), .b(r2),
      .out_valid(m_valid), .p(m_p)
    );
    exp_module #(.FI_W(MF)) u_exp (
      .clk(clk), .rst(rst), .in_valid(m_valid), .x(m_p), .out_valid(y_valid[w]), .y(y[w])
    );
  end

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { real want; longint t; } job_t;
  job_t q[$];
  real  sq_err [NW];
  int   n_used = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (!rst && y_valid[0]) begin
      job_t j;
      if (q.size() == 0) check(1'b0, "result without a request");
      else begin
        j = q.pop_front();
        check(cycle - j.t == longint'(LAT), $sformatf("latency %0d", cycle - j.t));
        check(&y_valid, "widths out of step");
        if (j.want > SP_MIN * 2.0) begin
          n_used++;
          for (int w = 0; w < NW; w++) begin
            real e;
            e = (from_fp(128'(y[w]), 8, 23) - j.want) / ulp(j.want, 23);
            sq_err[w] = sq_err[w] + e * e;
          end
        end
      end
    end
  end

  initial begin
    real mse [NW];
    for (int w = 0; w < NW; w++) sq_err[w] = 0.0;
    in_valid = 1'b0; alpha = '0; r2 = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      job_t j;
      alpha = 32'(to_fp(urand(0.05, 30.0), 8, 23));
      r2    = 32'(to_fp(urand(0.0, 5.0), 8, 23));
      j.want = $exp(-from_fp(128'(alpha), 8, 23) * from_fp(128'(r2), 8, 23));
      in_valid = 1'b1;
      @(negedge clk);
      j.t = cycle - 1;
      q.push_back(j);
    end
    in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    check(q.size() == 0, "results missing");
    for (int w = 0; w < NW; w++) begin
      mse[w] = sq_err[w] / real'(n_used);
      $display("interface width %0d bits: mean square error %.3f ulp^2 (%0d samples)",
               32 + w, mse[w], n_used);
    end
    for (int w = 1; w < NW; w++)
      check(mse[w] <= mse[w-1] * 1.05 + 0.01,
            $sformatf("error grows from %0d to %0d bits", 31 + w, 32 + w));
    check(mse[5] < 0.5, "37-bit interface above 0.5 ulp^2");
    check(mse[NW-1] < mse[0] / 4.0, "width has too little effect");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
