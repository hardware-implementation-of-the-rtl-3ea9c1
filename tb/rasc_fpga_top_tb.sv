// rasc_fpga_top_tb: end-to-end test of one accelerator FPGA with two EP cores.
//
// The testbench plays the three SRAM banks and the host. MEM0 and MEM1 are
// modelled as arrays that answer each read request RD_LAT cycles later; MEM2
// records every write. Each operation fills both input banks with random terms
// (C_i, r^2, alpha_i packed in one 128-bit word), pulses start and waits for
// done, then compares every result word in MEM2 with the orbital sums worked out
// in double precision. It runs with the top's default parameters.
//
// Operations: a multi-term run (sums back to back in both cores), a run of
// one-term sums (every word both starts and ends a sum), and an empty run
// (n_sums = 0, which must finish at once). A start pulse during a run must be
// ignored. The time from start to done is checked against
// n_terms*n_sums + RD_LAT + 37 (EP latency) + 3 cycles of control, and each
// mechanism above is counted; one that never happened counts as a failure.
module rasc_fpga_top_tb;
  import tb_fp_pkg::*;

  localparam int RD_LAT  = 3;
  localparam int EP_LAT  = 37;
  localparam real SP_MIN = 1.1754943508222875e-38;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic                 start, busy, done;
  logic [19:0]          n_terms;
  logic [18:0]          n_sums;
  logic [1:0]           mem_rd_en, mem_rd_valid;
  logic [1:0][19:0]     mem_rd_addr;
  logic [1:0][127:0]    mem_rd_data;
  logic                 mem2_wr_en;
  logic [18:0]          mem2_wr_addr;
  logic [127:0]         mem2_wr_data;

  rasc_fpga_top dut (
    .clk(clk), .rst(rst), .start(start), .n_terms(n_terms), .n_sums(n_sums),
    .busy(busy), .done(done),
    .mem_rd_en(mem_rd_en), .mem_rd_addr(mem_rd_addr), .mem_rd_valid(mem_rd_valid),
    .mem_rd_data(mem_rd_data),
    .mem2_wr_en(mem2_wr_en), .mem2_wr_addr(mem2_wr_addr), .mem2_wr_data(mem2_wr_data)
  );

  // ---------------- SRAM models ----------------
  logic [127:0] mem  [2][int];
  logic [127:0] mem2 [int];
  int           n_writes = 0;

  logic [1:0]        pipe_v [RD_LAT];
  logic [1:0][127:0] pipe_d [RD_LAT];
  always_ff @(posedge clk) begin
    for (int m = 0; m < 2; m++) begin
      pipe_v[0][m] <= mem_rd_en[m];
      pipe_d[0][m] <= mem_rd_en[m] ? (mem[m].exists(int'(mem_rd_addr[m])) ?
                                      mem[m][int'(mem_rd_addr[m])] : '0) : '0;
    end
    for (int i = 1; i < RD_LAT; i++) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
  end
  always @(posedge clk) begin
    if (mem2_wr_en) begin
      mem2[int'(mem2_wr_addr)] = mem2_wr_data;
      n_writes++;
    end
  end
  assign mem_rd_valid = rst ? 2'b00 : pipe_v[RD_LAT-1];
  assign mem_rd_data  = pipe_d[RD_LAT-1];

  // ---------------- checking ----------------
  int checks = 0, failures = 0;
  int n_multi = 0, n_single = 0, n_empty = 0, n_ignored = 0, n_sums_checked = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  real ref_sum [2][int];
  real ref_mag [2][int];

  task automatic run(int terms, int sums);
    longint t0, t_done;
    int     w0;
    // fill both banks and work out the expected sums
    for (int m = 0; m < 2; m++) begin
      for (int s = 0; s < sums; s++) begin
        ref_sum[m][s] = 0.0;
        ref_mag[m][s] = 0.0;
        for (int i = 0; i < terms; i++) begin
          logic [31:0] c, r, a;
          real         t, cv;
          cv = urand(0.1, 4.0);
          if ($urandom % 2 == 1) cv = -cv;
          c = 32'(to_fp(cv, 8, 23));
          r = 32'(to_fp(urand(0.0, 5.0), 8, 23));
          a = 32'(to_fp(urand(0.05, 30.0), 8, 23));
          mem[m][s * terms + i] = {32'h0, a, r, c};
          t = from_fp(64'(c), 8, 23) *
              $exp(-from_fp(64'(a), 8, 23) * from_fp(64'(r), 8, 23));
          ref_sum[m][s] = ref_sum[m][s] + t;
          ref_mag[m][s] = ref_mag[m][s] + absr(t);
        end
      end
    end
    w0 = n_writes;
    n_terms = 20'(terms);
    n_sums  = 19'(sums);
    start   = 1'b1;
    @(negedge clk);
    t0    = cycle - 1;
    start = 1'b0;
    if (sums == 0) begin
      check(done && !busy, "empty run did not finish at once");
      n_empty++;
      return;
    end
    check(busy, "busy after start");
    // a second start during the run must be ignored
    repeat (2) @(negedge clk);
    n_terms = 20'd3;
    n_sums  = 19'd1;
    start   = 1'b1;
    @(negedge clk);
    start   = 1'b0;
    n_ignored++;
    while (!done && cycle - t0 < longint'(terms * sums + 200)) @(negedge clk);
    check(done, "run never finished");
    t_done = cycle - 1;
    check(!busy, "busy after done");
    check(t_done - t0 <= longint'(terms * sums + RD_LAT + EP_LAT + 3),
          $sformatf("run took %0d cycles", t_done - t0));
    check(n_writes - w0 == sums, $sformatf("%0d results written, %0d expected", n_writes - w0, sums));
    for (int s = 0; s < sums; s++) begin
      for (int m = 0; m < 2; m++) begin
        real got, tol;
        got = from_fp(64'(mem2[s][32*m +: 32]), 8, 23);
        tol = ulp(ref_sum[m][s], 23) + 4.0 * ref_mag[m][s] / (2.0 ** 23)
              + real'(terms) * 8.0 * SP_MIN;
        check(absr(got - ref_sum[m][s]) <= tol,
              $sformatf("core %0d sum %0d: got %.10g want %.10g", m, s, got, ref_sum[m][s]));
        n_sums_checked++;
      end
      check(mem2[s][127:64] == '0, "unused result bits");
    end
    if (terms == 1) n_single++; else n_multi++;
  endtask

  initial begin
    start = 1'b0; n_terms = '0; n_sums = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    run(12, 40);
    repeat (5) @(negedge clk);
    run(1, 25);
    repeat (5) @(negedge clk);
    run(5, 0);
    repeat (5) @(negedge clk);
    run(33, 7);
    check(n_multi > 0 && n_single > 0 && n_empty > 0 && n_ignored > 0, "a case was never exercised");
    $display("multi_term_runs=%0d single_term_runs=%0d empty_runs=%0d ignored_starts=%0d sums_checked=%0d",
             n_multi, n_single, n_empty, n_ignored, n_sums_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
