// ep_module: the exponential-product (EP) core, a fully pipelined unit that
// evaluates the finite sum  S = sum_i C_i * exp(-alpha_i * r^2),  the radial
// part of a Gaussian-type orbital function, one term per clock.
//
// Structure (as in the published block diagram):
//   mult0 (alfa_r_2_mult): -alpha_i * r^2, widened to the 37-bit intermediate
//                          word (sign, 8-bit exponent, 28-bit fraction), the
//                          width found to keep the exp unit's error small;
//   exp_module:            e^(-alpha_i * r^2), returned as a standard word;
//   mult1 (Ci_mult):       C_i * e^(...);
//   ACC:                   sums the products of one orbital.
// C_i travels beside the first two units in a delay line, and the frame
// markers travel beside all three, so the accumulator sees them with the
// term they belong to.
//
// The widths are parameters so that the same source builds anything from
// single to double precision; the defaults are the single-precision build
// with the published component latencies (4, 21 and 8 cycles). A
// double-precision build sets EXP_W = 11, FRAC_W = 52, MID_W = 69, the
// published latencies 5, 30 and 10, and a larger exp table and polynomial
// (EXP_AW = 10, EXP_DEG = 4); the constants are in ep_pkg. The minus sign
// of the exponent is applied by inverting alpha's sign bit before mult0; this
// and the framing signals are this design's own choices.
//
// Interface: in_valid qualifies one term {ci, r2, alpha} (standard words);
// in_first marks the first term of an orbital sum and in_last its last term.
// Terms may come every cycle or with gaps, and sums may follow back to back.
// out_valid pulses with out_sum, LATENCY = 2*MUL_LAT + EXP_LAT + ACC_LAT
// cycles after the in_last term (37 cycles in the default build).
module ep_module #(
  parameter int EXP_W   = ep_pkg::SP_EXP_W,
  parameter int FRAC_W  = ep_pkg::SP_FRAC_W,
  parameter int MID_W   = ep_pkg::SP_MID_W,     // mult0 -> exp interface width
  parameter int MUL_LAT = ep_pkg::SP_MUL_LAT,
  parameter int EXP_LAT = ep_pkg::SP_EXP_LAT,
  parameter int ACC_LAT = ep_pkg::SP_ACC_LAT,
  parameter int EXP_AW  = 8,                    // exp table address bits
  parameter int EXP_DEG = 2                     // exp polynomial degree
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic                  in_first,
  input  logic                  in_last,
  input  logic [EXP_W+FRAC_W:0] ci,
  input  logic [EXP_W+FRAC_W:0] r2,
  input  logic [EXP_W+FRAC_W:0] alpha,
  output logic                  out_valid,
  output logic [EXP_W+FRAC_W:0] out_sum
);
  localparam int W       = EXP_W + FRAC_W + 1;
  localparam int MID_F   = MID_W - 1 - EXP_W;

  // ---------------- mult0: -alpha * r^2 ----------------
  logic             m0_valid;
  logic [MID_W-1:0] m0_p;
  fp_mult #(
    .EXP_W(EXP_W), .FA_W(FRAC_W), .FB_W(FRAC_W), .FO_W(MID_F), .LATENCY(MUL_LAT)
  ) u_mult0 (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .a         ({~alpha[W-1], alpha[W-2:0]}),
    .b         (r2),
    .out_valid (m0_valid),
    .p         (m0_p)
  );

  // ---------------- exp ----------------
  logic         ex_valid;
  logic [W-1:0] ex_y;
  exp_module #(
    .EXP_W(EXP_W), .FI_W(MID_F), .FO_W(FRAC_W), .AW(EXP_AW), .PDEG(EXP_DEG),
    .LATENCY(EXP_LAT)
  ) u_exp (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (m0_valid),
    .x         (m0_p),
    .out_valid (ex_valid),
    .y         (ex_y)
  );

  // C_i waits for the exp result.
  logic [W-1:0] ci_d;
  pipe_delay #(.WIDTH(W), .DEPTH(MUL_LAT + EXP_LAT)) u_ci_dly (
    .clk (clk), .rst (rst), .d (ci), .q (ci_d)
  );

  // ---------------- mult1: C_i * exp ----------------
  logic         m1_valid;
  logic [W-1:0] m1_p;
  fp_mult #(
    .EXP_W(EXP_W), .FA_W(FRAC_W), .FB_W(FRAC_W), .FO_W(FRAC_W), .LATENCY(MUL_LAT)
  ) u_mult1 (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (ex_valid),
    .a         (ex_y),
    .b         (ci_d),
    .out_valid (m1_valid),
    .p         (m1_p)
  );

  // Frame markers follow the term through both multipliers and the exp unit.
  logic first_d, last_d;
  pipe_delay #(.WIDTH(2), .DEPTH(2 * MUL_LAT + EXP_LAT)) u_mark_dly (
    .clk (clk), .rst (rst), .d ({in_first, in_last}), .q ({first_d, last_d})
  );

  // ---------------- accumulator ----------------
  fp_acc #(
    .EXP_W(EXP_W), .FRAC_W(FRAC_W), .LATENCY(ACC_LAT)
  ) u_acc (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (m1_valid),
    .in_first  (first_d),
    .in_last   (last_d),
    .in_data   (m1_p),
    .out_valid (out_valid),
    .out_sum   (out_sum)
  );

  // Frame markers must reach the accumulator together with a valid product;
  // they do so as long as in_first/in_last are raised only with in_valid.
  assert property (@(posedge clk) disable iff (rst) (first_d || last_d) |-> m1_valid)
    else $error("ep_module: frame marker without a term");

endmodule
