// exp_rom: synchronous read-only table of e^(k / 2^AW) for k = 0 .. 2^AW-1.
//
// Each entry is an unsigned fixed-point number with 2 integer bits and FW
// fraction bits, rounded to nearest. The contents are computed at elaboration
// by a constant function that sums the Taylor series of e^y in 120-fraction-bit
// integer arithmetic, so no data file is needed; FW may be at most 118.
// The read is registered (one cycle from addr to data), which lets synthesis
// map the table onto block RAM, as the published exp unit does.
module exp_rom #(
  parameter int AW = 8,
  parameter int FW = 31
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [FW+1:0] data
);
  if (FW > 118) begin : g_bad_fw
    $error("exp_rom: FW must not exceed 118");
  end

  // e^(k/2^AW) with FW fraction bits: series sum_n y^n/n! with y = k/2^AW.
  function automatic logic [FW+1:0] exp_entry(int k);
    logic [255:0] one, yv, term, sum;
    one  = 256'd1 << 120;
    yv   = 256'(k) << (120 - AW);
    term = one;
    sum  = one;
    for (int n = 1; n < 48; n++) begin
      term = ((term * yv) >> 120) / 256'(n);
      sum  = sum + term;
    end
    // round from 120 to FW fraction bits
    sum = (sum + (256'd1 << (119 - FW))) >> (120 - FW);
    return sum[FW+1:0];
  endfunction

  logic [FW+1:0] table_q [2**AW];
  for (genvar k = 0; k < 2**AW; k++) begin : g_tab
    localparam logic [FW+1:0] ENTRY = exp_entry(k);
    assign table_q[k] = ENTRY;
  end

  always_ff @(posedge clk) data <= table_q[addr];

endmodule
