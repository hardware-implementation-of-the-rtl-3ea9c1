// rasc_fpga_top: one FPGA of the accelerator blade, with two EP cores.
//
// The board pairs each FPGA with two 16 MB QDR SRAM banks (MEM0, MEM1) that
// deliver a 128-bit word per clock and an 8 MB bank (MEM2) for results. Each
// EP core is fed from its own input bank: one 128-bit word carries one term of
// an orbital sum as three 32-bit single-precision fields,
//     [31:0] C_i    [63:32] r^2    [95:64] alpha_i    [127:96] unused,
// so both cores run at one term per clock. The two results of each sum index
// are written together to MEM2 as one word {64'b0, sum from core 1, sum from
// core 0}. The pairing of two cores with the two input banks and the shared
// result bank follows the published board configuration; the word layout, the
// address sequencing and the control handshake are this design's own choices.
//
// Operation: the host (through the vendor's core-services logic, which is not
// part of this RTL) loads n_terms (terms per sum) and n_sums (sums per bank)
// and pulses start. The unit then reads addresses 0 .. n_terms*n_sums-1 from
// both input banks, one per clock, marks the first and last term of every sum
// as the data return, and writes result k to MEM2 address k. done pulses for
// one cycle when the last result has been written; busy is high in between.
// start is ignored while busy; n_terms = 0 or n_sums = 0 finishes at once.
//
// Memory timing: a read request (mem_rd_en, mem_rd_addr) is answered any
// number of cycles later by mem_rd_valid with mem_rd_data, in request order.
// The two input banks must answer with the same latency, which keeps the two
// cores in step (checked by an assertion). Writes to MEM2 take one cycle.
module rasc_fpga_top #(
  parameter int ADDR_W     = 20,   // 16 MB of 128-bit words
  parameter int OUT_ADDR_W = 19,   // 8 MB of 128-bit words
  parameter int CNT_W      = 20
) (
  input  logic                          clk,
  input  logic                          rst,
  // control, from the host
  input  logic                          start,
  input  logic [CNT_W-1:0]              n_terms,
  input  logic [OUT_ADDR_W-1:0]         n_sums,
  output logic                          busy,
  output logic                          done,
  // MEM0 (index 0) and MEM1 (index 1) read ports
  output logic [1:0]                    mem_rd_en,
  output logic [1:0][ADDR_W-1:0]        mem_rd_addr,
  input  logic [1:0]                    mem_rd_valid,
  input  logic [1:0][127:0]             mem_rd_data,
  // MEM2 write port
  output logic                          mem2_wr_en,
  output logic [OUT_ADDR_W-1:0]         mem2_wr_addr,
  output logic [127:0]                  mem2_wr_data
);
  localparam int NUM_EP = 2;
  localparam int TW     = ADDR_W + 1;

  // ---------------- read sequencing ----------------
  logic [CNT_W-1:0]      terms_q;
  logic [OUT_ADDR_W-1:0] sums_q;
  logic [TW-1:0]         total_q, rd_cnt;
  logic                  reading;
  logic [OUT_ADDR_W-1:0] wr_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      reading <= 1'b0;
      terms_q <= '0;
      sums_q  <= '0;
      total_q <= '0;
      rd_cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        terms_q <= n_terms;
        sums_q  <= n_sums;
        total_q <= TW'(n_terms * n_sums);
        rd_cnt  <= '0;
        if (n_terms == '0 || n_sums == '0) begin
          done <= 1'b1;
        end else begin
          busy    <= 1'b1;
          reading <= 1'b1;
        end
      end else if (busy) begin
        if (reading) begin
          rd_cnt <= rd_cnt + TW'(1);
          if (rd_cnt == total_q - TW'(1)) reading <= 1'b0;
        end
        if (mem2_wr_en && mem2_wr_addr == sums_q - OUT_ADDR_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  for (genvar m = 0; m < NUM_EP; m++) begin : g_rd
    assign mem_rd_en[m]   = reading;
    assign mem_rd_addr[m] = rd_cnt[ADDR_W-1:0];
  end

  // ---------------- EP cores ----------------
  logic [NUM_EP-1:0]       ep_valid;
  logic [NUM_EP-1:0][31:0] ep_sum;

  for (genvar m = 0; m < NUM_EP; m++) begin : g_ep
    logic [CNT_W-1:0] term_idx;   // index of the returning term within its sum
    logic             first, last;

    assign first = (term_idx == '0);
    assign last  = (term_idx == terms_q - CNT_W'(1));

    always_ff @(posedge clk) begin
      if (rst || (start && !busy)) term_idx <= '0;
      else if (mem_rd_valid[m])    term_idx <= last ? '0 : term_idx + CNT_W'(1);
    end

    ep_module u_ep (
      .clk       (clk),
      .rst       (rst),
      .in_valid  (mem_rd_valid[m]),
      .in_first  (mem_rd_valid[m] && first),
      .in_last   (mem_rd_valid[m] && last),
      .ci        (mem_rd_data[m][31:0]),
      .r2        (mem_rd_data[m][63:32]),
      .alpha     (mem_rd_data[m][95:64]),
      .out_valid (ep_valid[m]),
      .out_sum   (ep_sum[m])
    );
  end

  // ---------------- result write-back ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      mem2_wr_en   <= 1'b0;
      wr_cnt       <= '0;
      mem2_wr_addr <= '0;
      mem2_wr_data <= '0;
    end else begin
      mem2_wr_en <= ep_valid[0];
      if (start && !busy) wr_cnt <= '0;
      else if (ep_valid[0]) begin
        mem2_wr_addr <= wr_cnt;
        mem2_wr_data <= {64'b0, ep_sum[1], ep_sum[0]};
        wr_cnt       <= wr_cnt + OUT_ADDR_W'(1);
      end
    end
  end

  // The two input banks answer in step, so the two cores finish in step.
  assert property (@(posedge clk) disable iff (rst) mem_rd_valid[0] == mem_rd_valid[1])
    else $error("rasc_fpga_top: input banks out of step");
  assert property (@(posedge clk) disable iff (rst) ep_valid[0] == ep_valid[1])
    else $error("rasc_fpga_top: EP cores out of step");

endmodule
