// pipe_delay: a chain of DEPTH registers of WIDTH bits.
//
// Used to pad each arithmetic unit's pipeline to its specified latency and to
// carry side-band data (coefficients, frame markers) alongside the datapath.
// DEPTH = 0 gives a plain wire. The registers have no reset; callers that send
// control bits through a delay use the rst input, which clears the chain.
module pipe_delay #(
  parameter int WIDTH = 1,
  parameter int DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[DEPTH-1];
  end
endmodule
