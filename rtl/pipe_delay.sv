// pipe_delay - fixed-length register delay line.
// Delays a W-bit word by N clock cycles (N = 0 is a plain wire). Used to
// balance pipeline branches so that results of one bunch crossing leave a
// block together. Registers are reset to zero.
module pipe_delay #(
  parameter int W = 8,
  parameter int N = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] sr [N];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < N; i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[N-1];
  end
endmodule
