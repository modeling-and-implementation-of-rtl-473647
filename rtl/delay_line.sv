// delay_line: W-bit shift register of depth N (N >= 1), used to align
// operands and valid strobes with the fixed latencies of the float units.
// Resets to zero so that valid strobes start inactive.
module delay_line #(
  parameter int W = 32,
  parameter int N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] sr [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) sr[k] <= '0;
    end else begin
      sr[0] <= d;
      for (int k = 1; k < N; k++) sr[k] <= sr[k-1];
    end
  end

  assign q = sr[N-1];

endmodule
