// hist_ram: history memory of the twelve ADC devices.
//
// Holds the voltage u and current i of switches S1..S6 (entries 0..5) and
// diodes D1..D6 (entries 6..11) computed in the present step; they are read
// back one step later as u(k-1), i(k-1) by the history-current update and
// by the diode state logic (the z^-1 of the model).  The device pipeline
// delivers all twelve results in the same cycle, so the memory is written
// as a whole (we) and read in parallel.  Cleared to zero by reset, which
// starts the model from rest.
module hist_ram
  import vsi_pkg::*;
#(
  parameter int N = NDEV
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  we,
  input  fp32_t u_in [N],
  input  fp32_t i_in [N],
  output fp32_t u_q  [N],
  output fp32_t i_q  [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        u_q[k] <= F_ZERO;
        i_q[k] <= F_ZERO;
      end
    end else if (we) begin
      u_q <= u_in;
      i_q <= i_in;
    end
  end

endmodule
