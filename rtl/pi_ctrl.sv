// pi_ctrl: discrete PI controller.
//
// Trapezoidal discretisation of u(s) = (Kp + Ki/s) x(s):
//   u(k) = A1 x(k) + A2 x(k-1) + A3 u(k-1),
//   A1 = dt/2 Ki + Kp,  A2 = dt/2 Ki - Kp,  A3 = 1   (host-precomputed).
// Structure: three FLOAT_MULT (x*A1, x(k-1)*A2, u(k-1)*A3), a FLOAT_ADD of
// the first two and a FLOAT_ADD of that sum with the third, plus the
// registers holding x(k-1) and u(k-1).  There is no output limit.
//
// Timing: x and the coefficients are sampled on in_valid; u updates and
// out_valid pulses LAT = 5 + 7 + 7 + 1 = 20 cycles later.  A new in_valid
// must not arrive before out_valid of the previous one (one sample per
// simulation step).  Reset clears x(k-1) and u(k-1).
module pi_ctrl
  import vsi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t x,
  input  fp32_t a1,
  input  fp32_t a2,
  input  fp32_t a3,
  output logic  out_valid,
  output fp32_t u
);

  fp32_t x_prev, x_hold, m1, m2, m3, m3_d, s12, un;
  logic  v_pipe;

  fp_mul #(.LAT(5)) u_m1 (.clk, .data_a(x),      .data_b(a1), .result(m1));
  fp_mul #(.LAT(5)) u_m2 (.clk, .data_a(x_prev), .data_b(a2), .result(m2));
  fp_mul #(.LAT(5)) u_m3 (.clk, .data_a(u),      .data_b(a3), .result(m3));
  fp_add #(.LAT(7)) u_a1 (.clk, .add_sub(1'b1), .data_a(m1), .data_b(m2), .result(s12));
  delay_line #(.W(32), .N(7)) u_m3d (.clk, .rst_n, .d(m3), .q(m3_d));
  fp_add #(.LAT(7)) u_a2 (.clk, .add_sub(1'b1), .data_a(s12), .data_b(m3_d), .result(un));
  delay_line #(.W(1), .N(19)) u_vd (.clk, .rst_n, .d(in_valid), .q(v_pipe));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      u      <= F_ZERO;
      x_prev <= F_ZERO;
      x_hold <= F_ZERO;
    end else begin
      out_valid <= v_pipe;
      if (in_valid) x_hold <= x;
      if (v_pipe) begin
        u      <= un;
        x_prev <= x_hold;
      end
    end
  end

endmodule
