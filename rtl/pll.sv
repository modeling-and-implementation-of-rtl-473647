// pll: synchronous-reference-frame phase-locked loop for the grid angle.
//
// Phase detector: clarke (abc -> alpha/beta) then park (alpha/beta -> dq)
// with the present estimate theta.  With the park convention used here the
// d axis follows the grid voltage vector, so the component that vanishes at
// lock is u_q = V sin(phi - theta); the loop filter input is u_q - u_q*
// with u_q* = 0.  Loop filter: pi_ctrl with the PLL coefficients (Kp 2.85,
// Ki 1268.35 discretised with dt = 10 us).  VCO: omega = PI output + wn
// (628 rad/s), theta(k) = theta(k-1) + dt * omega, wrapped into [0, 2pi)
// by subtracting 2pi.  sincos_cordic then gives sin/cos of the new theta
// for the next step's phase detector and for the controller.
//
// Timing: va/vb/vc sampled on in_valid, once per simulation step; out_valid
// pulses when theta, sin_t, cos_t, ud, uq and omega are updated (about 120
// cycles later).  All outputs are held between updates.  Reset: theta = 0,
// sin = 0, cos = 1, loop filter cleared.
module pll
  import vsi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t va,
  input  fp32_t vb,
  input  fp32_t vc,
  input  coef_t coef,
  output logic  out_valid,
  output fp32_t theta,
  output fp32_t sin_t,
  output fp32_t cos_t,
  output fp32_t ud,
  output fp32_t uq,
  output fp32_t omega
);

  // phase detector
  fp32_t al, be;
  logic  cl_v, pk_v;
  clarke u_clarke (.clk, .rst_n, .in_valid, .a(va), .b(vb), .c(vc),
                   .out_valid(cl_v), .alpha(al), .beta(be));
  park u_park (.clk, .rst_n, .in_valid(cl_v), .alpha(al), .beta(be), .sin_t, .cos_t,
               .out_valid(pk_v), .d(ud), .q(uq));

  // error u_q - u_q* (u_q* = 0)
  fp32_t err;
  logic  err_v;
  fp_add #(.LAT(7)) u_err (.clk, .add_sub(1'b0), .data_a(uq), .data_b(F_ZERO), .result(err));
  delay_line #(.W(1), .N(7)) u_ev (.clk, .rst_n, .d(pk_v), .q(err_v));

  // loop filter
  fp32_t pi_u;
  logic  pi_v;
  pi_ctrl u_pi (.clk, .rst_n, .in_valid(err_v), .x(err), .a1(coef.pll_a1), .a2(coef.pll_a2),
                .a3(coef.pll_a3), .out_valid(pi_v), .u(pi_u));

  // VCO: omega = pi + wn ; theta += dt * omega ; wrap
  fp32_t w_sum, dth, th_sum, th_wrap;
  logic  w_v, th_v, wr_v;
  fp_add #(.LAT(7)) u_w (.clk, .add_sub(1'b1), .data_a(pi_u), .data_b(coef.wn), .result(w_sum));
  delay_line #(.W(1), .N(7)) u_wv (.clk, .rst_n, .d(pi_v), .q(w_v));
  fp_mul #(.LAT(5)) u_dth (.clk, .data_a(w_sum), .data_b(coef.dt), .result(dth));
  fp_add #(.LAT(7)) u_th (.clk, .add_sub(1'b1), .data_a(theta), .data_b(dth), .result(th_sum));
  delay_line #(.W(1), .N(12)) u_tv (.clk, .rst_n, .d(w_v), .q(th_v));
  fp_add #(.LAT(7)) u_wrap (.clk, .add_sub(1'b0), .data_a(th_sum), .data_b(F_TWO_PI), .result(th_wrap));
  delay_line #(.W(1), .N(7)) u_wrv (.clk, .rst_n, .d(th_v), .q(wr_v));

  // theta >= 2pi exactly when th_sum - 2pi is not negative
  fp32_t th_new, th_sum_d;
  delay_line #(.W(32), .N(7)) u_tsd (.clk, .rst_n, .d(th_sum), .q(th_sum_d));
  assign th_new = th_wrap[31] ? th_sum_d : th_wrap;

  logic  sc_done;
  fp32_t s_new, c_new;
  sincos_cordic u_sc (.clk, .rst_n, .start(wr_v), .theta(th_new), .done(sc_done),
                      .sin_t(s_new), .cos_t(c_new));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      theta     <= F_ZERO;
      omega     <= F_ZERO;
      sin_t     <= F_ZERO;
      cos_t     <= F_ONE;
      out_valid <= 1'b0;
    end else begin
      out_valid <= sc_done;
      if (w_v) omega <= w_sum;
      if (wr_v) theta <= th_new;
      if (sc_done) begin
        sin_t <= s_new;
        cos_t <= c_new;
      end
    end
  end

endmodule
