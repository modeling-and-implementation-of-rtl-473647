// dq_controller: voltage and current double-loop controller of the inverter.
//
// Once per step, from the filter currents, the grid-voltage dq components
// and sin/cos of the PLL angle:
//   1. i_d, i_q     : clarke + park of the filter currents
//   2. Q            = 1.5 (u_q i_d - u_d i_q), reactive power at the grid
//   3. i_d*         = PI_vdc(Vdc - Vdc*)       outer DC-voltage loop
//      i_q*         = PI_q(Q - Q*)             outer reactive-power loop
//                       (Q falls as i_q rises in this frame, hence Q - Q*)
//   4. v_d, v_q     = kp_i (i_d* - i_d), kp_i (i_q* - i_q)   inner P loops
//   5. v_a, v_b, v_c: dq_to_abc
//   6. m_x          = kmod * v_x, kmod = 2 / Vdc*   modulation indices
// The loop structure (PI outer loops, proportional inner loops, dq/abc and
// SPWM) follows the reference control scheme; the Q formula, the error
// signs, the gains and the kmod scaling are this design's choices.  There
// is no grid-voltage feed-forward and no limit on the references.
//
// Timing: inputs sampled on in_valid (they must stay stable until the
// park stage has taken sin/cos, i.e. about 35 cycles); out_valid pulses
// when m, id, iq, q are updated, about 120 cycles after in_valid; outputs
// are held.  One in_valid per simulation step.
module dq_controller
  import vsi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t il [3],
  input  fp32_t ud,
  input  fp32_t uq,
  input  fp32_t sin_t,
  input  fp32_t cos_t,
  input  fp32_t vdc,
  input  fp32_t vdc_ref,
  input  fp32_t q_ref,
  input  coef_t coef,
  output logic  out_valid,
  output fp32_t m [3],
  output fp32_t id,
  output fp32_t iq,
  output fp32_t q
);

  // 1. abc -> dq of the filter currents
  fp32_t ial, ibe;
  logic  cl_v, pk_v;
  clarke u_clarke (.clk, .rst_n, .in_valid, .a(il[0]), .b(il[1]), .c(il[2]),
                   .out_valid(cl_v), .alpha(ial), .beta(ibe));
  park u_park (.clk, .rst_n, .in_valid(cl_v), .alpha(ial), .beta(ibe), .sin_t, .cos_t,
               .out_valid(pk_v), .d(id), .q(iq));

  // 3a. outer DC-voltage loop, started together with step 1
  fp32_t ev, id_ref;
  logic  ev_v, idr_v;
  fp_add #(.LAT(7)) u_ev (.clk, .add_sub(1'b0), .data_a(vdc), .data_b(vdc_ref), .result(ev));
  delay_line #(.W(1), .N(7)) u_evv (.clk, .rst_n, .d(in_valid), .q(ev_v));
  pi_ctrl u_pi_v (.clk, .rst_n, .in_valid(ev_v), .x(ev), .a1(coef.vdc_a1), .a2(coef.vdc_a2),
                  .a3(coef.vdc_a3), .out_valid(idr_v), .u(id_ref));

  // 2. reactive power
  fp32_t p1, p2, qd, qn;
  logic  q_v;
  fp_mul #(.LAT(5)) u_p1 (.clk, .data_a(uq), .data_b(id), .result(p1));
  fp_mul #(.LAT(5)) u_p2 (.clk, .data_a(ud), .data_b(iq), .result(p2));
  fp_add #(.LAT(7)) u_qd (.clk, .add_sub(1'b0), .data_a(p1), .data_b(p2), .result(qd));
  fp_mul #(.LAT(5)) u_qs (.clk, .data_a(qd), .data_b(F_1P5), .result(qn));
  delay_line #(.W(1), .N(17)) u_qv (.clk, .rst_n, .d(pk_v), .q(q_v));

  // 3b. outer reactive-power loop, started when Q is updated (q_vr)
  logic  q_vr;
  fp32_t eq, iq_ref;
  logic  eq_v, iqr_v;
  fp_add #(.LAT(7)) u_eq (.clk, .add_sub(1'b0), .data_a(q), .data_b(q_ref), .result(eq));
  delay_line #(.W(1), .N(7)) u_eqv (.clk, .rst_n, .d(q_vr), .q(eq_v));
  pi_ctrl u_pi_q (.clk, .rst_n, .in_valid(eq_v), .x(eq), .a1(coef.q_a1), .a2(coef.q_a2),
                  .a3(coef.q_a3), .out_valid(iqr_v), .u(iq_ref));

  // 4. inner proportional loops, started when i_q* is ready (i_d* is
  //    ready long before: it only waits for the DC-voltage PI)
  fp32_t edd, eqq, vd, vq;
  logic  vdq_v;
  fp_add #(.LAT(7)) u_ed (.clk, .add_sub(1'b0), .data_a(id_ref), .data_b(id), .result(edd));
  fp_add #(.LAT(7)) u_eq2 (.clk, .add_sub(1'b0), .data_a(iq_ref), .data_b(iq), .result(eqq));
  fp_mul #(.LAT(5)) u_vd (.clk, .data_a(edd), .data_b(coef.kp_i), .result(vd));
  fp_mul #(.LAT(5)) u_vq (.clk, .data_a(eqq), .data_b(coef.kp_i), .result(vq));
  delay_line #(.W(1), .N(12)) u_vdqv (.clk, .rst_n, .d(iqr_v), .q(vdq_v));

  // 5. dq -> abc
  fp32_t va, vb, vc;
  logic  abc_v;
  dq_to_abc u_inv (.clk, .rst_n, .in_valid(vdq_v), .d(vd), .q(vq), .sin_t, .cos_t,
                   .out_valid(abc_v), .a(va), .b(vb), .c(vc));

  // 6. modulation indices
  fp32_t ma, mb, mc;
  logic  m_v;
  fp_mul #(.LAT(5)) u_ma (.clk, .data_a(va), .data_b(coef.kmod), .result(ma));
  fp_mul #(.LAT(5)) u_mb (.clk, .data_a(vb), .data_b(coef.kmod), .result(mb));
  fp_mul #(.LAT(5)) u_mc (.clk, .data_a(vc), .data_b(coef.kmod), .result(mc));
  delay_line #(.W(1), .N(5)) u_mv (.clk, .rst_n, .d(abc_v), .q(m_v));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q         <= F_ZERO;
      q_vr      <= 1'b0;
      out_valid <= 1'b0;
      for (int x = 0; x < 3; x++) m[x] <= F_ZERO;
    end else begin
      q_vr      <= q_v;
      out_valid <= m_v;
      if (q_v) q <= qn;
      if (m_v) m <= '{ma, mb, mc};
    end
  end

  // the DC-voltage loop must finish before the inner loops start
  assert property (@(posedge clk) disable iff (!rst_n) vdq_v |-> !idr_v)
    else $error("dq_controller: i_d* not ready");

endmodule
