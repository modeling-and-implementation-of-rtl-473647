// tb_dq_controller: 60 control steps with random filter currents, grid dq
// voltages, angles, DC voltages and reactive-power references.  A double-
// precision model of the same double loop (abc->dq, Q = 1.5(uq id - ud iq),
// PI(Vdc - Vdc*) with Kp 0.5 / Ki 10, PI(Q - Q*) with Kp 5e-4 / Ki 0.05,
// inner P gain 10, dq->abc, scaling 2/380) gives the expected modulation
// indices, currents and Q; the 121-cycle latency is checked too.
module tb_dq_controller;
  import tb_fp_pkg::*;
  import vsi_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, in_valid = 0, out_valid;
  fp32_t il [3], ud, uq, sin_t, cos_t, vdc, vdc_ref, q_ref, m [3], id, iq, q;
  int checks = 0, failures = 0;

  dq_controller dut (.clk, .rst_n, .in_valid, .il, .ud, .uq, .sin_t, .cos_t, .vdc, .vdc_ref, .q_ref,
                     .coef(COEF_DEFAULT), .out_valid, .m, .id, .iq, .q);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rr(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 100000)) / 100000.0;
  endfunction

  initial begin
    real dt, s, c, al, be, eid, eiq, eq_, ev, evp, uv, eqe, eqp, uqq, vd, vq, va_, vb_, vc_, em [3], th;
    int lat;
    dt = 10e-6;
    evp = 0; uv = 0; eqp = 0; uqq = 0;
    for (int x = 0; x < 3; x++) il[x] = 0;
    ud = 0; uq = 0; sin_t = 0; cos_t = 0; vdc = 0; vdc_ref = 0; q_ref = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 60; k++) begin
      @(negedge clk);
      for (int x = 0; x < 3; x++) il[x] = r2f(rr(-20.0, 20.0));
      ud = r2f(rr(240.0, 260.0)); uq = r2f(rr(-5.0, 5.0));
      th = rr(0.0, 6.28); sin_t = r2f($sin(th)); cos_t = r2f($cos(th));
      vdc = r2f(rr(370.0, 390.0)); vdc_ref = r2f(380.0); q_ref = r2f(rr(-1000.0, 1000.0));
      s = f2r(sin_t); c = f2r(cos_t);
      al = (2.0 * f2r(il[0]) - f2r(il[1]) - f2r(il[2])) / 3.0;
      be = (f2r(il[1]) - f2r(il[2])) / $sqrt(3.0);
      eid = al * c + be * s;
      eiq = be * c - al * s;
      eq_ = 1.5 * (f2r(uq) * eid - f2r(ud) * eiq);
      ev = f2r(vdc) - f2r(vdc_ref);
      uv = uv + 0.5 * (ev - evp) + 10.0 * dt / 2.0 * (ev + evp); evp = ev;
      eqe = eq_ - f2r(q_ref);
      uqq = uqq + 5e-4 * (eqe - eqp) + 0.05 * dt / 2.0 * (eqe + eqp); eqp = eqe;
      vd = 10.0 * (uv - eid);
      vq = 10.0 * (uqq - eiq);
      va_ = vd * c - vq * s;
      vb_ = vd * s + vq * c;
      em[0] = va_ * 2.0 / 380.0;
      em[1] = (-va_ / 2.0 + $sqrt(3.0) / 2.0 * vb_) * 2.0 / 380.0;
      em[2] = (-va_ / 2.0 - $sqrt(3.0) / 2.0 * vb_) * 2.0 / 380.0;
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 199) begin @(negedge clk); lat++; end
      checks += 4;
      if (lat != 121) begin failures++; $display("latency %0d", lat); end
      if (!near(f2r(id), eid, 1e-5, 1e-4)) begin failures++; $display("id %f exp %f", f2r(id), eid); end
      if (!near(f2r(iq), eiq, 1e-5, 1e-4)) begin failures++; $display("iq %f exp %f", f2r(iq), eiq); end
      if (!near(f2r(q), eq_, 1e-4, 1e-2)) begin failures++; $display("q %f exp %f", f2r(q), eq_); end
      for (int x = 0; x < 3; x++) begin
        checks++;
        if (!near(f2r(m[x]), em[x], 1e-4, 1e-5)) begin failures++; $display("step %0d m%0d %f exp %f", k, x, f2r(m[x]), em[x]); end
      end
      repeat (60) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
