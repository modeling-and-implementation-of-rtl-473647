// tb_pll: feeds the PLL a balanced 250 V grid, va = V cos(phi),
// once every 200 cycles (one simulation step, shortened), with the grid
// at 628 rad/s and then stepped to 600 rad/s.  Checks that theta locks to
// the grid angle and omega to the grid frequency, that theta stays wrapped
// in [0, 2pi) and wraps repeatedly, that sin/cos match theta, and that
// u_d equals the amplitude and u_q vanishes at lock.
module tb_pll;
  import tb_fp_pkg::*;
  import vsi_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, in_valid = 0, out_valid;
  fp32_t va, vb, vc, theta, sin_t, cos_t, ud, uq, omega;
  int checks = 0, failures = 0, wraps = 0;

  pll dut (.clk, .rst_n, .in_valid, .va, .vb, .vc, .coef(COEF_DEFAULT), .out_valid,
           .theta, .sin_t, .cos_t, .ud, .uq, .omega);

  localparam real PI2 = 6.283185307179586;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real wrap_pi(input real a);
    while (a > PI2 / 2.0) a -= PI2;
    while (a < -PI2 / 2.0) a += PI2;
    return a;
  endfunction

  initial begin
    real phi, w, dt, th_prev, err;
    int lat;
    dt = 10e-6; phi = 0.7; w = 628.0; th_prev = 0.0;
    va = 0; vb = 0; vc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 6000; k++) begin
      if (k == 3000) w = 600.0;
      phi = phi + w * dt;
      if (phi >= PI2) phi -= PI2;
      @(negedge clk);
      va = r2f(250.0 * $cos(phi));
      vb = r2f(250.0 * $cos(phi - PI2 / 3.0));
      vc = r2f(250.0 * $cos(phi + PI2 / 3.0));
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 199) begin @(negedge clk); lat++; end
      checks++;
      if (!out_valid) begin failures++; $display("no result in a step"); end
      if (f2r(theta) < 0.0 || f2r(theta) >= PI2) begin failures++; $display("theta %f out of range", f2r(theta)); end
      if (f2r(theta) < th_prev - 3.0) wraps++;
      th_prev = f2r(theta);
      checks += 2;
      if (!near(f2r(sin_t), $sin(f2r(theta)), 0.0, 1e-5)) begin failures++; $display("sin %f of %f", f2r(sin_t), f2r(theta)); end
      if (!near(f2r(cos_t), $cos(f2r(theta)), 0.0, 1e-5)) begin failures++; $display("cos %f of %f", f2r(cos_t), f2r(theta)); end
      if (k == 2999 || k == 5999) begin
        // locked: theta follows phi (theta of this step uses this step's sample)
        err = wrap_pi(f2r(theta) - phi);
        checks += 4;
        if (rabs(err) > 0.02) begin failures++; $display("step %0d: phase error %f", k, err); end
        if (!near(f2r(omega), w, 2e-3, 0.0)) begin failures++; $display("step %0d: omega %f exp %f", k, f2r(omega), w); end
        if (!near(f2r(ud), 250.0, 2e-3, 0.0)) begin failures++; $display("ud %f", f2r(ud)); end
        if (rabs(f2r(uq)) > 5.0) begin failures++; $display("uq %f", f2r(uq)); end
        $display("step %0d: theta %f phi %f omega %f ud %f uq %f", k, f2r(theta), phi, f2r(omega), f2r(ud), f2r(uq));
      end
      repeat (200 - lat - 2) @(negedge clk);
    end
    checks++;
    if (wraps < 5) begin failures++; $display("theta wrapped only %0d times", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
